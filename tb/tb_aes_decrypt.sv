// tb_aes_decrypt: the byte-serial decrypter core.
//
// Cipher texts are made by aes_ref_pkg (and the FIPS-197 Appendix B / C.1
// pairs). Checks: plain text recovered; done exactly 490 edges after the
// start edge; an ld given while the last round key is still being prepared
// waits and starts the decryption on the 161st edge after the kld edge; a
// second block under the same key decrypts without a new kld; done is
// cleared by kld. The inverse key schedule is checked through its result:
// after a block the key register must hold the cipher key again.
module tb_aes_decrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ld = 1'b0, kld = 1'b0;
  logic [127:0] key, enc_data, dec_data;
  logic done;
  int checks = 0, failures = 0;

  aes_decrypt dut (.clk, .rst, .kld, .ld, .key, .enc_data, .dec_data, .done);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // kld, then ld a few cycles later (pending), then a second block
  task automatic run(logic [127:0] k, logic [127:0] c1, logic [127:0] p1,
                     logic [127:0] c2, logic [127:0] p2);
    int e;
    @(negedge clk);
    key = k; kld = 1'b1;
    @(posedge clk);                           // kld edge
    @(negedge clk) kld = 1'b0;
    #1 chk("done cleared by kld", 128'(done), 128'd0);
    enc_data = c1; ld = 1'b1;
    @(negedge clk) ld = 1'b0;                 // ld seen on edge 1 after kld
    e = 1;
    do begin @(posedge clk); e++; #1; end while (dut.phase != PH_ARK && e < 2000);
    chk("pending start edge", 128'(e), 128'd161);
    e = 0;
    do begin @(posedge clk); e++; #1; end while (!done && e < 2000);
    chk("latency", 128'(e), 128'd490);
    chk("plain text 1", dec_data, p1);
    chk("key register back at cipher key", dut.key_q, k);
    // second block, same key: wait until ready, then ld
    do @(posedge clk); while (dut.phase != PH_READY);
    @(negedge clk);
    enc_data = c2; ld = 1'b1;
    @(posedge clk);
    @(negedge clk) ld = 1'b0;
    e = 0;
    do begin @(posedge clk); e++; #1; end while (!done && e < 2000);
    chk("latency 2", 128'(e), 128'd490);
    chk("plain text 2", dec_data, p2);
  endtask

  initial begin
    logic [127:0] k, p, q;
    key = '0; enc_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734,
        encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0), 128'h0);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff,
        encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h0), 128'h0);
    for (int i = 0; i < 5; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      q = {$urandom, $urandom, $urandom, $urandom};
      run(k, encrypt(k, p), p, encrypt(k, q), q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
