// tb_aes_encrypt: the byte-serial encrypter core.
//
// Encrypts the FIPS-197 Appendix B and C.1 blocks and random blocks, compares
// with aes_ref_pkg, and checks that done rises exactly 490 clock edges after
// the load edge. It also watches the gated clocks: the state and
// Mix-Columns clocks must have no edge during key expansion, the key clock
// must run then, and text_out must stay unchanged while the core is idle.
module tb_aes_encrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ld = 1'b0;
  logic [127:0] key, text_in, text_out;
  logic done;
  int checks = 0, failures = 0;
  int n_state_edges_ke = 0, n_mc_edges_ke = 0, n_key_edges_ke = 0;

  aes_encrypt dut (.clk, .rst, .ld, .key, .text_in, .text_out, .done);

  always #5 clk = ~clk;

  // phase of the cycle that ends at the next rising edge
  phase_e ph_n;
  always @(negedge clk) ph_n = dut.phase;
  always @(posedge dut.clk_state) if (ph_n == PH_KE) n_state_edges_ke++;
  always @(posedge dut.clk_mc)    if (ph_n == PH_KE) n_mc_edges_ke++;
  always @(posedge dut.clk_key)   if (ph_n == PH_KE) n_key_edges_ke++;

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run(logic [127:0] k, logic [127:0] p, logic [127:0] c);
    int e;
    @(negedge clk);
    key = k; text_in = p; ld = 1'b1;
    @(posedge clk);
    @(negedge clk) ld = 1'b0;
    key = {$urandom, $urandom, $urandom, $urandom};   // inputs only matter at the load edge
    text_in = {$urandom, $urandom, $urandom, $urandom};
    e = 0;
    do begin @(posedge clk); e++; #1; end while (!done && e < 2000);
    chk("latency", 128'(e), 128'd490);
    chk("cipher text", text_out, c);
    repeat (7) @(posedge clk);
    #1 chk("output held while idle", text_out, c);
  endtask

  initial begin
    logic [127:0] k, p;
    key = '0; text_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int i = 0; i < 10; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, encrypt(k, p));
    end
    chk("state clock edges in key expansion", 128'(n_state_edges_ke), 128'd0);
    chk("Mix-Columns clock edges in key expansion", 128'(n_mc_edges_ke), 128'd0);
    chk("key clock edges in key expansion", 128'(n_key_edges_ke), 128'd1920);
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
