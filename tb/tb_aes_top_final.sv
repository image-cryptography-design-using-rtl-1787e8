// tb_aes_top_final: end-to-end test of the encrypter/decrypter pair at full
// size (the top has no parameters).
//
// Each block is loaded with a one-cycle kld pulse. The test checks the cipher
// text against the FIPS-197 known answers and against an independent
// behavioural model (aes_ref_pkg), checks that the decrypter returns the
// plain text, and checks the latencies: enc_complete 490 enabled clock
// edges after the load edge, dec_complete 491 enabled edges after that.
// Some blocks run with en toggled at random, which freezes both cores.
// It also counts how often each mechanism of the design is exercised (state
// and Mix-Columns clocks stopped during key expansion, shared S-box used by
// the key schedule, ShiftRows/InvShiftRows cycles, Mix-Columns tail writes,
// inverse key schedule, RCON stepping back, en stall) and fails if one never
// happens.
module tb_aes_top_final;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic [127:0] key, text_in, dec_data, enc_data;
  logic clk = 1'b0, en = 1'b1, kld = 1'b0, rst = 1'b1;
  logic dec_complete, enc_complete;
  int checks = 0, failures = 0;
  bit stall_mode = 0;

  // mechanism counters
  int n_gated_ke = 0, n_sbox_key = 0, n_perm = 0, n_tail = 0;
  int n_iperm = 0, n_inv_ke = 0, n_rcon_back = 0, n_stall = 0, n_dec_pre = 0;

  aes_top_final dut (.*);

  always #5 clk = ~clk;

  // drive en from the negative edge so a stall covers whole clock periods
  always @(negedge clk) en <= stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) begin
    if (!en) n_stall++;
    if (en && dut.MM0.M0.phase == PH_KE && !dut.MM0.M0.ctrl.st_en && !dut.MM0.M0.ctrl.mc_en) n_gated_ke++;
    if (en && dut.MM0.M0.ctrl.sbox_key) n_sbox_key++;
    if (en && dut.MM0.M0.ctrl.st_op == ST_PERM) n_perm++;
    if (en && dut.MM1.M0.ctrl.st_op == ST_PERM) n_iperm++;
    if (en && dut.MM0.M0.ctrl.st_op == ST_TAIL) n_tail++;
    if (en && dut.MM1.M0.phase == PH_KE && dut.MM1.M0.ctrl.key_dir) n_inv_ke++;
    if (en && dut.MM1.M0.ctrl.rcon_en && dut.MM1.M0.ctrl.rcon_op == RC_BACK) n_rcon_back++;
    if (en && dut.MM1.M0.phase == PH_PRE) n_dec_pre++;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // count enabled clock edges until sig is high
  task automatic wait_done(ref logic sig, output int edges);
    edges = 0;
    do begin
      @(posedge clk);
      if (en) edges++;
      #1;
    end while (!sig && edges < 5000);
  endtask

  task automatic run_block(logic [127:0] k, logic [127:0] pt, logic [127:0] exp_ct);
    int e1, e2;
    @(negedge clk);
    key = k; text_in = pt; kld = 1'b1;
    do @(posedge clk); while (!en); // load edge: the first enabled edge
    @(negedge clk);
    kld = 1'b0;
    wait_done(enc_complete, e1);
    check_int("encrypt latency", e1, 490);
    check("cipher text", enc_data, exp_ct);
    wait_done(dec_complete, e2);
    check_int("decrypt latency", e2, 491);
    check("decrypted text", dec_data, pt);
  endtask

  initial begin
    logic [127:0] k, p;
    key = '0; text_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // FIPS-197 Appendix B and C.1
    run_block(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
              128'h3925841d02dc09fbdc118597196a0b32);
    run_block(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
              128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // random blocks, half of them with random clock-enable stalls
    for (int i = 0; i < 6; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      stall_mode = (i % 2 == 1);
      run_block(k, p, encrypt(k, p));
      stall_mode = 0;
    end
    // every mechanism must have happened
    checks++; if (n_gated_ke  == 0) begin failures++; $display("FAIL no clock-gated key expansion"); end
    checks++; if (n_sbox_key  == 0) begin failures++; $display("FAIL shared S-box never used by key"); end
    checks++; if (n_perm      == 0) begin failures++; $display("FAIL no ShiftRows cycle"); end
    checks++; if (n_iperm     == 0) begin failures++; $display("FAIL no InvShiftRows cycle"); end
    checks++; if (n_tail      == 0) begin failures++; $display("FAIL no Mix-Columns tail write"); end
    checks++; if (n_inv_ke    == 0) begin failures++; $display("FAIL no inverse key expansion"); end
    checks++; if (n_rcon_back == 0) begin failures++; $display("FAIL RCON never stepped back"); end
    checks++; if (n_stall     == 0) begin failures++; $display("FAIL no en stall"); end
    checks++; if (n_dec_pre   == 0) begin failures++; $display("FAIL no decrypter key preparation"); end
    $display("mechanisms: gated_ke=%0d sbox_key=%0d perm=%0d iperm=%0d tail=%0d inv_ke=%0d rcon_back=%0d stall=%0d dec_pre=%0d",
             n_gated_ke, n_sbox_key, n_perm, n_iperm, n_tail, n_inv_ke, n_rcon_back, n_stall, n_dec_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
