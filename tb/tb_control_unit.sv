// tb_control_unit: the sequencer, encrypter (INVERSE = 0) and decrypter
// (INVERSE = 1) instances.
//
// Encrypter: after an ld pulse it must spend 16 cycles in AddRoundKey, ten
// 16-cycle key expansions, ten (Inv)ShiftRows cycles, nine 32-cycle
// Mix-Columns passes and one 16-cycle final pass, raise done 490 edges after
// the load edge, keep the state and Mix-Columns clocks off during every key
// expansion cycle, route the S-box to the key for 4 cycles of each expansion
// and step RCON once per expansion.
// Decrypter: a kld pulse starts 160 cycles of forward expansion; an ld pulse
// given during it must be kept pending and start the decryption as soon as
// the key is ready; after done the key preparation must rerun, and an ld
// given once it is ready must start at once. Mechanisms counted: pending ld.
module tb_control_unit;
  import aes_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic ld_e = 1'b0, ld_d = 1'b0, kld_d = 1'b0;
  ctrl_t ctrl_e, ctrl_d;
  logic done_e, done_d;
  phase_e ph_e, ph_d;
  int checks = 0, failures = 0;
  int cnt_e [16];
  int n_ke_gated_bad = 0, n_sbox_key = 0, n_rcon = 0, n_key_in_load = 0;

  control_unit #(.INVERSE(1'b0)) dut_e (.clk, .rst, .ld(ld_e), .kld(1'b0), .ctrl(ctrl_e), .done(done_e), .phase(ph_e));
  control_unit #(.INVERSE(1'b1)) dut_d (.clk, .rst, .ld(ld_d), .kld(kld_d), .ctrl(ctrl_d), .done(done_d), .phase(ph_d));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cnt_e[ph_e]++;
    if (ph_e == PH_KE && (ctrl_e.st_en || ctrl_e.mc_en)) n_ke_gated_bad++;
    if (ctrl_e.sbox_key) n_sbox_key++;
    if (ctrl_e.rcon_en && ctrl_e.rcon_op == RC_FWD) n_rcon++;
    if (ph_e == PH_MIX && ctrl_e.mc_load && ctrl_e.key_en) n_key_in_load++;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int e;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // ---- encrypter ----
    @(negedge clk) ld_e = 1'b1;
    @(posedge clk);                         // load edge
    foreach (cnt_e[i]) cnt_e[i] = 0;
    n_ke_gated_bad = 0; n_sbox_key = 0; n_rcon = 0; n_key_in_load = 0;
    @(negedge clk) ld_e = 1'b0;
    e = 0;
    do begin @(posedge clk); e++; #1; end while (!done_e && e < 2000);
    chk("encrypt done edge", e, 490);
    chk("ARK cycles", cnt_e[PH_ARK], 16);
    chk("KE cycles", cnt_e[PH_KE], 160);
    chk("ShiftRows cycles", cnt_e[PH_PERM], 10);
    chk("MIX cycles", cnt_e[PH_MIX], 288);
    chk("FIN cycles", cnt_e[PH_FIN], 16);
    chk("state/MC clocks on during KE", n_ke_gated_bad, 0);
    chk("S-box cycles for key", n_sbox_key, 40);
    chk("RCON steps", n_rcon, 10);
    chk("key clock on in MC load cycles", n_key_in_load, 0);
    chk("back to idle", int'(ph_e), int'(PH_IDLE));

    // ---- decrypter: ld during key preparation stays pending ----
    @(negedge clk) kld_d = 1'b1;
    @(posedge clk); #1;
    chk("kld starts PRE", int'(ph_d), int'(PH_PRE));
    @(negedge clk) kld_d = 1'b0;
    repeat (20) @(posedge clk);
    @(negedge clk) ld_d = 1'b1;
    @(negedge clk) ld_d = 1'b0;
    checks++;
    if (!dut_d.pend) begin failures++; $display("FAIL ld not pending"); end
    e = 21;
    do begin @(posedge clk); e++; #1; end while (ph_d != PH_ARK && e < 2000);
    chk("decrypt starts when key ready (edges after kld)", e, 161);
    e = 0;
    do begin @(posedge clk); e++; #1; end while (!done_d && e < 2000);
    chk("decrypt done edge", e, 490);
    chk("PRE rerun after done", int'(ph_d), int'(PH_PRE));
    // ---- decrypter: ld once ready starts at once ----
    do @(posedge clk); while (ph_d != PH_READY);
    repeat (5) @(posedge clk);
    @(negedge clk) ld_d = 1'b1;
    @(posedge clk); #1;
    chk("ld when ready starts", int'(ph_d), int'(PH_ARK));
    checks++;
    if (done_d) begin failures++; $display("FAIL done not cleared at start"); end
    @(negedge clk) ld_d = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
