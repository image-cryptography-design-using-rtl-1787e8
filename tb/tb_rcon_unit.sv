// tb_rcon_unit: the round-constant register.
//
// After RC_INIT the register must step through 01 02 04 08 10 20 40 80 1b 36
// (FIPS-197) with RC_FWD, hold with RC_HOLD, and walk the same list back
// with RC_BACK.
module tb_rcon_unit;
  import aes_pkg::*;

  logic clk = 1'b0;
  rcon_op_e op;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  logic [7:0] exp_seq [11] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36, 8'h6c};

  rcon_unit dut (.clk, .op, .rcon);

  always #5 clk = ~clk;

  task automatic step(rcon_op_e o, logic [7:0] exp);
    op = o;
    @(posedge clk); #1;
    checks++;
    if (rcon !== exp) begin
      failures++;
      $display("FAIL op=%s got %02h expected %02h", o.name(), rcon, exp);
    end
  endtask

  initial begin
    step(RC_INIT, 8'h01);
    for (int i = 1; i <= 10; i++) step(RC_FWD, exp_seq[i]);
    step(RC_HOLD, 8'h6c);
    step(RC_HOLD, 8'h6c);
    for (int i = 9; i >= 0; i--) step(RC_BACK, exp_seq[i]);
    step(RC_INIT, 8'h01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
