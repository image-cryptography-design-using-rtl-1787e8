// tb_sub_bytes: exhaustive test of the shared S-box unit.
//
// All 256 inputs are checked in both modes against S-box tables that
// aes_ref_pkg builds by a different method (log/antilog tables), plus the
// FIPS-197 examples S(00)=63, S(53)=ed, S(ff)=16 and their inverses.
module tb_sub_bytes;
  import aes_ref_pkg::*;

  logic [7:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;
  b8 sb[256], isb[256];

  sub_bytes dut (.din, .inv, .dout);

  task automatic check(logic [7:0] i, logic mode, logic [7:0] exp);
    din = i; inv = mode;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL inv=%0d in=%02h got %02h expected %02h", mode, i, dout, exp);
    end
  endtask

  initial begin
    build_sbox(sb, isb);
    check(8'h00, 0, 8'h63); check(8'h53, 0, 8'hed); check(8'hff, 0, 8'h16);
    check(8'h63, 1, 8'h00); check(8'hed, 1, 8'h53); check(8'h16, 1, 8'hff);
    for (int i = 0; i < 256; i++) begin
      check(8'(i), 0, sb[i]);
      check(8'(i), 1, isb[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
