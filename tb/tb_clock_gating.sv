// tb_clock_gating: the latch-based clock-gating cell.
//
// en is changed at random both while clk is low and while clk is high. The
// test checks that gclk is never high while clk is low, that every rising
// edge of clk with en held high over the preceding low phase passes as a
// gclk edge, that no other edge passes, and that a change of en during the
// high phase never cuts or creates a gclk pulse (gclk stays constant while
// clk is high).
module tb_clock_gating;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int n_pass = 0, n_block = 0;

  clock_gating dut (.clk, .en, .gclk);

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic en_low;
      // low phase: en settles
      #2 en = 1'($urandom);
      en_low = en;
      #3;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
      // rising edge
      clk = 1'b1;
      #1;
      checks++;
      if (gclk !== en_low) begin failures++; $display("FAIL edge %0d: gclk=%0b en=%0b", n, gclk, en_low); end
      if (en_low) n_pass++; else n_block++;
      // en toggles in the high phase; gclk must not follow
      #2 en = ~en;
      #1;
      checks++;
      if (gclk !== en_low) begin failures++; $display("FAIL glitch in high phase %0d", n); end
      #1 clk = 1'b0;
    end
    checks++;
    if (n_pass == 0 || n_block == 0) begin failures++; $display("FAIL no pass or no block"); end
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
