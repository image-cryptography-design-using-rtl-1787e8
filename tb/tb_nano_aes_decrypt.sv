// tb_nano_aes_decrypt: the decrypt core behind its core-level clock gate.
//
// En is driven at random (low about one cycle in three) while blocks are
// processed. Checks: the result is correct; done comes after exactly 490
// enabled clock edges however many disabled edges are mixed in; on a
// disabled edge nothing in the core moves (the output and the control
// phase are the same as before the edge). Counts the disabled edges seen
// during processing and fails if there were none.
module tb_nano_aes_decrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, en = 1'b1, ld = 1'b0, kld = 1'b0, rnd_en = 1'b0;
  logic [127:0] key, din, dout;
  logic done;
  int checks = 0, failures = 0, n_frozen = 0;

  nano_aes_decrypt dut (.enc_data(din), .key, .clk, .En(en), .kld, .ld, .rst, .dec_data(dout), .done);

  always #5 clk = ~clk;
  always @(negedge clk) en <= rnd_en ? ($urandom_range(0, 2) != 0) : 1'b1;

  // on a disabled edge nothing may change
  logic [127:0] dout_b;
  phase_e ph_b;
  always @(negedge clk) begin dout_b = dout; ph_b = dut.M0.phase; end
  always @(posedge clk) if (!en && rnd_en) begin
    #1;
    n_frozen++;
    checks++;
    if (dout !== dout_b || dut.M0.phase != ph_b) begin failures++; $display("FAIL core moved while En low"); end
  end

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1'b1;
    do @(posedge clk); while (!en);
    @(negedge clk) sig = 1'b0;
  endtask

  initial begin
    logic [127:0] k, p, c, x;
    int e;
    key = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 4; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      c = encrypt(k, p);
      key = k;
      din = ("decrypt" == "encrypt") ? p : c;
      x   = ("decrypt" == "encrypt") ? c : p;
      rnd_en = 1'b1;
      if ("1" == "1") begin
        pulse(kld);
        do @(posedge clk); while (dut.M0.phase != PH_READY);
      end
      pulse(ld);
      e = 0;
      do begin @(posedge clk); if (en) e++; #1; end while (!done && e < 2000);
      rnd_en = 1'b0;
      chk("enabled edges to done", 128'(e), 128'd490);
      chk("result", dout, x);
    end
    checks++;
    if (n_frozen == 0) begin failures++; $display("FAIL En never low"); end
    $display("disabled edges: %0d", n_frozen);
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
