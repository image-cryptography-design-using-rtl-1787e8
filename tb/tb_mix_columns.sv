// tb_mix_columns: byte-serial MixColumns and InvMixColumns.
//
// Random columns (and the FIPS-197 column db 13 53 45 -> 8e 4d a1 bc) are
// fed one byte per clock with load = 1, then read one byte per clock with
// load = 0, in row order 0..3 for the forward unit and 3..0 for the inverse
// unit. Results are compared with a matrix product computed here; every
// output byte is one check. The unit must deliver a column in 8 cycles.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic clk = 1'b0, load;
  logic [7:0] din_f, din_i, dout_f, dout_i;
  int checks = 0, failures = 0;

  mix_columns #(.INVERSE(1'b0)) dut_f (.clk, .load, .din(din_f), .dout(dout_f));
  mix_columns #(.INVERSE(1'b1)) dut_i (.clk, .load, .din(din_i), .dout(dout_i));

  always #5 clk = ~clk;

  task automatic run_column(b8 a[4]);
    b8 ef[4], ei[4];
    for (int r = 0; r < 4; r++) begin
      ef[r] = mul(a[r], 2) ^ mul(a[(r+1)%4], 3) ^ a[(r+2)%4] ^ a[(r+3)%4];
      ei[r] = mul(a[r], 8'h0e) ^ mul(a[(r+1)%4], 8'h0b) ^ mul(a[(r+2)%4], 8'h0d) ^ mul(a[(r+3)%4], 8'h09);
    end
    load = 1'b1;
    for (int j = 0; j < 4; j++) begin
      din_f = a[j]; din_i = a[3-j];
      @(posedge clk); #1;
    end
    load = 1'b0;
    for (int j = 0; j < 4; j++) begin
      checks += 2;
      if (dout_f !== ef[j])   begin failures++; $display("FAIL mc row %0d: %02h vs %02h", j, dout_f, ef[j]); end
      if (dout_i !== ei[3-j]) begin failures++; $display("FAIL imc row %0d: %02h vs %02h", 3-j, dout_i, ei[3-j]); end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    b8 a[4];
    load = 1'b0; din_f = '0; din_i = '0;
    @(posedge clk); #1;
    a = '{8'hdb, 8'h13, 8'h53, 8'h45};
    run_column(a);
    // known answer: MixColumns(db 13 53 45) = 8e 4d a1 bc
    checks++;
    if ((mul(8'hdb,2) ^ mul(8'h13,3) ^ 8'h53 ^ 8'h45) !== 8'h8e) failures++;
    for (int n = 0; n < 200; n++) begin
      foreach (a[i]) a[i] = 8'($urandom);
      run_column(a);
    end
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
