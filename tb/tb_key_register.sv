// tb_key_register: byte-serial key expansion through the key register taps.
//
// The testbench plays the part of the core around the register: it feeds
// back Out 1 xor S-box(Out 2) xor RCON for the first word and Out 1 xor prev
// for the others, with the tap schedule documented in key_register. It
// expands random keys forward through all ten round keys (dir = 0) and then
// backwards to the cipher key (dir = 1), comparing every round key with
// aes_ref_pkg. It also checks parallel load, hold, and that 16 plain
// rotations in either direction return the register to its start with the
// bytes presented at Out 1 in order 0..15 (dir 0) or 15..0 (dir 1).
module tb_key_register;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  key_op_e op;
  logic dir;
  logic [7:0] din, out1, out2, prev;
  tap_e tap;
  logic [127:0] load_val, q;
  int checks = 0, failures = 0;
  b8 sb[256], isb[256];

  key_register dut (.clk, .op, .dir, .din, .tap, .load_val, .out1, .out2, .prev, .q);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic expand_step(bit inv, logic [7:0] rc);
    op = K_SHIFT; dir = inv;
    for (int c = 0; c < 16; c++) begin
      if (!inv) begin
        tap = (c == 3) ? T9 : T13;
        din = (c < 4) ? (out1 ^ sb[out2] ^ ((c == 0) ? rc : 8'h00)) : (out1 ^ prev);
      end else begin
        tap = (c == 12) ? T8 : T12;
        din = (c >= 12) ? (out1 ^ sb[out2] ^ ((c == 15) ? rc : 8'h00)) : (out1 ^ prev);
      end
      #1;
      if (!inv) din = (c < 4) ? (out1 ^ sb[out2] ^ ((c == 0) ? rc : 8'h00)) : (out1 ^ prev);
      else      din = (c >= 12) ? (out1 ^ sb[out2] ^ ((c == 15) ? rc : 8'h00)) : (out1 ^ prev);
      @(posedge clk); #1;
    end
    op = K_HOLD;
  endtask

  initial begin
    logic [127:0] k, rk[11];
    logic [7:0] rc[10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    build_sbox(sb, isb);
    op = K_HOLD; dir = 0; din = '0; tap = T13; load_val = '0;
    for (int n = 0; n < 6; n++) begin
      k = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      expand(k, rk);
      load_val = k; op = K_LOAD;
      @(posedge clk); #1;
      op = K_HOLD;
      chk("load", q, k);
      @(posedge clk); #1;
      chk("hold", q, k);
      // plain rotations
      for (int d = 0; d < 2; d++) begin
        op = K_SHIFT; dir = d[0];
        #1;
        for (int c = 0; c < 16; c++) begin
          din = out1;
          checks++;
          if (out1 !== k[127-8*(d ? 15-c : c) -: 8]) begin failures++; $display("FAIL rotate dir %0d byte %0d", d, c); end
          @(posedge clk); #1;
        end
        op = K_HOLD;
        chk("rotation returns", q, k);
      end
      for (int r = 1; r <= 10; r++) begin
        expand_step(0, rc[r-1]);
        chk($sformatf("forward round key %0d", r), q, rk[r]);
      end
      for (int r = 9; r >= 0; r--) begin
        expand_step(1, rc[r]);
        chk($sformatf("inverse round key %0d", r), q, rk[r]);
      end
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
