// tb_state_register: the 16-byte state register with built-in ShiftRows,
// forward (INVERSE = 0) and inverse (INVERSE = 1) instances side by side.
//
// For random blocks it checks: parallel load; PERM against ShiftRows /
// InvShiftRows computed here on a 4x4 array; a full 16-byte SHIFT that XORs
// a constant into each byte on the way round (the bytes must return to their
// own slots, processed head first: byte 0 first forward, byte 15 first
// inverse); TAIL, which must change only the last four slots; HOLD.
module tb_state_register;
  import aes_pkg::*;

  logic clk = 1'b0;
  st_op_e op;
  logic [7:0] din_f, din_i, head_f, head_i;
  logic [127:0] load_val, q_f, q_i;
  int checks = 0, failures = 0;

  state_register #(.INVERSE(1'b0)) dut_f (.clk, .op, .din(din_f), .load_val, .head(head_f), .q(q_f));
  state_register #(.INVERSE(1'b1)) dut_i (.clk, .op, .din(din_i), .load_val, .head(head_i), .q(q_i));

  always #5 clk = ~clk;

  function automatic logic [7:0] byte_of(logic [127:0] v, int i);
    return v[127-8*i -: 8];
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] v, bit inv);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = inv ? byte_of(v, 4*((c+4-r)%4)+r) : byte_of(v, 4*((c+r)%4)+r);
    return o;
  endfunction

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic do_op(st_op_e o);
    op = o;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [127:0] v, exp_f, exp_i, before_f, before_i;
    op = ST_HOLD; din_f = '0; din_i = '0; load_val = '0;
    for (int n = 0; n < 50; n++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      load_val = v;
      do_op(ST_LOAD);
      chk("load fwd", q_f, v);
      chk("load inv", q_i, v);
      do_op(ST_PERM);
      chk("ShiftRows", q_f, shift_rows(v, 0));
      chk("InvShiftRows", q_i, shift_rows(v, 1));
      do_op(ST_LOAD);
      // full sweep: each byte leaves at the head and comes back xor 5a
      for (int t = 0; t < 16; t++) begin
        checks += 2;
        if (head_f !== byte_of(v, t))    begin failures++; $display("FAIL head fwd %0d", t); end
        if (head_i !== byte_of(v, 15-t)) begin failures++; $display("FAIL head inv %0d", t); end
        din_f = head_f ^ 8'h5a;
        din_i = head_i ^ 8'h5a;
        do_op(ST_SHIFT);
      end
      exp_f = v ^ {16{8'h5a}};
      chk("sweep fwd", q_f, exp_f);
      chk("sweep inv", q_i, exp_f);
      // tail: four writes land in slots 12..15 (fwd) or 3..0 (inv)
      before_f = q_f; before_i = q_i;
      for (int t = 0; t < 4; t++) begin
        din_f = 8'(8'hc0 + t);
        din_i = 8'(8'hc0 + t);
        do_op(ST_TAIL);
      end
      exp_f = {before_f[127:32], 32'hc0c1c2c3};
      exp_i = {32'hc3c2c1c0, before_i[95:0]};
      chk("tail fwd", q_f, exp_f);
      chk("tail inv", q_i, exp_i);
      do_op(ST_HOLD);
      chk("hold fwd", q_f, exp_f);
      chk("hold inv", q_i, exp_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
