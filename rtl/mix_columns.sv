// mix_columns: byte-serial (Inv)MixColumns with four internal byte registers.
//
// A column enters one byte per cycle (load = 1) and is held in a[0..3]; then,
// with load = 0, one result byte per cycle is produced while the registers
// rotate. The output is always the dot product of the first matrix row with
// the registers; rotating the registers by one byte turns that into the next
// row, because the (Inv)MixColumns matrix is circulant.
//
// INVERSE = 0 (encrypter): bytes arrive in row order 0,1,2,3 and leave in the
//   same order; rows are {02,03,01,01}. The registers shift toward a[0].
// INVERSE = 1 (decrypter): bytes arrive in row order 3,2,1,0 and leave in that
//   order; the first output is row 3 {0b,0d,09,0e}. The registers shift
//   toward a[3].
//
// Interface: clk (the gated Mix-Columns clock: no edge, no change), load,
// din in; dout out. Timing: four edges with load = 1 fill the registers; dout
// is then valid combinationally, and each edge with load = 0 moves it to the
// next row. No reset: the registers are always filled before they are read.
module mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  load,
  input  byte_t din,
  output byte_t dout
);
  byte_t a [4];

  always_ff @(posedge clk) begin
    if (!INVERSE) begin
      a[0] <= a[1];
      a[1] <= a[2];
      a[2] <= a[3];
      a[3] <= load ? din : a[0];
    end else begin
      a[3] <= a[2];
      a[2] <= a[1];
      a[1] <= a[0];
      a[0] <= load ? din : a[3];
    end
  end

  always_comb begin
    if (!INVERSE)
      dout = xtime(a[0]) ^ xtime(a[1]) ^ a[1] ^ a[2] ^ a[3];
    else
      dout = gmul(a[0], 8'h0b) ^ gmul(a[1], 8'h0d) ^ gmul(a[2], 8'h09) ^ gmul(a[3], 8'h0e);
  end
endmodule
