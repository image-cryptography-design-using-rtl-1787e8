// state_register: the 16-byte AES state, a byte shift register with
// ShiftRows built in.
//
// Byte i of the state (column i/4, row i%4, byte 0 = bits 127:120 of the
// block) sits in slot s[i]. The data path reads one byte per cycle from the
// head and writes one byte per cycle at the tail, so a full shift sweeps the
// 16 bytes through the 8-bit data path and leaves them in their original
// slots. ShiftRows is not a separate unit: a PERM cycle re-wires the slots
// in one clock, so no extra logic sits in the byte path.
//
// INVERSE = 0 (encrypter): head s[0], tail s[15], PERM = ShiftRows
//   (row r rotates left by r), TAIL shifts only s[12..15].
// INVERSE = 1 (decrypter): head s[15], tail s[0], PERM = InvShiftRows
//   (row r rotates right by r), TAIL shifts only s[0..3].
// TAIL lets the four result bytes of a Mix-Columns pass land in the slots
// just vacated by that column while the rest of the state stands still.
//
// Interface: clk (gated state clock), op, din, load_val in; head (next byte
// to process) and q (whole state, 128 bits) out. Timing: one operation per
// edge of clk.
module state_register
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic           clk,
  input  st_op_e         op,
  input  byte_t          din,
  input  logic [127:0]   load_val,
  output byte_t          head,
  output logic [127:0]   q
);
  byte_t s [NB_BYTES];

  always_ff @(posedge clk) begin
    unique case (op)
      ST_LOAD: begin
        for (int i = 0; i < 16; i++) s[i] <= load_val[127-8*i -: 8];
      end
      ST_SHIFT: begin
        if (!INVERSE) begin
          for (int i = 0; i < 15; i++) s[i] <= s[i+1];
          s[15] <= din;
        end else begin
          for (int i = 1; i < 16; i++) s[i] <= s[i-1];
          s[0] <= din;
        end
      end
      ST_TAIL: begin
        if (!INVERSE) begin
          for (int i = 12; i < 15; i++) s[i] <= s[i+1];
          s[15] <= din;
        end else begin
          for (int i = 1; i < 4; i++) s[i] <= s[i-1];
          s[0] <= din;
        end
      end
      ST_PERM: begin
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            if (!INVERSE) s[4*c+r] <= s[4*((c+r)%4)+r];
            else          s[4*c+r] <= s[4*((c+4-r)%4)+r];
      end
      default: ;
    endcase
  end

  assign head = INVERSE ? s[15] : s[0];

  always_comb begin
    for (int i = 0; i < 16; i++) q[127-8*i -: 8] = s[i];
  end
endmodule
