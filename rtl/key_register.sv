// key_register: the 16-byte round-key register with the taps that make
// byte-serial key expansion possible.
//
// Byte i of the round key (word i/4, byte i%4) sits in slot k[i]. A shift
// moves every byte one slot toward the head and writes din at the tail; the
// core feeds back either the head byte (a plain rotation, used while the
// round key is consumed by AddRoundKey) or a freshly expanded byte. After 16
// shifts the register again holds bytes 0..15 in slots 0..15.
//
// dir = 0 (ascending, forward key expansion and the encrypter): head k[0],
//   tail k[15]. While byte t of the next key is being made, the byte one word
//   back (new byte t-4) is in k[12], and the rotated last word needed for
//   SubWord is in k[13] for t = 0..2 and k[9] for t = 3.
// dir = 1 (descending, inverse key expansion and the decrypter): head
//   k[15], tail k[0]. Working from byte 15 down, the byte one word back
//   (byte t-4 of the later key) is in k[11]; the recovered last word for
//   SubWord is in k[8] for t = 3 and k[12] for t = 2..0.
// Out 1 is the head byte (round-key byte or the byte being updated); Out 2
// is the S-box tap chosen by tap; prev is the byte one word back.
//
// Interface: clk (gated key clock), op, dir, din, tap, load_val in; out1,
// out2, prev, q out. Timing: one operation per edge of clk.
module key_register
  import aes_pkg::*;
(
  input  logic         clk,
  input  key_op_e      op,
  input  logic         dir,
  input  byte_t        din,
  input  tap_e         tap,
  input  logic [127:0] load_val,
  output byte_t        out1,
  output byte_t        out2,
  output byte_t        prev,
  output logic [127:0] q
);
  byte_t k [NB_BYTES];

  always_ff @(posedge clk) begin
    unique case (op)
      K_LOAD: for (int i = 0; i < 16; i++) k[i] <= load_val[127-8*i -: 8];
      K_SHIFT: begin
        if (!dir) begin
          for (int i = 0; i < 15; i++) k[i] <= k[i+1];
          k[15] <= din;
        end else begin
          for (int i = 1; i < 16; i++) k[i] <= k[i-1];
          k[0] <= din;
        end
      end
      default: ;
    endcase
  end

  assign out1 = dir ? k[15] : k[0];
  assign prev = dir ? k[11] : k[12];

  always_comb begin
    unique case (tap)
      T13:     out2 = k[13];
      T9:      out2 = k[9];
      T12:     out2 = k[12];
      default: out2 = k[8];
    endcase
    for (int i = 0; i < 16; i++) q[127-8*i -: 8] = k[i];
  end
endmodule
