// rcon_unit: the round-constant register.
//
// Holds the AES round constant of the key-expansion step in progress. It is
// set to 01 at the start of an expansion and multiplied by x in GF(2^8)
// after each forward step (01,02,04,...,80,1b,36). For the decrypter's
// inverse key schedule it is divided by x instead, walking the same sequence
// backwards. It sits on its own gated clock, so it only toggles in the
// cycles where it steps.
//
// Interface: clk (gated RCON clock), op (hold / init / forward / back);
// rcon out. Timing: the new value appears after the edge.
module rcon_unit
  import aes_pkg::*;
(
  input  logic     clk,
  input  rcon_op_e op,
  output byte_t    rcon
);
  always_ff @(posedge clk) begin
    unique case (op)
      RC_INIT: rcon <= 8'h01;
      RC_FWD:  rcon <= rcon_next(rcon);
      RC_BACK: rcon <= rcon_prev(rcon);
      default: rcon <= rcon;
    endcase
  end
endmodule
