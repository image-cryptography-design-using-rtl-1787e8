// sub_bytes: the single 8-bit S-box of a core.
//
// One byte in, one byte out, purely combinational. The core shares this one
// unit between the data path (SubBytes of a state byte) and the key
// expansion (SubWord of a key byte); a mux in the core picks the source.
// With inv = 1 it computes the inverse S-box, which the decrypter's data path
// needs; key expansion always uses the forward S-box, so the decrypter's unit
// is a combined S-box / inverse S-box. The values are computed from the
// S-box's algebraic definition (see aes_pkg), not read from a table.
//
// Interface: din, inv in; dout out. Timing: combinational.
module sub_bytes
  import aes_pkg::*;
(
  input  byte_t din,
  input  logic  inv,
  output byte_t dout
);
  always_comb begin
    dout = inv ? inv_sbox_f(din) : sbox_f(din);
  end
endmodule
