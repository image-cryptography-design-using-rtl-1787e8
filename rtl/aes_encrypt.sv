// aes_encrypt: byte-serial AES-128 encrypt core with an 8-bit data path.
//
// The encrypter follows the textbook round sequence: AddRoundKey with the
// cipher key, nine rounds of SubBytes, ShiftRows, MixColumns, AddRoundKey,
// and a last round without MixColumns. Bytes travel one per cycle from the
// state register's head through the shared S-box and the 8-bit Mix-Columns
// unit, are XORed with the round-key byte at Out 1 of the key register
// (AddRoundKey) and go back into the state register. Before each round the
// next round key is expanded in place, byte by byte, through the same S-box
// while the state and Mix-Columns clocks are stopped.
//
// Interface: a rising edge of ld loads key and text_in and starts; done rises
// when text_out holds the cipher text and stays high until the next ld.
// text_out shows the state register at all times.
//
// Blocks: state_register (16 bytes, (Inv)ShiftRows built in), key_register
// (16 bytes, Out 1 / Out 2 taps), one sub_bytes unit shared by data path and
// key expansion, mix_columns (8-bit in and out, four byte registers),
// rcon_unit, control_unit, and a clock_gating cell in front of each of the
// state, Mix-Columns, key and RCON registers. The control unit runs on clk;
// each bank runs on its own gated copy of clk and only sees the edges where
// it has work.
//
// Byte order: byte 0 of a block or key is bits 127:120 (FIPS-197 order).
// Timing: done is high after the 490th clk edge that follows the load edge (see control_unit).
module aes_encrypt
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] text_out,
  output logic         done
);
  ctrl_t  ctrl;
  phase_e phase;
  logic   clk_state, clk_mc, clk_key, clk_rcon;
  byte_t  st_head, st_din;
  byte_t  k_out1, k_out2, k_prev, k_din;
  byte_t  sb_in, sb_out, mc_in, mc_out, rcon, rcon_add;
  logic [127:0] key_q;

  control_unit #(.INVERSE(1'b0)) u_ctrl (
    .clk, .rst, .ld, .kld(1'b0), .ctrl, .done, .phase
  );

  clock_gating u_cg_state (.clk, .en(ctrl.st_en),   .gclk(clk_state));
  clock_gating u_cg_mc    (.clk, .en(ctrl.mc_en),   .gclk(clk_mc));
  clock_gating u_cg_key   (.clk, .en(ctrl.key_en),  .gclk(clk_key));
  clock_gating u_cg_rcon  (.clk, .en(ctrl.rcon_en), .gclk(clk_rcon));

  state_register #(.INVERSE(1'b0)) u_state (
    .clk(clk_state), .op(ctrl.st_op), .din(st_din), .load_val(text_in),
    .head(st_head), .q(text_out)
  );

  key_register u_key (
    .clk(clk_key), .op(ctrl.key_op), .dir(ctrl.key_dir), .din(k_din),
    .tap(ctrl.key_tap), .load_val(key),
    .out1(k_out1), .out2(k_out2), .prev(k_prev), .q(key_q)
  );

  rcon_unit u_rcon (.clk(clk_rcon), .op(ctrl.rcon_op), .rcon);

  // the shared S-box: key expansion or data path
  assign sb_in = ctrl.sbox_key ? k_out2 : st_head;
  sub_bytes u_sbox (.din(sb_in), .inv(ctrl.sbox_inv), .dout(sb_out));

  assign mc_in = sb_out;
  mix_columns #(.INVERSE(1'b0)) u_mc (.clk(clk_mc), .load(ctrl.mc_load), .din(mc_in), .dout(mc_out));

  assign rcon_add = ctrl.rcon_use ? rcon : 8'h00;

  always_comb begin
    unique case (ctrl.st_din)
      SD_SBK:  st_din = sb_out ^ k_out1;
      SD_MC:   st_din = mc_out ^ k_out1;
      default: st_din = st_head ^ k_out1;
    endcase
    unique case (ctrl.key_din)
      KD_PREV: k_din = k_out1 ^ k_prev;
      KD_SBOX: k_din = k_out1 ^ sb_out ^ rcon_add;
      default: k_din = k_out1;
    endcase
  end
endmodule
