// aes_decrypt: byte-serial AES-128 decrypt core with an 8-bit data path.
//
// The decrypter runs the straight inverse cipher: AddRoundKey with the last
// round key, nine rounds of InvShiftRows, InvSubBytes, AddRoundKey,
// InvMixColumns, and a last round without InvMixColumns. AddRoundKey sits in
// front of the 8-bit InvMix-Columns unit. The state and key registers shift
// the other way (byte 15 first), which lets the key register walk the key
// schedule backwards, one round key before each round. The shared S-box
// computes the inverse S-box for the data path and the forward S-box for the
// key schedule.
//
// Interface: a rising edge of kld loads key and expands it forward to the last
// round key (160 cycles); a rising edge of ld then loads enc_data and starts
// (an ld that arrives earlier waits). done rises when dec_data holds the
// plain text and stays high until the next decryption starts. dec_data shows
// the state register at all times.
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
module aes_decrypt
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         kld,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] enc_data,
  output logic [127:0] dec_data,
  output logic         done
);
  ctrl_t  ctrl;
  phase_e phase;
  logic   clk_state, clk_mc, clk_key, clk_rcon;
  byte_t  st_head, st_din;
  byte_t  k_out1, k_out2, k_prev, k_din;
  byte_t  sb_in, sb_out, mc_in, mc_out, rcon, rcon_add;
  logic [127:0] key_q;

  control_unit #(.INVERSE(1'b1)) u_ctrl (
    .clk, .rst, .ld, .kld(kld), .ctrl, .done, .phase
  );

  clock_gating u_cg_state (.clk, .en(ctrl.st_en),   .gclk(clk_state));
  clock_gating u_cg_mc    (.clk, .en(ctrl.mc_en),   .gclk(clk_mc));
  clock_gating u_cg_key   (.clk, .en(ctrl.key_en),  .gclk(clk_key));
  clock_gating u_cg_rcon  (.clk, .en(ctrl.rcon_en), .gclk(clk_rcon));

  state_register #(.INVERSE(1'b1)) u_state (
    .clk(clk_state), .op(ctrl.st_op), .din(st_din), .load_val(enc_data),
    .head(st_head), .q(dec_data)
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

  assign mc_in = sb_out ^ k_out1;
  mix_columns #(.INVERSE(1'b1)) u_mc (.clk(clk_mc), .load(ctrl.mc_load), .din(mc_in), .dout(mc_out));

  assign rcon_add = ctrl.rcon_use ? rcon : 8'h00;

  always_comb begin
    unique case (ctrl.st_din)
      SD_SBK:  st_din = sb_out ^ k_out1;
      SD_MC:   st_din = mc_out;
      default: st_din = st_head ^ k_out1;
    endcase
    unique case (ctrl.key_din)
      KD_PREV: k_din = k_out1 ^ k_prev;
      KD_SBOX: k_din = k_out1 ^ sb_out ^ rcon_add;
      default: k_din = k_out1;
    endcase
  end
endmodule
