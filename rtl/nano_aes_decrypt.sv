// nano_aes_decrypt: the decrypter with its core-level clock gate.
//
// A clock_gating cell turns the whole aes_decrypt core's clock on and off
// with En, on top of the per-register gating inside the core.
//
// Interface: enc_data, key (128 bits), clk, En, kld, ld, rst in; dec_data
// (128 bits), done out. A rising edge of kld loads key and prepares the last
// round key (160 enabled cycles); a rising edge of ld loads enc_data and
// decrypts it; done rises when dec_data holds the plain text, 490 enabled
// cycles after the start.
module nano_aes_decrypt (
  input  logic [127:0] enc_data,
  input  logic [127:0] key,
  input  logic         clk,
  input  logic         En,
  input  logic         kld,
  input  logic         ld,
  input  logic         rst,
  output logic [127:0] dec_data,
  output logic         done
);
  logic gclk;

  clock_gating M1 (.clk, .en(En), .gclk);

  aes_decrypt M0 (
    .clk(gclk), .rst, .kld, .ld, .key, .enc_data, .dec_data, .done
  );
endmodule
