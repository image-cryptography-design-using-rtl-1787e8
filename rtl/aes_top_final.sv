// aes_top_final: AES-128 encrypter and decrypter chained for a round trip.
//
// The encrypter (MM0) turns text_in into enc_data under key; the decrypter
// (MM1) takes enc_data under the same key and returns dec_data, which equals
// text_in when both are done. The encrypter's done output is the
// decrypter's ld, so each finished cipher text starts its decryption without
// help from outside. Both cores are byte-serial (8-bit data path) and heavily
// clock-gated; en gates the clock of both.
//
// Interface: key, text_in (128 bits), clk, en, kld, rst (asynchronous, active
// high) in; enc_data, dec_data (128 bits), enc_complete, dec_complete out.
// Timing: a rising edge of kld (with key and text_in valid on that clock
// edge) loads both cores. enc_complete is high after the 490th enabled clock
// edge that follows; dec_complete after the 491st enabled edge after that
// (one edge to see enc_complete, then 490). Both stay high until the next
// kld edge clears them. The next kld may come once dec_complete is high.
module aes_top_final (
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  input  logic         clk,
  input  logic         en,
  input  logic         kld,
  input  logic         rst,
  output logic [127:0] dec_data,
  output logic [127:0] enc_data,
  output logic         dec_complete,
  output logic         enc_complete
);
  nano_aes_encrypt MM0 (
    .Key(key), .Text_in(text_in), .clk, .En(en), .ld(kld), .Rst(rst),
    .Text_Out(enc_data), .Done(enc_complete)
  );

  nano_aes_decrypt MM1 (
    .enc_data, .key, .clk, .En(en), .kld, .ld(enc_complete), .rst,
    .dec_data, .done(dec_complete)
  );
endmodule
