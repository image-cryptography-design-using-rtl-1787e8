// nano_aes_encrypt: the encrypter with its core-level clock gate.
//
// A clock_gating cell turns the whole aes_encrypt core's clock on and off
// with En, on top of the per-register gating inside the core. With En low
// the core is frozen (nothing in it toggles) and resumes where it stopped.
//
// Interface: Key, Text_in (128 bits), clk, En, ld, Rst in; Text_Out (128
// bits), Done out. A rising edge of ld (sampled on an enabled clock edge)
// loads Key and Text_in; Done rises when Text_Out holds the cipher text,
// 490 enabled clock edges after the load edge.
module nano_aes_encrypt (
  input  logic [127:0] Key,
  input  logic [127:0] Text_in,
  input  logic         clk,
  input  logic         En,
  input  logic         ld,
  input  logic         Rst,
  output logic [127:0] Text_Out,
  output logic         Done
);
  logic gclk;

  clock_gating M1 (.clk, .en(En), .gclk);

  aes_encrypt M0 (
    .clk(gclk), .rst(Rst), .ld, .key(Key), .text_in(Text_in),
    .text_out(Text_Out), .done(Done)
  );
endmodule
