// tb_image_workload: image encryption and decryption through the top.
//
// A 64 x 64 8-bit grey-scale test image (a flat band, a diagonal gradient
// and a bright disc, generated here) is cut into 256 blocks of 16 pixels in
// raster order.
// Each block is encrypted and decrypted by aes_top_final under one key, one
// block at a time (the next kld is given once dec_complete is high). The
// test checks every cipher block against aes_ref_pkg, checks the decrypted
// image pixel for pixel against the original, checks that equal plain blocks
// give equal cipher blocks (block-by-block use, as here), and reports the
// clock cycles per block.
module tb_image_workload;
  import aes_ref_pkg::*;

  localparam int W = 64, H = 64, NBLK = W * H / 16;

  logic [127:0] key, text_in, dec_data, enc_data;
  logic clk = 1'b0, en = 1'b1, kld = 1'b0, rst = 1'b1;
  logic dec_complete, enc_complete;
  int checks = 0, failures = 0;
  logic [7:0] img [H][W];
  logic [7:0] out [H][W];
  logic [127:0] ct [NBLK];

  aes_top_final dut (.*);

  always #5 clk = ~clk;

  initial begin
    int cyc, total;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    text_in = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (y < 4) ? 8'h20 : ((x - 32) * (x - 32) + (y - 32) * (y - 32) < 256) ? 8'hf0 : 8'((x + y) * 2);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    total = 0;
    for (int b = 0; b < NBLK; b++) begin
      logic [127:0] p;
      for (int i = 0; i < 16; i++) p[127-8*i -: 8] = img[(16*b+i) / W][(16*b+i) % W];
      @(negedge clk);
      text_in = p; kld = 1'b1;
      @(posedge clk);
      @(negedge clk) kld = 1'b0;
      cyc = 1;
      do begin @(posedge clk); cyc++; #1; end while (!dec_complete && cyc < 3000);
      total += cyc;
      ct[b] = enc_data;
      checks++;
      if (enc_data !== encrypt(key, p)) begin failures++; $display("FAIL cipher block %0d", b); end
      for (int i = 0; i < 16; i++) out[(16*b+i) / W][(16*b+i) % W] = dec_data[127-8*i -: 8];
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        checks++;
        if (out[y][x] !== img[y][x]) begin failures++; $display("FAIL pixel %0d,%0d", y, x); end
      end
    // the flat band gives equal plain blocks: their cipher blocks must match
    for (int a = 0; a < NBLK; a++)
      for (int b = a + 1; b < NBLK; b++) begin
        logic same_p;
        same_p = 1'b1;
        for (int i = 0; i < 16; i++)
          if (img[(16*a+i)/W][(16*a+i)%W] != img[(16*b+i)/W][(16*b+i)%W]) same_p = 1'b0;
        if (same_p) begin
          checks++;
          if (ct[a] !== ct[b]) begin failures++; $display("FAIL equal blocks %0d %0d differ", a, b); end
        end
      end
    $display("image %0dx%0d, %0d blocks, %0d cycles per block (encrypt + decrypt)", W, H, NBLK, total / NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
