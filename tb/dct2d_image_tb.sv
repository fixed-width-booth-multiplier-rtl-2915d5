// dct2d_image_tb: the image workload of the 2-D DCT core. Ten synthetic
// 512x512 8-bit gray-level images (smooth gradients, sinusoids and noise,
// different for each image) are cut into 8x8 blocks and streamed through
// the core at its default parameters. The testbench inverts every block's
// coefficients with an exact floating-point 2-D IDCT, rounds and clips to
// 0..255, and reports the PSNR of the reconstruction against the original,
// next to the PSNR obtained from the exact floating-point DCT rounded to
// integer coefficients (no intermediate quantisation, exact products).
// Each image must reach 45 dB.
module dct2d_image_tb;
  import dct_ref_pkg::*;

  localparam int NIMG = 10;
  localparam int SIZE = 512;
  localparam int NB   = SIZE / 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [7:0] pix = '0;
  logic pix_ready, coef_valid, block_done;
  logic signed [13:0] coef;
  logic [2:0] coef_u, coef_v;

  dct2d_core dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix), .pix_ready(pix_ready),
    .coef_valid(coef_valid), .coef(coef), .coef_u(coef_u), .coef_v(coef_v), .block_done(block_done)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NIMG * NB * NB * 230 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int image_pixel(input int img, input int r, input int c, input int noise);
    real v;
    v = 128.0 + 70.0 * $sin(0.011 * (img + 1) * r + 0.3 * img)
              + 45.0 * $cos(0.017 * (NIMG - img) * c)
              + 0.08 * (img + 1) * ((r * c) % 97 - 48) + real'(noise);
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return int'($floor(v));
  endfunction

  initial begin
    int  blk [8][8];
    real x [8][8];
    real z [8][8];
    real zq [8][8];
    real rec, rec_q, se, se_q, psnr, psnr_q;
    int  got;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int img = 0; img < NIMG; img++) begin
      se = 0.0; se_q = 0.0;
      for (int br = 0; br < NB; br++)
        for (int bc = 0; bc < NB; bc++) begin
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              blk[r][c] = image_pixel(img, 8 * br + r, 8 * bc + c, int'($urandom_range(8)) - 4);
              x[r][c]   = real'(blk[r][c] - 128);
            end
          // stream the block in
          for (int i = 0; i < 64; i++) begin
            @(negedge clk);
            pix_valid = 1;
            pix = 8'(blk[i/8][i%8]);
            @(posedge clk);
            while (!pix_ready) @(posedge clk);
          end
          @(negedge clk);
          pix_valid = 0;
          // collect its 64 coefficients
          got = 0;
          while (got < 64) begin
            @(posedge clk);
            if (coef_valid) begin
              z[coef_u][coef_v] = real'(coef);
              got++;
            end
          end
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++) zq[u][v] = $floor(dct2(x, u, v) + 0.5);
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              rec   = $floor(idct2(z, r, c) + 128.5);
              rec_q = $floor(idct2(zq, r, c) + 128.5);
              if (rec < 0.0) rec = 0.0;
              if (rec > 255.0) rec = 255.0;
              if (rec_q < 0.0) rec_q = 0.0;
              if (rec_q > 255.0) rec_q = 255.0;
              se   += (rec - blk[r][c]) ** 2;
              se_q += (rec_q - blk[r][c]) ** 2;
            end
        end
      psnr   = 10.0 * $log10(255.0 * 255.0 / (se / (SIZE * SIZE) + 1e-12));
      psnr_q = 10.0 * $log10(255.0 * 255.0 / (se_q / (SIZE * SIZE) + 1e-12));
      $display("image %0d: PSNR %6.2f dB (exact transform, integer coefficients: %6.2f dB)", img, psnr, psnr_q);
      checks++;
      if (psnr < 45.0) begin failures++; $display("FAIL image %0d PSNR below 45 dB", img); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
