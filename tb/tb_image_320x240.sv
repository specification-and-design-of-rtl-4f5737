// tb_image_320x240: a whole camera picture through the still-image path.
//
// A 320x240 test picture is generated: a fan of wedges around a point near the
// bottom edge, each with a soft brightness ramp, over a dark background with a
// vertical gradient. Its 1200 8x8 blocks (row of blocks by row of blocks) are sent
// through videophone_top in loopback mode, at the default parameters and with the
// default quantization tables, and the restored picture is collected. Checks: every
// block comes back with pix_out_last on its 64th pixel; the peak signal-to-noise
// ratio of the restored picture against the original is at least 28 dB and within
// 0.5 dB of a floating-point reference codec (same table, same rounding) run on the
// same picture; no single block has a mean absolute error above 20 levels; and the whole picture takes no
// more than 1200*256 + 600 clocks, the rate set by the 256-clock block
// transform. A watchdog ends a hung run.
module tb_image_320x240;
  import videophone_pkg::*;
  import tb_jpeg_ref_pkg::*;

  localparam int W = 320, H = 240, NBLK = (W / 8) * (H / 8);

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic an = 0, hang_up = 0, imi = 0, imo = 0;
  logic audio_rec, image_display, image_send, video_rec;
  call_state_e call_state;
  logic loopback = 1'b1;
  logic pix_in_valid = 0, pix_in_ready;
  logic [7:0] pix_in_data = '0;
  logic coef_out_valid, coef_out_ready = 0, coef_out_last;
  logic signed [11:0] coef_out_data;
  logic coef_in_valid = 0, coef_in_ready;
  logic signed [11:0] coef_in_data = '0;
  logic pix_out_valid, pix_out_ready = 1, pix_out_last;
  logic [7:0] pix_out_data;
  logic enc_qt_we = 0, dec_qt_we = 0;
  logic [5:0] enc_qt_addr = '0, dec_qt_addr = '0;
  logic [7:0] enc_qt_data = '0, dec_qt_data = '0;

  videophone_top dut (.*);

  byte unsigned img [H][W];
  byte unsigned out [H][W];

  initial begin
    #20000000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pixel(int y, int x);
    real dx = x - 160.0, dy = 230.0 - y;
    real r = $sqrt(dx * dx + dy * dy);
    real a = $atan2(dy, dx);                       // 0..pi above the centre
    int wedge = int'($floor(a / (3.14159265 / 16.0)));
    real frac = a / (3.14159265 / 16.0) - wedge;
    if (dy > 0 && r > 60.0 && r < 220.0 && frac > 0.12)
      return 150 + 60 * (wedge % 2) + int'(r / 8.0);
    return 30 + y / 6;
  endfunction

  int got_blocks = 0;
  longint t_start, t_end;

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = 8'(pixel(y, x));
    repeat (2) @(negedge clk);
    reset = 0;
    t_start = cyc;
    fork
      // sender
      for (int b = 0; b < NBLK; b++)
        for (int k = 0; k < 64; k++) begin
          @(negedge clk);
          pix_in_valid = 1;
          pix_in_data  = img[(b / (W / 8)) * 8 + k / 8][(b % (W / 8)) * 8 + k % 8];
          #1;
          while (!pix_in_ready) begin @(negedge clk); #1; end
          if (b == NBLK - 1 && k == 63) begin @(negedge clk); pix_in_valid = 0; end
        end
      // receiver
      for (int b = 0; b < NBLK; b++) begin
        automatic int k = 0;
        while (k < 64) begin
          @(negedge clk);
          if (pix_out_valid) begin
            out[(b / (W / 8)) * 8 + k / 8][(b % (W / 8)) * 8 + k % 8] = pix_out_data;
            if (pix_out_last != (k == 63)) begin
              failures++; $display("block %0d: pix_out_last wrong at %0d", b, k);
            end
            k++;
          end
        end
        checks++;
        got_blocks++;
      end
    join
    t_end = cyc;
    begin
      automatic real se = 0.0;
      real psnr;
      automatic int worst = 0;
      automatic real se_ref = 0.0;
      real psnr_ref;
      for (int b = 0; b < NBLK; b++) begin
        automatic int e = 0;
        for (int k = 0; k < 64; k++) begin
          automatic int y = (b / (W / 8)) * 8 + k / 8, x = (b % (W / 8)) * 8 + k % 8;
          automatic int d = int'(out[y][x]) - int'(img[y][x]);
          se += d * d;
          e += (d < 0) ? -d : d;
        end
        if (e > worst) worst = e;
        begin
          blk_i sb, cq;
          blk_r F, f;
          for (int k = 0; k < 64; k++)
            sb[k] = int'(img[(b / (W / 8)) * 8 + k / 8][(b % (W / 8)) * 8 + k % 8]) - 128;
          F = fdct_ref(sb);
          for (int k = 0; k < 64; k++)
            cq[k] = dequant_ref(quant_ref(clamp(round_r(F[k]), -2048, 2047), luma_q(k)), luma_q(k));
          f = idct_ref(cq);
          for (int k = 0; k < 64; k++) begin
            automatic int d = clamp(round_r(f[k]), -128, 127) - sb[k];
            se_ref += d * d;
          end
        end
        checks++;
        if (e > 20 * 64) begin failures++; $display("block %0d mean abs error %0d/64", b, e); end
      end
      psnr = 10.0 * $log10(255.0 * 255.0 / (se / (W * H)));
      psnr_ref = 10.0 * $log10(255.0 * 255.0 / (se_ref / (W * H)));
      $display("floating-point reference codec: PSNR %0.2f dB", psnr_ref);
      checks++;
      if (psnr < psnr_ref - 0.5) begin failures++; $display("PSNR below the reference codec"); end
      $display("picture %0dx%0d: %0d blocks, %0d clocks, PSNR %0.2f dB, worst block mean abs error %0.2f",
               W, H, got_blocks, t_end - t_start, psnr, worst / 64.0);
      checks++;
      if (psnr < 28.0) begin failures++; $display("PSNR too low"); end
      checks++;
      if (t_end - t_start > NBLK * 256 + 600) begin failures++; $display("too slow"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
