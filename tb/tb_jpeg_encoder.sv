// tb_jpeg_encoder: self-checking test of the JPEG encoding path (level shift,
// forward DCT, quantization).
//
// Blocks of pixels (smooth gradients, random noise, flat extremes) are sent through
// the encoder. Each quantized coefficient is compared with quant(round(FDCT(pixel-128)))
// computed in floating point (tb_jpeg_ref_pkg). One step of difference is
// allowed, since the fixed-point transform may land on the other side of a rounding
// boundary. The table load port is exercised: after the first blocks the table is
// rewritten and the new step sizes must be used. Also checked: coef_last on the 64th
// coefficient and the 130-clock latency from the last pixel taken to the first
// coefficient available. A watchdog ends a hung run.
module tb_jpeg_encoder;
  import tb_jpeg_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               pix_valid = 1'b0, pix_ready, coef_valid, coef_ready = 1'b0, coef_last;
  logic [7:0]         pix_data = '0;
  logic signed [11:0] coef_data;
  logic               qt_we = 1'b0;
  logic [5:0]         qt_addr = '0;
  logic [7:0]         qt_data = '0;
  int                 qtab [64];

  jpeg_encoder dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_table();
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      qtab[i] = 1 + int'($urandom % 40);
      qt_we = 1'b1; qt_addr = 6'(i); qt_data = 8'(qtab[i]);
    end
    @(negedge clk);
    qt_we = 1'b0;
  endtask

  task automatic run_block(int kind);
    blk_i p, s;
    blk_r F;
    longint t_last, t_first;
    int n;
    for (int k = 0; k < 64; k++) begin
      case (kind % 4)
        0: p[k] = 40 + 20 * (k / 8) + 3 * (k % 8);
        1: p[k] = int'($urandom % 256);
        2: p[k] = (kind & 4) ? 255 : 0;
        default: p[k] = 128 + int'($urandom % 21) - 10 + 8 * (k % 8);
      endcase
      s[k] = p[k] - 128;
    end
    F = fdct_ref(s);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      pix_valid = 1'b1; pix_data = 8'(p[k]);
      #1;
      while (!pix_ready) begin @(negedge clk); #1; end
      t_last = cyc + 1;
    end
    @(negedge clk);
    pix_valid = 1'b0;
    n = 0; t_first = -1;
    while (n < 64) begin
      bit rdy = ($urandom % 5) != 0;
      coef_ready = rdy;
      if (coef_valid && t_first < 0) t_first = cyc + 1;
      if (coef_valid && rdy) begin
        int e = quant_ref(clamp(round_r(F[n]), -2048, 2047), qtab[n]);
        checks++;
        if (int'(coef_data) - e > 1 || e - int'(coef_data) > 1) begin
          failures++;
          if (failures < 10) $display("block kind %0d coef %0d got %0d exp %0d", kind, n, coef_data, e);
        end
        checks++;
        if (coef_last != (n == 63)) begin failures++; $display("coef_last wrong at %0d", n); end
        n++;
      end
      @(negedge clk);
    end
    coef_ready = 1'b0;
    checks++;
    if (t_first - t_last != 130) begin
      failures++; $display("latency %0d, expected 130", t_first - t_last);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) qtab[i] = luma_q(i);
    #12 reset = 1'b0;
    for (int b = 0; b < 8; b++) run_block(b);
    load_table();
    for (int b = 0; b < 8; b++) run_block(b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
