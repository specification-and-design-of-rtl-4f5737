// tb_jpeg_decoder: self-checking test of the JPEG decoding path (dequantization,
// inverse DCT, clamping, level shift).
//
// Blocks of quantized coefficients are sent through the decoder. They are typical
// low-frequency-heavy blocks, DC-only blocks and blocks that drive the output into
// both clamps. Each pixel is compared with clamp(round(IDCT(Sq*Q)), -128, 127) + 128,
// computed in floating point (tb_jpeg_ref_pkg), allowing 1 of fixed-point error.
// The table load port is exercised with a new table after the first blocks. Also
// checked: pix_last on the 64th pixel and the 130-clock latency from the last
// coefficient offered (and taken) to the first pixel. A watchdog ends a hung run.
module tb_jpeg_decoder;
  import tb_jpeg_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               coef_valid = 1'b0, coef_ready, pix_valid, pix_ready = 1'b0, pix_last;
  logic signed [11:0] coef_data = '0;
  logic [7:0]         pix_data;
  logic               qt_we = 1'b0;
  logic [5:0]         qt_addr = '0;
  logic [7:0]         qt_data = '0;
  int                 qtab [64];

  jpeg_decoder dut (.*);

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
      qtab[i] = 1 + int'($urandom % 30);
      qt_we = 1'b1; qt_addr = 6'(i); qt_data = 8'(qtab[i]);
    end
    @(negedge clk);
    qt_we = 1'b0;
  endtask

  task automatic run_block(int kind);
    blk_i c, r;
    blk_r f;
    longint t_last, t_first;
    int n;
    for (int k = 0; k < 64; k++) begin
      case (kind % 4)
        0: c[k] = (k == 0) ? 20 : 0;
        1: c[k] = (k == 0) ? int'($urandom % 120) - 60 : (k < 10 ? int'($urandom % 11) - 5 : 0);
        2: c[k] = (k == 0) ? ((kind & 4) ? 100 : -100) : (k == 1 ? 30 : 0);
        default: c[k] = int'($urandom % 5) - 2;
      endcase
      r[k] = dequant_ref(c[k], qtab[k]);
    end
    f = idct_ref(r);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      coef_valid = 1'b1; coef_data = 12'(c[k]);
      #1;
      while (!coef_ready) begin @(negedge clk); #1; end
      t_last = cyc + 1;
    end
    @(negedge clk);
    coef_valid = 1'b0;
    n = 0; t_first = -1;
    while (n < 64) begin
      bit rdy = ($urandom % 5) != 0;
      pix_ready = rdy;
      if (pix_valid && t_first < 0) t_first = cyc + 1;
      if (pix_valid && rdy) begin
        int e = clamp(round_r(f[n]), -128, 127) + 128;
        checks++;
        if (int'(pix_data) - e > 1 || e - int'(pix_data) > 1) begin
          failures++;
          if (failures < 10) $display("block kind %0d pixel %0d got %0d exp %0d", kind, n, pix_data, e);
        end
        checks++;
        if (pix_last != (n == 63)) begin failures++; $display("pix_last wrong at %0d", n); end
        n++;
      end
      @(negedge clk);
    end
    pix_ready = 1'b0;
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
