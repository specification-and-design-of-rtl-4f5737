// jpeg_decoder: baseline JPEG decoding of quantized DCT coefficients back to
// 8x8 pixel blocks (dequantization against a loadable table, then inverse DCT).
//
// Quantized coefficients (signed 12-bit) enter in raster order, 64 per block. The
// dequantizer multiplies each by its entry of its own quant_table. The inverse dct8x8
// transforms the block to signed samples saturated to -128..127. These are
// level-shifted back to 8-bit unsigned pixels (sample + 128), raster order, with
// pix_last on the 64th. Entropy decoding is not part of this block. The
// quantization table is written through qt_we/qt_addr/qt_data.
//
// Timing: valid/ready handshakes on both sides. The dequantizer adds one clock
// ahead of the transform (64 clocks in, 128 computing, 64 out). The first pixel
// appears 129 clocks after the transform takes the last coefficient.
//
// The dequantizer -> IDCT chain with its table is that of the baseline JPEG decoder. The
// level shift and clamping are those of the JPEG standard. Widths and handshakes
// are this design's own.
module jpeg_decoder
  import jpeg_pkg::*;
(
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    coef_valid,
  output logic                    coef_ready,
  input  logic signed [DCT_W-1:0] coef_data,
  output logic                    pix_valid,
  input  logic                    pix_ready,
  output logic [PIX_W-1:0]        pix_data,
  output logic                    pix_last,
  input  logic                    qt_we,
  input  logic [5:0]              qt_addr,
  input  logic [Q_W-1:0]          qt_data
);

  logic                    r_valid, r_ready, r_last;
  logic signed [DCT_W-1:0] r_data;
  logic [5:0]              q_addr;
  logic [Q_W-1:0]          q_data;
  logic signed [PIX_W-1:0] sample;

  dequantizer #(.IN_W(DCT_W), .OUT_W(DCT_W)) u_dequant (
    .clk, .reset,
    .in_valid (coef_valid), .in_ready (coef_ready), .in_data (coef_data),
    .q_addr, .q_data,
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data), .out_last(r_last)
  );

  quant_table u_qtab (
    .clk, .reset,
    .we(qt_we), .waddr(qt_addr), .wdata(qt_data),
    .raddr(q_addr), .rdata(q_data)
  );

  dct8x8 #(.INVERSE(1'b1), .IN_W(DCT_W), .OUT_W(PIX_W)) u_idct (
    .clk, .reset,
    .in_valid (r_valid), .in_ready (r_ready), .in_data (r_data),
    .out_valid(pix_valid), .out_ready(pix_ready), .out_data(sample), .out_last(pix_last)
  );

  assign pix_data = PIX_W'(sample) ^ 8'h80;   // sample + 128

  // The dequantizer's block index and the transform's input index stay in step.
  a_last_in_step: assert property (@(posedge clk) disable iff (reset)
    (r_valid && r_ready) |-> (r_last == (q_addr == 6'd0)));

endmodule
