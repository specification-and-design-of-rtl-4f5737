// jpeg_encoder: baseline JPEG encoding of 8x8 pixel blocks up to quantized
// DCT coefficients (forward DCT, then quantization against a loadable table).
//
// Pixels (8-bit, unsigned) enter in raster order, 64 per block. Each is level-shifted
// to a signed sample (pixel - 128), the block is transformed by a forward dct8x8, and
// the 64 coefficients are quantized in raster order by the quantizer, which reads its
// step sizes from its own quant_table. The output is 64 signed 12-bit quantized
// coefficients per block, raster order, with out_last on the 64th. Entropy coding is
// not part of this block. The quantization table is written through qt_we/qt_addr/qt_data.
//
// Timing: valid/ready handshakes on both sides. The transform accepts a block in 64
// clocks, computes for 128 and delivers it in 64; the quantizer adds one clock.
// The first coefficient appears 130 clocks after the last pixel is taken.
//
// The FDCT -> quantizer -> table chain is that of the baseline JPEG encoder. The level shift is
// that of the JPEG standard. Widths and handshakes are this design's own.
module jpeg_encoder
  import jpeg_pkg::*;
(
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic [PIX_W-1:0]        pix_data,
  output logic                    coef_valid,
  input  logic                    coef_ready,
  output logic signed [DCT_W-1:0] coef_data,
  output logic                    coef_last,
  input  logic                    qt_we,
  input  logic [5:0]              qt_addr,
  input  logic [Q_W-1:0]          qt_data
);

  logic                    d_valid, d_ready, d_last;
  logic signed [DCT_W-1:0] d_data;
  logic [5:0]              q_addr;
  logic [Q_W-1:0]          q_data;
  logic signed [PIX_W-1:0] sample;

  assign sample = $signed(pix_data ^ 8'h80);   // pixel - 128

  dct8x8 #(.INVERSE(1'b0), .IN_W(PIX_W), .OUT_W(DCT_W)) u_fdct (
    .clk, .reset,
    .in_valid (pix_valid), .in_ready (pix_ready), .in_data (sample),
    .out_valid(d_valid),   .out_ready(d_ready),   .out_data(d_data), .out_last(d_last)
  );

  quantizer #(.IN_W(DCT_W), .OUT_W(DCT_W)) u_quant (
    .clk, .reset,
    .in_valid (d_valid), .in_ready (d_ready), .in_data (d_data),
    .q_addr, .q_data,
    .out_valid(coef_valid), .out_ready(coef_ready), .out_data(coef_data), .out_last(coef_last)
  );

  quant_table u_qtab (
    .clk, .reset,
    .we(qt_we), .waddr(qt_addr), .wdata(qt_data),
    .raddr(q_addr), .rdata(q_data)
  );

  // The quantizer's block index and the transform's output index stay in step.
  a_last_in_step: assert property (@(posedge clk) disable iff (reset)
    (d_valid && d_ready) |-> (d_last == (q_addr == 6'd63)));

endmodule
