// videophone_top: digital core of the H.324-style video phone.
//
// Two parts stand side by side, as in the phone's structure diagram, where the main
// controller and the video unit are separate blocks:
//   * videophone_fsm, the call-control state machine (main controller). Its inputs
//     an, hang_up, imi and imo and its outputs audio_rec, video_rec, image_send and
//     image_display are the top's ports. The answering machine, the memories and
//     the processors those outputs steer are outside this core.
//   * the still-image path of the video unit: jpeg_encoder (FDCT, quantizer, table)
//     and jpeg_decoder (dequantizer, IDCT, table). Camera pixels enter at
//     pix_in_*. Quantized coefficients leave at coef_out_* toward the multiplexer
//     and modem. Received coefficients enter at coef_in_*, and decoded pixels for
//     the display leave at pix_out_*.
// With loopback = 1 the encoder feeds the decoder directly. A block is then
// compressed and restored without entropy coding, and coef_out_valid and coef_in_ready
// stay low. loopback may change only while both paths are idle.
//
// Each quantization table is loaded through its own write port (enc_qt_*, dec_qt_*).
// All handshakes are valid/ready, all blocks are 8x8 in raster order, and the
// *_last outputs mark the 64th value. Latencies are those of the encoder
// (130 clocks from last pixel to first coefficient) and the decoder (130 clocks
// from the last coefficient taken to the first pixel). Reset is asynchronous,
// active high.
//
// The part list, the state machine and the JPEG chain follow the design. The loopback
// switch, the port set and the handshakes are this design's own.
module videophone_top
  import jpeg_pkg::*;
  import videophone_pkg::*;
(
  input  logic                    clk,
  input  logic                    reset,
  // call control
  input  logic                    an,
  input  logic                    hang_up,
  input  logic                    imi,
  input  logic                    imo,
  output logic                    audio_rec,
  output logic                    image_display,
  output logic                    image_send,
  output logic                    video_rec,
  output call_state_e             call_state,
  // still image path
  input  logic                    loopback,
  input  logic                    pix_in_valid,
  output logic                    pix_in_ready,
  input  logic [PIX_W-1:0]        pix_in_data,
  output logic                    coef_out_valid,
  input  logic                    coef_out_ready,
  output logic signed [DCT_W-1:0] coef_out_data,
  output logic                    coef_out_last,
  input  logic                    coef_in_valid,
  output logic                    coef_in_ready,
  input  logic signed [DCT_W-1:0] coef_in_data,
  output logic                    pix_out_valid,
  input  logic                    pix_out_ready,
  output logic [PIX_W-1:0]        pix_out_data,
  output logic                    pix_out_last,
  input  logic                    enc_qt_we,
  input  logic [5:0]              enc_qt_addr,
  input  logic [Q_W-1:0]          enc_qt_data,
  input  logic                    dec_qt_we,
  input  logic [5:0]              dec_qt_addr,
  input  logic [Q_W-1:0]          dec_qt_data
);

  logic                    e_valid, e_ready, e_last;
  logic signed [DCT_W-1:0] e_data;
  logic                    d_valid, d_ready;
  logic signed [DCT_W-1:0] d_data;

  videophone_fsm u_fsm (
    .clk, .reset,
    .an, .hang_up, .imi, .imo,
    .audio_rec, .image_display, .image_send, .video_rec,
    .state(call_state)
  );

  jpeg_encoder u_enc (
    .clk, .reset,
    .pix_valid(pix_in_valid), .pix_ready(pix_in_ready), .pix_data(pix_in_data),
    .coef_valid(e_valid), .coef_ready(e_ready), .coef_data(e_data), .coef_last(e_last),
    .qt_we(enc_qt_we), .qt_addr(enc_qt_addr), .qt_data(enc_qt_data)
  );

  // Loopback switch between the encoder output and the decoder input.
  always_comb begin
    if (loopback) begin
      d_valid        = e_valid;
      d_data         = e_data;
      e_ready        = d_ready;
      coef_out_valid = 1'b0;
      coef_in_ready  = 1'b0;
    end else begin
      d_valid        = coef_in_valid;
      d_data         = coef_in_data;
      e_ready        = coef_out_ready;
      coef_out_valid = e_valid;
      coef_in_ready  = d_ready;
    end
  end
  assign coef_out_data = e_data;
  assign coef_out_last = e_last;

  jpeg_decoder u_dec (
    .clk, .reset,
    .coef_valid(d_valid), .coef_ready(d_ready), .coef_data(d_data),
    .pix_valid(pix_out_valid), .pix_ready(pix_out_ready), .pix_data(pix_out_data),
    .pix_last(pix_out_last),
    .qt_we(dec_qt_we), .qt_addr(dec_qt_addr), .qt_data(dec_qt_data)
  );

endmodule
