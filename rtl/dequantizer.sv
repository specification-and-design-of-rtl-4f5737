// dequantizer: JPEG dequantization of a stream of quantized DCT coefficients.
//
// Each quantized coefficient Sq is multiplied by its table entry Q: R = Sq * Q,
// saturated to OUT_W bits. Coefficients arrive in raster order, 64 per block; an
// internal index addresses the quantization table (q_addr out, q_data back in the
// same clock). The result sits in a one-entry output register with
// in_ready = !out_valid || out_ready, one clock from input to output. out_last marks
// the 64th coefficient of a block.
//
// Multiplication by the table entry is the decoder side of JPEG quantization; the
// widths, saturation and handshake are this design's own. Reset is asynchronous,
// active high.
module dequantizer
  import jpeg_pkg::*;
#(
  parameter int IN_W  = 12,
  parameter int OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic [5:0]              q_addr,
  input  logic [Q_W-1:0]          q_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_last
);

  localparam int P_W = IN_W + Q_W + 1;
  localparam logic signed [P_W-1:0] RMAX = P_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [P_W-1:0] RMIN = P_W'(-(64'sd1 <<< (OUT_W - 1)));

  logic [5:0]             idx;
  logic signed [P_W-1:0]  prod;
  logic signed [OUT_W-1:0] sat;
  logic                   take;

  assign q_addr   = idx;
  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_comb begin
    prod = P_W'(in_data) * $signed({1'b0, q_data});
    if      (prod >  RMAX)     sat = OUT_W'(RMAX);
    else if (prod < RMIN)     sat = OUT_W'(RMIN);
    else                       sat = OUT_W'(prod);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      idx       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (take) begin
        idx       <= idx + 6'd1;
        out_valid <= 1'b1;
        out_data  <= sat;
        out_last  <= (idx == 6'd63);
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
