// quantizer: JPEG quantization of a stream of DCT coefficients.
//
// Each coefficient S is divided by its table entry Q and rounded to the nearest
// integer, halves away from zero: Sq = sign(S) * floor((|S| + floor(Q/2)) / Q).
// Coefficients arrive in raster order, 64 per block; an internal index counts them
// and addresses the quantization table (q_addr out, q_data back in the same clock).
// The divider is combinational. The result sits in a one-entry output register:
// in_ready = !out_valid || out_ready, so a result leaves one clock after its
// coefficient is taken, and one coefficient per clock flows when out_ready stays high.
// out_last marks the 64th coefficient of a block.
//
// Division by a table entry is the JPEG quantizer; the rounding rule, widths and
// handshake are this design's own. Reset is asynchronous, active high.
module quantizer
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

  logic [5:0]      idx;
  logic [IN_W-1:0] mag, quo;
  logic [Q_W-1:0]  q;
  logic            take;

  assign q_addr   = idx;
  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_comb begin
    q   = (q_data == '0) ? Q_W'(1) : q_data;
    mag = in_data[IN_W-1] ? IN_W'(-in_data) : IN_W'(in_data);
    quo = IN_W'(({1'b0, mag} + (IN_W+1)'(q >> 1)) / (IN_W+1)'(q));
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
        out_data  <= in_data[IN_W-1] ? -OUT_W'($signed({1'b0, quo}))
                                     :  OUT_W'($signed({1'b0, quo}));
        out_last  <= (idx == 6'd63);
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
