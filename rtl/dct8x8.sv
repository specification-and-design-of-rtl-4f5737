// dct8x8: two-dimensional 8x8 discrete cosine transform, forward or inverse.
//
// The block is transformed by rows and then by columns with the same 8-point
// kernel K (K = A for the forward DCT, K = A^T for the inverse, see jpeg_pkg):
//   pass 1 (rows):    T[r][k] = sum_j X[r][j] * K[k][j]
//   pass 2 (columns): Y[k][c] = sum_j K[k][j] * T[j][c]
// which gives Y = A X A^T (forward) or Y = A^T X A (inverse). One datapath of eight
// multipliers and an adder tree produces one value per clock in both passes.
// T is kept with MID_FRAC fraction bits, and both passes round to nearest.
// The transform result is saturated to OUT_W bits.
//
// Operation is block-serial in four phases of 64 clocks each:
//   LOAD  accept 64 samples, raster order (row 0 first), in_valid/in_ready
//   ROW   compute T
//   COL   compute Y
//   OUT   deliver 64 results in raster order, out_valid/out_ready, out_last on the 64th
// From the clock that accepts the last input, the first output appears 129 clocks
// later. With no back-pressure a block takes 256 clocks, one sample per
// clock in and out.
//
// The transform and the 8x8 block size are the baseline JPEG transform. The
// row-column structure, the fixed-point formats and the handshake are this design's own.
// Reset is asynchronous, active high.
module dct8x8
  import jpeg_pkg::*;
#(
  parameter bit INVERSE  = 1'b0,  // 0: forward DCT, 1: inverse DCT
  parameter int IN_W     = 8,     // signed input sample width
  parameter int OUT_W    = 12,    // signed output width (saturating)
  parameter int MID_W    = 20,    // width of the transposition buffer entries
  parameter int MID_FRAC = 4      // fraction bits kept between the passes
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    out_last
);

  localparam kmat_t KM    = dct_kernel(INVERSE);
  localparam int    ACC_W = MID_W + COEF_W + 3;
  localparam int    SH1   = COEF_FRAC - MID_FRAC;   // row pass: integer in, MID_FRAC out
  localparam int    SH2   = COEF_FRAC + MID_FRAC;   // column pass: MID_FRAC in, integer out

  typedef enum logic [1:0] {PH_LOAD, PH_ROW, PH_COL, PH_OUT} phase_e;

  phase_e                   phase;
  logic [5:0]               cnt;
  logic signed [IN_W-1:0]   xbuf [NCOEF];
  logic signed [MID_W-1:0]  tbuf [NCOEF];
  logic signed [OUT_W-1:0]  ybuf [NCOEF];

  logic [2:0]               hi, lo;       // cnt = hi*8 + lo
  logic signed [MID_W-1:0]  opnd [8];
  logic signed [ACC_W-1:0]  acc, rounded;
  logic signed [ACC_W-1:0]  shifted;
  logic signed [MID_W-1:0]  t_val;
  logic signed [OUT_W-1:0]  y_val;

  assign hi = cnt[5:3];
  assign lo = cnt[2:0];

  // Operands and kernel row for the value computed this clock.
  // ROW: row hi of X, kernel row lo.  COL: column lo of T, kernel row hi.
  always_comb begin
    for (int j = 0; j < 8; j++) begin
      if (phase == PH_ROW) opnd[j] = MID_W'(xbuf[{hi, 3'(j)}]);
      else                 opnd[j] = tbuf[{3'(j), lo}];
    end
  end

  always_comb begin
    logic [2:0] krow;
    krow = (phase == PH_ROW) ? lo : hi;
    acc = '0;
    for (int j = 0; j < 8; j++)
      acc += ACC_W'(opnd[j]) * ACC_W'($signed(KM[{krow, 3'(j)}]));
  end

  always_comb begin
    if (phase == PH_ROW) begin
      rounded = acc + (ACC_W'(1) <<< (SH1 - 1));
      shifted = rounded >>> SH1;
    end else begin
      rounded = acc + (ACC_W'(1) <<< (SH2 - 1));
      shifted = rounded >>> SH2;
    end
  end

  // Saturate to the destination widths.
  always_comb begin
    localparam logic signed [ACC_W-1:0] TMAX = ACC_W'((64'sd1 <<< (MID_W - 1)) - 1);
    localparam logic signed [ACC_W-1:0] YMAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
    if      (shifted >  TMAX)      t_val = MID_W'(TMAX);
    else if (shifted < -TMAX - 1)  t_val = MID_W'(-TMAX - 1);
    else                           t_val = MID_W'(shifted);
    if      (shifted >  YMAX)      y_val = OUT_W'(YMAX);
    else if (shifted < -YMAX - 1)  y_val = OUT_W'(-YMAX - 1);
    else                           y_val = OUT_W'(shifted);
  end

  assign in_ready  = (phase == PH_LOAD);
  assign out_valid = (phase == PH_OUT);
  assign out_data  = ybuf[cnt];
  assign out_last  = (phase == PH_OUT) && (cnt == 6'd63);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      phase <= PH_LOAD;
      cnt   <= '0;
    end else begin
      unique case (phase)
        PH_LOAD: if (in_valid) begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) phase <= PH_ROW;
        end
        PH_ROW: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) phase <= PH_COL;
        end
        PH_COL: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) phase <= PH_OUT;
        end
        PH_OUT: if (out_ready) begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) phase <= PH_LOAD;
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

  // Data buffers, no reset: every entry is written before it is read.
  always_ff @(posedge clk) begin
    if (phase == PH_LOAD && in_valid) xbuf[cnt] <= in_data;
    if (phase == PH_ROW)              tbuf[cnt] <= t_val;
    if (phase == PH_COL)              ybuf[cnt] <= y_val;
  end

endmodule
