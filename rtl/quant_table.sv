// quant_table: quantization table memory ("table specification") for one JPEG
// quantizer or dequantizer.
//
// Sixty-four 8-bit entries, one per DCT coefficient in raster order (entry u*8+v
// belongs to row u, column v of the coefficient block). Reset loads INIT, by default
// the luminance table of the JPEG standard. A write port (we, waddr, wdata) replaces
// one entry per clock. The read port is combinational: rdata shows entry raddr in
// the same clock. A written 0 is stored as 1, so the quantizer never divides by 0.
//
// That the quantizer draws its step sizes from a table is the baseline JPEG scheme. The
// default contents, the load port and reset behaviour are this design's own.
// Reset is asynchronous, active high.
module quant_table
  import jpeg_pkg::*;
#(
  parameter qtab_t INIT = STD_LUMA_Q
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           we,
  input  logic [5:0]     waddr,
  input  logic [Q_W-1:0] wdata,
  input  logic [5:0]     raddr,
  output logic [Q_W-1:0] rdata
);

  qtab_t tab;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)   tab <= INIT;
    else if (we) tab[waddr] <= (wdata == '0) ? Q_W'(1) : wdata;
  end

  assign rdata = tab[raddr];

endmodule
