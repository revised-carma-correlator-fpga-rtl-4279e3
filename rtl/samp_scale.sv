// samp_scale: gain and offset correction of the raw digitizer samples,
//   x' = (GAIN*x + OFFSET)/256,
// followed by rounding to OUT_BITS (6) bits for the sub-ns delay filter.
// Eight 8-bit two's-complement samples arrive per clock (sample 0 oldest).
// GAIN and OFFSET are the 16-bit LSBs of CTRL_REG_SAMP_GAIN/OFFSET, read as
// signed numbers (GAIN = 256 is unity gain). The 6-bit result is
// round((GAIN*x + OFFSET) / 2^(8+8-OUT_BITS)), rounding halves up, saturated
// to the 6-bit range; 'ovf' flags a clock in which any sample saturated.
// Latency: one clock. The formula and bit widths are the specification's;
// signedness, single rounding and saturation are this design's choices.
module samp_scale #(
  parameter int unsigned IN_BITS  = 8,
  parameter int unsigned OUT_BITS = 6,
  parameter int unsigned NSAMP    = 8
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [15:0]                      gain,
  input  logic [15:0]                      offset,
  input  logic [NSAMP-1:0][IN_BITS-1:0]    din,
  output logic [NSAMP-1:0][OUT_BITS-1:0]   dout,
  output logic                             ovf
);
  localparam int unsigned SH = 8 + IN_BITS - OUT_BITS;     // 10
  localparam int signed   MAXV = (1 << (OUT_BITS - 1)) - 1;
  localparam int signed   MINV = -(1 << (OUT_BITS - 1));

  logic [NSAMP-1:0][OUT_BITS-1:0] y;
  logic                           o;

  always_comb begin
    o = 1'b0;
    for (int s = 0; s < NSAMP; s++) begin
      logic signed [31:0] z, r;
      z = $signed(gain) * $signed(din[s]) + $signed(offset);
      r = (z + (32'sd1 <<< (SH - 1))) >>> SH;
      if (r > MAXV)      begin y[s] = OUT_BITS'(MAXV); o = 1'b1; end
      else if (r < MINV) begin y[s] = OUT_BITS'(MINV); o = 1'b1; end
      else                     y[s] = OUT_BITS'(r);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
      ovf  <= 1'b0;
    end else begin
      dout <= y;
      ovf  <= o;
    end
  end
endmodule
