// phase_rot: downconversion and phase-offset correction at the head of the
// decimation pipeline. Input sample x_k (k = 8m+s, eight 8-bit samples per
// clock) is multiplied by i^k, which moves the band centre from 250 MHz to
// DC, and by e^{i phi}. With c = cos phi and s = sin phi the four phases give
//   k%4 = 0: ( x c,  x s)   1: (-x s,  x c)   2: (-x c, -x s)   3: ( x s, -x c)
// as (real, imaginary). cos/sin arrive as 18-bit two's-complement values
// scaled by 2^17 (the NCO's magnitude precision N = 18). Each product is
// rounded to 12 bits, keeping 4 fraction bits of the 8-bit input scale
// (round(x*c / 2^13)), and saturated. 'negate' (phase-switch demodulation for
// the current integration) negates all outputs. Latency: one clock.
// The modulation sequence, the 18-bit factors and the 12-bit result follow
// the phase-correction description; the output scaling is this design's.
module phase_rot #(
  parameter int unsigned IN_BITS  = 8,
  parameter int unsigned TRIG_W   = 18,
  parameter int unsigned OUT_BITS = 12
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [7:0][IN_BITS-1:0]       din,
  input  logic [TRIG_W-1:0]             cos_phi,
  input  logic [TRIG_W-1:0]             sin_phi,
  input  logic                          negate,
  output logic [7:0][OUT_BITS-1:0]      re,
  output logic [7:0][OUT_BITS-1:0]      im
);
  localparam int unsigned SH   = IN_BITS + TRIG_W - 1 - OUT_BITS;  // 13
  localparam int signed   MAXV = (1 << (OUT_BITS - 1)) - 1;
  localparam int signed   MINV = -(1 << (OUT_BITS - 1));

  function automatic logic [OUT_BITS-1:0] rnd(input logic signed [31:0] p, input logic neg);
    logic signed [31:0] r;
    r = (p + (32'sd1 <<< (SH - 1))) >>> SH;
    if (neg) r = -r;
    if (r > MAXV) return OUT_BITS'(MAXV);
    if (r < MINV) return OUT_BITS'(MINV);
    return OUT_BITS'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      re <= '0;
      im <= '0;
    end else begin
      for (int k = 0; k < 8; k++) begin
        logic signed [31:0] xc, xs;
        xc = 32'($signed(din[k])) * 32'($signed(cos_phi));
        xs = 32'($signed(din[k])) * 32'($signed(sin_phi));
        unique case (k % 4)
          0: begin re[k] <= rnd(xc, negate);  im[k] <= rnd(xs, negate);  end
          1: begin re[k] <= rnd(-xs, negate); im[k] <= rnd(xc, negate);  end
          2: begin re[k] <= rnd(-xc, negate); im[k] <= rnd(-xs, negate); end
          default: begin re[k] <= rnd(xs, negate); im[k] <= rnd(-xc, negate); end
        endcase
      end
    end
  end
endmodule
