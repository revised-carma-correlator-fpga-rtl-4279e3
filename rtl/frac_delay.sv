// frac_delay: the sub-ns (fractional sample) delay filter of a digitizer
// FPGA. The stream arrives demux-by-8 (x_0..x_7 per clock, x_7 youngest) and
// is filtered by an NTAPS = 80 tap FIR, y[n] = sum_t c_t x[n-t]. Output y_i
// of a clock comes from filter i, which sees the inputs x_{i-7}..x_i (the
// negative indices taken from the previous clock). Each filter is split into
// 8 polyphase sub-filters (sub-filter k holds taps a_j^k = c_{8j+k},
// j = 0..9) and each of those into two 5-tap halves (a^{k,0}_l = a_l^k,
// a^{k,1}_l = a_{l+5}^k). A 5-tap half is a distributed-arithmetic filter:
// its coded table s_0..s_31 (18 bits, s_0 = 0) holds s_m = sum of the taps
// a_l whose bit l is set in m, and the filter looks the table up once per
// input bit with address bit l = that bit of the sample at tap l, weighting
// the lookups 2^b (the sign bit -2^5). The 16 tables (stream 2k+h) are common
// to the eight filters.
// Tables are reloaded through a three-lane write port into a shadow copy
// (index 1..31 of a stream per lane per clock); 'swap' makes the shadow copy
// active at once, so a delay change is atomic. Inputs are 6-bit two's
// complement; the output is round(sum / 2^OUT_SHIFT) saturated to 8 bits
// (with 15-bit taps scaled by 2^14, OUT_SHIFT = 12 keeps two extra bits).
// Latency: two clocks (a registered sum, then the rounded output).
// The polyphase split, the 5-tap halves, the coded table layout, the tap
// count and the bit widths follow the filter description; the output scaling
// and the reload port are this design's choices.
module frac_delay #(
  parameter int unsigned NTAPS     = 80,
  parameter int unsigned IN_BITS   = 6,
  parameter int unsigned OUT_BITS  = 8,
  parameter int unsigned CODE_W    = 18,
  parameter int unsigned OUT_SHIFT = 12
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [7:0][IN_BITS-1:0]        din,
  output logic [7:0][OUT_BITS-1:0]       dout,
  output logic                           ovf,
  input  logic [2:0]                     ld_en,
  input  logic [2:0][3:0]                ld_stream,
  input  logic [2:0][4:0]                ld_index,
  input  logic [2:0][CODE_W-1:0]         ld_value,
  input  logic                           swap
);
  localparam int unsigned NSUB   = NTAPS / 8;        // taps per sub-filter (10)
  localparam int unsigned NHALF  = NSUB / 2;         // taps per DA table (5)
  localparam int unsigned NWORDS = NSUB + 1;         // words of history incl. current
  localparam int unsigned ACC_W  = CODE_W + IN_BITS + 5;

  initial assert (NHALF == 5 && NSUB * 8 == NTAPS) else $error("frac_delay expects 80 taps");

  logic [15:0][31:0][CODE_W-1:0] tab, shadow;
  logic [NWORDS-2:0][7:0][IN_BITS-1:0] hist;     // hist[0] = previous word

  // sample x[8m + s - 8w] for w = 0 (current) .. NWORDS-1
  function automatic logic [IN_BITS-1:0] xs(input int w, input int s,
      input logic [7:0][IN_BITS-1:0] cur, input logic [NWORDS-2:0][7:0][IN_BITS-1:0] h);
    int ww, ss;
    ww = w; ss = s;
    if (ss < 0) begin ss += 8; ww += 1; end
    return (ww == 0) ? cur[ss] : h[ww-1][ss];
  endfunction

  logic [7:0][ACC_W-1:0] acc_d, acc_q;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic signed [ACC_W-1:0] a;
      a = '0;
      for (int k = 0; k < 8; k++) begin
        for (int h = 0; h < 2; h++) begin
          for (int b = 0; b < IN_BITS; b++) begin
            logic [4:0] addr;
            logic signed [ACC_W-1:0] term;
            for (int l = 0; l < NHALF; l++) begin
              // tap j = 5h+l of sub-filter k: input x[8(m-j) + i - k]
              addr[l] = xs(NHALF * h + l, i - k, din, hist)[b];
            end
            term = ACC_W'($signed(tab[2*k+h][addr])) <<< b;
            if (b == IN_BITS - 1) a = a - term;
            else                  a = a + term;
          end
        end
      end
      acc_d[i] = a;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist  <= '0;
      acc_q <= '0;
      dout  <= '0;
      ovf   <= 1'b0;
      tab   <= '0;
      shadow <= '0;
    end else begin
      hist[0] <= din;
      for (int w = 1; w < NWORDS - 1; w++) hist[w] <= hist[w-1];
      acc_q <= acc_d;
      ovf   <= 1'b0;
      for (int i = 0; i < 8; i++) begin
        logic signed [ACC_W-1:0] r;
        r = ($signed(acc_q[i]) + (ACC_W'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
        if (r > ACC_W'((1 << (OUT_BITS - 1)) - 1)) begin
          dout[i] <= OUT_BITS'((1 << (OUT_BITS - 1)) - 1); ovf <= 1'b1;
        end else if (r < -ACC_W'(1 << (OUT_BITS - 1))) begin
          dout[i] <= OUT_BITS'(1 << (OUT_BITS - 1)); ovf <= 1'b1;
        end else dout[i] <= OUT_BITS'(r);
      end
      for (int n = 0; n < 3; n++)
        if (ld_en[n] && ld_index[n] != 5'd0) shadow[ld_stream[n]][ld_index[n]] <= ld_value[n];
      if (swap) tab <= shadow;
    end
  end
endmodule
