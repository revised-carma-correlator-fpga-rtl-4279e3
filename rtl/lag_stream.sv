// lag_stream: one stream of lag accumulators of a baseline.
// Every clock brings one word of SAMPS samples (SAMP_BITS each, sample 0 the
// oldest) on each of two streams a and b. For lag k (k = 0..NUM_LAGS-1) the
// block accumulates  R[k] += sum over the word's samples n of a[n]*b[n-k-OFFSET],
// so OFFSET=0 gives lags 0..N-1 and OFFSET=1 gives lags 1..N (used, with the
// streams swapped, for the negative lags -1..-N). A sample code c stands for
// the odd level 2c-(2^SAMP_BITS-1) (for 2 bits: -3,-1,+1,+3).
// clr zeroes the accumulators (an accumulation in the same cycle is kept);
// en adds this cycle's products. The history of b shifts every clock, and
// b_tail is the b stream delayed by exactly NUM_LAGS samples, which lets
// several blocks be chained into one longer lag range.
// Timing: acc reflects a word one clock after it is presented.
// Lag definitions and the sample-level encoding are this design's choices.
module lag_stream #(
  parameter int unsigned NUM_LAGS  = 256,
  parameter int unsigned SAMP_BITS = 2,
  parameter int unsigned OFFSET    = 0,
  parameter int unsigned ACC_W     = 32
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           clr,
  input  logic                           en,
  input  logic [15:0]                    a_word,
  input  logic [15:0]                    b_word,
  output logic [NUM_LAGS-1:0][ACC_W-1:0] acc,
  output logic [15:0]                    b_tail
);
  localparam int unsigned SAMPS  = 16 / SAMP_BITS;
  localparam int unsigned NW_LAG = (SAMPS + NUM_LAGS + OFFSET - 2) / SAMPS;
  localparam int unsigned NW     = (NW_LAG > NUM_LAGS / SAMPS) ? NW_LAG : NUM_LAGS / SAMPS;
  localparam int unsigned ND     = (NW + 1) * SAMPS;
  localparam int unsigned PW     = 2 * SAMP_BITS + 1;          // one product
  localparam int unsigned SW     = PW + $clog2(SAMPS) + 1;     // sum of a word

  // odd-level value of a sample code
  function automatic logic signed [SAMP_BITS+1:0] qval(input logic [SAMP_BITS-1:0] c);
    return $signed({1'b0, c, 1'b0}) - $signed((SAMP_BITS+2)'((1 << SAMP_BITS) - 1));
  endfunction

  logic [NW-1:0][15:0]        hist;     // hist[0] = previous word
  logic [ND-1:0][SAMP_BITS-1:0] bs;     // bs[d] = b sample d samples before the youngest
  logic [NUM_LAGS-1:0][SW-1:0]  wsum;

  always_comb begin
    for (int d = 0; d < ND; d++) begin
      if (d < SAMPS) bs[d] = b_word[(SAMPS-1-d)*SAMP_BITS +: SAMP_BITS];
      else           bs[d] = hist[d/SAMPS-1][(SAMPS-1-(d%SAMPS))*SAMP_BITS +: SAMP_BITS];
    end
  end

  always_comb begin
    for (int k = 0; k < NUM_LAGS; k++) begin
      logic signed [SW-1:0] s;
      s = '0;
      for (int n = 0; n < SAMPS; n++) begin
        s = s + SW'(qval(a_word[n*SAMP_BITS +: SAMP_BITS]) *
                    qval(bs[SAMPS-1-n+k+OFFSET]));
      end
      wsum[k] = s;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '0;
      acc  <= '0;
    end else begin
      hist[0] <= b_word;
      for (int w = 1; w < NW; w++) hist[w] <= hist[w-1];
      for (int k = 0; k < NUM_LAGS; k++) begin
        if (clr) acc[k] <= en ? ACC_W'($signed(wsum[k])) : '0;
        else if (en) acc[k] <= acc[k] + ACC_W'($signed(wsum[k]));
      end
    end
  end

  assign b_tail = hist[NUM_LAGS/SAMPS-1];
endmodule
