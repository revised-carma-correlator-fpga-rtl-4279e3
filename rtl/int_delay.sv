// int_delay: whole-sample ("whole-ns") delay of a demux-by-8 sample stream.
// Every clock brings NSAMP samples (sample 0 oldest). The output sample s of
// word m is input sample 8m+s-dly, taken from a ring buffer of DEPTH_WORDS
// past words. With q = dly/8 and r = dly%8 the output word is the window
// starting at sample 8-r of the pair {word m-q, word m-q-1}. Delays above the
// buffer's reach (8*(DEPTH_WORDS-1)-1 samples) are clipped to it. The delay
// takes effect at once; output latency is one clock on top of the delay.
// The delay value is the 16-bit whole-ns field of the delay/phase table; the
// buffer depth and structure are this design's choices.
module int_delay #(
  parameter int unsigned W           = 6,
  parameter int unsigned NSAMP       = 8,
  parameter int unsigned DEPTH_WORDS = 128
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [15:0]              dly,
  input  logic [NSAMP-1:0][W-1:0]  din,
  output logic [NSAMP-1:0][W-1:0]  dout
);
  localparam int unsigned AW      = $clog2(DEPTH_WORDS);
  localparam int unsigned SW      = $clog2(NSAMP);
  localparam int unsigned MAX_DLY = NSAMP * (DEPTH_WORDS - 1) - 1;

  logic [NSAMP-1:0][W-1:0] buf_q [DEPTH_WORDS];
  logic [AW-1:0]           wp;          // slot of the previous word
  logic [15:0]             d;
  logic [AW-1:0]           q;
  logic [SW-1:0]           r;
  logic [NSAMP-1:0][W-1:0] w_new, w_old;
  logic [2*NSAMP-1:0][W-1:0] pair;

  assign d = (32'(dly) > MAX_DLY) ? 16'(MAX_DLY) : dly;
  assign q = AW'(d >> SW);
  assign r = SW'(d);

  // word m-j for j >= 1 sits in slot wp-(j-1)
  assign w_new = (q == '0) ? din : buf_q[wp - q + 1'b1];
  assign w_old = buf_q[wp - q];
  assign pair  = {w_new, w_old};

  always_ff @(posedge clk) begin
    if (rst) begin
      wp   <= '0;
      dout <= '0;
    end else begin
      wp         <= wp + 1'b1;
      buf_q[wp + 1'b1] <= din;
      for (int s = 0; s < NSAMP; s++) dout[s] <= pair[NSAMP + s - 32'(r)];
    end
  end
endmodule
