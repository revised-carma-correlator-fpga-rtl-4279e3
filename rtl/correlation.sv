// correlation: the lag correlator of a data FPGA, for NUM_CORL baselines.
// Each baseline has a prompt and a delay input word per clock: bits 15-0 are
// 16/SAMP_BITS samples (sample 0 oldest), bits 31-16 are metadata that travel
// with them. CORL_TYPE selects auto (prompt with itself), +lags, -lags or both.
//   +lag k (0..NUM_LAGS-1):  R+[k] = sum p[n]*d[n-k]
//   -lag k (1..NUM_LAGS):    R-[k] = sum p[n-k]*d[n]
// Integration runs while 'correlate' is high; its rising edge clears the
// accumulators, the quantization-state counters and the metadata capture.
// While active, each baseline's input pair {delay, prompt} is written once per
// clock into its M-RAM above the lag readout (the continuous sample dump),
// filling it once up to quadword 2^DUMP_ADDR_WIDTH-1.
// On the falling edge the dump starts: one 64-bit word per clock to every
// baseline's M-RAM port in parallel, the +lag stream in the 32-bit LSBs and the
// -lag stream in the MSBs:
//   quad 0 .. NUM_LAGS-1                 {R-[k+1], R+[k]}
//   quad NUM_LAGS .. +NUM_META-1         {delay word j, prompt word j} (the
//                                        first NUM_META input words of the
//                                        integration)
//   next NUM_QCNT quads                  {0, count of quantization state q}
//                                        (q < 2^SAMP_BITS: prompt samples,
//                                        higher q: delay samples)
// 'done' pulses with the last write. If correlate rises before the dump has
// finished, the dump is abandoned and 'err' pulses.
// With 'hires' (CTRL_REG_CORL_MODE bit 3) the NUM_CORL lag blocks are chained
// through their delay lines into a single correlation of baseline 0 with
// NUM_CORL*NUM_LAGS lags per stream, dumped into the M-RAM of baseline 0 only.
// test_mode (mode "01") replaces the prompt and delay samples by the
// test_pin / test_din patterns. Outputs conf1/conf2 are the CTRL_REG_CORL_CONF
// words. The generics, the readout order and widths, the status events and
// the test-pattern and single-baseline modes follow the specification; the lag
// sign convention, the choice of metadata words and the quantization-counter
// order are this design's own.
module correlation
  import carma_pkg::*;
#(
  parameter int unsigned CORL_TYPE       = CORL_BOTH,
  parameter int unsigned NUM_CORL        = 4,
  parameter int unsigned NUM_LAGS        = 256,
  parameter int unsigned NUM_META        = 4,
  parameter int unsigned NUM_QCNT        = 4,
  parameter int unsigned SAMP_BITS       = 2,
  parameter int unsigned DUMP_ADDR_WIDTH = 12,
  parameter int unsigned ACC_W           = 32
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           correlate,
  input  logic                           test_mode,
  input  logic [15:0]                    test_pin,
  input  logic [15:0]                    test_din,
  input  logic                           hires,
  input  logic [NUM_CORL-1:0][31:0]      prompt,
  input  logic [NUM_CORL-1:0][31:0]      delay,
  output ram64_req_t [NUM_CORL-1:0]      ram_req,
  output logic                           active,
  output logic                           done,
  output logic                           err,
  output logic [31:0]                    conf1,
  output logic [31:0]                    conf2
);
  localparam int unsigned SAMPS     = 16 / SAMP_BITS;
  localparam int unsigned NSTATE    = 1 << SAMP_BITS;
  localparam bit          HAS_POS   = (CORL_TYPE != CORL_NEG);
  localparam bit          HAS_NEG   = (CORL_TYPE == CORL_NEG) || (CORL_TYPE == CORL_BOTH);
  localparam int unsigned DUMP_CNT  = NUM_LAGS + NUM_META + NUM_QCNT;
  localparam int unsigned DUMP_CNTH = NUM_CORL * NUM_LAGS + NUM_META + NUM_QCNT;
  localparam int unsigned DEPTH     = 1 << DUMP_ADDR_WIDTH;
  localparam int unsigned AW        = DUMP_ADDR_WIDTH + 1;
  localparam int unsigned MW        = (NUM_META > 1) ? $clog2(NUM_META) : 1;

  initial begin
    assert (DUMP_CNTH <= DEPTH) else $error("lag readout does not fit the dump area");
    assert (NUM_QCNT <= 2 * NSTATE) else $error("NUM_QCNT exceeds the available states");
    assert (NUM_LAGS % SAMPS == 0) else $error("NUM_LAGS must be a multiple of the word size");
  end

  assign conf1 = {1'b0, 11'(NUM_META), 12'(NUM_LAGS), 4'(NUM_CORL), 4'(CORL_TYPE)};
  assign conf2 = {1'b0, 4'(1 + DUMP_ADDR_WIDTH), 15'(2 * DUMP_CNT), 12'(NUM_QCNT)};

  // ---- inputs after test-pattern substitution ------------------------------
  logic [NUM_CORL-1:0][31:0] p_eff, d_eff;
  always_comb begin
    for (int c = 0; c < NUM_CORL; c++) begin
      p_eff[c] = test_mode ? {prompt[c][31:16], test_pin} : prompt[c];
      d_eff[c] = test_mode ? {delay[c][31:16],  test_din} : delay[c];
      if (CORL_TYPE == CORL_AUTO) d_eff[c] = p_eff[c];
    end
  end

  // ---- control ---------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_INTEG, S_DUMP} state_e;
  state_e        state;
  logic          corr_q, start, stop;
  logic [AW-1:0] dump_addr, samp_addr, dump_len;
  logic [MW:0]   meta_cnt;

  assign start    = correlate && !corr_q;
  assign stop     = !correlate && corr_q;
  assign active   = correlate;
  assign dump_len = hires ? AW'(DUMP_CNTH) : AW'(DUMP_CNT);

  always_ff @(posedge clk) begin
    if (rst) begin
      corr_q    <= 1'b0;
      state     <= S_IDLE;
      dump_addr <= '0;
      samp_addr <= '0;
      meta_cnt  <= '0;
    end else begin
      corr_q <= correlate;
      if (start) begin
        state     <= S_INTEG;
        samp_addr <= dump_len + 1'b1;
        meta_cnt  <= (NUM_META > 0) ? (MW+1)'(1) : '0;
      end else if (stop) begin
        state     <= S_DUMP;
        dump_addr <= '0;
      end else if (state == S_INTEG) begin
        if (samp_addr < AW'(DEPTH)) samp_addr <= samp_addr + 1'b1;
        if (meta_cnt < (MW+1)'(NUM_META)) meta_cnt <= meta_cnt + 1'b1;
      end else if (state == S_DUMP) begin
        if (dump_addr == dump_len - 1'b1) state <= S_IDLE;
        else dump_addr <= dump_addr + 1'b1;
      end
    end
  end

  // ---- lag engines -------------------------------------------------------------
  logic [NUM_CORL-1:0][NUM_LAGS-1:0][ACC_W-1:0] pos_acc, neg_acc;
  logic [NUM_CORL-1:0][15:0] pos_tail, neg_tail;

  for (genvar c = 0; c < NUM_CORL; c++) begin : g_bl
    logic [15:0] pa, pb, na, nb;
    if (c == 0) begin : g_first
      assign pa = p_eff[0][15:0];
      assign pb = d_eff[0][15:0];
      assign na = d_eff[0][15:0];
      assign nb = p_eff[0][15:0];
    end else begin : g_chain
      assign pa = hires ? p_eff[0][15:0] : p_eff[c][15:0];
      assign pb = hires ? pos_tail[c-1]  : d_eff[c][15:0];
      assign na = hires ? d_eff[0][15:0] : d_eff[c][15:0];
      assign nb = hires ? neg_tail[c-1]  : p_eff[c][15:0];
    end
    if (HAS_POS) begin : g_pos
      lag_stream #(.NUM_LAGS(NUM_LAGS), .SAMP_BITS(SAMP_BITS), .OFFSET(0), .ACC_W(ACC_W)) u_pos (
        .clk(clk), .rst(rst), .clr(start), .en(correlate),
        .a_word(pa), .b_word(pb), .acc(pos_acc[c]), .b_tail(pos_tail[c]));
    end else begin : g_nopos
      assign pos_acc[c]  = '0;
      assign pos_tail[c] = pb;
    end
    if (HAS_NEG) begin : g_neg
      lag_stream #(.NUM_LAGS(NUM_LAGS), .SAMP_BITS(SAMP_BITS), .OFFSET(1), .ACC_W(ACC_W)) u_neg (
        .clk(clk), .rst(rst), .clr(start), .en(correlate),
        .a_word(na), .b_word(nb), .acc(neg_acc[c]), .b_tail(neg_tail[c]));
    end else begin : g_noneg
      assign neg_acc[c]  = '0;
      assign neg_tail[c] = nb;
    end
  end

  // ---- metadata capture and quantization-state counters -----------------------
  logic [NUM_CORL-1:0][NUM_META-1:0][31:0] meta_p, meta_d;
  logic [NUM_CORL-1:0][NUM_QCNT-1:0][31:0] qcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta_p <= '0;
      meta_d <= '0;
      qcnt   <= '0;
    end else begin
      for (int c = 0; c < NUM_CORL; c++) begin
        for (int j = 0; j < NUM_META; j++) begin
          if ((start && j == 0) || (!start && state == S_INTEG && meta_cnt == (MW+1)'(j))) begin
            meta_p[c][j] <= p_eff[c];
            meta_d[c][j] <= d_eff[c];
          end
        end
        for (int q = 0; q < NUM_QCNT; q++) begin
          logic [31:0] hits;
          hits = '0;
          for (int n = 0; n < SAMPS; n++) begin
            if (q < NSTATE) hits += 32'(p_eff[c][n*SAMP_BITS +: SAMP_BITS] == SAMP_BITS'(q));
            else            hits += 32'(d_eff[c][n*SAMP_BITS +: SAMP_BITS] == SAMP_BITS'(q - NSTATE));
          end
          if (start)          qcnt[c][q] <= hits;
          else if (correlate) qcnt[c][q] <= qcnt[c][q] + hits;
        end
      end
    end
  end

  // ---- RAM write port -----------------------------------------------------------
  ram64_req_t [NUM_CORL-1:0] req_d;
  logic                      done_d;

  always_comb begin
    int unsigned a, r;
    req_d  = '0;
    done_d = 1'b0;
    a      = 32'(dump_addr);
    r      = a - (hires ? NUM_CORL * NUM_LAGS : NUM_LAGS);
    for (int c = 0; c < NUM_CORL; c++) begin
      if (state == S_DUMP && !start && (c == 0 || !hires)) begin
        req_d[c].en   = 1'b1;
        req_d[c].we   = 1'b1;
        req_d[c].addr = 13'(a);
        if (!hires && a < NUM_LAGS) begin
          req_d[c].wdata = {neg_acc[c][a], pos_acc[c][a]};
        end else if (hires && a < NUM_CORL * NUM_LAGS) begin
          req_d[c].wdata = {neg_acc[a / NUM_LAGS][a % NUM_LAGS], pos_acc[a / NUM_LAGS][a % NUM_LAGS]};
        end else begin
          if (r < NUM_META) req_d[c].wdata = {meta_d[c][r], meta_p[c][r]};
          else if (r - NUM_META < NUM_QCNT) req_d[c].wdata = {32'h0, qcnt[c][r - NUM_META]};
        end
      end else if (correlate && (start || (state == S_INTEG && samp_addr < AW'(DEPTH)))
                   && (c == 0 || !hires)) begin
        req_d[c].en    = 1'b1;
        req_d[c].we    = 1'b1;
        req_d[c].addr  = start ? 13'(dump_len) : 13'(samp_addr);
        req_d[c].wdata = {d_eff[c], p_eff[c]};
      end
    end
    if (state == S_DUMP && !start && dump_addr == dump_len - 1'b1) done_d = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ram_req <= '0;
      done    <= 1'b0;
      err     <= 1'b0;
    end else begin
      ram_req <= req_d;
      done    <= done_d;
      err     <= start && (state == S_DUMP);
      for (int c = 0; c < NUM_CORL; c++)
        if (req_d[c].en) assert (32'(req_d[c].addr) < DEPTH)
          else $error("dump write beyond DUMP_ADDR_WIDTH");
    end
  end
endmodule
