// tb_correlation: self-checking test of the lag correlator at small sizes
// (2 baselines, 16 lags per stream, 8-word metadata/count area, 128-quad dump
// area). Random 2-bit sample streams are recorded and every expected lag,
// metadata word, quantization count and sample-dump word is computed here from
// the definitions and compared with what the block writes to its RAM ports.
// Covered: a normal integration, the test-pattern mode, the single-baseline
// high-resolution mode, the dump latency (NUM_LAGS+NUM_META+NUM_QCNT words,
// one per clock) and the error raised when correlate rises during a dump.
module tb_correlation;
  import carma_pkg::*;
  localparam int NC = 2, L = 16, NM = 2, NQ = 8, SB = 2, S = 8, DAW = 7;
  localparam int DC = L + NM + NQ, DCH = NC * L + NM + NQ, DEPTH = 1 << DAW;
  localparam int MAXW = 400;

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic correlate = 0, test_mode = 0, hires = 0;
  logic [15:0] test_pin = 16'h1B6C, test_din = 16'hE4D2;
  logic [NC-1:0][31:0] prompt, delay;
  ram64_req_t [NC-1:0] ram_req;
  logic active, done, err;
  logic [31:0] conf1, conf2;

  correlation #(.CORL_TYPE(3), .NUM_CORL(NC), .NUM_LAGS(L), .NUM_META(NM), .NUM_QCNT(NQ),
                .SAMP_BITS(SB), .DUMP_ADDR_WIDTH(DAW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // recorded effective input words per cycle
  logic [31:0] pw [NC][MAXW];
  logic [31:0] dw [NC][MAXW];
  int t = 0;                      // word index
  logic [63:0] mem [NC][DEPTH];
  int done_cnt = 0, err_cnt = 0, done_cycle = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    for (int c = 0; c < NC; c++)
      if (ram_req[c].en && ram_req[c].we) mem[c][ram_req[c].addr[DAW-1:0]] = ram_req[c].wdata;
    if (done && !rst) begin done_cnt++; done_cycle = cyc; end
    if (err && !rst) err_cnt++;
  end

  function automatic int v(input logic [1:0] c); return 2 * int'(c) - 3; endfunction
  function automatic logic [1:0] smp(input logic [31:0] w [MAXW], input int n);
    return w[n / S][(n % S) * 2 +: 2];
  endfunction

  // present one word per clock; correlate as given
  task automatic step(input bit corr);
    for (int c = 0; c < NC; c++) begin
      prompt[c] = $urandom;
      delay[c]  = $urandom;
      pw[c][t]  = test_mode ? {prompt[c][31:16], test_pin} : prompt[c];
      dw[c][t]  = test_mode ? {delay[c][31:16],  test_din} : delay[c];
    end
    correlate = corr;
    @(posedge clk); #1;
    t++;
  endtask

  // check the dump of an integration over words w0..w1-1
  task automatic check_dump(input int w0, input int w1, input bit hr, input string tag);
    int nl, dl;
    nl = hr ? NC * L : L;
    dl = hr ? DCH : DC;
    for (int c = 0; c < (hr ? 1 : NC); c++) begin
      for (int k = 0; k < nl; k++) begin
        longint ep = 0, en = 0;
        for (int n = w0 * S; n < w1 * S; n++) begin
          ep += v(smp(pw[c], n)) * v(smp(dw[c], n - k));
          en += v(smp(pw[c], n - k - 1)) * v(smp(dw[c], n));
        end
        chk(mem[c][k][31:0] == 32'(ep), $sformatf("%s c%0d +lag %0d got %0d exp %0d", tag, c, k, $signed(mem[c][k][31:0]), ep));
        chk(mem[c][k][63:32] == 32'(en), $sformatf("%s c%0d -lag %0d", tag, c, k + 1));
      end
      for (int j = 0; j < NM; j++)
        chk(mem[c][nl + j] == {dw[c][w0 + j], pw[c][w0 + j]}, $sformatf("%s meta %0d", tag, j));
      for (int q = 0; q < NQ; q++) begin
        int e = 0;
        for (int n = w0 * S; n < w1 * S; n++)
          e += (q < 4) ? int'(smp(pw[c], n) == 2'(q)) : int'(smp(dw[c], n) == 2'(q - 4));
        chk(mem[c][nl + NM + q] == 64'(e), $sformatf("%s qcnt %0d", tag, q));
      end
      for (int i = 0; i < w1 - w0 && dl + i < DEPTH; i++)
        chk(mem[c][dl + i] == {dw[c][w0 + i], pw[c][w0 + i]}, $sformatf("%s sample dump %0d", tag, i));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w0, w1, fall_cyc;
    prompt = '0; delay = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(conf1 == {1'b0, 11'(NM), 12'(L), 4'(NC), 4'd3}, "conf1");
    chk(conf2 == {1'b0, 4'(DAW + 1), 15'(2 * DC), 12'(NQ)}, "conf2");
    // 1: normal integration of 40 words
    repeat (10) step(0);
    w0 = t; repeat (40) step(1); w1 = t;
    fall_cyc = cyc;
    repeat (DC + 4) step(0);
    check_dump(w0, w1, 0, "normal");
    chk(done_cnt == 1 && done_cycle - fall_cyc == DC + 2, $sformatf("dump latency %0d", done_cycle - fall_cyc));
    // 2: test patterns
    test_mode = 1;
    repeat (6) step(0);
    w0 = t; repeat (20) step(1); w1 = t;
    repeat (DC + 4) step(0);
    check_dump(w0, w1, 0, "test");
    test_mode = 0;
    // 3: single-baseline high resolution
    hires = 1;
    repeat (12) step(0);
    w0 = t; repeat (60) step(1); w1 = t;
    fall_cyc = cyc;
    repeat (DCH + 4) step(0);
    check_dump(w0, w1, 1, "hires");
    chk(done_cnt == 3 && done_cycle - fall_cyc == DCH + 2, "hires dump latency");
    hires = 0;
    // 4: correlate rises again during the dump
    repeat (4) step(0);
    repeat (10) step(1);
    repeat (3) step(0);
    repeat (10) step(1);
    repeat (DC + 4) step(0);
    chk(err_cnt == 1, $sformatf("error on early correlate %0d %0d", err_cnt, done_cnt));
    chk(done_cnt == 4, "done after the following integration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
