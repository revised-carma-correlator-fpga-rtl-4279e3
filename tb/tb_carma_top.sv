// tb_carma_top: end-to-end test of both cards at 16 lags per stream.
// Correlator card: random 2-bit antenna streams on the four front-panel
// inputs; after each integration the lags of all 16 baselines are read over
// the CPU bus and compared with lags computed here from the antenna streams,
// in both partition geometries (corl_mode(2) = 0 and 1). Also exercised: the
// single-baseline high-resolution mode, the test-pattern modes "01" and "11",
// the error flag for an early correlate, the done flag and active-cycle
// counter, the front-panel unlock flag and the 0xDEADBEEF fill.
// Digitizer card: a delay/phase set (a pure 13-sample delay filter, whole-ns
// delay 5, phase offset 0x2000) is written into M-RAM block 0 of FPGAs #1 and
// #2 and loaded at the end of an integration; the phase-corrected samples at
// the decimator port of FPGA #0 are checked against a model of the scale,
// delay and rotation, the phase appears on the NCO port, the demodulation bit
// negates an integration, the scale stage overflow is flagged, and the
// correlators of the four digitizer FPGAs (AA, AB+, AB-, BB) are checked with
// words injected at the decimator ports. A stand-in NCO computes cos/sin.
// Each mechanism is counted and one that never happened is a failure.
module tb_carma_top;
  import carma_pkg::*;
  localparam int L = 16, NM = 4, NQ = 4, MAXW = 4000;
  localparam int SETTLE = L / 2 + 12;   // words of history needed by the longest lag
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic correlate = 0;
  logic cor_cs = 0, cor_we = 0, dig_cs = 0, dig_we = 0;
  logic [19:0] cor_addr = 0, dig_addr = 0;
  logic [31:0] cor_wdata = 0, dig_wdata = 0, cor_rdata, dig_rdata;
  logic [3:0][31:0] cor_ext;
  logic [3:0] cor_front_locked = '1;
  logic [3:0][3:0] cor_samp_ovf = '0;
  logic [7:0][7:0] dig_raw_a, dig_raw_b;
  logic [1:0] dig_locked = '1;
  logic [3:0][31:0] dig_ext_out;
  logic [1:0][7:0][11:0] dig_rot_re, dig_rot_im;
  logic [1:0][15:0] dig_phase;
  logic [1:0][17:0] dig_cos, dig_sin;
  logic [1:0][31:0] dig_dec;
  logic [1:0] dig_dec_ovf = '0;

  carma_top #(.NUM_LAGS(L)) dut (.*);

  // stand-in NCO: 2^17 * cos / sin of 2*pi*phase/2^16
  always_comb
    for (int i = 0; i < 2; i++) begin
      real ph;
      ph = 6.283185307179586 * real'(dig_phase[i]) / 65536.0;
      dig_cos[i] = 18'($rtoi($floor(131071.0 * $cos(ph) + 0.5)));
      dig_sin[i] = 18'($rtoi($floor(131071.0 * $sin(ph) + 0.5)));
    end

  int checks = 0, failures = 0;
  int n_geom0 = 0, n_geom1 = 0, n_hires = 0, n_test01 = 0, n_test11 = 0, n_err = 0, n_done = 0,
      n_unlock = 0, n_fill = 0, n_reload = 0, n_demod = 0, n_ovf = 0, n_diglags = 0, n_phase = 0;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 400) $display("FAIL %s", s); end
  endtask

  // ---- stimulus recording -----------------------------------------------------
  int t = 0;
  logic [15:0] ant [8][MAXW];          // 16-bit sample word per antenna per clock
  logic [7:0][7:0] rawa_w [MAXW];
  logic [1:0][31:0] dec_w [MAXW];
  logic [7:0][11:0] rot_w [MAXW];
  logic [15:0] pin = 16'h2D87, din = 16'h9C3B;
  bit ext_test = 0;

  always @(negedge clk) begin
    if (!rst) begin
      for (int f = 0; f < 4; f++) begin
        logic [31:0] w;
        w = $urandom;
        cor_ext[f] = w;
        ant[2 * f][t]     = ext_test ? pin : w[15:0];
        ant[2 * f + 1][t] = ext_test ? din : w[31:16];
      end
      for (int s = 0; s < 8; s++) begin dig_raw_a[s] = 8'($urandom_range(0, 80) - 40); dig_raw_b[s] = 8'($urandom); end
      rawa_w[t] = dig_raw_a;
      dig_dec[0] = $urandom; dig_dec[1] = $urandom;
      dec_w[t] = dig_dec;
      t++;
    end
  end
  always @(posedge clk) if (!rst && t > 0) rot_w[t - 1] = dig_rot_re[0];

  // ---- CPU access --------------------------------------------------------------
  task automatic cwr(input bit dig, input int f, input int a, input logic [31:0] d);
    @(negedge clk);
    if (dig) begin dig_cs = 1; dig_we = 1; dig_addr = {3'(f), 17'(a)}; dig_wdata = d; end
    else     begin cor_cs = 1; cor_we = 1; cor_addr = {3'(f), 17'(a)}; cor_wdata = d; end
    @(negedge clk);
    dig_cs = 0; cor_cs = 0;
  endtask
  task automatic crd(input bit dig, input int f, input int a, output logic [31:0] d);
    @(negedge clk);
    if (dig) begin dig_cs = 1; dig_we = 0; dig_addr = {3'(f), 17'(a)}; end
    else     begin cor_cs = 1; cor_we = 0; cor_addr = {3'(f), 17'(a)}; end
    @(negedge clk);
    dig_cs = 0; cor_cs = 0;
    d = dig ? dig_rdata : cor_rdata;
  endtask

  // ---- reference lags ------------------------------------------------------------
  function automatic int v(input logic [15:0] w, input int s); return 2 * int'(w[2 * s +: 2]) - 3; endfunction
  // +lag k (neg=0) or -lag k (neg=1) of streams p, d over words w0..w1-1
  function automatic int lagref(input int p, input int d, input int w0, input int w1, input int k, input bit neg,
                                input bit auto_dec, input int dp, input int dd);
    int acc = 0;
    for (int n = 8 * w0; n < 8 * w1; n++) begin
      int np, nd;
      np = neg ? n - k : n;
      nd = neg ? n : n - k;
      if (auto_dec) acc += v(dec_w[np / 8][dp][15:0], np % 8) * v(dec_w[nd / 8][dd][15:0], nd % 8);
      else          acc += v(ant[p][np / 8], np % 8) * v(ant[d][nd / 8], nd % 8);
    end
    return acc;
  endfunction

  // integrate for n words; returns the first and last+1 word index seen at the inputs
  task automatic integrate(input int n, output int w0, output int w1);
    @(negedge clk); #1;
    correlate = 1; w0 = t - 1;
    repeat (n) @(negedge clk);
    #1 correlate = 0; w1 = t - 1;
    repeat (4 * L + NM + NQ + 10) @(negedge clk);
  endtask

  // baseline antenna pairs of the correlator card
  function automatic void pairs(input int f, input int c, input bit geom, output int p, output int d);
    int A = 0, B = 1, C = 2, D = 3, E = 4, F = 5, G = 6, H = 7;
    int I, J, K, LL, M;
    I = geom ? E : C; J = geom ? F : D; K = geom ? A : E; LL = geom ? B : F; M = geom ? C : D;
    case (f)
      0: begin p = (c % 2) ? B : A; d = (c < 2) ? I : J; end
      1: begin p = (c == 0) ? K : (c == 1) ? LL : (c == 2) ? E : F; d = (c < 2) ? C : M; end
      2: begin p = (c % 2) ? B : A; d = (c < 2) ? G : H; end
      default: begin p = (c % 2) ? F : E; d = (c < 2) ? G : H; end
    endcase
  endfunction

  // rotated samples of FPGA #0 over the last 60 words against the model
  function automatic bit path_ok(input int lat, input int sgn);
    real c;
    c = real'($rtoi($floor(131071.0 * $cos(0.7853981633974483) + 0.5))) / 131072.0;
    for (int w = t - 60; w < t - 1; w++)
      for (int s = 0; s < 8; s++) begin
        int n, x6, re_e;
        real rr;
        n = 8 * (w - lat) + s - 18;
        x6 = ($signed(rawa_w[n / 8][n % 8]) * 256 + 512) >>> 10;
        rr = (s % 4 == 0) ? x6 * c : (s % 4 == 1) ? -x6 * c : (s % 4 == 2) ? -x6 * c : x6 * c;
        re_e = $rtoi($floor(sgn * rr * 16.0 + 0.5));
        if ($signed(rot_w[w][s]) != re_e && $signed(rot_w[w][s]) != re_e - 1) return 0;
      end
    return 1;
  endfunction

  task automatic check_cor(input int w0, input int w1, input bit geom, input string tag);
    for (int f = 0; f < 4; f++) begin
      int lat;
      lat = (f == 0 || f == 2) ? 4 : 2;
      for (int c = 0; c < 4; c++) begin
        int p, d;
        pairs(f, c, geom, p, d);
        for (int k = 0; k < L; k += 5) begin
          logic [31:0] gp, gn;
          crd(0, f, (c + 1) * 32'h4000 + 2 * k, gp);
          crd(0, f, (c + 1) * 32'h4000 + 2 * k + 1, gn);
          chk(gp == 32'(lagref(p, d, w0 - lat, w1 - lat, k, 0, 0, 0, 0)), $sformatf("%s fpga%0d bl%0d +lag %0d got %0d exp %0d", tag, f, c, k, $signed(gp), lagref(p, d, w0 - lat, w1 - lat, k, 0, 0, 0, 0)));
          if (failures == 1) for (int o = -8; o < 8; o++) $display("  off %0d: %0d", o, lagref(p, d, w0 - lat + o, w1 - lat + o, k, 0, 0, 0, 0));
          chk(gn == 32'(lagref(p, d, w0 - lat, w1 - lat, k + 1, 1, 0, 0, 0)), $sformatf("%s fpga%0d bl%0d -lag %0d", tag, f, c, k + 1));
        end
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w0, w1;
    logic [31:0] d;
    cor_ext = '0; dig_raw_a = '0; dig_raw_b = '0; dig_dec = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++) begin
      cwr(0, f, CTRL_REG_OUT_ENABLE, 32'h3FF);
      cwr(1, f, CTRL_REG_OUT_ENABLE, 32'h3FF);
    end
    // ---- correlator card, geometry 0 ----
    repeat (SETTLE) @(negedge clk);
    integrate(40, w0, w1);
    check_cor(w0, w1, 0, "geom0"); n_geom0++;
    crd(0, 0, CTRL_REG_STATUS, d);
    chk(d[0] == 1 && d[30:8] == 40, $sformatf("status done/count %h", d));
    if (d[0]) n_done++;
    crd(0, 2, CTRL_REG_CORL_CONF1, d);
    chk(d == {1'b0, 11'(NM), 12'(L), 4'd4, 4'd3}, "conf1 register");
    crd(0, 1, CTRL_REG_VERSION, d);
    chk(d[23:16] == 8'hCD, "version type/revision");
    // ---- geometry 1 ----
    for (int f = 0; f < 4; f++) cwr(0, f, CTRL_REG_CORL_MODE, 32'h4);
    repeat (SETTLE) @(negedge clk);
    integrate(40, w0, w1);
    check_cor(w0, w1, 1, "geom1"); n_geom1++;
    // ---- high resolution on FPGA #3: one baseline (E x G), 64 lags ----
    cwr(0, 3, CTRL_REG_CORL_MODE, 32'h8);
    repeat (SETTLE) @(negedge clk);
    integrate(40, w0, w1);
    for (int k = 0; k < 4 * L; k += 7) begin
      logic [31:0] gp, gn;
      crd(0, 3, 32'h4000 + 2 * k, gp);
      crd(0, 3, 32'h4000 + 2 * k + 1, gn);
      chk(gp == 32'(lagref(4, 6, w0 - 2, w1 - 2, k, 0, 0, 0, 0)), $sformatf("hires +lag %0d", k));
      chk(gn == 32'(lagref(4, 6, w0 - 2, w1 - 2, k + 1, 1, 0, 0, 0)), $sformatf("hires -lag %0d", k + 1));
    end
    n_hires++;
    // ---- test patterns at the correlator inputs (mode 01) on FPGA #2 ----
    cwr(0, 2, CTRL_REG_TEST_PIN, 32'(pin)); cwr(0, 2, CTRL_REG_TEST_DIN, 32'(din));
    cwr(0, 2, CTRL_REG_CORL_MODE, 32'h1);
    repeat (SETTLE) @(negedge clk);
    integrate(30, w0, w1);
    begin
      int e;
      logic [31:0] gp;
      e = 0;
      for (int n = 0; n < 8 * 30; n++) e += v(pin, n % 8) * v(din, (n - 3 + 8) % 8);
      crd(0, 2, 32'h8000 + 6, gp);
      chk(gp == 32'(e), "test pattern lags");
      n_test01++;
    end
    cwr(0, 2, CTRL_REG_CORL_MODE, 32'h0);
    // ---- test patterns replace the front-panel word (mode 11) on all FPGAs ----
    for (int f = 0; f < 4; f++) begin
      cwr(0, f, CTRL_REG_TEST_PIN, 32'(pin)); cwr(0, f, CTRL_REG_TEST_DIN, 32'(din));
      cwr(0, f, CTRL_REG_CORL_MODE, 32'h3);
    end
    ext_test = 1;
    repeat (SETTLE) @(negedge clk);
    integrate(30, w0, w1);
    check_cor(w0, w1, 0, "ext test"); n_test11++;
    ext_test = 0;
    for (int f = 0; f < 4; f++) cwr(0, f, CTRL_REG_CORL_MODE, 32'h0);
    // ---- early correlate during a dump, unlock, clear ----
    cwr(0, 1, CTRL_REG_STATUS, 0);
    @(negedge clk); correlate = 1; cor_front_locked[1] = 0;
    repeat (12) @(negedge clk);
    cor_front_locked[1] = 1; correlate = 0;
    repeat (5) @(negedge clk);
    correlate = 1; repeat (10) @(negedge clk); correlate = 0;
    repeat (4 * L + 20) @(negedge clk);
    crd(0, 1, CTRL_REG_STATUS, d);
    chk(d[1] == 1, "error flag"); if (d[1]) n_err++;
    chk(d[3] == 1, "front unlock flag"); if (d[3]) n_unlock++;
    cwr(0, 1, CTRL_REG_STATUS, 0);
    crd(0, 1, CTRL_REG_STATUS, d);
    chk(d == 0, "status clear");
    crd(0, 0, 32'h1C000, d);
    chk(d == 32'hDEADBEEF, "fill word for missing block"); if (d == 32'hDEADBEEF) n_fill++;
    crd(0, 5, 32'h00000, d);
    chk(d == 32'hDEADBEEF, "fill word for controller select");

    // ---- digitizer card: delay/phase tables (the same set in all 48 slots, as
    // the reload pointer has moved with every integration so far) ----
    for (int f = 1; f <= 2; f++) for (int st = 0; st < DT_SETS; st++) begin
      // single tap c_13 = 4096: sub-filter k = 5, j = 1 -> half 0, tap l = 1
      for (int q = 0; q < 166; q++) begin
        logic [63:0] w;
        w = '0;
        for (int e = 0; e < 3; e++) begin
          int vv, k, r, m, h;
          vv = 3 * q + e;
          if (vv < 496) begin
            k = vv / 62; r = vv % 62; m = r / 2 + 1; h = r % 2;
            if (k == 5 && h == 0 && m[1]) w[18 * e +: 18] = 18'd4096;
          end
        end
        cwr(1, f, 32'h80 + 334 * st + 2 * q, w[31:0]);
        cwr(1, f, 32'h80 + 334 * st + 2 * q + 1, w[63:32]);
      end
      cwr(1, f, 32'h80 + 334 * st + 332, 32'd5);
      cwr(1, f, 32'h80 + 334 * st + 333, 32'h2000);
    end
    for (int f = 1; f <= 2; f++) begin
      cwr(1, f, CTRL_REG_SAMP_GAIN, 32'd256);
      cwr(1, f, CTRL_REG_SAMP_OFFSET, 32'd0);
    end
    integrate(20, w0, w1);                  // reload at its end
    repeat (200) @(negedge clk);
    chk(dig_phase[0] == 16'h2000, "phase on the E bus"); if (dig_phase[0] == 16'h2000) begin n_reload++; n_phase++; end
    // model: scale to 6 bits (x/4 rounded), delay 5 + 13 samples, rotate by
    // phi = pi/4; the pipeline latency (whole words) is found once and must hold
    begin
      int lat_found;
      lat_found = -1;
      for (int lat = 0; lat < 12 && lat_found < 0; lat++) if (path_ok(lat, 1)) lat_found = lat;
      chk(lat_found >= 0, "digitizer delay/phase path");
      $display("digitizer path latency %0d words", lat_found);
      // demodulation: with every DEMOD bit set the corrected samples are negated
      cwr(1, 0, CTRL_REG_DEMOD, 32'hFFFF);
      repeat (70) @(negedge clk);
      chk(path_ok(lat_found, -1), "demodulation negates the samples");
      if (path_ok(lat_found, -1)) n_demod++;
      cwr(1, 0, CTRL_REG_DEMOD, 32'h0);
      repeat (70) @(negedge clk);
      chk(path_ok(lat_found, 1), "demodulation off again");
    end
    // ---- digitizer correlators with words injected at the decimator ports ----
    integrate(30, w0, w1);
    begin
      logic [31:0] g;
      for (int k = 0; k < L; k += 3) begin
        crd(1, 0, 32'h4000 + 2 * k, g);
        chk(g == 32'(lagref(0, 0, w0 - 6, w1 - 6, k, 0, 1, 0, 0)), $sformatf("AA lag %0d", k));
        crd(1, 3, 32'h4000 + 2 * k, g);
        chk(g == 32'(lagref(0, 0, w0 - 6, w1 - 6, k, 0, 1, 1, 1)), $sformatf("BB lag %0d", k));
        crd(1, 1, 32'h4000 + 2 * k, g);
        chk(g == 32'(lagref(0, 0, w0 - 6, w1 - 6, k, 0, 1, 0, 1)), $sformatf("AB+ lag %0d", k));
        crd(1, 2, 32'h4000 + 2 * k + 1, g);
        chk(g == 32'(lagref(0, 0, w0 - 6, w1 - 6, k + 1, 1, 1, 0, 1)), $sformatf("AB- lag -%0d", k + 1));
      end
      n_diglags++;
      chk(dig_ext_out[1] == {dec_w[t - 7][1][15:0], dec_w[t - 7][0][15:0]} ||
          dig_ext_out[1] == {dec_w[t - 6][1][15:0], dec_w[t - 6][0][15:0]}, "front-panel output AB");
    end
    // ---- scale overflow flag ----
    cwr(1, 1, CTRL_REG_STATUS, 0);
    cwr(1, 1, CTRL_REG_SAMP_GAIN, 32'd2000);
    @(negedge clk); correlate = 1; repeat (20) @(negedge clk); correlate = 0;
    repeat (4 * L + 20) @(negedge clk);
    crd(1, 1, CTRL_REG_STATUS, d);
    chk(d[4] == 1, "overflow flag"); if (d[4]) n_ovf++;

    // ---- mechanism coverage ----
    chk(n_geom0 > 0 && n_geom1 > 0, "both partition geometries");
    chk(n_hires > 0, "high-resolution mode");
    chk(n_test01 > 0 && n_test11 > 0, "test pattern modes");
    chk(n_err > 0 && n_done > 0, "error and done");
    chk(n_unlock > 0 && n_fill > 0, "unlock and fill");
    chk(n_reload > 0 && n_phase > 0 && n_demod > 0 && n_ovf > 0 && n_diglags > 0, "digitizer mechanisms");
    $display("mechanisms: geom0=%0d geom1=%0d hires=%0d test01=%0d test11=%0d err=%0d done=%0d unlock=%0d fill=%0d reload=%0d demod=%0d ovf=%0d diglags=%0d",
             n_geom0, n_geom1, n_hires, n_test01, n_test11, n_err, n_done, n_unlock, n_fill, n_reload, n_demod, n_ovf, n_diglags);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
