// tb_frac_delay: loads random 15-bit taps into the sub-ns delay filter as
// coded distributed-arithmetic tables (s_m = sum of the taps selected by the
// bits of m, for each 5-tap half of each polyphase sub-filter), then checks
// every output sample against a direct 80-tap FIR y[n] = sum c_t x[n-t],
// rounded by 2^12 and saturated to 8 bits, with two clocks of latency (one per register). A
// second tap set checks that 'swap' switches tables between two clocks.
module tb_frac_delay;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [7:0][5:0] din;
  logic [7:0][7:0] dout;
  logic ovf, swap;
  logic [2:0] ld_en;
  logic [2:0][3:0] ld_stream;
  logic [2:0][4:0] ld_index;
  logic [2:0][17:0] ld_value;
  int checks = 0, failures = 0;
  int c [80];
  logic [5:0] x [8192];
  int m = 0;
  frac_delay dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  task automatic load_taps(input int amp);
    for (int t = 0; t < 80; t++) c[t] = $urandom_range(0, 2 * amp) - amp;
    for (int st = 0; st < 16; st++) begin
      int k, h;
      k = st / 2; h = st % 2;
      for (int mm = 1; mm < 32; mm++) begin
        int sum;
        sum = 0;
        for (int l = 0; l < 5; l++) if (mm[l]) sum += c[8 * (5 * h + l) + k];
        ld_en = 3'b001; ld_stream[0] = 4'(st); ld_index[0] = 5'(mm); ld_value[0] = 18'(sum);
        @(negedge clk);
      end
    end
    ld_en = 0;
  endtask
  function automatic int expect_y(input int n);
    longint y;
    int r;
    y = 0;
    for (int t = 0; t < 80; t++) if (n - t >= 0) y += c[t] * $signed(x[n - t]);
    r = int'((y + 2048) >>> 12);
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    ld_en = 0; swap = 0; din = '0; ld_stream = '0; ld_index = '0; ld_value = '0;
    repeat (2) @(negedge clk); rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      load_taps(pass == 0 ? 3000 : 16383);
      swap = 1; @(negedge clk); swap = 0;
      m = 0;
      for (int n = 0; n < 120; n++) begin
        for (int s = 0; s < 8; s++) begin din[s] = 6'($urandom); x[8 * n + s] = din[s]; end
        @(negedge clk);
        // word n is now in the sum register; dout holds word n-1
        if (n >= 14)
          for (int s = 0; s < 8; s++)
            chk($signed(dout[s]) == expect_y(8 * (n - 1) + s), $sformatf("pass %0d word %0d y%0d got %0d exp %0d", pass, n - 1, s, $signed(dout[s]), expect_y(8 * (n - 1) + s)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
