// tb_delay_reload: builds delay/phase sets in a RAM model exactly as the
// table format lays them out (coded taps s_m^{k,h} in the order
// s_1^{k,0}, s_1^{k,1}, s_2^{k,0}, ... packed three per quadword from the LSBs,
// then {phase, whole-ns delay} in quadword 166), triggers reloads and checks
// every tap written to the filter port, the delay and phase published with
// 'swap', the reload time and the advance to the next set of the circular
// buffer (including the wrap from set 47 to set 0).
module tb_delay_reload;
  import carma_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic reload = 0;
  ram64_req_t ram_req;
  logic [63:0] ram_rdata;
  logic [2:0] ld_en;
  logic [2:0][3:0] ld_stream;
  logic [2:0][4:0] ld_index;
  logic [2:0][17:0] ld_value;
  logic swap, busy;
  logic [15:0] delay_ns, phase;
  logic [5:0] set_idx;
  logic [63:0] mem [8192];
  logic [17:0] s [48][16][32];   // per set, stream 2k+h, index m
  logic [17:0] got [16][32];
  int checks = 0, failures = 0, nld = 0;
  delay_reload dut (.*);
  always_ff @(posedge clk) if (ram_req.en) ram_rdata <= mem[ram_req.addr];
  always @(posedge clk)
    for (int n = 0; n < 3; n++) if (ld_en[n]) begin got[ld_stream[n]][ld_index[n]] = ld_value[n]; nld++; end
  task automatic chk(input bit ok, input string str);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", str); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 8192; i++) mem[i] = '0;
    for (int st = 0; st < 48; st++) begin
      logic [17:0] vals [496];
      int v;
      v = 0;
      for (int k = 0; k < 8; k++)
        for (int m = 1; m < 32; m++)
          for (int h = 0; h < 2; h++) begin
            s[st][2 * k + h][m] = 18'($urandom);
            vals[v++] = s[st][2 * k + h][m];
          end
      for (int q = 0; q < 166; q++) begin
        logic [63:0] w;
        w = '0;
        for (int e = 0; e < 3; e++) if (3 * q + e < 496) w[18 * e +: 18] = vals[3 * q + e];
        mem[32'h40 + 167 * st + q] = w;
      end
      mem[32'h40 + 167 * st + 166] = {16'h0, 16'(st * 1000 + 7), 16'h0, 16'(st + 3)};
    end
    repeat (2) @(negedge clk); rst = 0;
    for (int r = 0; r < 50; r++) begin
      int cyc, exp_set;
      exp_set = r % 48;
      nld = 0;
      reload = 1; @(negedge clk); reload = 0;
      cyc = 1;
      while (!swap && cyc < 400) begin @(negedge clk); cyc++; end
      chk(cyc == 169, $sformatf("reload time %0d", cyc));
      chk(delay_ns == 16'(exp_set + 3) && phase == 16'(exp_set * 1000 + 7), "delay and phase");
      chk(nld == 496, $sformatf("tap writes %0d", nld));
      if (r < 3 || r >= 47)
        for (int st = 0; st < 16; st++)
          for (int m = 1; m < 32; m++)
            chk(got[st][m] == s[exp_set][st][m], $sformatf("set %0d stream %0d m %0d", exp_set, st, m));
      @(negedge clk);
      chk(!busy && set_idx == 6'((r + 1) % 48), "next set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
