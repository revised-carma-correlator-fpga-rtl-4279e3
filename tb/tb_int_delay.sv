// tb_int_delay: drives a numbered sample stream and checks that every output
// sample is the input sample dly earlier, for delays from 0 to the maximum,
// with one extra clock of latency.
module tb_int_delay;
  localparam int DW = 16;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [15:0] dly;
  logic [7:0][5:0] din, dout;
  logic [5:0] hist [4096];
  int checks = 0, failures = 0, m = 0;
  int_delay #(.W(6), .DEPTH_WORDS(DW)) dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    dly = 0; din = '0;
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 600; n++) begin
      if (n % 40 == 0) dly = (n == 560) ? 16'(8 * (DW - 1) - 1) : 16'($urandom_range(0, 8 * (DW - 1) - 1));
      for (int s = 0; s < 8; s++) begin din[s] = 6'($urandom); hist[8 * m + s] = din[s]; end
      @(negedge clk);
      if (n % 40 > 20)
        for (int s = 0; s < 8; s++)
          chk(dout[s] == hist[8 * m + s - dly], $sformatf("word %0d sample %0d delay %0d", m, s, dly));
      m++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
