// tb_samp_scale: compares the gain/offset stage with x' = (GAIN*x+OFFSET)/256
// rounded to 6 bits (computed here in real arithmetic), including the
// example GAIN = 282, OFFSET = 768 (x' = 1.10x + 3) and saturating gains.
module tb_samp_scale;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [15:0] gain, offset;
  logic [7:0][7:0] din;
  logic [7:0][5:0] dout;
  logic ovf;
  int checks = 0, failures = 0, sat = 0;
  samp_scale dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 300; n++) begin
      logic [7:0][7:0] x;
      bit any;
      if (n < 100) begin gain = 16'd282; offset = 16'd768; end
      else begin gain = 16'($urandom_range(0, 700)); offset = 16'($signed(16'($urandom_range(0, 4000))) - 16'sd2000); end
      for (int s = 0; s < 8; s++) x[s] = 8'($urandom);
      din = x;
      @(negedge clk);
      any = 0;
      for (int s = 0; s < 8; s++) begin
        real y; int e;
        y = (real'($signed(gain)) * real'($signed(x[s])) + real'($signed(offset))) / 256.0 / 4.0;
        e = $floor(y + 0.5);
        if (e > 31) begin e = 31; any = 1; end
        if (e < -32) begin e = -32; any = 1; end
        chk($signed(dout[s]) == e, $sformatf("x=%0d g=%0d o=%0d got %0d exp %0d", $signed(x[s]), gain, $signed(offset), $signed(dout[s]), e));
      end
      chk(ovf == any, "overflow flag");
      if (any) sat++;
    end
    chk(sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
