// tb_mram: checks the mixed-width dual-port M-RAM: 64-bit writes read back
// as two little-endian 32-bit words, 32-bit writes read back in the right half
// of a 64-bit word, one-clock read latency, port A priority on collisions.
module tb_mram;
  localparam int D = 64;
  logic clk = 0;
  always #4 clk = ~clk;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [6:0] a_addr = '0;
  logic [5:0] b_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata;
  logic [63:0] b_wdata = '0, b_rdata;
  logic [63:0] model [D];
  int checks = 0, failures = 0;
  mram #(.DEPTH64(D)) dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      b_en = 1; b_we = 1; b_addr = 6'(i); b_wdata = {$urandom, $urandom}; model[i] = b_wdata;
      @(negedge clk);
    end
    b_en = 0; b_we = 0;
    for (int i = 0; i < 2 * D; i++) begin
      a_en = 1; a_addr = 7'(i);
      @(negedge clk);
      chk(a_rdata == (i % 2 ? model[i/2][63:32] : model[i/2][31:0]), $sformatf("32-bit read %0d", i));
    end
    for (int i = 0; i < 40; i++) begin
      a_en = 1; a_we = 1; a_addr = 7'($urandom); a_wdata = $urandom;
      if (a_addr[0]) model[a_addr[6:1]][63:32] = a_wdata; else model[a_addr[6:1]][31:0] = a_wdata;
      @(negedge clk);
    end
    a_we = 0; a_en = 0;
    for (int i = 0; i < D; i++) begin
      b_en = 1; b_addr = 6'(i);
      @(negedge clk);
      chk(b_rdata == model[i], $sformatf("64-bit read %0d", i));
    end
    // collision: both ports write word 0 low half; port A wins
    a_en = 1; a_we = 1; a_addr = 0; a_wdata = 32'h12345678;
    b_en = 1; b_we = 1; b_addr = 0; b_wdata = 64'hAAAAAAAA_BBBBBBBB;
    @(negedge clk);
    a_we = 0; b_we = 0;
    @(negedge clk);
    chk(b_rdata == 64'hAAAAAAAA_12345678, "collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
