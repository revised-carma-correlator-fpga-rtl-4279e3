// tb_sysctrl: checks the chip-select decode: each data FPGA sees only its own
// accesses with the 17-bit local address, read data comes back from the
// selected FPGA one clock later, and other chip selects read 0xDEADBEEF.
module tb_sysctrl;
  import carma_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic cs = 0, we = 0;
  logic [19:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  cpu_req_t [3:0] fpga_req;
  logic [3:0][31:0] fpga_rdata;
  int checks = 0, failures = 0;
  sysctrl dut (.*);
  // each FPGA answers with {its number, the address of its last read}
  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++) if (fpga_req[i].cs && !fpga_req[i].we) fpga_rdata[i] <= {15'(i), fpga_req[i].addr};
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 40; n++) begin
      addr = 20'($urandom); cs = 1; we = 1'($urandom);
      #1;
      for (int i = 0; i < 4; i++)
        chk(fpga_req[i].cs == (addr[19:17] == 3'(i)) && fpga_req[i].addr == addr[16:0] && fpga_req[i].we == we, "decode");
      @(negedge clk);
      if (!we) chk(rdata == (addr[19:17] < 4 ? {15'(addr[19:17]), addr[16:0]} : 32'hDEADBEEF), "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
