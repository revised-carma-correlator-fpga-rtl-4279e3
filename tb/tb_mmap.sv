// tb_mmap: checks the memory map: read-only registers, read/write registers
// and their write strobes, the status register, M-RAM access from the CPU
// beyond the register window, the shadowing of block 0 by the registers, the
// 64-bit internal ports (little-endian against the 32-bit CPU view) and the
// 0xDEADBEEF fill for blocks that have no RAM.
module tb_mmap;
  import carma_pkg::*;
  localparam int NB = 2;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  cpu_req_t cpu_req;
  logic [31:0] cpu_rdata, status_in;
  logic [NUM_RO_REGS-1:0][31:0] ro_regs;
  ctrl_regs_t regs;
  logic [NUM_CTRL_REGS-1:0] wr_stb;
  ram64_req_t [NB-1:0] ram_req;
  logic [NB-1:0][63:0] ram_rdata;
  int checks = 0, failures = 0, stb_seen = 0;
  mmap #(.NUM_BLOCKS(NB)) dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input logic [16:0] a, input logic [31:0] d);
    cpu_req = '{cs: 1, we: 1, addr: a, wdata: d}; @(negedge clk); cpu_req = '0;
  endtask
  task automatic rd(input logic [16:0] a, output logic [31:0] d);
    cpu_req = '{cs: 1, we: 0, addr: a, wdata: 0}; @(negedge clk); cpu_req = '0; d = cpu_rdata;
  endtask
  always @(posedge clk) if (!rst && wr_stb[CTRL_REG_CORL_MODE]) stb_seen++;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [31:0] d;
    cpu_req = '0; ram_req = '0; status_in = 32'h0000_1235;
    for (int i = 0; i < NUM_RO_REGS; i++) ro_regs[i] = 32'hC0DE_0000 + i;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < NUM_RO_REGS; i++) begin rd(17'(i), d); chk(d == 32'hC0DE_0000 + i, "ro reg"); end
    wr(17'h02, 32'h5555); rd(17'h02, d); chk(d == 32'hC0DE_0002, "ro reg ignores writes");
    wr(17'(CTRL_REG_CORL_MODE), 32'h1C); rd(17'(CTRL_REG_CORL_MODE), d);
    chk(d == 32'h1C && regs[CTRL_REG_CORL_MODE] == 32'h1C, "rw reg");
    chk(stb_seen == 1, "write strobe");
    rd(17'(CTRL_REG_STATUS), d); chk(d == 32'h1235, "status");
    wr(17'h1F, 32'hFEED); rd(17'h1F, d); chk(d == 32'hFEED, "last reg");
    // block 0 above the registers and block 1
    wr(17'h20, 32'hA0A0); wr(17'h21, 32'hB1B1); wr(17'h04001, 32'h77); wr(17'h04000, 32'h66);
    rd(17'h20, d); chk(d == 32'hA0A0, "block 0 ram");
    rd(17'h04001, d); chk(d == 32'h77, "block 1 ram");
    // 64-bit port view
    ram_req[0] = '{en: 1, we: 0, addr: 13'h10, wdata: 0}; @(negedge clk);
    chk(ram_rdata[0] == 64'h0000B1B1_0000A0A0, "64-bit read of CPU words");
    ram_req[1] = '{en: 1, we: 1, addr: 13'h5, wdata: 64'h01234567_89ABCDEF}; @(negedge clk); ram_req = '0;
    rd(17'h0400A, d); chk(d == 32'h89ABCDEF, "little-endian LSBs at 2A");
    rd(17'h0400B, d); chk(d == 32'h01234567, "little-endian MSBs at 2A+1");
    // register window shadows block 0: the RAM beneath is not written by the CPU
    ram_req[0] = '{en: 1, we: 1, addr: 13'h0, wdata: 64'h0}; @(negedge clk); ram_req = '0;
    wr(17'h10, 32'hCAFE);
    ram_req[0] = '{en: 1, we: 0, addr: 13'h8, wdata: 0}; @(negedge clk); ram_req = '0;
    rd(17'h10, d); chk(d == 32'hCAFE, "register value");
    for (int b = NB; b < 8; b++) begin rd(17'(b * 32'h4000 + 5), d); chk(d == 32'hDEADBEEF, "fill word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
