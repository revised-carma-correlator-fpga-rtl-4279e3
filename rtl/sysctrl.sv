// sysctrl: the CPU-side address decode of a card's system controller FPGA.
// The board CPU addresses SYS_ADDR_WIDTH = 20 bits of 32-bit words; the three
// MSBs are the chip select and the low 17 bits the local address inside the
// selected FPGA's memory map. Chip selects 0..NUM_FPGA-1 reach the data
// FPGAs; any other chip select (the controller itself and unused selects)
// reads back 0xDEADBEEF and ignores writes. The request is forwarded in the
// same cycle, and the read data of the selected FPGA (valid one clock after
// the read) is returned through a registered select, so reads keep their
// one-clock latency. The address split follows the memory-map description;
// the handling of non-data chip selects is this design's choice.
module sysctrl
  import carma_pkg::*;
#(
  parameter int unsigned NUM_FPGA = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          cs,
  input  logic                          we,
  input  logic [SYS_ADDR_WIDTH-1:0]     addr,
  input  logic [31:0]                   wdata,
  output logic [31:0]                   rdata,
  output cpu_req_t [NUM_FPGA-1:0]       fpga_req,
  input  logic [NUM_FPGA-1:0][31:0]     fpga_rdata
);
  logic [2:0] sel, sel_q;
  assign sel = addr[SYS_ADDR_WIDTH-1 -: 3];

  always_comb begin
    for (int i = 0; i < NUM_FPGA; i++) begin
      fpga_req[i].cs    = cs && (sel == 3'(i));
      fpga_req[i].we    = we;
      fpga_req[i].addr  = addr[16:0];
      fpga_req[i].wdata = wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)             sel_q <= '1;
    else if (cs && !we)  sel_q <= sel;
  end

  always_comb begin
    rdata = MMAP_FILL;
    for (int i = 0; i < NUM_FPGA; i++)
      if (sel_q == 3'(i)) rdata = fpga_rdata[i];
  end
endmodule
