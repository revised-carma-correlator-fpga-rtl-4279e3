// cor_board: a correlator card. Four cor_fpga data FPGAs (#0-#3) compute 16
// baselines between the eight antennas of the four front-panel inputs
// (AB, CD, EF, GH); the system controller's decode gives the board CPU one
// 20-bit address space with a 3-bit chip select per FPGA. Bus 2x of FPGA k
// (x = a..e) is wired to bus 1x of FPGA k+1 in both directions; a bus reads
// zero when its driver's output enable is clear. The outer buses (1x of #0,
// 2x of #3) are unconnected. 'correlate' is the common integration signal.
// The card-level wiring follows the correlator pipeline drawing.
module cor_board
  import carma_pkg::*;
#(
  parameter int unsigned NUM_LAGS = 256,
  parameter int unsigned NUM_META = 4,
  parameter int unsigned NUM_QCNT = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      cpu_cs,
  input  logic                      cpu_we,
  input  logic [SYS_ADDR_WIDTH-1:0] cpu_addr,
  input  logic [31:0]               cpu_wdata,
  output logic [31:0]               cpu_rdata,
  input  logic                      correlate,
  input  logic [3:0][31:0]          ext,
  input  logic [3:0]                front_locked,
  input  logic [3:0][3:0]           samp_ovf
);
  cpu_req_t [3:0]                   req;
  logic [3:0][31:0]                 rdata;
  logic [3:0][NUM_BUSES-1:0][31:0]  bin, bout;
  logic [3:0][NUM_BUSES-1:0]        boe;

  sysctrl #(.NUM_FPGA(4)) u_ctrl (
    .clk, .rst, .cs(cpu_cs), .we(cpu_we), .addr(cpu_addr), .wdata(cpu_wdata),
    .rdata(cpu_rdata), .fpga_req(req), .fpga_rdata(rdata));

  always_comb begin
    bin = '0;
    for (int k = 0; k < 4; k++) begin
      for (int x = 0; x < 5; x++) begin
        if (k < 3) bin[k][BUS_2A + x]   = boe[k+1][BUS_1A + x] ? bout[k+1][BUS_1A + x] : 32'h0;
        if (k > 0) bin[k][BUS_1A + x]   = boe[k-1][BUS_2A + x] ? bout[k-1][BUS_2A + x] : 32'h0;
      end
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_fpga
    cor_fpga #(.FPGA_NUM(k), .NUM_LAGS(NUM_LAGS), .NUM_META(NUM_META), .NUM_QCNT(NUM_QCNT)) u_fpga (
      .clk, .rst, .cpu_req(req[k]), .cpu_rdata(rdata[k]), .correlate, .ext(ext[k]),
      .front_locked(front_locked[k]), .samp_ovf(samp_ovf[k]),
      .bus_in(bin[k]), .bus_out(bout[k]), .bus_oe(boe[k]));
  end
endmodule
