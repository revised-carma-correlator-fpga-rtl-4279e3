// dig_board: a digitizer card for one antenna pair (A, B). Four dig_fpga
// data FPGAs are chained by buses 1x/2x as on the correlator card (bus 2x of
// FPGA k to bus 1x of FPGA k+1, zero when not driven), with the system
// controller's chip-select decode in front of their memory maps. Antenna A
// enters FPGA #1 and antenna B FPGA #2 (raw_a, raw_b: eight 8-bit samples
// per clock after the LVDS deserializer). The decimators of FPGAs #0 (A) and
// #3 (B) and their NCOs are outside: rot_* / phase_* go to them, dec_* and
// cos/sin come back. Each FPGA drives a front-panel word ext_out = {B, A}.
// The card-level wiring follows the digitizer pipeline drawing.
module dig_board
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
  input  logic [7:0][7:0]           raw_a,
  input  logic [7:0][7:0]           raw_b,
  input  logic [1:0]                dig_locked,   // [0] = A (FPGA #1), [1] = B (FPGA #2)
  output logic [3:0][31:0]          ext_out,
  // decimator / NCO side of FPGA #0 (index 0, antenna A) and #3 (index 1, antenna B)
  output logic [1:0][7:0][11:0]     rot_re,
  output logic [1:0][7:0][11:0]     rot_im,
  output logic [1:0][15:0]          phase_out,
  input  logic [1:0][17:0]          cos_phi,
  input  logic [1:0][17:0]          sin_phi,
  input  logic [1:0][31:0]          dec_in,
  input  logic [1:0]                dec_ovf
);
  cpu_req_t [3:0]                   req;
  logic [3:0][31:0]                 rdata;
  logic [3:0][NUM_BUSES-1:0][31:0]  bin, bout;
  logic [3:0][NUM_BUSES-1:0]        boe;
  logic [3:0][7:0][11:0]            re_w, im_w;
  logic [3:0][15:0]                 ph_w;

  sysctrl #(.NUM_FPGA(4)) u_ctrl (
    .clk, .rst, .cs(cpu_cs), .we(cpu_we), .addr(cpu_addr), .wdata(cpu_wdata),
    .rdata(cpu_rdata), .fpga_req(req), .fpga_rdata(rdata));

  always_comb begin
    bin = '0;
    for (int k = 0; k < 4; k++) begin
      for (int x = 0; x < 5; x++) begin
        if (k < 3) bin[k][BUS_2A + x] = boe[k+1][BUS_1A + x] ? bout[k+1][BUS_1A + x] : 32'h0;
        if (k > 0) bin[k][BUS_1A + x] = boe[k-1][BUS_2A + x] ? bout[k-1][BUS_2A + x] : 32'h0;
      end
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_fpga
    localparam int unsigned SIDE = (k == 3 || k == 2) ? 1 : 0;
    dig_fpga #(.FPGA_NUM(k), .NUM_LAGS(NUM_LAGS), .NUM_META(NUM_META), .NUM_QCNT(NUM_QCNT)) u_fpga (
      .clk, .rst, .cpu_req(req[k]), .cpu_rdata(rdata[k]), .correlate,
      .dig_in(k == 2 ? raw_b : raw_a), .dig_locked(k == 2 ? dig_locked[1] : (k == 1 ? dig_locked[0] : 1'b1)),
      .ext_out(ext_out[k]), .bus_in(bin[k]), .bus_out(bout[k]), .bus_oe(boe[k]),
      .rot_re(re_w[k]), .rot_im(im_w[k]), .phase_out(ph_w[k]),
      .cos_phi(cos_phi[SIDE]), .sin_phi(sin_phi[SIDE]), .dec_in(dec_in[SIDE]), .dec_ovf(dec_ovf[SIDE]));
  end

  assign rot_re    = {re_w[3], re_w[0]};
  assign rot_im    = {im_w[3], im_w[0]};
  assign phase_out = {ph_w[3], ph_w[0]};
endmodule
