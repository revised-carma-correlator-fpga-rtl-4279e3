// carma_top: one correlator card and one digitizer card of the revised
// correlator, side by side. In the full system a band has eight digitizer
// cards and seven correlator cards, cabled through their front panels; here
// the two cards are independent, each with its own CPU bus, because the
// decimator that links a digitizer's output to the correlators is not part of
// this RTL. Its interface (phase-corrected samples out, decimated words in)
// and that of the NCO (phase out, cos/sin in) are brought out as ports, as
// are the LVDS front-panel inputs of the correlator card and the raw A/D
// samples of the digitizer card. Both cards share the clock, reset and the
// integration signal 'correlate'.
module carma_top
  import carma_pkg::*;
#(
  parameter int unsigned NUM_LAGS = 256,
  parameter int unsigned NUM_META = 4,
  parameter int unsigned NUM_QCNT = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      correlate,
  // correlator card
  input  logic                      cor_cs,
  input  logic                      cor_we,
  input  logic [SYS_ADDR_WIDTH-1:0] cor_addr,
  input  logic [31:0]               cor_wdata,
  output logic [31:0]               cor_rdata,
  input  logic [3:0][31:0]          cor_ext,
  input  logic [3:0]                cor_front_locked,
  input  logic [3:0][3:0]           cor_samp_ovf,
  // digitizer card
  input  logic                      dig_cs,
  input  logic                      dig_we,
  input  logic [SYS_ADDR_WIDTH-1:0] dig_addr,
  input  logic [31:0]               dig_wdata,
  output logic [31:0]               dig_rdata,
  input  logic [7:0][7:0]           dig_raw_a,
  input  logic [7:0][7:0]           dig_raw_b,
  input  logic [1:0]                dig_locked,
  output logic [3:0][31:0]          dig_ext_out,
  output logic [1:0][7:0][11:0]     dig_rot_re,
  output logic [1:0][7:0][11:0]     dig_rot_im,
  output logic [1:0][15:0]          dig_phase,
  input  logic [1:0][17:0]          dig_cos,
  input  logic [1:0][17:0]          dig_sin,
  input  logic [1:0][31:0]          dig_dec,
  input  logic [1:0]                dig_dec_ovf
);
  cor_board #(.NUM_LAGS(NUM_LAGS), .NUM_META(NUM_META), .NUM_QCNT(NUM_QCNT)) u_cor (
    .clk, .rst, .cpu_cs(cor_cs), .cpu_we(cor_we), .cpu_addr(cor_addr), .cpu_wdata(cor_wdata),
    .cpu_rdata(cor_rdata), .correlate, .ext(cor_ext), .front_locked(cor_front_locked),
    .samp_ovf(cor_samp_ovf));

  dig_board #(.NUM_LAGS(NUM_LAGS), .NUM_META(NUM_META), .NUM_QCNT(NUM_QCNT)) u_dig (
    .clk, .rst, .cpu_cs(dig_cs), .cpu_we(dig_we), .cpu_addr(dig_addr), .cpu_wdata(dig_wdata),
    .cpu_rdata(dig_rdata), .correlate, .raw_a(dig_raw_a), .raw_b(dig_raw_b), .dig_locked,
    .ext_out(dig_ext_out), .rot_re(dig_rot_re), .rot_im(dig_rot_im), .phase_out(dig_phase),
    .cos_phi(dig_cos), .sin_phi(dig_sin), .dec_in(dig_dec), .dec_ovf(dig_dec_ovf));
endmodule
