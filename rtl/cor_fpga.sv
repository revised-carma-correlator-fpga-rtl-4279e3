// cor_fpga: one correlator-card data FPGA. FPGA_NUM (0-3) selects its place
// in the card's pipeline. The front-panel word 'ext' carries two antennas
// (16-bit sample words, first antenna in the LSBs). Words are passed to the
// neighbouring FPGAs on buses 1a-1d / 2a-2d, each hop costing two clocks (an
// output and an input I/O register), and the local inputs are delayed so that
// all four baselines see aligned streams:
//   #0  AB from ext, delayed 4; I, J arrive on 2c/2d;  baselines AI BI AJ BJ;
//       sends A on 2a, B on 2b.
//   #1  A, B on 1a/1b; E, F on 2c/2d; CD from ext, delayed 2. With
//       corl_mode(2)=0: IJ=CD, KL=EF, M=D; with corl_mode(2)=1: IJ=EF, KL=AB,
//       M=C. Sends I, J on 1c/1d and forwards A, B on 2a/2b.
//       Baselines KC LC EM FM.
//   #2  A, B on 1a/1b; G, H on 2c/2d; EF from ext sent on 1c/1d and 2a/2b;
//       baselines AG BG AH BH.
//   #3  E, F on 1a/1b; GH from ext, delayed 2, sent on 1c/1d;
//       baselines EG FG EH FH.
// The first antenna of each pair is the prompt input of the correlator.
// The CPU sees the FPGA memory map (control registers, block 0 for tables,
// one M-RAM per baseline for lag readout). CTRL_REG_CORL_MODE bits: 1-0 test
// modes ("01" test patterns at the correlator inputs, "11" test patterns in
// place of the front-panel word), 2 partition geometry, 3 single-baseline
// high resolution, 4 local information in the metadata bits.
// The routing, delays and multiplexers follow the correlator pipeline drawing;
// the two-clock hop, the version field values and the metadata contents are
// this design's reading or choice.
module cor_fpga
  import carma_pkg::*;
#(
  parameter int unsigned FPGA_NUM  = 0,
  parameter int unsigned NUM_LAGS  = 256,
  parameter int unsigned NUM_META  = 4,
  parameter int unsigned NUM_QCNT  = 4,
  parameter int unsigned VER_MAJOR = 1,
  parameter int unsigned VER_MINOR = 0
) (
  input  logic                        clk,
  input  logic                        rst,
  input  cpu_req_t                    cpu_req,
  output logic [31:0]                 cpu_rdata,
  input  logic                        correlate,
  input  logic [31:0]                 ext,
  input  logic                        front_locked,
  input  logic [3:0]                  samp_ovf,
  input  logic [NUM_BUSES-1:0][31:0]  bus_in,
  output logic [NUM_BUSES-1:0][31:0]  bus_out,
  output logic [NUM_BUSES-1:0]        bus_oe
);
  localparam int unsigned NUM_CORL = 4;
  localparam logic [NUM_BUSES-1:0] OUT_MASK =
      (FPGA_NUM == 0) ? NUM_BUSES'((1 << BUS_2A) | (1 << BUS_2B)) :
      (FPGA_NUM == 3) ? NUM_BUSES'((1 << BUS_1C) | (1 << BUS_1D)) :
                        NUM_BUSES'((1 << BUS_1C) | (1 << BUS_1D) | (1 << BUS_2A) | (1 << BUS_2B));

  // ---- memory map and registers ------------------------------------------------
  ctrl_regs_t                  regs;
  logic [NUM_CTRL_REGS-1:0]    wr_stb;
  logic [NUM_RO_REGS-1:0][31:0] ro_regs;
  logic [31:0]                 status, conf1, conf2;
  ram64_req_t [NUM_CORL:0]     ram_req;
  logic [NUM_CORL:0][63:0]     ram_rdata;
  logic [NUM_BUSES-1:0][31:0]  readback, rx, tx;
  ram64_req_t [NUM_CORL-1:0]   corl_req;

  mmap #(.NUM_BLOCKS(NUM_CORL + 1)) u_mmap (
    .clk, .rst, .cpu_req, .cpu_rdata, .ro_regs, .status_in(status), .regs, .wr_stb,
    .ram_req, .ram_rdata);

  always_comb begin
    ro_regs = '0;
    ro_regs[CTRL_REG_VERSION]    = {8'h0, FPGA_TYPE_COR, HW_REV_REVISED, 8'(VER_MAJOR), 8'(VER_MINOR)};
    ro_regs[CTRL_REG_COMPAT]     = 32'(1 << FPGA_NUM);
    ro_regs[CTRL_REG_CORL_CONF1] = conf1;
    ro_regs[CTRL_REG_CORL_CONF2] = conf2;
    for (int i = 0; i < NUM_BUSES; i++) ro_regs[32'(CTRL_REG_TD_1A) + i] = readback[i];
  end

  // block 0 (tables) is not used by correlator FPGAs; blocks 1-4 take the lag dumps
  assign ram_req[0] = '0;
  for (genvar c = 0; c < NUM_CORL; c++) begin : g_rq
    assign ram_req[c + 1] = corl_req[c];
  end

  logic [31:0] mode;
  logic        geom;
  assign mode = regs[CTRL_REG_CORL_MODE];
  assign geom = mode[2];

  // ---- bus I/O --------------------------------------------------------------------
  bus_ioe #(.OUT_MASK(OUT_MASK)) u_ioe (
    .clk, .rst, .out_enable(regs[CTRL_REG_OUT_ENABLE][NUM_BUSES-1:0]), .tx_word(tx),
    .rx_word(rx), .pin_in(bus_in), .pin_out(bus_out), .pin_oe(bus_oe), .readback);

  logic [31:0] ext_eff, ext_d;
  assign ext_eff = (mode[1:0] == 2'b11) ?
                   {regs[CTRL_REG_TEST_DIN][15:0], regs[CTRL_REG_TEST_PIN][15:0]} : ext;

  localparam int unsigned EXT_DELAY = (FPGA_NUM == 0) ? 4 : (FPGA_NUM == 2) ? 0 : 2;
  delay_line #(.WIDTH(32), .DELAY(EXT_DELAY)) u_dly (.clk, .rst, .din(ext_eff), .dout(ext_d));

  logic [NUM_CORL-1:0][15:0] p_s, d_s;

  always_comb begin
    tx  = '0;
    p_s = '0;
    d_s = '0;
    unique case (FPGA_NUM)
      0: begin
        tx[BUS_2A] = {16'h0, ext_eff[15:0]};
        tx[BUS_2B] = {16'h0, ext_eff[31:16]};
        p_s = {ext_d[31:16], ext_d[15:0], ext_d[31:16], ext_d[15:0]};
        d_s = {rx[BUS_2D][15:0], rx[BUS_2D][15:0], rx[BUS_2C][15:0], rx[BUS_2C][15:0]};
      end
      1: begin
        logic [15:0] i_w, j_w, k_w, l_w, m_w;
        i_w = geom ? rx[BUS_2C][15:0] : ext_d[15:0];
        j_w = geom ? rx[BUS_2D][15:0] : ext_d[31:16];
        k_w = geom ? rx[BUS_1A][15:0] : rx[BUS_2C][15:0];
        l_w = geom ? rx[BUS_1B][15:0] : rx[BUS_2D][15:0];
        m_w = geom ? ext_d[15:0]      : ext_d[31:16];
        tx[BUS_1C] = {16'h0, i_w};
        tx[BUS_1D] = {16'h0, j_w};
        tx[BUS_2A] = rx[BUS_1A];
        tx[BUS_2B] = rx[BUS_1B];
        p_s = {rx[BUS_2D][15:0], rx[BUS_2C][15:0], l_w, k_w};
        d_s = {m_w, m_w, ext_d[15:0], ext_d[15:0]};
      end
      2: begin
        tx[BUS_1C] = {16'h0, ext_eff[15:0]};
        tx[BUS_1D] = {16'h0, ext_eff[31:16]};
        tx[BUS_2A] = {16'h0, ext_eff[15:0]};
        tx[BUS_2B] = {16'h0, ext_eff[31:16]};
        p_s = {rx[BUS_1B][15:0], rx[BUS_1A][15:0], rx[BUS_1B][15:0], rx[BUS_1A][15:0]};
        d_s = {rx[BUS_2D][15:0], rx[BUS_2D][15:0], rx[BUS_2C][15:0], rx[BUS_2C][15:0]};
      end
      default: begin
        tx[BUS_1C] = {16'h0, ext_d[15:0]};
        tx[BUS_1D] = {16'h0, ext_d[31:16]};
        p_s = {rx[BUS_1B][15:0], rx[BUS_1A][15:0], rx[BUS_1B][15:0], rx[BUS_1A][15:0]};
        d_s = {ext_d[31:16], ext_d[31:16], ext_d[15:0], ext_d[15:0]};
      end
    endcase
  end

  // ---- correlation ---------------------------------------------------------------
  logic [NUM_CORL-1:0][31:0] p_w, d_w;
  always_comb begin
    for (int c = 0; c < NUM_CORL; c++) begin
      logic [15:0] meta;
      meta   = mode[4] ? {8'(FPGA_NUM), 8'(c)} : 16'h0;
      p_w[c] = {meta, p_s[c]};
      d_w[c] = {meta, d_s[c]};
    end
  end

  logic active, done, err, corr_q;
  correlation #(.CORL_TYPE(CORL_BOTH), .NUM_CORL(NUM_CORL), .NUM_LAGS(NUM_LAGS),
                .NUM_META(NUM_META), .NUM_QCNT(NUM_QCNT)) u_corl (
    .clk, .rst, .correlate, .test_mode(mode[1:0] == 2'b01),
    .test_pin(regs[CTRL_REG_TEST_PIN][15:0]), .test_din(regs[CTRL_REG_TEST_DIN][15:0]),
    .hires(mode[3]), .prompt(p_w), .delay(d_w), .ram_req(corl_req), .active, .done, .err,
    .conf1, .conf2);

  always_ff @(posedge clk) begin
    if (rst) corr_q <= 1'b0;
    else     corr_q <= correlate;
  end

  corl_status u_status (
    .clk, .rst, .clear(wr_stb[CTRL_REG_STATUS]), .active, .ovf(samp_ovf),
    .front_locked, .dig_locked(1'b1), .err_set(err), .done_set(done),
    .done_clr(correlate && !corr_q), .status);
endmodule
