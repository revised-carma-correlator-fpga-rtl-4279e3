// dig_fpga: one digitizer-card data FPGA. FPGA_NUM (0-3) selects its role:
//   #1 (antenna A) and #2 (antenna B): the raw 8-bit input from the A/D bus
//      is gain/offset corrected and rounded to 6 bits (samp_scale), delayed
//      by the whole-ns delay (int_delay) and by the sub-ns filter
//      (frac_delay); the eight 8-bit results (64 bits) go out on 1c (LSBs)
//      and 1d (MSBs) for #1, 2c/2d for #2. delay_reload reads the next
//      delay/phase set from M-RAM block 0 at the end of every integration
//      and drives the phase offset on bus 1e (#1) or 2e (#2). They compute
//      lags[AB+] (#1, A delayed 4, B delayed 2) or lags[AB-] (#2, A delayed 2,
//      B delayed 4) and forward the decimated A and B words.
//   #0 (antenna A) and #3 (antenna B): the delayed samples from the
//      neighbour are downconverted and phase-corrected (phase_rot) and handed
//      to the decimator through rot_re/rot_im; the decimator is outside this
//      module (dec_in comes back from it), and so is the NCO that turns the
//      phase offset (phase_out) into cos/sin. The decimated word is sent on
//      2a (#0) or 1b (#3) and correlated with itself (lags[AA]/lags[BB]) after
//      a 6-clock delay that aligns it with the other antenna on ext_out.
// Every FPGA drives its front-panel output ext_out = {B, A} (16 bits each).
// CTRL_REG_CORL_MODE: bits 1-0 "01" correlator test patterns, "10"
// decimator output replaced by TEST_PIN, "11" sub-ns filter output replaced
// by TEST_PIN (A) / TEST_DIN (B); bit 2 bypasses scaling and delays. The
// phase-switch demodulation bit for integration i (CTRL_REG_DEMOD bit i mod
// 16, counted from reset) negates the phase-corrected samples.
// Routing and delays follow the digitizer pipeline drawing; the reload
// trigger, the demodulation placement and the E-bus word format are this
// design's choices.
module dig_fpga
  import carma_pkg::*;
#(
  parameter int unsigned FPGA_NUM  = 1,
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
  input  logic [7:0][7:0]             dig_in,
  input  logic                        dig_locked,
  output logic [31:0]                 ext_out,
  input  logic [NUM_BUSES-1:0][31:0]  bus_in,
  output logic [NUM_BUSES-1:0][31:0]  bus_out,
  output logic [NUM_BUSES-1:0]        bus_oe,
  output logic [7:0][11:0]            rot_re,
  output logic [7:0][11:0]            rot_im,
  output logic [15:0]                 phase_out,
  input  logic [17:0]                 cos_phi,
  input  logic [17:0]                 sin_phi,
  input  logic [31:0]                 dec_in,
  input  logic                        dec_ovf
);
  localparam bit IS_DELAY = (FPGA_NUM == 1) || (FPGA_NUM == 2);
  localparam logic [NUM_BUSES-1:0] OUT_MASK =
      (FPGA_NUM == 0) ? NUM_BUSES'(1 << BUS_2A) :
      (FPGA_NUM == 1) ? NUM_BUSES'((1 << BUS_1C) | (1 << BUS_1D) | (1 << BUS_1E) | (1 << BUS_2A) | (1 << BUS_1B)) :
      (FPGA_NUM == 2) ? NUM_BUSES'((1 << BUS_2C) | (1 << BUS_2D) | (1 << BUS_2E) | (1 << BUS_2A) | (1 << BUS_1B)) :
                        NUM_BUSES'(1 << BUS_1B);
  localparam int unsigned CTYPE = (FPGA_NUM == 1) ? CORL_POS : (FPGA_NUM == 2) ? CORL_NEG : CORL_AUTO;

  // ---- memory map ------------------------------------------------------------------
  ctrl_regs_t                   regs;
  logic [NUM_CTRL_REGS-1:0]     wr_stb;
  logic [NUM_RO_REGS-1:0][31:0] ro_regs;
  logic [31:0]                  status, conf1, conf2;
  ram64_req_t [1:0]             ram_req;
  logic [1:0][63:0]             ram_rdata;
  ram64_req_t [0:0]             corl_req;
  ram64_req_t                   tab_req;
  logic [NUM_BUSES-1:0][31:0]   readback, rx, tx;

  mmap #(.NUM_BLOCKS(2)) u_mmap (
    .clk, .rst, .cpu_req, .cpu_rdata, .ro_regs, .status_in(status), .regs, .wr_stb,
    .ram_req, .ram_rdata);

  assign ram_req[0] = tab_req;
  assign ram_req[1] = corl_req[0];

  always_comb begin
    ro_regs = '0;
    ro_regs[CTRL_REG_VERSION]    = {8'h0, FPGA_TYPE_DIG, HW_REV_REVISED, 8'(VER_MAJOR), 8'(VER_MINOR)};
    ro_regs[CTRL_REG_COMPAT]     = 32'(1 << FPGA_NUM);
    ro_regs[CTRL_REG_CORL_CONF1] = conf1;
    ro_regs[CTRL_REG_CORL_CONF2] = conf2;
    for (int i = 0; i < NUM_BUSES; i++) ro_regs[32'(CTRL_REG_TD_1A) + i] = readback[i];
  end

  logic [31:0] mode;
  assign mode = regs[CTRL_REG_CORL_MODE];

  bus_ioe #(.OUT_MASK(OUT_MASK)) u_ioe (
    .clk, .rst, .out_enable(regs[CTRL_REG_OUT_ENABLE][NUM_BUSES-1:0]), .tx_word(tx),
    .rx_word(rx), .pin_in(bus_in), .pin_out(bus_out), .pin_oe(bus_oe), .readback);

  // integration edges and the demodulation index
  logic       corr_q, corr_fall;
  logic [3:0] integ;
  assign corr_fall = corr_q && !correlate;
  always_ff @(posedge clk) begin
    if (rst) begin
      corr_q <= 1'b0;
      integ  <= '0;
    end else begin
      corr_q <= correlate;
      if (corr_fall) integ <= integ + 1'b1;
    end
  end

  logic        path_ovf;
  logic [31:0] a_w, b_w;          // the two streams at the correlator input

  if (IS_DELAY) begin : g_delay
    // ---- #1 / #2: scaling, whole-ns and sub-ns delay, table reload ----------------
    logic [7:0][5:0]  scaled, delayed;
    logic [7:0][7:0]  filt;
    logic [63:0]      filt_out;
    logic             sc_ovf, fd_ovf, swap;
    logic [2:0]       ld_en;
    logic [2:0][3:0]  ld_stream;
    logic [2:0][4:0]  ld_index;
    logic [2:0][17:0] ld_value;
    logic [15:0]      delay_ns, phase;
    logic [15:0]      pat;

    samp_scale u_scale (
      .clk, .rst, .gain(regs[CTRL_REG_SAMP_GAIN][15:0]), .offset(regs[CTRL_REG_SAMP_OFFSET][15:0]),
      .din(dig_in), .dout(scaled), .ovf(sc_ovf));
    int_delay #(.W(6)) u_idly (.clk, .rst, .dly(delay_ns), .din(scaled), .dout(delayed));
    frac_delay u_frac (
      .clk, .rst, .din(delayed), .dout(filt), .ovf(fd_ovf),
      .ld_en, .ld_stream, .ld_index, .ld_value, .swap);
    delay_reload u_reload (
      .clk, .rst, .reload(corr_fall), .ram_req(tab_req), .ram_rdata(ram_rdata[0]),
      .ld_en, .ld_stream, .ld_index, .ld_value, .swap, .delay_ns, .phase,
      .busy(), .set_idx());

    assign pat = (FPGA_NUM == 1) ? regs[CTRL_REG_TEST_PIN][15:0] : regs[CTRL_REG_TEST_DIN][15:0];
    always_comb begin
      if (mode[2])                filt_out = dig_in;
      else if (mode[1:0] == 2'b11) filt_out = {4{pat}};
      else                        filt_out = filt;
    end
    assign path_ovf = sc_ovf | fd_ovf;

    always_comb begin
      tx = '0;
      if (FPGA_NUM == 1) begin
        tx[BUS_1C] = filt_out[31:0];
        tx[BUS_1D] = filt_out[63:32];
        tx[BUS_1E] = {16'h0, phase};
      end else begin
        tx[BUS_2C] = filt_out[31:0];
        tx[BUS_2D] = filt_out[63:32];
        tx[BUS_2E] = {16'h0, phase};
      end
      tx[BUS_2A] = rx[BUS_1A];
      tx[BUS_1B] = rx[BUS_2B];
    end

    delay_line #(.WIDTH(32), .DELAY(FPGA_NUM == 1 ? 4 : 2)) u_da (.clk, .rst, .din(rx[BUS_1A]), .dout(a_w));
    delay_line #(.WIDTH(32), .DELAY(FPGA_NUM == 1 ? 2 : 4)) u_db (.clk, .rst, .din(rx[BUS_2B]), .dout(b_w));

    assign rot_re    = '0;
    assign rot_im    = '0;
    assign phase_out = '0;
  end else begin : g_decim
    // ---- #0 / #3: phase correction ahead of the decimator ---------------------------
    logic [7:0][7:0] samp;
    logic [31:0]     dec_eff, dec_d;
    assign samp      = (FPGA_NUM == 0) ? {rx[BUS_2D], rx[BUS_2C]} : {rx[BUS_1D], rx[BUS_1C]};
    assign phase_out = (FPGA_NUM == 0) ? rx[BUS_2E][15:0] : rx[BUS_1E][15:0];

    phase_rot u_rot (
      .clk, .rst, .din(samp), .cos_phi, .sin_phi, .negate(regs[CTRL_REG_DEMOD][integ]),
      .re(rot_re), .im(rot_im));

    always_comb begin
      if (mode[2])                 dec_eff = samp[3:0];
      else if (mode[1:0] == 2'b10) dec_eff = {16'h0, regs[CTRL_REG_TEST_PIN][15:0]};
      else                         dec_eff = dec_in;
    end
    assign path_ovf = dec_ovf;
    assign tab_req  = '0;        // no delay tables in #0 / #3

    delay_line #(.WIDTH(32), .DELAY(6)) u_d6 (.clk, .rst, .din(dec_eff), .dout(dec_d));

    always_comb begin
      tx = '0;
      if (FPGA_NUM == 0) tx[BUS_2A] = dec_eff;
      else               tx[BUS_1B] = dec_eff;
    end
    assign a_w = (FPGA_NUM == 0) ? dec_d : rx[BUS_1A];
    assign b_w = (FPGA_NUM == 0) ? rx[BUS_2B] : dec_d;
  end

  assign ext_out = {b_w[15:0], a_w[15:0]};

  // ---- correlation -------------------------------------------------------------------
  logic active, done, err;
  logic [0:0][31:0] p_w, d_w;
  assign p_w[0] = (FPGA_NUM == 3) ? b_w : a_w;
  assign d_w[0] = (FPGA_NUM == 0) ? a_w : b_w;

  correlation #(.CORL_TYPE(CTYPE), .NUM_CORL(1), .NUM_LAGS(NUM_LAGS),
                .NUM_META(NUM_META), .NUM_QCNT(NUM_QCNT)) u_corl (
    .clk, .rst, .correlate, .test_mode(mode[1:0] == 2'b01),
    .test_pin(regs[CTRL_REG_TEST_PIN][15:0]), .test_din(regs[CTRL_REG_TEST_DIN][15:0]),
    .hires(1'b0), .prompt(p_w), .delay(d_w), .ram_req(corl_req), .active, .done, .err,
    .conf1, .conf2);

  corl_status u_status (
    .clk, .rst, .clear(wr_stb[CTRL_REG_STATUS]), .active, .ovf({3'b0, path_ovf}),
    .front_locked(1'b1), .dig_locked, .err_set(err), .done_set(done),
    .done_clr(correlate && !corr_q), .status);
endmodule
