// corl_status: the CTRL_REG_STATUS word of a data FPGA.
//   bits 30-8  clock cycles during which correlation was active since the last
//              clear (saturates at all ones)
//   bits 7-4   sticky sample-overflow flags of baselines 0-3, set only while active
//   bit 3      sticky: front-panel LVDS PLL unlocked for more than UNLOCK_WARNING
//              consecutive cycles while active
//   bit 2      the same for the digitizer LVDS PLL
//   bit 1      sticky correlation error (correlate rose before the lag dump ended)
//   bit 0      correlation done; set when a dump completes, cleared when the
//              next integration starts
// A one-cycle clear pulse (a CPU write to the register) zeroes every field.
// The field layout and the UNLOCK_WARNING threshold follow the register
// specification; saturation of the counter, "consecutive" for the unlock
// time and clearing done at the next integration are this design's choices.
module corl_status
  import carma_pkg::*;
#(
  parameter int unsigned UNLOCK_LIMIT = UNLOCK_WARNING
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        active,
  input  logic [3:0]  ovf,
  input  logic        front_locked,
  input  logic        dig_locked,
  input  logic        err_set,
  input  logic        done_set,
  input  logic        done_clr,
  output logic [31:0] status
);
  localparam int unsigned UW = $clog2(UNLOCK_LIMIT + 2);

  logic [22:0]   cnt;
  logic [3:0]    ovf_q;
  logic          front_q, dig_q, err_q, done_q;
  logic [UW-1:0] front_run, dig_run;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cnt       <= '0;
      ovf_q     <= '0;
      front_q   <= 1'b0;
      dig_q     <= 1'b0;
      err_q     <= 1'b0;
      done_q    <= 1'b0;
      front_run <= '0;
      dig_run   <= '0;
    end else begin
      if (active && cnt != '1) cnt <= cnt + 23'd1;
      if (active) ovf_q <= ovf_q | ovf;
      // consecutive unlocked cycles while active
      if (!active || front_locked)           front_run <= '0;
      else if (front_run <= UW'(UNLOCK_LIMIT)) front_run <= front_run + 1'b1;
      if (!active || dig_locked)             dig_run <= '0;
      else if (dig_run <= UW'(UNLOCK_LIMIT))   dig_run <= dig_run + 1'b1;
      if (front_run > UW'(UNLOCK_LIMIT)) front_q <= 1'b1;
      if (dig_run   > UW'(UNLOCK_LIMIT)) dig_q   <= 1'b1;
      if (err_set) err_q <= 1'b1;
      if (done_set)      done_q <= 1'b1;
      else if (done_clr) done_q <= 1'b0;
    end
  end

  assign status = {1'b0, cnt, ovf_q, front_q, dig_q, err_q, done_q};
endmodule
