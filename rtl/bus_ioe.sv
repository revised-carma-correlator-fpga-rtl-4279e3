// bus_ioe: I/O-element registers of the ten 32-bit inter-FPGA buses
// (index 0-4 = 1a-1e, 5-9 = 2a-2e). Every bus has an input register that
// samples the pin every clock, and an output register that samples the
// internal word. A bus that the configuration uses as an output (OUT_MASK bit
// set) drives its pin only while its CTRL_REG_OUT_ENABLE bit is set; for input
// buses the enable bit is ignored. The readback words (CTRL_REG_TD_1A..2E)
// show the output register for output buses and the input register for input
// buses. A word therefore takes two clocks from the sender's logic to the
// receiver's logic: one output and one input register.
// Register layout and enable bits follow the specification; the register
// placement is read from the alignment delays drawn for the data pipelines.
module bus_ioe
  import carma_pkg::*;
#(
  parameter logic [NUM_BUSES-1:0] OUT_MASK = '0
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [NUM_BUSES-1:0]        out_enable,   // CTRL_REG_OUT_ENABLE[9:0]
  input  logic [NUM_BUSES-1:0][31:0]  tx_word,      // internal words to send
  output logic [NUM_BUSES-1:0][31:0]  rx_word,      // registered pin inputs
  input  logic [NUM_BUSES-1:0][31:0]  pin_in,
  output logic [NUM_BUSES-1:0][31:0]  pin_out,
  output logic [NUM_BUSES-1:0]        pin_oe,
  output logic [NUM_BUSES-1:0][31:0]  readback
);
  logic [NUM_BUSES-1:0][31:0] tx_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_q    <= '0;
      rx_word <= '0;
    end else begin
      for (int i = 0; i < NUM_BUSES; i++) begin
        if (OUT_MASK[i]) tx_q[i] <= tx_word[i];
        else             rx_word[i] <= pin_in[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_BUSES; i++) begin
      pin_oe[i]   = OUT_MASK[i] & out_enable[i];
      pin_out[i]  = OUT_MASK[i] ? tx_q[i] : 32'h0;
      readback[i] = OUT_MASK[i] ? tx_q[i] : rx_word[i];
    end
  end
endmodule
