// tb_bus_ioe: checks the bus I/O registers: one clock through the output
// register, output enables honoured only on output buses, one clock through
// the input register, and the readback words.
module tb_bus_ioe;
  import carma_pkg::*;
  localparam logic [9:0] MASK = 10'b00_0110_0011;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [9:0] out_enable;
  logic [9:0][31:0] tx_word, rx_word, pin_in, pin_out, readback;
  logic [9:0] pin_oe;
  int checks = 0, failures = 0;
  bus_ioe #(.OUT_MASK(MASK)) dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    out_enable = '1; tx_word = '0; pin_in = '0;
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 20; n++) begin
      logic [9:0][31:0] tx, px;
      logic [9:0] oe;
      for (int i = 0; i < 10; i++) begin tx[i] = $urandom; px[i] = $urandom; end
      oe = 10'($urandom);
      tx_word = tx; pin_in = px; out_enable = oe;
      @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        if (MASK[i]) begin
          chk(pin_out[i] == tx[i] && readback[i] == tx[i], "output register");
          chk(pin_oe[i] == oe[i], "output enable");
        end else begin
          chk(rx_word[i] == px[i] && readback[i] == px[i], "input register");
          chk(pin_oe[i] == 1'b0, "input bus never driven");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
