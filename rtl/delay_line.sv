// delay_line: a word delayed by a fixed number of clocks (the "D=N" elements
// of the data pipelines). DELAY=0 passes the word straight through.
module delay_line #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DELAY = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DELAY == 0) begin : g_wire
    assign dout = din;
  end else begin : g_reg
    logic [DELAY-1:0][WIDTH-1:0] sr;
    always_ff @(posedge clk) begin
      if (rst) sr <= '0;
      else begin
        sr[0] <= din;
        for (int i = 1; i < DELAY; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DELAY-1];
  end
endmodule
