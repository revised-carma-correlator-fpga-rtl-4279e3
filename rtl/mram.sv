// mram: one M-RAM block of the memory map (2^19 bits), true dual-ported with
// mixed widths. Port A is 32 bits wide (CPU side, 2*DEPTH64 words), port B is
// 64 bits wide (internal logic, DEPTH64 quadwords). The layout is
// little-endian: quadword Q holds 32-bit word 2Q in its LSBs and word 2Q+1 in
// its MSBs. The store is kept as two 32-bit halves so that a 32-bit write
// touches one half. Both ports are synchronous: a read returns the data one
// clock after the address. Reads see the old contents on a read/write of the
// same location in the same cycle; when both ports write the same word in the
// same cycle, port A (the CPU) wins. The widths and size are the M-RAM's; the
// collision rule is this design's choice.
module mram #(
  parameter int unsigned DEPTH64 = 8192
) (
  input  logic                       clk,
  // 32-bit port
  input  logic                       a_en,
  input  logic                       a_we,
  input  logic [$clog2(DEPTH64):0]   a_addr,
  input  logic [31:0]                a_wdata,
  output logic [31:0]                a_rdata,
  // 64-bit port
  input  logic                       b_en,
  input  logic                       b_we,
  input  logic [$clog2(DEPTH64)-1:0] b_addr,
  input  logic [63:0]                b_wdata,
  output logic [63:0]                b_rdata
);
  localparam int unsigned AW = $clog2(DEPTH64);

  logic [31:0] lo [DEPTH64];
  logic [31:0] hi [DEPTH64];

  logic [AW-1:0] a_q;
  logic          a_half;
  assign a_q    = a_addr[AW:1];
  assign a_half = a_addr[0];

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= {hi[b_addr], lo[b_addr]};
    end
    if (a_en) begin
      a_rdata <= a_half ? hi[a_q] : lo[a_q];
    end
    if (b_en && b_we) begin
      lo[b_addr] <= b_wdata[31:0];
      hi[b_addr] <= b_wdata[63:32];
    end
    if (a_en && a_we) begin
      if (a_half) hi[a_q] <= a_wdata;
      else        lo[a_q] <= a_wdata;
    end
  end
endmodule
