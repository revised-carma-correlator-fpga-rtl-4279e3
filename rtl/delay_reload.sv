// delay_reload: the delay/phase table reload state machine of digitizer
// FPGAs #1 and #2. The delay buffer in M-RAM block 0 holds DT_SETS = 48
// consecutive delay/phase sets of 167 quadwords, starting at 32-bit address
// MMAP_DELAY_BEGIN (quadword 0x40) and ending at MMAP_DELAY_END; it is read
// as a circular buffer, one set per 'reload' pulse (given between
// integrations). Quadwords 0..165 of a set carry three 18-bit coded taps each
// in bits 17-0, 35-18 and 53-36; coded tap v = 0..495 of the set is value
// m = (v%62)/2+1 of stream 2k+h with k = v/62 and h = v%2, so the streams of
// the two 5-tap halves of a sub-filter interleave. Quadword 166 holds the
// whole-ns delay (bits 15-0) and the normalized phase offset (bits 47-32).
// The taps are written to the filter's shadow tables over the three-lane
// port as they are read; once the last quadword has been read, 'swap' pulses
// and the new delay and phase appear on delay_ns/phase in the same cycle.
// One quadword is read per clock (read data one clock later), so a reload
// takes 169 clocks; 'busy' is high meanwhile. The table layout is the
// specification's; the trigger and the port timing are this design's choices.
module delay_reload
  import carma_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               reload,
  output ram64_req_t         ram_req,
  input  logic [63:0]        ram_rdata,
  output logic [2:0]         ld_en,
  output logic [2:0][3:0]    ld_stream,
  output logic [2:0][4:0]    ld_index,
  output logic [2:0][17:0]   ld_value,
  output logic               swap,
  output logic [15:0]        delay_ns,
  output logic [15:0]        phase,
  output logic               busy,
  output logic [5:0]         set_idx
);
  localparam int unsigned BASE_Q = MMAP_DELAY_BEGIN / 2;

  logic [7:0]  q_rd;           // quadword being requested
  logic [7:0]  q_dat;          // quadword whose data is on ram_rdata
  logic        rd_q, reading;
  logic [12:0] set_base;

  initial assert (BASE_Q + DT_SETS * DT_QUADS - 1 == MMAP_DELAY_END / 2)
    else $error("delay buffer geometry does not match the memory map");

  always_ff @(posedge clk) begin
    if (rst) begin
      reading  <= 1'b0;
      q_rd     <= '0;
      q_dat    <= '0;
      rd_q     <= 1'b0;
      set_idx  <= '0;
      set_base <= 13'(BASE_Q);
      delay_ns <= '0;
      phase    <= '0;
      swap     <= 1'b0;
    end else begin
      swap <= 1'b0;
      rd_q <= reading;
      q_dat <= q_rd;
      if (!reading && !rd_q && reload) begin
        reading <= 1'b1;
        q_rd    <= '0;
      end else if (reading) begin
        if (q_rd == 8'(DT_QUADS - 1)) reading <= 1'b0;
        else                          q_rd <= q_rd + 1'b1;
      end
      if (rd_q && q_dat == 8'(DT_QUADS - 1)) begin
        delay_ns <= ram_rdata[15:0];
        phase    <= ram_rdata[47:32];
        swap     <= 1'b1;
        if (set_idx == 6'(DT_SETS - 1)) begin
          set_idx  <= '0;
          set_base <= 13'(BASE_Q);
        end else begin
          set_idx  <= set_idx + 1'b1;
          set_base <= set_base + 13'(DT_QUADS);
        end
      end
    end
  end

  assign busy          = reading || rd_q;
  assign ram_req.en    = reading;
  assign ram_req.we    = 1'b0;
  assign ram_req.addr  = set_base + 13'(q_rd);
  assign ram_req.wdata = '0;

  always_comb begin
    for (int n = 0; n < 3; n++) begin
      int unsigned v, r;
      v = 3 * 32'(q_dat) + n;
      r = v % 62;
      ld_en[n]     = rd_q && (q_dat < 8'(DT_QUADS - 1)) && (v < DT_CODED);
      ld_stream[n] = 4'(2 * (v / 62) + r % 2);
      ld_index[n]  = 5'(r / 2 + 1);
      ld_value[n]  = ram_rdata[18*n +: 18];
    end
  end
endmodule
