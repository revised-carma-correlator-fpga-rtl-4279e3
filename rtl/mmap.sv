// mmap: the FPGA memory map as seen by the board CPU and by internal logic.
// The 17-bit local 32-bit-word address space holds MAX_BLOCKS slots of
// MMAP_BLOCK_SIZE words; slot i starts at i*0x4000. The first NUM_BLOCKS
// slots are physical M-RAMs, the rest read back as 0xDEADBEEF. Addresses
// 0x00-0x1F are the control registers, which shadow the bottom of block 0:
// CPU reads there return the registers and CPU writes update only the
// registers (the RAM words beneath stay reachable from the 64-bit port).
// Registers 0x00-0x0F are read-only and show the ro_regs inputs;
// CTRL_REG_STATUS reads the status_in input and a write to it pulses
// wr_stb[0x12] (used as "clear"). Every CPU write to a register pulses its
// wr_stb bit for one cycle. Each block also has a dedicated 64-bit port for
// internal logic (ram_req / ram_rdata, one-cycle read latency).
// CPU port timing: one access per clock, read data valid the cycle after
// cs && !we. The address layout, register split, mixed-width ports and fill
// word are the specification's; the bus signalling is this design's own.
module mmap
  import carma_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 5
) (
  input  logic                            clk,
  input  logic                            rst,
  input  cpu_req_t                        cpu_req,
  output logic [31:0]                     cpu_rdata,
  input  logic [NUM_RO_REGS-1:0][31:0]    ro_regs,
  input  logic [31:0]                     status_in,
  output ctrl_regs_t                      regs,
  output logic [NUM_CTRL_REGS-1:0]        wr_stb,
  input  ram64_req_t [NUM_BLOCKS-1:0]     ram_req,
  output logic [NUM_BLOCKS-1:0][63:0]     ram_rdata
);
  localparam int unsigned NRW = NUM_CTRL_REGS - NUM_RO_REGS;

  logic [NRW-1:0][31:0] rw_q;
  logic                 is_reg;
  logic [2:0]           blk;
  logic [4:0]           ridx;

  assign is_reg = (cpu_req.addr[16:5] == '0);
  assign blk    = cpu_req.addr[16:14];
  assign ridx   = cpu_req.addr[4:0];

  // register file
  always_ff @(posedge clk) begin
    if (rst) begin
      rw_q   <= '0;
      wr_stb <= '0;
    end else begin
      wr_stb <= '0;
      if (cpu_req.cs && cpu_req.we && is_reg) begin
        wr_stb[ridx] <= 1'b1;
        if (ridx >= 5'(NUM_RO_REGS)) rw_q[ridx - 5'(NUM_RO_REGS)] <= cpu_req.wdata;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_CTRL_REGS; i++) begin
      if (i < NUM_RO_REGS) regs[i] = ro_regs[i];
      else                 regs[i] = rw_q[i - NUM_RO_REGS];
    end
    regs[CTRL_REG_STATUS] = status_in;
  end

  // M-RAM blocks
  logic [NUM_BLOCKS-1:0][31:0] a_rdata;
  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_blk
    logic a_en;
    assign a_en = cpu_req.cs && (blk == 3'(b)) && !(cpu_req.we && is_reg);
    mram #(.DEPTH64(MMAP_BLOCK_SIZE/2)) u_ram (
      .clk     (clk),
      .a_en    (a_en),
      .a_we    (cpu_req.we),
      .a_addr  (cpu_req.addr[13:0]),
      .a_wdata (cpu_req.wdata),
      .a_rdata (a_rdata[b]),
      .b_en    (ram_req[b].en),
      .b_we    (ram_req[b].we),
      .b_addr  (ram_req[b].addr),
      .b_wdata (ram_req[b].wdata),
      .b_rdata (ram_rdata[b])
    );
  end

  // read-back select, registered to line up with the RAM read
  typedef enum logic [1:0] {SEL_REG, SEL_RAM, SEL_FILL} rsel_e;
  rsel_e       rsel_q;
  logic [2:0]  blk_q;
  logic [31:0] reg_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rsel_q <= SEL_FILL;
      blk_q  <= '0;
      reg_q  <= '0;
    end else if (cpu_req.cs && !cpu_req.we) begin
      blk_q <= blk;
      reg_q <= regs[ridx];
      if (is_reg)                         rsel_q <= SEL_REG;
      else if (32'(blk) < NUM_BLOCKS)     rsel_q <= SEL_RAM;
      else                                rsel_q <= SEL_FILL;
    end
  end

  always_comb begin
    unique case (rsel_q)
      SEL_REG: cpu_rdata = reg_q;
      SEL_RAM: cpu_rdata = a_rdata[blk_q];
      default: cpu_rdata = MMAP_FILL;
    endcase
  end
endmodule
