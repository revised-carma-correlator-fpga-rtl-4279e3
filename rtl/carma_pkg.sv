// carma_pkg: constants and types shared by the correlator and digitizer FPGA
// configurations. The memory-map constants (register addresses, block and FPGA
// sizes, the delay/phase buffer limits, the 0xDEADBEEF fill word and the
// UNLOCK_WARNING threshold) are the values of the memory-map specification.
// The CPU request and 64-bit RAM port structures are this design's own bus
// format: one access per 125 MHz clock, read data valid one cycle later.
package carma_pkg;

  // ---- memory map ----------------------------------------------------------
  localparam int unsigned MMAP_BLOCK_SIZE  = 32'h4000;   // 32-bit words per M-RAM
  localparam int unsigned MMAP_FPGA_SIZE   = 32'h20000;  // local space, 17-bit
  localparam int unsigned LOCAL_ADDR_WIDTH = 17;
  localparam int unsigned SYS_ADDR_WIDTH   = 20;         // 3 chip-select MSBs
  localparam int unsigned MAX_BLOCKS       = 8;          // reserved per FPGA
  localparam int unsigned BLK_ADDR32_W     = 14;         // 32-bit port address
  localparam int unsigned BLK_ADDR64_W     = 13;         // 64-bit port address
  localparam logic [31:0] MMAP_FILL        = 32'hDEADBEEF;
  localparam int unsigned MMAP_DELAY_BEGIN = 32'h00080;
  localparam int unsigned MMAP_DELAY_END   = 32'h03F1F;
  localparam int unsigned MMAP_LAGS        = 32'h04000;
  localparam int unsigned NUM_CTRL_REGS    = 32;
  localparam int unsigned NUM_RO_REGS      = 16;
  localparam int unsigned UNLOCK_WARNING   = 8;

  // control register addresses
  localparam logic [4:0] CTRL_REG_VERSION    = 5'h00;
  localparam logic [4:0] CTRL_REG_COMPAT     = 5'h01;
  localparam logic [4:0] CTRL_REG_CORL_CONF1 = 5'h02;
  localparam logic [4:0] CTRL_REG_CORL_CONF2 = 5'h03;
  localparam logic [4:0] CTRL_REG_TD_1A      = 5'h05;  // 1A..1E, 2A..2E follow
  localparam logic [4:0] CTRL_REG_STATUS     = 5'h12;
  localparam logic [4:0] CTRL_REG_SAMP_DELAY = 5'h13;
  localparam logic [4:0] CTRL_REG_CORL_MODE  = 5'h14;
  localparam logic [4:0] CTRL_REG_DEMOD      = 5'h15;
  localparam logic [4:0] CTRL_REG_TEST_PIN   = 5'h17;
  localparam logic [4:0] CTRL_REG_TEST_DIN   = 5'h18;
  localparam logic [4:0] CTRL_REG_OUT_ENABLE = 5'h19;
  localparam logic [4:0] CTRL_REG_SAMP_GAIN  = 5'h1C;
  localparam logic [4:0] CTRL_REG_SAMP_OFFSET= 5'h1D;

  // CTRL_REG_VERSION type / hardware revision nibbles
  localparam logic [3:0] FPGA_TYPE_COR = 4'hC;
  localparam logic [3:0] FPGA_TYPE_DIG = 4'hD;
  localparam logic [3:0] HW_REV_REVISED = 4'hD;

  // correlation types (CORL_TYPE generic, CTRL_REG_CORL_CONF1 bits 3-0)
  localparam int unsigned CORL_AUTO = 0;
  localparam int unsigned CORL_POS  = 1;
  localparam int unsigned CORL_NEG  = 2;
  localparam int unsigned CORL_BOTH = 3;

  // inter-FPGA bus indices: 1a..1e = 0..4, 2a..2e = 5..9
  localparam int unsigned NUM_BUSES = 10;
  localparam int unsigned BUS_1A = 0, BUS_1B = 1, BUS_1C = 2, BUS_1D = 3, BUS_1E = 4;
  localparam int unsigned BUS_2A = 5, BUS_2B = 6, BUS_2C = 7, BUS_2D = 8, BUS_2E = 9;

  // sub-ns delay table geometry
  localparam int unsigned DT_QUADS        = 167;   // quadwords per delay/phase set
  localparam int unsigned DT_CODED        = 496;   // coded taps per set
  localparam int unsigned DT_CODE_W       = 18;    // bits per coded tap
  localparam int unsigned DT_STREAMS      = 16;    // 8 sub-filters x 2 halves
  localparam int unsigned DT_SETS         = 48;    // sets held by the buffer

  // ---- bus types -------------------------------------------------------------
  typedef struct packed {
    logic        cs;
    logic        we;
    logic [16:0] addr;
    logic [31:0] wdata;
  } cpu_req_t;

  typedef struct packed {
    logic        en;
    logic        we;
    logic [12:0] addr;
    logic [63:0] wdata;
  } ram64_req_t;

  typedef logic [NUM_CTRL_REGS-1:0][31:0] ctrl_regs_t;

endpackage
