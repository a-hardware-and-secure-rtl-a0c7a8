// gci_pkg: types and constants shared by the chaotic-iteration generator
// (GCIPRNG) and by the test platform around it.
//
// The lane width (8 bits), the default state width (32 bits) and the
// permutation multipliers (811 for 32-bit, 995 for 64-bit generators) follow
// the generator's description. The strategy selection codes, the iteration
// modes' encoding, the register map, the UART rate and the serial command
// bytes are choices of this design.
package gci_pkg;

  // ---------------------------------------------------------------- datapath
  localparam int unsigned LANE_W = 8;      // every GCI lane is 8 bits wide
  localparam int unsigned MULT32 = 811;    // permutation multiplier, N = 32
  localparam int unsigned MULT64 = 995;    // permutation multiplier, N = 64

  // How the strategy word selects the updated components.
  typedef enum logic [1:0] {
    MODE_GENERALIZED = 2'd0,  // every bit of the strategy selects one component
    MODE_UNARY       = 2'd1,  // one component per lane, chosen by 3 strategy bits
    MODE_PARALLEL    = 2'd2   // every component of every lane is updated
  } gci_mode_e;

  // Which embedded generator supplies the strategy.
  typedef enum logic [1:0] {
    STRAT_LFSR113     = 2'd0,
    STRAT_TAUS88      = 2'd1,
    STRAT_TAUS_LFSR   = 2'd2,  // {Taus88, LFSR113}, a 64-bit strategy
    STRAT_XORSHIFT128 = 2'd3   // xorshift128+, 64 bits
  } strat_sel_e;

  // ---------------------------------------------------------------- bus map
  localparam int unsigned AXI_AW = 16;
  localparam int unsigned AXI_DW = 32;
  localparam int unsigned SLAVE_SEL_BIT = 12;     // 0: DUT controller, 1: UART
  localparam logic [AXI_AW-1:0] DUT_BASE  = 16'h0000;
  localparam logic [AXI_AW-1:0] UART_BASE = 16'h1000;
  localparam logic [AXI_AW-1:0] DCCU_BASE = 16'h2000;   // served inside the DCCU
  localparam int unsigned DCCU_SEL_BIT = 13;

  // AXI4-Lite response codes
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // DUT controller registers (byte offsets)
  localparam logic [7:0] DUT_REG_ID      = 8'h00;  // RW identifier
  localparam logic [7:0] DUT_REG_CTRL    = 8'h04;  // [1:0] mode, [3:2] strategy, [4] run
  localparam logic [7:0] DUT_REG_SEED_LO = 8'h08;  // seed x^0 bits 31:0
  localparam logic [7:0] DUT_REG_SEED_HI = 8'h0C;  // seed x^0 bits 63:32 (N = 64)
  localparam logic [7:0] DUT_REG_SSEED   = 8'h10;  // seed of the strategy generators
  localparam logic [7:0] DUT_REG_CMD     = 8'h14;  // W: [0] load x^0, [1] reseed strategies
  localparam logic [7:0] DUT_REG_OUT_LO  = 8'h18;  // R: output bits 31:0, then one step
  localparam logic [7:0] DUT_REG_OUT_HI  = 8'h1C;  // R: bits 63:32 of the last OUT_LO read
  localparam logic [7:0] DUT_REG_COUNT   = 8'h20;  // R: outputs produced since reset

  localparam logic [31:0] DUT_ID_RESET  = 32'h4743_4930;  // "GCI0"
  localparam logic [31:0] UART_ID_RESET = 32'h5541_5254;  // "UART"
  localparam logic [31:0] DCCU_ID_RESET = 32'h4443_4355;  // "DCCU"

  // UART registers (byte offsets)
  localparam logic [7:0] UART_REG_ID     = 8'h00;  // RW identifier
  localparam logic [7:0] UART_REG_STATUS = 8'h04;  // [0] rx byte ready, [1] tx ready, [2] overrun
  localparam logic [7:0] UART_REG_RXDATA = 8'h08;  // R: received byte, clears rx ready
  localparam logic [7:0] UART_REG_TXDATA = 8'h0C;  // W: byte to send

  // Serial commands understood by the decoder command controller
  localparam logic [7:0] CMD_WRITE  = 8'h57;  // 'W' a1 a0 d3 d2 d1 d0 -> 'K' or 'E'
  localparam logic [7:0] CMD_READ   = 8'h52;  // 'R' a1 a0 -> d3 d2 d1 d0
  localparam logic [7:0] CMD_STREAM = 8'h53;  // 'S' n1 n0 -> n outputs, 4 bytes each
  localparam logic [7:0] RSP_OK     = 8'h4B;  // 'K'
  localparam logic [7:0] RSP_ERR    = 8'h45;  // 'E'
  localparam logic [7:0] RSP_UNKNOWN = 8'h3F; // '?'

endpackage
