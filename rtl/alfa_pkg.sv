// alfa_pkg: constants and types shared by the Alfa-R local and Alfa-M global
// readout controllers of one Roman Pot readout sub-system.
//
// Event format on the Alfa-R to Alfa-M serial link (71 bits, MSB first):
//   [70:68] L1 tag  = 3 LSB of the local L1-accept counter
//   [67:64] BC tag  = 4 LSB of the local bunch-crossing counter
//   [63:0]  masked front-end data
// The tag widths (3 + 4) follow the bit labels of the serial link timing
// diagram; the 71-bit total matches the derandomizer width.
//
// SPI frame (32 bits, MSB first): [31:27] ADDR, [26] R/W (1 = write),
// [25:20] OFFSET, [19:16] unused, [15:0] DATA.  ADDR 0 is the motherboard
// (Alfa-M), 1..25 are PMFs (Alfa-R), 31 is a write broadcast to all PMFs.
package alfa_pkg;

  localparam int FE_W      = 64;  // front-end channels per PMF
  localparam int BC_TAG_W  = 4;   // local BC counter bits kept with the data
  localparam int L1_TAG_W  = 3;   // local L1 counter bits kept with the event
  localparam int PIPE_W    = FE_W + BC_TAG_W;     // 68
  localparam int EVENT_W   = PIPE_W + L1_TAG_W;   // 71
  localparam int TAG_W     = BC_TAG_W + L1_TAG_W; // 7
  localparam int BCID_W    = 12;
  localparam int EVCNT_W   = 24;
  localparam int REG_W     = 16;
  localparam int OFFSET_W  = 6;
  localparam int ADDR_W    = 5;
  localparam int SPI_FRAME_W = 32;

  // SPI addresses
  localparam logic [ADDR_W-1:0] ADDR_MOTHERBOARD = 5'd0;
  localparam logic [ADDR_W-1:0] ADDR_BROADCAST   = 5'd31;

  // Alfa-R register offsets
  localparam logic [OFFSET_W-1:0] R_CONTROL = 6'h00;
  localparam logic [OFFSET_W-1:0] R_STATUS  = 6'h01;
  localparam logic [OFFSET_W-1:0] R_MASK1   = 6'h02;
  localparam logic [OFFSET_W-1:0] R_MASK2   = 6'h03;
  localparam logic [OFFSET_W-1:0] R_MASK3   = 6'h04;
  localparam logic [OFFSET_W-1:0] R_MASK4   = 6'h05;
  localparam logic [OFFSET_W-1:0] R_STREAM  = 6'h06;

  // Alfa-M register offsets
  localparam logic [OFFSET_W-1:0] M_CONTROL = 6'h00;
  localparam logic [OFFSET_W-1:0] M_STATUS  = 6'h01;

  // Control / status bit positions
  localparam int BIT_TEST_MODE   = 15;
  localparam int BIT_GAIN_ENABLE = 14;
  localparam int BIT_DAC_ENABLE  = 13;
  localparam int BIT_MUX_CLOCK   = 12;  // Alfa-R control
  localparam int BIT_MUX_HOLD    = 12;  // Alfa-R status
  localparam int BIT_TX_ERROR    = 0;   // Alfa-R status (position is this design's choice)
  localparam int BIT_GOL_READY   = 14;  // Alfa-M status
  localparam int BIT_TTC_READY   = 13;
  localparam int BIT_QPLL_ERROR  = 12;
  localparam int BIT_QPLL_LOCK   = 11;

  // Output data block words
  localparam logic [31:0] SOF_WORD = 32'hB0F0_0000;
  localparam logic [31:0] EOF_WORD = 32'hE0F0_0000;
  localparam int PMFERR_W = 25;       // one bit per position of the 5x5 PMF matrix

  typedef struct packed {
    logic [L1_TAG_W-1:0] l1;
    logic [BC_TAG_W-1:0] bc;
    logic [FE_W-1:0]     data;
  } event_word_t;

  typedef struct packed {
    logic [BCID_W-1:0]  bcid;
    logic [EVCNT_W-1:0] evcnt;
  } l1a_entry_t;

  // Configuration lines towards the Maroc front-end chip
  typedef struct packed {
    logic gain_rst;
    logic gain_d;
    logic gain_clk;
    logic dac_rst;
    logic dac_d;
    logic dac_clk;
    logic mux_hold;
    logic mux_clk;
  } maroc_cfg_t;

endpackage
