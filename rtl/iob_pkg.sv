// iob_pkg: constants and types shared by the calorimeter I/O board (IOB)
// controller. The system clock is 59.5 MHz; the sample period is 16 system
// clocks (3.7 MHz). Fast control opcodes are 5 bits, sent C0 first; C0 is
// taken as the most significant bit, as the calibration DAC value is also
// sent most significant bit first. Register lengths are those the board
// description gives (control 8, calibration control 6, calibration DAC 16,
// CARE register 6 is 8 bits); the length of CARE registers 0-5 is not given
// and is a parameter of the receiver.
package iob_pkg;


  // Global fast control strobe opcodes
  typedef enum logic [4:0] {
    OP_NOP       = 5'h00,
    OP_CLEAR     = 5'h01,
    OP_SYNC      = 5'h02,
    OP_L1A       = 5'h03,
    OP_READ_EVT  = 5'h04,
    OP_CAL       = 5'h05,
    OP_RD_CTRL   = 5'h16,
    OP_RD_DAC    = 5'h17,
    OP_RD_CAL    = 5'h18,
    OP_RD_CARE   = 5'h19,
    OP_WR_CTRL   = 5'h1A,
    OP_WR_DAC    = 5'h1B,
    OP_WR_CAL    = 5'h1C,
    OP_WR_CARE   = 5'h1D,
    OP_LRESET    = 5'h1E,
    OP_RESERVED  = 5'h1F
  } fc_opcode_e;

  // Target of a fast control register access
  typedef enum logic [2:0] {
    TGT_NONE = 3'd0,
    TGT_CARE = 3'd1,
    TGT_CAL  = 3'd2,
    TGT_DAC  = 3'd3,
    TGT_CTRL = 3'd4
  } fc_target_e;

  // Decoded register access request handed from the C-LINK receiver to the
  // register engine
  typedef struct packed {
    logic       write;    // 1: write (data follows on C-LINK), 0: read
    fc_target_e target;
    logic [2:0] care;     // CARE register number 0..6
    logic [9:0] header;   // C0..C4, A0..A4 in arrival order (bit 9 = C0)
  } fc_req_t;

  // Register lengths in data bits
  localparam int unsigned CTRL_BITS  = 8;
  localparam int unsigned CAL_BITS   = 6;
  localparam int unsigned DAC_BITS   = 16;
  localparam int unsigned CARE6_BITS = 8;

  // Control register bit positions
  localparam int unsigned CR_LINK_ENABLE = 0;
  localparam int unsigned CR_LINKTEST    = 1;
  localparam int unsigned CR_DCLKSEL     = 2;
  localparam int unsigned CR_FIN_RESET_N = 3;
  localparam int unsigned CR_FIN_OFF     = 4;
  localparam int unsigned CR_GLINK_RST_N = 5;
  localparam int unsigned CR_SERNOSEL    = 6;

  // Decoded control register
  typedef struct packed {
    logic sernosel;
    logic glink_reset_n;
    logic fin_off;
    logic fin_reset_n;
    logic dclksel;
    logic linktest;
    logic link_enable;
  } ctrl_t;

  // One crystal sample: range bits and 10-bit ADC value
  typedef struct packed {
    logic [1:0] range;
    logic [9:0] adc;
  } sample_t;

  // Calibration strobe length: 500 us at 59.5 MHz
  localparam int unsigned CAL_STROBE_CYCLES = 29750;

endpackage
