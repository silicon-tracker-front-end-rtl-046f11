// Shared constants and types of the silicon-tracker readout.
//
// A tracker layer holds a row of 64-channel front-end (FE) chips with a
// readout controller chip at each end. Both chip types are commanded over a
// serial line with the frame "1 aaaaa ccc ddd..": a start bit, a 5-bit
// address, a 3-bit command code and a command-dependent number of data bits,
// all sent most significant bit first. Address 31 is treated as "all chips"
// (a choice of this design: five address bits and at most 31 layers leave it
// free). The numbers below are those of the tracker: 25 chips of 64 channels
// per layer, a 207-bit FE control register, a 10-bit controller register,
// 8 FE event buffers, 2 controller event buffers and 11-bit readout words.
package trk_pkg;

  // ---- sizes --------------------------------------------------------------
  localparam int unsigned NCH        = 64;   // channels per FE chip
  localparam int unsigned NFE        = 25;   // FE chips per layer
  localparam int unsigned ADDR_W     = 5;    // chip / layer address bits
  localparam int unsigned CODE_W     = 3;    // command code bits
  localparam int unsigned DAC_W      = 7;    // calibration and threshold DACs
  localparam int unsigned FE_CR_W    = 3*NCH + 2*DAC_W + 1;  // 207
  localparam int unsigned CC_CR_W    = 10;   // controller control register
  localparam int unsigned WORD_W     = 11;   // readout word (hit address)
  localparam int unsigned NHIT_W     = 6;    // hit-count field of a packet
  localparam int unsigned MAX_HITS   = (1 << NHIT_W) - 1;    // 63 stored hits
  localparam int unsigned TOT_W      = 9;    // time-over-threshold field
  localparam int unsigned FE_FIFO_D  = 8;    // FE event buffers
  localparam int unsigned TOT_FIFO_D = 8;    // controller ToT entries
  localparam int unsigned TRG_WINDOW = 32;   // 1.6 us at 20 MHz
  localparam logic [ADDR_W-1:0] BCAST = '1;  // address 31: every chip

  // ---- FE command codes (order of the FE command list) -------------------
  typedef enum logic [CODE_W-1:0] {
    FE_LOAD_CR   = 3'd0,
    FE_READ      = 3'd1,
    FE_END_READ  = 3'd2,
    FE_CLEAR     = 3'd3,
    FE_CAL       = 3'd4,
    FE_RESET     = 3'd5,
    FE_RESET_FIFO= 3'd6
  } fe_cmd_e;

  // ---- controller command codes (order of the controller command list) ---
  typedef enum logic [CODE_W-1:0] {
    CC_LOAD_CR    = 3'd0,
    CC_CLEAR      = 3'd1,
    CC_READ       = 3'd2,
    CC_LOAD_FE_CR = 3'd3,
    CC_FE_CLK     = 3'd4,
    CC_CAL        = 3'd5,
    CC_FE_RESET   = 3'd6,
    CC_RESET      = 3'd7
  } cc_cmd_e;

  // ---- FE control register, 207 bits, packed as listed -------------------
  typedef struct packed {
    logic [NCH-1:0]   cal_mask;   // 1: channel receives calibration charge
    logic [NCH-1:0]   trig_mask;  // 1: channel may fire the trigger
    logic [NCH-1:0]   data_mask;  // 1: channel's hits are recorded
    logic [DAC_W-1:0] cal_dac;
    logic [DAC_W-1:0] thr_dac;
    logic             right;      // 0: shift data to the left controller
  } fe_cr_t;

  // ---- controller control register, 10 bits -------------------------------
  typedef struct packed {
    logic [ADDR_W-1:0] nchips;    // number of FE chips to read out
    logic              cksum_en;  // append an 11-bit check-sum
    logic              xy_coinc;  // require x-y coincidence (stored only)
    logic              req_trig;  // require a trigger from this layer
    logic [1:0]        spare;
  } cc_cr_t;

  // ---- one ToT FIFO entry --------------------------------------------------
  typedef struct packed {
    logic             trig;       // this layer produced the trigger
    logic [TOT_W-1:0] tot;        // time over threshold, clock cycles
  } tot_entry_t;

  // ---- header of one event held by a controller ---------------------------
  typedef struct packed {
    logic              ctrl;      // control bit 1: control-register packet
    logic              trunc;     // control bit 2: readout truncated
    logic [NHIT_W-1:0] nhits;
    logic [TOT_W-1:0]  tot;
  } evt_hdr_t;

  // Number of data bits that follow the header of a controller command.
  function automatic int unsigned cc_data_len(logic [CODE_W-1:0] code);
    case (code)
      CC_LOAD_CR:    return CC_CR_W;
      CC_LOAD_FE_CR: return ADDR_W + FE_CR_W;
      CC_FE_CLK:     return 1;
      default:       return 0;
    endcase
  endfunction

  // Number of data bits that follow the header of an FE command.
  function automatic int unsigned fe_data_len(logic [CODE_W-1:0] code);
    return (code == FE_LOAD_CR) ? FE_CR_W : 0;
  endfunction

endpackage
