// gmm_pkg: types and constants shared by the GMM emission-probability
// accelerator.
//
// The accelerator works on 16-bit fixed-point data, as the recognizer it
// serves does. Feature coefficients and means are signed, precisions
// (inverse variances, already halved) are unsigned. Scores are 32-bit signed
// log likelihoods. The register map of the host port is this design's own
// choice: the word address is {region, mixture, coefficient}, with the
// region selecting control registers, the feature vector, the mean/precision
// pairs or the per-mixture constants.
package gmm_pkg;

  // Default sizes. DATA_W follows the 16-bit fixed-point recognizer; the
  // others are chosen for a 39-coefficient MFCC front end.
  localparam int unsigned DATA_W_DEF  = 16;
  localparam int unsigned SCORE_W     = 32;
  localparam int unsigned BUS_W       = 32;
  localparam int unsigned TAG_W       = 16;
  localparam int unsigned D_DEF       = 39;  // feature coefficients
  localparam int unsigned M_DEF       = 8;   // mixtures per HMM state
  localparam int unsigned LANES_DEF   = 4;   // coefficients per cycle
  localparam int unsigned SHIFT_DEF   = 20;  // product scaling, see gmm_pe

  // Address regions (upper two bits of the word address).
  typedef enum logic [1:0] {
    RGN_REGS   = 2'd0,
    RGN_FEAT   = 2'd1,
    RGN_PARAM  = 2'd2,
    RGN_GCONST = 2'd3
  } region_e;

  // Registers in RGN_REGS, selected by the low address bits.
  localparam int unsigned REG_CMD    = 0;  // write: start, tag in [15:0]
  localparam int unsigned REG_STATUS = 1;  // read: status_t
  localparam int unsigned REG_RESULT = 2;  // read: score, pops the result

  // State of one parameter bank.
  typedef enum logic [1:0] {
    BANK_EMPTY = 2'd0,  // may be written by the host
    BANK_FULL  = 2'd1,  // loaded and started, waiting for the datapath
    BANK_BUSY  = 2'd2   // being read by the datapath
  } bank_state_e;

  // Status word as read from REG_STATUS.
  typedef struct packed {
    logic [TAG_W-1:0] result_tag;   // [31:16] tag of the held result
    logic [10:0]      reserved;     // [15:5]
    logic             stalled;      // [4] a score waits for RESULT to be read
    logic             write_error;  // [3] sticky: a write or start was dropped
    logic             result_valid; // [2] a result waits to be read
    logic             load_ready;   // [1] the load bank may be written
    logic             busy;         // [0] a computation is queued or running
  } status_t;

endpackage
