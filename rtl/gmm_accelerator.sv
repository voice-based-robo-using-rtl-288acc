// gmm_accelerator: GMM emission-probability coprocessor for an HMM speech
// recognizer.
//
// A soft processor runs feature extraction and the Viterbi token-passing
// search; for every active HMM state whose token survives beam pruning it
// needs the log emission probability of the frame's feature vector under
// that state's Gaussian mixture, and this block computes it. The processor
// writes the D-coefficient feature vector once per frame, then for each
// state writes the M mixtures' means, precisions and constants into the
// load bank of a double buffer and starts it with a tag (for instance the
// state number). While the datapath reads one bank, the processor already
// fills the other, so parameter transfer and computation overlap and the
// accelerator needs room for two states only, whatever order the search
// visits them in. LANES coefficients are processed per cycle.
//
// Blocks: gmm_host_if (bus slave and register map), gmm_ctrl (bank states,
// sequencing, result register), gmm_feature_buffer, gmm_param_buffer (the
// double buffer) and gmm_datapath (lanes, adder tree, accumulation,
// mixture maximum). The split into processor and accelerator, the double
// buffering, the parallel lanes and the 16-bit data follow the document;
// the bus, register map, sizes D/M/LANES and the arithmetic details are
// this design's choices and are listed in the README.
//
// Interface: Avalon-MM style slave, word addressed, read latency 1, no wait
// states; see gmm_host_if for the map and gmm_pkg::status_t for STATUS.
// Timing: a state takes M*ceil(D/LANES) + 8 cycles from its start command to
// result_valid when the result register is free and no other state is
// being computed.
module gmm_accelerator #(
  parameter int unsigned DATA_W = gmm_pkg::DATA_W_DEF,
  parameter int unsigned D      = gmm_pkg::D_DEF,
  parameter int unsigned M      = gmm_pkg::M_DEF,
  parameter int unsigned LANES  = gmm_pkg::LANES_DEF,
  parameter int unsigned SHIFT  = gmm_pkg::SHIFT_DEF,
  localparam int unsigned IDX_W  = $clog2(D),
  localparam int unsigned MIX_W  = M > 1 ? $clog2(M) : 1,
  localparam int unsigned ADDR_W = 2 + MIX_W + IDX_W,
  localparam int unsigned BUS_W  = gmm_pkg::BUS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_write,
  input  logic [BUS_W-1:0]  avs_writedata,
  input  logic              avs_read,
  output logic [BUS_W-1:0]  avs_readdata
);

  import gmm_pkg::*;

  localparam int unsigned STEPS  = (D + LANES - 1) / LANES;
  localparam int unsigned STEP_W = STEPS > 1 ? $clog2(STEPS) : 1;

  // host interface
  logic                      feat_wr, param_wr, gconst_wr, cmd_start, result_pop, err_clear;
  logic [MIX_W-1:0]          wr_mix;
  logic [IDX_W-1:0]          wr_idx;
  logic signed [DATA_W-1:0]  wr_lo;
  logic        [DATA_W-1:0]  wr_hi;
  logic signed [SCORE_W-1:0] wr_word;
  logic [TAG_W-1:0]          cmd_tag;
  status_t                   status;

  // controller
  logic                      wr_bank, load_ready, feat_wr_allow, busy, write_error;
  logic                      result_valid, stall;
  logic [TAG_W-1:0]          result_tag;
  logic signed [SCORE_W-1:0] result_score;
  logic                      rd_en, rd_bank;
  logic [MIX_W-1:0]          rd_mix;
  logic [STEP_W-1:0]         rd_step;
  logic                      dp_valid, dp_first, dp_last, dp_first_mix, dp_last_mix;
  logic                      dp_out_valid;
  logic signed [SCORE_W-1:0] dp_out_score;

  // buffers
  logic signed [DATA_W-1:0]  feat_q [LANES];
  logic [LANES-1:0]          feat_mask;
  logic signed [DATA_W-1:0]  mean_q [LANES];
  logic        [DATA_W-1:0]  prec_q [LANES];
  logic signed [SCORE_W-1:0] gconst_q;

  assign status = '{result_tag: result_tag, reserved: '0, stalled: stall, write_error: write_error,
                    result_valid: result_valid, load_ready: load_ready, busy: busy};

  gmm_host_if #(.DATA_W(DATA_W), .D(D), .M(M)) u_host_if (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata,
    .feat_wr, .param_wr, .gconst_wr, .wr_mix, .wr_idx, .wr_lo, .wr_hi, .wr_word,
    .cmd_start, .cmd_tag, .result_pop, .err_clear,
    .status, .result_score
  );

  gmm_ctrl #(.D(D), .M(M), .LANES(LANES)) u_ctrl (
    .clk, .rst_n,
    .cmd_start, .cmd_tag,
    .param_wr_req (param_wr || gconst_wr),
    .feat_wr_req  (feat_wr),
    .result_pop, .err_clear,
    .wr_bank, .load_ready, .feat_wr_allow, .busy, .write_error,
    .result_valid, .result_tag, .result_score, .stall,
    .rd_en, .rd_bank, .rd_mix, .rd_step,
    .dp_valid, .dp_first, .dp_last, .dp_first_mix, .dp_last_mix,
    .dp_out_valid, .dp_out_score
  );

  gmm_feature_buffer #(.DATA_W(DATA_W), .D(D), .LANES(LANES)) u_feat (
    .clk, .rst_n,
    .wr_en   (feat_wr && feat_wr_allow),
    .wr_idx  (wr_idx),
    .wr_data (wr_lo),
    .rd_en   (rd_en),
    .rd_step (rd_step),
    .rd_data (feat_q),
    .rd_mask (feat_mask)
  );

  gmm_param_buffer #(.DATA_W(DATA_W), .GCONST_W(SCORE_W), .D(D), .M(M), .LANES(LANES)) u_params (
    .clk,
    .wr_bank    (wr_bank),
    .wr_en      (param_wr && load_ready),
    .wr_mix     (wr_mix),
    .wr_idx     (wr_idx),
    .wr_mean    (wr_lo),
    .wr_prec    (wr_hi),
    .gc_wr_en   (gconst_wr && load_ready),
    .gc_wr_data (wr_word),
    .rd_bank    (rd_bank),
    .rd_en      (rd_en),
    .rd_mix     (rd_mix),
    .rd_step    (rd_step),
    .rd_mean    (mean_q),
    .rd_prec    (prec_q),
    .rd_gconst  (gconst_q)
  );

  gmm_datapath #(.DATA_W(DATA_W), .SCORE_W(SCORE_W), .LANES(LANES), .SHIFT(SHIFT)) u_dp (
    .clk, .rst_n,
    .in_valid     (dp_valid),
    .in_first     (dp_first),
    .in_last      (dp_last),
    .in_first_mix (dp_first_mix),
    .in_last_mix  (dp_last_mix),
    .in_mask      (feat_mask),
    .in_o         (feat_q),
    .in_mean      (mean_q),
    .in_prec      (prec_q),
    .in_gconst    (gconst_q),
    .out_valid    (dp_out_valid),
    .out_score    (dp_out_score)
  );

endmodule
