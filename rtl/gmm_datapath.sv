// gmm_datapath: computes the log emission probability of one HMM state.
//
// For a diagonal-covariance Gaussian mixture the log likelihood of mixture
// m is  g_m - sum_d prec_md * (o_d - mu_md)^2,  where g_m holds the log
// mixture weight and the normalisation term and prec_md = 1/(2 sigma_md^2).
// LANES gmm_pe lanes form LANES terms per cycle, an adder tree sums them,
// an accumulator adds the STEPS partial sums of one mixture, and the
// mixture scores are combined into the state's score. The combination uses
// the maximum over mixtures (the usual approximation of the log of a sum in
// fixed-point recognizers): this choice, the pipeline and all widths are
// this design's own; the document gives the function and the parallel lanes.
//
// Interface: one beat per cycle carries LANES coefficients of one mixture
// with its means, precisions, lane mask and constant g_m. in_first/in_last
// mark the first and last beat of a mixture, in_first_mix/in_last_mix the
// first and last mixture of the state. Beats of a state need not be
// back to back.
//
// Timing: out_valid rises 5 cycles after the last beat of the last mixture
// (2 in the lanes, 1 in the adder tree, 1 in the accumulator, 1 in the
// mixture combiner). Scores saturate to the signed SCORE_W range.
module gmm_datapath #(
  parameter int unsigned DATA_W   = gmm_pkg::DATA_W_DEF,
  parameter int unsigned SCORE_W  = gmm_pkg::SCORE_W,
  parameter int unsigned LANES    = gmm_pkg::LANES_DEF,
  parameter int unsigned SHIFT    = gmm_pkg::SHIFT_DEF,
  parameter int unsigned ACC_W    = 40
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic                      in_last,
  input  logic                      in_first_mix,
  input  logic                      in_last_mix,
  input  logic [LANES-1:0]          in_mask,
  input  logic signed [DATA_W-1:0]  in_o     [LANES],
  input  logic signed [DATA_W-1:0]  in_mean  [LANES],
  input  logic        [DATA_W-1:0]  in_prec  [LANES],
  input  logic signed [SCORE_W-1:0] in_gconst,
  output logic                      out_valid,
  output logic signed [SCORE_W-1:0] out_score
);

  localparam int unsigned TERM_W = 3 * DATA_W + 2 - SHIFT;
  localparam logic signed [ACC_W+1:0] SMAX = (ACC_W+2)'({1'b0, {(SCORE_W-1){1'b1}}});
  localparam logic signed [ACC_W+1:0] SMIN = -SMAX - 1;

  typedef struct packed {
    logic                      valid;
    logic                      first;
    logic                      last;
    logic                      first_mix;
    logic                      last_mix;
    logic signed [SCORE_W-1:0] gconst;
  } side_t;

  // ---- lanes (2 cycles) ----------------------------------------------
  logic [TERM_W-1:0] term  [LANES];
  logic [LANES-1:0]  lane_v;

  for (genvar l = 0; l < LANES; l++) begin : g_pe
    gmm_pe #(.DATA_W(DATA_W), .SHIFT(SHIFT), .TERM_W(TERM_W)) u_pe (
      .clk, .rst_n,
      .in_valid (in_valid),
      .lane_en  (in_mask[l]),
      .o        (in_o[l]),
      .mu       (in_mean[l]),
      .prec     (in_prec[l]),
      .out_valid(lane_v[l]),
      .term     (term[l])
    );
  end

  side_t s0, s1, s2, s3;
  assign s0 = '{valid: in_valid, first: in_first, last: in_last,
                first_mix: in_first_mix, last_mix: in_last_mix, gconst: in_gconst};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= s0;
      s2 <= s1;
      s3 <= s2;
    end
  end

  // ---- adder tree (1 cycle) -------------------------------------------
  logic [ACC_W-1:0] tree_sum, step_sum;

  always_comb begin
    tree_sum = '0;
    for (int l = 0; l < LANES; l++) tree_sum += ACC_W'(term[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_sum <= '0;
    else        step_sum <= tree_sum;
  end

  // ---- accumulator (1 cycle) ------------------------------------------
  logic [ACC_W-1:0]           acc, acc_next;
  logic signed [ACC_W+1:0]    mix_wide;
  logic signed [SCORE_W-1:0]  mix_score;
  logic                       mix_valid, mix_first, mix_last;

  assign acc_next = s3.first ? step_sum : acc + step_sum;
  assign mix_wide = (ACC_W+2)'(s3.gconst) - signed'({2'b00, acc_next});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      mix_valid <= 1'b0;
      mix_first <= 1'b0;
      mix_last  <= 1'b0;
      mix_score <= '0;
    end else begin
      mix_valid <= s3.valid && s3.last;
      if (s3.valid) begin
        acc       <= acc_next;
        mix_first <= s3.first_mix;
        mix_last  <= s3.last_mix;
        if (mix_wide < SMIN)      mix_score <= SMIN[SCORE_W-1:0];
        else if (mix_wide > SMAX) mix_score <= SMAX[SCORE_W-1:0];
        else                      mix_score <= mix_wide[SCORE_W-1:0];
      end
    end
  end

  // ---- mixture combiner (1 cycle) -------------------------------------
  logic signed [SCORE_W-1:0] best, best_next;

  assign best_next = (mix_first || mix_score > best) ? mix_score : best;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best      <= '0;
      out_valid <= 1'b0;
      out_score <= '0;
    end else begin
      out_valid <= mix_valid && mix_last;
      if (mix_valid) begin
        best <= best_next;
        if (mix_last) out_score <= best_next;
      end
    end
  end

  // The lanes and the side pipeline must stay in step.
  assert property (@(posedge clk) disable iff (!rst_n) lane_v == {LANES{s2.valid}});

endmodule
