// gmm_pe: one parallel lane of the GMM datapath.
//
// Computes the weighted squared distance of one feature coefficient from
// the mean of one Gaussian, term = (prec * (o - mu)^2) >> SHIFT, which is
// the per-dimension part of a diagonal-covariance Gaussian log likelihood.
// The accelerator places LANES of these side by side to work on several
// coefficients per cycle (the data parallelism of the design); the lane
// itself, its width and its two-stage pipeline are this design's choice.
//
// Timing: two register stages. in_valid/lane_en at cycle n give out_valid
// and term at cycle n+2. A lane with lane_en low (a padding slot past the
// last coefficient) yields a zero term. With o, mu in Q.8 and prec in Q.12
// the default SHIFT of 20 leaves the term in Q.8.
module gmm_pe #(
  parameter int unsigned DATA_W = gmm_pkg::DATA_W_DEF,
  parameter int unsigned SHIFT  = gmm_pkg::SHIFT_DEF,
  parameter int unsigned TERM_W = 3 * DATA_W + 2 - SHIFT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     lane_en,
  input  logic signed [DATA_W-1:0] o,
  input  logic signed [DATA_W-1:0] mu,
  input  logic        [DATA_W-1:0] prec,
  output logic                     out_valid,
  output logic        [TERM_W-1:0] term
);

  localparam int unsigned SQ_W   = 2 * DATA_W + 2;
  localparam int unsigned PROD_W = SQ_W + DATA_W;

  logic signed   [DATA_W:0] diff;
  logic signed [SQ_W-1:0]   sq_s;
  logic        [SQ_W-1:0] sq_q;
  logic      [DATA_W-1:0] prec_q;
  logic                   v_q;
  logic      [PROD_W-1:0] prod;

  assign diff = (DATA_W+1)'(o) - (DATA_W+1)'(mu);
  assign sq_s = SQ_W'(diff) * SQ_W'(diff);
  assign prod = sq_q * PROD_W'(prec_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_q      <= '0;
      prec_q    <= '0;
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      term      <= '0;
    end else begin
      v_q       <= in_valid;
      sq_q      <= lane_en ? unsigned'(sq_s) : '0;
      prec_q    <= prec;
      out_valid <= v_q;
      term      <= TERM_W'(prod >> SHIFT);
    end
  end

endmodule
