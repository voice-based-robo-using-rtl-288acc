// gmm_feature_buffer: holds the acoustic feature vector o_t of the current
// speech frame.
//
// The processor writes the D coefficients one at a time, once per frame.
// The datapath reads them LANES at a time: read step s returns coefficients
// s*LANES .. s*LANES+LANES-1, together with a mask that is low for the
// slots past coefficient D-1 in the last step. Being written once per frame
// and read by every Gaussian of every active state, the vector is kept in
// registers so all lanes can be read in one cycle. Sizes and timing are this
// design's choice.
//
// Timing: writes take effect at the next clock edge. A read request at
// cycle n presents its data and mask at cycle n+1 (registered, to line up
// with the parameter buffer's synchronous read).
module gmm_feature_buffer #(
  parameter int unsigned DATA_W = gmm_pkg::DATA_W_DEF,
  parameter int unsigned D      = gmm_pkg::D_DEF,
  parameter int unsigned LANES  = gmm_pkg::LANES_DEF,
  localparam int unsigned STEPS  = (D + LANES - 1) / LANES,
  localparam int unsigned IDX_W  = $clog2(D),
  localparam int unsigned STEP_W = STEPS > 1 ? $clog2(STEPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port (processor side)
  input  logic                     wr_en,
  input  logic [IDX_W-1:0]         wr_idx,
  input  logic signed [DATA_W-1:0] wr_data,
  // read port (datapath side)
  input  logic                     rd_en,
  input  logic [STEP_W-1:0]        rd_step,
  output logic signed [DATA_W-1:0] rd_data [LANES],
  output logic [LANES-1:0]         rd_mask
);

  logic signed [DATA_W-1:0] feat [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) feat[i] <= '0;
    end else if (wr_en && int'(wr_idx) < D) begin
      feat[wr_idx] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) rd_data[l] <= '0;
      rd_mask <= '0;
    end else if (rd_en) begin
      for (int l = 0; l < LANES; l++) begin
        automatic int unsigned d = int'(rd_step) * LANES + l;
        rd_data[l] <= (d < D) ? feat[d] : '0;
        rd_mask[l] <= (d < D);
      end
    end
  end

endmodule
