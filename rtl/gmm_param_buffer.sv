// gmm_param_buffer: double-buffered store of the Gaussian parameters of one
// HMM state.
//
// Bank 0 and bank 1 each hold the parameters of one state: for every
// mixture m and coefficient d a mean/precision pair, and for every mixture
// a constant (log mixture weight plus the Gaussian normalisation term).
// The processor fills one bank while the datapath reads the other, so that
// loading the next state hides behind computing the current one and only
// two states' worth of parameters ever sit in the accelerator, in whatever
// order the search asks for states. Which bank is written and which is read
// is decided by gmm_ctrl. The double buffering follows the document; the
// memory organisation below is this design's choice.
//
// Each bank is split into LANES narrow memories, coefficient d living in
// lane d % LANES at row m*STEPS + d / LANES, so one read returns LANES
// coefficients of one mixture. Each lane is a plain one-write, one-read
// array that maps to an FPGA block RAM.
//
// Timing: writes take effect at the next clock edge. A read at cycle n
// returns means, precisions and the mixture constant at cycle n+1.
module gmm_param_buffer #(
  parameter int unsigned DATA_W   = gmm_pkg::DATA_W_DEF,
  parameter int unsigned GCONST_W = gmm_pkg::SCORE_W,
  parameter int unsigned D        = gmm_pkg::D_DEF,
  parameter int unsigned M        = gmm_pkg::M_DEF,
  parameter int unsigned LANES    = gmm_pkg::LANES_DEF,
  localparam int unsigned STEPS  = (D + LANES - 1) / LANES,
  localparam int unsigned ROWS   = M * STEPS,
  localparam int unsigned IDX_W  = $clog2(D),
  localparam int unsigned MIX_W  = M > 1 ? $clog2(M) : 1,
  localparam int unsigned STEP_W = STEPS > 1 ? $clog2(STEPS) : 1
) (
  input  logic                       clk,
  // parameter write port (processor side)
  input  logic                       wr_bank,
  input  logic                       wr_en,
  input  logic [MIX_W-1:0]           wr_mix,
  input  logic [IDX_W-1:0]           wr_idx,
  input  logic signed [DATA_W-1:0]   wr_mean,
  input  logic        [DATA_W-1:0]   wr_prec,
  input  logic                       gc_wr_en,
  input  logic signed [GCONST_W-1:0] gc_wr_data,
  // read port (datapath side)
  input  logic                       rd_bank,
  input  logic                       rd_en,
  input  logic [MIX_W-1:0]           rd_mix,
  input  logic [STEP_W-1:0]          rd_step,
  output logic signed [DATA_W-1:0]   rd_mean [LANES],
  output logic        [DATA_W-1:0]   rd_prec [LANES],
  output logic signed [GCONST_W-1:0] rd_gconst
);

  localparam int unsigned ADDR_W = $clog2(2 * ROWS);

  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [$clog2(LANES > 1 ? LANES : 2)-1:0] wr_lane;

  always_comb begin
    automatic int unsigned d = int'(wr_idx);
    wr_lane = ($bits(wr_lane))'(d % LANES);
    wr_addr = ADDR_W'(int'(wr_bank) * ROWS + int'(wr_mix) * STEPS + d / LANES);
    rd_addr = ADDR_W'(int'(rd_bank) * ROWS + int'(rd_mix) * STEPS + int'(rd_step));
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [2*DATA_W-1:0] mem [2*ROWS];
    logic [2*DATA_W-1:0] q;

    always_ff @(posedge clk) begin
      if (wr_en && int'(wr_lane) == l && int'(wr_idx) < D && int'(wr_mix) < M)
        mem[wr_addr] <= {wr_prec, wr_mean};
      if (rd_en)
        q <= mem[rd_addr];
    end

    assign rd_mean[l] = signed'(q[DATA_W-1:0]);
    assign rd_prec[l] = q[2*DATA_W-1:DATA_W];
  end

  logic signed [GCONST_W-1:0] gconst [2][M];

  always_ff @(posedge clk) begin
    if (gc_wr_en && int'(wr_mix) < M) gconst[wr_bank][wr_mix] <= gc_wr_data;
    if (rd_en) rd_gconst <= gconst[rd_bank][rd_mix];
  end

endmodule
