// gmm_host_if: memory-mapped slave port through which the processor drives
// the GMM accelerator.
//
// The processor writes the frame's feature vector and, for each HMM state
// to score, the state's Gaussian parameters, then starts the computation
// and later reads the score back. The port follows the simple Avalon-MM
// slave style of the soft processor's bus: word addresses, single-cycle
// writes, reads with a fixed latency of one cycle and no wait states. The
// word address is {region, mixture, coefficient}:
//
//   region 0 registers : 0 CMD (write, starts the loaded bank, tag = [15:0])
//                        1 STATUS (read, gmm_pkg::status_t; a write clears
//                          the sticky write_error flag)
//                        2 RESULT (read, signed score; the read pops it)
//   region 1 features  : coefficient d <- writedata[15:0]
//   region 2 parameters: mixture m, coefficient d <- {prec[31:16], mean[15:0]}
//   region 3 constants : mixture m <- 32-bit signed constant
//
// Packing mean and precision into one 32-bit word halves the bus writes per
// state. The bus, the map and the packing are this design's choice; the
// document only says that the processor instructs the accelerator and
// receives the result. This block only decodes: whether a write is allowed
// is decided by gmm_ctrl.
module gmm_host_if #(
  parameter int unsigned DATA_W = gmm_pkg::DATA_W_DEF,
  parameter int unsigned D      = gmm_pkg::D_DEF,
  parameter int unsigned M      = gmm_pkg::M_DEF,
  localparam int unsigned IDX_W  = $clog2(D),
  localparam int unsigned MIX_W  = M > 1 ? $clog2(M) : 1,
  localparam int unsigned ADDR_W = 2 + MIX_W + IDX_W,
  localparam int unsigned BUS_W  = gmm_pkg::BUS_W,
  localparam int unsigned TAG_W  = gmm_pkg::TAG_W,
  localparam int unsigned SCORE_W = gmm_pkg::SCORE_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // Avalon-MM style slave
  input  logic [ADDR_W-1:0]         avs_address,
  input  logic                      avs_write,
  input  logic [BUS_W-1:0]          avs_writedata,
  input  logic                      avs_read,
  output logic [BUS_W-1:0]          avs_readdata,
  // decoded writes
  output logic                      feat_wr,
  output logic                      param_wr,
  output logic                      gconst_wr,
  output logic [MIX_W-1:0]          wr_mix,
  output logic [IDX_W-1:0]          wr_idx,
  output logic signed [DATA_W-1:0]  wr_lo,
  output logic        [DATA_W-1:0]  wr_hi,
  output logic signed [SCORE_W-1:0] wr_word,
  output logic                      cmd_start,
  output logic [TAG_W-1:0]          cmd_tag,
  output logic                      result_pop,
  output logic                      err_clear,
  // register contents
  input  gmm_pkg::status_t          status,
  input  logic signed [SCORE_W-1:0] result_score
);

  import gmm_pkg::*;

  region_e rgn;

  assign rgn      = region_e'(avs_address[ADDR_W-1 -: 2]);
  assign wr_mix   = avs_address[IDX_W +: MIX_W];
  assign wr_idx   = avs_address[IDX_W-1:0];
  assign wr_lo    = signed'(avs_writedata[DATA_W-1:0]);
  assign wr_hi    = avs_writedata[2*DATA_W-1:DATA_W];
  assign wr_word  = signed'(avs_writedata);
  assign cmd_tag  = avs_writedata[TAG_W-1:0];

  assign feat_wr   = avs_write && rgn == RGN_FEAT;
  assign param_wr  = avs_write && rgn == RGN_PARAM;
  assign gconst_wr = avs_write && rgn == RGN_GCONST;
  assign cmd_start = avs_write && rgn == RGN_REGS && int'(avs_address[IDX_W-1:0]) == REG_CMD;
  assign err_clear = avs_write && rgn == RGN_REGS && int'(avs_address[IDX_W-1:0]) == REG_STATUS;
  assign result_pop = avs_read && rgn == RGN_REGS && int'(avs_address[IDX_W-1:0]) == REG_RESULT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata <= '0;
    end else if (avs_read) begin
      avs_readdata <= '0;
      if (rgn == RGN_REGS) begin
        unique case (int'(avs_address[IDX_W-1:0]))
          REG_STATUS: avs_readdata <= status;
          REG_RESULT: avs_readdata <= result_score;
          default:    avs_readdata <= '0;
        endcase
      end
    end
  end

endmodule
