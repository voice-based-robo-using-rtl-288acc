// gmm_ctrl: controller of the GMM accelerator.
//
// It owns the double buffer. Each of the two parameter banks is EMPTY (the
// processor may fill it), FULL (filled and started, waiting) or BUSY (being
// read). The processor always loads the bank under wr_bank; a start command
// marks that bank FULL with the command's tag and moves wr_bank to the other
// bank, so the processor can load the next HMM state at once while this one
// is computed. The sequencer takes FULL banks in order (rd_bank), reads
// mixture 0..M-1, coefficient group 0..STEPS-1, one group per cycle, hands
// the bank back as EMPTY as soon as its last word has been read, and waits
// for the datapath's score. The score and its tag go to a one-entry result
// register that the processor pops; if that register is still full, the
// sequencer stalls until it is read. Starts, parameter writes into a bank
// that is not EMPTY and feature writes while work is queued or running are
// dropped and set the sticky write_error flag, which err_clear resets.
//
// The processor starting the accelerator and reading back its result, and
// the double buffering, follow the document; the bank states, the result
// register, the stall and the error rule are this design's choices.
//
// Timing: a started bank found FULL in S_IDLE is read from the next cycle
// on, M*STEPS cycles in a row. The datapath beat that goes with read
// request n is presented (dp_*) one cycle later, together with the buffer
// outputs. The result register is written in the cycle the datapath's
// out_valid arrives, unless it is full. One state takes M*STEPS + 8 cycles
// from start to result_valid when nothing stalls.
module gmm_ctrl #(
  parameter int unsigned D     = gmm_pkg::D_DEF,
  parameter int unsigned M     = gmm_pkg::M_DEF,
  parameter int unsigned LANES = gmm_pkg::LANES_DEF,
  localparam int unsigned STEPS  = (D + LANES - 1) / LANES,
  localparam int unsigned MIX_W  = M > 1 ? $clog2(M) : 1,
  localparam int unsigned STEP_W = STEPS > 1 ? $clog2(STEPS) : 1,
  localparam int unsigned TAG_W  = gmm_pkg::TAG_W,
  localparam int unsigned SCORE_W = gmm_pkg::SCORE_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // processor side
  input  logic                      cmd_start,
  input  logic [TAG_W-1:0]          cmd_tag,
  input  logic                      param_wr_req,
  input  logic                      feat_wr_req,
  input  logic                      result_pop,
  input  logic                      err_clear,
  output logic                      wr_bank,
  output logic                      load_ready,
  output logic                      feat_wr_allow,
  output logic                      busy,
  output logic                      write_error,
  output logic                      result_valid,
  output logic [TAG_W-1:0]          result_tag,
  output logic signed [SCORE_W-1:0] result_score,
  output logic                      stall,
  // buffer read side
  output logic                      rd_en,
  output logic                      rd_bank,
  output logic [MIX_W-1:0]          rd_mix,
  output logic [STEP_W-1:0]         rd_step,
  // datapath side, aligned with the buffer outputs
  output logic                      dp_valid,
  output logic                      dp_first,
  output logic                      dp_last,
  output logic                      dp_first_mix,
  output logic                      dp_last_mix,
  input  logic                      dp_out_valid,
  input  logic signed [SCORE_W-1:0] dp_out_score
);

  import gmm_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_HOLD} state_e;

  state_e                    state;
  bank_state_e               bank_st [2];
  logic [TAG_W-1:0]          bank_tag [2];
  logic [TAG_W-1:0]          cur_tag;
  logic signed [SCORE_W-1:0] pend_score;

  logic last_step, last_mix, start_ok, slot_free;

  assign last_step = (int'(rd_step) == STEPS - 1);
  assign last_mix  = (int'(rd_mix) == M - 1);
  assign load_ready = (bank_st[wr_bank] == BANK_EMPTY);
  assign busy = (state != S_IDLE) || (bank_st[0] != BANK_EMPTY) || (bank_st[1] != BANK_EMPTY);
  assign feat_wr_allow = !busy;
  assign start_ok = cmd_start && load_ready;
  assign slot_free = !result_valid || result_pop;
  assign rd_en = (state == S_RUN);
  assign stall = (state == S_HOLD) && !slot_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      bank_st      <= '{BANK_EMPTY, BANK_EMPTY};
      bank_tag     <= '{'0, '0};
      wr_bank      <= 1'b0;
      rd_bank      <= 1'b0;
      rd_mix       <= '0;
      rd_step      <= '0;
      cur_tag      <= '0;
      pend_score   <= '0;
      write_error  <= 1'b0;
      result_valid <= 1'b0;
      result_tag   <= '0;
      result_score <= '0;
    end else begin
      // processor commands
      if (start_ok) begin
        bank_st[wr_bank]  <= BANK_FULL;
        bank_tag[wr_bank] <= cmd_tag;
        wr_bank           <= !wr_bank;
      end
      if ((cmd_start && !load_ready) || (param_wr_req && !load_ready) ||
          (feat_wr_req && !feat_wr_allow))
        write_error <= 1'b1;
      else if (err_clear)
        write_error <= 1'b0;
      if (result_pop) result_valid <= 1'b0;

      // sequencer
      unique case (state)
        S_IDLE: begin
          if (bank_st[rd_bank] == BANK_FULL) begin
            bank_st[rd_bank] <= BANK_BUSY;
            cur_tag          <= bank_tag[rd_bank];
            rd_mix           <= '0;
            rd_step          <= '0;
            state            <= S_RUN;
          end
        end
        S_RUN: begin
          if (last_step) begin
            rd_step <= '0;
            if (last_mix) begin
              bank_st[rd_bank] <= BANK_EMPTY;
              rd_bank          <= !rd_bank;
              state            <= S_DRAIN;
            end else begin
              rd_mix <= rd_mix + 1'b1;
            end
          end else begin
            rd_step <= rd_step + 1'b1;
          end
        end
        S_DRAIN: begin
          if (dp_out_valid) begin
            pend_score <= dp_out_score;
            if (slot_free) begin
              result_valid <= 1'b1;
              result_tag   <= cur_tag;
              result_score <= dp_out_score;
              state        <= S_IDLE;
            end else begin
              state <= S_HOLD;
            end
          end
        end
        S_HOLD: begin
          if (slot_free) begin
            result_valid <= 1'b1;
            result_tag   <= cur_tag;
            result_score <= pend_score;
            state        <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Sideband for the datapath, delayed to line up with the buffer read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid     <= 1'b0;
      dp_first     <= 1'b0;
      dp_last      <= 1'b0;
      dp_first_mix <= 1'b0;
      dp_last_mix  <= 1'b0;
    end else begin
      dp_valid     <= rd_en;
      dp_first     <= rd_en && rd_step == '0;
      dp_last      <= rd_en && last_step;
      dp_first_mix <= rd_en && rd_mix == '0;
      dp_last_mix  <= rd_en && last_mix;
    end
  end

  // The bank being read is marked BUSY, so the processor cannot load it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_RUN |-> bank_st[rd_bank] == BANK_BUSY);
  // A datapath result only arrives while one is awaited.
  assert property (@(posedge clk) disable iff (!rst_n)
                   dp_out_valid |-> state == S_DRAIN);

endmodule
