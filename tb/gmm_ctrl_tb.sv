// gmm_ctrl_tb: self-checking test of the accelerator controller.
//
// A small model stands in for the datapath: it returns, five cycles after
// the last beat of a state (the datapath's latency), a score derived from
// the number of beats it saw, so that a skipped or repeated beat shows. The
// test checks the read order (mixture-major, all steps of a mixture in a
// row, one per cycle, from the right bank), the sideband flags, the bank
// hand-over of the double buffer (load_ready, wr_bank), that a start or a
// parameter write with no free bank and a feature write while busy are
// dropped and flagged, that a finished score waits while the result
// register is full (stall) and is delivered with its own tag once the
// register is read, and the cycles from start to result.
module gmm_ctrl_tb;
  localparam int D     = 39;
  localparam int M     = 8;
  localparam int LANES = 4;
  localparam int STEPS = (D + LANES - 1) / LANES;
  localparam int MIX_W = $clog2(M);
  localparam int STEP_W = $clog2(STEPS);
  localparam int START_TO_RESULT = M * STEPS + 8;

  logic clk = 0, rst_n = 0;
  logic cmd_start, param_wr_req, feat_wr_req, result_pop, err_clear;
  logic [15:0] cmd_tag, result_tag;
  logic wr_bank, load_ready, feat_wr_allow, busy, write_error, result_valid, stall;
  logic signed [31:0] result_score, dp_out_score;
  logic rd_en, rd_bank;
  logic [MIX_W-1:0] rd_mix;
  logic [STEP_W-1:0] rd_step;
  logic dp_valid, dp_first, dp_last, dp_first_mix, dp_last_mix, dp_out_valid;

  int checks = 0, failures = 0;
  int stalls = 0;

  gmm_ctrl #(.D(D), .M(M), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---- datapath model and read-order monitor ---------------------------
  int exp_mix = 0, exp_step = 0, beats = 0, bank_seen = -1;
  logic [4:0] done_sr;
  int score_sr [5];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done_sr <= '0;
    end else begin
      done_sr <= {done_sr[3:0], dp_valid && dp_last && dp_last_mix};
      score_sr[0] <= 1000 * beats + 1000;
      for (int i = 1; i < 5; i++) score_sr[i] <= score_sr[i-1];
      if (dp_valid) begin
        beats <= (dp_last && dp_last_mix) ? 0 : beats + 1;
      end
    end
  end
  assign dp_out_valid = done_sr[4];
  assign dp_out_score = score_sr[4];

  // rd_* order and sideband (checked at the negedge after a read request)
  logic       prev_rd;
  int         prev_mix, prev_step;
  always @(negedge clk) if (rst_n) begin
    if (rd_en) begin
      check(int'(rd_mix) == exp_mix && int'(rd_step) == exp_step,
            $sformatf("read order m%0d s%0d exp m%0d s%0d", rd_mix, rd_step, exp_mix, exp_step));
      if (exp_step == STEPS - 1) begin
        exp_step = 0;
        exp_mix  = (exp_mix + 1) % M;
      end else exp_step++;
    end
    if (prev_rd) begin
      check(dp_valid && dp_first == (prev_step == 0) && dp_last == (prev_step == STEPS - 1) &&
            dp_first_mix == (prev_mix == 0) && dp_last_mix == (prev_mix == M - 1), "sideband");
    end else begin
      check(!dp_valid, "no beat without a read");
    end
    prev_rd = rd_en; prev_mix = int'(rd_mix); prev_step = int'(rd_step);
    if (stall) stalls++;
  end

  // ---- helpers ----------------------------------------------------------
  task automatic start(int tag);
    @(negedge clk);
    cmd_start = 1; cmd_tag = 16'(tag);
    @(negedge clk);
    cmd_start = 0;
  endtask

  task automatic pop(output int tag, output int score);
    @(negedge clk);
    tag = int'(result_tag); score = int'(result_score);
    result_pop = 1;
    @(negedge clk);
    result_pop = 0;
  endtask

  initial begin
    int tag, score, t0, t1;
    const int EXP_SCORE = 1000 * M * STEPS;
    cmd_start = 0; cmd_tag = 0; param_wr_req = 0; feat_wr_req = 0; result_pop = 0; err_clear = 0;
    prev_rd = 0; prev_mix = 0; prev_step = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(load_ready && !busy && !wr_bank && !result_valid && !write_error, "after reset");
    check(feat_wr_allow, "features writable when idle");

    // single state: latency and bank hand-over
    @(negedge clk);
    t0 = $time;
    cmd_start = 1; cmd_tag = 16'(11);
    @(negedge clk);
    cmd_start = 0;
    check(wr_bank == 1 && load_ready, "second bank offered at once");
    check(busy && !feat_wr_allow, "busy after start");
    while (!result_valid) @(negedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == START_TO_RESULT,
          $sformatf("start to result %0d cycles, exp %0d", (t1 - t0) / 10, START_TO_RESULT));
    pop(tag, score);
    check(tag == 11 && score == EXP_SCORE, $sformatf("result tag %0d score %0d", tag, score));
    check(!busy && !result_valid, "idle after pop");

    // two states back to back, third start while both banks are taken
    start(21);                 // bank 1
    check(wr_bank == 0 && load_ready, "bank 0 free for loading while bank 1 waits");
    start(22);                 // bank 0, while bank 1 is being read
    // bank 1 is being read and bank 0 is full: no bank is free
    check(!load_ready && rd_en && rd_bank == 1, "no free bank while both are in use");
    check(!write_error, "no error so far");
    param_wr_req = 1;
    @(negedge clk);
    param_wr_req = 0;
    check(write_error, "parameter write into a used bank flagged");
    err_clear = 1;
    @(negedge clk);
    err_clear = 0;
    check(!write_error, "error flag cleared");
    // results: do not pop the first one, the second must stall
    while (!result_valid) @(negedge clk);
    repeat (M * STEPS + 20) @(negedge clk);
    check(stall, "finished score waits for the result register");
    check(result_tag == 21, "held result unchanged while stalled");
    pop(tag, score);
    check(tag == 21 && score == EXP_SCORE, $sformatf("first result tag %0d", tag));
    @(negedge clk);
    check(result_valid && result_tag == 22, "stalled result delivered after the pop");
    pop(tag, score);
    check(tag == 22 && score == EXP_SCORE, $sformatf("second result tag %0d", tag));
    check(!busy, "idle again");

    // start with no free bank: fill both, start a third
    start(31);
    start(32);
    @(negedge clk);
    check(!load_ready || rd_bank != wr_bank, "load bank state consistent");
    while (load_ready) @(negedge clk);
    start(33);
    check(write_error, "start into a used bank flagged");
    err_clear = 1;
    @(negedge clk);
    err_clear = 0;
    check(!feat_wr_allow && !write_error, "features locked while busy");
    feat_wr_req = 1;
    @(negedge clk);
    feat_wr_req = 0;
    check(write_error, "feature write while busy flagged");
    for (int i = 0; i < 2; i++) begin
      while (!result_valid) @(negedge clk);
      pop(tag, score);
      check(tag == 31 + i, $sformatf("result %0d tag %0d", i, tag));
    end
    repeat (30) @(negedge clk);
    check(!result_valid && !busy, "dropped start produced no result");

    check(stalls > 0, "stall happened");
    $display("stall_cycles=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
