// gmm_accelerator_tb: end-to-end test of the GMM accelerator at its default
// sizes, with the testbench playing the processor.
//
// The processor side runs a small HMM recognizer in the way the accelerator
// is meant to be used: a left-to-right chain of NS states, T frames of
// random features, token passing (a token in state q moves to q and q+1,
// adding the emission score of q and a transition weight), and beam pruning
// with the adaptive beamwidth rule: if more than TAU_UPPER tokens are
// active the beam shrinks by DELTA, if fewer than TAU_LOWER are active and
// the beam is below its original width it grows by DELTA. Each frame it
// writes the feature vector, then for every token that survives the beam
// loads that state's Gaussian parameters into the free bank and starts it,
// while the previous state is still being computed, and collects results
// by tag. Every score is compared with the reference formula of
// gmm_ref_pkg, and the final best path score with a pure-software run of
// the same search.
//
// Some frames pop results lazily, so that the result register fills, the
// sequencer stalls and both banks end up full; one frame tries a feature
// write while the accelerator is busy, which must be dropped and flagged.
// Counted and required at least once each: a load begun while the
// accelerator is still busy with an earlier state, a start held back for lack of a free bank (seen in STATUS), a
// sequencer stall, a dropped write, a beam tightening and a beam
// relaxation, and a state won by a mixture other than the first. The
// cycles from a start to its result are checked for an isolated state by
// polling STATUS every cycle. The testbench uses only the bus ports.
module gmm_accelerator_tb;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  localparam int D     = gmm_pkg::D_DEF;
  localparam int M     = gmm_pkg::M_DEF;
  localparam int LANES = gmm_pkg::LANES_DEF;
  localparam int SHIFT = gmm_pkg::SHIFT_DEF;
  localparam int STEPS = (D + LANES - 1) / LANES;
  localparam int IDX_W = $clog2(D);
  localparam int MIX_W = M > 1 ? $clog2(M) : 1;
  localparam int ADDR_W = 2 + MIX_W + IDX_W;
  localparam int START_TO_RESULT = M * STEPS + 8;

  // recognizer (processor software) settings
  localparam int NS = 24;
  localparam int T  = 24;
  localparam longint ORIGINAL_BEAM = 1_200_000;
  localparam longint DELTA         = 100_000;
  localparam int TAU_UPPER = 8;
  localparam int TAU_LOWER = 6;
  localparam longint A_SELF = -40_000;
  localparam longint A_NEXT = -60_000;
  localparam longint NEG_INF = -(64'sd1 <<< 60);

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] avs_address;
  logic avs_write, avs_read;
  logic [31:0] avs_writedata, avs_readdata;

  int checks = 0, failures = 0;

  gmm_accelerator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  // ---- acoustic model and features ----------------------------------
  int mu   [NS][];
  int pr   [NS][];
  int gc   [NS][];
  int feat [T][];

  // ---- counters of mechanisms -----------------------------------------
  int n_overlap = 0, n_bank_full = 0, n_stall = 0, n_dropped = 0;
  int n_tighten = 0, n_relax = 0, n_later_mix = 0, n_gmm = 0;

  // ---- bus tasks (one transfer per cycle, read latency 1) ---------------
  task automatic bus_write(logic [ADDR_W-1:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1; avs_read = 0;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic bus_read(logic [ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1; avs_write = 0;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  function automatic logic [ADDR_W-1:0] addr(region_e r, int m, int d);
    return {r, MIX_W'(m), IDX_W'(d)};
  endfunction

  task automatic read_status(output status_t st);
    logic [31:0] w;
    bus_read(addr(RGN_REGS, 0, REG_STATUS), w);
    st = status_t'(w);
  endtask

  // ---- results --------------------------------------------------------
  longint emis [NS];
  bit     got  [NS];
  int     frame_now;

  task automatic pop_result();
    status_t st;
    logic [31:0] w;
    int q, expv;
    read_status(st);
    if (!st.result_valid) return;
    if (st.stalled) n_stall++;
    q = int'(st.result_tag);
    bus_read(addr(RGN_REGS, 0, REG_RESULT), w);
    expv = ref_state(D, M, SHIFT, feat[frame_now], mu[q], pr[q], gc[q]);
    check(int'(w) == expv, $sformatf("frame %0d state %0d score %0d exp %0d",
                                     frame_now, q, int'(w), expv));
    check(!got[q], "one result per state");
    if (ref_best_mix(D, M, SHIFT, feat[frame_now], mu[q], pr[q], gc[q]) != 0) n_later_mix++;
    emis[q] = longint'(signed'(w));
    got[q]  = 1;
    n_gmm++;
  endtask

  task automatic load_state(int q);
    status_t st;
    read_status(st);
    if (st.busy) n_overlap++;
    for (int m = 0; m < M; m++) begin
      for (int d = 0; d < D; d++)
        bus_write(addr(RGN_PARAM, m, d), {16'(pr[q][m*D+d]), 16'(mu[q][m*D+d])});
      bus_write(addr(RGN_GCONST, m, 0), 32'(gc[q][m]));
    end
  endtask

  // Score the listed states for the current frame. lazy: results are only
  // collected when the accelerator has no free bank.
  task automatic score_states(int list[$], bit lazy);
    status_t st;
    foreach (got[q]) got[q] = 0;
    foreach (list[i]) begin
      read_status(st);
      while (!st.load_ready) begin
        n_bank_full++;
        pop_result();
        read_status(st);
      end
      load_state(list[i]);
      bus_write(addr(RGN_REGS, 0, REG_CMD), 32'(list[i]));
      if (!lazy) pop_result();
    end
    // drain
    do begin
      pop_result();
      read_status(st);
    end while (st.busy || st.result_valid);
    foreach (list[i]) check(got[list[i]], $sformatf("result for state %0d", list[i]));
  endtask

  task automatic write_features(int t);
    for (int d = 0; d < D; d++) bus_write(addr(RGN_FEAT, 0, d), 32'(feat[t][d]));
  endtask

  // ---- the search -------------------------------------------------------
  longint score [NS], nscore [NS];
  bit     act   [NS], nact   [NS];

  // Software-only emission for the comparison run.
  function automatic longint sw_emis(int t, int q);
    return longint'(ref_state(D, M, SHIFT, feat[t], mu[q], pr[q], gc[q]));
  endfunction

  task automatic search(bit use_hw, output longint best, output int best_q);
    longint beam = ORIGINAL_BEAM;
    foreach (act[q]) begin act[q] = (q == 0); score[q] = (q == 0) ? 0 : NEG_INF; end
    for (int t = 0; t < T; t++) begin
      int n = 0;
      longint mx = NEG_INF, thr;
      int list[$];
      frame_now = t;
      foreach (act[q]) if (act[q]) begin n++; if (score[q] > mx) mx = score[q]; end
      if (n > TAU_UPPER) begin
        beam -= DELTA;
        if (use_hw) n_tighten++;
      end else if (n < TAU_LOWER) begin
        if (beam < ORIGINAL_BEAM) begin
          beam += DELTA;
          if (use_hw) n_relax++;
        end
      end
      thr = mx - beam;
      foreach (act[q]) if (act[q] && score[q] > thr) list.push_back(q);
      if (use_hw) begin
        write_features(t);
        if (t == 2) begin
          // a feature write while busy must be dropped and flagged
          status_t st;
          foreach (got[q]) got[q] = 0;
          load_state(list[0]);
          bus_write(addr(RGN_REGS, 0, REG_CMD), 32'(list[0]));
          bus_write(addr(RGN_FEAT, 0, 0), 32'(feat[t][0] + 77));
          read_status(st);
          check(st.write_error, "feature write while busy flagged");
          if (st.write_error) n_dropped++;
          bus_write(addr(RGN_REGS, 0, REG_STATUS), 0);
          do begin pop_result(); read_status(st); end while (st.busy || st.result_valid);
          check(!st.write_error, "flag cleared");
        end
        score_states(list, t % 3 == 1);
      end else begin
        foreach (list[i]) emis[list[i]] = sw_emis(t, list[i]);
      end
      foreach (nact[q]) begin nact[q] = 0; nscore[q] = NEG_INF; end
      foreach (list[i]) begin
        int q = list[i];
        longint base = score[q] + emis[q];
        if (base + A_SELF > nscore[q]) begin nscore[q] = base + A_SELF; nact[q] = 1; end
        if (q + 1 < NS && base + A_NEXT > nscore[q+1]) begin
          nscore[q+1] = base + A_NEXT; nact[q+1] = 1;
        end
      end
      score = nscore;
      act   = nact;
      if (use_hw) $display("frame %0d: active %0d, scored %0d, beam %0d", t, n, list.size(), beam);
    end
    best = NEG_INF; best_q = -1;
    foreach (act[q]) if (act[q] && score[q] > best) begin best = score[q]; best_q = q; end
  endtask

  initial begin
    longint best_hw, best_sw;
    int q_hw, q_sw, t0, t1;
    status_t st;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    // model: small features and means, precisions up to 1.0 in Q.12
    for (int q = 0; q < NS; q++) begin
      int offset = int'($urandom % 600_000);
      mu[q] = new[M*D]; pr[q] = new[M*D]; gc[q] = new[M];
      for (int k = 0; k < M*D; k++) begin
        mu[q][k] = int'($signed(16'($urandom))) / 32;
        pr[q][k] = int'($urandom % 4096);
      end
      for (int m = 0; m < M; m++) gc[q][m] = -offset - int'($urandom % 400_000);
    end
    for (int t = 0; t < T; t++) begin
      feat[t] = new[D];
      for (int d = 0; d < D; d++) feat[t][d] = int'($signed(16'($urandom))) / 32;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    read_status(st);
    check(st.load_ready && !st.busy && !st.result_valid && !st.write_error, "reset status");

    // isolated state: cycles from the start command to result_valid
    frame_now = 0;
    write_features(0);
    load_state(5);
    @(negedge clk);
    avs_address = addr(RGN_REGS, 0, REG_CMD); avs_writedata = 5; avs_write = 1;
    t0 = $time;
    @(negedge clk);
    // poll STATUS every cycle: the read data shows the previous cycle's state
    avs_write = 0; avs_read = 1; avs_address = addr(RGN_REGS, 0, REG_STATUS);
    @(negedge clk);
    while (!avs_readdata[2]) @(negedge clk);  // status_t.result_valid
    avs_read = 0;
    t1 = $time - 10;
    check((t1 - t0) / 10 == START_TO_RESULT,
          $sformatf("start to result %0d cycles, exp %0d", (t1 - t0) / 10, START_TO_RESULT));
    foreach (got[q]) got[q] = 0;
    pop_result();

    search(1'b1, best_hw, q_hw);
    search(1'b0, best_sw, q_sw);
    check(best_hw == best_sw && q_hw == q_sw,
          $sformatf("best path: accelerator %0d in state %0d, software %0d in state %0d",
                    best_hw, q_hw, best_sw, q_sw));

    $display("gmm=%0d overlapped_loads=%0d bank_full=%0d stalls_seen=%0d dropped=%0d",
             n_gmm, n_overlap, n_bank_full, n_stall, n_dropped);
    $display("beam_tighten=%0d beam_relax=%0d later_mixture_wins=%0d best=%0d state=%0d",
             n_tighten, n_relax, n_later_mix, best_hw, q_hw);
    check(q_hw >= 0,       "a token survived to the end");
    check(n_overlap > 0,   "loading overlapped computing");
    check(n_bank_full > 0, "no free bank seen");
    check(n_stall > 0,     "sequencer stalled");
    check(n_dropped > 0,   "write dropped");
    check(n_tighten > 0,   "beam tightened");
    check(n_relax > 0,     "beam relaxed");
    check(n_later_mix > 0, "a later mixture won");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
