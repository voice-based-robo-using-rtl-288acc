// gmm_frame_load_tb: one speech frame of a full-size recognition task
// through the GMM accelerator at its default sizes.
//
// Recognizers of the size this accelerator targets (a 1000-word
// task with a word-pair grammar) keep up to a couple of thousand tokens
// alive per frame; with an adaptive beam whose upper threshold is 2300
// tokens, at most about that many HMM states need an emission score in one
// frame. This testbench scores NSTATES = 2300 distinct states for one
// frame, with the processor side writing on the bus every cycle: for each
// state it waits for a free bank, streams M*D parameter words and M
// constants, starts the bank, and collects the previous state's result by
// its tag. Every score is checked against the reference formula, and the
// cycle count of the frame is reported next to the 10 ms frame period at
// 120 MHz (1.2 million cycles). The check on time is that a state costs no
// more than its M*D + M parameter writes plus a small fixed overhead, that
// is, that computing is completely hidden behind loading by the double
// buffer.
module gmm_frame_load_tb;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  localparam int D     = gmm_pkg::D_DEF;
  localparam int M     = gmm_pkg::M_DEF;
  localparam int SHIFT = gmm_pkg::SHIFT_DEF;
  localparam int IDX_W = $clog2(D);
  localparam int MIX_W = M > 1 ? $clog2(M) : 1;
  localparam int ADDR_W = 2 + MIX_W + IDX_W;
  localparam int NSTATES = 2300;
  localparam int OVERHEAD = 8;          // start + status/result polling per state
  localparam int FRAME_CYCLES = 1_200_000;

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] avs_address;
  logic avs_write, avs_read;
  logic [31:0] avs_writedata, avs_readdata;

  int checks = 0, failures = 0;
  int feat [];
  int mu [NSTATES][];
  int pr [NSTATES][];
  int gc [NSTATES][];
  bit got [NSTATES];
  int n_results = 0;

  gmm_accelerator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
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

  function automatic logic [ADDR_W-1:0] addr(region_e r, int m, int d);
    return {r, MIX_W'(m), IDX_W'(d)};
  endfunction

  // one bus cycle: a write, or nothing
  task automatic wr(logic [ADDR_W-1:0] a, logic [31:0] d);
    avs_address = a; avs_writedata = d; avs_write = 1; avs_read = 0;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic rd(logic [ADDR_W-1:0] a, output logic [31:0] d);
    avs_address = a; avs_read = 1; avs_write = 0;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  task automatic collect();
    logic [31:0] w, r;
    int q;
    rd(addr(RGN_REGS, 0, REG_STATUS), w);
    if (!w[2]) return;
    q = int'(w[31:16]);
    rd(addr(RGN_REGS, 0, REG_RESULT), r);
    check(q < NSTATES && !got[q], $sformatf("tag %0d", q));
    if (q < NSTATES) begin
      check(int'(r) == ref_state(D, M, SHIFT, feat, mu[q], pr[q], gc[q]),
            $sformatf("state %0d score", q));
      got[q] = 1;
    end
    n_results++;
  endtask

  initial begin
    longint t0, t1, cyc;
    logic [31:0] w;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    feat = new[D];
    for (int d = 0; d < D; d++) feat[d] = int'($signed(16'($urandom))) / 32;
    for (int q = 0; q < NSTATES; q++) begin
      mu[q] = new[M*D]; pr[q] = new[M*D]; gc[q] = new[M];
      for (int k = 0; k < M*D; k++) begin
        mu[q][k] = int'($signed(16'($urandom))) / 32;
        pr[q][k] = int'($urandom % 4096);
      end
      for (int m = 0; m < M; m++) gc[q][m] = -int'($urandom % 1_000_000);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int d = 0; d < D; d++) wr(addr(RGN_FEAT, 0, d), 32'(feat[d]));

    t0 = $time;
    for (int q = 0; q < NSTATES; q++) begin
      rd(addr(RGN_REGS, 0, REG_STATUS), w);
      while (!w[1]) begin            // load_ready
        collect();
        rd(addr(RGN_REGS, 0, REG_STATUS), w);
      end
      for (int m = 0; m < M; m++) begin
        for (int d = 0; d < D; d++)
          wr(addr(RGN_PARAM, m, d), {16'(pr[q][m*D+d]), 16'(mu[q][m*D+d])});
        wr(addr(RGN_GCONST, m, 0), 32'(gc[q][m]));
      end
      wr(addr(RGN_REGS, 0, REG_CMD), 32'(q));
      collect();
    end
    do begin
      collect();
      rd(addr(RGN_REGS, 0, REG_STATUS), w);
    end while (w[0] || w[2]);       // busy or result_valid
    t1 = $time;
    cyc = (t1 - t0) / 10;

    check(n_results == NSTATES, $sformatf("%0d results", n_results));
    check(!w[3], "no access was dropped");
    check(cyc <= longint'(NSTATES) * (M * D + M + OVERHEAD),
          $sformatf("%0d cycles for %0d states", cyc, NSTATES));
    $display("states=%0d cycles=%0d cycles_per_state=%0.1f frame_budget_fraction=%0.3f",
             NSTATES, cyc, real'(cyc) / NSTATES, real'(cyc) / FRAME_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
