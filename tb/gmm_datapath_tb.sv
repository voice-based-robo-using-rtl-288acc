// gmm_datapath_tb: self-checking test of the GMM datapath.
//
// Streams whole HMM states (M mixtures of STEPS beats of LANES lanes) into
// the datapath, with random idle cycles between beats in some states, and
// compares each state score with the reference max-over-mixtures formula
// of gmm_ref_pkg. Covers a state whose scores saturate at the negative end,
// states where a later mixture wins, and checks that out_valid comes exactly
// 5 cycles after the last beat.
module gmm_datapath_tb;
  import gmm_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int D      = 39;
  localparam int M      = 8;
  localparam int LANES  = 4;
  localparam int SHIFT  = 20;
  localparam int STEPS  = (D + LANES - 1) / LANES;
  localparam int LAT    = 5;
  localparam int NSTATES = 60;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last, in_first_mix, in_last_mix, out_valid;
  logic [LANES-1:0] in_mask;
  logic signed [DATA_W-1:0] in_o [LANES];
  logic signed [DATA_W-1:0] in_mean [LANES];
  logic        [DATA_W-1:0] in_prec [LANES];
  logic signed [31:0] in_gconst, out_score;

  int checks = 0, failures = 0;
  int o [], mu [], pr [], gc [];
  int later_wins = 0, saturated = 0;
  longint cyc = 0, last_beat_cyc;

  gmm_datapath #(.DATA_W(DATA_W), .LANES(LANES), .SHIFT(SHIFT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
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

  task automatic idle();
    in_valid = 0; in_first = 0; in_last = 0; in_first_mix = 0; in_last_mix = 0;
  endtask

  task automatic run_state(int n, bit gaps);
    int exp_score, got;
    longint t_out;
    o = new[D]; mu = new[M*D]; pr = new[M*D]; gc = new[M];
    for (int d = 0; d < D; d++) o[d] = int'($signed(16'($urandom))) / 16;
    for (int k = 0; k < M*D; k++) begin
      mu[k] = int'($signed(16'($urandom))) / 16;
      pr[k] = int'($urandom % 4096);
    end
    for (int m = 0; m < M; m++) gc[m] = int'($urandom % 2000000) - 1000000;
    if (n == 3) begin
      // extreme values: every mixture saturates at the negative limit
      for (int d = 0; d < D; d++) o[d] = 32767;
      for (int k = 0; k < M*D; k++) begin mu[k] = -32768; pr[k] = 65535; end
      for (int m = 0; m < M; m++) gc[m] = -2147483000;
    end
    exp_score = ref_state(D, M, SHIFT, o, mu, pr, gc);
    if (ref_best_mix(D, M, SHIFT, o, mu, pr, gc) != 0) later_wins++;
    if (exp_score == 32'sh80000000) saturated++;
    for (int m = 0; m < M; m++)
      for (int s = 0; s < STEPS; s++) begin
        if (gaps) while ($urandom % 3 == 0) begin @(negedge clk); idle(); end
        @(negedge clk);
        in_valid = 1; in_first = (s == 0); in_last = (s == STEPS - 1);
        in_first_mix = (m == 0); in_last_mix = (m == M - 1);
        in_gconst = gc[m];
        for (int l = 0; l < LANES; l++) begin
          int d;
          d = s * LANES + l;
          in_mask[l] = (d < D);
          in_o[l]    = (d < D) ? DATA_W'(o[d]) : DATA_W'($urandom);
          in_mean[l] = (d < D) ? DATA_W'(mu[m*D+d]) : DATA_W'($urandom);
          in_prec[l] = (d < D) ? DATA_W'(pr[m*D+d]) : DATA_W'($urandom);
        end
      end
    last_beat_cyc = cyc;
    @(negedge clk);
    idle();
    while (!out_valid) @(negedge clk);
    t_out = cyc - last_beat_cyc;
    got = int'(out_score);
    check(got == exp_score, $sformatf("state %0d score %0d exp %0d", n, got, exp_score));
    check(t_out == LAT, $sformatf("state %0d latency %0d", n, t_out));
  endtask

  initial begin
    idle();
    in_mask = '0; in_gconst = 0;
    for (int l = 0; l < LANES; l++) begin in_o[l] = 0; in_mean[l] = 0; in_prec[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NSTATES; n++) run_state(n, n % 2 == 1);
    check(later_wins > 0, "a later mixture won at least once");
    check(saturated > 0, "saturation happened");
    $display("states=%0d later_mixture_wins=%0d saturated=%0d", NSTATES, later_wins, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
