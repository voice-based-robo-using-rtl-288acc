// gmm_param_buffer_tb: self-checking test of the double-buffered parameter
// store.
//
// Fills bank 0 and bank 1 with different random parameter sets, reads every
// (mixture, step) of both and checks means, precisions and the mixture
// constant one cycle after the request. Then rewrites bank 0 while reading
// bank 1 in the same cycles, as the accelerator does when it overlaps
// loading and computing, and checks that bank 1 is untouched and bank 0
// holds the new set.
module gmm_param_buffer_tb;
  localparam int DATA_W = 16;
  localparam int D      = 39;
  localparam int M      = 8;
  localparam int LANES  = 4;
  localparam int STEPS  = (D + LANES - 1) / LANES;
  localparam int IDX_W  = $clog2(D);
  localparam int MIX_W  = $clog2(M);
  localparam int STEP_W = $clog2(STEPS);

  logic clk = 0;
  logic wr_bank, wr_en, gc_wr_en, rd_bank, rd_en;
  logic [MIX_W-1:0] wr_mix, rd_mix;
  logic [IDX_W-1:0] wr_idx;
  logic signed [DATA_W-1:0] wr_mean;
  logic        [DATA_W-1:0] wr_prec;
  logic signed [31:0] gc_wr_data, rd_gconst;
  logic [STEP_W-1:0] rd_step;
  logic signed [DATA_W-1:0] rd_mean [LANES];
  logic        [DATA_W-1:0] rd_prec [LANES];

  int checks = 0, failures = 0;
  int mean_m [2][M*D];
  int prec_m [2][M*D];
  int gc_m   [2][M];

  gmm_param_buffer #(.DATA_W(DATA_W), .GCONST_W(32), .D(D), .M(M), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
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

  // One write per call: parameter word k of the bank (k < M*D), else the
  // constant of mixture k - M*D.
  task automatic put(int b, int k);
    wr_bank = b[0];
    if (k < M * D) begin
      wr_en = 1; gc_wr_en = 0;
      wr_mix = MIX_W'(k / D); wr_idx = IDX_W'(k % D);
      wr_mean = DATA_W'($urandom); wr_prec = DATA_W'($urandom);
      mean_m[b][k] = int'(wr_mean); prec_m[b][k] = int'(wr_prec);
    end else begin
      wr_en = 0; gc_wr_en = 1;
      wr_mix = MIX_W'(k - M * D);
      gc_wr_data = $urandom;
      gc_m[b][k - M * D] = gc_wr_data;
    end
  endtask

  // Check the outputs of a read of (b, m, s) issued one cycle earlier.
  task automatic check_read(int b, int m, int s);
    for (int l = 0; l < LANES; l++) begin
      int d;
      d = s * LANES + l;
      if (d < D) begin
        check(int'(rd_mean[l]) == mean_m[b][m*D+d], $sformatf("mean b%0d m%0d d%0d", b, m, d));
        check(int'(rd_prec[l]) == prec_m[b][m*D+d], $sformatf("prec b%0d m%0d d%0d", b, m, d));
      end
    end
    check(rd_gconst == gc_m[b][m], $sformatf("gconst b%0d m%0d", b, m));
  endtask

  task automatic read_bank(int b);
    for (int m = 0; m < M; m++)
      for (int s = 0; s < STEPS; s++) begin
        @(negedge clk);
        rd_en = 1; rd_bank = b[0]; rd_mix = MIX_W'(m); rd_step = STEP_W'(s);
        @(negedge clk);
        rd_en = 0;
        check_read(b, m, s);
      end
  endtask

  initial begin
    int k;
    wr_en = 0; gc_wr_en = 0; rd_en = 0; wr_bank = 0; rd_bank = 0;
    wr_mix = 0; wr_idx = 0; wr_mean = 0; wr_prec = 0; gc_wr_data = 0;
    rd_mix = 0; rd_step = 0;
    @(negedge clk);
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < M * D + M; i++) begin
        @(negedge clk);
        put(b, i);
      end
    @(negedge clk);
    wr_en = 0; gc_wr_en = 0;
    read_bank(0);
    read_bank(1);
    // overlap: load bank 0 while streaming bank 1
    k = 0;
    for (int m = 0; m < M; m++)
      for (int s = 0; s < STEPS; s++) begin
        @(negedge clk);
        if (m > 0 || s > 0) check_read(1, (s == 0) ? m - 1 : m, (s == 0) ? STEPS - 1 : s - 1);
        rd_en = 1; rd_bank = 1; rd_mix = MIX_W'(m); rd_step = STEP_W'(s);
        put(0, k);
        k++;
      end
    @(negedge clk);
    check_read(1, M - 1, STEPS - 1);
    rd_en = 0;
    while (k < M * D + M) begin
      put(0, k);
      k++;
      @(negedge clk);
    end
    wr_en = 0; gc_wr_en = 0;
    read_bank(0);
    read_bank(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
