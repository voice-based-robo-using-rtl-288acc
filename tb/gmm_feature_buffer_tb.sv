// gmm_feature_buffer_tb: self-checking test of the feature vector store.
//
// Writes random coefficients (and some writes to indices past D, which must
// be ignored), then reads every step and checks the LANES coefficients and
// the lane mask one cycle after the request, including the zero-filled,
// masked padding slots of the last step. Repeats with a second vector to
// check overwriting, and checks that the outputs hold while rd_en is low.
module gmm_feature_buffer_tb;
  localparam int DATA_W = 16;
  localparam int D      = 39;
  localparam int LANES  = 4;
  localparam int STEPS  = (D + LANES - 1) / LANES;
  localparam int IDX_W  = $clog2(D);
  localparam int STEP_W = $clog2(STEPS);

  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic [IDX_W-1:0] wr_idx;
  logic signed [DATA_W-1:0] wr_data;
  logic [STEP_W-1:0] rd_step;
  logic signed [DATA_W-1:0] rd_data [LANES];
  logic [LANES-1:0] rd_mask;

  int checks = 0, failures = 0;
  int model [D];

  gmm_feature_buffer #(.DATA_W(DATA_W), .D(D), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  task automatic write_vector();
    for (int d = 0; d < D; d++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = IDX_W'(d); wr_data = DATA_W'($urandom);
      model[d] = int'(wr_data);
    end
    // writes past the end must not land anywhere
    for (int d = D; d < (1 << IDX_W); d++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = IDX_W'(d); wr_data = DATA_W'($urandom);
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic read_all();
    for (int s = 0; s < STEPS; s++) begin
      @(negedge clk);
      rd_en = 1; rd_step = STEP_W'(s);
      @(negedge clk);
      rd_en = 0;
      for (int l = 0; l < LANES; l++) begin
        int d;
        d = s * LANES + l;
        check(rd_mask[l] == (d < D), $sformatf("mask step %0d lane %0d", s, l));
        check(int'(rd_data[l]) == ((d < D) ? model[d] : 0),
              $sformatf("data step %0d lane %0d: %0d", s, l, rd_data[l]));
      end
      // outputs hold while no read is requested
      rd_step = STEP_W'((s + 1) % STEPS);
      @(negedge clk);
      check(int'(rd_data[0]) == model[s * LANES], "hold");
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_idx = 0; wr_data = 0; rd_step = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_vector();
    read_all();
    write_vector();
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
