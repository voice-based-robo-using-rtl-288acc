// gmm_pe_tb: self-checking test of one datapath lane.
//
// Drives a new operand set every cycle (random values, the extreme corners
// and equal operands), with lane_en sometimes low, and checks every output
// two cycles later against (prec * (o - mu)^2) >> SHIFT worked out in
// 64-bit integers, or zero for a disabled lane. Also checks that out_valid
// follows in_valid by exactly two cycles.
module gmm_pe_tb;
  import gmm_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int SHIFT  = 20;
  localparam int TERM_W = 3 * DATA_W + 2 - SHIFT;
  localparam int N      = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid, lane_en, out_valid;
  logic signed [DATA_W-1:0] o, mu;
  logic        [DATA_W-1:0] prec;
  logic        [TERM_W-1:0] term;

  int checks = 0, failures = 0;
  longint exp_q [$];
  bit     expv_q [$];

  gmm_pe #(.DATA_W(DATA_W), .SHIFT(SHIFT)) dut (.*);

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

  initial begin
    in_valid = 0; lane_en = 0; o = 0; mu = 0; prec = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N + 2; i++) begin
      @(negedge clk);
      // output belonging to the operands of two cycles ago
      if (i >= 2) begin
        longint e;
        bit     v;
        e = exp_q.pop_front();
        v = expv_q.pop_front();
        check(out_valid == v, $sformatf("valid at %0d", i));
        check(longint'(term) == e, $sformatf("term %0d exp %0d at %0d", term, e, i));
      end
      if (i < N) begin
        in_valid = ($urandom % 4) != 0;
        lane_en  = ($urandom % 5) != 0;
        case (i % 7)
          0: begin o = 16'sh7fff; mu = 16'sh8000; prec = 16'hffff; end
          1: begin o = $urandom; mu = o; prec = $urandom; end
          default: begin o = $urandom; mu = $urandom; prec = $urandom; end
        endcase
        exp_q.push_back(lane_en ? ref_term(int'(o), int'(mu), int'(prec), SHIFT) : 0);
        expv_q.push_back(in_valid);
      end else begin
        in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
