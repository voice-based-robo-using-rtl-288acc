// gmm_host_if_tb: self-checking test of the bus slave's address decoder.
//
// Issues random writes to every region and checks that exactly the right
// strobe fires with the mixture, coefficient and data fields taken from the
// right address and data bits; checks that only a write to CMD starts, only
// a write to STATUS clears the error flag, and
// only a read of RESULT pops; and checks that STATUS and RESULT reads return
// the register contents one cycle after the read.
module gmm_host_if_tb;
  import gmm_pkg::*;

  localparam int D = 39;
  localparam int M = 8;
  localparam int IDX_W = $clog2(D);
  localparam int MIX_W = $clog2(M);
  localparam int ADDR_W = 2 + MIX_W + IDX_W;

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] avs_address;
  logic avs_write, avs_read;
  logic [31:0] avs_writedata, avs_readdata;
  logic feat_wr, param_wr, gconst_wr, cmd_start, result_pop, err_clear;
  logic [MIX_W-1:0] wr_mix;
  logic [IDX_W-1:0] wr_idx;
  logic signed [15:0] wr_lo;
  logic [15:0] wr_hi;
  logic signed [31:0] wr_word, result_score;
  logic [15:0] cmd_tag;
  status_t status;

  int checks = 0, failures = 0;

  gmm_host_if #(.D(D), .M(M)) dut (.*);

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

  initial begin
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    status = '0; result_score = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int rgn, m, d, reg_sel;
      logic [31:0] wd;
      @(negedge clk);
      rgn = $urandom % 4; m = $urandom % M; d = $urandom % D; wd = $urandom;
      reg_sel = $urandom % 4;
      avs_address = {2'(rgn), MIX_W'(m), (rgn == 0) ? IDX_W'(reg_sel) : IDX_W'(d)};
      avs_writedata = wd;
      avs_write = 1; avs_read = 0;
      #1;
      check(feat_wr == (rgn == 1) && param_wr == (rgn == 2) && gconst_wr == (rgn == 3),
            $sformatf("write strobes for region %0d", rgn));
      check(cmd_start == (rgn == 0 && reg_sel == REG_CMD), "start strobe");
      check(err_clear == (rgn == 0 && reg_sel == REG_STATUS), "error clear strobe");
      check(!result_pop, "no pop on a write");
      if (rgn != 0) check(int'(wr_idx) == d && int'(wr_mix) == m, "address fields");
      check(wr_lo == wd[15:0] && wr_hi == wd[31:16] && wr_word == wd, "data fields");
      if (rgn == 0 && reg_sel == REG_CMD) check(cmd_tag == wd[15:0], "tag");
    end
    // reads
    for (int i = 0; i < 100; i++) begin
      int reg_sel;
      status_t st;
      logic [31:0] sc;
      @(negedge clk);
      reg_sel = $urandom % 4;
      st = status_t'($urandom); sc = $urandom;
      status = st; result_score = sc;
      avs_write = 0; avs_read = 1;
      avs_address = {2'd0, MIX_W'(0), IDX_W'(reg_sel)};
      #1;
      check(result_pop == (reg_sel == REG_RESULT), "pop only on RESULT read");
      check(!feat_wr && !param_wr && !gconst_wr && !cmd_start, "no write strobe on a read");
      @(negedge clk);
      avs_read = 0;
      status = '0; result_score = 0;
      case (reg_sel)
        REG_STATUS: check(avs_readdata == st, "status read");
        REG_RESULT: check(avs_readdata == sc, "result read");
        default:    check(avs_readdata == 0, "unmapped register reads zero");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
