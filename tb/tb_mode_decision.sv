// tb_mode_decision: drives random 4x4 mode costs (with forced ties) and I16MB
// AC sums for a macroblock, in the order the engine produces them, and checks
// the per-block best mode at the mode-8 cycle, the stored modes, the I4MB and
// I16MB accumulations and the final decision against a reference computed
// here.
module tb_mode_decision;
  import intra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic res_valid = 1'b0;
  cat_e res_cat;
  logic [3:0] res_mode, res_blk;
  blk_cost_t res_satd;
  logic [14:0] res_sum_ac;
  logic blk_done_o, final_start = 1'b0, final_valid_o, mb_is_i4_o;
  logic [3:0] best_mode_o;
  mb_cost_t i4_acc_o, i16_lb_o, i16_cost_o;
  logic [3:0] i4_modes_o [16];
  logic [16:0] dc_cost [4];
  logic [1:0] i16_mode_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mode_decision dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int cost [9], exp_mode [16], acc, ac16 [4], c16 [4], bm, lb;
    res_cat = CAT_I4; res_mode = '0; res_blk = '0; res_satd = '0; res_sum_ac = '0;
    foreach (dc_cost[m]) dc_cost[m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int mb = 0; mb < 200; mb++) begin
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      acc = 0; ac16 = '{0, 0, 0, 0};
      for (int b = 0; b < 16; b++) begin
        int best, bc;
        for (int m = 0; m < 9; m++)
          cost[m] = (mb % 3 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 8160);
        best = 0; bc = cost[0];
        for (int m = 1; m < 9; m++) if (cost[m] < bc) begin bc = cost[m]; best = m; end
        exp_mode[b] = best;
        acc += bc;
        for (int m = 0; m < 9; m++) begin
          @(negedge clk);
          res_valid = 1'b1; res_cat = CAT_I4; res_mode = 4'(m); res_blk = 4'(b);
          res_satd = blk_cost_t'(cost[m]);
          #1;
          check("blk_done", int'(blk_done_o), int'(m == 8));
          if (m == 8) check("best mode", int'(best_mode_o), best);
        end
        for (int m = 0; m < 4; m++) begin
          int v;
          v = (mb % 3 == 1) ? 16320 : $urandom_range(0, 16320);
          ac16[m] += v;
          @(negedge clk);
          res_valid = 1'b1; res_cat = CAT_I16; res_mode = 4'(m); res_sum_ac = 15'(v);
        end
        @(negedge clk);
        res_valid = 1'b0;
        check("i4 acc", int'(i4_acc_o), acc > 131071 ? 131071 : acc);
        lb = 131071;
        for (int m = 0; m < 4; m++) if (ac16[m] / 2 < lb) lb = ac16[m] / 2;
        check("i16 lb", int'(i16_lb_o), lb);
      end
      for (int b = 0; b < 16; b++) check("stored mode", int'(i4_modes_o[b]), exp_mode[b]);
      for (int m = 0; m < 4; m++) begin
        dc_cost[m] = 17'($urandom_range(0, 65280));
        c16[m] = (ac16[m] + int'(dc_cost[m])) / 2;
        if (c16[m] > 131071) c16[m] = 131071;
      end
      bm = 0;
      for (int m = 1; m < 4; m++) if (c16[m] < c16[bm]) bm = m;
      @(negedge clk); final_start = 1'b1;
      @(negedge clk); final_start = 1'b0;
      check("final valid", int'(final_valid_o), 1);
      check("i16 mode", int'(i16_mode_o), bm);
      check("i16 cost", int'(i16_cost_o), c16[bm]);
      check("mb is i4", int'(mb_is_i4_o), int'((acc > 131071 ? 131071 : acc) < c16[bm]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
