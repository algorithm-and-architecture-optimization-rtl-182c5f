// tb_intra_ctrl: runs the schedule controller against a behavioural
// environment and compares its request stream, cycle by cycle, with the
// schedule built here from the engine's rules: block 0 vertical first; per
// block modes 1..8, best-mode regeneration, the four 16x16 modes of the same
// block, then the vertical mode of the next block inside the 20-cycle
// reconstruction window. Checks 900 request cycles per macroblock, stalls
// when reconstruction is late, the EDPS start cycle, and early termination
// after a chosen block. Every other macroblock offers the look-ahead: block
// 15's idle slot must then carry the next macroblock's vertical mode (block
// 0, flagged nxt_o) and the next macroblock must start at mode 1 and take
// 896 cycles.
module tb_intra_ctrl;
  import intra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] best_mode;
  logic blk_done = 1'b0, rec_done = 1'b0, skip_now = 1'b0, hada_done = 1'b0, final_valid = 1'b0;
  logic nxt_valid = 1'b0, nxt_o;
  pred_req_t req_o;
  phase_e phase_o;
  logic load_o, prep_start_o, slpde_eval_o, hada_start_o, final_start_o, busy_o, mb_done_o, mb_skipped_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  intra_ctrl dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  int best [16];
  int rec_delay;       // cycles from the last regenerated row to rec_done
  int skip_blk;        // block after which termination fires (-1: never)
  int evals;

  // behavioural environment (sampled mid-cycle)
  int since_regen = -1;
  int hada_cnt = 0;
  logic blk_done_next = 1'b0;
  always @(negedge clk) begin
    blk_done = blk_done_next;
    best_mode = blk_done ? 4'(best[req_o.blk]) : 4'($urandom_range(0, 15));
    blk_done_next = req_o.valid && !req_o.regen && req_o.cat == CAT_I4 && req_o.mode == 4'd8 && req_o.row == 2'd3;
    if (req_o.valid && req_o.regen && req_o.row == 2'd3) since_regen = 0;
    else if (since_regen >= 0) since_regen++;
    rec_done = (since_regen == rec_delay);
    skip_now = (evals == skip_blk);
    hada_done = (hada_cnt == 1);
    if (hada_start_o) hada_cnt = 5; else if (hada_cnt > 0) hada_cnt--;
    final_valid = final_start_o;
  end

  always @(posedge clk) if (slpde_eval_o) evals++;

  typedef struct { logic valid; cat_e cat; int mode, row, blk; logic regen, nxt; } ereq_t;
  ereq_t q [$];

  task automatic push(input logic v, input cat_e c, input int m, input int r, input int b, input logic g,
                      input logic n = 1'b0);
    ereq_t e;
    e.valid = v; e.cat = c; e.mode = m; e.row = r; e.blk = b; e.regen = g; e.nxt = n;
    q.push_back(e);
  endtask

  task automatic build(input int last_blk, input int stall, input logic pre_in, input logic pre_out);
    q.delete();
    if (!pre_in) for (int r = 0; r < 4; r++) push(1, CAT_I4, 0, r, 0, 0);
    for (int b = 0; b <= last_blk; b++) begin
      for (int m = 1; m < 9; m++) for (int r = 0; r < 4; r++) push(1, CAT_I4, m, r, b, 0);
      for (int r = 0; r < 4; r++) push(1, CAT_I4, best[b], r, b, 1);
      for (int m = 0; m < 4; m++) for (int r = 0; r < 4; r++) push(1, CAT_I16, m, r, b, 0);
      for (int r = 0; r < 4; r++)
        if (b < 15) push(1, CAT_I4, 0, r, b + 1, 0);
        else if (pre_out) push(1, CAT_I4, 0, r, 0, 0, 1);
        else push(0, CAT_I4, 0, 0, 0, 0);
      for (int s = 0; s < stall; s++) push(0, CAT_I4, 0, 0, 0, 0);
    end
  endtask

  initial begin
    int cyc, prep_cyc, v0;
    logic pre_in;
    pre_in = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int iter = 0; iter < 12; iter++) begin
      for (int b = 0; b < 16; b++) best[b] = $urandom_range(0, 8);
      rec_delay = (iter % 3 == 1) ? 22 : 20;
      skip_blk = (iter % 3 == 2) ? ((iter == 8) ? 15 : $urandom_range(0, 15)) : -1;
      evals = 0;
      nxt_valid = (iter % 2 == 0);
      build(skip_blk >= 0 ? skip_blk : 15, rec_delay - 20, pre_in, nxt_valid && (skip_blk < 0 || skip_blk == 15));
      v0 = pre_in ? 0 : 4;
      @(negedge clk); start = 1'b1;
      #1 check("load with start", int'(load_o), 1);
      @(negedge clk); start = 1'b0;
      #2;
      cyc = 0; prep_cyc = -1;
      while (phase_o != PH_FINAL && phase_o != PH_IDLE) begin
        ereq_t e;
        if (prep_start_o) prep_cyc = cyc;
        if (q.size() == 0) begin
          check("request stream too long", 1, 0);
          break;
        end
        e = q.pop_front();
        check("valid", int'(req_o.valid), int'(e.valid));
        check("look-ahead flag", int'(nxt_o), int'(e.valid && e.nxt));
        if (e.valid) begin
          check("cat", int'(req_o.cat), int'(e.cat));
          check("mode", int'(req_o.mode), e.mode);
          check("row", int'(req_o.row), e.row);
          check("blk", int'(req_o.blk), e.blk);
          check("regen", int'(req_o.regen), int'(e.regen));
        end
        cyc++;
        @(negedge clk);
        #2;
      end
      check("stream fully used", q.size(), 0);
      check("EDPS start cycle", prep_cyc, v0 + 32 + 4);
      if (skip_blk >= 0) begin
        check("cycles to termination", cyc, v0 + (skip_blk + 1) * (56 + rec_delay - 20));
        check("skipped", int'(mb_skipped_o), 1);
      end else begin
        check("cycles per macroblock", cyc, v0 + 16 * (56 + rec_delay - 20));
        while (!mb_done_o) @(negedge clk);
        check("not skipped", int'(mb_skipped_o), 0);
      end
      pre_in = nxt_valid && (skip_blk < 0 || skip_blk == 15);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
