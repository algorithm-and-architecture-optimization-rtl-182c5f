// tb_intra_top: end-to-end test of the intra engine at its default
// parameters.
//
// A reconstruction-engine model returns the original pixels as the
// reconstruction (a lossless coder), so an independent reference can compute
// every block's neighbours from the original picture. For each macroblock the
// reference evaluates all 4x4 and 16x16 modes with the standard prediction
// equations and a matrix Hadamard, and the test checks: the chosen 4x4 modes,
// the predictions sent to reconstruction, the 16x16 mode, both costs, the
// macroblock type, early termination and the cycle count (900 cycles per
// macroblock: 4 + 16 x (36 + 4 + 16), plus any reconstruction stall).
// Macroblock contents cycle through random texture, smooth gradients and
// flat areas so both macroblock types win. It counts how often each
// mechanism happened: interleaved 16x16 work (CLIS), the early vertical mode
// (MLS), early DC/plane preparation (EDPS), reconstruction stalls, early
// termination (SLPDE), the look-ahead vertical mode of the next macroblock
// (after which a macroblock takes 896 cycles) and each macroblock type; one
// that never happened is a failure.
module tb_intra_top;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  pix_t cur_mb [16][16], top_row [20], left_col [16], corner;
  logic slpde_en = 1'b0;
  logic nxt_valid = 1'b0;
  pix_t nxt_top [4], nxt_blk0 [4][4];
  mb_cost_t inter_cost = '0;
  logic rec_pred_valid;
  logic [3:0] rec_pred_blk;
  logic [1:0] rec_pred_row;
  pix_t rec_pred [4];
  logic rec_wr_valid = 1'b0;
  logic [3:0] rec_wr_blk = '0;
  logic [1:0] rec_wr_row = '0;
  pix_t rec_wr_pix [4];
  logic rec_done = 1'b0;
  logic busy, mb_done, mb_skipped, mb_is_i4;
  phase_e phase;
  logic [3:0] i4_modes [16];
  logic [1:0] i16_mode;
  mb_cost_t i4_cost, i16_cost;

  int checks = 0, failures = 0;
  int n_ahead = 0, n_clis = 0, n_mls = 0, n_edps = 0, n_stall = 0, n_skip = 0, n_i4 = 0, n_i16 = 0;

  always #5 clk = ~clk;

  intra_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  // picture with its boundary: pic[y + 1][x + 1], -1 <= y < 16, -1 <= x < 20
  int pic [17][21];
  int pics [12][17][21];      // all macroblocks, generated ahead
  int rec_extra;              // extra reconstruction latency beyond the budget
  int exp_pred [16][4][4];    // prediction of the best 4x4 mode per block

  // ---------------- reconstruction engine model
  initial begin
    foreach (rec_wr_pix[k]) rec_wr_pix[k] = '0;
    forever begin
      @(negedge clk);
      if (rec_pred_valid) begin
        int b, bx, by, r;
        b = int'(rec_pred_blk); r = int'(rec_pred_row);
        bx = 2 * ((b >> 2) & 1) + (b & 1);
        by = 2 * ((b >> 3) & 1) + ((b >> 1) & 1);
        for (int c = 0; c < 4; c++) check("prediction to reconstruction", int'(rec_pred[c]), exp_pred[b][r][c]);
        if (r == 3) fork
          begin
            // last predicted row in cycle T: write back rows in cycles
            // T+17..T+20 and report done in cycle T+20 (+ extra latency)
            repeat (17 + rec_extra) @(negedge clk);
            for (int rr = 0; rr < 4; rr++) begin
              rec_wr_valid = 1'b1; rec_wr_blk = 4'(b); rec_wr_row = 2'(rr);
              for (int c = 0; c < 4; c++) rec_wr_pix[c] = pix_t'(pic[4 * by + rr + 1][4 * bx + c + 1]);
              rec_done = (rr == 3);
              @(negedge clk);
            end
            rec_wr_valid = 1'b0; rec_done = 1'b0;
          end
        join_none
      end
    end
  end

  // ---------------- mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (phase == PH_I16) n_clis++;
    if (phase == PH_VNEXT && dut.req.valid) n_mls++;
    if (dut.u_prep.busy && phase == PH_I16 && dut.req.mode < 4'd2) n_edps++;
    if (phase == PH_WAIT) n_stall++;
    if (dut.nxt) n_ahead++;
  end

  // ---------------- reference model of one macroblock
  int ref_modes [16], ref_i4acc_blk [16], ref_lb_blk [16], ref_i16_mode, ref_i16_cost, exp_is_i4;

  task automatic reference();
    int t [8], lf [4], m, acc, ac [4], top16 [16], left16 [16], mm;
    blk4_t d, g [4];
    int s, dc, best, bc, dcc, c16 [4], lb;
    acc = 0; ac = '{0, 0, 0, 0};
    for (int k = 0; k < 16; k++) begin top16[k] = pic[0][k + 1]; left16[k] = pic[k + 1][0]; end
    mm = pic[0][0];
    for (int b = 0; b < 16; b++) begin
      int bx, by, x0, y0, p;
      bx = 2 * ((b >> 2) & 1) + (b & 1);
      by = 2 * ((b >> 3) & 1) + ((b >> 1) & 1);
      x0 = 4 * bx; y0 = 4 * by;
      for (int k = 0; k < 8; k++) t[k] = pic[y0][x0 + k + 1];
      if (b == 3 || b == 7 || b == 11 || b == 13 || b == 15) for (int k = 4; k < 8; k++) t[k] = t[3];
      for (int k = 0; k < 4; k++) lf[k] = pic[y0 + k + 1][x0];
      m = pic[y0][x0];
      best = 0; bc = 1 << 30;
      for (int md = 0; md < 9; md++) begin
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          d[y][x] = pic[y0 + y + 1][x0 + x + 1] - ref_i4(md, t, lf, m, x, y);
        s = (had_sum(d, dc) + 1) / 2;
        if (s < bc) begin bc = s; best = md; end
      end
      ref_modes[b] = best;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) exp_pred[b][y][x] = ref_i4(best, t, lf, m, x, y);
      acc += bc;
      ref_i4acc_blk[b] = acc > 131071 ? 131071 : acc;
      for (int md = 0; md < 4; md++) begin
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          d[y][x] = pic[y0 + y + 1][x0 + x + 1] - ref_i16(md, top16, left16, mm, x0 + x, y0 + y);
        s = had_sum(d, dc);
        ac[md] += s - iabs(dc);
        g[md][by][bx] = dc >>> 2;
      end
      lb = 131071;
      for (int md = 0; md < 4; md++) if (ac[md] / 2 < lb) lb = ac[md] / 2;
      ref_lb_blk[b] = lb;
    end
    ref_i16_mode = 0;
    for (int md = 0; md < 4; md++) begin
      c16[md] = (ac[md] + had_sum(g[md], dcc)) / 2;
      if (c16[md] > 131071) c16[md] = 131071;
      if (c16[md] < c16[ref_i16_mode]) ref_i16_mode = md;
    end
    ref_i16_cost = c16[ref_i16_mode];
    exp_is_i4 = int'(ref_i4acc_blk[15] < ref_i16_cost);
  endtask

  task automatic make_mb(input int kind);
    int gx, gy, base;
    gx = $urandom_range(0, 12) - 6; gy = $urandom_range(0, 12) - 6; base = $urandom_range(60, 190);
    for (int y = 0; y < 17; y++)
      for (int x = 0; x < 21; x++) begin
        case (kind)
          0: pic[y][x] = $urandom_range(0, 255);                                    // texture
          1: pic[y][x] = clip255(base + (gx * (x - 8)) / 2 + (gy * (y - 8)) / 2 + int'($urandom_range(0, 2)));  // gradient
          2: pic[y][x] = base;                                                      // flat
          default: pic[y][x] = ((x / 4 + y / 4) % 2 != 0) ? 230 : 20;                    // blocky edges
        endcase
      end
  endtask

  task automatic set_ports();
    corner = pix_t'(pic[0][0]);
    for (int k = 0; k < 20; k++) top_row[k] = pix_t'(pic[0][k + 1]);
    for (int k = 0; k < 16; k++) left_col[k] = pix_t'(pic[k + 1][0]);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur_mb[y][x] = pix_t'(pic[y + 1][x + 1]);
  endtask

  initial begin
    int cycles, exp_cycles, exp_skip_blk, v0;
    logic pre_in;
    foreach (top_row[k]) top_row[k] = '0;
    foreach (left_col[k]) left_col[k] = '0;
    foreach (cur_mb[y, x]) cur_mb[y][x] = '0;
    corner = '0;
    rec_extra = 0;
    foreach (nxt_top[k]) nxt_top[k] = '0;
    foreach (nxt_blk0[y, x]) nxt_blk0[y][x] = '0;
    for (int mbn = 0; mbn < 12; mbn++) begin
      make_mb(mbn % 4);
      pics[mbn] = pic;
    end
    pre_in = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mbn = 0; mbn < 12; mbn++) begin
      pic = pics[mbn];
      set_ports();
      reference();
      // offer the next macroblock's block 0 to all but MB 3 and the last one
      nxt_valid = mbn != 3 && mbn < 11;
      if (nxt_valid) begin
        for (int c = 0; c < 4; c++) nxt_top[c] = pix_t'(pics[mbn + 1][0][c + 1]);
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) nxt_blk0[y][x] = pix_t'(pics[mbn + 1][y + 1][x + 1]);
      end
      v0 = pre_in ? 0 : 4;
      rec_extra = (mbn % 6 == 5) ? 3 : 0;
      slpde_en = (mbn >= 8);
      // threshold: below the cost after a few blocks, so the engine stops early
      inter_cost = mb_cost_t'((mbn >= 8) ? ref_i4acc_blk[mbn - 8] : 0);
      exp_skip_blk = -1;
      if (slpde_en)
        for (int b = 0; b < 16 && exp_skip_blk < 0; b++)
          if (ref_i4acc_blk[b] > int'(inter_cost) && ref_lb_blk[b] > int'(inter_cost)) exp_skip_blk = b;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cycles = 0;
      while (!mb_done) begin
        if (phase != PH_FINAL && phase != PH_IDLE) cycles++;
        @(negedge clk);
      end
      if (exp_skip_blk >= 0) begin
        check("skipped", int'(mb_skipped), 1);
        exp_cycles = v0 + (exp_skip_blk + 1) * 56 + (exp_skip_blk + 1) * rec_extra;
        check("cycles to termination", cycles, exp_cycles);
        for (int b = 0; b <= exp_skip_blk; b++) check("4x4 mode", int'(i4_modes[b]), ref_modes[b]);
        if (mb_skipped) n_skip++;
      end else begin
        exp_cycles = v0 + 16 * 56 + 16 * rec_extra;
        check("skipped", int'(mb_skipped), 0);
        check("cycles per macroblock", cycles, exp_cycles);
        for (int b = 0; b < 16; b++) check("4x4 mode", int'(i4_modes[b]), ref_modes[b]);
        check("i4 cost", int'(i4_cost), ref_i4acc_blk[15]);
        check("i16 mode", int'(i16_mode), ref_i16_mode);
        check("i16 cost", int'(i16_cost), ref_i16_cost);
        check("mb is i4", int'(mb_is_i4), exp_is_i4);
        if (mb_is_i4) n_i4++; else n_i16++;
      end
      $display("MB %0d kind %0d: %0d cycles, skipped %0d, i4 %0d (i4 cost %0d, i16 mode %0d cost %0d)",
               mbn, mbn % 4, cycles, mb_skipped, mb_is_i4, i4_cost, i16_mode, i16_cost);
      pre_in = nxt_valid && (exp_skip_blk < 0 || exp_skip_blk == 15);
      repeat (3) @(negedge clk);
    end
    $display("look-ahead cycles %0d", n_ahead);
    check("look-ahead happened", int'(n_ahead > 0), 1);
    $display("mechanisms: CLIS %0d MLS %0d EDPS %0d stall %0d SLPDE %0d I4MB %0d I16MB %0d",
             n_clis, n_mls, n_edps, n_stall, n_skip, n_i4, n_i16);
    check("CLIS happened", int'(n_clis > 0), 1);
    check("MLS happened", int'(n_mls > 0), 1);
    check("EDPS happened", int'(n_edps > 0), 1);
    check("stall happened", int'(n_stall > 0), 1);
    check("SLPDE happened", int'(n_skip > 0), 1);
    check("I4MB chosen", int'(n_i4 > 0), 1);
    check("I16MB chosen", int'(n_i16 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
