// tb_intra_frame: runs a whole 176x144 (QCIF) frame, 11 x 9 macroblocks in
// raster order, through the intra engine, first with early termination off
// and then with it on, and reports the cycles per macroblock of each pass.
//
// The frame is synthetic: a smooth gradient background, a random-texture
// rectangle, a blocky checkerboard area and a flat area, so both macroblock
// types occur. Neighbours of each macroblock are taken from the frame, with
// the frame's edge pixels repeated outside it (the engine itself treats
// every macroblock as interior). As in tb_intra_top, a reconstruction model
// returns the original pixels within the 20-cycle budget, so an independent
// reference can compute every neighbour and every cost.
//
// Pass 1 checks every macroblock against the reference: 4x4 modes,
// predictions to reconstruction, 16x16 mode, both costs, macroblock type and
// the cycle count. Each macroblock offers the next one's block 0 to the
// look-ahead, so after the first one every macroblock takes
// 16 x (36 + 4 + 16) = 896 cycles.
// Pass 2 supplies an inter cost per macroblock, standing in for the motion
// search of an encoder that found the true motion: the halved 4x4 SATD of a
// noise-only residual, with a noise level that varies across the frame. It
// checks that each macroblock terminates exactly after the first block at
// which both running intra costs exceed the inter cost, with the cycle count
// that implies. A macroblock that runs to the end must give the pass-1
// results. Both passes print their average cycles per macroblock and the
// saving from early termination.
module tb_intra_frame;
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

  always #5 clk = ~clk;

  intra_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---------------- synthetic frame
  localparam int FW = 176, FH = 144, MBW = FW / 16, MBH = FH / 16;
  int frame [FH][FW];

  function automatic int fpix(input int y, input int x);
    int yy, xx;
    yy = y < 0 ? 0 : (y >= FH ? FH - 1 : y);
    xx = x < 0 ? 0 : (x >= FW ? FW - 1 : x);
    return frame[yy][xx];
  endfunction

  task automatic make_frame();
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        if (x >= 16 && x < 72 && y >= 16 && y < 64)
          frame[y][x] = $urandom_range(0, 255);                       // texture
        else if (x >= 96 && x < 160 && y >= 80 && y < 128)
          frame[y][x] = ((x / 4 + y / 4) % 2 != 0) ? 220 : 30;        // blocky
        else if (x >= 112 && y < 48)
          frame[y][x] = 140;                                          // flat
        else
          frame[y][x] = clip255(40 + x / 2 + y / 3 + int'($urandom_range(0, 2)));  // gradient
      end
  endtask

  // macroblock (mx, my) with its boundary into pic[][] and the ports
  task automatic load_mb(input int mx, input int my);
    for (int y = 0; y < 17; y++)
      for (int x = 0; x < 21; x++) pic[y][x] = fpix(16 * my + y - 1, 16 * mx + x - 1);
    corner = pix_t'(pic[0][0]);
    for (int k = 0; k < 20; k++) top_row[k] = pix_t'(pic[0][k + 1]);
    for (int k = 0; k < 16; k++) left_col[k] = pix_t'(pic[k + 1][0]);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur_mb[y][x] = pix_t'(pic[y + 1][x + 1]);
  endtask

  // offer block 0 of the next macroblock in raster order (none after the last)
  task automatic offer_next(input int mx, input int my);
    int nx, ny;
    nx = (mx + 1) % MBW; ny = my + (mx + 1) / MBW;
    nxt_valid = ny < MBH;
    for (int c = 0; c < 4; c++) nxt_top[c] = pix_t'(fpix(16 * ny - 1, 16 * nx + c));
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) nxt_blk0[y][x] = pix_t'(fpix(16 * ny + y, 16 * nx + x));
  endtask

  // inter-cost stand-in: halved 4x4 SATD of uniform noise of +-amp
  function automatic int noise_cost(input int amp);
    blk4_t d;
    int dc, tot;
    tot = 0;
    for (int b = 0; b < 16; b++) begin
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        d[y][x] = int'($urandom_range(0, 2 * amp)) - amp;
      tot += (had_sum(d, dc) + 1) / 2;
    end
    return tot;
  endfunction

  // run one macroblock; returns its cycle count
  task automatic run_mb(output int cycles);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 0;
    while (!mb_done) begin
      if (phase != PH_FINAL && phase != PH_IDLE) cycles++;
      @(negedge clk);
    end
  endtask

  int p1_modes [MBH][MBW][16], p1_i16_mode [MBH][MBW], p1_i4_cost [MBH][MBW];
  int p1_i16_cost [MBH][MBW], p1_is_i4 [MBH][MBW];

  initial begin
    int cycles, exp_skip_blk, tot1, tot2, n_i4, n_i16, n_skip, amp, v0;
    logic pre_in;
    foreach (top_row[k]) top_row[k] = '0;
    foreach (left_col[k]) left_col[k] = '0;
    foreach (cur_mb[y, x]) cur_mb[y][x] = '0;
    corner = '0;
    rec_extra = 0;
    tot1 = 0; tot2 = 0; n_i4 = 0; n_i16 = 0; n_skip = 0;
    make_frame();
    foreach (nxt_top[k]) nxt_top[k] = '0;
    foreach (nxt_blk0[y, x]) nxt_blk0[y][x] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // pass 1: full mode search on every macroblock
    slpde_en = 1'b0; inter_cost = '0;
    pre_in = 1'b0;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        load_mb(mx, my);
        reference();
        offer_next(mx, my);
        run_mb(cycles);
        tot1 += cycles;
        check("pass 1 cycles per macroblock", cycles, pre_in ? 896 : 900);
        pre_in = nxt_valid;
        check("pass 1 not skipped", int'(mb_skipped), 0);
        for (int b = 0; b < 16; b++) check("4x4 mode", int'(i4_modes[b]), ref_modes[b]);
        check("i4 cost", int'(i4_cost), ref_i4acc_blk[15]);
        check("i16 mode", int'(i16_mode), ref_i16_mode);
        check("i16 cost", int'(i16_cost), ref_i16_cost);
        check("mb is i4", int'(mb_is_i4), exp_is_i4);
        if (mb_is_i4) n_i4++; else n_i16++;
        for (int b = 0; b < 16; b++) p1_modes[my][mx][b] = int'(i4_modes[b]);
        p1_i16_mode[my][mx] = int'(i16_mode); p1_i4_cost[my][mx] = int'(i4_cost);
        p1_i16_cost[my][mx] = int'(i16_cost); p1_is_i4[my][mx] = int'(mb_is_i4);
        repeat (2) @(negedge clk);
      end

    // pass 2: the same frame with early termination against an inter cost
    slpde_en = 1'b1;
    pre_in = 1'b0;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        load_mb(mx, my);
        reference();
        amp = 2 + 3 * ((mx + 2 * my) % 8);
        inter_cost = mb_cost_t'(noise_cost(amp));
        exp_skip_blk = -1;
        for (int b = 0; b < 16 && exp_skip_blk < 0; b++)
          if (ref_i4acc_blk[b] > int'(inter_cost) && ref_lb_blk[b] > int'(inter_cost)) exp_skip_blk = b;
        offer_next(mx, my);
        v0 = pre_in ? 0 : 4;
        run_mb(cycles);
        tot2 += cycles;
        pre_in = nxt_valid && (exp_skip_blk < 0 || exp_skip_blk == 15);
        if (exp_skip_blk >= 0) begin
          check("pass 2 skipped", int'(mb_skipped), 1);
          check("pass 2 cycles to termination", cycles, v0 + 56 * (exp_skip_blk + 1));
          for (int b = 0; b <= exp_skip_blk; b++) check("pass 2 4x4 mode", int'(i4_modes[b]), p1_modes[my][mx][b]);
          if (mb_skipped) n_skip++;
        end else begin
          check("pass 2 not skipped", int'(mb_skipped), 0);
          check("pass 2 cycles per macroblock", cycles, v0 + 896);
          for (int b = 0; b < 16; b++) check("pass 2 4x4 mode", int'(i4_modes[b]), p1_modes[my][mx][b]);
          check("pass 2 i16 mode", int'(i16_mode), p1_i16_mode[my][mx]);
          check("pass 2 i4 cost", int'(i4_cost), p1_i4_cost[my][mx]);
          check("pass 2 i16 cost", int'(i16_cost), p1_i16_cost[my][mx]);
          check("pass 2 mb is i4", int'(mb_is_i4), p1_is_i4[my][mx]);
        end
        repeat (2) @(negedge clk);
      end

    $display("frame %0dx%0d, %0d macroblocks: I4MB %0d, I16MB %0d", FW, FH, MBW * MBH, n_i4, n_i16);
    $display("full search: %0d cycles, %0d.%02d cycles per macroblock",
             tot1, tot1 / (MBW * MBH), (tot1 * 100 / (MBW * MBH)) % 100);
    $display("with early termination: %0d cycles, %0d.%02d cycles per macroblock, %0d terminated, saving %0d%%",
             tot2, tot2 / (MBW * MBH), (tot2 * 100 / (MBW * MBH)) % 100, n_skip, 100 - tot2 * 100 / tot1);
    check("both macroblock types chosen", int'(n_i4 > 0 && n_i16 > 0), 1);
    check("some macroblocks terminated early", int'(n_skip > 0), 1);
    check("some macroblocks not terminated", int'(n_skip < MBW * MBH), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
