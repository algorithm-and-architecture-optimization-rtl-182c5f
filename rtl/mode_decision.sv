// mode_decision: chooses the best 4x4 mode of every block and, at the end of a
// macroblock, the best 16x16 mode and the macroblock type.
//
// I4MB side: the nine mode costs of a block arrive in schedule order, mode 0
// (vertical) first and mode 8 last. A 13-bit comparator keeps the running
// minimum (ties keep the earlier mode). On the cycle the mode-8 cost arrives
// the block's best mode is available combinationally (blk_done_o,
// best_mode_o), so the controller can regenerate that mode for
// reconstruction on the next cycle without a bubble. The best cost is added
// to the 17-bit macroblock accumulator i4_acc_o.
// I16MB side: for each of the four modes the per-block AC sums are
// accumulated. i16_lb_o is the smallest of the four accumulated costs so far
// (AC sum / 2), a lower bound of each final I16MB cost used by early
// termination. final_start adds the DC-Hadamard costs: cost16 = (AC + DC) / 2,
// saturated to 17 bits; the lowest wins (ties keep the lower mode), and the
// macroblock is I4MB when its accumulated cost is strictly lower.
// Costs contain no mode-signalling term. Mode decision on the costs of all
// modes follows the engine's description; the cost definition and the tie
// rules are this design's choice. clear (start of a macroblock) empties the
// accumulators but not the running minimum, which a look-ahead vertical-mode
// cost of the new macroblock may already hold (a mode-0 cost always restarts
// it); reset clears everything.
module mode_decision
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        res_valid,
  input  cat_e        res_cat,
  input  logic [3:0]  res_mode,
  input  logic [3:0]  res_blk,
  input  blk_cost_t   res_satd,
  input  logic [14:0] res_sum_ac,
  output logic        blk_done_o,
  output logic [3:0]  best_mode_o,
  output mb_cost_t    i4_acc_o,
  output mb_cost_t    i16_lb_o,
  output logic [3:0]  i4_modes_o [16],
  input  logic        final_start,
  input  logic [16:0] dc_cost [4],
  output logic        final_valid_o,
  output logic [1:0]  i16_mode_o,
  output mb_cost_t    i16_cost_o,
  output logic        mb_is_i4_o
);

  localparam mb_cost_t COST_MAX = '1;

  blk_cost_t   run_min;
  logic [3:0]  run_mode;
  logic [17:0] i16_ac [4];
  blk_cost_t   best_cost;
  logic [17:0] acc_sum;
  mb_cost_t    c16 [4];
  logic [1:0]  bm16;      // best 16x16 mode

  function automatic mb_cost_t sat17(input logic [18:0] v);
    return (v > 19'(COST_MAX)) ? COST_MAX : mb_cost_t'(v);
  endfunction

  always_comb begin
    blk_done_o = res_valid && res_cat == CAT_I4 && res_mode == I4_HU;
    if (res_mode == I4_V || res_satd < run_min) begin
      best_mode_o = res_mode;
      best_cost   = res_satd;
    end else begin
      best_mode_o = run_mode;
      best_cost   = run_min;
    end
    acc_sum = 18'(i4_acc_o) + 18'(best_cost);
    i16_lb_o = COST_MAX;
    for (int m = 0; m < 4; m++)
      if (sat17(19'(i16_ac[m] >> 1)) < i16_lb_o) i16_lb_o = sat17(19'(i16_ac[m] >> 1));
    for (int m = 0; m < 4; m++)
      c16[m] = sat17((19'(i16_ac[m]) + 19'(dc_cost[m])) >> 1);
    bm16 = 2'd0;
    for (int m = 1; m < 4; m++) if (c16[m] < c16[bm16]) bm16 = 2'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_min <= '0; run_mode <= '0; i4_acc_o <= '0;
      for (int m = 0; m < 4; m++) i16_ac[m] <= '0;
      for (int b = 0; b < 16; b++) i4_modes_o[b] <= '0;
      final_valid_o <= 1'b0; i16_mode_o <= '0; i16_cost_o <= '0; mb_is_i4_o <= 1'b0;
    end else if (clear) begin
      // run_min/run_mode are kept: the next macroblock's vertical-mode cost
      // may already have arrived (it always restarts the running minimum)
      i4_acc_o <= '0;
      for (int m = 0; m < 4; m++) i16_ac[m] <= '0;
      final_valid_o <= 1'b0;
    end else begin
      final_valid_o <= 1'b0;
      if (res_valid && res_cat == CAT_I4) begin
        run_min  <= best_cost;
        run_mode <= best_mode_o;
        if (blk_done_o) begin
          i4_modes_o[res_blk] <= best_mode_o;
          i4_acc_o <= (acc_sum > 18'(COST_MAX)) ? COST_MAX : mb_cost_t'(acc_sum);
        end
      end
      if (res_valid && res_cat == CAT_I16)
        i16_ac[res_mode[1:0]] <= i16_ac[res_mode[1:0]] + 18'(res_sum_ac);
      if (final_start) begin
        i16_mode_o    <= bm16;
        i16_cost_o    <= c16[bm16];
        mb_is_i4_o    <= i4_acc_o < c16[bm16];
        final_valid_o <= 1'b1;
      end
    end
  end

endmodule
