// intra_top: four-parallel H.264/AVC luma intra prediction engine with
// category-level interleaving (CLIS), mode-level scheduling (MLS), early
// data preparation (EDPS) and stage-level partial distortion elimination
// (SLPDE).
//
// For one macroblock it evaluates all nine 4x4 modes of each of the sixteen
// 4x4 blocks and all four 16x16 modes, with Hadamard (SATD) costs, picks the
// best 4x4 mode of each block, hands that block's prediction to an external
// reconstruction engine, and in the end chooses the best 16x16 mode and the
// macroblock type. The 16x16 work is cut into sixteen 4x4 pieces placed in
// the reconstruction bubbles of the 4x4 loop, so the engine is never idle
// while a block is reconstructed.
//
// Structure: intra_ctrl issues one request per cycle; nb_buffer supplies the
// neighbours; intra_pred_gen (four intra_pe) produces four predicted pixels
// the same cycle; satd4x4 costs each block one cycle after its last row;
// mode_decision, i16_dc_hadamard and slpde_unit close the loop; i16_prep
// computes the 16x16 DC and plane constants early.
//
// Interface: cur_mb (original pixels), top_row (row above, 16 + 4
// above-right pixels), left_col and corner must be stable from start until
// mb_done. The reconstruction engine sees rec_pred_* (the four rows of the
// chosen 4x4 prediction, one per cycle), writes the reconstructed rows back
// through rec_wr_* and pulses rec_done; the engine budgets 20 cycles from the
// cycle after the last predicted row and stalls if rec_done comes later.
// inter_cost and slpde_en drive early termination. Look-ahead: if
// nxt_valid is high (with nxt_top, the four pixels above the next
// macroblock's first 4x4 block, and nxt_blk0, its original pixels) when block
// 15's 16x16 part ends, the engine computes that block's vertical mode in
// block 15's otherwise idle window slot, and the next macroblock takes 896
// instead of 900 cycles. The ports must hold until block 15's window ends,
// and the next start must bring the same data. Results are valid on the
// mb_done pulse: mb_skipped (terminated, code as inter), otherwise
// mb_is_i4, the sixteen 4x4 modes, the 16x16 mode and both costs.
module intra_top
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pix_t        cur_mb   [16][16],  // [y][x]
  input  pix_t        top_row  [20],
  input  pix_t        left_col [16],
  input  pix_t        corner,
  input  logic        slpde_en,
  input  mb_cost_t    inter_cost,
  // look-ahead: block 0 of the next macroblock
  input  logic        nxt_valid,
  input  pix_t        nxt_top  [4],
  input  pix_t        nxt_blk0 [4][4],  // [y][x]
  // reconstruction engine
  output logic        rec_pred_valid,
  output logic [3:0]  rec_pred_blk,
  output logic [1:0]  rec_pred_row,
  output pix_t        rec_pred [4],
  input  logic        rec_wr_valid,
  input  logic [3:0]  rec_wr_blk,
  input  logic [1:0]  rec_wr_row,
  input  pix_t        rec_wr_pix [4],
  input  logic        rec_done,
  // results
  output logic        busy,
  output phase_e      phase,
  output logic        mb_done,
  output logic        mb_skipped,
  output logic        mb_is_i4,
  output logic [3:0]  i4_modes [16],
  output logic [1:0]  i16_mode,
  output mb_cost_t    i4_cost,
  output mb_cost_t    i16_cost
);

  pred_req_t  req;
  logic       load, prep_start, slpde_eval, hada_start, final_start;
  logic       blk_done, skip_now, skip_latched, hada_done, hada_busy, final_valid;
  logic [3:0] best_mode;
  logic       nxt;
  pix_t       e_nb [13], e [13], u [4], l [4], mb_top [16], mb_left [16], mb_corner;
  pix_t       pred [4], orig [4];
  logic       prep_busy, dc_valid, plane_valid;
  pix_t       dc16;
  pe_val_t    pa, pb, pc;
  logic       satd_valid;
  cost_tag_t  tag_in, tag_out;
  blk_cost_t  satd;
  logic [14:0] sum_ac;
  logic signed [13:0] dc_coef;
  mb_cost_t   i4_acc, i16_lb;
  logic [16:0] dc_cost [4];

  intra_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .best_mode, .blk_done, .rec_done, .skip_now, .hada_done, .final_valid, .nxt_valid,
    .req_o(req), .nxt_o(nxt), .phase_o(phase), .load_o(load), .prep_start_o(prep_start),
    .slpde_eval_o(slpde_eval), .hada_start_o(hada_start), .final_start_o(final_start),
    .busy_o(busy), .mb_done_o(mb_done), .mb_skipped_o(mb_skipped)
  );

  nb_buffer u_nb (
    .clk, .rst_n, .load,
    .top_in(top_row), .left_in(left_col), .corner_in(corner),
    .wr_valid(rec_wr_valid), .wr_blk(rec_wr_blk), .wr_row(rec_wr_row), .wr_pix(rec_wr_pix),
    .rd_blk(req.blk),
    .e_o(e_nb), .u_o(u), .l_o(l), .mb_top_o(mb_top), .mb_left_o(mb_left), .mb_corner_o(mb_corner)
  );

  i16_prep u_prep (
    .clk, .rst_n, .start(prep_start),
    .top(mb_top), .left(mb_left), .corner(mb_corner),
    .busy(prep_busy), .dc_valid, .plane_valid,
    .dc_o(dc16), .a_o(pa), .b_o(pb), .c_o(pc)
  );

  intra_pred_gen u_gen (
    .clk, .rst_n, .req, .e, .u, .l, .dc16, .pa, .pb, .pc, .pred_o(pred)
  );

  // The look-ahead vertical mode takes its top neighbours and original
  // pixels from the next macroblock's ports.
  always_comb begin
    e = e_nb;
    if (nxt) for (int c = 0; c < 4; c++) e[5 + c] = nxt_top[c];
    for (int c = 0; c < 4; c++)
      orig[c] = nxt ? nxt_blk0[req.row][c]
                    : cur_mb[{blk_y(req.blk), req.row}][{blk_x(req.blk), 2'(c)}];
    tag_in = '{cat: req.cat, mode: req.mode, blk: req.blk};
  end

  satd4x4 #(.tag_t(cost_tag_t)) u_satd (
    .clk, .rst_n,
    .in_valid(req.valid && !req.regen), .row(req.row), .orig, .pred, .tag_in,
    .out_valid(satd_valid), .tag_out, .satd_o(satd), .sum_ac_o(sum_ac), .dc_o(dc_coef)
  );

  mode_decision u_md (
    .clk, .rst_n, .clear(load),
    .res_valid(satd_valid), .res_cat(tag_out.cat), .res_mode(tag_out.mode), .res_blk(tag_out.blk),
    .res_satd(satd), .res_sum_ac(sum_ac),
    .blk_done_o(blk_done), .best_mode_o(best_mode), .i4_acc_o(i4_acc), .i16_lb_o(i16_lb),
    .i4_modes_o(i4_modes),
    .final_start, .dc_cost,
    .final_valid_o(final_valid), .i16_mode_o(i16_mode), .i16_cost_o(i16_cost), .mb_is_i4_o(mb_is_i4)
  );

  i16_dc_hadamard u_dch (
    .clk, .rst_n,
    .wr_valid(satd_valid && tag_out.cat == CAT_I16), .wr_mode(tag_out.mode[1:0]),
    .wr_blk(tag_out.blk), .wr_dc(dc_coef),
    .calc_start(hada_start), .busy_o(hada_busy), .done_o(hada_done), .dc_cost_o(dc_cost)
  );

  slpde_unit u_slpde (
    .clk, .rst_n, .clear(load), .en(slpde_en), .eval(slpde_eval),
    .inter_cost, .i4_acc, .i16_lb, .skip_now_o(skip_now), .skip_o(skip_latched)
  );

  assign i4_cost        = i4_acc;
  assign rec_pred_valid = req.valid && req.regen;
  assign rec_pred_blk   = req.blk;
  assign rec_pred_row   = req.row;
  assign rec_pred       = pred;

  // The 16x16 DC and plane outputs of block 0 must find EDPS finished.
  a_dc_ready: assert property (@(posedge clk) disable iff (!rst_n)
    req.valid && req.cat == CAT_I16 && req.mode == 4'(I16_DC) |-> dc_valid);
  a_plane_ready: assert property (@(posedge clk) disable iff (!rst_n)
    req.valid && req.cat == CAT_I16 && req.mode == 4'(I16_PLANE) |-> plane_valid);

endmodule
