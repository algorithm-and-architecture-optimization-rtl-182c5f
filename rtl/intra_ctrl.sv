// intra_ctrl: schedule controller of the luma intra engine.
//
// It issues one predictor request (one row of four pixels) per cycle and
// sequences a macroblock as follows, for each 4x4 block b in zig-zag order:
//   I4    - 4x4 modes 1..8, four rows each (32 cycles). Mode 0 (vertical) of
//           block b was already done: it needs no left neighbours, so
//           mode-level scheduling (MLS) moves it into the previous block's
//           reconstruction window. Block 0 starts with its own mode 0 (4
//           cycles).
//   BEST  - the best mode, known combinationally from mode decision on the
//           first cycle, is regenerated (4 cycles) and sent to the
//           reconstruction engine.
//   I16   - category-level interleaving (CLIS): while block b is being
//           reconstructed (REC_CYCLES = 20 cycles) the engine computes the
//           four 16x16 modes for the same 4x4 position (16 cycles, modes
//           vertical, horizontal, DC, plane). For block 0 it also starts the
//           early data preparation (EDPS) of DC and plane, which completes
//           during the vertical and horizontal outputs;
//   VNEXT - the last 4 window cycles produce mode 0 of block b + 1;
//   WAIT  - only if the reconstruction has not reported rec_done by the end
//           of the window (a stall).
// After each window the early-termination unit is evaluated (SLPDE); if it
// fires the macroblock ends as inter (mb_skipped_o). After block 15 the DC
// Hadamard (FINAL) and the final decision run and mb_done_o pulses.
// Block 15 has no next block. If nxt_valid is high when block 15's I16 part
// ends, its VNEXT slot computes the vertical mode of block 0 of the NEXT
// macroblock instead (nxt_o marks those four requests; the top takes their
// neighbours and pixels from its look-ahead ports), and the next start then
// begins directly at mode 1. A macroblock thus takes 16 x (36 + 4 + 16) =
// 896 request cycles after a look-ahead and 900 without one (the first of a
// stream), when reconstruction keeps to 20 cycles. The mode order, the
// interleaving and the cycle budgets follow the engine's description; the
// handshakes (start, rec_done, nxt_valid) and the place of the SLPDE
// evaluation are this design's choices. nxt_valid must be stable during the
// last cycle of block 15's I16 part.
module intra_ctrl
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] best_mode,    // from mode decision, valid with blk_done
  input  logic       blk_done,
  input  logic       rec_done,     // reconstruction of the current block written back
  input  logic       skip_now,     // SLPDE decision for this cycle
  input  logic       hada_done,
  input  logic       final_valid,
  input  logic       nxt_valid,    // next macroblock's block 0 data offered
  output pred_req_t  req_o,
  output logic       nxt_o,        // this request is the next macroblock's
  output phase_e     phase_o,
  output logic       load_o,       // latch the macroblock boundary, clear costs
  output logic       prep_start_o,
  output logic       slpde_eval_o,
  output logic       hada_start_o,
  output logic       final_start_o,
  output logic       busy_o,
  output logic       mb_done_o,
  output logic       mb_skipped_o
);

  phase_e     ph;
  logic [3:0] blk;
  logic [3:0] mode;
  logic [1:0] row;
  logic [4:0] wcnt;
  logic [3:0] regen_mode;
  logic       rec_got;
  logic       win_end;
  logic       fin_wait;
  logic       pre_go;     // block 15's idle slot runs the next vertical mode
  logic       pre_done;   // ... and it has been done for the next start

  assign phase_o = ph;
  assign busy_o  = ph != PH_IDLE;

  // Window (or wait) ends this cycle and the reconstruction is in.
  always_comb begin
    win_end = ((ph == PH_VNEXT && wcnt == 5'(REC_CYCLES - 1)) || ph == PH_WAIT) && (rec_got || rec_done);
  end

  always_comb begin
    req_o = '0;
    unique case (ph)
      PH_I4: begin
        req_o.valid = 1'b1; req_o.cat = CAT_I4; req_o.mode = mode; req_o.row = row; req_o.blk = blk;
      end
      PH_BEST: begin
        req_o.valid = 1'b1; req_o.cat = CAT_I4; req_o.row = row; req_o.blk = blk; req_o.regen = 1'b1;
        req_o.mode = (row == 2'd0) ? best_mode : regen_mode;
      end
      PH_I16: begin
        req_o.valid = 1'b1; req_o.cat = CAT_I16; req_o.mode = {2'b00, wcnt[3:2]};
        req_o.row = wcnt[1:0]; req_o.blk = blk;
      end
      PH_VNEXT: begin
        if (blk != 4'd15 || pre_go) begin
          req_o.valid = 1'b1; req_o.cat = CAT_I4; req_o.mode = I4_V;
          req_o.row = wcnt[1:0]; req_o.blk = blk + 4'd1;   // block 15 + 1 wraps to 0
        end
      end
      default: req_o = '0;
    endcase
    nxt_o        = ph == PH_VNEXT && blk == 4'd15 && pre_go;
    load_o       = ph == PH_IDLE && start;
    prep_start_o = ph == PH_I16 && wcnt == 5'd0 && blk == 4'd0;
    slpde_eval_o = win_end;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= PH_IDLE; blk <= '0; mode <= '0; row <= '0; wcnt <= '0; regen_mode <= '0;
      rec_got <= 1'b0; hada_start_o <= 1'b0; final_start_o <= 1'b0;
      mb_done_o <= 1'b0; mb_skipped_o <= 1'b0; fin_wait <= 1'b0;
      pre_go <= 1'b0; pre_done <= 1'b0;
    end else begin
      hada_start_o <= 1'b0; final_start_o <= 1'b0; mb_done_o <= 1'b0;
      if (rec_done) rec_got <= 1'b1;
      unique case (ph)
        PH_IDLE: if (start) begin
          // with the vertical mode already done, block 0 starts at mode 1
          ph <= PH_I4; blk <= '0; mode <= pre_done ? 4'd1 : 4'd0; row <= '0;
          mb_skipped_o <= 1'b0; pre_done <= 1'b0;
        end
        PH_I4: begin
          row <= row + 2'd1;
          if (row == 2'd3) begin
            if (mode == I4_HU) begin
              ph <= PH_BEST;
              mode <= '0;
            end else mode <= mode + 4'd1;
          end
        end
        PH_BEST: begin
          row <= row + 2'd1;
          if (row == 2'd0) regen_mode <= best_mode;
          if (row == 2'd3) begin
            ph <= PH_I16; wcnt <= '0; rec_got <= 1'b0;
          end
        end
        PH_I16: begin
          wcnt <= wcnt + 5'd1;
          if (wcnt == 5'd15) begin
            ph <= PH_VNEXT;
            pre_go <= blk == 4'd15 && nxt_valid;
          end
        end
        PH_VNEXT, PH_WAIT: begin
          if (ph == PH_VNEXT) wcnt <= wcnt + 5'd1;
          if (win_end) begin
            rec_got <= 1'b0;
            pre_done <= pre_go; pre_go <= 1'b0;
            if (skip_now) begin
              ph <= PH_IDLE; mb_skipped_o <= 1'b1; mb_done_o <= 1'b1;
            end else if (blk == 4'd15) begin
              ph <= PH_FINAL; hada_start_o <= 1'b1; fin_wait <= 1'b0;
            end else begin
              ph <= PH_I4; blk <= blk + 4'd1; mode <= 4'd1; row <= '0;
            end
          end else if (ph == PH_VNEXT && wcnt == 5'(REC_CYCLES - 1)) ph <= PH_WAIT;
        end
        PH_FINAL: begin
          if (hada_done) begin final_start_o <= 1'b1; fin_wait <= 1'b1; end
          if (fin_wait && final_valid) begin ph <= PH_IDLE; mb_done_o <= 1'b1; end
        end
        default: ph <= PH_IDLE;
      endcase
    end
  end

  // BEST must find the block's mode decision complete on its first cycle.
  a_best_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 ph == PH_BEST && row == 2'd0 |-> blk_done);

endmodule
