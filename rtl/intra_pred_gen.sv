// intra_pred_gen: reconfigurable four-parallel luma predictor generator.
//
// Four intra_pe instances produce one row of a 4x4 block per cycle, so every
// mode of a 4x4 block takes four cycles. The operand multiplexer in front of
// the PEs puts each PE into one of the four configurations of the engine:
//   bypass    - I4 vertical/horizontal, I16 vertical/horizontal and the I16 DC
//               value: operand 0 goes straight to the predictor;
//   normal    - the seven other I4 modes: a 3-tap (p + 2q + r + 2) >> 2 or
//               2-tap (p + q + 1) >> 1 filter, i.e. operands {p,q,q,r} or
//               {p,q,0,0} into the 4-to-1 adder;
//   cascading - I4 DC: PE 1 adds A..D, PE 3 adds I..L, PE 0 adds the two
//               sums with (s + 4) >> 3 and the other PEs take Clip_0;
//   recursive - I16 plane: on row 0 each PE loads its seed
//               a + b*(x-7) + c*(y-7) into Reg_i, on rows 1..3 it adds c to
//               Reg_i; rounding adds 16 and shifts by 5.
// The I4 neighbours arrive as e[0..12] = {L,K,J,I,M,A,B,...,H} (left column
// bottom-up, corner, top row including the upper-right pixels E..H), which
// lets every directional filter be written as taps around a centre index.
// I16 inputs are the four MB-top pixels above the block (u), the four
// MB-left pixels beside it (l), the DC value and the plane constants a, b, c
// from i16_prep.
//
// Timing: combinational from request to pred_o in the same cycle; only the PE
// registers are clocked, so the four rows of a plane-mode block must be
// requested in order on consecutive requests. The plane seeds of a block's
// first row are formed with small constant multiplications, a simplification
// of this design; everything else is the adder datapath of the PEs.
module intra_pred_gen
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pred_req_t  req,
  input  pix_t       e   [13],
  input  pix_t       u   [4],
  input  pix_t       l   [4],
  input  pix_t       dc16,
  input  pe_val_t    pa,
  input  pe_val_t    pb,
  input  pe_val_t    pc,
  output pix_t       pred_o [4]
);

  localparam logic [3:0] ZERO = 4'd13;

  typedef struct packed {
    logic [3:0] i0, i1, i2, i3;
    logic [2:0] shift;   // 0: bypass of operand i0
  } tap_t;

  function automatic tap_t tap3(input int c);
    tap_t t;
    t.i0 = 4'(c - 1); t.i1 = 4'(c); t.i2 = 4'(c); t.i3 = 4'(c + 1); t.shift = 3'd2;
    return t;
  endfunction
  function automatic tap_t tap2(input int p, input int q);
    tap_t t;
    t.i0 = 4'(p); t.i1 = 4'(q); t.i2 = ZERO; t.i3 = ZERO; t.shift = 3'd1;
    return t;
  endfunction
  function automatic tap_t copy1(input int p);
    tap_t t;
    t.i0 = 4'(p); t.i1 = ZERO; t.i2 = ZERO; t.i3 = ZERO; t.shift = 3'd0;
    return t;
  endfunction

  // Neighbour index of left pixel y, top pixel x, corner.
  function automatic int li(input int y); return 3 - y; endfunction
  function automatic int ti(input int x); return 5 + x; endfunction

  // Taps of I4 pixel (x, y) for the bypass and normal configurations.
  function automatic tap_t i4_tap(input logic [3:0] mode, input int x, input int y);
    tap_t t;
    int z;
    t = copy1(13);
    unique case (mode)
      I4_V:  t = copy1(ti(x));
      I4_H:  t = copy1(li(y));
      I4_DDL: begin
        if (x == 3 && y == 3) begin
          t.i0 = 4'(ti(6)); t.i1 = 4'(ti(7)); t.i2 = 4'(ti(7)); t.i3 = 4'(ti(7)); t.shift = 3'd2;
        end else t = tap3(ti(x + y + 1));
      end
      I4_DDR: t = tap3(4 + x - y);
      I4_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z[0] == 1'b0)  t = tap2(4 + x - (y >> 1), 5 + x - (y >> 1));
        else if (z > 0)              t = tap3(4 + x - (y >> 1));
        else if (z == -1)            t = tap3(4);
        else                         t = tap3(5 - y);
      end
      I4_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z[0] == 1'b0)  t = tap2(4 - y + (x >> 1), 3 - y + (x >> 1));
        else if (z > 0)              t = tap3(4 - y + (x >> 1));
        else if (z == -1)            t = tap3(4);
        else                         t = tap3(3 + x);
      end
      I4_VL: begin
        if (y[0] == 1'b0) t = tap2(ti(x + (y >> 1)), ti(x + (y >> 1) + 1));
        else              t = tap3(ti(x + (y >> 1) + 1));
      end
      I4_HU: begin
        z = x + 2 * y;
        if (z > 5)                 t = copy1(li(3));
        else if (z == 5) begin
          t.i0 = 4'(li(2)); t.i1 = 4'(li(3)); t.i2 = 4'(li(3)); t.i3 = 4'(li(3)); t.shift = 3'd2;
        end
        else if (z[0] == 1'b0)     t = tap2(li(y + (x >> 1)), li(y + (x >> 1) + 1));
        else                       t = tap3(li(y + (x >> 1) + 1));
      end
      default: t = copy1(13);
    endcase
    return t;
  endfunction

  pe_val_t ext   [14];
  pe_val_t op    [4][4];   // operands from the operand multiplexer
  pe_val_t op0_in [4];     // PE 0 operands after the cascading path
  pe_cfg_t cfg   [4];
  logic    cascade;
  // Per-PE results as separate signals: the cascading path feeds PE 1 and
  // PE 3 sums into PE 0, and Clip_0/Clip_2 into the other PEs.
  pe_val_t sum0, sum1, sum2, sum3;
  pe_val_t reg0, reg1, reg2, reg3;
  pix_t    clip0, clip1, clip2, clip3;
  pix_t    pred0, pred1, pred2, pred3;
  pe_val_t regv  [4];

  always_comb begin
    for (int k = 0; k < 13; k++) ext[k] = pe_val_t'({8'd0, e[k]});
    ext[13] = '0;
  end

  assign regv = '{reg0, reg1, reg2, reg3};

  always_comb begin
    tap_t t;
    pe_val_t seed_row;
    for (int i = 0; i < 4; i++) begin
      op[i][0] = '0; op[i][1] = '0; op[i][2] = '0; op[i][3] = '0;
      cfg[i].shift = 3'd0; cfg[i].reg_ld = 1'b0; cfg[i].out_sel = OUT_BYPASS;
    end
    cascade = 1'b0;
    t = copy1(13);
    seed_row = pa + pb * (pe_val_t'({blk_x(req.blk), 2'b00}) - pe_val_t'(7))
                  + pc * (pe_val_t'({blk_y(req.blk), 2'b00}) - pe_val_t'(7));
    if (req.cat == CAT_I4) begin
      if (req.mode == I4_DC) begin
        // cascading configuration
        cascade = 1'b1;
        op[1][0] = ext[ti(0)]; op[1][1] = ext[ti(1)]; op[1][2] = ext[ti(2)]; op[1][3] = ext[ti(3)];
        op[3][0] = ext[li(0)]; op[3][1] = ext[li(1)]; op[3][2] = ext[li(2)]; op[3][3] = ext[li(3)];
        cfg[0].shift = 3'd3;   cfg[0].out_sel = OUT_CLIP;
        cfg[1].out_sel = OUT_CLIP0; cfg[2].out_sel = OUT_CLIP0; cfg[3].out_sel = OUT_CLIP0;
      end else begin
        for (int i = 0; i < 4; i++) begin
          t = i4_tap(req.mode, i, int'(req.row));
          op[i][0] = ext[t.i0]; op[i][1] = ext[t.i1]; op[i][2] = ext[t.i2]; op[i][3] = ext[t.i3];
          cfg[i].shift   = t.shift;
          cfg[i].out_sel = (t.shift == 3'd0) ? OUT_BYPASS : OUT_CLIP;
        end
      end
    end else begin
      for (int i = 0; i < 4; i++) begin
        unique case (req.mode[1:0])
          I16_V:  op[i][0] = pe_val_t'({8'd0, u[i]});
          I16_H:  op[i][0] = pe_val_t'({8'd0, l[req.row]});
          I16_DC: op[i][0] = pe_val_t'({8'd0, dc16});
          default: begin  // recursive configuration
            if (req.row == 2'd0) op[i][0] = seed_row + pb * pe_val_t'(i);
            else begin
              op[i][0] = regv[i];
              op[i][1] = pc;
            end
            cfg[i].shift = 3'd5; cfg[i].reg_ld = req.valid; cfg[i].out_sel = OUT_CLIP;
          end
        endcase
      end
    end
  end

  always_comb begin
    op0_in = op[0];
    if (cascade) op0_in = '{sum1, sum3, pe_val_t'(0), pe_val_t'(0)};
  end

  intra_pe u_pe0 (.clk, .rst_n, .op(op0_in), .cfg(cfg[0]), .clip0_i(clip0), .clip2_i(clip2),
                  .sum_o(sum0), .reg_o(reg0), .clip_o(clip0), .pred_o(pred0));
  intra_pe u_pe1 (.clk, .rst_n, .op(op[1]), .cfg(cfg[1]), .clip0_i(clip0), .clip2_i(clip2),
                  .sum_o(sum1), .reg_o(reg1), .clip_o(clip1), .pred_o(pred1));
  intra_pe u_pe2 (.clk, .rst_n, .op(op[2]), .cfg(cfg[2]), .clip0_i(clip0), .clip2_i(clip2),
                  .sum_o(sum2), .reg_o(reg2), .clip_o(clip2), .pred_o(pred2));
  intra_pe u_pe3 (.clk, .rst_n, .op(op[3]), .cfg(cfg[3]), .clip0_i(clip0), .clip2_i(clip2),
                  .sum_o(sum3), .reg_o(reg3), .clip_o(clip3), .pred_o(pred3));

  assign pred_o = '{pred0, pred1, pred2, pred3};

endmodule
