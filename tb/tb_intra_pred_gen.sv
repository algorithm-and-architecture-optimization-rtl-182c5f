// tb_intra_pred_gen: checks every row of all nine 4x4 modes and all four
// 16x16 modes (over all sixteen blocks of a macroblock) against the
// pixel-by-pixel reference equations, for random neighbour pixels including
// flat, extreme and random patterns.
module tb_intra_pred_gen;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  pred_req_t req;
  pix_t e [13], u [4], l [4], dc16;
  pe_val_t pa, pb, pc;
  pix_t pred [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  intra_pred_gen dut (.clk, .rst_n, .req, .e, .u, .l, .dc16, .pa, .pb, .pc, .pred_o(pred));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t8 [8], lf4 [4], m;
  int top [16], left [16], corner;
  int a, b, c, dcv, exp_v;

  function automatic int pick(input int pat);
    case (pat)
      0: return $urandom_range(0, 255);
      1: return $urandom_range(0, 1) ? 255 : 0;
      default: return $urandom_range(100, 110);
    endcase
  endfunction

  initial begin
    req = '0;
    foreach (e[k]) e[k] = '0;
    foreach (u[k]) begin u[k] = '0; l[k] = '0; end
    dc16 = '0; pa = '0; pb = '0; pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int iter = 0; iter < 60; iter++) begin
      int pat;
      pat = iter % 3;
      // ---------------- 4x4 modes
      for (int k = 0; k < 8; k++) t8[k] = pick(pat);
      for (int k = 0; k < 4; k++) lf4[k] = pick(pat);
      m = pick(pat);
      for (int k = 0; k < 4; k++) e[3 - k] = pix_t'(lf4[k]);
      e[4] = pix_t'(m);
      for (int k = 0; k < 8; k++) e[5 + k] = pix_t'(t8[k]);
      for (int md = 0; md < 9; md++)
        for (int r = 0; r < 4; r++) begin
          @(negedge clk);
          req.valid = 1'b1; req.cat = CAT_I4; req.mode = 4'(md); req.row = 2'(r);
          req.blk = 4'($urandom_range(0, 15)); req.regen = 1'b0;
          #1;
          for (int x = 0; x < 4; x++) begin
            exp_v = ref_i4(md, t8, lf4, m, x, r);
            checks++;
            if (int'(pred[x]) != exp_v) begin
              failures++;
              if (failures < 10) $display("I4 mode %0d row %0d x %0d: got %0d exp %0d", md, r, x, pred[x], exp_v);
            end
          end
        end
      // ---------------- 16x16 modes
      for (int k = 0; k < 16; k++) begin top[k] = pick(pat); left[k] = pick(pat); end
      corner = pick(pat);
      ref_i16_consts(top, left, corner, a, b, c, dcv);
      pa = pe_val_t'(a); pb = pe_val_t'(b); pc = pe_val_t'(c); dc16 = pix_t'(dcv);
      for (int blk = 0; blk < 16; blk++) begin
        int bx, by;
        bx = 2 * ((blk >> 2) & 1) + (blk & 1);
        by = 2 * ((blk >> 3) & 1) + ((blk >> 1) & 1);
        for (int k = 0; k < 4; k++) begin
          u[k] = pix_t'(top[4 * bx + k]);
          l[k] = pix_t'(left[4 * by + k]);
        end
        for (int md = 0; md < 4; md++)
          for (int r = 0; r < 4; r++) begin
            @(negedge clk);
            req.valid = 1'b1; req.cat = CAT_I16; req.mode = 4'(md); req.row = 2'(r);
            req.blk = 4'(blk); req.regen = 1'b0;
            #1;
            for (int x = 0; x < 4; x++) begin
              exp_v = ref_i16(md, top, left, corner, 4 * bx + x, 4 * by + r);
              checks++;
              if (int'(pred[x]) != exp_v) begin
                failures++;
                if (failures < 10) $display("I16 mode %0d blk %0d row %0d x %0d: got %0d exp %0d", md, blk, r, x, pred[x], exp_v);
              end
            end
          end
      end
    end
    @(negedge clk);
    req = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
