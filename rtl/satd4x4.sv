// satd4x4: Hadamard-transformed distortion (SATD) of one predicted 4x4 block.
//
// The predictor delivers a 4x4 block one row of four pixels per cycle; this
// unit takes the residual original - predicted of each row, keeps rows 0..2,
// and when row 3 arrives transforms the whole block with a 4x4 Hadamard
// (butterflies on rows, then on columns) and registers:
//   satd_o   = (sum of |coefficients| + 1) >> 1, the 4x4 cost used for I4MB
//              mode decision (at most 8160, so 13 bits);
//   sum_ac_o = sum of |coefficients| without the DC coefficient, the per-block
//              part of the I16MB cost;
//   dc_o     = the DC coefficient, kept per block for the I16MB DC Hadamard.
// Results are valid one cycle after row 3 (out_valid), together with the tag
// the row-3 request carried. Rows must come in order 0..3; a row-0 request
// starts a new block. The Hadamard cost follows the usual encoder reference
// practice that the engine's cost definition refers to; the exact scaling is
// this design's choice. Reset clears out_valid.
module satd4x4
  import intra_pkg::*;
#(
  parameter type tag_t = logic [7:0]
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [1:0]        row,
  input  pix_t              orig [4],
  input  pix_t              pred [4],
  input  tag_t              tag_in,
  output logic              out_valid,
  output tag_t              tag_out,
  output blk_cost_t         satd_o,
  output logic [14:0]       sum_ac_o,
  output logic signed [13:0] dc_o
);

  typedef logic signed [13:0] coef_t;

  coef_t d_rows [3][4];   // residual rows 0..2
  coef_t d      [4][4];
  coef_t hr     [4][4];   // after the row transform
  coef_t hc     [4][4];   // after the column transform
  logic [14:0] sum_all, abs_dc;

  function automatic void bfly(input coef_t x0, input coef_t x1, input coef_t x2, input coef_t x3,
                               output coef_t y0, output coef_t y1, output coef_t y2, output coef_t y3);
    coef_t s0, s1, t0, t1;
    s0 = x0 + x3; s1 = x1 + x2; t0 = x0 - x3; t1 = x1 - x2;
    y0 = s0 + s1; y2 = s0 - s1; y1 = t0 + t1; y3 = t0 - t1;
  endfunction

  always_comb begin
    for (int r = 0; r < 3; r++) d[r] = d_rows[r];
    for (int c = 0; c < 4; c++) d[3][c] = coef_t'(signed'({1'b0, orig[c]})) - coef_t'(signed'({1'b0, pred[c]}));
    for (int r = 0; r < 4; r++) bfly(d[r][0], d[r][1], d[r][2], d[r][3], hr[r][0], hr[r][1], hr[r][2], hr[r][3]);
    for (int c = 0; c < 4; c++) bfly(hr[0][c], hr[1][c], hr[2][c], hr[3][c], hc[0][c], hc[1][c], hc[2][c], hc[3][c]);
    sum_all = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        sum_all += 15'(hc[r][c] < 0 ? -hc[r][c] : hc[r][c]);
    abs_dc = 15'(hc[0][0] < 0 ? -hc[0][0] : hc[0][0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      tag_out   <= '0;
      satd_o    <= '0;
      sum_ac_o  <= '0;
      dc_o      <= '0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 4; c++) d_rows[r][c] <= '0;
    end else begin
      out_valid <= in_valid && row == 2'd3;
      if (in_valid && row != 2'd3)
        for (int c = 0; c < 4; c++) d_rows[row][c] <= d[3][c];
      if (in_valid && row == 2'd3) begin
        tag_out  <= tag_in;
        satd_o   <= blk_cost_t'((sum_all + 15'd1) >> 1);
        sum_ac_o <= sum_all - abs_dc;
        dc_o     <= hc[0][0];
      end
    end
  end

endmodule
