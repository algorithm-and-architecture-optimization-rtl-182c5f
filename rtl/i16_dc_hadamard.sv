// i16_dc_hadamard: DC-coefficient registers of the interleaved I16MB
// processing and the 4x4 Hadamard transform of the sixteen DC values.
//
// Because the I16MB modes are computed one 4x4 block at a time, interleaved
// with the I4MB blocks, the I16MB cost cannot be finished block by block: it
// needs a Hadamard transform over the DC coefficients of all sixteen blocks.
// This unit therefore stores, for each of the four I16MB modes, the DC
// coefficient of every 4x4 block (64 registers, written as each block's SATD
// completes). After the last block, calc_start runs one shared 4x4 Hadamard
// per mode on four consecutive cycles (mode 0 first) and leaves
//   dc_cost_o[m] = sum over the 16 transformed values of |H(dc >>> 2)|,
// with done_o pulsing on the cycle after the last mode. The DC values are
// placed in the 4x4 grid by block position (not by zig-zag index). Storing
// the DC values in registers follows the engine's description; the scaling
// by 1/4 before the transform is this design's choice. Reset clears the
// registers.
module i16_dc_hadamard
  import intra_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_valid,
  input  logic [1:0]         wr_mode,
  input  logic [3:0]         wr_blk,     // zig-zag block index
  input  logic signed [13:0] wr_dc,
  input  logic               calc_start,
  output logic               busy_o,
  output logic               done_o,
  output logic [16:0]        dc_cost_o [4]
);

  typedef logic signed [16:0] hv_t;

  logic signed [13:0] dcr [4][16];   // [mode][raster position y*4+x]
  logic [2:0]  cnt;
  hv_t  d  [4][4];
  hv_t  hr [4][4];
  hv_t  hc [4][4];
  logic [16:0] sum;

  function automatic void bfly(input hv_t x0, input hv_t x1, input hv_t x2, input hv_t x3,
                               output hv_t y0, output hv_t y1, output hv_t y2, output hv_t y3);
    hv_t s0, s1, t0, t1;
    s0 = x0 + x3; s1 = x1 + x2; t0 = x0 - x3; t1 = x1 - x2;
    y0 = s0 + s1; y2 = s0 - s1; y1 = t0 + t1; y3 = t0 - t1;
  endfunction

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d[r][c] = hv_t'(dcr[cnt[1:0]][r * 4 + c]) >>> 2;
    for (int r = 0; r < 4; r++) bfly(d[r][0], d[r][1], d[r][2], d[r][3], hr[r][0], hr[r][1], hr[r][2], hr[r][3]);
    for (int c = 0; c < 4; c++) bfly(hr[0][c], hr[1][c], hr[2][c], hr[3][c], hc[0][c], hc[1][c], hc[2][c], hc[3][c]);
    sum = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        sum += 17'(hc[r][c] < 0 ? -hc[r][c] : hc[r][c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 4; m++) begin
        dc_cost_o[m] <= '0;
        for (int k = 0; k < 16; k++) dcr[m][k] <= '0;
      end
      cnt <= '0; busy_o <= 1'b0; done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (wr_valid)
        dcr[wr_mode][{blk_y(wr_blk), blk_x(wr_blk)}] <= wr_dc;
      if (calc_start) begin
        cnt <= '0; busy_o <= 1'b1;
      end else if (busy_o) begin
        dc_cost_o[cnt[1:0]] <= sum;
        cnt <= cnt + 3'd1;
        if (cnt == 3'd3) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end
      end
    end
  end

endmodule
