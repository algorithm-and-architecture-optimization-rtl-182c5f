// nb_buffer: boundary-pixel buffer of the intra engine.
//
// Holds the neighbours of the current macroblock (20 pixels of the row above,
// the 16 above plus 4 of the above-right macroblock; 16 pixels of the column
// to the left; the corner pixel), latched by load at the start of the
// macroblock, and the reconstructed pixels of the current macroblock, written
// one row of a 4x4 block per cycle by the reconstruction engine.
// For the 4x4 block rd_blk (zig-zag index) it delivers, combinationally, the
// thirteen neighbours of 4x4 prediction as e[0..12] = {L,K,J,I,M,A..H}:
// from the macroblock boundary where the block touches it, otherwise from the
// reconstructed pixels. Upper-right pixels E..H are not yet reconstructed for
// blocks 3, 7, 11, 13 and 15 and are then replaced by D, as H.264/AVC
// prescribes. For 16x16 prediction it gives the four boundary pixels above
// (u_o) and beside (l_o) the block and the whole boundary (for i16_prep).
// Later blocks only ever read the bottom pixel row and the right pixel column
// of a reconstructed block, so only those are stored: bot[j] is pixel row
// 4j+3 and rcol[j] pixel column 4j+3 of the macroblock (j = 0..2; row and
// column 15 are never read inside the macroblock), 96 pixels instead of 256.
// The macroblock is taken as an interior one with all neighbours available;
// this and the storage layout are this design's choices (the engine's
// description only says that existing registers hold this data).
// Reset clears the storage.
module nb_buffer
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  pix_t       top_in  [20],
  input  pix_t       left_in [16],
  input  pix_t       corner_in,
  input  logic       wr_valid,
  input  logic [3:0] wr_blk,
  input  logic [1:0] wr_row,
  input  pix_t       wr_pix  [4],
  input  logic [3:0] rd_blk,
  output pix_t       e_o     [13],
  output pix_t       u_o     [4],
  output pix_t       l_o     [4],
  output pix_t       mb_top_o  [16],
  output pix_t       mb_left_o [16],
  output pix_t       mb_corner_o
);

  pix_t top_r  [20];
  pix_t left_r [16];
  pix_t corner_r;
  pix_t bot    [3][16];    // [block row][x]: pixel row 4*j+3
  pix_t rcol   [3][16];    // [block column][y]: pixel column 4*j+3

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 20; k++) top_r[k] <= '0;
      for (int k = 0; k < 16; k++) left_r[k] <= '0;
      corner_r <= '0;
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 16; k++) begin
          bot[j][k]  <= '0;
          rcol[j][k] <= '0;
        end
    end else begin
      if (load) begin
        top_r    <= top_in;
        left_r   <= left_in;
        corner_r <= corner_in;
      end
      if (wr_valid) begin
        if (wr_row == 2'd3 && blk_y(wr_blk) != 2'd3)
          for (int c = 0; c < 4; c++) bot[blk_y(wr_blk)][{blk_x(wr_blk), 2'(c)}] <= wr_pix[c];
        if (blk_x(wr_blk) != 2'd3)
          rcol[blk_x(wr_blk)][{blk_y(wr_blk), wr_row}] <= wr_pix[3];
      end
    end
  end

  always_comb begin
    logic [1:0] bx, by;
    logic [3:0] x0, y0;
    logic ur_ok;
    pix_t d_pix;
    bx = blk_x(rd_blk);
    by = blk_y(rd_blk);
    x0 = {bx, 2'b00};
    y0 = {by, 2'b00};
    ur_ok = !(rd_blk inside {4'd3, 4'd7, 4'd11, 4'd13, 4'd15});
    for (int k = 0; k < 4; k++) begin
      // top A..D
      e_o[5 + k] = (y0 == 4'd0) ? top_r[5'(x0) + 5'(k)] : bot[by - 2'd1][x0 + 4'(k)];
      // left I..L
      e_o[3 - k] = (x0 == 4'd0) ? left_r[y0 + 4'(k)] : rcol[bx - 2'd1][y0 + 4'(k)];
    end
    d_pix = (y0 == 4'd0) ? top_r[5'(x0) + 5'd3] : bot[by - 2'd1][x0 + 4'd3];
    for (int k = 4; k < 8; k++) begin
      if (!ur_ok)           e_o[5 + k] = d_pix;
      else if (y0 == 4'd0)  e_o[5 + k] = top_r[5'(x0) + 5'(k)];
      else                  e_o[5 + k] = bot[by - 2'd1][x0 + 4'(k)];
    end
    if (x0 == 4'd0 && y0 == 4'd0) e_o[4] = corner_r;
    else if (y0 == 4'd0)          e_o[4] = top_r[5'(x0 - 4'd1)];
    else if (x0 == 4'd0)          e_o[4] = left_r[y0 - 4'd1];
    else                          e_o[4] = bot[by - 2'd1][x0 - 4'd1];
    for (int k = 0; k < 4; k++) begin
      u_o[k] = top_r[5'(x0) + 5'(k)];
      l_o[k] = left_r[y0 + 4'(k)];
    end
  end

  assign mb_top_o    = top_r[0:15];
  assign mb_left_o   = left_r;
  assign mb_corner_o = corner_r;

endmodule
