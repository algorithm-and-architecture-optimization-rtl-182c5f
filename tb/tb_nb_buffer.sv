// tb_nb_buffer: loads a random macroblock boundary, writes a random
// reconstruction of all sixteen 4x4 blocks row by row, and checks the
// thirteen 4x4 neighbours of every block (including the upper-right
// replacement rule) and the 16x16 boundary outputs against a picture array
// indexed by absolute position.
module tb_nb_buffer;
  import intra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, wr_valid = 1'b0;
  pix_t top_in [20], left_in [16], corner_in;
  logic [3:0] wr_blk, rd_blk;
  logic [1:0] wr_row;
  pix_t wr_pix [4];
  pix_t e_o [13], u_o [4], l_o [4], mb_top_o [16], mb_left_o [16], mb_corner_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nb_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  // pic[y + 1][x + 1] for -1 <= y < 16, -1 <= x < 20
  int pic [17][21];

  initial begin
    wr_blk = '0; rd_blk = '0; wr_row = '0; corner_in = '0;
    foreach (top_in[k]) top_in[k] = '0;
    foreach (left_in[k]) left_in[k] = '0;
    foreach (wr_pix[k]) wr_pix[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int iter = 0; iter < 100; iter++) begin
      for (int y = 0; y < 17; y++) for (int x = 0; x < 21; x++) pic[y][x] = $urandom_range(0, 255);
      @(negedge clk);
      load = 1'b1;
      corner_in = pix_t'(pic[0][0]);
      for (int k = 0; k < 20; k++) top_in[k] = pix_t'(pic[0][k + 1]);
      for (int k = 0; k < 16; k++) left_in[k] = pix_t'(pic[k + 1][0]);
      @(negedge clk);
      load = 1'b0;
      for (int b = 0; b < 16; b++) begin
        int bx, by;
        bx = 2 * ((b >> 2) & 1) + (b & 1);
        by = 2 * ((b >> 3) & 1) + ((b >> 1) & 1);
        // check the neighbours before this block is written
        rd_blk = 4'(b);
        #1;
        for (int k = 0; k < 4; k++) begin
          check("top", int'(e_o[5 + k]), pic[4 * by][4 * bx + k + 1]);
          check("left", int'(e_o[3 - k]), pic[4 * by + k + 1][4 * bx]);
          check("u", int'(u_o[k]), pic[0][4 * bx + k + 1]);
          check("l", int'(l_o[k]), pic[4 * by + k + 1][0]);
        end
        for (int k = 4; k < 8; k++)
          check("upper right", int'(e_o[5 + k]),
                (b == 3 || b == 7 || b == 11 || b == 13 || b == 15) ? pic[4 * by][4 * bx + 4]
                                                                     : pic[4 * by][4 * bx + k + 1]);
        check("corner", int'(e_o[4]), pic[4 * by][4 * bx]);
        for (int r = 0; r < 4; r++) begin
          @(negedge clk);
          wr_valid = 1'b1; wr_blk = 4'(b); wr_row = 2'(r);
          for (int c = 0; c < 4; c++) wr_pix[c] = pix_t'(pic[4 * by + r + 1][4 * bx + c + 1]);
        end
        @(negedge clk);
        wr_valid = 1'b0;
      end
      for (int k = 0; k < 16; k++) begin
        check("mb top", int'(mb_top_o[k]), pic[0][k + 1]);
        check("mb left", int'(mb_left_o[k]), pic[k + 1][0]);
      end
      check("mb corner", int'(mb_corner_o), pic[0][0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
