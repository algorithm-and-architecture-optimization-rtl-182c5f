// tb_i16_dc_hadamard: writes random DC coefficients for the four I16MB modes
// and all sixteen blocks in zig-zag order, runs the transform and compares
// each mode's DC cost with a matrix-product Hadamard reference over the
// raster-ordered DC grid; also checks the 5-cycle completion time.
module tb_i16_dc_hadamard;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 1'b0, calc_start = 1'b0;
  logic [1:0] wr_mode;
  logic [3:0] wr_blk;
  logic signed [13:0] wr_dc;
  logic busy_o, done_o;
  logic [16:0] dc_cost_o [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i16_dc_hadamard dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
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

  initial begin
    blk4_t g [4];
    int v, dummy, n;
    wr_mode = '0; wr_blk = '0; wr_dc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int iter = 0; iter < 300; iter++) begin
      for (int b = 0; b < 16; b++)
        for (int m = 0; m < 4; m++) begin
          int bx, by;
          bx = 2 * ((b >> 2) & 1) + (b & 1);
          by = 2 * ((b >> 3) & 1) + ((b >> 1) & 1);
          case (iter % 3)
            0: v = int'($urandom_range(0, 8160)) - 4080;
            1: v = ((bx + by) % 2) ? 4080 : -4080;
            default: v = (m == 0) ? 4080 : 3;
          endcase
          g[m][by][bx] = v >>> 2;
          @(negedge clk);
          wr_valid = 1'b1; wr_mode = 2'(m); wr_blk = 4'(b); wr_dc = 14'(v);
        end
      @(negedge clk);
      wr_valid = 1'b0; calc_start = 1'b1;
      @(negedge clk);
      calc_start = 1'b0;
      n = 1;
      while (!done_o && n < 20) begin @(negedge clk); n++; end
      check("latency", n, 5);
      for (int m = 0; m < 4; m++) check($sformatf("mode %0d", m), int'(dc_cost_o[m]), had_sum(g[m], dummy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
