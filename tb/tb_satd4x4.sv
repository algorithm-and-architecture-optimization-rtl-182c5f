// tb_satd4x4: feeds random, extreme and zero residual blocks row by row and
// compares SATD, AC sum and DC coefficient with a matrix-product Hadamard
// reference; also checks the one-cycle result latency and the tag.
module tb_satd4x4;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0] row;
  pix_t orig [4], pred [4];
  logic [7:0] tag_in, tag_out;
  logic out_valid;
  blk_cost_t satd_o;
  logic [14:0] sum_ac_o;
  logic signed [13:0] dc_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  satd4x4 #(.tag_t(logic [7:0])) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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
    blk4_t dm;
    int o [4][4], p [4][4], s, dc;
    row = '0; tag_in = '0;
    foreach (orig[k]) begin orig[k] = '0; pred[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int iter = 0; iter < 1000; iter++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          case (iter % 4)
            0: begin o[r][c] = $urandom_range(0, 255); p[r][c] = $urandom_range(0, 255); end
            1: begin o[r][c] = ((r + c) % 2) ? 255 : 0; p[r][c] = 255 - o[r][c]; end
            2: begin o[r][c] = 255; p[r][c] = 0; end
            default: begin o[r][c] = 77; p[r][c] = 77; end
          endcase
          dm[r][c] = o[r][c] - p[r][c];
        end
      s = had_sum(dm, dc);
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        in_valid = 1'b1; row = 2'(r); tag_in = 8'(iter);
        for (int c = 0; c < 4; c++) begin orig[c] = pix_t'(o[r][c]); pred[c] = pix_t'(p[r][c]); end
        // out_valid must stay low while the block is being fed
        if (r > 0) check("early valid", int'(out_valid), 0);
      end
      @(negedge clk);
      in_valid = 1'b0;
      check("valid", int'(out_valid), 1);
      check("tag", int'(tag_out), iter % 256);
      check("satd", int'(satd_o), (s + 1) / 2);
      check("sum_ac", int'(sum_ac_o), s - iabs(dc));
      check("dc", int'(dc_o), dc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
