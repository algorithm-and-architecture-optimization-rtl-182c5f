// tb_slpde_unit: random and boundary costs (equal, one above, one below) for
// the two comparisons, with the scheme enabled and disabled; checks the
// per-cycle decision and that the latched skip holds until clear.
module tb_slpde_unit;
  import intra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, eval = 1'b0;
  mb_cost_t inter_cost, i4_acc, i16_lb;
  logic skip_now_o, skip_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slpde_unit dut (.*);

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

  initial begin
    int th, a, b, e, latched;
    inter_cost = '0; i4_acc = '0; i16_lb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    latched = 0;
    for (int iter = 0; iter < 5000; iter++) begin
      th = $urandom_range(0, 131071);
      case (iter % 4)
        0: begin a = $urandom_range(0, 131071); b = $urandom_range(0, 131071); end
        1: begin a = th; b = th + 1; end
        2: begin a = th + 1; b = th + 1; end
        default: begin a = th + 1; b = th; end
      endcase
      if (a > 131071) a = 131071;
      if (b > 131071) b = 131071;
      e = (iter % 7 != 0);
      @(negedge clk);
      if (iter % 10 == 0) begin clear = 1'b1; latched = 0; end else clear = 1'b0;
      en = e; eval = 1'b1;
      inter_cost = mb_cost_t'(th); i4_acc = mb_cost_t'(a); i16_lb = mb_cost_t'(b);
      #1;
      check("skip now", int'(skip_now_o), int'(e && a > th && b > th));
      if (!clear && e && a > th && b > th) latched = 1;
      @(negedge clk);
      eval = 1'b0; clear = 1'b0;
      check("skip latched", int'(skip_o), latched);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
