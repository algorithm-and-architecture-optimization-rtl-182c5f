// tb_intra_pe: random operands (including negative and out-of-range values)
// and configurations; checks the adder tree, rounding/scaling, clipping, the
// output multiplexer and the loading of Reg_i against arithmetic done here.
module tb_intra_pe;
  import intra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  pe_val_t op [4];
  pe_cfg_t cfg;
  pix_t clip0_i, clip2_i, clip_o, pred_o;
  pe_val_t sum_o, reg_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  intra_pe dut (.*);

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
    int o [4], s, sh, sc, cl, exp_pred, last_reg;
    foreach (op[k]) op[k] = '0;
    cfg = '0; clip0_i = '0; clip2_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    last_reg = 0;
    for (int iter = 0; iter < 20000; iter++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        o[k] = (iter % 2) ? int'($urandom_range(0, 255)) : int'($urandom_range(0, 8000)) - 4000;
        op[k] = pe_val_t'(o[k]);
      end
      sh = $urandom_range(0, 5);
      cfg.shift = 3'(sh);
      cfg.reg_ld = 1'($urandom_range(0, 1));
      cfg.out_sel = pe_out_e'($urandom_range(0, 3));
      clip0_i = pix_t'($urandom_range(0, 255));
      clip2_i = pix_t'($urandom_range(0, 255));
      #1;
      s = o[0] + o[1] + o[2] + o[3];
      sc = (sh == 0) ? s : ((s + (1 << (sh - 1))) >>> sh);
      cl = sc < 0 ? 0 : (sc > 255 ? 255 : sc);
      case (cfg.out_sel)
        OUT_BYPASS: exp_pred = o[0] & 255;
        OUT_CLIP:   exp_pred = cl;
        OUT_CLIP0:  exp_pred = int'(clip0_i);
        default:    exp_pred = int'(clip2_i);
      endcase
      check("sum", int'(sum_o), s);
      check("clip", int'(clip_o), cl);
      check("pred", int'(pred_o), exp_pred);
      check("reg before edge", int'(reg_o), last_reg);
      if (cfg.reg_ld) last_reg = s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
