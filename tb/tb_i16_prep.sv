// tb_i16_prep: checks the DC value and the plane constants a, b, c against the
// reference equations for random, flat and extreme boundaries, and checks that
// DC is valid 8 cycles and plane 9 cycles after start.
module tb_i16_prep;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  pix_t top [16], left [16], corner;
  logic busy, dc_valid, plane_valid;
  pix_t dc_o;
  pe_val_t a_o, b_o, c_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i16_prep dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
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
    int t [16], lf [16], m, a, b, c, dc, n_dc, n_pl;
    foreach (top[k]) begin top[k] = '0; left[k] = '0; end
    corner = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int iter = 0; iter < 200; iter++) begin
      for (int k = 0; k < 16; k++) begin
        case (iter % 4)
          0: begin t[k] = $urandom_range(0, 255); lf[k] = $urandom_range(0, 255); end
          1: begin t[k] = 255 * (k / 8); lf[k] = 255 - 255 * (k / 8); end   // steep ramps
          2: begin t[k] = 255 - 255 * (k / 8); lf[k] = 255 * (k / 8); end
          default: begin t[k] = 16 * k; lf[k] = 255 - 16 * k; end
        endcase
        top[k] = pix_t'(t[k]); left[k] = pix_t'(lf[k]);
      end
      m = (iter % 4 == 1) ? 255 : $urandom_range(0, 255);
      corner = pix_t'(m);
      ref_i16_consts(t, lf, m, a, b, c, dc);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      n_dc = 0; n_pl = 0;
      for (int cyc = 1; cyc <= 12; cyc++) begin
        if (dc_valid && n_dc == 0) n_dc = cyc;
        if (plane_valid && n_pl == 0) n_pl = cyc;
        @(negedge clk);
      end
      check("dc latency", n_dc, 8);
      check("plane latency", n_pl, 9);
      check("dc", int'(dc_o), dc);
      check("a", int'(a_o), a);
      check("b", int'(b_o), b);
      check("c", int'(c_o), c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
