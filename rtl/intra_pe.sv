// intra_pe: one processing element of the four-parallel intra predictor.
//
// Each PE adds four operands with three two-input adders ((op0+op1) +
// (op2+op3)), so one PE performs one 4-to-1 addition per cycle. The sum can be
// loaded into the PE's register Reg_i, which the predictor feeds back as an
// operand for recursive accumulation (plane mode walks down a column by adding
// c each row). A rounding/scaling stage adds 2^(shift-1) and shifts right, and
// a clip stage limits the result to 0..255. An output multiplexer chooses the
// PE's predictor among: operand 0 passed through (bypass configuration used by
// vertical, horizontal and the I16 DC value), the PE's own clipped result, or
// the clipped result of PE 0 or PE 2, which is how a value computed once is
// shared across the row (cascading configuration of 4x4 DC).
//
// The adder tree, Reg_i, rounding/scaling, clip and the output multiplexer
// with the Clip_0/Clip_2 inputs follow the block diagram of the engine. The
// operand multiplexer in front of the adders is kept in intra_pred_gen, which
// drives all four PEs. The datapath is combinational from operands to
// predictor; only Reg_i is clocked. Reset clears Reg_i.
module intra_pe
  import intra_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  pe_val_t         op [4],
  input  pe_cfg_t         cfg,
  input  pix_t            clip0_i,  // clipped result of PE 0
  input  pix_t            clip2_i,  // clipped result of PE 2
  output pe_val_t         sum_o,    // adder-tree result (intermediate value for cascading)
  output pe_val_t         reg_o,    // Reg_i
  output pix_t            clip_o,   // own rounded/scaled/clipped result
  output pix_t            pred_o    // selected predictor
);

  pe_val_t s01, s23, sum, scaled, rnd;

  always_comb begin
    s01 = op[0] + op[1];
    s23 = op[2] + op[3];
    sum = s01 + s23;
    rnd = (cfg.shift == 3'd0) ? pe_val_t'(0) : pe_val_t'(1) <<< (cfg.shift - 3'd1);
    scaled = (sum + rnd) >>> cfg.shift;
    if (scaled < 0)                 clip_o = 8'd0;
    else if (scaled > 16'sd255)     clip_o = 8'd255;
    else                            clip_o = scaled[7:0];
  end

  always_comb begin
    unique case (cfg.out_sel)
      OUT_BYPASS: pred_o = op[0][7:0];
      OUT_CLIP:   pred_o = clip_o;
      OUT_CLIP0:  pred_o = clip0_i;
      OUT_CLIP2:  pred_o = clip2_i;
      default:    pred_o = clip_o;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          reg_o <= '0;
    else if (cfg.reg_ld) reg_o <= sum;
  end

  assign sum_o = sum;

endmodule
