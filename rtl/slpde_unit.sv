// slpde_unit: stage-level partial distortion elimination.
//
// When intra prediction runs in a later pipeline stage than inter
// prediction, the best inter cost of the macroblock is already known. The
// intra costs only grow as blocks are processed, so once the accumulated
// I4MB cost and the smallest accumulated I16MB cost both exceed the best
// inter cost, no intra type can win and the rest of the macroblock's intra
// prediction is skipped; the macroblock is then coded as inter.
// Two 17-bit comparators test the two categories; eval (once per 4x4 block,
// after its costs are in) latches the decision into skip_o, which stays set
// until clear (start of a macroblock) or reset. en = 0 disables the scheme.
// The threshold test follows the engine's description; which accumulations
// are compared (I4MB best-mode sum, I16MB AC lower bound) and the evaluation
// point are this design's choices.
module slpde_unit
  import intra_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     en,
  input  logic     eval,
  input  mb_cost_t inter_cost,
  input  mb_cost_t i4_acc,
  input  mb_cost_t i16_lb,
  output logic     skip_now_o,  // decision of this cycle, valid when eval is high
  output logic     skip_o
);

  logic i4_over, i16_over;

  always_comb begin
    i4_over    = i4_acc > inter_cost;
    i16_over   = i16_lb > inter_cost;
    skip_now_o = en && i4_over && i16_over;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    skip_o <= 1'b0;
    else if (clear)                skip_o <= 1'b0;
    else if (eval && skip_now_o)   skip_o <= 1'b1;
  end

endmodule
