// intra_pkg: types and constants shared by the four-parallel luma intra
// prediction engine.
//
// The engine predicts one row of four pixels per cycle (four processing
// elements), so a 4x4 block takes four cycles per mode. Mode numbering follows
// H.264/AVC: nine 4x4 luma modes (I4MB) and four 16x16 luma modes (I16MB).
// The cycle budgets (36 + 4 + 16 cycles per 4x4 block, 20-cycle
// reconstruction) are the ones the engine is designed around; the data widths
// are this design's own choice and are explained next to each constant.
package intra_pkg;

  typedef logic [7:0] pix_t;

  // Width of a PE operand and accumulator. The largest magnitude is the
  // plane-mode seed a + b*(x-7) + c*(y-7), below 2^15.
  localparam int unsigned PE_W = 16;
  typedef logic signed [PE_W-1:0] pe_val_t;

  // A 4x4 SATD halved fits 13 bits (at most 8160); sixteen of them fit 17
  // bits, which is the width of the macroblock-level cost comparators.
  localparam int unsigned BLK_COST_W = 13;
  localparam int unsigned MB_COST_W  = 17;
  typedef logic [BLK_COST_W-1:0] blk_cost_t;
  typedef logic [MB_COST_W-1:0]  mb_cost_t;

  // Cycle budget of the reconstruction engine per 4x4 block.
  localparam int unsigned REC_CYCLES = 20;

  typedef enum logic {CAT_I4 = 1'b0, CAT_I16 = 1'b1} cat_e;

  typedef enum logic [3:0] {
    I4_V   = 4'd0, I4_H  = 4'd1, I4_DC = 4'd2, I4_DDL = 4'd3, I4_DDR = 4'd4,
    I4_VR  = 4'd5, I4_HD = 4'd6, I4_VL = 4'd7, I4_HU  = 4'd8
  } i4_mode_e;

  typedef enum logic [1:0] {
    I16_V = 2'd0, I16_H = 2'd1, I16_DC = 2'd2, I16_PLANE = 2'd3
  } i16_mode_e;

  // Configuration of one processing element for one cycle.
  typedef enum logic [1:0] {
    OUT_BYPASS = 2'd0,  // operand 0 passed straight through (vertical, horizontal, DC value)
    OUT_CLIP   = 2'd1,  // own rounded, scaled and clipped adder result
    OUT_CLIP0  = 2'd2,  // clipped result of PE 0
    OUT_CLIP2  = 2'd3   // clipped result of PE 2
  } pe_out_e;

  typedef struct packed {
    logic [2:0] shift;   // right shift of the rounding/scaling stage
    logic       reg_ld;  // load the adder result into Reg_i
    pe_out_e    out_sel;
  } pe_cfg_t;

  // Phase of the schedule controller, brought out for observation.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_I4    = 3'd1,  // I4MB modes of the current block
    PH_BEST  = 3'd2,  // best I4MB mode regenerated for reconstruction
    PH_I16   = 3'd3,  // I16MB part of the block, inside the reconstruction window
    PH_VNEXT = 3'd4,  // vertical mode of the next block, inside the window
    PH_WAIT  = 3'd5,  // window over, reconstruction not yet returned
    PH_FINAL = 3'd6   // DC Hadamard and final decision
  } phase_e;

  // One request to the predictor generator.
  typedef struct packed {
    logic       valid;
    cat_e       cat;
    logic [3:0] mode;
    logic [1:0] row;
    logic [3:0] blk;    // zig-zag block index 0..15
    logic       regen;  // best-mode regeneration: not costed again
  } pred_req_t;

  // Tag carried with a block through the cost unit.
  typedef struct packed {
    cat_e       cat;
    logic [3:0] mode;
    logic [3:0] blk;
  } cost_tag_t;

  // Zig-zag block index to 4x4-block column / row inside the macroblock.
  function automatic logic [1:0] blk_x(input logic [3:0] b);
    return {b[2], b[0]};
  endfunction
  function automatic logic [1:0] blk_y(input logic [3:0] b);
    return {b[3], b[1]};
  endfunction

endpackage
