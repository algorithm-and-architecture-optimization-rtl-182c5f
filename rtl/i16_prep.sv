// i16_prep: early data preparation (EDPS) of the 16x16 DC value and the
// plane-mode constants of a macroblock.
//
// Started at the beginning of the first I16MB block, it works while the
// engine outputs the vertical and horizontal predictions (which need no
// arithmetic), so DC and plane are ready when their outputs begin:
//   cycles 0..7 : (cycle 0 is the start cycle) one 4-to-1 addition of
//                 boundary pixels per cycle for the DC sum (two top and two
//                 left pixels), and one weighted pair difference each for H
//                 and V, k*(p[7+k] - p[7-k]), k = 1..8, with p[-1] the
//                 corner pixel;
//   after cycle 7: dc = (sum + 16) >> 5 is valid (dc_valid from cycle 8,
//                 in time for the DC output that begins at cycle 8);
//   cycle 8     : a = 16*(left[15] + top[15]), b = (5H + 32) >> 6,
//                 c = (5V + 32) >> 6 (plane_valid from cycle 9, in time for the
//                 plane output that begins at cycle 12).
// The formulas are the H.264/AVC plane and DC equations; the split into
// eight cycles is this design's own choice. a is given without the +16
// rounding term, which the PE rounding stage adds. Inputs must stay stable
// from start until plane_valid. Reset clears the valid flags.
module i16_prep
  import intra_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  pix_t     top   [16],
  input  pix_t     left  [16],
  input  pix_t     corner,
  output logic     busy,
  output logic     dc_valid,
  output logic     plane_valid,
  output pix_t     dc_o,
  output pe_val_t  a_o,
  output pe_val_t  b_o,
  output pe_val_t  c_o
);

  logic [3:0]  cnt;
  logic [2:0]  k;      // pair index of this cycle; the start cycle is pair 0
  logic [12:0] dc_sum;
  logic signed [15:0] h_acc, v_acc;

  // One weighted difference per cycle; k = cnt + 1.
  logic signed [9:0]  dh, dv;
  logic signed [15:0] wh, wv;
  logic [9:0]  quad;
  logic signed [17:0] b_full, c_full;

  always_comb begin
    pix_t th, tl, lh, ll;
    k  = start ? 3'd0 : cnt[2:0];
    th = top[8 + k];
    lh = left[8 + k];
    tl = (k == 3'd7) ? corner : top[6 - k];
    ll = (k == 3'd7) ? corner : left[6 - k];
    dh = signed'({2'b00, th}) - signed'({2'b00, tl});
    dv = signed'({2'b00, lh}) - signed'({2'b00, ll});
    wh = 16'(dh) * 16'(signed'({2'b00, k} + 5'd1));
    wv = 16'(dv) * 16'(signed'({2'b00, k} + 5'd1));
    quad = 10'(top[2 * k]) + 10'(top[2 * k + 1])
         + 10'(left[2 * k]) + 10'(left[2 * k + 1]);
    b_full = (18'(h_acc) * 18'sd5 + 18'sd32) >>> 6;
    c_full = (18'(v_acc) * 18'sd5 + 18'sd32) >>> 6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; dc_valid <= 1'b0; plane_valid <= 1'b0;
      dc_sum <= '0; h_acc <= '0; v_acc <= '0;
      dc_o <= '0; a_o <= '0; b_o <= '0; c_o <= '0;
    end else if (start) begin
      cnt <= 4'd1; busy <= 1'b1; dc_valid <= 1'b0; plane_valid <= 1'b0;
      dc_sum <= 13'(quad); h_acc <= wh; v_acc <= wv;
    end else if (busy) begin
      cnt <= cnt + 4'd1;
      if (cnt < 4'd8) begin
        dc_sum <= dc_sum + 13'(quad);
        h_acc  <= h_acc + wh;
        v_acc  <= v_acc + wv;
        if (cnt == 4'd7) begin
          dc_o     <= pix_t'((dc_sum + 13'(quad) + 13'd16) >> 5);
          dc_valid <= 1'b1;
        end
      end else begin
        a_o <= pe_val_t'(16 * (int'(left[15]) + int'(top[15])));
        b_o <= pe_val_t'(b_full);
        c_o <= pe_val_t'(c_full);
        plane_valid <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

endmodule
