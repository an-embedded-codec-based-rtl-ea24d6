// rpcc_enc: reduced patterns comparison coding of one 4x1 section.
//
// The four layers selected by the start plane are coded into 12 bits. With
// the threshold at level 2 (the level used throughout), layers 1 and 2 are
// compared with the eight 4x1 patterns. If both match exactly the section
// takes the left strategy: the four layers are sent as four 3-bit pattern
// indices (layers 3 and 4 as their nearest pattern). Otherwise it takes the
// right strategy: layers 1 and 2 are sent raw and layers 3-4 are averaged,
// as a 2-bit value, over the column pairs (0,1) and (2,3). The left/right
// choice by threshold follows the described algorithm; the two payload
// layouts and the rounding (+1 then halve) are this design's own choice.
// Purely combinational.
//
//   layer[k]  layer k+1 of the section, bit c = column c
//   strat     STRAT_LEFT / STRAT_RIGHT
//   payload   left : {pi1, pi2, pi3, pi4}
//             right: {layer1, layer2, avgA, avgB}
module rpcc_enc
  import ec_pkg::*;
(
  input  layer_t [3:0] layer,
  output strat_e       strat,
  output logic [11:0]  payload
);

  logic  [3:0] hit;
  pidx_t [3:0] idx;

  for (genvar k = 0; k < 4; k++) begin : g_cmp
    pattern_cmp u_cmp (.layer(layer[k]), .hit(hit[k]), .idx(idx[k]));
  end

  // 2-bit value of layers 3-4 per column and its mean over a column pair
  logic [1:0] v [4];
  logic [2:0] sum_a, sum_b;
  logic [1:0] avg_a, avg_b;

  always_comb begin
    for (int c = 0; c < 4; c++) v[c] = {layer[2][c], layer[3][c]};
    sum_a = 3'(v[0]) + 3'(v[1]) + 3'd1;
    sum_b = 3'(v[2]) + 3'(v[3]) + 3'd1;
    avg_a = 2'(sum_a >> 1);
    avg_b = 2'(sum_b >> 1);
  end

  always_comb begin
    if (hit[0] && hit[1]) begin
      strat   = STRAT_LEFT;
      payload = {idx[0], idx[1], idx[2], idx[3]};
    end else begin
      strat   = STRAT_RIGHT;
      payload = {layer[0], layer[1], avg_a, avg_b};
    end
  end

  // the left strategy may only be chosen when layers 1 and 2 are sent exactly
  always_comb begin
    if (strat == STRAT_LEFT)
      assert (pattern(idx[0]) == layer[0] && pattern(idx[1]) == layer[1])
        else $error("rpcc_enc: left strategy with an inexact layer 1 or 2");
  end

endmodule
