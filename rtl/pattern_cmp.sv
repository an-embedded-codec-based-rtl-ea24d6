// pattern_cmp: compares one 4x1 layer with the eight 4x1 patterns at once.
//
// All eight patterns of ec_pkg::pattern() are compared in parallel. `hit` is
// high when the layer equals one of them, and `idx` is then that pattern's
// index. Otherwise `idx` is the pattern at the smallest Hamming distance,
// the lowest index winning a tie (every 4-bit layer is within one bit of a
// pattern). Parallel comparison with eight 4x1 patterns is as described; the
// pattern set and the nearest-pattern rule are this design's own choices.
// Purely combinational.
module pattern_cmp
  import ec_pkg::*;
(
  input  layer_t layer,
  output logic   hit,
  output pidx_t  idx
);

  always_comb begin
    int unsigned best_d;
    int unsigned d;
    best_d = 5;
    idx    = '0;
    for (int p = 0; p < NUM_PAT; p++) begin
      d = $countones(layer ^ pattern(pidx_t'(p)));
      if (d < best_d) begin
        best_d = d;
        idx    = pidx_t'(p);
      end
    end
    hit = (best_d == 0);
  end

endmodule
