// tb_pattern_cmp: exhaustive check of pattern_cmp over all 16 layers: hit
// flag and nearest pattern index against the reference model.
module tb_pattern_cmp;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  layer_t layer;
  logic   hit;
  pidx_t  idx;
  int checks = 0, failures = 0;
  int hits = 0;

  pattern_cmp dut (.layer(layer), .hit(hit), .idx(idx));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      layer = 4'(v);
      #1;
      checks += 2;
      if (hit != ref_is_pat(4'(v))) begin failures++; $display("hit mismatch %b", layer); end
      if (idx != ref_nearest(4'(v))) begin failures++; $display("idx mismatch %b: %0d vs %0d", layer, idx, ref_nearest(4'(v))); end
      if (hit) hits++;
    end
    checks++;
    if (hits != 8) begin failures++; $display("expected 8 hits, got %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
