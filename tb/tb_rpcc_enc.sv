// tb_rpcc_enc: exhaustive check of rpcc_enc over all 2^16 combinations of
// four layers: strategy bit and 12-bit payload against the reference model,
// and the number of left-strategy sections (8 x 8 x 16 x 16).
module tb_rpcc_enc;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  layer_t [3:0] layer;
  strat_e       strat;
  logic [11:0]  payload;
  int checks = 0, failures = 0;
  int lefts = 0;

  rpcc_enc dut (.layer(layer), .strat(strat), .payload(payload));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [12:0] e;
    for (int v = 0; v < 65536; v++) begin
      layer = 16'(v);
      #1;
      e = ref_section(layer[0], layer[1], layer[2], layer[3]);
      checks++;
      if ({strat, payload} != e) begin
        failures++;
        if (failures < 10) $display("mismatch %h: got %b/%h exp %b/%h", layer, strat, payload, e[12], e[11:0]);
      end
      if (strat == STRAT_LEFT) lefts++;
    end
    checks++;
    if (lefts != 8 * 8 * 16 * 16) begin failures++; $display("left count %0d", lefts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
