// ec_compressor: the embedded compressor.
//
// Each lane codes one 4x2 block (64 bits) into one 32-bit packet in a single
// cycle: mbptc_enc finds the start plane and the four layers, one rpcc_enc per
// row codes those layers, and one avg_enc per 2x2 part codes the next two
// planes; the results are packed as ec_pkg::packet_t and registered.
//
// With the default LANES = 2 a whole 4x4 block (lane 0 = rows 0-1, lane 1 =
// rows 2-3) is coded per cycle into a 64-bit segment, so a 16x16 macroblock
// takes 16 cycles. The document gives one 4x2 block per cycle and 16 cycles
// per macroblock; two lanes is this design's way of meeting both.
//
// Timing: in_valid/in_blk sampled on a rising clk edge appear on
// out_valid/out_pkt one cycle later (latency 1, throughput one block per lane
// per cycle, no back-pressure). rst_n is active low and asynchronous and
// clears out_valid and out_pkt.
module ec_compressor
  import ec_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  blk4x2_t [LANES-1:0]    in_blk,
  output logic                   out_valid,
  output packet_t [LANES-1:0]    out_pkt
);

  packet_t [LANES-1:0] pkt;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    sp_t                                   sp;
    layer_t [BLK_ROWS-1:0][3:0]            layer;
    logic   [BLK_ROWS-1:0][BLK_COLS-1:0][1:0] res;
    strat_e      strat [BLK_ROWS];
    logic [11:0] sec   [BLK_ROWS];
    logic [1:0]  avg_a, avg_b;

    mbptc_enc u_mbptc (.blk(in_blk[l]), .sp(sp), .layer(layer), .res(res));

    for (genvar r = 0; r < BLK_ROWS; r++) begin : g_row
      rpcc_enc u_rpcc (.layer(layer[r]), .strat(strat[r]), .payload(sec[r]));
    end

    avg_enc u_avg_a (.res({res[1][1], res[1][0], res[0][1], res[0][0]}), .avg(avg_a));
    avg_enc u_avg_b (.res({res[1][3], res[1][2], res[0][3], res[0][2]}), .avg(avg_b));

    always_comb begin
      pkt[l].sp       = sp;
      pkt[l].strat_r0 = strat[0];
      pkt[l].strat_r1 = strat[1];
      pkt[l].sec_r0   = sec[0];
      pkt[l].sec_r1   = sec[1];
      pkt[l].avg_a    = avg_a;
      pkt[l].avg_b    = avg_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pkt <= pkt;
    end
  end

endmodule
