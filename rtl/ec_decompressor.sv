// ec_decompressor: the embedded decompressor.
//
// Each lane turns one 32-bit packet back into a 4x2 block with ec_rearrange
// and registers it; the register is the stage placed between the
// decompressor and motion compensation. With the default LANES = 2 a 64-bit
// segment (a 4x4 block) is decoded per cycle, 16 cycles per macroblock, as
// for the compressor.
//
// Timing: in_valid/in_pkt sampled on a rising clk edge appear as
// out_valid/out_blk one cycle later (latency 1, no back-pressure). rst_n is
// active low and asynchronous.
module ec_decompressor
  import ec_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  packet_t [LANES-1:0]    in_pkt,
  output logic                   out_valid,
  output blk4x2_t [LANES-1:0]    out_blk
);

  blk4x2_t [LANES-1:0] blk;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    ec_rearrange u_rearr (.pkt(in_pkt[l]), .blk(blk[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_blk <= blk;
    end
  end

endmodule
