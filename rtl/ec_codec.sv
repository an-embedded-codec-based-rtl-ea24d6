// ec_codec: embedded codec between a video decoder core and its external
// frame memory.
//
// Write path: the deblocking filter hands over a 4x4 block per cycle
// (LANES = 2 blocks of 4x2 pixels) with the pixel position of its top-left
// corner. ec_compressor codes each 4x2 block into a 32-bit word, and
// ec_addr_conv gives the word address of each; one cycle later wr_valid,
// wr_addr and wr_data present the 64-bit segment to the memory bus.
//
// Read path: motion compensation asks for the 4x2 blocks at (mc_x, mc_y),
// (mc_x, mc_y+2), ...; rd_addr gives their word addresses in the same cycle
// (combinational). When the memory returns the words (rd_data_valid,
// rd_data), ec_decompressor rebuilds the pixels and presents them on
// mc_valid / mc_blk one cycle later.
//
// Both paths move one 4x2 block per lane per cycle, 16 cycles per 16x16
// macroblock at the defaults. The bus, the memory and the decoder core are
// outside this module. The compressor/decompressor split and the address
// converter follow the document's system interface; the port-level timing is
// this design's own choice. rst_n is active low and asynchronous.
module ec_codec
  import ec_pkg::*;
#(
  parameter int unsigned LANES   = 2,
  parameter int unsigned FRAME_W = 1920,
  parameter int unsigned FRAME_H = 1088,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned X_W     = $clog2(FRAME_W),
  parameter int unsigned Y_W     = $clog2(FRAME_H)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [ADDR_W-1:0]              frame_base,
  // deblocking filter side
  input  logic                           df_valid,
  input  blk4x2_t [LANES-1:0]            df_blk,
  input  logic [X_W-1:0]                 df_x,
  input  logic [Y_W-1:0]                 df_y,
  // memory write side
  output logic                           wr_valid,
  output logic [LANES-1:0][ADDR_W-1:0]   wr_addr,
  output logic [LANES-1:0][PKT_W-1:0]    wr_data,
  // motion compensation request and memory read side
  input  logic [X_W-1:0]                 mc_x,
  input  logic [Y_W-1:0]                 mc_y,
  output logic [LANES-1:0][ADDR_W-1:0]   rd_addr,
  input  logic                           rd_data_valid,
  input  logic [LANES-1:0][PKT_W-1:0]    rd_data,
  // motion compensation data side
  output logic                           mc_valid,
  output blk4x2_t [LANES-1:0]            mc_blk
);

  packet_t [LANES-1:0]             enc_pkt;
  packet_t [LANES-1:0]             dec_pkt;
  logic [LANES-1:0][ADDR_W-1:0]    wr_addr_d;

  ec_compressor #(.LANES(LANES)) u_comp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(df_valid), .in_blk(df_blk),
    .out_valid(wr_valid), .out_pkt(enc_pkt)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    ec_addr_conv #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .ADDR_W(ADDR_W),
                   .X_W(X_W), .Y_W(Y_W)) u_wconv (
      .base(frame_base), .x(df_x), .y(df_y + Y_W'(2 * l)), .addr(wr_addr_d[l])
    );
    ec_addr_conv #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .ADDR_W(ADDR_W),
                   .X_W(X_W), .Y_W(Y_W)) u_rconv (
      .base(frame_base), .x(mc_x), .y(mc_y + Y_W'(2 * l)), .addr(rd_addr[l])
    );
    assign wr_data[l] = enc_pkt[l];
    assign dec_pkt[l] = rd_data[l];
  end

  // the write address travels with the block through the compressor stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        wr_addr <= '0;
    else if (df_valid) wr_addr <= wr_addr_d;
  end

  ec_decompressor #(.LANES(LANES)) u_decomp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rd_data_valid), .in_pkt(dec_pkt),
    .out_valid(mc_valid), .out_blk(mc_blk)
  );

endmodule
