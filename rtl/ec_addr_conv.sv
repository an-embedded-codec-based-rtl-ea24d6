// ec_addr_conv: address converter for the compressed frame buffer.
//
// Because every 4x2 block is coded into exactly one 32-bit word (fixed
// compression ratio two), the external-memory word address of any block
// follows from its pixel position alone. The frame is stored in 4x4 tiles in
// raster order; a tile occupies two consecutive words (its upper and lower
// 4x2 block), so the 64-bit segment written per cycle is contiguous:
//
//   addr = base + 2 * ((y / 4) * (FRAME_W / 4) + x / 4) + (y / 2) % 2
//
// x and y are the pixel coordinates of any pixel in the block. That an
// address converter exists and is simple follows the document; this tiled
// layout is this design's own choice. Purely combinational.
module ec_addr_conv #(
  parameter int unsigned FRAME_W = 1920,                  // luma width, pixels
  parameter int unsigned FRAME_H = 1088,                  // luma height, pixels
  parameter int unsigned ADDR_W  = 32,                    // word address width
  parameter int unsigned X_W     = $clog2(FRAME_W),
  parameter int unsigned Y_W     = $clog2(FRAME_H)
) (
  input  logic [ADDR_W-1:0] base,
  input  logic [X_W-1:0]    x,
  input  logic [Y_W-1:0]    y,
  output logic [ADDR_W-1:0] addr
);

  localparam int unsigned TILES_PER_ROW = FRAME_W / 4;

  logic [ADDR_W-1:0] tile;

  always_comb begin
    tile = ADDR_W'(y >> 2) * ADDR_W'(TILES_PER_ROW) + ADDR_W'(x >> 2);
    addr = base + (tile << 1) + ADDR_W'(y[1]);
  end

endmodule
