// ec_pkg: types and constants shared by the embedded compressor / decompressor.
//
// The codec works on 4x2 blocks of 8-bit luma/chroma samples (two rows of
// four pixels). A block of 64 bits is coded into one 32-bit packet, a fixed
// compression ratio of two. Inside a block, row r is a "4x1 section"; one bit
// plane of a section is a 4-bit "layer" whose bit c belongs to column c.
//
// Packet layout (MSB first), this design's own choice of bit order:
//   [31:30] sp        start plane: the four coded layers are planes 7-sp..4-sp
//   [29]    strat_r0  strategy of row 0 (0 = left / patterns, 1 = right / raw)
//   [28]    strat_r1  strategy of row 1
//   [27:16] sec_r0    12-bit payload of row 0
//   [15:4]  sec_r1    12-bit payload of row 1
//   [3:2]   avg_a     2-bit average of the next two planes, 2x2 part A (cols 0-1)
//   [1:0]   avg_b     same for 2x2 part B (cols 2-3)
// Section payload, left strategy : {pi1, pi2, pi3, pi4}, 3-bit pattern indices
// Section payload, right strategy: {layer1, layer2, pair_avg_A, pair_avg_B},
//   raw 4-bit layers 1 and 2 plus the 2-bit mean of layers 3-4 over the
//   column pairs (0,1) and (2,3).
//
// The eight 4x1 patterns are the layers with at most one 0/1 transition
// (flat and step edges), indexed so that neighbouring indices differ in one
// bit position: 0000 0001 0011 0111 1111 1110 1100 1000.
//
// The block size, the 32-bit packet, the 2-bit start plane, one strategy bit
// per row, eight 4x1 patterns and the 2-bit averages of two 2x2 parts follow
// the document; the field order, the payload layouts and the pattern set
// are this design's own choices.
package ec_pkg;

  localparam int unsigned PIX_W    = 8;   // bits per pixel
  localparam int unsigned BLK_COLS = 4;   // pixels per row of a block
  localparam int unsigned BLK_ROWS = 2;   // rows per block
  localparam int unsigned PKT_W    = 32;  // coded packet width (CR = 2)
  localparam int unsigned NUM_PAT  = 8;   // 4x1 patterns

  typedef logic [PIX_W-1:0]    pixel_t;
  typedef logic [3:0]          layer_t;   // one bit plane of a 4x1 section
  typedef logic [2:0]          pidx_t;    // pattern index
  typedef logic [1:0]          sp_t;      // start plane code

  // pixel [row][col]
  typedef pixel_t [BLK_ROWS-1:0][BLK_COLS-1:0] blk4x2_t;

  typedef enum logic {STRAT_LEFT = 1'b0, STRAT_RIGHT = 1'b1} strat_e;

  typedef struct packed {
    sp_t         sp;
    strat_e      strat_r0;
    strat_e      strat_r1;
    logic [11:0] sec_r0;
    logic [11:0] sec_r1;
    logic [1:0]  avg_a;
    logic [1:0]  avg_b;
  } packet_t;

  function automatic layer_t pattern(input pidx_t idx);
    unique case (idx)
      3'd0: pattern = 4'b0000;
      3'd1: pattern = 4'b0001;
      3'd2: pattern = 4'b0011;
      3'd3: pattern = 4'b0111;
      3'd4: pattern = 4'b1111;
      3'd5: pattern = 4'b1110;
      3'd6: pattern = 4'b1100;
      default: pattern = 4'b1000;
    endcase
  endfunction

endpackage
