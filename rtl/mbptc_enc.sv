// mbptc_enc: modified bit plane truncation coding front end of the compressor.
//
// Finds the start plane (SP) of one 4x2 block and aligns the block's bit
// planes to it. Three 8-input OR gates look at planes 7, 6 and 5 of all eight
// pixels; SP is the number of leading all-zero planes among them (0..3), so the
// four coded layers are planes 7-SP down to 4-SP. The SP search and the three
// OR gates follow the described MBPTC hardware. Alignment is done here by
// shifting every pixel left by SP (the dropped planes are zero by definition),
// which is this design's own way of selecting the layers. One start plane
// serves the whole 4x2 block, as the 8-input OR gates imply.
//
// Outputs, per row r (a 4x1 section):
//   layer[r][k]  layer k+1 (k = 0..3), bit c = column c
//   res[r][c]    the two planes after the four layers, {plane 3-SP, plane 2-SP};
//                a plane below bit 0 reads as zero (SP = 3)
// Purely combinational, no clock.
module mbptc_enc
  import ec_pkg::*;
(
  input  blk4x2_t                         blk,
  output sp_t                             sp,
  output layer_t [BLK_ROWS-1:0][3:0]      layer,
  output logic   [BLK_ROWS-1:0][BLK_COLS-1:0][1:0] res
);

  logic or7, or6, or5;

  always_comb begin
    or7 = 1'b0;
    or6 = 1'b0;
    or5 = 1'b0;
    for (int r = 0; r < BLK_ROWS; r++) begin
      for (int c = 0; c < BLK_COLS; c++) begin
        or7 |= blk[r][c][7];
        or6 |= blk[r][c][6];
        or5 |= blk[r][c][5];
      end
    end
    if (or7)      sp = 2'd0;
    else if (or6) sp = 2'd1;
    else if (or5) sp = 2'd2;
    else          sp = 2'd3;
  end

  always_comb begin
    pixel_t aligned;
    layer = '0;
    res   = '0;
    for (int r = 0; r < BLK_ROWS; r++) begin
      for (int c = 0; c < BLK_COLS; c++) begin
        aligned = blk[r][c] << sp;
        for (int k = 0; k < 4; k++) layer[r][k][c] = aligned[7-k];
        res[r][c] = aligned[3:2];
      end
    end
  end

endmodule
