// ec_rearrange: data rearrange, the core of the embedded decompressor.
//
// Undoes the packing of one 32-bit packet (ec_pkg::packet_t) into a 4x2 block
// of 8-bit pixels. Per row, the strategy bit says how the four layers were
// sent: left = four pattern indices looked up in the pattern table, right =
// layers 1-2 raw and layers 3-4 from the 2-bit column-pair averages. The
// layers go to bit positions 7..4 of an aligned word, the 2x2 part average
// (A for columns 0-1, B for columns 2-3) to positions 3..2, and zeros to
// 1..0; the word is then shifted right by SP, putting the first layer on
// plane 7-SP. Placing the layers from SP and the averages on the two planes
// after them follows the described decoder; zero-filling the truncated planes
// is this design's own choice. Purely combinational.
module ec_rearrange
  import ec_pkg::*;
(
  input  packet_t pkt,
  output blk4x2_t blk
);

  always_comb begin
    logic [11:0] sec;
    strat_e      st;
    layer_t [3:0] lay;
    logic [1:0]  pair_avg;
    logic [1:0]  part_avg;
    pixel_t      aligned;

    blk = '0;
    for (int r = 0; r < BLK_ROWS; r++) begin
      sec = (r == 0) ? pkt.sec_r0   : pkt.sec_r1;
      st  = (r == 0) ? pkt.strat_r0 : pkt.strat_r1;
      for (int c = 0; c < BLK_COLS; c++) begin
        pair_avg = (c < 2) ? sec[3:2] : sec[1:0];
        if (st == STRAT_LEFT) begin
          lay[0] = pattern(sec[11:9]);
          lay[1] = pattern(sec[8:6]);
          lay[2] = pattern(sec[5:3]);
          lay[3] = pattern(sec[2:0]);
        end else begin
          lay[0] = sec[11:8];
          lay[1] = sec[7:4];
          lay[2] = {4{pair_avg[1]}};
          lay[3] = {4{pair_avg[0]}};
        end
        part_avg = (c < 2) ? pkt.avg_a : pkt.avg_b;
        aligned  = {lay[0][c], lay[1][c], lay[2][c], lay[3][c], part_avg, 2'b00};
        blk[r][c] = aligned >> pkt.sp;
      end
    end
  end

endmodule
