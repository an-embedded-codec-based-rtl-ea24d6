// avg_enc: average coding of one 2x2 part.
//
// After the four pattern-coded layers, the next two bit planes of each pixel
// form a 2-bit residue. The four residues of a 2x2 part (columns 0-1 or 2-3
// of both rows) are replaced by their mean, rounded to nearest
// ((sum + 2) / 4), which the decoder writes back into those two planes for
// all four pixels. A 2-bit average per 2x2 part follows the described
// algorithm; the rounding is this design's own choice. Purely combinational.
module avg_enc (
  input  logic [3:0][1:0] res,
  output logic [1:0]      avg
);

  logic [3:0] sum;

  always_comb begin
    sum = 4'(res[0]) + 4'(res[1]) + 4'(res[2]) + 4'(res[3]) + 4'd2;
    avg = 2'(sum >> 2);
  end

endmodule
