// ec_ref_pkg: bit-exact software model of the 4x2 block codec, used by the
// testbenches as the expected result. It is written pixel by pixel and plane
// by plane from the coding rules, independently of the RTL structure:
//   - start plane sp: leading all-zero planes among 7, 6, 5 (0..3)
//   - layer k (1..4) of a row = plane 8-sp-k of its four pixels
//   - a row whose layers 1 and 2 are both patterns is sent as four nearest
//     pattern indices (left), otherwise as raw layers 1-2 plus the rounded
//     mean of the 2-bit (layer3, layer4) value over column pairs (right)
//   - the next two planes of each 2x2 part are sent as their rounded mean
package ec_ref_pkg;

  typedef bit [7:0] rblk_t [2][4];

  localparam bit [3:0] PATS [8] = '{4'h0, 4'h1, 4'h3, 4'h7, 4'hF, 4'hE, 4'hC, 4'h8};

  function automatic bit plane_bit(bit [7:0] v, int plane);
    if (plane < 0) return 1'b0;
    return v[plane];
  endfunction

  function automatic int ref_sp(rblk_t p);
    for (int s = 0; s < 3; s++)
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 4; c++)
          if (p[r][c][7-s]) return s;
    return 3;
  endfunction

  function automatic bit [3:0] ref_layer(rblk_t p, int r, int sp, int k);
    bit [3:0] w;
    for (int c = 0; c < 4; c++) w[c] = plane_bit(p[r][c], 8 - sp - k);
    return w;
  endfunction

  function automatic bit ref_is_pat(bit [3:0] w);
    foreach (PATS[i]) if (PATS[i] == w) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit [2:0] ref_nearest(bit [3:0] w);
    int best = 99;
    bit [2:0] bi = 0;
    for (int i = 0; i < 8; i++) begin
      int d = 0;
      for (int b = 0; b < 4; b++) if (w[b] != PATS[i][b]) d++;
      if (d < best) begin best = d; bi = 3'(i); end
    end
    return bi;
  endfunction

  // returns {strat, payload[11:0]}
  function automatic bit [12:0] ref_section(bit [3:0] l1, bit [3:0] l2, bit [3:0] l3, bit [3:0] l4);
    if (ref_is_pat(l1) && ref_is_pat(l2))
      return {1'b0, ref_nearest(l1), ref_nearest(l2), ref_nearest(l3), ref_nearest(l4)};
    else begin
      int va = 2*l3[0] + l4[0] + 2*l3[1] + l4[1];
      int vb = 2*l3[2] + l4[2] + 2*l3[3] + l4[3];
      return {1'b1, l1, l2, 2'((va + 1) / 2), 2'((vb + 1) / 2)};
    end
  endfunction

  function automatic bit [31:0] ref_encode(rblk_t p);
    int sp = ref_sp(p);
    bit [12:0] s0, s1;
    int sa = 0, sb = 0;
    s0 = ref_section(ref_layer(p,0,sp,1), ref_layer(p,0,sp,2), ref_layer(p,0,sp,3), ref_layer(p,0,sp,4));
    s1 = ref_section(ref_layer(p,1,sp,1), ref_layer(p,1,sp,2), ref_layer(p,1,sp,3), ref_layer(p,1,sp,4));
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++) begin
        int v = 2*plane_bit(p[r][c], 3 - sp) + plane_bit(p[r][c], 2 - sp);
        if (c < 2) sa += v; else sb += v;
      end
    return {2'(sp), s0[12], s1[12], s0[11:0], s1[11:0], 2'((sa + 2) / 4), 2'((sb + 2) / 4)};
  endfunction

  function automatic rblk_t ref_decode(bit [31:0] w);
    rblk_t p;
    int sp = w[31:30];
    for (int r = 0; r < 2; r++) begin
      bit        st  = (r == 0) ? w[29] : w[28];
      bit [11:0] sec = (r == 0) ? w[27:16] : w[15:4];
      for (int c = 0; c < 4; c++) begin
        bit [3:0] lay;   // lay[3] = layer 1 ... lay[0] = layer 4
        bit [1:0] part = (c < 2) ? w[3:2] : w[1:0];
        int val;
        if (!st) begin
          lay[3] = PATS[sec[11:9]][c];
          lay[2] = PATS[sec[8:6]][c];
          lay[1] = PATS[sec[5:3]][c];
          lay[0] = PATS[sec[2:0]][c];
        end else begin
          bit [1:0] pa = (c < 2) ? sec[3:2] : sec[1:0];
          lay = {sec[8+c], sec[4+c], pa};
        end
        val = (int'(lay) * 16 + int'(part) * 4) / (1 << sp);
        p[r][c] = 8'(val);
      end
    end
    return p;
  endfunction

  // Random test block: mode 0 = noise, 1 = flat with small noise,
  // 2 = horizontal step edge, 3 = dark noise; a random mask of the top planes
  // makes every start plane appear.
  function automatic rblk_t ref_rand_blk();
    rblk_t p;
    int mode = $urandom_range(3);
    bit [7:0] mask = 8'hFF >> $urandom_range(4);
    bit [7:0] a = 8'($urandom), b = 8'($urandom);
    int edge_c = $urandom_range(4);
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++)
        case (mode)
          0: p[r][c] = 8'($urandom) & mask;
          1: p[r][c] = (a & mask) ^ 8'($urandom_range(3));
          2: p[r][c] = ((c < edge_c) ? a : b) & mask;
          default: p[r][c] = 8'($urandom_range(31));
        endcase
    return p;
  endfunction

endpackage
