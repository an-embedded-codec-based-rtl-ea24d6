// tb_ec_mc_access: motion-compensation fetches through the codec, for every
// combination of horizontal and vertical motion-vector class:
//   align     (position a multiple of 4, 4 pixels needed)
//   not align (integer position off the 4-grid, 4 pixels needed)
//   sub-pixel (fractional, 9 pixels needed: 2 before, 4, 3 after)
// A 4x4 block is fetched. Each memory access returns one coded 4x2 block (one
// 32-bit word), issued as an MC request whose lane 0 is used. The number of
// accesses must match the published per-case counts (4x2 grid); the count for
// an uncompressed frame (4 pixels per 32-bit word, raster order) is computed
// alongside. Every fetched pixel is compared with the reference decoder.
// The probability-weighted averages are printed.
module tb_ec_mc_access;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int LANES = 2, W = 1920;
  localparam int AX = 64, AY = 64, AW = 64, AH = 64;   // written region

  logic clk = 0, rst_n = 0;
  logic [31:0]                 frame_base = 32'h0004_0000;
  logic                        df_valid = 0;
  blk4x2_t [LANES-1:0]         df_blk;
  logic [10:0]                 df_x = 0, df_y = 0;
  logic                        wr_valid;
  logic [LANES-1:0][31:0]      wr_addr;
  logic [LANES-1:0][31:0]      wr_data;
  logic [10:0]                 mc_x = 0, mc_y = 0;
  logic [LANES-1:0][31:0]      rd_addr;
  logic                        rd_data_valid = 0;
  logic [LANES-1:0][31:0]      rd_data;
  logic                        mc_valid;
  blk4x2_t [LANES-1:0]         mc_blk;

  ec_codec dut (
    .clk(clk), .rst_n(rst_n), .frame_base(frame_base),
    .df_valid(df_valid), .df_blk(df_blk), .df_x(df_x), .df_y(df_y),
    .wr_valid(wr_valid), .wr_addr(wr_addr), .wr_data(wr_data),
    .mc_x(mc_x), .mc_y(mc_y), .rd_addr(rd_addr),
    .rd_data_valid(rd_data_valid), .rd_data(rd_data),
    .mc_valid(mc_valid), .mc_blk(mc_blk)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [7:0]  frame [int];
  bit [31:0] mem [int unsigned];
  int        accesses;

  always @(posedge clk) begin
    if (rst_n && wr_valid)
      for (int l = 0; l < LANES; l++) mem[wr_addr[l]] = wr_data[l];
  end

  logic rd_req = 0;
  always @(posedge clk) begin
    rd_data_valid <= rd_req;
    if (rd_req) begin
      accesses++;
      for (int l = 0; l < LANES; l++)
        rd_data[l] <= mem.exists(rd_addr[l]) ? mem[rd_addr[l]] : 32'h0;
    end
  end

  function automatic rblk_t orig_blk(int x, int y);
    rblk_t p;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++) p[r][c] = frame[(y + r) * W + x + c];
    return p;
  endfunction

  // published access counts with the codec, and case probabilities (%)
  // index = 3 * x_class + y_class, class 0 align, 1 not align, 2 sub-pixel
  localparam int  PUB_EC [9] = '{2, 2, 5, 4, 4, 10, 6, 6, 15};
  localparam int  PUB_EC_ODD [9] = '{2, 3, 5, 4, 6, 10, 6, 9, 15};
  localparam int  PUB_ORIG [9] = '{4, 4, 9, 8, 8, 18, 12, 12, 27};
  localparam real PROB [9] = '{33.0, 0.4, 5.1, 4.5, 0.4, 5.4, 23.5, 1.81, 25.8};

  // fetch the area [x0, x1] x [y0, y1] through the codec, 4x2 block by block
  task automatic fetch(int x0, int x1, int y0, int y1, output int n);
    int bx0 = x0 / 4 * 4, by0 = y0 / 2 * 2;
    accesses = 0;
    for (int by = by0; by <= y1; by += 2)
      for (int bx = bx0; bx <= x1; bx += 4) begin
        rblk_t e;
        @(negedge clk);
        rd_req = 1;
        mc_x = 11'(bx);
        mc_y = 11'(by);
        @(negedge clk);
        rd_req = 0;
        @(negedge clk);
        e = ref_decode(ref_encode(orig_blk(bx, by)));
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (mc_blk[0][r][c] != e[r][c]) begin
              failures++;
              $display("fetched pixel (%0d,%0d) wrong", bx + c, by + r);
            end
          end
      end
    n = accesses;
  endtask

  // number of 4-pixel raster words covering the area, without the codec
  function automatic int orig_words(int x0, int x1, int y0, int y1);
    return (x1 / 4 - x0 / 4 + 1) * (y1 - y0 + 1);
  endfunction

  initial begin
    real avg_ec = 0.0, avg_ec_odd = 0.0, avg_orig = 0.0;
    // fill and write the region
    for (int y = AY; y < AY + AH; y++)
      for (int x = AX; x < AX + AW; x++) frame[y * W + x] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = AY; y < AY + AH; y += 4)
      for (int x = AX; x < AX + AW; x += 4) begin
        @(negedge clk);
        df_valid = 1;
        df_x = 11'(x);
        df_y = 11'(y);
        for (int l = 0; l < LANES; l++) begin
          automatic rblk_t p = orig_blk(x, y + 2 * l);
          foreach (p[r, c]) df_blk[l][r][c] = p[r][c];
        end
      end
    @(negedge clk);
    df_valid = 0;
    @(negedge clk);

    for (int xc = 0; xc < 3; xc++)
      for (int yc = 0; yc < 3; yc++)
        for (int odd = 0; odd < 2; odd++) begin
          // reference block position: on the grid, or off it (by 2, or by 1)
          automatic int px = 96 + ((xc == 1) ? 1 + odd : 0);
          automatic int py = 96 + ((yc == 1) ? (odd ? 1 : 2) : 0);
          automatic int x0 = (xc == 2) ? px - 2 : px, x1 = (xc == 2) ? px + 6 : px + 3;
          automatic int y0 = (yc == 2) ? py - 2 : py, y1 = (yc == 2) ? py + 6 : py + 3;
          automatic int n, exp_n, idx = 3 * xc + yc;
          fetch(x0, x1, y0, y1, n);
          exp_n = odd ? PUB_EC_ODD[idx] : PUB_EC[idx];
          checks += 2;
          if (n != exp_n) begin failures++; $display("case %0d/%0d odd=%0d: %0d accesses, published %0d", xc, yc, odd, n, exp_n); end
          if (orig_words(x0, x1, y0, y1) != PUB_ORIG[idx]) begin
            failures++;
            $display("case %0d/%0d: %0d words uncompressed, published %0d", xc, yc, orig_words(x0, x1, y0, y1), PUB_ORIG[idx]);
          end
          if (odd) avg_ec_odd += PROB[idx] * n / 100.0;
          else begin
            avg_ec   += PROB[idx] * n / 100.0;
            avg_orig += PROB[idx] * orig_words(x0, x1, y0, y1) / 100.0;
          end
        end
    $display("weighted accesses per 4x4 block: %.2f uncompressed, %.2f to %.2f with the codec (%.1f%% to %.1f%% fewer)",
             avg_orig, avg_ec, avg_ec_odd, 100.0 * (1.0 - avg_ec / avg_orig), 100.0 * (1.0 - avg_ec_odd / avg_orig));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
