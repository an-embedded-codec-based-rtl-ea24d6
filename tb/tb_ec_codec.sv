// tb_ec_codec: end-to-end test of the embedded codec at its default
// parameters (two lanes, 1920x1088 frame).
//
// A behavioural 32-bit-per-entry external memory (one-cycle read latency) is
// modelled here. Macroblocks at the frame corners and at random positions are
// written through the compressor, one 4x4 block per cycle, then read back by
// motion-compensation style requests and decoded. Checked:
//   - every written word and address against the reference encoder and an
//     independent tile-numbering of the frame
//   - every decoded pixel against the reference decoder, and the codec's
//     error bound: the first two coded planes are exact, so the error is
//     below 2^(6-SP)
//   - 16 cycles per macroblock for both compression and decompression, and
//     one cycle of latency in each direction
// Counted, each must happen at least once: every start plane 0..3, the left
// and right strategies, aligned and 4x2-unaligned (y = 2 mod 4) reads.
module tb_ec_codec;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int LANES = 2, W = 1920, H = 1088;
  localparam int NUM_MB = 12;

  logic clk = 0, rst_n = 0;
  logic [31:0]                 frame_base = 32'h0020_0000;
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
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // original frame content, only the macroblocks used, keyed by y*W + x
  bit [7:0]  frame [int];
  // external memory model
  bit [31:0] mem   [int unsigned];

  // mechanism counters
  int sp_cnt [4];
  int left_cnt = 0, right_cnt = 0, aligned_rd = 0, unaligned_rd = 0;

  // word address of the 4x2 block holding pixel (x, y), from a tile count
  function automatic int unsigned tile_word(int x, int y);
    int tile = (y / 4) * (W / 4) + (x / 4);
    return frame_base + 32'(2 * tile + ((y % 4) >= 2 ? 1 : 0));
  endfunction

  function automatic rblk_t orig_blk(int x, int y);
    rblk_t p;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++) p[r][c] = frame[(y + r) * W + x + c];
    return p;
  endfunction

  // ---------------- write side: memory stores what the codec writes --------
  int unsigned exp_waddr [$];
  bit [31:0]   exp_wdata [$];
  int          exp_wcyc  [$];
  int          wr_cnt = 0;

  always @(posedge clk) begin
    if (rst_n && wr_valid) begin
      automatic int c0 = exp_wcyc.pop_front();
      checks++;
      if (cycle - c0 != 1) begin failures++; $display("write latency %0d", cycle - c0); end
      for (int l = 0; l < LANES; l++) begin
        automatic int unsigned ea = exp_waddr.pop_front();
        automatic bit [31:0]   ed = exp_wdata.pop_front();
        checks += 2;
        if (wr_addr[l] != ea) begin failures++; $display("write address %h vs %h", wr_addr[l], ea); end
        if (wr_data[l] != ed) begin failures++; $display("write data %h vs %h", wr_data[l], ed); end
        mem[wr_addr[l]] = wr_data[l];
        wr_cnt++;
      end
    end
  end

  // ---------------- read side: memory model and decoded-data checker --------
  logic                   rd_req = 0;
  int unsigned exp_rx [$];
  int unsigned exp_ry [$];
  int          exp_rcyc [$];
  int          mc_cnt = 0;

  always @(posedge clk) begin
    rd_data_valid <= rd_req;
    if (rd_req)
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (!mem.exists(rd_addr[l])) begin failures++; $display("read of unwritten word %h", rd_addr[l]); end
        else rd_data[l] <= mem[rd_addr[l]];
      end
  end

  always @(posedge clk) begin
    if (rst_n && mc_valid) begin
      automatic int x = exp_rx.pop_front();
      automatic int y = exp_ry.pop_front();
      automatic int c0 = exp_rcyc.pop_front();
      checks++;
      if (cycle - c0 != 2) begin failures++; $display("request-to-pixel latency %0d", cycle - c0); end
      for (int l = 0; l < LANES; l++) begin
        automatic rblk_t o = orig_blk(x, y + 2 * l);
        automatic bit [31:0] w = ref_encode(o);
        automatic rblk_t e = ref_decode(w);
        automatic int sp = w[31:30];
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 4; c++) begin
            automatic int err = int'(mc_blk[l][r][c]) - int'(o[r][c]);
            checks += 2;
            if (mc_blk[l][r][c] != e[r][c]) begin
              failures++;
              if (failures < 10) $display("pixel (%0d,%0d): %h vs %h", x + c, y + 2 * l + r, mc_blk[l][r][c], e[r][c]);
            end
            if (err < 0) err = -err;
            if (err >= (1 << (6 - sp))) begin failures++; $display("error %0d above bound at sp %0d", err, sp); end
          end
      end
      mc_cnt++;
    end
  end

  // ---------------- stimulus ------------------------------------------------
  int mbx [NUM_MB];
  int mby [NUM_MB];

  task automatic fill_mb(int x0, int y0);
    for (int by = 0; by < 16; by += 2)
      for (int bx = 0; bx < 16; bx += 4) begin
        rblk_t p = ref_rand_blk();
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 4; c++) frame[(y0 + by + r) * W + x0 + bx + c] = p[r][c];
      end
  endtask

  task automatic write_mb(int x0, int y0);
    int first, last;
    for (int t = 0; t < 16; t++) begin
      int x = x0 + 4 * (t % 4);
      int y = y0 + 4 * (t / 4);
      @(negedge clk);
      if (t == 0) first = cycle;
      last = cycle;
      df_valid = 1;
      df_x = 11'(x);
      df_y = 11'(y);
      for (int l = 0; l < LANES; l++) begin
        rblk_t p = orig_blk(x, y + 2 * l);
        bit [31:0] w = ref_encode(p);
        foreach (p[r, c]) df_blk[l][r][c] = p[r][c];
        exp_waddr.push_back(tile_word(x, y + 2 * l));
        exp_wdata.push_back(w);
        sp_cnt[w[31:30]]++;
        if (w[29]) right_cnt++; else left_cnt++;
        if (w[28]) right_cnt++; else left_cnt++;
      end
      exp_wcyc.push_back(cycle + 1);
    end
    @(negedge clk);
    df_valid = 0;
    checks++;
    if (last - first + 1 != 16) begin failures++; $display("MB write took %0d cycles", last - first + 1); end
  endtask

  // read a 16x16 area at (x0, y0 + yoff) as 4x4 requests, one per cycle
  task automatic read_mb(int x0, int y0, int yoff);
    int first, last, rows;
    rows = (yoff == 0) ? 4 : 3;   // an offset area stays inside the macroblock
    for (int t = 0; t < 4 * rows; t++) begin
      int x = x0 + 4 * (t % 4);
      int y = y0 + yoff + 4 * (t / 4);
      @(negedge clk);
      if (t == 0) first = cycle;
      last = cycle;
      rd_req = 1;
      mc_x = 11'(x);
      mc_y = 11'(y);
      exp_rx.push_back(x);
      exp_ry.push_back(y);
      exp_rcyc.push_back(cycle + 1);
      if (y % 4 == 0) aligned_rd++; else unaligned_rd++;
    end
    @(negedge clk);
    rd_req = 0;
    if (yoff == 0) begin
      checks++;
      if (last - first + 1 != 16) begin failures++; $display("MB read took %0d cycles", last - first + 1); end
    end
  endtask

  initial begin
    mbx[0] = 0;           mby[0] = 0;
    mbx[1] = W - 16;      mby[1] = H - 16;
    mbx[2] = W - 16;      mby[2] = 0;
    mbx[3] = 0;           mby[3] = H - 16;
    for (int i = 4; i < NUM_MB; i++) begin
      mbx[i] = 16 * $urandom_range(W / 16 - 1);
      mby[i] = 16 * $urandom_range(H / 16 - 1);
      for (int j = 0; j < i; j++)
        if (mbx[i] == mbx[j] && mby[i] == mby[j]) begin mbx[i] = 16 * (i + 8); mby[i] = 16 * i; end
    end
    for (int i = 0; i < NUM_MB; i++) fill_mb(mbx[i], mby[i]);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NUM_MB; i++) write_mb(mbx[i], mby[i]);
    repeat (3) @(posedge clk);
    checks++;
    if (wr_cnt != NUM_MB * 32) begin failures++; $display("words written %0d", wr_cnt); end
    for (int i = 0; i < NUM_MB; i++) begin
      read_mb(mbx[i], mby[i], 0);
      read_mb(mbx[i], mby[i], 2);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (mc_cnt != NUM_MB * 28) begin failures++; $display("blocks decoded %0d", mc_cnt); end

    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sp_cnt[s] == 0) begin failures++; $display("start plane %0d never occurred", s); end
    end
    checks += 4;
    if (left_cnt == 0)     begin failures++; $display("left strategy never occurred"); end
    if (right_cnt == 0)    begin failures++; $display("right strategy never occurred"); end
    if (aligned_rd == 0)   begin failures++; $display("aligned read never occurred"); end
    if (unaligned_rd == 0) begin failures++; $display("unaligned read never occurred"); end
    $display("mechanisms: sp0=%0d sp1=%0d sp2=%0d sp3=%0d left=%0d right=%0d aligned=%0d unaligned=%0d",
             sp_cnt[0], sp_cnt[1], sp_cnt[2], sp_cnt[3], left_cnt, right_cnt, aligned_rd, unaligned_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
