// tb_ec_frames: runs whole frames of the target video formats through the
// codec at its default parameters and checks them against the clock budgets:
//   CIF 352x288 at 5 MHz, 1080p (1920x1088) at 100 MHz, and the two-layer
//   1080p + 720p (1280x720) stream at 150 MHz, all at 30 frames/s.
// Each frame is a synthetic picture (gradients, edges, texture and noise).
// It is written macroblock by macroblock, one 4x4 block per cycle, and then
// read back the same way. Every coded word is compared with the reference
// encoder and every pixel with the reference decoder. The number of cycles
// per frame is counted and compared with clock / 30. The PSNR of each
// reconstructed frame is printed for information.
module tb_ec_frames;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int LANES = 2, STRIDE = 1920;

  logic clk = 0, rst_n = 0;
  logic [31:0]                 frame_base = 0;
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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // current frame
  int        fw, fh;
  bit [7:0]  frame [];
  bit [31:0] mem [int unsigned];

  function automatic bit [7:0] synth_pix(int x, int y, int seed);
    int v = (x * 3 + y * 2 + seed) % 256;          // diagonal gradient
    if (((x / 24) + (y / 40)) % 5 == 0) v = 255 - v;  // hard-edged patches
    if ((x / 64) % 3 == 1) v = v / 8;                 // dark bands
    v += int'($urandom_range(6)) - 3;                 // noise
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

  function automatic rblk_t orig_blk(int x, int y);
    rblk_t p;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++) p[r][c] = frame[(y + r) * fw + x + c];
    return p;
  endfunction

  // write side: check and store
  always @(posedge clk) begin
    if (rst_n && wr_valid)
      for (int l = 0; l < LANES; l++) mem[wr_addr[l]] = wr_data[l];
  end

  // read side: memory with one-cycle reads
  logic rd_req = 0;
  always @(posedge clk) begin
    rd_data_valid <= rd_req;
    if (rd_req)
      for (int l = 0; l < LANES; l++)
        rd_data[l] <= mem.exists(rd_addr[l]) ? mem[rd_addr[l]] : 32'h0;
  end

  int   exp_rx [$];
  int   exp_ry [$];
  real  sq_err;
  int   npix;
  always @(posedge clk) begin
    if (rst_n && mc_valid) begin
      automatic int x = exp_rx.pop_front();
      automatic int y = exp_ry.pop_front();
      for (int l = 0; l < LANES; l++) begin
        automatic rblk_t o = orig_blk(x, y + 2 * l);
        automatic rblk_t e = ref_decode(ref_encode(o));
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 4; c++) begin
            automatic int d = int'(mc_blk[l][r][c]) - int'(o[r][c]);
            checks++;
            if (mc_blk[l][r][c] != e[r][c]) begin
              failures++;
              if (failures < 10) $display("pixel (%0d,%0d) mismatch", x + c, y + 2 * l + r);
            end
            sq_err += real'(d * d);
            npix++;
          end
      end
    end
  end

  // runs one frame; returns the cycles spent writing and reading it
  task automatic run_frame(input int w, input int h, input int seed, input bit [31:0] base,
                           output int wcyc, output int rcyc);
    int t0;
    int words;
    fw = w;
    fh = h;
    frame = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) frame[y * w + x] = synth_pix(x, y, seed);
    frame_base = base;
    mem.delete();
    sq_err = 0.0;
    npix = 0;

    // write, macroblock by macroblock
    @(negedge clk);
    t0 = cycle;
    for (int my = 0; my < h; my += 16)
      for (int mx = 0; mx < w; mx += 16)
        for (int t = 0; t < 16; t++) begin
          int x = mx + 4 * (t % 4);
          int y = my + 4 * (t / 4);
          df_valid = 1;
          df_x = 11'(x);
          df_y = 11'(y);
          for (int l = 0; l < LANES; l++) begin
            rblk_t p = orig_blk(x, y + 2 * l);
            foreach (p[r, c]) df_blk[l][r][c] = p[r][c];
          end
          @(negedge clk);
        end
    df_valid = 0;
    wcyc = cycle - t0;
    @(negedge clk);
    @(negedge clk);

    // every stored word is the reference coding of its block
    words = 0;
    for (int y = 0; y < h; y += 2)
      for (int x = 0; x < w; x += 4) begin
        int unsigned a = base + 32'(2 * ((y / 4) * (STRIDE / 4) + x / 4) + (y / 2) % 2);
        checks++;
        if (!mem.exists(a) || mem[a] != ref_encode(orig_blk(x, y))) begin
          failures++;
          if (failures < 10) $display("stored word for block (%0d,%0d) wrong", x, y);
        end
        words++;
      end
    checks++;
    if (mem.num() != words) begin failures++; $display("%0d words stored, %0d expected", mem.num(), words); end

    // read back, macroblock by macroblock
    t0 = cycle;
    for (int my = 0; my < h; my += 16)
      for (int mx = 0; mx < w; mx += 16)
        for (int t = 0; t < 16; t++) begin
          int x = mx + 4 * (t % 4);
          int y = my + 4 * (t / 4);
          rd_req = 1;
          mc_x = 11'(x);
          mc_y = 11'(y);
          exp_rx.push_back(x);
          exp_ry.push_back(y);
          @(negedge clk);
        end
    rd_req = 0;
    rcyc = cycle - t0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_rx.size() != 0) begin failures++; $display("%0d blocks not returned", exp_rx.size()); end
    $display("frame %0dx%0d: %0d write cycles, %0d read cycles, PSNR %.2f dB", w, h, wcyc, rcyc,
             10.0 * $log10(255.0 * 255.0 / (sq_err / real'(npix))));
  endtask

  task automatic check_budget(string name, int cyc, int mhz);
    int budget = mhz * 1_000_000 / 30;
    checks++;
    if (cyc > budget) begin failures++; $display("%s: %0d cycles over budget %0d", name, cyc, budget); end
    else $display("%s: %0d cycles of %0d available per frame", name, cyc, budget);
  endtask

  initial begin
    int w_cif, r_cif, w_1080, r_1080, w_720, r_720;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(352, 288, 1, 32'h0000_0000, w_cif, r_cif);
    checks++;
    if (w_cif != 396 * 16 || r_cif != 396 * 16) begin failures++; $display("CIF not 16 cycles per MB"); end
    check_budget("CIF @ 5 MHz", w_cif + r_cif, 5);

    run_frame(1920, 1088, 2, 32'h0010_0000, w_1080, r_1080);
    checks++;
    if (w_1080 != 8160 * 16 || r_1080 != 8160 * 16) begin failures++; $display("1080p not 16 cycles per MB"); end
    check_budget("1080p @ 100 MHz", w_1080 + r_1080, 100);

    run_frame(1280, 720, 3, 32'h0020_0000, w_720, r_720);
    checks++;
    if (w_720 != 3600 * 16 || r_720 != 3600 * 16) begin failures++; $display("720p not 16 cycles per MB"); end
    check_budget("1080p + 720p @ 150 MHz", w_1080 + r_1080 + w_720 + r_720, 150);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
