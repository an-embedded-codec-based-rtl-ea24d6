// tb_ec_compressor: streams the 32 4x2 blocks of random macroblocks through
// ec_compressor (default two lanes) in back-to-back cycles, with idle gaps
// between macroblocks, and checks every packet against the reference model,
// the one-cycle latency, and that a macroblock takes 16 input cycles.
module tb_ec_compressor;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int LANES = 2;

  logic                clk = 0, rst_n = 0;
  logic                in_valid = 0;
  blk4x2_t [LANES-1:0] in_blk;
  logic                out_valid;
  packet_t [LANES-1:0] out_pkt;
  int checks = 0, failures = 0;
  int cycle = 0;

  ec_compressor dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_blk(in_blk),
                     .out_valid(out_valid), .out_pkt(out_pkt));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected packets, pushed when a block is driven, popped when out_valid
  bit [31:0] exp_q [$];
  int        exp_cyc [$];
  int        out_cnt = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int l = 0; l < LANES; l++) begin
        bit [31:0] e;
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
        else begin
          e = exp_q.pop_front();
          if (out_pkt[l] != e) begin failures++; $display("packet mismatch lane %0d: %h vs %h", l, out_pkt[l], e); end
        end
      end
      checks++;
      if (cycle - exp_cyc.pop_front() != 1) begin failures++; $display("latency is not one cycle"); end
      out_cnt++;
    end
  end

  initial begin
    int start, last;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 20; mb++) begin
      for (int t = 0; t < 16; t++) begin
        @(negedge clk);
        if (t == 0) start = cycle;
        last = cycle;
        in_valid = 1;
        for (int l = 0; l < LANES; l++) begin
          automatic rblk_t p = ref_rand_blk();
          foreach (p[r, c]) in_blk[l][r][c] = p[r][c];
          exp_q.push_back(ref_encode(p));
        end
        exp_cyc.push_back(cycle + 1);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (last - start + 1 != 16) begin failures++; $display("macroblock took %0d cycles", last - start + 1); end
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (out_cnt != 20 * 16 || exp_q.size() != 0) begin failures++; $display("output count %0d", out_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
