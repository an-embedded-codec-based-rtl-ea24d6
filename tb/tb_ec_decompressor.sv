// tb_ec_decompressor: feeds 64-bit segments (two packets) to ec_decompressor
// with random idle cycles and checks the decoded 4x2 blocks against the
// reference decoder, the one-cycle latency, and 16 cycles per macroblock.
module tb_ec_decompressor;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int LANES = 2;

  logic                clk = 0, rst_n = 0;
  logic                in_valid = 0;
  packet_t [LANES-1:0] in_pkt;
  logic                out_valid;
  blk4x2_t [LANES-1:0] out_blk;
  int checks = 0, failures = 0;
  int cycle = 0;

  ec_decompressor dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pkt(in_pkt),
                       .out_valid(out_valid), .out_blk(out_blk));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [31:0] exp_q [$];
  int        exp_cyc [$];
  int        out_cnt = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int l = 0; l < LANES; l++) begin
        automatic rblk_t e = ref_decode(exp_q.pop_front());
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (out_blk[l][r][c] != e[r][c]) begin
              failures++;
              if (failures < 10) $display("lane %0d pixel %0d,%0d: %h vs %h", l, r, c, out_blk[l][r][c], e[r][c]);
            end
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
          automatic bit [31:0] w = (mb % 2) ? $urandom : ref_encode(ref_rand_blk());
          in_pkt[l] = w;
          exp_q.push_back(w);
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
    if (out_cnt != 20 * 16) begin failures++; $display("output count %0d", out_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
