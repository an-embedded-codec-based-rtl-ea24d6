// tb_ec_rearrange: decodes random 32-bit packets, and packets produced by the
// reference encoder, with ec_rearrange and compares every pixel with the
// reference decoder. Both strategies and all start planes are counted.
module tb_ec_rearrange;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  packet_t pkt;
  blk4x2_t blk;
  int checks = 0, failures = 0;
  int sp_seen [4];
  int left_seen = 0, right_seen = 0;

  ec_rearrange dut (.pkt(pkt), .blk(blk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pkt(bit [31:0] w);
    rblk_t e;
    pkt = w;
    #1;
    e = ref_decode(w);
    sp_seen[w[31:30]]++;
    if (w[29]) right_seen++; else left_seen++;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (blk[r][c] != e[r][c]) begin
          failures++;
          if (failures < 10) $display("pixel %0d,%0d of %h: %h vs %h", r, c, w, blk[r][c], e[r][c]);
        end
      end
  endtask

  initial begin
    repeat (2000) check_pkt($urandom);
    repeat (2000) check_pkt(ref_encode(ref_rand_blk()));
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sp_seen[s] == 0) begin failures++; $display("start plane %0d never seen", s); end
    end
    checks++;
    if (left_seen == 0 || right_seen == 0) begin failures++; $display("a strategy never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
