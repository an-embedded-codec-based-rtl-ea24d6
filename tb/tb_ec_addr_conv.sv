// tb_ec_addr_conv: walks every 4x2 block of a 1920x1088 frame in tile order
// and checks that ec_addr_conv gives consecutive word addresses from the base,
// that any pixel inside a block maps to the block's word, and that the last
// block lands on base + 1920*1088/8 - 1.
module tb_ec_addr_conv;
  localparam int W = 1920, H = 1088;

  logic [31:0] base, addr;
  logic [10:0] x;
  logic [10:0] y;
  int checks = 0, failures = 0;
  int nblk;

  ec_addr_conv dut (.base(base), .x(x), .y(y), .addr(addr));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = 32'h0010_0000;
    nblk = 0;
    for (int ty = 0; ty < H / 4; ty++)
      for (int tx = 0; tx < W / 4; tx++)
        for (int half = 0; half < 2; half++) begin
          x = 11'(tx * 4 + $urandom_range(3));
          y = 11'(ty * 4 + half * 2 + $urandom_range(1));
          #1;
          checks++;
          if (addr != base + 32'(nblk)) begin
            failures++;
            if (failures < 10) $display("x=%0d y=%0d: %h vs %h", x, y, addr, base + 32'(nblk));
          end
          nblk++;
        end
    checks++;
    x = 11'(W - 1);
    y = 11'(H - 1);
    #1;
    if (addr != base + 32'(W * H / 8 - 1)) begin failures++; $display("last block at %h", addr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
