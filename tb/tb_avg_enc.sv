// tb_avg_enc: exhaustive check of avg_enc over all 256 sets of four 2-bit
// residues; the expected value is the rounded mean computed in real numbers.
module tb_avg_enc;
  logic [3:0][1:0] res;
  logic [1:0]      avg;
  int checks = 0, failures = 0;

  avg_enc dut (.res(res), .avg(avg));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_avg;
    real m;
    for (int v = 0; v < 256; v++) begin
      res = 8'(v);
      #1;
      m = (real'(res[0]) + real'(res[1]) + real'(res[2]) + real'(res[3])) / 4.0;
      exp_avg = int'($floor(m + 0.5));
      checks++;
      if (int'(avg) != exp_avg) begin failures++; $display("avg mismatch %h: %0d vs %0d", res, avg, exp_avg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
