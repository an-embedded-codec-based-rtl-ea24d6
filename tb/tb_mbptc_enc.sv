// tb_mbptc_enc: checks the start plane, the four layers and the residue
// planes of mbptc_enc against the reference model for random blocks of every
// start plane, plus the all-zero block.
module tb_mbptc_enc;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  blk4x2_t                                  blk;
  sp_t                                      sp;
  layer_t [BLK_ROWS-1:0][3:0]               layer;
  logic   [BLK_ROWS-1:0][BLK_COLS-1:0][1:0] res;
  int checks = 0, failures = 0;
  int sp_seen [4];

  mbptc_enc dut (.blk(blk), .sp(sp), .layer(layer), .res(res));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_blk(rblk_t p);
    int esp;
    for (int r = 0; r < 2; r++) for (int c = 0; c < 4; c++) blk[r][c] = p[r][c];
    #1;
    esp = ref_sp(p);
    sp_seen[esp]++;
    checks++;
    if (int'(sp) != esp) begin
      failures++;
      $display("sp mismatch: got %0d exp %0d", sp, esp);
    end
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (layer[r][k] != ref_layer(p, r, esp, k + 1)) begin
          failures++;
          $display("layer mismatch r%0d k%0d: %b vs %b", r, k, layer[r][k], ref_layer(p, r, esp, k + 1));
        end
      end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (res[r][c] != {plane_bit(p[r][c], 3 - esp), plane_bit(p[r][c], 2 - esp)}) begin
          failures++;
          $display("residue mismatch r%0d c%0d", r, c);
        end
      end
    end
  endtask

  initial begin
    rblk_t z;
    foreach (z[r, c]) z[r][c] = 0;
    check_blk(z);
    repeat (2000) check_blk(ref_rand_blk());
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sp_seen[s] == 0) begin failures++; $display("start plane %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
