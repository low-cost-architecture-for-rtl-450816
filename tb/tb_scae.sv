// tb_scae: random dropped-package masks and lane skip events are applied to
// the skip counter; every (code-block, plane) count is compared with a
// software tally, before and after a clear.
`timescale 1ns/1ps
module tb_scae;
  import jp2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, drop_valid;
  logic [NBLK*NGRP*2-1:0] drop_mask;
  logic [NLANE-1:0] skip_valid;
  logic [NLANE-1:0][1:0] skip_blk;
  logic [NLANE-1:0][3:0] skip_plane;
  logic [NBLK-1:0][NBP-1:0][11:0] count;
  int checks = 0, failures = 0;
  int tally[4][10];

  scae dut (.*);

  task automatic compare();
    foreach (tally[b, k]) begin
      checks++;
      if (int'(count[b][k]) != tally[b][k]) failures++;
    end
  endtask

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    clear = 0; drop_valid = 0; drop_mask = '0; skip_valid = '0; skip_blk = '0; skip_plane = '0;
    foreach (tally[b, k]) tally[b][k] = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int round = 0; round < 2; round++) begin
      for (int n = 0; n < 500; n++) begin
        @(negedge clk);
        drop_valid = 1'($urandom_range(1));
        drop_mask = {$urandom, $urandom} & {$urandom, $urandom};
        if (drop_valid)
          for (int p = 0; p < NBLK*NGRP*2; p++)
            if (drop_mask[p])
              for (int j = 0; j < 3; j++)
                if (3 * ((p / 2) % NGRP) + j < NBP) tally[p / (NGRP*2)][3 * ((p / 2) % NGRP) + j]++;
        for (int j = 0; j < 3; j++) begin
          skip_valid[j] = 1'($urandom_range(1));
          skip_blk[j] = 2'($urandom_range(3));
          skip_plane[j] = 4'(3 * $urandom_range(j == 0 ? 3 : 2) + j);
          if (skip_valid[j]) tally[skip_blk[j]][skip_plane[j]]++;
        end
      end
      @(negedge clk); drop_valid = 0; skip_valid = '0;
      @(negedge clk);
      compare();
      clear = 1; @(negedge clk); clear = 0;
      foreach (tally[b, k]) tally[b][k] = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
