// tb_drdo: random statistics (newly significant samples per column, code
// bytes per lane, some end-of-stream bytes that must be ignored) are fed to
// the dynamic RDO stripe by stripe; after each stripe's evaluation the
// truncated-plane mask and the truncation points are compared with a
// software evaluation of the slope test.  An end-of-block clears everything.
// Evaluation time: NBLK x NBP cycles per stripe.
`timescale 1ns/1ps
module tb_drdo;
  import jp2k_pkg::*;
  localparam int NSTR = 8, MINS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable; logic [15:0] lambda; logic [7:0] prot;
  logic [NBLK-1:0][NBP-1:0][2:0] col_newsig;
  logic stripe_done, eob_done;
  logic [NLANE-1:0][2:0] byte_n; logic [NLANE-1:0][1:0] byte_blk; logic [NLANE-1:0][3:0] byte_plane;
  logic [NLANE-1:0] byte_eos;
  logic [NBLK-1:0][NBP-1:0] kill;
  logic [NBLK-1:0][3:0] trunc;
  logic eval_busy;
  int checks = 0, failures = 0, n_kill_events = 0;
  longint dn[4][10], rc[4][10];
  int kb[4], sd;
  bit ekill[4][10];
  int etrunc[4];

  drdo #(.NSTR(NSTR), .MIN_STRIPES(MINS)) dut (.*);

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    enable = 1; prot = 8'd24; col_newsig = '0; stripe_done = 0; eob_done = 0;
    byte_n = '0; byte_blk = '0; byte_plane = '0; byte_eos = '0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int blkgrp = 0; blkgrp < 4; blkgrp++) begin
      lambda = 16'(1 << (2 * blkgrp));
      foreach (dn[b, k]) begin dn[b][k] = 0; rc[b][k] = 0; ekill[b][k] = 0; end
      foreach (kb[b]) begin kb[b] = 0; etrunc[b] = 0; end
      sd = 0;
      for (int s = 0; s < NSTR; s++) begin
        for (int c = 0; c < 16; c++) begin
          @(negedge clk);
          foreach (col_newsig[b, k]) begin
            col_newsig[b][k] = 3'($urandom_range(4) * ($urandom_range(9 - k) == 0));
            dn[b][k] += col_newsig[b][k];
            if (col_newsig[b][k] != 0 && kb[b] < k + 1) kb[b] = k + 1;
          end
          for (int j = 0; j < 3; j++) begin
            byte_n[j] = 3'($urandom_range(2));
            byte_blk[j] = 2'($urandom_range(3));
            byte_plane[j] = 4'(3 * $urandom_range(j == 0 ? 3 : 2) + j);
            byte_eos[j] = ($urandom_range(9) == 0);
            if (!byte_eos[j]) rc[byte_blk[j]][byte_plane[j]] += byte_n[j];
          end
        end
        @(negedge clk);
        col_newsig = '0; byte_n = '0; byte_eos = '0;
        stripe_done = 1; @(negedge clk); stripe_done = 0;
        sd++;
        // software evaluation
        for (int b = 0; b < 4; b++)
          for (int k = 0; k < 10; k++) begin
            longint dh, lhs, rhs;
            int sl;
            sl = NSTR - sd;
            dh = (dn[b][k] << k) + ((kb[b] > k) ? (longint'(sl) << (kb[b] - k)) : sl);
            lhs = dh * sd * 16;
            rhs = longint'(lambda) * rc[b][k] * (sd * 16 + sl * prot);
            if (!ekill[b][k] && rc[b][k] != 0 && sd >= MINS && lhs < rhs) begin
              for (int kk = 0; kk <= k; kk++) ekill[b][kk] = 1;
              if (etrunc[b] < k + 1) etrunc[b] = k + 1;
              n_kill_events++;
            end
          end
        while (eval_busy) @(negedge clk);
        @(negedge clk);
        foreach (ekill[b, k]) begin checks++; if (kill[b][k] != ekill[b][k]) failures++; end
        foreach (etrunc[b]) begin checks++; if (int'(trunc[b]) != etrunc[b]) failures++; end
      end
      eob_done = 1; @(negedge clk); eob_done = 0;
      checks++; if (kill != '0 || trunc != '0) failures++;
    end
    $display("truncation decisions: %0d", n_kill_events);
    checks++; if (n_kill_events == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
