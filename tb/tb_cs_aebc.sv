// tb_cs_aebc: end-to-end test of the CS-AEBC.  Random code-blocks (four
// sub-bands, coefficient sizes spread over all bit-planes, many zeros) are
// streamed column by column, two groups back to back; the code bytes of every
// (code-block, bit-plane) stream and the skipped-window counts are compared
// with the reference context model plus MQ model.  Zero skipping, package
// dropping and back-pressure stalls must each occur.
`timescale 1ns/1ps
module tb_cs_aebc;
  import jp2k_pkg::*;
  import tb_ref_pkg::*;
  localparam int CBW = 8, CBH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_first_stripe, in_eob;
  coef_t [NBLK-1:0][STRIPE-1:0] in_coef;
  logic [$clog2(CBW)-1:0] in_col;
  logic [NBLK-1:0][NBP-1:0] kill;
  logic [NLANE-1:0][2:0] out_n; logic [NLANE-1:0][2:0][7:0] out_byte;
  logic [NLANE-1:0][1:0] out_blk; logic [NLANE-1:0][3:0] out_plane; logic [NLANE-1:0] out_eos;
  logic [NBLK-1:0][NBP-1:0][2:0] col_newsig;
  logic stripe_done, eob_done, done, ev_gozs_drop, ev_zs_skip, ev_stall;
  logic [NBLK-1:0][NBP-1:0][11:0] skip_count;
  int checks = 0, failures = 0;
  int n_drop = 0, n_skip = 0, n_stall = 0;
  byte unsigned got [4][10][$];
  logic [NBLK-1:0][NBP-1:0][11:0] skip_at_done;

  cs_aebc #(.CBW(CBW)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < NLANE; j++)
      for (int i = 0; i < int'(out_n[j]); i++) got[out_blk[j]][out_plane[j]].push_back(out_byte[j][i]);
    if (ev_gozs_drop) n_drop++;
    if (ev_zs_skip) n_skip++;
    if (ev_stall) n_stall++;
    if (done) skip_at_done <= skip_count;
  end

  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    ebc_ref r;
    r = new(CBW, CBH);
    in_valid = 0; in_coef = '0; in_col = '0; in_first_stripe = 0; in_eob = 0; kill = '0;
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int grp = 0; grp < 3; grp++) begin
      for (int b = 0; b < 4; b++)
        for (int y = 0; y < CBH; y++)
          for (int x = 0; x < CBW; x++) begin
            int nb, v;
            nb = (grp == 2) ? $urandom_range(10) * ($urandom_range(3) == 0)
                            : $urandom_range(10 - 2 * b) * ($urandom_range(1));
            v = (nb == 0) ? 0 : $urandom_range((1 << nb) - 1);
            r.cf[b][y][x] = $urandom_range(1) ? -v : v;
          end
      r.run();
      for (int s = 0; s < CBH / 4; s++)
        for (int x = 0; x < CBW; x++) begin
          @(negedge clk);
          for (int b = 0; b < 4; b++)
            for (int i = 0; i < 4; i++) in_coef[b][i] = to_coef(16'(r.cf[b][4*s+i][x]));
          in_col = 3'(x); in_first_stripe = (s == 0); in_eob = (s == CBH/4 - 1) && (x == CBW - 1);
          in_valid = 1;
          @(posedge clk); while (!in_ready) @(posedge clk);
          @(negedge clk); in_valid = 0;
        end
      while (!done) @(posedge clk);
      @(posedge clk); @(posedge clk);
      foreach (got[b, k]) begin
        byte unsigned exp_q[$];
        r.bytes(b, k, exp_q);
        checks++;
        if (exp_q != got[b][k]) begin
          failures++;
          $display("grp %0d stream b%0d k%0d: %0d bytes expected, %0d got", grp, b, k, exp_q.size(), got[b][k].size());
        end
        checks++;
        if (int'(skip_at_done[b][k]) != r.skipped[b][k]) begin
          failures++;
          $display("grp %0d skip b%0d k%0d: %0d expected, %0d got", grp, b, k, r.skipped[b][k], skip_at_done[b][k]);
        end
        got[b][k] = {};
      end
    end
    $display("mechanisms: gozs drops=%0d zs skips=%0d stalls=%0d", n_drop, n_skip, n_stall);
    checks++; if (n_drop == 0) failures++;
    checks++; if (n_skip == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
