// tb_gozs: random code-blocks (8 x 8, four sub-bands) stream into GoZS with a
// fixed random set of truncated planes and a randomly stalling receiver.
// Every package sent is compared with a reference built from whole-block
// arrays: package order, the two samples' bits, significance, refinement
// state, neighbour counts and sign contributions, and the significance flag
// of each CW; all-insignificant packages must be absent and reported in the
// drop mask.  Stripe-done, end-of-block and the flush package are checked.
`timescale 1ns/1ps
module tb_gozs;
  import jp2k_pkg::*;
  localparam int CBW = 8, CBH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_first_stripe, in_eob;
  coef_t [NBLK-1:0][STRIPE-1:0] in_coef;
  logic [$clog2(CBW)-1:0] in_col;
  logic [NBLK-1:0][NBP-1:0] kill;
  logic pkg_valid, pkg_ready;
  cw_t [NLANE-1:0] pkg_cw;
  logic [NLANE-1:0] pkg_lane_valid, pkg_lane_sig;
  logic drop_valid, col_done, stripe_done, eob_done;
  logic [NBLK*NGRP*2-1:0] drop_mask;
  logic [NBLK-1:0][NBP-1:0][2:0] col_newsig;
  int checks = 0, failures = 0;
  int cf[4][CBH][CBW];
  typedef struct { cw_t cw[3]; logic [2:0] lv; logic [2:0] ls; } pk_s;
  pk_s exp_q[$];
  int exp_drops, got_drops, n_stripe, n_eob, n_flush;

  gozs #(.CBW(CBW)) dut (.*);

  function automatic bit sg(int b, int yc, int y, int x, int k);
    int m;
    if (x < 0 || x >= CBW || y < 0 || y >= CBH || y / 4 > yc / 4) return 0;
    m = (cf[b][y][x] < 0) ? -cf[b][y][x] : cf[b][y][x];
    return (m >> (k + 1)) != 0;
  endfunction
  function automatic logic [1:0] contr(int b, int y, int xa, int ya, int xb, int yb, int k);
    int s;
    s = 0;
    if (sg(b, y, ya, xa, k)) s += (cf[b][ya][xa] < 0) ? -1 : 1;
    if (sg(b, y, yb, xb, k)) s += (cf[b][yb][xb] < 0) ? -1 : 1;
    return (s > 0) ? 2'b01 : (s < 0) ? 2'b11 : 2'b00;
  endfunction
  function automatic cw_smp_t smp(int b, int y, int x, int k);
    cw_smp_t r;
    int m;
    m = (cf[b][y][x] < 0) ? -cf[b][y][x] : cf[b][y][x];
    r.vp = 1'((m >> k) & 1); r.sig = (m >> (k + 1)) != 0; r.refd = (m >> (k + 2)) != 0;
    r.sign = cf[b][y][x] < 0;
    r.nh = 2'(sg(b, y, y, x-1, k) + sg(b, y, y, x+1, k));
    r.nv = 2'(sg(b, y, y-1, x, k) + sg(b, y, y+1, x, k));
    r.nd = 3'(sg(b, y, y-1, x-1, k) + sg(b, y, y-1, x+1, k) + sg(b, y, y+1, x-1, k) + sg(b, y, y+1, x+1, k));
    r.hc = contr(b, y, x-1, y, x+1, y, k);
    r.vc = contr(b, y, x, y-1, x, y+1, k);
    return r;
  endfunction
  function automatic bit zero(cw_smp_t s);
    return !s.vp && !s.sig && s.nh == 0 && s.nv == 0 && s.nd == 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (drop_valid) for (int i = 0; i < NBLK*NGRP*2; i++) got_drops += int'(drop_mask[i]);
    if (stripe_done) n_stripe++;
    if (eob_done) n_eob++;
    if (pkg_valid && pkg_ready) begin
      if (pkg_cw[0].flush) begin
        n_flush++;
        checks++; if (pkg_lane_valid != 3'b111 || !pkg_cw[1].flush || !pkg_cw[2].flush) failures++;
      end else begin
        pk_s e;
        checks++;
        if (exp_q.size() == 0) failures++;
        else begin
          e = exp_q.pop_front();
          if (pkg_lane_valid != e.lv || pkg_lane_sig != e.ls) failures++;
          for (int j = 0; j < 3; j++) if (e.lv[j]) begin
            checks++;
            if (pkg_cw[j] != e.cw[j]) begin
              failures++;
              if (failures < 5) $display("got %p\nexp %p", pkg_cw[j], e.cw[j]);
            end
          end
        end
      end
    end
    pkg_ready <= 1'($urandom_range(3) != 0);
  end

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    in_valid = 0; in_coef = '0; in_col = 0; in_first_stripe = 0; in_eob = 0; pkg_ready = 0;
    exp_drops = 0; got_drops = 0; n_stripe = 0; n_eob = 0; n_flush = 0;
    foreach (kill[b, k]) kill[b][k] = ($urandom_range(7) == 0);
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int grp = 0; grp < 3; grp++) begin
      foreach (cf[b, y, x]) begin
        int nb;
        nb = $urandom_range(10) * $urandom_range(1);
        cf[b][y][x] = (nb == 0) ? 0 : $urandom_range((1 << nb) - 1) * ($urandom_range(1) ? -1 : 1);
      end
      // expected packages in order
      for (int s = 0; s < CBH / 4; s++)
        for (int x = 0; x < CBW; x++)
          for (int p = 0; p < NBLK * NGRP * 2; p++) begin
            pk_s e;
            int b, g, hf;
            b = p / (NGRP * 2); g = (p / 2) % NGRP; hf = p % 2;
            e.lv = 0; e.ls = 0;
            for (int j = 0; j < 3; j++) begin
              int k;
              k = 3 * g + j;
              e.cw[j] = '0; e.cw[j].blk = 2'(b); e.cw[j].plane = 4'(k);
              if (k < NBP) begin
                e.lv[j] = 1;
                e.cw[j].s0 = smp(b, 4*s + 2*hf, x, k);
                e.cw[j].s1 = smp(b, 4*s + 2*hf + 1, x, k);
                e.ls[j] = !(zero(e.cw[j].s0) && zero(e.cw[j].s1)) && !kill[b][k];
              end
            end
            if (e.ls != 0) exp_q.push_back(e); else exp_drops++;
          end
      for (int s = 0; s < CBH / 4; s++)
        for (int x = 0; x < CBW; x++) begin
          @(negedge clk);
          for (int b = 0; b < 4; b++)
            for (int i = 0; i < 4; i++) begin
              int v;
              v = cf[b][4*s+i][x];
              in_coef[b][i].sign = v < 0;
              in_coef[b][i].mag = 10'((v < 0) ? -v : v);
            end
          in_col = 3'(x); in_first_stripe = (s == 0); in_eob = (s == CBH/4 - 1) && (x == CBW - 1);
          in_valid = 1;
          @(posedge clk); while (!in_ready) @(posedge clk);
          @(negedge clk); in_valid = 0;
        end
      while (n_eob <= grp) @(posedge clk);
      @(posedge clk);
    end
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d packages missing", exp_q.size()); end
    checks++; if (got_drops != exp_drops) begin failures++; $display("drops %0d vs %0d", got_drops, exp_drops); end
    checks++; if (n_stripe != 3 * CBH / 4) failures++;
    checks++; if (n_flush != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
