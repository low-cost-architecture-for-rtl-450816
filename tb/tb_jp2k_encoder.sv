// tb_jp2k_encoder: end-to-end test of the encoder core at a reduced 32 x 32 tile.
// A synthetic image (gradients, texture, flat areas) is fed stripe column by
// stripe column.  Tile 1 is coded losslessly: the LL columns written out are
// compared with a floating-point-floor reference 5/3 DWT, and the code bytes of
// every (sub-band, bit-plane) stream and the skipped-window counts with the
// reference context model plus MQ model.  Tile 2 is coded with the dynamic
// RDO enabled and a high target slope: planes must be truncated and the code
// must shrink.  Package dropping, zero skipping, back-pressure stalls and
// truncation are counted and must each happen.
`timescale 1ns/1ps
module tb_jp2k_encoder;
  import jp2k_pkg::*;
  import tb_ref_pkg::*;
  localparam int TW = 32, TH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rdo_enable; logic [15:0] rdo_lambda; logic [7:0] rdo_prot;
  logic pix_valid, pix_ready; logic signed [8:0][15:0] pix_col;
  logic ll_valid; logic signed [3:0][15:0] ll_col;
  logic [NLANE-1:0][2:0] out_n; logic [NLANE-1:0][2:0][7:0] out_byte;
  logic [NLANE-1:0][1:0] out_blk; logic [NLANE-1:0][3:0] out_plane; logic [NLANE-1:0] out_eos;
  logic [NBLK-1:0][3:0] trunc;
  logic [NBLK-1:0][NBP-1:0][11:0] skip_count;
  logic cb_done, ev_gozs_drop, ev_zs_skip, ev_stall, ev_truncate;
  int checks = 0, failures = 0;
  int n_drop = 0, n_skip = 0, n_stall = 0, n_trunc = 0;
  byte unsigned got [4][10][$];
  int ll_q[$];
  logic [NBLK-1:0][NBP-1:0][11:0] skip_at_done;
  logic [NBLK-1:0][3:0] trunc_max;

  jp2k_encoder #(.TW(32), .TH(32)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < NLANE; j++)
      for (int i = 0; i < int'(out_n[j]); i++) got[out_blk[j]][out_plane[j]].push_back(out_byte[j][i]);
    if (ll_valid) for (int i = 0; i < 4; i++) ll_q.push_back(int'($signed(ll_col[i])));
    if (ev_gozs_drop) n_drop++;
    if (ev_zs_skip) n_skip++;
    if (ev_stall) n_stall++;
    if (ev_truncate) n_trunc++;
    for (int b = 0; b < 4; b++) if (trunc[b] > trunc_max[b]) trunc_max[b] <= trunc[b];
    if (cb_done) skip_at_done <= skip_count;
  end

  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int img[][];
    ebc_ref r;
    r = new(TW / 2, TH / 2);
    img = new[TH];
    foreach (img[y]) img[y] = new[TW];
    rdo_enable = 0; rdo_lambda = 0; rdo_prot = 8'd16;
    pix_valid = 0; pix_col = '0; trunc_max = '0;
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int tile = 0; tile < 2; tile++) begin
      int vl[][], vh[][], sb[4][][];
      int total_ref, total_got;
      // synthetic image
      foreach (img[y, x]) begin
        int v;
        v = (x * 2 + y * 3 + tile * 40) % 256;
        if (((x / 16) + (y / 16)) % 3 == 0) v = 100 + tile * 20;            // flat areas
        else if (((x / 8) + (y / 8)) % 2 == 0) v = v + $urandom_range(60) - 30;  // texture
        v = (v < 0) ? 0 : (v > 255) ? 255 : v;
        img[y][x] = v - 128;
      end
      // reference DWT: vertical then horizontal
      vl = new[TH / 2]; vh = new[TH / 2];
      foreach (vl[y]) begin vl[y] = new[TW]; vh[y] = new[TW]; end
      for (int x = 0; x < TW; x++) begin
        int col[], lo[], hi[];
        col = new[TH];
        for (int y = 0; y < TH; y++) col[y] = img[y][x];
        lift53(col, lo, hi);
        for (int y = 0; y < TH / 2; y++) begin vl[y][x] = lo[y]; vh[y][x] = hi[y]; end
      end
      foreach (sb[i]) begin sb[i] = new[TH / 2]; foreach (sb[i][y]) sb[i][y] = new[TW / 2]; end
      for (int y = 0; y < TH / 2; y++) begin
        int lo[], hi[];
        lift53(vl[y], lo, hi);
        for (int x = 0; x < TW / 2; x++) begin sb[0][y][x] = lo[x]; sb[1][y][x] = hi[x]; end
        lift53(vh[y], lo, hi);
        for (int x = 0; x < TW / 2; x++) begin sb[2][y][x] = lo[x]; sb[3][y][x] = hi[x]; end
      end
      for (int b = 0; b < 4; b++) foreach (sb[b][y, x]) r.cf[b][y][x] = sb[b][y][x];
      r.run();
      // configuration
      rdo_enable = (tile == 1); rdo_lambda = 16'd64; rdo_prot = 8'd16;
      // drive the tile
      ll_q = {};
      for (int s = 0; s < TH / 8; s++)
        for (int x = 0; x < TW; x++) begin
          @(negedge clk);
          for (int i = 0; i < 8; i++) pix_col[i] = 16'(img[8*s+i][x]);
          pix_col[8] = (s < TH / 8 - 1) ? 16'(img[8*s+8][x]) : 16'sd0;
          pix_valid = 1;
          @(posedge clk); while (!pix_ready) @(posedge clk);
          @(negedge clk); pix_valid = 0;
        end
      while (!cb_done) @(posedge clk);
      @(posedge clk); @(posedge clk);
      total_ref = 0; total_got = 0;
      if (tile == 0) begin
        int k;
        checks++;
        if (ll_q.size() != TW * TH / 4) begin failures++; $display("LL: %0d values", ll_q.size()); end
        k = 0;
        for (int s = 0; s < TH / 8; s++)
          for (int x = 0; x < TW / 2; x++)
            for (int i = 0; i < 4; i++) begin
              checks++;
              if (k >= ll_q.size() || ll_q[k] != sb[0][4*s+i][x]) failures++;
              k++;
            end
      end
      foreach (got[b, k]) begin
        byte unsigned exp_q[$];
        r.bytes(b, k, exp_q);
        total_ref += exp_q.size(); total_got += got[b][k].size();
        if (tile == 0) begin
          checks++;
          if (exp_q != got[b][k]) begin
            failures++;
            $display("stream b%0d k%0d: %0d bytes expected, %0d got", b, k, exp_q.size(), got[b][k].size());
          end
          checks++;
          if (int'(skip_at_done[b][k]) != r.skipped[b][k]) begin
            failures++;
            $display("skip b%0d k%0d: %0d expected, %0d got", b, k, r.skipped[b][k], skip_at_done[b][k]);
          end
        end
        got[b][k] = {};
      end
      $display("tile %0d: %0d code bytes (lossless reference %0d), truncation points %p",
               tile, total_got, total_ref, trunc_max);
      if (tile == 1) begin
        checks++; if (total_got >= total_ref) failures++;
        checks++; if (trunc_max == '0) failures++;
      end
    end
    $display("mechanisms: gozs drops=%0d zs skips=%0d stalls=%0d truncating cycles=%0d",
             n_drop, n_skip, n_stall, n_trunc);
    checks++; if (n_drop == 0) failures++;
    checks++; if (n_skip == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_trunc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
