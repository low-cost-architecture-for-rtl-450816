// tb_cb_dwt: a random 32 x 32 tile goes through the code-block based DWT,
// stripe column by stripe column, against a randomly stalling consumer; the
// four sub-band columns, their column/stripe tags and the last flag are
// compared with a reference 2-D 5/3 transform (vertical then horizontal).
// Rate: with a ready consumer, one sub-band column per two pixel columns.
`timescale 1ns/1ps
module tb_cb_dwt;
  import tb_ref_pkg::*;
  localparam int TW = 32, TH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic signed [8:0][15:0] in_col;
  logic signed [3:0][15:0] ll, hl, lh, hh;
  logic [3:0] out_col; logic [1:0] out_stripe;
  int checks = 0, failures = 0, nout = 0;
  int sb[4][TH/2][TW/2];
  bit stall = 1;

  cb_dwt #(.DW(16), .TW(TW), .TH(TH)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int s, x;
      s = nout / (TW / 2); x = nout % (TW / 2);
      checks += 3;
      if (out_col != 4'(x)) failures++;
      if (out_stripe != 2'(s)) failures++;
      if (out_last != (nout == TW * TH / 16 - 1)) failures++;
      for (int i = 0; i < 4; i++) begin
        checks += 4;
        if (int'($signed(ll[i])) != sb[0][4*s+i][x]) failures++;
        if (int'($signed(hl[i])) != sb[1][4*s+i][x]) failures++;
        if (int'($signed(lh[i])) != sb[2][4*s+i][x]) failures++;
        if (int'($signed(hh[i])) != sb[3][4*s+i][x]) failures++;
      end
      nout++;
    end
    out_ready <= stall ? 1'($urandom_range(1)) : 1'b1;
  end

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int img[TH][TW];
    int vl[TH/2][], vh[TH/2][];
    in_valid = 0; in_col = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      int t0;
      stall = (pass == 0);
      foreach (img[y, x]) img[y][x] = $urandom_range(255) - 128;
      for (int y = 0; y < TH / 2; y++) begin vl[y] = new[TW]; vh[y] = new[TW]; end
      for (int x = 0; x < TW; x++) begin
        int c[], lo[], hi[];
        c = new[TH];
        for (int y = 0; y < TH; y++) c[y] = img[y][x];
        lift53(c, lo, hi);
        for (int y = 0; y < TH / 2; y++) begin vl[y][x] = lo[y]; vh[y][x] = hi[y]; end
      end
      for (int y = 0; y < TH / 2; y++) begin
        int lo[], hi[];
        lift53(vl[y], lo, hi);
        for (int x = 0; x < TW / 2; x++) begin sb[0][y][x] = lo[x]; sb[1][y][x] = hi[x]; end
        lift53(vh[y], lo, hi);
        for (int x = 0; x < TW / 2; x++) begin sb[2][y][x] = lo[x]; sb[3][y][x] = hi[x]; end
      end
      nout = 0;
      repeat (2) @(posedge clk);
      t0 = $time;
      for (int s = 0; s < TH / 8; s++)
        for (int x = 0; x < TW; x++) begin
          @(negedge clk);
          for (int i = 0; i < 8; i++) in_col[i] = 16'(img[8*s+i][x]);
          in_col[8] = (s < TH / 8 - 1) ? 16'(img[8*s+8][x]) : 16'sd0;
          in_valid = 1;
          @(posedge clk); while (!in_ready) @(posedge clk);
        end
      @(negedge clk); in_valid = 0;
      while (nout < TW * TH / 16) @(posedge clk);
      if (!stall) begin
        checks++;
        if (($time - t0) / 10 > TW * TH / 8 + 4) begin failures++; $display("tile took %0d cycles", ($time - t0) / 10); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
