// tb_dwt53_vert: random tiles (4 stripes of 8 rows, 16 columns) go through
// the vertical 5/3 stage column by column, stripe by stripe; the low and high
// rows are compared with a whole-column reference lifting (floor division in
// floating point, symmetric extension), which exercises the line buffer
// across stripes and both tile edges.
`timescale 1ns/1ps
module tb_dwt53_vert;
  import tb_ref_pkg::*;
  localparam int COLS = 16, NS = 4, H = 8 * NS;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, top, bot;
  logic [$clog2(COLS)-1:0] col;
  logic signed [8:0][15:0] x;
  logic signed [3:0][15:0] s, d;
  int checks = 0, failures = 0;

  dwt53_vert #(.DW(16), .COLS(COLS)) dut (.*);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int img[H][COLS];
    int lo[COLS][], hi[COLS][];
    en = 0; top = 0; bot = 0; col = 0; x = '0;
    for (int t = 0; t < 20; t++) begin
      foreach (img[y, c]) img[y][c] = $urandom_range(255) - 128 + ((t % 2) ? 0 : (y * 7) % 300 - 150);
      for (int c = 0; c < COLS; c++) begin
        int cv[];
        cv = new[H];
        for (int y = 0; y < H; y++) cv[y] = img[y][c];
        lift53(cv, lo[c], hi[c]);
      end
      for (int st = 0; st < NS; st++)
        for (int c = 0; c < COLS; c++) begin
          @(negedge clk);
          for (int i = 0; i < 8; i++) x[i] = 16'(img[8*st+i][c]);
          x[8] = (st < NS - 1) ? 16'(img[8*st+8][c]) : 16'(12345);   // ignored at the bottom
          col = 4'(c); top = (st == 0); bot = (st == NS - 1); en = 1;
          #1;
          for (int i = 0; i < 4; i++) begin
            checks += 2;
            if (int'($signed(s[i])) != lo[c][4*st+i]) failures++;
            if (int'($signed(d[i])) != hi[c][4*st+i]) failures++;
          end
          @(posedge clk);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
