// dwt53_vert: vertical 1-D 5/3 lifting DWT of one 8-row stripe column.
//
// The code-block based DWT reads the tile column by column, 8 pixels of a
// column at a time, plus the first pixel of the same column in the next
// stripe (the "annexed" pixel).  With x0..x7 the stripe pixels and x8 the
// annexed one, the reversible 5/3 lifting steps are
//   d[i] = x[2i+1] - floor((x[2i] + x[2i+2]) / 2)        i = 0..3
//   s[i] = x[2i]   + floor((d[i-1] + d[i] + 2) / 4)
// d[-1] is the last high-pass value of the same column in the previous stripe,
// kept in a line buffer with one entry per tile column.  At the top edge of the
// tile d[-1] = d[0] and at the bottom edge x8 = x6 (symmetric extension).
// The outputs are combinational; the line buffer entry of column `col` is
// written with d[3] on the clock edge when `en` is high.
// The lifting steps are the JPEG2000 reversible filter; the annex/line-buffer
// organisation follows the stripe scan of the encoder, and the widths and the
// edge handling inside this module are this design's choices.
module dwt53_vert #(
  parameter int unsigned DW   = 16,   // sample width (two's complement)
  parameter int unsigned COLS = 128   // tile width = line-buffer entries
) (
  input  logic                         clk,
  input  logic                         en,     // column accepted
  input  logic [$clog2(COLS)-1:0]      col,    // column index in the tile
  input  logic                         top,    // first stripe of the tile
  input  logic                         bot,    // last stripe of the tile
  input  logic signed [8:0][DW-1:0]    x,      // x[0..7] stripe, x[8] annexed
  output logic signed [3:0][DW-1:0]    s,      // low-pass rows
  output logic signed [3:0][DW-1:0]    d       // high-pass rows
);
  logic signed [DW-1:0] lbuf [COLS];
  logic signed [DW-1:0] xs [9];     // element selects of a packed array are unsigned
  logic signed [DW-1:0] ds [4];
  logic signed [DW-1:0] dm1, dp;

  always_comb begin
    for (int i = 0; i < 9; i++) xs[i] = $signed(x[i]);
    if (bot) xs[8] = xs[6];
    for (int i = 0; i < 4; i++) begin
      ds[i] = xs[2*i+1] - ((xs[2*i] + xs[2*i+2]) >>> 1);
      d[i]  = ds[i];
    end
    dm1 = top ? ds[0] : lbuf[col];
    dp  = dm1;
    for (int i = 0; i < 4; i++) begin
      dp   = (i == 0) ? dm1 : ds[i-1];
      s[i] = xs[2*i] + ((dp + ds[i] + DW'(2)) >>> 2);
    end
  end

  always_ff @(posedge clk)
    if (en) lbuf[col] <= d[3];

endmodule
