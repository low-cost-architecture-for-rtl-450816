// cb_dwt: code-block based 2-D DWT encoder (one decomposition level).
//
// The tile is read in the stripe order of the entropy coder: for each stripe
// of 8 rows, the columns from left to right, 8 pixels of a column (plus the
// annexed first pixel of the next stripe) per accepted cycle.  The vertical
// 5/3 lifting (dwt53_vert, with its per-column line buffer) turns each column
// into 4 low and 4 high rows; the horizontal 5/3 lifting (dwt53_horz, 8
// register sets) then produces, for every two input columns, one 4-sample
// column of each of the four sub-bands LL, HL, LH and HH.  A 4-sample
// sub-band column is exactly one stripe column of a code-block, so the
// output order is the scan order of the CS-AEBC and no code-block memory is
// needed between the two.  LL is also what is written back to the external
// sub-band memory for the next decomposition level.
// Interface: valid/ready on both sides.  The module counts columns and
// stripes itself (TW x TH tile, TW even, TH a multiple of 8) and marks the
// output with its sub-band column index, stripe index and the last column of
// the tile.  Latency: one cycle from the accepted column that completes a
// sub-band column to out_valid.
// The scan order, the annexing and the vertical-then-horizontal split follow
// the encoder described; the handshake and counter layout are this design's.
module cb_dwt #(
  parameter int unsigned DW = 16,
  parameter int unsigned TW = 128,   // tile width in pixels
  parameter int unsigned TH = 128    // tile height in pixels
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [8:0][DW-1:0] in_col,     // 8 stripe pixels + annexed pixel
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic signed [3:0][DW-1:0] ll, hl, lh, hh,
  output logic [$clog2(TW/2)-1:0]   out_col,    // sub-band column
  output logic [$clog2(TH/8)-1:0]   out_stripe, // sub-band stripe (4 rows)
  output logic                      out_last    // last sub-band column of the tile
);
  localparam int unsigned NSTR = TH / 8;
  logic [$clog2(TW)-1:0]   col;
  logic [$clog2(NSTR)-1:0] stripe;
  logic                    acc;
  logic signed [3:0][DW-1:0] vs, vd;
  logic [$clog2(TW/2)-1:0]   ocol;

  assign in_ready = !out_valid || out_ready;
  assign acc      = in_valid && in_ready;

  dwt53_vert #(.DW(DW), .COLS(TW)) u_vert (
    .clk, .en(acc), .col, .top(stripe == '0), .bot(stripe == $clog2(NSTR)'(NSTR-1)),
    .x(in_col), .s(vs), .d(vd));

  dwt53_horz #(.DW(DW)) u_horz (
    .clk, .rst_n, .en(acc), .first(col == '0), .last(col == $clog2(TW)'(TW-1)),
    .y({vd, vs}), .out_valid, .out_ready, .ll, .hl, .lh, .hh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; stripe <= '0; ocol <= '0;
      out_col <= '0; out_stripe <= '0; out_last <= 1'b0;
    end else if (acc) begin
      if (col != '0) begin
        // an output column is produced on every even column > 0 and on the last
        if (!col[0] || col == $clog2(TW)'(TW-1)) begin
          out_col    <= ocol;
          out_stripe <= stripe;
          out_last   <= (col == $clog2(TW)'(TW-1)) && (stripe == $clog2(NSTR)'(NSTR-1));
          ocol       <= (col == $clog2(TW)'(TW-1)) ? '0 : ocol + 1'b1;
        end
      end
      if (col == $clog2(TW)'(TW-1)) begin
        col    <= '0;
        stripe <= (stripe == $clog2(NSTR)'(NSTR-1)) ? '0 : stripe + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
