// dwt53_horz: horizontal 1-D 5/3 lifting DWT of eight rows in parallel.
//
// After the vertical step every tile column delivers four low-pass and four
// high-pass rows; the horizontal transform runs along each of these eight rows
// at the same time, so it keeps one register set per row: the last even
// sample y[2n], the last odd sample y[2n+1] and the previous high-pass value
// d[n-1].  When the even column 2n+2 arrives, the pair
//   d[n] = y[2n+1] - floor((y[2n] + y[2n+2]) / 2)
//   s[n] = y[2n]   + floor((d[n-1] + d[n] + 2) / 4)
// is produced for all eight rows; at the last (odd) column the right edge is
// mirrored (y[W] = y[W-2]) and the final pair is produced at once.  At the left
// edge d[-1] = d[0].  A tile row of W samples thus yields W/2 output pairs, one
// output per two input columns, registered (out_valid for one accepted cycle
// of `out_ready`).  The sub-band switch is folded in: rows 0-3 give LL (s) and
// HL (d), rows 4-7 give LH (s) and HH (d).
// Interface: `en` accepts column y with `first`/`last` marking tile columns 0
// and W-1 (W even); `en` must only be raised when the output register is free
// or being read (out_ready).
module dwt53_horz #(
  parameter int unsigned DW = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      first,
  input  logic                      last,
  input  logic signed [7:0][DW-1:0] y,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic signed [3:0][DW-1:0] ll, hl, lh, hh
);
  logic signed [7:0][DW-1:0] ye, yo, dprev;
  logic                      odd;     // next column is odd
  logic                      has_d;   // d[n-1] exists
  logic signed [7:0][DW-1:0] dn, sn;
  logic                      produce;
  logic signed [DW-1:0]      yev, yodd, ynext, dp, dnr;

  always_comb begin
    yev = '0; yodd = '0; ynext = '0; dp = '0; dnr = '0;
    for (int r = 0; r < 8; r++) begin
      // element selects of a packed array are unsigned: work on signed locals
      yev    = $signed(ye[r]);
      yodd   = odd ? $signed(y[r]) : $signed(yo[r]);   // at the last column y is the odd sample
      ynext  = odd ? $signed(ye[r]) : $signed(y[r]);   // mirrored right edge
      dnr    = yodd - ((yev + ynext) >>> 1);
      dp     = has_d ? $signed(dprev[r]) : dnr;
      dn[r]  = dnr;
      sn[r]  = yev + ((dp + dnr + DW'(2)) >>> 2);
    end
    produce = en && ((!odd && !first) || (odd && last));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd <= 1'b0; has_d <= 1'b0; out_valid <= 1'b0;
      ye <= '0; yo <= '0; dprev <= '0;
      ll <= '0; hl <= '0; lh <= '0; hh <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (en) begin
        if (first) begin
          ye <= y; odd <= 1'b1; has_d <= 1'b0;
        end else if (odd) begin
          yo <= y; odd <= 1'b0;
          if (last) has_d <= 1'b0;
        end else begin
          ye <= y; dprev <= dn; has_d <= 1'b1; odd <= 1'b1;
        end
      end
      if (produce) begin
        out_valid <= 1'b1;
        for (int r = 0; r < 4; r++) begin
          ll[r] <= sn[r];   hl[r] <= dn[r];
          lh[r] <= sn[r+4]; hh[r] <= dn[r+4];
        end
      end
    end
  end

endmodule
