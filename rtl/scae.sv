// scae: skipped-window accounting of the CS-AEBC.
//
// Every context window removed by group-of-zero skipping (whole packages) or
// by zero skipping (single CWs inside a kept package) is counted against its
// code stream (code-block, bit-plane), so that the number of skipped windows
// of every stream is known when the code-blocks end.  Per cycle it takes the
// dropped-package mask of one column from GoZS (a package of group g covers
// planes 3g..3g+2) and one skip event from each of the three ZS lanes.
// `clear` (end of the code-blocks, after the counts were read) restarts all
// counters.  Counts are visible on `count` one cycle after the event.
// The encoder described feeds these skips to a single-context arithmetic
// coder; this block provides the counts only.
module scae
  import jp2k_pkg::*;
#(
  parameter int unsigned CW_CNT_W = 12     // counter width per stream
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 clear,
  input  logic                                 drop_valid,
  input  logic [NBLK*NGRP*2-1:0]               drop_mask,
  input  logic [NLANE-1:0]                     skip_valid,
  input  logic [NLANE-1:0][1:0]                skip_blk,
  input  logic [NLANE-1:0][3:0]                skip_plane,
  output logic [NBLK-1:0][NBP-1:0][CW_CNT_W-1:0] count
);
  // windows skipped this cycle, per stream
  logic [NBLK-1:0][NBP-1:0][CW_CNT_W-1:0] inc;
  always_comb begin
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < NBP; k++) begin
        inc[b][k] = '0;
        if (drop_valid)
          for (int hf = 0; hf < 2; hf++)
            inc[b][k] = inc[b][k] + CW_CNT_W'(drop_mask[b*NGRP*2 + (k/NLANE)*2 + hf]);
        for (int j = 0; j < NLANE; j++)
          if (skip_valid[j] && skip_blk[j] == 2'(b) && skip_plane[j] == 4'(k))
            inc[b][k] = inc[b][k] + 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else begin
      for (int b = 0; b < NBLK; b++)
        for (int k = 0; k < NBP; k++) begin
          count[b][k] <= count[b][k] + inc[b][k];
        end
    end
  end

endmodule
