// zs_lane: zero-skipping (ZS) queue of one context-formation lane.
//
// GoZS hands over whole packages (three CWs, one per lane); inside a package
// that survived GoZS there can still be insignificant CWs.  Each lane keeps
// a small FIFO into which only significant CWs are written, so when the lane
// is read out an insignificant CW is simply replaced by the next significant
// CW of a following package; a lane accepts a new package whenever its FIFO
// has room.  Skipped CWs are reported (skip_valid with code-block and plane)
// so that they can be accounted for.
// Interface: in_* is a valid/ready pair shared with the other lanes (the
// package moves only when every lane is ready), out_* a valid/ready FIFO
// head.  A CW written is readable in the next cycle.  The FIFO depth is this
// design's choice.
module zs_lane
  import jp2k_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,     // package transferred this cycle
  output logic       in_ready,
  input  logic       in_present,   // this lane holds a CW in the package
  input  logic       in_sig,       // the CW is significant
  input  cw_t        in_cw,
  output logic       out_valid,
  input  logic       out_ready,
  output cw_t        out_cw,
  output logic       skip_valid,
  output logic [1:0] skip_blk,
  output logic [3:0] skip_plane
);
  cw_t mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] rd, wr;
  logic [$clog2(DEPTH):0]   cnt;
  logic push, pop;

  assign in_ready   = (cnt < ($clog2(DEPTH)+1)'(DEPTH));
  assign push       = in_valid && in_present && in_sig;
  assign pop        = out_valid && out_ready;
  assign out_valid  = (cnt != '0);
  assign out_cw     = mem[rd];
  assign skip_valid = in_valid && in_present && !in_sig;
  assign skip_blk   = in_cw.blk;
  assign skip_plane = in_cw.plane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0;
    end else begin
      if (push) wr <= wr + 1'b1;
      if (pop)  rd <= rd + 1'b1;
      cnt <= cnt + ($clog2(DEPTH)+1)'(push) - ($clog2(DEPTH)+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wr] <= in_cw;

  // a package is only offered when the lane has room
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready);

endmodule
