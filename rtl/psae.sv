// psae: pass-switching MQ arithmetic encoder with its register bank (one
// lane of the folding arithmetic encoder).
//
// The lane serves a fixed set of bit-planes (plane mod 3 = LANE) of all four
// code-blocks, i.e. NBLK x NGRP code streams.  The register bank keeps, for
// every stream, the coder registers (A, C, CT, the held byte B) and the
// probability states (6-bit index + MPS) of 3 passes x 19 contexts, so one
// encoder core is shared ("folded") over all the streams of the lane: each
// pair reads the state of its stream, is encoded in one cycle (encoding,
// renormalisation and byte-out, up to two code bytes released) and the state
// is written back.  The three passes of a bit-plane share one code stream but
// each has its own context states (pass switching).  A flush pair terminates
// every stream of the lane that has coded something, one stream per cycle
// (MQ flush, up to three bytes), and resets the bank for the next
// code-blocks.
// Interface: in_* valid/ready (ready is low while flushing); out_n code bytes
// of stream (out_blk, out_plane) in out_byte[0..out_n-1] per cycle, out_eos
// marks the flush cycle of a stream, done pulses when a flush is complete.
// The MQ coder is the JPEG2000 one; the state layout and the one-symbol-per-
// cycle core are this design's.
module psae
  import jp2k_pkg::*;
#(
  parameter int unsigned LANE = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  pcxd_t           in_pair,
  output logic [2:0]      out_n,
  output logic [2:0][7:0] out_byte,
  output logic [1:0]      out_blk,
  output logic [3:0]      out_plane,
  output logic            out_eos,
  output logic            done
);
  localparam int unsigned NS = NBLK * NGRP;

  mq_reg_t    rb_reg  [NS];
  logic       rb_used [NS];
  logic [5:0] rb_idx  [NS][NPASS][NCTX];
  logic       rb_mps  [NS][NPASS][NCTX];

  logic                   flushing;
  logic [$clog2(NS)-1:0]  fs;
  logic [$clog2(NS)-1:0]  slot;

  assign in_ready = !flushing;
  assign slot     = $clog2(NS)'(int'(in_pair.blk) * NGRP + int'(in_pair.plane) / NLANE);

  // combinational encoder core
  mq_step_t   st;
  mq_reg_t    nr;
  logic [5:0] nidx;
  logic       nmps;
  mq_out_t    o;
  logic       enc, fl;
  logic [1:0] fblk;
  logic [3:0] fplane;

  always_comb begin
    enc    = in_valid && !flushing && !in_pair.flush;
    fl     = flushing && rb_used[fs];
    fblk   = 2'(int'(fs) / NGRP);
    fplane = 4'((int'(fs) % NGRP) * NLANE + LANE);
    if (flushing) st = mq_flush(rb_reg[fs]);
    else          st = mq_encode(rb_reg[slot], rb_idx[slot][in_pair.pass][in_pair.cx],
                                 rb_mps[slot][in_pair.pass][in_pair.cx], in_pair.d);
    nr   = st.r;
    nidx = st.idx;
    nmps = st.mps;
    o    = st.o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flushing <= 1'b0; fs <= '0; done <= 1'b0;
      out_n <= '0; out_byte <= '0; out_blk <= '0; out_plane <= '0; out_eos <= 1'b0;
      for (int s = 0; s < NS; s++) begin
        rb_reg[s]  <= MQ_RESET;
        rb_used[s] <= 1'b0;
        for (int p = 0; p < NPASS; p++)
          for (int c = 0; c < NCTX; c++) begin
            rb_idx[s][p][c] <= mq_init_index(5'(c));
            rb_mps[s][p][c] <= 1'b0;
          end
      end
    end else begin
      done    <= 1'b0;
      out_n   <= '0;
      out_eos <= 1'b0;
      if (enc) begin
        rb_reg[slot]  <= nr;
        rb_used[slot] <= 1'b1;
        rb_idx[slot][in_pair.pass][in_pair.cx] <= nidx;
        rb_mps[slot][in_pair.pass][in_pair.cx] <= nmps;
        out_n     <= o.n;
        out_byte  <= o.byt;
        out_blk   <= in_pair.blk;
        out_plane <= in_pair.plane;
      end else if (in_valid && !flushing && in_pair.flush) begin
        flushing <= 1'b1;
        fs       <= '0;
      end else if (flushing) begin
        if (fl) begin
          out_n     <= o.n;
          out_byte  <= o.byt;
          out_blk   <= fblk;
          out_plane <= fplane;
          out_eos   <= 1'b1;
        end
        rb_reg[fs]  <= MQ_RESET;
        rb_used[fs] <= 1'b0;
        for (int p = 0; p < NPASS; p++)
          for (int c = 0; c < NCTX; c++) begin
            rb_idx[fs][p][c] <= mq_init_index(5'(c));
            rb_mps[fs][p][c] <= 1'b0;
          end
        if (fs == $clog2(NS)'(NS - 1)) begin
          flushing <= 1'b0;
          done     <= 1'b1;
        end else begin
          fs <= fs + 1'b1;
        end
      end
    end
  end

endmodule
