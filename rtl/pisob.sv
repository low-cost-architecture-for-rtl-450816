// pisob: parallel-in serial-out buffer between a context-formation circuit
// and its pass-switching arithmetic encoder.
//
// A TSCF delivers up to four pass/context/decision pairs at once; the encoder
// takes one pair per cycle.  The buffer holds one group of four slots with a
// valid mask and releases the lowest-numbered valid slot each cycle, so the
// coding order inside a CW is kept.  A new group is taken when the buffer is
// empty or its last pair leaves in the same cycle, so a full group of four
// pairs moves at one pair per cycle without bubbles.
// Interface: valid/ready in (group) and out (pair).  The single-group depth is
// this design's choice.
module pisob
  import jp2k_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [3:0]  in_mask,
  input  pcxd_t [3:0] in_pair,
  output logic        out_valid,
  input  logic        out_ready,
  output pcxd_t       out_pair
);
  logic [3:0]  mask;
  pcxd_t [3:0] buf_q;
  logic [1:0]  head;
  logic [3:0]  rest;

  always_comb begin
    head = 2'd0;
    for (int i = 3; i >= 0; i--) if (mask[i]) head = 2'(i);
    rest = mask;
    rest[head] = 1'b0;
  end

  assign out_valid = (mask != '0);
  assign out_pair  = buf_q[head];
  assign in_ready  = (mask == '0) || (out_ready && rest == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0; buf_q <= '0;
    end else begin
      if (out_valid && out_ready) mask <= rest;
      if (in_valid && in_ready) begin
        mask  <= in_mask;
        buf_q <= in_pair;
      end
    end
  end

endmodule
