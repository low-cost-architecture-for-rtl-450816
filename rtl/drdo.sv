// drdo: dynamic rate-distortion optimisation (invalid bit-plane prediction
// and distortion estimation).
//
// All bit-planes are coded concurrently, so the rate and distortion of a
// bit-plane are only partly known while the code-blocks are still streaming.
// At the end of every stripe the RDO extrapolates, for each code-block b and
// bit-plane k, the slope
//     lambda_hat = (D_coded + D_uncoded) / (R_coded + R_uncoded)
// with D_coded = (newly significant samples of plane k) * 2^k,
//      D_uncoded = (remaining stripes) * 2^(K-k)   (K = significant planes seen),
//      R_coded   = code bytes of the plane so far,
//      R_uncoded = (remaining stripes) * (bytes per coded stripe) * p,
// p being the protection ratio (4 fractional bits).  The comparison with the
// target slope LAMBDA is done without division:
//     D_hat * sd * 16 < LAMBDA * R_coded * (16*sd + sl*p)      (sd/sl stripes done/left)
// A plane whose predicted slope falls below the target is invalid: it and all
// lower planes of that code-block are truncated (kill), so the CS-AEBC stops
// coding them for the rest of the code-blocks, and trunc[b] gives the number
// of truncated planes (the truncation point).  One (b,k) entry is evaluated
// per cycle, NBLK*NBP cycles after each stripe; evaluation starts after
// MIN_STRIPES stripes.  `enable` = 0 turns truncation off (lossless).
// The form of the estimate follows the encoder described; the D/R units, the
// stripe granularity and the division-free test are this design's.
module drdo
  import jp2k_pkg::*;
#(
  parameter int unsigned NSTR        = 16,  // stripes per code-block
  parameter int unsigned MIN_STRIPES = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            enable,
  input  logic [15:0]                     lambda,     // target slope
  input  logic [7:0]                      prot,       // protection ratio p, Q4
  input  logic [NBLK-1:0][NBP-1:0][2:0]   col_newsig,
  input  logic                            stripe_done,
  input  logic                            eob_done,
  input  logic [NLANE-1:0][2:0]           byte_n,
  input  logic [NLANE-1:0][1:0]           byte_blk,
  input  logic [NLANE-1:0][3:0]           byte_plane,
  input  logic [NLANE-1:0]                byte_eos,
  output logic [NBLK-1:0][NBP-1:0]        kill,
  output logic [NBLK-1:0][3:0]            trunc,
  output logic                            eval_busy
);
  localparam int unsigned NE = NBLK * NBP;

  logic [NBLK-1:0][NBP-1:0][15:0] dn;     // newly significant samples
  logic [NBLK-1:0][NBP-1:0][15:0] rc;     // code bytes
  logic [NBLK-1:0][3:0]           kb;     // K per code-block
  logic [7:0]                     sd;     // stripes done
  logic [$clog2(NE)-1:0]          e;

  logic [1:0]  eb;
  logic [3:0]  ek;
  logic [7:0]  sl;
  logic [63:0] dhat, lhs, rhs;
  logic        invalid;

  always_comb begin
    eb   = 2'(int'(e) / NBP);
    ek   = 4'(int'(e) % NBP);
    sl   = 8'(NSTR) - sd;
    dhat = (64'(dn[eb][ek]) << ek) +
           ((kb[eb] > ek) ? (64'(sl) << (kb[eb] - ek)) : 64'(sl));
    lhs  = dhat * 64'(sd) * 64'd16;
    rhs  = 64'(lambda) * 64'(rc[eb][ek]) * (64'(sd) * 64'd16 + 64'(sl) * 64'(prot));
    invalid = enable && eval_busy && !kill[eb][ek] && (rc[eb][ek] != 0) &&
              (sd >= 8'(MIN_STRIPES)) && (lhs < rhs);
  end

  // byte count of every stream after this cycle's code bytes
  logic [NBLK-1:0][NBP-1:0][15:0] rc_nxt;
  always_comb begin
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < NBP; k++) begin
        rc_nxt[b][k] = rc[b][k];
        for (int j = 0; j < NLANE; j++)
          if (!byte_eos[j] && byte_blk[j] == 2'(b) && byte_plane[j] == 4'(k))
            rc_nxt[b][k] = rc_nxt[b][k] + 16'(byte_n[j]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn <= '0; rc <= '0; kb <= '0; sd <= '0; e <= '0; eval_busy <= 1'b0;
      kill <= '0; trunc <= '0;
    end else if (eob_done) begin
      dn <= '0; rc <= '0; kb <= '0; sd <= '0; e <= '0; eval_busy <= 1'b0;
      kill <= '0; trunc <= '0;
    end else begin
      for (int b = 0; b < NBLK; b++)
        for (int k = 0; k < NBP; k++) begin
          rc[b][k] <= rc_nxt[b][k];
          dn[b][k] <= dn[b][k] + 16'(col_newsig[b][k]);
          if (col_newsig[b][k] != 0 && kb[b] < 4'(k + 1)) kb[b] <= 4'(k + 1);
        end
      if (stripe_done) begin
        sd        <= sd + 1'b1;
        e         <= '0;
        eval_busy <= 1'b1;
      end else if (eval_busy) begin
        if (invalid) begin
          for (int k = 0; k < NBP; k++)
            if (4'(k) <= ek) kill[eb][k] <= 1'b1;
          if (trunc[eb] < ek + 4'd1) trunc[eb] <= ek + 4'd1;
        end
        if (e == $clog2(NE)'(NE - 1)) eval_busy <= 1'b0;
        else                           e <= e + 1'b1;
      end
    end
  end

endmodule
