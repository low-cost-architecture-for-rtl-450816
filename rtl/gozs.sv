// gozs: coefficient merging, boundary handling, context-window formation and
// group-of-zero skipping (GoZS) of the CS-AEBC.
//
// Input: one stripe column (4 samples) of each of the four sub-band
// code-blocks per accepted cycle, in the scan order of the DWT.  The module
// keeps a three-column window (left, centre, right) and a stripe line buffer
// holding, per code-block column, the MSB position and sign of the bottom
// sample of the previous stripe; from the MSB position the significance of
// that sample at every bit-plane follows (significance only grows towards the
// LSB).  Samples outside the code-block (left/right edges, above the first
// stripe, below the current stripe) count as insignificant: that is the
// boundary handling.  When the right neighbour column has arrived, the centre
// column is cut into context windows (CW): two vertically adjacent samples of
// one bit-plane of one code-block, with the significance counts and sign
// contributions of their neighbours computed from the higher bit-planes.
// Three CWs of consecutive bit-planes (3g, 3g+1, 3g+2) of the same code-block
// and column half form a package, the unit the three context-formation
// circuits take at once.  A CW is insignificant when both samples are
// insignificant, have no significant neighbour and a 0 bit in that plane, or
// when the dynamic RDO has marked the plane as truncated; a package whose CWs
// are all insignificant is dropped, the others are sent one per cycle to the
// three zero-skipping lanes (lane j receives the CW of plane 3g+j).  After
// the last column of the code-blocks a flush package closes every lane.
// Side outputs report, per column, the dropped packages (for the skip
// counter), the newly significant samples per plane (for the RDO) and the end
// of every stripe.
// The merging/GoZS/ZS structure follows the encoder described; the CW size,
// the package composition and the handshake are this design's reading of it.
module gozs
  import jp2k_pkg::*;
#(
  parameter int unsigned CBW = 64    // code-block width (the height is set by the source)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // column input
  input  logic                                in_valid,
  output logic                                in_ready,
  input  coef_t [NBLK-1:0][STRIPE-1:0]        in_coef,
  input  logic [$clog2(CBW)-1:0]              in_col,
  input  logic                                in_first_stripe,
  input  logic                                in_eob,        // last column of the code-blocks
  // truncated planes from the dynamic RDO
  input  logic [NBLK-1:0][NBP-1:0]            kill,
  // package output to the three ZS lanes
  output logic                                pkg_valid,
  input  logic                                pkg_ready,
  output cw_t  [NLANE-1:0]                    pkg_cw,
  output logic [NLANE-1:0]                    pkg_lane_valid, // CW present (plane exists)
  output logic [NLANE-1:0]                    pkg_lane_sig,   // CW significant
  // statistics
  output logic                                drop_valid,
  output logic [NBLK*NGRP*2-1:0]              drop_mask,      // dropped packages of the column
  output logic                                col_done,
  output logic [NBLK-1:0][NBP-1:0][2:0]       col_newsig,     // newly significant samples
  output logic                                stripe_done,
  output logic                                eob_done
);
  localparam int unsigned NPKG = NBLK * NGRP * 2;

  typedef enum logic [1:0] {S_IN, S_GEN, S_FLUSH} state_e;
  state_e state;

  coef_t [NBLK-1:0][STRIPE-1:0] wl, wc, wr;     // window columns
  logic [$clog2(CBW)-1:0]       ccol;           // column index of wc
  logic                         cfirst;         // wc belongs to the first stripe
  logic                         clast;          // wc is the last column of the stripe
  logic                         ceob;
  logic                         last_phase;     // generating the last column (wr empty)
  logic [NPKG-1:0]              pend;
  logic                         gen_start;

  // stripe line buffer: MSB position (0 = zero) and sign of the bottom sample
  logic [3:0] lb_nb [NBLK][CBW];
  logic       lb_sg [NBLK][CBW];
  logic [NBLK-1:0][3:0] upl_nb;                 // old entry of column ccol-1
  logic [NBLK-1:0]      upl_sg;

  function automatic logic [3:0] nbits(input logic [MAGW-1:0] m);
    logic [3:0] n;
    n = 4'd0;
    for (int i = 0; i < MAGW; i++) if (m[i]) n = 4'(i + 1);
    return n;
  endfunction

  // ---------------- context windows of the centre column ----------------
  logic [NBLK-1:0][5:0][2:0][3:0] gnb;   // neighbourhood MSB positions [row+1][L,C,R]
  logic [NBLK-1:0][5:0][2:0]      gsg;   // neighbourhood signs
  cw_smp_t [NBLK-1:0][NBP-1:0][STRIPE-1:0] smp;
  logic    [NBLK-1:0][NBP-1:0][1:0]        cwsig;   // per half
  logic    [NPKG-1:0]                      pkg_sig;
  logic    [NPKG-1:0]                      sel;     // one-hot package chosen this cycle
  logic    [$clog2(NPKG)-1:0]              sel_idx;
  logic                                    sel_any;

  always_comb begin
    logic [2:0][2:0] sg;   // significance [dr][dc] around a sample
    logic signed [31:0] h, v, dd, hs, vs;   // 4-state: no power-up value
    logic z0, z1;
    logic signed [31:0] pb, pg, ph;
    sg = '0; h = 0; v = 0; dd = 0; hs = 0; vs = 0; z0 = 0; z1 = 0; pb = 0; pg = 0; ph = 0;
    for (int b = 0; b < NBLK; b++) begin
      // row -1: stripe line buffer (nothing above the first stripe)
      gnb[b][0][0] = (cfirst || ccol == 0)                           ? 4'd0 : upl_nb[b];
      gsg[b][0][0] = upl_sg[b];
      gnb[b][0][1] = cfirst                                          ? 4'd0 : lb_nb[b][ccol];
      gsg[b][0][1] = lb_sg[b][ccol];
      gnb[b][0][2] = (cfirst || ccol == $clog2(CBW)'(CBW-1))         ? 4'd0 : lb_nb[b][ccol + 1'b1];
      gsg[b][0][2] = (ccol == $clog2(CBW)'(CBW-1)) ? 1'b0 : lb_sg[b][ccol + 1'b1];
      for (int r = 0; r < STRIPE; r++) begin
        gnb[b][r+1][0] = nbits(wl[b][r].mag); gsg[b][r+1][0] = wl[b][r].sign;
        gnb[b][r+1][1] = nbits(wc[b][r].mag); gsg[b][r+1][1] = wc[b][r].sign;
        gnb[b][r+1][2] = last_phase ? 4'd0 : nbits(wr[b][r].mag);
        gsg[b][r+1][2] = wr[b][r].sign;
      end
      // row 4: next stripe, not yet seen (vertically causal)
      for (int c = 0; c < 3; c++) begin gnb[b][5][c] = 4'd0; gsg[b][5][c] = 1'b0; end
    end

    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < NBP; k++) begin
        for (int r = 0; r < STRIPE; r++) begin
          for (int dr = 0; dr < 3; dr++)
            for (int dc = 0; dc < 3; dc++)
              sg[dr][dc] = (gnb[b][r+dr][dc] > 4'(k + 1));
          h  = int'(sg[1][0]) + int'(sg[1][2]);
          v  = int'(sg[0][1]) + int'(sg[2][1]);
          dd = int'(sg[0][0]) + int'(sg[0][2]) + int'(sg[2][0]) + int'(sg[2][2]);
          hs = (sg[1][0] ? (gsg[b][r+1][0] ? -1 : 1) : 0) + (sg[1][2] ? (gsg[b][r+1][2] ? -1 : 1) : 0);
          vs = (sg[0][1] ? (gsg[b][r][1]   ? -1 : 1) : 0) + (sg[2][1] ? (gsg[b][r+2][1] ? -1 : 1) : 0);
          smp[b][k][r].vp   = wc[b][r].mag[k];
          smp[b][k][r].sig  = (gnb[b][r+1][1] > 4'(k + 1));
          smp[b][k][r].refd = (gnb[b][r+1][1] > 4'(k + 2));
          smp[b][k][r].sign = wc[b][r].sign;
          smp[b][k][r].nh   = 2'(h);
          smp[b][k][r].nv   = 2'(v);
          smp[b][k][r].nd   = 3'(dd);
          smp[b][k][r].hc   = (hs > 0) ? 2'b01 : (hs < 0) ? 2'b11 : 2'b00;
          smp[b][k][r].vc   = (vs > 0) ? 2'b01 : (vs < 0) ? 2'b11 : 2'b00;
        end
        for (int hf = 0; hf < 2; hf++) begin
          z0 = !smp[b][k][2*hf].vp && !smp[b][k][2*hf].sig && smp[b][k][2*hf].nh == 0 &&
               smp[b][k][2*hf].nv == 0 && smp[b][k][2*hf].nd == 0;
          z1 = !smp[b][k][2*hf+1].vp && !smp[b][k][2*hf+1].sig && smp[b][k][2*hf+1].nh == 0 &&
               smp[b][k][2*hf+1].nv == 0 && smp[b][k][2*hf+1].nd == 0;
          cwsig[b][k][hf] = !(z0 && z1) && !kill[b][k];
        end
      end

    // package p = {blk, group, half}
    for (int p = 0; p < NPKG; p++) begin
      pb = p / (NGRP * 2);
      pg = (p / 2) % NGRP;
      ph = p % 2;
      pkg_sig[p] = 1'b0;
      for (int j = 0; j < NLANE; j++)
        if (pg * NLANE + j < NBP) pkg_sig[p] = pkg_sig[p] | cwsig[pb][pg*NLANE+j][ph];
    end

    sel     = '0;
    sel_idx = '0;
    sel_any = 1'b0;
    for (int p = NPKG - 1; p >= 0; p--)
      if (pend[p] && pkg_sig[p]) begin sel_idx = $clog2(NPKG)'(p); sel_any = 1'b1; end
    if (sel_any) sel[sel_idx] = 1'b1;

    // package contents
    pkg_cw         = '0;
    pkg_lane_valid = '0;
    pkg_lane_sig   = '0;
    pb = int'(sel_idx) / (NGRP * 2);
    pg = (int'(sel_idx) / 2) % NGRP;
    ph = int'(sel_idx) % 2;
    for (int j = 0; j < NLANE; j++) begin
      pkg_cw[j].blk   = 2'(pb);
      pkg_cw[j].plane = 4'(pg * NLANE + j);
      if (pg * NLANE + j < NBP) begin
        pkg_cw[j].s0      = smp[pb][pg*NLANE+j][2*ph];
        pkg_cw[j].s1      = smp[pb][pg*NLANE+j][2*ph+1];
        pkg_lane_valid[j] = 1'b1;
        pkg_lane_sig[j]   = cwsig[pb][pg*NLANE+j][ph];
      end
    end
    pkg_valid = (state == S_GEN) && sel_any && !gen_start;
    if (state == S_FLUSH) begin
      pkg_valid = 1'b1;
      for (int j = 0; j < NLANE; j++) begin
        pkg_cw[j]         = '0;
        pkg_cw[j].flush   = 1'b1;
        pkg_lane_valid[j] = 1'b1;
        pkg_lane_sig[j]   = 1'b1;
      end
    end
  end

  assign in_ready   = (state == S_IN);
  assign drop_valid = gen_start;
  assign drop_mask  = gen_start ? ~pkg_sig : '0;

  always_comb begin
    logic [31:0] n;
    n = 0;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < NBP; k++) begin
        n = 0;
        for (int r = 0; r < STRIPE; r++)
          n += 32'(smp[b][k][r].vp && !smp[b][k][r].sig);
        col_newsig[b][k] = gen_start ? 3'(n) : 3'd0;
      end
  end

  logic gen_done;
  assign gen_done = (state == S_GEN) && !gen_start &&
                    (!sel_any || (pkg_ready && ((pend & pkg_sig & ~sel) == '0)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IN; wl <= '0; wc <= '0; wr <= '0; ccol <= '0; cfirst <= 1'b0;
      clast <= 1'b0; ceob <= 1'b0; last_phase <= 1'b0; pend <= '0; gen_start <= 1'b0;
      upl_nb <= '0; upl_sg <= '0;
      col_done <= 1'b0; stripe_done <= 1'b0; eob_done <= 1'b0;
    end else begin
      gen_start   <= 1'b0;
      col_done    <= 1'b0;
      stripe_done <= 1'b0;
      eob_done    <= 1'b0;
      case (state)
        S_IN: if (in_valid) begin
          if (in_col == '0) begin
            wl <= '0; wc <= in_coef; ccol <= '0; cfirst <= in_first_stripe;
            clast <= (CBW == 1); ceob <= in_eob;
          end else begin
            wr <= in_coef; clast <= (in_col == $clog2(CBW)'(CBW-1)); ceob <= in_eob;
            state <= S_GEN; pend <= '1; gen_start <= 1'b1; last_phase <= 1'b0;
          end
        end
        S_GEN: begin
          if (sel_any && pkg_ready && !gen_start) pend <= pend & ~sel;
          if (gen_done) begin
            // retire the centre column into the line buffer
            col_done <= 1'b1;
            for (int b = 0; b < NBLK; b++) begin
              upl_nb[b] <= lb_nb[b][ccol];
              upl_sg[b] <= lb_sg[b][ccol];
            end
            wl   <= wc;
            wc   <= wr;
            ccol <= ccol + 1'b1;
            if (clast && !last_phase) begin
              last_phase <= 1'b1; pend <= '1; gen_start <= 1'b1;
            end else if (last_phase) begin
              stripe_done <= 1'b1;
              last_phase  <= 1'b0;
              state       <= ceob ? S_FLUSH : S_IN;
            end else begin
              state <= S_IN;
            end
          end
        end
        default: if (pkg_ready) begin  // S_FLUSH
          state    <= S_IN;
          eob_done <= 1'b1;
        end
      endcase
    end
  end

  always_ff @(posedge clk)
    if (gen_done)
      for (int b = 0; b < NBLK; b++) begin
        lb_nb[b][ccol] <= nbits(wc[b][STRIPE-1].mag);
        lb_sg[b][ccol] <= wc[b][STRIPE-1].sign;
      end

endmodule
