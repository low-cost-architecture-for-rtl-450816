// tscf: two-sample context formation.
//
// Takes one context window (two samples of one bit-plane with their
// neighbourhood counts) and produces, for each sample, the coding pass and the
// context/decision pairs of that pass:
//   * significant before this plane: magnitude refinement (pass MRP),
//     context 16 if already refined, else 15 with significant neighbours,
//     else 14; decision = magnitude bit;
//   * insignificant with a significant neighbour: significance propagation
//     (pass SPP), zero-coding context from the neighbour counts;
//   * otherwise: cleanup (pass CUP), zero coding.
// A sample that becomes significant (bit 1 in SPP or CUP) is followed by a
// sign-coding pair (contexts 9..13, decision = sign XOR predicted sign).
// The zero-coding tables depend on the sub-band (LL/LH, HL, HH) and are the
// JPEG2000 tables; so are the sign and refinement contexts.  Up to four pairs
// leave per CW, slot order = coding order: sample 0 (ZC/MR, SC), sample 1.
// Pass classification uses the significance of the neighbours in the higher
// bit-planes only, which is what lets every bit-plane be coded concurrently;
// the run-length mode of the cleanup pass is not used.  Purely combinational.
module tscf
  import jp2k_pkg::*;
(
  input  logic            in_valid,
  input  cw_t             in_cw,
  output logic [3:0]      out_valid,
  output pcxd_t [3:0]     out_pair
);
  function automatic logic [4:0] zc_ctx(input logic [1:0] sb, input logic [1:0] h0,
                                        input logic [1:0] v0, input logic [2:0] d);
    logic [1:0] h, v;
    logic [2:0] hv;
    if (sb == SB_HL) begin h = v0; v = h0; end else begin h = h0; v = v0; end
    if (sb == SB_HH) begin
      hv = 3'(h) + 3'(v);
      if (d >= 3)      return 5'd8;
      else if (d == 2) return (hv >= 1) ? 5'd7 : 5'd6;
      else if (d == 1) return (hv >= 2) ? 5'd5 : (hv == 1) ? 5'd4 : 5'd3;
      else             return (hv >= 2) ? 5'd2 : (hv == 1) ? 5'd1 : 5'd0;
    end
    if (h == 2)      return 5'd8;
    else if (h == 1) return (v >= 1) ? 5'd7 : (d >= 1) ? 5'd6 : 5'd5;
    else if (v == 2) return 5'd4;
    else if (v == 1) return 5'd3;
    else             return (d >= 2) ? 5'd2 : (d == 1) ? 5'd1 : 5'd0;
  endfunction

  // returns {xor bit, context}
  function automatic logic [5:0] sc_ctx(input logic [1:0] hc, input logic [1:0] vc);
    case ({hc, vc})
      4'b0101: return {1'b0, 5'd13};
      4'b0100: return {1'b0, 5'd12};
      4'b0111: return {1'b0, 5'd11};
      4'b0001: return {1'b0, 5'd10};
      4'b0000: return {1'b0, 5'd9};
      4'b0011: return {1'b1, 5'd10};
      4'b1101: return {1'b1, 5'd11};
      4'b1100: return {1'b1, 5'd12};
      default: return {1'b1, 5'd13};   // hc = -1, vc = -1
    endcase
  endfunction

  always_comb begin
    cw_smp_t x;
    logic anyn;
    logic [5:0] sc;
    x    = '0;
    anyn = 1'b0;
    sc   = '0;
    out_valid = '0;
    out_pair  = '0;
    for (int i = 0; i < 4; i++) begin
      out_pair[i].blk   = in_cw.blk;
      out_pair[i].plane = in_cw.plane;
    end
    if (in_valid && in_cw.flush) begin
      out_valid[0]       = 1'b1;
      out_pair[0].flush  = 1'b1;
    end else if (in_valid) begin
      for (int s = 0; s < 2; s++) begin
        x    = (s == 0) ? in_cw.s0 : in_cw.s1;
        anyn = (x.nh != 0) || (x.nv != 0) || (x.nd != 0);
        sc   = sc_ctx(x.hc, x.vc);
        out_valid[2*s] = 1'b1;
        out_pair[2*s].d = x.vp;
        if (x.sig) begin
          out_pair[2*s].pass = P_MRP;
          out_pair[2*s].cx   = x.refd ? 5'd16 : (anyn ? 5'd15 : 5'd14);
        end else begin
          out_pair[2*s].pass = anyn ? P_SPP : P_CUP;
          out_pair[2*s].cx   = zc_ctx(in_cw.blk, x.nh, x.nv, x.nd);
          if (x.vp) begin
            out_valid[2*s+1]     = 1'b1;
            out_pair[2*s+1].pass = out_pair[2*s].pass;
            out_pair[2*s+1].cx   = sc[4:0];
            out_pair[2*s+1].d    = x.sign ^ sc[5];
          end
        end
      end
    end
  end

endmodule
