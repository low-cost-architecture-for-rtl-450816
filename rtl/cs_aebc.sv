// cs_aebc: code-block switch adaptive embedded block coder.
//
// Codes the four sub-band code-blocks that one level of the code-block based
// DWT produces together, word by word, without a code-block memory:
//   GoZS    (gozs)     merges the four code-blocks column by column, forms the
//                      context windows and drops all-insignificant packages;
//   ZS      (zs_lane)  removes the remaining insignificant CWs per lane;
//   PCF     (tscf x 3) two-sample context formation, three bit-planes at once;
//   PISOB   (pisob x 3) serialises the pairs of each TSCF;
//   FAE     (psae x 3) pass-switching MQ encoders sharing their register bank
//                      over the code streams of their lane;
//   SCAE    (scae)     counts the skipped CWs of every code stream.
// Every (code-block, bit-plane) pair is its own MQ code stream; its bytes leave
// on the lane of the plane (plane mod 3) tagged with code-block and plane.
// Interface: column input valid/ready as gozs; per-lane byte outputs as psae;
// `kill` from the dynamic RDO; `done` pulses when all three lanes have
// flushed after the last column of the code-blocks.
module cs_aebc
  import jp2k_pkg::*;
#(
  parameter int unsigned CBW = 64     // code-block width
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  output logic                                 in_ready,
  input  coef_t [NBLK-1:0][STRIPE-1:0]         in_coef,
  input  logic [$clog2(CBW)-1:0]               in_col,
  input  logic                                 in_first_stripe,
  input  logic                                 in_eob,
  input  logic [NBLK-1:0][NBP-1:0]             kill,
  output logic [NLANE-1:0][2:0]                out_n,
  output logic [NLANE-1:0][2:0][7:0]           out_byte,
  output logic [NLANE-1:0][1:0]                out_blk,
  output logic [NLANE-1:0][3:0]                out_plane,
  output logic [NLANE-1:0]                     out_eos,
  output logic [NBLK-1:0][NBP-1:0][2:0]        col_newsig,
  output logic                                 stripe_done,
  output logic                                 eob_done,
  output logic [NBLK-1:0][NBP-1:0][11:0]       skip_count,
  output logic                                 done,
  // mechanism activity (for observation)
  output logic                                 ev_gozs_drop,
  output logic                                 ev_zs_skip,
  output logic                                 ev_stall
);
  logic              pkg_valid, pkg_ready;
  cw_t  [NLANE-1:0]  pkg_cw;
  logic [NLANE-1:0]  pkg_lane_valid, pkg_lane_sig, lane_ready;
  logic              drop_valid;
  logic [NBLK*NGRP*2-1:0] drop_mask;
  logic              col_done;
  logic [NLANE-1:0]  skip_valid;
  logic [NLANE-1:0][1:0] skip_blk;
  logic [NLANE-1:0][3:0] skip_plane;
  logic [NLANE-1:0]  lane_done, done_seen;

  gozs #(.CBW(CBW)) u_gozs (
    .clk, .rst_n, .in_valid, .in_ready, .in_coef, .in_col, .in_first_stripe, .in_eob,
    .kill, .pkg_valid, .pkg_ready, .pkg_cw, .pkg_lane_valid, .pkg_lane_sig,
    .drop_valid, .drop_mask, .col_done, .col_newsig, .stripe_done, .eob_done);

  assign pkg_ready = &lane_ready;

  for (genvar j = 0; j < NLANE; j++) begin : g_lane
    logic  zs_valid, zs_ready;
    cw_t   zs_cw;
    logic [3:0]  t_mask;
    pcxd_t [3:0] t_pair;
    logic  p_valid, p_ready;
    pcxd_t p_pair;

    zs_lane u_zs (
      .clk, .rst_n, .in_valid(pkg_valid && pkg_ready), .in_ready(lane_ready[j]),
      .in_present(pkg_lane_valid[j]), .in_sig(pkg_lane_sig[j]), .in_cw(pkg_cw[j]),
      .out_valid(zs_valid), .out_ready(zs_ready), .out_cw(zs_cw),
      .skip_valid(skip_valid[j]), .skip_blk(skip_blk[j]), .skip_plane(skip_plane[j]));

    tscf u_tscf (.in_valid(zs_valid), .in_cw(zs_cw), .out_valid(t_mask), .out_pair(t_pair));

    pisob u_pisob (
      .clk, .rst_n, .in_valid(zs_valid), .in_ready(zs_ready), .in_mask(t_mask),
      .in_pair(t_pair), .out_valid(p_valid), .out_ready(p_ready), .out_pair(p_pair));

    psae #(.LANE(j)) u_psae (
      .clk, .rst_n, .in_valid(p_valid), .in_ready(p_ready), .in_pair(p_pair),
      .out_n(out_n[j]), .out_byte(out_byte[j]), .out_blk(out_blk[j]),
      .out_plane(out_plane[j]), .out_eos(out_eos[j]), .done(lane_done[j]));
  end

  scae u_scae (
    .clk, .rst_n, .clear(done), .drop_valid, .drop_mask, .skip_valid, .skip_blk,
    .skip_plane, .count(skip_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_seen <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (&(done_seen | lane_done)) begin
        done      <= 1'b1;
        done_seen <= '0;
      end else begin
        done_seen <= done_seen | lane_done;
      end
    end
  end

  assign ev_gozs_drop = drop_valid && (drop_mask != '0);
  assign ev_zs_skip   = |skip_valid;
  assign ev_stall     = pkg_valid && !pkg_ready;

endmodule
