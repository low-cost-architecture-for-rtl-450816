// jp2k_encoder: low-cost JPEG2000 encoder core without code-block memory.
//
// One decomposition level of a tile is transformed and entropy coded in a
// single pass: the code-block based DWT (cb_dwt) reads the tile in 8-row
// stripes, column by column, and emits one stripe column of each of the four
// sub-bands LL, HL, LH, HH every two input columns; these are turned into
// sign-magnitude coefficients (unit quantisation step, magnitude saturated to
// 10 bits) and coded at once by the CS-AEBC (cs_aebc), whose skipping of
// insignificant context windows is steered by the dynamic RDO (drdo).  The
// LL column is also brought out (ll_*) to be written to the external sub-band
// memory, from which the next level is read in the same way; that memory and
// the pixel source are outside this core.
// Interface: pix_* valid/ready, 9 samples per column (8 stripe pixels and the
// annexed first pixel of the next stripe, level-shifted, two's complement).
// Code bytes leave per lane (plane mod 3) tagged with sub-band and bit-plane;
// trunc gives the truncation point (planes dropped) per sub-band; cb_done
// pulses when all code streams of the tile are flushed.  A TW x TH tile gives
// four (TW/2) x (TH/2) code-blocks.
module jp2k_encoder
  import jp2k_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int unsigned TW = 128,
  parameter int unsigned TH = 128
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // configuration
  input  logic                                 rdo_enable,
  input  logic [15:0]                          rdo_lambda,
  input  logic [7:0]                           rdo_prot,
  // pixels
  input  logic                                 pix_valid,
  output logic                                 pix_ready,
  input  logic signed [8:0][DW-1:0]            pix_col,
  // LL sub-band to the external sub-band memory
  output logic                                 ll_valid,
  output logic signed [3:0][DW-1:0]            ll_col,
  // code streams
  output logic [NLANE-1:0][2:0]                out_n,
  output logic [NLANE-1:0][2:0][7:0]           out_byte,
  output logic [NLANE-1:0][1:0]                out_blk,
  output logic [NLANE-1:0][3:0]                out_plane,
  output logic [NLANE-1:0]                     out_eos,
  output logic [NBLK-1:0][3:0]                 trunc,
  output logic [NBLK-1:0][NBP-1:0][11:0]       skip_count,
  output logic                                 cb_done,
  // mechanism activity
  output logic                                 ev_gozs_drop,
  output logic                                 ev_zs_skip,
  output logic                                 ev_stall,
  output logic                                 ev_truncate
);
  localparam int unsigned CBW = TW / 2;
  localparam int unsigned CBH = TH / 2;

  logic                      d_valid, d_ready;
  logic signed [3:0][DW-1:0] d_ll, d_hl, d_lh, d_hh;
  logic [$clog2(CBW)-1:0]    d_col;
  logic [$clog2(TH/8)-1:0]   d_stripe;
  logic                      d_last;
  coef_t [NBLK-1:0][STRIPE-1:0] coef;
  logic [NBLK-1:0][NBP-1:0]     kill;
  logic [NBLK-1:0][NBP-1:0][2:0] col_newsig;
  logic                      stripe_done, eob_done, eval_busy;

  cb_dwt #(.DW(DW), .TW(TW), .TH(TH)) u_dwt (
    .clk, .rst_n, .in_valid(pix_valid), .in_ready(pix_ready), .in_col(pix_col),
    .out_valid(d_valid), .out_ready(d_ready), .ll(d_ll), .hl(d_hl), .lh(d_lh), .hh(d_hh),
    .out_col(d_col), .out_stripe(d_stripe), .out_last(d_last));

  always_comb
    for (int r = 0; r < STRIPE; r++) begin
      coef[SB_LL][r] = to_coef(16'(d_ll[r]));
      coef[SB_HL][r] = to_coef(16'(d_hl[r]));
      coef[SB_LH][r] = to_coef(16'(d_lh[r]));
      coef[SB_HH][r] = to_coef(16'(d_hh[r]));
    end

  assign ll_valid = d_valid && d_ready;
  assign ll_col   = d_ll;

  cs_aebc #(.CBW(CBW)) u_ebc (
    .clk, .rst_n, .in_valid(d_valid), .in_ready(d_ready), .in_coef(coef),
    .in_col(d_col), .in_first_stripe(d_stripe == '0), .in_eob(d_last), .kill,
    .out_n, .out_byte, .out_blk, .out_plane, .out_eos, .col_newsig, .stripe_done,
    .eob_done, .skip_count, .done(cb_done), .ev_gozs_drop, .ev_zs_skip, .ev_stall);

  drdo #(.NSTR(CBH / STRIPE)) u_rdo (
    .clk, .rst_n, .enable(rdo_enable), .lambda(rdo_lambda), .prot(rdo_prot),
    .col_newsig, .stripe_done, .eob_done, .byte_n(out_n), .byte_blk(out_blk),
    .byte_plane(out_plane), .byte_eos(out_eos), .kill, .trunc, .eval_busy);

  assign ev_truncate = |kill;

endmodule
