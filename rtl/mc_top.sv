// mc_top: multi-standard (H.264, AVS, MPEG-1/2) luma motion compensation.
//
// Pipeline, one basic block (4x4 or 4x8 luma pixels, one prediction
// direction) per task and one reference row per clock:
//   cache_2d            2-D cache with the block-level pipeline CALC, JUDGE,
//                       REQUEST, NOPs, RECEIVE, OUT; it fetches missing AUs from
//                       external memory and delivers two AUs per row.
//   pel_shifter         aligns each row to x-2 and pads picture edges.
//   luma_interpolator   H.264 and AVS fractional luma samples (crb, cfir,
//                       fir6, fir4, qfir, fir2).
//   bilinear_interpolator  1/8-pel bilinear filter; MPEG-1/2 half-pel luma
//                       and the chroma of all three standards.
//   weighted_predictor  unified weighted prediction with the weight table and the BDPB.
// Both interpolators have two cycles of latency, so their outputs never
// collide and are simply merged. pred_* carries one 4-pixel predicted row per
// valid cycle, with the block's side information and row number; a
// bi-predicted block produces output only with its backward task.
//
// Inputs: picture size (width in AUs, height in rows), weight-table writes,
// prediction requests (valid/ready), and the external memory port (AU-Block
// requests, in-order read data of one AU per beat). The external memory
// controller is outside this design. Chroma blocks (4:2:0, Cb or Cr) use
// the same request format with the chroma flag set, plane coordinates and
// 1/8-pel MVs.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned IDX_X    = 2,
  parameter int unsigned IDX_Y    = 5,
  parameter int unsigned AQ_DEPTH = 8,
  parameter int unsigned TQ_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AUCOL_W-1:0]  pic_w_au,
  input  logic [ROW_W-1:0]    pic_h,
  input  logic                wt_we,
  input  logic [WT_IDX_W-1:0] wt_waddr,
  input  wt_entry_t           wt_wdata,
  input  logic                req_valid,
  output logic                req_ready,
  input  mc_req_t             req,
  output logic                mreq_valid,
  input  logic                mreq_ready,
  output au_block_t           mreq,
  input  logic                mresp_valid,
  input  logic [AU_W-1:0]     mresp_data,
  output logic                pred_valid,
  output logic [7:0]          pred_pix [4],
  output blk_info_t           pred_info,
  output logic [NROW_W-1:0]   pred_ridx,
  output logic                stat_conflict,
  output logic                stat_hit_au,
  output logic                stat_miss_au,
  output logic                stat_wait
);
  logic              c_valid;
  logic [127:0]      c_data;
  blk_info_t         c_info;
  logic [NROW_W-1:0] c_ridx;
  shift_ctl_t        c_shift;

  cache_2d #(.IDX_X(IDX_X), .IDX_Y(IDX_Y), .AQ_DEPTH(AQ_DEPTH), .TQ_DEPTH(TQ_DEPTH)) u_cache (
    .clk, .rst_n, .pic_w_au, .pic_h,
    .req_valid, .req_ready, .req,
    .mreq_valid, .mreq_ready, .mreq, .mresp_valid, .mresp_data,
    .row_valid(c_valid), .row_data(c_data), .row_info(c_info), .row_ridx(c_ridx),
    .row_shift(c_shift),
    .stat_conflict, .stat_hit_au, .stat_miss_au, .stat_wait
  );

  logic              s_valid;
  logic [7:0]        s_row [9];
  blk_info_t         s_info;
  logic [NROW_W-1:0] s_ridx;

  pel_shifter u_shift (
    .clk, .rst_n,
    .in_valid(c_valid), .in_data(c_data), .in_shift(c_shift), .in_info(c_info), .in_ridx(c_ridx),
    .out_valid(s_valid), .out_row(s_row), .out_info(s_info), .out_ridx(s_ridx)
  );

  logic              is_bil;
  logic              l_valid, b_valid;
  logic [7:0]        l_pix [4], b_pix [4];
  blk_info_t         l_info, b_info;
  logic [NROW_W-1:0] l_ridx, b_ridx;

  // bilinear path: MPEG-1/2 luma and all chroma
  assign is_bil = (s_info.std == STD_MPEG) || s_info.id.chroma;

  luma_interpolator u_luma (
    .clk, .rst_n,
    .in_valid(s_valid && !is_bil), .in_row(s_row), .in_info(s_info), .in_ridx(s_ridx),
    .out_valid(l_valid), .out_pix(l_pix), .out_info(l_info), .out_ridx(l_ridx)
  );

  bilinear_interpolator u_bil (
    .clk, .rst_n,
    .in_valid(s_valid && is_bil), .in_row(s_row),
    .in_dx(s_info.dx), .in_dy(s_info.dy),
    .in_info(s_info), .in_ridx(s_ridx),
    .out_valid(b_valid), .out_pix(b_pix), .out_info(b_info), .out_ridx(b_ridx)
  );

  logic              i_valid;
  logic [7:0]        i_pix [4];
  blk_info_t         i_info;
  logic [NROW_W-1:0] i_ridx;
  always_comb begin
    i_valid = l_valid || b_valid;
    i_pix   = b_valid ? b_pix  : l_pix;
    i_info  = b_valid ? b_info : l_info;
    i_ridx  = b_valid ? b_ridx : l_ridx;
  end

  weighted_predictor u_wp (
    .clk, .rst_n,
    .wt_we, .wt_waddr, .wt_wdata,
    .in_valid(i_valid), .in_pix(i_pix), .in_info(i_info), .in_ridx(i_ridx),
    .out_valid(pred_valid), .out_pix(pred_pix), .out_info(pred_info), .out_ridx(pred_ridx)
  );

  always_ff @(posedge clk) if (rst_n) begin
    assert (!(l_valid && b_valid)) else $error("mc_top: interpolator outputs collide");
  end
endmodule
