// task_generator: CALC stage of the 2-D cache pipeline.
//
// Turns one prediction request (block position, quarter-pel MV, standard,
// block type) into a cache task: the rows to be delivered to the
// interpolator and the window of AUs that must be present in the cache.
// Delivered rows: H.264/AVS with fy != 0 deliver rows Y-2 .. Y+h+2 (h+5),
// MPEG with fy != 0 delivers Y .. Y+h (h+1), otherwise Y .. Y+h-1. Every
// delivered row starts at x = X-2, where X, Y are the integer parts of the
// reference position. The fetched window is the smallest one the selected
// filter needs: H.264 4-wide, 9-wide with a fractional x; AVS 4, 7 (half) or
// 9 (quarter) wide, and the same in y; MPEG one extra column/row for a half
// pel. Window edges are clamped to the picture, so AUs outside it are never
// requested; the pel shifter and the row clamp of the output unit pad instead.
// Chroma requests (4:2:0) give the block position in chroma-plane pixels and
// the MV in 1/8 chroma pel; they fetch the bilinear window (one extra
// column/row for a fractional position) from a picture of half the luma width
// and height, and carry the 3-bit fractions dx, dy (MPEG-1/2 luma half pel is
// expressed the same way, dx = 4). Each accepted request gets the next task
// number. One register stage with a
// valid/ready handshake. That the reference size depends on the standard, the
// MV fraction and the block type follows the design description; the exact
// AVS window is this design's choice (see luma_interpolator).
module task_generator
  import mc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AUCOL_W-1:0]  pic_w_au,   // picture width in AUs
  input  logic [ROW_W-1:0]    pic_h,      // picture height in rows
  input  logic                req_valid,
  output logic                req_ready,
  input  mc_req_t             req,
  output logic                task_valid,
  input  logic                task_ready,
  output task_t               task_o
);
  logic [TNUM_W-1:0] num;
  task_t t;

  function automatic logic [AUCOL_W-1:0] clamp_au(input logic signed [COORD_W-1:0] px,
                                                 input logic [AUCOL_W-1:0] w_au);
    logic signed [COORD_W-1:0] a;
    a = px >>> 3;
    if (a < 0) return '0;
    if (a > COORD_W'($signed({1'b0, w_au})) - 1) return w_au - 1'b1;
    return a[AUCOL_W-1:0];
  endfunction

  function automatic logic [ROW_W-1:0] clamp_row(input logic signed [COORD_W-1:0] y,
                                                input logic [ROW_W-1:0] h);
    if (y < 0) return '0;
    if (y > COORD_W'($signed({1'b0, h})) - 1) return h - 1'b1;
    return y[ROW_W-1:0];
  endfunction

  always_comb begin
    logic signed [COORD_W-1:0] X, Y, fx0, fx1, fy0, fy1;
    logic [1:0] fx, fy;
    logic [2:0] dx, dy;
    logic [AUCOL_W-1:0] w_au;
    logic [ROW_W-1:0]   ph;
    int h;
    h  = req.blk4x8 ? 8 : 4;
    if (req.chroma) begin
      // chroma: MV in 1/8 chroma pel, picture halved in both directions
      X  = COORD_W'($signed({1'b0, req.blk_x})) + COORD_W'(req.mvx >>> 3);
      Y  = COORD_W'($signed({1'b0, req.blk_y})) + COORD_W'(req.mvy >>> 3);
      fx = 2'd0;
      fy = 2'd0;
      dx = req.mvx[2:0];
      dy = req.mvy[2:0];
      w_au = pic_w_au >> 1;
      ph   = pic_h >> 1;
    end else begin
      X  = COORD_W'($signed({1'b0, req.blk_x})) + COORD_W'(req.mvx >>> 2);
      Y  = COORD_W'($signed({1'b0, req.blk_y})) + COORD_W'(req.mvy >>> 2);
      fx = req.mvx[1:0];
      fy = req.mvy[1:0];
      dx = (req.std == STD_MPEG) ? {req.mvx[1], 2'b00} : 3'd0;
      dy = (req.std == STD_MPEG) ? {req.mvy[1], 2'b00} : 3'd0;
      w_au = pic_w_au;
      ph   = pic_h;
    end
    // fetch window
    fx0 = X; fx1 = X + 3;
    fy0 = Y; fy1 = Y + COORD_W'(h - 1);
    if (req.chroma || req.std == STD_MPEG) begin
      // bilinear: one extra column / row for a fractional position
      if (dx != 0) fx1 = X + 4;
      if (dy != 0) fy1 = Y + COORD_W'(h);
    end else if (req.std == STD_H264) begin
      if (fx != 0) begin fx0 = X - 2; fx1 = X + 6; end
      if (fy != 0) begin fy0 = Y - 2; fy1 = Y + COORD_W'(h + 2); end
    end else begin  // AVS
      if (fx[0])           begin fx0 = X - 2; fx1 = X + 6; end
      else if (fx == 2'd2) begin fx0 = X - 1; fx1 = X + 5; end
      if (fy[0])           begin fy0 = Y - 2; fy1 = Y + COORD_W'(h + 2); end
      else if (fy == 2'd2) begin fy0 = Y - 1; fy1 = Y + COORD_W'(h + 1); end
    end
    t = '0;
    t.info.id.num    = num;
    t.info.id.chroma = req.chroma;
    t.info.id.bwd    = req.bwd;
    t.info.std       = req.std;
    t.info.blk4x8    = req.blk4x8;
    t.info.bi        = req.bi;
    t.info.wt_idx    = req.wt_idx;
    t.info.cr        = req.chroma && req.cr;
    t.info.fx        = fx;
    t.info.fy        = fy;
    t.info.dx        = dx;
    t.info.dy        = dy;
    t.pic_id         = req.pic_id;
    t.xs             = X - 2;
    if (req.chroma || req.std == STD_MPEG) begin
      t.ys = Y;     t.nrows = NROW_W'((dy != 0) ? h + 1 : h);
    end else if (fy != 0) begin
      t.ys = Y - 2; t.nrows = NROW_W'(h + 5);
    end else begin
      t.ys = Y;     t.nrows = NROW_W'(h);
    end
    t.cf0 = clamp_au(fx0, w_au);
    t.cf1 = clamp_au(fx1, w_au);
    t.rlo = clamp_row(fy0, ph);
    t.rhi = clamp_row(fy1, ph);
  end

  assign req_ready = !task_valid || task_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      task_valid <= 1'b0;
      task_o     <= '0;
      num        <= '0;
    end else begin
      if (req_valid && req_ready) begin
        task_valid <= 1'b1;
        task_o     <= t;
        num        <= num + 1'b1;
      end else if (task_ready) begin
        task_valid <= 1'b0;
      end
    end
  end
endmodule
