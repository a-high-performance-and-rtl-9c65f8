// mc_pkg: types and constants shared by the motion compensation (MC) pipeline.
//
// The MC pipeline works on basic blocks of 4x4 or 4x8 pixels of the luma plane
// or of one 4:2:0 chroma plane (Cb or Cr). Each basic block is a "task" that
// travels through the 2-D cache (CALC, JUDGE, ACCESS, OUT), then the pel
// shifter, the interpolator and the weighted predictor one reference row per
// clock. Reference pictures live in external memory as access units (AU) of
// 8 bytes, an 8x1 strip of one plane. The coding standard, the AU
// size and the task ID layout (task number, luma/chroma flag, forward/backward
// flag) follow the design description; the field widths are this design's own
// choice, sized for 1920x1088 pictures.
package mc_pkg;

  // Coding standard of a basic block.
  typedef enum logic [1:0] {
    STD_H264 = 2'd0,
    STD_AVS  = 2'd1,
    STD_MPEG = 2'd2
  } std_e;

  localparam int unsigned AU_BYTES   = 8;               // one AU = 8 bytes
  localparam int unsigned AU_W       = AU_BYTES * 8;    // 64-bit AU word
  localparam int unsigned COORD_W    = 14;              // signed pixel coordinate
  localparam int unsigned AUCOL_W    = 8;               // AU column, up to 256 AUs = 2048 px
  localparam int unsigned ROW_W      = 11;              // picture row, up to 2048
  localparam int unsigned PIC_ID_W   = 4;               // picture slot index
  localparam int unsigned TNUM_W     = 5;               // task number (wraps)
  localparam int unsigned WT_IDX_W   = 5;               // weight table index
  localparam int unsigned MV_W       = 14;              // quarter-pel motion vector
  localparam int unsigned NROW_W     = 4;               // rows per task, at most 13

  // Task ID, attached to every task and every AU-Block.
  typedef struct packed {
    logic [TNUM_W-1:0] num;
    logic              chroma;
    logic              bwd;
  } task_id_t;

  // One prediction request from the decoder: one basic block, one direction.
  typedef struct packed {
    std_e                      std;
    logic                      chroma;   // 1: chroma block (4:2:0 plane coordinates)
    logic                      cr;       // chroma plane: 0 Cb, 1 Cr
    logic                      blk4x8;   // 1: 4 wide x 8 high, 0: 4x4
    logic                      bwd;      // reference list: 0 forward, 1 backward
    logic                      bi;       // block is bi-directionally predicted
    logic [PIC_ID_W-1:0]       pic_id;
    logic [WT_IDX_W-1:0]       wt_idx;
    logic [ROW_W-1:0]          blk_x;    // block position in its plane (pixels)
    logic [ROW_W-1:0]          blk_y;
    logic signed [MV_W-1:0]    mvx;      // MV: quarter luma pel, or 1/8 chroma pel
    logic signed [MV_W-1:0]    mvy;
  } mc_req_t;

  // Side information that travels with every row after the cache.
  typedef struct packed {
    task_id_t              id;
    std_e                  std;
    logic                  blk4x8;
    logic                  bi;
    logic [WT_IDX_W-1:0]   wt_idx;
    logic                  cr;       // chroma plane (chroma tasks)
    logic [1:0]            fx;       // quarter-pel fraction of the MV (luma)
    logic [1:0]            fy;
    logic [2:0]            dx;       // 1/8-pel bilinear weights (MPEG luma, chroma)
    logic [2:0]            dy;
  } blk_info_t;

  // A task as the cache sees it (output of CALC).
  typedef struct packed {
    blk_info_t                 info;
    logic [PIC_ID_W-1:0]       pic_id;
    logic signed [COORD_W-1:0] xs;     // x of byte 0 of every output row (X-2)
    logic signed [COORD_W-1:0] ys;     // first row delivered to the interpolator
    logic [NROW_W-1:0]         nrows;  // rows delivered
    logic [AUCOL_W-1:0]        cf0;    // AU columns to fetch (clamped)
    logic [AUCOL_W-1:0]        cf1;
    logic [ROW_W-1:0]          rlo;    // picture rows to fetch (clamped)
    logic [ROW_W-1:0]          rhi;
  } task_t;

  // One AU-Block: a vertical run of missed AUs in one AU column.
  typedef struct packed {
    task_id_t            id;
    logic                cr;
    logic [PIC_ID_W-1:0] pic_id;
    logic [AUCOL_W-1:0]  col;
    logic [ROW_W-1:0]    y0;
    logic [NROW_W:0]     len;
  } au_block_t;

  // Control of the pel shifter for one row.
  typedef struct packed {
    logic signed [COORD_W-1:0] off;  // x of byte 0 wanted minus x of input byte 0
    logic [COORD_W-1:0]        lim;  // index of the last input byte inside the picture
  } shift_ctl_t;

  // Weight table entry, weighted-prediction parameters of one basic block.
  typedef struct packed {
    logic signed [8:0] w0;   // forward weight
    logic signed [8:0] w1;   // backward weight
    logic signed [8:0] o;    // final offset
    logic [3:0]        n;    // final right shift
    logic signed [8:0] ao;   // AVS scale offset A_o
  } wt_entry_t;

  function automatic logic [7:0] clip1(input logic signed [31:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

endpackage
