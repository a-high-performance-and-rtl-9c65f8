// judge_unit: JUDGE stage of the 2-D cache pipeline.
//
// For the current task it walks the fetch window column by column and, within
// a column, two vertically adjacent AUs per cycle (one looked up in the
// even-row tag RAM, one in the odd-row tag RAM). A cache line is addressed by
// {direction, row[IDX_Y-1:0], AU column[IDX_X-1:0]} (direct mapping in 2-D);
// its tag holds the picture slot, the upper AU-column bits and the upper row
// bits, plus a valid bit. Every judged AU writes its tag back together with the
// number of the last task that uses the line. Each pair result (hit/miss of
// both AUs) goes to the access queue the same cycle; after the last pair the
// task is handed to the output unit's task queue.
//
// Conflict rule: a missed AU whose line is valid and was last used by a task
// that has not finished its OUT stage would flush data that task still needs,
// so the pair stalls until the output unit's done counter passes that task.
// The unit also stalls while the access queue has fewer than two free entries
// or the task queue is full. A new task is accepted in the cycle the previous
// one finishes, so the unit judges one pair per cycle without bubbles.
//
// Luma and chroma have separate cache parts (the line address starts with the
// luma/chroma flag); in the chroma part the two planes Cb and Cr share the
// space by taking the upper AU-column index bit from the plane, so each plane
// keeps a 16x32 area per direction. The tag stores the AU column from bit
// IDX_X-1 up, which covers both layouts.
//
// The pairing, the index/tag split and the stall-until-OUT
// conflict rule follow the design description. Recording the last user's task
// number in the tag entry to detect conflicts is this design's own method.
module judge_unit
  import mc_pkg::*;
#(
  parameter int unsigned IDX_X = 2,   // AU-column index bits: 4 AUs = 32 pixels
  parameter int unsigned IDX_Y = 5,   // row index bits: 32 rows
  localparam int unsigned TAG_W = 1 + PIC_ID_W + (AUCOL_W - IDX_X + 1) + (ROW_W - IDX_Y) + TNUM_W,
  localparam int unsigned AW    = 2 + (IDX_Y - 1) + IDX_X
) (
  input  logic                clk,
  input  logic                rst_n,
  // task from CALC
  input  logic                task_valid,
  output logic                task_ready,
  input  task_t               task_i,
  // tag RAMs: [0] even rows, [1] odd rows
  output logic [AW-1:0]       tag_raddr [2],
  input  logic [TAG_W-1:0]    tag_rdata [2],
  output logic                tag_we    [2],
  output logic [AW-1:0]       tag_waddr [2],
  output logic [TAG_W-1:0]    tag_wdata [2],
  // pair result to the access queue
  output logic                pr_valid,
  output task_id_t            pr_id,
  output logic                pr_cr,
  output logic [PIC_ID_W-1:0] pr_pic,
  output logic [AUCOL_W-1:0]  pr_col,
  output logic [ROW_W-1:0]    pr_row,
  output logic                pr_miss_top,
  output logic                pr_miss_bot,
  output logic                pr_col_end,
  input  logic [3:0]          aq_space,
  // finished task to the output unit
  output logic                tq_push,
  output task_t               tq_task,
  input  logic                tq_full,
  input  logic [TNUM_W-1:0]   done_cnt,
  // statistics
  output logic                stat_conflict,
  output logic                stat_hit_au,
  output logic                stat_miss_au
);
  typedef struct packed {
    logic                         valid;
    logic [PIC_ID_W-1:0]          pic;
    logic [AUCOL_W-IDX_X:0]       xtag;
    logic [ROW_W-IDX_Y-1:0]       ytag;
    logic [TNUM_W-1:0]            last;
  } tag_t;

  logic             busy;
  task_t            cur;
  logic [AUCOL_W-1:0] c;
  logic [ROW_W-1:0] r;

  logic [ROW_W-1:0] r_bot;
  logic             bot_v, top_odd;
  tag_t             e_top, e_bot, n_top, n_bot;
  logic             hit_top, hit_bot, miss_top, miss_bot, confl, stall;
  logic             last_pair, last_col, task_end, fire;

  // luma: {0, dir, y, col[IDX_X-1:0]}; chroma: {1, dir, y, plane, col[IDX_X-2:0]}
  function automatic logic [AW-1:0] line_addr(input blk_info_t inf, input logic [ROW_W-1:0] y,
                                              input logic [AUCOL_W-1:0] col);
    logic [IDX_X-1:0] ci;
    ci = inf.id.chroma ? {inf.cr, col[IDX_X-2:0]} : col[IDX_X-1:0];
    return {inf.id.chroma, inf.id.bwd, y[IDX_Y-1:1], ci};
  endfunction

  function automatic logic inflight(input logic [TNUM_W-1:0] t, input logic [TNUM_W-1:0] curn,
                                    input logic [TNUM_W-1:0] done);
    return (TNUM_W'(t - done)) < (TNUM_W'(curn - done));
  endfunction

  // the even row of the pair reads RAM 0, the odd row RAM 1
  assign r_bot   = r + 1'b1;
  assign bot_v   = (r_bot <= cur.rhi);
  assign top_odd = r[0];
  assign tag_raddr[0] = top_odd ? line_addr(cur.info, r_bot, c) : line_addr(cur.info, r, c);
  assign tag_raddr[1] = top_odd ? line_addr(cur.info, r, c)     : line_addr(cur.info, r_bot, c);

  always_comb begin
    e_top = top_odd ? tag_t'(tag_rdata[1]) : tag_t'(tag_rdata[0]);
    e_bot = top_odd ? tag_t'(tag_rdata[0]) : tag_t'(tag_rdata[1]);
    n_top = '{valid: 1'b1, pic: cur.pic_id, xtag: c[AUCOL_W-1:IDX_X-1], ytag: r[ROW_W-1:IDX_Y],
              last: cur.info.id.num};
    n_bot = '{valid: 1'b1, pic: cur.pic_id, xtag: c[AUCOL_W-1:IDX_X-1], ytag: r_bot[ROW_W-1:IDX_Y],
              last: cur.info.id.num};
    hit_top  = e_top.valid && e_top.pic == n_top.pic && e_top.xtag == n_top.xtag && e_top.ytag == n_top.ytag;
    hit_bot  = e_bot.valid && e_bot.pic == n_bot.pic && e_bot.xtag == n_bot.xtag && e_bot.ytag == n_bot.ytag;
    miss_top = busy && !hit_top;
    miss_bot = busy && bot_v && !hit_bot;
    confl    = (miss_top && e_top.valid && inflight(e_top.last, cur.info.id.num, done_cnt)) ||
               (miss_bot && e_bot.valid && inflight(e_bot.last, cur.info.id.num, done_cnt));
    last_pair = !bot_v || (r_bot == cur.rhi);
    last_col  = (c == cur.cf1);
    task_end  = last_pair && last_col;
    stall     = confl || (aq_space < 4'd2) || (task_end && tq_full);
    fire      = busy && !stall;

    tag_we[0]    = fire && (top_odd ? bot_v : 1'b1);
    tag_we[1]    = fire && (top_odd ? 1'b1 : bot_v);
    tag_waddr[0] = tag_raddr[0];
    tag_waddr[1] = tag_raddr[1];
    tag_wdata[0] = top_odd ? n_bot : n_top;
    tag_wdata[1] = top_odd ? n_top : n_bot;

    pr_valid    = fire;
    pr_id       = cur.info.id;
    pr_cr       = cur.info.cr;
    pr_pic      = cur.pic_id;
    pr_col      = c;
    pr_row      = r;
    pr_miss_top = miss_top;
    pr_miss_bot = miss_bot;
    pr_col_end  = last_pair;

    tq_push = fire && task_end;
    tq_task = cur;

    task_ready = !busy || (fire && task_end);

    stat_conflict = busy && confl;
    stat_hit_au   = fire ? ((!miss_top ? 1'b1 : 1'b0) | (bot_v && !miss_bot)) : 1'b0;
    stat_miss_au  = fire && (miss_top || miss_bot);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      c    <= '0;
      r    <= '0;
    end else begin
      if (task_valid && task_ready) begin
        busy <= 1'b1;
        cur  <= task_i;
        c    <= task_i.cf0;
        r    <= task_i.rlo;
      end else if (fire) begin
        if (task_end) begin
          busy <= 1'b0;
        end else if (last_pair) begin
          c <= c + 1'b1;
          r <= cur.rlo;
        end else begin
          r <= r + ROW_W'(2);
        end
      end
    end
  end
endmodule
