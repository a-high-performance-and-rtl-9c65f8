// cache_2d: the 2-D reference cache with its block-level pipeline.
//
// Reference pixels are cached in AUs (8 horizontal pixels of one plane) and
// mapped to cache lines directly in two dimensions: the line index is the low
// AU-column and low row bits, the tag the remaining bits and the picture slot.
// With the default IDX_X = 2 and IDX_Y = 5 each direction (forward, backward)
// has a 32x32-pixel luma part (4 AUs x 32 rows) and a chroma part of the same
// size shared by Cb and Cr (16x32 pixels each): 256 lines x 8 bytes = 2 KB
// for luma plus 2 KB for chroma.
// A task (one 4x4 or 4x8 basic block of one plane) passes
//   CALC    task_generator: reference window and rows to deliver,
//   JUDGE   judge_unit: hit/miss of two vertically adjacent AUs per cycle,
//   REQUEST access_queue: missed AUs merged into AU-Blocks and requested,
//   NOPs    tasks wait in the access and task queues while memory answers,
//   RECEIVE access_queue: returned AUs written to the data RAMs,
//   OUT     output_unit: one reference row (two AUs) per cycle.
// Because later tasks keep being judged and requested while earlier ones
// wait for memory, several requests are in flight and the external latency is
// hidden. A missed AU that would evict a line still needed by an unfinished
// task stalls JUDGE until that task leaves OUT.
//
// Interfaces: a request (valid/ready), a memory request port (one AU-Block per
// handshake: picture slot, AU column, first row, number of AUs) and a
// read-data port returning one AU per beat in request order, and the row
// output to the pel shifter (no back-pressure: downstream is fully
// pipelined).
module cache_2d
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
  input  logic                req_valid,
  output logic                req_ready,
  input  mc_req_t             req,
  output logic                mreq_valid,
  input  logic                mreq_ready,
  output au_block_t           mreq,
  input  logic                mresp_valid,
  input  logic [AU_W-1:0]     mresp_data,
  output logic                row_valid,
  output logic [2*AU_W-1:0]   row_data,
  output blk_info_t           row_info,
  output logic [NROW_W-1:0]   row_ridx,
  output shift_ctl_t          row_shift,
  output logic                stat_conflict,
  output logic                stat_hit_au,
  output logic                stat_miss_au,
  output logic                stat_wait
);
  localparam int unsigned TAG_W  = 1 + PIC_ID_W + (AUCOL_W - IDX_X + 1) + (ROW_W - IDX_Y) + TNUM_W;
  localparam int unsigned TAW    = 2 + (IDX_Y - 1) + IDX_X;
  localparam int unsigned DAW    = 2 + IDX_Y + IDX_X - 1;

  logic   t_valid, t_ready;
  task_t  t_task;

  logic [TAW-1:0]   tag_raddr [2];
  logic [TAG_W-1:0] tag_rdata [2];
  logic             tag_we    [2];
  logic [TAW-1:0]   tag_waddr [2];
  logic [TAG_W-1:0] tag_wdata [2];

  logic                pr_valid, pr_miss_top, pr_miss_bot, pr_col_end;
  task_id_t            pr_id;
  logic                pr_cr;
  logic [PIC_ID_W-1:0] pr_pic;
  logic [AUCOL_W-1:0]  pr_col;
  logic [ROW_W-1:0]    pr_row;
  logic [3:0]          aq_space;

  logic        tq_push, tq_full;
  task_t       tq_task;
  logic [TNUM_W-1:0] done_cnt;

  logic            dram_we [2];
  logic [DAW-1:0]  dram_waddr;
  logic [AU_W-1:0] dram_wdata;
  logic [DAW-1:0]  dram_raddr [2];
  logic [AU_W-1:0] dram_rdata [2];

  logic     pend_valid [AQ_DEPTH];
  task_id_t pend_id    [AQ_DEPTH];

  task_generator u_calc (
    .clk, .rst_n, .pic_w_au, .pic_h,
    .req_valid, .req_ready, .req,
    .task_valid(t_valid), .task_ready(t_ready), .task_o(t_task)
  );

  judge_unit #(.IDX_X(IDX_X), .IDX_Y(IDX_Y)) u_judge (
    .clk, .rst_n,
    .task_valid(t_valid), .task_ready(t_ready), .task_i(t_task),
    .tag_raddr, .tag_rdata, .tag_we, .tag_waddr, .tag_wdata,
    .pr_valid, .pr_id, .pr_cr, .pr_pic, .pr_col, .pr_row, .pr_miss_top, .pr_miss_bot, .pr_col_end,
    .aq_space,
    .tq_push, .tq_task, .tq_full, .done_cnt,
    .stat_conflict, .stat_hit_au, .stat_miss_au
  );

  for (genvar i = 0; i < 2; i++) begin : g_ram
    tag_ram #(.DEPTH(2**TAW), .W(TAG_W)) u_tag (
      .clk, .rst_n, .we(tag_we[i]), .waddr(tag_waddr[i]), .wdata(tag_wdata[i]),
      .raddr(tag_raddr[i]), .rdata(tag_rdata[i])
    );
    data_ram #(.DEPTH(2**DAW), .W(AU_W)) u_data (
      .clk, .we(dram_we[i]), .waddr(dram_waddr), .wdata(dram_wdata),
      .raddr(dram_raddr[i]), .rdata(dram_rdata[i])
    );
  end

  access_queue #(.DEPTH(AQ_DEPTH), .IDX_X(IDX_X), .IDX_Y(IDX_Y)) u_aq (
    .clk, .rst_n,
    .pr_valid, .pr_id, .pr_cr, .pr_pic, .pr_col, .pr_row, .pr_miss_top, .pr_miss_bot, .pr_col_end,
    .aq_space,
    .mreq_valid, .mreq_ready, .mreq,
    .mresp_valid, .mresp_data,
    .dram_we, .dram_waddr, .dram_wdata,
    .pend_valid, .pend_id
  );

  output_unit #(.DEPTH(TQ_DEPTH), .AQ_DEPTH(AQ_DEPTH), .IDX_X(IDX_X), .IDX_Y(IDX_Y)) u_out (
    .clk, .rst_n, .pic_w_au, .pic_h,
    .tq_push, .tq_task, .tq_full,
    .pend_valid, .pend_id,
    .dram_raddr, .dram_rdata,
    .row_valid, .row_data, .row_info, .row_ridx, .row_shift,
    .done_cnt, .stat_wait
  );
endmodule
