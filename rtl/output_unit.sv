// output_unit: OUT stage of the 2-D cache pipeline.
//
// Judged tasks wait in a task queue of DEPTH entries (the NOP stages of the
// block pipeline). The head task may start only when no AU-Block in the access
// queue still carries its task ID, i.e. when every AU it needs is in the data
// RAMs. It then reads one reference row per cycle: for delivered row k the
// picture row clamp(ys+k) and the two neighbouring AU columns a0 =
// clamp(floor(xs/8)) and a1 = min(a0+1, last column), one from each data RAM.
// One cycle later (data RAM latency) the 16 bytes {AU a1, AU a0} leave
// together with the task's side information, the row number and the pel
// shifter control (offset of xs from the first byte, last byte inside the
// picture). Rows clamped at the top or bottom edge repeat the edge row, which
// pads vertically. After the last row the task is popped and done_cnt, the
// count of finished tasks, advances; the judge unit uses it for conflict
// checks. A following ready task starts the next cycle, so rows flow without
// gaps.
//
// Chroma tasks use the plane size (half the picture width and height) for
// clamping and the chroma part of the data RAMs.
//
// The task queue and the task-ID comparison against all queued AU-Blocks
// follow the design description; the queue depth and the padding split (rows
// here, columns in the pel shifter) are this design's choices.
module output_unit
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned AQ_DEPTH = 8,
  parameter int unsigned IDX_X    = 2,
  parameter int unsigned IDX_Y    = 5,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned AW = 2 + IDX_Y + IDX_X - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AUCOL_W-1:0]  pic_w_au,
  input  logic [ROW_W-1:0]    pic_h,
  // tasks from the judge unit
  input  logic                tq_push,
  input  task_t               tq_task,
  output logic                tq_full,
  // pending AU-Blocks
  input  logic                pend_valid [AQ_DEPTH],
  input  task_id_t            pend_id    [AQ_DEPTH],
  // data RAM read ([0] even AU column, [1] odd)
  output logic [AW-1:0]       dram_raddr [2],
  input  logic [AU_W-1:0]     dram_rdata [2],
  // reference rows to the pel shifter
  output logic                row_valid,
  output logic [2*AU_W-1:0]   row_data,
  output blk_info_t           row_info,
  output logic [NROW_W-1:0]   row_ridx,
  output shift_ctl_t          row_shift,
  // finished tasks
  output logic [TNUM_W-1:0]   done_cnt,
  output logic                stat_wait     // head task waits for memory data
);
  task_t        tq [DEPTH];
  logic [PW:0]  wr, rd;
  logic [NROW_W-1:0] k;
  task_t        head;
  logic         empty, pending, go, last;

  assign empty   = (wr == rd);
  assign tq_full = ((wr - rd) == (PW+1)'(DEPTH));
  assign head    = tq[rd[PW-1:0]];

  always_comb begin
    pending = 1'b0;
    for (int i = 0; i < int'(AQ_DEPTH); i++)
      if (pend_valid[i] && pend_id[i] == head.info.id) pending = 1'b1;
  end

  assign go        = !empty && ((k != '0) || !pending);
  assign last      = (k == head.nrows - 1'b1);
  assign stat_wait = !empty && (k == '0) && pending;

  // row and AU columns of the current row
  logic signed [COORD_W-1:0] yy, a0s;
  logic [ROW_W-1:0]   yc;
  logic [AUCOL_W-1:0] a0, a1;
  // plane size: chroma planes (4:2:0) are half the picture in each direction
  logic [AUCOL_W-1:0] w_au;
  logic [ROW_W-1:0]   ph;
  logic [IDX_X-1:0]   ci0, ci1;
  assign w_au = head.info.id.chroma ? (pic_w_au >> 1) : pic_w_au;
  assign ph   = head.info.id.chroma ? (pic_h >> 1) : pic_h;
  always_comb begin
    yy  = head.ys + COORD_W'(k);
    if (yy < 0)                                  yc = '0;
    else if (yy > COORD_W'($signed({1'b0, ph})) - 1) yc = ph - 1'b1;
    else                                         yc = yy[ROW_W-1:0];
    a0s = head.xs >>> 3;
    if (a0s < 0)                                         a0 = '0;
    else if (a0s > COORD_W'($signed({1'b0, w_au})) - 1)  a0 = w_au - 1'b1;
    else                                                 a0 = a0s[AUCOL_W-1:0];
    a1 = (a0 == w_au - 1'b1) ? a0 : a0 + 1'b1;
    // column index of each AU; in the chroma part the plane is the upper bit
    ci0 = head.info.id.chroma ? {head.info.cr, a0[IDX_X-2:0]} : a0[IDX_X-1:0];
    ci1 = head.info.id.chroma ? {head.info.cr, a1[IDX_X-2:0]} : a1[IDX_X-1:0];
    dram_raddr[0] = {head.info.id.chroma, head.info.id.bwd, yc[IDX_Y-1:0],
                     (a0[0] ? ci1[IDX_X-1:1] : ci0[IDX_X-1:1])};
    dram_raddr[1] = {head.info.id.chroma, head.info.id.bwd, yc[IDX_Y-1:0],
                     (a0[0] ? ci0[IDX_X-1:1] : ci1[IDX_X-1:1])};
  end

  // one-cycle aligned side information
  logic       p_sel, p_dup;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr        <= '0;
      rd        <= '0;
      k         <= '0;
      done_cnt  <= '0;
      row_valid <= 1'b0;
      row_info  <= '0;
      row_ridx  <= '0;
      row_shift <= '0;
      p_sel     <= 1'b0;
      p_dup     <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) tq[i] <= '0;
    end else begin
      if (tq_push) begin
        tq[wr[PW-1:0]] <= tq_task;
        wr <= wr + 1'b1;
      end
      row_valid <= go;
      if (go) begin
        row_info      <= head.info;
        row_ridx      <= k;
        row_shift.off <= head.xs - COORD_W'($signed({1'b0, a0, 3'b000}));
        row_shift.lim <= COORD_W'({w_au, 3'b000}) - COORD_W'({a0, 3'b000}) - 1'b1;
        p_sel         <= a0[0];
        p_dup         <= (a1 == a0);
        if (last) begin
          k        <= '0;
          rd       <= rd + 1'b1;
          done_cnt <= done_cnt + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

  logic [AU_W-1:0] lo, hi;
  always_comb begin
    lo       = p_sel ? dram_rdata[1] : dram_rdata[0];
    hi       = p_dup ? lo : (p_sel ? dram_rdata[0] : dram_rdata[1]);
    row_data = {hi, lo};
  end

  always_ff @(posedge clk) if (rst_n) begin
    assert (!(tq_push && tq_full)) else $error("output_unit: task queue overflow");
  end
endmodule
