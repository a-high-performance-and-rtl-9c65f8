// access_queue: REQUEST and RECEIVE stages of the 2-D cache pipeline.
//
// An assembler merges the vertically successive missed AUs reported by the
// judge unit (two per cycle) into AU-Blocks: a run of missed AUs in one AU
// column of one task. A hit, or the end of a column, closes the run; up to two
// AU-Blocks can be closed in one cycle. Closed AU-Blocks enter the AU-Block
// Queue, a circular buffer of DEPTH entries with three pointers: the next
// entry to request, the next entry to receive and the next free entry.
// Requests go to the memory controller one AU-Block at a time (valid/ready);
// read data return one 64-bit AU per beat in request order and are written to
// the data RAM of the AU's column parity. An entry stays in the queue, tagged
// with its task ID, until its last AU has been written, and every such entry
// is shown to the output unit (pend_valid/pend_id) so that a task waits while
// any of its AU-Blocks is pending. aq_space counts free entries.
//
// The data-RAM line is {luma/chroma, direction, row, column index without its
// lowest bit}; in the chroma part the plane (Cb/Cr) replaces the upper column
// index bit, as in the judge unit.
//
// AU-Block assembly, the queue and the task ID tags follow the design
// description. The queue depth, the in-order response and the one-AU-per-beat
// data return are this design's choices (the memory controller is external).
module access_queue
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned IDX_X = 2,
  parameter int unsigned IDX_Y = 5,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned AW = 2 + IDX_Y + IDX_X - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // pair results from the judge unit
  input  logic                pr_valid,
  input  task_id_t            pr_id,
  input  logic                pr_cr,
  input  logic [PIC_ID_W-1:0] pr_pic,
  input  logic [AUCOL_W-1:0]  pr_col,
  input  logic [ROW_W-1:0]    pr_row,
  input  logic                pr_miss_top,
  input  logic                pr_miss_bot,
  input  logic                pr_col_end,
  output logic [3:0]          aq_space,
  // external memory request
  output logic                mreq_valid,
  input  logic                mreq_ready,
  output au_block_t           mreq,
  // external memory read data
  input  logic                mresp_valid,
  input  logic [AU_W-1:0]     mresp_data,
  // data RAM write ([0] even AU column, [1] odd)
  output logic                dram_we [2],
  output logic [AW-1:0]       dram_waddr,
  output logic [AU_W-1:0]     dram_wdata,
  // pending AU-Blocks for the output unit
  output logic                pend_valid [DEPTH],
  output task_id_t            pend_id    [DEPTH]
);
  au_block_t       q [DEPTH];
  logic [PW:0]     wr_ptr, req_ptr, rcv_ptr;
  logic [NROW_W:0] beat;
  logic            run_v;
  au_block_t       run;

  // ---------------- AU-Block assembler ----------------
  logic      n_run_v;
  au_block_t n_run;
  logic      push0, push1;
  au_block_t blk0, blk1;

  always_comb begin
    n_run_v = run_v;
    n_run   = run;
    push0   = 1'b0;
    push1   = 1'b0;
    blk0    = '0;
    blk1    = '0;
    if (pr_valid) begin
      // top AU (row pr_row), then bottom AU (row pr_row+1)
      for (int k = 0; k < 2; k++) begin
        if ((k == 0) ? pr_miss_top : pr_miss_bot) begin
          if (n_run_v) begin
            n_run.len = n_run.len + 1'b1;
          end else begin
            n_run_v = 1'b1;
            n_run   = '{id: pr_id, cr: pr_cr, pic_id: pr_pic, col: pr_col,
                        y0: pr_row + ROW_W'(k), len: (NROW_W+1)'(1)};
          end
        end else if (n_run_v) begin
          if (!push0) begin push0 = 1'b1; blk0 = n_run; end
          else        begin push1 = 1'b1; blk1 = n_run; end
          n_run_v = 1'b0;
        end
      end
      if (pr_col_end && n_run_v) begin
        if (!push0) begin push0 = 1'b1; blk0 = n_run; end
        else        begin push1 = 1'b1; blk1 = n_run; end
        n_run_v = 1'b0;
      end
    end
  end

  // ---------------- queue ----------------
  logic [PW:0] used;
  assign used     = wr_ptr - rcv_ptr;
  assign aq_space = 4'(DEPTH - int'(used));

  assign mreq_valid = (req_ptr != wr_ptr);
  assign mreq       = q[req_ptr[PW-1:0]];

  au_block_t       rb;
  logic [ROW_W-1:0] ry;
  logic [IDX_X-1:0] ci;
  always_comb begin
    rb            = q[rcv_ptr[PW-1:0]];
    ry            = rb.y0 + ROW_W'(beat);
    dram_we[0]    = mresp_valid && !rb.col[0];
    dram_we[1]    = mresp_valid &&  rb.col[0];
    ci            = rb.id.chroma ? {rb.cr, rb.col[IDX_X-2:0]} : rb.col[IDX_X-1:0];
    dram_waddr    = {rb.id.chroma, rb.id.bwd, ry[IDX_Y-1:0], ci[IDX_X-1:1]};
    dram_wdata    = mresp_data;
    for (int i = 0; i < int'(DEPTH); i++) begin
      pend_valid[i] = (PW'(PW'(i) - rcv_ptr[PW-1:0]) < used[PW-1:0]) || (used == (PW+1)'(DEPTH));
      pend_id[i]    = q[i].id;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      req_ptr <= '0;
      rcv_ptr <= '0;
      beat    <= '0;
      run_v   <= 1'b0;
      run     <= '0;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else begin
      run_v <= n_run_v;
      run   <= n_run;
      if (push0) q[wr_ptr[PW-1:0]] <= blk0;
      if (push1) q[PW'(wr_ptr[PW-1:0] + 1'b1)] <= blk1;
      wr_ptr <= wr_ptr + (PW+1)'(push0) + (PW+1)'(push1);
      if (mreq_valid && mreq_ready) req_ptr <= req_ptr + 1'b1;
      if (mresp_valid) begin
        if (beat == rb.len - 1'b1) begin
          beat    <= '0;
          rcv_ptr <= rcv_ptr + 1'b1;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  // the judge unit never pushes into a full queue, and data never arrive
  // for an AU-Block that was not requested
  always_ff @(posedge clk) if (rst_n) begin
    assert (int'(used) + int'(push0) + int'(push1) <= int'(DEPTH))
      else $error("access_queue overflow");
    assert (!mresp_valid || (rcv_ptr != req_ptr))
      else $error("access_queue: data without request");
  end
endmodule
