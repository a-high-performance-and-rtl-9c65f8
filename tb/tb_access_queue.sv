// tb_access_queue: random luma and chroma pair streams (columns of vertically adjacent AU
// pairs with random hit/miss flags, odd column heights included) drive the
// access queue as the judge unit would (only when two entries are free, with
// random idle cycles). The external memory model answers the requests. The
// testbench checks: every AU-Block request against the runs of missed AUs
// computed here (task ID, picture, column, first row, length, order); every
// data-RAM write (RAM by column parity, line address, data); the free-entry
// count and the set of pending task IDs after every cycle against its own
// record of closed but not fully received AU-Blocks; and that all of it
// drains at the end.
module tb_access_queue;
  import mc_pkg::*;
  import mc_ref_pkg::*;
  localparam int DEPTH = 8, PW = 1920, PH = 1088;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pr_valid, pr_miss_top, pr_miss_bot, pr_col_end, pr_cr;
  task_id_t pr_id;
  logic [PIC_ID_W-1:0] pr_pic;
  logic [AUCOL_W-1:0] pr_col;
  logic [ROW_W-1:0] pr_row;
  logic [3:0] aq_space;
  logic mreq_valid, mreq_ready, mresp_valid;
  au_block_t mreq;
  logic [AU_W-1:0] mresp_data;
  logic dram_we [2];
  logic [7:0] dram_waddr;
  logic [AU_W-1:0] dram_wdata;
  logic pend_valid [DEPTH];
  task_id_t pend_id [DEPTH];
  int n_req, n_au;

  access_queue #(.DEPTH(DEPTH)) dut (.*);
  ext_mem_model #(.LATENCY(10), .PIC_W(PW), .PIC_H(PH)) u_mem (.*);

  typedef struct { task_id_t id; int cr; int pic; int col; int r; bit mt; bit mb; bit ce; int closes; } pr_t;
  pr_t       pairs [$];
  au_block_t blk_req [$];      // expected requests, in order
  au_block_t blk_rcv [$];      // expected receive order (same blocks)
  task_id_t  outst [$];        // closed, not fully received
  int        pi = 0, closed = 0, beat = 0, checks = 0, failures = 0;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // build the stimulus and the expected AU-Blocks
  initial begin
    for (int n = 0; n < 600; n++) begin
      task_id_t id;
      int pic, col, r0, nr, runv, cl, cr;
      au_block_t run;
      id = '0; id.num = TNUM_W'(n); id.bwd = $urandom_range(0, 1);
      id.chroma = ($urandom_range(0, 2) == 0); cr = id.chroma ? $urandom_range(0, 1) : 0;
      pic = $urandom_range(0, 3);
      col = $urandom_range(0, id.chroma ? 110 : 230); r0 = $urandom_range(0, id.chroma ? 500 : 1000);
      nr = $urandom_range(1, 13);
      runv = 0; run = '0;
      for (int r = r0; r < r0 + nr; r += 2) begin
        pr_t p;
        bit m [2];
        p.id = id; p.cr = cr; p.pic = pic; p.col = col; p.r = r;
        m[0] = ($urandom_range(0, 9) < 6);
        m[1] = (r + 1 < r0 + nr) && ($urandom_range(0, 9) < 6);
        p.mt = m[0]; p.mb = m[1]; p.ce = (r + 2 >= r0 + nr);
        cl = 0;
        for (int k = 0; k < 2; k++) begin
          if (m[k]) begin
            if (runv) run.len++;
            else begin
              runv = 1; run = '0; run.id = id; run.cr = cr[0]; run.pic_id = PIC_ID_W'(pic);
              run.col = AUCOL_W'(col); run.y0 = ROW_W'(r + k); run.len = 1;
            end
          end else if (runv) begin
            blk_req.push_back(run); cl++; runv = 0;
          end
        end
        if (p.ce && runv) begin blk_req.push_back(run); cl++; runv = 0; end
        p.closes = cl;
        pairs.push_back(p);
      end
    end
    blk_rcv = blk_req;
  end

  // driver
  initial begin
    pr_valid = 0; pr_cr = 0; pr_id = '0; pr_pic = 0; pr_col = 0; pr_row = 0;
    pr_miss_top = 0; pr_miss_bot = 0; pr_col_end = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (pi < pairs.size()) begin
      @(negedge clk);
      if (aq_space >= 2 && $urandom_range(0, 4) != 0) begin
        pr_t p;
        p = pairs[pi];
        pr_valid = 1; pr_id = p.id; pr_cr = p.cr[0]; pr_pic = PIC_ID_W'(p.pic); pr_col = AUCOL_W'(p.col);
        pr_row = ROW_W'(p.r); pr_miss_top = p.mt; pr_miss_bot = p.mb; pr_col_end = p.ce;
      end else pr_valid = 0;
      @(posedge clk);
      if (pr_valid) begin
        for (int k = 0; k < pairs[pi].closes; k++) begin
          outst.push_back(blk_rcv[closed].id);
          closed++;
        end
        pi++;
      end
      #1 pr_valid = 0;
    end
  end

  // request checker
  always @(posedge clk) if (rst_n && mreq_valid && mreq_ready) begin
    au_block_t e;
    checks++;
    e = blk_req.pop_front();
    if (mreq !== e) begin
      failures++;
      if (failures < 10) $display("request: got col %0d y0 %0d len %0d, exp col %0d y0 %0d len %0d",
                                  mreq.col, mreq.y0, mreq.len, e.col, e.y0, e.len);
    end
  end

  // data-RAM write checker
  int rcv_i = 0;
  always @(posedge clk) if (rst_n && mresp_valid) begin
    au_block_t b;
    int y;
    logic [AU_W-1:0] d;
    b = blk_rcv[rcv_i];
    y = int'(b.y0) + beat;
    for (int i = 0; i < 8; i++)
      d[i*8 +: 8] = b.id.chroma ? 8'(pix(b.pic_id + 16 * (1 + b.cr), b.col * 8 + i, y, PW / 2, PH / 2))
                                : 8'(pix(b.pic_id, b.col * 8 + i, y, PW, PH));
    checks++;
    if (dram_we[b.col[0]] !== 1'b1 || dram_we[!b.col[0]] !== 1'b0 ||
        dram_waddr !== {b.id.chroma, b.id.bwd, 5'(y), b.id.chroma ? b.cr : b.col[1]} || dram_wdata !== d) begin
      failures++;
      if (failures < 10) $display("write: col %0d row %0d addr %h", b.col, y, dram_waddr);
    end
    beat++;
    if (beat == b.len) begin
      beat = 0; rcv_i++;
      void'(outst.pop_front());
    end
  end

  // free-entry count and pending IDs after every edge
  always @(posedge clk) if (rst_n) begin
    task_id_t got [$], exp [$];
    #2;
    got = {};
    for (int i = 0; i < DEPTH; i++) if (pend_valid[i]) got.push_back(pend_id[i]);
    exp = outst;
    got.sort(); exp.sort();
    checks++;
    if (got != exp || int'(aq_space) != DEPTH - outst.size()) begin
      failures++;
      if (failures < 10) $display("pending: %0d entries, expected %0d, space %0d", got.size(),
                                  exp.size(), aq_space);
    end
  end

  initial begin
    wait (rst_n);
    wait (pi == pairs.size() && rcv_i == blk_rcv.size());
    repeat (5) @(posedge clk);
    checks++;
    if (blk_req.size() != 0 || outst.size() != 0 || n_req != blk_rcv.size()) begin
      failures++; $display("not drained");
    end
    $display("%0d pairs, %0d AU-Blocks, %0d AUs", pairs.size(), n_req, n_au);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
