// tb_judge_unit: the judge unit with its two tag RAMs, driven by random
// luma and chroma (Cb, Cr) tasks (small coordinates so that lines are reused and collide). The
// testbench keeps its own direct-mapped line table and checks, for every pair
// the unit issues: the visiting order (columns left to right, row pairs top
// to bottom), the hit/miss flags of both AUs, the column-end flag, that no
// missed line still belongs to an in-flight task (the conflict rule), and
// that each task is handed on once after its last pair. The output unit's
// done counter is modelled with a random lag behind the handed-on tasks and a
// task queue of 8; the access-queue space is random. A second phase without
// back-pressure checks the rate of one pair per cycle with no bubble between
// tasks.
module tb_judge_unit;
  import mc_pkg::*;
  localparam int TAG_W = 23, AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic task_valid, task_ready;
  task_t task_i;
  logic [AW-1:0] tag_raddr [2], tag_waddr [2];
  logic [TAG_W-1:0] tag_rdata [2], tag_wdata [2];
  logic tag_we [2];
  logic pr_valid, pr_miss_top, pr_miss_bot, pr_col_end, pr_cr;
  task_id_t pr_id;
  logic [PIC_ID_W-1:0] pr_pic;
  logic [AUCOL_W-1:0] pr_col;
  logic [ROW_W-1:0] pr_row;
  logic [3:0] aq_space;
  logic tq_push, tq_full;
  task_t tq_task;
  logic [TNUM_W-1:0] done_cnt;
  logic stat_conflict, stat_hit_au, stat_miss_au;

  judge_unit dut (.*);
  for (genvar i = 0; i < 2; i++) begin : g_tag
    tag_ram #(.DEPTH(256), .W(TAG_W)) u_tag (
      .clk, .rst_n, .we(tag_we[i]), .waddr(tag_waddr[i]), .wdata(tag_wdata[i]),
      .raddr(tag_raddr[i]), .rdata(tag_rdata[i]));
  end

  int checks = 0, failures = 0;
  // expected pair stream: {task index, col, row, bot valid, col_end}
  typedef struct { int t; int c; int r; bit bv; bit ce; } pair_t;
  pair_t   exp_q [$];
  task_t   tasks [$];
  int      pushed = 0, done = 0, n_confl = 0, n_hit = 0, n_miss = 0, n_pairs = 0;
  bit      lv [512]; int lpic [512]; int lcol [512]; int lrow [512]; int llast [512];
  bit      free_run = 0;

  // luma lines 0..255, chroma lines 256..511 (plane replaces column bit 1)
  function automatic int lidx(int ch, int cr, int bwd, int r, int c);
    return ch * 256 + bwd * 128 + (r % 32) * 4 + (ch ? cr * 2 + c % 2 : c % 4);
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // environment: done counter lags the handed-on tasks, task queue of 8
  always @(posedge clk) begin
    if (rst_n) begin
      if (tq_push) pushed++;
      if (stat_conflict) n_confl++;
      if (done < pushed && (free_run || $urandom_range(0, 3) == 0)) done++;
    end
    #2;
    done_cnt = TNUM_W'(done);
    tq_full  = (pushed - done >= 8) || (!free_run && $urandom_range(0, 7) == 0);
    aq_space = free_run ? 4'd8 : 4'($urandom_range(0, 8));
  end

  // pair checker
  always @(posedge clk) if (rst_n && pr_valid) begin
    pair_t e;
    task_t t;
    bit exp_mt, exp_mb;
    n_pairs++;
    checks++;
    e = exp_q.pop_front();
    t = tasks[e.t];
    if (pr_col != e.c || pr_row != e.r || pr_col_end != e.ce || pr_id != t.info.id ||
        pr_pic != t.pic_id || pr_cr != t.info.cr) begin
      failures++;
      if (failures < 10) $display("pair order: got c%0d r%0d ce%0d exp c%0d r%0d ce%0d",
                                  pr_col, pr_row, pr_col_end, e.c, e.r, e.ce);
    end
    for (int k = 0; k < 2; k++) begin
      int li, rr;
      bit hit, miss_f;
      if (k == 1 && !e.bv) begin
        if (pr_miss_bot) begin failures++; $display("miss on absent bottom AU"); end
        continue;
      end
      rr = e.r + k;
      li = lidx(t.info.id.chroma, t.info.cr, t.info.id.bwd, rr, e.c);
      hit = lv[li] && lpic[li] == t.pic_id && lcol[li] == e.c && lrow[li] == rr;
      miss_f = (k == 0) ? pr_miss_top : pr_miss_bot;
      checks++;
      if (miss_f != !hit) begin
        failures++;
        if (failures < 10) $display("hit/miss wrong at c%0d r%0d", e.c, rr);
      end
      if (hit) n_hit++; else n_miss++;
      // conflict rule: a replaced line must not belong to an in-flight task
      if (!hit && lv[li]) begin
        checks++;
        if (((llast[li] - int'(done_cnt)) & 31) < ((t.info.id.num - int'(done_cnt)) & 31)) begin
          failures++;
          $display("line of in-flight task %0d replaced (done %0d)", llast[li], done);
        end
      end
      lv[li] = 1; lpic[li] = t.pic_id; lcol[li] = e.c; lrow[li] = rr; llast[li] = t.info.id.num;
    end
  end

  int handed = 0;
  always @(posedge clk) if (rst_n && tq_push) begin
    checks++;
    if (tq_task !== tasks[handed]) begin failures++; $display("wrong task handed on"); end
    handed++;
  end

  task automatic run_tasks(input int n, input int base);
    for (int i = 0; i < n; i++) begin
      task_t t;
      int idx;
      idx = tasks.size();
      t = '0;
      t.info.id.num = TNUM_W'(idx);
      t.info.id.bwd = $urandom_range(0, 1);
      t.info.id.chroma = ($urandom_range(0, 2) == 0);
      t.info.cr = t.info.id.chroma && $urandom_range(0, 1);
      t.pic_id = PIC_ID_W'($urandom_range(0, 1));
      t.cf0 = AUCOL_W'(base + $urandom_range(0, 12));
      t.cf1 = t.cf0 + AUCOL_W'($urandom_range(0, 1));
      t.rlo = ROW_W'($urandom_range(0, 80));
      t.rhi = t.rlo + ROW_W'($urandom_range(3, 12));
      tasks.push_back(t);
      for (int c = t.cf0; c <= t.cf1; c++)
        for (int r = t.rlo; r <= t.rhi; r += 2)
          exp_q.push_back('{t: idx, c: c, r: r, bv: (r + 1 <= t.rhi), ce: (r + 1 >= t.rhi)});
      @(negedge clk);
      task_valid = 1; task_i = t;
      while (!task_ready) @(negedge clk);
      @(posedge clk);
      #1 task_valid = 0;
    end
  endtask

  initial begin
    int c0, p0, np;
    task_valid = 0; task_i = '0; aq_space = 0; tq_full = 0; done_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_tasks(1500, 0);
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    // phase 2: no back-pressure, distinct tasks far apart in the picture so
    // that nothing conflicts: expect exactly one pair per cycle
    free_run = 1;
    while (done != pushed) @(posedge clk);
    repeat (3) @(posedge clk);
    np = exp_q.size();
    p0 = n_pairs;
    c0 = 0;
    fork
      run_tasks(200, 40);
      begin
        @(posedge clk);
        while (n_pairs - p0 == 0) @(posedge clk);
        while (exp_q.size() != 0) begin @(posedge clk); c0++; end
      end
    join
    checks++;
    if (c0 > n_pairs - p0 + 2) begin
      failures++;
      $display("rate: %0d pairs took %0d cycles", n_pairs - p0, c0);
    end
    $display("pairs %0d, hit AUs %0d, miss AUs %0d, conflict-stall cycles %0d, phase-2 %0d pairs in %0d cycles",
             n_pairs, n_hit, n_miss, n_confl, n_pairs - p0, c0);
    checks++;
    if (n_confl == 0 || n_hit == 0 || n_miss == 0 || handed != tasks.size()) begin
      failures++; $display("mechanism not exercised or tasks lost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
