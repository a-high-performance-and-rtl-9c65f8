// tb_output_unit: random luma and chroma tasks (row start inside, left of and right of the
// picture, rows above and below it) are pushed into the output unit's task
// queue while the testbench holds some of their task IDs "pending" for a
// random time; the other pending slots carry unrelated IDs that must not
// block anything. The data RAMs are modelled here with known contents and a
// one-cycle read. Checked for every delivered row: the order of tasks and
// rows, the 16 data bytes (AU pair of the clamped row), the pel-shifter
// offset and limit, and that a task's first row never leaves before its ID
// is released; the done counter after each task; and, in a final burst
// without pending IDs, that rows of successive tasks leave back to back, one
// per cycle.
module tb_output_unit;
  import mc_pkg::*;
  localparam int WAU = 30, PH = 100, AQ = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [AUCOL_W-1:0] pic_w_au = AUCOL_W'(WAU);
  logic [ROW_W-1:0] pic_h = ROW_W'(PH);
  logic tq_push, tq_full;
  task_t tq_task;
  logic pend_valid [AQ];
  task_id_t pend_id [AQ];
  logic [7:0] dram_raddr [2];
  logic [AU_W-1:0] dram_rdata [2];
  logic row_valid;
  logic [2*AU_W-1:0] row_data;
  blk_info_t row_info;
  logic [NROW_W-1:0] row_ridx;
  shift_ctl_t row_shift;
  logic [TNUM_W-1:0] done_cnt;
  logic stat_wait;

  output_unit #(.DEPTH(8), .AQ_DEPTH(AQ)) dut (.*);

  function automatic logic [AU_W-1:0] mem(int p, int a);
    return {32'(p * 7919 + a * 104729 + 17), 32'(a * 2654435761 + p)};
  endfunction
  always @(posedge clk) for (int p = 0; p < 2; p++) dram_rdata[p] <= mem(p, int'(dram_raddr[p]));

  task_t tasks [$];
  longint rel [$];            // release cycle of each task's pending ID
  longint cyc = 0;
  int out_t = 0, out_k = 0, checks = 0, failures = 0, n_wait = 0;
  int hold [AQ];              // task index pending in slot, or -1
  int burst0 = 1 << 30;
  longint first_c = -1, last_c = 0;

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // pending slots: slot n%8 holds task n's ID until its release cycle,
  // otherwise an unrelated ID
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stat_wait) n_wait++;
    #2;
    for (int s = 0; s < AQ; s++) begin
      pend_valid[s] = 1'b1;
      // unrelated ID: the held task's number with the other luma/chroma flag
      // (task numbers in the queue are distinct, so it matches no queued task)
      pend_id[s] = '0;
      if (hold[s] >= 0) begin
        pend_id[s] = tasks[hold[s]].info.id;
        pend_id[s].chroma = !pend_id[s].chroma;
      end else pend_id[s].num = TNUM_W'(s + 8 * $urandom_range(0, 3));
      if (hold[s] >= 0 && rel[hold[s]] > cyc) pend_id[s] = tasks[hold[s]].info.id;
      else pend_valid[s] = $urandom_range(0, 1);
    end
  end

  // row checker
  always @(posedge clk) if (rst_n && row_valid) begin
    task_t t;
    int yc, a0, a1, bwd, ch, cr, wau, ph;
    logic [AU_W-1:0] lo, hi;
    t = tasks[out_t];
    ch = t.info.id.chroma; cr = t.info.cr;
    wau = ch ? WAU / 2 : WAU; ph = ch ? PH / 2 : PH;
    yc = clampi(int'(t.ys) + out_k, 0, ph - 1);
    a0 = clampi(int'(t.xs) >>> 3, 0, wau - 1);
    a1 = (a0 == wau - 1) ? a0 : a0 + 1;
    bwd = t.info.id.bwd;
    lo = mem(a0 % 2, ch * 128 + bwd * 64 + (yc % 32) * 2 + (ch ? cr : (a0 % 4) / 2));
    hi = mem(a1 % 2, ch * 128 + bwd * 64 + (yc % 32) * 2 + (ch ? cr : (a1 % 4) / 2));
    checks++;
    if (row_info !== t.info || int'(row_ridx) != out_k || row_data !== {hi, lo} ||
        int'(row_shift.off) != int'(t.xs) - a0 * 8 || int'(row_shift.lim) != wau * 8 - a0 * 8 - 1) begin
      failures++;
      if (failures < 10) $display("task %0d row %0d wrong (xs %0d ys %0d)", out_t, out_k, t.xs, t.ys);
    end
    if (out_t >= burst0 && first_c < 0) first_c = cyc;
    last_c = cyc;
    if (out_k == 0) begin
      checks++;
      if (cyc < rel[out_t] + 1) begin failures++; $display("task %0d started while pending", out_t); end
    end
    if (out_k == int'(t.nrows) - 1) begin
      checks++;
      if (done_cnt != TNUM_W'(out_t + 1)) begin failures++; $display("done_cnt %0d", done_cnt); end
      out_t++; out_k = 0;
    end else out_k++;
  end

  task automatic push_tasks(input int n, input bit pend);
    for (int i = 0; i < n; i++) begin
      task_t t;
      int idx;
      idx = tasks.size();
      t = '0;
      t.info.id.num = TNUM_W'(idx);
      t.info.id.bwd = $urandom_range(0, 1);
      t.info.id.chroma = ($urandom_range(0, 2) == 0);
      t.info.cr = t.info.id.chroma && $urandom_range(0, 1);
      t.info.std = std_e'($urandom_range(0, 2));
      t.info.fx = 2'($urandom); t.info.fy = 2'($urandom);
      t.xs = COORD_W'($urandom_range(0, WAU * 8 + 40) - 30);
      t.ys = COORD_W'($urandom_range(0, PH + 20) - 12);
      t.nrows = NROW_W'($urandom_range(4, 13));
      tasks.push_back(t);
      rel.push_back(pend ? cyc + $urandom_range(0, 40) : 0);
      @(negedge clk);
      while (tq_full) @(negedge clk);
      hold[idx % AQ] = idx;
      tq_push = 1; tq_task = t;
      @(posedge clk);
      #1 tq_push = 0;
      if (pend) repeat ($urandom_range(0, 6)) @(posedge clk);
    end
  endtask

  initial begin
    int c0, rows;
    for (int s = 0; s < AQ; s++) hold[s] = -1;
    tq_push = 0; tq_task = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    push_tasks(800, 1);
    while (out_t != tasks.size()) @(posedge clk);
    // burst: 8 tasks without pending IDs must leave back to back
    rows = 0;
    burst0 = tasks.size();
    push_tasks(8, 0);
    while (out_t != tasks.size()) @(posedge clk);
    c0 = int'(last_c - first_c) + 1;
    rows = 0;
    for (int i = tasks.size() - 8; i < tasks.size(); i++) rows += int'(tasks[i].nrows);
    checks++;
    if (c0 != rows) begin failures++; $display("burst: %0d rows in %0d cycles", rows, c0); end
    checks++;
    if (n_wait == 0) begin failures++; $display("waiting never exercised"); end
    $display("%0d tasks, wait cycles %0d, burst %0d rows in %0d cycles", tasks.size(), n_wait, rows, c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
