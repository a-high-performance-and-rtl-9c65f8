// tb_task_generator: random luma and chroma requests of all standards, block
// types and MV fractions, including positions near and beyond the picture edges, with a
// randomly stalling consumer. Each task's delivered-row range, row start x,
// fetch window (AU columns and rows, clamped) and task number are compared
// with values computed here from the window rules.
module tb_task_generator;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int WAU = 60, PH = 200;
  logic [AUCOL_W-1:0] pic_w_au = AUCOL_W'(WAU);
  logic [ROW_W-1:0]   pic_h = ROW_W'(PH);
  logic req_valid, req_ready, task_valid, task_ready;
  mc_req_t req;
  task_t task_o;
  task_generator dut (.*);
  int checks = 0, failures = 0;
  task_t expq [$];
  int num = 0;

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && task_valid && task_ready) begin
    task_t e;
    checks++;
    e = expq.pop_front();
    if (task_o !== e) begin
      failures++;
      if (failures < 10)
        $display("got xs %0d ys %0d n %0d cf %0d..%0d r %0d..%0d | exp xs %0d ys %0d n %0d cf %0d..%0d r %0d..%0d",
                 task_o.xs, task_o.ys, task_o.nrows, task_o.cf0, task_o.cf1, task_o.rlo, task_o.rhi,
                 e.xs, e.ys, e.nrows, e.cf0, e.cf1, e.rlo, e.rhi);
    end
  end

  always @(posedge clk) task_ready <= #2 ($urandom_range(0, 2) != 0);

  initial begin
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      task_t e;
      int bx, by, mvx, mvy, std, h, X, Y, fx, fy, dx, dy, x0, x1, y0, y1, ch, cr, wau, ph;
      std = $urandom_range(0, 2);
      ch  = ($urandom_range(0, 2) == 0);
      cr  = ch ? $urandom_range(0, 1) : 0;
      wau = ch ? WAU / 2 : WAU;
      ph  = ch ? PH / 2 : PH;
      h   = $urandom_range(0, 1) ? 8 : 4;
      bx  = 4 * $urandom_range(0, wau * 2 - 1);
      by  = 4 * $urandom_range(0, ph / 4 - 1);
      mvx = $signed($urandom_range(0, 400)) - 200;
      mvy = $signed($urandom_range(0, 400)) - 200;
      if (ch) begin
        X = bx + (mvx >>> 3); Y = by + (mvy >>> 3); fx = 0; fy = 0; dx = mvx & 7; dy = mvy & 7;
      end else begin
        X = bx + (mvx >>> 2); Y = by + (mvy >>> 2); fx = mvx & 3; fy = mvy & 3;
        dx = (std == 2) ? (fx & 2) * 2 : 0; dy = (std == 2) ? (fy & 2) * 2 : 0;
      end
      x0 = X; x1 = X + 3; y0 = Y; y1 = Y + h - 1;
      if (ch || std == 2) begin
        if (dx != 0) x1 = X + 4;
        if (dy != 0) y1 = Y + h;
      end else if (std == 0) begin
        if (fx != 0) begin x0 = X - 2; x1 = X + 6; end
        if (fy != 0) begin y0 = Y - 2; y1 = Y + h + 2; end
      end else begin
        if (fx % 2) begin x0 = X - 2; x1 = X + 6; end else if (fx == 2) begin x0 = X - 1; x1 = X + 5; end
        if (fy % 2) begin y0 = Y - 2; y1 = Y + h + 2; end else if (fy == 2) begin y0 = Y - 1; y1 = Y + h + 1; end
      end
      e = '0;
      e.info.id.num = TNUM_W'(num);
      e.info.id.bwd = n[0];
      e.info.std = std_e'(std);
      e.info.blk4x8 = (h == 8);
      e.info.bi = n[1];
      e.info.wt_idx = WT_IDX_W'(n);
      e.info.fx = 2'(fx);
      e.info.fy = 2'(fy);
      e.info.dx = 3'(dx);
      e.info.dy = 3'(dy);
      e.info.id.chroma = ch[0];
      e.info.cr = cr[0];
      e.pic_id = PIC_ID_W'(n);
      e.xs = COORD_W'(X - 2);
      e.ys = COORD_W'((!ch && std != 2 && fy != 0) ? Y - 2 : Y);
      e.nrows = NROW_W'((ch || std == 2) ? ((dy != 0) ? h + 1 : h) : (fy == 0) ? h : h + 5);
      e.cf0 = AUCOL_W'(clampi(x0 >>> 3, 0, wau - 1));
      e.cf1 = AUCOL_W'(clampi(x1 >>> 3, 0, wau - 1));
      e.rlo = ROW_W'(clampi(y0, 0, ph - 1));
      e.rhi = ROW_W'(clampi(y1, 0, ph - 1));
      expq.push_back(e);
      num++;
      @(negedge clk);
      req_valid = 1;
      req = '0; req.chroma = ch[0]; req.cr = cr[0];
      req.std = std_e'(std); req.blk4x8 = (h == 8); req.bwd = n[0]; req.bi = n[1];
      req.pic_id = PIC_ID_W'(n); req.wt_idx = WT_IDX_W'(n);
      req.blk_x = ROW_W'(bx); req.blk_y = ROW_W'(by); req.mvx = MV_W'(mvx); req.mvy = MV_W'(mvy);
      while (!req_ready) @(negedge clk);
      @(posedge clk);
      #1 req_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d tasks lost", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
