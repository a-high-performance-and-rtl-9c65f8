// tb_cache_2d: the 2-D cache against the external memory model.
//
// Requests follow a decoder-like pattern: macroblocks in raster order, each
// split into 4x8 or 4x4 basic luma blocks whose MVs jitter around a
// macroblock MV, followed by the Cb and Cr blocks of its two 8x8 chroma
// blocks (checked against the chroma planes at half size), some bi-predicted (a forward and a backward task), some with large MVs or
// pointing outside the picture, plus pairs of tasks 32 rows apart (same cache
// lines, different tags) that force conflict stalls. For every delivered row
// the testbench checks the row number and, for each of the two AUs that lies
// in the task's fetch window, all 8 bytes against the picture. The window and
// row rules are re-derived here. It also counts hits, misses, conflict
// stalls and waits for memory (each must occur), reports the bandwidth
// reduction against fetching every 4x4 block without a cache, and checks
// that the pipeline delivers rows at a sustained rate despite the 12+ cycle
// memory latency.
module tb_cache_2d;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int WAU = 240, PW = WAU * 8, PH = 1088;
  localparam int NMB = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AUCOL_W-1:0] pic_w_au = AUCOL_W'(WAU);
  logic [ROW_W-1:0]   pic_h = ROW_W'(PH);
  logic req_valid, req_ready;
  mc_req_t req;
  logic mreq_valid, mreq_ready, mresp_valid;
  au_block_t mreq;
  logic [AU_W-1:0] mresp_data;
  logic row_valid;
  logic [2*AU_W-1:0] row_data;
  blk_info_t row_info;
  logic [NROW_W-1:0] row_ridx;
  shift_ctl_t row_shift;
  logic stat_conflict, stat_hit_au, stat_miss_au, stat_wait;
  int n_req, n_au;

  cache_2d dut (.*);
  ext_mem_model #(.LATENCY(12), .PIC_W(PW), .PIC_H(PH)) u_mem (
    .clk, .rst_n, .mreq_valid, .mreq_ready, .mreq, .mresp_valid, .mresp_data, .n_req, .n_au);

  int checks = 0, failures = 0, cycle = 0;
  int n_conf = 0, n_hit = 0, n_miss = 0, n_wait = 0, n_rows = 0, first_row = -1, last_row = 0;
  int n_crows = 0;
  longint base_au = 0;

  typedef struct {
    int pic, std, X, Y, fx, fy, h, bwd, ch, cr, dx, dy;
    int ys, nrows, cf0, cf1, rlo, rhi, xs;
  } tsk_t;
  tsk_t tq [$];
  int   k = 0;

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic int fdiv8(input int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  // window rules, written independently of the RTL
  function automatic tsk_t mk(input int pic, input int std, input int bx, input int by,
                              input int mvx, input int mvy, input int h, input int bwd,
                              input int ch = 0, input int cr = 0);
    tsk_t t;
    int x0, x1, y0, y1, wau, ph;
    t.pic = pic; t.std = std; t.h = h; t.bwd = bwd; t.ch = ch; t.cr = cr;
    if (ch != 0) begin
      // chroma: plane pixels, MV in 1/8 pel, bilinear window
      t.X = bx + (mvx >>> 3); t.Y = by + (mvy >>> 3); t.fx = 0; t.fy = 0;
      t.dx = mvx & 7; t.dy = mvy & 7;
    end else begin
      t.X = bx + (mvx >>> 2); t.Y = by + (mvy >>> 2); t.fx = mvx & 3; t.fy = mvy & 3;
      t.dx = (std == 2) ? (mvx & 2) * 2 : 0; t.dy = (std == 2) ? (mvy & 2) * 2 : 0;
    end
    wau = (ch != 0) ? WAU / 2 : WAU; ph = (ch != 0) ? PH / 2 : PH;
    x0 = t.X; x1 = t.X + 3; y0 = t.Y; y1 = t.Y + h - 1;
    if (ch != 0 || std == 2) begin
      if (t.dx != 0) x1 += 1;
      if (t.dy != 0) y1 += 1;
    end else if (std == 0) begin
      if (t.fx != 0) begin x0 -= 2; x1 += 3; end
      if (t.fy != 0) begin y0 -= 2; y1 += 3; end
    end else if (std == 1) begin
      if (t.fx % 2 == 1) begin x0 -= 2; x1 += 3; end else if (t.fx == 2) begin x0 -= 1; x1 += 2; end
      if (t.fy % 2 == 1) begin y0 -= 2; y1 += 3; end else if (t.fy == 2) begin y0 -= 1; y1 += 2; end
    end
    t.cf0 = clampi(fdiv8(x0), 0, wau - 1); t.cf1 = clampi(fdiv8(x1), 0, wau - 1);
    t.rlo = clampi(y0, 0, ph - 1); t.rhi = clampi(y1, 0, ph - 1);
    t.xs = t.X - 2;
    // MPEG-1/2 luma is half pel only: the quarter bit of an MV is ignored
    if (ch == 0 && std != 2 && t.fy != 0) begin t.ys = t.Y - 2; t.nrows = h + 5; end
    else if (t.dy != 0) begin t.ys = t.Y; t.nrows = h + 1; end
    else begin t.ys = t.Y; t.nrows = h; end
    return t;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_conf += int'(stat_conflict);
    n_hit  += int'(stat_hit_au);
    n_miss += int'(stat_miss_au);
    n_wait += int'(stat_wait);
  end

  always @(posedge clk) if (rst_n && row_valid) begin
    tsk_t t;
    int yc, a0, a1, wau, ph;
    if (tq.size() == 0) begin
      failures++;
      $display("row without task");
    end else begin
      t = tq[0];
      if (first_row < 0) first_row = cycle;
      last_row = cycle;
      n_rows++;
      if (t.ch != 0) n_crows++;
      wau = (t.ch != 0) ? WAU / 2 : WAU; ph = (t.ch != 0) ? PH / 2 : PH;
      checks++;
      if (int'(row_ridx) != k || int'(row_info.fx) != t.fx || int'(row_info.fy) != t.fy ||
          int'(row_info.dx) != t.dx || int'(row_info.dy) != t.dy ||
          int'(row_info.id.chroma) != t.ch || (t.ch != 0 && int'(row_info.cr) != t.cr) ||
          int'(row_info.id.bwd) != t.bwd) begin
        failures++;
        $display("row %0d (exp %0d) info mismatch", row_ridx, k);
      end
      yc = clampi(t.ys + k, 0, ph - 1);
      a0 = clampi(fdiv8(t.xs), 0, wau - 1);
      a1 = (a0 == wau - 1) ? a0 : a0 + 1;
      checks++;
      if (int'(row_shift.off) != t.xs - a0 * 8) begin
        failures++;
        $display("shift offset %0d exp %0d", row_shift.off, t.xs - a0 * 8);
      end
      for (int s = 0; s < 2; s++) begin
        int a;
        a = (s == 0) ? a0 : a1;
        if (a >= t.cf0 && a <= t.cf1 && yc >= t.rlo && yc <= t.rhi)
          for (int i = 0; i < 8; i++) begin
            int e;
            e = (t.ch != 0) ? pix(t.pic + 16 * (1 + t.cr), a * 8 + i, yc, PW / 2, PH / 2)
                            : pix(t.pic, a * 8 + i, yc, PW, PH);
            checks++;
            if (int'(row_data[s*64 + i*8 +: 8]) != e) begin
              failures++;
              if (failures < 20)
                $display("task pic %0d X %0d Y %0d row %0d AU %0d byte %0d: got %0d exp %0d",
                         t.pic, t.X, t.Y, k, a, i, row_data[s*64 + i*8 +: 8], e);
            end
          end
      end
      k++;
      if (k == t.nrows) begin
        k = 0;
        void'(tq.pop_front());
      end
    end
  end

  task automatic send(input int pic, input int std, input int bx, input int by,
                      input int mvx, input int mvy, input int h, input int bwd, input int bi,
                      input int ch = 0, input int cr = 0);
    tsk_t t;
    t = mk(pic, std, bx, by, mvx, mvy, h, bwd, ch, cr);
    // baseline bandwidth: 4x4 blocks, no cache, H.264/AVS/MPEG windows
    for (int half = 0; half < h / 4; half++) begin
      tsk_t b;
      b = mk(pic, std, bx, by + 4 * half, mvx, mvy, 4, bwd, ch, cr);
      base_au += longint'((b.cf1 - b.cf0 + 1) * (b.rhi - b.rlo + 1));
    end
    @(negedge clk);
    req_valid = 1;
    req        = '0;
    req.std    = std_e'(std);
    req.chroma = (ch != 0);
    req.cr     = cr[0];
    req.blk4x8 = (h == 8);
    req.bwd    = bwd[0];
    req.bi     = bi[0];
    req.pic_id = PIC_ID_W'(pic);
    req.wt_idx = '0;
    req.blk_x  = ROW_W'(bx);
    req.blk_y  = ROW_W'(by);
    req.mvx    = MV_W'(mvx);
    req.mvy    = MV_W'(mvy);
    // ready is stable at the falling edge; the handshake happens at the next rising edge
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    tq.push_back(t);
    #1 req_valid = 0;
  endtask

  initial begin
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int mb = 0; mb < NMB; mb++) begin
      int mbx, mby, mvx, mvy, std, pic, h;
      mbx = (mb % 20) * 16 + ((mb >= 40) ? 1600 : 0);
      mby = (mb / 20) * 16 + ((mb >= 40) ? 1050 : 0);
      std = mb % 3;
      pic = $urandom_range(0, 3);
      mvx = $signed($urandom_range(0, 64)) - 32;
      mvy = $signed($urandom_range(0, 64)) - 32;
      if (mb % 7 == 3) begin mvx = mvx * 20; mvy = mvy * 8; end
      if (mb < 20 && mb % 5 == 0) begin mvx = -200; mvy = -120; end  // off the picture
      h = (mb % 2 == 0) ? 8 : 4;
      for (int by = 0; by < 16; by += h)
        for (int bx = 0; bx < 16; bx += 4) begin
          int jx, jy, bi;
          jx = $urandom_range(0, 2) - 1;
          jy = $urandom_range(0, 2) - 1;
          bi = (mb % 4 == 1);
          if (std == 2) begin jx = jx * 2; jy = jy * 2; end
          send(pic, std, mbx + bx, mby + by, ((std == 2) ? (mvx & ~1) : mvx) + jx,
               ((std == 2) ? (mvy & ~1) : mvy) + jy, h, 0, bi);
          if (bi) send((pic + 1) % 4, std, mbx + bx, mby + by, -mvx, -mvy, h, 1, bi);
        end
      // the two 8x8 chroma blocks of the macroblock; the luma MV in quarter
      // luma pel is the chroma MV in 1/8 chroma pel
      for (int cr = 0; cr < 2; cr++)
        for (int by = 0; by < 8; by += h)
          for (int bx = 0; bx < 8; bx += 4) begin
            send(pic, std, mbx / 2 + bx, mby / 2 + by, mvx, mvy, h, 0, 0, 1, cr);
            if (mb % 4 == 1)
              send((pic + 1) % 4, std, mbx / 2 + bx, mby / 2 + by, -mvx, -mvy, h, 1, 1, 1, cr);
          end
      if (mb % 10 == 9) begin
        // same cache lines, different tags: the second task conflicts
        send(0, 0, 400, 400, 1, 1, 8, 0, 0);
        send(0, 0, 400, 432, 1, 1, 8, 0, 0);
      end
    end
    while (tq.size() != 0 && cycle < 200000) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (tq.size() != 0) begin failures++; $display("%0d tasks never delivered", tq.size()); end
    $display("AUs fetched %0d in %0d requests; no-cache 4x4 baseline %0d AUs; Rc = %0d%%",
             n_au, n_req, base_au, int'((base_au - longint'(n_au)) * 100 / base_au));
    $display("rows %0d in %0d cycles; AU hits %0d misses(pairs) %0d conflict-stall cycles %0d wait cycles %0d",
             n_rows, last_row - first_row + 1, n_hit, n_miss, n_conf, n_wait);
    checks++; if (n_hit == 0)  begin failures++; $display("no cache hit"); end
    checks++; if (n_miss == 0) begin failures++; $display("no cache miss"); end
    checks++; if (n_conf == 0) begin failures++; $display("no conflict stall"); end
    checks++; if (n_crows == 0) begin failures++; $display("no chroma rows"); end
    checks++; if (n_wait == 0) begin failures++; $display("output never waited for memory"); end
    checks++; if (longint'(n_au) >= base_au) begin failures++; $display("no bandwidth reduction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
