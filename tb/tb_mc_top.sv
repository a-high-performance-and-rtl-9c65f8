// tb_mc_top: end-to-end test of the motion compensation pipeline at its
// default parameters, with a 1920x1088 picture in the external memory model.
//
// Macroblocks in raster order (plus some at the right and bottom picture
// edges) are split into 4x8 or 4x4 luma basic blocks of H.264, AVS or MPEG-1/2;
// MVs jitter around a macroblock MV so that all 16 quarter-pel positions
// occur; some MVs point far outside the picture; some blocks are
// bi-predicted (forward task, then backward task); each macroblock also sends
// its 8x8 Cb and Cr blocks (4:2:0) as 4-wide chroma tasks with 1/8-pel MVs,
// checked against the bilinear model on the half-size chroma planes;
// weight-table entries are
// random for H.264 and AVS and fixed to 1 for MPEG. Each predicted row is
// compared with the reference models: interpolation of the edge-replicated
// picture, then weighted prediction. The test counts how often each mechanism occurs
// (cache hit, miss, conflict stall, wait for memory data, bi-prediction,
// edge padding, chroma, each standard, each fractional position) and fails any that
// never does. It also reports the bandwidth reduction against 4x4 fetching
// without a cache and the rows per cycle.
module tb_mc_top;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int WAU = 240, PW = WAU * 8, PH = 1088;
  localparam int NMB = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AUCOL_W-1:0] pic_w_au = AUCOL_W'(WAU);
  logic [ROW_W-1:0]   pic_h = ROW_W'(PH);
  logic wt_we;
  logic [WT_IDX_W-1:0] wt_waddr;
  wt_entry_t wt_wdata;
  logic req_valid, req_ready;
  mc_req_t req;
  logic mreq_valid, mreq_ready, mresp_valid;
  au_block_t mreq;
  logic [AU_W-1:0] mresp_data;
  logic pred_valid;
  logic [7:0] pred_pix [4];
  blk_info_t pred_info;
  logic [NROW_W-1:0] pred_ridx;
  logic stat_conflict, stat_hit_au, stat_miss_au, stat_wait;
  int n_req, n_au;

  mc_top dut (.*);
  ext_mem_model #(.LATENCY(12), .PIC_W(PW), .PIC_H(PH)) u_mem (
    .clk, .rst_n, .mreq_valid, .mreq_ready, .mreq, .mresp_valid, .mresp_data, .n_req, .n_au);

  int checks = 0, failures = 0, cycle = 0;
  int n_conf = 0, n_hit = 0, n_miss = 0, n_wait = 0, n_rows = 0, first_row = -1, last_row = 0;
  int n_bi = 0, n_chroma = 0, n_pad = 0, n_std [3] = '{0, 0, 0}, n_pos [2][16];
  longint base_au = 0;
  wt_entry_t tab [32];

  typedef struct { int pix [4]; int ridx; } erow_t;
  erow_t expq [$];
  int    fwd_pred [8][4];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_conf += int'(stat_conflict);
    n_hit  += int'(stat_hit_au);
    n_miss += int'(stat_miss_au);
    n_wait += int'(stat_wait);
  end

  always @(posedge clk) if (rst_n && pred_valid) begin
    erow_t e;
    if (first_row < 0) first_row = cycle;
    last_row = cycle;
    n_rows++;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected output row");
    end else begin
      e = expq.pop_front();
      if (int'(pred_ridx) != e.ridx) begin
        failures++;
        $display("row %0d expected %0d", pred_ridx, e.ridx);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(pred_pix[i]) != e.pix[i]) begin
          failures++;
          if (failures < 20) $display("row %0d pix %0d got %0d exp %0d", e.ridx, i, pred_pix[i], e.pix[i]);
        end
      end
    end
  end

  function automatic int fdiv8(input int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction
  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // interpolated sample of one basic-block pixel
  function automatic int interp(input int std, input int pic, input int x, input int y,
                                input int fx, input int fy);
    if (std == 0) return h264_luma(pic, x, y, fx, fy, PW, PH);
    if (std == 1) return avs_luma(pic, x, y, fx, fy, PW, PH);
    return bilinear(pic, x, y, (fx & 2) * 2, (fy & 2) * 2, PW, PH);
  endfunction

  // sends one task and records what it must produce
  task automatic send(input int pic, input int std, input int bx, input int by, input int mvx,
                      input int mvy, input int h, input int bwd, input int bi, input int idx);
    int X, Y, fx, fy;
    int p [8][4];
    X = bx + (mvx >>> 2); Y = by + (mvy >>> 2); fx = mvx & 3; fy = mvy & 3;
    n_std[std]++;
    if (std != 2) n_pos[std][fy * 4 + fx]++;
    if (X - 2 < 0 || X + 6 >= PW || Y - 2 < 0 || Y + h + 2 >= PH) n_pad++;
    // baseline bandwidth: every 4x4 block fetched without a cache
    for (int half = 0; half < h / 4; half++) begin
      int x0, x1, y0, y1;
      x0 = X; x1 = X + 3; y0 = Y + 4 * half; y1 = y0 + 3;
      if (std == 2) begin if (fx != 0) x1++; if (fy != 0) y1++; end
      else begin
        if (fx != 0) begin x0 -= 2; x1 += 3; end
        if (fy != 0) begin y0 -= 2; y1 += 3; end
      end
      base_au += longint'((clampi(fdiv8(x1), 0, WAU - 1) - clampi(fdiv8(x0), 0, WAU - 1) + 1) *
                          (clampi(y1, 0, PH - 1) - clampi(y0, 0, PH - 1) + 1));
    end
    for (int r = 0; r < h; r++)
      for (int x = 0; x < 4; x++) p[r][x] = interp(std, pic, X + x, Y + r, fx, fy);
    if (bi && !bwd) begin
      for (int r = 0; r < h; r++) for (int x = 0; x < 4; x++) fwd_pred[r][x] = p[r][x];
    end else begin
      for (int r = 0; r < h; r++) begin
        erow_t e;
        e.ridx = r;
        for (int x = 0; x < 4; x++)
          e.pix[x] = wp(bi ? fwd_pred[r][x] : p[r][x], p[r][x], bi != 0, bwd != 0 && bi == 0, std == 1,
                        int'(tab[idx].w0), int'(tab[idx].w1), int'(tab[idx].o), int'(tab[idx].n),
                        int'(tab[idx].ao));
        expq.push_back(e);
      end
      if (bi) n_bi++;
    end
    @(negedge clk);
    req_valid  = 1;
    req        = '0;
    req.std    = std_e'(std);
    req.blk4x8 = (h == 8);
    req.bwd    = bwd[0];
    req.bi     = bi[0];
    req.pic_id = PIC_ID_W'(pic);
    req.wt_idx = WT_IDX_W'(idx);
    req.blk_x  = ROW_W'(bx);
    req.blk_y  = ROW_W'(by);
    req.mvx    = MV_W'(mvx);
    req.mvy    = MV_W'(mvy);
    // ready is stable at the falling edge; the handshake happens at the next rising edge
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  // sends one chroma task (4:2:0 plane coordinates, 1/8-pel MV)
  task automatic send_c(input int pic, input int std, input int cr, input int bx, input int by,
                        input int mvx, input int mvy, input int h, input int bwd, input int bi,
                        input int idx);
    int X, Y, dx, dy, x1, y1;
    int p [8][4];
    X = bx + (mvx >>> 3); Y = by + (mvy >>> 3); dx = mvx & 7; dy = mvy & 7;
    n_chroma++;
    x1 = X + ((dx != 0) ? 4 : 3); y1 = Y + h - ((dy != 0) ? 0 : 1);
    for (int half = 0; half < h / 4; half++)
      base_au += longint'((clampi(fdiv8(x1), 0, WAU / 2 - 1) - clampi(fdiv8(X), 0, WAU / 2 - 1) + 1) *
                          (clampi(Y + 4 * half + ((dy != 0) ? 4 : 3), 0, PH / 2 - 1) -
                           clampi(Y + 4 * half, 0, PH / 2 - 1) + 1));
    for (int r = 0; r < h; r++)
      for (int x = 0; x < 4; x++)
        p[r][x] = bilinear(pic + 16 * (1 + cr), X + x, Y + r, dx, dy, PW / 2, PH / 2);
    if (bi && !bwd) begin
      for (int r = 0; r < h; r++) for (int x = 0; x < 4; x++) fwd_pred[r][x] = p[r][x];
    end else begin
      for (int r = 0; r < h; r++) begin
        erow_t e;
        e.ridx = r;
        for (int x = 0; x < 4; x++)
          e.pix[x] = wp(bi ? fwd_pred[r][x] : p[r][x], p[r][x], bi != 0, bwd != 0 && bi == 0, std == 1,
                        int'(tab[idx].w0), int'(tab[idx].w1), int'(tab[idx].o), int'(tab[idx].n),
                        int'(tab[idx].ao));
        expq.push_back(e);
      end
    end
    @(negedge clk);
    req_valid  = 1;
    req        = '0;
    req.std    = std_e'(std);
    req.chroma = 1'b1;
    req.cr     = cr[0];
    req.blk4x8 = (h == 8);
    req.bwd    = bwd[0];
    req.bi     = bi[0];
    req.pic_id = PIC_ID_W'(pic);
    req.wt_idx = WT_IDX_W'(idx);
    req.blk_x  = ROW_W'(bx);
    req.blk_y  = ROW_W'(by);
    req.mvx    = MV_W'(mvx);
    req.mvy    = MV_W'(mvy);
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  initial begin
    req_valid = 0; req = '0; wt_we = 0; wt_waddr = 0; wt_wdata = '0;
    for (int s = 0; s < 2; s++) for (int i = 0; i < 16; i++) n_pos[s][i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // weight table: 0 single/1 bi with weight 1 (MPEG and defaults),
    // 2..15 H.264 explicit, 16..23 AVS (scale 32 = 1.0)
    for (int i = 0; i < 32; i++) begin
      tab[i] = '0;
      if (i < 2) begin tab[i].w0 = 1; tab[i].w1 = 1; tab[i].n = 4'(i); end
      else if (i < 16) begin
        int lwd;
        lwd = $urandom_range(1, 6);
        tab[i].w0 = 9'($urandom_range(0, 2 << lwd)); tab[i].w1 = 9'($urandom_range(0, 2 << lwd));
        tab[i].n  = 4'(lwd + (i % 2));   // odd entries serve bi-prediction
        tab[i].o  = 9'($signed($urandom_range(0, 40)) - 20);
      end else begin
        tab[i].w0 = 9'($urandom_range(20, 44)); tab[i].w1 = 9'($urandom_range(20, 44));
        tab[i].n  = 4'(i % 2);
        tab[i].ao = 9'($signed($urandom_range(0, 20)) - 10);
      end
      @(negedge clk);
      wt_we = 1; wt_waddr = WT_IDX_W'(i); wt_wdata = tab[i];
    end
    @(negedge clk);
    wt_we = 0;
    for (int mb = 0; mb < NMB; mb++) begin
      int mbx, mby, mvx, mvy, std, pic, h, bi;
      mbx = (mb % 40) * 16;
      mby = (mb / 40) * 16;
      if (mb >= 80) begin mbx = PW - 16 * (1 + mb % 6); mby = PH - 16 * (1 + (mb / 6) % 3); end
      std = (mb / 2) % 3;
      pic = $urandom_range(0, 3);
      mvx = $signed($urandom_range(0, 48)) - 24;
      mvy = $signed($urandom_range(0, 48)) - 24;
      if (mb % 9 == 4) begin mvx = -400; mvy = -300; end
      if (mb % 11 == 6) begin mvx = 300; mvy = 200; end
      h  = (mb % 2 == 0) ? 8 : 4;
      bi = (mb % 5 == 2);
      for (int by = 0; by < 16; by += h)
        for (int bx = 0; bx < 16; bx += 4) begin
          int jx, jy, idx, vx, vy;
          jx = $urandom_range(0, 3);
          jy = $urandom_range(0, 3);
          vx = mvx + jx; vy = mvy + jy;
          if (std == 2) begin vx = vx & ~1; vy = vy & ~1; end
          if (std == 2)      idx = bi ? 1 : 0;
          else if (std == 0) idx = 2 * $urandom_range(1, 7) + (bi ? 1 : 0);
          else               idx = 16 + 2 * $urandom_range(0, 3) + (bi ? 1 : 0);
          send(pic, std, mbx + bx, mby + by, vx, vy, h, 0, bi, idx);
          if (bi) send((pic + 1) % 4, std, mbx + bx, mby + by, -vx + 1, vy + 2, h, 1, bi, idx);
        end
      // chroma of the macroblock: an 8x8 block per plane as two 4-wide columns
      for (int cr = 0; cr < 2; cr++)
        for (int by = 0; by < 8; by += h)
          for (int bx = 0; bx < 8; bx += 4) begin
            int vx, vy, idx;
            vx = mvx + $urandom_range(0, 7); vy = mvy + $urandom_range(0, 7);
            if (std == 2) begin vx = vx & ~3; vy = vy & ~3; end
            if (std == 2)      idx = bi ? 1 : 0;
            else if (std == 0) idx = 2 * $urandom_range(1, 7) + (bi ? 1 : 0);
            else               idx = 16 + 2 * $urandom_range(0, 3) + (bi ? 1 : 0);
            send_c(pic, std, cr, mbx / 2 + bx, mby / 2 + by, vx, vy, h, 0, bi, idx);
            if (bi) send_c((pic + 1) % 4, std, cr, mbx / 2 + bx, mby / 2 + by, -vx + 1, vy + 2, h, 1, bi, idx);
          end
      if (mb % 20 == 19) begin
        // same cache lines, different tags: the second task conflicts
        send(0, 0, 400, 400, 1, 1, 8, 0, 0, 0);
        send(0, 0, 400, 432, 1, 1, 8, 0, 0, 0);
      end
    end
    while (expq.size() != 0 && cycle < 400000) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d rows never produced", expq.size()); end
    $display("AUs fetched %0d in %0d requests; no-cache 4x4 baseline %0d AUs; Rc = %0d%%",
             n_au, n_req, base_au, int'((base_au - longint'(n_au)) * 100 / base_au));
    $display("output rows %0d in %0d cycles", n_rows, last_row - first_row + 1);
    $display("hits %0d misses %0d conflict-stall cycles %0d wait cycles %0d bi %0d padded %0d H264 %0d AVS %0d MPEG %0d",
             n_hit, n_miss, n_conf, n_wait, n_bi, n_pad, n_std[0], n_std[1], n_std[2]);
    $display("chroma blocks %0d", n_chroma);
    checks++; if (n_hit == 0)  begin failures++; $display("never: cache hit"); end
    checks++; if (n_miss == 0) begin failures++; $display("never: cache miss"); end
    checks++; if (n_conf == 0) begin failures++; $display("never: conflict stall"); end
    checks++; if (n_wait == 0) begin failures++; $display("never: wait for memory"); end
    checks++; if (n_chroma == 0) begin failures++; $display("never: chroma"); end
    checks++; if (n_bi == 0)   begin failures++; $display("never: bi-prediction"); end
    checks++; if (n_pad == 0)  begin failures++; $display("never: edge padding"); end
    for (int s = 0; s < 3; s++) begin
      checks++; if (n_std[s] == 0) begin failures++; $display("never: standard %0d", s); end
    end
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (n_pos[s][i] == 0) begin failures++; $display("never: std %0d position %0d", s, i); end
      end
    checks++;
    if (longint'(n_au) >= base_au) begin failures++; $display("no bandwidth reduction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
