// tb_weighted_predictor: loads random weight-table entries, then sends random
// H.264, AVS and MPEG blocks: single forward, single backward and
// bi-predicted (forward rows followed by backward rows), with idle cycles.
// Outputs are compared with the weighting formulas evaluated directly; forward rows of a
// bi-predicted block must produce nothing, and every output must appear a
// fixed two stages after its input row.
module tb_weighted_predictor;
  import mc_pkg::*;
  import mc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              wt_we;
  logic [WT_IDX_W-1:0] wt_waddr;
  wt_entry_t         wt_wdata;
  logic              in_valid;
  logic [7:0]        in_pix [4];
  blk_info_t         in_info;
  logic [NROW_W-1:0] in_ridx;
  logic              out_valid;
  logic [7:0]        out_pix [4];
  blk_info_t         out_info;
  logic [NROW_W-1:0] out_ridx;
  weighted_predictor dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  wt_entry_t tab [32];
  typedef struct { int pix [4]; int cyc; int ridx; } exp_t;
  exp_t expq [$];

  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      e = expq.pop_front();
      if (cycle != e.cyc + 3 || int'(out_ridx) != e.ridx) begin
        failures++;
        $display("timing/row: out at %0d row %0d, expected %0d row %0d", cycle, out_ridx, e.cyc + 3, e.ridx);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(out_pix[i]) != e.pix[i]) begin
          failures++;
          if (failures < 20) $display("pix %0d got %0d exp %0d", i, out_pix[i], e.pix[i]);
        end
      end
    end
  end

  initial begin
    wt_we = 0; wt_waddr = 0; wt_wdata = '0; in_valid = 0; in_info = '0; in_ridx = 0;
    for (int i = 0; i < 4; i++) in_pix[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 32; i++) begin
      tab[i].w0 = 9'($signed($urandom_range(0, 255)) - 128);
      tab[i].w1 = 9'($signed($urandom_range(0, 255)) - 128);
      tab[i].o  = 9'($signed($urandom_range(0, 255)) - 128);
      tab[i].n  = 4'($urandom_range(0, 7));
      tab[i].ao = 9'($signed($urandom_range(0, 40)) - 20);
      if (i < 4) begin tab[i].w0 = 1; tab[i].w1 = 1; tab[i].o = 0; tab[i].n = 4'(i % 2); tab[i].ao = 0; end
      if (i >= 28) begin   // AVS-style positive scale weights
        tab[i].w0 = 9'($urandom_range(16, 64)); tab[i].w1 = 9'($urandom_range(16, 64));
      end
      @(posedge clk);
      wt_we <= 1; wt_waddr <= WT_IDX_W'(i); wt_wdata <= tab[i];
    end
    @(posedge clk);
    wt_we <= 0;
    for (int b = 0; b < 400; b++) begin
      int kind, h, std, idx;
      int p0 [8][4], p1 [8][4];
      kind = $urandom_range(0, 2);     // 0 fwd, 1 bwd, 2 bi
      h    = $urandom_range(0, 1) ? 8 : 4;
      std  = $urandom_range(0, 2);
      idx  = $urandom_range(0, 31);
      for (int r = 0; r < h; r++)
        for (int i = 0; i < 4; i++) begin p0[r][i] = $urandom_range(0, 255); p1[r][i] = $urandom_range(0, 255); end
      for (int pass = 0; pass < 2; pass++) begin
        bit bwd;
        if (kind != 2 && pass == 1) break;
        bwd = (kind == 1) || (pass == 1);
        for (int r = 0; r < h; r++) begin
          while ($urandom_range(0, 7) == 0) begin in_valid <= 0; @(posedge clk); end
          in_valid <= 1;
          in_info <= '0;
          in_info.std    <= std_e'(std);
          in_info.bi     <= (kind == 2);
          in_info.id.bwd <= bwd;
          in_info.wt_idx <= WT_IDX_W'(idx);
          in_ridx <= NROW_W'(r);
          for (int i = 0; i < 4; i++) in_pix[i] <= 8'(bwd ? p1[r][i] : p0[r][i]);
          if (kind != 2 || bwd) begin
            exp_t e;
            e.cyc = cycle; e.ridx = r;
            for (int i = 0; i < 4; i++)
              e.pix[i] = wp(p0[r][i], p1[r][i], kind == 2, kind == 1, std == 1,
                            int'(tab[idx].w0), int'(tab[idx].w1), int'(tab[idx].o),
                            int'(tab[idx].n), int'(tab[idx].ao));
            expq.push_back(e);
          end
          @(posedge clk);
        end
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
