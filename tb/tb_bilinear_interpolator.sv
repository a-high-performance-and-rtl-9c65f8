// tb_bilinear_interpolator: random eighth-pel fractions (as for chroma) and
// MPEG half-pel fractions (dx, dy in {0, 4}), 4x4 and 4x8 blocks, back to back
// with idle cycles. Pixels are compared with the bilinear formula evaluated directly; every
// row must leave with the same fixed latency as the luma interpolator after
// the input row that completes it.
module tb_bilinear_interpolator;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int W = 1024, H = 1024, NTASK = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid;
  logic [7:0] in_row [9];
  logic [2:0] in_dx, in_dy;
  blk_info_t  in_info;
  logic [NROW_W-1:0] in_ridx;
  logic       out_valid;
  logic [7:0] out_pix [4];
  blk_info_t  out_info;
  logic [NROW_W-1:0] out_ridx;

  bilinear_interpolator dut (.*);

  int checks = 0, failures = 0, cycle = 0, cur_out_task = 0;
  int t_pic [NTASK], t_x [NTASK], t_y [NTASK], t_dx [NTASK], t_dy [NTASK], t_h [NTASK];
  int in_cycle [NTASK][16];
  int n_out [NTASK];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int t, yy;
    t = cur_out_task;
    checks++;
    if (n_out[t] != int'(out_ridx)) begin
      failures++;
      $display("row order: task %0d expected row %0d got %0d", t, n_out[t], out_ridx);
    end
    yy = t_y[t] + int'(out_ridx);
    checks++;
    if (cycle != in_cycle[t][int'(out_ridx) + ((t_dy[t] != 0) ? 1 : 0)] + 3) begin
      failures++;
      $display("latency: task %0d row %0d", t, out_ridx);
    end
    for (int x = 0; x < 4; x++) begin
      int e;
      e = bilinear(t_pic[t], t_x[t] + x, yy, t_dx[t], t_dy[t], W, H);
      checks++;
      if (int'(out_pix[x]) != e) begin
        failures++;
        if (failures < 20)
          $display("task %0d d=(%0d,%0d) row %0d col %0d: got %0d exp %0d",
                   t, t_dx[t], t_dy[t], out_ridx, x, out_pix[x], e);
      end
    end
    n_out[t]++;
    if (n_out[t] == t_h[t]) cur_out_task++;
  end

  initial begin
    in_valid = 0; in_info = '0; in_ridx = '0; in_dx = 0; in_dy = 0;
    for (int i = 0; i < 9; i++) in_row[i] = '0;
    for (int t = 0; t < NTASK; t++) begin
      t_pic[t] = $urandom_range(0, 3);
      t_x[t]   = $urandom_range(8, 900);
      t_y[t]   = $urandom_range(8, 900);
      if (t % 2 == 0) begin
        t_dx[t] = $urandom_range(0, 7);
        t_dy[t] = $urandom_range(0, 7);
      end else begin
        t_dx[t] = 4 * $urandom_range(0, 1);
        t_dy[t] = 4 * $urandom_range(0, 1);
      end
      t_h[t]   = $urandom_range(0, 1) ? 8 : 4;
      n_out[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < NTASK; t++) begin
      int nr;
      nr = (t_dy[t] != 0) ? t_h[t] + 1 : t_h[t];
      for (int k = 0; k < nr; k++) begin
        while ($urandom_range(0, 9) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        for (int i = 0; i < 9; i++) in_row[i] <= 8'(pix(t_pic[t], t_x[t] - 2 + i, t_y[t] + k, W, H));
        in_dx   <= 3'(t_dx[t]);
        in_dy   <= 3'(t_dy[t]);
        in_info <= '0;
        in_info.std <= STD_MPEG;
        in_ridx <= NROW_W'(k);
        in_cycle[t][k] = cycle;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    for (int t = 0; t < NTASK; t++) begin
      checks++;
      if (n_out[t] != t_h[t]) begin
        failures++;
        $display("task %0d produced %0d rows, expected %0d", t, n_out[t], t_h[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
