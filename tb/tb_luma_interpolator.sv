// tb_luma_interpolator: random H.264 and AVS tasks, all 16 quarter-pel
// positions, 4x4 and 4x8 blocks, fed back to back with random idle cycles.
// Every output pixel is compared with the per-pixel reference model, and every
// output row must leave exactly two cycles after the input row that completes
// it (row y+3 when fy != 0, row y otherwise): the row is driven in cycle c,
// captured at the end of c, and the result is sampled by the checker at the
// end of cycle c+2, which this counter shows as c+3.
module tb_luma_interpolator;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int W = 1024, H = 1024, NTASK = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid;
  logic [7:0] in_row [9];
  blk_info_t  in_info;
  logic [NROW_W-1:0] in_ridx;
  logic       out_valid;
  logic [7:0] out_pix [4];
  blk_info_t  out_info;
  logic [NROW_W-1:0] out_ridx;

  luma_interpolator dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int t_pic [NTASK], t_x [NTASK], t_y [NTASK], t_fx [NTASK], t_fy [NTASK], t_std [NTASK], t_h [NTASK];
  int in_cycle [NTASK][16];
  int n_out [NTASK];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int t, yy, first_in;
    t = int'(out_info.id.num) + 32 * 0;
    // task numbers wrap at 32; recover the task from the row order
    t = cur_out_task;
    if (n_out[t] != int'(out_ridx)) begin
      failures++;
      $display("row order: task %0d expected row %0d got %0d", t, n_out[t], out_ridx);
    end
    yy = t_y[t] + int'(out_ridx);
    first_in = in_cycle[t][int'(out_ridx) + ((t_fy[t] != 0) ? 5 : 0)];
    checks++;
    if (cycle != first_in + 3) begin
      failures++;
      $display("latency: task %0d row %0d out at %0d, in at %0d", t, out_ridx, cycle, first_in);
    end
    for (int x = 0; x < 4; x++) begin
      int e;
      e = (t_std[t] == 1) ? avs_luma(t_pic[t], t_x[t] + x, yy, t_fx[t], t_fy[t], W, H)
                          : h264_luma(t_pic[t], t_x[t] + x, yy, t_fx[t], t_fy[t], W, H);
      checks++;
      if (int'(out_pix[x]) != e) begin
        failures++;
        if (failures < 20)
          $display("task %0d std %0d f=(%0d,%0d) row %0d col %0d: got %0d exp %0d",
                   t, t_std[t], t_fx[t], t_fy[t], out_ridx, x, out_pix[x], e);
      end
    end
    n_out[t]++;
    if (n_out[t] == t_h[t]) cur_out_task++;
  end

  int cur_out_task = 0;

  initial begin
    in_valid = 0;
    in_info  = '0;
    in_ridx  = '0;
    for (int i = 0; i < 9; i++) in_row[i] = '0;
    for (int t = 0; t < NTASK; t++) begin
      t_pic[t] = $urandom_range(0, 3);
      t_x[t]   = $urandom_range(8, 900);
      t_y[t]   = $urandom_range(8, 900);
      t_fx[t]  = (t < 32) ? (t % 4) : $urandom_range(0, 3);
      t_fy[t]  = (t < 32) ? ((t / 4) % 4) : $urandom_range(0, 3);
      t_std[t] = (t < 32) ? (t / 16) : $urandom_range(0, 1);
      t_h[t]   = $urandom_range(0, 1) ? 8 : 4;
      n_out[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < NTASK; t++) begin
      int nr, y0;
      nr = (t_fy[t] != 0) ? t_h[t] + 5 : t_h[t];
      y0 = (t_fy[t] != 0) ? t_y[t] - 2 : t_y[t];
      for (int k = 0; k < nr; k++) begin
        while ($urandom_range(0, 9) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        for (int i = 0; i < 9; i++) in_row[i] <= 8'(pix(t_pic[t], t_x[t] - 2 + i, y0 + k, W, H));
        in_info.id.num <= TNUM_W'(t);
        in_info.std    <= (t_std[t] == 1) ? STD_AVS : STD_H264;
        in_info.fx     <= 2'(t_fx[t]);
        in_info.fy     <= 2'(t_fy[t]);
        in_ridx        <= NROW_W'(k);
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
