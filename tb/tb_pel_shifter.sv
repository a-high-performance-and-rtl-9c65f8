// tb_pel_shifter: random AU pairs taken from a synthetic picture row, with
// row starts inside the picture, left of it and right of it. The 9 output
// bytes must equal the picture pixels at xs..xs+8 with the coordinates clamped
// to the picture (edge replication). The output must appear one cycle after
// the input (one pipeline stage).
module tb_pel_shifter;
  import mc_pkg::*;
  import mc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         in_valid;
  logic [127:0] in_data;
  shift_ctl_t   in_shift;
  blk_info_t    in_info;
  logic [NROW_W-1:0] in_ridx;
  logic         out_valid;
  logic [7:0]   out_row [9];
  blk_info_t    out_info;
  logic [NROW_W-1:0] out_ridx;
  int checks = 0, failures = 0;
  pel_shifter dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; in_data = '0; in_shift = '0; in_info = '0; in_ridx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int wau, w, xs, a0, a1, y;
      wau = $urandom_range(2, 30);
      w   = wau * 8;
      case (n % 3)
        0: xs = $urandom_range(0, w - 1);
        1: xs = -$urandom_range(1, 20);
        default: xs = w - 9 + $urandom_range(0, 20);
      endcase
      y  = $urandom_range(0, 50);
      a0 = xs >>> 3;
      if (a0 < 0) a0 = 0;
      if (a0 > wau - 1) a0 = wau - 1;
      a1 = (a0 == wau - 1) ? a0 : a0 + 1;
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 8; i++) begin
        in_data[i*8 +: 8]      = 8'(pix(1, a0 * 8 + i, y, 4096, 4096));
        in_data[64 + i*8 +: 8] = 8'(pix(1, a1 * 8 + i, y, 4096, 4096));
      end
      in_shift.off = COORD_W'(xs - a0 * 8);
      in_shift.lim = COORD_W'(w - 1 - a0 * 8);
      in_ridx = NROW_W'(n);
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_ridx != NROW_W'(n)) begin
        failures++;
        $display("no output one cycle after input");
      end
      for (int i = 0; i < 9; i++) begin
        int e;
        e = pix(1, xs + i, y, w, 4096);
        checks++;
        if (int'(out_row[i]) != e) begin
          failures++;
          if (failures < 10) $display("w=%0d xs=%0d byte %0d got %0d exp %0d", w, xs, i, out_row[i], e);
        end
      end
      @(negedge clk);
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
