// tb_fir2: every pair of 8-bit inputs compared with (a + b + 1) >> 1.
module tb_fir2;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;
  fir2 dut (.a, .b, .y);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j += 3) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(y) != (i + j + 1) / 2) begin
          failures++;
          if (failures < 10) $display("%0d %0d -> %0d", i, j, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
