// tb_qfir: random samples compared with (p0 + 7p1 + 7p2 + p3 + 8) >> 4,
// including the all-255 corner.
module tb_qfir;
  logic [7:0] p [4];
  logic [7:0] y;
  int checks = 0, failures = 0;
  qfir dut (.p, .y);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e;
      for (int i = 0; i < 4; i++) p[i] = (n == 0) ? 8'd255 : 8'($urandom_range(0, 255));
      #1;
      e = (int'(p[0]) + 7 * int'(p[1]) + 7 * int'(p[2]) + int'(p[3]) + 8) >> 4;
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("got %0d exp %0d", y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
