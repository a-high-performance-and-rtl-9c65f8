// tb_cfir: random signed inputs in both modes, compared with the H.264 6-tap
// and AVS 4-tap sums written out directly.
module tb_cfir;
  logic avs;
  logic signed [15:0] c [6];
  logic signed [22:0] h;
  int checks = 0, failures = 0;
  cfir #(.IN_W(16), .OUT_W(23)) dut (.avs, .c, .h);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e;
      avs = n[0];
      for (int i = 0; i < 6; i++) c[i] = 16'($signed($urandom_range(0, 20000)) - 10000);
      if (n < 4) for (int i = 0; i < 6; i++) c[i] = (n < 2) ? 16'sd255 : -16'sd2550;
      #1;
      if (avs) e = -int'(c[1]) + 5 * int'(c[2]) + 5 * int'(c[3]) - int'(c[4]);
      else     e = int'(c[0]) - 5 * int'(c[1]) + 20 * int'(c[2]) + 20 * int'(c[3]) - 5 * int'(c[4]) + int'(c[5]);
      checks++;
      if (int'(h) != e) begin
        failures++;
        if (failures < 10) $display("avs=%0d got %0d exp %0d", avs, h, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
