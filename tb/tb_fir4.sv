// tb_fir4: random signed inputs compared with -c0 + 5*c1 + 5*c2 - c3.
module tb_fir4;
  logic signed [15:0] c [4];
  logic signed [19:0] y;
  int checks = 0, failures = 0;
  fir4 #(.IN_W(16), .OUT_W(20)) dut (.c, .y);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e;
      for (int i = 0; i < 4; i++) c[i] = 16'($signed($urandom_range(0, 6000)) - 1000);
      #1;
      e = -int'(c[0]) + 5 * int'(c[1]) + 5 * int'(c[2]) - int'(c[3]);
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
