// tb_fir6: random pixel columns in both modes, compared with the H.264 6-tap
// vertical sum and the AVS sum 5*rb + 5*re - ra - rf (rc, rd ignored).
module tb_fir6;
  logic avs;
  logic signed [8:0] r [6];
  logic signed [15:0] v;
  int checks = 0, failures = 0;
  fir6 #(.IN_W(9), .OUT_W(16)) dut (.avs, .r, .v);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e;
      avs = n[0];
      for (int i = 0; i < 6; i++) r[i] = 9'($urandom_range(0, 255));
      #1;
      if (avs) e = 5 * int'(r[1]) + 5 * int'(r[4]) - int'(r[0]) - int'(r[5]);
      else     e = int'(r[0]) - 5 * int'(r[1]) + 20 * int'(r[2]) + 20 * int'(r[3]) - 5 * int'(r[4]) + int'(r[5]);
      checks++;
      if (int'(v) != e) begin
        failures++;
        if (failures < 10) $display("avs=%0d got %0d exp %0d", avs, v, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
