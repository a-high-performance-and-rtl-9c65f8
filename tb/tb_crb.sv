// tb_crb: shifts random rows into the register bank in both modes, with idle
// cycles, and compares all 54 registers with a model of the row queue:
// H.264 keeps the last six rows in A..F; AVS keeps the last four in A, B, E, F
// with C and D zero.
module tb_crb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shift_en, avs;
  logic [7:0] row_in [9];
  logic [7:0] rows [6][9];
  int checks = 0, failures = 0;
  logic [7:0] hist [1000][9];
  int m = 0;
  crb dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    shift_en = 0; avs = 0;
    for (int i = 0; i < 9; i++) row_in[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      avs = phase[0];
      for (int n = 0; n < 300; n++) begin
        logic [7:0] r [9];
        @(negedge clk);
        shift_en = ($urandom_range(0, 3) != 0);
        for (int i = 0; i < 9; i++) begin r[i] = 8'($urandom); row_in[i] = r[i]; end
        @(posedge clk);
        if (shift_en) begin
          for (int i = 0; i < 9; i++) hist[m][i] = r[i];
          m++;
        end
        #1;
        if (n >= 10) begin
          for (int c = 0; c < 9; c++) begin
            logic [7:0] e [6];
            if (!avs) for (int k = 0; k < 6; k++) e[k] = hist[m-6+k][c];
            else begin
              e[0] = hist[m-4][c]; e[1] = hist[m-3][c]; e[2] = 0; e[3] = 0;
              e[4] = hist[m-2][c]; e[5] = hist[m-1][c];
            end
            for (int k = 0; k < 6; k++) begin
              checks++;
              if (rows[k][c] != e[k]) begin
                failures++;
                if (failures < 10) $display("avs=%0d row %0d col %0d got %0d exp %0d", avs, k, c, rows[k][c], e[k]);
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
