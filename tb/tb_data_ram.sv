// tb_data_ram: random writes and reads against an array model; the read data
// of an address must appear in the cycle after the address.
module tb_data_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [7:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [256];
  int checks = 0, failures = 0;
  data_ram dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      logic [63:0] exp_d;
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = 8'($urandom);
      wdata = {$urandom, $urandom};
      raddr = 8'($urandom);
      exp_d = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata != exp_d) begin failures++; if (failures < 10) $display("read %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
