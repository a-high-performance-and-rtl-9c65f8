// tb_tag_ram: reset must clear every entry; then random writes and reads
// against an array model, reads seeing a write from the previous cycle.
module tb_tag_ram;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we;
  logic [7:0] waddr, raddr;
  logic [22:0] wdata, rdata;
  logic [22:0] model [256];
  int checks = 0, failures = 0;
  tag_ram dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      model[i] = 0;
      raddr = 8'(i);
      #1;
      checks++;
      if (rdata != 0) begin failures++; $display("entry %0d not cleared", i); end
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = 8'($urandom);
      wdata = 23'($urandom);
      raddr = (n % 3 == 0) ? waddr : 8'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin failures++; if (failures < 10) $display("read %0d", raddr); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
