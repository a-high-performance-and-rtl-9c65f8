// data_ram: one data RAM of the 2-D cache, a two-port (one write, one
// synchronous read) memory of DEPTH AUs of 64 bits. The cache uses two: AUs
// with an even AU column in the first, odd in the second, so one row of a
// reference block (at most two neighbouring AUs) is read in one cycle.
// rdata shows the word addressed in the previous cycle. The split follows the
// design description; the one-cycle read latency is this design's choice.
module data_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
