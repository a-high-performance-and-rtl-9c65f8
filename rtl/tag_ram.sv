// tag_ram: one tag RAM of the 2-D cache, a two-port (one write, one read)
// memory of DEPTH entries. The cache uses two of them: one for AUs with an
// even row, one for AUs with an odd row, so the judge unit checks two
// vertically adjacent AUs per cycle. The read is asynchronous (register-file
// style) so that a tag written in one cycle is seen by the next lookup; reset
// clears every entry, which clears the valid bits. The two-RAM split follows
// the design description; the asynchronous read and the reset are this
// design's choices.
module tag_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 23
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end
  assign rdata = mem[raddr];
endmodule
