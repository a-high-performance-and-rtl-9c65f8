// crb: Configurable Register Bank, a 6-row x 9-column array of 8-bit samples.
//
// Each shift_en cycle a new 9-sample row enters row F. In H.264 mode the rows
// move F -> E -> D -> C -> B -> A, giving the six-row window of the 6-tap
// vertical filter. In AVS mode a row leaving E goes straight to B and rows C
// and D are cleared, so rows A, B, E, F hold the four rows of the AVS 4-tap
// vertical filter. This behaviour follows the design description; the
// synchronous active-low reset to zero is this design's choice.
module crb (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       shift_en,
  input  logic       avs,
  input  logic [7:0] row_in [9],
  output logic [7:0] rows   [6][9]   // rows[0] = A (oldest) .. rows[5] = F (newest)
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 9; c++) rows[r][c] <= '0;
    end else if (shift_en) begin
      rows[5] <= row_in;
      rows[4] <= rows[5];
      if (avs) begin
        for (int c = 0; c < 9; c++) begin
          rows[3][c] <= '0;
          rows[2][c] <= '0;
        end
        rows[1] <= rows[4];
      end else begin
        rows[3] <= rows[4];
        rows[2] <= rows[3];
        rows[1] <= rows[2];
      end
      rows[0] <= rows[1];
    end
  end
endmodule
