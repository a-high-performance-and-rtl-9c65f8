// fir4: dedicated AVS half-sample filter (-1, 5, 5, -1).
//
// Used horizontally on the unrounded vertical half samples to form the AVS
// centre half sample j. Combinational, unrounded output.
module fir4 #(
  parameter int unsigned IN_W  = 13,
  parameter int unsigned OUT_W = IN_W + 4
) (
  input  logic signed [IN_W-1:0]  c [4],
  output logic signed [OUT_W-1:0] y
);
  logic signed [OUT_W-1:0] m;
  always_comb begin
    m = OUT_W'(c[1]) + OUT_W'(c[2]);
    y = (m <<< 2) + m - OUT_W'(c[0]) - OUT_W'(c[3]);
  end
endmodule
