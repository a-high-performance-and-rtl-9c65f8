// fir2: H.264 quarter-sample bilinear filter, y = (a + b + 1) >> 1.
// Also used for the AVS diagonal quarter positions. Combinational.
module fir2 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y
);
  logic [8:0] s;
  always_comb begin
    s = 9'(a) + 9'(b) + 9'd1;
    y = s[8:1];
  end
endmodule
