// qfir: AVS quarter-sample filter (1, 7, 7, 1) with rounding.
//
// y = (p0 + 7*p1 + 7*p2 + p3 + 8) >> 4 on four 8-bit samples that lie on one
// line at half-sample spacing; the quarter sample sits between p1 and p2.
// The taps follow the design description; applying them to rounded 8-bit
// integer and half samples is this design's choice. Combinational.
module qfir (
  input  logic [7:0] p [4],
  output logic [7:0] y
);
  logic [11:0] m, s;
  always_comb begin
    m = 12'(p[1]) + 12'(p[2]);
    s = (m << 3) - m + 12'(p[0]) + 12'(p[3]) + 12'd8;
    y = s[11:4];
  end
endmodule
