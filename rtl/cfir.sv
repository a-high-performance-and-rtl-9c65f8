// cfir: reconfigurable horizontal half-sample filter shared by H.264 and AVS.
//
// H.264 mode: h = c1 - 5*c2 + 20*c3 + 20*c4 - 5*c5 + c6 (6-tap).
// AVS mode:   h = -c2 + 5*c3 + 5*c4 - c5 (4-tap; c1 and c6 unused).
// One adder tree serves both: the symmetric pairs are summed first, the centre
// pair is multiplied by 5 with a shift and an add, and a mode multiplexer picks
// the final combination. The filter is purely combinational; the raw (unrounded)
// sum is returned so that the caller can round it or feed it to a second filter.
// The two tap sets are those of the design description; the shared adder tree
// layout is this design's own.
module cfir #(
  parameter int unsigned IN_W  = 9,   // signed input width
  parameter int unsigned OUT_W = IN_W + 7
) (
  input  logic                    avs,     // 0: H.264, 1: AVS
  input  logic signed [IN_W-1:0]  c [6],   // c[0]..c[5] = C1..C6
  output logic signed [OUT_W-1:0] h
);
  logic signed [OUT_W-1:0] s16, s25, s34, t5;
  always_comb begin
    s16 = OUT_W'(c[0]) + OUT_W'(c[5]);
    s25 = OUT_W'(c[1]) + OUT_W'(c[4]);
    s34 = OUT_W'(c[2]) + OUT_W'(c[3]);
    t5  = (s34 <<< 2) + s34;                       // 5*(c3+c4)
    if (avs) h = t5 - s25;                         // 5c3+5c4-c2-c5
    else     h = (t5 <<< 2) - ((s25 <<< 2) + s25) + s16;  // 20,-5,1
  end
endmodule
