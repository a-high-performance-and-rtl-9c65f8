// fir6: reconfigurable vertical half-sample filter, one per column of the CRB.
//
// H.264 mode: v = ra - 5*rb + 20*rc + 20*rd - 5*re + rf.
// AVS mode: rc and rd are forced to zero and the complementer negates the sum,
// giving v = 5*rb + 5*re - ra - rf, the AVS 4-tap (-1, 5, 5, -1) over the rows
// a, b, e, f of the register bank. Both forms and the zero/negate trick follow
// the design description. Combinational; the unrounded sum is returned.
module fir6 #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = IN_W + 7
) (
  input  logic                    avs,
  input  logic signed [IN_W-1:0]  r [6],   // r[0]..r[5] = rows A..F
  output logic signed [OUT_W-1:0] v
);
  logic signed [OUT_W-1:0] ra, rb, rc, rd, re, rf, s;
  always_comb begin
    ra = OUT_W'(r[0]);
    rb = OUT_W'(r[1]);
    rc = avs ? '0 : OUT_W'(r[2]);
    rd = avs ? '0 : OUT_W'(r[3]);
    re = OUT_W'(r[4]);
    rf = OUT_W'(r[5]);
    s  = ra + rf - ((rb + re) <<< 2) - (rb + re) + (((rc + rd) <<< 4) + ((rc + rd) <<< 2));
    v  = avs ? -s : s;
  end
endmodule
