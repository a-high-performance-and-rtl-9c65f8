// bilinear_interpolator: the eighth-pel bilinear interpolator.
//
// S = ((8-dx)(8-dy)A + dx(8-dy)B + (8-dx)dy C + dx dy D + 32) >> 6, where A, B
// are neighbouring samples of row y and C, D those of row y+1. H.264 and AVS
// chroma use it directly; MPEG-1/2 half-pel luma and chroma use it with the two
// low bits of dx and dy cleared (dx, dy in {0, 4}), which makes it the MPEG
// average. It takes the same 9-sample rows as the luma interpolator (byte 2 is
// output column 0). When dy != 0 a task supplies h+1 rows and output row y is
// formed from input rows y and y+1; when dy == 0 a task supplies h rows. The
// latency is two cycles, equal to the luma interpolator, so both can feed one
// weighted predictor without collisions. The formula follows the design
// description; the row handling is this design's own.
module bilinear_interpolator
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_row [9],
  input  logic [2:0] in_dx,
  input  logic [2:0] in_dy,
  input  blk_info_t  in_info,
  input  logic [NROW_W-1:0] in_ridx,
  output logic       out_valid,
  output logic [7:0] out_pix [4],
  output blk_info_t  out_info,
  output logic [NROW_W-1:0] out_ridx
);
  logic [7:0] cur [5], prv [5];
  logic       s_valid;
  logic [2:0] s_dx, s_dy;
  blk_info_t  s_info;
  logic [NROW_W-1:0] s_ridx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_dx <= '0; s_dy <= '0; s_info <= '0; s_ridx <= '0;
      for (int i = 0; i < 5; i++) begin cur[i] <= '0; prv[i] <= '0; end
    end else begin
      s_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < 5; i++) cur[i] <= in_row[i+2];
        prv    <= cur;
        s_dx   <= in_dx;
        s_dy   <= in_dy;
        s_info <= in_info;
        s_ridx <= in_ridx;
      end
    end
  end

  // bilinear weights, each at most 64
  logic [6:0] wa, wb, wc, wd;
  always_comb begin
    wa = 7'(4'd8 - 4'(s_dx)) * 7'(4'd8 - 4'(s_dy));
    wb = 7'(s_dx) * 7'(4'd8 - 4'(s_dy));
    wc = 7'(4'd8 - 4'(s_dx)) * 7'(s_dy);
    wd = 7'(s_dx) * 7'(s_dy);
  end

  logic [7:0] res [4];
  always_comb begin
    for (int x = 0; x < 4; x++) begin
      logic [7:0] a, b, c, d;
      logic [15:0] s;
      if (s_dy == 3'd0) begin
        a = cur[x]; b = cur[x+1];
      end else begin
        a = prv[x]; b = prv[x+1];
      end
      c = cur[x]; d = cur[x+1];
      s  = 16'(wa) * 16'(a) + 16'(wb) * 16'(b) + 16'(wc) * 16'(c) + 16'(wd) * 16'(d) + 16'd32;
      res[x] = s[13:6];
    end
  end

  logic emit;
  assign emit = s_valid && ((s_dy == 3'd0) || (s_ridx != '0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_info <= '0;
      out_ridx <= '0;
      for (int x = 0; x < 4; x++) out_pix[x] <= '0;
    end else begin
      out_valid <= emit;
      if (emit) begin
        out_pix  <= res;
        out_info <= s_info;
        out_ridx <= (s_dy == 3'd0) ? s_ridx : s_ridx - NROW_W'(1);
      end
    end
  end
endmodule
