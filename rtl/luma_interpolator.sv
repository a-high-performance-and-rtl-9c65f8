// luma_interpolator: dual-standard (H.264 / AVS) fractional luma interpolator.
//
// Input: one 9-sample reference row per cycle (byte 2 is the integer sample
// of output column 0, so bytes 0..8 cover x-2..x+6). Rows enter the
// Configurable Register Bank (crb). From it a half-pel filter bank computes,
// every cycle, six horizontal half samples (cfir on one CRB row), nine
// vertical half samples (fir6 per column), and the centre half samples (6-tap
// cfir for H.264, fir4 for AVS) from the unrounded vertical results. A small
// synchronisation stage keeps the half samples of the previous one or two rows
// (the "Sync-Sel" function) so that the quarter-pel filters (fir2 for H.264,
// qfir for AVS) see every neighbour they need. An output multiplexer picks the
// sample for the block's MV fraction (fx, fy in quarter pixels).
//
// Timing: fully pipelined, one row in per cycle. When fy != 0 a task supplies
// h+5 rows (y-2 .. y+h+2) and output row y leaves two cycles after input row
// y+3 arrived; when fy == 0 it supplies h rows and each leaves two cycles after
// it arrived. A 4x8 H.264 block thus costs 13 cycles at worst and 8 at best.
// out_ridx numbers the output rows of a task from 0.
//
// The filter set, the CRB and the mode sharing follow the design description.
// This design's own choices: the horizontal filters read CRB row D (H.264),
// row B (AVS) or row F (fy == 0) instead of always row B; AVS quarter samples
// on a line of integer and half samples use (1,7,7,1) over the four nearest
// samples at half-pel spacing, and the AVS diagonal quarter positions average
// the centre sample j with the nearest integer sample. As a consequence an
// AVS block with a fractional MV fetches the same 9x13 window as H.264.
module luma_interpolator
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_row [9],
  input  blk_info_t  in_info,
  input  logic [NROW_W-1:0] in_ridx,
  output logic       out_valid,
  output logic [7:0] out_pix [4],
  output blk_info_t  out_info,
  output logic [NROW_W-1:0] out_ridx
);
  logic [7:0] rows [6][9];
  logic       s_valid;
  blk_info_t  s_info;
  logic [NROW_W-1:0] s_ridx;
  logic       avs, in_avs;

  assign in_avs = (in_info.std == STD_AVS);
  assign avs    = (s_info.std == STD_AVS);

  crb u_crb (.clk, .rst_n, .shift_en(in_valid), .avs(in_avs), .row_in(in_row), .rows);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_info  <= '0;
      s_ridx  <= '0;
    end else begin
      s_valid <= in_valid;
      if (in_valid) begin
        s_info <= in_info;
        s_ridx <= in_ridx;
      end
    end
  end

  // ---------------- half-pel filter bank ----------------
  logic [7:0] hsrc [9];          // row fed to the horizontal filters
  logic signed [8:0] hpad [12];  // hsrc with zero samples on each side
  logic signed [8:0] cin [6][6];
  logic signed [15:0] braw [6];
  logic signed [8:0] vin [9][6];
  logic signed [15:0] vraw [9];
  logic signed [15:0] jhin [4][6];
  logic signed [22:0] jhraw [4];
  logic signed [15:0] jain [6][4];
  logic signed [19:0] jaraw [6];

  always_comb begin
    if (s_info.fy == 2'd0) hsrc = rows[5];
    else if (avs)          hsrc = rows[1];
    else                   hsrc = rows[3];
    hpad[0]  = '0;
    hpad[10] = '0;
    hpad[11] = '0;
    for (int i = 0; i < 9; i++) hpad[i+1] = {1'b0, hsrc[i]};
    // cfir k: H.264 b(k) = bytes k..k+5; AVS b(k-1) = bytes k..k+3 on C2..C5
    for (int k = 0; k < 6; k++)
      for (int i = 0; i < 6; i++)
        cin[k][i] = avs ? hpad[k+i] : hpad[k+i+1];
    for (int c = 0; c < 9; c++)
      for (int r = 0; r < 6; r++) vin[c][r] = {1'b0, rows[r][c]};
    for (int x = 0; x < 4; x++)
      for (int i = 0; i < 6; i++) jhin[x][i] = vraw[x+i];
    for (int m = 0; m < 6; m++)
      for (int i = 0; i < 4; i++) jain[m][i] = (m + i <= 8) ? vraw[(m+i <= 8) ? m+i : 8] : '0;
  end

  for (genvar k = 0; k < 6; k++) begin : g_b
    cfir #(.IN_W(9), .OUT_W(16)) u_cfir (.avs(avs), .c(cin[k]), .h(braw[k]));
  end
  for (genvar c = 0; c < 9; c++) begin : g_v
    fir6 #(.IN_W(9), .OUT_W(16)) u_fir6 (.avs(avs), .r(vin[c]), .v(vraw[c]));
  end
  for (genvar x = 0; x < 4; x++) begin : g_jh
    cfir #(.IN_W(16), .OUT_W(23)) u_cfir (.avs(1'b0), .c(jhin[x]), .h(jhraw[x]));
  end
  for (genvar m = 0; m < 6; m++) begin : g_ja
    fir4 #(.IN_W(16), .OUT_W(20)) u_fir4 (.c(jain[m]), .y(jaraw[m]));
  end

  function automatic logic [7:0] rnd(input logic signed [31:0] raw, input int add, input int sh);
    logic signed [31:0] t;
    t = (raw + 32'(add)) >>> sh;
    return clip1(t);
  endfunction

  // rounded half samples of the current row
  logic [7:0] b_now [6];   // H.264: b(y+1,k) in k=0..3; AVS: b(y+1,k-1)
  logic [7:0] h_now [5];   // vertical half of columns x = 0..4
  logic [7:0] jh_now [4];  // H.264 centre half samples x = 0..3
  logic [7:0] ja_now [6];  // AVS centre half samples x = -1..4
  always_comb begin
    for (int k = 0; k < 6; k++)
      b_now[k] = avs ? rnd(32'(braw[k]), 4, 3) : rnd(32'(braw[k]), 16, 5);
    for (int x = 0; x < 5; x++)
      h_now[x] = avs ? rnd(32'(vraw[x+2]), 4, 3) : rnd(32'(vraw[x+2]), 16, 5);
    for (int x = 0; x < 4; x++) jh_now[x] = rnd(32'(jhraw[x]), 512, 10);
    for (int m = 0; m < 6; m++) ja_now[m] = rnd(32'(jaraw[m]), 32, 6);
  end

  // ---------------- sync stage: half samples of earlier rows ----------------
  logic [7:0] b_d1 [6];
  logic [7:0] h_d1 [5], h_d2 [5];
  logic [7:0] ja_d1 [6], ja_d2 [6];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 6; k++) begin b_d1[k] <= '0; ja_d1[k] <= '0; ja_d2[k] <= '0; end
      for (int k = 0; k < 5; k++) begin h_d1[k] <= '0; h_d2[k] <= '0; end
    end else if (s_valid) begin
      b_d1  <= b_now;
      h_d1  <= h_now;
      h_d2  <= h_d1;
      ja_d1 <= ja_now;
      ja_d2 <= ja_d1;
    end
  end

  // ---------------- quarter-pel filters and output mux ----------------
  logic [7:0] g0 [5], g1 [5];          // integer rows y and y+1, x = 0..4
  logic [7:0] sel [4];
  logic [7:0] f2a [4], f2b [4], f2y [4];
  logic [7:0] qp [4][4], qy [4];

  always_comb begin
    for (int x = 0; x < 5; x++) begin
      if (s_info.fy == 2'd0) begin
        g0[x] = rows[5][x+2];
        g1[x] = rows[5][x+2];
      end else if (avs) begin
        g0[x] = rows[0][x+2];
        g1[x] = rows[1][x+2];
      end else begin
        g0[x] = rows[2][x+2];
        g1[x] = rows[3][x+2];
      end
    end
    for (int x = 0; x < 4; x++) begin
      logic [7:0] by, by1, hy, hm, jj;
      // AVS operands (index +1 for the arrays that start at x = -1)
      logic [7:0] bm, b0, bp, b1y, hym, hy0, hyp, hy1, jm, j0, jp, jym, jy1;
      bm  = (s_info.fy == 2'd0) ? b_now[x]   : b_d1[x];
      b0  = (s_info.fy == 2'd0) ? b_now[x+1] : b_d1[x+1];
      bp  = (s_info.fy == 2'd0) ? b_now[x+2] : b_d1[x+2];
      b1y = b_now[x+1];
      hym = h_d2[x];
      hy0 = h_d1[x];
      hyp = h_d1[x+1];
      hy1 = h_now[x];
      jm  = ja_d1[x];
      j0  = ja_d1[x+1];
      jp  = ja_d1[x+2];
      jym = ja_d2[x+1];
      jy1 = ja_now[x+1];
      // H.264 operands
      by  = (s_info.fy == 2'd0) ? b_now[x] : b_d1[x];
      by1 = b_now[x];
      hy  = h_now[x];
      hm  = h_now[x+1];
      jj  = jh_now[x];
      f2a[x] = g0[x];
      f2b[x] = by;
      qp[x][0] = g0[x]; qp[x][1] = g0[x]; qp[x][2] = g0[x]; qp[x][3] = g0[x];
      if (!avs) begin
        unique case ({s_info.fx, s_info.fy})
          4'b01_00: begin f2a[x] = g0[x];   f2b[x] = by;  end  // a
          4'b11_00: begin f2a[x] = g0[x+1]; f2b[x] = by;  end  // c
          4'b00_01: begin f2a[x] = g0[x];   f2b[x] = hy;  end  // d
          4'b00_11: begin f2a[x] = g1[x];   f2b[x] = hy;  end  // n
          4'b01_01: begin f2a[x] = by;      f2b[x] = hy;  end  // e
          4'b11_01: begin f2a[x] = by;      f2b[x] = hm;  end  // g
          4'b01_11: begin f2a[x] = hy;      f2b[x] = by1; end  // p
          4'b11_11: begin f2a[x] = hm;      f2b[x] = by1; end  // r
          4'b10_01: begin f2a[x] = by;      f2b[x] = jj;  end  // f
          4'b10_11: begin f2a[x] = jj;      f2b[x] = by1; end  // q
          4'b01_10: begin f2a[x] = hy;      f2b[x] = jj;  end  // i
          4'b11_10: begin f2a[x] = jj;      f2b[x] = hm;  end  // k
          default: ;
        endcase
      end else begin
        unique case ({s_info.fx, s_info.fy})
          4'b01_00: begin qp[x][0] = bm;  qp[x][1] = g0[x]; qp[x][2] = b0;    qp[x][3] = g0[x+1]; end
          4'b11_00: begin qp[x][0] = g0[x]; qp[x][1] = b0;  qp[x][2] = g0[x+1]; qp[x][3] = bp;    end
          4'b00_01: begin qp[x][0] = hym; qp[x][1] = g0[x]; qp[x][2] = hy0;   qp[x][3] = g1[x];   end
          4'b00_11: begin qp[x][0] = g0[x]; qp[x][1] = hy0; qp[x][2] = g1[x]; qp[x][3] = hy1;     end
          4'b01_10: begin qp[x][0] = jm;  qp[x][1] = hy0;   qp[x][2] = j0;    qp[x][3] = hyp;     end
          4'b11_10: begin qp[x][0] = hy0; qp[x][1] = j0;    qp[x][2] = hyp;   qp[x][3] = jp;      end
          4'b10_01: begin qp[x][0] = jym; qp[x][1] = b0;    qp[x][2] = j0;    qp[x][3] = b1y;     end
          4'b10_11: begin qp[x][0] = b0;  qp[x][1] = j0;    qp[x][2] = b1y;   qp[x][3] = jy1;     end
          4'b01_01: begin f2a[x] = g0[x];   f2b[x] = j0; end
          4'b11_01: begin f2a[x] = g0[x+1]; f2b[x] = j0; end
          4'b01_11: begin f2a[x] = g1[x];   f2b[x] = j0; end
          4'b11_11: begin f2a[x] = g1[x+1]; f2b[x] = j0; end
          default: ;
        endcase
      end
    end
  end

  for (genvar x = 0; x < 4; x++) begin : g_q
    fir2 u_fir2 (.a(f2a[x]), .b(f2b[x]), .y(f2y[x]));
    qfir u_qfir (.p(qp[x]), .y(qy[x]));
  end

  always_comb begin
    for (int x = 0; x < 4; x++) begin
      logic qpos;
      qpos = s_info.fx[0] | s_info.fy[0];
      if (!qpos) begin
        unique case ({s_info.fx, s_info.fy})
          4'b10_00: sel[x] = avs ? ((s_info.fy == 2'd0) ? b_now[x+1] : b_d1[x+1])
                                 : ((s_info.fy == 2'd0) ? b_now[x]   : b_d1[x]);
          4'b00_10: sel[x] = avs ? h_d1[x] : h_now[x];
          4'b10_10: sel[x] = avs ? ja_d1[x+1] : jh_now[x];
          default:  sel[x] = g0[x];
        endcase
      end else if (avs && !(s_info.fx[0] & s_info.fy[0])) begin
        sel[x] = qy[x];
      end else begin
        sel[x] = f2y[x];
      end
    end
  end

  logic emit;
  assign emit = s_valid && ((s_info.fy == 2'd0) || (s_ridx >= NROW_W'(5)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_info  <= '0;
      out_ridx  <= '0;
      for (int x = 0; x < 4; x++) out_pix[x] <= '0;
    end else begin
      out_valid <= emit;
      if (emit) begin
        out_pix  <= sel;
        out_info <= s_info;
        out_ridx <= (s_info.fy == 2'd0) ? s_ridx : s_ridx - NROW_W'(5);
      end
    end
  end
endmodule
