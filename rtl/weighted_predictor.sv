// weighted_predictor: multi-standard weighted prediction.
//
//   P = Clip1(((AS(P0*w0) + AS(P1*w1) + 2^(n-1)) >> n) + o)
//   AS(X) = Clip1(((X + 16) >> 5) + A_o) for AVS, AS(X) = X otherwise.
// One datapath serves H.264 (explicit/implicit weights), AVS (scaled weights)
// and MPEG-1/2 (weights fixed to 1, which the weight table expresses as
// w0 = w1 = 1, n = 0 for one direction and n = 1 for bi-prediction).
// w0, w1, o, n and A_o come from the Weight Table, indexed by the block's
// weight index and written through the wt_* port. Stage 1 multiplies four
// pixels by the weight of the row's direction and applies AS. Stage 2: for a
// forward row of a bi-predicted block the weighted values are stored in the
// Bi-Direction Prediction Buffer (BDPB, one entry per row of a 4x8 block) and
// nothing is output; for the backward row the stored values are added; then
// rounding, shift, offset and clipping produce the output. Single-direction
// rows go straight to post-processing. Fully pipelined: one row per cycle,
// latency two cycles. The forward block of a bi-predicted basic block must be
// followed directly by its backward block.
//
// The weighting formulas, the Weight Table and the BDPB follow the design
// description; the table layout (one entry holding w0, w1, o, n, A_o) and n = 0
// meaning no rounding term are this design's choices.
module weighted_predictor
  import mc_pkg::*;
#(
  parameter int unsigned WT_DEPTH = 32,
  parameter int unsigned BDPB_ROWS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wt_we,
  input  logic [WT_IDX_W-1:0] wt_waddr,
  input  wt_entry_t         wt_wdata,
  input  logic              in_valid,
  input  logic [7:0]        in_pix [4],
  input  blk_info_t         in_info,
  input  logic [NROW_W-1:0] in_ridx,
  output logic              out_valid,
  output logic [7:0]        out_pix [4],
  output blk_info_t         out_info,
  output logic [NROW_W-1:0] out_ridx
);
  wt_entry_t         wtab [WT_DEPTH];
  logic signed [17:0] bdpb [BDPB_ROWS][4];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WT_DEPTH); i++) wtab[i] <= '0;
    end else if (wt_we) begin
      wtab[wt_waddr] <= wt_wdata;
    end
  end

  // ---------------- stage 1: weighting and AVS scale ----------------
  wt_entry_t e;
  logic signed [17:0] as_v [4];
  assign e = wtab[in_info.wt_idx[$clog2(WT_DEPTH)-1:0]];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic signed [17:0] prod;
      prod = 18'($signed({1'b0, in_pix[i]})) * 18'(in_info.id.bwd ? e.w1 : e.w0);
      if (in_info.std == STD_AVS)
        as_v[i] = 18'(clip1(((32'(prod) + 32'sd16) >>> 5) + 32'(e.ao)));
      else
        as_v[i] = prod;
    end
  end

  logic               s_valid;
  logic signed [17:0] s_v [4];
  blk_info_t          s_info;
  logic [NROW_W-1:0]  s_ridx;
  logic signed [8:0]  s_o;
  logic [3:0]         s_n;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_info  <= '0;
      s_ridx  <= '0;
      s_o     <= '0;
      s_n     <= '0;
      for (int i = 0; i < 4; i++) s_v[i] <= '0;
    end else begin
      s_valid <= in_valid;
      if (in_valid) begin
        s_v    <= as_v;
        s_info <= in_info;
        s_ridx <= in_ridx;
        s_o    <= e.o;
        s_n    <= e.n;
      end
    end
  end

  // ---------------- stage 2: BDPB and post-processing ----------------
  logic store, emit;
  logic [7:0] res [4];
  logic [$clog2(BDPB_ROWS)-1:0] brow;
  assign brow  = s_ridx[$clog2(BDPB_ROWS)-1:0];
  assign store = s_valid && s_info.bi && !s_info.id.bwd;
  assign emit  = s_valid && !store;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic signed [31:0] sum, rnd;
      sum = 32'(s_v[i]) + ((s_info.bi && s_info.id.bwd) ? 32'(bdpb[brow][i]) : 32'sd0);
      rnd = (s_n == 4'd0) ? 32'sd0 : (32'sd1 <<< (s_n - 4'd1));
      res[i] = clip1(((sum + rnd) >>> s_n) + 32'(s_o));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_info  <= '0;
      out_ridx  <= '0;
      for (int i = 0; i < 4; i++) out_pix[i] <= '0;
      for (int r = 0; r < int'(BDPB_ROWS); r++)
        for (int i = 0; i < 4; i++) bdpb[r][i] <= '0;
    end else begin
      if (store) bdpb[brow] <= s_v;
      out_valid <= emit;
      if (emit) begin
        out_pix  <= res;
        out_info <= s_info;
        out_ridx <= s_ridx;
      end
    end
  end
endmodule
