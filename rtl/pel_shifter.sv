// pel_shifter: aligns one reference row for the interpolators and pads
// picture edges.
//
// Input: 16 bytes (two neighbouring AUs, byte 0 = the lower AU's first pixel)
// and a shift control: off, the position of the wanted first pixel relative
// to byte 0, and lim, the last byte that lies inside the picture. Output: the
// 9 bytes starting at the wanted pixel, registered (one pipeline stage).
// Bytes past lim are first replaced by byte lim (right-edge padding). A
// non-negative off is a byte-level right shift by off that fills with the top
// byte. A negative off (row starts left of the picture) is done with the same
// right shifter between two byte-order reversals, which turns it into a left
// shift filling with byte 0 (left-edge padding). The byte shifter is a
// logarithmic barrel shifter of 8, 4, 2 and 1 byte stages.
//
// The reversal-plus-right-shifter structure and the 128-bit input follow the
// design description; always taking the low 9 bytes and the replication
// masking before the shifter are this design's choices.
module pel_shifter
  import mc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [127:0]     in_data,
  input  shift_ctl_t       in_shift,
  input  blk_info_t        in_info,
  input  logic [NROW_W-1:0] in_ridx,
  output logic             out_valid,
  output logic [7:0]       out_row [9],
  output blk_info_t        out_info,
  output logic [NROW_W-1:0] out_ridx
);
  // right shift of 16 bytes by sh (0..15), filling with the top byte
  function automatic logic [127:0] rshift(input logic [127:0] d, input logic [3:0] sh);
    logic [127:0] t;
    logic [7:0]   fill;
    fill = d[127:120];
    t = d;
    if (sh[3]) t = {{8{fill}}, t[127:64]};
    if (sh[2]) t = {{4{fill}}, t[127:32]};
    if (sh[1]) t = {{2{fill}}, t[127:16]};
    if (sh[0]) t = {fill, t[127:8]};
    return t;
  endfunction

  function automatic logic [127:0] reverse(input logic [127:0] d);
    logic [127:0] t;
    for (int i = 0; i < 16; i++) t[i*8 +: 8] = d[(15-i)*8 +: 8];
    return t;
  endfunction

  logic [127:0] padded, shifted;
  logic [3:0]   amount;
  always_comb begin
    padded = in_data;
    for (int i = 1; i < 16; i++)
      if (COORD_W'(i) > in_shift.lim && in_shift.lim < COORD_W'(16))
        padded[i*8 +: 8] = padded[(i-1)*8 +: 8];
    if (in_shift.off < 0) begin
      amount  = (in_shift.off < -15) ? 4'd15 : 4'(-in_shift.off);
      shifted = reverse(rshift(reverse(padded), amount));
    end else begin
      amount  = (in_shift.off > 15) ? 4'd15 : 4'(in_shift.off);
      shifted = rshift(padded, amount);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_info  <= '0;
      out_ridx  <= '0;
      for (int i = 0; i < 9; i++) out_row[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < 9; i++) out_row[i] <= shifted[i*8 +: 8];
        out_info <= in_info;
        out_ridx <= in_ridx;
      end
    end
  end
endmodule
