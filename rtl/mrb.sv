// mrb: magnitude register bank, the chain of NPL register banks (rb). Bank k
// keeps, for the columns in the window of plane k, the magnitude bits the
// planes above have decoded, and the bits of the previous stripe's row-above
// sample that the planes below still need. Decoded bits enter bank k-1 as
// the column moves from plane k to plane k-1; the bank of plane 0 together
// with the bits decoded by plane 0 gives the finished magnitudes.
// The row-above coefficient enters at the top (from the line buffer) and
// gives each plane its bit k as the column enters that plane (prev_bit_o).
// With mid_sel_i (32-wide blocks) bank FBK-1 takes the row-above magnitude
// from mid_prev_i instead, because the value that entered at the top only
// held bits 9..FBK; tap_cur_o gives bank FBK's offered column for the
// feedback to the top.
//
// Origin: the bank of ten register banks fed by the CFs follows the published
// architecture; passing the previous-stripe magnitude down through it is this
// design's choice.
module mrb
  import ebcd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear_i,
  input  logic                 fwd_i   [NPL],
  input  logic                 fill_i  [NPL],
  input  logic                 osel_i  [NPL],
  input  logic [3:0]           dout_i  [NPL],  // bits decoded by each plane
  input  logic [MAGW-1:0]      top_prev_i,     // row-above magnitude, line buffer
  output logic                 prev_bit_o [NPL],
  input  logic                 mid_sel_i,      // plane FBK-1 takes the row above
  input  logic [MAGW-1:0]      mid_prev_i,     //   magnitude from this input
  output logic [3:0][MAGW-1:0] tap_cur_o,      // bank FBK's offered column
  output logic [3:0][MAGW-1:0] out_cur_o       // bits 9..1 of the leaving column
);
  logic [3:0][MAGW-1:0] cur  [NPL];
  logic [MAGW-1:0]      prv  [NPL];

  for (genvar k = 0; k < NPL; k++) begin : g_rb
    logic [3:0][MAGW-1:0] up_cur;
    logic [3:0]           up_d;
    logic [MAGW-1:0]      up_prev;
    if (k == NPL - 1) begin : g_top
      assign up_cur  = '0;
      assign up_d    = '0;
      assign up_prev = top_prev_i;
    end else begin : g_mid
      assign up_cur  = cur[k+1];
      assign up_d    = dout_i[k+1];
      assign up_prev = (k == FBK - 1 && mid_sel_i) ? mid_prev_i : prv[k+1];
    end
    rb #(.K(k)) u_rb (
      .clk, .rst_n, .clear_i,
      .fwd_i     (fwd_i[k]),
      .fill_i    (fill_i[k]),
      .up_cur_i  (up_cur),
      .up_d_i    (up_d),
      .up_prev_i (up_prev),
      .out_sel_i (osel_i[k]),
      .out_cur_o (cur[k]),
      .out_prev_o(prv[k]),
      .prev_bit_o(prev_bit_o[k])
    );
  end

  assign out_cur_o = cur[0];
  assign tap_cur_o = cur[FBK];
endmodule
