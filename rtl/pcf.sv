// pcf: parallel context formation, the chain of NPL bit-plane context
// formations (CF9 at the top, the most significant magnitude plane, down to
// CF0). A column enters CF9 from the code-block scan and, once a plane has
// decoded all four of its samples, moves to the plane below; each plane sees
// each column about four columns after the plane above. The previous-stripe
// bit of a plane (bit k of the row-above coefficient) arrives from the
// magnitude register bank as the column enters (prev_bit_i).
// Every plane has its own decoder interface (dec/pass/rlc/cx0/cx1 out,
// mag/sign/sign_valid/rlc_fail/uniform in); fwd/fill/out_sel per plane drive
// the register bank of the same plane. The column leaving CF0 is complete.
// gate_i holds a plane's input (used at plane FBK-1 for 32-wide blocks until
// the final row above is available); with mid_sel_i that plane takes the
// row-above sign and first-pass flag from mid_chi_i/mid_pm_i instead of from
// the plane above. tap_o is the column plane FBK offers, fed back to the top.
//
// As in cf, the v and p1 bits of out_o and tap_o are always 0.
//
// Origin: ten context formations chained plane to plane, each fetching from
// C3 or C4 of the plane above, follow the published architecture; the way the
// previous-stripe bit reaches each plane is this design's.
module pcf
  import ebcd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,
  input  logic             active_i  [NPL],
  input  band_e            band_i,
  input  logic [COLW-1:0]  last_col_i,
  input  logic [NCOLW:0]   total_i,
  input  logic             src_valid_i,
  input  col_t             src_i,
  output logic             src_take_o,
  output logic             out_valid_o,
  output col_t             out_o,
  input  logic             out_take_i,
  input  logic             prev_bit_i [NPL],
  input  logic             gate_i     [NPL],   // plane may take its next column
  input  logic             mid_sel_i,          // plane FBK-1 takes the row above
  input  logic             mid_chi_i,          //   sign and first-pass flag from
  input  logic             mid_pm_i,           //   these inputs
  output col_t             tap_o,              // column offered by plane FBK
  output logic             fwd_o      [NPL],
  output logic             fill_o     [NPL],
  output logic             osel_o     [NPL],
  output logic [3:0]       dout_o     [NPL],   // decoded bits of the offered column
  output logic             dec_o      [NPL],
  output pass_e            pass_o     [NPL],
  output logic             rlc_o      [NPL],
  output logic [4:0]       cx0_o      [NPL],
  output logic [4:0]       cx1_o      [NPL],
  input  logic             mag_i      [NPL],
  input  logic             sign_i     [NPL],
  input  logic             sign_valid_i [NPL],
  input  logic             rlc_fail_i [NPL],
  input  logic [1:0]       uniform_i  [NPL],
  output scan_e            state_o    [NPL],
  output logic             cond0_o    [NPL]
);
  logic ovalid [NPL];
  col_t ocol   [NPL];
  logic otake  [NPL];
  logic svalid [NPL];
  col_t scol   [NPL];

  for (genvar k = 0; k < NPL; k++) begin : g_cf
    always_comb begin
      if (k == NPL - 1) begin
        svalid[k] = src_valid_i;
        scol[k]   = src_i;
      end else begin
        svalid[k] = ovalid[(k == NPL - 1) ? k : k + 1] && gate_i[k];
        scol[k]   = ocol[(k == NPL - 1) ? k : k + 1];
      end
      scol[k].prev.d = prev_bit_i[k];
      if (k == FBK - 1 && mid_sel_i) begin
        scol[k].prev.chi = mid_chi_i;
        scol[k].prev.pm  = mid_pm_i;
      end
      for (int r = 0; r < 4; r++) dout_o[k][r] = ocol[k].row[r].d;
    end
    if (k == 0) begin : g_bot
      assign otake[k] = out_take_i;
    end else begin : g_mid
      assign otake[k] = fill_o[k-1];
    end

    cf #(.K(k)) u_cf (
      .clk, .rst_n, .clear_i,
      .active_i   (active_i[k]),
      .band_i, .last_col_i, .total_i,
      .src_valid_i(svalid[k]),
      .src_i      (scol[k]),
      .src_take_o (fill_o[k]),
      .out_valid_o(ovalid[k]),
      .out_o      (ocol[k]),
      .out_sel_o  (osel_o[k]),
      .out_take_i (otake[k]),
      .fwd_o      (fwd_o[k]),
      .dec_o      (dec_o[k]),
      .pass_o     (pass_o[k]),
      .rlc_o      (rlc_o[k]),
      .cx0_o      (cx0_o[k]),
      .cx1_o      (cx1_o[k]),
      .mag_i      (mag_i[k]),
      .sign_i     (sign_i[k]),
      .sign_valid_i(sign_valid_i[k]),
      .rlc_fail_i (rlc_fail_i[k]),
      .uniform_i  (uniform_i[k]),
      .state_o    (state_o[k]),
      .cond0_o    (cond0_o[k])
    );
  end

  assign src_take_o  = fill_o[NPL-1];
  assign out_valid_o = ovalid[0];
  assign out_o       = ocol[0];
  assign tap_o = ocol[FBK];
endmodule
