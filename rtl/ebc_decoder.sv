// ebc_decoder: word-level embedded block coding (EBC) decoder of JPEG 2000.
//
// Decodes one code-block (64x64 or 32x32) at one coefficient per cycle,
// whatever the number of bit-planes, by decoding all ten magnitude
// bit-planes at once. Each plane has its own context formation (CF, in the
// pcf chain) and its own four-symbol arithmetic decoder (fad); the
// arithmetic decoders keep their coding states in the state register bank
// (srb); the magnitude register bank (mrb) assembles the coefficients as
// columns move from plane to plane; the line buffer keeps the last row of
// the previous stripe for the first row of the next one. There is no
// pipeline register between a CF and its decoder.
//
// Row above a stripe. A column entering plane 9 needs the sample above it
// (last row of the previous stripe). For 64-wide blocks that column has
// long left plane 0, and its final coefficient is read from the line buffer.
// For 32-wide blocks the ten-plane latency (about 40 columns) exceeds a row,
// so the line buffer is split in two halves: one keeps the row above as it
// leaves plane 3 (bits 9..3, sign and first-pass flag known so far), which
// feeds plane 9; the other keeps the final row above, which supplies bits
// 2..0, the final sign and first-pass flag when the column reaches plane 2.
// A column waits at plane 9 or plane 2 only if that data is not yet there.
//
// The bit stream must be coded in the parallel mode of JPEG 2000: causal
// (stripe-limited) contexts, every coding pass terminated, and probability
// models reset at every pass. Each pass of each plane is then a separate
// stream, decoded by its own arithmetic register.
//
// Interface
//   start_i     pulse: begin a code-block with the given band_i, cb32_i
//               (1: 32x32, 0: 64x64) and nplanes_i (coded magnitude planes,
//               1..10; planes nplanes_i..9 are empty).
//   bs_addr_o   byte address of each plane's and pass's stream pointer;
//   bs_win_i    the environment returns the 8 bytes from that address on
//               (0xFF past the end of a pass's segment), combinationally.
//   coef_*      a column of four decoded coefficients (sign, 10-bit
//               magnitude) per valid cycle, columns in stripe order:
//               coef_index_o = stripe * width + column; row r is sample
//               (4*stripe + r, column).
//   done_o      pulse when the last column of the block has been delivered.
//   dbg_*       per-plane activity, for monitoring.
// Timing: start, two set-up cycles (pointer clear, INITDEC of all 30
// streams), then one sample per plane per cycle; the first column leaves
// after the columns have passed the ten planes (about four columns per
// plane), the block ends about width*width + 100..250 cycles after the
// start, for both block sizes.
//
// Origin: the partition (parallel context formation, ten four-symbol decoders,
// state register bank, magnitude register bank, line buffer), the absence of
// a pipeline stage between context formation and decoding, and the sizes are
// those of the published decoder. The block control, the bit-stream port, the
// output format are this design's. Feeding the plane-3 output back to plane
// 9 for 32x32 blocks follows the published design; completing the row above
// at plane 2 from the other half of the line buffer is this design's way of
// supplying the bits that are not yet decoded at plane 3.
//
// Lint notes rst_n as both an asynchronous reset and a synchronous signal:
// it is the reset of every register and also disables the handshake
// assertions inside the CFs while reset is active; the assertions are not
// logic, so this stands.
module ebc_decoder
  import ebcd_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_i,
  input  band_e                 band_i,
  input  logic                  cb32_i,
  input  logic [3:0]            nplanes_i,
  output logic [ADDR_W-1:0]     bs_addr_o [NPL][3],
  input  win_t                  bs_win_i  [NPL][3],
  output logic                  coef_valid_o,
  output logic [NCOLW-1:0]      coef_index_o,
  output logic [3:0]            coef_sign_o,
  output logic [3:0][MAGW-1:0]  coef_mag_o,
  output logic                  busy_o,
  output logic                  done_o,
  output scan_e                 dbg_state_o    [NPL],
  output pass_e                 dbg_pass_o     [NPL],
  output logic                  dbg_rlc_o      [NPL],
  output logic                  dbg_rlc_fail_o [NPL],
  output logic                  dbg_sign_o     [NPL],
  output logic                  dbg_cond0_o    [NPL]
);
  typedef enum logic [1:0] {ST_IDLE, ST_CLEAR, ST_LOAD, ST_RUN} top_e;
  top_e st;

  band_e            band_q;
  logic             cb32_q;
  logic [3:0]       npl_q;
  logic [NCOLW:0]   ncol_in, ncol_out, ncol_fb, total;
  logic [COLW-1:0]  last_col;
  logic             run, clear;

  assign total    = cb32_q ? (NCOLW+1)'(256) : (NCOLW+1)'(1024);
  assign last_col = cb32_q ? COLW'(31) : COLW'(63);
  assign run      = (st == ST_RUN);
  assign clear    = (st == ST_CLEAR);
  assign busy_o   = (st != ST_IDLE);

  // ------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_IDLE; band_q <= BAND_LL; cb32_q <= 1'b0; npl_q <= 4'd10; done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (st)
        ST_IDLE:  if (start_i) begin
                    st <= ST_CLEAR; band_q <= band_i; cb32_q <= cb32_i; npl_q <= nplanes_i;
                  end
        ST_CLEAR: st <= ST_LOAD;
        ST_LOAD:  st <= ST_RUN;
        ST_RUN:   if (ncol_out == total) begin st <= ST_IDLE; done_o <= 1'b1; end
        default:  st <= ST_IDLE;
      endcase
    end
  end

  // ------------------------------------------------ column source, CF9 side
  logic             src_valid, src_take;
  col_t             src;
  logic [11:0]      lb_rdata, lba_rdata, lbb_rdata;
  logic             first_stripe, fb_first, fb_gate, mid_sel;
  logic [COLW-1:0]  in_colno;
  logic [MAGW-1:0]  top_prev;

  assign in_colno     = COLW'(ncol_in) & last_col;
  assign first_stripe = (ncol_in <= (NCOLW+1)'(last_col));
  // the row above must have left plane 0 (64 wide) or plane FBK (32 wide)
  // before the column may enter plane 9
  assign src_valid    = run && (ncol_in < total) &&
                        (first_stripe ||
                         (cb32_q ? (ncol_fb  + (NCOLW+1)'(last_col) >= ncol_in)
                                 : (ncol_out + (NCOLW+1)'(last_col) >= ncol_in)));
  // 32 wide: the column entering plane FBK-1 takes the rest of the row above
  // (low magnitude bits, final sign and pass flag) once that has left plane 0
  assign fb_first     = (ncol_fb <= (NCOLW+1)'(last_col));
  assign fb_gate      = !cb32_q || fb_first || (ncol_out + (NCOLW+1)'(last_col) >= ncol_fb);
  assign mid_sel      = cb32_q;
  always_comb begin
    src = '0;
    src.colno    = in_colno;
    src.prev.chi = first_stripe ? 1'b0 : lb_rdata[10];
    src.prev.pm  = first_stripe ? 1'b0 : lb_rdata[11];
    top_prev     = first_stripe ? '0 : lb_rdata[MAGW-1:0];
  end

  // ------------------------------------------------------- bit-plane chain
  logic       active   [NPL];
  logic       gate     [NPL];
  col_t       tap_col;
  logic [3:0][MAGW-1:0] tap_cur;
  logic [11:0] mid_word;
  logic       prev_bit [NPL];
  logic       fwd [NPL], fill [NPL], osel [NPL];
  logic [3:0] dout [NPL];
  logic       dec [NPL], rlc [NPL];
  pass_e      pass [NPL];
  logic [4:0] cx0 [NPL], cx1 [NPL];
  logic       mag [NPL], sgn [NPL], sgn_v [NPL], rlc_fail [NPL];
  logic [1:0] uni [NPL];
  logic       out_valid, out_take;
  col_t       out_col;
  logic [3:0][MAGW-1:0] out_cur;

  always_comb for (int k = 0; k < NPL; k++) begin
    active[k] = (4'(k) < npl_q);
    gate[k]   = (k == FBK - 1) ? fb_gate : 1'b1;
  end
  assign mid_word = fb_first ? 12'd0 : lba_rdata;

  pcf u_pcf (
    .clk, .rst_n, .clear_i(clear),
    .active_i(active), .band_i(band_q), .last_col_i(last_col), .total_i(total),
    .src_valid_i(src_valid), .src_i(src), .src_take_o(src_take),
    .out_valid_o(out_valid), .out_o(out_col), .out_take_i(out_take),
    .prev_bit_i(prev_bit), .gate_i(gate), .mid_sel_i(mid_sel),
    .mid_chi_i(mid_word[10]), .mid_pm_i(mid_word[11]), .tap_o(tap_col),
    .fwd_o(fwd), .fill_o(fill), .osel_o(osel), .dout_o(dout),
    .dec_o(dec), .pass_o(pass), .rlc_o(rlc), .cx0_o(cx0), .cx1_o(cx1),
    .mag_i(mag), .sign_i(sgn), .sign_valid_i(sgn_v), .rlc_fail_i(rlc_fail), .uniform_i(uni),
    .state_o(dbg_state_o), .cond0_o(dbg_cond0_o)
  );

  mrb u_mrb (
    .clk, .rst_n, .clear_i(clear),
    .fwd_i(fwd), .fill_i(fill), .osel_i(osel), .dout_i(dout),
    .top_prev_i(top_prev), .prev_bit_o(prev_bit),
    .mid_sel_i(mid_sel), .mid_prev_i(mid_word[MAGW-1:0]), .tap_cur_o(tap_cur),
    .out_cur_o(out_cur)
  );

  // ------------------------------------------- arithmetic decoders and SRB
  mq_reg_t    ar_r [NPL], ar_w [NPL];
  ctx_st_t    c0_r [NPL], c1_r [NPL], c0_w [NPL], c1_w [NPL];
  win_t       win  [NPL];
  logic [3:0] used [NPL];
  logic       c1_we [NPL], we [NPL];

  for (genvar k = 0; k < NPL; k++) begin : g_fad
    fad u_fad (
      .dec_i(dec[k]), .pass_i(pass[k]), .rlc_i(rlc[k]),
      .ar_i(ar_r[k]), .ctx0_i(c0_r[k]), .ctx1_i(c1_r[k]), .win_i(win[k]),
      .mag_o(mag[k]), .sign_o(sgn[k]), .sign_valid_o(sgn_v[k]),
      .rlc_fail_o(rlc_fail[k]), .uniform_o(uni[k]),
      .ar_o(ar_w[k]), .used_o(used[k]), .ctx0_o(c0_w[k]), .ctx1_o(c1_w[k]),
      .ctx1_we_o(c1_we[k])
    );
    assign we[k] = run && dec[k];
  end

  srb u_srb (
    .clk, .rst_n, .clear_i(clear), .load_i(st == ST_LOAD),
    .bs_addr_o, .bs_win_i,
    .pass_i(pass), .cx0_i(cx0), .cx1_i(cx1),
    .ar_o(ar_r), .ctx0_o(c0_r), .ctx1_o(c1_r), .win_o(win),
    .we_i(we), .ar_w(ar_w), .used_w(used), .ctx0_w(c0_w), .ctx1_we(c1_we), .ctx1_w(c1_w)
  );

  // ------------------------------------------------ output and line buffer
  assign out_take = run && out_valid;

  // The 12 x 64 line buffer is two halves. 64 wide: both hold the final row
  // above, split by column. 32 wide: half A holds the final row above, half
  // B the partial row above as it leaves plane FBK (bits 9..FBK).
  logic [11:0]     fin_word, part_word;
  logic [COLW-2:0] a_raddr, b_waddr;
  logic            a_we, b_we;
  assign fin_word  = {out_col.row[3].pf, out_col.row[3].chi,
                      out_cur[3] | MAGW'(out_col.row[3].d)};
  assign part_word = {tap_col.row[3].pf, tap_col.row[3].chi,
                      tap_cur[3] | (MAGW'(tap_col.row[3].d) << FBK)};
  assign a_we      = out_take && (cb32_q || !out_col.colno[COLW-1]);
  assign b_we      = cb32_q ? (run && fill[FBK-1]) : (out_take && out_col.colno[COLW-1]);
  assign b_waddr   = cb32_q ? tap_col.colno[COLW-2:0] : out_col.colno[COLW-2:0];
  assign a_raddr   = cb32_q ? tap_col.colno[COLW-2:0] : in_colno[COLW-2:0];

  line_buffer #(.DEPTH(CBW / 2), .WIDTH(12)) u_lb_a (
    .clk, .we_i(a_we), .waddr_i(out_col.colno[COLW-2:0]), .wdata_i(fin_word),
    .raddr_i(a_raddr), .rdata_o(lba_rdata)
  );
  line_buffer #(.DEPTH(CBW / 2), .WIDTH(12)) u_lb_b (
    .clk, .we_i(b_we), .waddr_i(b_waddr), .wdata_i(cb32_q ? part_word : fin_word),
    .raddr_i(in_colno[COLW-2:0]), .rdata_o(lbb_rdata)
  );
  assign lb_rdata = (cb32_q || in_colno[COLW-1]) ? lbb_rdata : lba_rdata;

  always_comb begin
    coef_valid_o = out_take;
    coef_index_o = ncol_out[NCOLW-1:0];
    for (int r = 0; r < 4; r++) begin
      coef_sign_o[r] = out_col.row[r].chi;
      coef_mag_o[r]  = out_cur[r] | MAGW'(out_col.row[r].d);
    end
    for (int k = 0; k < NPL; k++) begin
      dbg_pass_o[k]     = pass[k];
      dbg_rlc_o[k]      = rlc[k];
      dbg_rlc_fail_o[k] = rlc_fail[k];
      dbg_sign_o[k]     = sgn_v[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncol_in <= '0; ncol_out <= '0; ncol_fb <= '0;
    end else if (clear) begin
      ncol_in <= '0; ncol_out <= '0; ncol_fb <= '0;
    end else begin
      if (run && fill[FBK-1]) ncol_fb <= ncol_fb + 1'b1;
      if (src_take) ncol_in  <= ncol_in + 1'b1;
      if (out_take) ncol_out <= ncol_out + 1'b1;
    end
  end
endmodule
