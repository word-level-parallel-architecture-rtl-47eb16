// fad: four-symbol arithmetic decoder of one bit-plane.
//
// Decodes, in one combinational step, every decision that one sample of the
// context formation needs:
//   one-symbol mode  - AD0 only: a zero-coding decision that comes out 0, a
//                      refinement decision, or a run-length decision of 0;
//   two-symbol mode  - AD0 then AD1: zero coding gives 1, AD1 decodes the sign;
//   four-symbol mode - run-length decision 1 (AD0), the two uniform decoders
//                      give the 2-bit position of the first 1 in the column
//                      (MSB first), AD1 decodes its sign.
// The muxes in front of and behind AD1 are steered by the result of AD0, as
// in the architecture this follows. AD1 continues the arithmetic register
// left by AD0 (or by the second UD) since all symbols of one sample belong
// to the same pass and so to the same terminated bit stream.
// Interface: dec_i qualifies a request; pass_i is unused inside (the caller
// selects that pass's registers) but kept for the sign-valid rule of pass 2.
//
// Origin: the AD0-UD-UD-AD1 chain, its two multiplexers steered by AD0's
// decision and the 1/2/4-symbol modes follow the published architecture; the
// byte-count output and the fixed run-length sign context are this design's.
module fad
  import ebcd_pkg::*;
(
  input  logic       dec_i,     // a sample is decoded this cycle
  input  pass_e      pass_i,
  input  logic       rlc_i,     // run-length mode (cx0 is the RL context)
  input  mq_reg_t    ar_i,      // arithmetic register of the pass
  input  ctx_st_t    ctx0_i,    // state of context cx0
  input  ctx_st_t    ctx1_i,    // state of context cx1 (sign)
  input  win_t       win_i,     // bytes from the pass's stream pointer on
  output logic       mag_o,     // AD0 decision (magnitude, refinement, run)
  output logic       sign_o,    // AD1 decision (raw, before the XOR bit)
  output logic       sign_valid_o,
  output logic       rlc_fail_o,// run-length decision was 1
  output logic [1:0] uniform_o, // position of the first 1 in the run column
  output mq_reg_t    ar_o,
  output logic [3:0] used_o,    // bytes consumed
  output ctx_st_t    ctx0_o,
  output ctx_st_t    ctx1_o,
  output logic       ctx1_we_o  // AD1 was used: write ctx1 back
);
  mq_work_t s0, s_ad0, s_ud0, s_ud1, s_in1, s_ad1, s_fin;
  logic     d0, u0, u1, d1, use1;

  assign s0 = '{r: ar_i, ofs: 4'd0};

  mq_decoder      u_ad0 (.st_i(s0),    .cx_i(ctx0_i), .win_i(win_i), .d_o(d0), .st_o(s_ad0), .cx_o(ctx0_o));
  uniform_decoder u_ud0 (.st_i(s_ad0), .win_i(win_i), .d_o(u0), .st_o(s_ud0));
  uniform_decoder u_ud1 (.st_i(s_ud0), .win_i(win_i), .d_o(u1), .st_o(s_ud1));
  mq_decoder      u_ad1 (.st_i(s_in1), .cx_i(ctx1_i), .win_i(win_i), .d_o(d1), .st_o(s_ad1), .cx_o(ctx1_o));

  always_comb begin
    // AD1 is needed whenever AD0 decodes a 1 outside refinement
    use1  = dec_i && d0 && (pass_i != PASS_MRP);
    s_in1 = rlc_i ? s_ud1 : s_ad0;                 // first mux
    s_fin = use1 ? s_ad1 : s_ad0;                  // second mux
    mag_o        = d0;
    sign_o       = d1;
    sign_valid_o = use1;
    rlc_fail_o   = rlc_i && d0;
    uniform_o    = (rlc_i && d0) ? {u0, u1} : 2'd0;
    ar_o         = s_fin.r;
    used_o       = s_fin.ofs;
    ctx1_we_o    = use1;
  end
endmodule
