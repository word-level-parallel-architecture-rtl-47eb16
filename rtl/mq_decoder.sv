// mq_decoder: one-symbol adaptive MQ arithmetic decoder (AD0 / AD1 of the
// four-symbol decoder).
//
// Purely combinational: it takes the arithmetic register of one coding pass
// (interval A, code register C, bit counter CT, bytes already consumed in
// this cycle), the probability state of one context and an 8-byte look-ahead
// window of that pass's bit stream, and returns the decoded decision, the
// updated arithmetic register and the updated context state. Decoding,
// conditional exchange and renormalisation (with byte input and 0xFF
// stuffing) follow the JPEG 2000 MQ decoder; several instances can be
// chained inside one clock cycle, each starting where the previous one
// stopped in the byte window.
//
// Origin: the decoder itself is the JPEG 2000 MQ decoder; using it as a purely
// combinational step (state in, state out) so that several can be chained in
// one cycle follows the published four-symbol decoder.
module mq_decoder
  import ebcd_pkg::*;
(
  input  mq_work_t st_i,    // arithmetic register, bytes consumed so far
  input  ctx_st_t  cx_i,    // probability state of the context
  input  win_t     win_i,   // stream bytes from the register's pointer on
  output logic     d_o,     // decoded decision
  output mq_work_t st_o,
  output ctx_st_t  cx_o
);
  mq_res_t res;
  always_comb begin
    res  = mq_decode(st_i, cx_i, win_i);
    d_o  = res.d;
    st_o = res.s;
    cx_o = res.cx;
  end
endmodule
