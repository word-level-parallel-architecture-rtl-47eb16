// uniform_decoder (UD): decodes one decision with the fixed, non-adaptive
// uniform probability state (Qe = 0x5601, MPS = 0). It is the MQ decoder
// without the probability-state update, which is what keeps two of them in
// series as short as one adaptive decoder. Combinational; it continues the
// arithmetic register and byte window of the pass being decoded.
//
// Origin: a non-adaptive decoder for the uniform context, to keep the chain
// of two of them as short as one adaptive decoder, follows the published
// design; its realisation (the MQ step with the state fixed) is this design's.
module uniform_decoder
  import ebcd_pkg::*;
(
  input  mq_work_t st_i,
  input  win_t     win_i,
  output logic     d_o,
  output mq_work_t st_o
);
  mq_res_t res;
  always_comb begin
    res  = mq_decode(st_i, '{idx: UNI_STATE, mps: 1'b0}, win_i);
    d_o  = res.d;
    st_o = res.s;
  end
endmodule
