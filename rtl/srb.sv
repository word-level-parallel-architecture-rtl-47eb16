// srb: state register bank of the four-symbol arithmetic decoders.
//
// For every bit-plane and each of its three coding passes (each pass is a
// separately terminated bit stream whose probability models restart at the
// pass start) it holds
//   * the probability states of the contexts the pass uses, 7 bits each
//     (pass 1: 14 contexts, pass 2: 3, pass 3: 15 adaptive + uniform);
//   * the arithmetic register (A 16 b, C 32 b, CT 4 b) and the byte pointer
//     into that pass's stream.
// The registers are flip-flops, not SRAM, so that all ten decoders read and
// write their states in the same cycle.
// Start of a code-block: clear_i resets pointers to 0 and all contexts to
// their initial states; one cycle later (the stream windows now show the
// first bytes) load_i runs INITDEC on all 30 streams at once.
// Decoding: a plane's decoder reads the registers of the pass its context
// formation selects (combinational read) and writes back the updated
// registers at the clock edge when we_i is high. bs_addr_o is the byte
// pointer of every stream; the environment answers with bs_win_i, the 8
// bytes from that pointer on.
//
// Origin: keeping every plane's and pass's coding state in registers, read
// and written back in the same cycle as the decoders, follows the published
// design; the pointer/window bit-stream interface and keeping all 19 context
// slots per pass (only the used ones are ever written) are this design's.
module srb
  import ebcd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear_i,
  input  logic       load_i,
  output logic [ADDR_W-1:0] bs_addr_o [NPL][3],
  input  win_t       bs_win_i [NPL][3],
  // read port, one per plane
  input  pass_e      pass_i [NPL],
  input  logic [4:0] cx0_i  [NPL],
  input  logic [4:0] cx1_i  [NPL],
  output mq_reg_t    ar_o   [NPL],
  output ctx_st_t    ctx0_o [NPL],
  output ctx_st_t    ctx1_o [NPL],
  output win_t       win_o  [NPL],
  // write port, one per plane
  input  logic       we_i   [NPL],
  input  mq_reg_t    ar_w   [NPL],
  input  logic [3:0] used_w [NPL],
  input  ctx_st_t    ctx0_w [NPL],
  input  logic       ctx1_we[NPL],
  input  ctx_st_t    ctx1_w [NPL]
);
  ctx_st_t           ctx [NPL][3][NCX];
  mq_reg_t           ar  [NPL][3];
  logic [ADDR_W-1:0] ptr [NPL][3];
  mq_work_t          ini [NPL][3];   // INITDEC of every stream at its pointer

  // contexts a pass uses; the others are never written and stay constant
  function automatic logic used_ctx(input int p, input int c);
    if (p == 0) return c <= 13;                    // pass 1: ZC + SC
    if (p == 1) return c >= 14 && c <= 16;         // pass 2: MR
    return c <= 13 || c == 17;                     // pass 3: ZC + SC + RL
  endfunction

  function automatic logic [1:0] pidx(input pass_e p);
    return (p == PASS_NONE) ? 2'd0 : 2'(p) - 2'd1;
  endfunction

  always_comb begin
    for (int k = 0; k < NPL; k++) begin
      for (int p = 0; p < 3; p++) bs_addr_o[k][p] = ptr[k][p];
      ar_o[k]   = ar[k][pidx(pass_i[k])];
      ctx0_o[k] = ctx[k][pidx(pass_i[k])][cx0_i[k] < 5'(NCX) ? cx0_i[k] : 5'd0];
      ctx1_o[k] = ctx[k][pidx(pass_i[k])][cx1_i[k] < 5'(NCX) ? cx1_i[k] : 5'd0];
      win_o[k]  = bs_win_i[k][pidx(pass_i[k])];
      for (int p = 0; p < 3; p++) ini[k][p] = mq_initdec(bs_win_i[k][p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NPL; k++)
        for (int p = 0; p < 3; p++) begin
          ptr[k][p] <= '0;
          ar[k][p]  <= '0;
          for (int c = 0; c < NCX; c++) ctx[k][p][c] <= ctx_init(5'(c));
        end
    end else if (clear_i) begin
      for (int k = 0; k < NPL; k++)
        for (int p = 0; p < 3; p++) begin
          ptr[k][p] <= '0;
          for (int c = 0; c < NCX; c++) ctx[k][p][c] <= ctx_init(5'(c));
        end
    end else if (load_i) begin
      for (int k = 0; k < NPL; k++)
        for (int p = 0; p < 3; p++) begin
          ar[k][p]  <= ini[k][p].r;
          ptr[k][p] <= ptr[k][p] + ADDR_W'(ini[k][p].ofs);
        end
    end else begin
      for (int k = 0; k < NPL; k++) begin
        if (we_i[k]) begin
          for (int p = 0; p < 3; p++) begin
            if (pidx(pass_i[k]) == 2'(p)) begin
              ar[k][p]  <= ar_w[k];
              ptr[k][p] <= ptr[k][p] + ADDR_W'(used_w[k]);
              for (int c = 0; c < NCX; c++) begin
                if (used_ctx(p, c) && cx0_i[k] == 5'(c)) ctx[k][p][c] <= ctx0_w[k];
                if (used_ctx(p, c) && ctx1_we[k] && cx1_i[k] == 5'(c)) ctx[k][p][c] <= ctx1_w[k];
              end
            end
          end
        end
      end
    end
  end
endmodule
