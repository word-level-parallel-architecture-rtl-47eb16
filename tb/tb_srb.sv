// tb_srb: self-checking test of the state register bank (the arithmetic
// registers, byte pointers and context states of the 30 pass streams).
//
// Each of the 30 streams gets random bytes, served as an 8-byte window from
// the bank's pointer. The test checks: reset/clear give every context its
// initial state and every pointer 0; load runs the decoder initialisation of
// every stream; then, for many random cycles, each plane writes back a random
// arithmetic register, byte count and context states for a random pass,
// and a testbench model of the bank is compared with the read ports (pointer,
// register, both contexts, window) of every plane after each write. The
// uniform context and the contexts a pass does not use must keep their
// initial states. Cycle watchdog.
module tb_srb;
  import ebcd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 100000) begin
      $display("ERROR watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  logic              clear, load;
  logic [ADDR_W-1:0] addr [NPL][3];
  win_t              win [NPL][3];
  pass_e             pass [NPL];
  logic [4:0]        cx0 [NPL], cx1 [NPL];
  mq_reg_t           ar_o [NPL], ar_w [NPL];
  ctx_st_t           c0_o [NPL], c1_o [NPL], c0_w [NPL], c1_w [NPL];
  win_t              win_o [NPL];
  logic              we [NPL], c1_we [NPL];
  logic [3:0]        used [NPL];

  srb dut (.clk, .rst_n, .clear_i(clear), .load_i(load), .bs_addr_o(addr), .bs_win_i(win),
           .pass_i(pass), .cx0_i(cx0), .cx1_i(cx1), .ar_o, .ctx0_o(c0_o), .ctx1_o(c1_o), .win_o,
           .we_i(we), .ar_w, .used_w(used), .ctx0_w(c0_w), .ctx1_we(c1_we), .ctx1_w(c1_w));

  byte unsigned mem [NPL][3][1024];
  always_comb
    for (int k = 0; k < NPL; k++)
      for (int p = 0; p < 3; p++)
        for (int i = 0; i < WIN; i++)
          win[k][p][i] = (int'(addr[k][p]) + i < 1024) ? mem[k][p][int'(addr[k][p]) + i] : 8'hFF;

  int checks = 0, failures = 0, n_wr1 = 0, n_wr0 = 0;
  ctx_st_t m_ctx [NPL][3][19];
  mq_reg_t m_ar [NPL][3];
  int      m_ptr [NPL][3];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("ERROR %s", what); end
  endtask

  function automatic ctx_st_t init_of(int c);
    ctx_st_t v;
    v.mps = 1'b0;
    v.idx = (c == 0) ? 6'd4 : (c == 17) ? 6'd3 : (c == 18) ? 6'd46 : 6'd0;
    return v;
  endfunction

  function automatic win_t mwin(int k, int p);
    win_t w;
    for (int i = 0; i < WIN; i++) w[i] = mem[k][p][m_ptr[k][p] + i];
    return w;
  endfunction

  // pass p (0..2) uses context c
  function automatic bit uses(int p, int c);
    if (p == 1) return c >= 14 && c <= 16;
    return c <= 13 || (p == 2 && c == 17);
  endfunction

  task automatic compare_all();
    for (int k = 0; k < NPL; k++)
      for (int p = 0; p < 3; p++) begin
        pass[k] = pass_e'(p + 1);
        for (int c = 0; c < 19; c++) begin
          cx0[k] = 5'(c); cx1[k] = 5'(18 - c);
          #1;
          check(c0_o[k] == m_ctx[k][p][c], $sformatf("plane %0d pass %0d ctx %0d", k, p, c));
          check(c1_o[k] == m_ctx[k][p][18 - c], $sformatf("plane %0d pass %0d ctx %0d (port 1)", k, p, 18 - c));
        end
        check(int'(addr[k][p]) == m_ptr[k][p], $sformatf("plane %0d pass %0d pointer", k, p));
        check(ar_o[k] == m_ar[k][p], $sformatf("plane %0d pass %0d register", k, p));
        check(win_o[k] == mwin(k, p), $sformatf("plane %0d pass %0d window", k, p));
      end
  endtask

  initial begin
    clear = 0; load = 0;
    for (int k = 0; k < NPL; k++) begin
      we[k] = 0; c1_we[k] = 0; pass[k] = PASS_SPP; cx0[k] = 0; cx1[k] = 0; used[k] = 0;
      ar_w[k] = '0; c0_w[k] = '0; c1_w[k] = '0;
      for (int p = 0; p < 3; p++) for (int i = 0; i < 1024; i++) mem[k][p][i] = 8'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NPL; k++)
      for (int p = 0; p < 3; p++) begin
        m_ptr[k][p] = 0; m_ar[k][p] = '0;
        for (int c = 0; c < 19; c++) m_ctx[k][p][c] = init_of(c);
      end
    compare_all();
    for (int blk = 0; blk < 3; blk++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; load = 1;
      for (int k = 0; k < NPL; k++)
        for (int p = 0; p < 3; p++) begin
          mq_work_t s;
          m_ptr[k][p] = 0;
          for (int c = 0; c < 19; c++) m_ctx[k][p][c] = init_of(c);
          s = mq_initdec(mwin(k, p));
          m_ar[k][p] = s.r; m_ptr[k][p] = int'(s.ofs);
        end
      @(negedge clk); load = 0;
      compare_all();
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        for (int k = 0; k < NPL; k++) begin
          int p;
          p = int'($urandom_range(2, 0));
          we[k] = ($urandom_range(3, 0) != 0);
          pass[k] = pass_e'(p + 1);
          cx0[k] = 5'($urandom_range(18, 0)); cx1[k] = 5'($urandom_range(18, 0));
          c1_we[k] = $urandom_range(1, 0);
          ar_w[k] = {$urandom, $urandom};
          used[k] = 4'($urandom_range(2, 0));
          c0_w[k] = ctx_st_t'(7'($urandom)); c1_w[k] = ctx_st_t'(7'($urandom));
          if (we[k]) begin
            if (c1_we[k]) n_wr1++; else n_wr0++;
            m_ar[k][p] = ar_w[k];
            m_ptr[k][p] += int'(used[k]);
            if (uses(p, int'(cx0[k]))) m_ctx[k][p][cx0[k]] = c0_w[k];
            if (c1_we[k] && uses(p, int'(cx1[k]))) m_ctx[k][p][cx1[k]] = c1_w[k];
          end
        end
        @(negedge clk);
        for (int k = 0; k < NPL; k++) we[k] = 0;
        if (n % 20 == 0) compare_all();
      end
      compare_all();
    end
    check(n_wr0 > 0 && n_wr1 > 0, "a write mode never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
