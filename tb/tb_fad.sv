// tb_fad: self-checking test of the four-symbol arithmetic decoder.
//
// Random pass streams are built sample by sample in the three modes the
// decoder supports and coded by the reference MQ encoder:
//   1-symbol  refinement bit (pass 2) or a zero bit (pass 1/3);
//   2-symbol  a one bit followed by its sign (pass 1/3);
//   4-symbol  run-length decision 1, 2-bit position, sign (pass 3);
// plus run-length decisions 0. The decoder is stepped one sample per cycle
// with the arithmetic register, context states and pointer kept by the
// testbench (as the register bank would); every decoded value, the number of
// symbols used and the bytes consumed are checked, and a cycle with no decode
// must not request a sign-context write (the bank ignores the rest then). Each mode is counted and must occur. Cycle watchdog.
module tb_fad;
  import ebcd_pkg::*;
  import ebc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 2000000) begin
      $display("ERROR watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  logic       dec_i, rlc_i;
  pass_e      pass_i;
  mq_reg_t    ar_i, ar_o;
  ctx_st_t    ctx0_i, ctx1_i, ctx0_o, ctx1_o;
  win_t       win_i;
  logic       mag_o, sign_o, sign_valid_o, rlc_fail_o, ctx1_we_o;
  logic [1:0] uniform_o;
  logic [3:0] used_o;

  fad dut (.dec_i, .pass_i, .rlc_i, .ar_i, .ctx0_i, .ctx1_i, .win_i,
           .mag_o, .sign_o, .sign_valid_o, .rlc_fail_o, .uniform_o, .ar_o, .used_o,
           .ctx0_o, .ctx1_o, .ctx1_we_o);

  typedef struct {
    int mode;      // 0 single, 1 bit+sign, 2 run 0, 3 run 1 + pos + sign
    int c0, c1, b, sg, pos;
  } smp_t;

  int checks = 0, failures = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  mq_enc enc;
  byte unsigned s [$];
  smp_t q [$];
  ctx_st_t ctx [19];

  function automatic win_t window(int p);
    win_t w;
    for (int i = 0; i < WIN; i++) w[i] = (p + i < s.size()) ? s[p + i] : 8'hFF;
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("ERROR %s", what); end
  endtask

  initial begin
    enc = new();
    dec_i = 0; rlc_i = 0; pass_i = PASS_NONE;
    for (int seq = 0; seq < 60; seq++) begin
      int ps, n, ptr;
      mq_work_t st;
      ps = seq % 3;                       // 0: pass 1, 1: pass 2, 2: pass 3
      n = int'($urandom_range(600, 1));
      enc.init(); q.delete();
      for (int i = 0; i < n; i++) begin
        smp_t x;
        x.c0 = 0; x.c1 = 9; x.b = 0; x.sg = 0; x.pos = 0;
        if (ps == 1) begin
          x.mode = 0; x.c0 = int'($urandom_range(16, 14)); x.b = int'($urandom_range(1, 0));
          enc.encode(x.b, x.c0);
        end else if (ps == 2 && $urandom_range(2, 0) == 0) begin
          x.c0 = 17; x.c1 = 9;
          x.b = ($urandom_range(3, 0) == 0) ? 1 : 0;
          x.mode = x.b ? 3 : 2;
          enc.encode(x.b, 17);
          if (x.b) begin
            x.pos = int'($urandom_range(3, 0)); x.sg = int'($urandom_range(1, 0));
            enc.encode(x.pos >> 1, 18); enc.encode(x.pos & 1, 18); enc.encode(x.sg, 9);
          end
        end else begin
          x.c0 = int'($urandom_range(8, 0)); x.c1 = int'($urandom_range(13, 9));
          x.b = ($urandom_range(2, 0) == 0) ? 1 : 0;
          x.mode = x.b;
          enc.encode(x.b, x.c0);
          if (x.b) begin x.sg = int'($urandom_range(1, 0)); enc.encode(x.sg, x.c1); end
        end
        q.push_back(x);
      end
      enc.flush(s);
      for (int c = 0; c < 19; c++) ctx[c] = ctx_init(5'(c));
      st = mq_initdec(window(0));
      ptr = int'(st.ofs);
      for (int i = 0; i < n; i++) begin
        smp_t x;
        x = q[i];
        // an idle cycle first, sometimes
        if ($urandom_range(3, 0) == 0) begin
          @(negedge clk);
          dec_i = 0; pass_i = pass_e'(ps + 1); rlc_i = 0;
          ar_i = st.r; ctx0_i = ctx[x.c0]; ctx1_i = ctx[x.c1]; win_i = window(ptr);
          #1;
          check(!sign_valid_o && !ctx1_we_o, "idle cycle requested a sign write");
        end
        @(negedge clk);
        dec_i = 1; pass_i = pass_e'(ps + 1); rlc_i = (x.mode >= 2);
        ar_i = st.r; ctx0_i = ctx[x.c0]; ctx1_i = ctx[x.c1]; win_i = window(ptr);
        #1;
        n_mode[x.mode]++;
        check(mag_o == x.b[0], $sformatf("pass %0d sample %0d mode %0d: decision %0d expected %0d", ps, i, x.mode, mag_o, x.b));
        if (x.mode == 2) check(!rlc_fail_o && !sign_valid_o, "run of zeros decoded a 1");
        if (x.mode == 3) begin
          check(rlc_fail_o, "run-length 1 not flagged");
          check(int'(uniform_o) == x.pos, $sformatf("position %0d expected %0d", uniform_o, x.pos));
        end
        if (x.mode == 1 || x.mode == 3) begin
          check(sign_valid_o && sign_o == x.sg[0], "sign wrong or missing");
          check(ctx1_we_o, "sign context not written");
        end else
          check(!sign_valid_o && !ctx1_we_o, "spurious sign decode");
        ctx[x.c0] = ctx0_o;
        if (ctx1_we_o) ctx[x.c1] = ctx1_o;
        st.r = ar_o;
        ptr += int'(used_o);
      end
      check(ptr <= s.size() + 2, "pointer ran past the stream");
    end
    @(negedge clk);
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d never exercised", m));
    $display("modes: single=%0d bit+sign=%0d run0=%0d run1=%0d", n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
