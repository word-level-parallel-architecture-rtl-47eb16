// tb_mq_decoder: self-checking test of the one-symbol MQ decoder.
//
// Random decision sequences over all 19 contexts, with a per-context bias so
// that both MPS and LPS paths, conditional exchange, MPS switching and long
// renormalisations occur, are coded by the reference MQ encoder (carry
// propagation, 0xFF bit stuffing, standard flush). The decoder is then
// stepped decision by decision: its arithmetic register and context states
// are kept by the testbench, the stream window is served from the byte
// pointer (0xFF past the end), and every decoded decision and the consumed
// byte count are checked. A cycle watchdog bounds the run.
module tb_mq_decoder;
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

  mq_work_t st_i, st_o;
  ctx_st_t  cx_i, cx_o;
  win_t     win_i;
  logic     d_o;

  mq_decoder dut (.st_i, .cx_i, .win_i, .d_o, .st_o, .cx_o);

  int checks = 0, failures = 0;
  int n_lps = 0, n_bytes = 0;
  mq_enc enc;
  byte unsigned s [$];
  int dd [$], cc [$];
  ctx_st_t ctx [19];

  function automatic win_t window(int p);
    win_t w;
    for (int i = 0; i < WIN; i++) w[i] = (p + i < s.size()) ? s[p + i] : 8'hFF;
    return w;
  endfunction

  initial begin
    int ptr;
    int bias [19];
    mq_work_t st;
    enc = new();
    for (int seq = 0; seq < 40; seq++) begin
      int n;
      n = (seq < 5) ? seq * 3 : int'($urandom_range(3000, 50));
      for (int c = 0; c < 19; c++) bias[c] = int'($urandom_range(100, 0));
      enc.init();
      dd.delete(); cc.delete();
      for (int i = 0; i < n; i++) begin
        int c, d;
        c = int'($urandom_range(17, 0));
        d = (int'($urandom_range(99, 0)) < bias[c]) ? 1 : 0;
        dd.push_back(d); cc.push_back(c);
        enc.encode(d, c);
      end
      enc.flush(s);
      n_bytes += s.size();
      for (int c = 0; c < 19; c++) ctx[c] = ctx_init(5'(c));
      st = mq_initdec(window(0));
      ptr = int'(st.ofs);
      st.ofs = '0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        st_i = st; cx_i = ctx[cc[i]]; win_i = window(ptr);
        #1;
        checks++;
        if (d_o != dd[i][0]) begin
          failures++;
          if (failures < 10) $display("ERROR seq %0d decision %0d: got %0d expected %0d", seq, i, d_o, dd[i]);
        end
        if (d_o != ctx[cc[i]].mps) n_lps++;
        ctx[cc[i]] = cx_o;
        ptr += int'(st_o.ofs);
        st = st_o; st.ofs = '0;
      end
      // the decoder never reads more than two bytes past the coded data
      checks++;
      if (ptr > s.size() + 2) begin
        failures++;
        $display("ERROR seq %0d: pointer %0d past stream of %0d bytes", seq, ptr, s.size());
      end
    end
    checks++;
    if (n_lps == 0) begin failures++; $display("ERROR no LPS decoded"); end
    $display("decoded with %0d LPS over %0d bytes", n_lps, n_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
