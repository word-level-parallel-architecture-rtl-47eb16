// tb_uniform_decoder: self-checking test of the uniform-context decoder.
//
// Random bits (the 2-bit run positions of run-length mode) are coded by the
// reference MQ encoder in the uniform context, whose probability state never
// changes, interleaved with decisions in another context (as in a cleanup
// pass); the decoder under test decodes the uniform ones and a reference
// one-symbol decoder the others. Every uniform decision and its consumed byte
// count are checked. A cycle watchdog bounds the run.
module tb_uniform_decoder;
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

  mq_work_t st_i, st_o, mst_o;
  win_t     win_i;
  logic     d_o, md_o;
  ctx_st_t  mcx_i, mcx_o;

  uniform_decoder dut (.st_i, .win_i, .d_o, .st_o);
  mq_decoder      u_other (.st_i, .cx_i(mcx_i), .win_i, .d_o(md_o), .st_o(mst_o), .cx_o(mcx_o));

  int checks = 0, failures = 0, n_uni = 0;
  mq_enc enc;
  byte unsigned s [$];
  int dd [$], cc [$];

  function automatic win_t window(int p);
    win_t w;
    for (int i = 0; i < WIN; i++) w[i] = (p + i < s.size()) ? s[p + i] : 8'hFF;
    return w;
  endfunction

  initial begin
    int ptr;
    mq_work_t st;
    ctx_st_t  rl;
    enc = new();
    for (int seq = 0; seq < 40; seq++) begin
      int n;
      n = int'($urandom_range(2000, 1));
      enc.init();
      dd.delete(); cc.delete();
      for (int i = 0; i < n; i++) begin
        int c, d;
        c = ($urandom_range(2, 0) == 0) ? 17 : 18;
        d = (c == 17) ? ((int'($urandom_range(9, 0)) == 0) ? 1 : 0) : int'($urandom_range(1, 0));
        dd.push_back(d); cc.push_back(c);
        enc.encode(d, c);
      end
      enc.flush(s);
      rl = ctx_init(5'd17);
      st = mq_initdec(window(0));
      ptr = int'(st.ofs); st.ofs = '0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        st_i = st; win_i = window(ptr); mcx_i = rl;
        #1;
        if (cc[i] == 18) begin
          checks++; n_uni++;
          if (d_o != dd[i][0]) begin
            failures++;
            if (failures < 10) $display("ERROR seq %0d decision %0d: got %0d expected %0d", seq, i, d_o, dd[i]);
          end
          ptr += int'(st_o.ofs); st = st_o;
        end else begin
          rl = mcx_o;
          ptr += int'(mst_o.ofs); st = mst_o;
        end
        st.ofs = '0;
      end
    end
    checks++;
    if (n_uni == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
