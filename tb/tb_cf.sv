// tb_cf: self-checking test of the context formation of one bit-plane with
// its column-switching scan.
//
// The reference encoder codes a random code-block; the CF under test then
// decodes one of its bit-planes on its own. Its columns arrive as the plane
// above would hand them (sign and significance of the upper planes,
// first-refinement and first-pass flags, previous-stripe sample), and an
// oracle stands in for the arithmetic decoder: for each pass it replays the
// reference's coded decisions of that pass in order, and checks that the
// CF asks, in every cycle, for exactly the next decision(s) of that pass
// with the reference's context (ZC/SC/MR/RL/UNI, sign via the XOR bit). This
// checks that the column-switching order keeps the order of every pass.
// Every column handed down is compared with the block (bit, sign,
// significance, first-pass and first-refinement flags, previous-stripe data).
// Planes near the top, middle and bottom, a plane without coded bits, both
// block sizes and all bands are used, with free-running and randomly stalled
// source and sink; the free-running runs must take at most about one cycle
// per sample. Scan states, condition 0, runs with and without a 1, stalls
// and empty planes are counted and must occur. Cycle watchdog.
module tb_cf;
  import ebcd_pkg::*;
  import ebc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;

  logic             clear, active, src_valid, src_take, out_valid, out_sel, out_take, fwd;
  logic             dec, rlc, mag, sgn, sgn_v, rlc_fail, cond0;
  band_e            band;
  logic [COLW-1:0]  last_col;
  logic [NCOLW:0]   total;
  col_t             src, out_col;
  pass_e            pass;
  logic [4:0]       cx0, cx1;
  logic [1:0]       uni;
  scan_e            state;

  cf #(.K(5)) dut (
    .clk, .rst_n, .clear_i(clear), .active_i(active), .band_i(band), .last_col_i(last_col),
    .total_i(total), .src_valid_i(src_valid), .src_i(src), .src_take_o(src_take),
    .out_valid_o(out_valid), .out_o(out_col), .out_sel_o(out_sel), .out_take_i(out_take),
    .fwd_o(fwd), .dec_o(dec), .pass_o(pass), .rlc_o(rlc), .cx0_o(cx0), .cx1_o(cx1),
    .mag_i(mag), .sign_i(sgn), .sign_valid_i(sgn_v), .rlc_fail_i(rlc_fail), .uniform_i(uni),
    .state_o(state), .cond0_o(cond0)
  );

  int checks = 0, failures = 0;
  int n_p1c1 = 0, n_np1c2 = 0, n_p1c2 = 0, n_np1c3 = 0, n_cond0 = 0, n_run0 = 0, n_run1 = 0;
  int n_stall = 0, n_empty = 0, n_sign = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("ERROR @%0d %s", cyc, what); end
  endtask

  // ------------------------------------------------ oracle decoder
  localparam int QMAX = 20000;
  int  q_ctx [3][QMAX];
  int  q_bit [3][QMAX];
  int  q_len [3];
  int  q_idx [3];

  function automatic int qb(int p, int j);
    return (j < q_len[p]) ? q_bit[p][j] : 0;
  endfunction

  int pi;
  always_comb begin
    pi = (pass == PASS_NONE) ? 0 : int'(pass) - 1;
    mag = 0; sgn = 0; sgn_v = 0; rlc_fail = 0; uni = 0;
    if (dec) begin
      mag = qb(pi, q_idx[pi])[0];
      if (rlc) begin
        if (mag) begin
          rlc_fail = 1; uni = {qb(pi, q_idx[pi] + 1)[0], qb(pi, q_idx[pi] + 2)[0]};
          sgn = qb(pi, q_idx[pi] + 3)[0]; sgn_v = 1;
        end
      end else if (mag && pass != PASS_MRP) begin
        sgn = qb(pi, q_idx[pi] + 1)[0]; sgn_v = 1;
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 3000000) begin
      $display("ERROR watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
    if (rst_n && !clear && dec) begin
      int j;
      j = q_idx[pi];
      check(pass != PASS_NONE, "decode without a pass");
      check(j < q_len[pi], $sformatf("pass %0d: more decisions asked than coded", pi + 1));
      if (rlc) begin
        check(pass == PASS_CUP && q_ctx[pi][j] == 17, $sformatf("pass %0d decision %0d: run mode, expected context %0d", pi + 1, j, q_ctx[pi][j]));
        if (mag) begin
          check(q_ctx[pi][j+1] == 18 && q_ctx[pi][j+2] == 18, "run position not in the uniform context");
          check(q_ctx[pi][j+3] == int'(cx1), $sformatf("run sign context %0d, expected %0d", cx1, q_ctx[pi][j+3]));
          q_idx[pi] <= j + 4; n_run1++;
        end else begin
          q_idx[pi] <= j + 1; n_run0++;
        end
      end else begin
        check(q_ctx[pi][j] == int'(cx0), $sformatf("pass %0d decision %0d: context %0d, expected %0d", pi + 1, j, cx0, q_ctx[pi][j]));
        if (sgn_v) begin
          check(q_ctx[pi][j+1] == int'(cx1), $sformatf("pass %0d decision %0d: sign context %0d, expected %0d", pi + 1, j + 1, cx1, q_ctx[pi][j+1]));
          q_idx[pi] <= j + 2; n_sign++;
        end else q_idx[pi] <= j + 1;
      end
    end
    if (state == SC_P1C1)  n_p1c1++;
    if (state == SC_NP1C2) n_np1c2++;
    if (state == SC_P1C2)  n_p1c2++;
    if (state == SC_NP1C3) n_np1c3++;
    if (cond0) n_cond0++;
  end

  // ------------------------------------------------ block and columns
  ebc_enc enc;
  int K, W;
  bit stall;
  int ncol_in, ncol_out;

  function automatic bit nz(int m, int sh);
    return (m >> sh) != 0;
  endfunction

  function automatic col_t make_col(int t);
    col_t c;
    int s, x;
    s = t / W; x = t % W;
    c = '0;
    c.colno = COLW'(x);
    for (int r = 0; r < 4; r++) begin
      int y, m;
      y = 4 * s + r; m = enc.mag[y][x];
      c.row[r].dh  = nz(m, K + 1);
      c.row[r].chi = nz(m, K + 1) ? enc.neg[y][x][0] : 1'b0;
      c.row[r].pf  = nz(m, K + 1) ? enc.p1first[y][x] : 1'b0;
      c.row[r].gam = ((m >> (K + 1)) == 1);
    end
    if (s > 0) begin
      int m;
      m = enc.mag[4 * s - 1][x];
      c.prev.chi = nz(m, 0) ? enc.neg[4 * s - 1][x][0] : 1'b0;
      c.prev.pm  = enc.p1first[4 * s - 1][x];
      c.prev.dh  = nz(m, K + 1);
      c.prev.d   = (m >> K) & 1;
    end
    return c;
  endfunction

  always_comb begin
    src_valid = rst_n && !clear && (ncol_in < W * W / 4) && (!stall || $urandom_range(2, 0) != 0);
    src = make_col(ncol_in);
  end

  always @(negedge clk) out_take = out_valid && (!stall || $urandom_range(2, 0) != 0);

  always @(posedge clk) begin
    if (clear) begin ncol_in <= 0; ncol_out <= 0; end
    else begin
      if (src_take) ncol_in <= ncol_in + 1;
      if (src_valid && !src_take && stall) n_stall++;
      if (out_take) begin
        int s, x;
        s = ncol_out / W; x = ncol_out % W;
        check(int'(out_col.colno) == x, $sformatf("column %0d handed down as %0d", ncol_out, out_col.colno));
        for (int r = 0; r < 4; r++) begin
          int y, m;
          y = 4 * s + r; m = enc.mag[y][x];
          checks++;
          if (out_col.row[r].d != m[K] || out_col.row[r].dh != nz(m, K) ||
              (nz(m, K) && out_col.row[r].chi != enc.neg[y][x][0]) ||
              (nz(m, K) && out_col.row[r].pf != enc.p1first[y][x]) ||
              out_col.row[r].gam != ((m >> K) == 1)) begin
            failures++;
            if (failures < 15)
              $display("ERROR plane %0d sample (%0d,%0d) mag %0d: d=%0d dh=%0d chi=%0d pf=%0d gam=%0d", K, y, x, m,
                       out_col.row[r].d, out_col.row[r].dh, out_col.row[r].chi, out_col.row[r].pf, out_col.row[r].gam);
          end
        end
        ncol_out <= ncol_out + 1;
      end
    end
  end

  task automatic run(input int w, input int n, input int k, input int bnd, input int dens, input bit stl);
    longint t0;
    enc.randomize_block(w, n, bnd, dens);
    enc.encode_block();
    K = k; W = w; stall = stl;
    for (int p = 0; p < 3; p++) begin
      if (k < n) begin
        q_len[p] = enc.syms[k][p].size();
        for (int j = 0; j < q_len[p]; j++) begin q_ctx[p][j] = enc.syms[k][p][j].ctx; q_bit[p][j] = enc.syms[k][p][j].bit_v; end
      end else q_len[p] = 0;
      q_idx[p] = 0;
    end
    @(negedge clk);
    clear = 1; active = (k < n); band = band_e'(bnd);
    last_col = COLW'(w - 1); total = (NCOLW+1)'(w * w / 4);
    @(negedge clk);
    clear = 0;
    t0 = cyc;
    while (ncol_out < w * w / 4 && cyc - t0 < 200000) @(negedge clk);
    check(ncol_out == w * w / 4, "not all columns handed down");
    for (int p = 0; p < 3; p++)
      check(q_idx[p] == q_len[p], $sformatf("plane %0d pass %0d: %0d of %0d decisions used", k, p + 1, q_idx[p], q_len[p]));
    $display("plane %0d of %0d, %0dx%0d band %0d density %0d%% stall %0d: %0d cycles, decisions %0d/%0d/%0d",
             k, n, w, w, bnd, dens, stl, cyc - t0, q_len[0], q_len[1], q_len[2]);
    if (!stl) check(cyc - t0 <= w * w + 32, "free-running plane slower than one sample per cycle");
    if (k >= n) n_empty++;
  endtask

  initial begin
    enc = new();
    clear = 0; active = 1; band = BAND_LL; last_col = 63; total = 1024; stall = 0; W = 64; K = 0;
    ncol_in = 0; ncol_out = 0;
    for (int p = 0; p < 3; p++) begin q_len[p] = 0; q_idx[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(64, 10, 9, 0, 30, 0);
    run(64, 10, 5, 1, 30, 0);
    run(64, 10, 0, 2, 60, 0);
    run(64, 10, 2, 3, 90, 1);
    run(32, 10, 4, 0, 40, 0);
    run(32, 6, 1, 3, 20, 1);
    run(64, 6, 8, 0, 20, 0);
    for (int i = 0; i < 4; i++) begin
      int n;
      n = int'($urandom_range(10, 1));
      run(($urandom_range(1, 0) != 0) ? 64 : 32, n, int'($urandom_range(n - 1, 0)),
          int'($urandom_range(3, 0)), int'($urandom_range(100, 1)), $urandom_range(1, 0));
    end
    $display("states P1@C1=%0d NP1@C2=%0d P1@C2=%0d NP1@C3=%0d cond0=%0d run0=%0d run1=%0d sign=%0d stall=%0d empty=%0d",
             n_p1c1, n_np1c2, n_p1c2, n_np1c3, n_cond0, n_run0, n_run1, n_sign, n_stall, n_empty);
    check(n_p1c1 > 0 && n_np1c2 > 0 && n_p1c2 > 0 && n_np1c3 > 0, "a scan state never used");
    check(n_cond0 > 0, "condition 0 never happened");
    check(n_run0 > 0 && n_run1 > 0, "a run-length case never happened");
    check(n_sign > 0 && n_stall > 0 && n_empty > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
