// tb_ebc_decoder: end-to-end self-checking test of the whole decoder at its
// full size (ten bit-planes, 64x64 code-blocks, default parameters).
//
// For each test block the reference encoder (ebc_ref_pkg) codes random
// sparse coefficients in the parallel mode into 30 pass streams; the
// testbench serves each stream's 8-byte window combinationally from its byte
// address (0xFF past the end), starts the decoder and compares every decoded
// coefficient (magnitude, and sign when non-zero) and the column order.
// Blocks cover 64x64 and 32x32, all four bands, 10 and fewer planes and
// several densities. The decode time of each block is checked against one
// sample per cycle plus the fill latency of the ten planes (at most 256
// cycles), for both block sizes.
// Each mechanism of the design is counted through the debug outputs (the four
// scan states, condition 0, run-length runs of zeros and with a 1, the
// two-symbol sign decode, refinement, empty planes, both block sizes); a
// mechanism that never happened counts as a failure.
// A cycle watchdog ends the test with a failure if the decoder hangs.
module tb_ebc_decoder;
  import ebcd_pkg::*;
  import ebc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 start;
  band_e                band;
  logic                 cb32;
  logic [3:0]           nplanes;
  logic [ADDR_W-1:0]    bs_addr [NPL][3];
  win_t                 bs_win  [NPL][3];
  logic                 coef_valid;
  logic [NCOLW-1:0]     coef_index;
  logic [3:0]           coef_sign;
  logic [3:0][MAGW-1:0] coef_mag;
  logic                 busy, done;
  scan_e                dbg_state [NPL];
  pass_e                dbg_pass [NPL];
  logic                 dbg_rlc [NPL], dbg_rlc_fail [NPL], dbg_sign [NPL], dbg_cond0 [NPL];

  ebc_decoder dut (
    .clk, .rst_n, .start_i(start), .band_i(band), .cb32_i(cb32), .nplanes_i(nplanes),
    .bs_addr_o(bs_addr), .bs_win_i(bs_win),
    .coef_valid_o(coef_valid), .coef_index_o(coef_index), .coef_sign_o(coef_sign),
    .coef_mag_o(coef_mag), .busy_o(busy), .done_o(done),
    .dbg_state_o(dbg_state), .dbg_pass_o(dbg_pass), .dbg_rlc_o(dbg_rlc),
    .dbg_rlc_fail_o(dbg_rlc_fail), .dbg_sign_o(dbg_sign), .dbg_cond0_o(dbg_cond0)
  );

  // ------------------------------------------------------ stream memories
  byte unsigned bsm [NPL][3][4096];
  int           blen [NPL][3];

  always_comb
    for (int k = 0; k < NPL; k++)
      for (int p = 0; p < 3; p++)
        for (int i = 0; i < WIN; i++) begin
          int a;
          a = int'(bs_addr[k][p]) + i;
          bs_win[k][p][i] = (a < blen[k][p]) ? bsm[k][p][a] : 8'hFF;
        end

  // ------------------------------------------------------------ counters
  int checks = 0, failures = 0;
  longint cyc = 0;
  localparam longint WATCHDOG = 400000;
  int n_p1c1 = 0, n_np1c2 = 0, n_p1c2 = 0, n_np1c3 = 0, n_cond0 = 0;
  int n_run0 = 0, n_run1 = 0, n_sign2 = 0, n_mr = 0, n_cb32 = 0, n_empty = 0, n_cb64 = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > WATCHDOG) begin
      $display("ERROR watchdog expired");
      failures = failures + 1;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    for (int k = 0; k < NPL; k++) begin
      if (dbg_state[k] == SC_P1C1)  n_p1c1++;
      if (dbg_state[k] == SC_NP1C2) n_np1c2++;
      if (dbg_state[k] == SC_P1C2)  n_p1c2++;
      if (dbg_state[k] == SC_NP1C3) n_np1c3++;
      if (dbg_cond0[k]) n_cond0++;
      if (dbg_rlc[k] && !dbg_rlc_fail[k]) n_run0++;
      if (dbg_rlc[k] && dbg_rlc_fail[k]) n_run1++;
      if (dbg_pass[k] == PASS_SPP && dbg_sign[k]) n_sign2++;
      if (dbg_pass[k] == PASS_MRP) n_mr++;
    end
  end

  ebc_enc enc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("ERROR %s", what);
    end
  endtask

  task automatic run_block(input int w, input int n, input int bnd, input int density);
    int ncol, exp_idx, bad;
    longint t0, t1;
    enc.randomize_block(w, n, bnd, density);
    enc.encode_block();
    for (int k = 0; k < NPL; k++)
      for (int p = 0; p < 3; p++) begin
        blen[k][p] = enc.strm[k][p].size();
        if (blen[k][p] > 4096) $fatal(1, "stream too long");
        for (int i = 0; i < blen[k][p]; i++) bsm[k][p][i] = enc.strm[k][p][i];
      end
    @(negedge clk);
    start = 1'b1; band = band_e'(bnd); cb32 = (w == 32); nplanes = 4'(n);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    exp_idx = 0; bad = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (coef_valid) begin
        int s, x;
        check(int'(coef_index) == exp_idx, $sformatf("column order %0d, expected %0d", coef_index, exp_idx));
        s = exp_idx / w; x = exp_idx % w;
        for (int r = 0; r < 4; r++) begin
          int y;
          y = 4 * s + r;
          checks++;
          if (int'(coef_mag[r]) != enc.mag[y][x] ||
              (enc.mag[y][x] != 0 && coef_sign[r] != enc.neg[y][x][0])) begin
            failures++; bad++;
            if (bad < 10)
              $display("ERROR w=%0d n=%0d band=%0d (%0d,%0d): got %s%0d expected %s%0d", w, n, bnd,
                       y, x, coef_sign[r] ? "-" : "+", coef_mag[r],
                       enc.neg[y][x] ? "-" : "+", enc.mag[y][x]);
          end
        end
        exp_idx++;
      end
    end
    t1 = cyc;
    check(exp_idx == w * w / 4, $sformatf("%0d columns delivered, expected %0d", exp_idx, w * w / 4));
    $display("block %0dx%0d planes=%0d band=%0d density=%0d%%: %0d cycles (%0d samples), %0d mismatches",
             w, w, n, bnd, density, t1 - t0, w * w, bad);
    check((t1 - t0) <= w * w + 256, "block slower than one sample per cycle plus fill latency");
    if (w == 32) n_cb32++; else n_cb64++;
    if (n < 10) n_empty++;
  endtask

  initial begin
    enc = new();
    start = 1'b0; band = BAND_LL; cb32 = 1'b0; nplanes = 4'd10;
    for (int k = 0; k < NPL; k++) for (int p = 0; p < 3; p++) blen[k][p] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_block(64, 10, 0, 20);
    run_block(64, 10, 1, 50);
    run_block(64, 10, 2, 5);
    run_block(64, 10, 3, 90);
    run_block(32, 10, 0, 30);
    run_block(32, 7, 2, 60);
    run_block(64, 4, 3, 15);
    run_block(64, 1, 0, 10);
    for (int i = 0; i < 4; i++)
      run_block(($urandom_range(1, 0) != 0) ? 64 : 32, int'($urandom_range(10, 1)),
                int'($urandom_range(3, 0)), int'($urandom_range(100, 1)));
    // every mechanism must have been exercised
    $display("mechanisms: P1@C1=%0d NP1@C2=%0d P1@C2=%0d NP1@C3=%0d cond0=%0d run0=%0d run1=%0d sign2=%0d mr=%0d cb32=%0d cb64=%0d empty=%0d",
             n_p1c1, n_np1c2, n_p1c2, n_np1c3, n_cond0, n_run0, n_run1, n_sign2, n_mr, n_cb32, n_cb64, n_empty);
    check(n_p1c1  > 0, "scan state P1@C1 never used");
    check(n_np1c2 > 0, "scan state NP1@C2 never used");
    check(n_p1c2  > 0, "scan state P1@C2 never used");
    check(n_np1c3 > 0, "scan state NP1@C3 never used");
    check(n_cond0 > 0, "condition 0 (all-pass-1 column) never happened");
    check(n_run0  > 0, "run-length run of zeros never decoded");
    check(n_run1  > 0, "four-symbol mode (run with a 1) never decoded");
    check(n_sign2 > 0, "two-symbol mode (pass-1 bit and sign) never decoded");
    check(n_mr    > 0, "refinement pass never decoded");
    check(n_cb32  > 0, "no 32x32 block");
    check(n_cb64  > 0, "no 64x64 block");
    check(n_empty > 0, "no block with empty planes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
