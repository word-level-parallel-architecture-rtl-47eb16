// tb_rb: self-checking test of one magnitude register bank (the coefficient
// bits that travel with a column through one bit-plane).
//
// Three banks (planes 0, 4 and 9) receive the same random shift / fill /
// output-select sequence. A testbench model keeps the five column slots: a
// column entering takes the bits above its plane's upper neighbour from the
// bank above, bit K+1 from the plane above's decoded bit, and the
// previous-stripe sample's bits below K; the slot offered down is C3 or C4.
// The outputs and the previous-stripe bit K are checked every cycle; shifts,
// fills, shift-with-fill and both output selections are counted and must
// occur. Cycle watchdog.
module tb_rb;
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

  localparam int KS [3] = '{0, 4, 9};

  logic                 clear, fwd, fill, osel;
  logic [3:0][MAGW-1:0] up_cur;
  logic [3:0]           up_d;
  logic [MAGW-1:0]      up_prev;
  logic [3:0][MAGW-1:0] out_cur [3];
  logic [MAGW-1:0]      out_prev [3];
  logic                 prev_bit [3];

  for (genvar i = 0; i < 3; i++) begin : g
    rb #(.K(KS[i])) dut (.clk, .rst_n, .clear_i(clear), .fwd_i(fwd), .fill_i(fill),
                         .up_cur_i(up_cur), .up_d_i(up_d), .up_prev_i(up_prev), .out_sel_i(osel),
                         .out_cur_o(out_cur[i]), .out_prev_o(out_prev[i]), .prev_bit_o(prev_bit[i]));
  end

  int checks = 0, failures = 0;
  int n_fwd = 0, n_fill = 0, n_both = 0, n_sel [2] = '{0, 0};
  logic [3:0][MAGW-1:0] m_cur [3][5];
  logic [MAGW-1:0]      m_prev [3][5];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("ERROR %s", what); end
  endtask

  function automatic logic [3:0][MAGW-1:0] enter_cur(int k);
    logic [3:0][MAGW-1:0] v;
    for (int r = 0; r < 4; r++)
      for (int b = 0; b < MAGW; b++)
        v[r][b] = (b > k + 1) ? up_cur[r][b] : (b == k + 1) ? up_d[r] : 1'b0;
    return v;
  endfunction

  function automatic logic [MAGW-1:0] enter_prev(int k);
    logic [MAGW-1:0] v;
    for (int b = 0; b < MAGW; b++) v[b] = (b < k) ? up_prev[b] : 1'b0;
    return v;
  endfunction

  initial begin
    clear = 0; fwd = 0; fill = 0; osel = 0; up_cur = '0; up_d = '0; up_prev = '0;
    for (int i = 0; i < 3; i++) for (int c = 0; c < 5; c++) begin m_cur[i][c] = '0; m_prev[i][c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      fwd = ($urandom_range(2, 0) == 0); fill = ($urandom_range(1, 0) != 0);
      osel = $urandom_range(1, 0); clear = ($urandom_range(500, 0) == 0);
      up_cur = {$urandom, $urandom}; up_d = 4'($urandom); up_prev = MAGW'($urandom);
      #1;
      for (int i = 0; i < 3; i++) begin
        check(out_cur[i] == (osel ? m_cur[i][4] : m_cur[i][3]), $sformatf("plane %0d: column bits", KS[i]));
        check(out_prev[i] == (osel ? m_prev[i][4] : m_prev[i][3]), $sformatf("plane %0d: previous-row bits", KS[i]));
        check(prev_bit[i] == up_prev[KS[i]], $sformatf("plane %0d: previous-row bit", KS[i]));
      end
      n_sel[osel]++;
      if (fwd) n_fwd++;
      if (fill) n_fill++;
      if (fwd && fill) n_both++;
      for (int i = 0; i < 3; i++) begin
        if (clear) for (int c = 0; c < 5; c++) begin m_cur[i][c] = '0; m_prev[i][c] = '0; end
        else if (fwd) begin
          for (int c = 4; c > 0; c--) begin m_cur[i][c] = m_cur[i][c-1]; m_prev[i][c] = m_prev[i][c-1]; end
          m_cur[i][0]  = fill ? enter_cur(KS[i]) : '0;
          m_prev[i][0] = fill ? enter_prev(KS[i]) : '0;
        end else if (fill) begin
          m_cur[i][0] = enter_cur(KS[i]); m_prev[i][0] = enter_prev(KS[i]);
        end
      end
    end
    check(n_fwd > 0 && n_fill > 0 && n_both > 0 && n_sel[0] > 0 && n_sel[1] > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
