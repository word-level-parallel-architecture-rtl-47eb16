// cf: context formation (CF) of one magnitude bit-plane, with the
// column-switching scan controller.
//
// What it does
//   The CF decodes every sample bit of its bit-plane, one sample per cycle,
//   without state-variable memories: everything it needs about the upper
//   bit-planes (sign, d-hat = "some upper bit is 1", first-refinement and
//   first-significance-pass flags) arrives with each column from the CF of
//   the plane above, and whatever the plane below needs leaves with the
//   column once it is fully decoded.
//
// How it works
//   A window of five column slots C0..C4, each holding four samples of the
//   current stripe plus the sample of the previous stripe's last row above
//   them, shifts one column to the left on "forward". New columns enter at C0
//   from the plane above; fully decoded columns leave from C3 or C4 to the
//   plane below (C4 keeps a column until the plane below has taken it).
//   Each slot is read through processing elements (cf_pe) that give each
//   sample's significance as seen by a pass-1/2 sample and by a pass-3
//   sample.
//   Scan order (column switching): the pass-1 samples of a column are decoded
//   one column ahead of the pass-2/3 samples of the column to its left. The
//   controller's states are those of its scan diagram:
//     P1@C1  - pass 1 of C1 while C2 waits for its pass-2/3 scan;
//     NP1@C2 - pass 2/3 of C2 once C1 has no pass-1 sample left;
//     P1@C2  - pass 1 of C2 when nothing waits (C3 is complete);
//     NP1@C3 - pass 2/3 of C3 after a column that was all pass 1.
//   A column whose four samples were all pass 1 (condition 0) and a column
//   whose pass-2/3 scan ends (condition 4) forward the window. The choice of
//   sample, its pass and its contexts are all made in the cycle that decodes
//   it, so no cycle is spent on decisions alone; the state is kept as flags
//   per slot (pass-1 scan finished, pass-1 row pointer) rather than as a
//   separate state register.
//   In pass 3 a column with four unvisited, insignificant samples and an
//   all-insignificant neighbourhood is decoded in run-length mode: the run
//   decision (and, if it is 1, the 2-bit position and the sign) is decoded
//   in one cycle and marks the samples up to the first 1 as decoded.
//   A plane that holds no coded bits (active_i low) marks every column as
//   decoded on entry and passes it on at one column per cycle.
//
// Interface and timing
//   src_*: column from the plane above, taken when src_take_o is high.
//   out_*: column for the plane below; out_take_i takes it. out_sel_o tells
//          which slot (0: C3, 1: C4) is offered, for the register bank.
//   fwd_o: the window shifts at this clock edge (also drives the bank).
//   dec_o/pass_o/rlc_o/cx0_o/cx1_o go to the four-symbol decoder, whose
//   results (mag_i, sign_i, rlc_fail_i, uniform_i) come back in the same
//   cycle and are written into the window at the clock edge.
//   A column is only decoded when its right-hand neighbour column is in the
//   window (or it is the last column of the stripe); the window only shifts
//   when the next column is available and C4 is free, so there are no gaps.
//
// The v and p1 bits of out_o are always 0: they are this plane's working
// bits, cleared as a column is handed down, and the next plane starts them
// afresh.
//
// Origin: the five-column window, the C4 hand-down buffer, the forward signal
// and the four scan states with their completion conditions follow the
// published design; realising the controller as a per-cycle choice from slot
// flags, deciding a run-length column in one cycle, and the rule that a
// column waits for its right-hand neighbour are this design's choices.
// rst_n is both the asynchronous reset and the disable condition of the two
// assertions below; that is why lint reports it as used both ways.
module cf
  import ebcd_pkg::*;
#(
  parameter int K = 0                       // bit-plane index (for naming)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,         // start of a code-block
  input  logic             active_i,        // this plane carries coded bits
  input  band_e            band_i,
  input  logic [COLW-1:0]  last_col_i,      // code-block width - 1
  input  logic [NCOLW:0]   total_i,         // columns in the code-block
  // from the plane above
  input  logic             src_valid_i,
  input  col_t             src_i,
  output logic             src_take_o,
  // to the plane below
  output logic             out_valid_o,
  output col_t             out_o,
  output logic             out_sel_o,
  input  logic             out_take_i,
  output logic             fwd_o,
  // to / from the four-symbol arithmetic decoder
  output logic             dec_o,
  output pass_e            pass_o,
  output logic             rlc_o,
  output logic [4:0]       cx0_o,
  output logic [4:0]       cx1_o,
  input  logic             mag_i,
  input  logic             sign_i,
  input  logic             sign_valid_i,
  input  logic             rlc_fail_i,
  input  logic [1:0]       uniform_i,
  // status
  output scan_e            state_o,
  output logic             cond0_o          // forward after four pass-1 samples
);
  typedef struct packed {
    logic            valid;
    logic            taken;    // the plane below already has this column
    logic            p1fin;    // pass-1 scan of this column is over
    logic [2:0]      ptr;      // next row the pass-1 scan may visit
    logic [COLW-1:0] colno;
    cell_t [3:0]     row;
    prev_t           prev;
  } slot_t;

  slot_t s [5];
  slot_t u [5];
  logic [NCOLW:0] cols_in;

  // ------------------------------------------------ processing elements
  // sample matrix [slot][pos], pos 0 = previous-stripe row, 1..4 = rows 0..3
  logic [4:0][4:0] phi_a, sig3_a, chi_a;
  logic [4:0][3:0] gam_a, dhn_a;

  for (genvar c = 0; c < 5; c++) begin : g_col
    cell_t pcell;
    logic  unused_gam, unused_dhn;
    assign pcell = '{chi: s[c].prev.chi, dh: s[c].prev.dh, d: s[c].prev.d,
                     v: 1'b1, p1: s[c].prev.pm, pf: s[c].prev.pm, gam: 1'b0};
    cf_pe #(.TYPE(2)) u_pe2 (.cell_i(pcell), .chi_o(chi_a[c][0]), .phi_o(phi_a[c][0]),
                             .sig3_o(sig3_a[c][0]), .gam_o(unused_gam), .dhn_o(unused_dhn));
    for (genvar r = 0; r < 4; r++) begin : g_row
      cf_pe #(.TYPE(c >= 3 ? 1 : 0)) u_pe (.cell_i(s[c].row[r]), .chi_o(chi_a[c][r+1]),
                             .phi_o(phi_a[c][r+1]), .sig3_o(sig3_a[c][r+1]),
                             .gam_o(gam_a[c][r]), .dhn_o(dhn_a[c][r]));
    end
  end

  // neighbourhood of row r of slot x; p3 selects the view of a pass-3 sample
  function automatic nbr_t nbr(input logic [4:0][4:0] phi, input logic [4:0][4:0] sig3,
                               input logic [4:0][4:0] chi, input int x, input int r,
                               input logic p3, input logic ml, input logic mr);
    logic [4:0][4:0] q;
    logic h0, h1, v0, v1, d0, d1, d2, d3, lo;
    int   rr, rd;
    nbr_t n;
    q  = p3 ? sig3 : phi;
    rr = r + 1;
    rd = (rr < 4) ? rr + 1 : 4;
    lo = (rr < 4);                      // causal: nothing below the stripe
    h0 = !ml & q[x+1][rr];
    h1 = !mr & q[x-1][rr];
    v0 = q[x][rr-1];
    v1 = lo & q[x][rd];
    d0 = !ml & q[x+1][rr-1];
    d1 = !mr & q[x-1][rr-1];
    d2 = lo & !ml & q[x+1][rd];
    d3 = lo & !mr & q[x-1][rd];
    n.h  = {1'b0, h0} + {1'b0, h1};
    n.v  = {1'b0, v0} + {1'b0, v1};
    n.d  = {2'b0, d0} + {2'b0, d1} + {2'b0, d2} + {2'b0, d3};
    n.hc = sgn_contrib(h0, chi[x+1][rr], h1, chi[x-1][rr]);
    n.vc = sgn_contrib(v0, chi[x][rr-1], v1, chi[x][rd]);
    return n;
  endfunction

  function automatic logic any_nbr(input nbr_t n);
    return (n.h != 2'd0) || (n.v != 2'd0) || (n.d != 3'd0);
  endfunction

  // ------------------------------------------------ per-column analysis
  nbr_t       n1 [4][4];      // [slot 1..3][row], pass-1/2 view
  nbr_t       n3 [4][4];      // pass-3 view
  logic [3:0] cand  [4];      // pass-1 candidate rows
  logic       hasp1 [4];
  logic [1:0] p1row [4];
  logic [1:0] furow [4];      // first unvisited row
  logic       done  [5];
  logic       rdy   [4];      // neighbours of the slot are in the window
  logic       runok [4];      // run-length condition

  always_comb begin
    for (int c = 0; c < 5; c++) done[c] = &{s[c].row[3].v, s[c].row[2].v, s[c].row[1].v, s[c].row[0].v};
    for (int x = 0; x < 4; x++) begin
      cand[x] = '0; hasp1[x] = 1'b0; p1row[x] = '0; furow[x] = '0; runok[x] = 1'b0; rdy[x] = 1'b0;
      for (int r = 0; r < 4; r++) begin n1[x][r] = '0; n3[x][r] = '0; end
    end
    for (int x = 1; x < 4; x++) begin
      logic ml, mr;
      ml = (s[x].colno == '0);
      mr = (s[x].colno == last_col_i);
      rdy[x] = s[x].valid && (mr || s[x-1].valid) && (ml || s[x+1].valid);
      runok[x] = 1'b1;
      for (int r = 0; r < 4; r++) begin
        n1[x][r] = nbr(phi_a, sig3_a, chi_a, x, r, 1'b0, ml, mr);
        n3[x][r] = nbr(phi_a, sig3_a, chi_a, x, r, 1'b1, ml, mr);
        cand[x][r] = s[x].valid && !s[x].row[r].v && !s[x].row[r].dh &&
                     (3'(r) >= s[x].ptr) && any_nbr(n1[x][r]);
        if (s[x].row[r].v || s[x].row[r].dh || any_nbr(n3[x][r])) runok[x] = 1'b0;
      end
      hasp1[x] = |cand[x];
      p1row[x] = cand[x][0] ? 2'd0 : cand[x][1] ? 2'd1 : cand[x][2] ? 2'd2 : 2'd3;
      furow[x] = !s[x].row[0].v ? 2'd0 : !s[x].row[1].v ? 2'd1 : !s[x].row[2].v ? 2'd2 : 2'd3;
    end
  end

  // ------------------------------------------------------- the controller
  logic       more, c4free, fwd_want, fwd_go, go_p1, set_fin1, set_fin2;
  int         tx;             // slot decoded this cycle
  logic [1:0] tr;             // row decoded this cycle
  logic [1:0] pass_n;
  logic       xorb, last_left;
  logic [5:0] scx;
  nbr_t       tn;

  logic pend2, pend3, to_b;
  always_comb begin
    more   = (cols_in < total_i);
    c4free = !s[4].valid || s[4].taken;
    pend3  = s[3].valid && s[3].p1fin && !done[3];
    pend2  = s[2].valid && s[2].p1fin && !done[2];
    dec_o = 1'b0; go_p1 = 1'b0; fwd_want = 1'b0; set_fin1 = 1'b0; set_fin2 = 1'b0;
    tx = 1; tr = '0; state_o = SC_IDLE; to_b = 1'b0;
    if (pend3) begin
      if (rdy[3]) begin dec_o = 1'b1; tx = 3; state_o = SC_NP1C3; end
      else state_o = SC_WAIT;
    end else begin
      if (pend2) to_b = 1'b1;
      else if (!s[2].valid || done[2]) begin
        fwd_want = 1'b1; state_o = SC_SHIFT;
      end else if (!rdy[2]) state_o = SC_WAIT;
      else if (hasp1[2]) begin
        dec_o = 1'b1; go_p1 = 1'b1; tx = 2; state_o = SC_P1C2;
      end else begin
        set_fin2 = 1'b1; to_b = 1'b1;
      end
      if (to_b) begin
        if (s[1].valid && !s[1].p1fin && !done[1]) begin
          if (!rdy[1]) state_o = SC_WAIT;
          else if (hasp1[1]) begin
            dec_o = 1'b1; go_p1 = 1'b1; tx = 1; state_o = SC_P1C1;
          end else begin
            set_fin1 = 1'b1;
            if (rdy[2]) begin dec_o = 1'b1; tx = 2; state_o = SC_NP1C2; end
            else state_o = SC_WAIT;
          end
        end else begin
          set_fin1 = s[1].valid;
          if (rdy[2]) begin dec_o = 1'b1; tx = 2; state_o = SC_NP1C2; end
          else state_o = SC_WAIT;
        end
      end
    end

    // sample, pass and contexts
    tr   = go_p1 ? p1row[tx] : furow[tx];
    tn   = (go_p1 || s[tx].row[tr].dh) ? n1[tx][tr] : n3[tx][tr];
    scx  = sc_ctx(tn);
    rlc_o  = 1'b0;
    xorb   = scx[0];
    cx1_o  = scx[5:1];
    if (go_p1) begin
      pass_n = PASS_SPP;
      cx0_o  = zc_ctx(tn, band_i);
    end else if (s[tx].row[tr].dh) begin
      pass_n = PASS_MRP;
      cx0_o  = gam_a[tx][tr] ? (any_nbr(tn) ? 5'd15 : 5'd14) : 5'd16;
    end else if (runok[tx]) begin
      pass_n = PASS_CUP;
      rlc_o  = 1'b1;
      cx0_o  = CX_RL;
      cx1_o  = CX_SC0;
      xorb   = 1'b0;
    end else begin
      pass_n = PASS_CUP;
      cx0_o  = zc_ctx(tn, band_i);
    end
    if (!dec_o) begin rlc_o = 1'b0; pass_n = PASS_NONE; end
    pass_o = pass_e'(pass_n);

  end

  // does this decode complete the column? (uses the decoder's results)
  always_comb begin
    cond0_o   = 1'b0;
    last_left = 1'b1;
    for (int r = 0; r < 4; r++) if (2'(r) != tr && !s[tx].row[r].v) last_left = 1'b0;
    fwd_go = 1'b0;
    if (dec_o) begin
      if (rlc_o) fwd_go = !rlc_fail_i || (uniform_i == 2'd3);
      else       fwd_go = last_left;
      cond0_o = go_p1 && last_left;
    end
    fwd_o      = (fwd_want || fwd_go) && c4free && (src_valid_i || !more);
    src_take_o = src_valid_i && more && (fwd_o || !s[0].valid);
  end

  // ------------------------------------------- column for the plane below
  logic sel4, sel3;
  always_comb begin
    slot_t o;
    sel4 = s[4].valid && !s[4].taken;
    sel3 = !sel4 && s[3].valid && done[3] && !s[3].taken;
    out_valid_o = sel4 || sel3;
    out_sel_o   = sel4;
    o = sel4 ? s[4] : s[3];
    out_o.colno = o.colno;
    for (int r = 0; r < 4; r++) begin
      out_o.row[r].chi = o.row[r].chi;
      out_o.row[r].dh  = sel4 ? dhn_a[4][r] : dhn_a[3][r];
      out_o.row[r].d   = o.row[r].d;
      out_o.row[r].v   = 1'b0;
      out_o.row[r].p1  = 1'b0;
      out_o.row[r].pf  = o.row[r].dh ? o.row[r].pf : (o.row[r].d & o.row[r].p1);
      out_o.row[r].gam = !o.row[r].dh & o.row[r].d;
    end
    out_o.prev.chi = o.prev.chi;
    out_o.prev.dh  = o.prev.dh | o.prev.d;
    out_o.prev.d   = o.prev.d;
    out_o.prev.pm  = o.prev.pm;
  end

  // ------------------------------------------------------- next state
  always_comb begin
    for (int c = 0; c < 5; c++) u[c] = s[c];
    if (dec_o) begin
      if (rlc_o) begin
        for (int r = 0; r < 4; r++) begin
          if (!rlc_fail_i || 2'(r) < uniform_i) begin
            u[tx].row[r].v = 1'b1; u[tx].row[r].d = 1'b0;
          end else if (2'(r) == uniform_i) begin
            u[tx].row[r].v   = 1'b1;
            u[tx].row[r].d   = 1'b1;
            u[tx].row[r].chi = sign_i;
          end
        end
      end else begin
        u[tx].row[tr].v  = 1'b1;
        u[tx].row[tr].d  = mag_i;
        u[tx].row[tr].p1 = go_p1;
        if (sign_valid_i) u[tx].row[tr].chi = sign_i ^ xorb;
      end
      if (go_p1) u[tx].ptr = 3'(tr) + 3'd1;
    end
    if (set_fin1) u[1].p1fin = 1'b1;
    if (set_fin2) u[2].p1fin = 1'b1;
    if (out_take_i && sel4) u[4].taken = 1'b1;
    if (out_take_i && sel3) u[3].taken = 1'b1;
  end

  function automatic slot_t new_slot(input col_t c, input logic act);
    slot_t n;
    n.valid = 1'b1; n.taken = 1'b0; n.p1fin = 1'b0; n.ptr = '0;
    n.colno = c.colno;
    n.prev  = c.prev;
    for (int r = 0; r < 4; r++) begin
      n.row[r]     = c.row[r];
      n.row[r].d   = 1'b0;
      n.row[r].p1  = 1'b0;
      n.row[r].v   = !act;
    end
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 5; c++) s[c] <= '0;
      cols_in <= '0;
    end else if (clear_i) begin
      for (int c = 0; c < 5; c++) s[c] <= '0;
      cols_in <= '0;
    end else begin
      if (fwd_o) begin
        for (int c = 1; c < 5; c++) s[c] <= u[c-1];
        s[0] <= src_take_o ? new_slot(src_i, active_i) : '0;
      end else begin
        for (int c = 0; c < 5; c++) s[c] <= u[c];
        if (src_take_o) s[0] <= new_slot(src_i, active_i);
      end
      if (src_take_o) cols_in <= cols_in + 1'b1;
    end
  end

  // a shifted-out column must have been handed down
  assert property (@(posedge clk) disable iff (!rst_n || clear_i)
                   fwd_o |-> (!s[4].valid || s[4].taken))
    else $error("cf%0d: C4 overwritten before the plane below took it", K);
  // a column must not be handed down before it is fully decoded
  assert property (@(posedge clk) disable iff (!rst_n || clear_i)
                   out_take_i |-> out_valid_o)
    else $error("cf%0d: column taken while none is offered", K);
endmodule
