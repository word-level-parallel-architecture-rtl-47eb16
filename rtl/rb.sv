// rb: register bank of bit-plane K in the magnitude register bank.
//
// Five column slots that move in lock-step with the window of the context
// formation of the same plane (same forward and fill signals). Each slot
// holds the partly decoded magnitudes of the current stripe's four samples,
// bits 9..K+1 (the bits of the planes above, so 9-K bits), and for the
// sample of the previous stripe's last row the bits K-1..0 still to be used
// by the planes below (K bits); bit K of that sample goes to the context
// formation of this plane as the column enters.
// On a fill the bank merges the column of partial magnitudes from the bank
// above with the column of bits d^(K+1) just decoded by the plane above.
// Widths are kept at the full magnitude width with the unused bits held at
// zero, which synthesis removes.
//
// Origin: five register columns per plane moved by the CF's forward signal
// follow the published register bank; which bits each bank stores is this
// design's choice.
module rb
  import ebcd_pkg::*;
#(
  parameter int K = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear_i,
  input  logic                  fwd_i,      // shift (from the CF of plane K)
  input  logic                  fill_i,     // a new column enters C0
  input  logic [3:0][MAGW-1:0]  up_cur_i,   // bits 9..K+2 from the bank above
  input  logic [3:0]            up_d_i,     // bits K+1 from the CF above
  input  logic [MAGW-1:0]       up_prev_i,  // previous-stripe bits K..0
  input  logic                  out_sel_i,  // 1: C4, 0: C3 is handed down
  output logic [3:0][MAGW-1:0]  out_cur_o,
  output logic [MAGW-1:0]       out_prev_o,
  output logic                  prev_bit_o  // bit K of the incoming column
);
  localparam logic [MAGW-1:0] CUR_MASK  = ~((MAGW'(1) << (K + 1)) - MAGW'(1));
  localparam logic [MAGW-1:0] PREV_MASK = (MAGW'(1) << K) - MAGW'(1);

  typedef struct packed {
    logic [3:0][MAGW-1:0] cur;
    logic [MAGW-1:0]      prev;
  } rb_slot_t;

  rb_slot_t sl [5];
  rb_slot_t nw;

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      nw.cur[r] = up_cur_i[r] & CUR_MASK;
      if (K + 1 < MAGW) nw.cur[r][(K + 1 < MAGW) ? K + 1 : 0] = up_d_i[r];
    end
    nw.prev    = up_prev_i & PREV_MASK;
    prev_bit_o = up_prev_i[K];
    out_cur_o  = out_sel_i ? sl[4].cur  : sl[3].cur;
    out_prev_o = out_sel_i ? sl[4].prev : sl[3].prev;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 5; c++) sl[c] <= '0;
    end else if (clear_i) begin
      for (int c = 0; c < 5; c++) sl[c] <= '0;
    end else if (fwd_i) begin
      for (int c = 1; c < 5; c++) sl[c] <= sl[c-1];
      sl[0] <= fill_i ? nw : '0;
    end else if (fill_i) begin
      sl[0] <= nw;
    end
  end
endmodule
