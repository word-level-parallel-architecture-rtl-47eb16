// ebcd_pkg: types, constants and pure functions shared by the word-level
// JPEG 2000 embedded-block-coding (EBC) decoder.
//
// Contents
//  * Sizes: ten magnitude bit-planes plus a sign (11-bit coefficients), code
//    blocks up to 64x64 (stripes of 4 rows), 8-byte bit-stream look-ahead.
//  * The MQ arithmetic-decoder probability table (47 states, from the
//    JPEG 2000 standard) and the decode / INITDEC procedures written as
//    functions, so that the one-symbol decoder, the uniform decoder and the
//    state register bank all use the same arithmetic.
//  * The 19 JPEG 2000 contexts: 0..8 zero coding (magnitude), 9..13 sign
//    coding, 14..16 magnitude refinement, 17 run-length, 18 uniform.
//  * The sample cell of a context-formation column (sign, d-hat, decoded bit,
//    visited flag, pass-1 flag, first-significance-pass flag, first
//    refinement flag) and the column bundle passed between bit-planes.
//
// The MQ decoder follows the usual software form of the JPEG 2000 decoder: a
// 32-bit code register whose upper half is compared with Qe, byte stuffing
// after 0xFF, and 0xFF00 fed in at a marker (end of a terminated pass).
//
// Origin: the constants (ten magnitude planes, 10-bit magnitudes, 64x64 blocks)
// and the context and MQ rules are those of the published word-level decoder
// and of JPEG 2000; the look-ahead window size, the struct layouts and the
// function split are this design's own choices.
package ebcd_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int NPL    = 10;   // magnitude bit-planes (bit-plane coders)
  localparam int MAGW   = 10;   // magnitude bits of a coefficient
  localparam int CBW    = 64;   // largest code-block width / height
  localparam int COLW   = 6;    // bits of a column number inside a stripe
  localparam int NCOLW  = 11;   // bits of a column serial number in a block
  localparam int WIN    = 8;    // bytes of bit-stream look-ahead per stream
  localparam int ADDR_W = 12;   // byte address inside one pass's stream
  localparam int NCX    = 19;   // contexts
  localparam int FBK    = 3;    // plane whose output feeds the row above (32x32)

  localparam logic [4:0] CX_RL  = 5'd17;
  localparam logic [4:0] CX_UNI = 5'd18;
  localparam logic [4:0] CX_SC0 = 5'd9;

  // coding passes
  typedef enum logic [1:0] {
    PASS_NONE = 2'd0,
    PASS_SPP  = 2'd1,   // significance propagation (pass 1)
    PASS_MRP  = 2'd2,   // magnitude refinement (pass 2)
    PASS_CUP  = 2'd3    // cleanup (pass 3)
  } pass_e;

  // sub-band orientation, selects the zero-coding table
  typedef enum logic [1:0] {
    BAND_LL = 2'd0, BAND_HL = 2'd1, BAND_LH = 2'd2, BAND_HH = 2'd3
  } band_e;

  // -------------------------------------------------------- MQ structures
  typedef struct packed {
    logic [5:0] idx;   // index into the Qe table
    logic       mps;   // more probable symbol
  } ctx_st_t;          // 7 bits per context

  typedef struct packed {
    logic [15:0] a;    // interval register
    logic [31:0] c;    // code register
    logic [3:0]  ct;   // bits left in the current byte
  } mq_reg_t;

  // arithmetic register plus the number of bytes consumed in this cycle
  typedef struct packed {
    mq_reg_t    r;
    logic [3:0] ofs;
  } mq_work_t;

  typedef logic [WIN-1:0][7:0] win_t;   // win[i] = byte at pointer + i

  typedef struct packed {
    logic [15:0] qe;
    logic [5:0]  nmps;
    logic [5:0]  nlps;
    logic        sw;
  } qe_row_t;

  localparam logic [5:0] UNI_STATE = 6'd46;

  function automatic qe_row_t qe_tab(input logic [5:0] i);
    qe_row_t q;
    unique case (i)
      6'd0 : q = '{16'h5601, 6'd1 , 6'd1 , 1'b1};
      6'd1 : q = '{16'h3401, 6'd2 , 6'd6 , 1'b0};
      6'd2 : q = '{16'h1801, 6'd3 , 6'd9 , 1'b0};
      6'd3 : q = '{16'h0AC1, 6'd4 , 6'd12, 1'b0};
      6'd4 : q = '{16'h0521, 6'd5 , 6'd29, 1'b0};
      6'd5 : q = '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : q = '{16'h5601, 6'd7 , 6'd6 , 1'b1};
      6'd7 : q = '{16'h5401, 6'd8 , 6'd14, 1'b0};
      6'd8 : q = '{16'h4801, 6'd9 , 6'd14, 1'b0};
      6'd9 : q = '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: q = '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: q = '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: q = '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: q = '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: q = '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: q = '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: q = '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: q = '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: q = '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: q = '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: q = '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: q = '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: q = '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: q = '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: q = '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: q = '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: q = '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: q = '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: q = '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: q = '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: q = '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: q = '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: q = '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: q = '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: q = '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: q = '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: q = '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: q = '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: q = '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: q = '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: q = '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: q = '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: q = '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: q = '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: q = '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: q = '{16'h0001, 6'd45, 6'd43, 1'b0};
      default: q = '{16'h5601, 6'd46, 6'd46, 1'b0};   // 46: uniform
    endcase
    return q;
  endfunction

  // initial probability state of a context at the start of a pass
  function automatic ctx_st_t ctx_init(input logic [4:0] cx);
    ctx_st_t s;
    s.mps = 1'b0;
    if (cx == 5'd0)        s.idx = 6'd4;
    else if (cx == CX_RL)  s.idx = 6'd3;
    else if (cx == CX_UNI) s.idx = UNI_STATE;
    else                   s.idx = 6'd0;
    return s;
  endfunction

  // BYTEIN on a look-ahead window; a read past the window returns 0xFF
  function automatic logic [7:0] win_byte(input win_t w, input logic [3:0] o);
    return (o < 4'(WIN)) ? w[o[2:0]] : 8'hFF;
  endfunction

  function automatic mq_work_t mq_bytein(input mq_work_t s, input win_t w);
    mq_work_t n = s;
    logic [7:0] b, b1;
    b  = win_byte(w, s.ofs);
    b1 = win_byte(w, s.ofs + 4'd1);
    if (b == 8'hFF) begin
      if (b1 > 8'h8F) begin
        n.r.c  = s.r.c + 32'h0000_FF00;
        n.r.ct = 4'd8;
      end else begin
        n.ofs  = s.ofs + 4'd1;
        n.r.c  = s.r.c + {15'd0, b1, 9'd0};
        n.r.ct = 4'd7;
      end
    end else begin
      n.ofs  = s.ofs + 4'd1;
      n.r.c  = s.r.c + {16'd0, b1, 8'd0};
      n.r.ct = 4'd8;
    end
    return n;
  endfunction

  // INITDEC: pointer at the first byte of a pass's segment
  function automatic mq_work_t mq_initdec(input win_t w);
    mq_work_t s;
    s.ofs  = 4'd0;
    s.r.a  = 16'h8000;
    s.r.ct = 4'd0;
    s.r.c  = {8'd0, w[0], 16'd0};
    s = mq_bytein(s, w);
    s.r.c  = s.r.c << 7;
    s.r.ct = s.r.ct - 4'd7;
    return s;
  endfunction

  typedef struct packed {
    logic     d;
    mq_work_t s;
    ctx_st_t  cx;
  } mq_res_t;

  // DECODE of one binary decision with conditional exchange and RENORMD
  function automatic mq_res_t mq_decode(input mq_work_t s, input ctx_st_t cx,
                                        input win_t w);
    mq_res_t  r;
    qe_row_t  q;
    mq_work_t t;
    logic     ren;
    q    = qe_tab(cx.idx);
    t    = s;
    r.cx = cx;
    ren  = 1'b1;
    t.r.a = s.r.a - q.qe;
    if (s.r.c[31:16] < q.qe) begin            // LPS sub-interval
      if (t.r.a < q.qe) begin                  // conditional exchange
        r.d      = cx.mps;
        r.cx.idx = q.nmps;
      end else begin
        r.d      = ~cx.mps;
        r.cx.idx = q.nlps;
        r.cx.mps = cx.mps ^ q.sw;
      end
      t.r.a = q.qe;
    end else begin                             // MPS sub-interval
      t.r.c = s.r.c - {q.qe, 16'd0};
      if (t.r.a[15]) begin
        r.d = cx.mps;
        ren = 1'b0;
      end else if (t.r.a < q.qe) begin         // conditional exchange
        r.d      = ~cx.mps;
        r.cx.idx = q.nlps;
        r.cx.mps = cx.mps ^ q.sw;
      end else begin
        r.d      = cx.mps;
        r.cx.idx = q.nmps;
      end
    end
    if (ren) begin
      for (int i = 0; i < 16; i++) begin
        if (!t.r.a[15]) begin
          if (t.r.ct == 4'd0) t = mq_bytein(t, w);
          t.r.a  = t.r.a << 1;
          t.r.c  = t.r.c << 1;
          t.r.ct = t.r.ct - 4'd1;
        end
      end
    end
    r.s = t;
    return r;
  endfunction

  // --------------------------------------------------- context formation
  // neighbourhood summary of one sample
  typedef struct packed {
    logic [1:0] h;     // significant horizontal neighbours (0..2)
    logic [1:0] v;     // significant vertical neighbours (0..2)
    logic [2:0] d;     // significant diagonal neighbours (0..4)
    logic [1:0] hc;    // horizontal sign contribution, 2's complement -1..1
    logic [1:0] vc;    // vertical sign contribution
  } nbr_t;

  function automatic logic [4:0] zc_ctx(input nbr_t n, input band_e band);
    logic [1:0] h, v;
    logic [2:0] hv;
    logic [4:0] c;
    h = (band == BAND_HL) ? n.v : n.h;
    v = (band == BAND_HL) ? n.h : n.v;
    hv = {1'b0, h} + {1'b0, v};
    if (band == BAND_HH) begin
      if (n.d >= 3'd3)      c = 5'd8;
      else if (n.d == 3'd2) c = (hv >= 3'd1) ? 5'd7 : 5'd6;
      else if (n.d == 3'd1) c = (hv >= 3'd2) ? 5'd5 : (hv == 3'd1) ? 5'd4 : 5'd3;
      else                  c = (hv >= 3'd2) ? 5'd2 : (hv == 3'd1) ? 5'd1 : 5'd0;
    end else begin
      if (h == 2'd2)        c = 5'd8;
      else if (h == 2'd1)   c = (v != 2'd0) ? 5'd7 : (n.d != 3'd0) ? 5'd6 : 5'd5;
      else if (v == 2'd2)   c = 5'd4;
      else if (v == 2'd1)   c = 5'd3;
      else                  c = (n.d >= 3'd2) ? 5'd2 : (n.d == 3'd1) ? 5'd1 : 5'd0;
    end
    return c;
  endfunction

  // sign-coding context (9..13) and the bit the decoded sign is XORed with
  function automatic logic [5:0] sc_ctx(input nbr_t n);
    logic [4:0] c;
    logic       x;
    unique case ({n.hc, n.vc})
      4'b01_01: begin c = 5'd13; x = 1'b0; end
      4'b01_00: begin c = 5'd12; x = 1'b0; end
      4'b01_11: begin c = 5'd11; x = 1'b0; end
      4'b00_01: begin c = 5'd10; x = 1'b0; end
      4'b00_00: begin c = 5'd9;  x = 1'b0; end
      4'b00_11: begin c = 5'd10; x = 1'b1; end
      4'b11_01: begin c = 5'd11; x = 1'b1; end
      4'b11_00: begin c = 5'd12; x = 1'b1; end
      default:  begin c = 5'd13; x = 1'b1; end   // 11_11
    endcase
    return {c, x};
  endfunction

  // sign contribution of two neighbours (Table I): -1, 0 or +1
  function automatic logic [1:0] sgn_contrib(input logic s0, input logic x0,
                                             input logic s1, input logic x1);
    logic signed [2:0] t;
    t = (s0 ? (x0 ? -3'sd1 : 3'sd1) : 3'sd0) + (s1 ? (x1 ? -3'sd1 : 3'sd1) : 3'sd0);
    if (t > 0)      return 2'b01;
    else if (t < 0) return 2'b11;
    else            return 2'b00;
  endfunction

  // ----------------------------------------------- column data structures
  // one sample of the current stripe inside a context-formation window
  typedef struct packed {
    logic chi;   // sign (1 = negative)
    logic dh;    // d-hat: some bit above this plane is 1 (significant)
    logic d;     // decoded bit of this plane
    logic v;     // visited (decoded) in this plane
    logic p1;    // decoded by pass 1 in this plane
    logic pf;    // first non-zero bit was decoded by pass 1
    logic gam;   // first refinement: the first non-zero bit is in plane k+1
  } cell_t;

  // the sample of the previous stripe's last row above a column
  typedef struct packed {
    logic chi;
    logic dh;
    logic d;
    logic pm;    // its first non-zero bit was decoded by pass 1
  } prev_t;

  // a column as handed from one bit-plane's CF to the next lower one
  typedef struct packed {
    logic [COLW-1:0] colno;   // column inside the stripe
    cell_t [3:0]     row;     // v, p1 unused on input
    prev_t           prev;
  } col_t;

  // what a context formation does in a cycle (the states of its
  // column-switching controller, plus the cycles in which it decodes nothing)
  typedef enum logic [2:0] {
    SC_IDLE  = 3'd0,   // nothing to do
    SC_P1C1  = 3'd1,   // pass-1 scan of the column in C1
    SC_NP1C2 = 3'd2,   // pass-2/3 scan of the column in C2
    SC_P1C2  = 3'd3,   // pass-1 scan of the column in C2
    SC_NP1C3 = 3'd4,   // pass-2/3 scan of the column in C3
    SC_SHIFT = 3'd5,   // forward without a decode (fill or drain)
    SC_WAIT  = 3'd6    // a column is there but its neighbour is not yet
  } scan_e;

endpackage
