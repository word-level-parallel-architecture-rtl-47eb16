// ebc_ref_pkg: reference model used by the testbenches.
//
// A plain, bit-plane-sequential JPEG 2000 block encoder in the parallel
// coding mode (stripe-causal contexts, every pass terminated, probability
// models reset at every pass): for a code-block of integer coefficients it
// runs the significance-propagation, refinement and cleanup passes of every
// bit-plane in the standard order, MQ-encodes each pass into its own byte
// stream, and logs every coded decision (plane, pass, context, bit) in coding
// order. It is written independently of the RTL: its own probability table,
// context rules and MQ encoder (the encoder of the standard, with carry
// propagation, bit stuffing after 0xFF and the standard flush).
package ebc_ref_pkg;

  typedef struct {
    int ctx;
    int bit_v;
  } sym_t;

  // Qe, next-MPS, next-LPS, switch for the 47 states
  function automatic int unsigned qe_of(int i);
    int unsigned t[47] = '{
      'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
      'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
      'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
      'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
      'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
    return t[i];
  endfunction
  function automatic int nmps_of(int i);
    int t[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,
                  25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
    return t[i];
  endfunction
  function automatic int nlps_of(int i);
    int t[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,
                  21,22,23,24,25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
    return t[i];
  endfunction
  function automatic bit sw_of(int i);
    return (i == 0) || (i == 6) || (i == 14);
  endfunction

  // ------------------------------------------------------------ MQ encoder
  class mq_enc;
    int unsigned a, c;
    int          ct;
    int          st [19];
    int          mps [19];
    byte unsigned buf_q [$];   // buf_q[0] is the byte before the stream
    int          bp;

    function void init();
      a = 'h8000; c = 0; ct = 12;
      buf_q.delete(); buf_q.push_back(8'h00); bp = 0;
      for (int i = 0; i < 19; i++) begin st[i] = 0; mps[i] = 0; end
      st[0] = 4; st[17] = 3; st[18] = 46;
    endfunction

    function void put(int b);
      bp++;
      if (bp >= buf_q.size()) buf_q.push_back(8'(b));
      else buf_q[bp] = 8'(b);
    endfunction

    function void byteout();
      if (buf_q[bp] == 8'hFF) begin
        put(c >> 20); c &= 'hFFFFF; ct = 7;
      end else if (c < 'h8000000) begin
        put(c >> 19); c &= 'h7FFFF; ct = 8;
      end else begin
        buf_q[bp] = buf_q[bp] + 8'd1;
        if (buf_q[bp] == 8'hFF) begin
          c &= 'h7FFFFFF; put(c >> 20); c &= 'hFFFFF; ct = 7;
        end else begin
          put(c >> 19); c &= 'h7FFFF; ct = 8;
        end
      end
    endfunction

    function void renorm();
      do begin
        a = (a << 1) & 'hFFFF; c = c << 1; ct--;
        if (ct == 0) byteout();
      end while (a < 'h8000);
    endfunction

    function void encode(int d, int cx);
      int unsigned q;
      q = qe_of(st[cx]);
      if (d == mps[cx]) begin
        a = a - q;
        if ((a & 'h8000) == 0) begin
          if (a < q) a = q; else c = c + q;
          st[cx] = nmps_of(st[cx]);
          renorm();
        end else c = c + q;
      end else begin
        a = a - q;
        if (a < q) c = c + q; else a = q;
        if (sw_of(st[cx])) mps[cx] = 1 - mps[cx];
        st[cx] = nlps_of(st[cx]);
        renorm();
      end
    endfunction

    // terminate; returns the stream bytes
    function void flush(ref byte unsigned s [$]);
      int unsigned tempc;
      tempc = c + a;
      c = c | 'hFFFF;
      if (c >= tempc) c = c - 'h8000;
      c = c << ct; byteout();
      c = c << ct; byteout();
      s.delete();
      for (int i = 1; i <= bp; i++) s.push_back(buf_q[i]);
      if (s.size() > 0 && s[s.size()-1] == 8'hFF) void'(s.pop_back());
    endfunction
  endclass

  // ----------------------------------------------------- block encoder
  class ebc_enc;
    int W, N, band;
    int mag [64][64];     // [row][column]
    int neg [64][64];
    // state
    bit sig [64][64];
    bit vis [64][64];
    bit refd [64][64];
    // results
    byte unsigned strm [10][3][$];
    sym_t         syms [10][3][$];
    // state at the start of each plane, for unit tests of one plane
    bit sig_at [10][64][64];
    bit p1first [64][64];   // first non-zero bit coded in pass 1
    int npass1_sig, nrun0, nrun1, nmr;

    mq_enc mq;

    function new();
      mq = new();
    endfunction

    function bit sg(int y, int x);
      if (y < 0 || x < 0 || y >= W || x >= W) return 0;
      return sig[y][x];
    endfunction

    // neighbour counts, next stripe excluded (causal)
    function void counts(int y, int x, output int h, output int v, output int d);
      bit below;
      below = ((y % 4) != 3);
      h = sg(y, x-1) + sg(y, x+1);
      v = sg(y-1, x) + (below ? sg(y+1, x) : 0);
      d = sg(y-1, x-1) + sg(y-1, x+1) + (below ? sg(y+1, x-1) + sg(y+1, x+1) : 0);
    endfunction

    function int zc(int y, int x);
      int h, v, d, t, hv;
      counts(y, x, h, v, d);
      if (band == 1) begin t = h; h = v; v = t; end
      if (band == 3) begin
        hv = h + v;
        if (d >= 3) return 8;
        if (d == 2) return (hv >= 1) ? 7 : 6;
        if (d == 1) return (hv >= 2) ? 5 : (hv == 1) ? 4 : 3;
        return (hv >= 2) ? 2 : hv;
      end
      if (h == 2) return 8;
      if (h == 1) return (v > 0) ? 7 : (d > 0) ? 6 : 5;
      if (v == 2) return 4;
      if (v == 1) return 3;
      return (d >= 2) ? 2 : d;
    endfunction

    function int contrib(int y, int x);
      if (y < 0 || x < 0 || y >= W || x >= W) return 0;
      if (!sig[y][x]) return 0;
      return neg[y][x] ? -1 : 1;
    endfunction

    // sign context; xr receives the bit the sign is XORed with
    function int sc(int y, int x, output int xr);
      int h, v;
      h = contrib(y, x-1) + contrib(y, x+1);
      v = contrib(y-1, x) + (((y % 4) != 3) ? contrib(y+1, x) : 0);
      h = (h > 1) ? 1 : (h < -1) ? -1 : h;
      v = (v > 1) ? 1 : (v < -1) ? -1 : v;
      xr = 0;
      if (h < 0 || (h == 0 && v < 0)) begin xr = 1; h = -h; v = -v; end
      if (h == 0) return (v == 0) ? 9 : 10;
      return 12 + v;
    endfunction

    function bit any_nb(int y, int x);
      int h, v, d;
      counts(y, x, h, v, d);
      return (h + v + d) > 0;
    endfunction

    function void code(int p, int ps, int bit_v, int cx);
      sym_t s;
      s.ctx = cx; s.bit_v = bit_v;
      syms[p][ps].push_back(s);
      mq.encode(bit_v, cx);
    endfunction

    function void code_sign(int p, int ps, int y, int x);
      int xr, cx;
      cx = sc(y, x, xr);
      code(p, ps, neg[y][x] ^ xr, cx);
    endfunction

    function void encode_block();
      for (int y = 0; y < W; y++)
        for (int x = 0; x < W; x++) begin
          sig[y][x] = 0; vis[y][x] = 0; refd[y][x] = 0; p1first[y][x] = 0;
        end
      npass1_sig = 0; nrun0 = 0; nrun1 = 0; nmr = 0;
      for (int p = 0; p < 10; p++)
        for (int ps = 0; ps < 3; ps++) begin strm[p][ps].delete(); syms[p][ps].delete(); end
      for (int p = N - 1; p >= 0; p--) begin
        for (int y = 0; y < W; y++)
          for (int x = 0; x < W; x++) sig_at[p][y][x] = sig[y][x];
        // pass 1
        mq.init();
        if (p < N - 1)
          for (int s = 0; s < W; s += 4)
            for (int x = 0; x < W; x++)
              for (int y = s; y < s + 4; y++)
                if (!sig[y][x] && any_nb(y, x)) begin
                  int b;
                  b = (mag[y][x] >> p) & 1;
                  code(p, 0, b, zc(y, x));
                  vis[y][x] = 1;
                  if (b) begin
                    code_sign(p, 0, y, x);
                    sig[y][x] = 1; p1first[y][x] = 1; npass1_sig++;
                  end
                end
        mq.flush(strm[p][0]);
        // pass 2
        mq.init();
        if (p < N - 1)
          for (int s = 0; s < W; s += 4)
            for (int x = 0; x < W; x++)
              for (int y = s; y < s + 4; y++)
                if (sig[y][x] && !vis[y][x]) begin
                  int cx;
                  cx = refd[y][x] ? 16 : any_nb(y, x) ? 15 : 14;
                  code(p, 1, (mag[y][x] >> p) & 1, cx);
                  refd[y][x] = 1; nmr++;
                end
        mq.flush(strm[p][1]);
        // pass 3
        mq.init();
        for (int s = 0; s < W; s += 4)
          for (int x = 0; x < W; x++) begin
            int y0;
            bit run;
            y0 = s;
            run = 1;
            for (int y = s; y < s + 4; y++)
              if (sig[y][x] || vis[y][x] || any_nb(y, x)) run = 0;
            if (run) begin
              int pos;
              pos = -1;
              for (int y = s + 3; y >= s; y--) if ((mag[y][x] >> p) & 1) pos = y - s;
              if (pos < 0) begin
                code(p, 2, 0, 17); nrun0++;
                y0 = s + 4;
              end else begin
                code(p, 2, 1, 17); nrun1++;
                code(p, 2, (pos >> 1) & 1, 18);
                code(p, 2, pos & 1, 18);
                code_sign(p, 2, s + pos, x);
                sig[s + pos][x] = 1;
                y0 = s + pos + 1;
              end
            end
            for (int y = y0; y < s + 4; y++)
              if (!sig[y][x] && !vis[y][x]) begin
                int b;
                b = (mag[y][x] >> p) & 1;
                code(p, 2, b, zc(y, x));
                if (b) begin code_sign(p, 2, y, x); sig[y][x] = 1; end
              end
          end
        mq.flush(strm[p][2]);
        for (int y = 0; y < W; y++)
          for (int x = 0; x < W; x++) vis[y][x] = 0;
      end
    endfunction

    // random block: sparse magnitudes below 2^N, spatially clustered
    function void randomize_block(int w, int n, int bnd, int density);
      W = w; N = n; band = bnd;
      for (int y = 0; y < 64; y++)
        for (int x = 0; x < 64; x++) begin
          int r, m;
          r = int'($urandom_range(99, 0));
          m = 0;
          if (y < W && x < W && r < density) begin
            int bits;
            bits = int'($urandom_range(N, 1));
            m = int'($urandom_range((1 << bits) - 1, 0));
          end
          // keep the top plane used
          if (y == 0 && x == 0 && W > 0) m = (1 << (N - 1)) | int'($urandom_range((1 << (N - 1)) - 1, 0));
          mag[y][x] = m;
          neg[y][x] = (m != 0) ? int'($urandom_range(1, 0)) : 0;
        end
    endfunction
  endclass

endpackage
