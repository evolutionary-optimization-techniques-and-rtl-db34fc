// flc_ref_pkg: reference model of the fuzzy logic controller for testbenches.
//
// Plain integer arithmetic, written apart from the RTL: degree of a
// trapezoid from its key points and Q4.4 slopes, selection of the two
// overlapping membership functions, 16 active rules with Min degrees, and the
// two defuzzifiers (centre of gravity with a floor division, first of
// maxima). Also a generator of ordered random membership functions.
package flc_ref_pkg;

  typedef struct {
    int left, tleft, tright, right, height, sl, sr;
  } ref_mf_t;

  function automatic int ref_degree(int x, ref_mf_t p);
    int v;
    if (x < p.left || x > p.right) return 0;
    if (x >= p.tleft && x <= p.tright) return p.height;
    if (x < p.tleft) v = (p.sl * (x - p.left)) / 16;
    else             v = (p.sr * (p.right - x)) / 16;
    return (v > p.height) ? p.height : v;
  endfunction

  // lower member of the active pair
  function automatic int ref_pair(int x, ref_mf_t mf[4]);
    int k = 0;
    if (x >= mf[2].left) k = 1;
    if (x >= mf[3].left) k = 2;
    return k;
  endfunction

  // Random ordered set of 4 membership functions covering 0..255 with an
  // overlap of two: function m spans about [m*64-20, m*64+100],
  // so no three functions overlap.
  function automatic void gen_mfs(output ref_mf_t mf[4]);
    for (int m = 0; m < 4; m++) begin
      int c, a, b, h;
      c = m * 64 + 30 + $urandom_range(0, 20);
      a = c - 20 - $urandom_range(0, 30);
      b = c + 20 + $urandom_range(0, 30);
      if (a < 0) a = 0;
      if (b > 255) b = 255;
      h = 128 + $urandom_range(0, 127);
      mf[m].left   = a;
      mf[m].right  = b;
      mf[m].tleft  = c - $urandom_range(0, 10);
      mf[m].tright = c + $urandom_range(0, 10);
      if ($urandom_range(0, 1) == 0) mf[m].tright = mf[m].tleft;  // triangle
      // slope ~ height / edge width in Q4.4, sometimes steeper (clipped)
      mf[m].sl = (mf[m].tleft > a) ? (h * 16) / (mf[m].tleft - a) : 255;
      mf[m].sr = (b > mf[m].tright) ? (h * 16) / (b - mf[m].tright) : 255;
      if (mf[m].sl > 255) mf[m].sl = 255;
      if (mf[m].sr > 255) mf[m].sr = 255;
      if (mf[m].sl < 1) mf[m].sl = 1;
      if (mf[m].sr < 1) mf[m].sr = 1;
      mf[m].height = h;
    end
    // keep left points ordered
    for (int m = 1; m < 4; m++)
      if (mf[m].left < mf[m-1].left) mf[m].left = mf[m-1].left;
  endfunction

  // One inference. comb_tab: output member index per rule (>=5: rule off),
  // centres: output centres, bram: centre per rule, mode 0..3 = FLC1..FLC4.
  function automatic int ref_infer(int x[4], ref_mf_t mf[4][4], int comb_tab[256],
                                   int centres[5], int bram[256], int mode);
    int k[4], d[4][2];
    int y[16], w[16];
    for (int i = 0; i < 4; i++) begin
      k[i] = ref_pair(x[i], mf[i]);
      d[i][0] = ref_degree(x[i], mf[i][k[i]]);
      d[i][1] = ref_degree(x[i], mf[i][k[i]+1]);
    end
    for (int r = 0; r < 16; r++) begin
      int a = 0, s = 255;
      for (int i = 0; i < 4; i++) begin
        int b = (r >> i) & 1;
        a += (k[i] + b) << (2 * i);
        if (d[i][b] < s) s = d[i][b];
      end
      if (mode < 2) begin
        if (comb_tab[a] < 5) begin y[r] = centres[comb_tab[a]]; w[r] = s; end
        else begin y[r] = 0; w[r] = 0; end
      end else begin
        y[r] = bram[a]; w[r] = s;
      end
    end
    if (mode == 0 || mode == 2) begin
      longint num = 0, den = 0;
      for (int r = 0; r < 16; r++) begin num += w[r] * y[r]; den += w[r]; end
      return (den == 0) ? 0 : int'(num / den);
    end else begin
      int best = w[0], o = y[0];
      for (int r = 1; r < 16; r++) if (w[r] > best) begin best = w[r]; o = y[r]; end
      return o;
    end
  endfunction

endpackage
