// dct_ref_pkg - reference models for the approximate DCT testbenches.
//
// Holds each transform as a plain 8x8 integer matrix, written out entry by
// entry from the published definitions and doubled so that the entries 1/2
// of BAS-2008 and BAS-2011 (a = 1/2) are integers. A reference coefficient is
// the matrix-vector product divided by 2 with rounding toward minus infinity,
// which is what a datapath that halves by an arithmetic right shift gives.
// The 2D reference applies the 1D reference to every row, then to every
// column. Nothing here shares code with the RTL.
package dct_ref_pkg;

  typedef int mat_t [8][8];
  typedef int vec_t [8];

  // Doubled matrix 2*T of transform k (0..6, order of approx_dct_pkg), with
  // a_mode 0/1/2 meaning a = 0, 1/2, 1 for BAS-2011.
  function automatic mat_t matrix2(int k, int a_mode = 1);
    mat_t m;
    int a2;
    a2 = (a_mode == 0) ? 0 : (a_mode == 1) ? 1 : 2;
    case (k)
      0: m = '{'{2, 2, 2, 2, 2, 2, 2, 2},
               '{2, 2, 0, 0, 0, 0,-2,-2},
               '{2, 1,-1,-2,-2,-1, 1, 2},
               '{0, 0,-2, 0, 0, 2, 0, 0},
               '{2,-2,-2, 2, 2,-2,-2, 2},
               '{2,-2, 0, 0, 0, 0, 2,-2},
               '{1,-2, 2,-1,-1, 2,-2, 1},
               '{0, 0, 0,-2, 2, 0, 0, 0}};
      1: m = '{'{2, 2, 2, 2, 2, 2, 2, 2},
               '{2, 2, 0, 0, 0, 0,-2,-2},
               '{2, a2,-a2,-2,-2,-a2, a2, 2},
               '{0, 0, 2, 0, 0,-2, 0, 0},
               '{2,-2,-2, 2, 2,-2,-2, 2},
               '{0, 0, 0, 2,-2, 0, 0, 0},
               '{2,-2, 0, 0, 0, 0, 2,-2},
               '{a2,-2, 2,-a2,-a2, 2,-2, a2}};
      2: m = '{'{2, 2, 2, 2, 2, 2, 2, 2},
               '{2, 2, 2, 0, 0,-2,-2,-2},
               '{2, 0, 0,-2,-2, 0, 0, 2},
               '{2, 0,-2,-2, 2, 2, 0,-2},
               '{2,-2,-2, 2, 2,-2,-2, 2},
               '{2,-2, 0, 2,-2, 0, 2,-2},
               '{0,-2, 2, 0, 0, 2,-2, 0},
               '{0,-2, 2,-2, 2,-2, 2, 0}};
      3: m = '{'{2, 2, 2, 2, 2, 2, 2, 2},
               '{2, 0, 0, 0, 0, 0, 0,-2},
               '{2, 0, 0,-2,-2, 0, 0, 2},
               '{0, 0,-2, 0, 0, 2, 0, 0},
               '{2,-2,-2, 2, 2,-2,-2, 2},
               '{0,-2, 0, 0, 0, 0, 2, 0},
               '{0,-2, 2, 0, 0, 2,-2, 0},
               '{0, 0, 0,-2, 2, 0, 0, 0}};
      4: m = '{'{2, 2, 2, 2, 2, 2, 2, 2},
               '{4, 2, 2, 0, 0,-2,-2,-4},
               '{4, 2,-2,-4,-4,-2, 2, 4},
               '{2, 0,-4,-2, 2, 4, 0,-2},
               '{2,-2,-2, 2, 2,-2,-2, 2},
               '{2,-4, 0, 2,-2, 0, 4,-2},
               '{2,-4, 4,-2,-2, 4,-4, 2},
               '{0,-2, 2,-4, 4,-2, 2, 0}};
      5: m = '{'{2, 2, 2, 2, 2, 2, 2, 2},
               '{0, 2, 0, 0, 0, 0,-2, 0},
               '{2, 0, 0,-2,-2, 0, 0, 2},
               '{2, 0, 0, 0, 0, 0, 0,-2},
               '{2,-2,-2, 2, 2,-2,-2, 2},
               '{0, 0, 0, 2,-2, 0, 0, 0},
               '{0,-2, 2, 0, 0, 2,-2, 0},
               '{0, 0, 2, 0, 0,-2, 0, 0}};
      default:
         m = '{'{2, 0, 0, 0, 0, 0, 0, 2},
               '{2, 2, 0, 0, 0, 0, 2, 2},
               '{0, 0, 2, 0, 0, 2, 0, 0},
               '{0, 0, 2, 2, 2, 2, 0, 0},
               '{0, 0, 2, 2,-2,-2, 0, 0},
               '{0, 0, 2, 0, 0,-2, 0, 0},
               '{2, 2, 0, 0, 0, 0,-2,-2},
               '{2, 0, 0, 0, 0, 0, 0,-2}};
    endcase
    return m;
  endfunction

  function automatic int floor_half(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  function automatic vec_t ref1d(int k, vec_t x, int a_mode = 1);
    mat_t m;
    vec_t y;
    m = matrix2(k, a_mode);
    for (int r = 0; r < 8; r++) begin
      int acc;
      acc = 0;
      for (int c = 0; c < 8; c++) acc += m[r][c] * x[c];
      y[r] = floor_half(acc);
    end
    return y;
  endfunction

  // Z = Tc X Tr^T with the rounding of two 1D passes: rows first (transform
  // k), then columns (transform kc, k when negative).
  function automatic mat_t ref2d(int k, mat_t x, int a_mode = 1, int kc = -1);
    mat_t tmp, z;
    vec_t v, w;
    for (int j = 0; j < 8; j++) begin
      for (int c = 0; c < 8; c++) v[c] = x[j][c];
      w = ref1d(k, v, a_mode);
      for (int c = 0; c < 8; c++) tmp[j][c] = w[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int j = 0; j < 8; j++) v[j] = tmp[j][c];
      w = ref1d((kc < 0) ? k : kc, v, a_mode);
      for (int u = 0; u < 8; u++) z[u][c] = w[u];
    end
    return z;
  endfunction

  // Test sample n of a pattern: 0 random, 1 all minimum, 2 all maximum,
  // 3 alternating extremes, 4 ramp.
  function automatic int sample(int pattern, int n, int w);
    int lo, hi;
    lo = -(1 << (w - 1));
    hi = (1 << (w - 1)) - 1;
    case (pattern)
      1:       return lo;
      2:       return hi;
      3:       return (n % 2 == 0) ? hi : lo;
      4:       return lo + ((n * 37) % (hi - lo + 1));
      default: return lo + int'($urandom_range(hi - lo, 0));
    endcase
  endfunction

endpackage
