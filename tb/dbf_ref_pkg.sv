// dbf_ref_pkg: behavioural reference of the MPEG-4 1-D deblocking filter,
// used by the testbenches to work out expected results independently of the
// RTL. It follows the algorithm literally with plain integers: the mode
// decision F(v) >= 6, the smooth-mode nine-tap filter with padding and the
// default-mode boundary correction. Rounding and truncation match the
// conventions documented in the RTL: (sum + 8) / 16 for the smooth filter,
// truncation towards zero for d = 5/8 (a1' - a1) and for (v4 - v5) / 2.
package dbf_ref_pkg;

  typedef int seg_t [10];
  typedef int out_t [8];

  localparam int MODE_NONE    = 0;
  localparam int MODE_DEFAULT = 1;
  localparam int MODE_SMOOTH  = 2;

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  function automatic int flat_count(seg_t v);
    int f = 0;
    for (int i = 0; i < 9; i++) if (iabs(v[i] - v[i+1]) <= 2) f++;
    return f;
  endfunction

  function automatic int range18(seg_t v);
    int mx = v[1], mn = v[1];
    for (int i = 2; i <= 8; i++) begin
      if (v[i] > mx) mx = v[i];
      if (v[i] < mn) mn = v[i];
    end
    return mx - mn;
  endfunction

  // 8 * a_k
  function automatic int acoef(seg_t v, int k);
    return 2*v[2*k+1] - 5*v[2*k+2] + 5*v[2*k+3] - 2*v[2*k+4];
  endfunction

  function automatic int pad_lo(seg_t v, int qp);
    return (iabs(v[1] - v[0]) < qp) ? v[0] : v[1];
  endfunction

  function automatic int pad_hi(seg_t v, int qp);
    return (iabs(v[8] - v[9]) < qp) ? v[9] : v[8];
  endfunction

  function automatic int smooth_pix(seg_t v, int qp, int n);
    int b [9] = '{1, 1, 2, 2, 4, 2, 2, 1, 1};
    int s = 0;
    for (int k = -4; k <= 4; k++) begin
      int m = n + k;
      int pm;
      if (m < 1)      pm = pad_lo(v, qp);
      else if (m > 8) pm = pad_hi(v, qp);
      else            pm = v[m];
      s += b[k+4] * pm;
    end
    return (s + 8) / 16;
  endfunction

  // Default-mode correction d' of v4 and v5, whether or not |a1| < QP.
  function automatic int df_delta(seg_t v);
    int a0 = acoef(v, 0), a1 = acoef(v, 1), a2 = acoef(v, 2);
    int mn = iabs(a0), a1p, d, h;
    if (iabs(a1) < mn) mn = iabs(a1);
    if (iabs(a2) < mn) mn = iabs(a2);
    a1p = (a1 < 0) ? -mn : mn;
    d = (5 * (a1p - a1)) / 64;
    h = (v[4] - v[5]) / 2;
    if (h >= 0) d = (d < 0) ? 0 : ((d > h) ? h : d);
    else        d = (d > 0) ? 0 : ((d < h) ? h : d);
    return d;
  endfunction

  // Returns the mode; o receives v1'..v8'. df_d receives the applied d'.
  function automatic int filter(seg_t v, int qp, output out_t o, output int df_d);
    int mode = MODE_NONE;
    df_d = 0;
    for (int i = 0; i < 8; i++) o[i] = v[i+1];
    if (flat_count(v) >= 6) begin
      if (range18(v) < 2*qp) begin
        mode = MODE_SMOOTH;
        for (int n = 1; n <= 8; n++) o[n-1] = smooth_pix(v, qp, n);
      end
    end else begin
      if (iabs(acoef(v, 1)) < 8*qp) begin
        int d = df_delta(v);
        mode = MODE_DEFAULT;
        df_d = d;
        o[3] = v[4] - d;
        o[4] = v[5] + d;
      end
    end
    return mode;
  endfunction

  // Random segment generator. kind 0: any values; 1: nearly flat with a
  // small step at the boundary (smooth candidates); 2: rough texture with a
  // boundary step (default candidates); 3: flat with a large step; 4: as 1
  // with the end pixels v0 and v9 pulled away from their neighbours.
  function automatic seg_t gen(int kind);
    seg_t v;
    int base = 20 + $urandom_range(0, 200);
    int step;
    case (kind)
      1: begin
        step = $urandom_range(0, 12);
        for (int i = 0; i < 10; i++)
          v[i] = base + $urandom_range(0, 2) + ((i >= 5) ? step : 0);
      end
      2: begin
        step = $urandom_range(0, 30);
        for (int i = 0; i < 10; i++)
          v[i] = base + $urandom_range(0, 24) + ((i >= 5) ? step : 0);
      end
      3: begin
        step = $urandom_range(20, 30);
        for (int i = 0; i < 10; i++)
          v[i] = base + $urandom_range(0, 1) + ((i >= 5) ? step : 0);
      end
      4: begin
        step = $urandom_range(0, 6);
        for (int i = 0; i < 10; i++)
          v[i] = base + $urandom_range(0, 2) + ((i >= 5) ? step : 0);
        v[0] = v[0] + $urandom_range(0, 20);
        v[9] = v[9] + $urandom_range(0, 20);
      end
      default:
        for (int i = 0; i < 10; i++) v[i] = $urandom_range(0, 255);
    endcase
    for (int i = 0; i < 10; i++) if (v[i] > 255) v[i] = 255;
    return v;
  endfunction

endpackage
