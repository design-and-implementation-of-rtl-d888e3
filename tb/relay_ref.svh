// relay_ref.svh: reference arithmetic for the relay unit testbenches.
//
// Plain behavioural functions on wide signed integers, written from the
// equations rather than from the RTL structure: the determinant uses the
// Leibniz permutation sum, the inverse uses (-1)^(n+m) det(A_mn) / det(A),
// and the divider model applies the documented number format (common
// normalisation shift, F scaling, W-bit saturation, 2^C scaled quotient).
`ifndef RELAY_REF_SVH
`define RELAY_REF_SVH

typedef logic signed [639:0] ref_wide_t;

typedef struct {
  ref_wide_t re;
  ref_wide_t im;
} ref_cplx_t;

function automatic ref_cplx_t ref_mul(input ref_cplx_t a, input ref_cplx_t b);
  ref_cplx_t p;
  p.re = a.re * b.re - a.im * b.im;
  p.im = a.re * b.im + a.im * b.re;
  return p;
endfunction

function automatic ref_cplx_t ref_add(input ref_cplx_t a, input ref_cplx_t b);
  ref_cplx_t s;
  s.re = a.re + b.re;
  s.im = a.im + b.im;
  return s;
endfunction

function automatic ref_cplx_t ref_conj(input ref_cplx_t a);
  ref_cplx_t s;
  s.re = a.re;
  s.im = -a.im;
  return s;
endfunction

// Determinant of the top-left n x n block (n <= 4) by the Leibniz formula.
function automatic ref_cplx_t ref_det(input ref_cplx_t a [4][4], input int n);
  ref_cplx_t acc, term;
  int perm [4];
  acc.re = 0; acc.im = 0;
  for (int p0 = 0; p0 < n; p0++)
    for (int p1 = 0; p1 < ((n > 1) ? n : 1); p1++)
      for (int p2 = 0; p2 < ((n > 2) ? n : 1); p2++)
        for (int p3 = 0; p3 < ((n > 3) ? n : 1); p3++) begin
          int inv;
          bit dup;
          perm = '{p0, p1, p2, p3};
          dup = 0;
          for (int x = 0; x < n; x++)
            for (int y = x + 1; y < n; y++)
              if (perm[x] == perm[y]) dup = 1;
          if (dup) continue;
          inv = 0;
          for (int x = 0; x < n; x++)
            for (int y = x + 1; y < n; y++)
              if (perm[x] > perm[y]) inv++;
          term.re = 1; term.im = 0;
          for (int r = 0; r < n; r++) term = ref_mul(term, a[r][perm[r]]);
          if (inv % 2 != 0) begin
            term.re = -term.re;
            term.im = -term.im;
          end
          acc = ref_add(acc, term);
        end
  return acc;
endfunction

// Minor: determinant of a without row i and column j (4 x 4 input).
function automatic ref_cplx_t ref_minor(input ref_cplx_t a [4][4], input int i, input int j);
  ref_cplx_t s [4][4];
  int rr, cc;
  for (int r = 0; r < 4; r++)
    for (int c = 0; c < 4; c++) begin
      s[r][c].re = 0;
      s[r][c].im = 0;
    end
  rr = 0;
  for (int r = 0; r < 4; r++) begin
    if (r == i) continue;
    cc = 0;
    for (int c = 0; c < 4; c++) begin
      if (c == j) continue;
      s[rr][cc] = a[r][c];
      cc++;
    end
    rr++;
  end
  return ref_det(s, 3);
endfunction

// Scaled complex division: magnitude of 2^C * num / den in the documented
// format. Returns the signed quotient parts.
function automatic ref_cplx_t ref_div(input ref_cplx_t num, input ref_cplx_t den,
                                      input int w, input int c, input int f);
  ref_cplx_t prod, q;
  ref_wide_t energy, divisor, mag, a, lim;
  int msb, shift;
  prod   = ref_mul(num, ref_conj(den));
  energy = den.re * den.re + den.im * den.im;
  msb = 0;
  for (int i = 0; i < 640; i++) if (energy[i]) msb = i;
  shift   = (msb > w - 1) ? msb - (w - 1) : 0;
  divisor = energy >>> shift;
  lim     = (ref_wide_t'(1) <<< w) - 1;
  for (int p = 0; p < 2; p++) begin
    ref_wide_t v, res;
    v   = (p == 0) ? prod.re : prod.im;
    mag = (v < 0) ? -v : v;
    a   = (mag <<< f) >>> shift;
    if (a > lim) a = lim;
    if (divisor == 0) res = (ref_wide_t'(1) <<< (w + c)) - 1;
    else              res = (a <<< c) / divisor;
    if (v < 0) res = -res;
    if (p == 0) q.re = res; else q.im = res;
  end
  return q;
endfunction

// Inverse in the documented format: inv[m][n] = div((-1)^(n+m) minor(n,m), det).
function automatic void ref_inverse(input ref_cplx_t a [4][4], input int w, input int c,
                                    input int f, output ref_cplx_t inv [4][4]);
  ref_cplx_t d, cof;
  d = ref_det(a, 4);
  for (int i = 0; i < 4; i++)
    for (int j = 0; j < 4; j++) begin
      cof = ref_minor(a, i, j);
      if ((i + j) % 2 != 0) begin
        cof.re = -cof.re;
        cof.im = -cof.im;
      end
      inv[j][i] = ref_div(cof, d, w, c, f);
    end
endfunction

`endif
