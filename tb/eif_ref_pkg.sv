// eif_ref_pkg: floating-point reference model for the filter testbenches.
//
// Plain real-valued matrix arithmetic (product with optional transposes,
// Gauss-Jordan inverse with partial pivoting) and one full filter iteration,
// written independently of the fixed-point RTL, plus conversions between
// real numbers and the DW = 48 / FW = 24 fixed-point words of the RTL.
package eif_ref_pkg;

  localparam int MX = 16;
  typedef real rmat_t [MX][MX];

  localparam int FWB = 24;

  function automatic longint to_fx(input real v);
    return longint'(v * (2.0 ** FWB));
  endfunction

  function automatic real fx2r(input logic signed [47:0] w);
    return real'(longint'(w)) / (2.0 ** FWB);
  endfunction

  function automatic rmat_t rzero();
    rmat_t z;
    foreach (z[i, j]) z[i][j] = 0.0;
    return z;
  endfunction

  // C = op(A) op(B), op(A) r x k, op(B) k x c
  function automatic rmat_t rmul(input rmat_t a, input rmat_t b, input int r,
                                 input int c, input int k, input bit ta = 0,
                                 input bit tb = 0);
    rmat_t o;
    o = rzero();
    for (int i = 0; i < r; i++)
      for (int j = 0; j < c; j++)
        for (int l = 0; l < k; l++)
          o[i][j] += (ta ? a[l][i] : a[i][l]) * (tb ? b[j][l] : b[l][j]);
    return o;
  endfunction

  function automatic rmat_t radd(input rmat_t a, input rmat_t b, input real sb);
    rmat_t o;
    foreach (o[i, j]) o[i][j] = a[i][j] + sb * b[i][j];
    return o;
  endfunction

  function automatic rmat_t rinv(input rmat_t a, input int n);
    rmat_t m, v;
    m = a;
    v = rzero();
    for (int i = 0; i < n; i++) v[i][i] = 1.0;
    for (int c = 0; c < n; c++) begin
      int p;
      real piv;
      p = c;
      for (int i = c + 1; i < n; i++)
        if ((m[i][c] < 0 ? -m[i][c] : m[i][c]) > (m[p][c] < 0 ? -m[p][c] : m[p][c])) p = i;
      for (int j = 0; j < n; j++) begin
        real t;
        t = m[c][j]; m[c][j] = m[p][j]; m[p][j] = t;
        t = v[c][j]; v[c][j] = v[p][j]; v[p][j] = t;
      end
      piv = m[c][c];
      for (int j = 0; j < n; j++) begin
        m[c][j] /= piv;
        v[c][j] /= piv;
      end
      for (int i = 0; i < n; i++)
        if (i != c) begin
          real f;
          f = m[i][c];
          for (int j = 0; j < n; j++) begin
            m[i][j] -= f * m[c][j];
            v[i][j] -= f * v[c][j];
          end
        end
    end
    return v;
  endfunction

  // The 13 x 4 measurement pattern: 0, 1, or 2 = "sensor value of the row".
  function automatic int hpat(input int r, input int c);
    int p [13][4] = '{
      '{0,1,0,0}, '{0,0,0,0}, '{0,0,1,2}, '{1,0,0,1}, '{0,0,0,0}, '{0,0,0,0},
      '{1,0,2,1}, '{1,0,2,1}, '{1,0,2,0}, '{1,0,2,0}, '{0,0,1,0}, '{1,0,0,1},
      '{1,0,0,1}};
    return p[r % 13][c % 4];
  endfunction

  // One filter iteration. iv (column 0) and im are updated in place;
  // the state estimate is returned in xo (column 0).
  task automatic iterate(input int n, input int m, input real t,
                         input real qd [], input real rd [], input real hv [],
                         input real yv [], inout rmat_t iv, inout rmat_t im,
                         output rmat_t xo);
    rmat_t f, g, q, h, r, y, fi, qi, ihv, ih, t2, a, ai, x, ipv, ip, p;
    int h2;
    h2 = n / 2;
    f = rzero(); g = rzero(); q = rzero(); h = rzero(); r = rzero(); y = rzero();
    for (int i = 0; i < n; i++) begin
      f[i][i] = 1.0;
      if (i % 2 == 0) f[i][i+1] = t;
    end
    for (int grp = 0; grp < n / 4; grp++) begin
      g[4*grp][2*grp]     = t / 2.0;
      g[4*grp+2][2*grp+1] = t / 2.0;
      g[4*grp+3][2*grp+1] = t;
    end
    for (int i = 0; i < h2; i++) q[i][i] = qd[i];
    for (int i = 0; i < m; i++) begin
      r[i][i] = rd[i];
      y[i][0] = yv[i];
      for (int j = 0; j < n; j++)
        case (hpat(i, j))
          1: h[i][j] = 1.0;
          2: h[i][j] = hv[i];
          default: h[i][j] = 0.0;
        endcase
    end
    fi  = rinv(f, n);
    qi  = rinv(q, h2);
    ihv = rmul(fi, iv, n, 1, n);
    ih  = rmul(fi, rmul(im, fi, n, n, n), n, n, n, 1, 0);
    t2  = rmul(ih, g, n, h2, n);
    a   = radd(rmul(g, t2, h2, h2, n, 1, 0), qi, 1.0);
    ai  = rinv(a, h2);
    x   = rmul(rmul(t2, ai, n, h2, h2), g, n, n, h2, 0, 1);
    ipv = radd(ihv, rmul(x, ihv, n, 1, n), -1.0);
    ip  = radd(ih, rmul(x, ih, n, n, n), -1.0);
    p   = rinv(ip, n);
    xo  = rmul(p, ipv, n, 1, n);
    iv  = radd(ipv, rmul(h, rmul(r, y, m, 1, m), n, 1, m, 1, 0), 1.0);
    im  = radd(ip, rmul(h, rmul(r, h, m, n, m), n, n, m, 1, 0), 1.0);
  endtask

endpackage
