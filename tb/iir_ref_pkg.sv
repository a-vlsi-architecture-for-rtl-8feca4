// iir_ref_pkg: reference models used by the testbenches.
//
// `section` runs a frame through one second-order 2-D section exactly as the hardware's
// number format defines it: each state variable and the output are
//   sat16( r + q' + ((c*f + d*y + 2^13) >>> 14) )
// evaluated in the state-space order (output first, then the states that use it), with
// horizontal states zero at the start of a row and vertical states zero in the first row.
// `cs[i]`, `ds[i]` are the coefficients in force for sample i, so that a coefficient change
// during a frame can be modelled. `direct_form` evaluates the same
// second-order filter from its difference equation with real arithmetic, which checks the
// state-space mapping independently of the fixed-point details.
package iir_ref_pkg;

  // Unit u solves coefficient pair (a(j,k), b(j,k)) with j = UJ[u], k = UK[u].
  localparam int UJ [9] = '{0, 2, 1, 2, 1, 0, 2, 1, 0};
  localparam int UK [9] = '{0, 0, 0, 1, 1, 1, 2, 2, 2};

  typedef int coefs_t [9];

  function automatic int sat16(input longint v, ref bit ovf);
    if (v > 32767)  begin ovf = 1; return 32767;  end
    if (v < -32768) begin ovf = 1; return -32768; end
    return int'(v);
  endfunction

  function automatic int rs(input longint s, input longint p, ref bit ovf);
    return sat16(s + ((p + 64'sd8192) >>> 14), ovf);
  endfunction

  function automatic void section(input int rows, input int cols,
                                  ref coefs_t cs[], ref coefs_t ds[],
                                  ref int fin[], ref int gout[],
                                  ref bit ovf);
    int h [9];
    int hr [9];
    int v1 [], v2 [];
    int nh [9];
    coefs_t c, d;
    v1 = new[cols];
    v2 = new[cols];
    gout = new[rows * cols];
    foreach (h[i]) h[i] = 0;
    for (int n = 0; n < rows; n++) begin
      for (int m = 0; m < cols; m++) begin
        int idx = n * cols + m;
        longint f = fin[idx];
        int g, v1p, v2p;
        c = cs[idx];
        d = ds[idx];
        foreach (hr[i]) hr[i] = (m == 0) ? 0 : h[i];
        v1p = (n == 0) ? 0 : v1[m];
        v2p = (n == 0) ? 0 : v2[m];
        g = rs(longint'(hr[2]) + v1p, c[0] * f, ovf);
        nh[1] = rs(0,                     c[1] * f + longint'(d[1]) * g, ovf);
        nh[2] = rs(hr[1],                 c[2] * f + longint'(d[2]) * g, ovf);
        nh[3] = rs(0,                     c[3] * f + longint'(d[3]) * g, ovf);
        nh[4] = rs(hr[3],                 c[4] * f + longint'(d[4]) * g, ovf);
        nh[5] = rs(longint'(hr[4]) + v2p, c[5] * f + longint'(d[5]) * g, ovf);
        nh[6] = rs(0,                     c[6] * f + longint'(d[6]) * g, ovf);
        nh[7] = rs(hr[6],                 c[7] * f + longint'(d[7]) * g, ovf);
        nh[8] = rs(hr[7],                 c[8] * f + longint'(d[8]) * g, ovf);
        for (int i = 1; i < 9; i++) h[i] = nh[i];
        v1[m] = nh[5];
        v2[m] = nh[8];
        gout[idx] = g;
      end
    end
  endfunction

  // g(m,n) = sum a(j,k) f(m-j,n-k) - sum_{j+k>0} b(j,k) g(m-j,n-k), a = c/2^14, b = -d/2^14.
  function automatic void direct_form(input int rows, input int cols,
                                      input coefs_t c, input coefs_t d,
                                      ref int fin[], ref real gout[]);
    real a [3][3], b [3][3];
    gout = new[rows * cols];
    for (int u = 0; u < 9; u++) begin
      a[UJ[u]][UK[u]] = real'(c[u]) / 16384.0;
      b[UJ[u]][UK[u]] = -real'(d[u]) / 16384.0;
    end
    for (int n = 0; n < rows; n++) begin
      for (int m = 0; m < cols; m++) begin
        real acc = 0.0;
        for (int j = 0; j < 3; j++) begin
          for (int k = 0; k < 3; k++) begin
            if (m - j >= 0 && n - k >= 0) begin
              acc += a[j][k] * real'(fin[(n - k) * cols + (m - j)]);
              if (j + k > 0) acc -= b[j][k] * gout[(n - k) * cols + (m - j)];
            end
          end
        end
        gout[n * cols + m] = acc;
      end
    end
  endfunction

  // A stable test filter: separable denominator (1 + p1 z^-1 + p2 z^-2) in each direction
  // with p1 = -0.6, p2 = 0.1, and a numerator drawn from `seed` with |a| < 0.3.
  function automatic void test_filter(input int seed, output coefs_t c, output coefs_t d);
    real p [3];
    int s;
    p = '{1.0, -0.6, 0.1};
    s = seed;
    for (int u = 0; u < 9; u++) begin
      s = s * 1103515245 + 12345;
      c[u] = ((s >>> 8) % 4915);
      d[u] = (u == 0) ? 0 : -int'($rtoi(p[UJ[u]] * p[UK[u]] * 16384.0));
    end
  endfunction

endpackage
