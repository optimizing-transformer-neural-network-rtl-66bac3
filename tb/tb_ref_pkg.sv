// tb_ref_pkg: real-valued reference model of the transformer outlier detector
// for the testbenches, plus fixed-point conversion helpers.
//
// Matrices are real arrays of a fixed maximum size (MAXD x MAXD) with the
// used extent passed alongside. Weight matrices are [out][in] and a linear
// layer is y = x W^T + b, as in the RTL. Everything here uses the exact
// functions ($exp, division) so the RTL's approximations show up as small
// differences that the testbenches bound with a tolerance.
package tb_ref_pkg;
  import tfm_pkg::*;

  localparam int MAXD = 32;
  typedef real rmat_t [MAXD][MAXD];
  typedef real rvec_t [MAXD];

  function automatic fx_t r2fx(input real r);
    return fx_t'($rtoi(r * real'(1 << FX_FRAC)));
  endfunction

  function automatic real fx2r(input fx_t v);
    return real'(v) / real'(1 << FX_FRAC);
  endfunction

  // Uniform random real in [lo, hi), quantised to the fixed-point grid.
  function automatic real rnd(input real lo, input real hi);
    real u;
    u = real'($urandom_range(0, 1 << 20)) / real'(1 << 20);
    return fx2r(r2fx(lo + u * (hi - lo)));
  endfunction

  function automatic bit close(input real got, input real exp, input real abs_tol, input real rel_tol);
    real e;
    e = got - exp;
    if (e < 0.0) e = -e;
    return e <= abs_tol + rel_tol * ((exp < 0.0) ? -exp : exp);
  endfunction

  function automatic rmat_t r_linear(input rmat_t x, input int rows, input int n_in,
                                     input rmat_t w, input rvec_t b, input int n_out);
    rmat_t y;
    for (int r = 0; r < rows; r++)
      for (int o = 0; o < n_out; o++) begin
        y[r][o] = b[o];
        for (int i = 0; i < n_in; i++) y[r][o] += x[r][i] * w[o][i];
      end
    return y;
  endfunction

  function automatic rmat_t r_add(input rmat_t a, input rmat_t b, input int rows, input int cols);
    rmat_t y;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) y[r][c] = a[r][c] + b[r][c];
    return y;
  endfunction

  function automatic rmat_t r_relu(input rmat_t x, input int rows, input int cols);
    rmat_t y;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) y[r][c] = (x[r][c] > 0.0) ? x[r][c] : 0.0;
    return y;
  endfunction

  function automatic real r_phi(input real v);
    return (v > 0.0) ? v + 1.0 : $exp(v);
  endfunction

  // Row-wise softmax of scale*x (plain definition, no max shift).
  function automatic rmat_t r_softmax(input rmat_t x, input int rows, input int n, input real scale);
    rmat_t y;
    for (int r = 0; r < rows; r++) begin
      real s;
      s = 0.0;
      for (int j = 0; j < n; j++) s += $exp(scale * x[r][j]);
      for (int j = 0; j < n; j++) y[r][j] = $exp(scale * x[r][j]) / s;
    end
    return y;
  endfunction

  function automatic rmat_t r_ffn(input rmat_t x, input int rows, input int d, input int dff,
                                  input rmat_t w1, input rvec_t b1, input rmat_t w2, input rvec_t b2);
    return r_linear(r_relu(r_linear(x, rows, d, w1, b1, dff), rows, dff), rows, dff, w2, b2, d);
  endfunction

  function automatic rmat_t r_mha(input rmat_t x, input int rows, input int d, input int h,
                                  input rmat_t wq, input rvec_t bq, input rmat_t wk, input rvec_t bk,
                                  input rmat_t wv, input rvec_t bv, input rmat_t wo, input rvec_t bo);
    rmat_t q, k, v, o;
    int dk;
    dk = d / h;
    q = r_linear(x, rows, d, wq, bq, d);
    k = r_linear(x, rows, d, wk, bk, d);
    v = r_linear(x, rows, d, wv, bv, d);
    for (int hh = 0; hh < h; hh++) begin
      rmat_t s, p;
      for (int i = 0; i < rows; i++)
        for (int j = 0; j < rows; j++) begin
          s[i][j] = 0.0;
          for (int c = 0; c < dk; c++) s[i][j] += q[i][hh*dk + c] * k[j][hh*dk + c];
        end
      p = r_softmax(s, rows, rows, 1.0 / $sqrt(real'(dk)));
      for (int i = 0; i < rows; i++)
        for (int c = 0; c < dk; c++) begin
          o[i][hh*dk + c] = 0.0;
          for (int j = 0; j < rows; j++) o[i][hh*dk + c] += p[i][j] * v[j][hh*dk + c];
        end
    end
    return r_linear(o, rows, d, wo, bo, d);
  endfunction

  function automatic rmat_t r_linattn(input rmat_t x, input int rows, input int d,
                                      input rmat_t wq, input rvec_t bq, input rmat_t wk, input rvec_t bk,
                                      input rmat_t wv, input rvec_t bv, input rmat_t wo, input rvec_t bo);
    rmat_t q, k, v, o;
    q = r_linear(x, rows, d, wq, bq, d);
    k = r_linear(x, rows, d, wk, bk, d);
    v = r_linear(x, rows, d, wv, bv, d);
    // Quadratic form of the same quantity: sum_j sim(q_i,k_j) v_j / sum_j sim(q_i,k_j).
    for (int i = 0; i < rows; i++) begin
      real den;
      den = 0.0;
      for (int c = 0; c < d; c++) o[i][c] = 0.0;
      for (int j = 0; j < rows; j++) begin
        real sim;
        sim = 0.0;
        for (int c = 0; c < d; c++) sim += r_phi(q[i][c]) * r_phi(k[j][c]);
        den += sim;
        for (int c = 0; c < d; c++) o[i][c] += sim * v[j][c];
      end
      for (int c = 0; c < d; c++) o[i][c] = o[i][c] / den;
    end
    return r_linear(o, rows, d, wo, bo, d);
  endfunction

  // One encoder layer from a flat weight list in the RTL's layout.
  function automatic rmat_t r_layer(input rmat_t x, input int rows, input int d, input int dff,
                                    input int h, input bit linear, input real w [], input int base);
    rmat_t wq, wk, wv, wo, w1, w2, a, r1;
    rvec_t bq, bk, bv, bo, b1, b2;
    int p;
    p = base;
    for (int o = 0; o < d; o++) for (int i = 0; i < d; i++) wq[o][i] = w[p++];
    for (int o = 0; o < d; o++) bq[o] = w[p++];
    for (int o = 0; o < d; o++) for (int i = 0; i < d; i++) wk[o][i] = w[p++];
    for (int o = 0; o < d; o++) bk[o] = w[p++];
    for (int o = 0; o < d; o++) for (int i = 0; i < d; i++) wv[o][i] = w[p++];
    for (int o = 0; o < d; o++) bv[o] = w[p++];
    for (int o = 0; o < d; o++) for (int i = 0; i < d; i++) wo[o][i] = w[p++];
    for (int o = 0; o < d; o++) bo[o] = w[p++];
    for (int o = 0; o < dff; o++) for (int i = 0; i < d; i++) w1[o][i] = w[p++];
    for (int o = 0; o < dff; o++) b1[o] = w[p++];
    for (int o = 0; o < d; o++) for (int i = 0; i < dff; i++) w2[o][i] = w[p++];
    for (int o = 0; o < d; o++) b2[o] = w[p++];
    if (linear) a = r_linattn(x, rows, d, wq, bq, wk, bk, wv, bv, wo, bo);
    else        a = r_mha(x, rows, d, h, wq, bq, wk, bk, wv, bv, wo, bo);
    r1 = r_add(x, a, rows, d);
    return r_add(r1, r_ffn(r1, rows, d, dff, w1, b1, w2, b2), rows, d);
  endfunction

  // Whole detector: embedding, layers, classifier logits (column 0 of result).
  function automatic rmat_t r_model(input rmat_t x, input int rows, input int n_in, input int d,
                                    input int dff, input int h, input int n_layers, input bit linear,
                                    input real w []);
    rmat_t ew, y, cw;
    rvec_t eb, cb;
    int p;
    p = 0;
    for (int o = 0; o < d; o++) for (int i = 0; i < n_in; i++) ew[o][i] = w[p++];
    for (int o = 0; o < d; o++) eb[o] = w[p++];
    y = r_linear(x, rows, n_in, ew, eb, d);
    for (int l = 0; l < n_layers; l++) begin
      y = r_layer(y, rows, d, dff, h, linear, w, p);
      p += layer_words(d, dff);
    end
    for (int i = 0; i < d; i++) cw[0][i] = w[p++];
    cb[0] = w[p++];
    return r_linear(y, rows, d, cw, cb, 1);
  endfunction

endpackage
