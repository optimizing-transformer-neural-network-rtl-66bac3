// tfm_pkg: number format, model dimensions and shared arithmetic for the
// transformer outlier detector.
//
// Every value in the datapath is a signed two's-complement fixed-point word
// (fx_t) with FX_FRAC fraction bits (Q16.16 by default). The reference design
// computes in 32-bit floating point; this RTL uses a fixed-point word of the
// same width instead, a choice of this implementation that keeps every
// operator small and exact to describe.
//
// The model dimensions follow the evaluated configuration: an input window of
// 8 time steps, 2 attention heads, a 16-wide feed-forward layer, 2 encoder
// layers for the vanilla model and 1 for the linear-attention model. The
// embedding width D_MODEL and the number of input features N_IN are not given
// by the reference and are this design's choice (8 and 2: price and
// differenced price).
//
// Weight layout of one encoder layer, as a flat array of words (matrices are
// stored [out][in], row-major, each followed by its bias):
//   Wq, bq, Wk, bk, Wv, bv, Wo, bo   (D x D and D each)
//   W1, b1                           (DFF x D and DFF)
//   W2, b2                           (D x DFF and D)
package tfm_pkg;

  localparam int FX_W    = 32;
  localparam int FX_FRAC = 16;

  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [2*FX_W-1:0] fx_wide_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_FRAC;
  localparam fx_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(FX_W-1){1'b0}}};

  // Model configuration (Table of hyperparameters of the reference).
  localparam int WIN_LEN          = 8;   // window size
  localparam int N_HEADS          = 2;   // heads of the vanilla model
  localparam int D_FF             = 16;  // feed-forward width
  localparam int N_LAYERS_VANILLA = 2;   // encoder layers, vanilla model
  localparam int N_LAYERS_LINEAR  = 1;   // encoder layers, linear model
  localparam int D_MODEL          = 8;   // embedding width (own choice)
  localparam int N_IN             = 2;   // input features (own choice)

  // Saturate a wide Q(.FX_FRAC) value into an fx_t.
  function automatic fx_t fx_sat(input fx_wide_t v);
    if (v > fx_wide_t'(FX_MAX))      return FX_MAX;
    else if (v < fx_wide_t'(FX_MIN)) return FX_MIN;
    else                             return v[FX_W-1:0];
  endfunction

  // Fixed-point product, truncated toward minus infinity and saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    fx_wide_t p;
    p = fx_wide_t'(a) * fx_wide_t'(b);
    return fx_sat(p >>> FX_FRAC);
  endfunction

  // Fixed-point quotient num/den, truncated toward zero and saturated.
  // A zero denominator returns the largest value of the sign of num.
  function automatic fx_t fx_div(input fx_t num, input fx_t den);
    fx_wide_t q;
    if (den == '0) return (num < 0) ? FX_MIN : FX_MAX;
    q = (fx_wide_t'(num) <<< FX_FRAC) / fx_wide_t'(den);
    return fx_sat(q);
  endfunction

  // Saturating fixed-point sum.
  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    return fx_sat(fx_wide_t'(a) + fx_wide_t'(b));
  endfunction

  // 1/sqrt(n) in Q.FX_FRAC for elaboration-time constants: the integer
  // square root of 2^(2*FX_FRAC)/n.
  function automatic fx_t fx_inv_sqrt_const(input int n);
    longint v, r;
    v = (longint'(1) <<< (2 * FX_FRAC)) / longint'(n);
    r = 0;
    for (int b = 31; b >= 0; b--)
      if ((r + (longint'(1) <<< b)) * (r + (longint'(1) <<< b)) <= v) r = r + (longint'(1) <<< b);
    return fx_t'(r);
  endfunction

  // Words of one encoder layer in the layout above.
  function automatic int layer_words(input int d, input int dff);
    return 4 * (d * d + d) + dff * d + dff + d * dff + d;
  endfunction

  // Offsets of the fields of one encoder layer.
  function automatic int off_wq();                        return 0;                endfunction
  function automatic int off_bq(input int d);             return d * d;            endfunction
  function automatic int off_wk(input int d);             return d * d + d;        endfunction
  function automatic int off_bk(input int d);             return 2 * d * d + d;    endfunction
  function automatic int off_wv(input int d);             return 2 * (d * d + d);  endfunction
  function automatic int off_bv(input int d);             return 3 * d * d + 2 * d; endfunction
  function automatic int off_wo(input int d);             return 3 * (d * d + d);  endfunction
  function automatic int off_bo(input int d);             return 4 * d * d + 3 * d; endfunction
  function automatic int off_w1(input int d);             return 4 * (d * d + d);  endfunction
  function automatic int off_b1(input int d, input int dff); return 4 * (d * d + d) + dff * d; endfunction
  function automatic int off_w2(input int d, input int dff); return 4 * (d * d + d) + dff * d + dff; endfunction
  function automatic int off_b2(input int d, input int dff); return 4 * (d * d + d) + 2 * dff * d + dff; endfunction

  // Words of a whole detector: embedding (D x N_IN, D), layers, classifier (D, 1).
  function automatic int model_words(input int n_in, input int d, input int dff, input int n_layers);
    return (d * n_in + d) + n_layers * layer_words(d, dff) + (d + 1);
  endfunction

endpackage
