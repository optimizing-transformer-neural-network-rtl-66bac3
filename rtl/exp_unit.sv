// exp_unit: combinational fixed-point exponential y = e^x.
//
// e^x is evaluated as 2^(x*log2 e). The product is split into an integer part
// n (floor) and a fraction f in [0,1); 2^f comes from a cubic polynomial
//   2^f ~ 1 + f*(0.6955569 + f*(0.2261736 + f*0.0781456))
// (relative error about 1e-4 over [0,1)), which is then shifted by n.
// Results below the smallest step flush to 0; results above the largest
// representable value saturate.
//
// The reference needs e^x in the softmax (arguments <= 0 after subtracting
// the row maximum) and in the elu feature map of linear attention (arguments
// <= 0). It does not say how e^x is computed; the polynomial and its
// coefficients are this design's choice.
//
// Interface: x in, y out, no clock. Timing: purely combinational.
module exp_unit
  import tfm_pkg::*;
(
  input  fx_t x,
  output fx_t y
);

  // Constants in Q.FX_FRAC.
  localparam fx_t LOG2E = fx_t'(94548);  // 1.4426950 * 2^16
  localparam fx_t C1    = fx_t'(45584);  // 0.6955569 * 2^16
  localparam fx_t C2    = fx_t'(14823);  // 0.2261736 * 2^16
  localparam fx_t C3    = fx_t'(5121);   // 0.0781456 * 2^16

  fx_t t, f, p;
  fx_t n;

  always_comb begin
    t = fx_mul(x, LOG2E);
    n = t >>> FX_FRAC;                                   // floor
    f = t & fx_t'((1 << FX_FRAC) - 1);                   // fraction >= 0
    p = FX_ONE + fx_mul(f, C1 + fx_mul(f, C2 + fx_mul(f, C3)));
    if (n < -fx_t'(FX_W - 2))       y = '0;
    else if (n < 0)                 y = p >>> (-n);
    else if (n > fx_t'(FX_W - FX_FRAC - 3)) y = FX_MAX;
    else                            y = p <<< n;
  end

endmodule
