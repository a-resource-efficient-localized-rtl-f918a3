// pwl_sigmoid -- 15-segment piecewise-linear approximation of the logistic
// sigmoid f(x) = 1 / (1 + exp(-x)), built only from shifts and adds.
//
// End points are the integers -7 .. 8. On a segment [L, L+1) with L >= 0 the
// line runs from 1 - 2^-(L+1) with slope 2^-(L+2), so f(k) = 1 - 2^-(k+1) at
// every non-negative integer k; for L < 0 the curve is the mirror image,
// f(L) = 2^(L-1) with slope 2^(L-1), giving f(-k) = 2^-(k+1). Outside [-7, 8)
// the output holds the end value (2^-8 below, 1 - 2^-9 above). The segment is
// selected by pwl_interval (16 parallel compares, XOR decode). The breakpoints,
// the powers-of-two values and the compare/XOR selection follow the reference
// design; the exact saturation values at the two ends are this design's choice.
//
// Interface: x in, y out, both 20-bit fixed point (trtrl_pkg). Combinational,
// result in the same cycle.
module pwl_sigmoid
  import trtrl_pkg::*;
(
  input  fx_t x,
  output fx_t y
);

  logic [14:0] seg;
  logic        below, above;

  pwl_interval u_int (.x(x), .seg(seg), .below(below), .above(above));

  always_comb begin
    y = fx_t'(FX_ONE >>> 8);               // saturated low end, f(-7) = 2^-8
    if (above) begin
      y = FX_ONE - fx_t'(FX_ONE >>> 9);    // saturated high end, f(8) = 1 - 2^-9
    end else if (!below) begin
      for (int i = 0; i < 15; i++) begin
        if (seg[i]) begin
          automatic int  lo   = i - 7;                              // segment start L
          automatic fx_t xrel = x - fx_t'(lo * (1 << FRAC));        // 0 <= xrel < 1
          automatic int  s    = (lo >= 0) ? lo + 2 : 1 - lo;        // slope 2^-s
          automatic fx_t base = (lo >= 0) ? (FX_ONE - (FX_ONE >>> (lo + 1)))
                                          : (FX_ONE >>> (1 - lo));
          y = base + (xrel >>> s);
        end
      end
    end
  end

endmodule
