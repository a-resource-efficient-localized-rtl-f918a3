// pwl_sigmoid_deriv -- derivative of the 15-segment piecewise-linear sigmoid.
//
// The derivative is the slope of the segment the input lies in: 2^-(L+2) on
// [L, L+1) for L >= 0 and 2^(L-1) for L < 0, i.e. 1/4 next to zero (matching
// the true sigmoid's f'(0) = 1/4) and halving with every unit step outwards.
// Outside [-7, 8) the approximation is flat and the derivative is zero. Because
// it is always a power of two (or zero), a multiplication by f'(x) is a shift.
// The reference design names a separate derivative unit and says it uses the
// same piecewise-linear method; taking the segment slope as that derivative is
// this design's reading.
//
// Interface: x in, dy out, 20-bit fixed point. Combinational.
module pwl_sigmoid_deriv
  import trtrl_pkg::*;
(
  input  fx_t x,
  output fx_t dy
);

  logic [14:0] seg;
  logic        below, above;

  pwl_interval u_int (.x(x), .seg(seg), .below(below), .above(above));

  always_comb begin
    dy = '0;
    if (!below && !above) begin
      for (int i = 0; i < 15; i++) begin
        if (seg[i]) begin
          automatic int lo = i - 7;
          dy = FX_ONE >>> ((lo >= 0) ? lo + 2 : 1 - lo);
        end
      end
    end
  end

endmodule
