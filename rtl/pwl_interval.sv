// pwl_interval -- interval decoder shared by the piecewise-linear sigmoid and
// its derivative.
//
// The sigmoid approximation has 15 linear segments with integer end points on
// [-7, 8]. The input is compared with all 16 end points at once, giving a
// thermometer code ge[k] = (x >= k - 7); the segment is then found by XOR of
// neighbouring thermometer bits, so seg[i] is set when x lies in [i-7, i-6).
// `below` flags x < -7 and `above` flags x >= 8 (the saturated ends).
// Purely combinational. The parallel compare-and-XOR structure follows the
// reference description; the fixed-point format comes from trtrl_pkg.
module pwl_interval
  import trtrl_pkg::*;
(
  input  fx_t         x,
  output logic [14:0] seg,
  output logic        below,
  output logic        above
);

  logic [15:0] ge;

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      ge[k] = (x >= fx_t'((k - 7) * (1 << FRAC)));
    end
    for (int i = 0; i < 15; i++) begin
      seg[i] = ge[i] ^ ge[i+1];
    end
    below = ~ge[0];
    above = ge[15];
  end

endmodule
