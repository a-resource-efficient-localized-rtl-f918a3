// tb_pwl_sigmoid_deriv -- self-checking test of the sigmoid-derivative unit.
// The expected value is the slope of the segment holding x (1/4 next to zero,
// halving per unit step, zero outside [-7, 8)), computed with reals; it is also
// compared with the numerical slope of the sigmoid unit itself.
module tb_pwl_sigmoid_deriv;
  import trtrl_pkg::*;

  fx_t x, dy, x2, y1, y2;
  int  checks = 0, failures = 0;
  logic clk = 0;

  pwl_sigmoid_deriv dut (.x(x), .dy(dy));
  pwl_sigmoid       s1  (.x(x),  .y(y1));
  pwl_sigmoid       s2  (.x(x2), .y(y2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_d(input real xr);
    real lo;
    if (xr < -7.0 || xr >= 8.0) return 0.0;
    lo = $floor(xr);
    if (lo >= 0) return 2.0 ** (-(lo + 2));
    return 2.0 ** (lo - 1);
  endfunction

  task automatic check_at(input fx_t xi);
    real xr, dr, slope;
    x  = xi;
    x2 = xi + fx_t'(1 << (FRAC - 4));    // 1/16 further on
    #1;
    xr = real'(xi) / real'(1 << FRAC);
    dr = real'(dy) / real'(1 << FRAC);
    checks++;
    if (dr != ref_d(xr)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%f dy=%f expected %f", xr, dr, ref_d(xr));
    end
    // same segment for both points: numerical slope must agree within rounding
    if ($floor(xr) == $floor(xr + 1.0 / 16) && xr > -7.0 && xr < 7.9) begin
      slope = (real'(y2) - real'(y1)) / real'(1 << (FRAC - 4));
      checks++;
      if (slope > dr + 0.02 || slope < dr - 0.02) begin
        failures++;
        if (failures < 10) $display("FAIL x=%f slope=%f dy=%f", xr, slope, dr);
      end
    end
  endtask

  initial begin
    for (int k = -640; k <= 640; k++) check_at(fx_t'(k * (1 << (FRAC - 6))));
    x = '0; #1; checks++;
    if (dy != (FX_ONE >>> 2)) begin failures++; $display("FAIL f'(0) != 1/4"); end
    for (int i = 0; i < 2000; i++) check_at(fx_t'($urandom_range(0, 2 ** 20 - 1)) >>> 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
