// tb_pwl_sigmoid -- self-checking test of the piecewise-linear sigmoid.
// Sweeps the input over [-10, 10] in steps of 1/64 plus random values, and
// compares with the segment formula evaluated in real arithmetic (within one
// LSB) and with the true logistic function (within 0.02); checks that the
// output never decreases and hits the printed values at integer points.
module tb_pwl_sigmoid;
  import trtrl_pkg::*;

  fx_t x, y;
  int  checks = 0, failures = 0;
  logic clk = 0;

  pwl_sigmoid dut (.x(x), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_pwl(input real xr);
    real lo;
    if (xr < -7.0) return 2.0 ** -8;
    if (xr >= 8.0) return 1.0 - 2.0 ** -9;
    lo = $floor(xr);
    if (lo >= 0) return 1.0 - 2.0 ** (-(lo + 1)) + (xr - lo) * 2.0 ** (-(lo + 2));
    return 2.0 ** (lo - 1) + (xr - lo) * 2.0 ** (lo - 1);
  endfunction

  task automatic check_at(input fx_t xi);
    real xr, yr, er, tr;
    x = xi;
    #1;
    xr = real'(xi) / real'(1 << FRAC);
    yr = real'(y) / real'(1 << FRAC);
    er = ref_pwl(xr);
    tr = 1.0 / (1.0 + $exp(-xr));
    checks++;
    if (yr > er + 1.0 / (1 << FRAC) || yr < er - 1.0 / (1 << FRAC) ||
        yr - tr > 0.02 || tr - yr > 0.02) begin
      failures++;
      if (failures < 10) $display("FAIL x=%f y=%f pwl=%f sigmoid=%f", xr, yr, er, tr);
    end
  endtask

  initial begin
    fx_t prev;
    prev = FX_MIN;
    for (int k = -640; k <= 640; k++) begin
      check_at(fx_t'(k * (1 << (FRAC - 6))));
      checks++;
      if (y < prev) begin
        failures++;
        $display("FAIL not monotonic at x=%0d", k);
      end
      prev = y;
    end
    // printed breakpoint values: f(k) = 1 - 2^-(k+1), f(-k) = 2^-(k+1)
    for (int k = 0; k <= 7; k++) begin
      x = fx_t'(k * (1 << FRAC)); #1;
      checks++;
      if (y != FX_ONE - (FX_ONE >>> (k + 1))) begin failures++; $display("FAIL f(%0d)", k); end
      x = fx_t'(-k * (1 << FRAC)); #1;
      checks++;
      if (y != (FX_ONE >>> (k + 1))) begin failures++; $display("FAIL f(-%0d)", k); end
    end
    for (int i = 0; i < 2000; i++) check_at(fx_t'($urandom_range(0, 2 ** 20 - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
