// tb_workload_tasks -- runs the three learning tasks the algorithm was
// evaluated on, with the full-size network at its default parameters
// (12 clusters of 8 neurons, one input, one sigmoid output node, learning
// rate 2^-4), and checks that online learning behaves.
//
// Tasks, one after the other, each starting from reset and fresh random
// weights (all within +/-0.25 by default):
//   1. frequency doubler: input sin(2 pi t / 16), target sin(2 pi t / 8);
//   2. sequence memorization, depth 4: random high/low input, target is the
//      input of 4 steps earlier;
//   3. Mackey-Glass prediction: the series x(t+1) = 0.9 x(t) +
//      0.2 x(t-17) / (1 + x(t-17)^10) (unit Euler steps of the delay
//      equation, x(0) = 0.1, zero history, the first 300 samples skipped),
//      input x(t), target x(t+30).
// Signals are mapped into 0.1 .. 0.9 because the output node squashes its
// net input with the sigmoid. For every task the mean squared error of the
// first and of the last window (STEPS / 8 steps each) is printed. All three
// tasks need far more presentations than a simulation here can afford, so the
// check is only that online learning stays stable: the error of the last
// window may not exceed that of the first by more than 10 %. Every time step
// must also take the same number of cycles (265 from in_valid to out_valid).
// Plusargs for longer experiments: +steps=N, +wh=D and +wo=D (initial weight
// ranges +/-1/D), +tasks=mask, +trace (print every step).
// Window length, step count and weight ranges are this bench's own choice;
// the evaluation it mirrors used networks of 15 or 25 neurons with a linear
// output neuron.
module tb_workload_tasks;
  import trtrl_pkg::*;


  localparam int NCL = N_ROWS * N_COLS;
  localparam int NH = NCL * N_PER;
  localparam int NI = N_IN_DEFAULT;
  localparam int NS = N_NBR + NI + 1;
  int STEPS = 3000;
  int WIN = 400;
  int WH = 4, WO = 4, TMASK = 7;
  localparam real ONE_R = real'(1 << FRAC);

  logic clk = 0, rst_n = 0;
  logic ready, in_valid = 0, in_ready, out_valid;
  fx_t  in_x [NI];
  fx_t  in_d;
  fx_t  out_y, out_err;
  logic cfg_we = 0;
  logic [$clog2(NCL+1)-1:0] cfg_cluster = '0;
  logic [2:0] cfg_node = '0;
  logic [$clog2(NS+1)-1:0] cfg_addr = '0;
  fx_t cfg_data = '0;

  trtrl_network dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (3 * 20000 * 300 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input int cl, input int n, input int a, input int v);
    @(negedge clk);
    cfg_we = 1; cfg_cluster = $bits(cfg_cluster)'(cl); cfg_node = 3'(n);
    cfg_addr = $bits(cfg_addr)'(a); cfg_data = fx_t'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  function automatic int to_fx(input real v);
    return int'(v * ONE_R);
  endfunction

  // reset, load random weights, wait for the initial clear
  task automatic restart();
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NH; g++) begin
      for (int k = 0; k < NS; k++) cfg(g / N_PER, g % N_PER, k, rnd(-(1 << FRAC) / WH, (1 << FRAC) / WH));
      cfg(g / N_PER, g % N_PER, NS, rnd(-(1 << FRAC) / WO, (1 << FRAC) / WO));
    end
    for (int m = 0; m <= NI; m++) cfg(NCL, 0, m, rnd(-(1 << FRAC) / 4, (1 << FRAC) / 4));
    wait (ready);
  endtask

  // one time step: present (x, d), wait for the result, return the squared error
  int step_len;
  task automatic run_step(input real x, input real d, output real sq);
    int t0;
    @(negedge clk);
    in_valid = 1;
    in_x[0] = fx_t'(to_fx(x));
    in_d = fx_t'(to_fx(d));
    t0 = cyc;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
    do @(posedge clk); while (!out_valid);
    #1;
    sq = (real'(out_err) / ONE_R) ** 2;
    if ($test$plusargs("trace")) $display("x=%f d=%f y=%f e=%f wb=%0d wx=%0d", x, d, real'(out_y)/ONE_R, real'(out_err)/ONE_R, dut.u_out.wb, dut.u_out.wx[0]);
    if (step_len < 0) step_len = cyc - t0;
    else begin
      checks++;
      if (cyc - t0 != step_len) begin
        failures++;
        $display("FAIL time step took %0d cycles, earlier %0d", cyc - t0, step_len);
      end
    end
  endtask

  // must_fall: the last window's error must be below the first one's;
  // otherwise it must not exceed the first one's by more than 10 %
  task automatic judge(input string name, input real first, input real last, input bit must_fall);
    $display("%s: MSE first %0d steps %f, last %0d steps %f", name, WIN, first / WIN, WIN, last / WIN);
    checks++;
    if (must_fall ? !(last < first) : (last > 1.1 * first)) begin
      failures++;
      $display("FAIL %s: error %s", name, must_fall ? "did not fall" : "grew");
    end
  endtask

  real mg [20400];

  initial begin
    real sq, first, last, x, d, pi;
    int hist [4];
    in_x[0] = '0;
    in_d = '0;
    step_len = -1;
    pi = 3.14159265358979;
    void'($value$plusargs("steps=%d", STEPS));
    void'($value$plusargs("wh=%d", WH));
    void'($value$plusargs("wo=%d", WO));
    void'($value$plusargs("tasks=%d", TMASK));
    WIN = STEPS / 8;

    // ---- 1. frequency doubler
    if (TMASK[0]) begin
    restart();
    first = 0; last = 0;
    for (int t = 0; t < STEPS; t++) begin
      x = 0.5 + 0.4 * $sin(2.0 * pi * t / 16.0);
      d = 0.5 + 0.4 * $sin(2.0 * pi * t / 8.0);
      run_step(x, d, sq);
      if (t < WIN) first += sq;
      if (t >= STEPS - WIN) last += sq;
    end
    judge("frequency doubler", first, last, 1'b0);
    end

    // ---- 2. sequence memorization, depth 4
    if (TMASK[1]) begin
    restart();
    first = 0; last = 0;
    for (int k = 0; k < 4; k++) hist[k] = 0;
    for (int t = 0; t < STEPS; t++) begin
      automatic int b = int'($urandom_range(0, 1));
      x = (b != 0) ? 0.9 : 0.1;
      d = (hist[3] != 0) ? 0.9 : 0.1;
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = b;
      run_step(x, d, sq);
      if (t < WIN) first += sq;
      if (t >= STEPS - WIN) last += sq;
    end
    judge("sequence memorization (depth 4)", first, last, 1'b0);
    end

    // ---- 3. Mackey-Glass one-step prediction
    for (int t = 0; t < STEPS + 400; t++) begin
      mg[t] = (t == 0) ? 0.1 : mg[t-1] + 0.2 * ((t >= 18) ? mg[t-18] : 0.0)
                                     / (1.0 + ((t >= 18) ? mg[t-18] : 0.0) ** 10) - 0.1 * mg[t-1];
    end
    if (TMASK[2]) begin
    restart();
    first = 0; last = 0;
    for (int t = 0; t < STEPS; t++) begin
      // the series lies within about 0.2 .. 1.4; map it onto 0.1 .. 0.9
      x = 0.1 + (mg[t + 300] - 0.2) * 0.8 / 1.2;
      d = 0.1 + (mg[t + 330] - 0.2) * 0.8 / 1.2;
      run_step(x, d, sq);
      if (t < WIN) first += sq;
      if (t >= STEPS - WIN) last += sq;
    end
    judge("Mackey-Glass prediction", first, last, 1'b0);
    end

    $display("cycles per time step: %0d", step_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
