// tb_output_node -- self-checking test of the output neuron: accumulation of a
// stream of (z_i, w_oi) pairs (including a pair arriving with `start`), the
// input and bias terms, y_o, f'(s_o) and e_o = y_o - d one cycle after `fin`,
// and the gradient-descent update of its own weights, against a model here.
module tb_output_node;
  import trtrl_pkg::*;
  localparam int NI = 2, NP = 24, ASH = 3, ONE = 1 << FRAC;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [1:0] cfg_addr = '0; fx_t cfg_data = '0;
  logic x_vld = 0; logic [0:0] x_idx = '0; word40_t x_word = '0;
  logic start = 0, zw_vld = 0, fin = 0, upd = 0, res_vld;
  word40_t zw_word = '0, err_word;
  fx_t y, dy, e;

  output_node #(.N_IN(NI), .ALPHA_SHIFT(ASH)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input longint v);
    return (v > 524287) ? 524287 : (v < -524288) ? -524288 : int'(v);
  endfunction
  // learning-rate step, rounded to nearest
  function automatic int rshr(input int v, input int sh);
    return (sh == 0) ? v : ((v + (1 <<< (sh - 1))) >>> sh);
  endfunction
  function automatic int mul(input int a, input int b); return sat((longint'(a) * b) >>> FRAC); endfunction
  function automatic int add(input int a, input int b); return sat(longint'(a) + b); endfunction
  function automatic int sig(input int s);
    int lo, fr;
    if (s < -7 * ONE) return ONE / 256;
    if (s >= 8 * ONE) return ONE - ONE / 512;
    lo = s >>> FRAC; fr = s - lo * ONE;
    if (lo >= 0) return ONE - (ONE >> (lo + 1)) + (fr >> (lo + 2));
    return (ONE >> (1 - lo)) + (fr >> (1 - lo));
  endfunction
  function automatic int dsig(input int s);
    int lo;
    if (s < -7 * ONE || s >= 8 * ONE) return 0;
    lo = s >>> FRAC;
    return (lo >= 0) ? (ONE >> (lo + 2)) : (ONE >> (1 - lo));
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int wx [NI], wb, xs [NI], d, acc, s, my, mdy, me;
    int zs [NP], ws [NP];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m <= NI; m++) begin
      automatic int v = int'($urandom_range(0, ONE)) - ONE / 2;
      if (m < NI) wx[m] = v; else wb = v;
      @(negedge clk); cfg_we = 1; cfg_addr = 2'(m); cfg_data = fx_t'(v);
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 60; t++) begin
      for (int m = 0; m < NI; m++) begin
        xs[m] = int'($urandom_range(0, 2 * ONE)) - ONE;
        d = int'($urandom_range(0, ONE));
        @(negedge clk); x_vld = 1; x_idx = 1'(m); x_word = '{a: fx_t'(xs[m]), b: fx_t'(d)};
      end
      @(negedge clk); x_vld = 0;
      // stream; the first pair comes together with start
      acc = 0;
      for (int i = 0; i < NP; i++) begin
        zs[i] = int'($urandom_range(0, ONE));
        ws[i] = int'($urandom_range(0, ONE)) - ONE / 2;
        if (t % 10 == 9) ws[i] = 2 * ONE;      // drive s_o into the saturated end
        acc = add(acc, mul(ws[i], zs[i]));
      end
      for (int i = 0; i < NP; i++) begin
        start = (i == 0);
        zw_vld = 1; zw_word = '{a: fx_t'(zs[i]), b: fx_t'(ws[i])};
        @(negedge clk);
      end
      start = 0; zw_vld = 0;
      s = add(acc, wb);
      for (int m = 0; m < NI; m++) s = add(s, mul(wx[m], xs[m]));
      my = sig(s); mdy = dsig(s); me = sat(longint'(my) - d);
      fin = 1; @(negedge clk); fin = 0;
      checks++;
      if (!res_vld) begin failures++; $display("FAIL res_vld not one cycle after fin"); end
      check("y", int'(y), my);
      check("dy", int'(dy), mdy);
      check("e", int'(e), me);
      check("err_word", int'(err_word.a) + int'(err_word.b), me + mdy);
      upd = 1; @(negedge clk); upd = 0;
      for (int m = 0; m < NI; m++) wx[m] = sat(longint'(wx[m]) - longint'(rshr(mul(me, mul(mdy, xs[m])), ASH)));
      wb = sat(longint'(wb) - longint'(rshr(mul(me, mdy), ASH)));
      check("bias weight", int'(dut.wb), wb);
      for (int m = 0; m < NI; m++) check("input weight", int'(dut.wx[m]), wx[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
