// tb_trtrl_cluster -- self-checking test of one cluster (8 neurons, neuron 0
// with a wired external port) driven phase by phase as the main controller
// does. The test bench supplies the input value, the external neighbour's link
// word and the output node's (e_o, f'_o) each step, and checks the (z_i, w_oi)
// words the cluster buffers for the main controller and the link word neuron 0
// sends, against a model of the eight neurons kept here (intra-cluster full
// connectivity, shared piecewise-linear sigmoid, the TRTRL update rules).
module tb_trtrl_cluster;
  import trtrl_pkg::*;
  localparam int NI = 1, NS = N_NBR + NI + 1, BIAS = N_NBR + NI, ASH = ALPHA_SHIFT_DEFAULT;
  localparam int ONE = 1 << FRAC, SW = $clog2(NS + 1);
  localparam logic [N_PER*N_EXT-1:0] EMASK = 16'h0001;   // neuron 0, port 0

  logic clk = 0, rst_n = 0;
  logic phase_start = 0; phase_e phase = PH_CLR; logic phase_done;
  logic x_vld = 0; logic [0:0] x_idx = '0; fx_t x_data = '0;
  word40_t err_word = '0;
  logic [2:0] zw_rd_node = '0; word40_t zw_rd_word;
  logic cfg_we = 0; logic [2:0] cfg_node = '0; logic [SW-1:0] cfg_addr = '0; fx_t cfg_data = '0;
  ext_word_t ext_tx [N_PER][N_EXT];
  ext_word_t ext_rx [N_PER][N_EXT];

  trtrl_cluster #(.EXT_MASK(EMASK), .N_IN(NI)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
  function automatic int mate(input int n, input int k); return (k - 1 < n) ? k - 1 : k; endfunction
  function automatic int slot(input int n, input int m); return (m < n) ? m + 1 : m; endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic run_phase(input phase_e p);
    @(negedge clk); phase_start = 1; phase = p;
    if (p == PH_INPUT) begin
      @(negedge clk); phase_start = 0; x_vld = 1;
      @(negedge clk); x_vld = 0;
    end else begin
      @(negedge clk); phase_start = 0;
    end
    while (!phase_done) @(negedge clk);
  endtask

  int W [N_PER][NS], pin [N_PER][NS], peg [N_PER][N_NBR], wo [N_PER], z [N_PER];

  initial begin
    int x, e, dfo, s [N_PER], y [N_PER], dy [N_PER];
    int nW [N_PER][NS], npin [N_PER][NS], npeg [N_PER][N_NBR], po, zk, j, sj;
    ext_word_t xw;
    for (int n = 0; n < N_PER; n++) for (int q = 0; q < N_EXT; q++) ext_rx[n][q] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N_PER; n++) begin
      for (int k = 0; k <= NS; k++) begin
        automatic int v = int'($urandom_range(0, ONE)) - ONE / 2;
        if (k < NS) W[n][k] = v; else wo[n] = v / 2;
        @(negedge clk); cfg_we = 1; cfg_node = 3'(n); cfg_addr = SW'(k); cfg_data = fx_t'((k < NS) ? v : v / 2);
      end
      z[n] = 0;
      for (int k = 0; k < NS; k++) pin[n][k] = 0;
      for (int k = 0; k < N_NBR; k++) peg[n][k] = 0;
    end
    @(negedge clk); cfg_we = 0;
    run_phase(PH_CLR);
    for (int t = 0; t < 15; t++) begin
      x = int'($urandom_range(0, 2 * ONE)) - ONE;
      x_data = fx_t'(x);
      xw = '{z: fx_t'($urandom_range(0, ONE)), wo: fx_t'(int'($urandom_range(0, ONE)) - ONE / 2),
             p_in: fx_t'(int'($urandom_range(0, ONE)) - ONE / 2), p_eg: fx_t'(int'($urandom_range(0, ONE)) - ONE / 2)};
      ext_rx[0][0] = xw;
      ext_rx[0][1] = '{z: fx_t'(999), wo: fx_t'(999), p_in: fx_t'(999), p_eg: fx_t'(999)};   // not wired
      run_phase(PH_INPUT);
      run_phase(PH_EXCH);
      for (int n = 0; n < N_PER; n++) begin
        zw_rd_node = 3'(n); #1;
        check("buffered z", int'(zw_rd_word.a), z[n]);
        check("buffered w_o", int'(zw_rd_word.b), wo[n]);
      end
      check("link word p_in", int'(ext_tx[0][0].p_in), pin[0][8]);
      check("link word p_eg", int'(ext_tx[0][0].p_eg), peg[0][8]);
      run_phase(PH_ACT);
      e = int'($urandom_range(0, ONE)) - ONE / 2; dfo = ONE >> $urandom_range(2, 5);
      err_word = '{a: fx_t'(e), b: fx_t'(dfo)};
      run_phase(PH_ERR);
      run_phase(PH_UPD);
      // model
      for (int n = 0; n < N_PER; n++) begin
        s[n] = 0;
        for (int k = 0; k < NS; k++) begin
          if (k >= N_PER && k < N_NBR && !(n == 0 && k == 8)) continue;
          zk = (k == 0) ? z[n] : (k < N_PER) ? z[mate(n, k)] : (k == 8) ? int'(xw.z) : (k == BIAS) ? ONE : x;
          s[n] = add(s[n], mul(W[n][k], zk));
        end
        y[n] = sig(s[n]); dy[n] = dsig(s[n]);
      end
      for (int n = 0; n < N_PER; n++) begin
        for (int k = 0; k < NS; k++) begin
          int pe, pi, zj, woj;
          nW[n][k] = W[n][k]; npin[n][k] = pin[n][k];
          if (k < N_NBR) npeg[n][k] = peg[n][k];
          if (k >= N_PER && k < N_NBR && !(n == 0 && k == 8)) continue;
          if (k == 0) begin
            npin[n][k] = mul(dy[n], add(mul(W[n][k], pin[n][k]), z[n])); npeg[n][k] = npin[n][k];
            po = mul(dfo, mul(wo[n], pin[n][k]));
          end else if (k < N_NBR) begin
            if (k < N_PER) begin
              j = mate(n, k); sj = slot(j, n);
              pe = peg[j][sj]; pi = pin[j][sj]; zj = z[j]; woj = wo[j];
            end else begin
              pe = int'(xw.p_eg); pi = int'(xw.p_in); zj = int'(xw.z); woj = int'(xw.wo);
            end
            npin[n][k] = mul(dy[n], add(mul(W[n][k], pe), zj));
            npeg[n][k] = mul(dy[n], mul(W[n][k], pi));
            po = mul(dfo, add(mul(wo[n], pin[n][k]), mul(woj, pe)));
          end else begin
            npin[n][k] = mul(dy[n], (k == BIAS) ? ONE : x);
            po = mul(dfo, mul(wo[n], pin[n][k]));
          end
          nW[n][k] = sat(longint'(W[n][k]) - longint'(rshr(mul(e, po), ASH)));
        end
      end
      for (int n = 0; n < N_PER; n++) begin
        wo[n] = sat(longint'(wo[n]) - longint'(rshr(mul(e, mul(dfo, z[n])), ASH)));
        z[n] = y[n]; W[n] = nW[n]; pin[n] = npin[n]; peg[n] = npeg[n];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
