// tb_trtrl_network -- end-to-end test of the clustered TRTRL network at its
// default size (3 x 4 clusters of 8 neurons, one input, one output node).
//
// Loads random weights, presents a sequence of random samples and, after every
// time step, compares the output y_o, the error e_o and the activation z_i and
// output weight w_oi of all 96 hidden neurons with a behavioural model of the
// network written here from the learning equations (plain loops over the
// neighbour lists, its own fixed-point helpers and its own piecewise-linear
// sigmoid). It also counts how often each mechanism occurs (input broadcast,
// bus slots of both rounds, inter-cluster captures, shared-sigmoid services,
// error broadcasts, update phases, sigmoid saturation) and checks the input
// broadcast (9 cycles) and the number of bus slots per step (112 per cluster).
module tb_trtrl_network;
  import trtrl_pkg::*;

  localparam int ROWS = N_ROWS, COLS = N_COLS, NCL = ROWS * COLS;
  localparam int NH = NCL * N_PER;
  localparam int NI = N_IN_DEFAULT;
  localparam int NS = N_NBR + NI + 1;      // slots per neuron
  localparam int BIAS = N_NBR + NI;
  localparam int ASH = ALPHA_SHIFT_DEFAULT;
  localparam int STEPS = 40;

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

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model arithmetic
  function automatic int sat(input longint v);
    if (v > 524287) return 524287;
    if (v < -524288) return -524288;
    return int'(v);
  endfunction
  // learning-rate step, rounded to nearest
  function automatic int rshr(input int v, input int sh);
    return (sh == 0) ? v : ((v + (1 <<< (sh - 1))) >>> sh);
  endfunction
  function automatic int mul(input int a, input int b);
    return sat((longint'(a) * longint'(b)) >>> FRAC);
  endfunction
  function automatic int add(input int a, input int b);
    return sat(longint'(a) + longint'(b));
  endfunction
  localparam int ONE = 1 << FRAC;
  // piecewise-linear sigmoid: f(k) = 1 - 2^-(k+1), f(-k) = 2^-(k+1), linear between
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

  // ---------------------------------------------------------------- model topology
  // nb[g][k]: global index of the neuron on slot k of neuron g (-1 for none)
  int nb [NH][N_NBR];
  function automatic int corner_partner(input int cl, input int n, input int q);
    int r, c;
    r = cl / COLS; c = cl % COLS;
    if (n == 0 && q == 0 && c > 0)        return (cl - 1) * N_PER + 2;
    if (n == 0 && q == 1 && r > 0)        return (cl - COLS) * N_PER + 5;
    if (n == 2 && q == 0 && c < COLS - 1) return (cl + 1) * N_PER + 0;
    if (n == 2 && q == 1 && r > 0)        return (cl - COLS) * N_PER + 7;
    if (n == 5 && q == 0 && c > 0)        return (cl - 1) * N_PER + 7;
    if (n == 5 && q == 1 && r < ROWS - 1) return (cl + COLS) * N_PER + 0;
    if (n == 7 && q == 0 && c < COLS - 1) return (cl + 1) * N_PER + 5;
    if (n == 7 && q == 1 && r < ROWS - 1) return (cl + COLS) * N_PER + 2;
    return -1;
  endfunction
  function automatic int slot_of(input int g, input int j);   // slot of j in g
    for (int k = 0; k < N_NBR; k++) if (nb[g][k] == j) return k;
    return -1;
  endfunction

  // ---------------------------------------------------------------- model state
  int W [NH][NS];
  int wo [NH], z [NH], pin [NH][NS], peg [NH][N_NBR];
  int wx [NI], wb;
  int m_y, m_e;

  task automatic model_step(input int x [NI], input int d);
    int s [NH], y [NH], dy [NH];
    int nW [NH][NS], npin [NH][NS], npeg [NH][N_NBR], nwo [NH];
    int so, dyo, zk, j, sj, pe, pi, po;
    for (int g = 0; g < NH; g++) begin
      s[g] = 0;
      for (int k = 0; k < NS; k++) begin
        if (k < N_NBR && nb[g][k] < 0) continue;
        zk = (k < N_NBR) ? z[nb[g][k]] : (k == BIAS) ? ONE : x[k - N_NBR];
        s[g] = add(s[g], mul(W[g][k], zk));
      end
      y[g] = sig(s[g]); dy[g] = dsig(s[g]);
    end
    so = 0;
    for (int g = 0; g < NH; g++) so = add(so, mul(wo[g], z[g]));
    so = add(so, wb);
    for (int m = 0; m < NI; m++) so = add(so, mul(wx[m], x[m]));
    m_y = sig(so); dyo = dsig(so); m_e = sat(longint'(m_y) - longint'(d));
    for (int g = 0; g < NH; g++) begin
      for (int k = 0; k < NS; k++) begin
        nW[g][k] = W[g][k]; npin[g][k] = pin[g][k];
        if (k < N_NBR) npeg[g][k] = peg[g][k];
        if (k < N_NBR && nb[g][k] < 0) continue;
        if (k == 0) begin
          npin[g][k] = mul(dy[g], add(mul(W[g][k], pin[g][k]), z[g]));
          npeg[g][k] = npin[g][k];
          po = mul(dyo, mul(wo[g], pin[g][k]));
        end else if (k < N_NBR) begin
          j = nb[g][k]; sj = slot_of(j, g);
          pe = peg[j][sj]; pi = pin[j][sj];
          npin[g][k] = mul(dy[g], add(mul(W[g][k], pe), z[j]));
          npeg[g][k] = mul(dy[g], mul(W[g][k], pi));
          po = mul(dyo, add(mul(wo[g], pin[g][k]), mul(wo[j], pe)));
        end else begin
          zk = (k == BIAS) ? ONE : x[k - N_NBR];
          npin[g][k] = mul(dy[g], zk);
          po = mul(dyo, mul(wo[g], pin[g][k]));
        end
        nW[g][k] = sat(longint'(W[g][k]) - longint'(rshr(mul(m_e, po), ASH)));
      end
      nwo[g] = sat(longint'(wo[g]) - longint'(rshr(mul(m_e, mul(dyo, z[g])), ASH)));
    end
    for (int g = 0; g < NH; g++) begin
      W[g] = nW[g]; pin[g] = npin[g]; peg[g] = npeg[g]; wo[g] = nwo[g]; z[g] = y[g];
    end
    for (int m = 0; m < NI; m++) wx[m] = sat(longint'(wx[m]) - longint'(rshr(mul(m_e, mul(dyo, x[m])), ASH)));
    wb = sat(longint'(wb) - longint'(rshr(mul(m_e, dyo), ASH)));
  endtask

  // ---------------------------------------------------------------- observation
  fx_t dut_z [NH], dut_wo [NH];
  for (genvar c = 0; c < NCL; c++) begin : g_mc
    for (genvar n = 0; n < N_PER; n++) begin : g_mn
      assign dut_z[c*N_PER+n]  = dut.g_cl[c].u_cl.g_neu[n].z_o;
      assign dut_wo[c*N_PER+n] = dut.g_cl[c].u_cl.g_neu[n].wo_o;
    end
  end

  // mechanism counters
  int n_bcast = 0, n_slot_r0 = 0, n_slot_r1 = 0, n_ext = 0, n_sig = 0, n_err = 0;
  int n_upd = 0, n_sat = 0, in_cycles = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.phase_start && dut.phase == PH_INPUT) n_bcast++;
    // input broadcast: cycles on the cluster's input line plus forwarding cycles
    if (rst_n && (dut.x_vld || dut.g_cl[0].u_cl.fwd_we)) in_cycles++;
    if (dut.g_cl[0].u_cl.bus_code.vld) begin
      if (dut.g_cl[0].u_cl.bus_code.rnd) n_slot_r1++; else n_slot_r0++;
    end
    if (|dut.g_cl[0].u_cl.ext_cap) n_ext++;
    if (dut.g_cl[0].u_cl.sig_we) begin
      n_sig++;
      if (int'(dut.g_cl[0].u_cl.s_vec[dut.g_cl[0].u_cl.sig_sel]) < -7 * ONE ||
          int'(dut.g_cl[0].u_cl.s_vec[dut.g_cl[0].u_cl.sig_sel]) >= 8 * ONE) n_sat++;
    end
    if (dut.g_cl[0].u_cl.err_we) n_err++;
    if (dut.phase_start && dut.phase == PH_UPD) n_upd++;
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

  initial begin
    int x [NI];
    int d, step_cycles, t0;
    // topology of the model
    for (int g = 0; g < NH; g++) begin
      automatic int cl = g / N_PER, n = g % N_PER;
      nb[g][0] = g;
      for (int mte = 0; mte < N_PER; mte++)
        if (mte != n) nb[g][(mte < n) ? mte + 1 : mte] = cl * N_PER + mte;
      for (int q = 0; q < N_EXT; q++) nb[g][N_PER + q] = corner_partner(cl, n, q);
    end
    for (int i = 0; i < NI; i++) in_x[i] = '0;
    in_d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // random weights within +/-0.5; one neuron (cluster 0, node 3) gets a large
    // input weight so that its sigmoid saturates
    for (int g = 0; g < NH; g++) begin
      for (int k = 0; k < NS; k++) begin
        W[g][k] = rnd(-ONE / 2, ONE / 2);
        if (g == 3 && k >= N_NBR) W[g][k] = 12 * ONE;
        cfg(g / N_PER, g % N_PER, k, W[g][k]);
      end
      wo[g] = rnd(-ONE / 4, ONE / 4);
      cfg(g / N_PER, g % N_PER, NS, wo[g]);
      z[g] = 0;
      for (int k = 0; k < NS; k++) pin[g][k] = 0;
      for (int k = 0; k < N_NBR; k++) peg[g][k] = 0;
    end
    for (int m = 0; m < NI; m++) begin wx[m] = rnd(-ONE / 2, ONE / 2); cfg(NCL, 0, m, wx[m]); end
    wb = rnd(-ONE / 2, ONE / 2); cfg(NCL, 0, NI, wb);
    wait (ready);
    step_cycles = -1;
    for (int t = 0; t < STEPS; t++) begin
      for (int m = 0; m < NI; m++) x[m] = rnd(-ONE, ONE);
      d = rnd(0, ONE);
      @(negedge clk);
      in_valid = 1;
      for (int m = 0; m < NI; m++) in_x[m] = fx_t'(x[m]);
      in_d = fx_t'(d);
      t0 = cyc;
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
      in_valid = 0;
      model_step(x, d);
      do @(posedge clk); while (!out_valid);
      if (step_cycles < 0) step_cycles = cyc - t0;
      #1;
      checks++;
      if (int'(out_y) != m_y || int'(out_err) != m_e) begin
        failures++;
        $display("FAIL step %0d: y=%0d e=%0d expected y=%0d e=%0d", t, out_y, out_err, m_y, m_e);
      end
      for (int g = 0; g < NH; g++) begin
        checks++;
        if (int'(dut_z[g]) != z[g] || int'(dut_wo[g]) != wo[g]) begin
          failures++;
          if (failures < 20) $display("FAIL step %0d neuron %0d: z=%0d wo=%0d expected z=%0d wo=%0d",
                                      t, g, dut_z[g], dut_wo[g], z[g], wo[g]);
        end
      end
    end
    // per-step counts
    checks++;
    if (in_cycles != 9 * STEPS) begin failures++; $display("FAIL input broadcast took %0d cycles in %0d steps, expected 9 per step", in_cycles, STEPS); end
    checks++;
    if (n_slot_r0 != STEPS * N_PER * (N_PER - 1) || n_slot_r1 != STEPS * N_PER * (N_PER - 1)) begin
      failures++; $display("FAIL bus slots %0d/%0d", n_slot_r0, n_slot_r1);
    end
    $display("mechanisms: broadcasts=%0d bus_slots=%0d+%0d ext_captures=%0d sigmoid=%0d saturated=%0d err_fwd=%0d updates=%0d",
             n_bcast, n_slot_r0, n_slot_r1, n_ext, n_sig, n_sat, n_err, n_upd);
    $display("cycles per time step: %0d", step_cycles);
    checks++; if (n_bcast == 0) failures++;
    checks++; if (n_ext == 0) failures++;
    checks++; if (n_sig == 0) failures++;
    checks++; if (n_sat == 0) begin failures++; $display("FAIL sigmoid never saturated"); end
    checks++; if (n_err == 0) failures++;
    checks++; if (n_upd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
