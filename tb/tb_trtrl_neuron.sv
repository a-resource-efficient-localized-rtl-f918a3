// tb_trtrl_neuron -- self-checking test of one hidden neuron (cluster position
// 2, one wired inter-cluster port) driven the way its cluster drives it.
//
// Each time step the test bench plays the neighbours: it sends random
// neighbour words over the bus (both rounds) and the external link, checks the
// words the neuron sends when it owns a slot, checks its net input after ACT,
// feeds it sigmoid values and an error, and after UPD checks its activation and
// output weight. A model of the neuron's equations, kept here, supplies the
// expected values; it also checks the ACT and UPD durations.
module tb_trtrl_neuron;
  import trtrl_pkg::*;

  localparam int NODE = 2;
  localparam logic [1:0] EMASK = 2'b01;
  localparam int NI = 1, NS = N_NBR + NI + 1, BIAS = N_NBR + NI, ASH = 4;
  localparam int ONE = 1 << FRAC;
  localparam int SW = $clog2(NS + 1);

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [SW-1:0] cfg_addr = '0; fx_t cfg_data = '0;
  logic clr_start = 0, act_start = 0, upd_start = 0, done;
  logic in_we = 0; logic [0:0] in_idx = '0; fx_t in_data = '0;
  slot_code_t slot_pre = '0, slot_cur = '0;
  bus_word_t bus_tx, bus_rx = '0;
  logic [N_EXT-1:0] ext_cap = '0;
  ext_word_t ext_tx [N_EXT];
  ext_word_t ext_rx [N_EXT];
  fx_t s_out; logic sig_we = 0; fx_t sig_y = '0, sig_dy = '0;
  logic err_we = 0; fx_t err_e = '0, err_dfo = '0;
  fx_t z_out, wo_out;

  trtrl_neuron #(.NODE(NODE), .EXT_MASK(EMASK), .N_IN(NI), .ALPHA_SHIFT(ASH)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .clr_start, .act_start, .upd_start, .done,
    .in_we, .in_idx, .in_data, .bias_in(FX_ONE), .slot_pre, .slot_cur, .bus_tx, .bus_rx,
    .ext_cap, .ext_tx, .ext_rx, .s_out, .sig_we, .sig_y, .sig_dy, .err_we, .err_e, .err_dfo,
    .z_out, .wo_out);

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

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int mate_of(input int k); return (k - 1 < NODE) ? k - 1 : k; endfunction
  function automatic bit conn(input int k); return !(k >= 8 && k < 10 && !EMASK[k-8]); endfunction

  // model state
  int W [NS], pin [NS], peg [N_NBR], wo, z;
  int zn [N_NBR], won [N_NBR], pinb [N_NBR], penb [N_NBR];

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  int act_cycles, upd_cycles;
  task automatic wait_done(output int n);
    n = 0;
    do begin @(posedge clk); n++; end while (!done);
  endtask

  initial begin
    int x, s, y, dy, e, dfo, po, npin [NS], npeg [N_NBR];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NS; k++) begin
      W[k] = int'($urandom_range(0, ONE)) - ONE / 2;
      @(negedge clk); cfg_we = 1; cfg_addr = SW'(k); cfg_data = fx_t'(W[k]);
    end
    wo = int'($urandom_range(0, ONE / 2)) - ONE / 4;
    @(negedge clk); cfg_addr = SW'(NS); cfg_data = fx_t'(wo);
    @(negedge clk); cfg_we = 0;
    z = 0;
    for (int k = 0; k < NS; k++) pin[k] = 0;
    for (int k = 0; k < N_NBR; k++) peg[k] = 0;
    pulse(clr_start);
    wait_done(act_cycles);
    check("CLR length", act_cycles, NS + 1);

    for (int t = 0; t < 12; t++) begin
      // neighbour data of this step
      for (int k = 1; k < N_NBR; k++) begin
        zn[k] = int'($urandom_range(0, ONE)); won[k] = int'($urandom_range(0, ONE)) - ONE / 2;
        pinb[k] = int'($urandom_range(0, ONE)) - ONE / 2; penb[k] = int'($urandom_range(0, ONE)) - ONE / 2;
      end
      x = int'($urandom_range(0, 2 * ONE)) - ONE;
      @(negedge clk); in_we = 1; in_idx = 0; in_data = fx_t'(x);
      @(negedge clk); in_we = 0;
      // external links: port 0 wired, port 1 not (its data must be ignored)
      ext_rx[0] = '{z: fx_t'(zn[8]), wo: fx_t'(won[8]), p_in: fx_t'(pinb[8]), p_eg: fx_t'(penb[8])};
      ext_rx[1] = '{z: fx_t'(777), wo: fx_t'(777), p_in: fx_t'(777), p_eg: fx_t'(777)};
      check("ext_tx z", int'(ext_tx[0].z), z);
      check("ext_tx p_in", int'(ext_tx[0].p_in), pin[8]);
      check("ext_tx p_eg", int'(ext_tx[0].p_eg), peg[8]);
      @(negedge clk); ext_cap = 2'b01;
      @(negedge clk); ext_cap = 2'b10;
      @(negedge clk); ext_cap = 2'b00;
      // bus: two rounds
      for (int r = 0; r < 2; r++) begin
        for (int k = 1; k < N_PER; k++) begin
          // neighbour sends to us
          @(negedge clk);
          slot_cur = '{vld: 1, src: 3'(mate_of(k)), dst: 3'(NODE), rnd: 1'(r)};
          bus_rx = r ? '{a: fx_t'(penb[k]), b: '0, c: '0}
                     : '{a: fx_t'(zn[k]), b: fx_t'(won[k]), c: fx_t'(pinb[k])};
          // we send to the same neighbour: code one cycle ahead
          @(negedge clk);
          slot_cur = '0; bus_rx = '0;
          slot_pre = '{vld: 1, src: 3'(NODE), dst: 3'(mate_of(k)), rnd: 1'(r)};
          @(negedge clk);
          slot_cur = slot_pre; slot_pre = '0;
          #1;
          if (r == 0) begin
            check("bus_tx z", int'(bus_tx.a), z);
            check("bus_tx wo", int'(bus_tx.b), wo);
            check("bus_tx p_in", int'(bus_tx.c), pin[k]);
          end else begin
            check("bus_tx p_eg", int'(bus_tx.a), peg[k]);
          end
          @(negedge clk); slot_cur = '0;
        end
      end
      // activation
      s = 0;
      for (int k = 0; k < NS; k++) begin
        automatic int zk = (k == 0) ? z : (k < N_NBR) ? zn[k] : (k == BIAS) ? ONE : x;
        if (conn(k)) s = add(s, mul(W[k], zk));
      end
      pulse(act_start);
      wait_done(act_cycles);
      check("ACT length", act_cycles, NS + 2);
      check("net input", int'(s_out), s);
      y = int'($urandom_range(0, ONE)); dy = ONE >> $urandom_range(2, 6);
      @(negedge clk); sig_we = 1; sig_y = fx_t'(y); sig_dy = fx_t'(dy);
      @(negedge clk); sig_we = 0;
      e = int'($urandom_range(0, ONE)) - ONE / 2; dfo = ONE >> $urandom_range(2, 6);
      @(negedge clk); err_we = 1; err_e = fx_t'(e); err_dfo = fx_t'(dfo);
      @(negedge clk); err_we = 0;
      // model update
      for (int k = 0; k < NS; k++) begin
        npin[k] = pin[k];
        if (k < N_NBR) npeg[k] = peg[k];
        if (!conn(k)) continue;
        if (k == 0) begin
          npin[k] = mul(dy, add(mul(W[k], pin[k]), z)); npeg[k] = npin[k];
          po = mul(dfo, mul(wo, pin[k]));
        end else if (k < N_NBR) begin
          npin[k] = mul(dy, add(mul(W[k], penb[k]), zn[k]));
          npeg[k] = mul(dy, mul(W[k], pinb[k]));
          po = mul(dfo, add(mul(wo, pin[k]), mul(won[k], penb[k])));
        end else begin
          npin[k] = mul(dy, (k == BIAS) ? ONE : x);
          po = mul(dfo, mul(wo, pin[k]));
        end
        W[k] = sat(longint'(W[k]) - longint'(rshr(mul(e, po), ASH)));
      end
      pin = npin; peg = npeg;
      wo = sat(longint'(wo) - longint'(rshr(mul(e, mul(dfo, z)), ASH)));
      z = y;
      pulse(upd_start);
      wait_done(upd_cycles);
      check("UPD length", upd_cycles, NS + 3);
      @(negedge clk);
      check("z after update", int'(z_out), z);
      check("wo after update", int'(wo_out), wo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
