// tb_main_controller -- self-checking test of the network controller with
// behavioural stand-ins for 12 clusters (each answers a phase after its own
// random delay) and for the output node. Checks the phase order of a time step,
// that no phase starts before every cluster finished the previous one, that
// the MUX streams the (z_i, w_oi) word of every hidden neuron exactly once and
// in order, that the output node's error word is buffered and broadcast, and
// that step_done ends the step.
module tb_main_controller;
  import trtrl_pkg::*;
  localparam int NCL = 12;

  logic clk = 0, rst_n = 0;
  logic ready, in_pending = 0, bcast_start, phase_start;
  phase_e phase;
  logic [NCL-1:0] cl_done = '0;
  logic [2:0] zw_rd_node;
  word40_t zw_words [NCL];
  logic zw_vld; word40_t zw_word;
  logic out_start, out_fin, out_upd, out_res_vld = 0;
  word40_t out_err_word = '0, err_word;
  logic step_done;

  main_controller #(.N_CL(NCL)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // cluster stand-ins: words identify (cluster, node); done after a random delay
  for (genvar c = 0; c < NCL; c++) begin : g_cl
    assign zw_words[c] = '{a: fx_t'(c * 8 + zw_rd_node), b: fx_t'(1000 + c)};
    initial begin
      forever begin
        @(posedge clk);
        if (phase_start) begin
          repeat ($urandom_range(1, 20)) @(posedge clk);
          #1 cl_done[c] = 1;
          @(posedge clk);
          #1 cl_done[c] = 0;
        end
      end
    end
  end

  // output-node stand-in
  always @(posedge clk) begin
    out_res_vld <= out_fin;
    if (out_fin) out_err_word <= '{a: fx_t'($urandom_range(0, 4095)), b: fx_t'($urandom_range(0, 1024))};
  end

  // monitor
  int outstanding;     // clusters that have not answered the current phase
  phase_e seq [$];
  int n_zw, zw_bad, n_start, n_fin, n_upd, n_bcast;
  word40_t fin_err;
  always @(posedge clk) begin
    if (rst_n) begin
      outstanding <= outstanding - $countones(cl_done);
      if (phase_start) begin
        if (outstanding != 0) begin failures++; $display("FAIL phase started with %0d clusters busy", outstanding); end
        outstanding <= NCL;
        seq.push_back(phase);
        if (phase == PH_ERR) begin
          checks++;
          if (err_word != out_err_word) begin failures++; $display("FAIL error word not buffered"); end
        end
      end
      if (zw_vld) begin
        if (int'(zw_word.a) != n_zw || int'(zw_word.b) != 1000 + n_zw / 8) zw_bad++;
        n_zw++;
      end
      if (out_start) n_start++;
      if (out_fin) n_fin++;
      if (out_upd) n_upd++;
      if (bcast_start) n_bcast++;
    end else outstanding <= 0;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (ready);
    check("clear phase first", seq.size() == 1 && seq[0] == PH_CLR);
    for (int t = 0; t < 20; t++) begin
      seq.delete(); n_zw = 0; zw_bad = 0; n_start = 0; n_fin = 0; n_upd = 0; n_bcast = 0;
      @(negedge clk); in_pending = 1;
      @(posedge bcast_start); @(negedge clk); in_pending = 0;
      @(posedge step_done);
      @(negedge clk);
      check("phase order INPUT EXCH ACT ERR UPD",
            seq.size() == 5 && seq[0] == PH_INPUT && seq[1] == PH_EXCH && seq[2] == PH_ACT &&
            seq[3] == PH_ERR && seq[4] == PH_UPD);
      check("96 words streamed once, in order", n_zw == NCL * 8 && zw_bad == 0);
      check("output node start/fin/upd once each", n_start == 1 && n_fin == 1 && n_upd == 1);
      check("one input broadcast", n_bcast == 1);
      check("ready after the step", ready);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
