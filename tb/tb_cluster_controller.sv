// tb_cluster_controller -- self-checking test of the cluster sequencer.
// Runs every phase and checks what the controller issues: the input forwarding
// order (9 cycles for one input), the two external capture cycles, every ordered
// (src, dst) pair exactly once per bus round with slot_cur one cycle behind
// slot_pre, the sigmoid and error service of all neurons, and the done pulses.
module tb_cluster_controller;
  import trtrl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic phase_start = 0; phase_e phase = PH_CLR;
  logic done, x_vld = 0, neu_done = 0;
  logic clr_start, act_start, upd_start, fwd_we, sig_we, err_we;
  logic [0:0] fwd_idx; logic [2:0] fwd_node, sig_sel, err_node;
  slot_code_t slot_pre, slot_cur;
  logic [N_EXT-1:0] ext_cap;

  cluster_controller #(.N_IN(1)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // record activity between a phase start and its done
  int n_fwd, n_sig, n_err, n_clr, n_act, n_upd, cycles, n_slot [2], n_cur;
  bit seen [2][8][8];
  bit fwd_seen [8], sig_seen [8], err_seen [8];
  int ext_seq [$];
  slot_code_t pre_q;
  bit in_order;

  task automatic run(input phase_e p, input int neu_delay);
    n_fwd = 0; n_sig = 0; n_err = 0; n_clr = 0; n_act = 0; n_upd = 0; cycles = 0; n_cur = 0;
    n_slot = '{0, 0}; seen = '{default: 0}; fwd_seen = '{default: 0};
    sig_seen = '{default: 0}; err_seen = '{default: 0}; ext_seq.delete(); in_order = 1;
    pre_q = '0;
    @(negedge clk); phase_start = 1; phase = p;
    @(negedge clk); phase_start = 0;
    if (p == PH_INPUT) x_vld = 1;
    fork
      begin
        if (p == PH_INPUT) begin @(negedge clk); x_vld = 0; end
      end
      begin
        if (p == PH_CLR || p == PH_ACT || p == PH_UPD) begin
          repeat (neu_delay) @(negedge clk);
          neu_done = 1; @(negedge clk); neu_done = 0;
        end
      end
    join_none
    forever begin
      @(posedge clk);
      cycles++;
      if (fwd_we) begin n_fwd++; fwd_seen[fwd_node] = 1; if (fwd_idx != 0) in_order = 0; end
      if (sig_we) begin n_sig++; sig_seen[sig_sel] = 1; end
      if (err_we) begin n_err++; err_seen[err_node] = 1; end
      if (clr_start) n_clr++;
      if (act_start) n_act++;
      if (upd_start) n_upd++;
      if (ext_cap != 0) ext_seq.push_back(int'(ext_cap));
      if (slot_pre.vld) begin
        n_slot[slot_pre.rnd]++;
        if (slot_pre.src == slot_pre.dst || seen[slot_pre.rnd][slot_pre.src][slot_pre.dst]) in_order = 0;
        seen[slot_pre.rnd][slot_pre.src][slot_pre.dst] = 1;
      end
      if (slot_cur.vld) begin
        n_cur++;
        if (slot_cur != pre_q) in_order = 0;
      end
      pre_q = slot_pre;
      if (done) break;
    end
    wait fork;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(PH_CLR, 5);
    check("CLR issues one clear", n_clr == 1);
    run(PH_INPUT, 0);
    check("input forwarded to 8 neurons", n_fwd == 8 && fwd_seen.and() == 1 && in_order);
    check("input phase lasts 9 cycles after the value arrives", cycles == 10);
    run(PH_EXCH, 0);
    check("two ext capture cycles", ext_seq.size() == 2 && ext_seq[0] == 1 && ext_seq[1] == 2);
    check("56 slots per round, each pair once", n_slot[0] == 56 && n_slot[1] == 56 && in_order);
    check("slot_cur follows slot_pre", n_cur == 112);
    check("exchange: 2 ext + 112 slots + 1 tail, then done", cycles == 116);
    run(PH_ACT, 14);
    check("ACT: one act_start, 8 sigmoid services", n_act == 1 && n_sig == 8 && sig_seen.and() == 1);
    run(PH_ERR, 0);
    check("ERR: 8 forwards", n_err == 8 && err_seen.and() == 1);
    run(PH_UPD, 15);
    check("UPD: one upd_start", n_upd == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
