// tb_cluster_bus -- self-checking test of the intra-cluster TDM bus: for
// random slot codes and sender words, the word seen by all neurons must be the
// one of the neuron named in the code, and zero in an idle slot.
module tb_cluster_bus;
  import trtrl_pkg::*;

  slot_code_t code, rx_code;
  bus_word_t  tx [N_PER];
  bus_word_t  rx;
  int checks = 0, failures = 0;
  logic clk = 0;

  cluster_bus dut (.code, .tx, .rx, .rx_code);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      automatic int s = $urandom_range(0, N_PER - 1);
      automatic int d = (s + $urandom_range(1, N_PER - 1)) % N_PER;
      for (int n = 0; n < N_PER; n++)
        tx[n] = '{a: fx_t'($urandom), b: fx_t'($urandom), c: fx_t'($urandom)};
      code = '{vld: ($urandom_range(0, 7) != 0), src: 3'(s), dst: 3'(d), rnd: 1'($urandom)};
      #1;
      checks++;
      if (rx !== (code.vld ? tx[s] : bus_word_t'('0)) || rx_code !== code) begin
        failures++;
        if (failures < 10) $display("FAIL slot src=%0d vld=%0b", s, code.vld);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
