// cluster_bus -- the 60-bit intra-cluster bus, shared by the neurons of one
// cluster under time-division multiplexing.
//
// In every cycle the cluster controller's slot code names one sending neuron
// (src), one receiving neuron (dst) and the round. The bus carries the word of
// the sender to every neuron; only the neuron whose index matches dst stores it.
// Electrically the shared bus is realised as a multiplexer selected by src; an
// idle slot (vld = 0) drives zeros. The bus width of three 20-bit values and the
// slot-code arbitration follow the reference design; the multiplexer form and
// the idle value are this design's choice.
//
// Combinational: rx and rx_code follow tx and code in the same cycle. The rule
// that a slot never pairs a neuron with itself is asserted in the cluster
// controller, which owns the clock and reset.
module cluster_bus
  import trtrl_pkg::*;
#(
  parameter int unsigned N_NODES = N_PER
) (
  input  slot_code_t code,
  input  bus_word_t  tx [N_NODES],
  output bus_word_t  rx,
  output slot_code_t rx_code
);

  always_comb begin
    rx = '0;
    for (int n = 0; n < N_NODES; n++) begin
      if (code.vld && code.src == 3'(n)) rx = tx[n];
    end
  end

  assign rx_code = code;

endmodule
