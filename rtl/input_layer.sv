// input_layer -- entry point of the input patterns.
//
// One sample of the temporal sequence is N_IN input values plus the target d of
// the output node. The input layer accepts a sample with a valid/ready
// handshake and holds it. When the main controller starts the input phase
// (bcast_start), it broadcasts the values one per cycle, x[0] first, on the
// 20-bit line to all clusters (x_vld / x_idx / x_data) and, in the same cycles,
// the pair (x[m], d) on the 40-bit line to the output node. After the last value
// it is free to accept the next sample while the network is still computing.
//
// Timing: values appear in the N_IN cycles after bcast_start. `pending` tells
// the main controller that a sample waits. The broadcast to clusters and output
// node follows the reference design; the handshake, the one-value-per-cycle
// order and the placement of the target on the 40-bit line are this design's
// choices.
module input_layer
  import trtrl_pkg::*;
#(
  parameter int unsigned N_IN = N_IN_DEFAULT,
  localparam int unsigned IW  = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  fx_t           in_x [N_IN],
  input  fx_t           in_d,
  output logic          pending,
  input  logic          bcast_start,
  output logic          x_vld,
  output logic [IW-1:0] x_idx,
  output fx_t           x_data,
  output word40_t       xo_word     // (x[x_idx], d), valid with x_vld
);

  fx_t           xs [N_IN];
  fx_t           ds;
  logic          full, sending;
  logic [IW-1:0] idx;

  assign in_ready = !full;
  assign pending  = full && !sending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= 1'b0;
      sending <= 1'b0;
      idx     <= '0;
      ds      <= '0;
      x_vld   <= 1'b0;
      x_idx   <= '0;
      for (int m = 0; m < N_IN; m++) xs[m] <= '0;
    end else begin
      x_vld <= 1'b0;
      if (in_valid && in_ready) begin
        full <= 1'b1;
        for (int m = 0; m < N_IN; m++) xs[m] <= in_x[m];
        ds <= in_d;
      end
      if (bcast_start && full && !sending) begin
        sending <= 1'b1;
        idx     <= '0;
      end
      if (sending) begin
        x_vld <= 1'b1;
        x_idx <= idx;
        idx   <= idx + 1'b1;
        if (idx == IW'(N_IN - 1)) begin
          sending <= 1'b0;
          full    <= 1'b0;
        end
      end
    end
  end

  assign x_data  = xs[x_idx];
  assign xo_word = '{a: xs[x_idx], b: ds};

endmodule
