// main_controller -- network controller between the clusters, the input layer
// and the output node.
//
// It sequences one time step of online learning through the phases of the
// communication protocol, all clusters working in lock step:
//   CLR (once after reset) -> wait for a sample -> INPUT (broadcast) ->
//   EXCH (neighbour exchange) -> ACT (hidden activations; meanwhile the MUX
//   streams the (z_i, w_oi) pair of every hidden neuron, cluster by cluster,
//   into the output node) -> output node evaluates y_o, f'_o, e_o -> ERR
//   (the buffered (e_o, f'_o) word is broadcast to every cluster) -> UPD
//   (weight and sensitivity update everywhere) -> step_done.
// A phase ends when every cluster has reported done (flags are collected, so
// the clusters need not finish in the same cycle).
//
// The MUX from the clusters' 40-bit lines to the output node and the data
// buffer follow the reference design; the phase encoding and the handshake
// (phase_start pulse, per-cluster done) are this design's choice.
module main_controller
  import trtrl_pkg::*;
#(
  parameter int unsigned N_CL = N_ROWS * N_COLS,
  localparam int unsigned CLW = (N_CL > 1) ? $clog2(N_CL) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            ready,        // initialised and waiting for a sample
  input  logic            in_pending,
  output logic            bcast_start,
  output logic            phase_start,
  output phase_e          phase,
  input  logic [N_CL-1:0] cl_done,
  // MUX from the clusters to the output node
  output logic [2:0]      zw_rd_node,
  input  word40_t         zw_words [N_CL],
  output logic            zw_vld,
  output word40_t         zw_word,
  // output node control
  output logic            out_start,
  output logic            out_fin,
  output logic            out_upd,
  input  logic            out_res_vld,
  input  word40_t         out_err_word,
  // buffered broadcast to the clusters
  output word40_t         err_word,
  output logic            step_done
);

  typedef enum logic [3:0] {
    S_CLR, S_CLR_W, S_IDLE, S_INPUT_W, S_EXCH, S_EXCH_W, S_ACT, S_ACT_W,
    S_FIN, S_FIN_W, S_ERR, S_ERR_W, S_UPD, S_UPD_W
  } state_e;

  state_e          st;
  logic [N_CL-1:0] got;      // done flags collected in this phase
  logic [CLW-1:0]  sel;      // MUX select: cluster
  logic [2:0]      node;     // MUX select: neuron in the cluster
  logic            streaming;

  logic all_done;
  assign all_done = &(got | cl_done);

  assign ready      = (st == S_IDLE);
  assign zw_rd_node = node;
  assign zw_vld     = streaming;
  assign zw_word    = zw_words[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_CLR;
      got         <= '0;
      sel         <= '0;
      node        <= '0;
      streaming   <= 1'b0;
      bcast_start <= 1'b0;
      phase_start <= 1'b0;
      phase       <= PH_CLR;
      out_start   <= 1'b0;
      out_fin     <= 1'b0;
      out_upd     <= 1'b0;
      err_word    <= '0;
      step_done   <= 1'b0;
    end else begin
      bcast_start <= 1'b0;
      phase_start <= 1'b0;
      out_start   <= 1'b0;
      out_fin     <= 1'b0;
      out_upd     <= 1'b0;
      step_done   <= 1'b0;
      got         <= got | cl_done;

      // hidden-layer stream into the output node
      if (streaming) begin
        node <= node + 3'd1;
        if (node == 3'(N_PER - 1)) begin
          node <= '0;
          sel  <= sel + 1'b1;
          if (sel == CLW'(N_CL - 1)) streaming <= 1'b0;
        end
      end

      case (st)
        S_CLR: begin
          phase_start <= 1'b1; phase <= PH_CLR; got <= '0; st <= S_CLR_W;
        end
        S_CLR_W: if (all_done) st <= S_IDLE;
        S_IDLE: begin
          if (in_pending) begin
            bcast_start <= 1'b1;
            phase_start <= 1'b1; phase <= PH_INPUT; got <= '0;
            st <= S_INPUT_W;
          end
        end
        S_INPUT_W: if (all_done) st <= S_EXCH;
        S_EXCH: begin
          phase_start <= 1'b1; phase <= PH_EXCH; got <= '0; st <= S_EXCH_W;
        end
        S_EXCH_W: if (all_done) st <= S_ACT;
        S_ACT: begin
          phase_start <= 1'b1; phase <= PH_ACT; got <= '0;
          out_start   <= 1'b1;
          streaming   <= 1'b1;
          sel         <= '0;
          node        <= '0;
          st          <= S_ACT_W;
        end
        S_ACT_W: if (all_done && !streaming) st <= S_FIN;
        S_FIN: begin
          out_fin <= 1'b1; st <= S_FIN_W;
        end
        S_FIN_W: if (out_res_vld) begin
          err_word <= out_err_word; st <= S_ERR;
        end
        S_ERR: begin
          phase_start <= 1'b1; phase <= PH_ERR; got <= '0; st <= S_ERR_W;
        end
        S_ERR_W: if (all_done) st <= S_UPD;
        S_UPD: begin
          phase_start <= 1'b1; phase <= PH_UPD; got <= '0; out_upd <= 1'b1; st <= S_UPD_W;
        end
        S_UPD_W: if (all_done) begin
          step_done <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
