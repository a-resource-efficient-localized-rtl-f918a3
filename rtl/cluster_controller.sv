// cluster_controller -- sequencer of one cluster.
//
// The main controller starts a phase; the cluster controller runs it and
// answers with a one-cycle `done`:
//   PH_CLR   : neurons clear their sensitivities and neighbour buffers.
//   PH_INPUT : the N_IN input values arrive one per cycle from the input layer
//              (stored by the cluster), then each is forwarded to the neurons one
//              neuron per cycle: N_IN * (N_PER + 1) cycles, 9 for one input and
//              8 neurons.
//   PH_EXCH  : one capture cycle per inter-cluster port, then two rounds of the
//              intra-cluster bus, each giving every ordered pair (src, dst),
//              src != dst, one slot: 2 * N_PER * (N_PER - 1) = 112 slots.
//              Slot codes are issued on slot_pre one cycle before they are live
//              on slot_cur (senders read their RAM in between).
//   PH_ACT   : neurons accumulate their net input, then the cluster's sigmoid
//              serves them one per cycle (sig_sel, sig_we).
//   PH_ERR   : the output error and derivative are forwarded one neuron per cycle.
//   PH_UPD   : neurons update sensitivities and weights.
// The phases, the slot-code arbitration and the one-value-per-neuron-per-cycle
// forwarding follow the reference design's protocol; the second bus round and
// the exact cycle schedule are this design's choice.
module cluster_controller
  import trtrl_pkg::*;
#(
  parameter int unsigned N_IN = N_IN_DEFAULT,
  localparam int unsigned IW  = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             phase_start,
  input  phase_e           phase,
  output logic             done,
  input  logic             x_vld,      // an input value arrives this cycle
  input  logic             neu_done,   // all neurons finished their command
  output logic             clr_start,
  output logic             act_start,
  output logic             upd_start,
  output logic             fwd_we,     // forward input fwd_idx to neuron fwd_node
  output logic [IW-1:0]    fwd_idx,
  output logic [2:0]       fwd_node,
  output slot_code_t       slot_pre,
  output slot_code_t       slot_cur,
  output logic [N_EXT-1:0] ext_cap,
  output logic             sig_we,
  output logic [2:0]       sig_sel,
  output logic             err_we,
  output logic [2:0]       err_node
);

  typedef enum logic [3:0] {
    C_IDLE, C_WAIT, C_SIG, C_IN_RX, C_IN_FWD, C_EXT, C_BUS, C_BUS_TAIL, C_ERR
  } state_e;

  state_e     st;
  phase_e     ph;
  logic [7:0] cnt;      // generic cycle counter
  logic [2:0] node;
  logic [IW-1:0] idx;
  logic       rnd;
  logic [2:0] src;
  logic [2:0] didx;     // 0 .. N_PER-2, receiver skipping the sender

  logic [2:0] dst;
  assign dst = (didx >= src) ? didx + 3'd1 : didx;

  always_comb begin
    slot_pre = '0;
    if (st == C_BUS) slot_pre = '{vld: 1'b1, src: src, dst: dst, rnd: rnd};
    fwd_we   = (st == C_IN_FWD);
    fwd_idx  = idx;
    fwd_node = node;
    sig_we   = (st == C_SIG);
    sig_sel  = node;
    err_we   = (st == C_ERR);
    err_node = node;
    ext_cap  = '0;
    if (st == C_EXT) ext_cap[cnt[$clog2(N_EXT)-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      ph        <= PH_CLR;
      cnt       <= '0;
      node      <= '0;
      idx       <= '0;
      rnd       <= 1'b0;
      src       <= '0;
      didx      <= '0;
      done      <= 1'b0;
      clr_start <= 1'b0;
      act_start <= 1'b0;
      upd_start <= 1'b0;
      slot_cur  <= '0;
    end else begin
      done      <= 1'b0;
      clr_start <= 1'b0;
      act_start <= 1'b0;
      upd_start <= 1'b0;
      slot_cur  <= slot_pre;
      case (st)
        C_IDLE: begin
          cnt  <= '0;
          node <= '0;
          idx  <= '0;
          rnd  <= 1'b0;
          src  <= '0;
          didx <= '0;
          if (phase_start) begin
            ph <= phase;
            case (phase)
              PH_CLR:   begin clr_start <= 1'b1; st <= C_WAIT; end
              PH_ACT:   begin act_start <= 1'b1; st <= C_WAIT; end
              PH_UPD:   begin upd_start <= 1'b1; st <= C_WAIT; end
              PH_INPUT: st <= C_IN_RX;
              PH_EXCH:  st <= C_EXT;
              PH_ERR:   st <= C_ERR;
              default:  done <= 1'b1;
            endcase
          end
        end
        C_WAIT: begin
          if (neu_done) begin
            if (ph == PH_ACT) st <= C_SIG;
            else begin
              st   <= C_IDLE;
              done <= 1'b1;
            end
          end
        end
        C_SIG, C_ERR: begin
          node <= node + 3'd1;
          if (node == 3'(N_PER - 1)) begin
            st   <= C_IDLE;
            done <= 1'b1;
          end
        end
        C_IN_RX: begin
          if (x_vld) begin
            cnt <= cnt + 8'd1;
            if (cnt == 8'(N_IN - 1)) st <= C_IN_FWD;
          end
        end
        C_IN_FWD: begin
          node <= node + 3'd1;
          if (node == 3'(N_PER - 1)) begin
            idx <= idx + 1'b1;
            if (idx == IW'(N_IN - 1)) begin
              st   <= C_IDLE;
              done <= 1'b1;
            end
          end
        end
        C_EXT: begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'(N_EXT - 1)) st <= C_BUS;
        end
        C_BUS: begin
          didx <= didx + 3'd1;
          if (didx == 3'(N_PER - 2)) begin
            didx <= '0;
            src  <= src + 3'd1;
            if (src == 3'(N_PER - 1)) begin
              src <= '0;
              rnd <= 1'b1;
              if (rnd) st <= C_BUS_TAIL;
            end
          end
        end
        C_BUS_TAIL: begin
          st   <= C_IDLE;
          done <= 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // Bus rule: a live slot never pairs a neuron with itself.
  a_slot_src_ne_dst : assert property (@(posedge clk) disable iff (!rst_n)
    slot_cur.vld |-> slot_cur.src != slot_cur.dst)
    else $error("bus slot with src == dst");

endmodule
