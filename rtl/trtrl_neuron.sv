// trtrl_neuron -- hidden-layer processing element of the clustered TRTRL network.
//
// A neuron i is sensitive only to the weights on its own links (truncated RTRL):
//   ingress  p_in[j] = p^i_ij : dy_i/dw_ij,  w_ij being the link j -> i
//   egress   p_eg[j] = p^i_ji : dy_i/dw_ji,  w_ji being the link i -> j
// and it also keeps the output node's sensitivity p^o_ij to each of its ingress
// weights, which is all the weight update needs. Per time step it
//   - activation (ACT):  s_i = sum_j w_ij z_j over its neighbours, the external
//     inputs and the bias; the cluster's shared sigmoid returns f(s_i), f'(s_i);
//   - update (UPD), per slot j, from the values of time t:
//       p_in[j]  <- f'_i [ w_ij p^j_ij + z_j ]          (p^j_ij: j's egress value)
//       p_eg[j]  <- f'_i [ w_ij p^j_ji ]                (p^j_ji: j's ingress value)
//       p^o_ij   =  f'_o [ w_oi p_in[j] + w_oj p^j_ij ]
//       w_ij     <- w_ij - 2^-ALPHA_SHIFT * e_o * p^o_ij   (step rounded to nearest)
//     the self slot uses p_in[0] <- f'_i [ w_ii p_in[0] + y_i ] for both sets,
//     inputs and bias use p_in[j] <- f'_i z_j; finally
//       w_oi <- w_oi - 2^-ALPHA_SHIFT * e_o * f'_o z_i  and  z_i <- y_i(t+1).
//
// Storage (slot index = neighbour): 0 = itself, 1..7 = cluster mates (mate m is
// at slot m+1 if m < i, else m), 8..9 = inter-cluster ports, then the external
// inputs, then the bias. Each array is a dp_ram with a one-cycle read; ACT and
// UPD walk the slots one per cycle (N_SLOT + 1 cycles each, then a done pulse;
// UPD takes one more cycle for w_oi). Neighbour data arrive through the
// intra-cluster bus (slot codes slot_pre one cycle ahead of slot_cur, so a
// sender can read its RAM in time) and through the dedicated external links.
//
// Follows the reference design: the equations, the localized sensitivity sets,
// the bus contents {z, w_o, p_ingress}, the 10-entry neighbour storage, the power
// of two learning rate and the update order of its protocol table. This design's
// own choices: the egress value p^j_ij a neighbour also needs is sent in a second
// bus round; the gradient step subtracts because the error is y - d; neurons do
// not receive a weight from the output node, so p^o_oi = f'_o z_i; weights are
// loaded through cfg_* and sensitivities and neighbour data cleared by CLR.
module trtrl_neuron
  import trtrl_pkg::*;
#(
  parameter int unsigned NODE        = 0,
  parameter logic [1:0]  EXT_MASK    = 2'b00,
  parameter int unsigned N_IN        = N_IN_DEFAULT,
  parameter int unsigned ALPHA_SHIFT = ALPHA_SHIFT_DEFAULT,
  localparam int unsigned N_SLOT     = N_NBR + N_IN + 1,
  localparam int unsigned BIAS_SLOT  = N_NBR + N_IN,
  localparam int unsigned SW         = $clog2(N_SLOT + 1),
  localparam int unsigned IW         = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // weight load: addr < N_SLOT -> w_ij of that slot, addr == N_SLOT -> w_oi
  input  logic            cfg_we,
  input  logic [SW-1:0]   cfg_addr,
  input  fx_t             cfg_data,
  // commands from the cluster controller
  input  logic            clr_start,
  input  logic            act_start,
  input  logic            upd_start,
  output logic            done,
  // external input forwarded by the cluster
  input  logic            in_we,
  input  logic [IW-1:0]   in_idx,
  input  fx_t             in_data,
  input  fx_t             bias_in,
  // intra-cluster bus
  input  slot_code_t      slot_pre,
  input  slot_code_t      slot_cur,
  output bus_word_t       bus_tx,
  input  bus_word_t       bus_rx,
  // dedicated inter-cluster links
  input  logic [N_EXT-1:0] ext_cap,
  output ext_word_t       ext_tx [N_EXT],
  input  ext_word_t       ext_rx [N_EXT],
  // activation through the cluster's shared sigmoid
  output fx_t             s_out,
  input  logic            sig_we,
  input  fx_t             sig_y,
  input  fx_t             sig_dy,
  // error and output-node derivative forwarded by the cluster
  input  logic            err_we,
  input  fx_t             err_e,
  input  fx_t             err_dfo,
  // observation
  output fx_t             z_out,
  output fx_t             wo_out
);

  typedef enum logic [2:0] {M_IDLE, M_CLR, M_ACT, M_UPD, M_UPD_WO} mode_e;
  mode_e mode;

  logic [SW-1:0] cnt;          // slot being read
  logic          p1_vld;       // read data of slot p1_idx available
  logic [SW-1:0] p1_idx;

  fx_t z, wo, y_next, dy_i, e_o, dfo, acc;
  fx_t pin_ext [N_EXT];
  fx_t peg_ext [N_EXT];

  // ---------------------------------------------------------------- RAMs
  logic [SW-1:0] rd_addr;
  fx_t w_rd, pin_rd, peg_rd, znb_rd, wonb_rd, pinb_rd, penb_rd;

  logic w_we, pin_we, peg_we, znb_we, wonb_we, pinb_we, penb_we;
  logic [SW-1:0] w_wa, pin_wa, nb_wa, znb_wa;
  fx_t w_wd, pin_wd, peg_wd, znb_wd, wonb_wd, pinb_wd, penb_wd;

  dp_ram #(.WIDTH(W), .DEPTH(N_SLOT)) u_w    (.clk, .we(w_we),    .wr_addr(w_wa),   .wr_data(w_wd),    .rd_addr(rd_addr), .rd_data(w_rd));
  dp_ram #(.WIDTH(W), .DEPTH(N_SLOT)) u_pin  (.clk, .we(pin_we),  .wr_addr(pin_wa), .wr_data(pin_wd),  .rd_addr(rd_addr), .rd_data(pin_rd));
  dp_ram #(.WIDTH(W), .DEPTH(N_NBR))  u_peg  (.clk, .we(peg_we),  .wr_addr(pin_wa[$clog2(N_NBR)-1:0]), .wr_data(peg_wd), .rd_addr(rd_addr[$clog2(N_NBR)-1:0]), .rd_data(peg_rd));
  dp_ram #(.WIDTH(W), .DEPTH(N_SLOT)) u_znb  (.clk, .we(znb_we),  .wr_addr(znb_wa), .wr_data(znb_wd),  .rd_addr(rd_addr), .rd_data(znb_rd));
  dp_ram #(.WIDTH(W), .DEPTH(N_NBR))  u_wonb (.clk, .we(wonb_we), .wr_addr(nb_wa[$clog2(N_NBR)-1:0]), .wr_data(wonb_wd), .rd_addr(rd_addr[$clog2(N_NBR)-1:0]), .rd_data(wonb_rd));
  dp_ram #(.WIDTH(W), .DEPTH(N_NBR))  u_pinb (.clk, .we(pinb_we), .wr_addr(nb_wa[$clog2(N_NBR)-1:0]), .wr_data(pinb_wd), .rd_addr(rd_addr[$clog2(N_NBR)-1:0]), .rd_data(pinb_rd));
  dp_ram #(.WIDTH(W), .DEPTH(N_NBR))  u_penb (.clk, .we(penb_we), .wr_addr(nb_wa[$clog2(N_NBR)-1:0]), .wr_data(penb_wd), .rd_addr(rd_addr[$clog2(N_NBR)-1:0]), .rd_data(penb_rd));

  // Is slot k a real link of this neuron?
  function automatic logic slot_conn(input logic [SW-1:0] k);
    if (k >= SW'(N_PER) && k < SW'(N_NBR)) return EXT_MASK[1'(k - SW'(N_PER))];
    return 1'b1;
  endfunction

  // ---------------------------------------------------------------- update datapath
  fx_t zk, pin_new, peg_new, po, w_new;
  always_comb begin
    zk = znb_rd;
    if (p1_idx == '0) zk = z;
    else if (p1_idx == SW'(BIAS_SLOT)) zk = bias_in;

    if (p1_idx == '0) begin
      pin_new = fx_mul(dy_i, fx_add(fx_mul(w_rd, pin_rd), z));
      peg_new = pin_new;
      po      = fx_mul(dfo, fx_mul(wo, pin_rd));
    end else if (p1_idx < SW'(N_NBR)) begin
      pin_new = fx_mul(dy_i, fx_add(fx_mul(w_rd, penb_rd), zk));
      peg_new = fx_mul(dy_i, fx_mul(w_rd, pinb_rd));
      po      = fx_mul(dfo, fx_add(fx_mul(wo, pin_rd), fx_mul(wonb_rd, penb_rd)));
    end else begin
      pin_new = fx_mul(dy_i, zk);
      peg_new = '0;
      po      = fx_mul(dfo, fx_mul(wo, pin_rd));
    end
    w_new = fx_sub(w_rd, fx_step(fx_mul(e_o, po), ALPHA_SHIFT));
  end

  // ---------------------------------------------------------------- read address
  logic is_src;
  assign is_src = slot_pre.vld && (slot_pre.src == 3'(NODE));
  always_comb begin
    rd_addr = cnt;
    if (mode == M_IDLE && is_src) rd_addr = SW'(mate_slot(NODE, int'(slot_pre.dst)));
  end

  // ---------------------------------------------------------------- bus transmit
  always_comb begin
    if (slot_cur.rnd) bus_tx = '{a: peg_rd, b: '0, c: '0};
    else              bus_tx = '{a: z,      b: wo, c: pin_rd};
  end

  for (genvar q = 0; q < N_EXT; q++) begin : g_ext
    assign ext_tx[q] = '{z: z, wo: wo, p_in: pin_ext[q], p_eg: peg_ext[q]};
  end

  // ---------------------------------------------------------------- RAM write ports
  logic is_dst;
  logic [SW-1:0] rx_slot;
  logic          ext_any;
  logic [SW-1:0] ext_slot;
  ext_word_t     ext_w;
  assign is_dst  = slot_cur.vld && (slot_cur.dst == 3'(NODE));
  assign rx_slot = SW'(mate_slot(NODE, int'(slot_cur.src)));

  always_comb begin
    ext_any  = 1'b0;
    ext_slot = '0;
    ext_w    = '0;
    for (int q = 0; q < N_EXT; q++) begin
      if (ext_cap[q] && EXT_MASK[q]) begin
        ext_any  = 1'b1;
        ext_slot = SW'(N_PER + q);
        ext_w    = ext_rx[q];
      end
    end
  end

  logic upd_wr;
  assign upd_wr = (mode == M_UPD) && p1_vld && slot_conn(p1_idx);

  always_comb begin
    // weights
    w_we = 1'b0; w_wa = cfg_addr; w_wd = cfg_data;
    if (cfg_we && cfg_addr < SW'(N_SLOT)) w_we = 1'b1;
    if (upd_wr) begin w_we = 1'b1; w_wa = p1_idx; w_wd = w_new; end
    // own sensitivities
    pin_we = 1'b0; peg_we = 1'b0; pin_wa = p1_idx; pin_wd = pin_new; peg_wd = peg_new;
    if (upd_wr) begin pin_we = 1'b1; peg_we = (p1_idx < SW'(N_NBR)); end
    if (mode == M_CLR) begin
      pin_we = 1'b1; peg_we = (cnt < SW'(N_NBR)); pin_wa = cnt; pin_wd = '0; peg_wd = '0;
    end
    // neighbour data
    znb_we = 1'b0; wonb_we = 1'b0; pinb_we = 1'b0; penb_we = 1'b0;
    znb_wa = rx_slot; nb_wa = rx_slot;
    znb_wd = bus_rx.a; wonb_wd = bus_rx.b; pinb_wd = bus_rx.c; penb_wd = bus_rx.a;
    if (mode == M_CLR) begin
      znb_we = 1'b1; wonb_we = (cnt < SW'(N_NBR)); pinb_we = wonb_we; penb_we = wonb_we;
      znb_wa = cnt; nb_wa = cnt;
      znb_wd = '0; wonb_wd = '0; pinb_wd = '0; penb_wd = '0;
    end else if (in_we) begin
      znb_we = 1'b1; znb_wa = SW'(N_NBR) + SW'(in_idx); znb_wd = in_data;
    end else if (ext_any) begin
      znb_we = 1'b1; wonb_we = 1'b1; pinb_we = 1'b1; penb_we = 1'b1;
      znb_wa = ext_slot; nb_wa = ext_slot;
      znb_wd = ext_w.z; wonb_wd = ext_w.wo; pinb_wd = ext_w.p_in; penb_wd = ext_w.p_eg;
    end else if (is_dst) begin
      if (!slot_cur.rnd) begin
        znb_we = 1'b1; wonb_we = 1'b1; pinb_we = 1'b1;
      end else begin
        penb_we = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- sequencer
  localparam logic [SW-1:0] LAST = SW'(N_SLOT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode   <= M_IDLE;
      cnt    <= '0;
      p1_vld <= 1'b0;
      p1_idx <= '0;
      done   <= 1'b0;
      z      <= '0;
      wo     <= '0;
      y_next <= '0;
      dy_i   <= '0;
      e_o    <= '0;
      dfo    <= '0;
      acc    <= '0;
      for (int q = 0; q < N_EXT; q++) begin
        pin_ext[q] <= '0;
        peg_ext[q] <= '0;
      end
    end else begin
      done   <= 1'b0;
      p1_vld <= 1'b0;
      p1_idx <= cnt;

      if (cfg_we && cfg_addr == SW'(N_SLOT)) wo <= cfg_data;
      if (sig_we) begin y_next <= sig_y; dy_i <= sig_dy; end
      if (err_we) begin e_o <= err_e; dfo <= err_dfo; end

      // shadow copies of the external-port sensitivities for the link words
      for (int q = 0; q < N_EXT; q++) begin
        if (pin_we && pin_wa == SW'(N_PER + q)) pin_ext[q] <= pin_wd;
        if (peg_we && pin_wa == SW'(N_PER + q)) peg_ext[q] <= peg_wd;
      end

      case (mode)
        M_IDLE: begin
          cnt <= '0;
          if (clr_start) begin
            mode <= M_CLR;
            z    <= '0;
          end else if (act_start) begin
            mode <= M_ACT;
            acc  <= '0;
          end else if (upd_start) begin
            mode <= M_UPD;
          end
        end
        M_CLR: begin
          cnt <= cnt + 1'b1;
          if (cnt == LAST) begin
            mode <= M_IDLE;
            done <= 1'b1;
          end
        end
        M_ACT, M_UPD: begin
          if (cnt != SW'(N_SLOT)) begin
            cnt    <= cnt + 1'b1;
            p1_vld <= 1'b1;
          end
          if (mode == M_ACT && p1_vld && slot_conn(p1_idx)) acc <= fx_add(acc, fx_mul(w_rd, zk));
          if (p1_vld && p1_idx == LAST) begin
            if (mode == M_ACT) begin
              mode <= M_IDLE;
              done <= 1'b1;
            end else begin
              mode <= M_UPD_WO;
            end
          end
        end
        M_UPD_WO: begin
          wo   <= fx_sub(wo, fx_step(fx_mul(e_o, fx_mul(dfo, z)), ALPHA_SHIFT));
          z    <= y_next;
          mode <= M_IDLE;
          done <= 1'b1;
        end
        default: mode <= M_IDLE;
      endcase
    end
  end

  assign s_out  = acc;
  assign z_out  = z;
  assign wo_out = wo;

endmodule
