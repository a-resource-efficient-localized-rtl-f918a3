// trtrl_cluster -- one cluster of the network: N_PER hidden neurons with their
// cluster controller, intra-cluster bus, shared sigmoid/derivative unit, bias
// source and the cluster's small memory.
//
// The cluster memory holds (1) the input values received from the input layer
// until they have been forwarded to every neuron, (2) the pair (z_i, w_oi) of
// each neuron, captured from the bus when the neuron sends in round 0, which the
// main controller reads through zw_rd_node / zw_rd_word (40 bits) to feed the
// output node, and (3) the error word (e_o, f'_o) from the output node, captured
// when the PH_ERR phase starts and forwarded to the neurons one per cycle.
// A single sigmoid and a single derivative unit serve all neurons of the
// cluster one after the other; the bias input of every neuron is the constant
// 1.0 supplied here.
//
// Inter-cluster links leave and enter as ext_tx / ext_rx, indexed by neuron and
// port (port 0 horizontal, port 1 vertical neighbour cluster); EXT_MASK bit
// (2*neuron + port) marks the ports that are wired.
//
// Follows the reference design: 8 neurons per cluster, controller, memory, bias,
// sigmoid and 60-bit intra-cluster bus inside the cluster, a 20-bit input line
// and 40-bit lines to the main controller. This design's choice: the memory
// organisation and the order of service.
module trtrl_cluster
  import trtrl_pkg::*;
#(
  parameter logic [N_PER*N_EXT-1:0] EXT_MASK = '0,
  parameter int unsigned N_IN        = N_IN_DEFAULT,
  parameter int unsigned ALPHA_SHIFT = ALPHA_SHIFT_DEFAULT,
  localparam int unsigned N_SLOT     = N_NBR + N_IN + 1,
  localparam int unsigned SW         = $clog2(N_SLOT + 1),
  localparam int unsigned IW         = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // phase control from the main controller
  input  logic          phase_start,
  input  phase_e        phase,
  output logic          phase_done,
  // input line (20 bits) from the input layer
  input  logic          x_vld,
  input  logic [IW-1:0] x_idx,
  input  fx_t           x_data,
  // 40-bit line from the main controller: (e_o, f'_o)
  input  word40_t       err_word,
  // 40-bit line to the main controller: (z_i, w_oi) of neuron zw_rd_node
  input  logic [2:0]    zw_rd_node,
  output word40_t       zw_rd_word,
  // weight load
  input  logic          cfg_we,
  input  logic [2:0]    cfg_node,
  input  logic [SW-1:0] cfg_addr,
  input  fx_t           cfg_data,
  // inter-cluster links
  output ext_word_t     ext_tx [N_PER][N_EXT],
  input  ext_word_t     ext_rx [N_PER][N_EXT]
);

  // ------------------------------------------------------------ controller
  logic          clr_start, act_start, upd_start;
  logic          fwd_we, sig_we, err_we;
  logic [IW-1:0] fwd_idx;
  logic [2:0]    fwd_node, sig_sel, err_node;
  slot_code_t    slot_pre, slot_cur;
  logic [N_EXT-1:0] ext_cap;
  logic [N_PER-1:0] neu_done;

  cluster_controller #(.N_IN(N_IN)) u_ctrl (
    .clk, .rst_n, .phase_start, .phase, .done(phase_done),
    .x_vld, .neu_done(&neu_done),
    .clr_start, .act_start, .upd_start,
    .fwd_we, .fwd_idx, .fwd_node,
    .slot_pre, .slot_cur, .ext_cap,
    .sig_we, .sig_sel, .err_we, .err_node
  );

  // ------------------------------------------------------------ cluster memory
  fx_t     x_buf  [N_IN];
  word40_t zw_buf [N_PER];
  word40_t err_buf;

  bus_word_t  bus_tx [N_PER];
  bus_word_t  bus_rx;
  slot_code_t bus_code;

  cluster_bus #(.N_NODES(N_PER)) u_bus (.code(slot_cur), .tx(bus_tx), .rx(bus_rx), .rx_code(bus_code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_IN; m++) x_buf[m] <= '0;
      for (int n = 0; n < N_PER; n++) zw_buf[n] <= '0;
      err_buf <= '0;
    end else begin
      if (x_vld) x_buf[x_idx] <= x_data;
      if (bus_code.vld && !bus_code.rnd) zw_buf[bus_code.src] <= '{a: bus_rx.a, b: bus_rx.b};
      if (phase_start && phase == PH_ERR) err_buf <= err_word;
    end
  end

  assign zw_rd_word = zw_buf[zw_rd_node];

  // ------------------------------------------------------------ shared sigmoid
  fx_t s_vec [N_PER];
  fx_t sig_y, sig_dy;

  pwl_sigmoid       u_sig  (.x(s_vec[sig_sel]), .y(sig_y));
  pwl_sigmoid_deriv u_dsig (.x(s_vec[sig_sel]), .dy(sig_dy));

  // ------------------------------------------------------------ neurons
  for (genvar n = 0; n < N_PER; n++) begin : g_neu
    fx_t z_o, wo_o;
    trtrl_neuron #(
      .NODE(n), .EXT_MASK(EXT_MASK[2*n +: 2]), .N_IN(N_IN), .ALPHA_SHIFT(ALPHA_SHIFT)
    ) u_neu (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_node == 3'(n)), .cfg_addr, .cfg_data,
      .clr_start, .act_start, .upd_start, .done(neu_done[n]),
      .in_we(fwd_we && fwd_node == 3'(n)), .in_idx(fwd_idx), .in_data(x_buf[fwd_idx]),
      .bias_in(FX_ONE),
      .slot_pre, .slot_cur(bus_code), .bus_tx(bus_tx[n]), .bus_rx,
      .ext_cap, .ext_tx(ext_tx[n]), .ext_rx(ext_rx[n]),
      .s_out(s_vec[n]),
      .sig_we(sig_we && sig_sel == 3'(n)), .sig_y, .sig_dy,
      .err_we(err_we && err_node == 3'(n)), .err_e(err_buf.a), .err_dfo(err_buf.b),
      .z_out(z_o), .wo_out(wo_o)
    );
  end

endmodule
