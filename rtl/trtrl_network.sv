// trtrl_network -- clustered TRTRL recurrent neural network with on-chip online
// learning (top level).
//
// N_ROWS x N_COLS clusters of N_PER hidden neurons (3 x 4 x 8 = 96 by default)
// form the recurrent hidden layer. Inside a cluster every neuron is linked to
// every other one and to itself; between clusters, the corner neurons are
// linked to the facing corner neuron of the horizontally and of the vertically
// adjacent cluster, so a neuron has at most 2 inter-cluster links:
//   node numbering in a cluster   0 1 2      (corners 0, 2, 5, 7)
//                                 3   4
//                                 5 6 7
//   horizontal (port 0): 2 <-> 0 and 7 <-> 5 of the cluster to the right
//   vertical   (port 1): 5 <-> 0 and 7 <-> 2 of the cluster below
// All hidden neurons receive the external inputs and a bias and feed a single
// output node. Every sample presented on in_* runs one time step of the network
// and one step of truncated real-time recurrent learning (see main_controller
// for the phases); out_valid then presents the output y_o(t+1) and its error
// e_o = y_o - d.
//
// Weights must be loaded after reset through cfg_*: cfg_cluster < N_CL selects a
// hidden neuron (cfg_node; cfg_addr = neighbour slot, or N_SLOT for its weight to
// the output node), cfg_cluster == N_CL selects the output node (cfg_addr = input
// index, or N_IN for its bias weight). Sensitivities and activations start at
// zero; `ready` rises once they have been cleared.
//
// The cluster count, cluster size, 20-bit data, bus widths, clustering and the
// protocol follow the reference design. The exact corner-to-corner link pattern,
// the single output node, the configuration port and the handshakes are this
// design's choices.
module trtrl_network
  import trtrl_pkg::*;
#(
  parameter int unsigned ROWS        = N_ROWS,
  parameter int unsigned COLS        = N_COLS,
  parameter int unsigned N_IN        = N_IN_DEFAULT,
  parameter int unsigned ALPHA_SHIFT = ALPHA_SHIFT_DEFAULT,
  localparam int unsigned N_CL       = ROWS * COLS,
  localparam int unsigned N_SLOT     = N_NBR + N_IN + 1,
  localparam int unsigned SW         = $clog2(N_SLOT + 1),
  localparam int unsigned CLW        = $clog2(N_CL + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           ready,
  // samples
  input  logic           in_valid,
  output logic           in_ready,
  input  fx_t            in_x [N_IN],
  input  fx_t            in_d,
  // results
  output logic           out_valid,
  output fx_t            out_y,
  output fx_t            out_err,
  // weight load
  input  logic           cfg_we,
  input  logic [CLW-1:0] cfg_cluster,
  input  logic [2:0]     cfg_node,
  input  logic [SW-1:0]  cfg_addr,
  input  fx_t            cfg_data
);

  // Partner of (cluster, node, port): cluster * N_PER + node, or -1 if none.
  function automatic int partner(input int cl, input int n, input int q);
    int r, c, pr, pc, pn;
    r = cl / COLS; c = cl % COLS;
    pr = r; pc = c; pn = -1;
    case (n)
      0: if (q == 0) begin pc = c - 1; pn = 2; end else begin pr = r - 1; pn = 5; end
      2: if (q == 0) begin pc = c + 1; pn = 0; end else begin pr = r - 1; pn = 7; end
      5: if (q == 0) begin pc = c - 1; pn = 7; end else begin pr = r + 1; pn = 0; end
      7: if (q == 0) begin pc = c + 1; pn = 5; end else begin pr = r + 1; pn = 2; end
      default: pn = -1;
    endcase
    if (pn < 0 || pr < 0 || pc < 0 || pr >= int'(ROWS) || pc >= int'(COLS)) return -1;
    return (pr * int'(COLS) + pc) * int'(N_PER) + pn;
  endfunction

  function automatic logic [N_PER*N_EXT-1:0] ext_mask(input int cl);
    logic [N_PER*N_EXT-1:0] m;
    m = '0;
    for (int n = 0; n < int'(N_PER); n++)
      for (int q = 0; q < int'(N_EXT); q++)
        m[n*N_EXT+q] = (partner(cl, n, q) >= 0);
    return m;
  endfunction

  localparam int unsigned IW  = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned OCW = $clog2(N_IN + 2);

  // ------------------------------------------------------------ input layer
  logic          pending, bcast_start, x_vld;
  logic [IW-1:0] x_idx;
  fx_t           x_data;
  word40_t       xo_word;

  input_layer #(.N_IN(N_IN)) u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_x, .in_d,
    .pending, .bcast_start, .x_vld, .x_idx, .x_data, .xo_word
  );

  // ------------------------------------------------------------ main controller
  logic            phase_start;
  phase_e          phase;
  logic [N_CL-1:0] cl_done;
  logic [2:0]      zw_rd_node;
  word40_t         zw_words [N_CL];
  logic            zw_vld;
  word40_t         zw_word;
  logic            out_start, out_fin, out_upd, out_res_vld;
  word40_t         out_err_word, err_word;
  logic            step_done;

  main_controller #(.N_CL(N_CL)) u_main (
    .clk, .rst_n, .ready, .in_pending(pending), .bcast_start,
    .phase_start, .phase, .cl_done,
    .zw_rd_node, .zw_words, .zw_vld, .zw_word,
    .out_start, .out_fin, .out_upd, .out_res_vld, .out_err_word,
    .err_word, .step_done
  );

  // ------------------------------------------------------------ output node
  fx_t y_o, e_o;

  output_node #(.N_IN(N_IN), .ALPHA_SHIFT(ALPHA_SHIFT)) u_out (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_cluster == CLW'(N_CL)),
    .cfg_addr(OCW'(cfg_addr)), .cfg_data,
    .x_vld, .x_idx, .x_word(xo_word),
    .start(out_start), .zw_vld, .zw_word, .fin(out_fin), .upd(out_upd),
    .res_vld(out_res_vld), .y(y_o), .dy(), .e(e_o), .err_word(out_err_word)
  );

  // ------------------------------------------------------------ clusters
  ext_word_t ext_tx [N_CL][N_PER][N_EXT];
  ext_word_t ext_rx [N_CL][N_PER][N_EXT];

  for (genvar cl = 0; cl < N_CL; cl++) begin : g_cl
    for (genvar n = 0; n < N_PER; n++) begin : g_n
      for (genvar q = 0; q < N_EXT; q++) begin : g_q
        localparam int P = partner(cl, n, q);
        if (P >= 0) begin : g_link
          assign ext_rx[cl][n][q] = ext_tx[P / N_PER][P % N_PER][q];
        end else begin : g_open
          assign ext_rx[cl][n][q] = '0;
        end
      end
    end

    trtrl_cluster #(
      .EXT_MASK(ext_mask(cl)), .N_IN(N_IN), .ALPHA_SHIFT(ALPHA_SHIFT)
    ) u_cl (
      .clk, .rst_n,
      .phase_start, .phase, .phase_done(cl_done[cl]),
      .x_vld, .x_idx, .x_data,
      .err_word,
      .zw_rd_node, .zw_rd_word(zw_words[cl]),
      .cfg_we(cfg_we && cfg_cluster == CLW'(cl)), .cfg_node, .cfg_addr, .cfg_data,
      .ext_tx(ext_tx[cl]), .ext_rx(ext_rx[cl])
    );
  end

  // ------------------------------------------------------------ results
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_y     <= '0;
      out_err   <= '0;
    end else begin
      out_valid <= step_done;
      if (step_done) begin
        out_y   <= y_o;
        out_err <= e_o;
      end
    end
  end

endmodule
