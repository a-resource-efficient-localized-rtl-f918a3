// output_node -- output neuron of the network.
//
// Its net input is s_o = sum_i w_oi z_i + sum_m w_om x_m + w_ob. The hidden-layer
// terms arrive from the main controller as a stream of (z_i, w_oi) pairs, one per
// cycle (zw_vld), because the weights w_oi live in the hidden neurons; the
// input and bias weights are kept here. On `fin` the node computes, in one
// cycle, y_o = f(s_o), f'(s_o) with its own piecewise-linear sigmoid and
// derivative units, and the error e_o = y_o - d_o; `res_vld` marks them.
// err_word = (e_o, f'_o) is what the main controller broadcasts to the
// clusters. On `upd` it updates its own weights by gradient descent,
// w_om <- w_om - 2^-ALPHA_SHIFT e_o f'_o x_m (bias input 1), in one cycle.
//
// Follows the reference design: sigmoid activation and derivative, error
// y - d, hidden-to-output weights stored in the hidden neurons, own weight
// update after the hidden layer has been served. This design's choices: the
// streaming accumulation, the single-cycle evaluation and the absence of a
// self-recurrent output weight.
module output_node
  import trtrl_pkg::*;
#(
  parameter int unsigned N_IN        = N_IN_DEFAULT,
  parameter int unsigned ALPHA_SHIFT = ALPHA_SHIFT_DEFAULT,
  localparam int unsigned IW         = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned CW         = $clog2(N_IN + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  // weight load: addr < N_IN -> w_om, addr == N_IN -> bias weight
  input  logic          cfg_we,
  input  logic [CW-1:0] cfg_addr,
  input  fx_t           cfg_data,
  // input line: (x[m], d)
  input  logic          x_vld,
  input  logic [IW-1:0] x_idx,
  input  word40_t       x_word,
  // hidden-layer stream
  input  logic          start,
  input  logic          zw_vld,
  input  word40_t       zw_word,
  input  logic          fin,
  input  logic          upd,
  output logic          res_vld,
  output fx_t           y,
  output fx_t           dy,
  output fx_t           e,
  output word40_t       err_word
);

  fx_t xs [N_IN];
  fx_t wx [N_IN];
  fx_t wb, d, acc;

  fx_t s_full, y_c, dy_c;
  always_comb begin
    s_full = fx_add(acc, wb);
    for (int m = 0; m < N_IN; m++) s_full = fx_add(s_full, fx_mul(wx[m], xs[m]));
  end

  pwl_sigmoid       u_sig  (.x(s_full), .y(y_c));
  pwl_sigmoid_deriv u_dsig (.x(s_full), .dy(dy_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_IN; m++) begin
        xs[m] <= '0;
        wx[m] <= '0;
      end
      wb      <= '0;
      d       <= '0;
      acc     <= '0;
      y       <= '0;
      dy      <= '0;
      e       <= '0;
      res_vld <= 1'b0;
    end else begin
      res_vld <= 1'b0;
      if (cfg_we) begin
        if (cfg_addr < CW'(N_IN)) wx[IW'(cfg_addr)] <= cfg_data;
        else if (cfg_addr == CW'(N_IN)) wb <= cfg_data;
      end
      if (x_vld) begin
        xs[x_idx] <= x_word.a;
        d         <= x_word.b;
      end
      if (zw_vld) acc <= fx_add(start ? '0 : acc, fx_mul(zw_word.b, zw_word.a));
      else if (start) acc <= '0;
      if (fin) begin
        y       <= y_c;
        dy      <= dy_c;
        e       <= fx_sub(y_c, d);
        res_vld <= 1'b1;
      end
      if (upd) begin
        for (int m = 0; m < N_IN; m++)
          wx[m] <= fx_sub(wx[m], fx_step(fx_mul(e, fx_mul(dy, xs[m])), ALPHA_SHIFT));
        wb <= fx_sub(wb, fx_step(fx_mul(e, dy), ALPHA_SHIFT));
      end
    end
  end

  assign err_word = '{a: e, b: dy};

endmodule
