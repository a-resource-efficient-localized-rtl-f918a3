// trtrl_pkg -- shared types, sizes and fixed-point arithmetic for the clustered
// TRTRL (truncated real-time recurrent learning) network.
//
// Every datum in the network (weights, activations, sensitivities, errors) is a
// 20-bit two's-complement fixed-point number, as in the reference design. The
// position of the binary point is not fixed by that design; this package uses 12
// fraction bits (range about +/-128, step 2^-12), enough to hold the smallest
// sigmoid segment value 2^-9 exactly. Products are truncated towards minus
// infinity and every result saturates at the 20-bit limits instead of wrapping.
//
// The default geometry is the reference configuration: 12 clusters laid out as a
// 3 x 4 grid, 8 hidden neurons per cluster, up to 2 inter-cluster links per
// neuron and therefore 10 neighbour slots per neuron (itself, 7 cluster mates,
// 2 external). One external input per time step and one output node are this
// implementation's defaults.
package trtrl_pkg;

  localparam int unsigned W      = 20;   // data word width
  localparam int unsigned FRAC   = 12;   // fraction bits of every data word
  localparam int unsigned N_PER  = 8;    // neurons per cluster
  localparam int unsigned N_ROWS = 3;    // cluster grid rows
  localparam int unsigned N_COLS = 4;    // cluster grid columns
  localparam int unsigned N_EXT  = 2;    // inter-cluster ports per neuron
  localparam int unsigned N_NBR  = 1 + (N_PER - 1) + N_EXT; // 10 neighbour slots
  localparam int unsigned N_IN_DEFAULT = 1;
  localparam int unsigned ALPHA_SHIFT_DEFAULT = 4; // learning rate 2^-4

  typedef logic signed [W-1:0] fx_t;

  localparam fx_t FX_ONE = fx_t'(1 << FRAC);
  localparam fx_t FX_MAX = fx_t'((1 << (W - 1)) - 1);
  localparam fx_t FX_MIN = fx_t'(-(1 << (W - 1)));

  // Intra-cluster bus word: three 20-bit fields, 60 bits.
  typedef struct packed {
    fx_t a;
    fx_t b;
    fx_t c;
  } bus_word_t;

  // 40-bit word of the controller-side links: (z_i, w_oi), (e_o, f'_o), (x, d).
  typedef struct packed {
    fx_t a;
    fx_t b;
  } word40_t;

  // Word on a dedicated inter-cluster link.
  typedef struct packed {
    fx_t z;     // activation z_i(t)
    fx_t wo;    // weight to the output node w_oi
    fx_t p_in;  // ingress sensitivity of the sender to the link weight into it
    fx_t p_eg;  // egress sensitivity of the sender to the link weight out of it
  } ext_word_t;

  // Time-division slot code of the intra-cluster bus.
  typedef struct packed {
    logic       vld;
    logic [2:0] src;
    logic [2:0] dst;
    logic       rnd;  // 0: {z, w_o, p_ingress}   1: {p_egress, 0, 0}
  } slot_code_t;

  typedef enum logic [2:0] {
    PH_CLR   = 3'd0,
    PH_INPUT = 3'd1,
    PH_EXCH  = 3'd2,
    PH_ACT   = 3'd3,
    PH_ERR   = 3'd4,
    PH_UPD   = 3'd5
  } phase_e;

  function automatic fx_t fx_sat(input longint v);
    if (v > longint'(FX_MAX)) return FX_MAX;
    if (v < longint'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    return fx_sat(longint'(a) + longint'(b));
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    return fx_sat(longint'(a) - longint'(b));
  endfunction

  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return fx_sat(p >>> FRAC);
  endfunction

  // Learning-rate step: v * 2^-sh rounded to nearest (ties upward). A plain
  // arithmetic shift would round every step toward minus infinity and make all
  // weights creep upward by half an LSB per update whatever the gradient.
  function automatic fx_t fx_step(input fx_t v, input int unsigned sh);
    longint r;
    if (sh == 0) return v;
    r = (longint'(v) + (longint'(1) <<< (sh - 1))) >>> sh;
    return fx_sat(r);
  endfunction

  // Neighbour slot in which neuron `self` keeps data about cluster mate `mate`.
  function automatic int unsigned mate_slot(input int unsigned self, input int unsigned mate);
    return (mate < self) ? mate + 1 : mate;
  endfunction

endpackage
