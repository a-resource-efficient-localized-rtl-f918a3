// dp_ram -- simple dual-port RAM, one write port and one read port, with a
// registered (one-cycle) read, as a small block RAM behaves.
//
// Each hidden neuron keeps its weights, sensitivities and the values received
// from its neighbours in several of these 20-bit-wide RAMs. The reference
// design sizes each at 10 addresses, one per neighbour; the depth is a
// parameter because the weight and sensitivity RAMs also hold the entries of
// the external inputs and the bias. A read and a write of the same address in
// one cycle returns the old data. Contents are not reset.
//
// Timing: rd_data is valid the cycle after rd_addr is presented.
module dp_ram #(
  parameter int unsigned WIDTH = 20,
  parameter int unsigned DEPTH = 10,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (wr_addr < AW'(DEPTH))) mem[wr_addr] <= wr_data;
    rd_data <= (rd_addr < AW'(DEPTH)) ? mem[rd_addr] : '0;
  end

endmodule
