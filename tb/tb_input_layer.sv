// tb_input_layer -- self-checking test of the input layer: valid/ready
// handshake, `pending`, and the broadcast of each input value (with the target
// on the output-node line) in order, one per cycle, right after bcast_start.
module tb_input_layer;
  import trtrl_pkg::*;
  localparam int NI = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, pending, bcast_start = 0, x_vld;
  fx_t in_x [NI]; fx_t in_d = '0;
  logic [1:0] x_idx; fx_t x_data; word40_t xo_word;

  input_layer #(.N_IN(NI)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int xs [NI], d;
    for (int m = 0; m < NI; m++) in_x[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("ready after reset", in_ready && !pending);
    for (int t = 0; t < 50; t++) begin
      for (int m = 0; m < NI; m++) begin xs[m] = int'($urandom_range(0, 8191)) - 4096; in_x[m] = fx_t'(xs[m]); end
      d = int'($urandom_range(0, 4096)); in_d = fx_t'(d);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      for (int m = 0; m < NI; m++) in_x[m] = '0;    // the layer must hold its own copy
      check("pending after accept", pending && !in_ready);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check("no output before start", !x_vld);
      bcast_start = 1;
      @(negedge clk);
      bcast_start = 0;
      for (int m = 0; m < NI; m++) begin
        @(negedge clk);
        check("broadcast value", x_vld && x_idx == 2'(m) && int'(x_data) == xs[m] &&
                                 int'(xo_word.a) == xs[m] && int'(xo_word.b) == d);
      end
      check("ready again after broadcast", in_ready);
      @(negedge clk);
      check("broadcast ends", !x_vld);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
