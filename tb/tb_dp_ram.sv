// tb_dp_ram -- self-checking test of the dual-port RAM: random writes and
// reads against a shadow array, one-cycle read latency, and read-during-write
// of the same address returning the old contents.
module tb_dp_ram;
  localparam int WIDTH = 20, DEPTH = 10, AW = 4;

  logic             clk = 0;
  logic             we;
  logic [AW-1:0]    wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q;
  logic             expect_v;
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wr_addr = 0; rd_addr = 0; wr_data = 0; expect_v = 0; expect_q = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); wr_data = WIDTH'($urandom); shadow[a] = wr_data;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL read got %h expected %h", rd_data, expect_q);
        end
      end
      rd_addr  = AW'($urandom_range(0, DEPTH - 1));
      we       = $urandom_range(0, 1) == 1;
      wr_addr  = ($urandom_range(0, 3) == 0) ? rd_addr : AW'($urandom_range(0, DEPTH - 1));
      wr_data  = WIDTH'($urandom);
      expect_q = shadow[rd_addr];           // old data on a collision
      expect_v = 1;
      if (we) shadow[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
