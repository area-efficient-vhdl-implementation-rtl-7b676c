// tb_controller: self-checking test of the two-state start controller.
// Checks that op_start is low after reset, rises one clock after any request appears,
// stays high while requests or a grant remain, and falls one clock after both are gone.
// A random phase compares op_start with a reference state machine kept in the testbench.
module tb_controller;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] bus_req = '0;
  logic grant_valid = 1'b0;
  logic op_start;
  int checks = 0, failures = 0;
  logic ref_state = 1'b0;

  controller #(.N(N)) dut (.clk, .rst_n, .bus_req, .grant_valid, .op_start);

  always #5 clk = ~clk;

  task automatic expect_op(logic exp, string what);
    checks++;
    if (op_start !== exp) begin
      failures++;
      $display("FAIL %s: op_start=%b expected %b", what, op_start, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1; #1 expect_op(1'b0, "idle after reset");
    bus_req = 16'h0400;
    #1 expect_op(1'b0, "not yet started");
    @(posedge clk); #1; #1 expect_op(1'b1, "started");
    bus_req = '0; grant_valid = 1'b1;
    @(posedge clk); #1; #1 expect_op(1'b1, "held by grant");
    grant_valid = 1'b0;
    @(posedge clk); #1; #1 expect_op(1'b0, "back to rst");
    @(posedge clk); #1; #1 expect_op(1'b0, "stays in rst");
    // random phase against a reference model
    for (int t = 0; t < 500; t++) begin
      bus_req = ($urandom_range(0, 3) == 0) ? N'(1) << $urandom_range(0, N - 1) : '0;
      grant_valid = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (!ref_state) ref_state = |bus_req;
      else            ref_state = (|bus_req) || grant_valid;
      #1 expect_op(ref_state, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk); #1;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
