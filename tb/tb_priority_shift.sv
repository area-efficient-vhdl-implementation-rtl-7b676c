// tb_priority_shift: self-checking test of the rotating one-hot enable register.
// Drives random data_done pulses for several hundred clocks and checks after every edge
// that enable equals a reference index (advanced by one, modulo N, on each data_done)
// decoded to one-hot. Also checks the reset value.
module tb_priority_shift;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0, data_done = 1'b0;
  logic [N-1:0] enable;
  int checks = 0, failures = 0;
  int unsigned ref_idx = 0;

  priority_shift #(.N(N)) dut (.clk, .rst_n, .data_done, .enable);

  always #5 clk = ~clk;

  task automatic check(logic [N-1:0] exp, string what);
    checks++;
    if (enable !== exp) begin
      failures++;
      $display("FAIL %s: enable=%h expected %h", what, enable, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    #1 check(N'(1), "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      data_done = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (data_done) ref_idx = (ref_idx + 1) % N;
      #1 check(N'(1) << ref_idx, "rotate");
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
