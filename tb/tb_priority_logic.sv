// tb_priority_logic: self-checking test of the round-robin ring FSM.
// Two instances run side by side, one searching from master 0 and one from master 5.
// Directed checks: three simultaneous requests are served in order 0, 1, 2 as each master
// drops its request; the walk from master 1 to a lone request at master 15 takes exactly
// 15 clocks, one state per clock; an error returns the FSM to reset; a disabled block grants
// nothing. A random phase compares both instances with a reference model that tracks the
// master the FSM points at (or reset) in the testbench's own terms.
module tb_priority_logic;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en_a = 1'b0, en_b = 1'b0, error = 1'b0;
  logic [N-1:0] in_req = '0;
  logic [N-1:0] g_a, g_b;
  int checks = 0, failures = 0;

  priority_logic #(.N(N), .BASE(0)) dut_a (.clk, .rst_n, .enable(en_a), .error, .in_req, .out_grant(g_a));
  priority_logic #(.N(N), .BASE(5)) dut_b (.clk, .rst_n, .enable(en_b), .error, .in_req, .out_grant(g_b));

  always #5 clk = ~clk;

  // Reference: cur = -1 is reset, otherwise the master the FSM points at.
  function automatic int ref_next(int cur, int base, logic en, logic err, logic [N-1:0] r);
    if (!en || err) return -1;
    if (cur < 0) begin
      for (int i = 0; i < N; i++) if (r[(base + i) % N]) return (base + i) % N;
      return -1;
    end
    if (r[cur]) return cur;
    if (cur == (base + N - 1) % N) return -1;
    return (cur + 1) % N;
  endfunction

  function automatic logic [N-1:0] ref_out(int cur, logic en, logic [N-1:0] r);
    logic [N-1:0] o = '0;
    if (en && cur >= 0 && r[cur]) o[cur] = 1'b1;
    return o;
  endfunction

  task automatic chk(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    int cur_a, cur_b, cycles;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    en_a = 1'b1;
    // three simultaneous requests: 0, 1, 2 served in order
    in_req = 16'h0007;
    @(posedge clk); #1; #1 chk(g_a, 16'h0001, "first of three");
    repeat (3) begin @(posedge clk); #1; #1 chk(g_a, 16'h0001, "holds while requesting"); end
    in_req = 16'h0006;
    #1 chk(g_a, 16'h0000, "released");
    @(posedge clk); #1; #1 chk(g_a, 16'h0002, "second of three");
    in_req = 16'h0004;
    @(posedge clk); #1; #1 chk(g_a, 16'h0004, "third of three");
    // walk latency: drop everything but a request at master 15
    in_req = 16'h8000;
    cycles = 0;
    while (g_a !== 16'h8000 && cycles < 40) begin @(posedge clk); #1; #1 cycles++; end
    checks++;
    if (cycles != 13) begin
      failures++;
      $display("FAIL walk from master 2 to master 15 took %0d clocks, expected 13", cycles);
    end
    // error returns to reset: grant drops for one clock, then comes back from reset
    error = 1'b1;
    @(posedge clk); #1; #1 error = 1'b0;
    #1 chk(g_a, 16'h0000, "after error");
    @(posedge clk); #1; #1 chk(g_a, 16'h8000, "regrant after error");
    // disabled block grants nothing
    en_a = 1'b0;
    #1 chk(g_a, 16'h0000, "disabled");
    in_req = '0;
    @(posedge clk); #1;
    // random phase against the reference model
    en_a = 1'b1;
    en_b = 1'b1;
    cur_a = -1; cur_b = -1;
    @(posedge clk); #1;
    for (int t = 0; t < 3000; t++) begin
      // each master toggles its request now and then
      for (int k = 0; k < N; k++) if ($urandom_range(0, 9) == 0) in_req[k] = ~in_req[k];
      error = ($urandom_range(0, 99) == 0);
      if ($urandom_range(0, 49) == 0) en_b = ~en_b;
      #1;
      chk(g_a, ref_out(cur_a, en_a, in_req), "random A");
      chk(g_b, ref_out(cur_b, en_b, in_req), "random B");
      @(posedge clk); #1;
      cur_a = ref_next(cur_a, 0, en_a, error, in_req);
      cur_b = ref_next(cur_b, 5, en_b, error, in_req);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk); #1;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
