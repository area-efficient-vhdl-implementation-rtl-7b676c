// tb_burst_counter: self-checking test of the transfer counter and its request mux.
// For every burst type it grants a random master, inserts random wait states (HREADY low)
// and checks, clock by clock, that xfer_start marks the first beat, that data_done comes
// exactly on the last beat of a fixed burst (1, 4, 8 or 16 beats) and never before, that an
// undefined-length burst ends in the clock its owner's request drops, that an ERROR or SPLIT
// response ends a burst early, and that nothing is counted while op_start is low.
module tb_burst_counter;
  import ahb_arb_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic op_start = 1'b0, grant_valid = 1'b0, hready = 1'b1;
  logic [3:0] hmaster = '0;
  logic [N-1:0] bus_req = '0;
  hburst_e hburst = BURST_SINGLE;
  hresp_e hresp = RESP_OKAY;
  logic xfer_start, data_done, owner_valid;
  logic [3:0] owner;
  logic [4:0] beat_count;
  int checks = 0, failures = 0;

  burst_counter #(.N(N)) dut (.clk, .rst_n, .op_start, .grant_valid, .hmaster, .bus_req,
                              .hburst, .hready, .hresp, .xfer_start, .data_done, .owner,
                              .owner_valid, .beat_count);

  always #5 clk = ~clk;

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // Fixed burst of len beats; returns after data_done. abort_at > 0 ends it with resp.
  task automatic run_fixed(hburst_e b, int len, int abort_at, hresp_e resp);
    int beats = 0, clocks = 0;
    bit done = 0;
    automatic int m = $urandom_range(0, N - 1);
    hmaster = 4'(m); bus_req = '0; bus_req[m] = 1'b1; grant_valid = 1'b1; hburst = b;
    while (!done) begin
      hready = ($urandom_range(0, 3) != 0);
      hresp = RESP_OKAY;
      if (abort_at > 0 && beats == abort_at && hready) hresp = resp;
      #1;
      chk(xfer_start, hready && beats == 0, "xfer_start");
      if (hresp != RESP_OKAY) begin
        chk(data_done, 1'b1, "end on response");
        done = 1;
      end else begin
        chk(data_done, hready && (beats + 1 == len), "data_done on last beat");
        if (hready && beats + 1 == len) done = 1;
      end
      if (hready) beats++;
      @(posedge clk); #1;
      clocks++;
      if (!done) begin #1 chk(beat_count == 5'(beats), 1'b1, "beat_count"); end
      if (clocks > 200) break;
    end
    grant_valid = 1'b0; hresp = RESP_OKAY; hready = 1'b1; bus_req = '0;
    #1 chk(data_done, 1'b0, "idle after burst");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    // no counting while the controller has not started
    hmaster = 4'd2; bus_req = 16'h0004; grant_valid = 1'b1; hburst = BURST_SINGLE;
    #1 chk(data_done, 1'b0, "no op_start");
    chk(xfer_start, 1'b0, "no op_start start");
    @(posedge clk); #1;
    op_start = 1'b1;
    grant_valid = 1'b0; bus_req = '0;
    @(posedge clk); #1;
    for (int rep = 0; rep < 6; rep++) begin
      run_fixed(BURST_SINGLE, 1, 0, RESP_OKAY);
      run_fixed(BURST_INCR4, 4, 0, RESP_OKAY);
      run_fixed(BURST_WRAP4, 4, 0, RESP_OKAY);
      run_fixed(BURST_INCR8, 8, 0, RESP_OKAY);
      run_fixed(BURST_WRAP8, 8, 0, RESP_OKAY);
      run_fixed(BURST_INCR16, 16, 0, RESP_OKAY);
      run_fixed(BURST_WRAP16, 16, 0, RESP_OKAY);
      run_fixed(BURST_INCR8, 8, 3, RESP_ERROR);
      run_fixed(BURST_INCR16, 16, 5, RESP_SPLIT);
    end
    // undefined-length burst: lasts while the owner requests; the mux must watch the owner
    for (int rep = 0; rep < 10; rep++) begin
      automatic int m = $urandom_range(0, N - 1);
      automatic int len = $urandom_range(2, 30);
      hmaster = 4'(m); bus_req = '0; bus_req[m] = 1'b1; grant_valid = 1'b1; hburst = BURST_INCR;
      for (int i = 0; i < len; i++) begin
        hready = ($urandom_range(0, 3) != 0);
        // other masters' requests toggle and must not matter
        for (int k = 0; k < N; k++) if (k != m) bus_req[k] = $urandom_range(0, 1);
        #1 chk(data_done, 1'b0, "INCR continues while requested");
        @(posedge clk); #1;
      end
      // the owner releases: grant is withdrawn and hmaster changes, done must still come
      bus_req[m] = 1'b0; grant_valid = 1'b0; hmaster = 4'((m + 1) % N); hready = 1'b1;
      #1 chk(data_done, 1'b1, "INCR ends on owner release");
      @(posedge clk); #1;
      bus_req = '0;
      #1 chk(data_done, 1'b0, "INCR idle");
      @(posedge clk); #1;
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
