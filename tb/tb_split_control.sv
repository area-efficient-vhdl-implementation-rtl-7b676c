// tb_split_control: self-checking test of split masking.
// Directed: a SPLIT response with HREADY high masks the owner; a SPLIT in a wait state
// (HREADY low) does not; the master stays masked until its HSPLIT bit is raised. A random
// phase compares masked_req and split_mask with a reference mask kept in the testbench.
module tb_split_control;
  import ahb_arb_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hready = 1'b1;
  hresp_e hresp = RESP_OKAY;
  logic [3:0] owner = '0;
  logic owner_valid = 1'b0;
  logic [N-1:0] hsplit = '0, bus_req = '0;
  logic [N-1:0] masked_req, split_mask;
  logic [N-1:0] ref_mask = '0;
  int checks = 0, failures = 0;

  split_control #(.N(N)) dut (.clk, .rst_n, .hready, .hresp, .owner, .owner_valid, .hsplit,
                              .bus_req, .masked_req, .split_mask);

  always #5 clk = ~clk;

  task automatic chk(string what);
    checks++;
    if (split_mask !== ref_mask || masked_req !== (bus_req & ~ref_mask)) begin
      failures++;
      $display("FAIL %s @%0t: mask=%h masked=%h expected mask %h", what, $time,
               split_mask, masked_req, ref_mask);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    bus_req = 16'hffff;
    @(posedge clk); #1; #1 chk("after reset");
    // SPLIT in wait state does not mask
    owner = 4'd3; owner_valid = 1'b1; hresp = RESP_SPLIT; hready = 1'b0;
    @(posedge clk); #1; #1 chk("split first cycle");
    hready = 1'b1;
    @(posedge clk); #1; ref_mask[3] = 1'b1; #1 chk("split masks master 3");
    hresp = RESP_OKAY; owner_valid = 1'b0;
    repeat (5) begin @(posedge clk); #1; #1 chk("stays masked"); end
    hsplit[3] = 1'b1;
    @(posedge clk); #1; ref_mask[3] = 1'b0; #1 chk("hsplit unmasks");
    hsplit = '0;
    for (int t = 0; t < 2000; t++) begin
      bus_req = N'($urandom);
      owner = 4'($urandom_range(0, N - 1));
      owner_valid = $urandom_range(0, 1);
      hready = ($urandom_range(0, 3) != 0);
      hresp = hresp_e'($urandom_range(0, 3));
      hsplit = ($urandom_range(0, 3) == 0) ? N'(1) << $urandom_range(0, N - 1) : '0;
      @(posedge clk); #1;
      ref_mask = ref_mask & ~hsplit;
      if (owner_valid && hready && hresp == RESP_SPLIT) ref_mask[owner] = 1'b1;
      #1 chk("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk); #1;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
