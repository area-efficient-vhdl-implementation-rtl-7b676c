// tb_grant_or: self-checking test of the per-master OR of the priority block outputs.
// Applies random sparse vectors to all N block outputs and compares each grant bit with an
// OR computed bit by bit in the testbench.
module tb_grant_or;
  localparam int unsigned N = 16;
  logic [N-1:0] outs [N];
  logic [N-1:0] grant;
  int checks = 0, failures = 0;

  grant_or #(.N(N)) dut (.outs, .grant);

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] exp;
      exp = '0;
      foreach (outs[j]) begin
        outs[j] = '0;
        // mostly one active block, sometimes more, sometimes none
        if ($urandom_range(0, 15) < 2 || j == t % N)
          outs[j] = N'($urandom) & N'($urandom);
      end
      for (int k = 0; k < N; k++)
        for (int j = 0; j < N; j++)
          if (outs[j][k]) exp[k] = 1'b1;
      #1;
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL t=%0d grant=%h expected %h", t, grant, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
