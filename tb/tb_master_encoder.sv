// tb_master_encoder: self-checking test of the grant-to-master-number encoder.
// Applies every one-hot grant and the all-zero vector and checks hmaster and grant_valid.
module tb_master_encoder;
  localparam int unsigned N = 16;
  logic [N-1:0] grant;
  logic [3:0]   hmaster;
  logic         grant_valid;
  int checks = 0, failures = 0;

  master_encoder #(.N(N)) dut (.grant, .hmaster, .grant_valid);

  initial begin
    grant = '0;
    #1;
    checks++;
    if (grant_valid !== 1'b0 || hmaster !== 4'd0) begin
      failures++;
      $display("FAIL idle: hmaster=%0d valid=%b", hmaster, grant_valid);
    end
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < N; k++) begin
        grant = '0;
        grant[k] = 1'b1;
        #1;
        checks++;
        if (grant_valid !== 1'b1 || hmaster !== 4'(k)) begin
          failures++;
          $display("FAIL grant[%0d]: hmaster=%0d valid=%b", k, hmaster, grant_valid);
        end
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
