// tb_ahb_arbiter: end-to-end test of the 16-master round-robin AHB arbiter at its default size.
//
// Sixteen master models raise requests after random idle times, each for a random burst
// (SINGLE, INCR4/8/16, WRAP4/8/16 or an undefined-length INCR of 1..20 beats), and drop the
// request after their last beat. A slave model inserts wait states and now and then answers a
// beat with ERROR (the master gives up), RETRY (the master restarts) or SPLIT (the master is
// parked until the slave raises its HSPLIT bit some clocks later). HBURST is the granted
// master's burst type.
//
// The run opens with three simultaneous requests (masters 0, 1, 2, SINGLE transfers) that must
// be granted in order 0, 1, 2, the first one clock after the request. After that, every clock
// checks: at most one grant; a grant only to a master that requests and is not split; hmaster
// equal to the granted master; the controller active while a grant is out; data_done exactly
// when a reference model of the transfers says a transfer ends (last beat of a fixed burst,
// owner release of an INCR burst, non-OKAY response); and that no waiting master sees more
// than N transfers end before it is granted (round-robin bound). Each mechanism (each burst
// length, INCR end, wait state, ERROR, RETRY, SPLIT, HSPLIT release, priority shift, controller
// return to reset) is counted and must occur at least once.
module tb_ahb_arbiter;
  import ahb_arb_pkg::*;
  localparam int unsigned N = NMASTER;
  localparam int CYCLES = 30000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] hbusreq = '0, hsplit = '0;
  hburst_e hburst = BURST_SINGLE;
  logic hready = 1'b1;
  hresp_e hresp = RESP_OKAY;
  logic [N-1:0] hgrant;
  logic [3:0] hmaster;
  logic op_active, xfer_start, data_done;
  logic [4:0] beat_count;

  ahb_arbiter dut (.clk, .rst_n, .hbusreq, .hburst, .hready, .hresp, .hsplit, .hgrant,
                   .hmaster, .op_active, .xfer_start, .data_done, .beat_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // master models
  bit      req [N];
  hburst_e btype [N];
  int      blen [N];        // beats of the current burst
  int      left [N];        // beats still to go
  int      idle [N];        // clocks until the next request
  bit      split [N];       // parked by the slave
  int      split_timer [N];
  int      waited_xfers [N];
  int      max_waited = 0;

  // reference model of the transfer in progress
  int cur_owner = -1, cur_beats = 0, cur_len = 0;

  // mechanism counters
  int n_len1 = 0, n_len4 = 0, n_len8 = 0, n_len16 = 0, n_incr_end = 0, n_wait = 0;
  int n_error = 0, n_retry = 0, n_split = 0, n_unsplit = 0, n_shift = 0, n_ctrl_off = 0;
  bit op_prev = 1'b0;

  function automatic int beats_of(hburst_e b);
    case (b)
      BURST_SINGLE:             return 1;
      BURST_INCR:               return 0;
      BURST_INCR4, BURST_WRAP4: return 4;
      BURST_INCR8, BURST_WRAP8: return 8;
      default:                  return 16;
    endcase
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  task automatic new_burst(int m);
    btype[m] = hburst_e'($urandom_range(0, 7));
    blen[m]  = beats_of(btype[m]);
    left[m]  = (blen[m] == 0) ? $urandom_range(1, 20) : blen[m];
  endtask

  function automatic int granted();
    for (int k = 0; k < N; k++) if (hgrant[k]) return k;
    return -1;
  endfunction

  initial begin
    int order [$];
    int t_req;
    int g;
    bit beat, exp_done;
    hresp_e r;

    for (int m = 0; m < N; m++) begin
      req[m] = 0; split[m] = 0; split_timer[m] = 0; waited_xfers[m] = 0;
      idle[m] = 40 + $urandom_range(0, 60);
      new_burst(m);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // three simultaneous SINGLE requests: granted 0, 1, 2 in turn
    for (int m = 0; m < 3; m++) begin
      req[m] = 1; btype[m] = BURST_SINGLE; blen[m] = 1; left[m] = 1;
    end
    t_req = 0;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      // drive inputs
      for (int m = 0; m < N; m++) hbusreq[m] = req[m];
      hsplit = '0;
      for (int m = 0; m < N; m++)
        if (split[m] && split_timer[m] == 0) hsplit[m] = 1'b1;
      #1;
      g = granted();
      hburst = (g >= 0) ? btype[g] : BURST_SINGLE;
      hready = (cyc < 40) ? 1'b1 : ($urandom_range(0, 3) != 0);
      hresp = RESP_OKAY;
      if (g >= 0 && hready && cyc >= 40) begin
        automatic int p = $urandom_range(0, 199);
        if (p < 3)      hresp = RESP_ERROR;
        else if (p < 6) hresp = RESP_RETRY;
        else if (p < 11) hresp = RESP_SPLIT;
      end
      #1;

      // checks on the settled outputs
      checks++;
      if (!$onehot0(hgrant)) fail($sformatf("several grants %h", hgrant));
      if (g >= 0) begin
        checks++;
        if (!req[g] || split[g]) fail($sformatf("grant to master %0d req=%0b split=%0b", g, req[g], split[g]));
        checks++;
        if (hmaster != 4'(g)) fail($sformatf("hmaster %0d, grant %0d", hmaster, g));
        checks++;
        if (!op_active) fail("grant while controller idle");
      end
      beat = (g >= 0) && hready;
      exp_done = 0;
      if (cur_owner >= 0 && !(req[cur_owner] && !split[cur_owner])) exp_done = 1;
      else if (beat) begin
        automatic int len = (cur_owner >= 0) ? cur_len : beats_of(btype[g]);
        if (hresp != RESP_OKAY) exp_done = 1;
        else if (len != 0 && cur_beats + 1 == len) exp_done = 1;
      end
      checks++;
      if (data_done !== exp_done) fail($sformatf("data_done=%0b expected %0b (owner %0d beats %0d)",
                                                 data_done, exp_done, cur_owner, cur_beats));

      // the opening three-request scenario
      if (cyc < 12 && g >= 0 && (order.size() == 0 || order[$] != g)) order.push_back(g);
      if (cyc == 1) begin
        checks++;
        if (g != 0) fail("first of three simultaneous requests not granted one clock after request");
      end
      if (cyc == 12) begin
        checks++;
        if (order.size() != 3 || order[0] != 0 || order[1] != 1 || order[2] != 2)
          fail($sformatf("three simultaneous requests granted in order %p", order));
      end

      // mechanism counts
      if (g >= 0 && !hready) n_wait++;
      if (data_done) n_shift++;
      if (op_prev && !op_active) n_ctrl_off++;
      op_prev = op_active;

      // fairness: masters left waiting count finished transfers
      if (data_done)
        for (int m = 0; m < N; m++)
          if (req[m] && !split[m] && m != g && m != cur_owner) begin
            waited_xfers[m]++;
            if (waited_xfers[m] > max_waited) max_waited = waited_xfers[m];
          end

      r = hresp;
      @(posedge clk);
      #1;

      // reference transfer model
      if (exp_done) begin
        if (cur_owner >= 0 && !req[cur_owner] && cur_len == 0) n_incr_end++;
        cur_owner = -1; cur_beats = 0;
      end else if (beat) begin
        if (cur_owner < 0) begin cur_owner = g; cur_len = beats_of(btype[g]); end
        cur_beats++;
      end

      // split release
      for (int m = 0; m < N; m++) begin
        if (hsplit[m]) begin split[m] = 0; n_unsplit++; waited_xfers[m] = 0; end
        else if (split[m]) split_timer[m]--;
      end

      // master models
      if (g >= 0) waited_xfers[g] = 0;
      if (beat) begin
        case (r)
          RESP_ERROR: begin n_error++; req[g] = 0; idle[g] = $urandom_range(1, 30); end
          RESP_RETRY: begin n_retry++; left[g] = (blen[g] == 0) ? left[g] : blen[g]; end
          RESP_SPLIT: begin
            n_split++; split[g] = 1; split_timer[g] = $urandom_range(2, 40);
            left[g] = (blen[g] == 0) ? left[g] : blen[g];
          end
          default: begin
            left[g]--;
            if (left[g] == 0) begin
              case (blen[g])
                1: n_len1++;
                4: n_len4++;
                8: n_len8++;
                16: n_len16++;
                default: ;
              endcase
              req[g] = 0;
              idle[g] = (cyc < 40) ? 200 : $urandom_range(1, 60);
            end
          end
        endcase
      end
      for (int m = 0; m < N; m++)
        if (!req[m] && !(beat && m == g)) begin
          if (idle[m] > 0) idle[m]--;
          if (idle[m] == 0) begin req[m] = 1; waited_xfers[m] = 0; new_burst(m); end
        end
    end

    checks++;
    if (max_waited > N) fail($sformatf("a master waited %0d transfers", max_waited));
    $display("mechanisms: single=%0d len4=%0d len8=%0d len16=%0d incr_end=%0d wait=%0d error=%0d retry=%0d split=%0d unsplit=%0d shift=%0d ctrl_off=%0d max_wait_xfers=%0d",
             n_len1, n_len4, n_len8, n_len16, n_incr_end, n_wait, n_error, n_retry, n_split,
             n_unsplit, n_shift, n_ctrl_off, max_waited);
    checks += 12;
    if (n_len1 == 0)     fail("no SINGLE transfer");
    if (n_len4 == 0)     fail("no 4-beat burst");
    if (n_len8 == 0)     fail("no 8-beat burst");
    if (n_len16 == 0)    fail("no 16-beat burst");
    if (n_incr_end == 0) fail("no undefined-length burst ended by release");
    if (n_wait == 0)     fail("no wait state");
    if (n_error == 0)    fail("no ERROR response");
    if (n_retry == 0)    fail("no RETRY response");
    if (n_split == 0)    fail("no SPLIT response");
    if (n_unsplit == 0)  fail("no HSPLIT release");
    if (n_shift == 0)    fail("no priority shift");
    if (n_ctrl_off == 0) fail("controller never returned to reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
