// burst_counter: the counter and 16:1 request mux that mark the start and end of a transfer.
//
// A beat is a clock in which the controller has started operation (op_start), some master
// holds a grant and the slave signals HREADY. On the first beat of a transfer the counter
// records the granted master (owner) and the burst length decoded from HBURST, and pulses
// xfer_start. It then counts beats. The transfer ends, with a one-clock data_done pulse, when
//   - a fixed-length burst (SINGLE, INCR4/8/16, WRAP4/8/16) has had all its beats,
//   - the owner's request, picked out of all requests by a 16:1 mux, goes low; this is how an
//     undefined-length (INCR) burst ends, and it also ends a burst the master abandons,
//   - the slave completes an ERROR, RETRY or SPLIT response (HREADY high with that HRESP).
// data_done drives the priority shift, which moves the round-robin head on by one.
//
// Interface: all inputs sampled on the rising clock edge; data_done and xfer_start are
// combinational in the clock of the ending / first beat. owner / owner_valid name the master
// whose transfer is in progress (used by the split logic). rst_n is active low, synchronous.
//
// The mux selecting the owner's request, the counter marking start and end of a transfer by
// burst type and data_done feeding the priority shift follow the description of the design.
// What counts as a beat, the end on a non-OKAY response and the end on a dropped request for
// fixed bursts are this design's choices.
module burst_counter
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N = ahb_arb_pkg::NMASTER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 op_start,
  input  logic                 grant_valid,
  input  logic [$clog2(N)-1:0] hmaster,
  input  logic [N-1:0]         bus_req,
  input  hburst_e              hburst,
  input  logic                 hready,
  input  hresp_e               hresp,
  output logic                 xfer_start,
  output logic                 data_done,
  output logic [$clog2(N)-1:0] owner,
  output logic                 owner_valid,
  output logic [4:0]           beat_count
);

  localparam int unsigned W = $clog2(N);

  logic         in_q;       // a transfer is in progress
  logic [4:0]   len_q;      // its length in beats, 0 = undefined
  logic [4:0]   cnt_q;      // beats done so far
  logic [W-1:0] owner_q;

  logic       beat;
  logic [4:0] len_eff, cnt_next;
  logic       sel_req;
  logic       fixed_done, release_done, resp_done;

  assign beat     = op_start && grant_valid && hready;
  assign len_eff  = in_q ? len_q : burst_beats(hburst);
  assign cnt_next = (in_q ? cnt_q : 5'd0) + 5'(beat);

  // 16:1 mux: the request of the master that owns the transfer.
  assign sel_req = bus_req[owner_q];

  assign fixed_done   = beat && (len_eff != 5'd0) && (cnt_next == len_eff);
  assign release_done = in_q && !sel_req;
  assign resp_done    = (in_q || beat) && hready && (hresp != RESP_OKAY);

  assign data_done   = fixed_done || release_done || resp_done;
  assign xfer_start  = beat && !in_q;
  assign owner       = in_q ? owner_q : hmaster;
  assign owner_valid = in_q || beat;
  assign beat_count  = cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_q    <= 1'b0;
      len_q   <= '0;
      cnt_q   <= '0;
      owner_q <= '0;
    end else if (data_done) begin
      in_q  <= 1'b0;
      cnt_q <= '0;
    end else if (beat) begin
      in_q  <= 1'b1;
      cnt_q <= cnt_next;
      if (!in_q) begin
        len_q   <= burst_beats(hburst);
        owner_q <= hmaster;
      end
    end
  end

  a_done_single_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                        data_done |=> !in_q);

endmodule
