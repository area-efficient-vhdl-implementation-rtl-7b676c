// ahb_arbiter: round-robin AHB bus arbiter for 16 masters and one split-capable slave.
//
// Each of the N priority logic blocks is a ring FSM that searches the masters in round-robin
// order starting at its own master and grants the one it finds. A one-hot priority shift
// register enables exactly one block; it rotates whenever the burst counter reports that a
// transfer ended (data_done), so the head of the round-robin order moves on. The blocks'
// outputs are ORed per master into HGRANT and encoded into the bus master number. A two-state
// controller starts operation when any request is present; the burst counter, with a 16:1
// mux on the requests, marks start and end of each transfer from HBURST, HREADY, HRESP and
// the owner's request. Masters split by the slave are masked until the slave's HSPLIT bit
// frees them; an ERROR response returns the enabled FSM to its reset state.
//
// Interface (AHB names): hbusreq[N] in, hgrant[N] out (one-hot or zero), hmaster out; the
// arbiter also watches hburst, hready, hresp and hsplit of the shared bus. op_active,
// xfer_start, data_done and beat_count expose the controller state and transfer boundaries.
// Timing: a request seen at a clock edge is granted at the earliest one clock later; grants
// and hmaster are combinational from registered state and the (masked) requests.
// rst_n is active low and synchronous.
//
// The block structure (priority shift, per-master priority logic blocks, OR gates, encoder,
// controller, counter with request mux) follows the design; split masking, the beat and
// end-of-transfer rules and the exact wiring of the controller are this design's choices.
module ahb_arbiter
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N = NMASTER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         hbusreq,
  input  hburst_e              hburst,
  input  logic                 hready,
  input  hresp_e               hresp,
  input  logic [N-1:0]         hsplit,
  output logic [N-1:0]         hgrant,
  output logic [$clog2(N)-1:0] hmaster,
  output logic                 op_active,
  output logic                 xfer_start,
  output logic                 data_done,
  output logic [4:0]           beat_count
);

  localparam int unsigned W = $clog2(N);

  logic [N-1:0] masked_req, split_mask, enable;
  logic [N-1:0] outs [N];
  logic         grant_valid, error;
  logic [W-1:0] owner;
  logic         owner_valid;

  assign error = hready && (hresp == RESP_ERROR);

  split_control #(.N(N)) u_split (
    .clk, .rst_n, .hready, .hresp, .owner, .owner_valid, .hsplit,
    .bus_req(hbusreq), .masked_req, .split_mask
  );

  controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .bus_req(masked_req), .grant_valid, .op_start(op_active)
  );

  priority_shift #(.N(N)) u_shift (
    .clk, .rst_n, .data_done, .enable
  );

  for (genvar j = 0; j < N; j++) begin : g_prio
    priority_logic #(.N(N), .BASE(j)) u_prio (
      .clk, .rst_n, .enable(enable[j]), .error, .in_req(masked_req), .out_grant(outs[j])
    );
  end

  grant_or #(.N(N)) u_or (.outs, .grant(hgrant));

  master_encoder #(.N(N)) u_enc (.grant(hgrant), .hmaster, .grant_valid);

  burst_counter #(.N(N)) u_cnt (
    .clk, .rst_n, .op_start(op_active), .grant_valid, .hmaster, .bus_req(masked_req),
    .hburst, .hready, .hresp, .xfer_start, .data_done, .owner, .owner_valid, .beat_count
  );

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hgrant));
  a_no_split_grant: assert property (@(posedge clk) disable iff (!rst_n)
                                     (hgrant & split_mask) == '0);

endmodule
