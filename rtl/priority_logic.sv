// priority_logic: one round-robin priority FSM of the arbiter.
//
// The FSM has a reset state RST and one state per master, M1..MN, visited in a ring. Block
// number BASE visits the masters starting at master BASE: its state Mi stands for master
// (BASE + i - 1) mod N. From RST the FSM jumps to the state of the first requesting master in
// that order. In a master's state it stays while that master keeps requesting and steps to
// the next master's state as soon as the request is low; the last state steps back to RST.
// An error response sends the FSM back to RST. Walking the ring one state per clock means a
// waiting master is reached at most N clocks after the bus is released.
//
// out_grant is one-hot or zero: the bit of the master whose state the FSM is in, and only
// while that master still requests and the block is enabled. While enable is low the FSM is
// held in RST, so a newly enabled block starts a fresh search from its own first master.
//
// Interface: in_req are the (split-masked) bus requests, sampled on the rising clock edge;
// out_grant is combinational from the state, in_req and enable. rst_n is active low and
// synchronous.
//
// The state set, the stay-while-requesting and step-on-release transitions, the return to
// RST after the last master and on error follow the state diagram of the design. Gating the
// grant with the request, holding a disabled block in RST and the rotation by BASE are this
// design's choices.
module priority_logic #(
  parameter int unsigned N    = ahb_arb_pkg::NMASTER,
  parameter int unsigned BASE = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         error,
  input  logic [N-1:0] in_req,
  output logic [N-1:0] out_grant
);

  localparam int unsigned W = $clog2(N);

  // active = 0 is the RST state; active = 1 with pos = i is state M(i+1).
  typedef struct packed {
    logic         active;
    logic [W-1:0] pos;
  } state_t;

  state_t state_q, state_d;
  logic [N-1:0] rreq;       // requests in this block's search order
  logic [W-1:0] first;      // first requester in search order

  // Rotate the requests so that position 0 is master BASE.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) rreq[i] = in_req[(BASE + i) % N];
  end

  always_comb begin
    first = '0;
    for (int i = N - 1; i >= 0; i--) if (rreq[i]) first = W'(i);
  end

  always_comb begin
    state_d = state_q;
    if (!enable || error) begin
      state_d = '0;
    end else if (!state_q.active) begin
      if (|rreq) state_d = '{active: 1'b1, pos: first};
    end else if (!rreq[state_q.pos]) begin
      if (32'(state_q.pos) == N - 1) state_d = '0;
      else                           state_d.pos = state_q.pos + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= '0;
    else        state_q <= state_d;
  end

  always_comb begin
    out_grant = '0;
    if (enable && state_q.active && rreq[state_q.pos])
      out_grant[(BASE + 32'(state_q.pos)) % N] = 1'b1;
  end

  a_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_grant));
  a_granted_requests: assert property (@(posedge clk) disable iff (!rst_n)
                                       (out_grant & ~in_req) == '0);

endmodule
