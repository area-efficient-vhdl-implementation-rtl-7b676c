// controller: two-state FSM that starts and stops the arbiter's transfer control.
//
// The controller has the states RST and ARB_OP (arbiter operation). An OR gate over all
// bus requests forms the start signal. In RST the controller waits for start; it then
// moves to ARB_OP and holds op_start high, which lets the burst counter count beats. It
// returns to RST when no master requests and no grant is outstanding.
//
// Interface: bus_req (split-masked requests) and grant_valid sampled on the rising clock
// edge; op_start is a registered state output. rst_n is active low and synchronous.
//
// The two states, the start condition and the op_start output follow the description of
// the design. The OR of all requests as start and the condition for returning to RST are
// this design's choices.
module controller #(
  parameter int unsigned N = ahb_arb_pkg::NMASTER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] bus_req,
  input  logic         grant_valid,
  output logic         op_start
);

  typedef enum logic {CTRL_RST = 1'b0, CTRL_ARB_OP = 1'b1} ctrl_state_e;

  ctrl_state_e state_q, state_d;
  logic start;

  assign start = |bus_req;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      CTRL_RST:    if (start) state_d = CTRL_ARB_OP;
      CTRL_ARB_OP: if (!start && !grant_valid) state_d = CTRL_RST;
      default:     state_d = CTRL_RST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= CTRL_RST;
    else        state_q <= state_d;
  end

  assign op_start = (state_q == CTRL_ARB_OP);

endmodule
