// grant_or: the OR gates that merge the outputs of the priority logic blocks.
//
// Every priority logic block drives a grant candidate for all N masters, and only the one
// enabled block drives anything but zeros. Grant k of the arbiter is the OR of bit k of all
// N blocks' outputs. Purely combinational.
//
// Interface: outs[j] is the output vector of block j; grant[k] is HGRANT of master k.
//
// One OR gate per grant line, fed by the matching output of every block, follows the block
// diagram of the design; the array port is this design's way of carrying the N vectors.
module grant_or #(
  parameter int unsigned N = ahb_arb_pkg::NMASTER
) (
  input  logic [N-1:0] outs [N],
  output logic [N-1:0] grant
);

  always_comb begin
    grant = '0;
    for (int unsigned j = 0; j < N; j++) grant |= outs[j];
  end

endmodule
