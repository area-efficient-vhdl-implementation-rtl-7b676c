// priority_shift: rotating one-hot enable for the priority logic blocks.
//
// The arbiter holds one priority logic block per master; block j starts its round-robin
// search at master j. Exactly one block is enabled at a time. This register holds that
// one-hot enable and rotates it by one position every time the burst counter reports the
// end of a transfer (data_done), so the head of the priority order moves on after each
// completed transfer. After reset block 0 (the block that starts at master 0) is enabled.
//
// Interface: data_done is sampled on the rising clock edge; enable changes one cycle after
// data_done is seen high. rst_n is active low and synchronous.
//
// A shift register advanced by data_done, feeding the enables of the priority logic blocks
// directly, follows the description of the design. Shifting by exactly one position per
// data_done and the reset value are this design's choices.
module priority_shift #(
  parameter int unsigned N = ahb_arb_pkg::NMASTER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         data_done,
  output logic [N-1:0] enable
);

  always_ff @(posedge clk) begin
    if (!rst_n)         enable <= N'(1);
    else if (data_done) enable <= {enable[N-2:0], enable[N-1]};
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(enable));

endmodule
