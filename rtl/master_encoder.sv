// master_encoder: turns the one-hot grant vector into the bus master number.
//
// The arbiter reports which master owns the bus as a binary number (HMASTER in AHB terms).
// The encoder gives the index of the set grant bit and a valid flag that is high when any
// grant is set. With no grant the number is 0 and valid is low; if several bits were set
// (which the arbiter never does) the lowest index wins. Purely combinational.
//
// Interface: grant[N] one-hot or zero in; hmaster[$clog2(N)] and grant_valid out.
//
// An encoder producing the bus master number from the grants follows the description of
// the design; the zero value with no grant and the valid flag are this design's choices.
module master_encoder #(
  parameter int unsigned N = ahb_arb_pkg::NMASTER
) (
  input  logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] hmaster,
  output logic                 grant_valid
);

  always_comb begin
    hmaster = '0;
    for (int i = N - 1; i >= 0; i--) if (grant[i]) hmaster = ($clog2(N))'(i);
    grant_valid = |grant;
  end

endmodule
