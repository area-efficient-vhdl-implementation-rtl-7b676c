// ahb_arb_pkg: types and constants shared by the AHB round-robin arbiter.
//
// The arbiter serves 16 AHB bus masters and one split-capable slave. This package holds
// the master count, the AMBA 2.0 AHB encodings of HBURST and HRESP that the arbiter has to
// understand, and a helper that turns a burst type into its beat count. The encodings are
// those of the AHB protocol; the helper returning 0 for an undefined-length (INCR) burst is
// this design's own convention.
package ahb_arb_pkg;

  // Number of bus masters the arbiter serves (16 in this design).
  localparam int unsigned NMASTER = 16;

  // AHB HBURST encoding.
  typedef enum logic [2:0] {
    BURST_SINGLE = 3'd0,
    BURST_INCR   = 3'd1,
    BURST_WRAP4  = 3'd2,
    BURST_INCR4  = 3'd3,
    BURST_WRAP8  = 3'd4,
    BURST_INCR8  = 3'd5,
    BURST_WRAP16 = 3'd6,
    BURST_INCR16 = 3'd7
  } hburst_e;

  // AHB HRESP encoding.
  typedef enum logic [1:0] {
    RESP_OKAY  = 2'd0,
    RESP_ERROR = 2'd1,
    RESP_RETRY = 2'd2,
    RESP_SPLIT = 2'd3
  } hresp_e;

  // Beats of a burst; 0 means undefined length (INCR), which lasts as long as the
  // owning master keeps its request asserted.
  function automatic logic [4:0] burst_beats(hburst_e b);
    unique case (b)
      BURST_SINGLE:              return 5'd1;
      BURST_INCR:                return 5'd0;
      BURST_WRAP4, BURST_INCR4:  return 5'd4;
      BURST_WRAP8, BURST_INCR8:  return 5'd8;
      default:                   return 5'd16;
    endcase
  endfunction

endpackage
