// split_control: masks the requests of masters whose transfer the slave has split.
//
// When the slave ends a transfer with a SPLIT response (HRESP = SPLIT with HREADY high), the
// master that owned the transfer is recorded in a mask and its bus request is hidden from
// the rest of the arbiter, so it is not granted again. When the slave later raises that
// master's bit of HSPLIT, the bit is cleared and the master's request is seen again. A clear
// and a new split of the same master in one clock leave the master masked.
//
// Interface: masked_req = bus_req & ~split_mask is combinational; split_mask is registered
// and updated on the rising clock edge. rst_n is active low and synchronous.
//
// Split handling "according to protocol" is named by the design; the mask register and
// its update rules follow the AMBA 2.0 AHB split mechanism and are this design's reading.
module split_control
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N = ahb_arb_pkg::NMASTER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hready,
  input  hresp_e               hresp,
  input  logic [$clog2(N)-1:0] owner,
  input  logic                 owner_valid,
  input  logic [N-1:0]         hsplit,
  input  logic [N-1:0]         bus_req,
  output logic [N-1:0]         masked_req,
  output logic [N-1:0]         split_mask
);

  logic [N-1:0] mask_d;

  always_comb begin
    mask_d = split_mask & ~hsplit;
    if (owner_valid && hready && hresp == RESP_SPLIT) mask_d[owner] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) split_mask <= '0;
    else        split_mask <= mask_d;
  end

  assign masked_req = bus_req & ~split_mask;

endmodule
