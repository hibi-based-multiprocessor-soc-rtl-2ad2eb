// hibi_bus_or -- the bus resolution network of one HIBI segment.
//
// All HIBI bus signals are unidirectional and shared: every agent drives its
// own copy, all zeros while it does not own the bus, and the segment's bus is
// the bitwise OR of all copies. There are no point-to-point request or grant
// wires; arbitration is done by identical logic in every wrapper watching
// this resolved bus. The network is purely combinational. Using an OR network
// is taken from the HIBI description.
module hibi_bus_or
  import hibi_pkg::*;
#(
  parameter int unsigned N_AGENTS = 8
) (
  input  hibi_bus_t [N_AGENTS-1:0] agent_out,   // owner-driven signals of each agent
  input  logic      [N_AGENTS-1:0] agent_full,  // target-full flag of each agent
  output hibi_bus_t                bus,
  output logic                     bus_full
);
  always_comb begin
    bus = '0;
    for (int i = 0; i < N_AGENTS; i++) bus = bus | agent_out[i];
  end
  assign bus_full = |agent_full;
endmodule
