// hibi_arbiter -- one copy of the distributed, pipelined HIBI arbitration.
//
// Every wrapper of a segment holds an identical copy of this block. All copies
// watch only the resolved bus lock flag, so they hold the same "turn" value in
// every cycle without any request or grant wires between agents. The agent
// whose index equals the turn may start a transfer in that cycle; while it
// drives lock = 1 the turn stays with it. The turn for the next cycle is
// computed one cycle ahead from registered state, which is what makes the
// arbitration pipelined: the grant is ready at the start of the cycle.
//
// Turn update, seen from the bus:
//   lock = 1                       the owner continues, turn unchanged
//   lock = 0 after a lock = 1      a tenure has just ended:
//                                    ARB_PRIORITY    -> turn = 0 (highest priority)
//                                    ARB_ROUND_ROBIN -> turn = turn + 1
//   lock = 0 after a lock = 0      idle cycle, turn = turn + 1 (scan)
// In priority mode an agent's index is its priority, 0 being the highest.
// In TDMA mode the lock flag is ignored: the turn passes to the next agent
// every slot_len cycles, and slot_left tells the owner how many cycles of its
// slot remain (counting the present one) so that it can end its tenure in
// time. All copies count the same cycles from reset, so they agree.
// Distributed and pipelined arbitration with priority, round-robin and TDMA
// algorithms follows the HIBI description; this turn-passing scheme is this
// design's own way of doing it with only the listed bus signals.
module hibi_arbiter
  import hibi_pkg::*;
#(
  parameter int unsigned N_AGENTS = 8,
  parameter int unsigned AGENT_ID = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bus_lock,   // resolved lock flag of the segment
  input  arb_mode_e arb_mode,   // run-time selected algorithm
  input  logic [15:0] slot_len, // TDMA slot length in cycles (at least 1)
  output logic [15:0] slot_left,// TDMA cycles left in the current slot, this one included
  output logic      grant,      // this agent may drive the bus in this cycle
  output logic [$clog2(N_AGENTS)-1:0] turn
);
  localparam int unsigned TW = $clog2(N_AGENTS);

  logic        prev_lock;
  logic [15:0] slot_cnt;   // cycles already spent in the current TDMA slot

  function automatic logic [TW-1:0] inc(logic [TW-1:0] t);
    return (t == TW'(N_AGENTS - 1)) ? '0 : t + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      turn      <= '0;
      prev_lock <= 1'b0;
      slot_cnt  <= '0;
    end else begin
      prev_lock <= bus_lock;
      if (arb_mode == ARB_TDMA) begin
        if (slot_cnt + 1'b1 >= slot_len) begin
          slot_cnt <= '0;
          turn     <= inc(turn);
        end else begin
          slot_cnt <= slot_cnt + 1'b1;
        end
      end else if (!bus_lock) begin
        slot_cnt <= '0;
        if (prev_lock && arb_mode == ARB_PRIORITY) turn <= '0;
        else                                       turn <= inc(turn);
      end
    end
  end

  assign grant     = (turn == TW'(AGENT_ID));
  // a slot shortened at run time below the cycles already spent ends now
  assign slot_left = (slot_cnt >= slot_len) ? 16'd1 : slot_len - slot_cnt;
endmodule
