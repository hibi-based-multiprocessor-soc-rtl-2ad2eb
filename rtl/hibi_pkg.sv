// hibi_pkg -- types and constants shared by the HIBI segment, its wrappers
// and the Nios-to-HIBI DMA controller.
//
// The HIBI bus carries, on one set of unidirectional shared wires, a
// data/address word, an address-valid flag, a command, a lock flag and a
// target-full flag. Every agent drives zeros when it does not own the bus and
// the wires are resolved by an OR network. Addresses are multiplexed with data:
// a transfer is one address word (av = 1) followed by data words.
//
// The signal set, the 32-bit width, the OR resolution and the idea of eight
// commands with two data priorities follow the HIBI description. The command
// encoding, the config-word format and the arbitration-mode codes are this
// design's own choices.
package hibi_pkg;

  localparam int unsigned DATA_W = 32;   // HIBI data/address width
  localparam int unsigned CMD_W  = 3;    // eight command codes

  // Command codes. IDLE marks a cycle in which nobody drives the bus.
  typedef enum logic [CMD_W-1:0] {
    CMD_IDLE       = 3'd0,
    CMD_WR_DATA    = 3'd1,  // write data, normal priority
    CMD_WR_MSG     = 3'd2,  // write data, high priority
    CMD_MCAST_DATA = 3'd3,  // multicast data, normal priority
    CMD_MCAST_MSG  = 3'd4,  // multicast data, high priority
    CMD_RD_REQ     = 3'd5,  // split read request, served by the target IP
    CMD_WR_CFG     = 3'd6,  // write a wrapper configuration register
    CMD_RD_CFG     = 3'd7   // read a wrapper configuration register (answered with WR_DATA)
  } hibi_cmd_e;

  // Arbitration algorithms selectable at run time.
  typedef enum logic [1:0] {
    ARB_PRIORITY    = 2'd0, // after each tenure the scan restarts at agent 0
    ARB_ROUND_ROBIN = 2'd1, // after each tenure the scan continues at the next agent
    ARB_TDMA        = 2'd2  // fixed time slots of equal length, one per agent in index order
  } arb_mode_e;

  // Wrapper configuration registers (index field of a config word).
  localparam logic [7:0] CFG_ARB_MODE   = 8'd0;
  localparam logic [7:0] CFG_SEND_LIMIT = 8'd1;
  localparam logic [7:0] CFG_SLOT_LEN   = 8'd2;   // TDMA slot length in cycles

  // Address that every wrapper accepts for CMD_WR_CFG, so that a run-time
  // arbitration change reaches all distributed arbiters in the same cycle.
  localparam logic [DATA_W-1:0] CFG_BCAST_ADDR = '1;

  // One cycle of the shared bus driven by the owner (also what each agent
  // drives into the OR net). The target-full flag travels the other way, from
  // receivers to the owner, and is kept as a separate one-bit wire.
  typedef struct packed {
    logic [DATA_W-1:0] data;  // address when av = 1, otherwise data
    logic              av;    // address valid
    hibi_cmd_e         comm;  // command, CMD_IDLE when nothing is driven
    logic              lock;  // owner holds the bus (address and data cycles)
  } hibi_bus_t;

  // One word in a wrapper FIFO.
  typedef struct packed {
    logic              av;
    hibi_cmd_e         comm;
    logic [DATA_W-1:0] data;
  } hibi_word_t;

  // High-priority commands travel through the message FIFOs.
  function automatic logic is_hi_prio(hibi_cmd_e c);
    return (c == CMD_WR_MSG) || (c == CMD_MCAST_MSG);
  endfunction

endpackage
