// hibi_wrapper -- connects one IP block to a HIBI bus segment.
//
// Transmit path: the IP writes words (address word with av = 1, then data
// words) into one of two FIFOs chosen by the command: high-priority messages
// (WR_MSG, MCAST_MSG) and normal data. An address word at a FIFO head is moved
// into that FIFO's address register. When this agent's arbiter copy grants
// the bus, the transfer FSM sends the high-priority FIFO first: one address
// cycle, then one data word per cycle, with lock = 1, and one release cycle
// with lock = 0 at the end. A tenure ends when the FIFO runs empty, when the
// next word is a new address, when the run-time send limit is reached or when
// a receiver raises target full. A word refused with full stays in the FIFO
// and is sent again, after the address, at the agent's next turn. In TDMA
// mode a tenure starts only when at least 3 cycles of the agent's slot remain
// and always releases the bus in the last cycle of the slot.
//
// Receive path: every wrapper decodes each address word. An address in
// [BASE_ADDR, BASE_ADDR + ADDR_RANGE) selects this wrapper (several addresses
// per agent; overlapping ranges give multicast). Address and data words are
// stored in the receive FIFO of their priority; if that FIFO is full the
// wrapper raises full in the same cycle and drops the word. The IP reads one
// merged stream, high priority first; when the stream switches FIFO in the
// middle of a transfer, the address of the resumed transfer is repeated so
// that every data word follows its address.
//
// Configuration: a WR_CFG transfer to this wrapper's addresses or to the
// broadcast address CFG_BCAST_ADDR writes configuration registers; each data
// word is {index[31:24], value[23:0]}: index 0 = arbitration algorithm,
// index 1 = send limit (words per tenure), index 2 = TDMA slot length
// (cycles, at least 3). A RD_CFG transfer to this wrapper's own addresses
// carries one data word {index[31:24], return_address[23:0]} per register read;
// the wrapper answers with a WR_DATA transfer of the register value to the
// return address, queued in its normal transmit FIFO. While the answer is
// queued the IP sees that FIFO as full; afterwards the wrapper re-writes the
// IP's last normal-priority address so that the IP's transfer resumes where
// it was. A second RD_CFG word arriving before the answer is queued gets
// target full and is resent by its sender.
//
// Timing: a word written by the IP is at the FIFO output one cycle later and,
// if it is an address, in the address register one further cycle later; the
// address goes on the bus in the first granted cycle after that.
//
// From the HIBI description: the bus signal set, OR resolution, two data
// priorities, multiple addresses per agent, target full, send limit,
// run-time arbitration (priority, round-robin, TDMA), config write and read,
// 2x5 + 2x3 word FF buffers. The FSM, the full/retry rule, the config word
// formats, the way a config read is answered and the rx merge are this
// design's own.
// The full flag is combinational from the bus word to the bus, by design, so
// that no word is lost in flight.
module hibi_wrapper
  import hibi_pkg::*;
#(
  parameter int unsigned       N_AGENTS        = 8,
  parameter int unsigned       AGENT_ID        = 0,
  parameter logic [DATA_W-1:0] BASE_ADDR       = 32'h0000_0000,
  parameter int unsigned       ADDR_RANGE      = 16,
  parameter int unsigned       TX_LO_DEPTH     = 5,
  parameter int unsigned       TX_HI_DEPTH     = 3,
  parameter int unsigned       RX_LO_DEPTH     = 5,
  parameter int unsigned       RX_HI_DEPTH     = 3,
  parameter arb_mode_e         ARB_MODE_INIT   = ARB_ROUND_ROBIN,
  parameter int unsigned       SEND_LIMIT_INIT = 64,
  parameter int unsigned       SLOT_LEN_INIT   = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // IP transmit side (FIFO interface)
  input  logic       tx_we,
  input  hibi_word_t tx_word,
  output logic       tx_full,    // FIFO selected by tx_word.comm is full
  // IP receive side (merged FIFO interface)
  output hibi_word_t rx_word,
  output logic       rx_empty,
  input  logic       rx_re,
  // HIBI bus segment
  output hibi_bus_t  bus_out,
  output logic       bus_full_out,
  input  hibi_bus_t  bus_in,
  input  logic       bus_full_in,
  // current run-time configuration
  output arb_mode_e  arb_mode,
  output logic [15:0] send_limit,
  output logic [15:0] slot_len
);
  localparam int unsigned WW = $bits(hibi_word_t);
  localparam logic [DATA_W:0] ADDR_END = {1'b0, BASE_ADDR} + (DATA_W+1)'(ADDR_RANGE);
  localparam int LO = 0, HI = 1;

  // ---------------------------------------------------------------- transmit
  hibi_word_t txf_head [2];
  logic [1:0] txf_empty, txf_full, txf_rd, txf_wr;

  // configuration read answers share the normal FIFO with the IP
  typedef enum logic [1:0] {RSP_IDLE, RSP_ADDR, RSP_DATA, RSP_RESUME} rsp_state_e;
  rsp_state_e        rsp_state;
  logic [DATA_W-1:0] rsp_addr, rsp_value, ip_addr;
  hibi_cmd_e         ip_comm;
  logic              ip_addr_seen, rsp_busy;
  hibi_word_t        txl_in;

  assign rsp_busy   = (rsp_state != RSP_IDLE);
  assign txf_wr[HI] = tx_we &&  is_hi_prio(tx_word.comm);
  assign txf_wr[LO] = rsp_busy ? !txf_full[LO] : (tx_we && !is_hi_prio(tx_word.comm));
  assign tx_full    = is_hi_prio(tx_word.comm) ? txf_full[HI] : (txf_full[LO] || rsp_busy);

  always_comb begin
    unique case (rsp_state)
      RSP_ADDR:   txl_in = '{av: 1'b1, comm: CMD_WR_DATA, data: rsp_addr};
      RSP_DATA:   txl_in = '{av: 1'b0, comm: CMD_WR_DATA, data: rsp_value};
      RSP_RESUME: txl_in = '{av: 1'b1, comm: ip_comm,     data: ip_addr};
      default:    txl_in = tx_word;
    endcase
  end

  // last normal-priority address written by the IP
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip_addr_seen <= 1'b0;
      ip_addr      <= '0;
      ip_comm      <= CMD_IDLE;
    end else if (!rsp_busy && txf_wr[LO] && tx_word.av) begin
      ip_addr_seen <= 1'b1;
      ip_addr      <= tx_word.data;
      ip_comm      <= tx_word.comm;
    end
  end

  hibi_fifo #(.WIDTH(WW), .DEPTH(TX_LO_DEPTH)) u_tx_lo (
    .clk, .rst_n, .wr_en(txf_wr[LO]), .wr_data(txl_in), .full(txf_full[LO]),
    .rd_en(txf_rd[LO]), .rd_data(txf_head[LO]), .empty(txf_empty[LO]), .count());
  hibi_fifo #(.WIDTH(WW), .DEPTH(TX_HI_DEPTH)) u_tx_hi (
    .clk, .rst_n, .wr_en(txf_wr[HI]), .wr_data(tx_word), .full(txf_full[HI]),
    .rd_en(txf_rd[HI]), .rd_data(txf_head[HI]), .empty(txf_empty[HI]), .count());

  logic [DATA_W-1:0] tx_addr      [2];
  hibi_cmd_e         tx_addr_comm [2];
  logic [1:0]        tx_addr_valid;
  logic [1:0]        addr_pop, ready;

  for (genvar f = 0; f < 2; f++) begin : g_txaddr
    assign addr_pop[f] = !txf_empty[f] && txf_head[f].av;
    assign ready[f]    = tx_addr_valid[f] && !txf_empty[f] && !txf_head[f].av;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tx_addr_valid[f] <= 1'b0;
        tx_addr[f]       <= '0;
        tx_addr_comm[f]  <= CMD_IDLE;
      end else if (addr_pop[f]) begin
        tx_addr_valid[f] <= 1'b1;
        tx_addr[f]       <= txf_head[f].data;
        tx_addr_comm[f]  <= txf_head[f].comm;
      end
    end
  end

  typedef enum logic [1:0] {TX_IDLE, TX_DATA, TX_REL} tx_state_e;
  tx_state_e   tx_state;
  logic        cur;          // FIFO of the tenure in progress (0 = LO, 1 = HI)
  logic [15:0] sent;         // data words sent in this tenure
  logic        grant;
  logic [15:0] slot_left;
  logic        start, sel, cont, drive_data, tdma;

  hibi_arbiter #(.N_AGENTS(N_AGENTS), .AGENT_ID(AGENT_ID)) u_arb (
    .clk, .rst_n, .bus_lock(bus_in.lock), .arb_mode, .slot_len, .slot_left,
    .grant, .turn());

  always_comb begin
    tdma       = (arb_mode == ARB_TDMA);
    sel        = ready[HI] ? 1'b1 : 1'b0;
    start      = (tx_state == TX_IDLE) && grant && (ready[HI] || ready[LO]) &&
                 (!tdma || slot_left >= 16'd3);
    cont       = !txf_empty[cur] && !txf_head[cur].av && (sent < send_limit) &&
                 (!tdma || slot_left >= 16'd2);
    drive_data = (tx_state == TX_DATA) && cont;
    bus_out    = '0;
    if (start) begin
      bus_out.data = tx_addr[sel];
      bus_out.av   = 1'b1;
      bus_out.comm = tx_addr_comm[sel];
      bus_out.lock = 1'b1;
    end else if (drive_data) begin
      bus_out.data = txf_head[cur].data;
      bus_out.comm = txf_head[cur].comm;
      bus_out.lock = 1'b1;
    end
  end

  // FIFO pops kept apart from the bus drive: the full flag returns from the bus
  always_comb begin
    txf_rd = addr_pop;
    if (drive_data && !bus_full_in) txf_rd[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_IDLE;
      cur      <= 1'b0;
      sent     <= '0;
    end else begin
      unique case (tx_state)
        TX_IDLE: if (start) begin
          cur      <= sel;
          sent     <= '0;
          tx_state <= bus_full_in ? TX_REL : TX_DATA;
        end
        TX_DATA: begin
          if (!cont)             tx_state <= TX_IDLE;  // this was the release cycle
          else if (bus_full_in)  tx_state <= TX_REL;
          else                   sent     <= sent + 1'b1;
        end
        TX_REL:  tx_state <= TX_IDLE;
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------------- receive
  hibi_word_t rxf_head [2];
  logic [1:0] rxf_empty, rxf_full, rxf_rd, rxf_wr;
  hibi_word_t rx_in;
  logic       rx_sel, cfg_sel, rd_sel;
  logic       bus_valid, addr_match, cfg_match, take, in_hi, rd_req;

  always_comb begin
    bus_valid  = (bus_in.comm != CMD_IDLE);
    addr_match = ({1'b0, bus_in.data} >= {1'b0, BASE_ADDR}) && ({1'b0, bus_in.data} < ADDR_END);
    cfg_match  = addr_match || (bus_in.data == CFG_BCAST_ADDR);
    in_hi      = is_hi_prio(bus_in.comm);
    rx_in      = '{av: bus_in.av, comm: bus_in.comm, data: bus_in.data};
    take       = 1'b0;
    if (bus_valid && bus_in.comm != CMD_WR_CFG && bus_in.comm != CMD_RD_CFG)
      take = bus_in.av ? addr_match : rx_sel;
    rd_req       = bus_valid && !bus_in.av && rd_sel && bus_in.comm == CMD_RD_CFG;
    rxf_wr       = '0;
    bus_full_out = rd_req && rsp_busy;
    if (take) begin
      if (rxf_full[in_hi]) bus_full_out = 1'b1;
      else                 rxf_wr[in_hi] = 1'b1;
    end
  end

  hibi_fifo #(.WIDTH(WW), .DEPTH(RX_LO_DEPTH)) u_rx_lo (
    .clk, .rst_n, .wr_en(rxf_wr[LO]), .wr_data(rx_in), .full(rxf_full[LO]),
    .rd_en(rxf_rd[LO]), .rd_data(rxf_head[LO]), .empty(rxf_empty[LO]), .count());
  hibi_fifo #(.WIDTH(WW), .DEPTH(RX_HI_DEPTH)) u_rx_hi (
    .clk, .rst_n, .wr_en(rxf_wr[HI]), .wr_data(rx_in), .full(rxf_full[HI]),
    .rd_en(rxf_rd[HI]), .rd_data(rxf_head[HI]), .empty(rxf_empty[HI]), .count());

  // target selection and configuration writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sel     <= 1'b0;
      cfg_sel    <= 1'b0;
      rd_sel     <= 1'b0;
      arb_mode   <= ARB_MODE_INIT;
      send_limit <= 16'(SEND_LIMIT_INIT);
      slot_len   <= 16'(SLOT_LEN_INIT);
    end else if (bus_valid) begin
      if (bus_in.av) begin
        rx_sel  <= addr_match && !bus_full_out &&
                   bus_in.comm != CMD_WR_CFG && bus_in.comm != CMD_RD_CFG;
        cfg_sel <= cfg_match && bus_in.comm == CMD_WR_CFG;
        rd_sel  <= addr_match && bus_in.comm == CMD_RD_CFG;
      end else if (cfg_sel && bus_in.comm == CMD_WR_CFG) begin
        if (bus_in.data[31:24] == CFG_ARB_MODE)
          arb_mode <= arb_mode_e'(bus_in.data[1:0]);
        else if (bus_in.data[31:24] == CFG_SEND_LIMIT)
          send_limit <= (bus_in.data[15:0] == '0) ? 16'd1 : bus_in.data[15:0];
        else if (bus_in.data[31:24] == CFG_SLOT_LEN)
          slot_len <= (bus_in.data[15:0] < 16'd3) ? 16'd3 : bus_in.data[15:0];
      end
    end
  end

  // configuration reads: capture one request, then queue the answer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_state <= RSP_IDLE;
      rsp_addr  <= '0;
      rsp_value <= '0;
    end else begin
      unique case (rsp_state)
        RSP_IDLE: if (rd_req && !bus_full_in) begin
          rsp_addr  <= {8'd0, bus_in.data[23:0]};
          if (bus_in.data[31:24] == CFG_ARB_MODE)        rsp_value <= DATA_W'(arb_mode);
          else if (bus_in.data[31:24] == CFG_SEND_LIMIT) rsp_value <= DATA_W'(send_limit);
          else if (bus_in.data[31:24] == CFG_SLOT_LEN)   rsp_value <= DATA_W'(slot_len);
          else                                           rsp_value <= '0;
          rsp_state <= RSP_ADDR;
        end
        RSP_ADDR:   if (!txf_full[LO]) rsp_state <= RSP_DATA;
        RSP_DATA:   if (!txf_full[LO]) rsp_state <= ip_addr_seen ? RSP_RESUME : RSP_IDLE;
        RSP_RESUME: if (!txf_full[LO]) rsp_state <= RSP_IDLE;
        default:    rsp_state <= RSP_IDLE;
      endcase
    end
  end

  // merged receive stream towards the IP
  logic              last_src;
  logic [DATA_W-1:0] last_addr [2];
  hibi_cmd_e         last_comm [2];
  logic [1:0]        addr_seen;
  logic              src, inject;

  always_comb begin
    src      = rxf_empty[HI] ? 1'b0 : 1'b1;
    rx_empty = rxf_empty[HI] && rxf_empty[LO];
    inject   = (src != last_src) && !rxf_head[src].av && addr_seen[src];
    rx_word  = inject ? '{av: 1'b1, comm: last_comm[src], data: last_addr[src]}
                      : rxf_head[src];
  end

  always_comb begin
    rxf_rd = '0;
    if (rx_re && !rx_empty && !inject) rxf_rd[src] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_src  <= 1'b0;
      addr_seen <= '0;
      for (int f = 0; f < 2; f++) begin
        last_addr[f] <= '0;
        last_comm[f] <= CMD_IDLE;
      end
    end else if (rx_re && !rx_empty) begin
      last_src <= src;
      if (!inject && rxf_head[src].av) begin
        addr_seen[src] <= 1'b1;
        last_addr[src] <= rxf_head[src].data;
        last_comm[src] <= rxf_head[src].comm;
      end
    end
  end

  // ------------------------------------------------------------- bus rules
  // A data word on the bus always follows a cycle in which the bus was locked.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (bus_in.comm != CMD_IDLE && !bus_in.av) |-> $past(bus_in.lock))
    else $error("hibi_wrapper %0d: data word without a preceding locked cycle", AGENT_ID);
  // The IP must not write into a full transmit FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) !(tx_we && tx_full))
    else $error("hibi_wrapper %0d: tx write while full", AGENT_ID);
endmodule
