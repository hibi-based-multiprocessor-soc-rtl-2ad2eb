// hibi_mpsoc -- eight-processor system on one HIBI bus segment.
//
// Each of the N_NODES nodes is the communication half of a processor tile: a
// dual-port RAM shared with the processor, a Nios-to-HIBI DMA controller and a
// HIBI wrapper. The wrappers are joined into a single bus segment by the OR
// network; arbitration is distributed in the wrappers. The processors
// themselves (32-bit soft cores with their own instruction and boot memories,
// timer and UART) are not part of this RTL: each node brings out the
// processor's two Avalon connections, the DMA register slave with its
// interrupt and port A of the dual-port RAM.
//
// Addressing: node i answers HIBI addresses i*ADDR_RANGE to
// i*ADDR_RANGE + ADDR_RANGE - 1, so a sender can use a distinct address per
// stream towards the same node. Node i has arbitration index (priority) i.
// The resolved bus and its full flag are brought out for observation.
//
// Timing: a transmit started by a register write reaches the receiving RAM
// after a fixed pipeline latency plus one cycle per word when the bus is free.
// Eight nodes, one segment, a 32-bit bus, four pending receive buffers per
// DMA and the per-node organisation follow the prototype description; the
// address plan, the default send limit and the default TDMA slot length are
// this design's own.
module hibi_mpsoc
  import hibi_pkg::*;
#(
  parameter int unsigned N_NODES         = 8,
  parameter int unsigned ADDR_RANGE      = 16,
  parameter int unsigned MEM_AW          = 8,
  parameter int unsigned N_RX_CH         = 4,
  parameter arb_mode_e   ARB_MODE_INIT   = ARB_ROUND_ROBIN,
  parameter int unsigned SEND_LIMIT_INIT = 64,
  parameter int unsigned SLOT_LEN_INIT   = 16,
  localparam int unsigned S_AW           = $clog2(8 + 4 * N_RX_CH)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // per-node processor connection to the DMA register slave
  input  logic [N_NODES-1:0][S_AW-1:0]    dma_address,
  input  logic [N_NODES-1:0]              dma_write,
  input  logic [N_NODES-1:0]              dma_read,
  input  logic [N_NODES-1:0][DATA_W-1:0]  dma_writedata,
  output logic [N_NODES-1:0][DATA_W-1:0]  dma_readdata,
  output logic [N_NODES-1:0]              dma_irq,
  // per-node processor connection to port A of the dual-port RAM
  input  logic [N_NODES-1:0][MEM_AW-1:0]  ram_addr,
  input  logic [N_NODES-1:0]              ram_we,
  input  logic [N_NODES-1:0][DATA_W-1:0]  ram_wdata,
  output logic [N_NODES-1:0][DATA_W-1:0]  ram_rdata,
  // observation of the segment
  output hibi_bus_t                       bus,
  output logic                            bus_full
);
  hibi_bus_t [N_NODES-1:0] agent_out;
  logic      [N_NODES-1:0] agent_full;

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    logic [MEM_AW-1:0] m_addr;
    logic              m_we;
    logic [DATA_W-1:0] m_wdata, m_rdata;
    logic              tx_we, tx_full, rx_empty, rx_re;
    hibi_word_t        tx_word, rx_word;

    dpram #(.WIDTH(DATA_W), .DEPTH(2 ** MEM_AW)) u_ram (
      .clk,
      .a_addr(ram_addr[i]), .a_we(ram_we[i]), .a_wdata(ram_wdata[i]), .a_rdata(ram_rdata[i]),
      .b_addr(m_addr), .b_we(m_we), .b_wdata(m_wdata), .b_rdata(m_rdata));

    n2h_dma #(.MEM_AW(MEM_AW), .N_RX_CH(N_RX_CH)) u_dma (
      .clk, .rst_n,
      .avs_address(dma_address[i]), .avs_write(dma_write[i]), .avs_read(dma_read[i]),
      .avs_writedata(dma_writedata[i]), .avs_readdata(dma_readdata[i]), .irq(dma_irq[i]),
      .mem_addr(m_addr), .mem_we(m_we), .mem_wdata(m_wdata), .mem_rdata(m_rdata),
      .tx_we, .tx_word, .tx_full, .rx_word, .rx_empty, .rx_re);

    hibi_wrapper #(
      .N_AGENTS(N_NODES), .AGENT_ID(i),
      .BASE_ADDR(DATA_W'(i * ADDR_RANGE)), .ADDR_RANGE(ADDR_RANGE),
      .ARB_MODE_INIT(ARB_MODE_INIT), .SEND_LIMIT_INIT(SEND_LIMIT_INIT),
      .SLOT_LEN_INIT(SLOT_LEN_INIT)
    ) u_wrap (
      .clk, .rst_n,
      .tx_we, .tx_word, .tx_full, .rx_word, .rx_empty, .rx_re,
      .bus_out(agent_out[i]), .bus_full_out(agent_full[i]),
      .bus_in(bus), .bus_full_in(bus_full),
      .arb_mode(), .send_limit(), .slot_len());
  end

  hibi_bus_or #(.N_AGENTS(N_NODES)) u_bus (
    .agent_out, .agent_full, .bus, .bus_full);
endmodule
