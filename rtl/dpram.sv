// dpram -- dual-port RAM shared by a processor and its HIBI DMA controller.
//
// Two independent synchronous ports, each able to read or write one word per
// cycle. A read returns the addressed word in the next cycle (one cycle read
// latency, as the DMA sees it when it fetches transmit data). A read in the
// same cycle as a write to the same address, on either port, returns the old
// word. If both ports write the same address in the same cycle, port B wins.
// The default size, 256 words of 32 bits (8 kbit), is the DMA buffer size of
// the prototype configuration; the port set and read-during-write behaviour
// are this design's own. The memory is not reset.
module dpram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  // port A (processor side)
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  // port B (DMA side)
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
