// hibi_fifo -- small flip-flop based first-in first-out buffer.
//
// The HIBI wrapper buffers are built from registers so that the FPGA's
// embedded memories stay free for the processors; this module is that buffer.
// It is show-ahead: the oldest word is visible on rd_data whenever empty is
// low, and rd_en removes it at the clock edge. A write and a read in the same
// cycle are both performed (also when the FIFO is full, since a word leaves).
// A word written in cycle t is visible at the output in cycle t+1.
// DEPTH need not be a power of two. Reset empties the buffer; the storage
// itself is not reset.
module hibi_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;

  wire do_rd = rd_en && !empty;
  wire do_wr = wr_en && (!full || do_rd);

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$bits(count)-1:0]);
  assign rd_data = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  // A write into a full FIFO without a simultaneous read is a protocol error.
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("hibi_fifo: write while full");
endmodule
