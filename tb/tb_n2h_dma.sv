// tb_n2h_dma -- self-checking test of the Nios-to-HIBI DMA controller with
// its dual-port RAM. The wrapper FIFOs are modelled by queues.
//
// Checks:
//   - transmit: address word then the RAM words in order; the address word is
//     written 3 cycles after the start write (2 synchronisation cycles, then
//     the address together with the first RAM read) and then one data word per
//     cycle with no gaps when the FIFO never fills;
//   - transmit under random FIFO-full back-pressure, also while receiving;
//   - receive into armed buffers: closing on address change, continuing on a
//     repeated address, closing at the maximum size, interrupt, done mask,
//     count, HIBI address, buffer contents, stall while no buffer is free and
//     resumption after the processor frees one.
module tb_n2h_dma;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0]  avs_address;
  logic        avs_write, avs_read, irq;
  logic [31:0] avs_writedata, avs_readdata;
  logic [7:0]  mem_addr, ram_addr;
  logic        mem_we, ram_we;
  logic [31:0] mem_wdata, mem_rdata, ram_wdata, ram_rdata;
  logic        tx_we, tx_full, rx_empty, rx_re;
  hibi_word_t  tx_word, rx_word;

  n2h_dma dut (.*);
  dpram #(.WIDTH(32), .DEPTH(256)) u_ram (
    .clk, .a_addr(ram_addr), .a_we(ram_we), .a_wdata(ram_wdata), .a_rdata(ram_rdata),
    .b_addr(mem_addr), .b_we(mem_we), .b_wdata(mem_wdata), .b_rdata(mem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(negedge clk) cycle++;   // stable while posedge processes sample it

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmit FIFO model
  hibi_word_t txq[$];
  int tx_cycles[$];
  int full_prob = 0;
  always @(negedge clk) tx_full <= ($urandom % 100) < full_prob;
  always @(posedge clk) if (rst_n && tx_we && !tx_full) begin
    txq.push_back(tx_word);
    tx_cycles.push_back(cycle);
  end

  // receive FIFO model
  hibi_word_t rxq[$];
  always @(posedge clk) if (rst_n && rx_re && rxq.size() > 0) void'(rxq.pop_front());
  always @(*) begin
    rx_empty = (rxq.size() == 0);
    rx_word  = rx_empty ? '0 : rxq[0];
  end

  task automatic reg_wr(input int a, input logic [31:0] d);
    @(negedge clk);
    avs_address = 5'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask
  task automatic reg_rd(input int a, output logic [31:0] d);
    @(negedge clk);
    avs_address = 5'(a); avs_read = 1;
    #1 d = avs_readdata;
    @(negedge clk);
    avs_read = 0;
  endtask
  task automatic ram_write(input int a, input logic [31:0] d);
    @(negedge clk);
    ram_addr = 8'(a); ram_wdata = d; ram_we = 1;
    @(negedge clk);
    ram_we = 0;
  endtask
  task automatic ram_read(input int a, output logic [31:0] d);
    @(negedge clk);
    ram_addr = 8'(a); ram_we = 0;
    @(negedge clk);
    d = ram_rdata;
  endtask
  task automatic wait_tx_idle();
    logic [31:0] st;
    do reg_rd(4, st); while (st[0]);
  endtask
  task automatic rx_push(input logic av, input logic [31:0] d);
    rxq.push_back('{av: av, comm: CMD_WR_DATA, data: d});
  endtask

  task automatic tx_transfer(input int base, input int n, input logic [31:0] haddr,
                             input bit check_timing);
    int c0;
    logic [31:0] d;
    txq.delete(); tx_cycles.delete();
    reg_wr(0, 32'(base)); reg_wr(1, 32'(n)); reg_wr(2, haddr); reg_wr(3, 32'(CMD_WR_DATA));
    @(negedge clk);
    avs_address = 5'd4; avs_writedata = 32'd1; avs_write = 1;
    @(posedge clk); c0 = cycle;
    @(negedge clk) avs_write = 0;
    wait_tx_idle();
    repeat (5) @(negedge clk);
    check(txq.size() == n + 1, $sformatf("tx word count %0d", txq.size()));
    if (txq.size() == n + 1) begin
      check(txq[0].av && txq[0].data == haddr && txq[0].comm == CMD_WR_DATA, "tx address word");
      for (int k = 0; k < n; k++) begin
        check(!txq[k+1].av && txq[k+1].data == {16'hCAFE, 16'(base + k)}, "tx data word");
        if (check_timing) check(tx_cycles[k+1] == tx_cycles[0] + 1 + k, "tx one word per cycle");
      end
      if (check_timing) check(tx_cycles[0] - c0 == 3, $sformatf("start to address word %0d cycles", tx_cycles[0] - c0));
    end
  endtask

  initial begin
    logic [31:0] d;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    ram_addr = 0; ram_we = 0; ram_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 64; i++) ram_write(i, {16'hCAFE, 16'(i)});

    // transmit, no back-pressure: timing
    tx_transfer(3, 5, 32'h0000_0123, 1);
    tx_transfer(10, 50, 32'h0000_0456, 1);
    // transmit with back-pressure
    full_prob = 50;
    tx_transfer(0, 40, 32'h0000_0789, 0);
    full_prob = 0;

    // receive: arm four buffers
    reg_wr(8 + 0, 32'h80); reg_wr(9,  32'd8);
    reg_wr(8 + 4, 32'h90); reg_wr(13, 32'd8);
    reg_wr(8 + 8, 32'hA0); reg_wr(17, 32'd4);
    reg_wr(8 + 12, 32'hB0); reg_wr(21, 32'd8);
    check(!irq, "no interrupt before data");
    // A: 5 words, closed by the address change to B
    rx_push(1, 32'h10); for (int k = 0; k < 5; k++) rx_push(0, 32'hA000 + k);
    // B: 3 words, B repeated (resumed transfer), 2 more words
    rx_push(1, 32'h20); for (int k = 0; k < 3; k++) rx_push(0, 32'hB000 + k);
    rx_push(1, 32'h20); for (int k = 3; k < 5; k++) rx_push(0, 32'hB000 + k);
    // C: 6 words, buffer 2 holds 4 -> closes, the rest go to buffer 3
    rx_push(1, 32'h30); for (int k = 0; k < 6; k++) rx_push(0, 32'hC000 + k);
    // D: no buffer left until one is freed
    rx_push(1, 32'h40); for (int k = 0; k < 3; k++) rx_push(0, 32'hD000 + k);
    repeat (60) @(negedge clk);
    check(irq, "interrupt raised");
    // buffer 3 is closed by the address change to D
    reg_rd(5, d); check(d[3:0] == 4'b1111, $sformatf("done mask %b", d[3:0]));
    reg_rd(10, d); check(d == 5, "buffer 0 count");
    reg_rd(11, d); check(d == 32'h10, "buffer 0 HIBI address");
    reg_rd(14, d); check(d == 5, "buffer 1 count (resumed address)");
    reg_rd(15, d); check(d == 32'h20, "buffer 1 HIBI address");
    reg_rd(18, d); check(d == 4, "buffer 2 count (maximum size)");
    reg_rd(22, d); check(d == 2, "buffer 3 count");
    reg_rd(23, d); check(d == 32'h30, "buffer 3 HIBI address");
    reg_rd(6, d); check(d > 0, "receive stalled without a free buffer");
    check(rxq.size() == 3, "stalled data stays in the wrapper FIFO");
    for (int k = 0; k < 5; k++) begin
      ram_read(32'h80 + k, d); check(d == 32'hA000 + k, "buffer 0 data");
      ram_read(32'h90 + k, d); check(d == 32'hB000 + k, "buffer 1 data");
    end
    for (int k = 0; k < 4; k++) begin ram_read(32'hA0 + k, d); check(d == 32'hC000 + k, "buffer 2 data"); end
    for (int k = 0; k < 2; k++) begin ram_read(32'hB0 + k, d); check(d == 32'hC004 + k, "buffer 3 data"); end
    // free buffers 0 and 1; D goes to buffer 0
    reg_wr(5, 32'b0011);
    repeat (10) @(negedge clk);
    check(rxq.size() == 0, "stalled data drained after release");
    reg_rd(5, d); check(d[3:0] == 4'b1100, "done mask after release");
    reg_wr(5, 32'b1100);
    // E: 6 words to buffer 1 (max 8) while a transmit runs with back-pressure
    rx_push(1, 32'h50); for (int k = 0; k < 6; k++) rx_push(0, 32'hE000 + k);
    rx_push(1, 32'h60);
    full_prob = 30;
    tx_transfer(20, 30, 32'h0000_0abc, 0);
    full_prob = 0;
    repeat (10) @(negedge clk);
    reg_rd(5, d); check(d[1:0] == 2'b11, "D and E buffers done");
    reg_rd(10, d); check(d == 3, "buffer 0 count for D");
    reg_rd(14, d); check(d == 6, "buffer 1 count for E");
    for (int k = 0; k < 3; k++) begin ram_read(32'h80 + k, d); check(d == 32'hD000 + k, "D data"); end
    for (int k = 0; k < 6; k++) begin ram_read(32'h90 + k, d); check(d == 32'hE000 + k, "E data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
