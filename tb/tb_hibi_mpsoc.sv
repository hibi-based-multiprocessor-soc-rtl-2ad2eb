// tb_hibi_mpsoc -- end-to-end test of the eight-node HIBI system at its
// default parameters.
//
// Every node gets a small processor model that talks to its DMA registers
// and RAM port: it starts transmit jobs and, on interrupt, copies finished
// receive buffers out, frees them and keeps a per-address record of what
// arrived. Phases:
//   1. the single 5-word transfer from node 0 to node 1, timed from the start
//      register write to the receiver's interrupt, and a 50-word transfer to
//      check that each further word costs exactly one cycle;
//   2. all nodes send to two other nodes at once (round-robin arbitration),
//      with a receiver short of buffers so that target full occurs;
//   3. node 0 broadcasts a configuration (send limit 8, priority arbitration)
//      through its DMA, then all nodes send long transfers and messages while
//      node 2 reads two configuration registers of node 6 (RD_CFG);
//   4. node 3 broadcasts a switch to TDMA with 12-cycle slots, and all nodes
//      send again.
// Every word sent must arrive once, in order, at the right address. Each
// mechanism must occur at least once: bus contention, target full, send-limit
// split, high-priority message, DMA receive stall, buffer closed by maximum
// size, buffer closed by address change, priority-mode tenure, TDMA tenure,
// interrupt, configuration read.
module tb_hibi_mpsoc;
  import hibi_pkg::*;
  localparam int N = 8, S_AW = 5, MEM_AW = 8, RANGE = 16;
  localparam int RX_BASE = 128, RX_MAX = 16, FLUSH = 15;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][S_AW-1:0]   dma_address;
  logic [N-1:0]             dma_write, dma_read, dma_irq, ram_we;
  logic [N-1:0][31:0]       dma_writedata, dma_readdata, ram_wdata, ram_rdata;
  logic [N-1:0][MEM_AW-1:0] ram_addr;
  hibi_bus_t                bus;
  logic                     bus_full;

  hibi_mpsoc dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(negedge clk) cycle++;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected and received streams, per destination node and address offset
  logic [31:0] expq [N][RANGE][$];
  logic [31:0] gotq [N][RANGE][$];

  // mechanism counters
  int n_contend = 0, n_full = 0, n_limit = 0, n_msg = 0, n_stall = 0;
  int n_close_max = 0, n_close_addr = 0, n_prio = 0, n_irq = 0, n_tdma = 0, n_cfg_rd = 0;
  logic [31:0] cfg_words [2];

  // per-node job lists and controls
  typedef struct { int dst; int off; hibi_cmd_e comm; int len; } job_t;
  job_t jobs [N][$];
  int   rx_buffers [N];   // receive buffers each node arms
  bit   run_nodes = 0;
  int   seq [N];
  int   busy_nodes = 0;

  logic [N-1:0]  node_busy;
  logic [15:0]   node_limit [N];
  arb_mode_e     node_mode  [N];

  always @(posedge clk) if (rst_n) begin
    if (bus_full) n_full++;
    if (bus.comm == CMD_WR_MSG) n_msg++;
    if (bus.lock && dut.g_node[0].u_wrap.arb_mode == ARB_PRIORITY) n_prio++;
    if (bus.av && bus.comm != CMD_IDLE && dut.g_node[0].u_wrap.arb_mode == ARB_TDMA) n_tdma++;
    if (bus.comm == CMD_RD_CFG && !bus.av) n_cfg_rd++;
  end

  for (genvar i = 0; i < N; i++) begin : node
    logic [S_AW-1:0]   a_addr;
    logic              a_wr, a_rd, r_we;
    logic [31:0]       a_wdata, r_wdata;
    logic [MEM_AW-1:0] r_addr;
    assign dma_address[i]   = a_addr;
    assign dma_write[i]     = a_wr;
    assign dma_read[i]      = a_rd;
    assign dma_writedata[i] = a_wdata;
    assign ram_addr[i]      = r_addr;
    assign ram_we[i]        = r_we;
    assign ram_wdata[i]     = r_wdata;
    logic [1:0] tx_st;
    assign tx_st            = dut.g_node[i].u_wrap.tx_state;
    assign node_busy[i]     = dut.g_node[i].u_dma.tx_busy;
    assign node_limit[i]    = dut.g_node[i].u_wrap.send_limit;
    assign node_mode[i]     = dut.g_node[i].u_wrap.arb_mode;

    always @(posedge clk) if (rst_n) begin
      if (dut.g_node[i].u_wrap.ready != 0 && !dut.g_node[i].u_wrap.grant && bus.lock) n_contend++;
      if (tx_st == 2'd1 &&   // transfer FSM in its data state
          dut.g_node[i].u_wrap.sent == dut.g_node[i].u_wrap.send_limit &&
          !dut.g_node[i].u_wrap.txf_empty[dut.g_node[i].u_wrap.cur] &&
          !dut.g_node[i].u_wrap.txf_head[dut.g_node[i].u_wrap.cur].av) n_limit++;
      if (dut.g_node[i].u_dma.do_stall) n_stall++;
    end

    task automatic wr(input int a, input logic [31:0] d);
      @(negedge clk);
      a_addr = S_AW'(a); a_wdata = d; a_wr = 1;
      @(negedge clk);
      a_wr = 0;
    endtask
    task automatic rd(input int a, output logic [31:0] d);
      @(negedge clk);
      a_addr = S_AW'(a); a_rd = 1;
      #1 d = dma_readdata[i];
      @(negedge clk);
      a_rd = 0;
    endtask
    task automatic ram_wr(input int a, input logic [31:0] d);
      @(negedge clk);
      r_addr = MEM_AW'(a); r_wdata = d; r_we = 1;
      @(negedge clk);
      r_we = 0;
    endtask
    task automatic ram_rd(input int a, output logic [31:0] d);
      @(negedge clk);
      r_addr = MEM_AW'(a); r_we = 0;
      @(negedge clk);
      d = ram_rdata[i];
    endtask

    // copy finished buffers out, free them
    task automatic service();
      logic [31:0] mask, cnt, haddr, mx, d;
      rd(5, mask);
      for (int c = 0; c < 4; c++) if (mask[c]) begin
        rd(8 + 4 * c + 2, cnt);
        rd(8 + 4 * c + 3, haddr);
        rd(8 + 4 * c + 1, mx);
        if (cnt == mx) n_close_max++; else n_close_addr++;
        check(haddr / RANGE == i, "received address belongs to this node");
        for (int k = 0; k < int'(cnt); k++) begin
          ram_rd(RX_BASE + RX_MAX * c + k, d);
          gotq[i][haddr % RANGE].push_back(d);
        end
        n_irq++;
        wr(5, 32'(1 << c));
      end
    endtask

    task automatic start_job(input job_t j);
      logic [31:0] st;
      for (int k = 0; k < j.len; k++) begin
        logic [31:0] d;
        if (j.comm == CMD_WR_CFG || j.comm == CMD_RD_CFG) begin
          d = cfg_words[k];
        end else begin
          d = {8'(i), 8'(j.dst * RANGE + j.off), 16'(seq[i])};
          seq[i]++;
          expq[j.dst][j.off].push_back(d);
        end
        ram_wr(k, d);
      end
      wr(0, 0);
      wr(1, 32'(j.len));
      wr(2, (j.comm == CMD_WR_CFG) ? CFG_BCAST_ADDR : 32'(j.dst * RANGE + j.off));
      wr(3, 32'(j.comm));
      wr(4, 1);
    endtask

    initial begin
      logic [31:0] st;
      a_addr = 0; a_wr = 0; a_rd = 0; a_wdata = 0; r_addr = 0; r_we = 0; r_wdata = 0;
      seq[i] = 0;
      wait (run_nodes);
      forever begin
        if (!run_nodes) begin
          @(negedge clk);
        end else if (dma_irq[i]) begin
          service();
        end else if (jobs[i].size() > 0) begin
          rd(4, st);
          if (!st[0]) begin
            busy_nodes++;
            start_job(jobs[i].pop_front());
            busy_nodes--;
          end
        end else begin
          @(negedge clk);
        end
      end
    end

    task automatic arm(input int nbuf);
      for (int c = 0; c < nbuf; c++) begin
        wr(8 + 4 * c, RX_BASE + RX_MAX * c);
        wr(8 + 4 * c + 1, RX_MAX);
      end
    endtask
  end

  // arm buffers of every node (before the node processes run)
  task automatic arm_all();
    node[0].arm(4); node[1].arm(4); node[2].arm(4); node[3].arm(4);
    node[4].arm(4); node[5].arm(1); node[6].arm(4); node[7].arm(4);
  endtask

  function automatic bit all_idle();
    for (int i = 0; i < N; i++) if (jobs[i].size() > 0 || node_busy[i]) return 0;
    return busy_nodes == 0;
  endfunction

  task automatic drain(input int extra);
    while (!all_idle()) @(negedge clk);
    repeat (extra) @(negedge clk);
  endtask

  int t0, t_irq, t_bus, lat5, lat50, blat5, blat50;

  task automatic timed(input int len, output int lat, output int blat);
    job_t j;
    j = '{dst: 1, off: 0, comm: CMD_WR_DATA, len: len};
    // buffer 0 of node 1 takes exactly this transfer
    node[1].wr(8, RX_BASE); node[1].wr(9, 32'(len));
    for (int k = 0; k < len; k++) begin
      logic [31:0] d;
      d = {8'd0, 8'(RANGE), 16'(seq[0])};
      seq[0]++;
      expq[1][0].push_back(d);
      node[0].ram_wr(k, d);
    end
    node[0].wr(0, 0); node[0].wr(1, 32'(len)); node[0].wr(2, 32'(RANGE)); node[0].wr(3, 32'(CMD_WR_DATA));
    @(negedge clk);
    node[0].a_addr = 4; node[0].a_wdata = 1; node[0].a_wr = 1;
    @(posedge clk) t0 = cycle;
    @(negedge clk) node[0].a_wr = 0;
    while (!(bus.av && bus.comm == CMD_WR_DATA)) @(posedge clk);
    t_bus = cycle;
    for (int w = 0; w < 2000 && !dma_irq[1]; w++) @(negedge clk);
    check(dma_irq[1], "timed transfer reaches node 1");
    @(posedge clk) t_irq = cycle;
    lat  = t_irq - t0;
    blat = t_irq - t_bus;
    if (dma_irq[1]) node[1].service();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);

    // 1. the 5-word transfer of the timing example, then 16 words
    timed(5, lat5, blat5);
    repeat (30) @(negedge clk);
    timed(50, lat50, blat50);
    $display("5-word transfer: %0d cycles from start write to receiver interrupt, %0d from the address on the bus", lat5, blat5);
    $display("50-word transfer: %0d cycles, %0d from the address on the bus", lat50, blat50);
    check(blat50 - blat5 == 45, "one further cycle per further word");
    check(lat5 <= 27, "5-word latency no worse than the reference 27 cycles");
    node[1].wr(9, RX_MAX);

    // 2. everyone sends to two others at once; node 5 has a single buffer
    arm_all();
    for (int i = 0; i < N; i++) begin
      for (int t = 0; t < 3; t++) begin
        jobs[i].push_back('{dst: (i + 1) % N, off: i, comm: CMD_WR_DATA, len: 6 + (i + t) % 10});
        jobs[i].push_back('{dst: (i + 3) % N, off: i, comm: CMD_WR_DATA, len: 4 + t});
      end
    end
    jobs[4].push_back('{dst: 5, off: 4, comm: CMD_WR_DATA, len: 40});
    run_nodes = 1;
    drain(800);

    // 3. broadcast configuration, then long transfers and messages
    cfg_words[0] = {CFG_SEND_LIMIT, 24'd8};
    cfg_words[1] = {CFG_ARB_MODE, 24'(ARB_PRIORITY)};
    jobs[0].push_back('{dst: 0, off: 0, comm: CMD_WR_CFG, len: 2});
    drain(50);
    for (int i = 0; i < N; i++) begin
      check(node_limit[i] == 16'd8, "send limit reached every wrapper");
      check(node_mode[i] == ARB_PRIORITY, "priority mode reached every wrapper");
    end
    // node 2 reads send limit and arbitration mode of the busy node 6; the
    // answers arrive at node 2, address offset 12
    cfg_words[0] = {CFG_SEND_LIMIT, 24'(2 * RANGE + 12)};
    cfg_words[1] = {CFG_ARB_MODE,   24'(2 * RANGE + 12)};
    jobs[2].push_back('{dst: 6, off: 3, comm: CMD_RD_CFG, len: 2});
    expq[2][12].push_back(32'd8);
    expq[2][12].push_back(32'(ARB_PRIORITY));
    for (int i = 0; i < N; i++) begin
      jobs[i].push_back('{dst: (i + 2) % N, off: i, comm: CMD_WR_DATA, len: 30});
      jobs[i].push_back('{dst: (i + 5) % N, off: 8 + i / 2, comm: CMD_WR_MSG, len: 3});
      jobs[i].push_back('{dst: (i + 2) % N, off: i, comm: CMD_WR_DATA, len: 12});
    end
    drain(1500);

    // 4. broadcast switch to TDMA, then traffic again
    cfg_words[0] = {CFG_SLOT_LEN, 24'd12};
    cfg_words[1] = {CFG_ARB_MODE, 24'(ARB_TDMA)};
    jobs[3].push_back('{dst: 0, off: 0, comm: CMD_WR_CFG, len: 2});
    drain(50);
    for (int i = 0; i < N; i++) check(node_mode[i] == ARB_TDMA, "TDMA reached every wrapper");
    for (int i = 0; i < N; i++) begin
      jobs[i].push_back('{dst: (i + 4) % N, off: i, comm: CMD_WR_DATA, len: 20});
      jobs[i].push_back('{dst: (i + 6) % N, off: i, comm: CMD_WR_DATA, len: 7});
    end
    drain(1500);
    // a receive buffer stays open until the address changes: a last one-word
    // transfer to address offset FLUSH closes the open buffers
    for (int i = 0; i < N; i++)
      for (int d = 1; d < N; d++)
        jobs[i].push_back('{dst: (i + d) % N, off: FLUSH, comm: CMD_WR_DATA, len: 1});
    drain(1500);
    run_nodes = 0;
    repeat (10) @(negedge clk);

    // compare every stream
    for (int n = 0; n < N; n++)
      for (int o = 0; o < RANGE; o++)
        if (o != FLUSH && (expq[n][o].size() != 0 || gotq[n][o].size() != 0)) begin
          check(expq[n][o].size() == gotq[n][o].size(),
                $sformatf("node %0d address %0d: %0d words, expected %0d", n, o, gotq[n][o].size(), expq[n][o].size()));
          for (int k = 0; k < expq[n][o].size() && k < gotq[n][o].size(); k++)
            check(expq[n][o][k] == gotq[n][o][k], $sformatf("node %0d address %0d word %0d", n, o, k));
        end
    $display("contention %0d, target full %0d, send-limit splits %0d, message words %0d, rx stalls %0d",
             n_contend, n_full, n_limit, n_msg, n_stall);
    $display("closed at max size %0d, closed by address change %0d, priority-mode cycles %0d, TDMA tenures %0d, interrupts %0d, config read words %0d",
             n_close_max, n_close_addr, n_prio, n_tdma, n_irq, n_cfg_rd);
    check(n_contend > 0, "bus contention happened");
    check(n_full > 0, "target full happened");
    check(n_limit > 0, "send-limit split happened");
    check(n_msg > 0, "high-priority message sent");
    check(n_stall > 0, "DMA receive stall happened");
    check(n_close_max > 0, "buffer closed at maximum size");
    check(n_close_addr > 0, "buffer closed by address change");
    check(n_prio > 0, "priority arbitration used");
    check(n_tdma > 0, "TDMA arbitration used");
    check(n_irq > 0, "interrupts serviced");
    check(n_cfg_rd > 0, "configuration read requested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
