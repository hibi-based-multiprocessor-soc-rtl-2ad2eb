// tb_hibi_wrapper -- self-checking test of three HIBI wrappers on one segment.
//
// Each agent sends transfers (normal data and high-priority messages) to the
// next agent while the receiving IPs read at random speeds. The receive side
// rebuilds one word stream per HIBI address, and each stream must equal what
// was sent to that address: no loss, duplication or reordering across target
// full retries, send-limit splits and priority interleaving. Also checked:
//   - an uncontended 4-word transfer occupies the bus for 1 address cycle and
//     4 consecutive data cycles, then one release cycle;
//   - a broadcast WR_CFG changes send limit and arbitration mode in every
//     wrapper, after which no tenure carries more data words than the limit;
//   - after a broadcast switch to TDMA, only the slot owner drives the bus
//     and every tenure has released the bus by the last cycle of its slot;
//   - RD_CFG requests sent to a wrapper that is busy with its own traffic are
//     answered with the right register values, in order, to the return
//     address, and the wrapper's own interrupted stream stays intact;
//   - target full, send-limit splits, high-priority words, a refused second
//     RD_CFG request and a resumed stream after an answer each occur.
module tb_hibi_wrapper;
  import hibi_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;

  logic       [N-1:0] tx_we, tx_full, rx_empty, rx_re, full_out;
  hibi_word_t [N-1:0] tx_word, rx_word;
  hibi_bus_t  [N-1:0] bus_out;
  hibi_bus_t          bus;
  logic               bus_full;
  arb_mode_e          arb_mode   [N];
  logic [15:0]        send_limit [N];
  logic [15:0]        slot_len   [N];
  int n_tdma = 0, n_rd_full = 0, n_resume = 0;
  always @(posedge clk) if (rst_n) begin
    if (g[0].dut.rd_req && full_out[0]) n_rd_full++;
    if (2'(g[0].dut.rsp_state) == 2'd3 && !g[0].dut.txf_full[0]) n_resume++;
  end

  for (genvar i = 0; i < N; i++) begin : g
    hibi_wrapper #(.N_AGENTS(N), .AGENT_ID(i), .BASE_ADDR(32'(16 * i)), .ADDR_RANGE(16),
                   .SEND_LIMIT_INIT(64)) dut (
      .clk, .rst_n,
      .tx_we(tx_we[i]), .tx_word(tx_word[i]), .tx_full(tx_full[i]),
      .rx_word(rx_word[i]), .rx_empty(rx_empty[i]), .rx_re(rx_re[i]),
      .bus_out(bus_out[i]), .bus_full_out(full_out[i]), .bus_in(bus), .bus_full_in(bus_full),
      .arb_mode(arb_mode[i]), .send_limit(send_limit[i]), .slot_len(slot_len[i]));

    // TDMA rules, checked on every cycle in TDMA mode
    always @(posedge clk) if (rst_n && arb_mode[i] == ARB_TDMA) begin
      if (bus_out[i].comm != CMD_IDLE) begin
        check(dut.grant, "only the slot owner drives in TDMA mode");
        if (bus_out[i].av) n_tdma++;
      end
      if (i == 0 && dut.slot_left == 16'd1) check(!bus.lock, "bus released in the last cycle of a slot");
    end
  end
  hibi_bus_or #(.N_AGENTS(N)) u_bus (.agent_out(bus_out), .agent_full(full_out), .bus, .bus_full);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] expq [64][$];
  logic [31:0] gotq [64][$];
  int rx_prob [N];
  int n_full = 0, n_split = 0, n_hi = 0, max_run_after_cfg = 0, run = 0;
  bit cfg_done = 0;
  int last_addr_cycle [64];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receive IPs
  logic [31:0] cur_rx_addr [N];
  always @(negedge clk) for (int i = 0; i < N; i++) rx_re[i] <= ($urandom % 100) < rx_prob[i];
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++)
      if (rx_re[i] && !rx_empty[i]) begin
        if (rx_word[i].av) cur_rx_addr[i] = rx_word[i].data;
        else begin
          gotq[cur_rx_addr[i][5:0]].push_back(rx_word[i].data);
          if (is_hi_prio(rx_word[i].comm)) n_hi++;
        end
      end

  // bus monitor
  always @(posedge clk) if (rst_n) begin
    if (bus_full) n_full++;
    if (bus.comm != CMD_IDLE && bus.av) begin
      if (bus.comm != CMD_WR_CFG && last_addr_cycle[bus.data[5:0]] > 0) n_split++;
      run = 0;
    end else if (bus.comm != CMD_IDLE) begin
      run++;
      if (cfg_done && run > max_run_after_cfg) max_run_after_cfg = run;
    end
  end

  task automatic put(input int a, input logic av, input hibi_cmd_e c, input logic [31:0] d);
    @(negedge clk);
    tx_word[a] = '{av: av, comm: c, data: d};
    tx_we[a]   = 1'b0;
    #1;
    while (tx_full[a]) begin
      @(negedge clk);
      #1;
    end
    tx_we[a] = 1'b1;
    @(posedge clk);
    #1 tx_we[a] = 1'b0;
  endtask

  task automatic send(input int a, input logic [31:0] addr, input hibi_cmd_e c, input int len,
                      inout int seq);
    put(a, 1'b1, c, addr);
    last_addr_cycle[addr[5:0]] = 0;
    for (int k = 0; k < len; k++) begin
      logic [31:0] d;
      d = {8'(a), 8'(addr), 16'(seq++)};
      expq[addr[5:0]].push_back(d);
      put(a, 1'b0, c, d);
    end
  endtask

  task automatic traffic(input int a, input int n_transfers, input int max_len);
    int seq = 0;
    for (int t = 0; t < n_transfers; t++) begin
      int dst = (a + 1) % N;
      bit hi = ($urandom % 4 == 0);
      send(a, 32'(16 * dst + (hi ? 8 : 0) + a), hi ? CMD_WR_MSG : CMD_WR_DATA,
           1 + $urandom % max_len, seq);
      repeat ($urandom % 4) @(negedge clk);
    end
  endtask

  // mark that the address of a stream was seen again (retry or split)
  always @(posedge clk) if (rst_n && bus.comm != CMD_IDLE && bus.av) last_addr_cycle[bus.data[5:0]]++;

  initial begin
    int seq0 = 1000;
    int t_addr, t_first;
    tx_we = '0; tx_word = '0;
    for (int i = 0; i < N; i++) rx_prob[i] = 100;
    for (int i = 0; i < 64; i++) last_addr_cycle[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. uncontended 4-word transfer: bus occupancy
    fork
      send(0, 32'd16, CMD_WR_DATA, 4, seq0);
      begin
        while (!(bus.av && bus.comm == CMD_WR_DATA)) @(negedge clk);
        t_addr = 0;
        for (int k = 1; k <= 5; k++) begin
          @(negedge clk);
          if (k <= 4) check(bus.comm == CMD_WR_DATA && !bus.av && bus.lock, "data word each cycle after the address");
          else        check(bus.comm == CMD_IDLE && !bus.lock, "release cycle after the tenure");
        end
      end
    join
    repeat (20) @(negedge clk);

    // 2. random traffic, round-robin, slow receivers
    for (int i = 0; i < N; i++) rx_prob[i] = 10 + 30 * i;
    fork
      traffic(0, 40, 8);
      traffic(1, 40, 8);
      traffic(2, 40, 8);
    join
    for (int i = 0; i < N; i++) rx_prob[i] = 100;
    repeat (300) @(negedge clk);

    // 3. broadcast configuration: send limit 3, priority arbitration
    put(0, 1'b1, CMD_WR_CFG, CFG_BCAST_ADDR);
    put(0, 1'b0, CMD_WR_CFG, {CFG_SEND_LIMIT, 24'd3});
    put(0, 1'b0, CMD_WR_CFG, {CFG_ARB_MODE, 24'(ARB_PRIORITY)});
    repeat (20) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      check(send_limit[i] == 16'd3, "send limit configured in every wrapper");
      check(arb_mode[i] == ARB_PRIORITY, "arbitration mode configured in every wrapper");
    end
    cfg_done = 1;
    n_split = 0;
    for (int i = 0; i < N; i++) rx_prob[i] = 60;
    fork
      traffic(0, 20, 12);
      traffic(1, 20, 12);
      traffic(2, 20, 12);
    join
    for (int i = 0; i < N; i++) rx_prob[i] = 100;
    repeat (400) @(negedge clk);

    // 4. broadcast switch to TDMA with 7-cycle slots
    put(1, 1'b1, CMD_WR_CFG, CFG_BCAST_ADDR);
    put(1, 1'b0, CMD_WR_CFG, {CFG_SLOT_LEN, 24'd7});
    put(1, 1'b0, CMD_WR_CFG, {CFG_ARB_MODE, 24'(ARB_TDMA)});
    repeat (20) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      check(slot_len[i] == 16'd7, "slot length configured in every wrapper");
      check(arb_mode[i] == ARB_TDMA, "TDMA configured in every wrapper");
    end
    for (int i = 0; i < N; i++) rx_prob[i] = 70;
    fork
      traffic(0, 15, 10);
      traffic(1, 15, 10);
      traffic(2, 15, 10);
    join
    for (int i = 0; i < N; i++) rx_prob[i] = 100;
    repeat (400) @(negedge clk);

    // 5. configuration reads from agent 1 to the busy wrapper 0, answers to
    //    address 37 (agent 2)
    for (int i = 0; i < N; i++) rx_prob[i] = 70;
    fork
      traffic(0, 12, 10);
      traffic(2, 12, 10);
      for (int r = 0; r < 3; r++) begin
        put(1, 1'b1, CMD_RD_CFG, 32'd4);
        put(1, 1'b0, CMD_RD_CFG, {CFG_SEND_LIMIT, 24'd37});
        put(1, 1'b0, CMD_RD_CFG, {CFG_ARB_MODE,   24'd37});
        put(1, 1'b0, CMD_RD_CFG, {CFG_SLOT_LEN,   24'd37});
        put(1, 1'b0, CMD_RD_CFG, {8'd9,           24'd37});
        expq[37].push_back(32'd3);
        expq[37].push_back(32'(ARB_TDMA));
        expq[37].push_back(32'd7);
        expq[37].push_back(32'd0);
        repeat (40) @(negedge clk);
      end
    join
    for (int i = 0; i < N; i++) rx_prob[i] = 100;
    repeat (400) @(negedge clk);

    // compare streams
    for (int a = 0; a < 64; a++) begin
      if (expq[a].size() != 0 || gotq[a].size() != 0) begin
        check(expq[a].size() == gotq[a].size(), $sformatf("stream %0d length %0d vs %0d", a, gotq[a].size(), expq[a].size()));
        for (int k = 0; k < expq[a].size() && k < gotq[a].size(); k++)
          check(expq[a][k] == gotq[a][k], $sformatf("stream %0d word %0d", a, k));
      end
    end
    check(max_run_after_cfg <= 3, $sformatf("tenure within send limit (max %0d)", max_run_after_cfg));
    check(n_full > 0, "target full happened");
    check(n_split > 0, "send-limit split happened");
    check(n_hi > 0, "high-priority words received");
    check(n_tdma > 10, "TDMA tenures happened");
    check(n_rd_full > 0, "RD_CFG request refused while an answer was pending");
    check(n_resume > 0, "IP stream resumed after a configuration answer");
    $display("target full cycles %0d, re-sent addresses %0d, hi-priority words %0d", n_full, n_split, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
