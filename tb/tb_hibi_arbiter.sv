// tb_hibi_arbiter -- self-checking test of the distributed arbitration.
// Four copies (agents 0..3) watch the same random lock pattern. Checks that
// all copies hold the same turn, that exactly the agent whose index equals
// the turn is granted, and that the turn follows an independent model of the
// rules: hold while locked, scan on idle cycles, and after a tenure restart at
// agent 0 (priority) or continue with the next agent (round-robin); in TDMA
// mode the turn moves every slot_len cycles whatever the lock flag does, and
// slot_left counts down the cycles of the slot.
module tb_hibi_arbiter;
  import hibi_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic bus_lock;
  arb_mode_e arb_mode;
  logic [N-1:0] grant;
  logic [1:0] turn [N];
  logic [15:0] slot_len;
  logic [15:0] slot_left [N];
  int model_cnt = 0, slot_changes = 0;
  int checks = 0, failures = 0;
  int model_turn;
  bit prev_lock;
  int tenure_ends = 0;

  for (genvar i = 0; i < N; i++) begin : g
    hibi_arbiter #(.N_AGENTS(N), .AGENT_ID(i)) dut (
      .clk, .rst_n, .bus_lock, .arb_mode, .slot_len, .slot_left(slot_left[i]),
      .grant(grant[i]), .turn(turn[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (turn %0d model %0d)", what, $time, turn[0], model_turn);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_lock = 0; arb_mode = ARB_ROUND_ROBIN; slot_len = 16'd5;
    model_turn = 0; prev_lock = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      arb_mode = (m == 0) ? ARB_ROUND_ROBIN : (m == 1) ? ARB_PRIORITY : ARB_TDMA;
      if (m == 3) slot_len = 16'd3;
      #1;
      for (int i = 0; i < 3000; i++) begin
        for (int a = 0; a < N; a++) check(turn[a] == turn[0], "copies agree");
        check(turn[0] == 2'(model_turn), "turn matches model");
        check(grant == (4'b1 << model_turn), "one-hot grant");
        if (arb_mode == ARB_TDMA)
          for (int a = 0; a < N; a++) check(slot_left[a] == ((model_cnt >= slot_len) ? 16'd1 : slot_len - 16'(model_cnt)), "slot cycles left");
        // the granted agent holds the bus for a random tenure length
        bus_lock = ($urandom % 4 != 0) ? ~bus_lock : bus_lock;
        @(posedge clk);
        if (arb_mode == ARB_TDMA) begin
          if (model_cnt + 1 >= slot_len) begin
            model_cnt = 0;
            model_turn = (model_turn + 1) % N;
            slot_changes++;
          end else model_cnt++;
        end else if (bus_lock) ;
        else if (prev_lock && arb_mode == ARB_PRIORITY) begin model_turn = 0; model_cnt = 0; tenure_ends++; end
        else begin
          model_cnt = 0;
          if (prev_lock) tenure_ends++;
          model_turn = (model_turn + 1) % N;
        end
        prev_lock = bus_lock;
        @(negedge clk);
      end
    end
    check(tenure_ends > 100, "tenures were exercised");
    check(slot_changes > 100, "TDMA slots were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
