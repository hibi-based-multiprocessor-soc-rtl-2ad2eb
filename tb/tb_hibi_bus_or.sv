// tb_hibi_bus_or -- self-checking test of the bus resolution network.
// Drives random words from one owner (others all zero), random idle cycles
// and random full flags, and compares the resolved bus with the owner's word
// and the OR of the full flags computed in the testbench.
module tb_hibi_bus_or;
  import hibi_pkg::*;
  localparam int N = 5;
  hibi_bus_t [N-1:0] agent_out;
  logic      [N-1:0] agent_full;
  hibi_bus_t bus, expect_bus;
  logic      bus_full;
  int checks = 0, failures = 0;

  hibi_bus_or #(.N_AGENTS(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int owner;
      owner      = $urandom % (N + 1);          // N means nobody owns the bus
      agent_out  = '0;
      expect_bus = '0;
      if (owner < N) begin
        expect_bus.data = $urandom;
        expect_bus.av   = 1'($urandom);
        expect_bus.comm = hibi_cmd_e'(3'($urandom % 7 + 1));
        expect_bus.lock = 1'($urandom);
        agent_out[owner] = expect_bus;
      end
      agent_full = N'($urandom);
      #1;
      checks++;
      if (bus !== expect_bus || bus_full !== (agent_full != 0)) begin
        failures++;
        $display("FAIL owner %0d bus %h expected %h", owner, bus, expect_bus);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
