// tb_dpram -- self-checking test of the dual-port RAM.
// Random reads and writes on both ports against an array model; checks the
// one-cycle read latency, read-old-data on a same-address write and that
// port B wins a same-address write collision.
module tb_dpram;
  localparam int W = 32, D = 256;
  logic clk = 0;
  logic [7:0] a_addr, b_addr;
  logic a_we, b_we;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dpram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 8'(i); a_wdata = $urandom; model[i] = a_wdata;
      b_we = 0;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      a_addr = 8'($urandom); b_addr = ($urandom % 4 == 0) ? a_addr : 8'($urandom);
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      a_we = 0; b_we = 0;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL port A read %h exp %h", a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL port B read %h exp %h", b_rdata, exp_b); end
    end
    // final sweep of the whole array through port B
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      b_addr = 8'(i);
      @(negedge clk);
      checks++;
      if (b_rdata !== model[i]) begin failures++; $display("FAIL sweep %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
