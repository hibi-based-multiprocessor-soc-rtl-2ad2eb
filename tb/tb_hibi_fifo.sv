// tb_hibi_fifo -- self-checking test of the register FIFO.
// Random writes and reads against a queue model; checks head word, empty,
// full and count every cycle, a same-cycle read/write on a full FIFO, and
// that a written word is visible one cycle after the write.
module tb_hibi_fifo;
  localparam int W = 16, D = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  hibi_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // one write, visible next cycle
    wr_en = 1; wr_data = 16'hA5A5;
    @(negedge clk);
    wr_en = 0; model.push_back(16'hA5A5);
    check(!empty && rd_data == 16'hA5A5 && count == 1, "visible one cycle after write");
    for (int i = 0; i < 4000; i++) begin
      wr_data = W'($urandom);
      wr_en   = ($urandom % 3 != 0) && (!full || ($urandom % 2 == 0));
      rd_en   = ($urandom % 2 == 0) && !empty;
      if (full) begin wr_en = 1; rd_en = 1; end   // simultaneous read+write while full
      if (wr_en && full && !rd_en) wr_en = 0;
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(rd_data == model[0], "head word");
    end
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
