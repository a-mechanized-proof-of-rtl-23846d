// tb_state_latch: the register must show in each cycle the value presented
// in the cycle before, and its reset value after a reset cycle. Tested at
// 6 bits (as COUNT_LATCH) with a non-zero reset value.
module tb_state_latch;
  logic       clk = 1'b0, rst;
  logic [5:0] d, q, prev;
  int checks = 0, failures = 0;

  state_latch #(.WIDTH(6), .RESET_VALUE(6'h2A)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = 6'h15;
    @(negedge clk);
    checks++;
    if (q !== 6'h2A) begin failures++; $display("FAIL reset value %0h", q); end
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      prev = 6'($urandom);
      d = prev;
      @(negedge clk);
      checks++;
      if (q !== prev) begin failures++; $display("FAIL q=%0h want %0h", q, prev); end
      d = ~prev;              // changing d away from the edge must not show
      #2;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL q changed between edges"); end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (q !== 6'h2A) begin failures++; $display("FAIL second reset %0h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
