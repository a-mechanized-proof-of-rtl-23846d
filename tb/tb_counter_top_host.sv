// tb_counter_top_host: end-to-end test of the counter built with
// IMPL_HOST (the behavioural four-node state machine in place of the gate
// netlist), under the same random commands and checks as tb_counter_top.
module tb_counter_top_host;
  logic       clk, rst, double_q;
  logic [5:0] loadin, count;
  logic [1:0] func, node;

  counter_top #(.IMPL(counter_pkg::IMPL_HOST)) dut (
    .clk(clk), .rst(rst), .loadin(loadin), .func(func),
    .count(count), .double_q(double_q), .node(node)
  );

  counter_driver #(.NCMD(4000)) drv (
    .clk(clk), .rst(rst), .loadin(loadin), .func(func),
    .count(count), .double_q(double_q), .node(node)
  );

  // The driver ends the run; this bounds it should the driver not.
  initial begin
    #1000000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
