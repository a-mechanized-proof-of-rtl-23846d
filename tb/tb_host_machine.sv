// tb_host_machine: the host-level state machine under the same random
// command stream and checks as the full counter.
module tb_host_machine;
  logic       clk, rst, double_q;
  logic [5:0] loadin, count;
  logic [1:0] func, node;

  host_machine dut (
    .clk(clk), .rst(rst), .loadin(loadin), .func(func),
    .count(count), .double_q(double_q), .node(node)
  );

  counter_driver #(.NCMD(4000)) drv (
    .clk(clk), .rst(rst), .loadin(loadin), .func(func),
    .count(count), .double_q(double_q), .node(node)
  );
endmodule
