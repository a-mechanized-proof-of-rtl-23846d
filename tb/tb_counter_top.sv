// tb_counter_top: end-to-end test of the counter at its default
// configuration (the gate-level circuit): 4000 random commands, each checked
// against the counter's one-step specification and its cycle count, and
// every cycle checked against the reference control machine.
module tb_counter_top;
  logic       clk, rst, double_q;
  logic [5:0] loadin, count;
  logic [1:0] func, node;

  counter_top dut (
    .clk(clk), .rst(rst), .loadin(loadin), .func(func),
    .count(count), .double_q(double_q), .node(node)
  );

  counter_driver #(.NCMD(4000)) drv (
    .clk(clk), .rst(rst), .loadin(loadin), .func(func),
    .count(count), .double_q(double_q), .node(node)
  );
endmodule
