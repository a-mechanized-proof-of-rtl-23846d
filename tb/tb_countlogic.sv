// tb_countlogic: exhaustive test of the combinational next-state logic over
// every (count, double, node, func) combination, each with several loadin
// words, against the reference one-cycle transition of the control machine.
module tb_countlogic;
  import counter_ref_pkg::*;
  logic [5:0] count, loadin, count_next;
  logic       double_q, double_next;
  logic [1:0] node, func, node_next;
  int checks = 0, failures = 0;

  countlogic dut (
    .count(count), .double_q(double_q), .node(node), .loadin(loadin), .func(func),
    .count_next(count_next), .double_next(double_next), .node_next(node_next)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ec, ed, en;
    for (int c = 0; c < 64; c++)
      for (int d = 0; d < 2; d++)
        for (int n = 0; n < 4; n++)
          for (int f = 0; f < 4; f++)
            for (int k = 0; k < 3; k++) begin
              int l;
              l = (k == 0) ? 63 - c : int'($urandom_range(0, 63));
              count = 6'(c); double_q = 1'(d); node = 2'(n); func = 2'(f); loadin = 6'(l);
              #1;
              ref_next(c, d, n, l, f, ec, ed, en);
              checks++;
              if (int'(count_next) != ec || int'(double_next) != ed || int'(node_next) != en) begin
                failures++;
                if (failures < 10)
                  $display("FAIL c=%0d d=%0d n=%0d f=%0d l=%0d -> %0d %0d %0d, want %0d %0d %0d",
                           c, d, n, f, l, count_next, double_next, node_next, ec, ed, en);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
