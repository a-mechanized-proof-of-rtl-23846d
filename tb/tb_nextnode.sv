// tb_nextnode: exhaustive test of the next-node logic over all 4 nodes,
// 4 func values and both double values, against the transition table
// FETCH -> FETCH/LOAD/INC1/INC1 (func 0/1/2/3), INC1 -> INC2 if double else
// FETCH, INC2 -> FETCH, LOAD -> FETCH.
module tb_nextnode;
  logic [1:0] node, func, node_next;
  logic       double_q;
  int checks = 0, failures = 0;

  nextnode dut (.node(node), .func(func), .double_q(double_q), .node_next(node_next));

  function automatic int expected(int n, int f, int d);
    case (n)
      0:       return (f == 0) ? 0 : (f == 1) ? 3 : 1;
      1:       return d ? 2 : 0;
      default: return 0;
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++)
      for (int f = 0; f < 4; f++)
        for (int d = 0; d < 2; d++) begin
          node = 2'(n); func = 2'(f); double_q = 1'(d);
          #1;
          checks++;
          if (int'(node_next) != expected(n, f, d)) begin
            failures++;
            $display("FAIL node=%0d func=%0d double=%0d next=%0d", n, f, d, node_next);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
