// tb_inccon: exhaustive test of the increment control. noinc must be 1 for
// node FETCH (0) and 0 for the three other nodes.
module tb_inccon;
  logic [1:0] node;
  logic       noinc;
  int checks = 0, failures = 0;

  inccon dut (.node(node), .noinc(noinc));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      node = 2'(n);
      #1;
      checks++;
      if (noinc !== (n == 0)) begin
        failures++;
        $display("FAIL node=%0d noinc=%0b", n, noinc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
