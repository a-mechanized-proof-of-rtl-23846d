// tb_mplxcon: exhaustive test of the multiplexer control. mplxsel must be 0
// for node LOAD (3) and 1 for the three other nodes.
module tb_mplxcon;
  logic [1:0] node;
  logic       mplxsel;
  int checks = 0, failures = 0;

  mplxcon dut (.node(node), .mplxsel(mplxsel));

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
      if (mplxsel !== (n != 3)) begin
        failures++;
        $display("FAIL node=%0d mplxsel=%0b", n, mplxsel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
