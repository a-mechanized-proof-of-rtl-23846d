// tb_inclogic: exhaustive test of the gate-level incrementer over all 64
// counts with noinc 0 and 1: d = noinc ? c : (c + 1) mod 64, including the
// wrap from 63 to 0.
module tb_inclogic;
  logic [5:0] c, d;
  logic       noinc;
  int checks = 0, failures = 0;

  inclogic dut (.c(c), .noinc(noinc), .d(d));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int v = 0; v < 64; v++) begin
        noinc = 1'(b); c = 6'(v);
        #1;
        checks++;
        if (int'(d) != (b != 0 ? v : (v == 63 ? 0 : v + 1))) begin
          failures++;
          $display("FAIL noinc=%0d c=%0d d=%0d", b, v, d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
