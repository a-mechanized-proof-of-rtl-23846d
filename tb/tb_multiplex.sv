// tb_multiplex: exhaustive test of the 6-bit selector over all 64 x 64
// input pairs and both select values: q = sel ? incout : loadin.
module tb_multiplex;
  logic [5:0] incout, loadin, q;
  logic       sel;
  int checks = 0, failures = 0;

  multiplex #(.WIDTH(6)) dut (.incout(incout), .loadin(loadin), .sel(sel), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < 64; a++)
        for (int b = 0; b < 64; b++) begin
          sel = 1'(s); incout = 6'(a); loadin = 6'(b);
          #1;
          checks++;
          if (int'(q) != (s != 0 ? a : b)) begin
            failures++;
            if (failures < 10) $display("FAIL sel=%0d inc=%0d load=%0d q=%0d", s, a, b, q);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
