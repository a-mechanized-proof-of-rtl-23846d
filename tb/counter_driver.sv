// counter_driver: stimulus and checking for a whole counter (the top or the
// host-level state machine), shared by their testbenches.
//
// It resets the counter, then for NCMD commands drives a random func and a
// random loadin in every cycle (biased towards 62 and 63 so that the wraps
// at 64 occur often), including the cycles in which the counter is busy and
// must ignore func. It checks two things against counter_ref_pkg:
//  - every cycle: (count, double, node) equals the reference control
//    machine stepped with the same inputs;
//  - every command: when the counter is next in FETCH, the count equals the
//    one-step specification applied to the count at the command, the func
//    of the command and the loadin of the cycle after it, and the number of
//    cycles taken is 1, 2, 2 or 3 for func 0, 1, 2, 3.
// It also counts how often each behaviour happened (the four paths, the
// wrap of a single and of a double increment, a load whose loadin changed
// between the command cycle and the cycle after it, a command ignored while
// busy, a reset in mid-command) and counts a failure for any that never did.
// Inputs change on the falling clock edge; outputs are read there too.
module counter_driver #(
  parameter int NCMD = 4000
) (
  output logic       clk,
  output logic       rst,
  output logic [5:0] loadin,
  output logic [1:0] func,
  input  logic [5:0] count,
  input  logic       double_q,
  input  logic [1:0] node
);
  import counter_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_path[4];
  int n_wrap1 = 0, n_wrap2 = 0, n_load_late = 0, n_ignored = 0, n_mid_reset = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (NCMD * 4 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_loadin();
    int r;
    r = int'($urandom_range(0, 3));
    if (r == 0) return 62;
    if (r == 1) return 63;
    return int'($urandom_range(0, 63));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int m_count, m_dbl, m_node, c_n, d_n, n_n;
    int cyc, ncmd;
    int s_count, s_func, s_cyc, s_loadin0, s_loadin1;
    bit have_cmd;
    int f, l;

    foreach (n_path[i]) n_path[i] = 0;
    rst = 1'b1; func = 2'd0; loadin = 6'd0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    m_count = 0; m_dbl = 0; m_node = 0;
    cyc = 0; ncmd = 0; have_cmd = 1'b0;
    s_count = 0; s_func = 0; s_cyc = 0; s_loadin0 = 0; s_loadin1 = 0;

    while (ncmd < NCMD) begin
      // state(t) is visible now
      check(int'(count) == m_count && int'(double_q) == m_dbl && int'(node) == m_node,
            $sformatf("state count=%0d double=%0d node=%0d, want %0d %0d %0d",
                      count, double_q, node, m_count, m_dbl, m_node));

      f = int'($urandom_range(0, 3));
      l = pick_loadin();

      if (node == 2'b00) begin
        if (have_cmd) begin
          check(int'(count) == ref_counter(s_count, s_loadin1, s_func),
                $sformatf("command func=%0d from %0d gave %0d", s_func, s_count, count));
          check(cyc - s_cyc == ref_path_len(s_func),
                $sformatf("command func=%0d took %0d cycles", s_func, cyc - s_cyc));
          n_path[s_func]++;
          if (s_func == 2 && s_count == 63) n_wrap1++;
          if (s_func == 3 && s_count >= 62) n_wrap2++;
          if (s_func == 1 && s_loadin0 != s_loadin1) n_load_late++;
          ncmd++;
        end
        have_cmd = 1'b1;
        s_count = int'(count); s_func = f; s_cyc = cyc; s_loadin0 = l;
      end else begin
        if (f != 0) n_ignored++;
        if (cyc == s_cyc + 1) s_loadin1 = l;
      end

      func = 2'(f); loadin = 6'(l);
      ref_next(m_count, m_dbl, m_node, l, f, c_n, d_n, n_n);
      m_count = c_n; m_dbl = d_n; m_node = n_n;
      @(negedge clk);
      cyc++;
    end

    // A reset in the middle of a double increment returns to FETCH, count 0.
    func = 2'd3;
    @(negedge clk);
    func = 2'd0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(count == 6'd0 && node == 2'b00 && double_q == 1'b0, "reset in mid-command");
    n_mid_reset++;

    $display("paths A=%0d B=%0d C=%0d D=%0d, wrap+1=%0d wrap+2=%0d, late load=%0d, ignored func=%0d, mid reset=%0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_wrap1, n_wrap2, n_load_late,
             n_ignored, n_mid_reset);
    foreach (n_path[i]) check(n_path[i] > 0, $sformatf("path %0d never taken", i));
    check(n_wrap1 > 0, "single increment never wrapped");
    check(n_wrap2 > 0, "double increment never wrapped");
    check(n_load_late > 0, "no load with a changed loadin");
    check(n_ignored > 0, "func never ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
