// counter_top: the 6-bit command-driven counter.
//
// In a primary cycle (node = FETCH, #00) the counter takes a command on
// func: 0 keeps the count, 1 loads loadin, 2 adds one and 3 adds two, all
// modulo 64. The command is carried out over several clock cycles by a
// small control state machine, and the counter is back in FETCH after
// 1 cycle (func 0), 2 cycles (func 1 or 2) or 3 cycles (func 3). A load
// takes the loadin word present in the cycle after the command, not the
// one beside it. func is sampled in every cycle, but only the value in a
// FETCH cycle is a command; double_q then holds func[0] for one cycle.
//
// IMPL selects the description that is built. IMPL_CIRCUIT (default) is
// the gate-level counter: countlogic (INCCON, MPLXCON, NEXTNODE, INCLOGIC,
// MULTIPLEX) feeding three registers COUNT_LATCH, DOUBLE_LATCH and
// NODE_LATCH, whose outputs feed back into it. IMPL_HOST is the same
// machine written as a behavioural state machine; both have identical
// cycle behaviour. The IMPL switch and the synchronous reset (to count 0,
// double 0, node FETCH) are this design's own; the counter itself has
// neither.
module counter_top
  import counter_pkg::*;
#(
  parameter impl_e IMPL = IMPL_CIRCUIT
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  count_t     loadin,     // load word, used in the LOAD cycle
  input  logic [1:0] func,       // command, used in a FETCH cycle
  output count_t     count,      // stored count
  output logic       double_q,   // DOUBLE_LATCH content
  output logic [1:0] node        // control node; #00 = FETCH (primary)
);
  if (IMPL == IMPL_CIRCUIT) begin : g_circuit
    count_t     count_next;
    logic       double_next;
    logic [1:0] node_next;

    countlogic u_countlogic (
      .count       (count),
      .double_q    (double_q),
      .node        (node),
      .loadin      (loadin),
      .func        (func),
      .count_next  (count_next),
      .double_next (double_next),
      .node_next   (node_next)
    );

    state_latch #(.WIDTH(COUNT_W)) u_count_latch (
      .clk (clk), .rst (rst), .d (count_next), .q (count)
    );

    state_latch #(.WIDTH(1)) u_double_latch (
      .clk (clk), .rst (rst), .d (double_next), .q (double_q)
    );

    state_latch #(.WIDTH(NODE_W), .RESET_VALUE(NODE_FETCH)) u_node_latch (
      .clk (clk), .rst (rst), .d (node_next), .q (node)
    );
  end else begin : g_host
    host_machine u_host (
      .clk      (clk),
      .rst      (rst),
      .loadin   (loadin),
      .func     (func),
      .count    (count),
      .double_q (double_q),
      .node     (node)
    );
  end

  // Only the four nodes exist, and every command returns to FETCH in at
  // most three cycles: three non-FETCH cycles in a row never happen.
  logic [1:0] busy_run;
  always_ff @(posedge clk) begin
    if (rst || node == NODE_FETCH) busy_run <= '0;
    else                           busy_run <= busy_run + 1'b1;
  end
  a_returns_to_fetch: assert property (@(posedge clk) disable iff (rst)
    busy_run < 2'd2 || node == NODE_FETCH)
    else $error("counter did not return to FETCH within three cycles");
endmodule
