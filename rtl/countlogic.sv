// countlogic: the combinational next-state logic of the counter.
//
// Given the stored state (count, double, node) and the inputs loadin and
// func, it forms the next state:
//   count' = MULTIPLEX(INCLOGIC(count, INCCON(node)), loadin, MPLXCON(node))
//   double' = func[0]
//   node'   = NEXTNODE(node, func, double)
// so FETCH keeps the count, INC1 and INC2 add one each, and LOAD takes
// loadin. The structure (five parts and their connections) is the
// counter's circuit. double_next is a plain wire from func[0], as the
// counter defines it, so it carries no logic of its own. Purely
// combinational; the three state registers are outside, in counter_top.
module countlogic
  import counter_pkg::*;
(
  input  count_t     count,         // COUNT_LATCH content
  input  logic       double_q,      // DOUBLE_LATCH content
  input  logic [1:0] node,          // NODE_LATCH content
  input  count_t     loadin,
  input  logic [1:0] func,
  output count_t     count_next,
  output logic       double_next,
  output logic [1:0] node_next
);
  logic   b1;     // MPLXCON output: 1 selects the incrementer
  logic   b2;     // INCCON output: 1 suppresses the increment
  count_t d;      // INCLOGIC output

  inccon u_inccon (
    .node  (node),
    .noinc (b2)
  );

  mplxcon u_mplxcon (
    .node    (node),
    .mplxsel (b1)
  );

  nextnode u_nextnode (
    .node      (node),
    .func      (func),
    .double_q  (double_q),
    .node_next (node_next)
  );

  inclogic u_inclogic (
    .c     (count),
    .noinc (b2),
    .d     (d)
  );

  multiplex #(.WIDTH(COUNT_W)) u_multiplex (
    .incout (d),
    .loadin (loadin),
    .sel    (b1),
    .q      (count_next)
  );

  assign double_next = func[0];
endmodule
