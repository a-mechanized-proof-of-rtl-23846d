// nextnode: next-node logic of the counter's control state machine.
//
// From FETCH (#00) the next node is FETCH for func 0, LOAD (#11) for
// func 1 and INC1 (#01) for func 2 or 3. From INC1 it is INC2 (#10) when
// the stored double bit is 1, else FETCH. INC2 and LOAD return to FETCH.
// The gates are those of the counter's circuit:
//   x1 = NOR(n1, n0)              node is FETCH
//   x2 = ~f1, x3 = ~n1
//   x4 = NAND(x1, f1)             FETCH and func is 2 or 3
//   x5 = NAND3(x1, f0, x2)        FETCH and func is 1
//   x6 = NAND3(n0, double, x3)    INC1 and double
//   n0' = NAND(x4, x5),  n1' = NAND(x5, x6)
// Purely combinational.
module nextnode (
  input  logic [1:0] node,        // present node {n1, n0}
  input  logic [1:0] func,        // {f1, f0}
  input  logic       double_q,    // content of DOUBLE_LATCH
  output logic [1:0] node_next    // {n1', n0'}
);
  logic x1, x2, x3, x4, x5, x6;

  assign x1 = ~(node[1] | node[0]);
  assign x2 = ~func[1];
  assign x3 = ~node[1];
  assign x4 = ~(x1 & func[1]);
  assign x5 = ~(x1 & func[0] & x2);
  assign x6 = ~(node[0] & double_q & x3);

  assign node_next[0] = ~(x4 & x5);
  assign node_next[1] = ~(x5 & x6);
endmodule
