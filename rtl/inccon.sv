// inccon: increment control of the counter's next-state logic.
//
// noinc tells the incrementer to pass the count through unchanged. It is 1
// only in the FETCH node (node = #00), so the count is incremented in INC1
// and INC2 (and the incremented value is discarded in LOAD by the
// multiplexer). As in the counter's circuit it is a single two-input NOR
// of the node bits. Purely combinational.
module inccon (
  input  logic [1:0] node,   // n1 = node[1], n0 = node[0]
  output logic       noinc   // 1: do not increment
);
  assign noinc = ~(node[0] | node[1]);
endmodule
