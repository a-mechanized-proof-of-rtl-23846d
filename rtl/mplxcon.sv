// mplxcon: multiplexer control of the counter's next-state logic.
//
// mplxsel picks the incrementer output (1) or the loadin word (0). It is 0
// only in the LOAD node (node = #11). As in the counter's circuit it is a
// single two-input NAND of the node bits. Purely combinational.
module mplxcon (
  input  logic [1:0] node,     // n1 = node[1], n0 = node[0]
  output logic       mplxsel   // 1: incrementer output, 0: loadin
);
  assign mplxsel = ~(node[0] & node[1]);
endmodule
