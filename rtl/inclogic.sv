// inclogic: 6-bit conditional incrementer of the counter, at gate level.
//
// d = noinc ? c : c + 1 (mod 64), so 63 becomes 0. The carry into each bit
// is formed directly, not rippled: with b' = ~noinc,
//   x1 = NAND(b', c0)               carry into bit 1, active low
//   x2 = NAND3(b', c0, c1)          carry into bit 2
//   x3 = NAND4(b', c0, c1, c2)      carry into bit 3
//   x4 = NAND(~x3, c3)              carry into bit 4, reusing x3
//   x5 = NAND3(~x3, c3, c4)         carry into bit 5
// and bit i of the result is XNOR(ci, active-low carry), with bit 0 using
// noinc itself as its active-low carry. This is the gate netlist of the
// counter's circuit; the NAND4 split that limits gate fan-in to four is
// that circuit's. Purely combinational; the width is fixed at 6 because
// the netlist is.
module inclogic
  import counter_pkg::*;
(
  input  count_t c,       // present count, c[0] least significant
  input  logic   noinc,   // 1: pass c through unchanged
  output count_t d        // c or c+1 mod 64
);
  logic b_n;              // b'  : inverted noinc (increment enable)
  logic x1, x2, x3, x3_n, x4, x5;

  assign b_n  = ~noinc;
  assign x1   = ~(b_n & c[0]);
  assign x2   = ~(b_n & c[0] & c[1]);
  assign x3   = ~(b_n & c[0] & c[1] & c[2]);
  assign x3_n = ~x3;
  assign x4   = ~(x3_n & c[3]);
  assign x5   = ~(x3_n & c[3] & c[4]);

  assign d[0] = ~(c[0] ^ noinc);
  assign d[1] = ~(c[1] ^ x1);
  assign d[2] = ~(c[2] ^ x2);
  assign d[3] = ~(c[3] ^ x3);
  assign d[4] = ~(c[4] ^ x4);
  assign d[5] = ~(c[5] ^ x5);
endmodule
