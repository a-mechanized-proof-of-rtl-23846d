// multiplex: word selector in front of the count register.
//
// q = sel ? incout : loadin, for every bit. Each bit is the NAND-NAND form
// of the counter's circuit: one NAND gates the loadin bit with ~sel, one
// gates the incrementer bit with sel, and a third NAND combines the two.
// The counter uses it 6 bits wide (the default); the width parameter is this
// design's own generalisation. Purely combinational.
module multiplex #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] incout,   // from the incrementer
  input  logic [WIDTH-1:0] loadin,   // external load word
  input  logic             sel,      // 1: incout, 0: loadin
  output logic [WIDTH-1:0] q
);
  logic             sel_n;            // inverter on the select line
  logic [WIDTH-1:0] nand_load;        // NAND(loadin bit, ~sel)
  logic [WIDTH-1:0] nand_inc;         // NAND(incout bit, sel)

  assign sel_n     = ~sel;
  assign nand_load = ~(loadin & {WIDTH{sel_n}});
  assign nand_inc  = ~(incout & {WIDTH{sel}});
  assign q         = ~(nand_load & nand_inc);
endmodule
