// state_latch: clocked state register of the counter.
//
// q(t+1) = d(t): the value presented in one clock cycle is held for the
// whole of the next, which is the only timing the counter's proof assumes
// of its latches. The counter uses three: COUNT_LATCH (6 bits),
// DOUBLE_LATCH (1 bit) and NODE_LATCH (2 bits). Edge-triggered on the
// rising clock edge. The synchronous active-high reset to RESET_VALUE is
// this design's addition, so that the machine starts in a known primary
// state; the register itself has no reset in the counter's circuit.
module state_latch #(
  parameter int unsigned     WIDTH       = 1,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,   // synchronous, active high
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VALUE;
    else     q <= d;
  end
endmodule
