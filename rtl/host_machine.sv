// host_machine: the counter described as a four-node state machine.
//
// This is the counter's intermediate level of description, the host
// machine, written in behavioural RTL instead of gates. Its state is
// (count, double, node). In every cycle double takes func[0]; by node:
//   FETCH: count kept; node <- FETCH (func 0), LOAD (func 1), INC1 (2, 3)
//   INC1 : count <- count+1 mod 64; node <- INC2 if double, else FETCH
//   INC2 : count <- count+1 mod 64; node <- FETCH
//   LOAD : count <- loadin (the word present in the LOAD cycle); FETCH
// It has the same ports and cycle timing as the gate-level circuit, which
// computes the same next-state function. The synchronous reset to
// (0, 0, FETCH) is this design's addition.
module host_machine
  import counter_pkg::*;
(
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  count_t     loadin,
  input  logic [1:0] func,
  output count_t     count,
  output logic       double_q,
  output logic [1:0] node
);
  node_e  node_q, node_d;
  count_t count_d;
  logic   double_d;

  always_comb begin
    count_d  = count;
    node_d   = NODE_FETCH;
    double_d = func[0];          // "twice" is sampled in every node
    unique case (node_q)
      NODE_FETCH: begin
        unique case (func_e'(func))
          FUNC_HOLD: node_d = NODE_FETCH;
          FUNC_LOAD: node_d = NODE_LOAD;
          default:   node_d = NODE_INC1;
        endcase
      end
      NODE_INC1: begin
        count_d = count + 1'b1;  // wraps 63 -> 0
        node_d  = double_q ? NODE_INC2 : NODE_FETCH;
      end
      NODE_INC2: begin
        count_d = count + 1'b1;
        node_d  = NODE_FETCH;
      end
      NODE_LOAD: begin
        count_d = loadin;
        node_d  = NODE_FETCH;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      double_q <= 1'b0;
      node_q   <= NODE_FETCH;
    end else begin
      count    <= count_d;
      double_q <= double_d;
      node_q   <= node_d;
    end
  end

  assign node = node_q;
endmodule
