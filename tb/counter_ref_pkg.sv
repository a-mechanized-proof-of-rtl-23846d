// counter_ref_pkg: reference model of the counter for the testbenches.
//
// Written with plain integer arithmetic, independently of the RTL:
//   ref_counter  - the one-step specification of the counter: the new count
//                  after a command (0 hold, 1 load, 2 +1, 3 +2, mod 64)
//   ref_path_len - clock cycles from one FETCH cycle to the next
//   ref_next     - one clock cycle of the four-node control machine, as
//                  (count, double, node) -> (count', double', node')
package counter_ref_pkg;

  function automatic int ref_counter(int count, int loadin, int func);
    case (func)
      0:       return count;
      1:       return loadin;
      2:       return (count + 1) % 64;
      default: return (count + 2) % 64;
    endcase
  endfunction

  function automatic int ref_path_len(int func);
    case (func)
      0:       return 1;
      1, 2:    return 2;
      default: return 3;
    endcase
  endfunction

  // node numbers: 0 FETCH, 1 INC1, 2 INC2, 3 LOAD
  function automatic void ref_next(input int count, input int dbl, input int node,
                                   input int loadin, input int func,
                                   output int count_n, output int dbl_n,
                                   output int node_n);
    dbl_n = func % 2;
    case (node)
      0: begin
        count_n = count;
        node_n  = (func == 0) ? 0 : (func == 1) ? 3 : 1;
      end
      1: begin
        count_n = (count + 1) % 64;
        node_n  = (dbl != 0) ? 2 : 0;
      end
      2: begin
        count_n = (count + 1) % 64;
        node_n  = 0;
      end
      default: begin
        count_n = loadin;
        node_n  = 0;
      end
    endcase
  endfunction

endpackage
