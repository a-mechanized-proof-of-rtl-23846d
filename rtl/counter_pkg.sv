// counter_pkg: widths, encodings and types shared by the counter modules.
//
// The counter stores a 6-bit word and is commanded by a 2-bit func input.
// Its control state machine has four nodes held in a 2-bit register; the
// node codes (FETCH=#00, INC1=#01, INC2=#10, LOAD=#11) and the func codes
// (0 hold, 1 load, 2 increment once, 3 increment twice) are the ones the
// counter's specification uses. The impl_e choice between the gate-level
// circuit and the host-level state machine is this design's own.
package counter_pkg;

  localparam int unsigned COUNT_W = 6;   // width of count and loadin
  localparam int unsigned FUNC_W  = 2;   // width of func
  localparam int unsigned NODE_W  = 2;   // width of the node register

  typedef logic [COUNT_W-1:0] count_t;

  // Control nodes. Only FETCH is a primary state: a new func is taken there.
  typedef enum logic [NODE_W-1:0] {
    NODE_FETCH = 2'b00,
    NODE_INC1  = 2'b01,
    NODE_INC2  = 2'b10,
    NODE_LOAD  = 2'b11
  } node_e;

  // Commands presented on func during a FETCH cycle.
  typedef enum logic [FUNC_W-1:0] {
    FUNC_HOLD = 2'b00,
    FUNC_LOAD = 2'b01,
    FUNC_INC  = 2'b10,
    FUNC_INC2 = 2'b11
  } func_e;

  // Which description of the counter the top builds.
  typedef enum logic {
    IMPL_CIRCUIT = 1'b0,   // gates of COUNTLOGIC plus the three latches
    IMPL_HOST    = 1'b1    // host-level four-node state machine
  } impl_e;

  // Number of clock cycles from a FETCH cycle to the next FETCH cycle.
  function automatic int unsigned path_cycles(func_e f);
    case (f)
      FUNC_HOLD: return 1;
      FUNC_LOAD: return 2;
      FUNC_INC:  return 2;
      default:   return 3;
    endcase
  endfunction

endpackage
