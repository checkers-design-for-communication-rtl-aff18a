// ll_checker_pkg: types and helpers shared by the LocalLink protocol checkers.
//
// ll_ctrl_t bundles the six active-low LocalLink control signals. ll_sym_t
// holds the checker automaton's input symbols p0..p4: each one is a
// conjunction or disjunction of conditions of the form
// "signal <operator> constant". cmp_op_e lists the comparison operators a
// condition may use, and cond_eval() evaluates one such condition.
// seq_state_e encodes the states S0..S3 and Serr of the sequence automaton.
package ll_checker_pkg;

  // The six LocalLink control signals, all active low.
  typedef struct packed {
    logic sof_n;      // start of frame
    logic eof_n;      // end of frame
    logic sop_n;      // start of payload
    logic eop_n;      // end of payload
    logic src_rdy_n;  // source has valid data
    logic dst_rdy_n;  // destination accepts data
  } ll_ctrl_t;

  // Input symbols of the checker automaton (one bit each).
  typedef struct packed {
    logic p4;  // no transfer on this cycle
    logic p3;  // transfer carrying EOF only
    logic p2;  // transfer carrying EOP only
    logic p1;  // transfer carrying SOP only
    logic p0;  // transfer carrying SOF only
  } ll_sym_t;

  // Comparison operators of a condition.
  typedef enum logic [2:0] {
    OP_LT = 3'd0,  // <
    OP_GT = 3'd1,  // >
    OP_LE = 3'd2,  // <=
    OP_GE = 3'd3,  // >=
    OP_EQ = 3'd4,  // ==
    OP_NE = 3'd5   // <>
  } cmp_op_e;

  // States of the sequence automaton; SERR is the error state.
  typedef enum logic [2:0] {
    S0   = 3'd0,
    S1   = 3'd1,
    S2   = 3'd2,
    S3   = 3'd3,
    SERR = 3'd4
  } seq_state_e;

  // Evaluate "value <op> constant" on unsigned 32-bit operands.
  function automatic logic cond_eval(input logic [31:0] value,
                                     input cmp_op_e     op,
                                     input logic [31:0] constant);
    unique case (op)
      OP_LT:   return value <  constant;
      OP_GT:   return value >  constant;
      OP_LE:   return value <= constant;
      OP_GE:   return value >= constant;
      OP_EQ:   return value == constant;
      OP_NE:   return value != constant;
      default: return 1'b0;
    endcase
  endfunction

  // A beat moves data only when both ready signals are active.
  function automatic logic is_transfer(input logic src_rdy_n,
                                       input logic dst_rdy_n);
    return !src_rdy_n && !dst_rdy_n;
  endfunction

endpackage
