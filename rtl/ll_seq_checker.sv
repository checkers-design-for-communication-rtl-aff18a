// ll_seq_checker: control-signal sequence checker for a LocalLink link.
//
// A deterministic automaton A = (Q, T, P, S0, Serr) over the input symbols
// p0..p4 of ll_symbol_decoder. Its transition list is the LocalLink rule
// set's:
//   (S0,p4):S0  (S0,p0):S1   idle, then SOF
//   (S1,p4):S1  (S1,p1):S2   idle, then SOP
//   (S2,p4):S2  (S2,p2):S3   idle, then EOP
//   (S3,p4):S3  (S3,p3):S0   idle, then EOF closes the frame
// Every (state, input) pair not in the list leads to Serr, which makes the
// machine complete; Serr has no way out except reset, so the error stays
// visible until the system reacts. Like the generated checkers it uses two
// processes: a state register and the combinational next-state function.
//
// Interface: clk, rst (synchronous, active high, returns to S0),
// ctrl (ll_ctrl_t); error is high while the state is Serr, i.e. from the cycle
// after the offending beat on; state shows the current state.
module ll_seq_checker
  import ll_checker_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  ll_ctrl_t   ctrl,
  output logic       error,
  output seq_state_e state
);

  ll_sym_t    sym;
  seq_state_e next;

  ll_symbol_decoder u_sym (.ctrl(ctrl), .sym(sym));

  // State register.
  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= next;
  end

  // Transition function P : Q x T -> Q.
  always_comb begin
    next = SERR;
    unique case (state)
      S0:      if (sym.p4) next = S0; else if (sym.p0) next = S1;
      S1:      if (sym.p4) next = S1; else if (sym.p1) next = S2;
      S2:      if (sym.p4) next = S2; else if (sym.p2) next = S3;
      S3:      if (sym.p4) next = S3; else if (sym.p3) next = S0;
      default: next = SERR;
    endcase
  end

  assign error = (state == SERR);

  // The symbols must be mutually exclusive for the automaton to be
  // deterministic.
  a_sym_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0(sym))
    else $error("ll_seq_checker: overlapping input symbols %b", sym);

endmodule
