// ll_comb_checker: signal-combination checker for a LocalLink link.
//
// The lowest of the three checking levels: it looks at one cycle at a time
// and flags a transfer beat (SRC_RDY_N and DST_RDY_N both low) whose frame
// and payload flags are not one of the correct combinations p0..p3, i.e.
// not exactly one of SOF_N, SOP_N, EOP_N, EOF_N asserted. Idle cycles (p4)
// are always correct. It has no memory of earlier cycles; ordering is the
// sequence checker's job.
//
// Interface: clk, rst (synchronous, active high), ctrl (ll_ctrl_t).
// Timing: error is registered; it is high for one cycle, the cycle after each
// offending beat, and is not sticky. Registering the output and the reset
// behaviour are choices of this design.
module ll_comb_checker
  import ll_checker_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  ll_ctrl_t ctrl,
  output logic     error
);

  ll_sym_t sym;
  logic    bad;

  ll_symbol_decoder u_sym (.ctrl(ctrl), .sym(sym));

  // A cycle is correct when it matches one of the listed symbols.
  assign bad = !(sym.p0 || sym.p1 || sym.p2 || sym.p3 || sym.p4);

  always_ff @(posedge clk) begin
    if (rst) error <= 1'b0;
    else     error <= bad;
  end

endmodule
