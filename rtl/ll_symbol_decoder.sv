// ll_symbol_decoder: computes the input symbols p0..p4 of the LocalLink
// checker automaton from the six control signals.
//
// Each symbol is one combinational function of the control inputs, built
// from conditions "signal == constant" joined by and/or, as in the symbol
// list of the LocalLink rule set:
//   p0..p3: a transfer (SRC_RDY_N == 0 and DST_RDY_N == 0) on which exactly
//           one of SOF_N, SOP_N, EOP_N, EOF_N (in that order) is 0;
//   p4:     no transfer, SRC_RDY_N == 1 or DST_RDY_N == 1.
// The rule set as published writes p4 with "== 0"; that reading would overlap
// p0..p3 and make the automaton nondeterministic, so p4 is taken here as the
// idle cycle, which keeps the symbols mutually exclusive.
//
// Interface: ctrl (ll_ctrl_t) in, sym (ll_sym_t) out. Purely combinational,
// no clock.
module ll_symbol_decoder
  import ll_checker_pkg::*;
(
  input  ll_ctrl_t ctrl,
  output ll_sym_t  sym
);

  logic xfer;

  always_comb begin
    xfer   = cond_eval(32'(ctrl.src_rdy_n), OP_EQ, 32'd0) &&
             cond_eval(32'(ctrl.dst_rdy_n), OP_EQ, 32'd0);
    sym.p0 = xfer && cond_eval(32'(ctrl.sof_n), OP_EQ, 32'd0)
                  && cond_eval(32'(ctrl.sop_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.eop_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.eof_n), OP_EQ, 32'd1);
    sym.p1 = xfer && cond_eval(32'(ctrl.sof_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.sop_n), OP_EQ, 32'd0)
                  && cond_eval(32'(ctrl.eop_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.eof_n), OP_EQ, 32'd1);
    sym.p2 = xfer && cond_eval(32'(ctrl.sof_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.sop_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.eop_n), OP_EQ, 32'd0)
                  && cond_eval(32'(ctrl.eof_n), OP_EQ, 32'd1);
    sym.p3 = xfer && cond_eval(32'(ctrl.sof_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.sop_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.eop_n), OP_EQ, 32'd1)
                  && cond_eval(32'(ctrl.eof_n), OP_EQ, 32'd0);
    sym.p4 = cond_eval(32'(ctrl.src_rdy_n), OP_EQ, 32'd1) ||
             cond_eval(32'(ctrl.dst_rdy_n), OP_EQ, 32'd1);
  end

endmodule
