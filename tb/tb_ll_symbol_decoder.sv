// tb_ll_symbol_decoder: exhaustive check of the LocalLink symbol decoder.
// All 64 combinations of the six control signals are applied; the expected
// symbols are computed here from a count of asserted frame flags: a transfer
// with exactly one of SOF/SOP/EOP/EOF asserted gives p0/p1/p2/p3, no transfer
// gives p4, anything else gives no symbol.
module tb_ll_symbol_decoder;
  import ll_checker_pkg::*;

  ll_ctrl_t ctrl;
  ll_sym_t  sym;
  int checks = 0, failures = 0;

  ll_symbol_decoder dut (.ctrl(ctrl), .sym(sym));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp;
    int nflags;
    for (int v = 0; v < 64; v++) begin
      ctrl = ll_ctrl_t'(v[5:0]);
      #1;
      nflags = int'(!ctrl.sof_n) + int'(!ctrl.sop_n) + int'(!ctrl.eop_n) + int'(!ctrl.eof_n);
      exp = '0;
      if (ctrl.src_rdy_n || ctrl.dst_rdy_n) exp[4] = 1'b1;
      else if (nflags == 1) begin
        if (!ctrl.sof_n) exp[0] = 1'b1;
        if (!ctrl.sop_n) exp[1] = 1'b1;
        if (!ctrl.eop_n) exp[2] = 1'b1;
        if (!ctrl.eof_n) exp[3] = 1'b1;
      end
      checks++;
      if (sym !== ll_sym_t'(exp)) begin
        failures++;
        $display("ctrl=%b sym=%b expected=%b", ctrl, sym, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
