// tb_ll_comb_checker: random control patterns on the combination checker.
// Each cycle the expected error of the previous cycle is compared with the
// registered error output (one-cycle latency). The reference rule: a
// transfer beat is correct only if exactly one frame flag is asserted.
module tb_ll_comb_checker;
  import ll_checker_pkg::*;

  logic     clk = 0, rst = 1;
  ll_ctrl_t ctrl;
  logic     error;
  int checks = 0, failures = 0, nbad = 0, ngood = 0, nidle = 0;

  ll_comb_checker dut (.clk(clk), .rst(rst), .ctrl(ctrl), .error(error));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_bad(ll_ctrl_t c);
    int n;
    if (c.src_rdy_n || c.dst_rdy_n) return 1'b0;
    n = int'(!c.sof_n) + int'(!c.sop_n) + int'(!c.eop_n) + int'(!c.eof_n);
    return n != 1;
  endfunction

  initial begin
    logic exp;
    ctrl = '1;
    repeat (3) @(negedge clk);
    // A bad beat during reset must not raise error.
    ctrl = '0;
    @(negedge clk);
    checks++;
    if (error !== 1'b0) begin failures++; $display("error during reset"); end
    rst = 0;
    ctrl = '1;
    exp = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (error !== exp) begin
        failures++;
        $display("cycle %0d: error=%b expected=%b", i, error, exp);
      end
      // Bias towards legal single-flag beats.
      if ($urandom_range(3) == 0) ctrl = ll_ctrl_t'($urandom_range(63));
      else begin
        ctrl = '1;
        ctrl.src_rdy_n = ($urandom_range(4) == 0);
        ctrl.dst_rdy_n = ($urandom_range(4) == 0);
        case ($urandom_range(3))
          0: ctrl.sof_n = 0;
          1: ctrl.sop_n = 0;
          2: ctrl.eop_n = 0;
          default: ctrl.eof_n = 0;
        endcase
      end
      exp = ref_bad(ctrl);
      if (exp) nbad++;
      else if (ctrl.src_rdy_n || ctrl.dst_rdy_n) nidle++;
      else ngood++;
    end
    checks++;
    if (nbad == 0 || ngood == 0 || nidle == 0) begin
      failures++;
      $display("stimulus did not cover all cases");
    end
    $display("bad=%0d good=%0d idle=%0d", nbad, ngood, nidle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
