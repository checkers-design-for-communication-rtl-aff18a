// tb_ll_seq_checker: sequence checker against a reference that keeps the
// position in the flag order SOF, SOP, EOP, EOF as a counter. Frames are sent
// with random idle and stall cycles; now and then a wrong beat (a flag out of
// order, a beat with no or two flags) is injected, after which the error must
// appear exactly one cycle later and stay until reset.
module tb_ll_seq_checker;
  import ll_checker_pkg::*;

  logic       clk = 0, rst = 1;
  ll_ctrl_t   ctrl;
  logic       error;
  seq_state_e state;
  int checks = 0, failures = 0, nframes = 0, nerr = 0, nidle = 0;

  ll_seq_checker dut (.clk(clk), .rst(rst), .ctrl(ctrl), .error(error), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: pos = index of the next expected flag, err = sticky error.
  int   pos;
  logic err;

  // Apply ctrl for one cycle and update the reference.
  task automatic beat(ll_ctrl_t c);
    int flag, n;
    ctrl = c;
    if (!err && !c.src_rdy_n && !c.dst_rdy_n) begin
      n = int'(!c.sof_n) + int'(!c.sop_n) + int'(!c.eop_n) + int'(!c.eof_n);
      flag = !c.sof_n ? 0 : !c.sop_n ? 1 : !c.eop_n ? 2 : 3;
      if (n == 1 && flag == pos) begin
        pos = (pos + 1) % 4;
        if (pos == 0) nframes++;
      end else err = 1'b1;
    end else if (!err) nidle++;
    @(negedge clk);
    checks++;
    if (error !== err || (!err && int'(state) != pos)) begin
      failures++;
      $display("%0t: error=%b state=%0d expected error=%b pos=%0d", $time, error, state, err, pos);
    end
  endtask

  function automatic ll_ctrl_t flag_beat(int f);
    ll_ctrl_t c = '1;
    c.src_rdy_n = 0; c.dst_rdy_n = 0;
    case (f)
      0: c.sof_n = 0;
      1: c.sop_n = 0;
      2: c.eop_n = 0;
      default: c.eof_n = 0;
    endcase
    return c;
  endfunction

  function automatic ll_ctrl_t idle_beat();
    ll_ctrl_t c = ll_ctrl_t'($urandom_range(63));
    case ($urandom_range(2))
      0: c.src_rdy_n = 1;
      1: c.dst_rdy_n = 1;
      default: begin c.src_rdy_n = 1; c.dst_rdy_n = 1; end
    endcase
    return c;
  endfunction

  initial begin
    ll_ctrl_t bad_c;
    ctrl = '1;
    pos = 0; err = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 40; round++) begin
      // Some legal frames.
      for (int fr = 0; fr < 5; fr++)
        for (int f = 0; f < 4; f++) begin
          while ($urandom_range(2) == 0) beat(idle_beat());
          beat(flag_beat(f));
        end
      // A few legal beats, then one wrong beat.
      for (int k = 0; k < $urandom_range(3); k++) beat(flag_beat(pos));
      case ($urandom_range(2))
        0: beat(flag_beat((pos + 1 + $urandom_range(2)) % 4));     // out of order
        1: begin bad_c = flag_beat(0); bad_c.sof_n = 1; beat(bad_c); end // no flag
        default: begin bad_c = flag_beat(pos); bad_c.eof_n = 0; bad_c.sof_n = 0; beat(bad_c); end // two flags
      endcase
      if (err) nerr++;
      // Error must hold whatever follows.
      for (int k = 0; k < 4; k++) beat(flag_beat(k));
      beat(idle_beat());
      // Reset returns to S0.
      rst = 1;
      @(negedge clk);
      rst = 0;
      pos = 0; err = 0;
      checks++;
      if (error !== 1'b0 || state != S0) begin
        failures++;
        $display("reset did not return to S0");
      end
    end
    // Directed: from every state, every out-of-order flag.
    for (int st = 0; st < 4; st++)
      for (int f = 0; f < 4; f++)
        if (f != st) begin
          for (int k = 0; k < st; k++) beat(flag_beat(k));
          beat(flag_beat(f));
          if (err) nerr++;
          beat(idle_beat());
          rst = 1;
          @(negedge clk);
          rst = 0;
          pos = 0; err = 0;
        end
    checks++;
    if (nframes < 100 || nerr < 52 || nidle == 0) begin
      failures++;
      $display("coverage: frames=%0d errors=%0d idle=%0d", nframes, nerr, nidle);
    end
    $display("frames=%0d errors=%0d idle=%0d", nframes, nerr, nidle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
