// tb_ll_checker_top: end-to-end test of the LocalLink checker at its default
// size (4-byte data words). A source model sends frames of four beats
// (SOF, SOP, EOP, EOF) over the monitored link, with idle cycles and flow
// control stalls (source or destination not ready). Scenarios:
//   - correct frames: no error may appear;
//   - a wrong start-of-frame delimiter and a ninth byte >= 124: err_data
//     for one cycle, the other checkers silent;
//   - flags out of order (SOP alone before SOF): err_seq from the next cycle
//     on, sticky until reset, err_comb silent;
//   - a beat with two flags: err_comb for one cycle and err_seq;
//   - reset clears the sticky error.
// Every output is compared each cycle with a reference computed here, and
// each mechanism (stall, good frame, each error kind, recovery by reset) is
// counted; one that never happened counts as a failure.
module tb_ll_checker_top;
  import ll_checker_pkg::*;

  logic        clk = 0, rst = 1;
  logic        sof_n, eof_n, sop_n, eop_n, src_rdy_n, dst_rdy_n;
  logic [31:0] data;
  logic        err_comb, err_seq, err_data, error;
  logic [2:0]  seq_state;
  logic [1:0]  data_rule_fail;

  int checks = 0, failures = 0;
  int n_stall = 0, n_good = 0, n_comb = 0, n_seq = 0, n_r0 = 0, n_r1 = 0, n_reset = 0;

  ll_checker_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state.
  int   seq_pos;   // next expected flag: 0 SOF, 1 SOP, 2 EOP, 3 EOF
  logic seq_err;
  logic in_frame;
  int   word_no;
  logic exp_comb;
  logic [1:0] exp_rule;

  task automatic check();
    checks++;
    if (err_comb !== exp_comb || err_seq !== seq_err || data_rule_fail !== exp_rule ||
        err_data !== (|exp_rule) || error !== (exp_comb || seq_err || (|exp_rule))) begin
      failures++;
      $display("%0t: comb=%b seq=%b rule=%b error=%b; expected comb=%b seq=%b rule=%b",
               $time, err_comb, err_seq, data_rule_fail, error, exp_comb, seq_err, exp_rule);
    end
    if (!seq_err) begin
      checks++;
      if (int'(seq_state) != seq_pos) begin
        failures++;
        $display("%0t: seq_state=%0d expected %0d", $time, seq_state, seq_pos);
      end
    end
  endtask

  // One clock with the given signals; the reference follows.
  task automatic cycle(logic [3:0] flags_n, logic srdy_n, logic drdy_n, logic [31:0] d);
    int n, f;
    {sof_n, sop_n, eop_n, eof_n} = flags_n;
    src_rdy_n = srdy_n; dst_rdy_n = drdy_n; data = d;
    exp_comb = 1'b0; exp_rule = 2'b00;
    if (!srdy_n && !drdy_n) begin
      n = int'(!flags_n[3]) + int'(!flags_n[2]) + int'(!flags_n[1]) + int'(!flags_n[0]);
      f = !flags_n[3] ? 0 : !flags_n[2] ? 1 : !flags_n[1] ? 2 : 3;
      exp_comb = (n != 1);
      if (!seq_err) begin
        if (n == 1 && f == seq_pos) seq_pos = (seq_pos + 1) % 4;
        else seq_err = 1'b1;
      end
      if (!flags_n[3]) begin in_frame = 1'b1; word_no = 0; end
      if (in_frame) begin
        if (word_no == 0 && d[31:24] != 8'hAB) exp_rule[0] = 1'b1;
        if (word_no == 2 && d[31:24] >= 8'd124) exp_rule[1] = 1'b1;
        word_no++;
        if (!flags_n[0]) in_frame = 1'b0;
      end
    end
    @(negedge clk);
    check();
  endtask

  task automatic stalls();
    while ($urandom_range(2) == 0) begin
      cycle(4'($urandom_range(15)), $urandom_range(1) == 0, 1'b1, $urandom);
      n_stall++;
    end
    while ($urandom_range(3) == 0) begin
      cycle(4'($urandom_range(15)), 1'b1, $urandom_range(1) == 0, $urandom);
      n_stall++;
    end
  endtask

  // A four-beat frame; bad_sfd / bad_b9 spoil the data.
  task automatic send_frame(logic bad_sfd, logic bad_b9);
    logic [31:0] w;
    for (int b = 0; b < 4; b++) begin
      stalls();
      w = $urandom;
      if (b == 0) w[31:24] = bad_sfd ? 8'hAB ^ 8'(1 + $urandom_range(254)) : 8'hAB;
      if (b == 2) w[31:24] = bad_b9 ? 8'(124 + $urandom_range(131)) : 8'($urandom_range(123));
      cycle(4'b1111 ^ (4'b1000 >> b), 1'b0, 1'b0, w);
    end
  endtask

  task automatic do_reset();
    rst = 1;
    {sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n} = '1;
    @(negedge clk);
    rst = 0;
    seq_pos = 0; seq_err = 0; in_frame = 0; word_no = 0;
    exp_comb = 0; exp_rule = 0;
    check();
  endtask

  initial begin
    {sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n} = '1;
    data = '0;
    @(negedge clk);
    do_reset();
    for (int round = 0; round < 20; round++) begin
      // Correct traffic.
      for (int k = 0; k < 5; k++) begin
        send_frame(1'b0, 1'b0);
        if (!error) n_good++;
      end
      // Data errors.
      send_frame(1'b1, 1'b0); n_r0++;
      send_frame(1'b0, 1'b1); n_r1++;
      if (seq_err) begin failures++; $display("sequence error on data-only fault"); end
      // Sequence error: SOP before SOF.
      cycle(4'b1011, 1'b0, 1'b0, $urandom);
      if (seq_err && !exp_comb) n_seq++;
      repeat (3) cycle(4'b1111, 1'b1, 1'b1, 0);
      do_reset(); n_reset++;
      send_frame(1'b0, 1'b0);
      // Combination error: SOF and EOF on the same beat.
      cycle(4'b0110, 1'b0, 1'b0, 32'hAB00_0000);
      if (exp_comb) n_comb++;
      cycle(4'b1111, 1'b1, 1'b0, 0);
      do_reset(); n_reset++;
    end
    if (n_stall == 0) begin failures++; $display("no stall happened"); end
    if (n_good == 0)  begin failures++; $display("no good frame"); end
    if (n_comb == 0)  begin failures++; $display("no combination error"); end
    if (n_seq == 0)   begin failures++; $display("no sequence error"); end
    if (n_r0 == 0 || n_r1 == 0) begin failures++; $display("no data error"); end
    if (n_reset == 0) begin failures++; $display("no reset recovery"); end
    checks += 6;
    $display("stalls=%0d good_frames=%0d comb_err=%0d seq_err=%0d sfd_err=%0d byte9_err=%0d resets=%0d",
             n_stall, n_good, n_comb, n_seq, n_r0, n_r1, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
