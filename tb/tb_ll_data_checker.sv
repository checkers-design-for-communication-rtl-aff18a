// tb_ll_data_checker: data-contents checker with the default rules (byte 1
// == 0xAB, byte 9 < 124, 4-byte words). Frames of 1 to 6 words are sent with
// random idle and stall cycles and random bytes (the delimiter right most of
// the time, byte 9 anywhere in 0..255). The reference numbers the bytes of
// each frame itself, first byte of a word in DATA[31:24], and predicts the
// registered rule_fail bits one cycle after each beat.
module tb_ll_data_checker;
  import ll_checker_pkg::*;

  localparam int DB = 4;

  logic          clk = 0, rst = 1;
  ll_ctrl_t      ctrl;
  logic [8*DB-1:0] data;
  logic          error;
  logic [1:0]    rule_fail;
  int checks = 0, failures = 0, n_r0 = 0, n_r1 = 0, n_short = 0, n_frames = 0, n_stall = 0;

  ll_data_checker dut (.clk(clk), .rst(rst), .ctrl(ctrl), .data(data),
                       .error(error), .rule_fail(rule_fail));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] exp_fail;

  task automatic check_out();
    checks++;
    if (rule_fail !== exp_fail || error !== (|exp_fail)) begin
      failures++;
      $display("%0t: rule_fail=%b error=%b expected %b", $time, rule_fail, error, exp_fail);
    end
  endtask

  // Stall cycles: one or both ready signals high, random flags and data.
  task automatic stalls();
    while ($urandom_range(2) == 0) begin
      ctrl = ll_ctrl_t'($urandom_range(63));
      if ($urandom_range(1) == 0) ctrl.src_rdy_n = 1; else ctrl.dst_rdy_n = 1;
      data = $urandom;
      exp_fail = 2'b00;
      n_stall++;
      @(negedge clk);
      check_out();
    end
  endtask

  task automatic frame(int words);
    int byte_no;
    n_frames++;
    if (words < 3) n_short++;
    for (int w = 0; w < words; w++) begin
      stalls();
      ctrl = '1;
      ctrl.src_rdy_n = 0; ctrl.dst_rdy_n = 0;
      if (w == 0) ctrl.sof_n = 0;
      if (w == words - 1) ctrl.eof_n = 0;
      data = $urandom;
      exp_fail = 2'b00;
      for (int l = 0; l < DB; l++) begin
        byte_no = w * DB + l + 1;
        if (byte_no == 1) begin
          if ($urandom_range(3) != 0) data[8*(DB-l)-1 -: 8] = 8'hAB;
          if (data[8*(DB-l)-1 -: 8] != 8'hAB) begin exp_fail[0] = 1'b1; n_r0++; end
        end
        if (byte_no == 9) begin
          if (data[8*(DB-l)-1 -: 8] >= 8'd124) begin exp_fail[1] = 1'b1; n_r1++; end
        end
      end
      @(negedge clk);
      check_out();
    end
  endtask

  initial begin
    ctrl = '1; data = '0; exp_fail = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check_out();
    for (int i = 0; i < 400; i++) frame(1 + $urandom_range(5));
    // Data on idle cycles between frames is never checked.
    ctrl = '1; ctrl.src_rdy_n = 0; ctrl.dst_rdy_n = 0; data = '0;
    exp_fail = 2'b00;
    @(negedge clk);
    check_out();
    checks++;
    if (n_r0 == 0 || n_r1 == 0 || n_short == 0 || n_stall == 0) begin
      failures++;
      $display("coverage missing");
    end
    $display("frames=%0d rule0_fail=%0d rule1_fail=%0d short=%0d stalls=%0d",
             n_frames, n_r0, n_r1, n_short, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
