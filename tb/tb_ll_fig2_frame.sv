// tb_ll_fig2_frame: the checker on a 64-bit LocalLink link (DATA_BYTES = 8)
// carrying a textbook frame of eight beats: header H0 (SOF), H1/P0 (SOP),
// payload P1..P3 with no flag, P4/F0 (EOP), footer F1 with no flag, F2 (EOF),
// with one stall cycle in the middle. The accepted order of the checker
// is strictly one beat per flag, so the flag-less beats are violations:
// err_comb must pulse once after each of P1, P2, P3 and F1, err_seq must rise
// after P1 and stay, and err_data must stay low (byte 1 is 0xAB, byte 9 is
// below 124). A second pass sends only the four flagged beats and must raise
// nothing.
module tb_ll_fig2_frame;

  logic        clk = 0, rst = 1;
  logic        sof_n, eof_n, sop_n, eop_n, src_rdy_n, dst_rdy_n;
  logic [63:0] data;
  logic        err_comb, err_seq, err_data, error;
  logic [2:0]  seq_state;
  logic [1:0]  data_rule_fail;
  int checks = 0, failures = 0, n_comb = 0;

  ll_checker_top #(.DATA_BYTES(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flags = {sof_n, sop_n, eop_n, eof_n}
  task automatic beat(logic [3:0] flags, logic rdy_n, logic [63:0] d,
                      logic exp_comb, logic exp_seq);
    {sof_n, sop_n, eop_n, eof_n} = flags;
    src_rdy_n = rdy_n; dst_rdy_n = 1'b0; data = d;
    @(negedge clk);
    checks++;
    if (err_comb !== exp_comb || err_seq !== exp_seq || err_data !== 1'b0) begin
      failures++;
      $display("%0t: comb=%b seq=%b data=%b expected comb=%b seq=%b data=0",
               $time, err_comb, err_seq, err_data, exp_comb, exp_seq);
    end
    if (err_comb) n_comb++;
  endtask

  initial begin
    {sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n} = '1;
    data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // Full frame with flag-less beats.
    beat(4'b0111, 0, 64'hAB00_0000_0000_0000, 0, 0);  // H0, SOF
    beat(4'b1011, 0, 64'h1111_0000_0000_0000, 0, 0);  // H1/P0, SOP
    beat(4'b1111, 0, 64'h2222_0000_0000_0000, 1, 1);  // P1
    beat(4'b1111, 1, 64'hFFFF_FFFF_FFFF_FFFF, 0, 1);  // stall
    beat(4'b1111, 0, 64'h3333_0000_0000_0000, 1, 1);  // P2
    beat(4'b1111, 0, 64'h4444_0000_0000_0000, 1, 1);  // P3
    beat(4'b1101, 0, 64'h5555_0000_0000_0000, 0, 1);  // P4/F0, EOP
    beat(4'b1111, 0, 64'h6666_0000_0000_0000, 1, 1);  // F1
    beat(4'b1110, 0, 64'h7777_0000_0000_0000, 0, 1);  // F2, EOF
    beat(4'b1111, 1, 64'h0, 0, 1);
    checks++;
    if (n_comb != 4) begin failures++; $display("err_comb pulses %0d, expected 4", n_comb); end
    // Reset, then the flagged beats only.
    rst = 1;
    @(negedge clk);
    rst = 0;
    beat(4'b0111, 0, 64'hAB00_0000_0000_0000, 0, 0);
    beat(4'b1011, 0, 64'h1111_0000_0000_0000, 0, 0);
    beat(4'b1111, 1, 64'h0, 0, 0);
    beat(4'b1101, 0, 64'h5555_0000_0000_0000, 0, 0);
    beat(4'b1110, 0, 64'h7777_0000_0000_0000, 0, 0);
    beat(4'b1111, 1, 64'h0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
