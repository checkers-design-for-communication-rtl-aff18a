// ll_checker_top: on-line checker for one LocalLink link between two IP cores.
//
// The checker sits beside the link and only listens: it takes the six
// active-low control signals and the data bus, and reports protocol
// violations at three levels, each on its own error output:
//   err_comb - a transfer beat with a forbidden combination of frame and
//              payload flags (ll_comb_checker);
//   err_seq  - the flags arrive out of order, SOF, SOP, EOP, EOF being the
//              only accepted order (ll_seq_checker, sticky until reset);
//   err_data - a frame's contents break a byte rule: first byte 0xAB, ninth
//              byte below 124, 4-byte words (ll_data_checker).
// error is the OR of the three. Building the three levels side by side on
// one link and OR-ing them is this design's choice.
//
// Interface: clk, rst (synchronous, active high), the LocalLink control
// signals as separate ports, data (8*DATA_BYTES bits). All error outputs
// change one clock after the beat that caused them. seq_state (S0=0, S1=1,
// S2=2, S3=3, Serr=4) and data_rule_fail (bit i: byte rule i failed) are
// brought out for diagnosis.
module ll_checker_top
  import ll_checker_pkg::*;
#(
  parameter int DATA_BYTES = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sof_n,
  input  logic                    eof_n,
  input  logic                    sop_n,
  input  logic                    eop_n,
  input  logic                    src_rdy_n,
  input  logic                    dst_rdy_n,
  input  logic [8*DATA_BYTES-1:0] data,
  output logic                    err_comb,
  output logic                    err_seq,
  output logic                    err_data,
  output logic                    error,
  output logic [2:0]              seq_state,
  output logic [1:0]              data_rule_fail
);

  ll_ctrl_t   ctrl;
  seq_state_e state;

  assign ctrl = '{sof_n: sof_n, eof_n: eof_n, sop_n: sop_n, eop_n: eop_n,
                  src_rdy_n: src_rdy_n, dst_rdy_n: dst_rdy_n};

  ll_comb_checker u_comb (
    .clk   (clk),
    .rst   (rst),
    .ctrl  (ctrl),
    .error (err_comb)
  );

  ll_seq_checker u_seq (
    .clk   (clk),
    .rst   (rst),
    .ctrl  (ctrl),
    .error (err_seq),
    .state (state)
  );

  ll_data_checker #(.DATA_BYTES(DATA_BYTES)) u_data (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .data      (data),
    .error     (err_data),
    .rule_fail (data_rule_fail)
  );

  assign seq_state = state;
  assign error = err_comb || err_seq || err_data;

endmodule
