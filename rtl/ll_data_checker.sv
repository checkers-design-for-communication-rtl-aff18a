// ll_data_checker: data-contents checker for a LocalLink link.
//
// The third checking level looks into the bytes a frame carries. Two byte
// rules are checked, each "byte number POS of the frame <op> VAL":
//   rule 0: the first byte is the start-of-frame delimiter 0xAB (== 0xAB);
//   rule 1: the ninth byte is lower than 124 (< 124);
// with a data word of DATA_BYTES = 4 bytes. Positions, operators and values
// are parameters, so other byte rules reuse the same hardware.
//
// How it works: a beat counter is cleared by the SOF beat and advanced by
// every transfer beat (SRC_RDY_N and DST_RDY_N both low) of the frame, up to
// and including the EOF beat. Byte number POS sits in word (POS-1)/DATA_BYTES
// of the frame, in lane (POS-1)%DATA_BYTES; when the counter reaches that word
// the lane is compared with the rule's constant. The first byte of a word is
// taken from the most significant lane, DATA[8*DATA_BYTES-1 -: 8]. The lane
// order, counting only transfer beats, and the counter width CNT_W are choices
// of this design. A frame too short to hold a rule's byte is not flagged for
// that rule.
//
// Interface: clk, rst (synchronous, active high), ctrl (ll_ctrl_t), data.
// Timing: error and rule_fail are registered, high for one cycle, the cycle
// after the offending beat; not sticky. Only the data lanes the rules name
// are read, and SOP_N/EOP_N are not needed; lint reports those bits as
// unused, which is expected.
module ll_data_checker
  import ll_checker_pkg::*;
#(
  parameter int          DATA_BYTES = 4,
  parameter int          CNT_W      = 8,
  parameter int          R0_POS     = 1,
  parameter cmp_op_e     R0_OP      = OP_EQ,
  parameter logic [7:0]  R0_VAL     = 8'hAB,
  parameter int          R1_POS     = 9,
  parameter cmp_op_e     R1_OP      = OP_LT,
  parameter logic [7:0]  R1_VAL     = 8'd124
) (
  input  logic                    clk,
  input  logic                    rst,
  input  ll_ctrl_t                ctrl,
  input  logic [8*DATA_BYTES-1:0] data,
  output logic                    error,
  output logic [1:0]              rule_fail
);

  localparam int R0_WORD = (R0_POS - 1) / DATA_BYTES;
  localparam int R0_LANE = (R0_POS - 1) % DATA_BYTES;
  localparam int R1_WORD = (R1_POS - 1) / DATA_BYTES;
  localparam int R1_LANE = (R1_POS - 1) % DATA_BYTES;

  initial begin
    assert (R0_POS >= 1 && R1_POS >= 1)
      else $error("ll_data_checker: byte positions count from 1");
    assert (R0_WORD < 2**CNT_W - 1 && R1_WORD < 2**CNT_W - 1)
      else $error("ll_data_checker: CNT_W too small for the rule positions");
  end

  logic             in_frame;   // inside a frame, after its SOF beat
  logic [CNT_W-1:0] cnt;        // word index of the next beat in the frame
  logic             xfer, sof_beat, eof_beat, frame_beat;
  logic [CNT_W-1:0] word_idx;   // word index of the current beat
  logic [7:0]       byte0, byte1;
  logic [1:0]       fail;

  always_comb begin
    xfer       = is_transfer(ctrl.src_rdy_n, ctrl.dst_rdy_n);
    sof_beat   = xfer && !ctrl.sof_n;
    eof_beat   = xfer && !ctrl.eof_n;
    frame_beat = sof_beat || (xfer && in_frame);
    word_idx   = sof_beat ? '0 : cnt;
    byte0      = data[8*(DATA_BYTES-R0_LANE)-1 -: 8];
    byte1      = data[8*(DATA_BYTES-R1_LANE)-1 -: 8];
    fail[0]    = frame_beat && (word_idx == CNT_W'(R0_WORD)) &&
                 !cond_eval(32'(byte0), R0_OP, 32'(R0_VAL));
    fail[1]    = frame_beat && (word_idx == CNT_W'(R1_WORD)) &&
                 !cond_eval(32'(byte1), R1_OP, 32'(R1_VAL));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame  <= 1'b0;
      cnt       <= '0;
      error     <= 1'b0;
      rule_fail <= '0;
    end else begin
      error     <= |fail;
      rule_fail <= fail;
      if (frame_beat) begin
        in_frame <= !eof_beat;
        // Saturating advance so a long frame cannot wrap onto a rule word.
        if (word_idx != '1) cnt <= word_idx + 1'b1;
        else                cnt <= word_idx;
      end
    end
  end

endmodule
