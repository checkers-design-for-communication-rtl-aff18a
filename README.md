# LocalLink protocol checker

Two IP cores inside an FPGA talk over a Xilinx LocalLink link. A bug in either
core, or a fault in the fabric, often shows up first as a broken protocol: a
frame flag missing, flags in the wrong order, a header byte that is wrong.
This design is an on-line checker for such a link. It sits beside the link,
drives nothing, and raises an error output when it sees traffic that breaks
the protocol rules. A fault-tolerant system can use that output to start
recovery, for example by reconfiguring the faulty core.

The checker follows a published approach to generating protocol checkers.
In that approach the protocol rules are written as a finite-state machine
`A = (Q, T, P, S0, Serr)`:

* `T` is a set of *input symbols*. Each symbol is an and/or combination of
  *conditions*, and each condition compares one signal with a constant
  (`<`, `>`, `<=`, `>=`, `==`, `<>`).
* `P` is a list of transitions `(state, symbol) : next state`.
* Any state/symbol pair the list does not name leads to the error state
  `Serr`.

A generator turns such a description into HDL: one small combinational
process per symbol, a state register, and a next-state process. The RTL here
is that generated structure, written by hand for the LocalLink rule set the
approach was demonstrated with.

## Three levels of checking

The rules come in three levels of increasing cost. Each level is a separate
module with its own error output.

| level | module | what it catches | output timing |
|---|---|---|---|
| signal combination | `ll_comb_checker` | a transfer beat whose frame flags are not one of the allowed combinations | one-cycle pulse, the cycle after the beat |
| signal sequence | `ll_seq_checker` | flags arriving out of order | high from the cycle after the beat until reset |
| data contents | `ll_data_checker` | a byte of the frame that breaks a byte rule | one-cycle pulse, the cycle after the beat |

`ll_checker_top` puts all three on one link. It ORs them into `error`, and it
brings out the sequence state and the failing data rule for diagnosis.

## LocalLink in brief

All control signals are active low. A *transfer beat* is a clock cycle with
both `SRC_RDY_N` (the source has data) and `DST_RDY_N` (the destination
accepts it) low. Any other cycle is an idle or stall cycle. Nothing moves on
such a cycle, and the checkers ignore flags and data on it. A frame is marked
by four flags: `SOF_N`/`EOF_N` for start/end of frame and `SOP_N`/`EOP_N` for
start/end of payload. The link also has a `REM_N` bus, which gives the number
of valid bytes in the last word. None of the rules reads it, so the checker
has no `REM_N` input.

## The rule set (the part to understand first)

`ll_symbol_decoder` computes five symbols from the control signals:

| symbol | condition |
|---|---|
| p0 | transfer, `SOF_N==0`, `SOP_N==1`, `EOP_N==1`, `EOF_N==1` |
| p1 | transfer, `SOF_N==1`, `SOP_N==0`, `EOP_N==1`, `EOF_N==1` |
| p2 | transfer, `SOF_N==1`, `SOP_N==1`, `EOP_N==0`, `EOF_N==1` |
| p3 | transfer, `SOF_N==1`, `SOP_N==1`, `EOP_N==1`, `EOF_N==0` |
| p4 | no transfer: `SRC_RDY_N==1` or `DST_RDY_N==1` |

"Transfer" means `SRC_RDY_N==0` and `DST_RDY_N==0`. The published rule set
writes p4 as `SRC_RDY_N==0 or DST_RDY_N==0`. Taken literally, p4 would then
also hold on every beat that matches p0..p3, and the machine could take two
transitions at once. That contradicts the requirement that the machine be
deterministic, so p4 is built as the idle cycle. With that reading the five
symbols are mutually exclusive. An assertion in `ll_seq_checker` checks this.

The sequence automaton has states S0..S3 and Serr:

```
(S0,p4):S0  (S0,p0):S1      wait for SOF
(S1,p4):S1  (S1,p1):S2      wait for SOP
(S2,p4):S2  (S2,p2):S3      wait for EOP
(S3,p4):S3  (S3,p3):S0      wait for EOF, frame complete
anything else      :Serr    stays there until reset
```

The combination checker uses the same symbols without the state. A transfer
beat that matches none of p0..p3 is an error.

**Consequence to be aware of.** This rule set accepts only frames of exactly
four transfer beats: SOF, SOP, EOP and EOF, each on a beat of its own, with
any number of idle cycles between them. Many real LocalLink frames differ:

* body beats that carry no flag, which both checkers report as violations;
* SOF and SOP on the same beat, which the combination checker reports;
* single-beat frames, which the combination checker reports.

`tb/tb_ll_fig2_frame.sv` shows this on a typical eight-beat frame with a
64-bit bus. To check a different protocol profile, change the symbol
equations in `ll_symbol_decoder` and the transition `case` in
`ll_seq_checker`. Both are written so that they map one-to-one onto a rule
list.

## Data rules

`ll_data_checker` counts the transfer beats of a frame. The SOF beat is word 0,
and the count stops after the EOF beat. Each of its two byte rules reads
"byte number POS of the frame `op` VAL". Byte POS lies in word
`(POS-1)/DATA_BYTES`, in lane `(POS-1)%DATA_BYTES`. The defaults are the rules
from the published example, with 4-byte words:

* rule 0: byte 1 `== 0xAB`, the start-of-frame delimiter (word 0, lane 0);
* rule 1: byte 9 `< 124` (word 2, lane 0).

Lane 0, the first byte of a word, is taken as the most significant byte,
`DATA[8*DATA_BYTES-1 -: 8]`. This design chose that order. Change the
`byteN` selects if your cores number bytes the other way. If a frame ends
before a rule's byte arrives, that rule is not checked. The word counter is
`CNT_W = 8` bits wide and saturates.

## Modules

| file | contents |
|---|---|
| `rtl/ll_checker_pkg.sv` | `ll_ctrl_t` (the six control signals), `ll_sym_t`, `cmp_op_e` and `cond_eval()` (a condition), `seq_state_e`, `is_transfer()` |
| `rtl/ll_symbol_decoder.sv` | combinational symbols p0..p4 |
| `rtl/ll_comb_checker.sv` | combination checker |
| `rtl/ll_seq_checker.sv` | sequence automaton (state register plus next-state process) |
| `rtl/ll_data_checker.sv` | byte-rule checker; parameters `DATA_BYTES`, `CNT_W`, `R{0,1}_POS/OP/VAL` |
| `rtl/ll_checker_top.sv` | the three checkers on one link; parameter `DATA_BYTES` (default 4) |

All modules use one clock, `clk`. Reset is synchronous and active high
(`rst`). It clears the error outputs and returns the automaton to S0. The
published approach gives the checker a reset pin but not its polarity; this
design chose synchronous, active high. The top's ports are plain signals:
`sof_n eof_n sop_n eop_n src_rdy_n dst_rdy_n data` in, and
`err_comb err_seq err_data error seq_state[2:0] data_rule_fail[1:0]` out.
`seq_state` reads S0..S3 as 0..3 and Serr as 4.

The whole checker is small: about 70 word-level cells and 16 flip-flops at
the default size. Most of that is the data checker's counter and
comparators. The published FPGA results for the three levels were a few
slices each (3, 5 and 16 on Virtex-II Pro). The exact slice counts were not
reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one computes its
expected outputs independently, prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_ll_symbol_decoder`: all 64 control combinations.
* `tb_ll_comb_checker`: 2000 random cycles, including the registered output
  latency.
* `tb_ll_seq_checker`: random legal frames with stalls, random wrong beats,
  and every out-of-order flag from every state. It checks that the error is
  sticky and that reset recovers.
* `tb_ll_data_checker`: 400 frames of 1 to 6 words with random bytes and
  stalls.
* `tb_ll_checker_top`: the full checker at its default size. It sends
  correct frames with stalls, bad delimiters, bad ninth bytes, out-of-order
  flags and double-flag beats, and it resets after sticky errors. It counts
  each of these events and fails if any never happened.
* `tb_ll_fig2_frame`: the eight-beat 64-bit frame described above.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ll_checker_pkg.sv \
    tb/tb_ll_checker_top.sv --top-module tb_ll_checker_top -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

## Scope

* The generator program, which reads a rule description and writes the
  checker's HDL. It is software; this RTL is its output for the LocalLink
  rule set, written by hand.
* The "error rule" variants, written as lists of forbidden combinations or
  sequences instead of allowed ones. Their rule lists were not published.
  Built from the allowed lists, the checkers here catch the same violations.
* The two IP cores on the link. The testbenches drive the link themselves.
* LocalLink's own optional parity, and any use of `REM_N`. The rules never
  refer to them.
