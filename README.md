# SBUS slave controller for the I/O modules of a safety-class FPGA controller

A diverse safety controller for nuclear power plants can be built from one
FPGA processor module (FPM) and up to sixteen I/O modules (digital in, digital
out, analog in, analog out). The modules talk to the processor over a single
serial bus, the SBUS. Every I/O module carries the same small SBUS
controller (SBUS_CTRL). It receives the processor's command messages into a
fixed set of 16-bit registers, checks them, drives the module's outputs and
command strobes, and answers some commands with a status message.

This repository holds synthesizable SystemVerilog for that controller, for its
serial receiver, transmitter and CRC unit, and for a 16-slot bus segment that
ties sixteen controllers to one processor line. It also holds self-checking
testbenches for each of them. The processor module and the analog and digital
I/O circuits are not included. Their signals are ports of the bus segment.

## Message format

Every message is a sequence of 16-bit words:

| word          | content                                                        |
|---------------|----------------------------------------------------------------|
| FUNCTION      | command [7:0], slot position [11:8], bus select [14:13], bits 15 and 12 zero |
| ID            | module identifier, e.g. 16'h44F1 for a digital output module   |
| DATA[0..n-1]  | n = 8 for `set`, n = 2 for `out`, n = 0 for every other command |
| CRC           | CRC-16 of all the words before it                              |

The field sizes and the word order come from the published description. So
do the seven commands and their DATA lengths. The bit positions inside
FUNCTION are inferred from a logged example: word 16'h6540 was sent to bus 3,
slot 5. The command codes are this design's own choice:

| command  | code  | DATA words | effect                                  | response |
|----------|-------|-----------:|-----------------------------------------|----------|
| set      | 8'h01 | 8          | Set_Ireg00..07 ← REC_reg02..09, strobe  | yes      |
| out      | 8'h02 | 2          | Out_Ireg00..01 ← REC_reg02..03, strobe  | yes      |
| check_id | 8'h04 | 0          | strobe                                  | yes      |
| reset    | 8'h08 | 0          | strobe                                  | no       |
| clear    | 8'h10 | 0          | strobe                                  | no       |
| enable   | 8'h20 | 0          | strobe                                  | no       |
| disable  | 8'h40 | 0          | strobe                                  | no       |

`reset`, `clear`, `enable` and `disable` act on the rest of the I/O module.
The controller only raises the matching one-clock strobe (`Ind_cmd_*`).

## The register set and how a message fills it

The controller has twelve 16-bit registers, all reset to zero:

| offset | register      | role                                             |
|--------|---------------|--------------------------------------------------|
| 0x00–0x24 | REC_reg00..09 | the words of the last message, in order       |
| 0x28   | CRC_reg       | the CRC word of the last message                 |
| 0x2C   | Tx_reg        | the response word being sent                     |

The offsets are those of the controller's register map and are kept as
constants in `sbus_pkg`. The RTL has no bus port for them. The testbenches read
the registers hierarchically ("backdoor") and compare them with a mirror.

The part most easily misread is how words land in the registers. The receiver
writes word *i* of a message into REC_reg*i*, for every word including the
CRC word, as long as *i* < 10. The last word also goes into CRC_reg. As a
result:

* `check_id` (3 words): FUNCTION → REC_reg00, ID → REC_reg01, CRC → REC_reg02 and CRC_reg.
* `out` (5 words): DATA → REC_reg02..03, CRC → REC_reg04 and CRC_reg.
* `set` (11 words): DATA → REC_reg02..09, CRC → CRC_reg only.

Registers beyond the end of a short message keep the values of earlier
messages. Every message on the bus is stored this way, including messages
addressed to another slot. Only execution is gated.

## When a message is executed

A message is complete when the receiver has all 3 + n words. The length is
known from the command byte of the first word. The controller executes the
message only if all of these hold:

1. the CRC word equals the CRC-16 of the preceding words,
2. bus select and slot position equal the `Sel_Bus` and `Pos_Slot` inputs,
3. the ID word equals the `MODULE_ID` parameter,
4. the command is one of the seven known codes.

A failed check leaves the outputs and strobes unchanged and sends no
response. These checks are this design's reading of how a shared bus with
per-module IDs must work. The source only states that the ID is a constant
specific to the module type.

The CRC is CRC-16 with polynomial 0x1021 and initial value 16'hFFFF. It is
computed MSB first, one word per clock. The polynomial is this design's
choice. `CRC_reg` holds the CRC word as received, not a recomputed one.
A separate accumulator computes the CRC of the other words, and the two are
compared.

A message can also be abandoned before it completes:

* **Gap timeout.** If more than `GAP_BITS` (40) bit times pass between two
  words, the partial message is dropped. The next word is taken as a new
  FUNCTION.
* **Framing error.** A word with a low stop bit drops the message.

## The response

`set`, `out` and `check_id` are answered with nine words:

    REC_reg00 (FUNCTION), REC_reg01 (ID), Stat_Ireg00..05, CRC

The CRC is computed over the six status words only, not over the header
words. Each word passes through Tx_reg on its way to the line. The
controller starts sending `TURNAROUND_BITS` (2) bit times after executing the
command. `En_tx` is high while it drives `Sout`, and `Sout` is high whenever
`En_tx` is low. A command that arrives while a response is still being sent
is executed, but it gets no second response. Status inputs are sampled word
by word as each one is loaded into Tx_reg, so they should be stable for the
length of the response.

## Serial line

Both directions use the same framing. The line idles high. Each word is one
start bit (low), 16 data bits MSB first and one stop bit (high). Every bit
lasts `CLKS_PER_BIT` (8) system clocks. A word therefore takes 144 clocks,
and words may follow each other with any idle gap. The receiver passes the line
through two flip-flops to synchronise it. It rejects a start bit that is no
longer low at mid-bit. It samples each bit in its middle, and after a low stop
bit it waits for the line to go high again. The framing and bit timing are
this design's choices: the source names only the pins.

In the 16-slot segment (`sbus_system`), the processor's line goes to every
slot. The slots' `Sout` lines are ANDed, which models an open-drain, idle-high
return line. An assertion checks that at most one slot drives at a time.

## Timing summary (CLKS_PER_BIT = 8)

| event                                                   | clocks |
|---------------------------------------------------------|--------|
| start-bit falling edge → receiver `word_valid`           | CLKS_PER_BIT/2 + 17·CLKS_PER_BIT + 2 = 142 |
| CRC word's `word_valid` → strobes, Out_Ireg/Set_Ireg     | 2 |
| strobe → `En_tx` rises                                   | TURNAROUND_BITS·CLKS_PER_BIT + 1 = 17 |
| `En_tx` high for one response                            | 9 · (18·CLKS_PER_BIT + 3) = 1323 |

## Files

| file | contents |
|------|----------|
| `rtl/sbus_pkg.sv` | word type, FUNCTION field helpers, command codes, register offsets, CRC function, strobe struct |
| `rtl/sbus_crc16.sv` | word-serial CRC-16 accumulator |
| `rtl/sbus_rx.sv` | serial receiver |
| `rtl/sbus_tx.sv` | serial transmitter |
| `rtl/sbus_ctrl.sv` | SBUS_CTRL: registers, message parser, checks, command execution, response sequencer |
| `rtl/sbus_system.sv` | top: 16 slots on one bus |
| `tb/sbus_fpm_model.sv` | behavioural bus master (processor side) with a reference CRC |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters and their defaults:

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| sbus_ctrl, sbus_rx, sbus_tx, sbus_system | CLKS_PER_BIT | 8 | chosen |
| sbus_ctrl | MODULE_ID | 16'h44F1 | example ID of a digital output module |
| sbus_ctrl | GAP_BITS | 40 | chosen |
| sbus_ctrl | TURNAROUND_BITS | 2 | chosen |
| sbus_system | N_SLOTS | 16 | up to 16 I/O modules per controller |
| sbus_system | MODULE_IDS | 16 × 16'h44F1 | chosen; IDs of the other module types are unknown |

Reset is synchronous and active high.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
stops it if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/sbus_pkg.sv \
        tb/tb_sbus_system.sv --top-module tb_sbus_system
    ./obj_dir/Vtb_sbus_system

Replace `tb_sbus_system` with `tb_sbus_ctrl`, `tb_sbus_rx`, `tb_sbus_tx` or
`tb_sbus_crc16` to test one module. Each run takes well under a second.

* `tb_sbus_ctrl` sends a random stream of messages to one controller. The
  stream mixes all seven commands, unknown codes, wrong slot, bus or ID, and
  corrupted CRCs. After every message it compares all twelve registers with a
  mirror. It also checks which strobe fired, how often and when, the
  out/set outputs, every response word and its CRC, and the response timing.
  Directed cases cover the gap timeout and a framing error. At the end it
  prints a register-coverage report, with one line per register. REC_reg00
  has separate lines for its command, bus-select and slot fields. Each data
  register, CRC_reg and Tx_reg is split into 64 equal value ranges. The
  command, address and ID fields must reach 100%. The data registers typically
  reach 55–98%; the later ones score lower because only `set` writes them.
* `tb_sbus_system` runs the full 16-slot segment at its default parameters.
  It checks that only the addressed slot reacts to each message and that its
  response arrives on the shared line. It counts every mechanism and fails if
  one never happened.

## Where this design goes beyond its source

The source describes the controller by its registers, message fields,
commands and ports, not by its internals. Everything below is this design's
own choice, and should be checked against the real bus specification before
the RTL is used with other equipment:

* serial framing and bit timing,
* command codes and FUNCTION bit positions,
* CRC polynomial and initial value, and the choice to cover only the status
  words in the response CRC, as the source words it,
* the address and ID checks, the gap timeout and framing-error handling,
  the turnaround delay,
* strobes as one-clock pulses,
* the bus wiring of the 16-slot segment.

The source gives the `set` and `out` payloads once as 8 and 2 *bytes* and once
as 8 and 2 *16-bit words*. The RTL uses words, which matches the 16-bit output
registers. The eight-word output is named `Set_Ireg00..07` here, as in the
source's text; one of its block diagrams labels it `Stat_Ireg00~07`.
