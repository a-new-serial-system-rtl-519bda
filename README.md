# Serial CAMAC branch: branch driver and crate controllers in SystemVerilog

This is RTL for a serial CAMAC branch. One computer-side **serial branch driver
(SBD)** controls up to 16 remote CAMAC crates, each with a **serial crate
controller (SCC)**. The whole branch shares one twisted pair, which runs at
5 Mbit/s. The system follows a serial CAMAC design published by SLAC. Its ideas:

* **A self-clocking line with a unique sync.** Bits use a bi-phase code, so
  there is a transition at every bit boundary and the receiver recovers the
  clock bit by bit, without a PLL. Every message starts with a sync pulse
  twice as wide as anything data can produce. Every unit on the line
  re-aligns on every message, so no sync search or recovery is needed.
* **A handshake on every operation.** The single master (the driver) sends a
  command. The addressed controller runs one dataway cycle in its crate and
  always answers, with Q, X and the crate's gated L state. A missing answer is
  a timeout.
* **A sticky address.** A controller stays addressed until a command for
  another crate arrives. Repeated operations to the same address are sent in
  short forms: a 3-bit short command, or a bare write-data message. This makes
  single-address block transfers fast: 7.1 µs per 16-bit word, or about
  280 kbyte/s.
* **Software compatibility on the computer side.** The driver is an ordinary
  CAMAC module in the computer's crate. The program loads a control word (crate,
  N, A, F, data length, scan mode) with F17. It then issues F0 or F16. The
  driver holds that dataway cycle with the HOLD line until the remote answer
  is back. Scan modes step the remote address after each operation.

Everything is synchronous to one 40 MHz clock. That gives 8 clocks per
200 ns bit and 4 clocks per 100 ns dataway count step.

## The line

### Signal

```
        sync (2 bits)   bit0=0  bit1=1  bit2=0  bit3=1   terminator
line  __|‾‾‾‾‾‾‾‾‾‾‾‾‾|_______|‾‾‾|___|‾‾‾‾‾‾‾|___|‾‾‾|__  (driver released)
        ^ transmit enable on                          ^ off
```

* The **sync** is the line held high for 400 ns (two bit times). The falling
  edge that ends it is the first bit boundary.
* A **bit** always has a transition at its leading boundary. A "one" has a
  second transition in the middle.
* The **terminator** depends on the line level after the last bit. If the line
  is high, it stays high for half a bit and then returns to zero. The driver
  then holds zero for half a bit and releases the line.
* Outside its messages a unit keeps its driver disabled. The line termination's
  bias holds the idle line at zero.

In the model (`camac_serial_system`), the party line is the OR of the enabled
drivers. The protocol never has two drivers at once, and an assertion checks
this.

The **decoder** (`biphase_decoder`) is the digital form of a one-shot
receiver:

* It measures every high level. A level longer than 1.75 bit times is the
  sync, and its falling edge starts the message.
* After each boundary it opens a window of 3/4 bit. A transition inside the
  window makes the bit a one. When the window closes, the bit is delivered.
  The next transition is then taken as the next boundary.
* If 1.75 bit times pass with no boundary, the message has ended.

A bit is read correctly as long as its mid-bit transition and the following
boundary stay on their own side of the 3/4 mark. So an edge may move by less
than 1/4 bit relative to the boundary before it, minus one clock of sampling
error. At the default 8 clocks per bit that is under 2 clocks. The testbench
shows error-free decoding with every edge moved randomly by ±1 clock at 16
clocks per bit. Raise `CLKS_PER_BIT` if more tolerance is needed.

The terminator can look like one extra bit. This does no harm, because every
receiver knows each message's length from its first three bits.

### Messages

Each field is sent least significant bit first, in the order shown. The first
three bits are the line-control bits: A is the direction, B the type, and C the
word length (0 means 16 bits, 1 means 24 bits).

| message | A B C | body | bits |
|---|---|---|---|
| CAMAC command | 0 0 D | crate[4] F[5] N[5] A[4] | 21 |
| write data | 0 1 0 | W1..W16 (W17..W24 if D = 1) | 19 / 27 |
| short command (repeat) | 0 1 1 | — | 3 |
| read response | 1 0 D | Q X L R1..R16 (R17..R24) | 22 / 30 |
| L-read response | 1 0 1 | I, L-enable, L, L1..L23, 0 | 30 |
| short response | 1 1 0 | Q X L | 6 |

In a response, L is the OR of the crate's 23 L lines, gated by the controller's
L-enable flip-flop. This is a "polled" LAM. A second pair, `prompt_l`, carries
the OR of the same signal from every controller.

## One remote operation, step by step

Take a random read of crate 2, N5, A1, F0, with 16-bit data:

1. The program loads the control word with F17, then issues F0 to the driver.
2. The driver sees its N with F0 and raises **HOLD** on the next clock. The
   computer-side crate controller must obey HOLD. It delays S1 and S2 for as
   long as HOLD is up.
3. The driver sends the 21-bit command: sync, 0 0 0, crate, F, N, A. This takes
   4.7 µs including the terminator. The driver then drops its transmit enable.
4. Every controller decodes the command. Crate 2 matches, becomes addressed and
   stores F, N, A and D. Any other controller that was addressed becomes
   unaddressed.
5. About 0.05 µs after the last bit, crate 2 runs a 1 µs dataway cycle:
   - B, N, A and F are held for 10 count steps.
   - S1 is on in steps 2–3, and R, Q and X are latched at the end of S1.
   - S2 is on in steps 6–7.
6. Crate 2 sends the 22-bit read response.
7. The driver decodes the response and latches Q, X and R. It advances the
   scan address and drops HOLD. The computer-side cycle then completes with S1
   and S2, and the program reads R, Q and X.

If no response arrives within `TIMEOUT_CLKS` (16 µs) of the end of
transmission, HOLD is released with Q = X = 0.

What follows the command depends on the function class of the stored F:

* **Write** (F16–F23): the command is followed at once by a write-data
  message. The controller runs the cycle when the data arrives, and answers
  with a short response.
* **Control** (all F that are neither read nor write): the cycle runs on the
  command, and the answer is a short response.

**Short forms.** The driver remembers the crate, N, A, F and D of the last
operation that got a response. If the control word still matches them:

* a read or control sends only the 3-bit short command, which the controller
  repeats;
* a write sends only the write-data message, which the controller runs with the
  stored write function.

A timeout clears this memory, so the next operation sends a full command.

Transaction times measured in simulation, against the published figures. Each
time runs from the start of the computer-side cycle to the release of HOLD.

| operation (16-bit) | this RTL | published |
|---|---|---|
| random read | 10.72 µs | 11 µs |
| random write | 11.97 µs | 12 µs |
| control | 7.53 µs | 8 µs |
| read block transfer | 7.12 µs | 7.5 µs |
| write block transfer | 7.12 µs | 7.5 µs |
| control block transfer | 3.92 µs | 4.5 µs |

A 16-bit read block transfer reaches 280.7 kbyte/s. The published maximum is
276 kbyte/s.

## Serial crate controller (`scc`)

The path through the controller:

decoder → receive register (`rx_shift_register`) → sequencer → special-command
decode (`scc_special_decode`) → dataway cycle (`camac_cycle_gen`) → response
multiplexer → encoder (`biphase_encoder`)

The sequencer works as follows:

* **Incoming messages.** The message length comes from the header. Responses
  (A = 1) are never taken. A command either addresses this controller or
  unaddresses it. Write data and short commands are acted on only while the
  controller is addressed.
* **Which message runs the cycle.** A read or control command runs at once. A
  write command waits for its data. An addressed controller refuses, with a
  short response carrying Q = X = 0, write data when its stored function is
  not a write and a short command when it is one.
* **Responses.** A read gives a read response. Anything else gives a short
  response. A special command that needs no dataway cycle is answered two bit
  times after it is decoded, so that the driver's terminator has left the line.
* **Reset.** Reset acts as power-on: the controller is unaddressed, I = 0 and L
  is disabled.

The controller's own special commands use station N30. The actions come from
the published list. The F/A codes are this design's choice, modelled on usual
CAMAC controller conventions:

| code | action |
|---|---|
| N30 F1 A0 | L-read response: I, L-enable, gated L, and L1..L23 |
| N30 F24 A9 / F26 A9 | I := 0 / I := 1 |
| N30 F24 A10 / F26 A10 | disable L / enable L |
| N30 F26 A11 | run a dataway cycle with C |
| N30 F26 A8 | run a dataway cycle with Z, and also set I := 0 and disable L |
| N28 (any F, A) | ordinary cycle with all 23 N lines asserted (broadcast) |
| other N30 codes | short response with Q = X = 0 |

## Serial branch driver (`sbd`)

The driver is addressed as a module in the computer's crate. It ignores A.

| function | action |
|---|---|
| F17 | load the control word from W, at S1. This also clears the scan LAM. |
| F1 | read the control word on R |
| F0 | remote operation. R carries the read data (for a read function). |
| F16 | remote operation with write data from W |

Q and X on the computer's dataway are those of the remote crate. The L bit of
responses is not used.

The control word, 24 bits:

```
 W24 W23 W22 W21 W20 | W19 | W18..W15 | W14..W10 | W9..W5 | W4..W1
  LX  LQ  SC  SN  SA |  D  |  crate   |    F     |   N    |   A
```

**Scan modes** (`sbd_scan_unit`). The mode number is the five mode bits read
as binary, with SA as the least significant bit. The scanned fields form one
counter, from innermost to outermost:

* A, counting 0..15;
* N, counting 1..23;
* crate, counting 0..15.

Only the fields whose bit is set take part, starting from the loaded values.
After the last address, the address stays where it is and the LAM is raised.
LQ raises the LAM on an operation with no Q, and LX on one with no X.

Examples:

* mode 1 scans A of one module;
* mode 2 scans N in one crate;
* mode 4 scans the crates;
* mode 7 scans every A of every N of every crate;
* mode 15 is mode 7 with a LAM on no Q.

The original unit supported 22 of the 32 codes, and which 22 is not known. Here
all 32 follow the same rule.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_CRATES` (top) | 16 | controllers on the branch. Controller k has crate address k. |
| `CLKS_PER_BIT` | 8 | clocks per bit. 8 gives 5 Mbit/s at 40 MHz. Use a multiple of 4, at least 8. |
| `STEP_CLKS` | 4 | clocks per 100 ns dataway count step |
| `TIMEOUT_CLKS` | 640 | response timeout of the driver (16 µs) |

Shared constants, message layouts and the dataway structs (`dw_cmd_t`,
`dw_resp_t`, `ctrl_word_t`) are in `rtl/camac_serial_pkg.sv`.

## Files

```
rtl/camac_serial_pkg.sv      constants, message layout, dataway and control-word types
rtl/camac_serial_system.sv   top: one driver + N_CRATES controllers on one party line
rtl/sbd.sv                   serial branch driver
rtl/sbd_scan_unit.sv         scan-mode address stepping and LAM conditions
rtl/scc.sv                   serial crate controller
rtl/scc_special_decode.sv    special-command decode of the controller
rtl/camac_cycle_gen.sv       count-state dataway cycle generator
rtl/biphase_encoder.sv       sync + bi-phase encoder + terminator, transmit enable
rtl/biphase_decoder.sv       sync, clock and data recovery
rtl/rx_shift_register.sv     serial-to-parallel receive register
tb/tb_*.sv                   one self-checking testbench per module, plus models:
tb/tb_line_model.sv          independent line transmitter/receiver (send/recv tasks)
tb/tb_crate_model.sv         modules of one remote crate
```

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
also has a watchdog. Example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_camac_serial_system \
  -y rtl -y tb +libext+.sv rtl/camac_serial_pkg.sv tb/tb_camac_serial_system.sv
./obj_dir/Vtb_camac_serial_system
```

The end-to-end testbenches:

* `tb_camac_serial_system` uses 8 crates, so that crate 12 is absent and times
  out. It covers:
  - full and short commands, write block transfers and 24-bit data;
  - timeout, special commands and prompt L;
  - unaddressing;
  - scans with end-of-scan and no-Q LAMs;
  - the transaction times above.
  Every mechanism is counted, and each must occur at least once.
* `tb_camac_serial_system_full` uses the defaults (16 crates). It runs reads,
  writes, a block transfer, a special command and a mode-7 scan that ends on
  crate 15.
* `tb_slac_branch` uses a 7-crate branch. It measures the block-transfer rate
  and scans a whole crate.
* `tb_full_branch_scan` uses the defaults. It scans every subaddress of every
  station of all 16 crates in mode 7 (5888 reads, 68 ms of line time), and
  checks each word, the final LAM and the held address. It then stops a
  mode-15 scan on the first operation with no Q.

The module testbenches compare against values worked out independently. The
line model decodes by sampling at 1/4 and 3/4 of each bit. The scan test uses
nested loops. The special-decode test enumerates all N, F and A. All of them
run in well under a second.

## Choices made here, and limits

The line code, sync, terminator, message structure and the driver's HOLD
handshake follow the original description. So do the addressed state with its
short forms, the special-command actions and the scan-mode semantics. The
following are this implementation's own choices:

* The A B C codes of the responses and of write data are this design's choice.
  The command and short-command codes are the original ones.
* The bit layout of the control word, and the F/A codes of the special
  commands.
* The broadcast meaning of N28.
* One 40 MHz clock with a counter-based decoder, instead of one-shots. The
  original controller used a 10 MHz crystal. Its sequencing was programmable
  logic sequencers working on a 64-state bit counter; here it is an explicit
  state machine.
* The 1 µs dataway cycle: S1 at 200–400 ns, S2 at 600–800 ns, and C/Z from
  100 to 900 ns.
* The 16 µs timeout, and the two-bit-time reply delay for special commands
  that need no cycle.
* An addressed controller refuses a write data or short command it cannot
  execute with Q = X = 0 instead of staying silent. An unaddressed controller
  ignores them, and the driver times out.
* The scan LAM is cleared by F17, and a finished scan leaves the address at
  its last value.
* All 32 scan codes are implemented.
* A short command repeats the stored address, so a scan that moves the
  address sends a full command for every word. A scanned read costs as much
  as a random read (about 10.7 µs; 11.5 µs per word with the host cycle in the
  full-branch scan test). The short form pays off in unscanned block
  transfers, and once a scan has stopped on its last address.
* The driver does not use the prompt L pair. It is a port of the top.

What is not modelled:

* the RS-422A drivers and receivers, the cable, and the termination networks;
* line delay, dispersion and jitter, so cable length cannot be studied here;
* the computer-side crate controller and the computer itself;
* several branches. Each branch is one instance of the top.

The design has no parity, like the original.
