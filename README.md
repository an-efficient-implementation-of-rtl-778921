# MIL-STD-1553B bus controller with three remote terminals

MIL-STD-1553B is the 1 Mbit/s command/response serial bus used in military avionics. Only one
device, the **bus controller (BC)**, may start traffic. It sends a command word to one of up to
31 **remote terminals (RTs)**. The RT then either takes the data words that follow the command or
sends its own. Either way it answers with a **status word**.

This RTL implements:

- a bus controller made of a protocol controller (the message sequencer) and one shared
  Manchester encoder/decoder;
- three remote terminals, RT1 to RT3, that it talks to;
- the shared bus that joins them.

It follows the design in *"An Efficient Implementation of MIL_STD_1553B Bus Controller Module
Using Verilog HDL"*. That paper gives the BC's structure, its message flow (BC-to-RT and RT-to-BC
messages, each retried up to three more times if the answer is not valid) and the line coding.
Many details are this design's own, for example the timeouts, buffers, handshakes and decoder
structure. They are listed under "Where this RTL goes beyond or departs from the paper" below.

Everything is plain SystemVerilog with no vendor primitives: one clock and an active-low
asynchronous reset.

## Words on the wire

Every word takes 20 bit times (20 µs):

| bit times | 1–3  | 4–19                        | 20            |
|-----------|------|-----------------------------|---------------|
| content   | sync | 16 information bits, MSB first | odd parity |

The bits are sent Manchester bi-phase:

- a **1** is sent high then low, and a **0** low then high, each half lasting 0.5 µs;
- the sync breaks this rule on purpose and holds one level for 1.5 bit times, then the other
  for 1.5 bit times;
- **command and status** words begin with a high sync, **data** words with a low sync.

The 16 information bits are:

- **command word**: RT address (5), T/R (1: 0 = RT receives, 1 = RT transmits),
  subaddress/mode (5), word count/mode code (5; 0 means 32 words);
- **status word**: RT address (5), message error, instrumentation, service request, 3 reserved
  bits, broadcast command received, busy, subsystem flag, dynamic bus control acceptance,
  terminal flag;
- **data word**: 16 data bits.

`mil1553_pkg` defines these as packed structs (`cmd_word_t`, `status_word_t`). It also provides
`word_pattern()`, which turns a word into its 40 half-bit levels.

The real bus is a differential three-level signal: positive, negative or idle. Here it is two
logic lines, `bus_t {pos, neg}`, as the logic side of a 1553 transceiver presents it. Both lines
low means the bus is idle. The bus itself (`mil1553_bus`) is the OR of all terminals' outputs. It
raises `collision` when two terminals drive at once or both lines are high.

## The two message formats

```
BC to RT:  [receive cmd][data]...[data]  -- gap --  [status]            -- gap -- next
RT to BC:  [transmit cmd]  -- gap --  [status][data]...[data]           -- gap -- next
           \______ sent by the BC _____/           \___ sent by the RT ___/
```

Words inside the bracketed groups follow each other with no gap.

- The encoder's `tx_ready` is also high on the last cycle of a word. A word offered then starts
  on the very next cycle.
- The RT starts its answer after **4 µs of silent bus** (`RESP_GAP_US`).
- The BC waits until the bus has been silent for **4 µs** (`GAP_US`) before it sends another
  command.

With the default clock, a 4-word BC-to-RT message takes 124 µs from the start request to
`msg_done`: five words of 20 µs, the 4 µs gap and the 20 µs status word. The end-to-end test
checks this to within 2 µs.

## Finding words in the bit stream (manchester_decoder)

This is the least obvious part of the design. The decoder runs on the system clock and samples
the bus `HALF_BIT_CLKS` times per half bit (default 8, so 16 samples per µs). The samples pass
through a two-flop synchroniser and are read as one of three levels: positive, negative or
idle.

**Sync detection.** A run-length counter measures how long the bus has held its present level.
Valid Manchester data never holds a level longer than two half bits, but a sync holds it for
three. A change to the opposite level, after a run of 2.5 to 4.5 half bits, therefore marks the
middle of a sync. The upper bound allows for 4 half bits: that happens when the last half of
the previous word's parity bit has the same level as the next sync. The level before the change
gives the word type: positive first means command/status, negative first means data.

**Sampling.** From that point on, a phase counter samples the middle of each half bit:

- the three remaining sync halves must hold the opposite level;
- each of the 17 bits (16 data bits and parity) must have two different, non-idle halves, and
  the first half gives the bit value.

A failure of either rule sets `merr`. If data plus parity hold an even number of ones, `perr` is
set.

**Output.** The word, its sync type and both flags come out with a one-cycle `rx_valid`, N/2 + 3
cycles after the last half bit first appears at the input. `rx_active` is high from the sync
middle until the word is delivered. The controllers use it to measure bus silence.

A terminal must not decode its own transmission. `mil1553_codec`, the shared encoder/decoder
block, therefore shows the decoder an idle bus while its own encoder is driving.

Phase is only recovered at each sync, so the clock tolerance has to cover a whole word. The
last sample falls 36.5 half bits after the sync middle and may be off by less than half a half
bit. After allowing for one sample of quantisation, this leaves about ±1 % between the clocks of
two terminals at 8 samples per half bit.

## The bus controller's message sequencer (bc_protocol_controller)

1. **Request.** The host raises `msg_start` while `msg_ready` is high and gives T/R, RT address,
   subaddress and word count. The controller frames the 16-bit command word; `cmd_word` shows it.
2. **Send.** The command word goes to the encoder. For a BC-to-RT message the data words follow
   directly from the 32-word transmit buffer, which the host filled beforehand (`txbuf_wr_*`).
3. **Wait for the answer.** A timer counts only while the bus is silent: nothing is being sent
   (`tx_valid`, `tx_busy`) and nothing is being received (`rx_active`, `rx_valid`). The answer is
   valid only if all of the following hold:
   - every word arrives free of parity and Manchester errors;
   - the status word has a command/status sync and the commanded RT address;
   - its message error and busy bits are clear;
   - for RT-to-BC, exactly the requested number of data words follows, each with a data sync,
     and no silence reaches the 14 µs timeout (`RESP_TIMEOUT_US`).

   Received data words are written to the 32-word receive buffer (`rxbuf_rd_*`).
4. **Retry or finish.** A valid answer ends the message: `msg_done` pulses with `msg_ok = 1`.
   An invalid or missing answer sends the same message again after the gap, up to
   `MAX_RETRIES = 3` more times. After the fourth failed attempt, `msg_done` pulses with
   `msg_ok = 0`. `msg_attempts` (1–4) and `msg_status`, the last status word received, are valid
   with `msg_done`.

After a timeout the bus has already been silent for 14 µs, so the retry follows at once. After a
bad word the controller first waits for 4 µs of silence, so it does not talk over an RT that is
still sending.

`bus_controller` joins this sequencer to one `mil1553_codec`. This matches the BC drawn in the
paper: a protocol controller plus one common encoder/decoder block.

## The remote terminals (remote_terminal)

An RT listens all the time. A clean command word with its own address starts a message:

- **Receive command (T/R = 0).** The RT stores the counted data words in its receive buffer and
  pulses `rx_msg_done`. After the response gap it sends its status word.
- **Transmit command (T/R = 1).** After the response gap the RT sends its status word and then,
  with no gap, the counted words from its transmit buffer, and pulses `tx_msg_done`. A busy RT
  (`busy_in`) sends only the status word, with the busy bit set.

The status word carries:

- the RT's address;
- the subsystem's service request, busy, subsystem flag and terminal flag inputs;
- a message error bit.

A damaged data word, a command sync where a data word belongs, or a pause of more than 4 µs
inside the data (`WORD_TIMEOUT_US`) aborts the message. The RT then sends no answer, as the
standard requires. It sets the message error bit, which stays visible on `status_word` until the
next valid command clears it. Commands for other addresses, and damaged command words, are
ignored. Each RT has one 32-word transmit buffer and one 32-word receive buffer, shared by all
subaddresses.

## Top level (mil1553_system)

`mil1553_system` holds:

- the BC;
- `NUM_RT = 3` remote terminals at addresses 1, 2 and 3;
- the bus.

The BC's host ports are top-level ports (`msg_*`, `bc_txbuf_*`, `bc_rxbuf_*`). Each RT's
subsystem ports are arrays indexed 0..2 (`rt_*`). `ext_bus` is one more driver on the bus (for
another terminal, a monitor or injected noise); tie it to `'0` when not used. `bus` and
`collision` are outputs.

| parameter | default | meaning |
|-----------|---------|---------|
| `HALF_BIT_CLKS` | 8 | clocks per half bit; the clock is 2 × `HALF_BIT_CLKS` MHz (16 MHz) |
| `NUM_RT` | 3 | remote terminals; RT *i* answers to address *i* |
| `MAX_RETRIES` (BC) | 3 | repeats of an unanswered or invalid message |
| `RESP_TIMEOUT_US` (BC) | 14 | silence that counts as no response |
| `GAP_US` (BC) | 4 | silence kept between messages and before a retry |
| `RESP_GAP_US` (RT) | 4 | silence before an RT answers |
| `WORD_TIMEOUT_US` (RT) | 4 | longest pause an RT accepts inside received data |

`HALF_BIT_CLKS` must be at least 2, and should be 4 or more if the clocks have any jitter.

After generic synthesis, the whole system has about 1170 word-level cells, 645 flip-flop bits
and 4096 bits of buffer memory. The BC alone has 322 cells, 177 flip-flop bits and 1024 memory
bits. Some output bits are constant by design, for example the reserved, instrumentation,
broadcast and dynamic-bus-control bits of the RT status words.

## Files

| file | contents |
|------|----------|
| `rtl/mil1553_pkg.sv` | word structs, bus type, parity and half-bit pattern functions |
| `rtl/manchester_encoder.sv` | word → 40 half-bit levels, valid/ready, back-to-back words |
| `rtl/manchester_decoder.sv` | sync detection, bit recovery, parity/Manchester error flags |
| `rtl/mil1553_codec.sv` | shared encoder/decoder with receive inhibit while sending |
| `rtl/bc_protocol_controller.sv` | BC message sequencer, buffers, timeout, retries |
| `rtl/bus_controller.sv` | BC = sequencer + codec |
| `rtl/remote_terminal.sv` | RT: command check, receive/transmit, status word |
| `rtl/mil1553_bus.sv` | wired bus and collision flag |
| `rtl/mil1553_system.sv` | top: BC, three RTs, bus |
| `tb/mil1553_tb_pkg.sv`, `tb/mil1553_bfm.sv` | testbench bus driver and behavioural word monitor, written from the word rules |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mil1553_system \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mil1553_pkg.sv tb/mil1553_tb_pkg.sv \
  tb/tb_mil1553_system.sv -o sim && obj_dir/sim
```

Replace the top-module name and the last file to run another testbench.

- `tb_mil1553_system` runs the whole system at its default parameters, in well under a second.
  It covers:
  - 4-word BC-to-RT and RT-to-BC messages with RT2, and 32-word messages in both directions;
  - a command word damaged by injected noise, which causes a timeout and a successful retry;
  - a damaged data word from an RT, which causes a successful retry;
  - a busy RT and a missing RT, each ending in failure after three retries.

  It counts each of these mechanisms and fails if any of them never happened.
- The unit testbenches use smaller `HALF_BIT_CLKS` values to run faster:
  - the encoder testbench compares every output cycle against an independently computed level
    schedule;
  - the decoder testbench checks data, flags, latency and back-to-back spacing;
  - the protocol controller testbench plays the codec and the RT at word level, including retry
    spacing after a timeout;
  - the RT testbench checks the response gap and the contiguity of its replies.

All testbenches pass with random initial register values.

## Where this RTL goes beyond or departs from the paper

Taken from the paper:

- the BC structure: a protocol controller plus one shared encoder/decoder;
- the two message formats;
- the command framing from T/R, address, subaddress and word count;
- up to 32 data words per message;
- waiting for the RT's response and repeating an invalid message three more times;
- odd parity and the 3-bit sync;
- the Manchester rule (1 = high→low, 0 = low→high);
- three RTs on one bus, with RT2 at address 2 as the responder in the example messages.

This design's own choices:

- one system clock for encoding and decoding (the paper shows separate encoder and decoder
  clocks);
- the decoder's oversampling structure;
- the valid/ready word handshake;
- the 32-word host buffers in the BC and the RTs;
- the 14 µs timeout and the 4 µs gaps;
- what counts as a valid response (busy and message error count as invalid);
- the RTs' internal design and error handling;
- the two-line bus model and its collision flag.

Not implemented:

- mode codes (sent like any command but given no special meaning);
- broadcast (address 31);
- dynamic bus control, where an RT takes over as BC;
- the second, redundant bus channel of the standard (the BC here uses one bus);
- a bus monitor;
- the analog parts: transceivers, coupling transformers and the cable.

The paper reports a 259.9 MHz maximum clock and its resource use on a Spartan-6 FPGA. Those
figures belong to its own netlist and have not been reproduced here.
