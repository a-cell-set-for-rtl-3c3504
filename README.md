# Self-timed cell set: transition-signalling cells, a FIFO and a mesh router

This is a library of self-timed (clockless) building blocks and two systems
built from them. The blocks were originally cells for a small antifuse FPGA.
Every cell talks by **two-phase transition signalling**. A request or an
acknowledge is one change of a wire, either rise or fall, and the level
means nothing. Data travels **bundled**: the data wires must be stable
before the request toggles, and they stay stable until the acknowledge
toggles. There is no clock anywhere. Each cell does its work when its inputs
change, and the order of events is kept by C-elements, XOR merges, Select
steering and matched delays.

The library has three layers:

1. **Control cells** steer and merge transitions.
   - C-element (`c_elem`).
   - Call modules, which share one channel among several clients (`call2`, `call3`, `call3a`, `call4`).
   - Transition Select (`tselect`).
   - Q-select ring elements (`qsel`, `qsel_init`) and a three-element polling loop (`qsel_loop3`).
   - Toggle (`toggle`).
2. **Data-path cells** hold and compute data.
   - Transition latches and registers (`tlatch`).
   - Buffer delay lines (`delay_n`).
   - Carry-completion-sensing (CCS) adder, incrementer and decrementer bits, and their four-bit chains (`cca_bit`, `cca4`, `ccs_incr_bit`, `ccs_incr4`, `ccs_decr_bit`, `ccs_decr4`).
3. **Two example systems**:
   - a four-word by eight-bit FIFO (`fifo_stage`, `fifo4`);
   - a cut-through packet router for a two-dimensional mesh: two `router_macro`s form one `mesh_element`.

`st_cells_top` places the library, the FIFO and one mesh element side by
side. Their only shared signal is the clear.

## Signalling conventions

| Convention | Where | Rule |
|---|---|---|
| Two-phase request/acknowledge | every channel except the CCS arithmetic | a transaction is one toggle of `req`, then one toggle of `ack`. The channel is idle when `req == ack`. |
| Bundled data | FIFO, router, Select `sel` | data is set up before `req` toggles and held until `ack` answers |
| Four-phase enable | CCS adder, incrementer, decrementer | raise `en`, wait for completion, drop `en`, wait for the carry wires to fall |
| Clear | `clr_n`, active low | forces the state of the clearable cells to 0. All control wires must be low while it is applied. |
| Start | `init` / `req` of a Q-select ring | one transition starts the ring after the clear |

**Delays.** Real time is part of the design. Three places need a delay:
- each C-element (`DLY`, default 1 time unit);
- the buffer chains in `delay_n` (`UNIT` per buffer);
- the Q-select bundling delays (`DLY`).

A cell's delay is an `assign #` on its output. Simulators honour it, and
synthesis drops it; see *Synthesis and tool warnings*. The delays are small
integers chosen so that every handshake has a strict order in simulation.
They model the physical delays that the buffer chains give in silicon.

## The control cells

**C-element.** The output copies the inputs when they agree and holds
otherwise. It is written as a level latch that loads `a` while `a == b`.
- Parameters `INV_A` and `INV_B` add an input inversion.
- `HAS_CLR` adds an active-low clear to 0.
- These cover the six library variants in one module.

**Call.** A Call lets several clients use one shared "subroutine" channel.
- The shared request is the XOR of the client requests.
- The acknowledge for client *n* comes from a C-element. It joins
  `r_n` with `as ^ (the other clients' requests)`, so the acknowledge
  returns only to the client whose request is outstanding.
- `call2` is the basic two-client cell.
- `call3` cascades two `call2`.
- `call3a` is the flat three-client form.
- `call4` chains a `call3` and a `call2`.
- Clients must not call at the same time; a Call does not arbitrate.

**Select.** `tselect` sends an input transition to `outt` when the bundled
`sel` is 1 and to `outf` when it is 0. It uses two latches:
- the `outt` latch is open while `sel` is 1 and loads `tin ^ outf`;
- the `outf` latch is open while `sel` is 0 and loads `tin ^ outt`.

So `tin == outt ^ outf` whenever the cell is idle. A concurrent assertion
checks this invariant each time `sel` changes.

**Toggle.** Input transitions go alternately to `out0` and `out1`, starting
with `out0` after the clear. It is built from two latches:
- the `out0` latch loads `~out1` while the input is high;
- the `out1` latch loads `out0` while the input is low.

### Q-select rings (the subtle part)

A Select needs a bundled `sel`. A **probe**, in contrast, is a guard that may
change at any moment, even while it is being read. A proper sampler for
such a signal is an arbiter-like circuit, which FPGA logic cells cannot
build. So a probe is tested in a **ring** of Q-select elements, one per
guard, which check their guards in turn.

Each element (`qsel`) holds two transition latches and a Select:

- **First latch (normally transparent).** It captures the probe when the
  previous element announces that it is starting its own test: the
  previous element's `snext`, which is its request, arrives on `smpl`.
- **Second latch (normally opaque).** It takes the first latch's value when
  this element's own request arrives. So the probe was captured one whole
  element-time earlier, and a metastable first latch has that long to
  settle. In this two-state model the probe is simply sampled as a level.
- **Select.** It is driven by the request delayed by two buffers (the
  bundling delay), and steered by the second latch.
  - A true guard sends the transition out on `tout`, which starts that
    element's process.
  - A false guard sends it out on `fout`, which becomes the next element's
    request.

`qsel_init` is the first element of a ring. It also takes an `init`
transition:
- `init` is XORed into the Select input through one buffer, so it leaves on
  `fout` because the second latch is clear after the clear;
- `init` is also XORed into `snext`, so the next element samples its probe.

The ring therefore starts by testing the element *after* the init element.
In `qsel_loop3` the test order after a start is element 1, then 2, then 0.
The start latency is one buffer, plus two buffers for each element tested.
- If no guard is true, the transition keeps circulating, and the ring polls
  until some guard rises.
- When a guard is true, the ring stops and that process runs.
- `ack` is the XOR of the three process acknowledges.

**Restart.** Clear the loop before each start; `tb_qsel_loop3` does this.
- The init path reuses the first element's last sample.
- So a second start without a clear can restart the process that was
  chosen the time before.
- When start returns low it injects another transition. Lower the guards
  first, so that this pass only polls.

## Carry-completion arithmetic

The adder, incrementer and decrementer are combinational. Each carry is
dual-rail: a carry wire `c` and a "no carry" wire `d`.
- While `en` is low, both wires are low.
- After `en` rises, exactly one wire of each pair rises once that bit's
  carry is known.

So completion can be seen on the wires, rather than timed with a
worst-case delay.

| Cell | Sum | Carry | No carry |
|---|---|---|---|
| adder bit | `((a^b)&en)^cin` | `en&(a&cin\|b&cin\|a&b)` | `en&(~a&din\|~b&din\|~a&~b)` |
| increment bit | `in^cin` | `in&cin&en` | `(~in\|din)&en` |
| decrement bit | `~(in^cin)` | `(cin\|in)&en` | `~in&din&en` |

The decrement bit adds an all-ones word. To subtract one, start the chain
with `din` = 1 and `cin` = 0. The four-bit result is then `in - 1`, and
`cout` = 1 means there was no borrow.

**Completion.** `cca4` joins two ORs in a C-element, each OR watching one
carry pair: the pair after bit 1 and the pair after bit 3. So `ack` rises
when both pairs have resolved, and falls when both have reset. This follows the original cell, which
watches only two of the four bits. That is a speed/size compromise: in
silicon it assumes the unwatched bits are never slower than their
neighbours. In zero-delay simulation, `ack` and the sum are always
consistent. The four-bit incrementer and decrementer have no `ack`; the user
takes completion from the final carry pair.

## FIFO

`fifo_stage` is one word of a two-phase FIFO: a C-element with clear, plus
an 8-bit normally transparent transition register.
- The C-element joins `rin` with the inverted output acknowledge `aout`.
- Its output is at the same time `ain` to the previous stage and `rout` to
  the next one.
- The register is transparent while that output equals `aout`, and closes
  when a word has been passed on and not yet acknowledged.

`fifo4` stacks four stages; stage *k*'s acknowledge is stage *k+1*'s
request.
- A word ripples through an empty FIFO at one C-element delay per stage.
- With the reader stalled, the FIFO holds exactly four words and then
  stalls the writer.

## Mesh router

### Network and packets

Each processor has a mesh element with these channels:
- `pin` and `pout` to its processor;
- `xin`, `xout`, `yin` and `yout` to its neighbours.

A packet is a sequence of 5-bit words: a 4-bit field, plus a tag in bit 4
that is set on the last word.

```
word 0:  X count   (tag 0)
word 1:  Y count   (tag 0)
word 2…: payload   (tag 1 on the last word)
```

Packets move in X first, then in Y. At each element, the router of the
current dimension decrements the first word:
- **Non-zero result:** the packet continues in the same direction, with the
  decremented count in place of the old one.
- **Zero result:** that word is dropped and the packet turns. X turns into
  Y, and Y turns into the processor.

A count of *v* therefore makes the packet turn at the *v*-th element it
enters in that dimension. So 1 means "here", and 0 wraps to 15 and means
16. A packet entering from `yin` starts at its Y count.

The mesh element (`mesh_element`) is two routers:
- **X router:** inputs `pin` and `xin`, outputs `xout` and an internal
  channel to the Y router.
- **Y router:** inputs that internal channel and `yin`, outputs `yout` and
  `pout`.

The two routers run independently. So one element can move a packet along X
and another along Y at the same time; the testbenches count this as
"concurrent".

Each router's two outputs share one data bus, the word register. So `yout`
and `pout` carry the same lines (and likewise `xout` and the internal
channel). A word on them is valid only while its own request is pending.

### Inside one router (`router_macro`)

The router is a small self-timed program made only of the library cells.

1. **Polling.** A `qsel_init`/`qsel` ring of two elements polls the two
   input channels. A channel's probe is `req ^ ack`, which is high while a
   word is waiting.
2. **Header read.** The granted channel reads its word into **VAR**
   (`var_reg`), a 5-bit transition register with three write ports: the
   two channels and the decrementer.
3. **Decrement.** A Call shared by the two channels triggers `decr_unit`.
   - `decr_unit` converts the two-phase request into the four-phase enable
     of a `ccs_decr4`.
   - It holds the result in a transparent latch.
   - It writes the result back into VAR's field, leaving the tag alone.
4. **Zero test.** A Select on "field non-zero" steers the flow:
   - **Non-zero:** VAR is sent on S.
   - **Zero:** the next word is read, and the packet is streamed on P.
5. **Streaming.** Each output acknowledge goes into a Select on the tag of
   the word just sent.
   - Tag clear: read the next word and send it on the same output.
   - Tag set: the packet is finished.
6. **Hand-over.** The finished transition is XORed into the *other*
   channel's Q-select request. So a whole packet is consumed without
   interruption, and polling then resumes with the other channel.

Each channel is read at three points of this program: header, next word on
S, and next word on P. So the channel cell (`chan3`) merges three readers
with a Call, and joins them with the channel request in a C-element. The
two outputs use one `call2` each, which merges the sends of the two input
channels.

**How far to trust this router.** The routing rule and the list of parts
come from the description of the original design. They are the ring of two
Q-selects, three-way channels, the VAR register, the carry-completion
decrementer, the zero test, and Call modules on the outputs. The original
control netlist, however, was compiled from a concurrent program that is
not available.

The sequence above is a reconstruction. The following are choices of this
design:
- the tag position and polarity;
- the order of words in the header;
- which router inputs take the processor and X channels;
- VAR's internal write timing.

The reconstruction is verified by random-packet scoreboards, and by no
comparison with the original circuit.

## Files

| File | Contents |
|---|---|
| `rtl/router_pkg.sv` | word format: `FIELD_W`=4, `WORD_W`=5, `TAG_BIT`=4, `word_t` |
| `rtl/c_elem.sv`, `call2.sv`, `call3.sv`, `call3a.sv`, `call4.sv`, `tselect.sv`, `toggle.sv` | control cells |
| `rtl/qsel.sv`, `qsel_init.sv`, `qsel_loop3.sv` | Q-select ring elements and the three-element loop |
| `rtl/delay_n.sv` | buffer delay line (behavioural: an `assign #` per buffer) |
| `rtl/tlatch.sv` | transition latch/register: normally transparent or normally opaque, optional clear |
| `rtl/cca_bit.sv`, `cca4.sv`, `ccs_incr_bit.sv`, `ccs_incr4.sv`, `ccs_decr_bit.sv`, `ccs_decr4.sv` | carry-completion arithmetic |
| `rtl/fifo_stage.sv`, `fifo4.sv` | FIFO |
| `rtl/chan3.sv`, `var_reg.sv`, `decr_unit.sv`, `router_macro.sv`, `mesh_element.sv` | router |
| `rtl/st_cells_top.sv` | everything side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per block |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also
has a watchdog, which counts a failure if the design hangs. Build and run
one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/router_pkg.sv \
    tb/tb_mesh_element.sv --top-module tb_mesh_element -Mdir obj_mesh
./obj_mesh/Vtb_mesh_element
```

`router_pkg.sv` is needed for the router testbenches, the mesh testbenches
and the top testbench. The other modules are found through `-Irtl`.
`--timing` is required, because the cell delays and the testbench handshakes
use `#` delays.

What the testbenches check:
- **Cells.** The C-element, latches, Select and Toggle are checked against
  reference models under random stimulus. The Call testbenches check that
  only the calling client is acknowledged. The arithmetic testbenches
  check every operand combination, or random operands.
- **Timing.** The Q-select testbenches check which process starts and the
  exact start latency. `tb_delay_n` checks that a delay line's delay is N
  times its unit delay.
- **`tb_fifo4`** checks word order. It also checks that the FIFO fills to
  four words, stalls the writer, and lets a word ripple through when empty.
- **`tb_router_macro` and `tb_mesh_element`** send random packets into all
  inputs, with random output stalls. Every packet must arrive whole, in
  order per input, at the output the routing rule predicts. They count:
  straight and turned packets, multi-word packets, X and Y in flight
  together, and stalls.
- **`tb_st_cells_top`** runs every group at the default sizes. It counts
  each mechanism, and fails if one never happens: each Call client, toggle
  alternation, each Q-select process, idle polling, carry and no-carry
  results, FIFO full, stall and ripple, and the X, Y and processor routes.

## Synthesis and tool warnings

These circuits are asynchronous on purpose, and lint tools report this.

- **Combinational loops (UNOPTFLAT, logic-loop warnings).** C-elements,
  Select latches and the XOR merges in the Call modules and Q-select rings
  are state held in feedback. So is the router's program, whose control
  transitions go round its Selects and back. Every such loop is intended.
  Verilator simulates them correctly, only more slowly.
- **"No latches detected" on `always_latch` (`tlatch`, `tselect`).** The
  enable of these latches comes from other latches' outputs through XORs,
  so the tool cannot prove that a latch is meant. The blocks are level
  latches by design.
- **Delays.** `assign #` delays are ignored by synthesis. In silicon, the
  Q-select bundling delays, the `decr_unit` enable delay and the
  `var_reg` write delay must be made from real buffer chains. Put them on
  placed delay cells, and check them against the data-path delay they
  cover.
  - With zero delay, `var_reg`'s write window closes at the instant it
    opens. A zero-delay netlist of the router therefore shows a word
    register that never loads.
  - The simulated RTL is the reference.
- **Reset.** Only control state is cleared. The FIFO and VAR data registers
  are not; their contents are don't-care until the first word is written.

## Departures and limits

- **Cell delays.** Every C-element has a one-unit output delay. Without it,
  a FIFO stage's register and C-element would change in the same instant,
  and the register would never reopen. The original relies on physical
  gate delay here.
- **Metastability.** The Q-select's tolerance of a changing probe is not
  modelled: in two-state simulation, sampling is always clean.
- **Carry-completion `ack`.** `cca4` keeps the original's completion check
  on only two of its four bits.
- **Router size.** A mesh element exposes 44 signals: six channels of
  request, acknowledge and a 5-bit word, plus clear and init. The published
  FPGA version used 39 I/O pins. How it saved the other pins is not known,
  so this design keeps every channel complete.
- **Not built.**
  - The vendor logic module and the vendor XOR/XNOR gates: XOR is written
    inline.
  - The generic "bundled data-path element", which is a pattern rather than
    a circuit: any combinational block plus a `delay_n` on its request.
