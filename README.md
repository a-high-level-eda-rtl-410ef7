# HD-BIST: hierarchical, distributed control of built-in self-test

A large chip holds many cores that each test themselves (BIST), and someone
has to start those tests in a sensible order, wait for them, collect the
verdicts and find out which core failed. HD-BIST (Hierarchical Distributed
BIST) does this with three kinds of hardware:

* a **TBlock** wrapped around every BISTed core, with a one-bit-wide view of
  the core's test: a Test Control Register (TCR) to start it and a Test Status
  Register (TSR) to see whether it has finished and whether it passed;
* a **TProcessor** that runs a *schedule* for one chain of TBlocks;
* the **Test Chain Bus (TBus)**, a narrow ring that runs from the TProcessor
  through every TBlock of its chain and back.

The TProcessor talks to its blocks only through *tokens* sent round the ring.
A token either writes one TCR bit or reads one TSR bit, and is addressed to a
single block or, by the broadcast address, to all of them. Chains nest: a
TProcessor can sit in an upper chain where it looks exactly like a TBlock, so
"testing" it runs its whole lower chain. The top TProcessor can then run a
*diagnosis* that collects the addresses of the faulty blocks, including those
behind a lower TProcessor.

This RTL implements the three parts and, as its top level, a two-chain
example system with four cores.

## The example system (`hdbist_top`)

```
             top TProcessor
            /              \
  TBlock(BISTedCore1)   TestProcessor1 ---- lower ring ----+
      addr 2              addr 0                           |
            \              /                TBlock(BISTedRom)  addr 0
          TBlock(BISTedRAM)                 TBlock(BISTedCore2) addr 1
              addr 1
```

Top ring: TProcessor → BISTedCore1 → BISTedRAM → TestProcessor1 → TProcessor.
Lower ring: TestProcessor1 → BISTedRom → BISTedCore2 → TestProcessor1.
Both rings are one bit wide.

Schedules (`hdbist_pkg::TOP_PROG`, `hdbist_pkg::TP1_PROG`):

| top chain | meaning |
|---|---|
| `test RAM Core1` | start both tests (one token each) |
| `wait Core1` | poll Core1 until done, record its result |
| `stop RAM` | poll RAM until done; abort the schedule if it failed |
| `test TestProcessor1` | start the lower chain's schedule |
| `stop TestProcessor1` | wait for the lower chain; abort if any of it failed |
| `diagnose` | collect the addresses of the faulty blocks |

| lower chain | meaning |
|---|---|
| `test all` | one broadcast token starts ROM and Core2 |
| `wait all` | broadcast-poll until both are done, record results |

The four cores are not part of this design. Their BIST ports are top-level
ports: `bist_start/bist_done/bist_pass[3:0]`, index 0 = RAM, 1 = Core1,
2 = ROM, 3 = Core2. Pulse `start`; when `done` rises, `pass` gives the
verdict, `fail_map` the failed top-chain addresses, `diag_log[0..diag_count-1]`
the diagnosis and `struct_fault` a broken top ring.

Note what `stop` implies in this schedule: a failure of RAM, or of anything
in the lower chain, aborts the schedule before `diagnose`. Only a failure of
Core1 (checked by `wait`) reaches the diagnosis. To diagnose lower-chain
faults, compile a different top schedule through the `TOP_SCHED` parameter,
e.g. `test all; wait all; diagnose` (the end-to-end testbench does this).

## Tokens and the ring

Tokens are 11 bits, sent least significant bit first, `BUS_W` bits per clock
(`ceil(11/BUS_W)` clocks per token). An idle ring carries zeros.

| bit | field | meaning |
|---|---|---|
| 0 | start | always 1 |
| 1 | op | 0 = write TCR bit, 1 = read TSR bit |
| 4:2 | sel | bit index |
| 7:5 | addr | block address; 7 = broadcast |
| 8 | par | XOR of op, sel, addr |
| 9 | val | value written, or read result |
| 10 | ack | set by each block that accepted the token |

Each ring stage (`hdbist_tbus_node`) is a token-sized shift register: a
token takes exactly one token time (11 clocks at `BUS_W = 1`) to pass a
node. When the whole token is inside, the node checks parity and address in
one cycle; if the token is its own it sets `ack`, and for a read ANDs the
selected TSR bit into `val`. The TProcessor sends reads with `val = 1`, so a
broadcast read returns 1 only if *every* block's bit is 1. That is how
`wait all` is one poll: DONE of all blocks, ANDed.

Only one token is in a ring at a time. The TProcessor checks every returning
token: start bit present, header unchanged, parity right, `ack` set. A token
that fails a check, or does not return within
`TIMEOUT = (N_BLOCKS+1)·ceil(11/BUS_W) + 8` clocks, sets `struct_fault` and
ends the schedule with `pass = 0`. A node that sees a bad parity forwards the
token untouched, so the error surfaces as a missing `ack`.

Round-trip time of one token in a chain of N blocks: (N+1)·ceil(11/BUS_W)
clocks (send + N stages), plus about two clocks of processor overhead.

## TBlock registers and the core handshake (`hdbist_tblock`)

| register | bit | meaning |
|---|---|---|
| TCR | 0 | RUN: writing 1 starts the BIST (ignored while a test runs) |
| TSR | 0 | DONE: the last test has finished (0 after reset) |
| TSR | 1 | GOOD: no failure recorded (1 after reset and at each start) |
| TSR | 2..7 | `tsr_ext` inputs (a lower TProcessor's per-block GOOD flags) |

GOOD rather than FAIL is stored so that broadcast AND-reads and untested
blocks both behave: an untested block does not look faulty.

Core handshake: the TBlock raises `bist_start`; the core must clear
`bist_done` at the clock edge where it sees `bist_start`, and later raise
`bist_done` with its verdict on `bist_pass`. Two parameters adapt the wrapper
to a core: `START_PULSE` (1 = one-clock start pulse, 0 = start held until
done) and `PASS_ACTIVE_LOW` (1 = the result input is a fail flag).

## The TProcessor (`hdbist_tprocessor`)

A schedule is an array `PROG` of up to 8 `instr_t` = {op, all, mask}: `mask`
picks targets by address, `all` targets the whole chain via broadcast.
The FSM interprets it:

* **TEST** – write RUN = 1 to each target (one broadcast token for `all`).
* **WAIT** – poll DONE of each target until it reads 1 (one broadcast poll
  for `all`), then read GOOD of each target and set its bit in `fail_map`.
* **STOP** – as WAIT, then end the schedule (`pass = 0`) if a target failed.
* **DIAG** – top chain only (a lower processor skips it, and an assertion
  flags it). Reads GOOD of every block. A failed ordinary block is logged
  as `{addr, sub_valid=0}`. For a failed block that is a TProcessor
  (parameter `IS_TP`, with `SUB_N` blocks below it) it reads TSR bits 2..,
  which carry that processor's per-block GOOD flags, and logs
  `{addr, sub_valid=1, sub_addr}` for each failed one; if none is marked
  (its own ring broke) it logs the processor's address itself.
* **END** – `done = 1`; `pass` = no failure, no abort, no structural fault.

With `IS_TOP = 0` the processor contains an `hdbist_tblock` on its `up_in`
/`up_out` ring ports at address `UP_ADDR`: a RUN write from above starts the
schedule, DONE/GOOD report its end and verdict, and `tsr_ext` carries the
lower chain's GOOD flags. A structural fault in a lower ring therefore shows
upstairs as a failed TProcessor, not as the top's `struct_fault`.

## Where this RTL departs from, or goes beyond, the published scheme

The scheme fixes the roles of TBlock, TProcessor and TBus, the ring, tokens
of one-bit TCR writes / TSR reads, single-cast plus broadcast addressing,
the four scheduling primitives and their meaning, polling, diagnosis from
the top only, and a processor acting as a TBlock upward. It does not publish
the following, which are choices made here:

* the token format, parity/ack/timeout self-checks and store-and-forward
  ring timing;
* the TCR/TSR bit assignment and the core handshake;
* the diagnosis algorithm. The one here reaches **two levels** (top chain
  and the chains directly below it). A block two or more processors deep is
  reported only as its failed lower TProcessor; the scheme asks for any
  depth;
* the schedule encoding: one generic FSM interprets a program parameter,
  where the original flow generates one dedicated FSM per chain from a
  description language. The compiler is not part of this RTL; schedules are
  written by hand as `prog_t` constants;
* sizes: 3-bit addresses (7 blocks per chain), 8-instruction programs, an
  8-entry diagnosis log. None of these numbers comes from the scheme.

## Files

| file | content |
|---|---|
| `rtl/hdbist_pkg.sv` | token and instruction types, constants, example schedules |
| `rtl/hdbist_tbus_node.sv` | one ring stage |
| `rtl/hdbist_tblock.sv` | TBlock (ring stage + TCR/TSR + core handshake) |
| `rtl/hdbist_tprocessor.sv` | TProcessor (token engine + schedule FSM + upward TBlock) |
| `rtl/hdbist_top.sv` | the two-chain example system |
| `tb/bist_core_model.sv` | behavioural BISTed core for simulation |
| `tb/tb_hdbist_*.sv` | self-checking testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl \
  rtl/hdbist_pkg.sv rtl/hdbist_tbus_node.sv rtl/hdbist_tblock.sv \
  rtl/hdbist_tprocessor.sv rtl/hdbist_top.sv tb/bist_core_model.sv \
  tb/tb_hdbist_top.sv --top-module tb_hdbist_top
./obj_dir/Vtb_hdbist_top
```

| testbench | what it shows |
|---|---|
| `tb_hdbist_tbus_node` | one-token latency on 1- and 4-bit rings, ack/val of single-cast and broadcast reads, write strobes, bad parity ignored and flagged |
| `tb_hdbist_tblock` | TSR after reset, RUN by single-cast and broadcast, pulse and level start, both result polarities, DONE polled 0 then 1, AND of broadcast reads, extra TSR bits |
| `tb_hdbist_tprocessor` | test/stop/wait/diagnose on a ring with a lower processor, abort on stop, two-level diagnosis, 33-clock round trip of three stages, structural fault from a cut ring and from a flipped bit |
| `tb_hdbist_top` | the example system in seven scenarios (all pass; Core1, RAM, Core2 failing; top ring cut; lower-chain diagnosis; lower ring cut), counting that every mechanism occurred |
| `tb_hdbist_top_full` | the example system with all defaults: a passing session and one with Core1 failing |

A complete example session with core test lengths of 150–300 clocks takes
about 1100 clocks.

## Changing it

* **Another chain**: instantiate `hdbist_tblock`s in a ring behind an
  `hdbist_tprocessor`, give each a distinct `ADDR` below 7, set `N_BLOCKS`,
  and write a `prog_t` schedule. Mark lower processors in `IS_TP`/`SUB_N`.
* **Wider bus**: set `BUS_W` on every part of a ring to the same value.
* **Longer programs**: raise `PROG_MAX` in the package and extend the
  program constants.
* **More blocks per chain**: `ADDR_W` and `SEL_W` in the package size the
  token, but the instruction masks, `IS_TP`/`SUB_N` literals and the 3-bit
  sub-address counter are written for the 3-bit fields; widening them means
  editing those as well.
