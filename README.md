# March C- built-in self-test for SRAM

Embedded SRAM takes much of a chip's area. It is also where manufacturing
defects are most likely to appear. A memory BIST puts the tester next to the
memory: logic that writes known patterns, reads them back and compares them
with what should be there, one memory operation per clock, with no external
tester.

This RTL has two such engines. Both run the **March C-** algorithm:

```
M0 dn(w0); M1 up(r0,w1); M2 up(r1,w0); M3 dn(r0,w1); M4 dn(r1,w0); M5 up(r0)
```

`up` and `dn` give the address order. `w0` and `r1` mean "write 0" and "read
and expect 1". Each element visits every address once and does its operations
there before it moves on. That makes 10 operations per cell and a test time of
10·N for N cells. March C- detects stuck-at faults, transition faults, address
decoder faults, and inversion and idempotent coupling faults between cells.

| engine | memory | what it tests | test time |
|---|---|---|---|
| word-oriented MBIST (`mbist_core`) | 64 words × 8 bits | March C- once for each bit position of the word | 10 · 64 · 8 = 5120 cycles |
| bit-oriented BIST (`march_fsm`) | 16 words × 1 bit | March C- once | 10 · 16 = 160 cycles, plus 1 init cycle |

`bist_top` puts the two engines side by side, each with its own memory. They
share only the clock.

## Word-oriented MBIST

### Blocks

```
            start,rst                      normal-mode address/datain/rwbarin/csin
                |                                          |
        mbist_controller --NbarT,ld--+          +----------v----------+
                ^                    |          |      mbist_mux      |--> sram (64x8)
               cout                  v          |  (NbarT: 0 normal,  |      |
                |            mbist_counter_seq  |   1 BIST)           |      | ramout = dataout
                +------------ q[12:0] ----------+--> q[5:0] address   |      v
                                |  q[6] --------+--> rwbar            | mbist_comparator --> eq
                                v               +---------^-----------+      ^
                          mbist_decoder --data_t----------+                  |
                                +-------compare_val--------------------------+
```

- **mbist_controller** has two states. In IDLE the memory is in normal mode
  (`NbarT`=0) and `ld` holds the counter-sequencer at its start value. A
  `start` pulse moves it to TEST (`NbarT`=1). It goes back to IDLE on the
  edge after `cout`.
- **mbist_counter_seq** is the one register that sequences the whole test
  (see below).
- **mbist_decoder** turns `q[12:6]` into the word to write (`data_t`) and the
  word a read must return (`compare_val`).
- **mbist_mux** holds the four multiplexers in front of the memory. Address,
  data, `rwbar` and `cs` come from the system when `NbarT`=0. They come from
  the BIST when `NbarT`=1, with `cs` forced to 1. The BIST `rwbar` is `q[6]`
  while the counter is enabled (`cen`), and 1 (read, nothing written)
  otherwise.
- **mbist_comparator** drives `eq = (ramout == compare_val)`.

### The counter-sequencer: the part to understand

`q` is 13 bits wide:

| bits | field | meaning |
|---|---|---|
| `q[5:0]` | address | memory word |
| `q[9:6]` | op | March C- operation, 0..9 |
| `q[12:10]` | bit | bit of the word under test, 0..7 |

The ten operations are numbered in the order March C- performs them:

| op | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| element | M0 | M1 | M1 | M2 | M2 | M3 | M3 | M4 | M4 | M5 |
| operation | w0 | r0 | w1 | r1 | w0 | r0 | w1 | r1 | w0 | r0 |
| direction | dn | up | up | up | up | dn | dn | dn | dn | up |

With this numbering, every read has an odd code. So `q[6]` is the memory's
read/not-write line, with no decode.

The counter-sequencer does not simply count. On each enabled clock:

1. **Inside a two-operation element (M1..M4):** at a read, `op` steps up to
   the matching write and the address is held. At the write, `op` steps back
   down and the address moves one step in the element's direction. Each
   address therefore stays on the bus for two cycles: read, then write.
2. **In M0 and M5:** `op` stays put and the address moves every cycle.
3. **At the last address of an element:** `op` moves to the next element. The
   address is loaded with that element's first address: 0 for an ascending
   element, 63 for a descending one.
4. **After M5:** the bit field advances and M0 starts again at address 63.
   After M5 of bit 7, `cout` is high in that final cycle and `q` returns to
   its start value.

`u_d` (1 = ascending) is decoded from `op` and brought out of the block.

### Test data

For bit *b*, the decoder puts the operation's value (0 for w0/r0, 1 for
w1/r1) into bit *b* and 0 into all other bits. Each bit position runs a full
March C- with every other bit held at 0, so:

- every bit is stuck-at-1 checked by every `r0`;
- bit *b* is stuck-at-0 checked by its own `r1` reads;
- coupling between bits of the same word shows up as a non-zero neighbour.

`data_t` and `compare_val` come from the same decode, so they are always
equal.

### Timing and status

- The test starts on the edge after `start`.
- It takes exactly 5120 cycles with `NbarT`=1: 10 · 64 operations for each of
  8 bits.
- 2560 of those cycles are reads. `rd_chk` (`NbarT` and `q[6]`) marks them.
- `eq` is valid only while `rd_chk` is high. In a write cycle it compares the
  old word with the value being written.
- The comparator does not latch. A user who wants a pass/fail flag must
  collect `!eq && rd_chk` outside.
- Read data must come back in the cycle the address is applied. The memory
  model (`sram`) writes on the clock edge and reads combinationally.
- After a test every word holds 0.

## Bit-oriented BIST

This engine is a small state machine (`march_fsm`), an up/down address
counter (`updown_counter`) and a 16 × 1 memory.

- **Phases.** `phase` runs init, phase1..phase6 (elements M0..M5), then final.
- **Elements.** `element` is ele1 for an element's first operation and ele2
  for the second. In phases 2-5, ele1 is the read and ele2 the write, so each
  address lasts two cycles. Phases 1 and 6 spend one cycle per address.
- **No load at element boundaries.** The counter resets to 1111, where M0's
  descending sweep starts. At the end of an element the FSM lets the counter
  count on when the next element runs in the same direction, because the
  wrap-around lands on the next start address (1111 → 0000 up, 0000 → 1111
  down). It holds the counter when the direction reverses, because the next
  element starts where the last one ended.
- **Enables.** `wen` and `oen` are driven at the parameter levels
  `WEN_ACTIVE`=1 and `OEN_ACTIVE`=0 when active:
  - write: `wen`=1, `oen`=1;
  - read: `wen`=0, `oen`=0;
  - idle: `wen`=0, `oen`=1.
- **Test data.** `data` carries the written or expected value in every cycle.
- **End of test.** `done` goes to `DONE_LEVEL` in the final state. `fail`
  stays set from the first read that did not return the expected value until
  `reset`.
- **Timing.** `reset` is synchronous. Init lasts one clock after reset is
  released. Then come 160 test cycles and `done`.

## Top-level ports (`bist_top`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | clock for both engines |
| `rst`, `start` | in | MBIST synchronous reset; start pulse |
| `address[5:0]`, `datain[7:0]`, `rwbarin`, `csin` | in | normal-mode memory access (`rwbarin`=0 writes when `csin`=1) |
| `dataout[7:0]` | out | memory output (normal-mode reads, and test reads) |
| `NbarT` | out | 1 while the MBIST owns the memory |
| `cout` | out | last MBIST test cycle |
| `eq`, `rd_chk` | out | comparison result; cycles in which it is meaningful |
| `bo_reset` | in | bit-oriented engine reset; it runs once this is released |
| `bo_done`, `bo_fail` | out | bit-oriented test finished; a mismatch was seen |
| `bo_address`, `bo_wen`, `bo_oen`, `bo_data`, `bo_phase`, `bo_element` | out | bit-oriented memory bus and state, for observation |

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 6 | MBIST memory address width |
| `DATA_W` | 8 | MBIST memory word width |
| `BO_ADDR_W` | 4 | bit-oriented memory address width |
| `BO_DATA_W` | 1 | bit-oriented memory word width |
| `WEN_ACTIVE` | 1 | active level of `bo_wen` |
| `OEN_ACTIVE` | 0 | active level of `bo_oen` |
| `DONE_LEVEL` | 1 | level of `bo_done` when done |

With other `ADDR_W` and `DATA_W` values the counter-sequencer is
`ADDR_W + 4 + clog2(DATA_W)` bits wide. The test takes `10 · 2^ADDR_W · DATA_W`
cycles.

## What is fixed by the design and what is a choice

**Taken from the architecture:**

- the 13-bit counter-sequencer with its address/operation/bit fields;
- the hold-for-two-cycles rule;
- the decoder driven by `q[12:6]`, whose top three bits select the bit;
- the controller's `start`/`cout` handshake and its `NbarT` and `ld` outputs;
- the four multiplexers, including `rwbar` taken from `q[6]`;
- the comparator's `eq`;
- the bit-oriented engine's phase and element names;
- its 4-bit address, 1-bit data and enable-level parameters;
- its up/down counter.

**Choices of this RTL:**

- the 0..9 operation numbering;
- reloading the start address at element boundaries in the counter-sequencer;
- the one-hot-bit data background;
- the direction decoded inside the counter-sequencer. The architecture drawing
  shows a `u_d` input there without saying what drives it.
- `cen` tied to `NbarT`;
- `rd_chk`;
- the bit-oriented `fail` flag and counter enable;
- the wrap-or-hold rule;
- asynchronous-read memories;
- all resets synchronous and active high.

**Where the descriptions disagree:**

- *Word width of the bit-oriented engine.* Its block diagram shows 4-bit test
  and read data, but its simulation is set up with a 1-bit word. The 1-bit
  word is used here, and `BO_DATA_W` can be changed.
- *Output-enable level.* One description uses active-high enables throughout,
  while the engine's own parameter makes the output enable active low. The
  parameter is followed.
- *Decoder input during a read/write pair.* One description says the decoder
  input stays unchanged while data are written and read. That cannot hold in
  a read/write element, because the operation field changes between the read
  and the write. Here the two are separate operation codes that decode to
  their own values.

The memories are plain arrays standing in for the SRAM under test. They are
not a model of a real SRAM macro.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|---|---|
| `tb_mbist_counter_seq` | the full 5120-step `q`, `u_d` and `cout` trace against a sequence built from the element list; `cen` hold; `ld` reload |
| `tb_mbist_decoder` | all 128 inputs |
| `tb_mbist_controller` | start, cout, reset, and start ignored during a test |
| `tb_mbist_mux`, `tb_mbist_comparator`, `tb_sram`, `tb_updown_counter` | random and directed stimulus against reference models |
| `tb_mbist_core` | the MBIST on `fault_sram_model` (see below): a good memory gives 5120 cycles, 2560 reads and no mismatch; every injected fault is flagged |
| `tb_march_fsm` | the bit-oriented engine cycle by cycle (phase, element, address, enables, data) against its expected 160-cycle trace; every injected fault kind sets `fail` |
| `tb_bist_top` | both engines end to end at default sizes (see below) |

`fault_sram_model` is a behavioural memory, used only by testbenches. It
injects one of these faults: stuck-at-0 or 1, up or down transition,
inversion coupling, idempotent coupling, or an address-decoder fault.

`tb_bist_top` runs both engines end to end at the default sizes:

- normal mode;
- a full MBIST run;
- a run in which one written cell is disturbed, which must be flagged;
- the bit-oriented engine on a good memory and on a disturbed one.

It also counts that each mechanism happened:

- mode switches;
- every March element and bit position;
- both sweep directions;
- address holds;
- `cout`;
- mismatches;
- every bit-oriented phase.

To simulate with Verilator, for example the top:

```
verilator --binary --timing -Irtl -y rtl -y tb --top-module tb_bist_top \
    rtl/bist_pkg.sv tb/tb_bist_top.sv
./obj_dir/Vtb_bist_top
```

Any other testbench runs the same way with its name. Every testbench finishes
in well under a second.
