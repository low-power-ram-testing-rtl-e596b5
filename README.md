# RAM built-in self-test with an LFSR pattern generator and a MISR

A RAM embedded in a chip is hard to test from the pins. This design adds a
small built-in self-test (BIST) engine next to a 256 x 8 single-port RAM.
When the test-mode input `test` is raised, the engine takes over the RAM and
works through three steps:

1. It writes a pseudo-random pattern into every word. The pattern comes from
   an 8-bit linear feedback shift register (LFSR).
2. It reads every word back.
3. It compresses the data into an 8-bit signature with a multiple-input
   signature register (MISR) and reports the result on one pass/fail flag,
   `ram_faulty`.

When `test` is low, a multiplexer in front of the RAM (the test collar)
gives the RAM to the normal system port.

The most important idea is how the engine knows the right answer. During
the write pass the MISR compresses the words **as they are written**. Its
final value is the signature that a fault-free RAM must give when read back,
so the engine stores it in a register. The MISR is then cleared. During the
read pass it compresses the words **as they come out of the RAM**. If the
two signatures differ, the RAM is faulty. The reference signature is
therefore never computed ahead of time and never stored in ROM. The same
hardware works for any size, seed or polynomial.

## Block diagram

```
            test ─┐
                  ▼
        ┌──────────────────┐ addr_reset/enable ┌──────────┐ address
        │    bist_ctrl     ├──────────────────►│ addr_gen ├────────────┐
        │  (FSM, reference │◄──────adone───────┤          │            │
        │   register,      │                   └──────────┘            ▼
        │   comparator)    │ wdg_reset/enable  ┌──────────┐ data_wdg ┌─────────────┐   ┌───────┐
        │                  ├──────────────────►│   wdg    ├────┬────►│ test_collar ├──►│  ram  │
        │                  │ wr, rd            └──────────┘    │     │   (mux)     │◄──┤256 x 8│
        │                  ├─────────────────────────────────────────►│             │   └───────┘
        │                  │ select1, misr_reset/enable        │     └──┬───────▲──┘
        │                  ├───────────────┐                   │ data_ram│      │ sys_* (normal mode)
        │                  │               ▼                   ▼        ▼
        │                  │◄─signature─┌─────────────────────────────────┐
        └───────┬──────────┘            │ misr (select: data_wdg/data_ram)│
                ▼                       └─────────────────────────────────┘
        test_done, ram_faulty
```

| Module | File | Role |
|---|---|---|
| `bist_top` | `rtl/bist_top.sv` | Top level. Wires the blocks below together. |
| `bist_ctrl` | `rtl/bist_ctrl.sv` | Controller FSM. Keeps the reference signature and compares it with the read signature. |
| `addr_gen` | `rtl/addr_gen.sv` | Address counter with a last-address flag `adone`. |
| `wdg` | `rtl/wdg.sv` | Write data generator. This is a modular (Galois) LFSR. |
| `misr` | `rtl/misr.sv` | Multiple-input signature register. It has an input select. |
| `ram` | `rtl/ram.sv` | The RAM under test. Synchronous, with a registered read port. |
| `test_collar` | `rtl/test_collar.sv` | Multiplexer that gives the RAM to either the system or the BIST. |
| `bist_pkg` | `rtl/bist_pkg.sv` | Default sizes and polynomial. Also holds the controller state type. |

## The test sequence

The controller (`bist_ctrl`) is a finite state machine (FSM) with eight
states. In each state it raises only the enables it needs. Blocks that are
not in use stay still, which keeps switching activity low.

| State | Clocks | What is enabled | Effect |
|---|---|---|---|
| `ST_IDLE` | — | nothing | Normal mode. The collar connects the system port. |
| `ST_INIT` | 1 | `addr_reset`, `wdg_reset`, `misr_reset` | Address = 0, LFSR = seed, MISR = 0. |
| `ST_WRITE` | N | `wr`, `addr_enable`, `wdg_enable`, `misr_enable`, `select1 = 0` | Writes LFSR word *k* to address *k* and folds the same word into the MISR. |
| `ST_LATCH` | 1 | `addr_reset`, `misr_reset` | Copies the MISR into the reference register, then clears the MISR. |
| `ST_READ` | N | `rd`, `addr_enable`, `select1 = 1`; `misr_enable` one clock late | Reads every address. Each word is folded in when it arrives. |
| `ST_DRAIN` | 1 | `misr_enable`, `select1 = 1` | Folds in the last word read. |
| `ST_COMPARE` | 1 | — | `ram_faulty <= (signature != reference)`. |
| `ST_DONE` | until `test` falls | — | `test_done = 1`. `ram_faulty` is valid. |

The controller moves out of `ST_WRITE` and `ST_READ` on `adone`, which
`addr_gen` raises while it holds the last address.

The RAM returns read data one clock after `rd`. For that reason
`misr_enable` in the read pass is `rd` delayed by one register, and
`ST_DRAIN` exists to catch the last word.

**Timing.** Let N = 2^`ADDR_W` be the number of words. Call the clock edge
that samples `test` high edge 1. `test_done` is high after edge 2N + 5. At
the default size that is edge 517.

The result stays on the outputs until `test` is lowered. The FSM then
returns to `ST_IDLE` on the next edge. To run another test, lower `test`
and raise it again.

The test **overwrites** the RAM. Afterwards, word *k* holds the LFSR state
after *k* steps from the seed. This is not a transparent BIST: the RAM
contents are not preserved.

## Pattern generator and signature register

Both registers use the modular, internal-XOR form. Call the stages
r0 … r(n-1). The bit leaving r(n-1) is fed back into r0. It is also XORed
between stages r(i-1) and ri for every bit i that is set in `TAPS`. The
MISR additionally XORs input bit `Mi` into stage ri:

```
r0' = r(n-1) ^ M0
ri' = r(i-1) ^ (TAPS[i] & r(n-1)) ^ Mi        (M = 0 for the wdg)
```

**Bit order.** Stage r0 is the **most significant** bit of the output
vector (`data_wdg`, `signature`). Each word therefore shifts towards bit 0.
A data word enters the MISR most significant bit first:

- bit `DATA_W-1` goes into r0;
- a word narrower than the signature feeds only the upper stages.

**Polynomial.** Both registers use P = x^8 + x^7 + x^3 + x^2 + 1
(`TAPS = 8'h8D`, taps into r0, r2, r3 and r7), which is primitive. This is
not an arbitrary choice for the MISR. It is the one modular MISR, with the
bit order above, that reproduces a recorded signature trace. In that trace,
the 4-bit word `1010` is compressed into an 8-bit register, and the
register goes

```
00100000 → 10110000 → 11111000 → 11011100 → 11001110 → 11000111 →
01110010 → 10011001 → 01011101 → 00111111 → 00001110
```

`tb_misr` replays this trace. The generator uses the same polynomial by
choice.

Written as a plain right shift of the output vector, one step XORs the
reversed polynomial `8'hB1` when the bit shifted out is 1. The testbenches
model the registers this way, independently of the RTL's per-stage form.

- **Generator.** From the seed `8'h01` it runs through all 255 non-zero
  words. It never produces `8'h00`. Address 255 therefore receives the seed
  again.
- **MISR input select.** `select` picks the word to fold in: 0 takes
  `data_wdg` (reference pass) and 1 takes `data_ram` (read pass).
- **What is detected.** Any error confined to a single word changes the
  signature. Error patterns spread over several words can cancel each other
  (aliasing). For random errors this happens with probability about 2^-8
  with an 8-bit signature.

## Normal mode and the test collar

When the FSM is in `ST_IDLE`, the collar connects the system port to the
RAM:

- `sys_we` and `sys_wdata` write on the clock edge.
- `sys_rd` loads `sys_rdata` one clock later.

From `ST_INIT` until the FSM is back in `ST_IDLE`, the collar gives the RAM
to the BIST instead:

- System requests are ignored.
- `sys_rdata` reads as zero.

The collar switches on the FSM state rather than on `test`. A test that has
started therefore keeps the RAM until it has finished and `test` has been
lowered.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_W` | 8 | Address width. The RAM has 2^`ADDR_W` words. |
| `DATA_W` | 8 | RAM word width. This is also the LFSR width. |
| `SIG_W` | 8 | MISR width. Must be ≥ `DATA_W`. |
| `WDG_TAPS` | `8'h8D` | LFSR feedback taps (bit i = tap into stage ri). |
| `WDG_SEED` | `8'h01` | LFSR value after reset. Must be non-zero. |
| `MISR_TAPS` | `8'h8D` | MISR feedback taps. |

If you change `DATA_W`, choose a primitive polynomial of that degree for
`WDG_TAPS`. For example, x^4 + x + 1 gives `4'h3` (a tap into r1). Otherwise the pattern
period is shorter than 2^`DATA_W` - 1.

Reset is synchronous and active high. It affects the controller only. The
counter, the LFSR and the MISR are cleared by the controller in `ST_INIT`.

## Where this design follows its source and where it chooses

These parts follow the source description:

- the block set and the 256 x 8 RAM;
- the 8-bit signature;
- the signal names between the controller and the other blocks (`adone`,
  `addr_reset`, `addr_enable`, `wdg_reset`, `wdg_enable`, `wr`, `rd`,
  `select1`, `misr_reset`, `misr_enable`, `ram_faulty`);
- the modular LFSR and MISR structures;
- the MISR polynomial and bit order, which are fixed by a recorded
  signature trace;
- the test-mode input that switches between normal mode and test mode;
- the test collar multiplexer.

These parts are choices made for this design:

- the generator's polynomial and its seed;
- the state machine, its encoding and the two-pass schedule;
- keeping the reference signature in a register (see below);
- the registered RAM read port and the read-before-write behaviour;
- the `test_done` flag;
- masking system read data during a test.

The source says that the good signature is kept in read-only memory. In
this design the reference is computed on chip during the write pass
instead, which is what the MISR's select between generator data and RAM
data allows.

The source's controller also has a generated clock for the address
counter. Here the whole design runs on one clock, and the counter uses a
clock enable.

The source reports gate delays and power for an FPGA implementation. The
RTL makes no claim about either.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Example with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv \
    rtl/addr_gen.sv rtl/wdg.sv rtl/ram.sv rtl/misr.sv rtl/test_collar.sv \
    rtl/bist_ctrl.sv rtl/bist_top.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

- **`tb_bist_top`** runs the top at its default size. It takes several
  seconds at most. The sequence is:
  1. Normal-mode write and read of every word.
  2. A self-test of a good RAM. During the test, system writes are blocked.
     The bench checks the 517-clock latency and compares the signature with
     a bench model.
  3. A check that the RAM now holds the generated patterns.
  4. Two self-tests with a fault put into the RAM array from the bench: one
     word upset during the write pass, and one bit flipped before it is
     read. Both must set `ram_faulty`.
  5. A final passing test.
- **`tb_bist_top_small`** runs the same sequence on a 4-word x 4-bit RAM
  with an 8-bit signature.
- **Block benches** (`tb_wdg`, `tb_addr_gen`, `tb_ram`, `tb_misr`,
  `tb_bist_ctrl`, `tb_test_collar`) compare each block with an independent
  model:
  - the LFSR and MISR benches use arithmetic modulo the polynomial;
  - the controller bench checks every control signal in every clock of the
    schedule above.

Assertions in the RTL check three things:

- the RAM is never written and read in the same BIST cycle;
- the MISR takes generator data only while writing;
- the LFSR never reaches zero.
