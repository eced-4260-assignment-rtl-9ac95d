# multiplier_mem — a three-clock multiply-and-store pipeline

`multiplier_mem` takes two 16-bit operand streams that are produced in two
different clock domains, pairs them up in a third clock domain, multiplies
each pair, and stores the 32-bit products in a dual-port RAM that can be read
back at any address. The interesting part is not the arithmetic but the
clock crossings: each operand enters through its own dual-clock FIFO, and a
small read-request register decides when both FIFOs hold a word so that the
i-th `a` is always multiplied by the i-th `b`.

```
 clk_wr1 domain          clk_rd domain                         clk_wr1 | clk_rd
 a, wr_en1 ──► fifo_inst1 ──a_q──┐                             write   | read
                                 ├─► qlpm_mult ──m──► ram_inst ──────────────► qout
 b, wr_en2 ──► fifo_inst2 ──b_q──┘   (clk_rd)        addr_wr,        addr_rd,
 clk_wr2 domain    ▲  ▲                              wr_en_bram      rd_en_bram
                   │  └── rdempty ──► read_req register (clk_rd) ──► pop both
```

## Files

| file | contents |
|---|---|
| `rtl/multiplier_mem_pkg.sv` | widths and types shared by all blocks |
| `rtl/fifo.sv` | dual-clock FIFO (Gray-coded pointers) |
| `rtl/qlpm_mult.sv` | clocked unsigned multiplier |
| `rtl/ram.sv` | simple dual-port RAM with separate write and read clocks |
| `rtl/multiplier_mem.sv` | top level: the wiring and the read-request register |
| `tb/tb_*.sv` | one self-checking testbench per block, one end-to-end, one long run |

## Top-level interface

| port | dir | width | clock | meaning |
|---|---|---|---|---|
| `clr` | in | 1 | async | clears both FIFOs, the read request and the RAM output register |
| `clk_wr1` | in | 1 | — | write clock of operand FIFO 1 **and** of the RAM |
| `clk_wr2` | in | 1 | — | write clock of operand FIFO 2 |
| `clk_rd` | in | 1 | — | FIFO read clock, multiplier clock, RAM read clock |
| `a`, `wr_en1` | in | 16, 1 | clk_wr1 | push `a` into FIFO 1 |
| `b`, `wr_en2` | in | 16, 1 | clk_wr2 | push `b` into FIFO 2 |
| `addr_wr`, `wr_en_bram` | in | 8, 1 | clk_wr1 | store the current product at `addr_wr` |
| `addr_rd`, `rd_en_bram` | in | 8, 1 | clk_rd | load RAM word `addr_rd` into `qout` |
| `qout` | out | 32 | clk_rd | registered RAM read data |

The FIFO full and empty flags are internal (`full1`, `full2`, `empty1`,
`empty2`); no port brings them out.

## How the two operand streams are paired

Both FIFOs are read on `clk_rd`. On every `clk_rd` edge the register

    read_req <= !empty1 && !empty2

records whether both FIFOs held a word, and on the following edge both FIFOs
are popped together. Since both FIFOs are always popped on the same edge,
word *i* of FIFO 1 meets word *i* of FIFO 2 at the multiplier.

Because `read_req` is registered it lags the flags by one edge: right after a
pop that empties a FIFO, `read_req` is still high. The FIFOs ignore a read
while empty, but that alone is not enough. If FIFO 1 is one word ahead of
FIFO 2, the stale request would pop FIFO 1 alone and every later product
would pair the wrong operands. This design therefore pops with

    pop = read_req && !empty1 && !empty2

which keeps the registered request but never pops one FIFO without the
other. This gate is a choice of this design. The end-to-end testbench counts
how often it fires, and a copy of the top without it fails that testbench.

## Latency and throughput

Read side, counted in `clk_rd` edges after the later of the two operand
writes:

| step | edges |
|---|---|
| write pointer crosses into `clk_rd` (two-flop synchronizer, registered empty flag) | 2–3 |
| `read_req` registers "both not empty" | 1 |
| pop: `a_q`, `b_q` take the pair | 1 |
| multiplier register (`MULT_LATENCY`) | 1 |

The measured worst case in the end-to-end test is 6 edges. After that, `a_q`,
`b_q` and `m` hold until the next pair, so `m` always shows the product of
the most recent pair.

While both FIFOs stay non-empty, a pair is popped on every `clk_rd` edge.
When a FIFO runs dry, the stale request that follows is gated off and costs
no cycle. With the clock ratio of the long-run testbench (each FIFO written
at a quarter of the `clk_rd` rate), the FIFOs never hold more than one or
two words.

## The product write is a clock crossing

The product `m` is produced on `clk_rd`, but the RAM stores it on `clk_wr1`.
There is no synchronizer on this path, matching the structure the design was
specified with. A user must raise `wr_en_bram` for an address only once the
product has settled (six `clk_rd` edges after the later operand write is
enough, see above) and keep it settled until the `clk_wr1` edge that stores
it. When `clk_rd` is derived from `clk_wr1` with aligned edges, as in the
long-run testbench, the path is in fact synchronous and the RAM captures the
value of `m` from before the shared edge.

## Blocks

### `fifo` — dual-clock FIFO

Classic Gray-pointer design. Each side keeps a binary pointer one bit wider
than the address and its Gray code; the Gray pointer is passed to the other
side through two flip-flops. Empty is "read Gray pointer equals synchronized
write pointer"; full is "write Gray pointer equals synchronized read pointer
with its two top bits inverted". Both flags are registered and therefore
pessimistic by the synchronizer delay, never optimistic. Writes while full
and reads while empty are ignored. The read is in normal (not look-ahead)
mode: `q` changes on the edge that accepts `rdreq` and then holds. An
immediate assertion on each side checks that a Gray pointer never changes by
more than one bit per clock.

Parameters: `WIDTH` (16), `ADDR_W` (8, i.e. 256 words). Port names follow
the usual vendor FIFO (`data`, `wrreq`, `wrclk`, `wrfull`, `rdreq`, `rdclk`,
`q`, `rdempty`), plus an asynchronous clear `aclr`.

### `qlpm_mult` — clocked multiplier

Unsigned `WIDTH` × `WIDTH` → `2*WIDTH` product through `LATENCY` registers
(default 1). No reset.

### `ram` — dual-port product RAM

`2**ADDR_W` words of `WIDTH` bits (256 × 32). Write port on `wrclock`
(`wren`, `wraddress`, `data`); read port on `rdclock` with an output register
`q` that loads `mem[rdaddress]` when `rden` is high, holds otherwise, and is
cleared asynchronously by `rd_aclr` (the stored words are not touched). Read
latency is one `rdclock` edge.

## Reset and power-up

`clr` is an asynchronous clear, and every flip-flop that the design reads
before writing sits behind it. The multiplier pipeline and the RAM array are
not cleared. As an asynchronous clear, `clr` acts on its rising edge or on
any clock edge while it is high. Pulse it, or hold it high across at least
one edge of each of the three clocks, before the first operand. A
simulation that merely starts with `clr` already high, with no clock edge
before its release, leaves the FIFO pointers at their random power-up value.

## Where this design departs from, or fills in, the original specification

The original specification gives the top-level structure exactly: the ports,
the three clocks, the three blocks and their wiring, and the registered
`read_req`. It names the FIFO, multiplier and RAM and gives their ports, but
not their insides. What this RTL decided itself:

- FIFO depth 256 words, Gray-pointer structure, overflow/underflow
  protection, normal read mode.
- Multiplier: unsigned, one pipeline register.
- RAM: one output register (read latency 1); `rd_aclr` clears only that
  register; `rden` low holds `qout`.
- `clr` also clears both FIFOs (new `aclr` port) and `read_req`. Originally
  it drove only the RAM's read clear, and the rest relied on registers
  powering up at zero.
- The FIFOs are popped with `read_req && !empty1 && !empty2` instead of
  `read_req` alone (see the section on pairing above).

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

| testbench | what it establishes |
|---|---|
| `tb_fifo` | 8-word instance: clear state; a word becomes visible 2–4 read edges after it is written; exactly 8 writes accepted before full, extra writes dropped; in-order drain; read while empty leaves `q` alone; 600 random writes against random reads on unrelated clocks, every word checked |
| `tb_qlpm_mult` | default and 3-stage instances, 2000 random and corner operand pairs, product and latency checked |
| `tb_ram` | all 256 words written and read back on unrelated clocks; `wren` low, `rden` low hold, asynchronous `rd_aclr`, contents surviving the clear |
| `tb_multiplier_mem` | top at default sizes: directed pairs (including `0xFFFF × 0xFFFF`) stored and read back through the RAM ports, latency ≤ 8 `clk_rd` edges; FIFO 1 and then FIFO 2 driven to full with writes dropped; a streaming phase with the RAM written every `clk_wr1` cycle and every word read back; `rd_en_bram` hold and `clr` clear of `qout`. A model predicts every product from its own operand queues, and each mechanism (full on each FIFO, pop, stale request gated, one-sided empty, RAM write, hold, clear) must occur at least once |
| `tb_reference_stimulus` | top at default sizes under the original 2 ms stimulus: a and b counting up every 20 ns, RAM written and read continuously. About 100,000 pairs; every product, every `qout` value and the absence of FIFO overflow are checked |

Each block's testbench has also been run against a copy of the block with
one deliberate bug: a wrong full comparison in the FIFO, a product truncated
to 16 bits, `rden` ignored in the RAM, and the pop gate removed in the top.
Each copy fails its testbench.

## Simulating

With Verilator 5 (`--timing` is needed for the testbenches' delays):

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -y rtl -y tb +libext+.sv rtl/multiplier_mem_pkg.sv \
        tb/tb_multiplier_mem.sv --top-module tb_multiplier_mem -o sim
    ./obj_dir/sim

Replace `tb_multiplier_mem` with any other testbench name. Sizes are changed
in `rtl/multiplier_mem_pkg.sv` (`FIFO_ADDR_W`, `MULT_LATENCY`) or through
each block's parameters; the top's operand, product and address widths
(16, 32 and 8) come from the package too.
