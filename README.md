# PicoBlaze crossbar network: hardware run as parallel software

This RTL is the hardware side of a scheme that runs a cycle-based hardware
description as software on several small processors. Each module of the
description becomes the program of one 8-bit PicoBlaze core. One pass
through a core's program loop is one tick of the described hardware's
clock. The cores run in lock-step: every PicoBlaze instruction takes
exactly two clocks, so the exchange of data between cores is fixed at
compile time. The network therefore needs no handshake, no FIFO and no
arbitration. Its hardware is just multiplexers and lookup ROMs, small
enough that four cores and their network fit where a hardware AES would
need several thousand FPGA slices.

The design follows the network described in *Executing Hardware as
Parallel Software for PicoBlaze Networks*. Four cores in a crossbar each
have an S-box block RAM and run AES-128, with the 16-byte state and key
split by column, one column per core. Where that description is silent,
this RTL makes its own choices; they are listed under
[Departures and own choices](#departures-and-own-choices).

## The network

```
             output bars (one per core, seen by every other core)
   ============================================================
        |                |                |               |
   +----+----+      +----+----+      +----+----+     +----+----+
   |  core 0 |      |  core 1 |      |  core 2 |     |  core 3 |   PicoBlaze
   | (ext.)  |      | (ext.)  |      | (ext.)  |     | (ext.)  |   (outside
   +-^-----+-+      +-^-----+-+      +-^-----+-+     +-^-----+-+    this RTL)
     |     |out       |     |          |     |         |     |
   [8:1]   +->[S-box] [8:1] +->[S-box] [8:1] +->[S-box][8:1] +->[S-box]
    mux        ROM    mux       ROM    mux       ROM   mux       ROM
     ^          |      ^         |      ^         |     ^         |
   ==|==========+======|=========+======|=========+=====|=========+==
             blockram bars (every ROM output seen by every core)
   new_data[c] ---> each mux
```

Each of the four core slots (`pico_network`) has three parts:

* **S-box ROM** (`sbox_rom`). A 256 x 8 synchronous block RAM holding the
  AES S-box. Every OUTPUT of the core sets the ROM address, and the ROM is
  read on the core's write strobe. The byte S(x) is on the ROM's bar one
  clock later, and stays there until the core's next OUTPUT. The contents
  are computed at elaboration by `picnet_pkg::sbox_value()`: the inverse in
  GF(2^8) modulo x^8+x^4+x^3+x+1 (as x^254), then the AES affine
  transform with constant 0x63. Parameter `SHARED_ROM = 1` selects the
  other arrangement: cores 0/1 and 2/3 each share one dual-port block RAM
  (`sbox_rom_dp`), which halves the number of ROMs. Programs see no
  difference: ROM select code k still returns the last lookup made by
  core k.
* **Output bar**. Every OUTPUT also puts its byte on the core's output bar,
  which all the other cores' multiplexers see. The bars also leave the
  network as `out_data` / `out_valid`, with `out_valid` the core's write
  strobe.
* **8:1 input multiplexer** (`xbar_mux`). It chooses what the core's INPUT
  instruction reads. The select is the low three bits of the INPUT port
  number:

| `port_id[2:0]` | source |
|---|---|
| 0, 1, 2, 3 | S-box ROM of core 0, 1, 2, 3 |
| 4, 5, 6 | output bar of core c+1, c+2, c+3 (mod 4), for reading core c |
| 7 | `new_data[c]`, fresh input from outside |

Peer cores are numbered relative to the reader, so the same code means
"my left neighbour" on every core. A core can read any core's ROM. This is
what makes AES cheap here: ShiftRows is only the choice of which column's
ROM a core reads when it does SubBytes. So SubBytes and ShiftRows together
cost one OUTPUT and one INPUT.

## Static scheduling: how cores exchange bytes without a handshake

This is the part that needs the most care when you write programs for the
network.

The core bus timing (PicoBlaze) is as follows. An I/O instruction lasts two
clocks. `port_id` and `out_port` are valid in both. `write_strobe` or
`read_strobe` is high in the second clock, and INPUT takes `in_port` at the
clock edge that ends the second clock.

With `NET_DELAY = 0` the bars are plain wires. A byte moves from core A to
core B when **A executes OUTPUT in the same instruction slot in which B
executes INPUT with B's select pointing at A**. Nothing holds the byte
afterwards: one slot later it is gone. The compiler that produces the
programs must therefore:

1. Make every program loop exactly the same number of instructions.
   Branches are padded with NOPs, so both arms of a branch take the same
   time.
2. Place each receiving INPUT in the slot of the matching OUTPUT.

If the network has a delay, it must be a whole number of instructions,
that is an even number of clocks. With `NET_DELAY = 2n` the receiving INPUT
goes n instructions after the OUTPUT. The delay line carries the byte and
the strobe together. Any other `NET_DELAY` is rejected at elaboration.

A ROM read has a separate rule. The ROM byte is ready from the slot after
the OUTPUT that addressed it, and it stays valid until that core's next
OUTPUT. So any core can read it in any slot in between.

`pico_network` holds an assertion `a_peer_sync` for each core: whenever a
core reads a peer's bar, that peer's (delayed) write strobe must be high in
the same clock. If a program is mis-scheduled, the assertion fires in
simulation instead of a stale byte passing silently.

### Worked example: a 4-stage pipeline as a 6-instruction loop

`pipe4` is the small example design: four 8-bit registers r5 to r8 in a
row, built from four identical `pipe_stage`s (`o` = `i` of four ticks ago).
On a core, the four registers live in s0 to s3, and one tick of the
pipeline is this loop:

```
 slot 0  OUTPUT s3          ; o = r8
 slot 1  LOAD   s3, s2      ; r8 <= r7
 slot 2  LOAD   s2, s1      ; r7 <= r6
 slot 3  LOAD   s1, s0      ; r6 <= r5
 slot 4  INPUT  s0, 7       ; r5 <= i   (new data)
 slot 5  JUMP   0
```

Running the register moves backwards lets each state register be
overwritten in place, so no temporary registers are needed. At two clocks
per instruction, one pipeline tick is 12 clocks. To chain a second
pipeline on another core, the receiver reads into a spare register in the
slot of the sender's OUTPUT, and copies it into its first stage at the end
of its loop. This costs one extra instruction, but the input can then sit
wherever the sender's output is. A purely combinational module is less
flexible: its INPUT must come before its OUTPUT in the same loop, and that
fixes where its neighbours must put their I/O.

`tb_picnet_top` runs exactly this kind of system (see below). It compares
core 0's output bar, tick by tick, with a hardware `pipe4` advanced once
per program loop.

## Files

| file | contents |
|---|---|
| `rtl/picnet_pkg.sv` | sizes (4 cores, 8-bit data, 8:1 mux), `byte_t`, mux select enum `xsel_e`, core bus struct `core_bus_t`, S-box functions |
| `rtl/sbox_rom.sv` | 256 x 8 S-box block RAM, synchronous read with enable |
| `rtl/sbox_rom_dp.sv` | the same S-box as a dual-port block RAM shared by two cores |
| `rtl/xbar_mux.sv` | one core's 8:1 input multiplexer |
| `rtl/pico_network.sv` | four core slots: ROMs, output bars with optional delay, muxes, schedule assertion |
| `rtl/pipe_stage.sv`, `rtl/pipe4.sv` | the 4-stage example pipeline |
| `rtl/picnet_top.sv` | top: the network (core buses as ports) beside `pipe4` |
| `tb/pblaze_model.sv` | testbench-only behavioural PicoBlaze (subset, see below) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_aes_workload.sv` | AES-128 on the four cores, through `picnet_top` |

### Top-level ports (`picnet_top`)

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high (clears the delay line and `pipe4`) |
| `core_bus[4]` | in | `core_bus_t` | each core's `port_id`, `out_port`, `write_strobe`, `read_strobe` |
| `core_in[4]` | out | `byte_t` | each core's `in_port` |
| `new_data[4]` | in | `byte_t` | fresh data for each core (mux code 7) |
| `out_data[4]`, `out_valid[4]` | out | `byte_t`, 1 | output bars after the network delay, with strobe |
| `pipe_en`, `pipe_in`, `pipe_out` | in/in/out | 1, 8, 8 | tick, input and output of the example pipeline |

Parameters:

* `NET_DELAY` (default 0): the network delay in clocks. It must be even.
* `SHARED_ROM` (default 0): set it to 1 for one dual-port S-box ROM per
  pair of cores.

The PicoBlaze cores are not part of the RTL. A PicoBlaze (KCPSM3) instance
connects as `core_bus[c] = '{port_id, out_port, write_strobe,
read_strobe}` and `in_port = core_in[c]`. Its program memory is a block
RAM of its own.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/picnet_pkg.sv tb/tb_picnet_top.sv --top-module tb_picnet_top
./obj_dir/Vtb_picnet_top
```

Replace `tb_picnet_top` with `tb_aes_workload` for the AES run (see
[AES on this network](#aes-on-this-network)). For the unit tests, use
`tb_pico_network`, `tb_sbox_rom`, `tb_sbox_rom_dp`, `tb_xbar_mux` or
`tb_pipe4`. All of them finish in well under a second.

* `tb_sbox_rom` reads all 256 entries. It compares them with an S-box
  computed a different way (brute-force inverse, bitwise affine map) and
  with published FIPS-197 values. It also checks the one-clock latency and
  that the output holds while `en` is low. `tb_sbox_rom_dp` reads both
  ports at once and checks that each port holds its output while the other
  port reads.
* `tb_xbar_mux` checks every select code at every core position.
* `tb_pipe4` feeds random data on random ticks and checks the 4-tick delay,
  and that the output does not move without a tick.
* `tb_pico_network` drives the four core buses directly, with PicoBlaze
  timing, for 600 instruction slots. In each slot every core randomly
  outputs, or reads a ROM, a peer that is outputting, or its new data. It
  counts own-ROM, other-ROM, peer and new-data reads and external outputs,
  and fails if any kind never occurs. A second network with
  `SHARED_ROM = 1` gets the same stimulus and must return the same bytes.
* `tb_picnet_top` is the end-to-end test, with `picnet_top` at its
  default parameters. Four behavioural cores run hand-scheduled programs:
  * core 0: the pipeline loop above;
  * core 1: a second pipeline fed from core 0's bar;
  * core 2: reads core 1 and looks the byte up in its own ROM;
  * core 3: reads core 2's ROM directly (a ShiftRows-style move), reads
    core 2's bar, XORs a key byte from `new_data`, looks the result up in
    its own ROM and outputs three bytes per tick.

  A second copy of the network with `NET_DELAY = 4` runs the same programs
  with every peer INPUT moved two instructions later. A third copy with
  `SHARED_ROM = 1` runs the undelayed programs. The test checks 40 ticks of
  all three systems against a reference model. It compares core 0 with
  `pipe4`, checks that a tick is exactly 2L clocks, and counts every kind
  of transfer.

`tb/pblaze_model.sv` models only what these programs need: LOAD, INPUT,
OUTPUT, FETCH, STORE, AND, OR, XOR, ADD, SUB, COMPARE, the basic
shifts and rotates, and JUMP (conditional too), with KCPSM3 opcodes. It has 16 registers, a 64-byte
scratchpad and KCPSM3 I/O timing. It is not a PicoBlaze replacement.

## Size

Synthesis counts 4 x 2048 ROM bits (four 256-byte S-boxes), or 2 x 2048
with `SHARED_ROM = 1`. With no network delay the network adds only the
four 8:1 byte multiplexers. Each delay
clock adds 9 flip-flops per core. The example `pipe4` adds 32 flip-flops.
The cores themselves (about 96 slices and one block RAM each on a
Spartan-3) are not included.

## AES on this network

`tb_aes_workload` encrypts AES-128 blocks on `picnet_top` at its default
parameters. Its programs are built inside the testbench, as lists of
KCPSM3 words. Core c holds state column c in s0..s3 and round-key
column c in s4..s7, so each core uses 14 of its 16 registers.

One round, in the order the programs execute it:

* **Key schedule.**
  1. Core 3 OUTPUTs its rotated key column to its own ROM.
  2. Core 0 reads the four S-box values from ROM 3 and adds rcon.
  3. The new column 0 passes to core 1, core 1's to core 2, and so on,
     one byte per instruction slot over the output bars.

  This part is serial by nature and takes about half of each round.
* **rcon update.** `xtime` of the rcon register.
* **SubBytes + ShiftRows.** For each row r, every core OUTPUTs s<r> to
  its own ROM. In the next slot every core INPUTs s<r> from ROM
  (c+r) mod 4. That is 8 instructions for the whole state.
* **MixColumns.** Local to each core, as b_i = a_i ^ t ^ xtime(a_i ^
  a_(i+1)) with t = a0^a1^a2^a3.
* **AddRoundKey.** Four local XORs.

The last round skips MixColumns. All cores skip it at the same time, so
they stay in step.

`xtime` needs a data-dependent branch:

```
      SL0  x            ; shift left, carry = old bit 7
      JUMP NC, skip
      XOR  x, 1B
      JUMP join
skip: NOP               ; padding: both paths execute 4 instructions
      NOP
join:
```

Each core sees different data, so this padding is what keeps the four
cores in lock-step.

Results:

* 123 program words per core.
* 1840 clocks from the first input byte to the last ciphertext byte, the
  same for every block.
* The FIPS-197 example vector and random blocks are correct.

The published figure for four cores is 791 instructions, or 1582 clocks.
Those programs came from an automatic mapping with register allocation
and scheduling heuristics, which the hand-written programs here do not
attempt.

## Departures and own choices

Taken from the published design:

* four cores;
* one S-box block RAM per core, with its output visible to all cores;
* an 8:1 input multiplexer per core mixing four ROM outputs, three peer
  outputs and one new-data input;
* no handshake;
* two clocks per instruction;
* a network delay that must be a multiple of two clocks.

Chosen here, because the description does not say:

* The multiplexer select is `port_id[2:0]` of INPUT, with the code order
  shown above and peers numbered relative to the reader.
* Every OUTPUT both drives the core's bar and addresses its own ROM. There
  is no output port decoding.
* The ROM is read on the core's write strobe and holds its output between
  OUTPUTs.
* With shared ROMs, cores 0 and 1 share one ROM, and cores 2 and 3 the
  other.
* Each core has its own new-data input.
* The output bars are brought out of the network.
* The delay line is a shift register with a synchronous reset.
* The default network delay is 0.
* `pipe4` gets a tick enable and a reset, so that one tick can span the
  12+ clocks that the software version takes.

Not built:

* The PicoBlaze core and its program memory (vendor IP).
* The translation tool that turns the hardware description into programs.
* The published AES programs. The hand-scheduled AES used in the
  testbench is this design's own.
* Networks of more than four cores. The 8:1 multiplexer fits exactly four
  cores, and a larger network would need a different crossbar.
