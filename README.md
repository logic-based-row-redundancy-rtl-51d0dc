# Flop-based row redundancy for a banked embedded SRAM

Large embedded SRAMs are repaired at test time: a row found faulty is replaced by a spare.
The usual way keeps spare bitcell rows inside the array. The row address must then be
compared with the faulty address *before* the word line fires, so that the faulty row can be
switched off and the spare switched on. That comparison sits on the address path and adds
to the address setup time, and so to the cycle time.

This design moves the repair out of the array. The spare row is a row of latches placed
beside the bank output multiplexer, a "bolt-on" block. Every access goes to the array at the
address given, whether that row is good or faulty. In parallel, a comparator checks the row
address against the faulty row address:

| access | no match | match |
|---|---|---|
| write | array written | array written **and** the word stored in the latches |
| read  | Q from the array | Q from the latches; the array data is ignored |

The comparison only has to be ready when the array data reaches the output multiplexer, not
when the address arrives. The address setup time is therefore the same as for a memory
without redundancy. The spare row also uses no bitcells, so it does not add to the array's
own failure modes.

The RTL models a 16384-word x 80-bit memory with column mux 8 and 8 banks. Each physical
row holds 8 words, so there are 2048 rows. By default one of them can be repaired.
`RED_ROWS` bolts on more redundant rows.

## The redundant row, bit by bit (`rr_bit`)

A physical row holds `MUX` = 8 words. The redundant row therefore needs 8 stored bits for
each data bit. Writing 8 full flip-flops per bit would cost area. Instead, each data bit has
**one master latch and eight slave latches**:

```
          WCLK                 iRED_WCLK[i] = RED_WCLK[i] & ~WEN
           |                          |
  D ---> [master] ---+--> [slave 0] --+--\
                     +--> [slave 1] -----\   RED_QSEL          MEM_QSEL
                     |       ...          >-[8:1 mux]- Q_RED --[2:1 mux]--> Q
                     +--> [slave 7] -----/                       |
                                                          Q_MEM -+
```

- The master follows `D` while `WCLK` is high. `WCLK` pulses on every write cycle.
- Slave *i* copies the master while `iRED_WCLK[i]` is high. `RED_WCLK[i]` is high only on
  a write whose row matches and whose column address `CA` equals *i*. At most one slave per
  bit opens in a cycle, so a single master can serve all eight.
- `WEN` is the active-low bit write enable. It is interlocked with `RED_WCLK`, so a masked
  bit does not clock its slave and keeps its value. Masked bits do not toggle a latch, which
  also saves power.
- On reads, the one-hot `RED_QSEL` picks the slave of the addressed column, giving `Q_RED`.
  `MEM_QSEL` then chooses between `Q_RED` and the array data `Q_MEM`.

With 80 bits this comes to 80 master latches and 640 slave latches. Synthesis also finds 9
latches in the clock gates.

## The controller (`red_controller`)

The controller makes every signal that the bit cells use:

| signal | made from | timing in this RTL |
|---|---|---|
| `MATCH` | `RREN` and `RA == FRA` | combinational on the address inputs |
| `WCLK` | `CLK` on a write cycle | gated copy of the CLK high phase |
| `RED_WCLK[7:0]` | `CLK`, write, `MATCH`, decoded `CA` | gated copy of the CLK high phase |
| `RED_QSEL[7:0]` | decoded `CA` on a read | registered at the read's rising edge and held |
| `MEM_QSEL` | `MATCH` on a read | registered at the read's rising edge and held |

`RA` is the 11-bit row address `{bank, row}`, so the one redundant row can stand in for any
row of any bank. The clocks are made by a latch-based clock gate (`rr_clock_gate`). The
enable is latched while CLK is low, and the gated clock is CLK AND that latch. Gating like
this is glitch-free: an input that changes in the middle of the high phase cannot chop the
pulse. An immediate assertion checks that no two `RED_WCLK` bits are high together.

In silicon, `WCLK` and `RED_WCLK` are short self-timed pulses. They keep the hold time on
`D` small and let the design run at 1.75 GHz. Pulse widths are analog timing, which RTL
cannot express. Here each pulse is the whole high phase of CLK instead, and that sets a
timing rule for users of the RTL: **on a write, `D` and `WEN` must stay stable until CLK
falls.** The testbenches change inputs on the falling edge.

## Memory organisation

```
         bank0 | central | bank0          central_spine: address split, bank decode,
 shared IO 01  |  spine  | shared IO 01                   per-pair read enables, Banksel
         bank1 |         | bank1
          ...            ...              bank pairs (2k, 2k+1) share one IO block
         bank7 |         | bank7
 -------------------------------------
 bolt-on redundant row: controller + 80 x rr_bit        (block "A")
 output: Banksel picks one IO block -> Q_MEM; rr_bit picks Q_MEM or Q_RED -> Q
```

- Address `A[13:0] = {bank[2:0], row[7:0], CA[2:0]}`. The 8 words of a physical row are
  consecutive addresses. `FRA[10:0]` uses the same `{bank, row}` format.
- `sram_bank` holds 256 rows x 8 words x 80 bits. A write stores the bits whose `WEN` is
  low, at the rising edge of CLK. The read path through row decoder and column mux is
  combinational.
- `shared_bank_io` stands for the sense amplifiers and IO shared by a bank pair. On a read
  it captures the accessed bank's word at the rising edge and holds it.
- `central_spine` registers `Banksel`, one bit per IO block, on each read.
- `bank_output_mux` forwards the selected IO block's data. When `MEM_QSEL` is high,
  Banksel is disabled and every bank input is masked off, so only the latches drive Q.

The left and right halves of each bank are not modelled separately. In silicon each side
carries half of the data bits; in this RTL that is pure wiring.

## Interface of `rr_sram`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; the address and controls are sampled at its rising edge |
| `cen` | in | 1 | chip enable, active low; high = idle cycle, nothing changes |
| `gwen` | in | 1 | global write enable, active low (0 = write, 1 = read) |
| `a` | in | 14 | word address |
| `d` | in | 80 | write data, held until CLK falls |
| `wen` | in | 80 | bit write enables, active low, held until CLK falls |
| `rren` | in | 1 | row redundancy enable |
| `fra` | in | `RED_ROWS` x 11 | faulty row address `{bank,row}` per redundant row, from fuses or BIST |
| `q` | out | 80 | read data |
| `match` | out | 1 | row address equals `fra` and `rren` is set (for observation) |
| `mem_qsel` | out | 1 | the last read was answered from the latches (for observation) |

Read data appears on `q` after the rising edge of the read cycle and stays until the next
read. `rren` and `fra` are meant to be static. If `fra` changes, the latches keep the words
of the old row. There is no reset, as in an SRAM macro. The array, the latches and `q` are
undefined until they are written or read.

Parameters: `WORDS` (16384), `BITS` (80), `MUX` (8), `BANKS` (8), `RED_ROWS` (1). The
address widths are derived from them. Defaults in `rtl/rr_pkg.sv`.

## Several redundant rows

One redundant row is the standard configuration. A memory that needs more repair can
bolt on more rows. With `RED_ROWS` > 1, each row is a complete `rr_bolt_on` with its own
`FRA`, comparator, clocks and latches. Their 2:1 output multiplexers form a chain:
`Q_MEM` -> row 0 -> row 1 -> ... -> `Q`. A matching row therefore replaces whatever comes
before it, and if two `FRA`s are equal, the last row wins. Every matching row stores a
write. Banksel is disabled when any row matches. `match` and `mem_qsel` are the OR over
all rows.

## Module hierarchy

```
rr_sram
  central_spine
  sram_bank        x BANKS
  shared_bank_io   x BANKS/2
  bank_output_mux
  rr_bolt_on       x RED_ROWS
    red_controller
      row_addr_comparator
      ca_decoder
      red_clock_gen -> rr_clock_gate
      rr_clock_gate x MUX          (RED_WCLK)
    rr_bit         x BITS
```

Synthesised with yosys (coarse), the default top has 1,310,720 memory bits, 729 latch bits,
333 flip-flop bits and about 2,600 word-level cells.

## What follows the source design, and what does not

Taken from the design as published:
- The latch structure of a bit: one master, eight slaves, `WEN` interlock, 8:1 and 2:1
  multiplexers.
- The controller's signal set and how each signal is formed.
- Comparison in parallel with the access, with the array written regardless of faults.
- Banksel disabled on a redundant read.
- The 8-bank organisation with shared IO per bank pair.
- The instance size.

Choices of this RTL, where the published design is silent:
- The address map.
- The chip enable `cen`.
- Registering `RED_QSEL`, `MEM_QSEL` and `Banksel` at the read edge, with one edge of read
  latency.
- How several redundant rows combine: the chain described above.
- The CLK-high-phase clocks in place of short pulses, and the hold rule that comes with them.
- Active-high latch clocks.
- No reset.

Not built:
- The spare column used for column redundancy. Its circuit and signals are not specified.
- Analog timing and area. That covers access and setup times across corners, and the
  area of the latches against spare rows.
- Fuse or BIST storage for `fra`.
- The bitcell array's electrical behaviour. A faulty row is not simulated as faulty. The
  tests show the repair another way: they overwrite the array behind the faulty row while
  `rren` is low and check that repaired reads still return the latched words.

## Simulation

Every module has a self-checking testbench in `tb/`, except the clock-gate helper, which is
tested through `red_clock_gen`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. The end-to-end tests use `tb/rr_sram_driver.sv`:

- `tb_rr_sram` runs the default 16384 x 80 instance.
- `tb_rr_sram_x8` runs a 16384 x 8 instance.
- `tb_rr_sram_rows4` runs the default instance with four redundant rows.

Each end-to-end test does three things:
1. It replays the three phases of a repaired access on column 0 of the faulty row:
   - a write into the latches, checking `RED_WCLK[0]` in the high phase;
   - a read from the latches, checking `RED_QSEL[0]` and `MEM_QSEL`;
   - a read from the array.
2. It runs 40,000 random operations against a reference model. These include masked
   writes, idle cycles, `rren` off and a change of `fra`.
3. It counts each mechanism, and a mechanism that never occurs counts as a failure.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rr_pkg.sv tb/tb_rr_sram.sv \
          -y rtl -y tb --top-module tb_rr_sram -Mdir obj_rr_sram
obj_rr_sram/Vtb_rr_sram +verilator+rand+reset+2
```

Use the same command with any other `tb_<module>.sv`. Lint alone:
`verilator --lint-only -Wall -Irtl rtl/rr_pkg.sv rtl/rr_sram.sv -y rtl`. That reports
unused package constants and two intentionally open observation pins. The latches in
`rr_bit` and `rr_clock_gate` are intended.
