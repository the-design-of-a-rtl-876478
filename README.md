# Drum auxiliary memory for a 12-bit minicomputer

This is the control logic of a block-transfer auxiliary store. It puts a
rotating magnetic drum (a 1950s drum with 200 read/write heads and 600 bit
cells per track) behind the direct-memory-access (DMA) channel of a small
12-bit computer. The computer moves whole blocks of 299 words at DMA speed, so
programs and data can be swapped in and out in milliseconds.

The idea is to make addressing cheap. Words inside a block cannot be
addressed. A transfer names one of only 30 block locations, and the drum's own
timing tracks decide when each word passes under the heads. The logic is
therefore small: one 13-bit buffer register, a 6-bit address register, a
2-bit counter and a handful of control flip-flops. It is written as
synthesizable SystemVerilog with one system clock. The drum, the analog head
circuits and the DMA controller are outside it.

## Storage organisation

* **Words.** A word is 13 bits: twelve data bits and one parity bit. Bits are
  numbered from the left: `B0` is the most significant data bit, `B11` the
  least significant, and `B12` is parity. The vector types in `drum_pkg` are
  declared `[0:12]` so that the index in the code is the bit's number.
  Parity is odd: `B12 = 1` when `B0..B11` hold an even number of ones, so an
  all-zero word is stored as `0000 0000 0000 1`.
* **Heads.** The drum has 5 rows of 40 heads. Thirteen heads write one word
  at once. Three *groups* of 13 columns each hold five 13-head *patterns*,
  which gives 15 patterns. The last column (five heads) is spare.
* **Tracks and sectors.** Each track holds 600 word slots per 4.8 ms
  revolution, one slot every 8 µs. The revolution is split into two
  *sectors* of 300 slots. A block location is one pattern in one sector:
  2 × 3 × 5 = 30 locations. The block's 299 data words go in slots 1..299 of
  the sector. Slot 0 is not used.

### Block address

The first word of every transfer is the block address. Its low six bits
select the block:

| bits      | field   | values                                       |
|-----------|---------|----------------------------------------------|
| `B11`     | sector  | 0 = half revolution after the home pulse, 1 = other half |
| `B9..B10` | group   | 1..3 (0 selects nothing)                     |
| `B6..B8`  | pattern | 0..4 (5..7 select nothing)                   |
| `B0..B5`  | unused  |                                              |

### Head numbering

Head `h` (0..199) sits in drum column `h/5 + 1` and row `5 - h%5`. The
numbering runs down a column from row 5 to row 1, then moves to the next
column. The pattern layout is interleaved across rows and columns. For
example, pattern 0 of a group uses all five heads of its first two columns
and rows 5..3 of the third. Pattern 1 starts in rows 2 and 1 of that third
column. With this numbering the layout becomes linear: **bit `k` of pattern
`p` is head `13*p + k`**, where `p = 5*(group-1) + pattern`. Heads 195..199
are the spares. `head_we`, `head_rd` and the drum model all use this
numbering. Group 1 is taken to begin at column 1. If the drum is wired the
other way round, only the mapping at the head connectors changes.

The 13 data lines `dr_line` go to bit `k` of every pattern in parallel. Only
the selected pattern's heads get a write enable, so no data decoding is
needed.

## Timing from the drum

Everything is timed by the drum's timing tracks. `timing_pulses` turns them
into pulses:

| pulse | when                                   | width |
|-------|----------------------------------------|-------|
| HP    | once per revolution (home)             | 2 µs  |
| SP    | start of each sector, with HP at home  | 2 µs  |
| CP    | start of every 8 µs word slot          | 2 µs  |
| AP    | 4 µs into each slot                    | 2 µs  |
| BP    | 6 µs into each slot, from the end of AP | 1 µs |
| JP    | three per sector: JP2 and JP3 in the last two slots, JP1 in slot 1 of the next sector (8 µs from JP2 to JP3, 16 µs from JP3 to JP1) | 2 µs |

The AP track is read as a level that rises at AP and falls at CP. CP is
therefore taken from the inverted AP signal, and BP is fired by the trailing
edge of AP. Each pulse is a counter-based one-shot. The control logic uses
a one-clock strobe at the start of each pulse. Every strobe comes 3 clocks
after its track edge: two for the synchroniser and one for the one-shot.

`sector_timing` holds the two pieces of position state:

* **P**, a mod-4 counter. SP zeroes it and every J pulse increments it. The
  J pulse that finds P = 0 is JP1, P = 1 is JP2, and P = 2 is JP3. The state
  `p2` (P = 2) is the window from JP2 to JP3, just before a sector ends.
* **SC**, the sector under the heads. HP resets it and the next SP sets it.

The dependent signal **F = B11 xor SC** is 1 while the sector *before* the
addressed one is passing. In the `p2` window it means "the addressed sector
starts at the next SP".

## The transfer sequence

`transfer_control` holds the control flip-flops. Q means a transfer is
requested. H means the address has been received. N means the address is not
yet decoded. R is a write in progress, Y a read in progress, and AK is the
word request to the DMA controller. The DMA side supplies the `t0` strobe on
each of the computer's memory cycles, `t2` 0.5 µs later, and `mrq1b` in the
cycle that answers a request.

**Setup (both directions).**
1. The DMA controller receives its control word, and `ctl_word` sets Q.
2. At the next `t0` with H clear, the address word is loaded from `dmo` into
   B, and H and N are set.
3. At a `t2` inside the `p2` window with F = 1, B11 goes to S, B9..B10 to G
   and B6..B8 to PT, and N is cleared. A read also clears B here. So the
   address is decoded at the end of the sector before the addressed one. A
   transfer waits at most about one revolution for this window.

**Write (`rw = 1`).** The SP that opens the addressed sector sets R. Then, in
each word slot:

| strobe                | action                                      |
|-----------------------|---------------------------------------------|
| AP                    | AK ← 1 (request a word), B ← 0              |
| `mrq1b` with `t0`     | L(B) ← `dmo`, AK ← 0                        |
| CP (next slot)        | L(B) and its parity go to the 13 heads of the pattern |

JP3, after the CP of slot 299, ends the write. It clears Q, H, R, S, G, PT
and AK. The result is exactly 299 writes, one per slot, in slots 1..299. If
the DMA controller has fewer words to send, the remaining slots are still
written. B was cleared at AP, so they get zero words with correct parity.

**Read (`rw = 0`).** JP1 inside the addressed sector (S = SC) sets Y. Then, in
each slot:

| strobe                | action                                          |
|-----------------------|-------------------------------------------------|
| BP                    | B ← the 13 bits under the pattern's heads       |
| CP (next slot)        | AK ← 1                                          |
| `mrq1b` with `t0`     | `dmi` shows L(B), AK ← 0, B ← 0, Z ← Z or parity failure of B |

The next JP1, one slot into the following sector, ends the read. Words arrive
in slot order 1..299. After the 299th word, one more request is raised before
JP1 ends the cycle. It carries no block data, and the DMA controller does not
answer it once its word count of 299 is reached. The end of the cycle drops
AK again.

**Parity flag.** Z is set by any word handed over with bad parity. It stays
set until `z_reset` is pulsed, because resetting it is an operator action.

**Rates.** Within a block the unit moves one word every 8 µs
(125,000 words/s). The DMA channel allows 500,000 cycles/s, so each request
is answered within one 2 µs memory cycle. In the write slot the DMA has 4 µs,
from AP to the next CP, to deliver the word. In the read slot it has 6 µs,
from CP to BP, before B is overwritten. A block takes 2.4 ms once started.
The wait for the sector adds 0 to 4.8 ms. A transfer ends at JP3 (write) or
JP1 (read). Both come after the address window of the other sector has
passed. So blocks in the same sector can follow each other once per
revolution (4.8 ms each), but a block in the other sector waits 1.5
revolutions (7.2 ms). The test measured 14 same-sector blocks (a full
4096-word memory image) at 69.6 ms.

## Interface of the top module `aux_memory`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`, `rst_n`| in  | 1     | clock (4 MHz by default, `CLK_PER_US`), asynchronous active-low reset |
| `ctl_word`    | in  | 1     | one-clock strobe: the DMA controller received its control word |
| `rw`          | in  | 1     | 1 write to the drum, 0 read from it; hold it for the whole transfer |
| `t0`, `t2`    | in  | 1     | one-clock strobes of each memory cycle of the computer, `t2` 0.5 µs after `t0` |
| `mrq1b`       | in  | 1     | high with `t0` in the cycle that answers a request |
| `dmo`         | in  | 12    | data from the computer (`[0:11]`, bit 0 most significant) |
| `dmi`         | out | 12    | data to the computer, valid during a read cycle, zero otherwise |
| `ak`          | out | 1     | 1 = word requested |
| `busy`        | out | 1     | a transfer is in progress (H) |
| `z`, `z_reset`| out/in | 1  | parity-failure flag and its manual reset |
| `hp_trk`, `sp_trk`, `ap_trk`, `jp_trk` | in | 1 | timing-head signals after amplification and limiting |
| `head_rd`     | in  | 200   | bit under each storage head, from the read amplifiers |
| `head_we`     | out | 200   | one-clock write enable per head |
| `dr_line`     | out | 13    | data lines to the write drivers, bits `[0:12]` |

All logic is active-high. The level converters between the computer's
inverted logic levels and this logic, the read amplifiers and the head
drivers are analog and sit outside the RTL. The design has 64 flip-flops. The
five `head_we` bits of the spare column are constant zero.

## Files

`rtl/`:

* `drum_pkg.sv`: sizes, word types, the B-register operation enum and the
  parity function.
* `aux_memory.sv`: the top, which wires the blocks below together.
* `transfer_control.sv`: Q, H, N, R, Y, AK and the transfer equations, with
  assertions for the AK/MRQ1B handshake.
* `buffer_register.sv`: B, the parity generator and checker, and Z.
* `address_register.sv`: S, G and PT.
* `address_decode.sv`: G and PT to one of 15 pattern selects, enabled in the
  addressed sector.
* `write_gates.sv` and `read_gates.sv`: pattern select to head enables, and
  head outputs to a word.
* `sector_timing.sv`: P, the JP1/JP2/JP3 decode, and SC.
* `timing_pulses.sv` and `monostable.sv`: the pulse shapers.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus these
files:

* `drum_model.sv`: a behavioural drum with 200 × 600-bit tracks, timing
  tracks as described above, and random initial contents.
* `tb_aux_memory.sv`: end to end at the default sizes. It writes and reads
  blocks in both sectors and in the first and last patterns. It writes a
  short block and checks the zero fill, checks that a neighbouring pattern is
  unchanged, and corrupts a stored bit to see Z set and reset. It starts one
  transfer just inside the address window, which must start at the next SP,
  and one just after it, which must wait a full revolution. It checks
  every stored bit and word read, the slot of the first write, one write per
  8 µs, and 299 words per block.
* `tb_capacity.sv`: fills all 30 locations (8970 words), reads them back, and
  times a 14-block load.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/drum_pkg.sv \
    tb/tb_aux_memory.sv --top-module tb_aux_memory -Mdir obj && obj/Vtb_aux_memory
```

The end-to-end test simulates about 60 ms of drum time in under a second.
The capacity test takes a few seconds.

## Where this design makes its own choices

These points are not fixed by the original logic equations, or the equations
and their description disagree. A user with the real DMA controller should
check them first.

* **AK polarity.** Here `ak = 1` means "word requested", and the unit is idle
  with `ak = 0`. The prose description says this. The printed equations
  assign the opposite values, so each of their AK assignments is inverted.
* **Address load** happens at `t0` while H is *clear*. The equation as
  printed tests H.
* **Start of R and Y** also needs N clear, so the address has already been
  decoded. This follows the connections in the register diagram.
* **Read start** tests "addressed sector under the heads" (S = SC) at JP1.
  The printed condition uses F, which at JP1 is true only for sector 1,
  because the read clears B before then.
* **End of transfer** also drops AK.
* **Coinciding strobes** in one clock: a word transfer wins over clearing B,
  and a new request wins over dropping AK.
* **Group code 0** and pattern codes 5..7 select no heads. This also makes
  the cleared address register harmless.
* **The address decode is enabled only in the addressed sector** (S = SC).
* **Clocking.** The original is pulse-driven flip-flop logic. Here every
  pulse is sampled by one clock of `CLK_PER_US` per µs. The default of 4
  resolves the 0.5 µs `t0`–`t2` spacing. The track inputs pass through
  two-flop synchronisers.
* **DMA controller behaviour** (control word, one answer per request, word
  count) was not specified in detail. The testbenches use a model that
  answers each request at its next memory cycle.

## Not included

The drum and heads, the read amplifiers, the vacuum-tube write drivers, the
level converters, the power supplies, the DMA controller and the host
computer are analog, electromechanical or outside equipment. The bench setup
used to record the SP and JP timing tracks on the drum is also not included.
`tb/drum_model.sv` stands in for the drum and its head circuits. The DMA
controller is modelled inside the system testbenches.
