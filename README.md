# CD-player error decoder: hardwired and microcoded control around one datapath

This RTL implements a small error decoder for Compact Disc audio data, built
twice around the same datapath. One copy has hardwired control: burst-mode
style state machines with separate thread controllers. The other has
programmable control: a microcode memory (a ROM, or optionally a RAM)
drives one small local controller per datapath unit. The decoder reads a block of 8-bit symbols and computes four
syndromes in GF(2^8). It then steps the syndromes to look for a position where
two of them agree, and reports a status bit, the first syndrome and the
position it reached.

The original circuits are self-timed. Every unit is driven by a four-phase
request/acknowledge handshake with single-rail bundled data. This RTL keeps
that structure and every handshake, but all signals are registers in one
clock domain. A handshake therefore takes clock cycles rather than gate
delays. The point of the design is in how the handshakes are organised: a
central controller, thread controllers, or chains of local controllers.
That organisation is what the code reproduces.

## What the decoder computes

For a block with size bit `t` (27 symbols if `t=0`, 32 if `t=1`):

1. **Syndromes.** `syn` is four bytes S0..S3 and starts at 0. For each symbol
   `s`, S_i = s XOR alpha^i · S_i. This is a Horner step, so S_i is the
   block's polynomial evaluated at alpha^i. Multiplying by alpha is a shift
   left with a conditional XOR of 0x1D (field polynomial
   x^8+x^4+x^3+x^2+1).
2. **Prepare the search.** `e` = S0. The counter `n` is reloaded. `syn` is
   shuffled twice. The shuffle maps output bytes 0..3 from input bytes
   1, 3, 0, 2, so two shuffles reverse the byte order: byte 0 is now S3 and
   byte 1 is S2.
3. **Search.** Bytes 0 and 1 are compared. While they differ and `n` has not
   run out, one Horner step with symbol 0 is applied, which multiplies byte
   i by alpha^i, and `n` is decremented. For a single corrupted symbol, the
   number of steps until the bytes match depends on where the error is.
4. **Status.** `stat = n[5]`, which is 1 when the search ran out. Then two
   more rounds of "shuffle, then `stat |= (byte0 == byte1)`". After four
   shuffles in total, `syn` is back in its original byte order.
5. **Report.** `stat` goes out on channel s, `e` on channel e and `n` on
   channel l, all at the same time.

`n` is a 6-bit down-counter. It is loaded with the block size minus one
(26 or 31). Bit 5 rises when it wraps past zero, after exactly 27 or 32
steps. That one bit ends both loops: it is the "ran out" flag.

Two points of this behaviour are interpretations, not transcriptions:

- The block sizes 27 and 32 are the design's. Loading size−1, so that `n[5]`
  ends the word loop after exactly that many words, is this design's reading
  of the counting scheme.
- The search runs *while neither* `n[5]` *nor* the byte match holds. The
  alternative reading never terminates on an error-free block, because the
  all-zero syndromes always match.

## Datapath (`ecd_datapath`)

Every unit has one four-phase port (`req[u]`/`ack[u]`, indexed by
`ecd_pkg::unit_e`). A unit does its operation when its request rises and
acknowledges one cycle later.

| unit | module | does |
|---|---|---|
| t chan → t reg | `chan_rx` (1 bit), `hs_reg` | receive the block-size bit |
| Dec(n) → n reg | `dec_n`, `hs_reg` (6 bits) | load size−1 or decrement (`mode.n_load`) |
| c chan → s reg | `chan_rx` (8 bits), `hs_reg` | receive one symbol |
| Horner / Shuffle → syn reg | `horner`, `shuffle`, `hs_reg` (32 bits) | `mode.syn_mode`: clear, Horner(s), Horner(0), Shuffle |
| stat-or-syneq → stat reg | `stat_syneq`, `hs_reg` | `mode.stat_or`: stat = n[5], or stat \|= eq |
| e reg | `hs_reg` (8 bits) | e = syn[7:0] |
| sel chan | `sel_chan` | send s, e, l together and join their handshakes |

The datapath returns `n5`, `eq` (syn byte 0 equals byte 1) and `t` to
control. The modes must stay stable while a request is up: the bundled-data
rule. Both controllers keep them constant for the whole burst.

**Channels.** The environment is the active side on t and c. It puts up data
and `*_req`. The decoder answers `*_ack` only when control has asked for a
word. `chan_rx` latches the word and finishes the environment's handshake
before it acknowledges control, so a register chained behind it can copy
the word at any later time. On s, e and l the decoder is the active side.
By default every channel is return-to-zero (four-phase): request up,
acknowledge up, request down, acknowledge down.

**Two-phase option.** With the parameter `TWO_PHASE = 1` the five
environment channels use transition signalling instead. A sender offers a
new word by toggling its request. The receiver takes it by making its
acknowledge equal to the request again, and there is no return to zero.
`chan_rx` accepts a word when `ch_req != ch_ack` and control is asking.
`sel_chan` toggles all three requests and acknowledges control once every
acknowledge matches its request. Only the outside channels change: the
handshakes between control and the datapath units stay four-phase. The
original decoder is four-phase, so that is the default. The option exists
because the microengine style is meant to connect to neighbours using
either protocol.

## Hardwired control (`ecd_hardwired`)

The control is too large for a single burst-mode machine. It is split in two
partitions that run one after the other, plus one controller per branch of
each fork:

- **`decode_ctrl` (DECODE)** waits once for `start`. Then it loops forever
  through these steps:
  - {t chan, clear syn}
  - {t reg}
  - {load n}
  - one fork {T0, T1} per word, until `n[5]`
  - hand over to ERR-CHECK and wait for it to finish
- **`errcheck_ctrl` (ERR-CHECK)** runs the rest of the algorithm as eleven
  steps. It forks {T2, T3} once per search iteration, and acknowledges
  DECODE after the results have been sent.
- **`thread_ctrl` (T0..T3)** runs a fixed list of handshakes, one after
  another:
  - T0 and T2: decrement n
  - T1: c chan, s reg, then syn reg with Horner(s)
  - T3: syn reg with Horner(0)

A partition step is a *burst*: its requests rise together, and it ends only
after all its acknowledges have risen, the requests have fallen and all
acknowledges have fallen again. Several controllers drive some units (n and
syn). Their requests are ORed and the acknowledge goes back to all of them.
They never overlap, because a thread only runs inside its parent's step. Each
thread step is a full handshake, so a word costs the partition's handshake
with the thread plus three unit handshakes in sequence.

## Microengine control (`ecd_microengine`)

| block | module | role |
|---|---|---|
| MEM | `ucode_rom` or `ucode_ram` | 16 × `uinstr_t`, synchronous read; ROM by default |
| next addr | `next_addr` | program counter: +1 or branch target |
| BDU | `bdu` | branch decision from the condition field, `n5` and `eq` |
| ECU | `ecu` | instruction cycle: fetch, global `req`, wait for joined `ack`, release, step |
| RAS | `ras` × 9 | local control of one datapath unit |

A microinstruction (`ecd_pkg::uinstr_t`) has these fields:

- an enable bit and a chain bit for each of the nine units
- the datapath modes
- a branch condition (never, always, `!n5`, found, not found)
- a 4-bit target

When the ECU raises the global request, every enabled RAS starts its unit's
handshake. A disabled RAS reports done at once. If the RAS's chain bit is
set, it first waits for its fixed predecessor:
t chan → t reg → n reg, and c chan → s reg → syn reg → stat reg → sel chan.

There are nine RAS blocks, one per unit with a handshake port. The
combinational units (Dec(n), Horner, Shuffle, stat-or-syneq) have no RAS of
their own. Each is covered by the RAS of the register it feeds, and its mode
comes straight from the instruction.

A fork-join thread thus becomes a chain inside one instruction, with no trip
back to a central controller between its steps. A RAS has two outputs.
`fwd` feeds its successor and rises as soon as its unit has acknowledged,
when the unit's result is already valid. `done` feeds the ECU's AND-join and
rises after the unit's return to zero. A chained successor therefore
overlaps its predecessor's return to zero.

The microprogram (`ucode_rom`; `->` is a chain, `|` is parallel):

| addr | units | branch |
|---|---|---|
| 0 | t chan -> t reg -> n reg (load) \| syn reg (clear) | |
| 1 | c chan -> s reg -> syn reg (Horner(s)) \| n reg (decrement) | to 1 while `!n5` |
| 2 | n reg (load) \| e reg | |
| 3, 4 | syn reg (shuffle) | |
| 5 | — | to 7 if found |
| 6 | syn reg (Horner(0)) \| n reg (decrement) | to 6 while not found |
| 7 | stat reg (= n[5]) | |
| 8 | syn reg (shuffle) -> stat reg (\|= eq) | |
| 9 | syn reg (shuffle) -> stat reg (\|= eq) -> sel chan | to 0 |

The instruction format and the program are this design's. They were derived
from the decoder's behaviour, because the original specifies only that
instruction bits set the RAS modes and the datapath muxes.

**ROM or RAM.** The microcode memory comes in two forms, as in the
original, where the ROM version is much smaller. By default it is the ROM
above. With `UCODE_RAM = 1` it is `ucode_ram`, a 16-word RAM that is
written through `prog_we`, `prog_addr` and `prog_data` (`ue_prog_*` on the
top) while the decoder is held in reset or not yet started. The contents
are not reset. With the ROM these inputs are ignored. The RAM makes the
decoder reprogrammable. `tb_ecd_ucode_ram` uses it to run the algorithm
with two programs: the chained one and one with no chain bits, where every
thread step is its own instruction (all 16 words). With random environment
delays, the chained program needs about 867 cycles per block and the
unchained one about 1299, a third fewer. That matches the original's point
that chaining pays well over 20% in control-heavy designs.

## Timing and how far to trust it

Both implementations give identical results on every block tested. Their
cycle counts, however, are not the original's timing. Averaged over blocks
of both sizes, with environment models that answer without delay, one block
takes about 762 cycles with hardwired control and 808 with the microengine.
In the self-timed original the microengine was about 8% *faster*: roughly
1.46 µs against 1.58 µs per 32-word block.

In clocked form the microengine pays a fixed four-cycle instruction overhead
in the ECU. A self-timed ECU does not pay this in full. Also, every RAS
handshake here costs whole cycles where the original's chaining
macromodules react in gate delays. Treat the cycle numbers as a check that
the control sequences do what they should, not as a performance model.

Also not modelled:

- delay matching for bundled data
- fundamental-mode timing
- gate-level or transistor-level implementation
- a hardwired version with chained thread control, for which only an
  estimate of the gain exists
- the two other example designs the ACK work reports results for (a
  differential-equation solver and a barcode reader), which are not
  described in enough detail to build

Other choices made where the original is silent:

- reset values (all zero, asynchronous active-low `rst_n`)
- `start` is a level sampled once after reset
- the mode encodings
- the hardwired hand-over between the two partitions uses a single
  four-phase pair

## Files

- `rtl/ecd_pkg.sv`: widths, unit indices, modes, microinstruction type, the
  alpha multiplier.
- `rtl/horner.sv`, `shuffle.sv`, `dec_n.sv`, `stat_syneq.sv`: combinational
  units.
- `rtl/hs_reg.sv`, `chan_rx.sv`, `sel_chan.sv`: handshake registers and
  channels.
- `rtl/ecd_datapath.sv`: the shared datapath.
- `rtl/thread_ctrl.sv`, `decode_ctrl.sv`, `errcheck_ctrl.sv`,
  `ecd_hardwired.sv`: hardwired control.
- `rtl/ucode_rom.sv`, `ucode_ram.sv`, `next_addr.sv`, `bdu.sv`, `ecu.sv`, `ras.sv`,
  `ecd_microengine.sv`: microengine control.
- `rtl/cd_error_decoder.sv`: top level. The two implementations stand side
  by side. Each has its own `start` and channels (`hw_*`, `ue_*`), and they
  share `clk` and `rst_n`. Parameters `WORDS_T0` = 27, `WORDS_T1` = 32,
  `TWO_PHASE` = 0 and `UCODE_RAM` = 0.
- `tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
  shared models:
  - `tb_ecd_ref`: an independent reference model of the algorithm
  - `tb_chan_src`, `tb_chan_snk`: random-delay channel ends, four- or
    two-phase
  - `tb_hs_resp`: random-delay unit model
  - `tb_ecd_driver`: a complete environment for one decoder

`tb_cd_error_decoder` runs both implementations at the default sizes. It
feeds them 24 blocks: all-zero, one or two corrupted symbols, and random. It
compares every result with the reference. It also checks that each
mechanism occurred at least once:

- both block sizes
- a search that matches at once, a search that matches after some steps,
  and a search that runs out
- waits for a slow sender and for a slow receiver
- hardwired forks
- chained and branching microinstructions

`tb_ecd_two_phase` runs the same kind of test on a top level built with
`TWO_PHASE = 1`, with eight blocks. `tb_chan_rx` and `tb_sel_chan` test
both protocols. `tb_ecd_ucode_ram` builds the top with `UCODE_RAM = 1`,
loads the two programs described above and checks both.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ecd_pkg.sv tb/tb_ecd_ref.sv tb/tb_cd_error_decoder.sv \
    --top-module tb_cd_error_decoder -o sim
./obj_dir/sim
```

Any other testbench builds the same way with its own name. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a simulation that
hangs, and counts that as a failure.
