# Fault tolerant on-chip bus with BRG-HD switching activity reduction

Long on-chip buses in deep-submicron processes are exposed to crosstalk and
delay faults, so a reliable bus carries a Hamming code: 32 data bits travel as
a 38-bit codeword, and the receiver corrects any single faulty wire. Those
extra wires, and the parity they carry, add switching activity. Switching
activity is the main lever on a bus's dynamic power,
`P = (a_self * C_load + a_coupling * C_coupling) * Vdd^2 * f`.

This design puts a transition-reducing code, **bus regrouping with Hamming
distance (BRG-HD)**, on top of the Hamming codeword. For each new word the
encoder counts the power-consuming coupling transitions the word would cause
against what is now on the wires. If that count is too high, it inverts the
odd-numbered wires, the even-numbered wires or all of them, whichever group
changes most. Two extra control wires tell the receiver which inversion was
applied. The receiver undoes the inversion and then runs Hamming correction.
The result is a 40-wire bus that still corrects a single faulty data wire and
has fewer self and coupling transitions than the plain 38-wire codeword.

```
data_in[31:0] ─► hamming_enc ─► cw[37:0] ─► brg_encoder ─► 40 wires ─┬─► brg_decoder ─► hamming_dec ─► data_out
                                   │         (bus register)           │    ▲ fault_mask XOR (channel)
                                   └► transition_monitor (uncoded)    └► transition_monitor (coded)
```

## Counting transitions

Two kinds of transition are counted between consecutive words on the bus:

* **Self transitions (ST).** These are the wires that change value, which
  charge or discharge their capacitance to the substrate. ST is the Hamming
  distance between the two words.
* **Coupling transitions (CT).** These are counted per pair of adjacent wires,
  and the table below gives the score. A pair scores only when the wires end
  up different. It scores 1 if they were equal before, and 2 if they swapped
  (01↔10). It scores 0 if the wires end up equal, or if the pattern did not
  change.

| previous \ present | 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| 00 | 0 | 1 | 1 | 0 |
| 01 | 0 | 0 | 2 | 0 |
| 10 | 0 | 2 | 0 | 0 |
| 11 | 0 | 1 | 1 | 0 |

Total transitions are `TT = ST + CT`. A coding scheme is judged by its saving,
`(TT_uncoded − TT_coded) / TT_uncoded`. `rtl/coupling_count.sv` computes ST and
CT for one pair of words. The encoder and the monitors share it.

## The BRG-HD decision

Let `a0 … a37` be the codeword, and let `p0 … p37` be the 38 data wires now on
the bus. Those wires hold the previous word *as it was encoded*.

1. `CT` = coupling transitions from `p` to `a` over the 38 data wires.
   `ST` is computed as well. It is reported, but it does not enter the
   decision.
2. If `CT >= n/2`, with n = 38 (the hardware checks `2*CT >= n`):
   * `OHD` = Hamming distance over the **odd group** `a0, a2, a4, …` (the
     1st, 3rd, 5th … wire, counted from one).
   * `EHD` = Hamming distance over the **even group** `a1, a3, a5, …`.
   * If `OHD > EHD`, invert the odd group. The control wires are left=1,
     right=0.
   * If `EHD > OHD`, invert the even group. The control wires are left=0,
     right=1.
   * If they are equal, invert the whole word. The control wires are left=1,
     right=1.
3. Otherwise send the word unchanged. The control wires are left=0, right=0.

The physical wire order matters, because coupling is counted between
neighbours:

| wire | 0 | 1 … 38 | 39 |
|---|---|---|---|
| signal | left control | a0 … a37 (inverted per mode) | right control |

`brg_pkg::brg_mode_e` packs `{left, right}` into the modes `MODE_PASS` (00),
`MODE_EVEN` (01), `MODE_ODD` (10) and `MODE_ALL` (11). The decoder XORs the
data wires with the group mask that the two control wires select.

Points that are easy to miss:

* The comparison is against the **encoded** word on the wires, not against
  the previous raw codeword. This is what makes the choice reduce activity on
  the real wires.
* The rule inverts the group with the *larger* Hamming distance, and it is
  only tried when the coupling count is high. It is a heuristic. The coded
  word is not guaranteed to cause fewer transitions than the raw one.
* The two control wires add their own self and coupling transitions. The
  monitor on the coded bus counts all 40 wires, so those transitions are
  included in every figure below.

## Error correction and its limits

`hamming_enc` and `hamming_dec` implement a single-error-correcting Hamming
code of any width. There are K check bits, where K is the smallest number
with `2^K >= DATA_W + K + 1`. Codeword bit `cw[i]` is position `i+1`. Check
bits sit at positions 1, 2, 4, 8, 16 and 32, and the data bits fill the other
positions in order. The decoder's syndrome is the position of the flipped
bit. Data wire `i` of the coded bus carries `a(i-1)`, so a single fault on
data wire `i` gives syndrome `i`.

The BRG-HD inversion is an XOR with a mask, so it does not spread a fault on a
data wire: one faulty data wire is still one faulty codeword bit, and the
Hamming decoder corrects it. Note these limits:

* **The control wires are not protected.** A fault on either control wire
  selects the wrong mask and corrupts about half of the word or all of it.
  Protecting them needs extra redundancy, which this design does not have.
* Two faulty data wires are flagged (`err_uncorrectable`) only when the XOR
  of their positions is above 38. Other double faults are miscorrected
  silently. The code has distance 3 and no extra parity bit.

## Widths

`DATA_W` (default 32) sets every width. The codeword is `CW_W = DATA_W + K`
and the bus is `CW_W + 2` wires. The four evaluated bus widths are:

| DATA_W | codeword wires | coded bus wires |
|---|---|---|
| 8 | 12 | 14 |
| 16 | 21 | 23 |
| 32 (default) | 38 | 40 |
| 64 | 71 | 73 |

## Timing and interface (`ft_bus_top`)

* **Throughput:** one word per clock.
* **Send:** when `valid_in` is high at a rising edge, the coded word is loaded
  into the bus register. It is on `bus_wires` after that edge, and
  `bus_valid` goes high.
* **Receive:** `data_out` is registered at the next edge, with
  `valid_out` high. `err_corrected`, `err_uncorrectable` and `err_syndrome`
  are registered with it. The latency is 2 cycles.
* **Hold:** when `valid_in` is low the wires keep their value, so an idle bus
  makes no transitions.
* **Reset:** `rst_n` is synchronous and active low. It clears the wires and
  all counters to zero, so the first word is compared against all zeros.
* **Fault injection:** `fault_mask` (one bit per wire) is XORed onto the wires
  before the receiver. It models crosstalk or delay faults. Tie it to zero
  for a clean bus.
* **Monitors:** the `uncoded_*` outputs count the plain Hamming codeword
  stream, which is the bus without BRG-HD. The `coded_*` outputs count the 40
  wires. Each has a word count, ST, CT and TT, as 32-bit counters that wrap.
  They update one cycle after the word they count.
* **Assertion:** `ft_bus_top` asserts that on a clean channel the receiver
  recovers exactly the codeword that was sent.

The bus register, the receive register, the valid/hold protocol, the reset
value, the fault-injection port and the monitors are choices of this
implementation. The published scheme gives only the coding rules.

## Switching activity measured

`tb/tb_bus_workloads.sv` drives all four widths with 10000 uniformly random
data words each, on a clean channel. It checks every word and every
transition total against an independent model. Results at 10000 words, with
TT counted including the control wires:

| codeword wires | TT uncoded | TT coded | saving |
|---|---|---|---|
| 12 | 115374 | 100245 | 13.1 % |
| 21 | 205464 | 182411 | 11.2 % |
| 38 | 374700 | 335236 | 10.5 % |
| 71 | 704657 | 645220 | 8.4 % |

The published evaluation of this scheme reports larger savings:
18.1 % (12 wires), 20.6 % (21), 22.5 % (38) and 21.6 % (71). Its data
vectors are not available, and random data is a hard case for any
transition code. Its accounting of the control wires is also not stated.
Treat the figures above as what this RTL does on random data, not as a
reproduction of those numbers. The savings printed after 1000, 2000 and 5000
words are within half a percentage point of the 10000-word figures.

## Files

| file | content |
|---|---|
| `rtl/brg_pkg.sv` | mode enum, `hamming_k()` check-bit count |
| `rtl/hamming_enc.sv` / `rtl/hamming_dec.sv` | Hamming SEC encoder and decoder (combinational) |
| `rtl/coupling_count.sv` | ST and CT of one word against another (combinational) |
| `rtl/brg_encoder.sv` | BRG-HD decision, inversion and bus register |
| `rtl/brg_decoder.sv` | inversion removal (combinational) |
| `rtl/transition_monitor.sv` | running ST/CT/TT totals of a bus |
| `rtl/ft_bus_top.sv` | the whole bus |
| `tb/tb_ref_pkg.sv` | reference models: table-driven CT, syndrome-based Hamming, BRG-HD rules |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ft_bus_top` is the end-to-end test at default size; `tb_bus_workloads` runs the four widths |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_ft_bus_top` does the following:

* It sends 4000 cycles of traffic with random idle cycles.
* It injects no fault, a single data-wire fault, or an uncorrectable pair of
  faults, picked at random.
* It checks data, flags, syndrome, the 2-cycle latency, the wire values and
  the monitor totals.
* It requires every mode, a hold, a correction and an uncorrectable flag to
  occur at least once.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/brg_pkg.sv tb/tb_ref_pkg.sv tb/tb_ft_bus_top.sv \
    -y rtl +libext+.sv --top-module tb_ft_bus_top -o sim
./obj_dir/sim
```

Replace `tb_ft_bus_top` with any other testbench name to run it. To build a
different width, set `DATA_W` on `ft_bus_top`. The other widths follow from
it.
