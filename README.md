# Two-bit bus-invert coding with a mid-level bus line (TBIC)

Bus-invert coding cuts the switching power of a wide bus. When sending a word
would toggle more than half of the wires, the transmitter sends its complement
instead and flags the inversion. The usual implementations add an extra
*invert* wire per group of bits. That costs area, and the invert wire's own
toggles (overhead transitions) eat up to half of the savings. On two-bit
groups, which give the best possible saving, the invert wires add 50 % to the
bus width and cut the net reduction from about 50 % to about 25 %.

TBIC gets rid of the invert wire. The bus is cut into independent two-bit
sub-buses. One of each pair of wires, the **N-line**, is ordinary. The other,
the **M-line**, has a third state, **M**, a voltage roughly half-way between
0 and VDD. The inversion flag travels as the M-line entering or staying in the
M-state. Two wires with 3 × 2 states, together with the state of the previous
cycle, carry two data bits plus the flag. The coding also ensures that at most
one of the two wires changes per cycle. On random data this RTL saves 45.7 %
to 46.0 % of the wire transitions, against about 25 % for two-bit bus-invert
coding with invert wires.

## One sub-bus: what the encoder sends

The encoder of a sub-bus keeps three bits of state:

| register | meaning |
|---|---|
| R0 | binary value of the M-line (data bit 0) |
| R1 | value of the N-line (data bit 1) |
| RM | 1: the M-line is held at the mid-level |

For each new word D1 D0, the encoder compares the word with R1 R0:

| RM | D0 vs R0 | D1 vs R1 | sent | next R0 R1 RM | wires after the clock |
|---|---|---|---|---|---|
| 0 | same | same | as is | R0 R1 0 | nothing changes |
| 0 | same | differs | as is | R0 ~R1 0 | N-line toggles |
| 0 | differs | same | as is | ~R0 R1 0 | M-line toggles 0↔1 |
| 0 | differs | differs | **inverted** | R0 R1 1 | M-line goes to M |
| 1 | same | same | as is | R0 R1 0 | M-line returns from M to R0 |
| 1 | same | differs | as is | R0 ~R1 **1** | N-line toggles, M-line stays at M |
| 1 | differs | same | as is | ~R0 R1 0 | M-line leaves M for ~R0 |
| 1 | differs | differs | **inverted** | R0 R1 1 | M-line stays at M |

Written as logic (`rtl/tbic_encoder.sv`):

```
inv = (D0 ^ R0) & (D1 ^ R1)
R0' = inv ^ D0          R1' = inv ^ D1
RM' = inv | RM & (D1 ^ R1)
```

An inverted word is both bits differing from the wires. Its complement equals
what the wires already hold, so only the flag must move, and it moves by
putting the M-line at M. The subtle row is the sixth one. If the line is at M
and only D1 changes, dropping M would change a second wire in the same cycle.
So the encoder keeps the line at M and toggles the N-line alone.

## Decoding a mid-level line

This is the part that takes the most thought. The receiver sees an M-line at M
in three situations:

1. The line has just entered M: the word is inverted.
2. The line was already at M and the N-line did not change: a fresh inverted
   word. Case 8 of the table; an inverted word whose complement equals the
   stored values, R1 included.
3. The line was already at M and the N-line toggled: a *non-inverted* word
   whose bit 0 equals the stored R0 (row 6).

The decoder therefore keeps the same three registers as the encoder: the
previous binary M-line value R0, the previous N-line R1, and whether the line
was at M (RM). Its logic (`rtl/tbic_decoder.sv`) is:

```
M   = M-line at mid-level          (level detector)
B0  = M ? R0 : M-line level        (level detector)
B1  = N-line
inv = M & (~RM | (B1 == R1))
D0  = B0 ^ inv,  D1 = B1 ^ inv
next: R0 <= B0, R1 <= B1, RM <= M
```

While the line sits at M it carries no binary value. The level detector
substitutes the stored R0, which equals the encoder's R0 by construction. The
encoder resets to R0 = R1 = RM = 0 (both wires low). During reset, the decoder
clears RM and loads R0 and R1 from the wires, so the two ends start in step.

## The three-level wire

The mid-level is analog. In the synthesizable RTL, an M-line is a two-bit code,
`tbic_pkg::mline_t` = `{mid, val}`. `mid = 1` is the M-state (with `val`
driven 0, so nothing leaks past the detector), and otherwise `val` is the
binary level. `tbic_bus_driver` produces this code: the mid-level generator
when RM = 1, the R0 buffer otherwise, and R1 on the N-line.
`tbic_level_detector` consumes it. Its two "threshold" bits mirror the
circuit's pair of comparators, one switching below the mid-level and one above
it, whose XOR is M.

For simulation with voltages, `tbic_mline_wire_model` turns the code into a
real-valued wire and back. The mid-level `VMID` defaults to 0.6 V at
VDD = 1.2 V, and the reference generator produces 0.5–0.7 V. The detector
thresholds are `VTH_LO = 0.3 V` and `VTH_HI = 0.9 V`. The wire settles after a
transport delay `T_SETTLE = 2 ns`. Setting `ANALOG_LINE = 1` on `tbic_link`
inserts one model per M-line between transmitter and receiver. This path is
not synthesizable and needs a clock period longer than `T_SETTLE`. The
thresholds and the settling time are this design's assumptions. The exact
mid-level does not affect the logic. It affects only the energy of a visit
to M.

## What counts as a transition

Going 0→M→1 or 1→M→0 (a *via-transition*) costs the same charge as a direct
0→1 swing, whatever the mid-level is. So it counts as one ordinary data
transition. Going 0→M→0 or 1→M→1 (a *round transition*) has no counterpart in
the uncoded data: it is the scheme's overhead. With the mid-level at VDD/2,
a round transition costs C·(VDD/2)², half the energy of a full swing. The
effective transition count is therefore

```
N_T = N_B + N_OT / 2
N_B  = N-line toggles + direct and via-transitions of the M-line
N_OT = round transitions
R    = 100 % - N_T / N_raw
```

where `N_raw` counts bit changes in the uncoded word stream.
`tb/tbic_activity_monitor.sv` classifies the wire activity this way, closing
each visit to M when the line leaves it. `tb/tb_tbic_workload.sv` measures,
over 30 000 random words at each width:

| width | P_B | of which 0↔1 | via | P_OT | R |
|---|---|---|---|---|---|
| 16 | 49.80 | 41.51 | 8.29 | 8.41 | 46.00 |
| 32 | 50.10 | 41.75 | 8.35 | 8.32 | 45.74 |
| 64 | 50.00 | 41.66 | 8.34 | 8.32 | 45.84 |
| 128 | 50.02 | 41.68 | 8.34 | 8.32 | 45.82 |

(percent of `N_raw`). These agree with published random-data results for this
scheme (R ≈ 45.5–46.1 %, P_OT ≈ 8.2–8.5 %) to within about 0.3 points. The
testbench fails if any figure is more than 1 point (0.8 for R) away from the
published average.

## Structure

```
tbic_link                 top: WIDTH-bit bus, transmitter -> wires -> receiver
├── tbic_transmitter      WIDTH/2 sub-buses; odd top bit sent uncoded
│   ├── tbic_encoder      3-bit register + inversion logic (per sub-bus)
│   └── tbic_bus_driver   RM/R0/R1 -> M-line code and N-line
├── tbic_mline_wire_model behavioural analog M-line (only if ANALOG_LINE=1)
└── tbic_receiver
    └── tbic_decoder      3-bit register + inversion logic (per sub-bus)
        └── tbic_level_detector
tbic_pkg                  mline_t, tbic_lines_t
```

Sub-bus *i* carries data bits 2*i* (M-line) and 2*i*+1 (N-line). With an odd
WIDTH, bit WIDTH−1 goes on `bus_plain`, registered so that it stays aligned
with the coded bits. With an even WIDTH, `bus_plain` is constant 0.
`tbic_transmitter` carries a concurrent assertion of the scheme's central
rule: no sub-bus changes both of its wires between two clock edges.

### `tbic_link` interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `tx_data` | in | WIDTH | word to send, sampled on the rising edge |
| `rx_data` | out | WIDTH | received word |
| `bus_lines` | out | 3·WIDTH/2 | `tbic_lines_t` per sub-bus: M-line code, N-line |
| `bus_plain` | out | 1 | uncoded line (odd WIDTH) |
| `tx_inv` / `rx_inv` | out | WIDTH/2 | inversion flags at each end |

Parameters: `WIDTH` (default 32; the scheme was evaluated at 16, 32, 64 and
128) and `ANALOG_LINE` (default 0).

A word is taken at every rising edge; there is no valid/enable. The encoder
registers drive the wires, so the coded word appears just after the edge. The
decoder is combinational from the wires, so `rx_data` equals the word sampled
at the previous edge: a latency of one cycle and a throughput of one word per
cycle. `rx_inv` in a cycle equals the `tx_inv` the transmitter showed for that
word before the edge. To hold the bus idle, keep sending the same word: at
most one more change follows (the M-line may return from M once), then
nothing toggles.

## Where this RTL goes beyond the source scheme

The coding equations, the decoder equation, the register contents and the
split into independent two-bit sub-buses follow the published scheme. The
following are this design's own choices:

- the two-bit code for the three-level wire, and the behavioural voltage
  model with its thresholds (0.3 V / 0.9 V) and 2 ns settling;
- synchronous active-low reset; the encoder resets to all zeros (the source
  specifies only the decoder's start-up: RM cleared, R0/R1 taken from the
  wires);
- no handshake: one word per clock;
- the bit-to-sub-bus mapping, and which bit of an odd-width bus stays
  uncoded, plus the register on that bit;
- a default width of 32 bits;
- combinational decoder outputs (no output register).

The transistor circuits of the mid-level generator and the level detector are
not reproduced; only their function is. Audio- and video-file workloads were
not simulated, only uniformly random data.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl --top-module tb_tbic_link \
  rtl/tbic_pkg.sv tb/tb_tbic_link.sv -o sim
./obj_dir/sim
```

Substitute any of the testbenches:

| testbench | what it checks |
|---|---|
| `tb_tbic_encoder` | next state and `inv` against the eight-row table; ≤ 1 wire change per cycle; all 32 state/input pairs hit |
| `tb_tbic_bus_driver` | all eight R0/R1/RM combinations |
| `tb_tbic_level_detector` | L, H and M with R0 = 0/1 |
| `tb_tbic_decoder` | decodes a reference encoder's stream, both kinds of held M |
| `tb_tbic_transmitter` / `tb_tbic_receiver` | 32-bit and 7-bit (odd) buses against a reference encoder (`tb/tbic_ref_encoder.sv`) |
| `tb_tbic_mline_wire_model` | voltages and detection at VMID 0.5/0.6/0.7 V, settling; a 16-bit link with the analog line |
| `tb_tbic_link` | 20 000 words at the default width: one-cycle latency, flag agreement, every transition kind (inversion, entry into M, hold, direct, both via- and both round transitions) observed, never two wires of a sub-bus at once |
| `tb_tbic_workload` | transition statistics at 16/32/64/128 bits (table above) |

All run in well under a second. Each testbench has also been run against a
deliberately broken copy of its module and reports failures then.
