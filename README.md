# Ring-oscillator PUF peripheral with an AXI4-Lite interface

A physically unclonable function (PUF) gives every chip a fingerprint that
comes from manufacturing variation rather than from a stored key. This design
is a ring-oscillator (RO) PUF: many identical ring oscillators are built on the
chip, and because no two are really identical each runs at a slightly different
frequency. A *challenge* picks two oscillators; each drives the clock of its own
counter; the *response* bit says which counter filled first, i.e. which
oscillator is faster. The same chip gives the same answer again; another chip,
built from the same netlist, gives a different one.

The design packages that PUF as a memory-mapped peripheral for a processor
(for example the ARM cores of a Zynq SoC): an 8-bit challenge selects one of
256 ordered RO pairs, and eight independent RO groups answer it with an 8-bit
response.

## Structure

```
ro_puf_axi            AXI4-Lite registers, pin interface, start logic   (top)
└─ ro_puf_core        8 groups, one response bit each
   └─ ro_puf_bit      one group: 16 ROs, 2 muxes, 2 counters, comparator, controller
      ├─ ro_cell  x16 ring oscillator (behavioural model)
      ├─ ro_mux   x2  16:1 clock select
      ├─ ro_counter x2 counter clocked by the selected RO
      └─ count_compare  counter A > counter B
ro_puf_pkg            constants, register map, controller state type,
                      process-variation model used by ro_cell
```

Default sizes: 8 response bits, 16 ROs per group (128 ROs in all), 16-bit
counters, 32-bit AXI data, 4-bit local AXI address.

## The ring oscillator

Each RO is an enable NAND followed by two inverters, with the last inverter's
output fed back to the NAND, and one more inverter as output buffer. With
`enable` low the loop rests and `fr_out` is low; with it high the loop
oscillates with a period of twice the loop delay.

`ro_cell` is a **behavioural model**, not synthesizable logic: a zero-delay
combinational loop has no defined simulation behaviour. It toggles its output
every loop delay. The stage delays come from `ro_puf_pkg::stage_delay_fs(seed,
ro_id, stage)`: 500 ps nominal plus 0–25 ps picked by a hash of a chip seed,
the RO's index and the stage's index. The `SEED` parameter on the top therefore
plays the role of "which chip", and the RO index that of "which placement".
Nominal delay and spread are modelling choices.

For an FPGA build the model has to be replaced by real gates (one LUT per
gate) protected from optimisation (`DONT_TOUCH`/keep attributes on every gate
and net), with the combinational loop explicitly allowed, and the ROs must be
placed by hand in identical, adjacent slices so that routing does not
dominate the frequency differences. None of that is in this RTL.

## How one response bit is measured (`ro_puf_bit`)

The challenge's low nibble selects RO A and its high nibble RO B, and both
selects are latched when the measurement starts, so the counted clocks never
switch mid-measurement. The controller (`puf_state_e`) then runs:

| state | what happens |
|---|---|
| `ST_IDLE` | waiting; `response`/`valid` hold the last result |
| `ST_CLEAR` | both counters held in asynchronous clear for 2 cycles |
| `ST_RUN` | both counters count rising edges of their RO |
| `ST_FREEZE` | a full flag has been seen; counting stops, wait `FREEZE_CYCLES` (4), sample the comparator |

This is where the design crosses clock domains, which is the part that needs
the most care:

* Each counter (`ro_counter`) is clocked by its own RO, not by the system
  clock. Its `run` input comes from other domains and goes through a 2-flop
  synchroniser clocked by the RO, so counting starts and stops two RO edges
  after `run` changes.
* A counter stops at 2^W−1 and raises `full`. The other counter's `run` is
  `count_en && !full_other`, so the slower counter stops a couple of its own
  cycles after the faster one fills, without waiting for the system clock.
* Both `full` flags are brought into the system domain by 2-flop
  synchronisers. When either arrives, the controller drops `count_en` and
  waits 4 cycles before it reads the counters, which by then are static.
* `response = count_a > count_b`: 1 means RO A is faster. Equal counts
  (e.g. the same RO chosen twice) give 0.

A measurement takes about 2^W − 1 periods of the faster RO plus about ten
system cycles: with the defaults (W = 16, ~3 ns RO period) about 0.2 ms.
Pairs whose frequencies differ by less than a few counts in 2^W can resolve
either way from one measurement to the next; that is a property of RO PUFs,
and why longer counters give more stable responses.

A `start` while busy is ignored. A measurement started with the ROs disabled
waits until they are enabled.

## The peripheral (`ro_puf_axi`)

Ports: `tigSignal`, `enable`, `challenges[7:0]`, `response[7:0]`, and the
AXI4-Lite slave `s00_axi_*` with clock `s00_axi_aclk` and active-low reset
`s00_axi_aresetn`. Everything runs on the AXI clock.

A measurement can be driven from the pins (e.g. wired to GPIO outputs) or
from software:

| offset | register | bits |
|---|---|---|
| 0x0 | CTRL | [0] enable ROs (ORed with the `enable` pin); [1] start, write 1, reads 0; [2] take the challenge from CHALLENGE instead of the pins |
| 0x4 | CHALLENGE | [7:0] |
| 0x8 | STATUS (ro) | [0] busy, set from the very cycle a start is accepted; [1] valid |
| 0xC | RESPONSE (ro) | [7:0], same value as the `response` pins |

A rising edge on `tigSignal` also starts a measurement. Software flow: write
CTRL = 0x5, write CHALLENGE, write CTRL = 0x7, poll STATUS until it reads
0b10, read RESPONSE. Only the low 4 address bits are decoded; the block can
sit anywhere in the address map (the reference system put it at 0x43C0_0000
in a 64 KiB window). The AXI slave takes write address and data together,
handles one transfer per channel at a time, honours WSTRB and always answers
OKAY. Assertions check that BVALID and RVALID/RDATA are held until accepted.

## Where this departs from, or adds to, the original system

* The original system is a Zynq SoC: the processor, the AXI interconnect,
  two AXI GPIO blocks and the reset generator are vendor IP and are not
  included. The top's AXI slave port and its pins are where they connect.
* The register map, the meaning of `tigSignal` as start trigger, the OR of
  the two enables, the clear/freeze sequence, the synchronisers and the
  early stop of the slower counter are this design's own choices; the
  original only describes the pins and "an AXI compatible IP".
* Eight response bits are built as eight separate 16-RO groups sharing the
  challenge. The original's published outputs show responses with exactly
  one bit set; this design's independent groups give arbitrary 8-bit
  patterns, so responses are not expected to match that form.
* The RO delays are a model; real frequencies and thus real responses come
  only from silicon.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. The expected responses come from
`tb/tb_puf_ref_pkg.sv`, which predicts each bit from the two ROs' loop delays
alone (the faster RO wins) and only makes a prediction when the slower counter
would lag by at least 6 counts; it also predicts the measurement time.

| testbench | covers |
|---|---|
| `tb_ro_cell` | RO period and disable behaviour |
| `tb_ro_mux`, `tb_count_compare`, `tb_ro_counter` | unit checks, including counter latency and saturation |
| `tb_ro_puf_bit` | one group, 10-bit counters: 60 pairs, timing, busy-ignore, RO stall |
| `tb_ro_puf_core` | 8 groups, 10-bit counters, random challenges |
| `tb_ro_puf_axi` | end to end, two chips (seeds), 2 bits, 10-bit counters: all 256 challenges over AXI, pin mode, reproducibility, chip-to-chip differences, back-pressure, strobes; counts each mechanism and fails if one never happened |
| `tb_ro_puf_crp` | workload: all 256 challenges, 3 repetitions, two chips, 2 bits, 10-bit counters; checks that every decidable bit repeats (reliability) and that the chips differ on 25–75 % of bits (uniqueness) |
| `tb_ro_puf_full` | default parameters (8 bits, 128 ROs, 16-bit counters): two challenges over AXI, about 10 s of simulation |

With plain Verilator (5.x, timing support needed for the RO model):

```
verilator --binary --timing --assert -Irtl -Itb -yrtl -ytb +libext+.sv \
  rtl/ro_puf_pkg.sv tb/tb_puf_ref_pkg.sv tb/tb_ro_puf_full.sv \
  --top tb_ro_puf_full -o sim
./obj_dir/sim
```

Simulation speed is set by the number of oscillators toggling: every RO edge
is a simulator event. That is why the block testbenches use fewer groups and
shorter counters; the design itself has no size limits.
