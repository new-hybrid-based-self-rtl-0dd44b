# SM-HBST: a signature tester for boards that carry a microcontroller

A board can be tested node by node without knowing what each node should
do. Drive the board's inputs with a long, repeatable stream of patterns.
Probe one node and fold every bit it produces into a short checksum, the
*signature*. Then compare that signature with the one the same node gave on
a board known to be good. A single wrong bit anywhere in the stream changes
the signature, so one 24-bit number stands for the whole waveform of the
node.

This RTL is the hardware half of such a tester: the signature multi-mode
hardware-based self-test unit (SM-HBST). It is one FPGA design with:

- 48 pattern outputs;
- three staggered test clocks;
- a signature analyser and a pulse-width timer on a single probe input;
- a byte-wide port through which a PC sets it up and reads results.

For the microcontroller on the board, the tester is the outside half of a
*hybrid* self-test. The microcontroller runs small test routines for its
own modules (ports, CPU, serial port, timers, PWM, memories) and puts their
results on its pins. The tester probes those pins exactly as it probes any
logic gate, either as signatures or, for timers, as pulse widths.

## The four ways of testing

The 16-bit initial-condition code **IC(15:0)** selects the test mode in
bits 6:4:

| IC(6:4) | mode | patterns on GTPG(47:0) | who clocks the test |
|---|---|---|---|
| 0 | PRT, pseudorandom | 48-bit LFSR | the tester: three-phase clocks and a counted test gate |
| 1 | DET, deterministic | patterns the PC writes one byte at a time | the PC, by command |
| 2 | DET programming | as mode 1 | as mode 1 |
| 3 | HPDT, hybrid | GTPG(47:42) fixed from the PC, GTPG(41:0) pseudorandom | the tester, as mode 0 |
| 4 | SS, microseconds | patterns from the PC, to trigger the pulse | the PC; the probe is timed in µs |
| 5 | SS, milliseconds | as mode 4 | as mode 4; the probe is timed in ms |

Codes 6 and 7 are unused and behave like mode 1.

The hybrid mode exists because real boards have inputs that must sit still
while the rest is exercised, such as enables, mode pins and module selects.
On the example board that this split was sized for, those inputs sit on the
top six pattern bits. The random logic takes GTPG(18:0).

## Three-phase clocks and the test gate

This is the part that needs the closest reading. In modes 0 and 3 the
tester runs the whole test by itself.

**Phase ticks.** A delay tick arrives every N+1 system clocks, where
N = IC(3:0). The system clock is 50 MHz, so a tick comes every 20·(N+1) ns.
One test-clock period is six ticks, 120·(N+1) ns: 240 ns (4.17 MHz) at N = 1
and 1920 ns (520.8 kHz) at N = 15. The three clocks are square waves, each
one tick behind the one before:

```
phase (ticks)   0   1   2   3   4   5   0
GCLK_TPG        ‾‾‾‾‾‾‾‾‾‾‾‾\___________/‾‾‾   rise: next pattern on GTPG
GCLK_CUT        ____/‾‾‾‾‾‾‾‾‾‾‾\___________   either edge clocks the board
GCLK_SIG        ________/‾‾‾‾‾‾‾‾‾‾‾\_______   fall: probe sampled into the SA
```

A new pattern therefore has five ticks to ripple through combinational
logic before the probe is sampled. A board that is sequential can use
either edge of GCLK_CUT: both land between the pattern change and the
sample.

**Test gate.** IC(10:7) holds a gate code k. The gate lasts G = 10^k
periods; codes above 8 count as 8.

- The gate opens on a rise of GCLK_TPG.
- **Period 1 is the clear period.** TEST_GATE goes high and CLR_CUT is
  high for the whole period. The pattern generator loads its seed and the
  signature analyser is emptied.
- **Periods 2 to G** each apply one pattern. The first is the seed itself,
  and each later GCLK_TPG rise steps the generator. On every fall of
  GCLK_SIG one response bit enters the analyser, so a gate makes G−1
  shifts.
- The rise that would start period G+1 closes the gate. The signature is
  then copied to the SIG(23:0) bus and held, and **ST** goes high to say
  that a new signature is waiting.

The board sees exactly the same pattern sequence in every gate, with its
flip-flops cleared at the same point. Repeating the test on a good board
therefore gives the same signature every time, and that signature is the
reference.

**Single and multiple opening.** With MOD_SEL low, each rising edge of
ENABLE opens one gate. ENABLE must fall and rise again for the next
signature. With MOD_SEL high, gates repeat with one closed period between
them while ENABLE stays high, so the signature of a node can be watched
while the probe is moved. Dropping ENABLE in the middle of a gate abandons
it without a signature. The three clocks run only while ENABLE is high.

**Clock source and chaining.** With SW_CLK high, every edge of CLK_EXT
(rising or falling) counts as a tick in place of the internal divider.
CLK_SYC toggles on every tick. Feeding one tester's CLK_SYC into a second
tester's CLK_EXT makes the second one run in step with the first. Two units
together give 96 pattern outputs for boards with more than 48 inputs.

## The signature analyser

The analyser divides the probe's bit stream by the primitive polynomial
1 + x^5 + x^23. It is a shift register that moves towards its top stage on
every sample. The new bottom bit is the probe bit XOR stage 22 XOR stage 4.
The chance that a faulty stream gives the good signature is 2^-23.

- The division needs 23 stages.
- A 24th stage keeps the bit last shifted out of stage 22, so all six hex
  digits of the signature carry information.
- One side effect is handy in diagnosis: if node B carries node A's stream
  one pattern later, B's signature is A's shifted one place.

Two signatures are worth memorising. A node stuck HIGH through a 10^5-period
gate gives **299BD5**. A node stuck LOW gives **000000**. A signature that
appears on a node which should toggle points straight at a stuck pin.

## The pattern generators

**Pseudorandom (PRTPG).** This is a 48-stage maximal-length LFSR with
polynomial x^48 + x^47 + x^21 + x^20 + 1. All 48 stages drive GTPG
directly. The PC sets the start state TPG_IS(47:0). An all-zero seed would
lock the register, so it is replaced by 1.

**Deterministic (DET_TPG).** A 48-bit pattern reaches the tester as six
bytes. Each byte is held in its own staging latch. One transfer command
copies all six into the output register at once, so the board never sees a
half-written pattern. Patterns can follow one another for as long as the PC
keeps sending them.

## Talking to the tester: DPort, CPort and the status port

The PC has an 8-bit data port DPort(7:0), a 4-bit command port CPort(3:0),
and reads back a 4-bit status port. Both inputs are asynchronous. Each goes
through a two-flop synchroniser, and a CPort value counts only after three
equal samples.

| CPort | command | effect |
|---|---|---|
| 0000–0101 | BYTE(0)–BYTE(5) | DPort goes into byte k of the pattern staging *and* of the seed staging (byte 0 = bits 7:0) |
| 0110 / 0111 | BYTE_L / BYTE_H | DPort goes into IC(7:0) / IC(15:8) staging |
| 1010 | DCLK_TPG | rising edge: staged pattern goes to GTPG |
| 1011 | DCLK_CUT | clock level for the board (all modes but 0 and 3) |
| 1100 | DCLK_SIG | falling edge: one probe bit into the analyser (all modes but 0 and 3) |
| 1101 | DCLK_IC | rising edge: staged bytes become IC(15:0) |
| 1110 | DCLK_IS | rising edge: staged bytes become the seed TPG_IS(47:0) |
| 1000, 1001, 1111 | reserved | nothing |

**Byte commands** act once, at the moment the command becomes the accepted
CPort value. The PC therefore puts the byte on DPort *first* and then
selects the command. To load the same byte slot twice in a row, select
another code (for example 1000) in between.

**Clock commands** take their clock level from DPort(7). The PC keeps
DPort(7) low while it changes CPort, which disables the decoder so no
glitch can fire a clock, and then pulses DPort(7). From a change on the
port to the resulting internal strobe takes four system clocks.

**Setup sequence.** A typical setup is:

1. BYTE_L, BYTE_H, DCLK_IC to write IC.
2. BYTE(0)–BYTE(5), DCLK_IS to write the seed.
3. Raise ENABLE.
4. Wait for ST.
5. Read the signature.

**Deterministic modes (1, 2).** Each pattern goes: six bytes, then DCLK_TPG,
then DCLK_CUT, then DCLK_SIG. IC(11) high clears the analyser and IC(12)
drives CLR_CUT. SIG follows the analyser as it stands, and the PC reads it
when it decides the sequence is over.

**Reading back.** IC(15:13) selects what the status port shows:

- codes 0–5: nibble k of SIG (code 0 = SIG(3:0));
- code 6: {ST, TEST_GATE, NEW, 0}. NEW is set when the single-shot latch
  takes a value. It stays set while code 6 is selected and clears when the
  PC moves the select to another code;
- code 7: the constant 1010, as a cable check.

To read a signature, the PC rewrites IC with only these three bits changed.

## Timing a pulse: the edge detection compactor

A timer cannot be checked with a bit-stream signature. Its result is a
duration. In modes 4 and 5 the probe feeds the edge detection compactor
instead.

- The probe is sampled at CLK_ED: 5 MHz in the µs range, 1 MHz in the ms
  range.
- Any change between two samples, rising or falling, raises **Edge 1** for
  one CLK_ED period.
- The end of Edge 1 raises **Edge 2** for the next period.
- A 23-bit counter counts CLK_SS: 1 MHz for µs, 1 kHz for ms.
- Edge 1 freezes the counter and copies it into the SS latch. Edge 2 clears
  the counter, which then starts again.

After one pulse, the latch holds the pulse's width in microseconds or
milliseconds, to within one count. SIG shows the latch in these modes, so a
timer test simply sets a pin high, lets the timer overflow, drops the pin,
and reads SIG. The timer runs of the original work gave on-times of about
3.4 ms to 13.8 ms, that is 3,400 to 13,800 counts. The counter stops at its
maximum (8,388,607) rather than wrapping. The trigger patterns for a single-shot circuit come from the
deterministic generator, under PC control.

## Board interface

- **Debouncers.** MCLR (active low), ENABLE, MOD_SEL and SW_CLK pass through
  debouncers that accept a new level after 20 ms. After power-up the master
  clear stays asserted for that long.
- **Display.** The signature shown on SIG is also displayed on six
  multiplexed seven-segment digits: active low, digit 5 = SIG(23:20), each
  digit lit for 1 ms.
- **Single clock domain.** Every named clock of the tester (GCLK_*,
  DCLK_*, CLK_SS, CLK_ED) is produced as a pin level for the board and as a
  one-cycle enable inside. The whole design is one 50 MHz clock domain, and
  no logic is clocked by a derived signal.

## Module map

```
sm_hbst_top
├── debouncer ×4          MCLR, ENABLE, MOD_SEL, SW_CLK
├── cu_det                PC side of the control unit
│   └── cport_decoder     synchronisers, command decode, clock strobes
├── csig_gen              tester-side control unit
│   ├── three_phase_clk   ticks, GCLK_TPG/CUT/SIG, CLK_EXT, CLK_SYC
│   └── test_gate_ctrl    gate, clear period, ST, MOD_SEL
├── tpg                   mode-dependent pattern mux
│   ├── prtpg             48-bit LFSR
│   └── det_tpg           six byte latches + output register
├── trc                   probe synchroniser, held signature, SIG select
│   ├── sa23              signature analyser
│   └── edc               single-shot timer
├── status_port
└── seg7_display
```

`hbst_pkg` holds the mode and command enums, the packed IC layout `ic_t`
(`{stat_sel, clr_cut, clr_sa, gate_code, mode, clk_div}` from bit 15 down)
and the decoded-command struct. Top parameters, with defaults:

- `CLK_PERIOD_NS` = 20;
- `DEB_CYCLES` = 1,000,000;
- `REFRESH_CYCLES` = 50,000;
- `DET_LSB` = 42, the lowest fixed bit in hybrid mode.

## Simulating

Every block has a self-checking testbench in `tb/`, and every testbench
ends with a `TB_RESULT checks=… failures=…` line. The reference models in
`tb/hbst_tb_pkg.sv` are written independently of the RTL:

- polynomial division for the signature;
- a tap-list LFSR for the pattern generator;
- a small stand-in board (4-bit comparator and 3-to-8 decoder, like the
  example board).

To run one:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_sm_hbst_top -y rtl -y tb -Irtl -Itb \
    rtl/hbst_pkg.sv tb/hbst_tb_pkg.sv tb/tb_sm_hbst_top.sv
./obj_dir/Vtb_sm_hbst_top
```

Substitute any `tb_<block>` for the top-level testbench. The top-level
testbench runs the whole tester at its default parameters, 20 ms debounce
included, in about 15 s of wall time. It:

- drives the PC ports the way the PC software would;
- runs PRT gates at several gate lengths, with signature and gate-length
  checks;
- checks the stuck-HIGH and stuck-LOW signatures and multiple opening;
- runs hybrid mode and both deterministic modes;
- times 123 µs and 3 ms pulses;
- checks the status read-back, the external clock and the display.

It counts how often each of these happened and fails if any never did.

Three more testbenches run the tester, again at full size, on the jobs it was
built for:

- `tb_board_diagnosis` measures 16 nodes of a stand-in random-logic board
  (two cascaded 4-bit comparators feeding a 3-to-8 decoder) with 10^5-period
  gates. It measures both a good board and one with a comparator output stuck
  HIGH, in about 20 s. The stuck pin reads 299BD5. Only the nodes downstream
  of the fault change, and tracing back from the changed nodes ends at the
  stuck pin.
- `tb_timer_workload` has a stand-in microcontroller produce the eight timer
  on-times of a timer test (3,447 to 13,791 µs). It times them in both
  single-shot ranges and reads one back through the status port.
- `tb_two_unit_chain` chains two tops through CLK_SYC → CLK_EXT to drive
  a 96-input board. Each unit probes a node that mixes both pattern
  buses. The signatures match only if both units apply pattern k in the
  same period.

## Where this design fills gaps or departs from the original description

- **Gate length coding.** IC(10:7) is described only as the number of
  periods in the gate. Reading it as 10^k is a choice. It makes the stuck-HIGH
  signature come out as 299BD5 at k = 5.
- **Signature width.** The analyser is described as 23 stages. The
  24th history stage is added because reference signatures use all six hex
  digits.
- **PRTPG polynomial.** Not given. The one above is a standard primitive
  choice.
- **Mode 2.** "Programming deterministic testing" is not described beyond
  its name. It behaves as mode 1.
- **Seed transfer width.** DCLK_IS is listed once as clocking only 16 seed
  bits and elsewhere as transferring all 48. All 48 are transferred.
- **Hybrid split.** The split is fixed by `DET_LSB`, not programmable.
- **Status port.** The nibble map and status codes 6 and 7 are this
  design's own.
- **Clock generation.** The original FPGA build used four clock managers.
  Here one 50 MHz clock and clock-enable strobes do that work, and the
  clock managers themselves are not part of the RTL.
- **Other choices.** Timing details inside a period (which tick each clock
  edge falls on), the synchronisers, the three-sample command filter, the
  one-shot byte loads and the counter saturation are this design's own.
  So are the reset values: IC = 0, seed = 1.
- **Not included.** The PC software, the microcontroller's test routines
  and the board under test are outside this RTL.

## Size

Synthesised generically, the top has 676 flip-flop bits and 115 I/O pins.
It would fit easily in the small Spartan-3 (3,840 registers, 173 I/O)
that the tester was first built on. The flip-flop count is higher than that
build's 491 registers, mostly because of the 32-bit gate counter, the 20 ms
debounce counters and the input synchronisers.
