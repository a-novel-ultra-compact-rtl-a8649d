# DD-PUF: a delay-difference PUF in half an FPGA slice per bit

A Physical Unclonable Function (PUF) turns the random manufacturing
variation of a chip into a fingerprint: a bit string that is the same every
time the same chip is asked, and different on every other chip. The
Delay Difference PUF (DD-PUF) gets one such bit from the smallest circuit
an FPGA slice can hold: two latches and two inverters closed into a loop.
The two halves of the loop are nominally identical; which one is a few
picoseconds slower decides the bit. Two bits fit in one slice, so a 128-bit
fingerprint needs 64 slices.

This repository holds SystemVerilog for a complete 128-bit DD-PUF device:
a behavioural model of the bit cell that reproduces its timing behaviour,
the two-bit macro and the 8 x 8 array built from it, the controller that
excites the array, and an SPI interface through which a host starts a
read-out and collects the response. Everything simulates with plain
Verilator. The controller and SPI interface are synthesizable; the bit
cell is a timing model, because on an FPGA it is a hand-placed macro whose
behaviour comes from routing delays (see "Taking it to an FPGA").

## The bit cell

```
            +-----------------------------------------------+
            |                                               |
            v                                               |
   D1 +--------+ Q1      D2 +--------+ Q2                   |
  --->|   L1   |---[I1]---->|   L2   |---[I2]---+---> OUT ---+
      | G    R |            | G    R |
      +--------+            +--------+
        |    |                |    |
 START -+----|----------------+    |
 RESET ------+---------------------+
```

Path P1 runs from D1 through latch L1 and inverter I1 to D2; path P2 from
D2 through L2 and I2 back to D1. Each path inverts once, so the loop as a
whole does not invert: with both latches transparent it is a bistable
element, like a pair of cross-coupled inverters. START drives both latch
gates, RESET both asynchronous clears.

A read-out has three phases:

1. **Initialization.** RESET = 1 (START = 0) clears both latches: Q1 = Q2 = 0,
   so both latch inputs are 1 and OUT = 1. RESET returns to 0 and the
   circuit rests.
2. **Evaluation.** START = 1 for Delta_HIGH clock cycles. Both latches
   open at once and both copy a 1. Both nodes now see their input flip, and
   the loop oscillates with the two nodes in phase, at a frequency set by the
   path delays (GHz range). Because one path is slightly slower, the two
   in-phase edges drift against each other on every round trip until the
   oscillation collapses and the loop falls into one of its two stable
   states, Q1 and Q2 complementary.
3. **Output.** START = 0 closes the latches and the bit is held.

If t_DD = t_P1 - t_P2 is the delay difference, the settled bit is
OUT = 1 for t_DD > 0 and OUT = 0 for t_DD < 0. The smaller |t_DD|, the
longer the oscillation lasts. A cell that has not settled when START falls
keeps whatever phase the oscillation was in, so its bit is not
reproducible: too short an evaluation phase makes the response unreliable,
and making it longer trades read-out time for reliability.

### How the model reproduces it

`dd_puf_cell` is a behavioural model with two delay parameters, `T_P1_FS`
and `T_P2_FS` (femtoseconds). It keeps Q1 and Q2 as variables:

* RESET clears both.
* While START is high and the nodes are in phase, both toggle every half
  period, `(T_P1_FS + T_P2_FS) / 2`, rounded to whole picoseconds.
* After `ceil(half_period / |t_DD|)` half periods the cell settles:
  Q1 = (t_DD > 0), Q2 = !Q1. This models the oscillation as losing |t_DD|
  of its pulse width per half period. With t_DD = 0 the cell never settles.
* When START falls, the state is frozen, settled or not. OUT = !Q2.

The sign rule is the circuit's. The settling law and the delay figures are
this model's own: they give the right qualitative behaviour (settling time
inversely proportional to |t_DD|), not measured numbers. The model has no
noise and no dependence on supply voltage or temperature, so the same cell
always gives the same bit once settled.

The half period is implemented by handing a token to a delay element
(`step_ack <= #half step_req`), which keeps the model free of loops;
synthesis tools that ignore delays then see a small, finite process.

## Two-bit macro and array

A Xilinx slice has four latches that share one gate, one clear and one
enable, and four LUTs. Two cells (A and B) fill a slice, and they must
share START and RESET. `dd_puf_macro` is that pair. `dd_puf_array` places
ROWS x COLS macros (8 x 8 = 64 macros = 128 bits by default) on one START
and one RESET line, so all bits are produced by one excitation sequence
and read in parallel. Macro m gives response bits 2m (cell A) and 2m + 1
(cell B).

Process variation comes from `dd_puf_pkg::path_delay_fs(seed, cell, path)`:
each path delay is uniform in 400 ps +/- 20 ps, drawn from a 32-bit hash of
the chip seed, the cell index and the path. The array parameter
`DEVICE_SEED` therefore plays the role of "which chip": the same seed is the
same chip, different seeds are different chips. With these figures about
1 cell in 50 needs more than 20 cycles of 20 ns to settle, and about 1 in
600 more than 256 cycles.

## Controller

`dd_puf_fsm` runs the three phases on a `go` pulse. RESET and START come
from flip-flops and are never high together (an assertion checks this).

| phase          | RESET | START | length (cycles)           |
|----------------|-------|-------|---------------------------|
| initialization | 1     | 0     | INIT_CYCLES (4)           |
| rest           | 0     | 0     | REST_CYCLES (4)           |
| evaluation     | 0     | 1     | Delta_HIGH = dhigh + 1    |
| output         | 0     | 0     | OUT_CYCLES (2), then capture |

From `go` to `valid` takes INIT + REST + Delta_HIGH + OUT + 1 cycles,
267 cycles (5.34 us at 50 MHz) for the default Delta_HIGH of 256. The
response is copied into a 128-bit register at the end of the output phase;
`busy` is high during the sequence and `valid` from the capture until the
next `go`. A `go` during a sequence is ignored.

## SPI interface

`spi_slave` is an SPI mode-0 slave (CS low active, MOSI sampled on the
rising SCK edge, MISO changed on the falling edge, MSB first). It
oversamples SCK with the system clock, so SCK should be at most about 1/8
of the clock (the testbenches use 5 MHz against 50 MHz). The first byte of
each transaction is a command:

| code | command     | following bytes                                         |
|------|-------------|---------------------------------------------------------|
| 0x01 | WR_DHIGH    | in: Delta_HIGH - 1 (reset value 255 = 256 cycles)       |
| 0x02 | EVALUATE    | none; starts one read-out                               |
| 0x03 | RD_STATUS   | out: {6'b0, busy, valid}, repeated                      |
| 0x04 | RD_RESPONSE | out: 16 bytes, response bit 127 first; then 0           |
| 0x05 | RD_DHIGH    | out: Delta_HIGH - 1                                     |

MISO is 0 during the command byte and while CS is high (it is not
tristated). A host read-out is: EVALUATE, poll RD_STATUS until `valid`,
RD_RESPONSE.

## The device

`dd_puf_device` (the top) connects SPI slave, controller and array:
SPI -> controller (Delta_HIGH, start), controller -> array (RESET, START),
array -> controller capture register -> SPI (128-bit response). Ports:
`clk`, `rst_n` (asynchronous, active low), `sck`, `mosi`, `cs_n`, `miso`.
Parameters: `ROWS`, `COLS` (8, 8), `DEVICE_SEED` (1), `INIT_CYCLES`,
`REST_CYCLES` (4, 4), `OUT_CYCLES` (2).

## Files

| file                        | contents                                          |
|-----------------------------|---------------------------------------------------|
| rtl/dd_puf_pkg.sv           | widths, SPI commands, FSM states, delay model     |
| rtl/dd_puf_cell.sv          | behavioural bit-cell model                        |
| rtl/dd_puf_macro.sv         | two cells on shared control (one slice)           |
| rtl/dd_puf_array.sv         | ROWS x COLS macros                                |
| rtl/dd_puf_fsm.sv           | excitation controller and response register       |
| rtl/spi_slave.sv            | SPI host interface                                |
| rtl/dd_puf_device.sv        | top                                               |
| tb/tb_spi_master.sv         | SPI master used by the testbenches                |
| tb/tb_*.sv                  | one self-checking testbench per block, plus below |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/dd_puf_pkg.sv tb/tb_dd_puf_device.sv \
  --top-module tb_dd_puf_device -o sim
./obj_dir/sim
```

| testbench              | what it shows                                                                                   |
|------------------------|-------------------------------------------------------------------------------------------------|
| tb_dd_puf_cell         | reset value, sign rule, settling time, phase capture when START is too short, hold, reset priority |
| tb_dd_puf_macro        | both bits of two macros, shared control, repeatability                                          |
| tb_dd_puf_array        | all 128 bits of two chips against the model, long and short evaluation, inter-chip distance     |
| tb_dd_puf_fsm          | exact RESET / rest / START / latency cycle counts for Delta_HIGH 1, 20, 129, 256; capture timing |
| tb_spi_slave           | every command, byte order, eval pulse width, MISO idle level                                    |
| tb_dd_puf_device       | full-size device over SPI: golden key, repeat, Delta_HIGH sweep 1..256, mechanism counts        |
| tb_dd_puf_uniqueness   | 16 chips: every bit against the model, uniqueness, uniformity, bits equal on all chips          |

The expected values in the testbenches come from the process model written
out again inside the testbench, not from the design's package.

What the simulations give with the default model (seed 1, 128 bits):

| Delta_HIGH (cycles) | 1  | 2  | 4 | 8 | 16 | 32 | 64 | 128 | 256 |
|---------------------|----|----|---|---|----|----|----|-----|-----|
| unsettled cells     | 54 | 22 | 12| 7 | 2  | 1  | 1  | 0   | 0   |
| bits differing from the 256-cycle response | 28 | 14 | 4 | 2 | 0 | 1 | 0 | 0 | 0 |

Over 16 model chips the mean pairwise Hamming distance is 49.8 % and the
fraction of ones 49.9 %, with no bit position equal on all chips. These
numbers only show that the model and the read-out chain behave as intended;
they say nothing about real silicon.

## Taking it to an FPGA

The synthesizable parts (`spi_slave`, `dd_puf_fsm`) are ordinary logic.
The array cannot come from synthesis of this model: on a Xilinx device each
cell is two LUT1 inverters and two LDCE latches (gate = START,
clear = RESET), kept from optimisation and placed by hand, two cells per
slice, with the two paths of each cell routed through delay-matched
switch-matrix connections so that only random variation separates them.
The published work reports residual nominal mismatches of a few
picoseconds to a few tens of picoseconds after this balancing. Replacing
`dd_puf_cell` by such a primitive-level macro keeps the ports (`reset`,
`start`, `out`) unchanged. The bit leaves the slice through the spare
output of a LUT, which needs no logic of its own here.

## Own choices and departures

* The settling law, path delays (400 ps +/- 20 ps) and hash of the cell
  model are modelling choices; real cells also vary with supply voltage,
  temperature and noise, which the model leaves out. Reliability below
  100 % at long evaluation phases therefore does not appear in simulation.
* The lengths of the reset, rest and output phases (4, 4, 2 cycles), the
  encoding of Delta_HIGH as value + 1 in an 8-bit register, and the whole
  SPI command set are this design's own.
* The response passes through a capture register in the controller before
  it reaches the SPI interface, so the host reads a value sampled at a
  defined clock edge rather than the latch outputs themselves.
* MISO is driven low when CS is high instead of being tristated.
* Bit numbering in the array (macro m gives bits 2m and 2m + 1) is a choice.
