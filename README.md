# CC: a programmable trigger coincidence chip

The CC chip sits next to a particle detector and turns 80 fast "hit" signals
from the detector front ends into at most 16 trigger bits. The 80 inputs come
from several detector planes stacked along the beam; a real track lights the
same coordinate (strip group or sector) on most planes at once, noise does
not. The chip therefore asks, for every coordinate, whether enough planes fired
together, optionally tolerates tracks that cross the planes at an angle,
vetoes or requires high-multiplicity events, and compresses the result into
fewer output bits. Everything is set through I2C control registers, and the
logic decides within one clock cycle, which is what a tight trigger latency
budget demands (roughly 8 to 10 bunch crossings are left for this step in the
intended Roman Pot application).

This repository holds synthesizable SystemVerilog for the complete logic of the
chip, simple behavioural models of its LVDS receivers and drivers, and a
self-checking testbench for every module and for the whole chip.

## Signal chain

```
80 LVDS in -> receivers -> Synchro (mask, polarity, monostable, stretcher)
           -> input grouping (5 planes x 16 coordinates, or 10 x 8)
           -> V out of NP ------------------------------\
           -> OR 1 (neighbour widening) -> W out of NP --> And/Or (AO)
           -> Z out of 8 or 16 (multiplicity flag) and And/Or 2 (LO)
           -> OR 2 (grouping, O2) -> 16 LVDS out
                                   \-> rate counter (CO, CT) -> I2C registers
clock in -> clock propagation -> clock out; evaluation edge chosen by CL
```

`cc_top` instantiates the chain exactly in this order. After the synchroniser
flip-flops everything is combinational, so a result is visible a few gate
delays after the clock edge that registered the input.

## Planes and coordinates

This is the part that decides how the chip must be cabled, and it is easy to
get wrong.

Inputs are numbered 1 to 80 (bit `n-1` of the input bus). **A run of
consecutive inputs is one detector plane.** The one-bit register field NP
chooses how long the run is:

| NP | planes | coordinates per plane | input n belongs to | outputs |
|----|--------|-----------------------|--------------------|---------|
| 1  | 5      | 16 | plane (n-1)/16, coordinate (n-1)%16 | 16 distinct |
| 0  | 10     | 8  | plane (n-1)/8,  coordinate (n-1)%8  | 8 distinct, outputs 9-16 repeat 1-8 |

So with NP = 1 coordinate 1 is formed from inputs 1, 17, 33, 49 and 65; with
NP = 0 from inputs 1, 9, 17, ..., 73. With fewer planes than the maximum, mask
the inputs of the missing planes (they then read 0). The thresholds V and W
count planes, so they should not exceed the number of planes in use; a larger
value simply never fires.

This mapping, the meaning of the two NP values and the repetition of outputs
1-8 on 9-16 in the 10-plane mode are fixed by the chip's published test
vectors, which the design reproduces (see *Verification*). A prose description
that groups inputs five at a time per coordinate does not match those vectors
and was not used.

## Input conditioning (`cc_synchro`, `cc_sync_channel`)

Every channel is first masked (mask bit 1 forces it to 0) and optionally
inverted (LI, one bit for the whole chip). Then one of three paths is chosen
by `{Sync2, Sync}`:

| Sync2 Sync | path | output |
|---|---|---|
| 0 1 | monostable, then stretcher | a pulse of 1 + S cycles starting at the first evaluation edge that sees the input high, however long the input stays high |
| 0 0 | stretcher only | the input itself, held for S more cycles after it was last sampled high |
| 1 0 | mask and polarity only | the conditioned input, combinational |
| 1 1 | unused code | same as 1 0 |

The monostable is two sampling flip-flops ("high now, low one edge ago"); the
stretcher is a small down-counter reloaded while its input is high and ORed
with that input. In the two modes without the monostable the output's leading
edge follows the input directly, so the input should already be synchronous to
the chip clock. S is the single register bit next to the Sync bits; a wider
stretch needs only a wider `STRETCH_W`.

## Coincidence (`cc_input_group`, `cc_or1`, `cc_x_out_of_np`, `cc_and_or`)

* **V out of NP**: coordinate c fires when at least V planes have a hit on c.
* **OR 1**: each plane's hit on c is replaced by the OR of that plane's hits on
  c-OV .. c+OV (only coordinates that exist; 16 or 8 of them). With OV = 1 a
  lone hit on coordinate 5 lights 4, 5 and 6 of the same plane.
* **W out of NP**: the same majority, on the OR 1 result, with threshold W.
  It accepts tracks that drift by up to OV coordinates across the planes.
* **And/Or** (AO): 00 V and W (reset), 01 V or W, 10 V only, 11 W only.

V and W use one module, `cc_x_out_of_np`, which counts the planes and compares.
A threshold of 0 always fires.

## Multiplicity and output stage (`cc_z_out_of`, `cc_and_or2`, `cc_or2`)

`cc_z_out_of` raises a flag when more than Z coordinates (of 16, or of the
first 8 when NP = 0) are active after And/Or. And/Or 2 applies it to every
coordinate according to LO: 00 `out & !Z` (reset; a busy event is vetoed),
01 `out & Z`, 10 `!(out & !Z)`, 11 `!(out & Z)` (inverted outputs).

OR 2 reduces the number of outputs: O2 = 0 keeps all 16, 1..4 ORs groups of
2, 4, 8 or 16 onto the first output of each group. The other outputs of the
group are driven low and their drivers powered down (`out_p` and `out_n` both
low). O2 = 5..7 behave like 4.

## Rate counter (`cc_counter`)

The output selected by CO (0..15, after OR 2) is sampled on every evaluation
edge; each 0-to-1 transition counts as one pulse. Counting runs without pause
in periods of 2^8, 2^16, 2^24 or 2^32 cycles (CT = 0..3). At the end of each
period the count is copied to the read-only registers 7 (bits 7:0), 8 (15:8)
and 9 (23:16) and restarts from zero. The 24-bit count saturates.

## Registers and I2C access (`cc_regs`, `cc_i2c_slave`)

| reg | bits 7..0 | reset |
|----|-----------|-------|
| 0 | -, -, CT(1:0), -, Sync2, Sync, S | 00 |
| 1 | OV(2:0), NP, V(3:0) | 00 |
| 2 | Z(3:0), W(3:0) | F0 |
| 3 | AO(1:0), LO(1:0), LI, O2(2:0) | 00 |
| 4 | CL, T(2:0), CO(3:0) | 00 |
| 5, 6 | Chip ID (7:0), (15:8) | 00 |
| 7, 8, 9 | counter (7:0), (15:8), (23:16), read only | - |
| 10..13 | Mask(7:0) .. Mask(31:24) | FF |
| 14 | pointer to the indirect registers | 00 |
| 15 | data of the indirect register selected by register 14 | - |
| ind. 0..5 | Mask(39:32) .. Mask(79:72) | FF |
| ind. 6 | -, -, -, -, -, B(2:0) | 00 |
| ind. 7 | unused | 00 |

Mask(k) belongs to input k+1. T and the Chip ID are stored and can be read back
but drive no logic. After reset every input is masked and, with V = W = 0 and
Z = 15, all outputs are low.

The I2C slave samples SCL and SDA with the chip clock, which must be at least
about 8 times faster than SCL. Its 7-bit address is `{ChipAdd<6:4>, r}`, where
the three upper bits come from the address pins and `r` is the register number,
so one transfer reaches one register without a sub-address byte:

* write: START, `{chip_add, r, 0}`, ACK, data, ACK, STOP (further data bytes
  rewrite the same register);
* read: START, `{chip_add, r, 1}`, ACK, data, master NACK, STOP (a master ACK
  returns the register again).

To write an indirect register, write its number to register 14 and the value
to register 15.

## Clock and timing (`cc_clock_path`)

The clock arrives as CMOS or LVDS (hold the unused input low) and is passed
straight on to the clock outputs, so that a chain of chips sees the clock
delayed like the trigger data. The logic evaluates on the rising edge (CL = 0)
or the falling edge (CL = 1); in RTL this is an XOR on the clock, which in a
real implementation should be a dedicated clock cell. The I2C slave and the
registers use the rising edge of the received clock. `rst_n` (pin REhB,
active low, asynchronous) loads the reset values.

Latency, measured by the testbench: in monostable mode the outputs change right
after the first evaluation edge that sees the input; in bypass mode they follow
the inputs combinationally.

## Analog parts

`cc_lvds_rx` and `cc_lvds_tx` are behavioural models of analog cells, written
so that the top level is complete and testable:

* the receiver reads 1 when the plus line is high and the minus line low. Its
  termination is a fixed resistor (126 ohm) in parallel with up to seven equal
  switched resistors, four switched by B2, two by B1 and one by B0. Its nominal
  value, from 126 ohm at B = 0 down to 74 ohm at B = 7, is held in
  `r_term_ohm`. A unit resistor of about 1255 ohm reproduces that table within
  1 ohm.
* the driver puts the bit and its complement on the two lines, or drives both
  low when powered down.

The pad ring, the supply pads and the clock-shape restoration are not modelled.

## Where this design makes its own choices

Where the specification is silent or contradicts itself, this design chose as
follows:

* Plane/coordinate layout and the meaning of NP: taken from the test vectors
  (see above).
* The polarity test vector (LI = 1, V-only, inputs 1,1,0,0,...) lists outputs
  1,1,0,0,...; with LI = 1 meaning "inverted" the design produces 0,0,1,1,... .
  The register description was followed.
* S is treated as the stretch count (pulse = 1 + S cycles).
* OV is 3 bits (0..7), although the prose allows up to 8.
* The counter period comes from CT in register 0; T in register 4 is unused.
  Register 7 holds the least significant counter byte, as the register
  table shows, although one sentence calls it the most significant.
* The 80 mask bits sit in registers 10..13 and indirect registers 0..5, as
  the register table shows; one sentence speaks of indirect registers 0..7.
* The indirect registers are reached through a pointer/data pair (14/15).
* The I2C addressing scheme, the oversampling slave and the rising-edge
  counting of pulses.
* The count saturates; unused O2 and Sync codes map onto neighbouring ones.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with a
reference written independently from the register descriptions. Each prints
`TB_RESULT checks=N failures=M`. A watchdog ends every run.

`tb_cc_top` runs the whole chip at its real size, programmed only through its
I2C pins:

1. It replays the published test vectors that come with complete register
   settings: W out of NP with And/Or and stretcher, W out of NP in the
   10-plane mode, And/Or with falling-edge evaluation, Z out of 16 as veto,
   and masking. For each vector it checks the listed outputs, that nothing
   moves at the non-evaluation edge, and that monostable pulses last 1 + S
   cycles.
2. It checks the stretcher without the monostable.
3. It runs 60 random register settings with 40 random input patterns each
   against a reference model of the whole chain.
4. It reads a known pulse rate from the counter over I2C, with the CMOS clock
   and again with the LVDS clock, and checks the clock outputs.

It counts each mechanism (bypass, monostable, stretch, both NP modes, OR 1
widening, each AO function, Z veto and Z requirement, output inversion,
grouping, power-down, mask, polarity, falling-edge evaluation, counter, I2C
read, LVDS clock) and fails if one never happened. It takes under a minute in
Verilator.

## Example application: a Roman Pot trigger

`tb/tb_cc_roman_pot.sv` uses two chips the way a Roman Pot detector would:
ten silicon planes per pot, five with strips in one direction and five in
the other, each plane giving 16 trigger sectors. One chip takes the five
planes of one direction in the 16-coordinate mode, so two chips turn the pot's
160 sector bits into 32 road bits. Both sit on one I2C bus with different
`chip_add` pins and are programmed with the same settings:

* monostable inputs, NP = 16-coordinate mode;
* V = 3 (a road needs three of five planes);
* OV = 1 and W = 3 (a neighbour sector in a plane counts toward W);
* AO = V and W, LO = "and not Z", Z = 4 (more than four roads at once is treated as a shower and
  vetoed).

The bench feeds 300 random events: straight tracks that hit three to five
planes, tracks with noise hits far from the road, noise alone, and showers
that light many sectors. It checks every output of both chips against the
expected road pattern one clock after the hits are sampled. A trigger
system that leaves only eight to ten bunch crossings between detector and
decision can afford that single cycle.

Six pots need twelve chips (960 sector bits to 192).

## Cascading chips

Because a chip's outputs are ordinary trigger bits, they can feed another
chip, and a large detector is reduced in layers: about 4000 bits need some
50 chips in a first layer, whose 800 outputs fit ten chips in a second.
`tb/tb_cc_cascade.sv` builds a small version, 400 bits reduced to 4 by six chips:

* five first-layer chips each look at 5 planes x 16 sectors of one region
  and report the sectors with a track in at least three planes;
* the second-layer chip takes chip k's outputs as its plane k. With V = 1 it
  ORs the five regions sector by sector, vetoes events with more than two
  active sectors (Z = 2), and ORs the result in groups of four (O2 = 010),
  so only four output pairs stay powered.

The second layer is clocked from the first chip's clock output and evaluates
on the falling edge (CL = 1), so it takes the first layer's result half a
cycle after it appears. The bench checks both layers, checks that the second
layer does not move before its falling edge, and checks that the twelve
powered-down pairs stay low. It runs single tracks, pairs of tracks, vetoed
multi-track events and noise that must not fire.

## Simulating

With Verilator 5, from the repository root, for example the whole chip:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cc_pkg.sv tb/tb_cc_top.sv \
          --top-module tb_cc_top -Mdir obj_top
./obj_top/Vtb_cc_top
```

`-y rtl` lets Verilator find every module by its file name, so only the
package and the testbench need to be named. Any other testbench works the same
way: replace `tb_cc_top` by its name. Each ends with a `TB_RESULT` line; a
non-zero `failures` count means a mismatch, and the lines before it say which.

## Files

| file | content |
|------|---------|
| `rtl/cc_pkg.sv` | sizes, register field enums, decoded configuration struct |
| `rtl/cc_top.sv` | the chip |
| `rtl/cc_sync_channel.sv`, `rtl/cc_synchro.sv` | input conditioning |
| `rtl/cc_input_group.sv` | plane/coordinate mapping |
| `rtl/cc_or1.sv` | neighbour widening |
| `rtl/cc_x_out_of_np.sv` | V and W majority |
| `rtl/cc_and_or.sv`, `rtl/cc_z_out_of.sv`, `rtl/cc_and_or2.sv`, `rtl/cc_or2.sv` | combination, multiplicity, output grouping |
| `rtl/cc_counter.sv` | rate counter |
| `rtl/cc_regs.sv`, `rtl/cc_i2c_slave.sv` | control registers and I2C slave |
| `rtl/cc_clock_path.sv` | clock propagation and edge selection |
| `rtl/cc_lvds_rx.sv`, `rtl/cc_lvds_tx.sv` | behavioural LVDS models |
| `tb/tb_*.sv` | one testbench per module, `tb_cc_top` for the chip |
| `tb/tb_cc_roman_pot.sv`, `tb/tb_cc_cascade.sv` | application examples: one Roman Pot, and two layers of chips |
