# Series active power filter controller: template-subtraction logic for a CPLD

A series active power filter puts a controlled voltage source between the mains
and a load, in series with each phase, so that the load sees a clean sine wave
even when the line voltage is distorted, unbalanced or flickering. This RTL is the
digital core of such a filter's control circuit. For each of the three phases it
computes the reference compensation voltage

    vF = vL - vsin

Here `vL` is the measured line voltage and `vsin` is an ideal sine at the line's own
frequency and phase. The filter's power stage, which is outside this design, then
turns `vF` into the series voltage.

The control is open loop and involves no arithmetic beyond one subtraction. The
ideal sine comes from a table in an external memory. A zero-crossing detector keeps
the table in step with the line. The line frequency is measured by counting control
cycles between zero crossings, and that count also selects which table to read. As
a result the whole controller is a handful of counters, registers and multiplexers
run by a fixed micro-schedule. It fits in a small CPLD: the reference part is an
EPM7160 at 11.0592 MHz.

## External parts

The logic sits between four kinds of external parts:

| Part | Role | Interface to the logic |
|---|---|---|
| 4-channel analog multiplexer | selects phase 1, 2 or 3 (line voltage divided 1:100, ±5 V) | `s_o` (S1,S0) |
| 12-bit A/D converter | samples the selected phase in about 3 µs | `cs_o`, `rc_o` (1 = read, 0 = convert), data on the shared D bus `d_i` |
| 256K × 16 EPROM | holds the sine templates | address on `a_o[17:0]`, output enable `g_o`, data on `d_i[11:0]` |
| three 12-bit D/A converters | one `vF` output per phase | data and latch controls on `a_o`, one write strobe each on `wr_o[2:0]` |

Two buses are shared:

- **D bus (`d_i`, 12 bits).** The A/D converter drives it while it is read (`cs_o & rc_o`, with `dir_o` high). The memory drives it while `g_o` is high. The schedule never enables both at once, and an assertion in the top checks this.
- **A bus (`a_o`, 18 bits).** It carries the memory address during a template read and the D/A data during a D/A write:

| A bus bits | template read (S4 = 1, S3,S2 = phase) | D/A write (S4 = 0, S3,S2 = 0) |
|---|---|---|
| A[9:0] | sample number of the phase (L1/L2/L3) | Z[9:0] |
| A[11:10] | frequency word bits 1:0 | Z[11:10] |
| A[12] | frequency word bit 2 | LDAC |
| A[13] | frequency word bit 3 | LLSB |
| A[14] | frequency word bit 4 | LMSB |
| A[17:15] | frequency word bits 7:5 | 0 |

All strobes are active high at the ports. Inverting them to match the pins of the
real parts is left to the board or the pad ring.

## The control cycle

Everything is driven by the instruction counter **L0**. It counts the system clock
modulo 242, and a combinational decoder **D1** turns each of its states into one
control word (`apf_pkg::ctrl_t`). One pass through the 242 states is a *control
cycle* of 21.88 µs, which is under the 22 µs budget. In each cycle every phase gets
one sample: about 914 samples per 50 Hz period. L0's last state also produces
**CLK2**, a one-clock enable that advances the three sample counters. So the
"sample number" is simply a count of control cycles.

Within a cycle the three phases are handled one after another, and overlap: while
one phase's D/A converter settles, the next phase is already converting. The clock
numbers below follow a timing budget of 0.27 / 3.27 / 4.34 / 7.64 / 10.12 / 13.42 /
15.91 / 19.21 µs, converted to 90.4 ns clocks:

| phase | mux addressed | convert (CS, RC = 0) | read A/D, load Z1, sign to DZ1 | read template, load Z2 | write D/A (WR, LDAC, LLSB, LMSB) |
|---|---|---|---|---|---|
| 1 | 0 | 3–4 | 36–38 (EN1 at 38) | 39–42 (EN2 at 42) | 48–49 |
| 2 | 45 | 48–49 | 84–86 (EN1 at 86) | 87–90 (EN2 at 90) | 112–113 |
| 3 | 109 | 112–113 | 148–150 (EN1 at 150) | 151–154 (EN2 at 154) | 176–177 |

The last D/A write ends at 16.0 µs. After about 3.3 µs of settling, the cycle's work
is done at about 19.3 µs. Clocks 213–241 are idle. All of these numbers are
constants in `apf_pkg` (`CONV_AT`, `PROC_AT`, `WRITE_AT`, `MUX_LEAD` and the short
lengths). To retime the design for other converters, change those constants.

The template read deliberately comes *after* the zero-crossing check of the same
sample. When a crossing is found, the phase's counter is cleared on the clock edge
before the memory is addressed, so that very sample is compared with template entry
0.

## Keeping the template in step with the line

**Zero-crossing detector DZ1.** While phase *p*'s A/D word is on the D bus, the
decoder pulses that phase's strobe (FA, FB or FC). The detector compares the sign
bit D11 with the sign that phase had one cycle earlier. A change from negative to
non-negative is a rising zero crossing. For that one clock, DZ1 raises the phase's
clear line CLRA, CLRB or CLRC.

**Sample counters L1, L2, L3 (10 bits).** Each counter advances on CLK2 and is
cleared by its CLR line, so its value is the number of control cycles since the
phase last crossed zero upward. That value is the sample number, the lower 10 bits
of the template address. If no crossing arrives, for example on a dead line, the
counter wraps modulo 1024.

**Frequency word Z3 (8 bits).** CLRA also acts as EN3. On the same edge that clears
L1, register Z3 keeps L1's lower 8 bits. That is the length of the last phase-1
period in control cycles, modulo 256. Over 45–55 Hz the period is 1016 to 831
cycles. Every period between 768 and 1023 cycles (44.7–59.5 Hz) has a distinct
value modulo 256, so the 8-bit word identifies the frequency. Z3 forms the upper 8
address bits. The memory therefore holds one sine table per possible period, and
the template keeps the right length when the mains frequency drifts. All three
phases use the frequency measured on phase 1.

**Template content.** The table contents are part of the memory image, not of this
RTL. The testbench's memory model uses the following content, which is consistent
with the scheme above. For address `{f, n}`:

    word = round(AMP * sin(2π · n / (768 + f)))      two's complement, 12 bits

Here `AMP` is the code of the nominal line amplitude: 637 codes for 110 V rms
through the 1:100 divider into a ±5 V, 12-bit converter.

## Data path

- **Z1, Z2 (12 bits).** These registers take the D bus on EN1 and EN2, giving the line sample `Y` and the template sample `X`.
- **SUM.** This is combinational: `Z = Y - X` in 12-bit two's complement. It does not saturate, so a difference outside ±2047 wraps. With the template at the nominal line amplitude, the difference is the distortion, which stays far inside the range.
- **MUX1 and MUX2.** These put `Z` on the A bus for the D/A write (S3,S2 = 0, S4 = 0). During the template read they put the phase's sample number and Z3 on it instead.
- **`z_o`.** This port brings `Z` out as a digital output. `freq_o` brings Z3 out.

Accuracy is set by the word length and the sample rate. 12 bits over ±5 V at 1:100
is 0.24 V per code on the line side. One sample of phase uncertainty at 914 samples
per period is about 0.4°. In simulation, the word written to the D/A converter
stayed within 5.4 codes of the ideal `vL − vsin` in every scenario.

## Where this design makes its own choices

The following follow the source design:

- the block structure and bus widths
- the MOD-242 counter and the 10-bit counters
- the 8-bit frequency word taken at the phase-1 reset
- the subtraction
- the use of the sign bit D11 for zero detection
- the phase timing

The following are choices made here:

- **Number format.** Two's complement is used everywhere. A D/A converter set up for offset binary would need its MSB inverted.
- **Crossing direction.** Only rising crossings are detected, and there is no hysteresis. A noisy line that hovers around zero can restart a counter more than once per period.
- **Single clock.** CLK2 is a clock enable rather than a second clock. The "latches" Z1–Z3 are edge-triggered registers with enables.
- **Reset.** The reset is synchronous and active low. It clears every register, and the frequency word starts at 0 until the first phase-1 crossing.
- **Strobes inside the processing window.** Their placement and length (3-clock A/D read, 4-clock memory read) are chosen to fit the shortest window, which is 12 clocks for phase 1. The memory then has at least 3 clocks (270 ns) of access time.
- **Encodings.** S3,S2 are 0 = Z, 1..3 = phase 1..3. S4 = 1 selects the frequency word. LDAC, LLSB and LMSB sit in A[12], A[13] and A[14], and A[17:15] are 0 during a D/A write. All three are raised together with the write strobe, so each D/A converter loads all 12 bits and updates its output in one step.
- **Sample rate.** The 11.0592 MHz clock and modulus 242 give 914 samples per 50 Hz period rather than exactly 920.
- **Word width.** The word width is 12 bits, which is the main configuration. A reduced 9-bit build would change `DATA_W`. It would also change the split of Z between MUX1 and MUX2, which is not parameterised here.

## Files

| file | contents |
|---|---|
| `rtl/apf_pkg.sv` | widths, schedule constants, `ctrl_t` control word, MUX1 select enum |
| `rtl/apf_control_top.sv` | top: wires L0, D1, Z1–Z3, SUM, DZ1, L1–L3, MUX1, MUX2 |
| `rtl/cycle_counter.sv` | L0, modulo-242 counter with CLK2 |
| `rtl/control_decoder.sv` | D1, step → control word |
| `rtl/data_latch.sv` | Z1, Z2, Z3 |
| `rtl/template_subtractor.sv` | SUM |
| `rtl/zero_crossing_detector.sv` | DZ1 |
| `rtl/sample_counter.sv` | L1, L2, L3 |
| `rtl/address_mux1.sv`, `rtl/address_mux2.sv` | MUX1, MUX2 |
| `tb/ads7800_model.sv`, `tb/m27c4002_model.sv`, `tb/dac813_model.sv` | simulation models of the multiplexer + A/D, template memory, D/A |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the end-to-end test |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Unit tests.** There is one unit test per module. Each compares the module with a model written independently in the testbench. The decoder test checks all 242 steps against the schedule table above.
- **`tb_apf_control_top`.** This is the end-to-end test at the default configuration. It drives the three phases through these scenarios in turn: balanced 110 V; unbalance 110/125/85 V; unbalance plus 30 % 3rd, 10 % 5th and 5 % 7th harmonics; 15 % flicker at 5 Hz; a 10 % swing at 2.5 Hz; 55 Hz and 45 Hz mains; and a dead line, which makes the counters wrap, followed by recovery. About 1.1 s of mains time is simulated, in about 7 s of run time. For every phase and cycle it checks:
  - that the D/A code matches, bit for bit, a reference computed from the converter samples alone;
  - that, once locked, the D/A code is within 8 codes of the ideal `vF`;
  - the write and conversion timing;
  - the frequency word;
  - that every mechanism (crossings on each phase, Z3 loads, frequency changes, counter wrap) occurred.

To run with plain Verilator, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
        rtl/apf_pkg.sv tb/tb_apf_control_top.sv --top-module tb_apf_control_top
    ./obj_dir/Vtb_apf_control_top

Replace the testbench name to run a unit test, for example `tb_control_decoder`.

## Not covered

The RTL stops at the chip's pins:

- the analog multiplexer, the converters and the template memory exist only as simulation models
- the 1:100 divider and the oscillator are not modelled
- the JTAG port and the operator control panel of the original board are not described in enough detail to build
- the power stage (modulator, inverter, coupling transformers) is not included

The controller is open loop by design. It does not measure how well the load
voltage was actually corrected.
