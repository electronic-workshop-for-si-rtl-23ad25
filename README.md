# Digital controllers for a storage-ring light source: LLRF board and magnet power supply

This is synthesizable SystemVerilog for two independent feedback controllers
described for the PLS-II light source (3 GeV, 400 mA) at Pohang Accelerator
Laboratory:

* **The low-level RF (LLRF) board.** It holds the amplitude and phase of the
  500 MHz field in a superconducting cavity. A second loop steps the cavity's
  tuner motor so that the cavity stays on resonance.
* **The magnet power supply (MPS) controller.** It regulates the current of a
  ±5 A magnet supply, bipolar or unipolar. The power stage is a four-FET
  H-bridge that switches at 25 kHz. A current loop sets the reference of an
  inner voltage loop.

The two controllers share nothing. `pls_top` places them side by side, and
each has its own clock, reset and ports.

The RTL follows a 2011 workshop presentation. That presentation gives the
signal chain, the rates and a few gains, but almost none of the arithmetic.
Number formats, rounding, handshakes and several small blocks are therefore
this design's own choices. They are marked as such below and in the opening
comment of every file.

## LLRF: how the field loop works

```
       IF 50 MHz @ 40 MS/s                             Set I&Q (A cos t, A sin t)
 ref ADC ──► iq_demux ──► cic_decim ──► rotation_matrix ──┐
                                                          ├─► iq_error ─► pi_ctrl (I) ─► dac_i ─┐
 cav ADC ──► iq_demux ──► cic_decim ──► rotation_matrix ──┘   (ref-cav)  pi_ctrl (Q) ─► dac_q ─┤
               40 MS/s     I,Q 20 MHz     2 MHz                                                 │
                                                                      vector_out (50 MHz IF) ◄──┘──► dac_if
```

**IQ sampling, the central trick.** The RF is mixed down to an intermediate
frequency (IF) whose phase advances by exactly 90° (modulo a full turn)
from one ADC sample to the next. The simplest case is an IF at a quarter of
the sample rate. Each IF period then gets four samples, 90° apart, and
they read directly as `Q, I, −Q, −I`. No digital mixer is needed.
`iq_demux` takes each new sample `x(k)` and subtracts the sample taken two
earlier:

| k mod 4 | sample | refreshes | value |
|---|---|---|---|
| 0 | Q  | Q | (x(k) − x(k−2)) / 2 |
| 1 | I  | I | (x(k) − x(k−2)) / 2 |
| 2 | −Q | Q | (x(k−2) − x(k)) / 2 |
| 3 | −I | I | (x(k−2) − x(k)) / 2 |

The difference cancels any constant ADC offset. It also keeps full scale,
because the two samples have opposite signs. Every sample refreshes one of
the two components, so I and Q are each new at fs/2 (20 MHz for a 40 MS/s
ADC). `out_valid` marks each completed pair. The sample counter starts at
k = 0 after reset. If the ADC is not phase-locked to that count, the vector
comes out rotated by a multiple of 90°. The rotation matrix absorbs that
offset.

The same demux also handles undersampling. With fs = 4·f_IF/(2n+1),
successive samples are 90°·(2n+1) apart. The 50 MHz IF, from a 500 MHz RF
and a 450 MHz LO, is sampled at 40 MS/s, which is n = 2: 450° per sample.
Since 450° = 360° + 90°, the sample sequence is the same as for n = 0, and
`tb_iq_demux` checks this. Odd n (270°, …) would reverse the sign of I.

**Decimation.** `cic_decim` is a 3-stage CIC filter with decimation factor
R = 10, which turns 20 MHz pairs into the 2 MHz loop rate. Its DC gain of
(R·M)^N = 1000 is divided by 2^10, so the filter has a gain of 0.977. The
reference and cavity channels pass through identical filters, so this gain
cancels in the error.

**Set point by rotation.** The loop has no separate set-point register. Each
channel is multiplied by `A·[[cos t, −sin t], [sin t, cos t]]`, given as the
two products `A cos t` and `A sin t` in Q1.14. The error junction then forms
rotated reference minus rotated cavity. When the loop settles,
`R_cav · cav = R_ref · ref`. To move the cavity phase by −30°, load
(cos 30°, sin 30°) into the cavity matrix. The closed-loop testbench does
exactly this.

**Control law.** Each of I and Q has its own `pi_ctrl`, which implements
`u = Kp·(e + Ki·Ts·Σe)`. The default gains are those of the source: Kp = 15
(3840 in Q8.8) and Ki = 2π·4.4 kHz. At the 2 MHz update rate, Ki·Ts = 0.0138
(906 in Q0.16). The output saturates. While it is saturated, the integrator
stops accumulating errors that would push it further into saturation. The
PI outputs are the I and Q words for two DACs feeding an analog IQ modulator.

**Vector output.** `vector_out` is the single-DAC alternative. It forms
`I·sin ωt + Q·cos ωt` on a 50 MHz IF, using a 4-bit DDS that steps by 5 per
clock: at 160 MHz that is 5·160/16 = 50 MHz, 112.5° per sample. An external
mixer then moves this IF up to the RF.

## LLRF: tuner loop and local oscillator

```
 cav  (shared demux+CIC) ─► cordic_vec ─► phase ─┐
 fw ADC ─► iq_demux ─► cic_decim ─► cordic_vec ─► phase ─► tuner_phase_error ─► pi_ctrl ─► pulse_gen ─► step/dir
                                                   (+ phi_offset)
```

`cordic_vec` is an iterative vectoring CORDIC. Each clock it performs one
micro-rotation, and 16 iterations produce amplitude and phase. The phase
word is 20 bits per turn, 0.00034° per LSB. One result takes 18 clocks:
load, 16 iterations, output. That fits between two CIC outputs, which are
20 ADC clocks apart.

`tuner_phase_error` computes `phi_cav − (phi_fw + phi_offset)`. The
subtraction is modular, so the result wraps to ±½ turn without extra logic.
When the cavity is detuned, its voltage leads or lags the forward wave, and
the error is non-zero. `phi_offset` sets the operating point.

A PI controller converts the phase error into a step rate. `pulse_gen`
converts that rate into step pulses: each clock it adds |rate| to a 24-bit
accumulator and emits a pulse on each carry. The direction output is the
sign of the rate. A dead band stops the motor when the error is small.

`dds` is the local-oscillator synthesizer. It has a phase-increment register,
a 10-bit phase accumulator, a truncating quantizer and a 1024-entry
sine/cosine table. The table is filled at elaboration from
`round(32767·sin(2πk/1024))`. With increment 12 at 120 MHz it produces
1.40625 MHz.

## Magnet power supply controller

Once per PWM period (25 kHz, `PERIOD` = 4000 clocks at 100 MHz),
`ad977a_ctrl` reads four serial 16-bit ADCs together. The sequence is: R/C
pulse, wait for BUSY to fall and rise again, then shift 16 bits MSB first on
a generated data clock. Channel 0 carries the shunt current and channel 1
the filtered bridge output voltage.

The control is a cascade of two loops:

```
 i_set ─►(−)─► pi_ctrl (current, kp/ki) ─► v_ref ─►(−)─► pi_ctrl (voltage, kp_v/ki_v) ─► duty ─► mps_pwm ─► gate[3:0]
          ▲ ADC ch 0 (current)                     ▲ ADC ch 1 (output voltage)
```

The outer PI turns the current error into a voltage reference. The inner
loop then makes the bridge output voltage follow that reference. This loop
absorbs changes in the DC link voltage and the delay of the output filter,
so the current loop sees a plant that is close to an ideal voltage source on
an R–L load. The form of the inner controller is not fixed by the source.
It is a second `pi_ctrl`, and setting `ki_v` to 0 makes it proportional.
The inner loop runs one clock after the outer one, on the same ADC read.
`v_ref` uses the code scale of channel 1.

In bipolar mode, leg A is on for `(1+d)/2` of the period and leg B for
`(1−d)/2`, both compared against a single sawtooth counter. The mean output
is d times the link voltage, of either sign. In unipolar mode (`unipolar` =
1), leg B holds its low FET on and only leg A switches, on for `d` of the
period. The output is then 0 to +V, and the current flows one way only. A
negative command gives 0 V, and the voltage integrator is then bounded only
by the PI's output range. Each leg has complementary high and low FETs with
50 clocks of dead time. The duty command and the mode take effect at the
next period start.

`mps_interlock` latches fault inputs. While any fault is latched, all four
gates are off and both PI integrators are held empty. `fault_clear` clears only
the faults that are no longer present.

In the source, the control law and the PWM run as a program on a
TMS320F2808 DSP, and an FPGA only sequences the ADCs. Here the whole loop is
logic. The source gives no gains for these loops, so all four are inputs.
The testbenches use Kp = 12 and Ki·Ts = 0.02 for the current loop, and
Kp = 1 and Ki·Ts = 0.25 for the voltage loop. The plant is 1.5 Ω / 15 mH on
24 V, and channel 1 is scaled 40 V full scale.

## Rates, widths and latency

| item | value | origin |
|---|---|---|
| ADC | 16 bit, 40 MS/s, IF 50 MHz (450° per sample) | source |
| I/Q rate after demux | 20 MHz | source |
| CIC | N = 3, R = 10, M = 1 → 2 MHz | R from source, N and M chosen |
| rotation coefficients | Q1.14, 16 bit | chosen |
| PI gains | kp Q8.8, ki (= Ki·Ts) Q0.16 | formats chosen, LLRF values from source |
| CORDIC | 16 iterations, 20-bit phase, 18 clocks per result | iteration count from source |
| DDS | 10-bit phase, 1024-entry table, 16-bit output | source (N = 10) |
| vector output | 4-bit LO phase, step 5, 14-bit DAC word | source |
| PWM | 25 kHz, 4 FETs, bipolar/unipolar, 50-clock dead time | frequency, FET count and modes from source |

The register latency from an ADC word to a DAC word is 5 clocks: demux, CIC
output, rotation, error junction and PI. At 40 MHz that is 125 ns, within
the 200 ns the source allots to the FPGA in its 650 ns loop-delay budget.
The CIC adds a group delay of 13.5 input samples at 20 MHz, about 675 ns.
The filter length is therefore what would have to shrink to meet that
budget.

## Departures from the source, and what is interpretation

* **Sign of I in IQ sampling.** The source's sample table (k = 1 → I,
  k = 3 → −I) and its formula `I(n) = [x(4n−1) − x(4n−3)]/2` disagree on the
  sign of I. This design follows the table.
* **I/Q rather than amplitude/phase regulation.** The source's feature list
  says the PI does amplitude and phase regulation, but its block diagram
  places one PI on each of I and Q, feeding the I and Q DACs. This design
  follows the block diagram. Amplitude and phase are still regulated, in
  Cartesian form.
* **Error junction.** The two junctions in front of the PI are drawn without
  a sign. They are read as reference minus cavity, per component.
* **One clock.** The source runs its blocks from 40, 80, 120 and 160 MHz
  clocks. `llrf_top` runs everything from one clock, and ADC samples are
  qualified by `adc_valid`. The vector output and the DDS advance every
  clock, so their output frequencies scale with that clock.
* **Shared cavity channel.** The field loop and the tuner loop use the same
  demux and CIC for the cavity signal.
* **Own inventions.** The CORDIC's quadrant handling and gain correction, the
  tuner phase detector's exact formula, `pulse_gen`, `mps_interlock`, the
  form of the inner voltage controller and the unipolar switching pattern
  are this design's. The source only names them or shows them as boxes.
* **ADC interface.** The AD977A sequencing is a simplified serial protocol
  in the spirit of that part. It is not checked against its datasheet
  timing.
* **Not in the logic.** The analog front end, the ADC and DAC chips, the IQ
  modulator, the klystron, the tuner motor driver, the H-bridge, the filters,
  the DSP and the Ethernet/EPICS board are outside the logic.

## Verification

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
compares against a model written independently of the RTL: a FIR equivalent
of the CIC, `$atan2`/`$sqrt` for the CORDIC, integer models of the PI, and so
on. Each testbench ends with `TB_RESULT checks=N failures=M`.

Two modules also carry assertions, which are active when simulating with
`--assert`:

* `mps_pwm` checks that the two FETs of a leg are never on together.
* `ad977a_ctrl` checks that R/C and the data clock are driven only while
  the converters are selected.

Three testbenches close the loops around behavioural plants in `tb/`:

* `tb_llrf_top` uses `cavity_model`: a first-order cavity with a 4.34 kHz
  half bandwidth and detuning moved by 10 Hz per tuner step. Its ADC
  channels sample a 50 MHz IF at 40 MS/s, with offset and noise.
* `tb_mps_top` uses `magnet_model`: an ideal H-bridge on 24 V, a
  1.5 Ω / 15 mH magnet, freewheeling diodes and `ad977a_model`. The model's
  output filter is ideal: the voltage channel reads the bridge voltage
  averaged over one PWM period.
* `tb_pls_top` runs both loops at full default parameters. It counts every
  mechanism and fails if any one never occurs: decimation, PI saturation,
  tuner steps in both directions, rotation, IF output, DDS, ADC reads, PWM
  periods, inner voltage-loop updates, saturation of each MPS loop,
  interlock trip and unipolar operation.
* `tb_llrf_top` also checks, on every loop sample, that a DAC word follows
  its CIC output by exactly 3 clocks.

In these runs the cavity settles within 0.01 % and 0.02° of its set point,
the tuner removes ±1500 Hz of detuning, and the magnet current settles
within 1 mA of 5 A, −3 A and 2 A in bipolar mode and within 5 mA of 3 A in
unipolar mode. These results depend on the plant models
and the chosen gains. They are not a prediction for the real machine.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/llrf_pkg.sv tb/tb_pls_top.sv --top-module tb_pls_top -o sim
./obj_dir/sim
```

`tb_pls_top` simulates about 100 ms of the magnet plant, with the cavity
alongside, in under 10 s. The unit
testbenches take well under a second. `llrf_pkg` holds the elaboration-time
functions for the sine and arctangent tables and must be read first.

## Files

| file | role |
|---|---|
| `rtl/llrf_pkg.sv` | sine, arctangent and CORDIC-gain functions for tables |
| `rtl/iq_demux.sv`, `cic_decim.sv`, `rotation_matrix.sv`, `iq_error.sv`, `pi_ctrl.sv` | field loop |
| `rtl/cordic_vec.sv`, `tuner_phase_error.sv`, `pulse_gen.sv` | tuner loop |
| `rtl/dds.sv`, `vector_out.sv` | local oscillator, IF vector output |
| `rtl/llrf_top.sv` | LLRF board |
| `rtl/ad977a_ctrl.sv`, `mps_pwm.sv`, `mps_interlock.sv`, `mps_top.sv` | magnet supply controller |
| `rtl/pls_top.sv` | both controllers side by side |
| `tb/cavity_model.sv`, `magnet_model.sv`, `ad977a_model.sv` | behavioural plants, simulation only |
