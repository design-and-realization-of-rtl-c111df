# Memristive hyperchaotic oscillator and chaos-based links in fixed point

This RTL produces hyperchaotic signals in digital hardware and uses them in two
communication schemes. The signals come from a four-state oscillator whose only
nonlinearity is a flux-controlled memristor. The two schemes are:

* **Chaotic masking** (analog). An information signal is added to the chaotic carrier.
  A second copy of the oscillator at the receiver is pulled onto the transmitter's
  trajectory by a PID controller. The receiver then subtracts its own carrier and the
  information is left over.
* **COOK, chaotic on-off keying** (digital). For a 1 bit the chaotic signal is sent,
  and for a 0 bit nothing is sent. The receiver measures the energy of each bit and
  compares it with a threshold.

Everything is synthesizable SystemVerilog: signed fixed point, one Euler step per
clock. The two links sit side by side in `memristive_comm_top`.

## The oscillator

The continuous system has states x (voltage of C1), y (voltage of C2), z (inductor
current) and u (voltage on the memristor emulator's capacitor, i.e. its flux):

    x' = a z - a x (m0 + m1 u^2)        memristor: i = (m0 + m1 u^2) x
    y' = b d y - b z
    z' = c y - c x
    u' = n x

with a = 7, b = 1, c = 2.5, d = 1, m0 = -1.2, m1 = 1 and n = -6. Started from
(0.1, 0, 0, 0), the system is hyperchaotic, with two positive Lyapunov exponents. Every
state stays roughly within +/-5.

The hardware discretizes it with forward Euler, step T = 1e-3. The coefficients are
folded so that each update is a few constant multiplications and additions:

| update | expression | coefficients |
|---|---|---|
| x[n+1] | (1 - T a m0) x - ((T a m1 x) u) u + (T a) z (+ ctrl) | 1.0084, 0.007, 0.007 |
| y[n+1] | (1 + T b d) y - (T b) z | 1.001, 0.001 |
| z[n+1] | z + (T c) y - (T c) x | 0.0025 |
| u[n+1] | u + (T n) x | -0.006 |

`hc_euler_step` computes the step combinationally. `hc_master` and `hc_slave` wrap it
with four 32-bit state registers. All parameters are `real` values that default to the
numbers above, and the fixed-point constants are derived from them at elaboration. The
bifurcation parameter `A`, for example, can be changed without touching the code.
The discrete system follows the continuous one's bifurcation behaviour at the points
checked: it is periodic at a = 3.8 and 4.0 and chaotic at a = 6, 7 and 8.4. The
continuous system is periodic below about 4.1 and chaotic from about 4.3 up to 8.4.

### Number format

`hc_pkg` defines `fix_t`, a signed 32-bit word with 24 fraction bits (Q8.24). Its
range is +/-128 and its resolution is 2^-24. The original design's constants are
exactly the Q.24 roundings of the values above (1.0084 is stored as
1.008400022983551). The testbenches check the RTL bit for bit against those printed
constants. The word width of 32 bits is this design's choice.

`fmul` multiplies two `fix_t` at full 64-bit precision and truncates back to Q8.24
by an arithmetic shift, which rounds toward minus infinity. Sums wrap on overflow.
The system never comes near the range limits: the testbenches see |x| up to 4.7 at
the default a = 7 and up to 5.3 at a = 8.4.

## Synchronizing the receiver (`pid_sync`)

The slave is the same oscillator, started from (0, 0, 0, 0), with one extra term
`ctrl` added to its x update. The controller computes, for each sample:

    e1 = xm - xs,   e2 = ym - ys
    I[n] = I[n-1] + T e1[n]
    ctrl = (Kp T) e1 + (Ki T) I[n] + (Kd T) e2

The gains are Kp = 7.79, Ki = 416.21 and Kd = 529.33. Because ctrl is added straight
to the state, every gain is pre-multiplied by T. The constants are then 0.00779,
0.41621 and 0.52933, the values the original controller diagram uses.

This is the part of the design that needs the most care:

* **The derivative branch acts on the y error, not on the change of the x error.**
  The textbook discrete PID would use Kd (e1[n] - e1[n-1]) / T. Inside the Euler
  update that term becomes 529 * (e1[n] - e1[n-1]) per sample, and the loop
  diverges. A P+I controller on e1 alone also diverges: the slave's y and z drift
  apart, because the y equation is unstable on its own. The original block diagram
  applies the Kd*T constant to the master's and slave's y. That form locks, and it is
  the one built here.
* **Kd.** The gain is usually quoted as 529.3, but the diagram's constant 0.52933
  corresponds to 529.33, which is used.
* **How far it locks.** u is not controlled directly, so a small residual remains.
  After 20000 samples the x error stays below 0.02, and the recovered masking signal
  is within about 0.013 of the transmitted one. These are the figures seen in
  simulation.
* **Timing.** `ctrl` is combinational from the current master and slave states and
  the integral register. It takes effect on the same clock edge that advances the
  slave. Reset clears the integral.

The slave's x self-coefficient is the parameter `KXX` of `hc_slave`. It defaults to
1.0084, so the slave equals the master. The original slave diagram prints 1.0061 at
that point, and that value can be set through `KXX`.

## Chaotic masking link (`chaos_masking_sys`)

Master, PID and slave are wired as described above. The carrier is the u state:

    s[n]     = u_m[n] + i[n]        (mask_tx)
    i_rec[n] = s[n]   - u_s[n]      (mask_rx)

Both are combinational, so a sample applied in one cycle is recovered in the same
cycle. The information must be small next to the carrier: the testbenches use a
sine of amplitude 0.05 against a carrier of about +/-4. There is no channel between
the two ends. As in the original design, only the controller links master and slave.

## COOK link (`cook_sys`)

* **Bit timing.** A bit lasts `SAMPLES_PER_BIT` = 10 samples, which is the bit time
  Tb = 0.01 divided by the step T. `bit_req` is high on the first enabled clock after
  reset and on the last sample of every bit. `tx_bit` is taken at that edge.
* **Modulator** (`cook_mod`). `s_out` is the generator's u state for a 1 bit and 0
  for a 0 bit.
* **Channel.** The channel is outside the design. `r_in` must be the channel's
  output for the `s_out` of the same cycle, i.e. a zero-latency channel model.
* **Demodulator** (`cook_demod`). Each sample is squared, scaled by 0.0009768
  (about 2^-10) and accumulated. On a bit's last sample the energy, including that
  sample, is compared with `threshold` and the accumulator restarts. On the next
  clock, `rx_bit` holds `energy > threshold` and `rx_valid` pulses for one cycle. So
  a decision arrives exactly `SAMPLES_PER_BIT` enabled clocks after its bit started
  on `s_out`. A concurrent assertion checks that a decision only ever follows a bit
  end.

The threshold is an input port because the right value depends on the noise level.
Without noise, a 0 bit has energy exactly 0, so a threshold of one LSB works. With
noise, a good choice lies halfway between the expected energies of a 0 bit and a
1 bit: `0.0009768 * SAMPLES_PER_BIT * (sigma^2 + P/2)`. Here P is the carrier power
(mean u^2, about 4.3 to 5.5) and sigma^2 is the per-sample noise variance.

The chaotic carrier varies slowly compared with a 10-sample bit, and some bits fall
where u is near zero. Those bits carry little energy. This sets an error floor of
about 3% at high Eb/N0 with a fixed threshold:

| Eb/N0 (dB) | 0 | 5 | 10 | 15 | 20 |
|---|---|---|---|---|---|
| BER, 4000 bits | 0.32 | 0.14 | 0.05 | 0.03 | 0.03 |

In this table Eb is the mean energy per bit (P * 10 / 2) and the noise variance per
sample is N0/2. Other definitions of Eb/N0 shift the curve.

## Top level (`memristive_comm_top`)

The top has one clock, a synchronous active-high reset `rst`, and a sample enable
`en`: each enabled clock advances every oscillator by one step. All other ports
belong to one of the two links:

* `mask_*`: the masking link's information in, transmitted and recovered signals,
  both oscillator states, the controller output and the x error.
* `cook_*`: the COOK link's bit in and `bit_req`, `cook_s` to the channel, `cook_r`
  from the channel, the threshold, and the decided bit with its valid pulse and
  energy.

State outputs are `hc_state_t` structs {x, y, z, u}, 4 x 32 bits.

## What is not in the RTL

* **The analog parts.** The op-amp memristor emulator and the analog version of the
  oscillator have no digital form other than the equations above.
* **The host-side parts.** The random bit source, the AWGN channel and the
  hardware co-simulation link to the host are not built. The testbenches provide a
  bit source and a Gaussian noise model instead.
* **The PID gain search.** The Firefly optimization that chose the gains is offline
  work. Its result is the three gain parameters.
* **Fitting a small FPGA.** The masking link needs 24 full 32x32 products. On a small
  device with 18x18 hard multipliers this needs far more multipliers than such a
  device has. A narrower word or LUT multipliers would be needed. No
  resource-reduction work has been done.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare against
`tb_ref_pkg`, an integer model written from the printed Q.24 constants rather than
from the RTL's parameters. Each prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_hc_master` | 20000 samples bit-exact, random enable stalls, reset state, first 300 samples against floating-point Euler, amplitude |
| `tb_hc_slave` | 10000 samples bit-exact with a random control term |
| `tb_pid_sync` | control output and integral for random inputs, reset of the integral |
| `tb_mask_tx`, `tb_mask_rx`, `tb_cook_mod` | the combinational functions on random data |
| `tb_cook_demod` | energy, decision and the one-cycle decision latency, with enable gaps |
| `tb_chaos_masking_sys` | 60000 samples bit-exact; unsynchronized start, lock below 0.03, recovery within 0.03 |
| `tb_cook_sys` | 2000 bits over a clean channel: bit_req timing, on/off, latency, energy, at least 99% correct |
| `tb_hc_bifurcation` | a = 3.8 and 4.0 periodic (large maxima of x repeat within 0.01), a = 6, 7, 8.4 chaotic (maxima spread 1.9 to 3.5) |
| `tb_cook_ber` | BER sweep 0 to 20 dB, 4000 bits per point, decisions checked against the model |
| `tb_memristive_comm_top` | both links at default parameters, end to end, with random stalls, a clean phase and a noisy COOK phase; counts each mechanism (stall, unsynchronized start, lock, recovery, bit request, chaos on and off, both decisions, noisy decisions) and fails if one never occurs |

Every testbench runs in well under a second.

## Simulating

With Verilator 5 (run from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/hc_pkg.sv tb/tb_ref_pkg.sv tb/tb_memristive_comm_top.sv \
        --top-module tb_memristive_comm_top -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. To lint the RTL alone:

    verilator --lint-only -Wall -Irtl -y rtl rtl/hc_pkg.sv rtl/memristive_comm_top.sv

## Files

* `rtl/hc_pkg.sv`: number format, state struct, `fmul`, `to_fix`
* `rtl/hc_euler_step.sv`: one Euler step of the oscillator (combinational)
* `rtl/hc_master.sv`, `rtl/hc_slave.sv`: the oscillators with state registers
* `rtl/pid_sync.sv`: synchronizing controller
* `rtl/mask_tx.sv`, `rtl/mask_rx.sv`, `rtl/chaos_masking_sys.sv`: masking link
* `rtl/cook_mod.sv`, `rtl/cook_demod.sv`, `rtl/cook_sys.sv`: COOK link
* `rtl/memristive_comm_top.sv`: top level
* `tb/tb_ref_pkg.sv`: integer reference model and Gaussian noise source
* `tb/tb_*.sv`: testbenches
