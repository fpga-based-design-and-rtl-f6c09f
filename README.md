# Spread-spectrum PWM controller for DC-DC converters

A hard-switched DC-DC converter running at a fixed frequency puts its
conducted noise into narrow, tall peaks at the switching frequency and its
harmonics. If every switching cycle is given a slightly different shape, the
same noise energy is smeared over a band and the peaks drop. This RTL is a
digital PWM controller that does this for a synchronous buck converter: for
every switching cycle it draws fresh pseudorandom numbers and uses them to
choose any combination of

* the switching frequency F_k (period T_k),
* the duty ratio d_k (on-time alpha_k = d_k * T_k),
* the pulse position eps_k (delay from the start of the cycle to turn-on),

while the parameters that are not randomized stay at fixed values. It follows
a published FPGA controller (pseudorandom streams from parallel LFSRs, a
counter-and-compare DPWM, the same equations and limits); where that
description stops, the choices made here are listed in
[Departures and own choices](#departures-and-own-choices).

```
                   +------------------------------- ss_controller ---------------------------+
                   |                                                                          |
                   |  prs_gen                         dpwm                                    |
                   |  16 x mlfsr --rs16 (RFS)-->  ss_param_calc --next--> dpwm_core --vgs1--> | Q1 gate
   clk, rst_n ---> |  (one per bit)  --rs10 (RDS)-->  (eqs. below)  buffer  counter   --vgs2--> | Q2 gate
                   |                 --rs12 (RES)-->                         compare  --reset1->|
   scheme_i -----> |------------------------------------>                                     |
                   +--------------------------------------------------------------------------+
```

## The eight schemes

The scheme is a 3-bit code whose bits say which parameter is randomized:
bit 2 frequency, bit 1 duty ratio, bit 0 pulse position (`ss_pkg::scheme_e`).

| code | name        | F_k                   | d_k              | eps_k (of T_k)   |
|------|-------------|-----------------------|------------------|------------------|
| 0    | PWM         | 300 kHz               | 0.3              | 0                |
| 1    | RPPM        | 300 kHz               | 0.3              | 0.15 .. 0.5595   |
| 2    | RPWM        | 300 kHz               | 0.2488 .. 0.3511 | 0                |
| 3    | RDRPPMFCF   | 300 kHz               | 0.2488 .. 0.3511 | 0.15 .. 0.5595   |
| 4    | RCFMFD      | 234.5 .. 365.57 kHz   | 0.3              | 0                |
| 5    | RCFRPPMFD   | 234.5 .. 365.57 kHz   | 0.3              | 0.15 .. 0.5595   |
| 6    | RCFMVD      | 234.5 .. 365.57 kHz   | 0.2488 .. 0.3511 | 0                |
| 7    | RRRM        | 234.5 .. 365.57 kHz   | 0.2488 .. 0.3511 | 0.15 .. 0.5595   |

RRRM, with all three randomized, is the scheme the design is built around;
plain PWM is there as the reference. When the frequency is randomized with a
fixed duty ratio (codes 4, 5) the on-time still changes from cycle to cycle,
because it follows the period.

## Pseudorandom streams (`prs_gen`, `mlfsr`)

Sixteen 16-bit maximum-length LFSRs run side by side, all shifting on every
clock. Each is a Fibonacci register: the rightmost bit is the output, it is
XORed with the taps (polynomial x^16 + x^14 + x^13 + x^11 + 1, taps at bits
0, 2, 3, 5) and the result enters at the leftmost bit; the period is 65535.
All sixteen use the same polynomial but start from different seeds,

    seed(i) = ((i + 1) * 16'h9E37) XOR 16'h5A5A,   i = 0..15

so at any clock their output bits are sixteen different points of the same
sequence. Those bits, LFSR i on bit i, are the 16-bit stream. The 12-bit and
10-bit streams reuse some of the same bits in a different order:

    rs12[i] = rs16[(5i + 3) mod 16]      rs10[i] = rs16[(7i + 1) mod 16]

The streams change every clock; only the values present at the start of a
switching cycle are used, the rest are discarded.

## From random integers to clock counts (`ss_param_calc`)

At the start of a cycle the three streams are read as integers RFS (16-bit
stream, 0..65535), RDS (10-bit stream, 0..1023) and RES (12-bit stream,
0..4095), and turned into three clock counts:

    f_sw = F_L + K * RFS                  F_L = 234 500 Hz, K = 2  (or 300 000 Hz)
    TN   = f_clk / f_sw                   clocks per switching period
    WN   = TN * (D_L + RDS) / 10000       D_L = 2488               (or 3000)
    EN   = TN * (E_L + RES) / 10000       E_L = 1500               (or 0)

The bracketed values replace the random term when the scheme keeps that
parameter fixed. All divisions truncate. With the default 40 MHz clock, TN is
133 at a fixed 300 kHz and 109..170 when randomized; WN is 27..59 and EN
0..95 clocks. The duty ratio and delay are therefore realised to within one
clock, i.e. about 0.6 to 0.9 % of the period.

Example: RFS = 32768 gives f_sw = 300 036 Hz and TN = 133; RDS = 512 gives
WN = 133 * 3000 / 10000 = 39; RES = 2048 gives EN = 133 * 3548 / 10000 = 47.
The switch is on for clocks 47..85 of a 133-clock cycle.

The calculator is sequential. A restoring divider (`seq_divider`, one
quotient bit per clock) forms TN = 40 000 000 / f_sw in 26 clocks; then the
two products TN*(D_L+RDS) and TN*(E_L+RES) are divided by 10 000 in two
dividers running side by side (30 clocks). From the sampling edge to
`done_o` it takes NW_T + NW_P + 5 = 61 clocks, where NW_T is the bit width of
f_clk and NW_P = 16 + 14 the width of the products. An elaboration-time
assertion checks that this stays below the shortest period (109 clocks).

## Cycle timing: computing one cycle ahead (`dpwm`, `dpwm_core`)

This is the part that needs the most care when changing the design. The
counter needs TN, WN and EN from the very first clock of a cycle (EN is 0 in
schemes 0, 2, 4 and 6), but the calculation takes 61 clocks. The DPWM
therefore works one cycle ahead:

1. On the last clock of cycle k (`reset1_o` high) the core takes the buffered
   parameter set and, on the same edge, the calculator samples the streams
   and `scheme_i` (`sample_o` marks this clock).
2. Cycle k+1 starts on that edge with the count at 0, using the set just
   taken. Meanwhile the calculator works on the values sampled at its start.
3. After 61 clocks the result is written into the one-entry buffer
   (`next_valid` set), well before cycle k+1 ends.

So the random values drawn at the start of one cycle shape the next one. The
statistics of the sequence are unchanged; the only visible effect is that a
change of `scheme_i` takes effect from the second cycle after it.

After reset one calculation is started at once; the buffer fills 62 clocks
after the first sampling edge and the first cycle starts on the edge after
that (64 clocks after reset is released). Until then both gate outputs are
low.

The core's counter runs 0, 1, ... TN-1 and restarts, so a cycle lasts
exactly TN clocks. The high-side gate `vgs1_o` is high while
`EN <= count < EN + WN` (exactly WN clocks, starting EN clocks into the
cycle); the low-side gate `vgs2_o` is its complement while running. Both are
registered and aligned with `cnt_o`. With the fixed limits, EN + WN never
exceeds 0.91 TN, so the pulse always ends inside its own cycle.

If a cycle ended with no new set in the buffer, the core would repeat the
running set and raise `underrun_o`; with the default parameters this cannot
happen, and an assertion in `dpwm` reports it if a changed configuration
makes it possible. Other assertions check that the two gates are never on
together and that the calculator is never restarted while busy.

## What the randomization does to the spectrum

`tb/tb_ss_spectrum.sv` records the high-side gate signal for about 0.6 ms
per scheme and computes its power spectrum from 155 kHz to 1 MHz with
9.11 kHz bins (about the 9 kHz bandwidth of a conducted-emission receiver),
averaged over 48 windows. The highest bin, against that of plain PWM:

| scheme     | peak reduction, gate signal (this RTL) | conducted-noise measurement of the original hardware |
|------------|---------------------------------------:|-----------------------------------------------------:|
| RPPM       | 2.55 dB | 2.2 dB  |
| RPWM       | 0.01 dB | -0.4 dB |
| RDRPPMFCF  | 2.55 dB | 1 dB    |
| RCFMFD     | 7.29 dB | 2 dB    |
| RCFRPPMFD  | 8.75 dB | 2.6 dB  |
| RCFMVD     | 7.67 dB | 1.6 dB  |
| RRRM       | 9.40 dB | 4 dB    |

With a fixed period (RPPM, RPWM, RDRPPMFCF) the harmonics stay discrete
lines and only their coherent amplitude changes; the testbench predicts it
exactly from the parameter equations (averaging the pulse over every stream
value) and checks the measurement against it. Randomizing the frequency
spreads each line over about 131 kHz and gives the largest reductions, RRRM
the largest of all, RPWM next to none. That ordering agrees with the
hardware measurements; the absolute values do not, since those were taken on
the converter's input current, which the switching waveform reaches only
through the power stage and its parasitics (the high-frequency range,
1 to 30 MHz, is dominated by those and is not modelled here).

## Top level (`ss_controller`)

| port         | dir | width | meaning                                                      |
|--------------|-----|-------|--------------------------------------------------------------|
| `clk`        | in  | 1     | clock, `FCLK_HZ` (default 40 MHz)                            |
| `rst_n`      | in  | 1     | synchronous, active-low reset                                |
| `scheme_i`   | in  | 3     | scheme code, table above                                     |
| `vgs1_o`     | out | 1     | high-side switch gate drive                                  |
| `vgs2_o`     | out | 1     | low-side switch gate drive (complement, no dead time)        |
| `reset1_o`   | out | 1     | high on the last clock of each switching cycle               |
| `running_o`  | out | 1     | PWM running                                                  |
| `underrun_o` | out | 1     | parameters missing at a cycle end (never at the defaults)    |
| `params_o`   | out | 48    | `pwm_params_t` {TN, WN, EN} of the running cycle             |

Parameters (same names on `ss_controller`, `dpwm` and `ss_param_calc`):

| parameter  | default    | meaning                                    |
|------------|------------|--------------------------------------------|
| `FCLK_HZ`  | 40 000 000 | clock frequency                            |
| `FL_HZ`    | 234 500    | lowest switching frequency                 |
| `K`        | 2          | Hz per step of RFS                         |
| `F_FIX_HZ` | 300 000    | switching frequency when not randomized    |
| `D_L`      | 2488       | lowest duty ratio, in 1/10000              |
| `E_L`      | 1500       | lowest turn-on delay, in 1/10000 of T_k    |
| `D_FIX`    | 3000       | duty ratio when not randomized             |
| `E_FIX`    | 0          | delay when not randomized                  |
| `NORM`     | 10 000     | denominator of the two fractions           |

The 16-bit counts (`ss_pkg::CNT_W`) allow up to 65535 clocks per cycle. The
design is the controller only: the buck power stage (12 V to 3.3 V, 5 A,
L = 4.3 uH, C = 470 uF), and the line impedance stabilization network and EMI
receiver used to measure its noise, are analog and sit outside `vgs1_o` and
`vgs2_o`.

## Files

| file                   | contents                                            |
|------------------------|-----------------------------------------------------|
| `rtl/ss_pkg.sv`        | scheme enum, widths, `pwm_params_t`                 |
| `rtl/mlfsr.sv`         | one maximum-length LFSR                             |
| `rtl/prs_gen.sv`       | 16 LFSRs and the three streams                      |
| `rtl/seq_divider.sv`   | restoring divider, one bit per clock                |
| `rtl/ss_param_calc.sv` | f_sw, TN, WN, EN calculation                        |
| `rtl/dpwm_core.sv`     | counter, comparators, gate outputs                  |
| `rtl/dpwm.sv`          | calculator + buffer + core, one cycle ahead         |
| `rtl/ss_controller.sv` | top level                                           |
| `tb/tb_*.sv`           | one self-checking testbench per module above, and `tb_ss_spectrum` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ss_pkg.sv tb/tb_ss_controller.sv \
          --top-module tb_ss_controller -Mdir obj -o sim
./obj/sim
```

(replace `tb_ss_controller` by any other testbench; `-Wno-fatal` lets lint
warnings through). What each one checks:

* `tb_mlfsr`: every state against the polynomial, period exactly 65535.
* `tb_prs_gen`: all 16 LFSRs and both rearranged streams against a model
  every clock for 20 000 clocks; seeds distinct; each bit balanced.
* `tb_ss_param_calc`: TN/WN/EN against the equations for all schemes, corner
  and random inputs; latency exactly 61 clocks; start ignored while busy.
* `tb_dpwm_core`: 2000 random cycles against a cycle model: count, gates,
  reset1, measured period/on-time/delay, one forced underrun.
* `tb_dpwm`: default parameters, random streams; the n-th sample must become
  the n-th cycle; measured period, on-time and delay; time to first cycle.
* `tb_ss_controller`: the whole controller at its defaults, 60 cycles of each
  of the eight schemes with a scheme change in the middle of a cycle; exact
  parameters from the sampled streams, measured waveforms, fixed values stay
  fixed, randomized ones vary and stay in range. It prints the observed TN,
  WN and EN ranges per scheme. It runs in well under a second.
* `tb_ss_spectrum`: the spectrum measurement above, with its checks
  (about 5 seconds).

## Departures and own choices

Taken from the original controller: sixteen parallel m-LFSRs with different
seeds, feedback into the leftmost bit, all clocked together; 16/12/10-bit
streams with the 12- and 10-bit ones rearranged subsets of the 16 bits; the
four equations with F_L = 234.5 kHz, K = 2, d_L = 2488, e_L = 1500 and the
1/10000 normalisation; the fixed values 300 kHz, 0.3 and 0; the counter that
restarts every cycle with a reset1 pulse and the EN..EN+WN window; the
complementary gate pair for a synchronous buck; the eight schemes.

Chosen here, because the original leaves them open:

* **Clock frequency, 40 MHz.** Not stated. 40 MHz puts TN at 109..170, close
  to the TN values of the original's simulation (108..167), one of which
  (108) would need a clock slightly below 40 MHz. Change `FCLK_HZ` to match
  a real board.
* **LFSR length and polynomial, seeds, and the 12/10-bit bit orders** (see
  above).
* **Computing one cycle ahead** and the sequential divider; the original
  describes the calculation as happening at the start of each cycle.
* **The comparison window** is half-open (high for exactly WN clocks).
* **No dead time** between `vgs1_o` and `vgs2_o`; a real gate driver stage
  needs it, or it must be added here.
* **Scheme selection** by a 3-bit input, and synchronous active-low reset.
* The switching frequency reaches 365.57 kHz at RFS = 65535, slightly above
  the 365.5 kHz quoted for the range; this follows directly from F_L and K.
