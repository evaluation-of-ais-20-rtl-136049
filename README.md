# Six FPGA true random number generator cores

A true random number generator (TRNG) for cryptographic use has to be explainable: its
raw, unprocessed bits must come from a noise source that a stochastic model can describe,
and those raw bits must be available for testing (the AIS-20/31 approach). Every core in
this repository follows that recipe. A purely digital noise source made of FPGA logic
(ring oscillators, PLLs, a transition-effect ring oscillator or a self-timed ring) is
followed by a very small harvester. The harvester is a handful of flip-flops, XOR gates
and counters. It turns timing jitter into bits and sends them out with no
post-processing, as a raw bit stream plus a strobe.

The six generators are independent designs. `trng_top` simply places them side by side.
Each one has its own pair of output pins and its own output multiplexer.

| core | noise source | harvester | one bit per |
|---|---|---|---|
| ERO  | two identical rings RO1, RO2 | D flip-flop samples RO1 on RO2 / K | K periods of RO2 (K = 80 000) |
| COSO | two rings with almost equal periods | beat detector + 1-bit period counter | beat period (~267 ring periods) |
| MURO | M rings + reference ring | M samplers, M-input XOR, output flip-flop | K reference-ring periods |
| PLL  | ring -> PLL1 (clk_jit), PLL2 (clk_ref) | XOR accumulator + counter 0..KD-1 | KD periods of clk_ref (KD = 1377) |
| TERO | TERO cell restarted by ctrl | T flip-flop + output register | 128 periods of the control ring |
| STR  | self-timed ring of L stages | L samplers, L-input XOR, output flip-flop | one period of the sampling ring |

## Two kinds of code

Only the harvesters are synthesizable logic: `ero_trng`, `coso_trng`, `muro_trng`,
`pll_trng`, `tero_trng`, `str_trng`, `freq_divider` and `output_mux`. They take the
oscillator signals as ordinary inputs and clock flip-flops with them.

The noise sources cannot be written as clocked logic. In an FPGA they are combinational
loops placed and routed by hand, and vendor PLLs. They are written as timed
**behavioural models** for simulation:

- `ring_osc`: a NAND-plus-buffers loop. Its period is 2·N·stage delay, with white Gaussian
  jitter on every half period. It rests at 1 while its enable is low.
- `pll_model`: measures its input period and produces f_in·KM/KD, with jitter.
- `tero_cell`: after each rising edge of `ctrl` it oscillates a Gaussian-distributed
  number of times, then rests.
- `str_ring`: a Muller-C-element ring with the real handshake rule. Stage i copies
  C(i-1) when C(i-1) ≠ C(i+1). The ring starts with E events spread evenly.

On an FPGA you replace each model by the hand-placed primitive it stands for. The
harvesters stay as they are. The models reproduce frequencies, phase relations and the
*mechanisms* (beats, collisions, handshakes). Their jitter is only a rough stand-in for
thermal noise. **The randomness in simulation says nothing about the entropy of a real
device.** Entropy must be measured on the hardware.

All timed code uses `timeunit 1ps; timeprecision 1fs;`. The shared package `trng_pkg`
holds the `gen_e` index enum (ERO = 0 … STR = 5), the `trng_out_t` {noise, clk} struct,
the per-family constants and the `gauss()` helper used by the models.

## Output timing convention

Each generator drives `pins[g].noise` and `pins[g].clk`. They are meant for two
differential output links to an external acquisition system.

- ERO, COSO, MURO, PLL, STR: noise changes just after the **rising** strobe edge and
  holds for one strobe period. Sample it on the falling edge.
- TERO: noise changes on the **falling** edge of the strobe (`ctrl`), because its output
  register has an inverted clock. Sample it on the rising edge.

`output_mux` forwards {noise, clk} while `out_en[g]` is high. While it is low, it drives
both pins with `static_in`. The generator keeps running either way. This is how the net
power of a core is measured: the blocked design, with a static signal crossing the
device, is the power reference.

There is no clock input anywhere. Every clock, including the counters' clocks, is made
by a ring oscillator inside the design, so it cannot be manipulated from outside.
`rst_n` (asynchronous, active low) only initialises counters. The sampling flip-flops
of ERO, MURO and STR have no reset, because their first value is already a sample.

## The generators

### ERO: elementary ring-oscillator TRNG
RO1 is sampled once every K periods of RO2. During those K periods the jitter of the two
rings accumulates. Its standard deviation grows with √K, and the entropy lower bound is
H ≥ 1 − 4/(π² ln 2) · exp(−π² σ² K T2 / T1³). K is therefore set so that this bound
is close to 1: 80 000 for the 3 ns Spartan 6 rings with 4 ps period jitter. Because the
two rings are identical, global disturbances such as supply noise shift both of them
and mostly cancel. The divider is a 17-bit synchronous counter. Its registered output is
high for ⌊K/2⌋ input cycles and rises once every K cycles. Other families use
K = 135 000 and K = 20 000. 135 000 needs `WIDTH = 18`, and an elaboration-time
assertion catches a K that does not fit.

### COSO: coherent-sampling ring-oscillator TRNG
Two rings with the same length and placement differ in period by a tiny ΔT. Sampling s1
on s2 gives a slow **beat** signal s3, whose period is about T²/ΔT periods of s2. Jitter
makes that number random. Its least significant bit is the output. In the RTL everything
is in the s2 domain:

1. `s3 <= s1` is the beat.
2. `s3_q` detects the beat's rising edge.
3. On that edge the 1-bit counter's value becomes `noise`, and the counter restarts.
   Otherwise the counter toggles every s2 cycle.

So `noise` = (beat period in s2 cycles − 1) mod 2. The strobe is the registered beat.
Randomness requires ΔT < ∛(σ²T). For Spartan 6 (T = 6.92 ns, σ ≈ 4 ps) that means
ΔT below about 50 ps, and in practice it can only be reached by trying placements per
device. The top uses ΔT = 26 ps, which gives 0.54 Mbit/s.

### MURO: multi-ring TRNG
M free-running rings have phases that are independent and uniformly distributed. M
flip-flops sample them on `clk_ref`, their XOR is registered on the same clock, and the
output follows two `clk_ref` cycles later. The first rank of flip-flops is there because
a single M-input XOR cannot follow M fast clocks. `clk_ref` is the reference ring divided
by K. M must exceed T/σ_acc. M = 114 and K = 117 are this design's choices: they match
a 131-register implementation at 2.57 Mbit/s. Rings that lock to each other destroy
the entropy. The model gives each ring a slightly different stage delay
(`MURO_SPREAD_PS`).

### PLL: coherent sampling with two PLLs
One ring (~200 MHz) feeds two PLLs, so f_jit = f_ref · KM/KD with KM and KD coprime.
Sampling clk_jit on clk_ref visits KD equally spaced phases of the clk_jit period,
Δ = T_jit/KD apart. The XOR of one full set of KD samples is one output bit, so
R = f_ref/KD. Entropy needs Δ ≪ σ_r, the relative jitter of the two clocks.

The harvester is a flip-flop with an XOR in front, `acc <= acc ^ clk_jit`, and a
divide-by-KD counter whose output clocks the output register. The accumulator is never
cleared. Consecutive output bits therefore differ by the XOR of the last KD samples,
which carries the same entropy.

Spartan 6 configuration: PLL1 = 37/81 (clk_jit ≈ 91 MHz) and PLL2 = 17/7
(clk_ref ≈ 486 MHz). This gives KM/KD = 259/1377. Reported results for the two other
families are KD = 667 and KD = 729. The PLL-TRNG reset is held until both PLL models
report lock.

### TERO: transition-effect ring oscillator TRNG
The TERO cell is a loop of two NAND gates and two buffer chains, with an even number of
inversions. Each time `ctrl` rises, two events start to circulate at slightly different
speeds. The loop oscillates until the faster event catches the slower one. The number
of oscillations is the random variable.

- `ctrl` is the top bit of a 7-bit counter clocked by a ring, so there is one restart per
  128 ring periods. An 80 MHz ring gives 0.625 Mbit/s.
- A T flip-flop counts the oscillations. It is held in reset while `ctrl` is low.
- On the falling edge of `ctrl` the output register takes the count's parity.

The cell has to be tuned by hand per device. The model's defaults (100 ± 5 oscillations
of 2 ns) are illustrative.

### STR: self-timed-ring TRNG
A self-timed ring of L stages carries E events that never collide, thanks to the
two-phase handshake between stages. When evenly spaced, the events give L equidistant
phases, with φ_n = n·(E/L)·180° between stages n apart, provided E and L are coprime.
Whenever the sampling ring samples all L stage outputs, at least one of them is within
Δφ = T·E/(2L) of a transition. If the accumulated jitter exceeds Δφ, the XOR of the L
samples is random. This gives one bit per sampling clock: the fastest core here, and
also the largest one.

L = 255 matches a 256-register implementation. E = 128 is even, as a C-element ring
requires, and coprime with 255. The model does not reproduce the Charlie and drafting
effects that steer a real ring into burst or evenly-spaced mode. It starts in the
evenly-spaced mode. For simulation speed, all stages are evaluated by one event-list
process, with the same semantics as L separate C-elements.

## Parameters (defaults = Spartan 6)

| parameter | default | origin |
|---|---|---|
| `ERO_K`, `ERO_N`, ring period, jitter | 80 000, 3, 3 ns, 4 ps | reported |
| `COSO_N`, `COSO_T1_PS`, jitter | 8, 6920, 4 ps | reported |
| `COSO_DT_PS` | 26 | chosen (beat gives the reported 0.54 Mbit/s) |
| `MURO_M`, `MURO_K` | 114, 117 | chosen (see MURO) |
| `PLL1_KM/KD`, `PLL2_KM/KD`, `PLL_KD` | 37/81, 17/7, 1377 | reported; PLL1 KD reconstructed so that 17·81 = 1377 and 37·7 = 259 |
| TERO counter bits | 7 | reported |
| TERO control ring | 80 MHz | chosen (0.625 Mbit/s × 128) |
| `STR_L`, `STR_E` | 255, 128 | chosen (see STR) |
| STR stage delay, sampling ring | 800 ps, 154 MHz | chosen / reported bit rate |

### Other FPGA families

Only parameters change between families. `tb_trng_families` shows the full sets:

| | Cyclone V | SmartFusion 2 |
|---|---|---|
| ERO | N = 5, K = 135 000 (`ERO_WIDTH = 18`), 3 ps jitter | N = 5, K = 20 000, 8 ps |
| COSO | N = 6, T = 3.17 ns, ΔT = 14.5 ps | N = 10, T = 5.4 ns, ΔT = 9.6 ps |
| PLL | 31/29 and 23/18, KD = 667 | 74/162 and 18/22, KD = 729 |
| TERO control ring | 128 MHz | 128 MHz |
| STR sampling ring | 245 MHz | 188 MHz |

ΔT and the ring frequencies in this table are derived from the reported bit rates. No
MURO size is reported for these families, so the testbench runs MURO with 8 rings.

## Departures and open points

- The ring oscillators, PLLs, TERO cell and STR are models and are not synthesizable.
  Their placement and routing, which decides entropy and locking on a real device, is
  outside the RTL.
- COSO: the counter restart by the beat and the output capture are done synchronously in
  the s2 domain, through a one-flip-flop edge detector.
- TERO: verilator reports that a counter bit (`ctrl`) is used both as data and as an
  asynchronous reset of the T flip-flop. That is the intended circuit.
- The output multiplexer drives the strobe pin with `static_in` too when blocked.
- The differential output buffers and the acquisition system (SRAM, USB, PC) are not
  included. The pins are plain ports.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With plain
verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/trng_pkg.sv tb/tb_trng_top.sv \
          --top-module tb_trng_top && ./obj_dir/Vtb_trng_top
```

`-Wno-fatal` is needed because verilator warns (ZERODLY) about the computed, jittered
delays in the oscillator models. The warning is expected and harmless.

| testbench | what it checks |
|---|---|
| `tb_freq_divider` | rise positions and high time at K = 5 and K = 80 000 |
| `tb_ero_trng` | every sampled bit and the K-cycle bit period |
| `tb_coso_trng` | parity of random beat periods, one bit per beat |
| `tb_muro_trng` | XOR of the sampled rings, reference period K |
| `tb_pll_trng` | accumulator against a model, at KD = 5 and KD = 1377 |
| `tb_tero_trng` | parity of random pulse bursts, 128-cycle control period |
| `tb_str_trng` | XOR of 255 sampled stages, two-cycle pipeline |
| `tb_output_mux` | all 16 input combinations |
| `tb_ring_osc`, `tb_pll_model`, `tb_tero_cell`, `tb_str_ring` | model periods, jitter, oscillation statistics, event conservation in the STR |
| `tb_trng_top` | all six cores at reduced sizes: strobe periods, both bit values, output blocking, beats, TERO restarts, PLL lock |
| `tb_trng_top_full` | all six cores at default sizes for 600 µs, so that the ERO delivers two bits (about 2 minutes) |
| `tb_trng_families` | the Cyclone V and SmartFusion 2 configurations side by side for 410 µs: strobe periods and bit values of every core (about 3 minutes) |

`tb/trng_top_monitor.sv` is the shared observer of the three top-level testbenches. To
shorten a run, override the top's parameters as `tb_trng_top` does: smaller `ERO_K`,
`MURO_M`, `PLL_KD`, `STR_L`/`STR_E`.
