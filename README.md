# Asynchronous Pulse Blanker

This is a synthesizable SystemVerilog model of an asynchronous pulse blanker (APB). The APB is the part of a radiometer's RFI processor that removes strong, short interference from a complex baseband stream. Radar pulses are the typical case. The blanker:

- takes a 16+16-bit complex sample on every clock (100 MSPS in the target system);
- keeps running estimates of the mean and the variance of the sample power |x|²;
- decides that a sample is interference when its power deviates too far from the mean;
- zeroes a window of a delayed copy of the stream around that sample.

Because the output is delayed, the window can start *before* the detection point. That way it catches the rising edge of a pulse as well as its tail and the echoes that follow.

```
            +-------------------- apb_fifo (1024 x 32, delay) -----------------+
 real_in -->|                                                                   |--> apb_output_mux --> real_out
 imag_in -->+--> apb_processor (decimate, |x|^2, mean, variance, detect, BTR) --+         ^          imag_out
                          ^                       | blank                                 |          out_strobe
                          |                       +---------------------------------------+          blank
               rabbit_interface (32 byte registers) <--> 8-bit micro-controller bus
               apb_init_ctrl (start-up, FIFO fill)
```

The design has four parts:

| Part | Modules | Role |
|---|---|---|
| Processor | `apb_decimator`, `apb_power`, `apb_mean`, `apb_var`, `apb_detect`, `apb_btr`, wrapped by `apb_processor` | Statistics, detection and the blanking window |
| Delay line | `apb_fifo` | Delays the data by FILL_LEN + 2 clocks, so the window can reach back before the detection point and cover the processing latency |
| Control | `apb_init_ctrl`, `rabbit_interface` | Start-up sequencing and FIFO fill; byte-wide register file for a micro-controller |
| Output | `apb_output_mux` | Selects one of four output modes |

`apb_top` connects them. Shared constants, the register map and the enums are in `apb_pkg`.

## 1. Detection principle

Let x be a complex sample and p = |x|² = I² + Q². The blanker keeps two exponentially weighted averages:

```
mean  <- p + mu * mean
var   <- (p' - mean)^2 + mu * var          p' = p one processed sample later
pulse  = (p' - mean)^2 >= beta^2 * var
```

Here mu = (2^L − 1)/2^L, which is the largest constant representable with L fraction bits. For L = 12, mu = 0.999756, so the time constant is about 4096 processed samples. The averages have a DC gain of 1/(1 − mu) = 2^L. Keeping the L fraction bits of the register makes that gain exact: the integer part of `mean` is the average power, and the integer part of `var` is the average squared deviation, both less about one LSB from the truncation (section 9).

beta² is a programmable unsigned integer. For Gaussian noise, p is exponentially distributed, so a sample is flagged with probability of roughly exp(−(1 + beta)). With beta = 3, that is about 2 % of samples. Interference well above the noise floor exceeds the threshold on its first sample.

To save hardware, the processor looks at only one input sample in four. The decimator produces a one-clock `clock_enable` pulse every DECIM = 4 clocks. Every pipeline register in the processor loads only on that enable, but all logic runs on the full-rate clock. Short pulses can fall between processed samples. In practice a radar pulse lasts hundreds of input samples, so it is always seen.

Statistics must not learn from the interference they are meant to reject. From a detected pulse until NBLANK + 1 processed samples later, both the mean and the variance registers are frozen. The `force_updates` input overrides the freeze.

## 2. Fixed-point data path

All arithmetic is integer arithmetic. The only truncation is the one in the feedback loop of each average (below); the products and the comparison keep full width. The parameters are N, the processed sample width (12 by default), and L, the fraction width and beta² width (12 by default). Only the top N bits of each 16-bit input component are processed.

| Stage | Register | Width (N = L = 12) | Content |
|---|---|---|---|
| capture | I, Q | N each, signed | top N bits of the input |
| 1 | `x2` | 2N = 24 | I² + Q² (the sum of two products whose magnitude is at most 2^(2N−2) each, so it fits 2N unsigned bits) |
| 2 | `meanx` | 2N + L = 36 | `x2·2^0 + ((2^L−1)·meanx) >> L`, with L fraction bits |
| 3a | `x2_d` | 2N | `x2` one enable later |
| 3b | `diff` | 2N + 1 = 25, signed | `x2_d − meanx[2N+L−1:L]` (integer part of the mean) |
| 3c | `dev2` | 4N = 48 | `diff²` |
| 3d | `varx` | 4N + L = 60 | `dev2 + ((2^L−1)·varx) >> L`, with L fraction bits |
| 4 | `pulse` | 1 | `{L zeros, dev2} >= beta2 · varx[4N+L−1:L]` |

The weight is applied as a multiplication by the constant 2^L − 1 followed by dropping the L least significant bits of the product, which is the only truncation in the loop. The recursion is stable: for a constant input p, starting from zero, the register rises until ceil(r/2^L) = p, i.e. to just above 2^L·(p − 1), so its integer part reads p − 1 (see *Small inputs* in section 9). It never overflows, because the fixed point of the recursion is below 2^(2N+L).

While `load_parm` is high, the multiplexer in the feedback path (in front of the weight multiplier) feeds `{mean_reset, L zeros}` or `{var_reset, L zeros}` instead of the register. The register therefore restarts from the programmed integer value, weighted once and with the current sample added. This lets a micro-controller preset the statistics. The register also loads on `load_parm` during a hold, so a preset always takes effect.

In stage 4, `dev2` is compared with `beta2` times the integer part of the variance. Both sides are 4N + L bits wide, so the product never overflows. The variance used is the register output, which is the value before the current sample is folded in. This matches the hardware structure of the original design.

## 3. Blanking timing register (BTR)

The BTR turns single-sample detections into a blanking window. It is the part of the design that needs the most care, because its timing, the FIFO delay and the processing latency together decide which input samples get zeroed. All counts are in processed samples (enables), not clocks. It is built from two small state machines, each with one 16-bit counter.

**Blank machine** (IDLE → FIRST → SECOND, shared state encoding `btr_state_e`).

- In IDLE, a pulse moves it to FIRST (the wait). The wait counter is held at zero while idle.
- FIRST lasts NWAIT + 1 enables, until the wait counter reaches NWAIT.
- SECOND (the blanking state) lasts NBLANK + 1 enables; its counter is held at zero outside it.
- The `blank` output is a register loaded with "state is SECOND", so it follows the state by one enable.

**Update-disable machine.**

- A pulse in IDLE disables updates at once (combinationally), so the pulse sample itself never enters the averages, and the machine moves to FIRST.
- Updates stay disabled in FIRST, for NBLANK + 1 enables.
- In SECOND, updates run again, but new pulses are still ignored until NSEP enables have passed since the pulse.
- `force_updates` re-enables updates whatever the state.

NSEP is therefore the minimum spacing, in processed samples, between two accepted pulses. Pulses that arrive while a machine is busy are ignored. The design has a single BTR, on the basis that radar pulses are far apart compared with a blanking window.

Interval ends are detected with `>=`. For NWAIT and NBLANK this is the same as an equality test. For NSEP it means that NSEP ≤ NBLANK gives an immediate return to IDLE, instead of a wait of 65536 enables for the counter to wrap.

**Latency.** Count the enable that captures a sample as enable 1.

| Event | Enable | Clocks after capture |
|---|---|---|
| `x2` ready | 2 | |
| `meanx` and `x2_d` ready | 3 | |
| `diff` ready | 4 | |
| `dev2` ready | 5 | |
| `pulse` valid (combinational on `dev2`/`varx`) | after 5 | 20 |
| BTR state leaves IDLE (pulse sample held out of the averages on this same enable) | 6 | 24 |
| blank state entered | NWAIT + 7 | |
| `blank` register high | NWAIT + 8 | |
| `blank` register drops | NWAIT + NBLANK + 9 | |

Counting input capture, the four stage registers, the BTR state and the `blank` register, a sample passes through seven enabled ranks; with NWAIT = 0 that is 7 × 4 = 28 clocks from the input to the window. The window is NBLANK + 1 enables long.

**Relation to the FIFO delay.** At the output, the data is the input delayed by D = FILL_LEN + 2 = 1025 clocks. Measured from the first pulse sample at the input, the window opens about 4·(NWAIT + 8) clocks later. The radar testbench requires it to lie between 4·(NWAIT + 8) and 4·(NWAIT + 9) + 1 clocks, depending on where the pulse falls relative to the enable and including the output register. As a result:

- D − 4·(NWAIT + 8) clocks of data *before* the triggering sample are blanked.
- 4·(NBLANK + 1) − (that amount) clocks of data *after* it are blanked.

For the window to reach the pulse at all, NWAIT must be less than about D/4 − 8 = 248. With the bench settings NWAIT = 128 and NBLANK = 1024:

- 476 to 481 clocks before the pulse are blanked (476 was measured);
- about 3620 clocks after it are blanked;
- the averages resume after NBLANK + 1 enables, and a new pulse is accepted after NSEP = 1152 enables.

## 4. Start-up and FIFO fill

`apb_init_ctrl` runs at the full clock rate and sequences the board after reset:

1. **RESET_ALL** – one clock.
2. **FORCE** – INIT_CYCLES = 262144 clocks with `force_updates` high and the FIFO held clear. The mean and variance settle on the real input: 65536 processed samples, 16 time constants. Any blanking that false alarms on the initial values cannot freeze them.
3. **FIFO_RST** – one clock of FIFO clear.
4. **FILL** – the FIFO is written but not read, until it holds FILL_LEN = 1023 words.
5. **RUN** – written and read every clock, forever. The occupancy stays at FILL_LEN, which an assertion in `apb_top` checks.

`apb_fifo` is a memory array with read/write pointers, a registered non-show-ahead output (data appears the clock after `rdreq`), a synchronous clear, and `usedw`/`empty`/`full` flags. The output register adds one clock of delay, and the output multiplexer adds another, which gives the total delay of FILL_LEN + 2.

## 5. Micro-controller interface

`rabbit_interface` provides 32 byte registers on a 5-bit address, an active-low chip select and a read/write line (1 = read). The bidirectional data bus is split into `data_in`, `data_out` and `data_oe` (= selected and reading), so that a pad or an external tri-state buffer can be attached. While the register is selected for a write, it loads `data_in` on every clock. Reads are combinational through a 32-to-1 multiplexer.

| Address | Register | Field (N = L = 12) |
|---|---|---|
| 0 | control write | bit 1..0 mode, bit 2 force_update |
| 1–2 | beta² | 12 bits |
| 3–5 | initial mean | 24 bits |
| 6–11 | initial variance | 48 bits |
| 12–13 | NWAIT | 16 bits |
| 14–15 | NBLANK | 16 bits |
| 16–17 | NSEP | 16 bits |
| 18 | control read | bit 0 = `apb_tmp` input |
| 19–23 | mean snapshot | 40-bit field ← 36-bit `meanx` |
| 24–31 | variance snapshot | 64-bit field ← 60-bit `varx` |

Multi-byte values are least significant byte first. Each field has a fixed maximum width (16, 24, 48, 16, 16, 16, 40 and 64 bits in table order). A value narrower than its field sits at the field's least significant end. A value wider than its field is carried by its most significant bits. Addresses 0–17 read back what was written, and writes to 18–31 are ignored.

The mean and variance read-back registers are a snapshot bank. It loads on a processed sample while the `snapshot` input is high. Lowering `snapshot` freezes a coherent copy of all 13 bytes for the controller to read one at a time. The `parm_reset` input drives the processor's `load_parm`, which loads the programmed initial mean and variance.

## 6. Output modes

`apb_output_mux` registers all of its outputs, including `blank`, so flag and data stay aligned.

| Mode | real_out | imag_out | out_strobe |
|---|---|---|---|
| 00 raw | input | input | every clock |
| 01 statistics | `{blank, meanx[L+14:L]}` | `varx[L+23:L+8]` | clock enable |
| 10 blanked | delayed data, 0 while blanking | delayed data, 0 while blanking | every clock |
| 11 data + flag | delayed data | delayed data with bit 0 replaced by `blank` | every clock |

Mode 01 exposes 15 bits of the mean and 16 of the variance, for tuning and monitoring. The strobe marks the clock on which they change.

## 7. Parameters

| Module | Parameter | Default | Range / note |
|---|---|---|---|
| `apb_top`, `apb_processor` | N | 12 | processed I/Q width; intended 8–16 |
| | L | 12 | fraction width and beta² width; intended up to 16 |
| | DECIM | 4 | ≥ 2 |
| `apb_top` | FIFO_DEPTH | 1024 | power of two |
| | FILL_LEN | FIFO_DEPTH − 1 | sets the data delay (FILL_LEN + 2 clocks) |
| | INIT_CYCLES | 262144 | forced-update start-up time |

The RTL is written for any N and L. The bit-exact testbenches run N = L = 12 (plus L = 4 for the mean stage). `tb_apb_convergence` also runs the whole processor at L = 9..16 and at N = 8, 10, 14, 16, but it checks statistics, not bits (section 9).

## 8. Choices and departures

The behaviour follows the original APB design, except for these choices:

- **Difference width.** The deviation register is 2N + 1 bits, signed, rather than 2N. If a preset mean is larger than any reachable |x|², the difference cannot wrap. The square still fits 4N bits.
- **beta² is unsigned.** A signed multiplier would misread beta² values with the top bit set.
- **Comparisons.** A deviation equal to the threshold counts as a pulse. The BTR's NSEP test is `>=` (see section 3).
- **Statistics frozen during blanking.** Both the mean and the variance are frozen for NBLANK + 1 enables after a pulse, as the hardware description says (a software model of the original kept updating the mean). The variance is compared before it is updated, as in the hardware.
- **Mode 11.** The flag replaces the *imaginary* LSB, as the mode description states. One source listing of the original design put it in the real LSB instead.
- **Snapshot control** is a separate input (the original used a spare controller port pin). No control-register bit for it is defined.
- **`apb_tmp`** has no described function. It is an input that appears in control-read bit 0.
- **FIFO size.** 1024 words with a 1023-word fill, as in the built system. A 16k-word FIFO would only need `FIFO_DEPTH` changed.
- **Start-up time** is 262144 clocks.
- **Reset.** A synchronous active-high reset is added; the original had none. All pipeline registers are cleared by it.
- **Start-up sequencing.** FIFO fill writes without reading, and the start-up controller runs at the full clock rate.
- **Not implemented:**
  - The board's DISABLE pin has no described behaviour and is not implemented.
  - There is no detection of a quiet input. After a long all-zero input, the variance decays to zero. Every sample then counts as a pulse (0 >= 0), and blanking repeats until the variance has grown again during the NSEP intervals. The original only suggests that extra logic could detect this case. Here the controller has to handle it, by presetting the statistics (`parm_reset`) or forcing updates.
- **Outside this RTL:**
  - the micro-controller firmware;
  - the PC client;
  - the digital IF front end that produces the samples.

## 9. Verification

Each module has a self-checking testbench in `tb/`. The block testbenches compare against a cycle-accurate reference model written in the testbench itself, using random and directed stimulus.

| Testbench | What it checks |
|---|---|
| `tb_apb_decimator` | Enable period and phase after reset |
| `tb_apb_power` | I² + Q² over random and extreme values |
| `tb_apb_mean`, `tb_apb_var` | Recursions bit-exact against a model, including load, hold and extreme presets |
| `tb_apb_detect` | Threshold compare at and around equality, and full-width beta² |
| `tb_apb_btr` | Both state machines against a model, over random NWAIT/NBLANK/NSEP and pulse patterns |
| `tb_apb_fifo` | Against a queue model: clear, full, empty, `usedw` |
| `tb_apb_init_ctrl` | State sequence and durations, including the default 262144 clocks |
| `tb_rabbit_interface` | Every address: write, read back, field alignment, snapshot freeze, bus enable |
| `tb_apb_output_mux` | All four modes |
| `tb_apb_processor` | Whole processor against a model; 20-clock detection latency; window start at NWAIT + 8 enables |
| `tb_apb_top` | Default sizes, full 262144-clock start-up, register programming and read-back over the bus, all four modes end to end. The delayed output appears exactly FILL_LEN + 2 clocks after the input; in the blanked mode every output is the delayed input or zero while `blank` is high; no burst sample gets through. Also checks snapshot read-back, FORCE_UPDATE and `parm_reset` |
| `tb_apb_radar_pulse` | A 100-clock radar pulse plus a weaker echo 1300 clocks later, with beta² = 100, NWAIT = 128, NBLANK = 1024, NSEP = 1152. Every pulse and echo sample must leave blanked, and the pre-pulse blanked span must match section 3 |
| `tb_apb_gauss_blanking` | Complex Gaussian noise with updates always on; counts the blanked fraction for beta = 1..8 |
| `tb_apb_dynamic_range` | Inputs occupying 1..10 bits; mean and variance against the stimulus statistics, including the one-LSB truncation bias and the zero reading for tiny inputs |
| `tb_apb_convergence` | Thirteen processors at different N and L on one Gaussian stream. Checks convergence from zero (63 % after one time constant), the long-run averages against the stimulus statistics, and the steady-state ripple against L |

Gaussian noise results at N = L = 12 over 20000 processed samples, compared with the published hardware measurement:

| beta | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| this design, % | 14.5 | 4.9 | 1.83 | 0.64 | 0.23 | 0.08 | 0.03 | 0.015 |
| reference, % | 13.4 | 4.84 | 1.91 | 0.74 | 0.33 | 0.13 | 0.05 | 0.01 |

The trend matches closely. The reference was measured on a different noise record, and at beta = 5–7 only 6–66 samples are flagged out of 20000, so single counts move the percentage noticeably. The testbench accepts a result within four binomial standard deviations plus 15 % of the reference.

Steady-state ripple of the integer mean and variance, as peak-to-peak over 20000 processed samples relative to the average (N = 12, updates always on):

| L | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|
| mean, this design, % | 17.6 | 11.1 | 6.3 | 3.7 | 2.1 | 1.3 | 0.75 | 0.41 |
| mean, reference, % | 16 | 13 | 7 | 4 | 2 | 1 | 0.5 | 0.3 |
| variance, this design, % | 47 | 28 | 17.7 | 10.7 | 6.3 | 3.5 | 1.9 | 0.95 |
| variance, reference, % | 62 | 35 | 17 | 13 | 6 | 3 | 1.0 | 0.9 |

Each extra bit of L shrinks both ripples by a factor of about 0.6. To keep the variance ripple near 1 %, L must be 15 or 16. At N = 8, 10, 14 and 16, the ripple is the same as at N = 12, and the averages sit within 2 % of the true statistics.

**Small inputs.** The truncation in the feedback loop drops the L fraction bits of (2^L − 1)·r. Each update therefore subtracts ceil(r/2^L) rather than r/2^L. In steady state the average of ceil(r/2^L) equals the true mean, so the integer part of the mean register sits about one LSB of |x|² below the true mean. The fraction bits do not remove this bias. `tb_apb_dynamic_range` feeds inputs that occupy 1 to 10 bits of the 12-bit word:

- from 4 bits up, the mean and variance track the true values (2.3 against 3.3 at 4 bits, within 1.5 % from 7 bits);
- at 3 bits or fewer, the true mean of |x|² is below one LSB and the integer mean reads 0.

Combined with the zero-variance case (section 8), very quiet inputs need care. The truncation is kept as in the original arithmetic.

## 10. Running the simulations

The RTL is plain SystemVerilog and needs no vendor libraries. With Verilator 5, run for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/apb_pkg.sv tb/tb_apb_top.sv --top-module tb_apb_top
./obj_dir/Vtb_apb_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog that stops a hung run. `tb_apb_top` runs the full-size design, including the 262144-clock start-up, in well under a second of simulator time.
