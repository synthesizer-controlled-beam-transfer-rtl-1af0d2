# Synthesizer-controlled bunch transfer from the AGS to RHIC

When beam moves from the AGS into RHIC, each AGS bunch has to land in one
chosen RHIC RF bucket ("bunch to bucket") without losses or emittance growth.
Three conditions make that possible:

- the two machines run locked in frequency;
- the AGS bunch is rotated in phase until it sits under the target RHIC bucket;
- the extraction kicker fires at the right moment.

This is called *cogging*. This RTL builds the digital part of it: three direct
digital synthesizers (DDS) and a kicker trigger. All of them run from one
master clock, and all phase shifts are whole numbers of phase units.

The key idea is a **frequency hop with an exact duration**. A synthesizer
normally adds a delta phase word `A` to its 32-bit phase accumulator on every
clock. When a hop starts, a counter switches it to a second word `B` (slightly
lower) for exactly `N` clocks. It then returns to `A`. Afterwards the output
is back on its nominal frequency but lags where it would have been by exactly
`N * (A - B)` phase units, with 2^32 units to one output cycle. No rounding
builds up and no phase is lost. The output phase changes continuously the
whole time, so the AGS RF loop that follows this reference never sees a jump.

## The three synthesizers

The master clock runs at 1024 × Frev, where Frev is the RHIC revolution
frequency. This clock is also the VCO of the RHIC RF loop, so every
synthesizer output is locked to the beam in RHIC. An output at harmonic `h`
of Frev uses `A = 2^32 * h / 1024`. For the three harmonics used here this is
an exact integer:

| instance    | output    | A (hex)       | hop counter | role |
|-------------|-----------|---------------|-------------|------|
| `u_rf`      | 360 × Frev | `5A00_0000`  | no          | defines the 360 RHIC buckets and drives the cavities |
| `u_synchro` | 19 × Frev  | `04C0_0000`  | yes         | AGS bunch frequency, sent to the AGS as its RF loop reference |
| `u_kicker`  | Frev / 4   | `0010_0000`  | yes         | kicker clock; the kick is taken from its zero crossing |

Harmonic 19 is the AGS bunch frequency. The RHIC/AGS circumference ratio is
19/4, and the AGS runs at RF harmonic 4. The kicker clock runs at Frev/4
because the target AGS bunch passes the kicker once every four RHIC turns.

## One synthesizer channel (`nco`)

```
 host writes ──► hold A ──strobe──► act A ─┐
             ──► hold B ──strobe──► act B ─┤mux├─► phase accumulator ─► phase ALU ─► sine/cos ROM ─► sin_out, cos_out
             ──► count ──► hop counter ────┘           (+= dphi)        (+ offset)   (top 12 bits)
             ──► phase offset ─────────────────────────────────────────────┘
```

- **Strobe.** `A` and `B` are written into holding registers. They reach the
  accumulator only on `strobe`. The top drives one strobe into all three
  channels, so after reset they all start from phase 0 on the same clock. From
  then on the shared clock keeps their phases in a fixed relation. Until the
  first strobe the accumulator stays at 0, and the output phase equals the
  phase offset.
- **Hop counter** (`dds_hop_counter`). A `start` pulse loads `count`.
  `sel_b` is high for exactly `count` clocks, starting on the clock after
  `start`. `hop_done` pulses once at the end. A count of 0 means no hop. A new
  `start` during a hop reloads the counter.
- **Phase accumulator** (`dds_phase_accumulator`). `phase <= phase + dphi`,
  modulo 2^32.
- **Phase ALU** (`dds_phase_alu`). Adds the phase-offset register. This sets
  the absolute phase of the output.
- **Sine/cosine ROM** (`dds_sincos_lut`). Holds 4096 × 12-bit samples of one
  sine period, `round(2047 * sin(2*pi*i/4096))`. The table is computed at
  elaboration. The cosine is read from the same table a quarter period ahead.
  These samples would feed a DAC and an anti-alias filter, which are analog
  and not part of the RTL.

**Timing:**

- After a strobe, or after the mux changes, the accumulator updates on the
  next clock.
- `phase` follows the accumulator one clock later.
- `sin_out` and `cos_out` follow `phase` one clock later.
- `clk_out` is `phase[31]`, a square wave at the output frequency.

### Host registers

All registers are 32 bits. In the top, `wr_sel` picks the channel
(0 RF, 1 synchro, 2 kicker). `wr_addr` picks the register:

| `wr_addr` | register      | takes effect |
|-----------|---------------|--------------|
| 0         | delta phase A | on the next `strobe` |
| 1         | delta phase B | on the next `strobe` |
| 2         | phase offset  | immediately |
| 3         | hop count     | on the next `start` |

The write port is a simple one-clock write strobe. The real boards sit on a
VME bus under a front-end computer; that bus interface is not built here.

## Working out a phase advance

The host computes the hop for each transfer. The hardware only carries it out.
For a pattern of `nb` equally spaced bunches:

```
dphi_kicker  = 360 deg / nb                          (degrees of one RHIC turn)
dphi_synchro = (90 deg + 19/4 * dphi_kicker) * 4     (degrees of the synchro reference)
```

The 90° term brings the next of the four AGS bunches under the kicker. The
19/4 term follows the kicker reference as it moves around RHIC. The kicker
clock itself moves by `dphi_kicker / 4` of its own cycle, because it runs at
Frev/4.

To turn an angle into a hop:

1. `total = angle / 360 * 2^32`, in phase units.
2. `N0 = Fclock * fill_time`. The fill time is nominally 66 2/3 ms, for four
   transfers per AGS pulse at 15 Hz.
3. `delta = ceil(total / N0)`. Program `B = A - delta`.
4. `N = round(total / delta)`. Program `count = N`.

Step 4 recomputes the length from the rounded `delta`, so the advance lands
within `delta / 2` units of the target.

**Example: 60-bunch pattern at γ = 10.52.** The RF frequency is 28.023 MHz, so
Fclock = 79.7 MHz. For the synchro this gives 474°, `delta` = 1065 and
N = 5,309,897 clocks (66.6 ms). For the kicker it gives 1.5°, `delta` = 4 and
N = 4,473,925. An advance of more than one full turn, like the synchro's 474°,
is fine: the accumulator works modulo 2^32.

The smallest frequency step is one unit of `delta`, which is Fclock / 2^32 =
18.6 mHz at this clock. A DDS clocked at 28.0 MHz would give 6.5 mHz.

## Kicker trigger (`kicker_trigger`)

The timing system arms the trigger once per transfer with `kick_arm`. The
trigger then waits while the phase advance runs. `cog_busy` is high while
either hop counter is counting, and also on the `start` clock itself.

Once the advance is over, the trigger fires on the next positive-going zero
crossing of the kicker clock. That is the clock after `kck_phase` wraps from
near 2^32 back to 0 (its top bit falls). `kick` is a one-clock pulse, after
which the trigger disarms. `kick_count` counts kicks since reset.

Two details are choices of this design and are not taken from a published
circuit: the exact edge used, and waiting for both hops to end. The settling
time of the AGS RF loop after the hop is also not modelled. If a delay is
needed before the kick, the timing system must supply it by arming later.

## Top level (`rhic_cogging_top`)

The top instantiates the three channels and the trigger. `cog_start` starts
the synchro and kicker hops together. `cog_done` pulses when both have ended.

The top brings out each channel's phase, square wave, sine and cosine. It does
not contain:

- the master oscillator (the `clk` input);
- the DACs and anti-alias filters (the sine outputs);
- the front-end computer (the register port);
- the timing system (`kick_arm`).

Parameters: `W` = 32 (phase width), `LUT_ADDR_W` = 12 and `AMP_W` = 12 (ROM
size). `nco` also has `HAS_COUNTER`, which is 0 for the RF channel.

## Files

| file | contents |
|------|----------|
| `rtl/cog_pkg.sv` | widths, register and channel enums, nominal delta phase words |
| `rtl/dds_phase_accumulator.sv`, `rtl/dds_hop_counter.sv`, `rtl/dds_phase_alu.sv`, `rtl/dds_sincos_lut.sv` | the parts of one channel |
| `rtl/nco.sv` | one synthesizer channel |
| `rtl/kicker_trigger.sv` | the kick from the kicker clock |
| `rtl/rhic_cogging_top.sv` | the complete system |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cog_host_pkg.sv` | the host arithmetic above, in the testbench |
| `tb/tb_cog_run.sv` | the end-to-end driver, used by the three system tests |
| `tb/tb_rhic_cogging_top.sv` | 3 transfers with a 0.5 ms fill time (fast) |
| `tb/tb_rhic_cogging_full.sv` | one AGS pulse: 4 transfers at 66 2/3 ms, about 21 M clocks |
| `tb/tb_rhic_fill_55of60.sv` | a whole fill, 55 bunches on a 60-bunch pattern, about 292 M clocks |

## Verification

Every testbench checks its module against values it works out itself. Each
one ends with a line `TB_RESULT checks=N failures=M`.

The system tests check the following:

- **RF channel.** Compared on every clock with the closed form
  `(k-1) * A_rf`, where `k` counts clocks since the strobe.
- **Synchro and kicker channels.** After each transfer, compared with their
  unhopped phase minus the planned `N * delta`.
- **Hop length.** Measured from the phase slope.
- **Landing error.** Checked against the planned angle.
- **Kick.** Must come on the clock after a kicker-clock zero crossing, never
  during an advance, and once per arm.

The system tests also count each mechanism: strobe latch, synchro hop, kicker
hop, kick held off by a running advance, and kick. A mechanism that never
happens counts as a failure.

All three system tests run the design at its default sizes. Run times with
Verilator: the full-size test takes about 15 s, the complete fill 3 to 4
minutes.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rhic_cogging_full \
    rtl/cog_pkg.sv tb/tb_cog_host_pkg.sv rtl/dds_*.sv rtl/nco.sv rtl/kicker_trigger.sv \
    rtl/rhic_cogging_top.sv tb/tb_cog_run.sv tb/tb_rhic_cogging_full.sv
./obj_dir/Vtb_rhic_cogging_full
```

For a single module, replace the top module and the testbench file, for
example `--top-module tb_nco ... tb/tb_nco.sv`. To try another fill pattern or
fill time, change `BUNCHES`, `TRANSFERS` or `FILL_TIME_S` on `tb_cog_run` in a
wrapper. The host arithmetic follows automatically.

## Limits and departures

- **Sizes chosen here.** The ROM size, the sample width, the pipeline
  registers, the register map and the reset of the phase-offset register.
- **The trigger's firing rule.** The kicker trigger's arming rule and firing
  edge are chosen here; only their purpose is given.
- **Host rounding.** In the testbench host arithmetic, `delta` is rounded up
  so that the recomputed hop never runs past the fill time. The published
  procedure only says to divide, then recompute the tick count.
- **Not modelled.** Anything analog or outside the logic: the master oscillator
  and its frequency control word, the DACs and filters, and the AGS and RHIC RF
  loops.
