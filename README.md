# Power management unit for an energy-harvesting nonvolatile processor

A batteryless sensor node runs from a small storage capacitor. An RF or solar
harvester fills the capacitor, and the processor drains it. The input power
swings over orders of magnitude. When the capacitor is full, harvested energy
is wasted. When it runs dry, the processor must save its state. A nonvolatile
processor (NVP) saves its state into ferroelectric flip-flops, so nothing is
lost, but every backup and restore costs energy that does no useful work.

This RTL is the digital power management unit (PMU) that sits beside such a
processor. It aims for as many instructions per harvested joule as possible, in
two ways:

* **Fewer and later backups.** When stored energy reaches the backup
  threshold, the unit does not always back up at once. The input power is
  often low but not zero. A small learned table says how many more
  instructions can still run, and sometimes the energy comes back before the
  backup is needed at all. A double-buffered checkpoint makes this
  speculation safe.
* **Matching consumption to income.** Once per timestep (200 ms for RF, 1 s
  for solar) the unit retunes the processor clock, and optionally the supply
  voltage. The goal is to hold the capacitor between 70 % and 90 % full. Three
  reactive policies search for the right frequency, and a 100-entry learning
  table remembers the result for each (input power, stored energy)
  combination.

The design follows the PMU described in the article *Dynamic Power and Energy
Management for Energy Harvesting Nonvolatile Processor Systems*. The article
gives the partition into units, the policies, the table sizes and the
operating points. Widths, handshakes, encodings and reset behaviour are
choices made here. They are listed in the "Where this RTL chooses for itself"
section below.

## Block map

```
 p_in_i ──► level_detector x3 ──► energy band (tenths of capacity)
 e_cap_i                          power band / p_th  (ALD index, below threshold)
                                  power band / p_max (DFL index, above threshold)
                │
                ▼
 ┌──────────── epu ─────────────┐        ┌───────────── cvu ──────────────┐
 │ system state machine         │freq_min│ dfl (100 x {5-bit freq, valid}) │
 │ warning → lowest frequency   ├───────►│   └ freq_policy (LinP/EBLP/DTT) │
 │ ald (10 x instruction count) │        │ DVR: freq → supply target       │
 └──────┬───────────────────────┘        │ gated clock control             │
        │ backup / restore               └──────┬─────────────────┬────────┘
        ▼                                       │ freq code       │ gate
 ┌──── bru ─────┐  addr/sel  ┌─ nvm_backup ─┐   ▼                 ▼
 │ PC, RegFile  ├──────────►│ 2 slots +     │  clk_select: 32 clocks → glitch-free
 │ start/finish │◄──────────┤ atomic flags  │  mux → AND gate → sys_clk_o
 └──────────────┘  readback  └──────────────┘
 policy_timer: one tick per 200 ms (RF) or 1 s (solar) of the 32 kHz reference
```

| Module | Role |
|---|---|
| `nvp_pkg` | Frequency code, band index, policy and state enums, event struct |
| `level_detector` | Compares a sampled value with 9 ascending thresholds, giving band 0..9 |
| `policy_timer` | Timestep pulse |
| `epu` | System power states, warning override, backup trigger; contains `ald` |
| `ald` | Adaptive Learning Detection: defers or skips backups |
| `bru` | Backup and Recovery Unit: sequences checkpoint transfers |
| `nvm_backup` | Double-buffered checkpoint store with input/output muxes and flags |
| `cvu` | Frequency and voltage choice, clock gate; contains `dfl` |
| `dfl` | Dynamic Frequency Learning table and state machine; contains `freq_policy` |
| `freq_policy` | The three reactive policies |
| `clk_select` | Glitch-free 32-way clock multiplexer and clock gate |
| `nvp_pmu_top` | Wires all of the above together |

The processor core, the oscillators and the analog front end (charger,
capacitor, DC-DC converter, LDO, analog sensors) are outside this RTL. Their
signals are ports of `nvp_pmu_top`.

## Encodings

* **Frequency code** `c` (5 bits) means `(c+1) × 32 kHz`. The 32 codes cover
  32 kHz to 1.024 MHz. The policies think in the *scaled frequency*
  `s = c + 1`, from 1 to 32.
* **Bands** (4 bits, 0..9). Stored energy band `k` means
  `k × 10 % ≤ E/E_full < (k+1) × 10 %`. The policy thresholds are band
  edges: E_thH = 90 % (band 9), E_thM = 80 % (band ≥ 8), E_thL = 70 % (band
  ≥ 7). The ALD indexes power in tenths of `p_th_i`. The DFL indexes power in
  tenths of `p_max_i`.
* **Warning**: `p_in_i < p_th_i`. The input power is below the level at which
  the processor can run from income alone.
* **Energy thresholds** (`e_back_i`, `e_resume_i`, `e_min_i`) are in the same
  units as `e_cap_i`. The backup starts at or below `e_back_i`. The system
  (re)starts above `e_resume_i`. Below `e_min_i` the processor is assumed
  dead; the ALD uses this level to turn leftover energy into an instruction
  count.

## System states and the backup path (`epu`, `ald`, `bru`, `nvm_backup`)

```
OFF/HALT ──E > e_resume──► RESTORE ──BRU done──► RUN
RUN ──E ≤ e_back──► DELAY ──ALD: back up──► BACKUP ──BRU done──► HALT
DELAY ──ALD: energy came back──► RUN
```

`freq_min_o` forces the lowest frequency while the warning is up and in every
state except RUN. This stretches the stored energy in case the dip is short.
The processor clock runs only in RUN and DELAY.

**ALD.** On an emergency, the unit looks up the entry for the current power
band.

* *Invalid entry:* the backup starts immediately. Afterwards, the energy still
  left above `e_min_i`, divided by the pessimistic energy per instruction
  `epi_i`, becomes the entry's count, and the entry is marked valid.
* *Valid entry:* the entry is first marked **invalid**. Then the processor
  runs `N` more instructions, counted by `instr_tgl_i` toggles. If energy is
  above `e_back_i` at the end, no backup is made. Otherwise the backup runs.
  In both cases the entry is marked valid again afterwards.

If power dies during the extra instructions or the backup, the entry stays
invalid. Because the table is nonvolatile, a prediction that proved too
aggressive removes itself.

**Checkpoint safety.** `bru` writes the slot that does *not* hold the newest
valid image. At the start of a backup it points the "newest" flag at that slot
and clears the slot's valid flag. The valid flag is set again only after the
last byte is written. A backup cut short by power loss therefore leaves the
newest slot invalid. The next restore then falls back to the older slot and
pulses `ev_o.rollback`. A transfer runs in two phases, PC then register file.
Each phase raises its `*_start_br_o`, waits for the unit's `*_finish_br_i`, and
then moves one byte per cycle through the store's multiplexers (`sel1` picks
the source on backup, `sel2` the destination on restore).

Nonvolatile state is the checkpoint slots and flags, the ALD table and the DFL
table. `rst` does not clear it. Only `nv_init_i`, a factory clear, does.

## Frequency policies (`freq_policy`)

Each policy acts once per timestep, and only after stored energy has first
risen above E_thH. Until then the frequency stays at the minimum.

| Energy this step | LinP | EBLP | DTT |
|---|---|---|---|
| above E_thH | `s+1` | exponential: `s×2` (after the first overshoot only up to `s_over/2`, then `s+1`) | `s+1` (direction up) |
| just fell through E_thH | hold (1st misprediction) | 1st: remember `s_over = s`, drop to minimum; in linear phase: `s−1`, **settled** | turn down: `s−1` |
| just fell through E_thM | `s−1`, **settled** (2nd misprediction) | (linear phase) `s−1` | continue direction |
| below E_thL | `s−1` every step | `s−1` every step | continue direction |
| just rose through E_thL | – | – | turn up: `s+1`, **settled** (every upward turn after a downward one) |

Example traces from the tests (scaled frequency):

* **LinP:** 2, 3, 4, 5, 6, then hold at 6 while energy is between E_thM and
  E_thH. One step down to 5 on falling through E_thM.
* **EBLP:** 2, 4, 8, 16, 32, then overshoot and drop to 1. It climbs again
  exponentially to 16 (half of 32), then linearly 17, 18. The second overshoot
  takes it to 17, where it stays.
* **DTT:** climbs while energy is high. It reverses on falling through E_thH
  and reverses again on rising back through E_thL. It keeps oscillating in a
  narrow band around the break-even frequency.

`settled_o` marks "a stable frequency was found". The learning table uses it.
`restart_i` (the EPU override) returns any policy to the minimum and its
initial phase.

## Frequency learning (`dfl`)

The 100-entry table holds, for each (power band, energy band) pair, the
frequency a search settled on. It acts on timesteps where energy is in band 9:

* **PREDICT.** Valid entry: load its frequency and go to VALIDATE. Invalid
  entry: go to SEARCH.
* **SEARCH.** The policy runs normally. On `settled` its frequency is written
  to the entry that started the search.
* **VALIDATE.** The policy is frozen for 20 (LinP), 15 (EBLP) or 10 (DTT)
  timesteps. If either band changes in that time, the entry is invalidated.

On other timesteps the policy simply runs. With `dfl_en_i` low the table is
bypassed.

## Clock switching and voltage (`cvu`, `clk_select`)

`clk_select` receives one clock per code, so `clk_in_i[c]` must run at
`(c+1) × 32 kHz`. A clock's enable is requested only when it is selected *and*
every other enable is off. The request passes two flip-flops on the falling
edge of that clock. The output is the OR of `clk & enable`. Switching takes
two cycles of the old clock plus two of the new one, and never produces a
runt pulse. The output then passes an AND gate. The gate's enable
(`gate_en`) is resampled on the falling edge of the selected clock.
`cvu` holds `gate_en` low for `HOLD_CYCLES` (2) reference cycles after every
frequency change, and whenever the EPU stops the processor.

With `dvr_en_i` set, `vdd_mv_o` is the minimum supply for the selected
frequency. It is interpolated linearly between 760 mV at 32 kHz and 1310 mV at
25 MHz, then rounded up, which gives 760–782 mV over the 32 codes. Without
DVR it stays at the top code's value, 782 mV.

## Top-level interface and timing

* `clk` is the always-on reference clock, assumed to be 32 kHz. All PMU logic
  runs on it. `RF_CYCLES = 6400` and `SOLAR_CYCLES = 32000` reference cycles
  make the 200 ms and 1 s timesteps.
* `p_in_i` and `e_cap_i` are sampled power and energy codes (16 bits). The
  thresholds are runtime inputs.
* Processor side:
  * `pc_i` and `rf_rdata_i` (the register-file byte at `br_addr_o - 2`) feed
    backups. `pc_ld_o`/`pc_byte_o` and `rf_we_o`/`rf_byte_o` write restored
    bytes; PC bytes are little-endian at addresses 0–1.
  * `*_finish_br_i` are taken as synchronous to `clk`.
  * `instr_tgl_i` toggles once per retired instruction. It is synchronised
    to `clk` by three flip-flops. Instructions are counted only in DELAY,
    where the processor runs at the lowest frequency, so the toggle is slow
    enough to be seen. It must not toggle more often than every two
    reference cycles.
* Outputs:
  * `sys_clk_o` is the gated processor clock.
  * `freq_code_o` and `vdd_mv_o` are registered.
  * `ev_o` (`pmu_events_t`) carries one-cycle strobes for every mechanism.
* Latencies:
  * A backup takes 21 cycles (flag clear, 2 PC bytes, 16 register bytes,
    commit, and one request cycle) plus the two finish waits. A restore takes
    19 cycles plus the waits.
  * A frequency decision appears one cycle after the timestep tick.

## Where this RTL chooses for itself

These choices are this design's own, not taken from the article:

* Power and energy sensing: digital compare of sampled codes. The article's
  detectors are analog comparator ladders.
* The resume threshold as a separate input. The article only asks that
  enough energy for a backup be stored before the processor restarts.
* The byte-serial checkpoint transfer, and a register-file image of 16 bytes.
* ALD counts **instructions**. One figure of the article says "cycles", but
  its text says instructions. ALD entries are 16 bits.
* DTT turn points: falling through E_thH turns it down, rising through E_thL
  turns it up. The settle points of EBLP and DTT, which the article only
  calls "equivalent" to LinP's second overshoot.
* LinP and EBLP step down once per timestep below E_thL.
* DFL validation lengths per policy. The article only gives the range 10–20.
  DFL invalidates when *either* band changes, which covers both wordings in
  the article.
* Linear DVR interpolation between the two measured operating points.
* The 2-cycle clock hold after a switch, and the falling-edge clock-mux
  synchronisers.
* Not built: a subtractor drawn in the ALD figure ("No. of inst. − m"),
  because its operand is never explained. Training the tables from stored
  traces, because the tables learn online.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_level_detector` | 2000 random ladders; band and thermometer code against a search |
| `tb_policy_timer` | Tick spacing for RF and solar, restart on source change |
| `tb_nvm_backup` | Both slots through both muxes; flags set, clear, survive, init |
| `tb_bru` | Cold start, restore, slot alternation, exact latency, rollback after a backup interrupted by reset |
| `tb_ald` | Immediate backup and learning, exact deferral count, elision, invalidation by power failure, independent entries, init |
| `tb_epu` | State sequence, resume threshold, warning override, conventional and ALD-deferred backups, elision |
| `tb_freq_policy` | Hand-derived step-by-step traces of LinP, EBLP, DTT, load |
| `tb_dfl` | Search and learn, survival across reset, prediction, validation window, invalidation, disable |
| `tb_cvu` | All 32 steps: code, supply target against real-valued interpolation, clock-gate hold; DVR off; override |
| `tb_clk_select` | Output rate after each switch, switch latency bound, minimum pulse width under random switching, gating |
| `tb_nvp_pmu_top` | End to end with 16/40-cycle timesteps (see below) |
| `tb_nvp_pmu_full` | The same scenario with every parameter at its default (about 2.5 min) |
| `tb_nvp_pmu_trace` | Closed loop: capacitor and processor energy model, generated power traces, nine policy combinations on RF-style input, plus a solar day (about 1.5 min) |

The end-to-end tests play the front end and the processor. They script the
power and energy samples, drive 32 real clocks, and model a processor whose
PC and registers change every two system clocks. Along the way they check:

* restored state against the last committed checkpoint, including after a
  deliberately interrupted backup;
* the system clock rate against the frequency code;
* the DVR supply target.

The tests also count every mechanism and fail if any never happened: backup,
restore, rollback, ALD delay, elision and learning, DFL hit, learn and
invalidation, warning override, frequency change, frequency increase by each
of the three policies, and DVR changes.

### Closed-loop runs

`tb_nvp_pmu_trace` closes the loop. The testbench models the capacitor:

* Each reference cycle it gains `p_in/100` units.
* It loses 4 units per system-clock edge, plus 20 units of static energy
  while the processor runs or a checkpoint moves.
* Capacity is 10,000 units. Energy above that is counted as wasted.
* Below `e_min` a running system loses power.

The input is a generated trace with 16-cycle timesteps. Strong segments
(5000–16000) alternate with weak ones (0–2000, below the warning threshold).
Nine runs use the same trace: a lowest-frequency baseline, then LinP, EBLP and
DTT with the ALD, each without and with the learning table. Two final runs
train the table on one trace and test it on a second without clearing it.
A last pair of runs uses a solar day with 40-cycle timesteps: a half-sine of
power with cloudy stretches at a quarter strength. It compares the baseline
with DTT + ALD + DFL.

The test checks these things:

* Every restore returns the last checkpoint.
* Each policy run retires more instructions and wastes less energy than the
  baseline, on both kinds of input.
* The trained table makes predictions on the new trace.

One typical run:

| Run | Instructions | Backups | Wasted |
|---|---|---|---|
| baseline (lowest frequency) | 2,725 | 4 | 163,008 |
| LinP + ALD | 10,922 | 4 | 98,748 |
| EBLP + ALD | 17,429 | 6 | 48,472 |
| DTT + ALD | 10,749 | 4 | 100,352 |
| LinP + ALD + DFL | 11,207 | 4 | 97,768 |
| EBLP + ALD + DFL | 17,469 | 5 | 48,528 |
| solar day, baseline | 2,979 | 1 | 325,416 |
| solar day, DTT + ALD + DFL | 19,751 | 4 | 195,476 |

In this model EBLP does best, because its exponential climb catches short
strong segments. DTT rarely completes the down-then-up turn that counts as
settled, so its learning table stays almost empty. The energy model is crude,
so these numbers show that the mechanisms work together. They do not measure
the real chip.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_nvp_pmu_top rtl/nvp_pkg.sv tb/tb_nvp_pmu_top.sv
./obj_dir/Vtb_nvp_pmu_top
```

## Limits

* Only the PMU is built. Energy numbers such as forward-progress gains depend
  on the processor, the benchmarks and the analog front end, none of which is
  here.
* Clock-domain crossing of the multi-bit frequency select into `clk_select`
  relies on the per-clock synchronisers and the interlock. A select that
  changes bit by bit can briefly request an intermediate clock. This costs
  time but cannot produce a glitch.
* `clk_select` and `cvu` build clocks from logic (mux, AND gate). A physical
  implementation would replace these with library clock-gating and
  clock-mux cells.
