# SiRF PUF — shift-register, reconvergent-fanout physically unclonable function

A physically unclonable function (PUF) turns tiny manufacturing differences
between chips into a key that is never stored. The SiRF PUF does this with
path delays. A deliberately built network of FPGA shift-register LUTs and
logic gates contains tens of millions of distinct signal paths. A challenge
picks one path at a time. A carry-chain time-to-digital converter (TDC)
measures how long an edge takes to get through that path.

Thousands of such delays are then turned into bits in four steps:
- pair rising-edge and falling-edge delays and take their differences;
- normalise the differences against chip-wide speed and temperature/voltage
  shifts;
- centre each difference using a server-supplied offset, so that it is
  equally likely to be positive or negative across a population of chips;
- keep only the values far from zero, and vote several of them into one key
  bit.

This repository holds synthesizable SystemVerilog for the device side of the
PUF: the path network, the TDC's digital half, the measurement sequencer and
the whole bit-generation engine. It also has a self-checking testbench for
every module and an end-to-end testbench that enrolls a key and regenerates
it at the default sizes.

## The engineered path network (`sirf_netlist`)

### Structure

The network has 3 rows of 8 modules. Row 2 is where edges enter and row 0 is
where they leave. Every module (`sirf_module`) contains, in order:

1. four XNOR gates, whose outputs are the shift clocks of
2. four 32-bit circular shift registers used as LUTs (`sirf_srl`, an SRL32),
3. a row of four non-inverting gates, RFM_A (`sirf_rfm`),
4. four 4-to-1 MUXs,
5. a second gate row, RFM_B,
6. four more 4-to-1 MUXs, whose outputs are the module's four outputs.

Reconvergent fanout comes from three sources:
- each gate takes two or three neighbouring signals;
- each MUX can bypass the gate row before it;
- each MUX can pick a signal arriving from a neighbouring module instead of
  a local one.

Each module in column c exports three RFM_A outputs (`ro_a`) to column
c−1 and three RFM_B outputs (`ro_b`) to column c+1. The row wraps around
(modulo 8).

The 32 outputs of a row drive the 32 XNORs of the row below. The 32 outputs
of row 0 go to a 32-to-1 path-select MUX, whose output (`path_out`) drives
the TDC. Row 2 is clocked by 32 launch flip-flops.

### Challenge

One path is chosen by 771 configuration bits (`net_chal_t`) plus a 5-bit
path select. Per row there are 257 bits. For each of the 8 modules:
- four 4-bit shift-register addresses (`src`);
- two 2-bit MUX selects for each of the four MUX_A and four MUX_B.

Each row also has one transition-direction bit (`tdc`).

### How a shift register makes an edge

Each shift register holds the pattern `0101…01` (bit 0 is 0). Its address
is `{src, tdc}`. A rising shift clock rotates the register by one place, so
every bit toggles. The addressed output therefore makes exactly one
transition: rising if the direction bit is 0, falling if it is 1.

Every LUT of a row uses the same direction bit, and every gate and MUX is
non-inverting. As a result, all outputs of a row move the same way.
Combinational hazards therefore cannot produce extra edges.

### Chaining the rows

The next row's shift registers need rising clocks. Each row's XNORs are fed
the complement of the previous row's direction bit. A falling row output
therefore becomes a rising shift clock (`clock = out XOR tdc_prev`). Row 2's
XNORs see a constant 1, and the launch flip-flops drive them with a rising
edge.

### One measurement

- **Rest state.** The launch flip-flops are clear and every register holds
  its initial pattern. Every output then sits at its row's direction bit and
  every shift clock is low.
- **Launch.** `launch_set` raises the flip-flops. Row 2's registers rotate,
  row 1 follows, then row 0, and `path_out` makes one transition. That
  transition is rising when row 0's direction bit is 0.
- **Restore.** The registers must get back to their pattern before the next
  launch. While the launch flip-flops are still set, a one-cycle `sr_disable`
  pulse forces every shift clock low and releases it. This rotates every
  register once more, which restores the alternating pattern. The outputs
  return, and `launch_clr` then clears the flip-flops.
- **Init.** `init`, which is tied to reset in the top, reloads all patterns
  asynchronously.

### What the RTL does not model

The RTL is zero-delay. It reproduces exactly which transitions reach the
output for any challenge, but the delay itself only exists in the FPGA
fabric. Placement and routing are what make the paths differ. The source
also spreads the modules over a wide region of the device to cancel
localised bias. None of this is expressed in the RTL, and neither the RTL
nor its constraints express placement.

### Gate types and MUX wiring

These are this design's choices. The source names AND, OR and AND-OR gates
but does not give the gate at every position or the exact MUX input wiring:
- **RFM_A** gates 0–3 are AND, OR, AND, AND-OR.
- **RFM_B** gate 3 is AND-OR. Gates 0–2 are AO/AO/AO, AND/AND/AND or
  OR/OR/OR for columns with `c mod 3` = 0, 1, 2.
- **Gate inputs.** Gate k takes inputs k and k+1, and the AND-OR also takes
  k+2 (all modulo 4). See `sirf_pkg::rfm_a_gate` / `rfm_b_gate`.
- **MUX_A j** inputs are (LUT j, gA[j], ri_a[j mod 3], gA[j+1]).
- **MUX_B j** inputs are (MUX_A j, gB[j], ri_b[j mod 3], gB[j+1]).

The source does fix the kinds of MUX input. The shift-register outputs
reach the first MUXs directly as well as through the gates. The second
stage mirrors this: each MUX_A output reaches MUX_B directly as well as
through RFM_B.

All of these are single points in `sirf_pkg.sv` and `sirf_module.sv`.

## Measuring a delay

### The carry chain (not included)

The carry chain is a line of FPGA carry buffers. `path_out` enters at one
end, and each buffer output is a tap. It has no logic function, only delay,
so it is not part of the RTL. The top drives `path_out` out and takes the
`TAPS` tap outputs back in on `cc_taps`.

### TDC (`sirf_tdc`)

On `capture` the TDC registers the taps in thermometer flip-flops and
XORs them with the pre-transition level (`polarity`). This makes "reached"
read as 1 for both rising and falling edges. The decoder counts the ones,
so a stray bubble costs one count rather than breaking the code.

The sample is `TAPS − ones`: a longer path has reached fewer taps at
capture time, so it reads larger. The sample appears two cycles after
`capture`. `TAPS` defaults to 2048; the source gives no chain length.

### Sequencer (`sirf_tdc_ctrl`)

One sample runs launch → wait `CAPTURE_DLY` cycles → capture → disable →
clear. That is `CAPTURE_DLY + 4` cycles per sample, repeated
2^`samples_log2` times.

`CAPTURE_DLY` stands for the fixed launch-to-capture interval of the real
implementation. On an FPGA it would be a phase-shifted clock rather than a
cycle count.

### Averaging (`sirf_storage`)

`sirf_storage` sums the samples of one path. It writes
`(sum << 4) >> samples_log2`, the mean with 4 fractional bits and truncated,
as a 16-bit delay value (DV) into the DV memory.

## From 4096 delays to key bits

A challenge covers 4096 paths. DV 0–2047 are taken with rising transitions
in the first row the edge passes, row 2 (DV_R). DV 2048–4095 are taken with
falling ones there (DV_F). The host decides this through the direction bit
`rows[2].tdc` of the challenge it supplies.

1. **DVDiff (`sirf_dvdiff`, `sirf_lfsr11`).**
   - Two 11-bit LFSRs, loaded with the user seeds, pick the pairs:
     `DVD[k] = DV_R[lfsr_r] − DV_F[lfsr_f]`, with 2048 differences per
     iteration, saturated to 16-bit signed.
   - A maximal-length LFSR has only 2047 states. The all-zero state is
     therefore spliced in (polynomial x^11 + x^9 + 1 with de Bruijn
     extension), so each LFSR visits all 2048 addresses once and every DV is
     used exactly once.
   - Different seed pairs give different DVD sets from the same
     measurements. This is how further iterations produce more bits without
     re-timing.
   - Throughput is 3 cycles per difference.
2. **GPEVCal (`sirf_gpevcal`, `sirf_divider`).**
   - The first pass finds the mean (sum >> 11, floor), the minimum and the
     maximum.
   - The second pass writes
     `DVD_c = trunc((DVD − mean) · rc · 16 / (max − min))`, saturated and
     with 4 fractional bits. `DVD_c` is 0 if the range is 0.
   - Subtracting the mean removes chip-to-chip speed differences. Dividing
     by the range scales away most temperature and voltage effects.
   - `rc` (the range constant) sets the width of the result.
   - The divide is a one-bit-per-cycle restoring divider, taking 35 cycles
     at NW = 34.
3. **SpreadFactors (`sirf_spreadfactors`).**
   - The server computes, for every index, the median of DVD_c across a
     sample of chips. It may add a small random offset that keeps the sign,
     and it decides whether that index should be mirrored.
   - It sends one 17-bit word `{flip, SF}` per index. The device computes
     `DVD_cr = flip ? −(DVD_c − SF) : (DVD_c − SF)`.
   - Because the median is removed, each index splits the population evenly
     around 0. The word is not secret.
   - The unit streams one value per cycle into BitGen.
4. **BitGen (`sirf_bitgen`).**
   - **Strong bits.** A value is strong when it is strictly above
     +threshold or strictly below −threshold. Its bit is `DVD_cr > 0`.
     Threshold uses the same 4-fraction-bit format, so 3.0 is 48.
   - **Enrollment.** Strong bits are grouped. The first strong bit of a
     group sets the group's value. Later strong bits of the same value join
     the group, and strong bits of the other value are skipped. When XMR
     bits have joined, one key bit is emitted.
   - **Helper data.** There is one helper-data bit per index, 1 for "used in
     a group". It is streamed out and also written to the helper-data
     memory.
   - **Regeneration.** The host loads the helper data back, and BitGen takes
     the marked indices in groups of XMR and outputs the majority. Up to
     (XMR−1)/2 flipped bits per group are corrected.
   - **Yield.** On average a group consumes 2·XMR−1 strong bits.
   - **Partial groups.** A final partial group gives no bit, in either mode.
   - **Helper data at `xmr = 1`.** With `xmr = 1` the helper data is simply
     the strong/weak flag of each index. At higher levels a skipped strong
     index is also marked 0, because regeneration has to rebuild the same
     groups.

## Using the top (`sirf_puf_top`)

### Setup

Set the user parameters before an iteration. They must not change while
`busy` is high:
- `mode` (enroll/regenerate);
- `do_timing`;
- `seed_r`, `seed_f`;
- `rc`;
- `threshold`;
- `xmr`;
- `samples_log2`.

The host also loads memories while the engine is idle:
- SpreadFactor words, through `host_sf_we/addr/wdata`;
- for regeneration, helper data through `host_hd_we/addr/wdata`.

### Running an iteration

Pulse `start`.

1. **Path timing** (only if `do_timing`). For each index 0…4095 the top
   raises `chal_req` with `chal_idx`. The host answers at any later cycle
   with `chal_valid` and the configuration vector `chal` and path select
   `chal_path`. These are latched, so the host may then change them. The
   top then measures and stores that DV.
2. **DVDiff**, then **GPEVCal**.
3. **SpreadFactors and BitGen** stream together. Key bits appear on
   `key_valid/key_bit`, and in enrollment the helper data appears on
   `hd_valid/hd_bit`, both in index order.

`done` pulses at the end.

### Longer keys

To build a key longer than one iteration gives, run further iterations with
`do_timing = 0` and new seeds, then concatenate the key streams. The DV stay
in memory, so these iterations skip path timing, which is the slow part.

For a 256-bit key, XMR 3 needs about one iteration and XMR 11 about four.

### Cost of one iteration

One enrolling iteration with timing, 4 samples per path and
`CAPTURE_DLY = 2` took 202,825 cycles in simulation. An iteration without
timing took about 90,000 cycles.

## Where this design departs from, or adds to, its source

- **XNOR inputs.** The source says the row's direction bit drives one input
  of the next row's XNORs. An XNOR only inverts when that input is 0, so
  rising-after-falling only works if the complement of the direction bit is
  fed. That is what is built.
- **Shift-register address.** The netlist drawing labels the register
  address field `addr[5:1]` but draws it as a 4-bit bus beside a 5-bit
  address. The design follows the widths: `{src[3:0], tdc}`.
- **Own choices.** The following are all this design's own, because the
  source does not describe them:
  - restoring the registers after each launch;
  - holding the netlist's disable in the cycle a challenge is taken and the
    next one. At rest every shift clock is 0, so this has no logical effect.
    In silicon it stops new direction bits and addresses, which arrive at
    slightly different times, from glitching a shift clock;
  - the launch-flip-flop set/clear;
  - the request/valid challenge handshake;
  - the split of the engine's memory into five arrays;
  - the `{flip, SF}` word format;
  - the TDC length;
  - averaging over a power-of-two number of samples.
- **XMR procedure.** The source describes it only through its yield
  (2·XMR−1 strong bits per key bit). The grouping above is one procedure
  that has that yield.
- **Not included.** Server-side functions are not part of the device: the
  timing database, SpreadFactor computation and path characterisation. The
  authentication, session-key and TRNG functions the source lists in its
  resource count are only named there, so they are not included either.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with an
independent model. Each prints `TB_RESULT checks=… failures=…`.

### Module tests

| Module | What the testbench checks |
|---|---|
| `sirf_srl` | Rotation and the disable mux. |
| `sirf_rfm` | All inputs against a gate table. |
| `sirf_module` | Random challenges against an evaluation of the gate network, including the neighbour signals. |
| `sirf_row` | Random challenges against an evaluation of the gate network, including the neighbour signals. |
| `sirf_netlist` | Idle level, exactly one `path_out` transition per launch in the expected direction, every row transitioned, full restore of every shift register and clear launch flip-flops. |
| `sirf_tdc` | Decode against a ones count. |
| `sirf_tdc_ctrl` | Strobe order and total cycle count. |
| `sirf_storage` | Averaged fixed-point value. |
| `sirf_ram` | Reads and writes. |
| `sirf_lfsr11` | Full 2048-state period. |
| `sirf_divider` | Quotients and latency. |
| `sirf_dvdiff` | Against the reference computation. |
| `sirf_gpevcal` | Against the reference computation. |
| `sirf_spreadfactors` | Against the reference computation. |
| `sirf_bitgen` | Both modes against a reference model; it also reports the yields at threshold 3 and XMR 3. |
| `sirf_control` | Phase order and handshakes. |

### End-to-end test

`tb_sirf_puf_top` runs the top at its default sizes: 4096 DV, 2048
differences and 2048 taps. It models the carry chain with a per-path delay
plus noise, and plays the server's part. It runs three iterations:
1. enrollment with timing;
2. regeneration with 3 % slower paths and fresh noise;
3. a no-timing iteration with new seeds.

Every key and helper-data bit is compared with a reference model, and run 2
must reproduce run 1's key. The testbench also counts each mechanism, and a
mechanism that never happens is a failure:
- launches and restores;
- rising and falling edges;
- flipped SpreadFactors;
- weak bits;
- XMR skips;
- majority corrections;
- skipped timing.

### Workload tests

Two further testbenches run the operating points the published results
use:
- **`tb_sirf_bitgen_yield`** feeds BitGen values spread uniformly in
  magnitude over [1.0, 10.0), the distribution the published yields assume.
  It sweeps thresholds 3 and 4 across XMR 3, 5, 7, 9 and 11 and checks the
  per-iteration yield against the published one. At threshold 3 it measures
  about 1560 strong bits, then 314.9, 173.8 and 73.1 key bits at XMR 3, 5
  and 11 (published: 1569, 314, 174 and 74). Threshold 4 with XMR 11 gives
  63.7 (published: 64).
- **`tb_sirf_puf_key256`** builds a 256-bit key on the full design at each
  XMR level from 3 to 11. It runs iterations with new seeds, timing the
  paths only once, until 256 bits are collected. It checks that the
  iteration counts are the published 1, 2, 3, 3 and 4. It then regenerates
  the XMR 11 key at a 3 %-slower corner, and the key must come back
  unchanged. In the run shown here, 25 groups needed a majority correction.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/sirf_pkg.sv tb/tb_sirf_puf_top.sv --top-module tb_sirf_puf_top
./obj_dir/Vtb_sirf_puf_top
```

`--timing` is needed because the testbenches use delays and the netlist's
shift registers are clocked by data signals. The end-to-end run takes well
under a minute. The same pattern runs any other testbench.

## Files

All in `rtl/`, one module or package per file:

| File | Contents |
|---|---|
| `sirf_pkg.sv` | Sizes, challenge structs, gate-type choices. |
| `sirf_srl.sv`, `sirf_rfm.sv`, `sirf_module.sv`, `sirf_row.sv`, `sirf_netlist.sv` | The path network. |
| `sirf_tdc.sv`, `sirf_tdc_ctrl.sv`, `sirf_storage.sv` | Measurement. |
| `sirf_ram.sv` | Memories. |
| `sirf_lfsr11.sv`, `sirf_dvdiff.sv`, `sirf_divider.sv`, `sirf_gpevcal.sv`, `sirf_spreadfactors.sv`, `sirf_bitgen.sv` | Bit generation. |
| `sirf_control.sv` | Phase sequencer. |
| `sirf_puf_top.sv` | Top level. |
