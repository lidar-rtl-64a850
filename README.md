# LiDAR time-of-flight acquisition: a multi-channel delay-line TDC

A LiDAR receiver turns each returning laser echo into a digital pulse (the
*Hit*). This design measures the width of that pulse on up to 16 channels with
a resolution far finer than its 2.5 ns (400 MHz) clock. Each result goes into
a per-channel FIFO, and a processor reads it over an AXI4 bus.

Each measurement has two parts:

```
width = coarse * 2500 ps + (start - stop) * 2500 ps / 173
```

- **coarse** counts whole clock cycles while the Hit is high.
- **start** and **stop** are fine positions of the rising and falling edge
  inside the clock period where each edge happened.

The fine positions come from a tapped delay line. The Hit runs down a chain of
692 carry cells of about 3.8 ps each, and a register samples the chain on
every clock edge. How far the edge has travelled when the clock edge arrives
tells how long before the clock edge the Hit changed.

Real carry cells are very uneven: some are nearly 0 ps and some several times
the average. So each channel calibrates itself continuously from the hits it
measures. It then maps the 692 raw positions onto 173 equal bins of nominally
15.2 ps.

## Structure

```
lidar_acq_top
 ├─ axi_tdc_slave                 command decoding, read mux (bus clock)
 └─ tdc_peripheral  x NCH         one channel
     ├─ reset_sync x2             channel reset into clk0 and bus-clock domains
     ├─ input_stage               veto flip-flop + edge detector -> store strobes
     ├─ tdc
     │   ├─ tdl                   carry_chain (model) + sample stage + store stage
     │   ├─ thermo_decoder x2     start (last 1) and stop (last 0) positions
     │   ├─ calibration_module x2 each with its calibration_ram (2 x 1024 x 19 bit)
     │   ├─ edge_detector x2      Hit end seen on the 72° and 144° clocks
     │   ├─ coarse_counter x3     on clk0, clk1 (72°), clk2 (144°)
     │   └─ merge_sync            synchronizer decider + measurement word
     └─ async_fifo                Gray-pointer dual-clock FIFO (1024 words)
```

Shared constants and types (`meas_t`, the command and calibration-state
enums) are in `rtl/tdc_pkg.sv`.

### Clocks

| clock | use |
|-------|-----|
| `clk0` | 400 MHz reference: delay-line sampling, main counter, calibration, FIFO write |
| `clk1` | `clk0` shifted by 72° (500 ps) |
| `clk2` | `clk0` shifted by 144° (1 ns) |
| `aclk` | AXI bus clock and FIFO read side |

In the device, one clock-management block makes `clk0`, `clk1` and `clk2`.
That block is not part of this RTL, so the three clocks are top-level inputs.

## One measurement, cycle by cycle

Counting in `clk0` cycles:

1. **Hit rises.** At the next `clk0` edge:
   - the sample stage catches the partly filled delay line;
   - the edge detector sees the Hit high.
   - `store_start` is then high for one cycle, and the store stage keeps that
     code.
2. While the Hit is high, the three coarse counters count on their own clocks.
3. **Hit falls.** The same happens with `store_stop`. Call that cycle 0.
   - The input stage's veto flip-flop is clocked by the falling edge of the
     raw Hit.
   - It now blocks every further Hit until this measurement is written.
4. **Cycle 1:** both thermometer codes are stored.
   - The decoders (pure logic) give the raw positions.
   - The two calibration modules get `new_hit`.
5. **Cycle 3:** the calibrated positions are available.
   - `merge_sync` picks the coarse count (see below) and forms the word.
   - It pulses `end_of_conversion`, which clears the counters.
6. **Cycle 4:** `value_ready` is high for one cycle.
   - The FIFO stores `{coarse[14:0], start[7:0], stop[7:0]}`.
   - The veto is released.

A channel can therefore take a new Hit about five cycles after the previous
one ended. Its calibration also needs three cycles per hit, which fits inside
that gap.

## Delay line and thermometer decoding

`carry_chain` is a **behavioural model**: a vendor carry primitive cannot be
written as synthesizable logic.

- Each tap has its own fixed delay of 0–10 ps, from an uneven repeating
  pattern, averaging 3.8 ps. The whole line is about 2.63 ns, longer than one
  clock period, so every edge position is covered.
- The `SEED` parameter shifts the pattern, which gives each channel different
  non-linearity.
- An edge on the carry input starts one process that walks the wave down the
  line. This is why the simulation is fast enough for 16 channels.

A synthesis flow would put the device's carry primitives in its place. The
tap delays then stop being a modelling choice and become a property of the
silicon.

The **store stage** has two 692-bit registers, loaded by `store_start` and
`store_stop`.

**Decoding.** The start code holds ones over the taps the rising edge has
crossed. The stop code holds zeros over the taps the falling edge has crossed.

- `thermo_decoder` finds the highest tap `i` whose bit is 1 (start) or 0
  (stop) and is followed by four bits of the opposite value. It reports `i+1`.
- The four-bit window keeps the search from stopping at an isolated "bubble"
  bit, which uneven sampling produces.
- If no such tap exists, the position is 0. This means the edge was too close
  to the clock edge to enter the line.
- The search stops 20 taps short of the end of the line.

## On-line calibration (bin decimation)

This is the part that takes most study. The start line and the stop line each
have their own `calibration_module` and RAM.

The idea is a code-density test. Hits arrive uncorrelated with the clock, so
the number of hits that land on a tap is proportional to the tap's width.
Summing the counts along the line gives a cumulative time. Every time the
running sum passes `DECIMATED_HITS` (the number of hits one ideal 15.2 ps bin
should collect), a new ideal bin begins. The table then stores, for each raw
tap, the number of its ideal bin.

The state machine loops forever:

| state | what it does | cost |
|-------|--------------|------|
| RST | clears words 0..692 of the working RAM section | 693 cycles |
| ACQUISITION | `word[raw position] += 1` for every hit, until `CALIBRATION_HITS` hits | 3 cycles per hit (read-modify-write) |
| CONVERSION | walks the taps with a running sum; writes the current bin index into each tap's word | 2 cycles per tap |
| CONSULTATION | swaps the two RAM sections (base 0x000 / 0x400) by toggling the address MSB | 1 cycle |

In CONVERSION, when the sum exceeds `DECIMATED_HITS`:

- the bin index goes up by one;
- `DECIMATED_HITS` is subtracted from the sum.

While one section is being rebuilt, port B looks up every measurement in the
other section, which holds the table in use. A new table therefore replaces
the old one without a gap.

Two things to know before using the results:

- Until the first table exists, `cal_valid` is 0 and start and stop read as 0.
  Those words carry only the coarse count.
- Calibration never stops. Every `CALIBRATION_HITS` measured Hits
  (default 8192, so 47 hits per ideal bin) a fresh table comes into use. The
  `table_swap` output pulses at each swap, so the table follows temperature
  and voltage drift.

The quality of a table depends on how many hits built it.

| hits per table | worst width error in simulation |
|----------------|---------------------------------|
| 4096 | under 120 ps |
| 2048 | up to about 210 ps |

## Coarse count and the synchronizer

The Hit is asynchronous to `clk0`. When an edge lands close to a `clk0` edge,
the main counter and the delay line can disagree by one cycle:

- the counter may have seen the Hit when the line had not;
- or the other way round.

Two extra counters on `clk1` and `clk2` count the same Hit, and each stores
its count when its own edge detector sees the Hit end. `merge_sync` then
applies these rules, in this order. `TH` is 210 raw taps (about 800 ps), and
"late" means a raw position above `TH`.

- **start position 0 and c0 ≤ c1:**
  - if c1 > c2, use c1;
  - else if c1 = c2 and the stop is not late, use c1;
  - else if c1 = c2, use c1 + 1.
- **otherwise, stop position 0 and c0 ≥ c1:**
  - if c1 < c2, use c1;
  - else if c1 = c2 and the start is not late, use c1;
  - else if c1 = c2, use c1 − 1.
- **otherwise:** use c0.

The `corrected` output shows when a rule changed the count.

These rules were built around the metastable behaviour of the real
flip-flops. In an ideal simulation no counter ever misses a cycle. Some rules
can then move a correct count by one: for example, a Hit that begins right at
a clock edge and ends in the middle of a period. So expect occasional
whole-cycle errors on edges within a few picoseconds of a clock edge. The published
design reports that the same synchronizer does not remove every such error in
hardware either. Edges away from clock edges always take the `c0` path and
are exact.

## FIFO and read-out word

`async_fifo` is a classic dual-clock FIFO:

- binary and Gray pointers, each synchronized into the other domain through
  two flip-flops;
- registered full and empty flags;
- 1024 words of 31 bits (2^`FIFO_AW`).

**When full:** a new measurement is dropped; the older words are kept.

**Reading:** a one-cycle `read_fifo` pulse pops the oldest word into the
output register, where it stays until the next read. The 32-bit word the bus
sees is:

```
bit 31      invalid: the FIFO was empty at the read (bits 30:0 are stale)
bits 30:16  coarse count (clock cycles)
bits 15:8   calibrated start bin
bits 7:0    calibrated stop bin
```

## Bus interface and commands

The processor writes command bytes, one per AXI write beat, in `WDATA[7:0]`.
The write address is ignored, and bursts of commands are allowed. Bits [7:6]
are the opcode; bits [5:0] are a channel number.

| opcode | command | effect |
|--------|---------|--------|
| 00 | NOP | clears the control strobes |
| 01 | READ_CHANNEL | pops one word from the FIFO of the given channel |
| 10 | READ_ALL | pops one word from every channel's FIFO |
| 11 | RST | resets every channel: FIFOs emptied, calibration restarted from scratch |

Each strobe lasts one `aclk` cycle.

**Reading** does not pop anything. An AXI read at address `4*k` returns the
output register of channel `k`, so the usual sequence is:

1. send READ_ALL;
2. wait two bus cycles;
3. do one INCR burst of 16 beats from address 0.

The slave implements only what is listed below.

- Channels that do not exist read as 0.
- All responses are OKAY.
- There are no IDs, locks or cache/QoS signals.
- Write data is accepted once the write address has been taken.
- Assertions check that RVALID and BVALID stay high until accepted, and that
  no command raises the reset and a read strobe together.

Send RST (or hold `aresetn` low) once after power-up. The channel reset is RST
OR'ed with the bus reset.

## Expected performance

`code_density_tb` repeats the characterisation the design was built for: a
151.5 ns pulse at about 3.3 MHz, not locked to the clock, on one channel at
its default size. After the first 8192-hit table, 10000 measurements gave:

| quantity | simulation | published hardware |
|----------|------------|--------------------|
| calibrated bins in use | 175 | 173 nominal |
| average bin width | 14.3 ps | 14.45 ps |
| RMS width error | 13 ps | 189–232 ps |
| mean width error | 3 ps | — |
| max \|DNL\| / \|INL\| of the calibrated start line | 0.59 / 1.66 LSB | about 2.4 / 2–3 LSB (best channel) |
| whole-cycle errors | 5 in 10000 | present, not removed by the synchronizer |

The simulated delay line has no clock skew, jitter or metastability. Its
precision is therefore a best case that shows the calibration arithmetic
works; it is not a prediction for silicon.

## Parameters

All defaults live in `tdc_pkg`.

| parameter | default | origin |
|-----------|---------|--------|
| `NUMBER_CHANNELS` (`NCH`) | 16 | published design (builds with 8, 4, 2, 1 were also evaluated) |
| `NUM_STAGES` | 692 taps | published design |
| `CAL_BINS` | 173 ideal bins of 15.2 ps (decimation by 4) | published design |
| calibration RAM | 2 sections × 1024 words × 19 bit, bases 0x000/0x400 | published design |
| `PHASE_THRESHOLD` | 210 taps | published design |
| command byte | 2-bit opcode + 6-bit channel | published design |
| `CALIBRATION_HITS` | 8192 (`DECIMATED_HITS` = 8192/173 = 47) | own choice (not published) |
| `COARSE_W` | 15 bits (82 µs range) | own choice |
| `FIFO_AW` | 10 (1024 words) | own choice |
| opcode values | see above | own choice |
| `MERGE_DELAY` | 3 cycles | own choice |

Resource check: two calibration RAMs (2048 × 19 bit) plus one FIFO
(1024 × 31 bit) make three 36 Kb block RAMs per channel, or 48 for 16
channels. That matches the block-RAM count reported for the published
16-channel build.

## Where this RTL departs from the published design

- **Delay line.** The carry chain is a behavioural delay model. The unconnected
  LUTs that the original hangs on each tap to slow it down have no logic
  function and are not modelled.
- **Sample stage.** It samples all 692 taps.
- **Start decoder.** It is written as the mirror image of the stop decoder.
- **Veto reset.** The veto flip-flop is also cleared by the channel reset. The
  reset is synchronized into each clock domain.
- **Calibration timing.** The calibration modules are told of a new hit one
  cycle after `store_stop`, when both codes are stored. Cycle-level
  sequencing inside each calibration state is this design's.
- **Counter clear.** The channel reset also clears the running coarse counts
  (the original clears them only at the end of a conversion).
- **AXI slave.** It is a compact hand-written slave rather than a generated
  template.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `carry_chain_tb` | arrival time of every tap against an independent delay table; total line length |
| `tdl_tb` | stored codes against the edge position, for start and stop |
| `thermo_decoder_tb` | random codes with bubbles against a reference search |
| `calibration_ram_tb` | both ports, read-first behaviour, latency |
| `calibration_module_tb` | tables against a reference histogram/decimation; three table swaps; two-cycle look-up latency; no output before the first table |
| `coarse_counter_tb`, `input_stage_tb` | counts, strobes, veto |
| `merge_sync_tb` | every decider rule against a reference model; strobe timing (cycles 3 and 4) |
| `async_fifo_tb` | order, drops when full, invalid bit, with unrelated clocks |
| `axi_tdc_slave_tb` | every command, strobe length, single and burst reads, absent channels |
| `tdc_tb` | one channel, full line, 4096-hit calibration: exact coarse count and width within 120 ps for edges ≥150 ps from a clock edge; `value_ready` exactly 4 cycles after `store_stop`; synchronizer corrections |
| `tdc_peripheral_tb` | the same through the FIFO, plus veto, overflow and empty reads |
| `lidar_acq_top_tb` | 4 channels end to end (see below) |
| `lidar_acq_top_full_tb` | the same sequence at the default size: 16 channels, 8192-hit calibration, 1024-word FIFOs |
| `code_density_tb` | characterisation workload on one default-size channel: 151.5 ns Hits at about 3.3 MHz from a free-running generator; mean error, precision, bins in use, DNL and INL, whole-cycle error rate |

**End-to-end sequence.** The two top-level testbenches share
`tb/lidar_acq_tb_body.svh`. It:

- runs calibration on every channel until its first table is in use;
- measures calibrated Hits and checks them;
- blocks a Hit with the veto;
- forces synchronizer corrections;
- checks that NOP pops nothing;
- overflows every FIFO;
- reads the empty FIFOs;
- resets with RST.

It counts each of these mechanisms, and a mechanism that never occurs counts
as a failure.

**Random start-up state.** The simulations start every register at a random
value. An edge-triggered reset cannot fire if the reset net is already high at
time zero, so the testbenches apply reset twice.

**Running a test.** From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    --top-module lidar_acq_top_tb rtl/tdc_pkg.sv tb/lidar_acq_top_tb.sv
./obj_dir/Vlidar_acq_top_tb +verilator+rand+reset+2
```

Replace the top module name to run another testbench.

| testbench | run time |
|-----------|----------|
| 4-channel system | about 30 s |
| full-size system | about four minutes |
| single-block testbenches | seconds |
