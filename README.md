# Clock phase alignment for a large fibre-distributed clock tree (TGC front end)

The trigger electronics of the ATLAS Thin Gap Chambers at the HL-LHC receive the
40 MHz LHC bunch-crossing clock on 1,434 PS (processing) boards. Each board gets its
own optical fibre from a Sector Logic (SL) board and rebuilds the clock itself. Fibre
lengths, transceivers, FPGAs and cables all add their own delay, so the rebuilt clocks
start out with random phases. For correct bunch-crossing identification, all of them
must agree to well under a nanosecond.

The approach implemented here is *measure at the end points, adjust at the end points*:

1. Every board rebuilds the clock with **fixed latency**. A reset or reconfiguration
   then returns the same phase, and a delay setting stays valid.
2. Every board can delay its clock. The **coarse** delay works in whole 25 ns bunch
   crossings and the **fine** delay in 17.86 ps steps.
3. In each of the 24 sectors (two endcaps with 12 sectors each), a **TAM** (Timing
   Alignment Master) rebuilds the clock the same way. It compares its clock with the
   neighbouring sector's TAM, so the TAMs can be aligned to one another.
4. Each TAM passes its clock to six **JATHub** boards as a reference. A JATHub's
   **phase monitor** measures the phase of up to 11 PS-board clocks against that
   reference.
5. Software reads the measurements and computes each board's delay. It writes the
   delays back, and all clocks line up at the points where they were measured.

This repository holds synthesizable SystemVerilog for the digital part of one
sector slice. That is the SL transmit side, 11 PS-board clock paths, the TAM and one
JATHub phase monitor. It also has testbenches that run the whole alignment procedure
on behavioural models of the transceivers and clock managers.

## The link and its frame

The SL sends 32-bit words at 200 MHz, 8b/10b-encoded to 40 bits (8 Gb/s). Five words
make one frame, so exactly one frame goes out per 25 ns bunch crossing:

| word | contents |
|------|----------|
| 0 (header) | `{K28.5, TTC byte, user16}` |
| 1–4 | 128-bit payload |

In the TTC (timing) byte:

- bit 0 is BCR, high in one frame of every 3564-crossing orbit;
- bit 1 is a 200 kHz test clock, 100 crossings high and 100 low;
- the other bits are zero.

The frame layout and the TTC bit assignment are this design's own choices.
`tgc_clk_pkg` holds these constants.

`sl_packet_former` produces the frames. `enc8b10b_word` encodes the four bytes of each
word. Byte 0 goes first, in bits 39:30, and the running disparity is chained from byte
to byte and word to word. Only K28.5 is supported as a control character. One encoded
stream (`tx_word`) feeds every fibre.

## Rebuilding the clock with fixed latency

The transceiver delivers 40 bits per 200 MHz cycle, but its word boundary after reset
is arbitrary. `fl_8b10b_decoder` fixes this the way Xilinx's RXSLIDE mechanism expects:

- While searching, if no K28.5 appears in lane 0 within five words, it sends one
  RXSLIDE pulse. The receiver then moves its boundary by one bit.
- After each pulse the decoder waits `SLIDE_WAIT` (32) cycles before looking again.
- Once the comma sits in lane 0, every lane is byte-aligned and the decoder reports
  `aligned`.
- `ERR_LIMIT` (4) consecutive words with invalid codes send it back to searching.
- Decoding takes exactly two cycles. Running disparity is not checked.

`rx_packet_deformer` counts words modulo 5:

- It locks its counter to the header: the first header plus `LOCK_FRAMES` (4) more in
  the right place. It unlocks after `UNLOCK_FRAMES` (4) missing headers.
- `clk40` is high for words 0–2 of each frame. Only its rising edge matters (it feeds
  an MMCM).
- It also outputs a strobe per frame, the TTC byte, `user16` and the payload.

This is why the latency is fixed. The rebuilt clock's edge is tied to the header
word, so it always lands on the same receive-clock edge after the same fibre delay,
however the bit boundary was found. `tb_ps_clock_path` checks this directly. Two
receivers that start at different bit offsets, and that are reset again, produce
identical `clk40` waveforms.

## Coarse and fine delay

- **Coarse** (`coarse_delay`): a 32-stage shift register of the 8-bit TTC byte. It
  shifts once per frame, and a tap selects 0–31 crossings. It delays the timing
  signals (BCR and the 200 kHz clock), not the clock itself.
- **Fine** (`fine_delay_ctrl`): drives a 7-series MMCM's dynamic phase-shift port.
  - One PSEN pulse moves the output by 1/56 of a 1 GHz VCO period: 17.857 ps, so 1400
    steps make 25 ns.
  - The controller tracks the position, modulo 1400, from 0 at MMCM lock. It steps
    towards `target` one PSEN/PSDONE handshake at a time, along the shorter way round
    the circle.
  - `at_target` reports when it has arrived.

`ps_clock_path` joins decoder, deformer, coarse delay and fine control into one board's
receive side. The MMCM and jitter cleaner sit outside, between `rec_clk40` and
`clk40_fine`. The board's 200 kHz monitor clock is TTC bit 1 after the coarse delay,
registered on `clk40_fine`. It therefore carries both delays.

## Phase measurement (the central part)

`phase_monitor` finds where the edges of up to `NCH` asynchronous clocks lie relative
to a reference clock whose phase it can move.

**Counting at one phase.** Each monitored clock is sampled on the reference's rising
edge `NSAMPLES` (1000) times, and the highs are counted:

- If the reference edge falls in the monitored clock's high half, the count is 1000.
- If it falls in the low half, the count is 0.
- Near an edge, jitter gives something in between.

Each input passes through a sampling flip-flop and a second synchroniser stage before
it is counted.

**Fine scan** (`coarse = 0`):

- The monitor moves its reference MMCM to step 0, 1, …, `n_steps-1` using its own
  `fine_delay_ctrl`.
- At each step it waits `SETTLE` cycles, counts, and writes the 11 counts as one row of
  a 1400 × `NCH` result array.
- A monitored clock's rising edge is the step where its count goes from below to above
  half.

**Coarse scan** (`coarse = 1`):

- The reference stays at fine step 0.
- At step `s`, the monitor takes one sample of each board's 200 kHz clock per 200 kHz
  period, `s` reference cycles after the rising edge of the TAM's 200 kHz reference.
- 200 steps cover the 5 µs period, and the rising edge shows which crossing each board
  is on.

**Reading results.** The processor reads them with `rd_step` (one cycle latency) and
`rd_ch` (combinational). Finding edges and computing delays is left to software.

**Alignment procedure** (as run in `tb_tgc_sector_top`):

1. Fine scan, then find each board's edge step `e_i`.
2. Set `fine_dly_i = max(e) − e_i`. This delays every clock onto the latest edge.
3. Coarse scan, which now sees only whole-crossing differences. Find `o_i`.
4. Set `coarse_dly_i = max(o) − o_i`.
5. Rescan to confirm.

The clocks end up aligned *as seen at the JATHub*, cable delays included. Fixed skews
of the monitoring path, such as the JATHub's LVDS receivers, can be measured once and
subtracted in software.

## The TAM and the sector top

`tam` combines:

- a `ps_clock_path` for its own clock;
- a one-channel `phase_monitor` that compares the neighbouring sector's TAM clock
  against a phase-shifted copy of its own (`scan_clk`, from an outside MMCM);
- fan-out of its fine-delayed clock and 200 kHz clock to `NJAT` (6) JATHub outputs.

Aligning the TAMs to one another, then the PS boards to their TAM, puts every board in
the system in phase.

`tgc_sector_top` wires one slice together:

- the SL frame builder and encoder;
- `NPS` (11) `ps_clock_path`s;
- the TAM;
- one JATHub `phase_monitor` with `NCH = NPS`, whose 200 kHz reference is
  `tam_ref_200k_out[0]`.

The top's ports carry whatever is outside the FPGAs: transceivers, MMCMs, cables, and
the JATHub reference MMCM (fed from `tam_ref_clk_out[0]`). `rst` must be held for
several cycles of every clock. Each monitor also stays in reset while its reference
MMCM is unlocked.

```
tgc_sector_top
├── sl_packet_former, enc8b10b_word (enc8b10b ×4)
├── ps_clock_path ×NPS
│   ├── fl_8b10b_decoder (dec8b10b ×4)
│   ├── rx_packet_deformer
│   ├── coarse_delay
│   └── fine_delay_ctrl
├── tam
│   ├── ps_clock_path
│   └── phase_monitor (NCH = 1, with fine_delay_ctrl)
└── phase_monitor (JATHub, NCH = NPS, with fine_delay_ctrl)
```

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `NPS` | 11 | top | PS boards per JATHub |
| `NJAT` | 6 | top, tam | JATHubs per TAM |
| `NSAMPLES` | 1000 | top, tam, phase_monitor | samples per phase step |
| `MAX_STEPS` | 1400 | phase_monitor | result rows = fine steps per 25 ns |
| `COARSE_UI` | 200 | phase_monitor | 25 ns steps per 200 kHz period |
| `SETTLE` | 16 | phase_monitor | wait after each phase move (own choice) |
| `COARSE_DEPTH` | 32 | top, tam, ps_clock_path | coarse range in crossings (own choice) |
| `SLIDE_WAIT`, `ERR_LIMIT` | 32, 4 | fl_8b10b_decoder | own choices |
| `LOCK_FRAMES`, `UNLOCK_FRAMES` | 4, 4 | rx_packet_deformer | own choices |

At the defaults, the JATHub result array is 1400 × 11 × 10 bits (154 kbit). Synthesis
should map it to block RAM. A full fine scan at 1000 samples takes about 1400 × 1040
reference cycles, roughly 36 ms.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a
watchdog. Run one with plain Verilator, from the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_tgc_sector_top -y rtl -y tb +libext+.sv \
  rtl/tgc_clk_pkg.sv tb/tb_tgc_sector_top.sv
./obj_dir/Vtb_tgc_sector_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_enc8b10b_word` | hand-worked code words; for random words, symbol balance, disparity bounds, run length, comma only in K28.5; round trip through the decoder |
| `tb_sl_packet_former` | frame layout word by word, strobe with the header, BCR and test-clock periods (shortened) |
| `tb_fl_8b10b_decoder` | exact number of slides from offsets 0, 1, 23 and 39; error-free decoding; same latency for every starting offset; realignment after a disturbance |
| `tb_rx_packet_deformer` | lock/unlock rules, clock shape (3 high, 2 low, edge one cycle after the header), frame unpacking, relock on a shifted header |
| `tb_coarse_delay` | delays 0, 1, 7, 31 and random values; output stable between strobes |
| `tb_fine_delay_ctrl` | shortest-way stepping including wrap-around, one step in flight at a time, reset of the position on MMCM unlock |
| `tb_ps_clock_path` | identical phase from different bit offsets and after reset; fine shift of 12.5 ns; coarse shift of 3 crossings |
| `tb_phase_monitor` | full fine scan (with jitter) and coarse scan of three clocks with known offsets |
| `tb_tam` | neighbour-TAM edge found, corrected with the fine delay, found again at the new phase; reference fan-out |
| `tb_tgc_sector_top` | the whole procedure on 11 boards (4 samples per step), then a soft reset of everything and a check that every edge returns to the same step |
| `tb_tgc_sector_top_full` | the same slice at default parameters: a full 1000-sample, 1400-step scan and fine alignment |

In the end-to-end test, board *i* has:

- a link skew of 0.5 + 0.3·*i* ns;
- a clock path to the JATHub of 5 + 0.25·*i* ns;
- for boards 7 and 4 only, one and two crossings of extra link latency.

The test checks:

- every fine edge against its predicted step, (2500 + 550·*i*) ps / 17.857 ps;
- that all edges coincide after alignment;
- the coarse offsets, and that they vanish after coarse compensation;
- the TAM's neighbour scan;
- that after a soft reset of the whole slice, with the same delay settings, every fine
  and coarse edge comes back at the same step.

It counts each mechanism and fails if one never occurs: RXSLIDE alignment, frame lock,
reference fan-out, fine steps, fine scan, coarse scan, coarse delay, TAM scan and
reproduction after reset.

The full-size run takes a few minutes of simulation. It leaves out the coarse scan, which
at 1000 samples per step would need about a second of simulated time.

`tb/gtx_rx_model.sv` and `tb/mmcm_ps_model.sv` are behavioural models for simulation
only:

- **gtx_rx_model**: a receiver with a random or forced initial bit offset and one-bit
  slides.
- **mmcm_ps_model**: an MMCM with a fixed delay, 17.857 ps phase steps, PSDONE after 12
  cycles, and optional random jitter. It drops lock and returns to phase 0 when its input
  clock stops for more than 100 ns.

The models are jitter-free by default, so counts are 0 or full. Fractional counts near
an edge appear only with `JITTER_PS` set, as in `tb_phase_monitor`.

## Scope and departures

Not included, and reached through ports instead:

- the transceivers;
- MMCMs and jitter cleaners;
- oscillators;
- the flash memory that stores each board's delay parameters;
- the processors and Ethernet readout;
- the edge-finding software;
- the PS boards' trigger logic.

The delay parameters are plain inputs.

How far to trust the pieces:

- The measurement principle, the step sizes (25 ns coarse, about 18 ps fine), the 1000
  samples, the 5 µs coarse unit interval, and the board counts (11 PS boards per JATHub,
  6 JATHubs per TAM) follow the system's published description.
- The frame format and the TTC bit assignment are this design's own.
- So are the slide/lock/unlock rules and how the 200 kHz clock reaches the monitors.
- So are the coarse-scan sampling scheme, the result array and its read port, and the
  depth of the coarse delay.
- In the published sector-to-sector demonstration, the two TAMs were matched with cable
  lengths. Here the TAM uses its own coarse/fine delay for this.
