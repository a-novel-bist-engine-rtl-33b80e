# On-chip defect screening for CMOS image sensors

Optical production test of an image sensor usually means capturing whole
frames on the tester and running 2-D image filters over them to find
defective pixels. This engine does the local part of that job on the sensor
itself, while the frame streams out of the pixel array. Each pixel is
compared with the average of its neighbours of the same Bayer colour in the
same row. A pixel that lies outside a programmable band around that average
becomes a small record: its colour, kind, row, column and value. The records
are written to system memory. After the frame, the on-chip CPU reads them and
decides whether the die passes or fails.

Two ideas keep the hardware small:

* **One dimension instead of two.** The reference is an average along the
  row, not a 2-D neighbourhood. No line buffers are needed, only a window of
  five same-colour pixels per colour.
* **One lane per colour.** Pixels are sorted by colour into three
  identical detectors: red, green and blue. Each detector sees only its own
  colour. The three work side by side at the sensor's pixel rate.

Only defects leave the engine. A healthy frame produces almost no memory
traffic.

## Block structure

```
 pixel stream ──► pix_data_mgt ──beats──► defect_detect (R) ──┐
 (valid, sof,       │    ▲               defect_detect (G) ──┼─► data_formatting ─► mem_bus_if ─► memory port
  data)             ▼    │pad            defect_detect (B) ──┘     (3 FIFOs,         (2 words
               padding_data                                         round robin)      per record)
                    ▲
 CPU port ─► csr_bus_if ─► bist_csr ──config/status──► all blocks
                               │ start/abort
                               ▼
                           bist_fsm ──load / enable / done, irq
```

| module            | role |
|-------------------|------|
| `bist_top`        | Wires everything together. Its ports are the pixel stream, the register slave port, the memory write port and `irq`. |
| `bist_pkg`        | Widths, the colour, kind, beat and record types, the register map, the Bayer colour function and the record packing. |
| `pix_data_mgt`    | Counts row and column, works out each pixel's colour and sends it to that colour's detector. Adds padding and end-of-row beats between rows. |
| `padding_data`    | Gives each colour the value used for the window positions that fall outside the row. |
| `defect_detect`   | One per colour. Holds the sliding window and its running sum, applies the two thresholds and counts defects per row for the line rule. |
| `data_formatting` | One FIFO per colour, a round-robin arbiter, and packing of records into the two-word memory format. Emptied when a run starts, so nothing from an aborted run is stored. |
| `mem_bus_if`      | Write master. Stores record *n* at `base + 8n`, stops at the window limit, and counts stored and dropped records. |
| `csr_bus_if`      | Slave port. Turns a CPU request into one register access. Rejects unmapped and misaligned addresses. |
| `bist_csr`        | Configuration, control pulses, status bits and event counters. |
| `bist_fsm`        | Sequences a run: IDLE → LOAD → ARMED → RUN → DRAIN → DONE. |
| `sync_fifo`       | Helper FIFO used by `data_formatting`. |

Outside the engine, and not part of this RTL:

* the sensor's existing readout sequencer, which drives the pixel stream;
* the CPU and the software that classifies defects;
* the memory;
* the system bus.

## The detection window (`defect_detect`)

This is the part that needs the most care.

A detector receives **beats**. Each beat is one of three kinds:

| beat    | when | effect |
|---------|------|--------|
| `pix`   | a pixel of this colour | Shifted into the window. If it is the row's first pixel of this colour (`first`), the window is reloaded first: entry 0 gets the pixel and the `2·HALF` older entries get the padding value. |
| `flush` | `HALF` beats after the row's last pixel | A padding value is shifted in. This lets the row's last `HALF` pixels reach the centre. |
| `eol`   | one beat after the flushes | The line rule is evaluated. |

The window has `2·HALF+1` entries; `HALF = 2`, so it holds 5. A running
accumulator holds their sum: each shift adds the value that enters and
subtracts the one that leaves. In the cycle after a shift, the centre entry
is evaluated if it holds a real pixel:

```
avg     = (sum − centre) >> log2(2·HALF)      // mean of the 4 neighbours
thr_lo  = max(avg − DELTA_LO, 0)
thr_hi  = min(avg + DELTA_HI, 2^PIX_W − 1)
dark    = centre < thr_lo     bright = centre > thr_hi
```

The centre pixel is left out of its own average.

Each entry also carries its column and a "real pixel" flag. This keeps
padding values from being reported, and it makes every record carry the
coordinates of the pixel that was judged, not of the pixel being received.

**Latency.** A pixel is judged when the beat that brings it to the centre
arrives, `HALF` beats after its own beat. Its record is on `out_valid` one
clock after that beat. A line record likewise comes one clock after the
`eol` beat.

The order flush, flush, `eol` guarantees two things:

* a pixel record and a line record never fall in the same cycle (an
  assertion checks this);
* the row count already includes the row's last pixel when the line rule
  reads it.

**Line rule.** Each detector counts the defects of its colour in the current
row. On `eol`, if `LINE_THR ≠ 0` and the count is at least `LINE_THR`, it
emits a line record whose aux field is the count. Defective columns are not
detected in hardware. The software finds them from the stored coordinates.

**Padding** (`padding_data`) has two modes, selected by CTRL bit 2 and
latched when a run starts:

* **Constant** (mode 0): a per-colour value from `PAD_R`, `PAD_G` and
  `PAD_B`, for example the expected dark level.
* **Replicate** (mode 1): the row's first pixel of that colour fills the left
  edge, and its last pixel fills the right edge.

**A known property of the mean.** A strong outlier also shifts the average
of its four same-colour neighbours. For example, a hot pixel in a dark frame
usually makes its neighbours look dark as well. Every hot pixel then appears
as a small cluster of records. The classifying software is expected to
handle that. The test models reproduce it exactly.

## Pixel stream and colour steering (`pix_data_mgt`)

* Input: `pix_valid`, `pix_sof` (first pixel of the frame) and `pix_data`.
  One pixel per clock at most. There is no backpressure.
* Bayer order is fixed to RGGB: even rows are R G R G …, odd rows are
  G B G B …. Green therefore gets pixels in every row; red only in even rows
  and blue only in odd rows.
* After the last pixel of a row (column `WIDTH−1`), the block spends
  `HALF` cycles on flush beats and one cycle on the `eol` beat. These go only
  to the lanes that received pixels in that row. **The sensor must leave at
  least `HALF+1` = 3 idle cycles between rows.** A pixel arriving inside that
  gap is dropped and sets the sticky stream-error status bit.
* `pix_sof` in the middle of a frame also sets stream-error; counting goes
  on.
* Once enabled, the block waits for `pix_sof` and processes exactly one
  frame of `WIDTH × HEIGHT` pixels. Pixels before `pix_sof` are ignored.
  `WIDTH` must be at least 1 and `HEIGHT` at least 1.

## Records in memory

Each defect takes two 32-bit words. Word 0 is at the lower address.

```
word 0 = { kind[1:0], colour[1:0], 4'h0, row[11:0], col[11:0] }
word 1 = { aux[15:0], 6'h0, value[9:0] }
kind   : 0 dark pixel, 1 bright pixel, 2 defective line
colour : 0 red, 1 green, 2 blue
aux    : local average (pixel records) / defects in the row (line records)
```

For a line record, `col` and `value` are 0.

Records from different colours come out in round-robin order. Within one
colour they stay in row and column order.

## Throughput and what happens on overload

The detectors keep up with the sensor in every case. Storing is slower:

* Writing a record takes two clocks when the bus grants at once: word 0,
  then word 1. The grant of word 1 also takes the next record.
* Each colour has a FIFO of `FIFO_DEPTH = 4` records. This absorbs the short
  bursts around isolated defects.
* A record that meets a full FIFO is dropped. So is a record beyond
  `MEM_LIMIT`.

Dropped records are still counted. `PIX_DEFECTS` and `LINE_DEFECTS` count
every defect found, before any buffering. `STORED` and `DROPPED` then say how
much of the list reached memory, and status bits 3 and 4 say why records were
lost. A heavily defective row, where almost every pixel is flagged, therefore
still fails the die, even though not every coordinate is kept.

## Registers

Registers are 32 bits wide. Byte address = 4 × index. Unused bits read as 0.

| idx | name         | access | content |
|-----|--------------|--------|---------|
| 0   | CTRL         | W / R  | bit 0 start (pulse), bit 1 abort (pulse), bit 2 padding mode (reads back) |
| 1   | STATUS       | R      | bit 0 busy, 1 done, 2 stream error, 3 FIFO overflow, 4 memory full, 10:8 FSM state |
| 2   | WIDTH        | R/W    | pixels per row (12 bits) |
| 3   | HEIGHT       | R/W    | rows per frame (12 bits) |
| 4   | DELTA_LO     | R/W    | low threshold = average − DELTA_LO |
| 5   | DELTA_HI     | R/W    | high threshold = average + DELTA_HI |
| 6   | LINE_THR     | R/W    | defects of one colour that make a row defective; 0 = off |
| 7–9 | PAD_R/G/B    | R/W    | constant padding values |
| 10  | MEM_BASE     | R/W    | byte address of record 0 |
| 11  | MEM_LIMIT    | R/W    | number of records the window holds |
| 12  | PIX_DEFECTS  | R      | defective pixels found |
| 13  | LINE_DEFECTS | R      | defective lines found |
| 14  | STORED       | R      | records written |
| 15  | DROPPED      | R      | records lost |

Counters and sticky flags clear when a run starts. All registers reset to 0.

**Slave port.** Hold `s_req`, with `s_we`, `s_addr` and `s_wdata`, until
`s_ack`. The acknowledge comes one clock after the request is first seen,
with `s_rdata` and `s_err`. A request raised in the same clock as the
previous acknowledge is taken one clock later.

**Memory port.** `m_req`, `m_addr` and `m_wdata` stay stable until `m_gnt`.
The word is written on the clock edge where both are high. An assertion
checks this.

## Running a test

1. Write WIDTH, HEIGHT, DELTA_LO, DELTA_HI, LINE_THR, the padding values,
   MEM_BASE and MEM_LIMIT.
2. Write CTRL = `1 | mode<<2`.
3. The FSM spends one clock in LOAD: it clears the counters, the record
   FIFOs and the memory pointer, and latches the padding setup.
4. It then waits in ARMED for `pix_sof`, and stays in RUN until the last row
   has been judged.
5. In DRAIN it waits at least four clocks for the detector pipelines, then
   until the FIFOs are empty and the last write has been granted.
6. It enters DONE and pulses `irq`.
7. The CPU reads the counters and `STORED × 2` words from MEM_BASE.

An abort returns the engine to IDLE from any state. A dark frame and a lit
frame are simply two runs, each with its own thresholds.

## Where this design follows its source and where it chooses

Taken from the design this RTL implements:

* the block structure: FSM, control and status registers, two bus
  interfaces, padding data, pixel data management, per-colour defective
  pixel and line detection, data formatting;
* the row-by-row stream at pixel rate;
* sorting pixels by Bayer colour into dedicated accumulators;
* comparison with two thresholds derived from a one-dimensional local
  average;
* storing only the type, value and coordinates of defective pixels in
  memory, for software to classify.

Choices of this design, where the source is silent:

* pixel width (10 bits) and coordinate width (12 bits);
* the RGGB order;
* the window of ±2 same-colour neighbours;
* thresholds as average ∓ programmable offsets, clamped to the pixel range;
* the split into dark and bright defects;
* the line rule;
* both padding modes;
* the record layout and register map;
* the bus protocols, FIFOs, drop-and-count overload behaviour and the FSM
  states;
* the blanking requirement.

The event counters are an addition.

Not built:

* the classification software and the PASS/FAIL decision, which run on the
  CPU;
* column-defect detection in hardware;
* any analog part of the sensor.

## Parameters

| parameter    | default | where | meaning |
|--------------|---------|-------|---------|
| `HALF`       | 2       | `bist_top`, `pix_data_mgt`, `defect_detect` | neighbours on each side; `2·HALF` must be a power of two |
| `FIFO_DEPTH` | 4       | `bist_top`, `data_formatting` | records buffered per colour |
| `DRAIN_CYCLES` | 4     | `bist_fsm` | minimum clocks in DRAIN (covers the detector latency) |
| `PIX_W`, `COORD_W`, `BUS_W` | 10, 12, 32 | `bist_pkg` | widths; the record layout assumes these values |

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Each has a watchdog, and each compares the
block against an independent model written in the testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_defect_detect` | Random rows with random gaps between beats, against a model of the window, thresholds and line rule. Also checks the arrival clock of every record. |
| `tb_pix_data_mgt` | Clock-by-clock beats, colours, first, flush and end-of-row beats, `frame_done`, and dropping of a pixel sent during blanking. |
| `tb_padding_data` | Both modes against a model. |
| `tb_data_formatting` | A cycle-accurate model of the three FIFOs, overflow and the round robin, under random backpressure. |
| `tb_mem_bus_if` | Addresses and data of every granted write, the window limit, clear, and the two-clock record rate. |
| `tb_csr_bus_if` | The handshake, one access per request, and errors. |
| `tb_bist_csr` | Every register, the control pulses, the counters and the sticky flags. |
| `tb_bist_fsm` | Every state, the drain conditions, `irq` and abort. |
| `tb_bist_top` | End to end, with models of the sensor, the CPU and a stalling memory (`mem_model`). Runs: constant and replicate padding, memory full, FIFO overflow, stream error, abort, and a 640×480 frame. The memory contents and counters must match a reference model, and each mechanism must occur. |
| `tb_dark_light` | A dark and a lit 320×240 frame. The stored records must equal the model's list exactly. |

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv \
          $(ls rtl/*.sv | grep -v bist_pkg) \
          tb/mem_model.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

For a block-level bench, list `rtl/bist_pkg.sv`, the block and its helpers
(`sync_fifo.sv` for `data_formatting`), then the testbench. All testbenches
set any parameters they pass to the modules' default values.
