# CHIPIX65-style pixel readout chip: SystemVerilog model

This is the digital design of a 64 x 64 pixel readout chip for a hybrid pixel
detector at the HL-LHC. Each pixel is 50 x 50 um². The chip must survive a
particle rate of about 3 GHz/cm² and still read out every hit selected by a
1 MHz trigger after a 12.5 us trigger latency. That is 500 bunch crossings at
40 MHz.

The main idea is **sharing**. The pixels are grouped into 4 x 4 *pixel regions*.
Each pixel keeps only a small interface: a deadtime counter and a ToT counter.
Everything else in a region is shared by its 16 pixels:

- one event buffer of 16 rows;
- one timestamp per event;
- one trigger matcher;
- one output stage.

A region event stores a 16-bit hit map and at most six 5-bit ToT values. Regions
are chained 16 deep into *macro columns*, and the chip has 16 macro columns.
Data leave a column through a column-drain chain and are collected at the bottom
of the chip. From there they go out through a single 20-bit serial link.

The RTL covers the complete digital part:

- the pixel matrix logic;
- the end-of-column drainers;
- the dispatcher with 8b10b coding;
- the serializer;
- SPI configuration with global, end-of-column and pixel registers;
- timestamp and trigger generation;
- the autozero generator for the synchronous front end;
- the decoder of the segmented bias DACs;
- the control logic of the dual-slope monitoring ADC.

Two analog parts have simple behavioural models, so that the chip can be
simulated end to end:

- the DAC current cells (`global_bias_dac`);
- the ADC's integrator and comparator (`adc_analog`).

The following parts are not modelled:

- the front-end amplifiers and discriminators;
- the bandgap;
- the column bias mirrors;
- the SLVS drivers.

They meet the design at ports: `fe_disc` (discriminator outputs), `pix_cfg`
(pixel configuration bits), `az` (autozero), the DAC current outputs and
`ser_out`.

## Hierarchy

```
chipix_top
├── spi_slave           20-bit SPI frames, oversampled by the core clock
├── config_ctrl         GCR (224 bits), ECCR, pixel configuration addressing
├── periphery_timing    bunch-crossing counter, Gray code, trigger timestamp
├── az_gen              autozero pulse for the synchronous front end
├── macro_column x16
│   └── pixel_region x16
│       ├── pcr_regs        8 x 16-bit pixel configuration registers
│       ├── pixel_if x16    deadtime and ToT per pixel
│       ├── hit_mapper      hit map + first six ToTs
│       ├── shared_buffer   16 event rows
│       ├── trigger_match   timestamp comparison, row selection, expiry
│       └── output_stage    busy OR chain + data multiplexer
├── mcd x16             macro column drainer: trigger FIFO, FSM, data FIFO
├── dispatcher          round-robin collection, chunks, 8b10b / filling
│   └── enc8b10b x2
├── serializer          20 bits per core cycle, MSB first
├── dac_decoder x16 + global_bias_dac x16   (bias DACs, model)
└── adc_ctrl + adc_analog                   (monitoring ADC, model)
```

`chipix_pkg` holds the shared constants and types: the event, packet and ECCR
structs, and the Gray-code functions. `sync_fifo` is the first-word-fall-through
FIFO used in the drainers and in the dispatcher.

## Life of a hit

1. **Pixel interface** (`pixel_if`). A rising discriminator edge starts a fixed
   deadtime of 6 cycles, or 16 in the high-deadtime mode. During the deadtime
   the pixel counts the cycles its discriminator stays high; this count is the
   ToT. It saturates at 31 and cannot exceed the deadtime. In the last
   deadtime cycle the pixel raises its hit flag. Afterwards it waits for the
   discriminator to go low before it re-arms.
   - Binary-only mode shrinks the deadtime to one cycle and reports ToT 0.
   - Debug mode replaces the discriminator by a digital injection input.
   - A disabled pixel (PCR bit 0 clear) never fires.
2. **Hit mapper** (`hit_mapper`). All flags raised in the same cycle form one
   region event. The hit map records every flagged pixel. The ToTs of the first
   six flagged pixels, taken in pixel-index order, are packed into 30 bits. The
   remaining hit pixels appear in the map without a ToT.
3. **Shared buffer** (`shared_buffer`). The event goes into the lowest free row,
   together with the current timestamp. If all 16 rows are full, the event is
   lost and `overflow` pulses.
4. **Trigger matching** (`trigger_match`). Every row compares its timestamp
   with the trigger timestamp broadcast down the column; a match marks the row.
   - The region is *busy* while it holds a marked row. The busy flag comes
     from flip-flops, so it rises one cycle after the trigger.
   - In triggerless mode every stored row counts as marked.
   - A row that was never triggered is freed once it is older than
     latency + 64 cycles. Triggers can wait in the drainer queue, so the slack
     keeps such rows alive until their trigger arrives.
5. **Column drain** (`output_stage`). The busy flags form an OR chain from
   region 0 (top) down to region 15 (next to the periphery). Next to it runs a
   data multiplexer that always passes the upstream data while upstream is
   busy. The word at the bottom therefore always belongs to the busy region
   nearest the top. Only that region sees `grant`, and only it frees its row
   in that cycle. One row leaves a column per cycle. The chain is purely
   combinational, so all 16 regions are one logic path.
6. **Drainer** (`mcd`). The drainer handles one macro column:
   - It queues triggers (8 deep, with their timestamps).
   - It sends the oldest trigger into the column (SEND).
   - It looks at the column busy flag one cycle later (CHECK).
   - It reads while busy stays high (READ). A trigger is only sent when
     16 words are free in the 32-word data FIFO, because one trigger can
     bring one row from every region.
   - Each word read is extended with the 4-bit column address to a 64-bit
     packet.
   - In triggerless mode the drainer just listens (LISTEN).
   - A masked column stores nothing.
7. **Dispatcher** (`dispatcher`) and **serializer**. The dispatcher takes one
   packet per cycle from the drainers, round robin, into a 32-packet FIFO. It
   sends a packet as five 20-bit words:
   - an SOP word (K27.7 K27.7);
   - the four 16-bit chunks of the packet, bits 63:48 first.

   Each chunk is two 8b10b-coded bytes, and the running disparity carries from
   word to word. An empty link sends IDLE (K28.5 K28.5). In 8b10b-bypass mode a
   chunk is sent as `{hi, 01, lo, 01}` instead. The serializer shifts each
   word out MSB first at 20 times the core clock, which gives 800 Mb/s at a
   40 MHz core clock.

### Output packet (64 bits)

| bits  | field |
|-------|-------|
| 63:60 | macro column |
| 59:50 | event timestamp (Gray or binary, as configured) |
| 49:46 | region within the column (0 = top) |
| 45:30 | hit map, bit 4·row + col of the 4 x 4 region |
| 29:0  | six 5-bit ToTs, first hit pixel in 4:0; unused slots are 0 |

## Timing of the trigger

The timestamp is a 10-bit bunch-crossing counter. By default it is Gray coded
in the matrix, and Gray coding can be bypassed. A trigger that arrives in cycle
*t* is given the timestamp of cycle *t − latency*. The trigger and its
timestamp reach the drainers one cycle later.

An event is stored with the timestamp of the cycle in which it was written,
which is *deadtime* cycles after the discriminator edge. To select hits that
happened *L* cycles before the trigger, set the latency register to
*L − deadtime*. For example, at *L* = 500 (12.5 us), write 494 in the low
deadtime mode. The reset value of the register is 500. The 10-bit field
allows latencies up to 1023 cycles.

## Configuration

Configuration arrives as 20-bit SPI frames, MSB first. The SPI mode has clock
idle low and data sampled on the rising edge, with `cs_n` framing each word.
SCLK must be slower than a quarter of the core clock.

| frame bits 19:18 | operation |
|---|---|
| 00 | set address: `[17:16]` space, `[15:0]` address |
| 01 | write `[15:0]` to the current address |
| 10 | write and increment the address (auto-increment) |

The register spaces are:

- **Space 0, GCR.** 14 words of 16 bits, 224 bits in all.
  - Bias DAC *i* (0 to 15) is at bits `[10i+9:10i]`.
  - Autozero period is at `[167:160]`, in units of 16 cycles.
  - Autozero width is at `[171:168]`.
  - ADC input multiplexer is at `[175:172]`.
  - ADC reference trim is at `[185:176]`.
- **Space 1, ECCR.**
  - Word 0 is `{latency[9:0], triggerless, dt_high, binary_only, enc_bypass,
    gray_bypass, debug}`.
  - Word 1 is the 16-bit macro column mask.
- **Space 2, pixel configuration.** The address `{row[5:0], pair[4:0]}` names
  two horizontally adjacent pixels, and one 16-bit write sets both pixels: the
  even column gets the low byte. The periphery turns the address into
  (macro column, region, PCR index) and sends it down that column's
  configuration bus. Each pixel has 8 bits:
  - `[0]` enable;
  - `[1]` calibration injection enable;
  - `[5:2]` threshold trim for the asynchronous front end;
  - `[7:6]` spare.

  The reset value is `0x01`: every pixel is enabled.

With auto-increment, a whole row of 32 pixel pairs needs one address frame and
32 data frames.

## Analog periphery models

- **Bias DACs.** Each of the 16 10-bit DACs is segmented: the 8 MSBs drive a
  16 x 16 thermometric matrix, and the 2 LSBs drive binary cells.
  `dac_decoder` is the real logic. It produces row-thermometer, row-select
  and column-thermometer lines. A cell is on if its row is fully on, or if its
  row is the selected one and its column line is on. `global_bias_dac` counts
  the cells that are on and outputs that number of unit currents, and the
  complement on the other output.
- **Monitoring ADC.** The ADC is dual slope. `adc_ctrl` resets the integrator,
  integrates the input for 4096 cycles and then discharges with the reference.
  It counts the discharge cycles until the comparator flips, which gives a
  12-bit code. `adc_analog` models the integrator as an exact charge counter:
  the code is ceil(4096 · Vin / 900 mV), and a conversion takes
  4096 + code + 2 cycles.

## How far it can be trusted, and where it departs

These points follow the chip description:

- the region size and its buffer depth;
- the six ToTs of 5 bits;
- the two deadtimes;
- the 10-bit timestamp and the Gray option;
- the column-drain principle;
- the drainer FSM with its trigger buffer and busy check;
- the dispatcher steps: SOP, 16-bit chunks, 8b10b or filling, IDLE;
- the 20-bit serializer;
- the GCR size and the ECCR contents;
- auto-increment;
- the segmented DAC split;
- the dual-slope ADC.

These points are this design's own choices:

- all register addresses, bit maps and the SPI frame format;
- the lowest-index-first priority in the hit mapper and in the buffer;
- expiry of untriggered rows after latency + 64;
- the ToT measured in core clock cycles and clipped to the deadtime (the fast
  ToT oscillator of the synchronous front end is not modelled);
- the K-characters used for SOP and IDLE, and the filling pattern;
- the FIFO depths;
- the rule of 16 free words before a trigger is sent;
- the clock ratio of 20 serial bits per core cycle.

Known departures and omissions:

- The chip description mentions both 15 and 16 global bias DACs. The design
  has 16, all coded in the GCR.
- The automatic gain and discharge-current calibration of the ADC is not
  implemented. Neither are the "direct programming" registers, which are only
  named.
- The clock domains are idealised. `clk_ser` must be exactly 20 times `clk`,
  edge aligned. The SPI inputs are synchronised into `clk`.
- Event-loss rates were not simulated statistically. The buffer depth is
  taken from the description's own study.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
with a line `TB_RESULT checks=N failures=M` and has a watchdog. With
Verilator 5:

```
verilator --binary --timing -Irtl rtl/chipix_pkg.sv tb/tb_mcd.sv \
          --top-module tb_mcd -o sim && ./obj_dir/sim
```

`tb_chipix_top` runs the whole chip at full size: 4096 pixels, all
parameters at their defaults. Building it takes about two minutes with `-j 8`,
and the run takes about ten seconds. It configures the chip over SPI and
drives hits and triggers. It decodes the serial stream back into packets and
checks each one against an independently predicted packet. It also counts
each mechanism at least once:

- triggered readout and a non-matching trigger;
- multi-region drain;
- more than six hits in a region;
- a pixel masked through auto-incremented PCR writes;
- region overflow and trigger-queue overflow;
- triggerless, binary-only, high-deadtime and debug-injection modes;
- column mask;
- 8b10b and Gray bypass;
- DAC codes and an ADC conversion.

To change the array size for quicker experiments, override `NMC`, `NPR` and
`DEPTH` on `chipix_top`. The lower blocks take the same parameters.
