# WOLA windowing co-processor for an embedded motor-imagery BCI

A brain-computer interface for motor imagery records EEG while a person
imagines moving the left or right hand. It then decides which hand it was.
The classifier here is the usual chain:

1. filter each channel;
2. extract spatial features with common spatial patterns (CSP);
3. separate the two classes with a linear discriminant (LDA).

The filter is not fixed. It is a weighted overlap-add (WOLA) filter bank with
one bin per hertz. A band-selection step keeps only the bins that show
event-related desynchronisation or synchronisation (ERD/ERS) for that subject.
The other bins are zeroed before the signal is rebuilt. This copes with the
large differences between subjects in where their alpha and beta activity
lies.

The whole chain runs on a small FPGA system on chip: a soft processor, DDR2
memory and a few peripherals. A hardware/software split decides what goes
where. Everything runs as C on the processor except one step, the
**windowing** at the front of the WOLA analysis bank. That step multiplies
every analysis frame of every channel by the analysis window h(n), and it
moves into a co-processor. The processor writes an order. The co-processor
fetches the EEG from DDR2 itself, weights it in parallel and writes the
weighted frames back. It then raises an interrupt, and the processor carries
on with time folding, FFT, band selection, synthesis, CSP and LDA.

This repository holds the RTL of that hardware layer. It has the windowing
co-processor, the on-chip memories, the execution-time timer and the bus
decoder that ties them to the processor. The processor, the DDR2 controller,
the PLL and the vendor UARTs are not included. Their connections are ports of
the top module `ebci_sopc`.

## Block diagram

```
             host_req / host_rsp (processor data master, 32-bit)
                          |
                  host_bus_decoder ------------------------------+
        0x00000 |   0x10000 |        0x11000 |          0x11100 |
                |           |                |                  |
   +------------v-----------|----------------v---+              |
   | wola_window_ip         |                    |              |
   |  wola_coef_mem  <-- c_rd --  wola_window_ctrl --> irq_wola |
   |  (64 KB h(n))   --> coefs -> wola_weighting |              |
   |                            (8 x 16x16 mult) |              |
   +----------------------------|----------------+              |
                                | ddr_* (128-bit master)        |
                         DDR2 controller (external)             |
                onchip_buffer (4 KB)              interval_timer --> irq_timer
```

| Module | What it is |
|---|---|
| `ebci_sopc` | top: the hardware layer without the vendor parts |
| `wola_window_ip` | the windowing co-processor (wraps the next three) |
| `wola_window_ctrl` | register file, channel/frame/word sequencer, DDR2 master, interrupt |
| `wola_coef_mem` | 64 KB RAM holding h(n), banked to give 8 coefficients per cycle |
| `wola_weighting` | 8 parallel Q1.15 multipliers with rounding and saturation |
| `onchip_buffer` | 4 KB on-chip staging RAM |
| `interval_timer` | 32-bit timer with a 10 us time-out, for execution-time measurement |
| `host_bus_decoder` | address decoder from the processor to the four slaves |
| `ebci_pkg` | bus structs, address map, register offsets, number formats |

## What the co-processor computes

In WOLA analysis, the input advances by R samples per frame (R is the
decimation factor). Each frame is the last La samples, multiplied point by
point by the analysis window h(0..La-1). The co-processor computes exactly
those weighted frames, for every frame of every channel in one order:

```
k = 0
for ch in 0 .. CHANNELS-1
  for m in 0 .. FRAMES-1
    for n in 0 .. WIN_WORDS-1               (one word = 8 samples)
      DST[k++] = weight( SRC[ch*CH_STRIDE + (m*HOP_WORDS + n)*16 bytes],
                         h-row COEF_ROW + n )
```

The processor lays the trial out in DDR2 channel by channel. Each channel is
padded to a whole number of 16-byte words; CH_STRIDE is the distance between
channels. The output is frame after frame: `CHANNELS * FRAMES * WIN_WORDS`
consecutive words. Software then folds each frame and runs the FFT. A frame
overlaps the previous one whenever HOP_WORDS < WIN_WORDS, and frame m starts
at sample m*R. La and R are run-time values, but both must be multiples of 8,
the bus-word size.

`weight` treats each 16-bit lane as follows:

- The sample is a signed 16-bit integer, the storage format of the EEG.
- The coefficient is Q1.15, so 0x7FFF is just under +1.0 and 0x8000 is -1.0.
- The 32-bit product is rounded to nearest (half an LSB added, ties toward
  +inf) and shifted right by 15 bits.
- The result is clamped to ±32767/-32768.

The clamp is only reached by -32768 × -1.0. The lanes that clamp in the last
word are shown on `wola_sat`.

## Programming model

Host addresses are byte addresses on a 20-bit bus. All slaves answer a read
one cycle later (`readdatavalid`) and never stall. A read outside the map
returns 0xDEADBEEF and pulses `host_decode_err`.

| Base | Slave |
|---|---|
| 0x00000 | window RAM: 32-bit word i holds h(2i) in bits 15:0 and h(2i+1) in 31:16 |
| 0x10000 | 4 KB buffer |
| 0x11000 | windowing registers |
| 0x11100 | timer registers |

Windowing registers (word offsets):

| Off | Name | Meaning |
|---|---|---|
| 0 | CTRL | bit 0: write 1 to start; bit 1: irq enable |
| 1 | STATUS | bit 0 busy (read only); bit 1 done (write 1 to clear, which also drops `irq_wola`) |
| 2 | SRC | byte address of channel 0, sample 0 (16-byte aligned) |
| 3 | DST | byte address of the first output word |
| 4 | WIN_WORDS | La / 8 |
| 5 | HOP_WORDS | R / 8 |
| 6 | FRAMES | frames per channel, normally (samples − La) / R + 1 |
| 7 | CHANNELS | channels in this order |
| 8 | CH_STRIDE | bytes between channels in the source |
| 9 | COEF_ROW | first row of h(n) in the window RAM (row = 8 coefficients) |
| 10 | CYCLES | clock cycles the last order took (read only) |
| 11 | WORDS | words the last order wrote (read only) |

The order registers are frozen while an order runs, and a start while busy is
ignored. Several windows can sit in the window RAM at once; COEF_ROW selects
one. The RAM holds 4096 rows.

A typical sequence:

1. Load h(n) once.
2. Write SRC, DST, WIN_WORDS, HOP_WORDS, FRAMES, CHANNELS, CH_STRIDE and
   COEF_ROW.
3. Write CTRL = 3.
4. Wait for `irq_wola`.
5. Write STATUS = 2.

Timer registers (word offsets):

| Off | Name | Meaning |
|---|---|---|
| 0 | STATUS | bit 0 time-out (any write clears); bit 1 running |
| 1 | CONTROL | bit 0 irq enable; bit 1 continuous; bit 2 start; bit 3 stop |
| 2 | PERIOD | a time-out every PERIOD+1 cycles; reset value 1499 (10 us at 150 MHz) |
| 3 | COUNT | current count |
| 4 | TICKS | time-outs since start (any write clears) |

Software times a stage by clearing TICKS, starting the timer in continuous
mode and reading TICKS at the end. The result is in 10 us units.

## Timing of the co-processor

The controller keeps one bus word in flight. Each word goes through three
states:

1. Issue the read. The coefficient row is read from the on-chip RAM at the
   same time.
2. Wait for the read data, then feed the multipliers.
3. Write the registered product.

The DDR2 port is a pipelined memory master. A request is held until
`ddr_waitrequest` is low. Read data may come back any number of cycles later
on `ddr_readdatavalid`. Assertions in the controller check that a stalled
request stays unchanged and that a read and a write are never issued
together.

With a memory that never stalls and returns data after one cycle, a word
takes 3 cycles. An order of K words then takes 3K+1 cycles, as counted in
CYCLES. Consider one 22-channel, 500-sample trial with La = 128 and R = 32.
That is 12 frames per channel and K = 4224 words, so 12673 cycles, or 84 us at
150 MHz. With the random stalls and 2–6 cycle read latency of the test memory,
it takes about 27 000 cycles. The whole software-plus-hardware WOLA stage of
the original system takes 4.6 ms per trial, so one word in flight is enough.
Throughput can be raised by keeping several reads outstanding if the DDR2
latency grows.

## How the design relates to the system it reproduces

These points follow the original system:

- Only the windowing is in hardware, and it fetches the data itself.
- The processor hands it an order with the data address.
- It weights the samples with the window in parallel.
- It writes the result back to DDR2 and interrupts the processor.
- Samples are 16-bit.
- The window RAM is 64 KB and the staging RAM is 4 KB.
- The clock is 150 MHz, and the timer is 32-bit with a 10 us period.

These are choices made here:

- **Eight lanes** (a 128-bit DDR2 word). The original weights the samples in
  parallel, but its lane count is not published. Eight matches the 64 KB RAM as 4096
  rows of 128 bits. `LANES` is a parameter, a power of two of at least 4.
- **Q1.15 window and round-to-nearest with saturation.** The coefficient
  format is not specified.
- **Register map, frame and channel loops, and one order for a whole
  trial.**
- **The host bus.** The original uses the FPGA vendor's interconnect. Here it
  is a single-master decoder with zero-wait slaves, so every read has a
  latency of exactly one cycle.
- **The timer's register set.** Its TICKS counter is what turns the 10 us
  time-out into an execution-time measurement.
- **No system DMA.** The original also has a general-purpose DMA engine next
  to the 4 KB buffer. This design leaves it out; the co-processor's own master
  moves the EEG data.
- **Single-word transfers.** The original quotes a DMA transfer of about
  4096 16-bit samples. Here every DDR2 request moves one 128-bit word, with no
  bursts.

Not in hardware, by design: the FFT and IFFT of the WOLA bank, the band
selection (hypothesis test, smoothed energy operator or ERD/ERS analysis),
CSP and LDA. These run as software on the processor.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
a separate 64-bit integer model in `tb/wola_ref_pkg.sv`. `tb/ddr2_model.sv`
is a behavioural DDR2 port with random wait states and random in-order read
latency.

| Testbench | Covers |
|---|---|
| `tb_wola_weighting` | corner and random operands, rounding ties, saturation, 1-cycle latency |
| `tb_wola_coef_mem` | host load with byte enables, row reads, host read-back |
| `tb_wola_window_ctrl` | 3K+1 cycle count, overlapping frames, channel stride, stalls, irq, frozen registers |
| `tb_wola_window_ip` | window load over the bus, two orders, forced saturation |
| `tb_onchip_buffer`, `tb_interval_timer`, `tb_host_bus_decoder` | their slaves' behaviour |
| `tb_ebci_sopc` | one full 22 × 500 trial at default parameters |
| `tb_ebci_datasets` | trial sizes of four EEG recordings, with 76 000 weighted words compared |

**`tb_ebci_sopc`.** Runs one full 22 × 500 trial at the default parameters:
synthetic alpha and beta EEG, a Hann window, and the timer measuring the
order. It counts DDR2 stalls, overlapping frames, the channel loop,
interrupts, timer time-outs, saturation, decode errors and buffer use. Each
must happen at least once.

**`tb_ebci_datasets`.** Runs the trial sizes of the four EEG recordings used
to evaluate the system:

- 22 ch × 500 samples at 250 Hz;
- 60 ch × 500 samples at 250 Hz;
- 118 ch × 2000 samples at 1000 Hz with La = 1000;
- 8 ch × 500 samples at 250 Hz.

The trial lengths of the last three recordings, and the 8 channels of the
last one, are assumptions; the windows (La, R) are test choices.

Classification accuracy is a property of the software chain and is not
tested here.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ebci_sopc \
  rtl/*.sv tb/wola_ref_pkg.sv tb/ddr2_model.sv tb/tb_ebci_sopc.sv
./obj_dir/Vtb_ebci_sopc
```

Testbenches that use the DDR2 model or the reference package need those two
files. The other testbenches need only the package and the RTL.

## Known limits

- La and R must be multiples of 8 samples. A channel must start on a 16-byte
  boundary, so pad channels in memory.
- One word in flight at a time. This is enough for the stated per-trial
  budget but does not use the full DDR2 bandwidth.
- The host bus has no wait states. A slow slave added later would need a
  waitrequest path in `host_bus_decoder`.
- The weighting rounds ties toward +inf. A floating-point reference will
  differ by at most one LSB on ties.
