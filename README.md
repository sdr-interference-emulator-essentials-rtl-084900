# SDR-IE FPGA firmware in SystemVerilog

This is the programmable-logic part of a small software-defined radio. The radio captures a
complex baseband signal and can transmit one at the same time. The FPGA sits between three things:

- a dual 16-bit ADC, sampling at 250 MS/s, that sends its data over QDR LVDS lanes;
- a dual 16-bit DAC that takes 250 MS/s per channel over one interleaved LVDS bus;
- the processor system, which moves samples to and from memory over DMA and sets everything
  through AXI4-Lite registers.

The receive side turns the ADC lanes into an I/Q sample stream. A DSP chain then shifts the
stream in frequency, decimates and filters it, and cuts it into DMA packets. The transmit side
does the reverse: it upsamples, filters, interpolates and shifts the stream, then puts it on the
DAC bus. A clock manager with a programmable phase, a reset synchroniser and a trigger that
starts both converters tie the two sides together.

The hardest part is the ADC capture. The data lanes and the frame lane reach the FPGA with
unknown, differing delays. The firmware therefore lets the processor sweep lane delays and the
clock phase until a built-in pattern checker counts zero bit errors. That part is explained first.

## Clock domains

| clock       | rate    | source                                    | used by |
|-------------|---------|-------------------------------------------|---------|
| clk500      | 500 MHz | clock manager, ADC data clock, phase-shifted | ADC bit capture, DAC bus |
| clk250      | 250 MHz | clk500 / 2                                | ADC words, ADC controller, chain input FIFO write side |
| clk125      | 125 MHz | clk250 / 2                                | trigger, DAC enable |
| clk125_ref  | 125 MHz | unshifted ADC clock / 4                   | brought out only |
| clk         | 250 MHz | processor                                 | DMA streams, MMCM register, DAC input FIFO write side |
| clk2x       | 500 MHz | processor                                 | all filtering, chain registers |
| clk2d       | 125 MHz | processor                                 | brought into the chains, unused |

The converter clocks and the processor clocks are treated as unrelated. Every crossing between
them goes through `async_fifo`, a dual-clock FIFO with Gray-coded pointers. Single control bits
go through two-flop synchronisers.

## ADC capture and alignment (`adc`, `adc_ctrl_axi`, `adc_ptrn_checker`, `clock_system`)

Each ADC channel sends one 16-bit sample every 4 ns. It uses four data lanes and one frame lane.
Each lane carries one bit on every edge of the 500 MHz data clock, so four bits per sample.
Lane k sends bits 12+k, 8+k, 4+k and k, most significant first. The frame lane sends `1100`
within each sample, which marks where a sample starts.

Capture works like this. On each clk500 cycle, every lane is sampled on both clock edges. The two
bits are shifted into a 16-bit history per lane. A delay value picks which four consecutive
history bits form the lane's nibble for the current clk250 cycle. The delay counts whole bit
periods, from 0 to 12. The data lanes share one delay and the frame lanes share another. This
stands in for the FPGA's input delay elements. As with those elements, a new value is loaded
only while VTC compensation is off. Every clk250 cycle, the eight nibbles give one 16-bit word
per channel: channel A becomes I and channel B becomes Q.

To align the capture, the processor:

1. waits for the delay controller's ready flag and turns VTC off;
2. selects the frame check and steps the frame delay until the checker reports zero errors;
3. sets the ADC to a test pattern, writes the pattern as the checker's reference, selects "A and
   B" and steps the data delay the same way;
4. if no delay setting works, writes a new phase to the clock manager and starts again. The phase
   moves clk500 against the ADC clock in 50 ps steps, and `locked` drops while the phase changes.

A checker run works as follows. The run starts when the checker reset is released. The checker
compares 1024 words against the reference. It counts the bits that differ, using XOR and a
population count. Then it raises `done`. The ADC testbench and the end-to-end testbench both
follow this procedure. The ADC model in `tb/adc_lvds_model.sv` has a frame-to-data skew of two
bit periods, and the procedure finds it.

Once aligned, the ADC forwards samples only while `adc_data_ena` is high and the clock is valid.
It forwards one sample every `adc_sample_period+1` clk250 cycles. The overrange pins travel in
`tuser`.

### ADC controller registers (AXI4-Lite, clk250)

| addr | name        | bits |
|------|-------------|------|
| 0x00 | CHCK_CTRL   | [0] checker reset (1 after reset), [2:1] select: 0 A, 1 B, 2 A and B, 3 frame |
| 0x04 | CHCK_REF    | [15:0] reference word |
| 0x08 | IDLY_DATA   | [8:0] data-lane delay |
| 0x0C | IDLY_FRAME  | [8:0] frame-lane delay |
| 0x10 | IDLY_LOAD   | write: load both delays (ignored while VTC is on) |
| 0x14 | IDLY_VTC    | [0] VTC enable (1 after reset) |
| 0x18 | STATUS      | [0] checker done, [1] delay controller ready |
| 0x1C | ERR_CNT     | error bits of the last run |

The clock manager has one register, at 0x00: the phase in 50 ps steps, modulo one 2 ns period.
Reading any other address returns `locked`. It sits on clk.

## Receive chain (`rx_chain`)

```
ADC (clk250) -> FIFO -> x DDS or constant -> [CIC decimator 4..128] -> FIR0 -> [FIR1] -> downsampler -> packetizer -> FIFO -> DMA (clk)
                                              bypassable (MPX0)                 bypassable (MPX1)
```

Everything between the two FIFOs runs on clk2x. Each stage passes {Q, I} pairs with a
valid/ready handshake. A stage holds its input only while its output is waiting, so a stalled
DMA backs the whole chain up to the input FIFO. The ADC cannot wait. When the input FIFO is
full, samples are dropped, and each refused write is counted in the status register.

- **Mixer** (`cmpy`, `dds`): a two-stage complex multiplier. It multiplies by the constant
  register or by the DDS output. The DDS is a 32-bit phase accumulator with a 1024-entry sine
  table. The table is computed when the design is built, and cosine is read a quarter turn
  ahead. The phase advances once per sample.
- **CIC decimator** (`cic_decim`): four integrators, a rate-R resampler and four combs. The gain
  R^4 is removed by shifting right by 4*ceil(log2 R), with rounding. For a rate that is a power
  of two, the gain is exactly one.
- **FIR0, FIR1** (`fir`): 32 taps, direct form, computed in one clock. Coefficient words are
  written one by one into a shadow set. A write to the control register copies the shadow set
  into the active set. After reset, each filter has a single tap of 0x7FFF, which is close to
  a pass-through.
- **Downsampler**: keeps the first of every `factor` samples.
- **Packetizer**: outputs 32-bit words {Q, I} with `tlast` on every 1024th word.

## Transmit chain (`tx_chain`)

```
DMA (clk) -> upsampler -> FIFO -> [FIR1] -> FIR0 -> [CIC interpolator 4..128] -> x DDS or constant -> FIFO -> DAC (clk)
```

The upsampler runs on clk and inserts `factor-1` zeros after each sample. The filtering runs on
clk2x. The CIC interpolator takes one input every R output samples. Its gain R^3 is removed by a
shift of 3*ceil(log2 R). The DAC side sets the pace: the chain's output FIFO is read whenever the
DAC takes a sample. The transmit testbench checks that, with upsampling by 2 and CIC interpolation by 4,
the DAC receives a new sample on every clk cycle without a gap.

### Chain registers (AXI4-Lite, clk2x; the same map in both chains)

| addr | name     | bits |
|------|----------|------|
| 0x00 | DDS_PINC | phase increment per sample, 2^32 = one turn |
| 0x04 | CIC_RATE | [7:0] rate, clamped to 4..128 (4 after reset) |
| 0x08 | FIR0_CFG | write: apply FIR0's reloaded coefficients |
| 0x0C | FIR0_RLD | [15:0] next FIR0 coefficient, tap 0 first |
| 0x10 | FIR1_CFG | write: apply FIR1's coefficients; [0] FIR1 in the path (1 after reset) |
| 0x14 | FIR1_RLD | [15:0] next FIR1 coefficient |
| 0x18 | RATE     | [15:0] downsampling (RX) or upsampling (TX) factor, 1 after reset |
| 0x1C | DDS_EN   | [0] 1: mix with the DDS, 0: with the constant |
| 0x20 | CIC_EN   | [0] 1: CIC in the path, 0: bypassed (after reset) |
| 0x24 | CONST    | {Q, I} constant multiplier, 0x7FFF + j0 after reset |
| 0x28 | STATUS   | RX: input FIFO overflow count; TX: samples sent |

### Number format

Samples and coefficients are Q1.15. Each multiplying stage rounds half up and saturates to 16
bits (`sat_round` in `sdr_pkg`). With FIR coefficients of 0x7FFF, a filter therefore scales the
signal by 32767/32768. This is visible in the least significant bit.

## DAC bus (`dac`, `axis_checker`)

The DAC receives one 16-bit word per clk500 cycle: first I, with FRAME high, then Q. DCI is a
forwarded clock that toggles with each word. Every pin has an `_N` leg, which is the complement
of its `_P` leg.

The DAC takes one sample every second clk500 cycle, which is 250 MS/s, from its input FIFO.
While the data enable is low, or the FIFO is empty, it sends the idle sample given on its I and
Q inputs. An empty FIFO while enabled is an underflow.

`axis_checker` watches the samples taken. It counts samples, gaps (a take with nothing in the
FIFO) and, when asked to, breaks in a ramp on I.

## Trigger and reset (`trigger_system`, `sync_rst`)

A single enable from the processor passes through two flip-flops in clk125. It then drives both
`adc_data_ena` and `dac_data_ena`, so reception and transmission start on the same clock.

`sync_rst` turns "MMCM not locked" into `rst250`. The reset asserts asynchronously, even with
no clock running, and releases after two clk250 edges.

## What is modelled rather than built

- The processor system, DMA engines, AXI interconnect, debug cores and all board parts (RF
  front end, converters, Ethernet, USB, power, low-speed converters) are outside this RTL. The
  top brings their signals out as ports: four AXI4-Lite slave ports, the two DMA streams, the
  DSP clocks and resets, and the data enable.
- `clock_system` is a behavioural model of the MMCM. It uses delays to shift clk500 and divides
  the other clocks from it. For synthesis, replace it with the vendor clock primitive and its
  dynamic-reconfiguration port.
- The LVDS input and output buffers are reduced to their `_P` leg, and the DDR output registers
  to plain registers. The input delay elements are modelled as a choice of whole bit periods.

## Choices this design makes

These points are not given by the specification this RTL was written from. Each one is a
choice made here:

- the frame pattern;
- the register maps and reset values;
- 32 FIR taps, 4 CIC stages, FIFO depth 16 and 1024-word packets;
- the checker length of 1024;
- the Q1.15 rounding;
- zero-stuffing in the upsampler;
- the interleaved DAC bus format and the idle sample;
- the 50 ps phase step;
- how the status registers are used.

The reset synchroniser is described as working in the clk125 domain, but the block diagram names
it for clk250 and wires its output to the ADC. This design follows the diagram.

## Simulating

Each block has a self-checking testbench, `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_rx_chain rtl/sdr_pkg.sv tb/dsp_ref_pkg.sv tb/tb_rx_chain.sv -o sim
./obj_dir/sim
```

`tb/dsp_ref_pkg.sv` holds plain reference models of the DSP stages: oscillator, mixer, FIR, CIC,
down- and upsampling. The chain testbenches and the end-to-end testbench compare the hardware
with these models sample for sample. `tb/axil_master.sv` is a small AXI4-Lite driver, and
`tb/adc_lvds_model.sv` generates the ADC's LVDS lanes.

`tb_sdr_ie_top` runs the complete design with its default parameters for about 110 µs of
simulated time, which takes seconds. It takes the design through the following steps:

1. lock the clock manager, then shift its phase and relock;
2. align the ADC delays;
3. check for idle DAC words while the design is disabled;
4. set the receive chain to DDS mixing, CIC decimation by 4, FIR1 bypassed and downsampling
   by 2, and compare two full DMA packets;
5. set the transmit chain to upsampling by 2 with the CIC bypassed, and compare the decoded DAC
   bus;
6. let the DAC underflow;
7. stall the receive DMA until the input FIFO overflows.

It counts each of these mechanisms and fails if any of them never happened.
