# LiTE-DTU digital core: gain selection, lossless packing and framing for a calorimeter link

Each crystal of the upgraded CMS electromagnetic calorimeter is read by a
trans-impedance preamplifier with two outputs, high gain and low gain, each
digitised by a 12-bit ADC at 160 MS/s. Sending both streams raw would need
2 x 12 bit x 160 MS/s = 3.84 Gb/s per channel. The data transmission unit
(LiTE-DTU) brings this down to about 1 Gb/s without losing information:

1. it keeps one gain per sample: high gain unless the high-gain ADC saturates
   near that sample, and it tags the sample with a gain bit;
2. it packs the samples into 32-bit words, where pedestal ("baseline")
   samples take 6 bits and only pulse ("signal") samples take 13 bits;
3. it cuts the word stream into frames closed by a trailer with a sample
   count, a CRC-12 and a frame number;
4. it buffers the words in a FIFO and sends them on a serial link, filling
   idle word slots with synchronization words.

This repository is synthesizable SystemVerilog for that digital core, built
from the published description of the LiTE-DTU for the CMS ECAL upgrade for
the HL-LHC. The description fixes the chain, the gain-selection rule and the
word formats. It leaves many sizes open: the selection window, the frame
length, the FIFO depth, the link rate and the CRC polynomial. This design
chooses them, and they are listed under "Choices made here". The ADCs, the
preamplifier and the optical link are analog or external parts and are not
included. The core's ports stand where they would connect.

## Data path

```
adc_hg[11:0] --> lookahead_fifo (8 deep) --+
                                           +-> gain_select --> huffman_encoder --> frame_builder
adc_lg[11:0] --> lookahead_fifo (3 deep) --+    13-bit            32-bit words       data word +
                                                samples           + sample count     trailer
                                                                                        |
                               ser_data[7:0] <-- serializer <-- output_fifo (16 x 32) <-+
                                                 (sync when empty)
```

Everything runs on the 160 MHz sampling clock and takes one sample per clock.
There is no back-pressure. The encoder never stalls, and the FIFO drops
words, setting a sticky flag, if it is ever full.

| module            | file                   | role |
|-------------------|------------------------|------|
| `lite_dtu`        | `rtl/lite_dtu.sv`      | top: the chain above |
| `gain_select`     | `rtl/gain_select.sv`   | look-ahead gain choice, gain bit |
| `lookahead_fifo`  | `rtl/lookahead_fifo.sv`| per-ADC sample FIFO with every entry visible |
| `huffman_encoder` | `rtl/huffman_encoder.sv` | packs samples into 32-bit words |
| `frame_builder`   | `rtl/frame_builder.sv` | frame counting and trailer |
| `crc12`           | `rtl/crc12.sv`         | CRC-12 over a frame's words |
| `output_fifo`     | `rtl/output_fifo.sv`   | 2-write, 1-read word FIFO |
| `serializer`      | `rtl/serializer.sv`    | word-to-slice gearbox with sync insertion |
| `dtu_pkg`         | `rtl/dtu_pkg.sv`       | sample type, word headers, CRC function |

## Gain selection with look-ahead

The high-gain output covers about 200 GeV in 50 MeV steps and the low-gain
output about 2 TeV in 500 MeV steps. Both fit 12 bits (4000 codes). The
selector sends the high-gain value unless a high-gain sample in a window
around the current one is at full scale (4095). Then it sends the low-gain
value with the gain bit set.

The window is what makes the FIFOs necessary. To switch a pulse to low gain
*before* it saturates, the selector must see samples that have not been
decided yet. Both ADC streams therefore pass through a FIFO, and the sample
being decided sits `LOOK_AHEAD` entries behind the newest one. The high-gain
FIFO is `LOOK_AHEAD + 1 + LOOK_BACK` deep. The window test is a simple OR of
"equals 4095" over all its entries. The low-gain FIFO only has to delay its
stream by the same amount.

With the defaults, `LOOK_AHEAD = 2` and `LOOK_BACK = 5`, the window is 8
samples. That is the length of a pulse at 160 MS/s: 40-50 ns, or 7-8 samples,
two of them on the rising edge. A saturating pulse is therefore sent in low
gain from two samples before its first saturated sample to five after its
last one. It does not switch gain in the middle of an edge.

Latency: a sample captured on clock edge t appears at the selector output
after edge t + `LOOK_AHEAD` + 1. After reset, `sample_valid` rises with the
first captured sample. Before reset, the FIFOs hold zeros, which count as
"not saturated".

## Word formats

All words are 32 bits. The header bits alone tell the word type apart.

| word                  | layout (MSB ... LSB)                                   | samples |
|-----------------------|--------------------------------------------------------|---------|
| baseline quintet      | `01` s4 s3 s2 s1 s0 (6 bit each)                        | 5 |
| incomplete baseline   | `10` N(6 bit) s3/0 s2/0 s1/0 s0, unused slots zero      | N = 1..4 |
| signal couple         | `001010` s1 s0 (13 bit each: gain bit, 12-bit value)     | 2 |
| single signal         | `001011` `0101010101010` s0                              | 1 |
| trailer               | `11` `01` samples(8) CRC12(12) frame(8)                  | - |
| synchronization       | `1110` followed by 28 bits `0101...01` (0xE5555555)      | - |

A sample is a **baseline** sample if it is high gain and below 64, so 6 bits
hold it exactly and no gain bit is needed. Every other sample, including any
low-gain sample, is a **signal** sample and is sent in full, as 13 bits.

The encoder keeps at most one open group. That is either up to four baseline
samples or one signal sample, never both; an assertion checks it. A group is
sent when it is full, or when a sample of the other kind arrives. In that
case it goes out in its incomplete format. The earliest sample is always in
the least significant slot. The encoder produces at most one word per clock,
registered, one clock after the sample that completes or closes it.

## Frames and CRC

`frame_builder` passes each data word on. It counts words and samples, and
runs `crc12` over the words. With the `FRAME_WORDS`-th data word it writes
the trailer in the same clock. The FIFO has a second write port for this.
The trailer carries:

- the number of samples in the frame. It is 8 bits wide, so `FRAME_WORDS`
  may be at most 51 (5 samples per word); the default is 50;
- the CRC-12 of the frame's data words. The polynomial is
  x^12+x^11+x^3+x^2+x+1, the initial value is zero, and each word is fed
  MSB first. This is the remainder of (message x x^12) divided by the
  polynomial;
- the frame number, which counts from 0 after reset and wraps at 256.

The trailer is not itself in the CRC. Sync words are not part of any frame.

## FIFO and link

The serializer takes a new word every 32/`LANE_W` clocks. It takes the head
of the FIFO, or the sync word if the FIFO is empty. It shifts the word out
MSB first, `LANE_W` bits per clock. With `LANE_W = 8` at 160 MHz this is
1.28 Gb/s, one LpGBT e-link rate. `ser_data` is the parallel input of a
full-custom 8:1 serializer running at 1.28 GHz, which is not part of this
RTL. `ser_word_start` marks the first slice of each word, and `ser_is_sync`
marks sync words.

Rates that decide the FIFO size:

| input                              | words needed            | link        |
|------------------------------------|-------------------------|-------------|
| pedestal only                      | 51 per 250 clocks (1.044 Gb/s) | 62.5 per 250 clocks: 18.4 % sync words |
| 8-sample pulse                     | 4 couples in 8 clocks, + at most 2 incomplete words | drains 2 |
| saturating pulse (low gain over up to 15 samples) | about 8 words in 15 clocks | drains about 4 |
| signal only, continuous            | 1 word per 2 clocks (2.56 Gb/s) | does not fit |

A 16-word FIFO absorbs isolated pulses with a wide margin. The end-to-end
test, with a pulse every 100-600 clocks, peaks at 6 words. A continuous
signal stream overflows it after about 60 clocks (net growth of one word per 4 clocks). That stream is the case
the compression relies on never happening for long: wider-than-6-bit
samples are expected in well under one in a thousand pedestal samples.

## Choices made here

The chain, the gain rule, the gain bit, the word formats with their headers,
the trailer fields, the sync pattern and the output FIFO follow the published
description. These points are this design's own:

- **Window:** `LOOK_AHEAD = 2` and `LOOK_BACK = 5`, taken from the pulse
  shape. Saturation means a high-gain code of 4095 (`SAT_LEVEL`).
- **Gain bit:** 1 marks low gain.
- **Baseline samples:** only high-gain samples below 64 are baseline
  samples.
- **Incomplete baseline word:** its sample count is read as a 6-bit field,
  followed by four sample slots.
- **Slot order:** the earliest sample is in the least significant slot.
- **Closing a group:** a partial group closes only when the sample kind
  changes. There is no timeout or end-of-frame flush. A frame boundary
  falls between words, and an open group continues into the next frame.
- **Frame length:** a fixed 50 data words. The trailer is written in the
  same clock as the last word.
- **CRC:** the polynomial and initial value above.
- **FIFO:** 16 words deep. Words are dropped on overflow, with a sticky
  `fifo_overflow` flag.
- **Link slice:** 8 bits per clock, sent MSB first.
- **Reset:** synchronous and active low, clearing all state.
- **Not modelled:** the triple modular redundancy (TMR) used against single
  event upsets is listed only for the ADC. It is not applied to this logic.

## Parameters of `lite_dtu`

| parameter     | default | meaning |
|---------------|---------|---------|
| `LOOK_AHEAD`  | 2       | samples after the current one inside the saturation window |
| `LOOK_BACK`   | 5       | samples before it |
| `FRAME_WORDS` | 50      | data words per frame (at most 51) |
| `FIFO_DEPTH`  | 16      | output FIFO words, power of two |
| `LANE_W`      | 8       | bits per clock on the link; must divide 32 |

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with an independent model: a queue-based packer, a long-division CRC, a
queue FIFO, and a window-scan gain selector. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_lite_dtu`: the whole core at default parameters, for 20,000 samples of
  pedestal with pulses of three sizes, some of them saturating. It decodes
  the link back into samples and compares every one, in order, with its own
  gain-selection model. It checks every trailer (length, count, CRC, frame
  number). It then checks that all samples have left within 400 clocks of
  pedestal. A final phase of signal-only samples must overflow the FIFO.
  Each mechanism is counted and must occur: low gain, both baseline
  formats, both signal formats, trailer, sync word and overflow.
- `tb_lite_dtu_pedestal`: the pedestal-only rate. It measures 18.4 % sync
  words, and the FIFO never holds more than two words.
- `tb_gain_select`, `tb_lookahead_fifo`, `tb_huffman_encoder`, `tb_crc12`,
  `tb_frame_builder`, `tb_output_fifo`, `tb_serializer`: the blocks.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dtu_pkg.sv \
    tb/tb_lite_dtu.sv --top-module tb_lite_dtu -Mdir obj_tb_lite_dtu
./obj_tb_lite_dtu/Vtb_lite_dtu
```

Swap in another testbench name to run the others. Each runs in well under a
second. `verilator --lint-only -Wall -Irtl -y rtl rtl/dtu_pkg.sv rtl/lite_dtu.sv`
lints the core. The RTL uses packages, packed structs, an enum and
immediate and concurrent assertions, and nothing vendor-specific. The
output FIFO's storage is a plain array that synthesizes to a memory.
