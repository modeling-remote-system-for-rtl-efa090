# Wireless sensor link: RLE compression, HDLC framing and a quadrature FSK bit detector

This is the digital part of a low-cost, short-range telemetry link for a
wearable biomedical sensor. A sensor signal is digitised by an 8-bit ADC.
A transmitter FPGA reads the samples, compresses them with run-length
encoding and packs them into HDLC frames. An FSK radio sends the frames.
At the receiver, a small logic network turns the radio's two limited
baseband signals back into bits. A receiver FPGA checks and unpacks the
frames and expands the runs again.

The design's premise is that a body signal changes slowly. After 8-bit
conversion it holds the same value for several samples in a row, so
run-length encoding cuts the amount sent over the radio at very little logic
cost.

The RLE compressor, the HDLC stage chain and the AND/OR/S-R structure of the
bit detector follow a published system description. The sample pacing, the
frame length, the FCS polynomial, the receiver internals and all handshakes
are this implementation's own choices. They are listed under
[Departures and choices](#departures-and-choices).

```
            transmitter FPGA                                   receiver
 ADC --SPI--> spi_master -> buffer_fifo -> rle_compressor -> hdlc_tx --tx_bit--> [FSK radio,
                 ^              |               ^                               channel,
                 +------ system_controller -----+                               I/Q receiver]
                                                                                    | rx_a, rx_c
 out_* <- rle_decompressor <- hdlc_rx <-(sampled at rx_bit_tick)- symbol_detector <-+
```

`sensor_link_top` contains all of the logic. The ADC, the FSK modulator, the
radio channel and the analog receiver are not logic, so they stay outside the
top. Their signals are ports: the SPI pins, the serial line `tx_bit` with its
bit-rate strobe `tx_bit_tick`, and the limited I/Q pair `rx_a`/`rx_c`.

## Sampling and the system controller

`system_controller` is the transmitter's main state machine (IDLE, RUN,
FLUSH):

- Every `SAMPLE_PERIOD` cycles (default 64) it pulses `spi_start`.
- `spi_master` then reads one sample in SPI mode 0, MSB first. `sclk` runs at
  clk/(2·`SPI_CLK_DIV`). `done` comes (2·8+1)·`SPI_CLK_DIV` = 68 cycles after
  the start is taken.
- The sample is written straight into `buffer_fifo`, a 16-deep
  first-word-fall-through FIFO. A sample that finds the buffer full is
  dropped and counted in `overflow_cnt`.
- In RUN, the controller moves one byte per cycle from the buffer into the
  compressor, whenever the buffer has a byte and the compressor is ready.
- After `BLOCK_SAMPLES` bytes (default 32) it enters FLUSH. There it holds
  `rle_flush` until the compressor takes it. The run in progress is then
  sent, and the end of a block never waits for the next sample that differs.

## Run-length compressor

`rle_compressor` is a two-state machine:

- **EMPTY**: the next byte is stored and the count is set to 1.
- **RUN**: an equal byte increments the count. A different byte ends the run:
  the word `{count, symbol}` goes out, the new byte is stored and the count
  restarts at 1. A run that reaches count 255 is also closed. `flush` closes
  the run and returns to EMPTY.

The word puts the count in the upper byte. For example, the input
`00 0a 0c 0c 0c 05 0d 0d 0d 00` gives `0100 010a 030c 0105 030d`, then
`0100` on flush. A word is valid one cycle after the byte that ends its run.
`in_ready` stays low while an unsent word sits in the output register, so the
compressor stalls the buffer rather than losing data.

With runs of length *r*, the compressor sends 2 bytes per *r* samples. The
serial line must carry about (2/*r*)·(8 + overhead) bits per sample period.
When the signal changes every sample, compression makes the data larger, and
the buffer overflows unless the line is fast enough. The end-to-end
testbench makes this happen on purpose.

## HDLC transmitter

Frame format, sent least significant bit first:

| flag | address | control | information | FCS | flag |
|---|---|---|---|---|---|
| `01111110` | 8 bits, `ADDRESS` = 01 | 8 bits, `CONTROL` = 03 | `INFO_BYTES` = 8 bytes (four RLE words, count byte first) | 16 bits | `01111110` |

`hdlc_tx` is a chain of small stages that pass single bits with valid/ready,
at up to one bit per cycle:

1. **`hdlc_tx_ctrl`** writes each compressor word into a 32-byte
   `buffer_fifo` as two bytes. Once the FIFO holds `INFO_BYTES` bytes, it
   feeds the address, the control byte and those bytes to the serializer,
   and tags the last byte. It then waits for the closing flag before it
   starts another frame. Because the whole frame is already stored before
   the frame starts, the line can never run dry inside a frame.
2. **`hdlc_p2s`** converts each byte to serial, LSB first.
3. **`hdlc_fcs_gen`** passes the bits on and runs the CRC-16
   x^16+x^12+x^5+1 (preset to all ones; this is the X.25 CRC). After the
   tagged last bit it holds the input and sends the complemented CRC, 16 bits,
   LSB first.
4. **`hdlc_bit_stuffer`** inserts a 0 after every five consecutive ones,
   FCS included. While it sends the extra 0, it holds its input. If the
   frame's final bit completes a run of five, the inserted 0 becomes the final
   bit.
5. **`hdlc_flag_gen`** drives the line, one bit per `tx_bit_tick`. Between
   frames it sends whole groups of eight ones. When a group ends and frame
   bits are waiting, it sends the opening flag, then the frame, then the
   closing flag. `tx_bit` changes the cycle after the tick, marked by
   `tx_strobe`. A missing bit inside a frame is sent as 1 and counted in
   `underrun_cnt`; the design prevents this case.

## The quadrature logic detector

This is the least obvious part of the design. The radio uses two-tone FSK: a
1 is a tone Δf above the carrier and a 0 is a tone Δf below it. The receiver
is direct-conversion. It mixes with an oscillator at the carrier, low-pass
filters and hard-limits the I and Q channels. What reaches the logic is two
square waves:

- **A**: the sign of I.
- **C**: the sign of Q.

These are a quarter period apart. For a tone above the oscillator, the pair
(A, C) steps round the quadrants in this order:

(1,1) → (0,1) → (0,0) → (1,0) → (1,1)

For a tone below the oscillator, it steps the other way. The bit is
therefore the direction of rotation, and the detector only has to tell the
two directions apart.

`symbol_detector` does this with edge pulses and pairs of one edge with the
other channel's level:

- Edge detectors ("MONO" blocks) give one-cycle pulses on rising edges: B on
  A, BX on AX (so, on falling A), D on C and DX on CX.
- Each of the eight AND terms joins one edge with the level of the other
  channel:

| term | inputs | quadrant step | rotation |
|---|---|---|---|
| AND  | A·D   | (1,0)→(1,1) | forward → set |
| AND1 | CX·B  | (0,0)→(1,0) | forward → set |
| AND2 | AX·DX | (0,1)→(0,0) | forward → set |
| AND3 | C·BX  | (1,1)→(0,1) | forward → set |
| AND4 | A·DX  | (1,1)→(1,0) | backward → reset |
| AND5 | B·C   | (0,1)→(1,1) | backward → reset |
| AND6 | AX·D  | (0,0)→(0,1) | backward → reset |
| AND7 | CX·BX | (1,0)→(0,0) | backward → reset |

AND..AND3 are ORed into the set input of an S-R flip-flop, and AND4..AND7
into its reset. The flip-flop output `q` is the demodulated bit. It settles
at the first quadrant step after the tone changes.

Timing: both inputs pass a two-flop synchroniser, so `q` follows a step
three cycles later. The bit period must leave room for at least one
quadrant step plus these three cycles before the receiver samples the bit.
With one step per cycle and 6 cycles per bit, as in the end-to-end test, the
margin is two cycles. Set and reset cannot both be active for clean
quadrature signals; if they are, the flip-flop holds.

The receiver has no bit-timing recovery. `rx_bit_tick` must be supplied with
the sampling instant, for example the transmitter's bit clock delayed to the
end of each bit.

## HDLC receiver and decompressor

`hdlc_rx` takes one bit per `rx_valid`:

- **Flag and abort detection.** Every bit enters an 8-bit window. `01111110`
  in the window is a flag. Seven ones in a row abort the frame and put the
  receiver back to hunting for a flag.
- **Frame content.** Only bits that leave the window are treated as frame
  content, so flag bits never reach the data path. Content bits pass zero
  removal (a 0 after five ones is dropped), the CRC, and a byte assembler.
- **Buffering.** Bytes 0 and 1 are the address and control. Later bytes go
  through a two-byte delay line, so that at the closing flag the two bytes
  still in the line are the FCS. Every byte pushed out of the line is written
  provisionally into a 64-byte output FIFO.
- **Acceptance.** The frame is judged in the cycle after its closing flag.
  It must hold whole bytes, at least four of them, with CRC residue `F0B8`,
  the right address and no FIFO overflow. A good frame releases its bytes to
  `out_*`. A bad frame rewinds the write pointer, so nothing from it is ever
  read. `crc_err_cnt` counts frames of valid length with a bad FCS, and
  `drop_cnt` counts all other rejected or aborted frames.
  Each decision also gives a one-cycle pulse, `frame_ok` or `frame_err`,
  which the top brings out as `rx_frame_ok` and `rx_frame_err`.

`rle_decompressor` reads the bytes in (count, symbol) pairs and writes the
symbol `count` times. A pair that expands to *n* bytes takes 2 + *n* cycles
without stalls. A count of 0 produces nothing.

## Parameters of `sensor_link_top`

| parameter | default | meaning |
|---|---|---|
| `SAMPLE_PERIOD` | 64 | clock cycles between ADC conversions |
| `BLOCK_SAMPLES` | 32 | samples between compressor flushes |
| `SPI_CLK_DIV` | 4 | clk cycles per half period of `adc_sclk` |
| `BUF_DEPTH` | 16 | sample buffer depth |
| `INFO_BYTES` | 8 | information bytes per frame (even: whole RLE words) |
| `TX_FIFO_DEPTH` | 32 | framer byte FIFO, at least `INFO_BYTES` + 2 |
| `RX_OUT_DEPTH` | 64 | receiver output FIFO (power of two) |
| `ADDRESS`, `CONTROL` | 01, 03 | frame header; the receiver accepts only `ADDRESS` |

Both FPGAs share one clock in this top. Types and constants (flag, CRC
polynomial, RLE word struct) are in `rtl/sensor_link_pkg.sv`.

## Departures and choices

Taken from the source description:

- The split of the transmitter into SPI unit, buffer, RLE compressor, HDLC
  processor and a controlling state machine.
- The two-state compressor and its `{count, symbol}` output. The source's
  own text and flow chart name the two fields in the order (input, count),
  but its example values put the count in the upper byte, and this design
  follows the example values.
- The HDLC field order, the flag, zero insertion after five ones including
  the FCS, and the idle fill of eight ones.
- The detector's edge blocks, the inputs of each AND term, and the final S-R
  flip-flop.

This design's own choices, where the source gives none:

- The SPI mode and clock divider.
- All buffer depths and the sampling period.
- The block flush and the count saturation at 255.
- The FCS polynomial (X.25) and LSB-first bit order.
- 8-bit address and control values.
- The fixed eight-byte information field.
- Every valid/ready handshake.
- The whole receiver structure: window flag detection, provisional FIFO and
  acceptance rules.
- The decompressor.
- The two-flop synchroniser and one-cycle edge pulses in the detector.
- Which four AND terms set and which reset the flip-flop. This was derived
  from the rotation argument above.

Not included:

- The analog and RF parts: sensor, readout circuit, ADC, VCO-based FSK
  modulator and power amplifier, LNA, mixers, filters, and the channel
  models (noise, path loss, interference, Rayleigh fading).
- Bit-timing recovery at the receiver.
- The two further outputs that the source's receiver diagram shows on the
  detector block. Their logic is not given.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module sensor_link_top_tb rtl/sensor_link_pkg.sv tb/sensor_link_top_tb.sv
./obj_dir/Vsensor_link_top_tb
```

Replace the top module name to run another testbench: `spi_master_tb`,
`buffer_fifo_tb`, `system_controller_tb`, `rle_compressor_tb`, `hdlc_tx_tb`,
`hdlc_tx_ctrl_tb`, `hdlc_p2s_tb`, `hdlc_fcs_gen_tb`, `hdlc_bit_stuffer_tb`,
`hdlc_flag_gen_tb`, `hdlc_rx_tb`, `rle_decompressor_tb` or
`symbol_detector_tb`.

A few modules carry concurrent assertions for their handshake rules, which
`--assert` turns on: a word or bit that is offered stays unchanged until it
is taken (`rle_compressor`, `hdlc_p2s`), `adc_cs_n` is low exactly while a
transfer runs (`spi_master`), no sample enters the compressor in a flush
cycle (`system_controller`), and the receiver's FIFO pointers stay in order
(`hdlc_rx`).

The testbenches use two behavioural models, which are not part of the design:

- `tb/adc_spi_model.sv`: a serial ADC.
- `tb/fsk_iq_model.sv`: a stand-in for the radio path that produces the
  rotating (A, C) pair from the transmitted bit. It can reverse the rotation
  to inject a bit error.

What the testbenches check:

- **`sensor_link_top_tb`** runs the full design at its default parameters,
  for about 2 ms of simulated time and well under a second of real time. It
  sends more than 1200 samples of a slowly varying signal through ADC,
  compressor, framer, the radio model, detector, de-framer and decompressor,
  and compares every recovered byte with the sample taken. It then injects
  radio bit errors until a frame is rejected by its FCS. Finally it feeds an
  incompressible signal to force buffer overflow. It also checks that
  compressed runs, flushes, frames, zero insertion and removal, idle fill,
  and both detector outputs all occur.
- **`hdlc_tx_tb`** and **`hdlc_rx_tb`** build frames with their own CRC
  code, checked against the published X.25 value for "123456789" (906E), and
  their own bit stuffing. They compare the results bit for bit.
- **`rle_compressor_tb`** reproduces the example sequence given above.
- **`spi_master_tb`**, **`rle_decompressor_tb`** and **`symbol_detector_tb`**
  also check cycle counts.
