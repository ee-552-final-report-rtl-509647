# Wired CDMA station

Several stations share a single wire and all transmit at the same time.
Each station spreads every data bit over its own 8-chip code: it sends the
code for a 1 and the inverted code for a 0. An analogue adder sums the
+1/-1 outputs of all stations, and every station samples that sum with an
ADC. To recover one station's bits, a receiver correlates the samples with
that station's code. Ideally the other stations' codes are orthogonal to it, so
their contributions sum to zero and only the wanted station's ±8 remains.

This repository holds the FPGA side of one station in synthesizable
SystemVerilog:

- keypad input, or an internal byte generator;
- a controller with framing, parity and statistics;
- the spreading encoder;
- a two-channel despreader with automatic bit-phase acquisition;
- an HD44780 character-LCD driver.

The analogue transmitter, the adder board and the ADC are not RTL. The
testbenches replace them with a behavioural channel model
(`tb/tx_channel.sv`).

## Station at a glance

```
 keypad ─ bintoascii ─┐                 ┌─ encoder ─ cdma_high / cdma_low ──► adder
                      ├─ controlr ──────┤
 byte counter ────────┘   │  │  ▲       └─ clksource (rate enables, ADC clock)
                          │  │  │
                lcd ◄─────┘  │  rxbuff ×2 ◄─ despread ◄─ readadc ◄─ rx[3:0] ◄─ ADC
                             │              (reg3shift, 2× dotprod+correlate+tally_ram)
```

| Module | Role |
|---|---|
| `cdma` | Top level. Its ports follow the station's FPGA pin list. |
| `cdma_pkg` | Constants, types, the three station codes and the parity function. |
| `clksource` | 23-bit free-running counter. All rates are taken from it. |
| `countn` | Counter with clear and enable. An 8-bit instance is the byte generator and preamble counter. |
| `keypad` | 4x4 matrix scanner with debounce. Outputs a key number and a one-cycle valid. |
| `bintoascii` | Converts a key number to ASCII. |
| `controlr` | Initialization, transmit-source selection, encoder handshake, receive arbitration, parity check, BCD statistics and the LCD handshake. |
| `encoder` | Double-buffered spreader. Sends each byte LSB first, 8 chips per bit. |
| `readadc` | Registers the 4 ADC MSBs on the sample tick and converts offset binary to two's complement. |
| `reg3shift` | Window of the 32 most recent samples: 8 chips x 4x oversampling. |
| `dotprod` | Correlation of 8 samples with a code, using adds and subtracts only. |
| `tally_ram` | 32 x 4-bit RAM holding the synchronization tallies. |
| `correlate` | Per-station FSM that clears the tallies, acquires the bit phase, then decodes. |
| `despread` | One shared sample window feeding two dotprod/correlate/RAM channels. |
| `rxbuff` | Finds the frame marker and assembles bits into bytes, LSB first. |
| `lcd` | LCD power-up sequence, then rewrites the first line on request. |

## Clocking and rates

Everything runs on the single system clock (25 MHz in the original board).
Slower rates are one-cycle enables derived from `clksource`:

- A sample tick fires every 2^(b+1) cycles, where b is `FAST_SAMPLE_BIT`
  (6) or `SLOW_SAMPLE_BIT` (10), selected by the clock-mode switch.
- A chip tick fires on every fourth sample tick.

At 25 MHz the fast mode gives:

| Quantity | Rate |
|---|---|
| Samples | 195 kHz |
| Chips | 48.8 kchip/s |
| Bits | 6.1 kbit/s |
| Bytes | one every 32,768 cycles |

The slow mode is 16 times slower. The counter bit selected as the sample
rate is also driven out on `sample_clock` as the ADC clock.

## Transmit side

### Preamble and framing

The controller starts (re)initialization in any of these cases:

- reset;
- a change of the clock-mode switch;
- re-enabling transmission.

During initialization the controller:

- loads the local code into the encoder;
- clears the receive buffers and statistics;
- sends 20 bytes of `0xFF`;
- then sends one `0x00` byte.

After that it sends data bytes. Each is a 7-bit character with an odd
parity bit in bit 7, so neither `0x00` nor `0xFF` can occur as data. This
is what makes framing simple: a receiver that has seen a 1 followed by
eight 0s knows the next bit starts a byte.

### Data sources

**Stream mode.** Sends the low 7 bits of an incrementing counter.

**Keypad mode.** Sends the ASCII code of the last data key.

- Keys 0-7 are data keys.
- Keys 8-15 are reserved for control functions and are never sent.
- Without latch, a key is sent once.
- With latch, the key is sent repeatedly until another key is pressed.

### Encoder handshake

The encoder alternates between two byte registers, A and B. While one is
being sent, the other holds the next byte. At the end of a byte the encoder:

1. switches registers;
2. copies `data_in` and `data_valid` into the register it just left;
3. pulses `taken` for one cycle.

The controller must therefore present the next byte before that moment. Its
encoder-control FSM (`enwait → write1 → write2 → valid`) keeps a byte on
offer until `taken`. A register without a valid byte sends nothing for a
whole byte period, with both `cdma_high` and `cdma_low` low. As a result,
the first two byte periods after a code load are always silent.

The chip value is the code chip when the data bit is 1 and its complement
when the data bit is 0. A chip value of 1 drives `cdma_high` and a chip
value of 0 drives `cdma_low`. Chip 0 of a code, the leftmost character in
the code tables, is sent first.

## Receive side: acquiring and tracking a station

This is the part that takes the most explaining.

### The sample window

Stations are not bit-synchronized, so the receiver samples four times per
chip. It keeps the last 32 samples, one bit period, in `reg3shift`.

After every sample, each channel computes the dot product of its station's
code with eight samples spaced one chip apart: taps 28, 24, ..., 0, with
tap 0 the newest. Chip 0 meets the oldest of the eight samples.

With a clean, aligned signal the dot product is:

| Condition | Dot product |
|---|---|
| Window starts exactly on a bit of the station | ±8 (per unit of amplitude) |
| Station silent | 0 |
| Misaligned window | anything in between |

A decode counts as *good* when |dp| > 6.

### Acquisition (`correlate`)

Each channel works through three phases:

1. **Clear.** Writes zero into all 32 tally words.
2. **Sync.** On each sample tick, advances a position counter (mod 32) and
   waits three cycles for the dot product to settle. If the decode is good,
   it increments the tally of that position in `tally_ram`. The first
   position whose tally reaches 15 is taken as the bit phase.
3. **Decode.** Every 32 ticks, at the chosen position, emits a bit:
   - 1 if dp > 6;
   - 0 if dp < −6;
   - no bit at all otherwise, because the station is taken to be silent.

The tally RAM is read and written at the same address. A read during a
write returns the old value. The FSM reads the tally during its three-cycle
wait and writes the incremented value in the evaluation cycle that follows.

`resync` restarts the phase from the clear step. At the top level it is
driven by the controller's receive-side clear, so every re-initialization
also re-acquires.

### Bytes and statistics

Each `rxbuff` waits for the 1-then-eight-0s marker, then packs bits into
bytes, LSB first. It presents each byte with `byte_valid` until the
controller acknowledges it. If a framed byte is `0xFF`, the sender has
restarted its preamble, so the buffer drops framing and waits for the next
marker.

The controller's input FSM (`idle → pick → tell → stall1 → stall2`) works
as follows:

- It takes bytes from the two buffers, alternating when both are full.
- It counts every byte, and counts a byte with even parity as an error.
  Both counts are 4-digit BCD.
- It passes the byte to the LCD.
- In stream mode, a byte that arrives while the LCD is still busy is counted
  but not displayed.

### Limits of the code set

The station codes are `00110101` (station 0), `00001111` (station 1) and
`00010110` (station 2). Read as ±1 vectors, their pairwise dot products are:

| Pair | Dot product |
|---|---|
| codes 0 and 1 | 0 |
| codes 0 and 2 | +2 |
| codes 1 and 2 | +2 |

Only codes 0 and 1 are exactly orthogonal. This has two consequences.

**Chip alignment.** Even the orthogonal pair cancels only when the two
stations' chip boundaries coincide. If one station's chips are shifted
against the other's by a sample or more, the cross-correlation no longer
cancels. In simulation it reached ±4, enough to push a wanted ±8 below the
threshold and drop single bits. The end-to-end testbenches therefore start
all stations' rate counters together, so their chips line up. The
receivers still have to find the bit phase themselves. Stations started at
random phases do synchronize, but they lose occasional bits and report
parity errors.

**Three stations.** When all three stations send, a decoder's ±8 is
shifted by ±2 for each interferer that uses code 2. It can fall to 6 or 4,
which does not pass |dp| > 6, so bits are lost and framing slips.
`tb_cdma_3st` measures this:

- With only stations 0 and 1 sending, every station, including a third
  one that only listens, receives both senders without a single error.
- With station 2 sending too, most links deliver bytes with parity and
  sequence errors.
- A decoder set to a code that nobody is sending can lock onto the shifted
  cross-correlation of the other two codes and deliver garbage bytes.

The hardware has room for three stations: two decoders per station, and a
4-bit sample that holds a three-station sum. Reliable three-station
operation needs a code set that is orthogonal under all pairings, for
example Walsh codes, loaded through `station_cs` in `cdma_pkg`. Tracking
chip timing as well would make the receivers independent of alignment.
Neither change is part of this design.

## LCD

After power-up the driver:

1. waits 15 ms;
2. sends eight setup commands, each followed by a 5 ms wait: `38 38 38 08 01 06 0C 02`;
3. raises `done`.

Each update writes the address command `0x80` and then 16 characters,
polling the busy flag (`lcd_high_bit`) after each write. Blanks are the
character `0xA0`. The two layouts are:

| Mode | Line |
|---|---|
| keypad (`output_mode = 0`) | `Device:d` blank `Data:c` blank |
| stream (`output_mode = 1`) | `B:nnnn` blank `E:nnnn` blank blank blank |

The display is described as two rows of eight characters, of which only
the first line is used. This driver writes 16 consecutive addresses from
0x00. On a display that maps characters 9-16 to address 0x40, the second
half would need a second address command.

## Departures from the original station, and choices made here

- **Single clock.** The original clocked the encoder and the decoder from
  counter bits. Here every flop is on the system clock, with enables.
- **Bit rate.** The specification asks for 4000 bit/s per station. The
  nearest power-of-two setting at or above it is 6.1 kbit/s (bit 6); bit 7
  would give 3.05 kbit/s. The slow mode is chosen here to be 16 times
  slower.
- **Chip polarity.** A data 1 sends the code itself. The schematic of the
  encoder output suggests an extra inversion on the high line; the
  behaviour described for spreading was followed instead.
- **Preamble.** The preamble is 20 bytes of `0xFF` and one `0x00` byte,
  rather than "20 ones then 8 zeros". Framing happens at the same point
  either way.
- **LCD content.** The LCD content follows the output-mode switch: data in
  keypad mode, statistics in stream mode. It does not follow the
  clock-mode switch.
- **Re-initialization on tx enable.** Re-enabling transmission re-runs
  initialization, so that remote receivers can reframe.
- **Reframing.** The reframing rule in `rxbuff` is this design's own.
- **Timings.** Keypad debounce (10 ms), LCD timings and the scan settle
  time are this design's own.
- **Code select 3.** Code select value 3 maps to station 0's code. Only
  three codes are defined.
- **Other choices.** Widths and encodings not fixed by the original are
  listed in each file's header comment: ADC format, BCD statistics and
  key-to-ASCII mapping.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cdma_pkg.sv tb/tb_cdma.sv --top-module tb_cdma -Mdir obj_cdma -o sim
./obj_cdma/sim +verilator+rand+reset+2
```

Replace `tb_cdma` with any other testbench name.

| Testbench | What it runs |
|---|---|
| `tb_cdma` | Two stations on the channel model, with reduced rates and timings. Steps through: stream reception, an injected bit error, transmitter disable/enable with reframing, a single key, latched keys and a control key, and a switch to slow clock mode. It counts each mechanism and fails if any never happens. |
| `tb_cdma_3st` | Three stations, each decoding the other two. Checks error-free reception with the orthogonal pair, then measures and checks the cross-talk when the third code joins, and checks that the statistics count exactly the damaged bytes. |
| `tb_cdma_full` | The same two-station setup at the default parameters. Runs 25 MHz timings, the real LCD initialization and eight bytes per station: about 1.4 M cycles, a few seconds. |
| `tb_<block>` | Unit tests: reference values computed in the testbench, including the two worked dot-product examples (11 and −15), the tally RAM against a model, the LCD byte stream against an HD44780 model (`tb/lcd_model.sv`), and the controller against modelled neighbours. |

To change the station, use these parameters:

- **Rates:** `FAST_SAMPLE_BIT` and `SLOW_SAMPLE_BIT` on `cdma`.
- **Number of decoded stations:** `NST` on `despread`.
- **Thresholds:** the constants in `cdma_pkg`.

The despreader's sizes follow the package constants:

| Constant | Meaning |
|---|---|
| `CHIPS` | chips per bit |
| `OVERSAMPLE` | samples per chip |
| `WINDOW` | samples per bit |
| `GOOD_THRESHOLD` | threshold for a good decode |
| `SYNC_TALLY` | tally that completes synchronization |
