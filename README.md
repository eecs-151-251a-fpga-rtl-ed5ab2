# Serial echo and I²S audio clocks for a 125 MHz FPGA

This design gives a small FPGA board two I/O paths. Both run from a single 125 MHz clock.

* **A UART serial port with an echo.** A terminal on a workstation talks to the FPGA at
  115200 baud. Every character typed comes straight back. Letters come back in the other
  case (`a` ↔ `A`). Any other character comes back unchanged.
* **An I²S master for an external stereo DAC.** It generates the DAC's three clocks: the
  master clock MCLK, the bit clock SCLK and the left/right clock LRCK. A bit counter tracks
  which bit of which sample belongs in each SCLK period. The design also shifts 24-bit
  samples out on the data line SDIN.

The two paths share only the clock and the reset.

```
 FPGA_SERIAL_RX ─► uart_receiver ─ready/valid─► echo_fsm ─ready/valid─► uart_transmitter ─► FPGA_SERIAL_TX
                   └──────────────────── uart ─────────────────────────────────┘

 audio_left/right ─► i2s_controller ─► i2s_mclk, i2s_sclk, i2s_lrck, i2s_sdin
                      ├─ i2s_clock_gen   (MCLK, SCLK, LRCK, sclk_fall strobe)
                      └─ i2s_bit_counter (slot, channel, bit index)
```

All logic is synchronous to the one clock. Reset is synchronous and active high.

## The serial frame

The serial line rests high. A character is sent as 10 bits of equal length:

| symbol | 0     | 1 … 8                     | 9    |
|--------|-------|---------------------------|------|
| value  | 0 (start) | data bit 0 … data bit 7 (LSB first) | 1 (stop) |

There is no parity bit and no flow control (RTS/CTS are not used). One symbol lasts
`SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE` system clock cycles. This is the integer
quotient: 1085 cycles at the defaults, which gives 115207 baud (0.006 % fast). Both ends of
the line must agree on the baud rate. Nothing in the frame carries it.

### Transmitter (`uart_transmitter`)

The transmitter is a 10-bit shift register and two counters. When a character is accepted,
the register is loaded with `{1, data, 0}`. Bit 0 of the register drives the line. Every
`SYMBOL_EDGE_TIME` cycles the register shifts right by one bit, filling with 1s. After the
tenth symbol the transmitter goes idle, and the line stays high.

`data_in_ready` is high while the transmitter is idle. It is also high in the last cycle of
the stop bit. A character that is waiting therefore starts the very next cycle, with no idle
time between frames: back-to-back frames start exactly `10 × SYMBOL_EDGE_TIME` cycles apart.
The start bit appears on the line in the cycle right after the handshake.

### Receiver (`uart_receiver`) — the part that needs care

The line is asynchronous to the FPGA clock. The receiver handles this as follows.

1. **Synchronising.** `serial_in` passes through two flip-flops first. Every decision below
   uses the synchronised copy, which lags the pin by two cycles.
2. **Start.** While idle, the receiver waits for the line to go low. The first low cycle
   becomes cycle 0 of the start bit. All later timing in the frame counts from it.
3. **Sampling in the middle.** A bit is read only once, `SAMPLE_TIME = SYMBOL_EDGE_TIME / 2`
   cycles into its symbol. At that point the line is as far as possible from both of the bit's
   edges. If it sampled near an edge instead, a small clock difference would make it read the
   neighbouring bit. Centre sampling tolerates the sender's bit time being a few percent off;
   the testbench checks ±3 %.
4. **Shifting.** Each data-bit sample enters the top of an 8-bit shift register, so the LSB
   ends up at the bottom. The start and stop samples only mark the frame. When the stop bit
   is sampled, the eight data bits are copied into a holding register, and the receiver
   returns to idle. The earliest possible next start bit is half a symbol away.
5. **The `has_byte` flag.** This flag is the ready/valid output. It is set when the stop bit
   has been sampled. It is cleared in any cycle where `data_out_ready` is high. So
   `data_out_valid` rises once per character and stays high until the consumer takes it.
   Because of the holding register, the byte on offer does not change while the next frame
   is shifted in. If a character is still unread when the next one completes, the newer one
   replaces it.

`data_out_valid` rises `9 × SYMBOL_EDGE_TIME + SAMPLE_TIME + 3` cycles after the start bit's
falling edge at the pin. The 3 cycles are the two synchroniser stages plus the register.
This is half a symbol before the frame ends on the line.

The receiver does not check the start or stop bit values. A glitch that pulls the line low
therefore starts a frame, and a frame without a valid stop bit is still delivered.

### `uart`

`uart` is the two halves side by side, with two independent ready/valid interfaces. It adds
one output flip-flop on `serial_out`, so the pin is driven glitch-free from a register. That
flip-flop adds one cycle of latency.

### Echo buffer (`echo_fsm`)

This is a two-state machine holding one character.

* In EMPTY, `rx_ready` is high. A character arriving from the receiver is stored with its
  case already inverted (for `A`–`Z` and `a`–`z` only, by flipping bit 5), and the state
  becomes FULL.
* In FULL, `tx_valid` is high. The state returns to EMPTY when the transmitter takes the
  character.

Characters arrive and leave at the same line rate, so the buffer only waits when the sender's
clock is slightly fast. In that case the character waits in the buffer, and a second one can
wait in the receiver's holding register. The testbench runs the sender 0.7 % fast, and the
echo keeps up over a whole line of text. At that mismatch the backlog grows by about 80
cycles per character, so characters would be lost only after more than 100 characters typed
without a pause.

## I²S clocks

### Rates

With the default parameters:

| clock | frequency | derivation |
|-------|-----------|------------|
| LRCK  | 88.2 kHz   | `SAMPLE_RATE` |
| MCLK  | 11.2896 MHz | `MCLK_LRCK_RATIO × LRCK` = 128 × LRCK |
| SCLK  | 5.6448 MHz  | `SCLK_LRCK_RATIO × LRCK` = 64 × LRCK |

Every derived number is computed from the parameters at elaboration time, so a different
rate, ratio or bit depth only needs new parameter values. Elaboration stops with `$fatal` if
the combination cannot work:

* each MCLK half period must be at least two system cycles;
* each SCLK half period must be at least three system cycles;
* the MCLK/SCLK ratio must be a whole even number of MCLK half periods;
* the bit depth must be less than half of `SCLK_LRCK_RATIO`.

The SCLK ratio of 64 is this design's choice. It gives 32 SCLK periods per channel, which is
enough for a 24-bit sample, and it is a whole fraction of MCLK (MCLK/SCLK = 2).

### Fractional MCLK (`i2s_clock_gen`)

125 MHz / 11.2896 MHz = 11.07, which is not a whole number, so MCLK cannot come from a simple
counter. Instead, a 32-bit phase accumulator adds

    INC = round(2 × MCLK / CLOCK_FREQ × 2^32)

every cycle. Each carry out of the accumulator starts a new MCLK half period. MCLK therefore
has the right average frequency, to within the rounding of INC (under 1 part in 10^8). Its half periods are 5 or 6 system cycles long, so
each edge may be up to one system clock period (8 ns) off its ideal position. The simulated
LRCK period is 1417.225 cycles, against an ideal 1417.23.

SCLK and LRCK are counted off the same MCLK half periods, so the three clocks never drift
apart:

* One counter, `half`, counts MCLK half periods within an SCLK period (4 at the defaults).
  SCLK is low for the first half of that count and high for the second.
* A second counter, `slot`, counts SCLK periods within an LRCK period (64). LRCK is low for
  slots 0–31 (the left channel) and high for slots 32–63 (the right channel).

Every LRCK edge falls on an SCLK falling edge. With the default ratios, every SCLK edge
falls on an MCLK falling edge. The output `sclk_fall` is high for the one cycle after each
SCLK falling edge, and it drives everything downstream. After reset all three clocks are
high, at the end of a right channel. The first carry after reset then starts a left channel
with falling edges on all three clocks.

### Bit counter and data (`i2s_bit_counter`, `i2s_controller`)

In I²S the data line changes on SCLK falling edges and the DAC samples it on rising edges.
Each sample starts **one SCLK period after** the LRCK edge, MSB first. Within each 32-slot
channel:

| slot | 0 | 1 | 2 | … | 24 | 25 … 31 |
|------|---|---|---|---|----|---------|
| SDIN | delay slot (0) | bit 23 (MSB) | bit 22 | … | bit 0 (LSB) | padding (0) |

The bit counter steps on each `sclk_fall`. When LRCK differs from the value it held at the
previous strobe, the counter restarts at slot 0 of the new channel. Its outputs are:

* `slot` and `channel`;
* `bit_index = BIT_DEPTH − slot`, with `bit_valid`, for slots 1…`BIT_DEPTH`;
* `new_channel`, a one-cycle pulse at slot 0.

`i2s_controller` captures `left_sample` and `right_sample` at the start of every left channel
and pulses `sample_ack` for one cycle. It then drives SDIN from a flip-flop: the selected
sample bit, or 0 outside bits 1…24. SDIN changes three system cycles after SCLK falls. At the
defaults the next rising edge comes about 11 cycles after the fall.

## Top level (`z1top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `CLK_125MHZ_FPGA` | in | 1 | system clock |
| `reset` | in | 1 | synchronous active-high reset; must already be debounced and synchronised |
| `FPGA_SERIAL_RX` | in | 1 | serial data from the host (on a Pmod USBUART, its TXD pin) |
| `FPGA_SERIAL_TX` | out | 1 | serial data to the host (the USBUART's RXD pin) |
| `audio_left`, `audio_right` | in | 24 | next stereo sample pair |
| `audio_ack` | out | 1 | one-cycle pulse: the pair has been captured, present the next one |
| `i2s_mclk`, `i2s_sclk`, `i2s_lrck`, `i2s_sdin` | out | 1 each | to the DAC (MCLK, SCLK, LRCK, SDIN) |

Parameters, all with the values above as defaults: `CLOCK_FREQ`, `BAUD_RATE`, `SAMPLE_RATE`,
`MCLK_LRCK_RATIO`, `SCLK_LRCK_RATIO`, `BIT_DEPTH`. The shared package `lab5_pkg` holds the
character type, the frame length, the channel enum and the case-inversion function.

## Where this design makes its own choices

The frame format, the symbol and sample times, the `has_byte` handshake, the echo behaviour,
and the I²S rates and bit order are the intended behaviour. The following points are
decisions made here:

* the two-flop input synchroniser, the receiver's holding register, and the
  replace-on-overrun rule;
* no start-bit or stop-bit checking (framing errors go unreported);
* `data_in_ready` in the last stop-bit cycle, for gap-free back-to-back transmission;
* a registered `serial_out` in `uart`;
* a one-character echo buffer that converts case on the way in;
* SCLK = 64 × LRCK, the phase-accumulator MCLK (with ±8 ns edge jitter), and the reset state
  of the clocks;
* SDIN output with a capture-once-per-frame `sample_ack` interface; the sample source itself
  is outside this design;
* no button, LED or debouncer logic in the top: reset arrives clean.

The off-chip parts (the USB-serial bridge, the DAC, the workstation) are not modelled in
`rtl/`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `uart_transmitter_tb` | random characters rebuilt from the line; start bit one cycle after the handshake; frames exactly 10 symbols; back-to-back frames with no gap |
| `uart_receiver_tb` | random frames with ±3 % bit times, back to back and with gaps; random `ready`; exact valid latency; valid/data held until taken; overrun replaces the unread byte |
| `uart_tb` | two UARTs with crossed lines exchange 30 characters each way at full line rate |
| `echo_fsm_tb` | all 256 codes in shuffled order, random valid/ready; case rule checked against an independent ASCII table |
| `i2s_clock_gen_tb` | default rates: 128 MCLK and 64 SCLK periods per LRCK period, 32 with LRCK low, edge alignment, `sclk_fall`, average rate within 1 cycle over 40 frames |
| `i2s_bit_counter_tb` | slot, channel, bit index and validity for every slot of 12 channels |
| `i2s_controller_tb` | a DAC model decodes SDIN at SCLK rising edges and recovers every random sample; padding zeros; SDIN stable around rising edges |
| `z1top_tb` | whole design at default parameters: a host UART 0.7 % fast types a line, and every echoed character is checked. It also decodes 185 audio frames. It counts each mechanism: both case conversions, pass-through, back-to-back frames in both directions, echo buffer stalls, and sample handoff and padding. |

The block testbenches for the UART parts run at reduced baud/clock ratios (10–32 cycles per
bit) to stay short. The I²S testbenches and `z1top_tb` use the real 125 MHz numbers.
`z1top_tb` simulates about 260,000 cycles in well under a second.

Each testbench was also run against a deliberately broken copy of its module, and it failed
each time. The breaks were:

* data sent MSB first;
* `has_byte` not waiting for `ready`;
* the receiver wired to its own output;
* case flipped for non-letters;
* LRCK one slot early;
* the I²S one-bit delay left out;
* the left sample sent in both channels;
* swapped audio channels.

### Running a simulation

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/lab5_pkg.sv tb/z1top_tb.sv --top-module z1top_tb -o sim
./obj_dir/sim
```

Replace `z1top_tb` with any other testbench name. The package must come first on the command
line. Modules are found through `-y rtl` by file name: each file holds one module named like
the file.
