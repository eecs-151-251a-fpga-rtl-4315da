# UART piano

Type a key on a serial terminal and the FPGA plays a note. Each character that
arrives over the UART is buffered, echoed back, looked up in a scale ROM and
played as a square wave for a fixed *note length*. The wave comes out twice: as
a 1-bit signal on the board's mono audio pin (`AUD_PWM`), and as 20-bit PCM
through an I2S DAC interface (`MCLK`, `SCLK`, `LRCK`, `SDIN`). Push buttons reset
the design and make notes longer or shorter.

The design targets a Pynq-Z1 board (125 MHz clock, four push buttons, two
slide switches) and is written in synthesizable SystemVerilog. FIFOs decouple
the parts: if you type faster than the notes play, characters wait in the
receive FIFO and drain one note at a time.

```
 FPGA_SERIAL_RX ─► uart_receiver ─rv─► [bridge] ─► fifo (8 x 8) ─► piano_fsm ──► i2s_controller ─► MCLK SCLK LRCK SDIN
                                                                   │  │  │  (data / valid[1:0] / ready[1:0])
 FPGA_SERIAL_TX ◄─ uart_transmitter ◄─rv─ [bridge] ◄─ fifo_fwft ◄──┘  │  └──► AUD_PWM (gated by SWITCHES[1])
                                               (256 x 8, FWFT)       │
 BUTTONS ─► button_parser (synchronizer ► debouncer ► edge_detector) ┘  [0] reset, [1] longer, [2] shorter
```

`rv` marks a ready/valid handshake: a transfer happens on a rising clock edge
where both `valid` and `ready` are high.

## Two kinds of FIFO, and the bridges between them

Two FIFOs with different read semantics sit in the design. Getting the bridge
logic right depends on knowing which is which.

**`fifo` (receive side) is a standard-read FIFO.** Raising `rd_en` pops the
head, and the popped word appears on `dout` *after* that rising edge. `dout`
then holds until the next read. `full` and `empty` are registered. Writes while
full and reads while empty are ignored, so over- and underflow corrupt neither
the data nor the flags. Inside is a circular buffer with a write pointer, a
read pointer and an occupancy counter; the flags come from the counter, so any
depth works, not only powers of two. The default is 8 x 8 bits.

The bridge from the UART receiver is combinational:
`wr_en = data_out_valid & !full` and `data_out_ready = !full`. When the FIFO is
full the receiver keeps its byte and `valid` stays high until a slot frees up.
The buffer is therefore 8 entries plus the receiver's output register. A
*further* byte arriving while that register is still occupied overwrites it.
Nothing in the design pushes back on the sender.

**`fifo_fwft` (transmit side) is a first-word fall-through FIFO.** The head
entry is already on `dout` whenever the FIFO is non-empty (`valid = !empty`),
and `rd_en` pops it. Read this way it is a ready/valid source: `valid` is valid
and `rd_en` is ready. The bridge to the transmitter is
`data_in_valid = valid` and `rd_en = valid & data_in_ready`. It is 256 x 8 bits
with a synchronous reset `srst`, and its port names follow the usual FPGA-vendor
FIFO core. On an FPGA you may swap in such a core; this RTL is a plain
register-array FIFO that behaves the same at the ports.

Because the piano's output rate (one echo per note) is far below the UART rate,
the transmit FIFO never fills in practice. The piano FSM still waits on
`full`, and `piano_fsm_tb` exercises that wait.

## The piano FSM

`piano_fsm` handles one character at a time in four states:

| state | what happens | leaves when |
|---|---|---|
| `IDLE`  | `rd_en` to the receive FIFO while it is not empty | FIFO not empty (pop issued) |
| `FETCH` | registers the popped character (standard-read FIFO: valid one cycle after `rd_en`) | always, next cycle |
| `ECHO`  | writes the character unchanged into the transmit FIFO | the FIFO is not full (write issued) |
| `PLAY`  | enables the `tone_generator` with the key's `tone_switch_period` | `note_length` cycles have passed |

A key therefore costs 3 cycles plus any wait for a full transmit FIFO, plus
`note_length` cycles of sound. Back-to-back keys leave a 3-cycle silent gap
between notes.

`note_length` resets to 1/5 s (`CLOCK_FREQ/5` cycles). Each press pulse on
`note_length_up` / `note_length_down` adds or removes `NOTE_LENGTH_STEP`
(1/20 s). The value is limited to the range [one step, `NOTE_LENGTH_MAX` = 2 s].
A change takes effect at once, including on a note that is already playing.

**Sound.** `tone_generator` toggles its output every `tone_switch_period`
cycles, so a note of frequency *f* needs `tone_switch_period = CLOCK_FREQ / (2f)`.
A zero period, or a disabled generator, gives a steady low output. This is how
unmapped keys become silent notes and why nothing oscillates when idle.
`audio_pwm` is the wave itself. For I2S the wave becomes PCM: `0x7FFFF` (the
largest 20-bit two's-complement value) while high, `0x80000` (the smallest)
while low, and `0` whenever no note plays. The FSM holds `pcm_data_valid = 2'b11`
all the time. The I2S controller takes one value per channel per frame, which
samples the wave at the frame rate.

## The I2S output

`i2s_controller` makes all three I2S clocks from the system clock with
counters that start together at reset:

* `MCLK` toggles every `MCLK_HALF` system cycles (12.5 MHz by default);
* `SCLK` = `MCLK / MCLK_PER_SCLK` = MCLK / 4 (3.125 MHz);
* `LRCK` = `SCLK / (2 x SLOT_BITS)` = SCLK / 64 (48.83 kHz).

This gives MCLK = 256 fs and SCLK = 64 fs, a common ratio for I2S DACs. No
integer divider turns 125 MHz into exactly 44.1, 48 or 88.2 kHz with these
ratios. 48.83 kHz is the nearest, and the DAC simply plays at that rate.

**Frame.** `LRCK` low is the left slot and high is the right slot, 32 bit
periods each. `LRCK` and `SDIN` change on `SCLK` falling edges, so the DAC
samples them on rising edges. Following the I2S rule, the first bit period
after each `LRCK` transition carries nothing. The sample's MSB goes out in the
*second* bit period, then the remaining bits MSB first; the rest of the slot is
0. With `MCLK_HALF = 1` a frame is 512 system cycles.

```
LRCK  ‾‾‾‾\___________________________ ... ___/‾‾‾‾
SDIN   x  |  0  | b19 | b18 | ... | b0 |  0 ... 0  |  0  | b19 ...
           ^ 1st bit period after the change is empty
```

**Handshake.** `pcm_data` is shared; `pcm_data_valid[c]` and
`pcm_data_ready[c]` form the pair for channel *c* (0 = left, 1 = right). Each
channel has a holding register. `ready[c]` is high only while the *other*
channel's slot is on the wire, and only until one sample has been taken. So a
source that keeps `valid` high hands over exactly one sample per channel per
frame, and a channel's register never changes while that channel is being
shifted out. If no sample arrives during the window, the last one received is
sent again. Each channel reopens its window when its own slot starts.

## Keys and pitches

`piano_scale_rom` is a 256 x 24 ROM from ASCII code to `tone_switch_period`. Its
entries are computed during elaboration from a formula, not stored as a table.
Two keyboard rows act as two piano octaves, white keys on the letter row and
black keys on the row above:

| keys | notes |
|---|---|
| `z s x d c v g b h n j m ,` | C3 C#3 D3 D#3 E3 F3 F#3 G3 G#3 A3 A#3 B3 C4 |
| `q 2 w 3 e r 5 t 6 y 7 u i` | C4 C#4 D4 D#4 E4 F4 F#4 G4 G#4 A4 A#4 B4 C5 |

The pitch *n* semitones above C3 is f = 130.8128 Hz x 2^(n/12), which is equal
temperament with A4 = 440 Hz. The entry is round(CLOCK_FREQ / (2f)): for
example, `n` (A3, 220 Hz) gives 284,091 at 125 MHz. Every other code gives 0,
which plays a silent note of normal length. The key layout is this design's
choice. Change `key_to_semitone` in `rtl/piano_scale_rom.sv` to remap it.

## Buttons, switches, LEDs

| pin | function |
|---|---|
| `BUTTONS[0]` | RESET: its debounced press pulse is the synchronous reset of everything behind the button parser |
| `BUTTONS[1]` / `BUTTONS[2]` | note length up / down by one step |
| `BUTTONS[3]`, `SWITCHES[0]` | no function |
| `SWITCHES[1]` | enables `AUD_PWM` and the audio amplifier (`AUD_SD`); I2S is always on |
| `LEDS[0..4]` | note playing, receive FIFO empty, receive FIFO full, transmit FIFO full, transmit FIFO empty |

Each button passes through a two-flop `synchronizer`, then a `debouncer`, then
an `edge_detector`. The debouncer samples every `SAMPLE_CNT_MAX` cycles
(0.5 ms). A button counts as pressed once it has been seen high for
`PULSE_CNT_MAX` (200) samples in a row, i.e. 100 ms. A single low reading
restarts the count. The edge detector turns each accepted press into one
clock-cycle pulse.

The button chain has no reset of its own: its registers start at 0 through
declaration initialisers, which is the FPGA power-up state. Everything else
holds arbitrary values until the first RESET press.

## Parameters of `z1top`

| parameter | default | meaning |
|---|---|---|
| `CLOCK_FREQ` | 125,000,000 | system clock in Hz; sets the baud divider and the pitches |
| `BAUD_RATE` | 115,200 | UART rate, 8N1 |
| `B_SAMPLE_CNT_MAX`, `B_PULSE_CNT_MAX` | 62,500, 200 | debouncer timing |
| `NOTE_LENGTH_DEFAULT`, `NOTE_LENGTH_STEP` | CLOCK_FREQ/5, CLOCK_FREQ/20 | note length after reset, button step |
| `RX_FIFO_DEPTH`, `TX_FIFO_DEPTH` | 8, 256 | FIFO depths |
| `MCLK_HALF` | 5 | system cycles per half MCLK period |

The UART bit period is `CLOCK_FREQ / BAUD_RATE` rounded down: 1085 cycles,
0.01 % from nominal.

## Simulating

Every testbench in `tb/` checks its own results. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/piano_pkg.sv tb/z1top_tb.sv --top-module z1top_tb
./obj_dir/Vz1top_tb
```

Substitute any other testbench name. The package file must come first.

| testbench | what it shows |
|---|---|
| `fifo_tb`, `fifo_fwft_tb` | flags, overflow/underflow immunity, ordering, random traffic against a queue model |
| `uart_transmitter_tb`, `uart_receiver_tb`, `uart_tb` | 8N1 framing, bit timing, glitch and framing-error handling, loopback |
| `synchronizer_tb`, `debouncer_tb`, `edge_detector_tb`, `button_parser_tb` | button chain timing and bounce rejection |
| `tone_generator_tb`, `piano_scale_rom_tb` | toggle interval equals the period; all 256 ROM entries against an independent pitch calculation |
| `i2s_controller_tb` | independent I2S decoder: clock periods, MSB placement, one sample per channel per frame, repeat of the last sample |
| `piano_fsm_tb` | echo order, stall on a full transmit FIFO, note duration and pitch, PCM levels, note-length buttons and limits |
| `z1top_tb` | whole design from the pins at 1 MHz / 62.5 kbaud: reset button, echo, pitch and duration, I2S words, a 10-character burst that fills the receive FIFO, note length up/down, the AUD_PWM switch |
| `z1top_full_tb` | whole design at every default (125 MHz, 115200 baud, 100 ms debounce, 1/5 s note): one key from reset to echo and a full note; about 39 M cycles, under a minute |

All testbenches observe ports only, never internal signals.
Verilator is a two-state simulator: registers that no reset reaches start at
random values. The assertions in `fifo` and `piano_fsm` are therefore armed
only after the first reset.

## Departures and limits

* **No clock-crossing FIFO for audio samples.** The piano FSM drives the I2S
  controller directly over ready/valid, and everything runs on one clock.
* **Sample rate** is 48.83 kHz, not exactly 44.1, 48 or 88.2 kHz (see above).
* **The I2S path is a square wave only.** There are no extra waveforms, no
  volume envelope (attack/release) and no keypad input.
* **The transmit FIFO** is a register array. A block-RAM vendor core in
  first-word fall-through mode may report a slightly larger usable depth (258
  for a 256 request) and buffers its output. That makes no difference at the
  ports for this design.
* **No overrun detection on the UART.** If more characters arrive than the
  receive FIFO and the receiver's output register can hold, the latest one
  overwrites the one waiting in the receiver.
* **Own choices, not prescribed by the interface:** the clock ratios, the
  debounce timing, the note-length step and limits, the key layout, and
  button/LED/switch assignments other than RESET and the AUD_PWM switch.
