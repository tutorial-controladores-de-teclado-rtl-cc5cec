# PS/2 mouse and keyboard host controllers

This is an FPGA host for the PS/2 port. It lets a design read a PS/2 mouse
(buttons, X/Y movement, scroll wheel) or a PS/2 keyboard (up to three keys held
at once) without having to deal with the serial protocol. It follows the
mouse and keyboard controllers of the MC613 digital-logic lab (UNICAMP) for the
Altera DE1 board, and comes with that lab's two demonstration designs: one
shows the mouse position on the seven-segment displays, and one shows the
scancode of the key being pressed.

The design has three layers:

```
ps2_tutorial_top                 both demonstration designs, side by side
├── ps2_mouse_test               mouse demo: position on HEX3..0, buttons/wheel on LEDs
│   ├── mouse_ctrl               init sequence + wheel detection + packet decoder
│   │   └── ps2_iobase           PS/2 line controller (bit level, both directions)
│   ├── mouse_pos_acc            relative movement -> absolute position
│   ├── conv_7seg (x4)           hex digit -> 7 segments
│   └── clk_div                  300 kHz output
└── ps2_kbd_test                 keyboard demo: scancode on HEX3..0, lights sweep
    ├── kbdex_ctrl               prefix decoder + 3 key slots + LED command sequencer
    │   └── ps2_iobase
    ├── key_slot_mux             picks which key slot is displayed
    ├── kbd_lights_rotator       back-and-forth keyboard LED pattern
    ├── clk_div                  5 Hz step
    └── conv_7seg (x4)
```

`ps2_pkg` holds the command and reply bytes, the scancode prefixes and the
odd-parity function. Everything runs in one clock domain. The default clock is
24 MHz, and the `CLKFREQ` parameter gives it in kHz (24000). All timing
constants are derived from `CLKFREQ`.

## The PS/2 line controller (`ps2_iobase`)

This is the part that needs the most care. Both PS/2 lines are open-collector
with pull-ups. The device normally generates the clock. The host may hold the
clock low to stop the device, or to ask for permission to send.

**Pins.** Each bidirectional pin is split in two. `ps2_*_i` is the level seen
at the pin. `ps2_*_oe` is an open-drain pull-down enable: 1 pulls the line low
and 0 releases it. On an FPGA, connect them like this:
`assign PS2_CLK = ps2_clk_oe ? 1'b0 : 1'bz; ps2_clk_i = PS2_CLK;`

**Clock filter.** Each pin first goes through two synchronising flip-flops.
The clock line must then hold a new level for `CLKFREQ/150` clocks (160 clocks,
6.7 µs) before the filtered clock follows it. Each falling edge of the
filtered clock is a *tick*. The shortest PS/2 clock half period is about 30 µs,
so the filter removes glitches without losing edges. The ticks come about
6.7 µs after the real edge, but the data is still stable then: the device
changes data only while the clock is high.

**Receiving.** A frame has 11 bits: start (0), eight data bits LSB first, odd
parity, and stop (1). A 4-bit counter advances on every tick. Ticks 1 to 8
shift the data bits into `odata`. Tick 9 compares the parity bit with the
data. If the parity is right, `odata_rdy` goes high and stays high until tick
10, so it lasts one PS/2 bit time (about 1900 clocks at 12.5 kHz). A frame with
wrong parity produces no `odata_rdy` and is lost. The start and stop bits are
not checked. Consumers take each byte on the rising edge of `odata_rdy`.

**Sending (request-to-send).** A rising edge on `idata_rdy` latches `idata`
and starts a transfer. The timing, in clocks of the system clock:

| phase | duration | clock line | data line |
|---|---|---|---|
| inhibit | `CLKFREQ/10 + 50` (2450, ≈102 µs) | pulled low | released |
| start bit | 50 (≈2 µs) | pulled low | pulled low |
| device clocks | 11 device clock pulses | released | bit changes on each tick |

After the clock is released, ticks 1 to 8 put out data bits 0 to 7. Tick 9
puts out the odd parity bit, and tick 10 releases the line for the stop bit.
On tick 11 the device pulls data low (the acknowledge bit) and the transfer
ends. The receiver is held cleared for the whole transfer. The device's reply
(FA, or FE to ask for a resend) then arrives as a normal received byte.

**Pacing.** `send_rdy` goes low when a transfer starts. It goes high again
`11*CLKFREQ` clocks (11 ms) after the transfer ends, and it is high after
reset. So consecutive commands are always at least 11 ms apart. An assertion
checks that `idata_rdy` rises only while `send_rdy` is high. A second
assertion checks that the lines are pulled low only during a transfer.

## Mouse controller (`mouse_ctrl`)

After reset (or when `en` goes high again), a sequencer sends eleven commands.
It sends each one as soon as `send_rdy` allows and then waits for one reply
byte:

```
FF F5            reset, disable reporting
F3 C8 F3 64 F3 50   set sample rate 200, 100, 80  -- "magic knock" for wheel mode
F2               read device ID
F6 F4            restore defaults, enable reporting
```

The sequencer does not look at the value of a reply, with one exception: after
F2 it waits for an ID byte and skips everything else, including the FA
acknowledge. ID 03 means the mouse accepted the knock and will send 4-byte
packets with a wheel byte. ID 00 means a plain mouse with 3-byte packets. The
result is also brought out as `wheel_present`. Because of the 11 ms pacing,
the whole sequence takes about 120 ms.

Once the sequence is done, the packet decoder takes bytes in order:

| byte | content |
|---|---|
| 0 | bit 0 left, 1 right, 2 middle button; bit 4 X sign; bit 5 Y sign; bit 6 X overflow; bit 7 Y overflow |
| 1 | X movement; `dx = {X sign, byte}` (9-bit two's complement) |
| 2 | Y movement; `dy = {Y sign, byte}` |
| 3 | (wheel mice only) `wheel = byte[3:0]`, 4-bit two's complement, up is negative |

The outputs update as each byte arrives. `newdata` drops with every byte and
rises after the last byte of a packet. It stays high until the next packet
begins, so a user should act on its rising edge. The decoder has no packet
resynchronisation: if a byte is lost, the fields stay shifted until reset.

## Keyboard controller (`kbdex_ctrl`)

**Decoder.** Each received byte (scancode set 2) passes through a small state
machine: `IDLE → FETCH → DECODE`, and then one of four paths:

* `F0` sets the *release* flag and returns to IDLE.
* `E0` sets the *extended* flag and returns to IDLE.
* `E1` (the Pause prefix) is ignored.
* Any other byte goes to `CODE → CLRDP`, which forms the key code
  `{extended ? E0 : 00, byte}`.

**Key slots.** There are three 16-bit slots, and an all-zero slot counts as
empty. In `CODE` a press goes into the first empty slot, unless the code is
already held. This makes typematic repeats, and a fourth key pressed while
three are held, have no effect. A release clears the slot that holds the code.
`CLRDP` clears both flags and copies "slot non-empty" to `key_on`.
`key_code[15:0]` is slot 0, `[31:16]` slot 1 and `[47:32]` slot 2. A slot
changes about 5 clocks after the rising edge of `odata_rdy`, and `key_on` changes
one clock later.

Some keyboards wrap extended keys in fake shift codes such as `E0 12`. Because
of this, a release of `0012` (left shift) also clears a slot holding `E012`,
and a release of `0059` (right shift) also clears `E059`. A few keys therefore
look unusual:

* Print Screen appears as two keys, `E012` and `E07C`.
* Pause appears as `0014` and `0077`, the same as Left Ctrl plus Num Lock.

**Keyboard lights.** A second sequencer sends the ED command, waits for the
reply (on FE it sends ED again), sends the byte `{00000, lights}` (bit 0 Scroll,
bit 1 Num, bit 2 Caps Lock), waits for the reply again (on FE it resends the
byte), and goes idle. It runs after reset, after `en` returns, and whenever
`lights` differs from the value last sent. One exchange takes about 14 ms
because of the 11 ms pacing. **While it runs, the decoder is held in IDLE**, so
scancodes that arrive during an exchange are lost. A byte that arrives while
the sequencer waits for a reply is taken as that reply.

## Demonstration designs

**`ps2_mouse_test`.** `KEY[0]` is the reset; the controller is always enabled.
`mouse_pos_acc` adds each packet's movement to a remainder and moves the
position by the whole multiples of `SENSIBILITY` (16) in it:
`s = acc + d; pos += s / 16; acc = s rem 16`, with both truncating toward
zero. Slow movements therefore add up instead of being lost, and a larger
`SENSIBILITY` gives a slower pointer. The board outputs are:

* X position (8 bits, wrapping) on HEX3:HEX2 and Y position on HEX1:HEX0.
* Buttons on LEDG[7:5], X overflow on LEDR[9], Y overflow on LEDR[7].
* The last wheel value on LEDG[3:0].
* A 300 kHz square wave (the 24 MHz clock divided by 80) on `CLOCK_300`.

**`ps2_kbd_test`.** `KEY[0]` is the reset and `KEY[1]` is the controller
enable. The design shows slot 0 (the first key pressed) in hex on HEX3..HEX0
and `key_on` on LEDG[7:5]. A 5 Hz step moves a single lit keyboard LED back
and forth (001, 010, 100, 010, …), but only while no key is held. The
rotator's bits go to the controller as Scroll = bit 0, Caps = bit 1 and
Num = bit 2, so the light sweeps across the keyboard in order. Each step
causes one ED exchange.

The parameter `SLOT_SELECT` adds the tutorial's third proposed exercise. With
its default of 0 the display always shows slot 0, as in the original example.
With 1, `SW[1:0]` chooses the slot in binary: 0, 1 or 2. The value 3 shows
0000. `key_slot_mux` does the selection.

`clk_div` makes both slow waves from the 24 MHz clock. It counts 1 to
`DIVIDER`, so its period is `DIVIDER` clocks, and it is high for
`DIVIDER/2 - 1` of them. Its output is used as data (edge-detected), not as a
clock.

`ps2_tutorial_top` holds both demos side by side. They share nothing: each
has its own clock, buttons, displays, LEDs and PS/2 pins, prefixed `M_` and
`K_`.

## How this version differs from the original VHDL components

* **One clock domain.** The original clocks registers directly with the
  filtered PS/2 clock, with `odata_rdy` and with `newdata`, and it uses SR
  latches in the keyboard decoder. Here every register runs on the system
  clock: those signals are edge-detected, and the latches are flip-flops. As a
  result, the key slots update at the clock edge that ends `CODE`.
* **Open-drain data.** A '1' data bit releases the line instead of driving it
  high. Both pins also get synchroniser flip-flops.
* **Lights.** In the original, the lights-change detector is cleared to an
  unknown value during every transfer. With any non-zero lights value the
  exchange would then repeat for ever, and the original therefore told users
  to keep the lights at zero. Here the detector compares with the value last
  sent, so the lights work, including the sweep in the keyboard demo.
* **Reply bytes.** A command reply is taken on the rising edge of `odata_rdy`,
  not on its level.
* **Mouse movement width.** `dx`/`dy` are 9 bits: the sign bit from byte 0
  plus the movement byte.
* **Extra output.** `wheel_present` on `mouse_ctrl` is new.
* **Exercise 3.** The switch-selected key slot is an option of the keyboard
  demo (`SLOT_SELECT`), off by default.
* **Removed parts.** The mouse demo's unused 100 kHz and 1 MHz dividers are
  left out, and so are the board inputs that neither demo reads.
* **Reset.** All registers have an asynchronous active-low reset, including
  the clock dividers, which originally started only from their power-up value.

## Verification

Every module has a self-checking testbench in `tb/`. A behavioural PS/2 device
(`tb/ps2_device_model.sv`) stands in for the mouse or keyboard. It models:

* the wired-AND bus;
* device-to-host frames at 12.5 kHz, optionally with bad parity;
* host request-to-send reception with the acknowledge bit;
* standard replies (FA; FA AA 00 to a reset; FA and ID 03 or 00 to F2), plus
  an FE on demand;
* abandoning a frame when the host takes the bus.

| testbench | what it checks |
|---|---|
| `tb_ps2_iobase` | byte values, `odata_rdy` length, bad-parity drop, host frame contents and parity, clock-hold and start-bit timing to the clock, 11 ms pacing |
| `tb_mouse_ctrl` | command order and spacing, wheel/no-wheel detection (two mice), 3- and 4-byte packets, signs, overflows, `newdata` timing |
| `tb_kbdex_ctrl` | ED exchange with FE resend, lights change, press, repeat, extended keys, fourth key, release, slot reuse, fake shift, Pause, 5-clock slot latency, the codes of ç (004C), down arrow (E072) and shift + A (0012, 001C) |
| `tb_mouse_pos_acc` | 400 random packets against a sign-magnitude reference, at SENSIBILITY 16 and 5 |
| `tb_kbd_lights_rotator`, `tb_clk_div`, `tb_conv_7seg` | pattern and hold; period and duty; all 16 glyphs |
| `tb_ps2_mouse_test`, `tb_ps2_kbd_test` | each demo at full size, read back from the displays and LEDs; 200 ms light steps; switch-selected key slot |
| `tb_key_slot_mux` | every select value against random slot contents |
| `tb_ps2_tutorial_top` | both demos at default parameters for 0.6 s of simulated time; counts every mechanism (init, wheel, packets, remainder carry, overflow, 300 kHz, FE resend, light steps, hold, press/release, extended key, repeat, fourth key, fake shift, aborted frame) and fails if any never happened |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. All
of them pass. The design has been checked in simulation only, against the
model above. It has not been tried on a board with a real mouse or keyboard.

## Simulating

Verilator 5 with timing support. Run from the directory that holds `rtl/` and
`tb/`, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/ps2_pkg.sv tb/tb_ps2_tutorial_top.sv --top-module tb_ps2_tutorial_top
./obj_dir/Vtb_ps2_tutorial_top
```

Replace the top testbench with any other `tb_*` module. The full-size top
test simulates 0.6 s of board time in about 15 s. The block tests take from
under a second to about ten seconds.

To change the design:

* `CLKFREQ` must match the real clock (at least 10 MHz for the keyboard
  controller). All PS/2 timing scales with it.
* `SENSIBILITY`, `CLK300_DIV`, `HZ_DIV` and `SLOT_SELECT` are plain
  parameters of the demos and the top.
* For other boards, change only the demo modules. The controllers do not
  depend on the board.
