# CHIP-8 in hardware: an FPGA emulator with a host-side loader

CHIP-8 is a tiny interpreted machine from the 1970s: sixteen 8-bit
registers, a 4 KiB memory, a monochrome screen, a 16-key hex keypad, a
beeper and two 60 Hz countdown timers. This design runs the CHIP-8 machine
directly as hardware rather than as an interpreter in software. A host processor, such as the
ARM core of an FPGA SoC, only does the set-up work. It loads a game and the
machine state over a 256-bit bus, starts and stops the CPU, and passes on
the keyboard. Everything else happens in logic: instruction execution,
sprite drawing, timers, the beep and the VGA picture.

The main ideas are:

* **A paced fetch/execute/wait controller.** Instructions take from one
  clock (a register load) to dozens (a sprite draw). Each instruction still
  starts exactly `Delay Timer Max` clocks after the one before. So a
  50 MHz FPGA runs games at the speed they were written for: 71428 clocks
  give 700 instructions per second.
* **One wide bus for all host access.** Program memory, the framebuffer,
  the stack, the keys and every CPU register are mapped as 32-byte words.
  One bus write moves 32 bytes.
* **A double-buffered screen.** Programs draw into a working buffer. A
  display update copies it whole into the buffer that VGA shows, so the
  screen never shows a half-drawn frame.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. Each block has a
self-checking testbench in `tb/`.

## Block structure

```
                    256-bit host bus
                          |
                   +--------------+   keys, Go, DisplayEnabled
                   | chip8_hps_if |-------------------------------+
                   +--------------+                               |
          mem words |   fb words |   stack | registers           |
                    v            v         v   (IsWrite)          v
 +--------------+       +-------------------+        +-------------------+
 | chip8_memory |<----->|     chip8_cpu     |<------>|    chip8_stack    |
 | 4 KiB        | bytes | V0-VF, I, PC,     | push/  | 16 x 16 bit, SP   |
 +--------------+       | controller        | pop    +-------------------+
                        +-------------------+
                     rows |  ^ update   | DT/ST writes
                          v  |          v
               +-------------------+   +--------------+   +---------------+
               | chip8_framebuffer |   | chip8_timers |-->| chip8_speaker |--> audio
               | working | display |   | 60 Hz DT, ST |   | triangle tone |
               +-------------------+   +--------------+   +---------------+
                          | pixel
                          v
                   +-----------+
                   | chip8_vga |--> 640x480 VGA
                   +-----------+
```

| Module | Role |
|---|---|
| `chip8_pkg` | Bus width, word map, geometry, control-byte bits, the control-data struct, the controller state enum |
| `chip8_top` | Wires all blocks together. Its ports are the host bus, VGA, audio and two status signals |
| `chip8_hps_if` | Decodes the host bus and gates writes. Latches Go, DisplayEnabled and the keys. Muxes read data |
| `chip8_cpu` | Registers, the controller state machine, and all 35 CHIP-8 instructions |
| `chip8_memory` | 4096 bytes as 128 words of 256 bits. Has a host word port and a CPU byte port |
| `chip8_framebuffer` | Working and displayed 128x64 buffers, a copy engine, and a pixel port for VGA |
| `chip8_stack` | 16 return addresses and the stack pointer |
| `chip8_timers` | Delay and sound timers, decremented at 60 Hz |
| `chip8_speaker` | Triangle-wave beep while the sound timer is non-zero |
| `chip8_vga` | 640x480 timing. Scales the 128x64 picture by 4 and centres it |

## The controller

The CPU has four states:

```
   Direct Write --Go--> Fetch/Decode --> Execute (1..n clocks) --> Wait
        ^                    ^                                       |
        +------- !Go --------+------------ Go && timeout ------------+
```

* **Direct Write.** The CPU is stopped. Only in this state does the host's
  bus interface accept writes to memory, the framebuffer, the stack and the
  registers. The CPU leaves Direct Write when Go is set.
* **Fetch/Decode.** One clock. The read of the two opcode bytes at PC is
  issued, and PC advances by 2. The opcode arrives on the first Execute
  clock, where it is decoded and held. The pacing counter restarts here.
* **Execute.** One clock for most instructions. Multi-step instructions
  take one clock per step (see below). When it finishes, `write_ready`
  pulses for one clock.
* **Wait.** If Go has been cleared, the CPU returns to Direct Write at
  once. Otherwise it holds until the pacing counter has counted
  `Delay Timer Max` clocks since the fetch, then fetches the next
  instruction.

A state change is therefore never in the middle of an instruction. When
the host clears Go, the CPU always stops at an instruction boundary.

**Pacing.** The counter is 32 bits and `Delay Timer Max` is a 32-bit
register. The register resets to the `DT_MAX_RESET` parameter (71428) and
the host can load it through the control word. Successive fetches are
exactly `Delay Timer Max` clocks apart, unless an instruction takes longer
than that. At the default this only happens with FX0A, which waits for a
key.

**Instruction timing in Execute**

| Instruction | Clocks | Notes |
|---|---|---|
| Most (6XKK, 7XKK, 8XYN, ANNN, jumps, skips, calls, timers, FX1E, FX29, CXKK) | 1 | |
| 00E0 clear screen | 64 | One framebuffer row per clock, then a display update |
| DXYN sprite | 2 per row | Read the row, then XOR and write it back. VF is set with the last row, then a display update. N = 0 draws nothing |
| FX33 BCD | 3 | One digit per clock |
| FX55 store V0..VX | X+1 | |
| FX65 load V0..VX | X+2 | One extra clock for the first registered read |
| FX0A wait for key | until a key is held | If Go falls while waiting, PC is moved back so the instruction repeats on resume |

**Instruction semantics.** These follow common CHIP-8 practice:

* 8XY4 sets VF to the carry. 8XY5 and 8XY7 set VF to NOT borrow.
* 8XY6 and 8XYE shift VX in place and put the bit shifted out into VF.
* FX55 and FX65 leave I unchanged.
* FX29 points I at `5*VX`, so the host must load the 5-byte hex font at
  address 0.
* Sprites wrap at the screen edges. VF is set to 1 if any lit pixel was
  erased.
* CXKK ANDs KK with a 16-bit LFSR that advances every clock. Its value
  therefore depends on the exact timing of the run.

## Host bus

The bus is word-addressed. Each word is 256 bits. A byte sequence is
MSB-first: byte 0 is bits 255:248. Writes take effect at the clock edge
where `bus_cs && bus_write` is high. Read data is on `bus_readdata` one
clock after `bus_cs && bus_read`.

| Word address | Contents | Writable |
|---|---|---|
| 0x00-0x7F | Program memory, 128 x 32 bytes (CHIP-8 address `32*word + byte`) | While halted |
| 0x80-0x9F | Working framebuffer, 32 x 32 bytes | While halted |
| 0xA0 | Return stack: entry k in bytes 2k, 2k+1 | While halted |
| 0xA1 | Keyboard: key k is held while byte k is non-zero | Always |
| 0xA2 | Control data (below) | Control byte always. Other fields need IsWrite and a halted CPU |

Word addresses 0xA3-0xFF are unused. Writes to them are ignored and reads
return 0.

Control data word (byte offsets):

| Bytes | Field |
|---|---|
| 0-15 | V0-VF |
| 16-19 | Delay Timer Max |
| 20-21 | I |
| 22-23 | PC |
| 24 | Sound timer |
| 25 | Delay timer |
| 26 | Stack pointer |
| 27-30 | Unused |
| 31 | Control byte: bit 1 Go, bit 2 IsWrite, bit 3 DisplayEnabled, bit 4 DisplayUpdate (bit 0 is the LSB and unused) |

Every write to 0xA2 sets Go and DisplayEnabled from the control byte.

* A 1 in DisplayUpdate asks the framebuffer for a copy.
* The register fields are loaded only if IsWrite is 1 and the CPU is in
  Direct Write. A host can therefore start, stop or refresh the screen
  without touching the registers.

When the control word is read back:

* the register fields show the live values;
* bit 4 of the control byte is 1 while a display copy is pending or
  running;
* IsWrite reads as 0.

A typical session:

1. Write the font and the game into memory.
2. Clear the framebuffer and the stack.
3. Write the control word with PC = 0x200, IsWrite = 1, Go = 1 and
   DisplayEnabled = 1.
4. Send the keyboard word whenever the key state changes.
5. To stop, write the control word with Go = 0, then read the state back.

## Double-buffered framebuffer

There are two buffers of 128x64 pixels, 1024 bytes each. Bus word `w`
holds rows `2w` (bits 255:128) and `2w+1` (bits 127:0). Within a row,
pixel x is bit `127-x`, so the bytes run left to right, MSB-first.

* The CPU reads and writes the working buffer one 128-pixel row at a time.
* The host accesses it one word (two rows) at a time.
* VGA reads the displayed buffer one pixel per clock.

A display update comes either from the CPU, after every clear and sprite
draw, or from the host's DisplayUpdate bit. It starts a copy engine that
moves one word per clock, so a copy takes 32 clocks. If a request arrives
during a copy, it is remembered and starts a second full copy when the
first one ends, so no request is lost. The copy takes 32 clocks, and at
normal pacing the next draw starts tens of thousands of clocks later. The
displayed buffer therefore holds a finished picture except during those 32
clocks.

## Timers and beep

`chip8_timers` divides the clock by `CLK_HZ/60` (833,333 at 50 MHz). It
decrements each non-zero timer once per tick.

* CPU writes (FX15, FX18) take priority over a tick.
* Host loads through the control word take priority over both.

While the sound timer is above zero, `chip8_speaker` plays a 440 Hz
triangle wave as signed 16-bit samples and raises `audio_on`. The tone
comes from a 32-bit phase accumulator whose upper bits are folded at the
midpoint. The phase restarts at zero for each beep.

## VGA picture

`chip8_vga` generates standard 640x480 timing with a pixel every second
clock (`vga_clk_en`, 25 MHz at 50 MHz):

* horizontal: 640 visible, 16 front porch, 96 sync, 48 back porch;
* vertical: 480 visible, 10 front porch, 2 sync, 33 back porch;
* both syncs are active low.

Each CHIP-8 pixel becomes a 4x4 block. The 512x256 image is centred with
64-pixel side borders and 112-line top and bottom borders. A lit pixel is
white and everything else is black. With DisplayEnabled low the screen is
black. The outputs are registered and lag the internal counters by one
pixel.

## Top-level ports and parameters

`chip8_top` has these ports:

* `clk`, `rst_n`: active-low asynchronous reset;
* the host bus: `bus_cs`, `bus_write`, `bus_read`, `bus_address[7:0]`,
  `bus_writedata[255:0]`, `bus_readdata[255:0]`, `write_ready`;
* VGA: `vga_r/g/b[7:0]`, `vga_hs`, `vga_vs`, `vga_blank_n`, `vga_clk_en`;
* audio: `audio_sample[15:0]`, `audio_on`;
* status: `cpu_state[1:0]` (0 Direct Write, 1 Fetch, 2 Execute, 3 Wait)
  and `timer_tick` (the 60 Hz pulse).

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | Clock frequency. Sets the 60 Hz divider and the tone step |
| `DT_MAX_RESET` | 71428 | Delay Timer Max after reset (700 instructions/s at 50 MHz) |
| `TONE_HZ` | 440 | Beep pitch |

At the defaults, yosys maps the design to about 1,080 flip-flop bits. The
design has 49,152 bits of RAM: 32 Kib of program memory and 16 Kib for the
two framebuffers.

## What comes from the original design and what does not

The original design fixes these points, and this RTL follows them:

* the block structure: memory, framebuffer, CPU and controller, speaker,
  VGA;
* the 256-bit bus and its word map;
* the control-data layout and the control-byte bits;
* the fetch/execute/wait controller, paced by a counter that starts at
  each fetch and counts to Delay Timer Max;
* the 71428 default and the 50 MHz clock;
* copy-on-request double buffering of a 128x64 image, scaled and centred;
* a 16-entry stack with an 8-bit pointer;
* PC = 0x200 at start;
* a triangle-wave beep while the sound timer is non-zero.

The following are this design's own choices. The original description does
not cover them:

* **Host write gating.** Memory, framebuffer, stack and registers can be
  written only while the CPU is in Direct Write. Keys can be written at any
  time.
* **Key encoding.** One byte per key on the keyboard word.
* **Clock counts.** The clocks per instruction step given above. The
  original estimates up to about 100 clocks for a sprite. Here, a 15-row
  sprite takes 30.
* **Display updates.** The CPU requests one after every clear and every
  draw.
* **Copy rate.** One word per clock, with one queued request.
* **Scaling.** The original assigns the scaling and centring of the image
  to the framebuffer. Here the VGA block does it, by addressing the
  displayed buffer with the beam position divided by 4.
* **Read-back.** Bit 4 of the read-back control byte shows that a copy is
  pending or running.
* **Stack order.** Push pre-increments SP and pop post-decrements it, so
  the first call uses entry 1. SP is 8 bits wide, and its low 4 bits select
  the entry, so deeper nesting wraps around the 16 entries.
* **Beep.** 440 Hz, 16-bit samples. There is no audio codec interface: the
  samples are a plain output.
* **Random numbers.** The LFSR used by CXKK.
* **Reset and pacing start.** Asynchronous active-low reset. Delay Timer
  Max is counted from the fetch clock, so that the fetch-to-fetch period
  equals the value exactly.

The host software, the USB keyboard, the game menu, the VGA DAC and the
audio codec are outside this RTL. The ports above are where they connect.

## Verification

Each testbench checks its block against values worked out independently of
the block. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_chip8_memory` | Random word writes and reads. CPU byte reads at every alignment, including the wrap at 4095. CPU writes seen on the bus |
| `tb_chip8_framebuffer` | Row and word views of the working buffer. A copy takes exactly 32 clocks. The displayed buffer stays unchanged until the copy. A queued second request. The pixel port |
| `tb_chip8_stack` | Random push, pop and load sequences against a model, including SP wrap-around |
| `tb_chip8_timers` | Tick period, decrements, stop at zero, priorities (run at a scaled-down clock) |
| `tb_chip8_speaker` | Silence, period, triangle shape, step size, full swing (scaled-down clock) |
| `tb_chip8_vga` | Line and frame lengths, sync widths and positions, blanking, and every visible pixel of a test picture. Display-disabled frame |
| `tb_chip8_hps_if` | Decoding and gating of every region, IsWrite, Go, DisplayEnabled, the update pulse, keys, read timing |
| `tb_chip8_cpu` | Eight random 200-instruction programs run against a reference interpreter in the testbench. Registers are compared after every instruction. Memory, stack and framebuffer are compared at the end. Also pacing, FX0A waiting and abandonment, CXKK, BNNN |
| `tb_chip8_top` | End to end, at the default parameters |

`tb_chip8_top` plays the host. It loads the font and a short program,
starts the CPU with one control-word write, presses a key during FX0A, and
lets the delay timer run out at the real 60 Hz rate. Then it checks:

* every register, the stack, memory and the working framebuffer, read back
  over the bus;
* the VGA output over whole frames, pixel by pixel;
* that fetches are exactly 71428 clocks apart and timer ticks exactly
  833,333 clocks apart;
* the beep amplitude;
* a host-drawn picture shown through DisplayUpdate, with a second request
  queued behind the first and the copy-in-progress bit read back.

It also counts every mechanism of the design and fails if any never
happened: fetch, multi-clock execute, wait, register load, CPU and host
display updates, a queued update, push, pop, collision, key wait, 60 Hz tick, beep and VGA
frames. It simulates about 6 million clocks, which takes about 15 seconds
with Verilator.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_chip8_top \
    rtl/chip8_pkg.sv tb/tb_chip8_top.sv
./obj_dir/Vtb_chip8_top
```

Replace `tb_chip8_top` with any other testbench name. The package must come
first on the command line. The other modules are found through `-y rtl`.
For synthesis, read all files in `rtl/`, package first, with `chip8_top`
as the top.
