# Virtus console MMIO manifold

A small RISC-V console reaches all of its peripherals through one 32-bit
AXI4-Lite data port. This RTL is the piece that sits on that port: an
address manifold that splits the address space between block RAM and
memory-mapped I/O, hands each I/O access to the peripheral whose window it
falls in, and quietly absorbs every access that lands nowhere. Four of the
peripherals are included (system control, GPIO, PWM audio, PS/2 keyboard);
the others are brought out as AXI4-Lite ports.

The main idea of the map is a fixed, grep-able layout: peripheral *N* lives
at `0x8010_0000 + N * 0x1_0000`, a 64 KiB stride in which each peripheral
uses only the first 4 KiB. The remaining 60 KiB of each slot is padding, so
a peripheral can grow without moving its neighbours. Software hard-codes
the base addresses. Nothing on this bus ever raises an error: a misaligned
or unmapped write is discarded, a read returns zero, and both get an OKAY
response.

## Address map

| Base          | Window  | Target                  | Built here | Registers                                        |
|---------------|---------|-------------------------|------------|--------------------------------------------------|
| `0x0000_0000` | 2 GiB   | BRAM (instr + data)     | port       | passed through unchecked                         |
| `0x8000_0000` | 64 KiB  | pixel framebuffer       | port       | -                                                |
| `0x8003_0000` | 16 B    | system control          | `sys_ctrl` | CYCLE +0x0, TRAPVEC +0x4, HALT +0xC              |
| `0x8010_0000` | 64 KiB  | HDMI / text console (N=0) | port     | -                                                |
| `0x8011_0000` | 4 KiB   | audio (N=1)             | `audio_pwm`| HALF +0x10, BUF +0x100..0x1FF, HEAD +0x200, TAIL +0x204 |
| `0x8012_0000` | 4 KiB   | PS/2 keyboard (N=2)     | `ps2_keyboard` | READY +0x08, FIFO +0x10..0x1F               |
| `0x8013_0000` | 4 KiB   | GPIO (N=3)              | `gpio`     | DIR +0x0, OUT +0x4, IN +0x8, INT_STATUS +0xC     |
| `0x8014_0000` | 4 KiB   | DS2 gamepad (N=4)       | port       | -                                                |
| `0x8015_0000` | 4 KiB   | fpga_pio (N=5)          | port       | -                                                |
| `0x8016_0000`..`0x801F_FFFF` | - | slots 6..15      | -          | unmapped                                         |

## How an address is decoded

This is the part most worth reading before changing anything
(`axi_manifold.sv`, function `decode`):

1. `addr[31] == 0` goes to BRAM, whatever the alignment.
2. In I/O space, `addr[1:0] != 0` is misaligned and is answered by the
   manifold. AXI4-Lite has no transfer size, so every access is a full
   32-bit word. A CPU issues `sb`/`sh` as a word-aligned address with
   `WSTRB` lanes, and `lb`/`lh` as a word read. Only a word address with
   low bits set, e.g. `lw` at `0x8013_0001`, is misaligned.
3. `addr[31:16]` is compared with each window's base. The peripheral slot
   number is `addr[19:16]`, but that nibble alone is not enough: the
   framebuffer (`0x8000_0000`) and HDMI (`0x8010_0000`) share it, as do
   system control (`0x8003_0000`) and GPIO (`0x8013_0000`). Bit 20 tells the
   low region from the `0x801N` family, and bits 30:21 must be zero.
4. The offset `addr[15:0]` must be inside the window: 64 KiB for the
   framebuffer and HDMI, 16 B for system control, 4 KiB for the other
   slots. Padding past a window is unmapped. For example, `0x8011_1000` is
   unmapped, and `0x8003_0010` is past system control.

Inside a window, each slave reads zero at offsets it does not define and
ignores writes to them.

## Manifold handshake and timing

The manifold has one write state machine and one read state machine, so a
read can proceed while a write is outstanding. Each machine handles one
transaction at a time.

- **Write.** AW and W are accepted in either order into holding registers.
  AWREADY and WREADY are high while the matching holding register is empty.
  Once both are held, the target is decoded. The manifold then either
  offers AW and W to the target and relays its B, or answers B itself.
  Against a slave that accepts at once, a write costs one clock more than
  the slave alone.
- **Read.** AR is accepted (ARREADY is high when idle) and decoded. The
  manifold then either offers AR to the target and relays R, or returns
  zero itself one clock later.

The built slaves share `axil_slave_port`, which follows the "combinational
AWREADY" style for new slaves. AWREADY and WREADY go high together, in the
same cycle that AWVALID and WVALID are both high. That cycle is the
register write, and BVALID follows one clock later. A read is registered,
so RVALID comes one clock after the ARVALID/ARREADY handshake. Through the
manifold, with BREADY and RREADY held high, a CPU write or read of a built
slave completes on the third rising edge after the valids are raised. That
is one clock more than the slave alone.

Concurrent assertions in the manifold and the slave port check the AXI
rules: a valid held until ready, a stable address, and a response held
until taken. Run with `--assert` to enable them.

## The peripherals

**`sys_ctrl`**: four 32-bit slots.
- CYCLE (+0x0) is a free-running clock counter. It is read-only and wraps.
- TRAPVEC (+0x4) is read/write with byte strobes and drives `trap_vector`.
- +0x8 is reserved.
- HALT (+0xC): writing 1 to bit 0 sets `halt`, which stays set until reset.

**`gpio`**: 16 pins in a tristate tuple (`gpio_o`, `gpio_oe`, `gpio_i`).
The pad buffer is outside the module.
- DIR: 1 means output.
- IN: the pins after a two-flop synchroniser.
- INT_STATUS: a bit is set on a rising edge of an input pin, and writing 1
  clears it.
- `irq` is the OR of INT_STATUS.

**`audio_pwm`**: 8-bit unsigned mono samples, played at 22 kHz.
- The 256-byte BUF holds four samples per word, little-endian. The CPU
  writes samples and then moves HEAD; the player moves TAIL.
- The ring is empty when HEAD == TAIL, so at most 255 samples are queued.
- Every `CLK_HZ/SAMPLE_HZ` clocks (4545 at 100 MHz), the player loads
  BUF[TAIL] and advances TAIL. When the ring is empty, the last sample is
  held.
- `pwm_out` comes from an 8-bit counter at the system clock, so the duty
  cycle is `sample/256` over any 256 clocks. An external RC low-pass filter
  turns it into audio.
- HALF bit 0 and `half_empty` are 1 while fewer than 128 samples are queued.

**`ps2_keyboard`**: receive-only PS/2.
- Frames are start, 8 data bits LSB first, odd parity, stop. Data is
  sampled on the falling edge of the keyboard clock, after a synchroniser.
- A good frame goes into a 16-entry FIFO; when the FIFO is full, the new
  code is dropped. A bad frame pulses `frame_error`.
- A partial frame that stalls for `TIMEOUT` clocks is discarded.
- Reading anywhere in +0x10..0x1F pops one raw scancode.
- READY bit 0 means data is waiting. Bit 1 is 1 while either shift key is
  down: it follows the set-2 make and break codes of left shift (0x12) and
  right shift (0x59). Scancodes are not translated to ASCII.

## What is not here

These targets sit on the map, but their internals are not defined in a
form that can be built, so the top brings each one out as an AXI4-Lite
port pair (`*_req` / `*_rsp`):

- **BRAM**: its size and layout are defined elsewhere.
- **Framebuffer**: no pixel layout is defined. Also, 320×240 pixels at
  12 bpp is 115,200 bytes, which does not fit the 64 KiB window even fully
  packed.
- **HDMI text console** (80×30 tiles, 16-colour palette, vsync doorbell):
  only register ranges exist, and they overlap. The tile map
  +0x000..+0x95F covers the vsync, palette and frame-list offsets.
- **DS2 gamepad**: deferred, with only its base address reserved.
- **fpga_pio**: no specification.

The CPU is the single bus master; there is no DMA, so there is no
arbitration. Future extensions to the map are out of scope: accelerators in
slots 6..15 and a PLIC at `0x0C00_0000`.

## Choices made in this RTL

These are decisions the source map leaves open. Change them freely.

- **Decode:** `addr[20]` is used next to `addr[19:16]` (see above). Misaligned
  means `addr[1:0] != 0`, and the check applies to I/O space only. Every
  response is OKAY.
- **Manifold structure:** separate read and write machines, one transaction
  each.
- **Clock and reset:** a 100 MHz default clock. Reset is asynchronous and
  active-low; registers reset to zero and the audio output to mid-scale.
- **Per-slave details:**
  - GPIO: the interrupt source (rising edge on an input pin) and the
    synchroniser.
  - Audio: the ring semantics, the byte packing, holding the last sample on
    underrun, and the <128 threshold for "half empty".
  - PS/2: a FIFO depth of 16 (one entry per byte of its window), dropping
    new codes when full, where the shift state appears, and a 200 µs
    timeout.
  - System control: the cycle counter is read-only, HALT is sticky, and
    slot +0x8 is reserved.

## Files

| File | Contents |
|------|----------|
| `rtl/virtus_pkg.sv` | AXI4-Lite request/response structs, target enum, base addresses, register offsets |
| `rtl/axi_manifold.sv` | decoder and router |
| `rtl/axil_slave_port.sv` | AXI4-Lite to one-cycle register access, shared by the slaves |
| `rtl/sys_ctrl.sv`, `rtl/gpio.sv`, `rtl/audio_pwm.sv`, `rtl/ps2_keyboard.sv` | the peripherals |
| `rtl/virtus_mmio_top.sv` | top: manifold, peripherals, external ports |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/axil_master_bfm.sv` | AXI4-Lite master with random valid/ready delays |
| `tb/axil_mem_slave.sv` | behavioural AXI4-Lite memory with random delays, identifies itself in read data |

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/virtus_pkg.sv tb/tb_virtus_mmio_top.sv --top-module tb_virtus_mmio_top
./obj_dir/Vtb_virtus_mmio_top
```

Replace `virtus_mmio_top` with `axi_manifold`, `sys_ctrl`, `gpio`,
`audio_pwm` or `ps2_keyboard` to run the other testbenches. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Each runs in well under
a second.

## What the tests cover

- **`tb_axi_manifold`** (about 10,000 checks): nine behavioural slaves with
  random ready and response delays. The test uses random and edge-case
  addresses in every window, including the first and last word, the
  padding, slots 6..15, high address bits, misaligned addresses and BRAM.
  It also overlaps reads with writes. It checks that exactly the right
  slave saw each access, checks data against a reference memory, and checks
  that bad accesses reach nobody and read zero.
- **`tb_virtus_mmio_top`** runs the full design at its default parameters
  (100 MHz, 22 kHz, real PS/2 bit timing). It exercises every target and
  every mechanism: external routing, misaligned and unmapped accesses, the
  cycle counter, trap vector, halt, GPIO in/out/irq/W1C, audio playback
  (duty of every sample and the 4545-clock sample period), half-empty,
  underrun, PS/2 scancodes and shift state. It counts each mechanism and
  fails if any never happened.
- The per-slave testbenches check each register behaviour above, including
  strobes, latencies, the FIFO overflow, bad parity and stop bits, the
  timeout and the ring wrap-around.

Not verified: behaviour under back-to-back AXI traffic from a real CPU
core, the analog RC filter, and timing closure on any FPGA.

## Changing it

- **Clock:** set `CLK_HZ` on the top. The audio divider and the PS/2
  timeout follow it.
- **Window sizes:** the `*_WIN` parameters of `axi_manifold`.
- **New slot:** add an entry to `slave_e` in `virtus_pkg`, raise
  `NSLAVES`, add the slot to `decode`, and connect its port in the top.
- **New register slave:** use `axil_slave_port` and write only the
  register logic, reading `rd_data` combinationally in the `rd_en` cycle.
