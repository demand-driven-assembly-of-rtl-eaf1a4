# Demand-loaded IO controllers: a six-slot reconfigurable external-IO system

On a Zynq board (the PYNQ platform, ARM cores plus FPGA fabric), the external pins are usually
served by a fixed bitstream. That bitstream holds a bank of IO controllers (GPIO, I2C, SPI,
timers) per connector, a pin switch and a soft processor to run them. The design here replaces
each bank with **identical reconfigurable slots**. A slot is loaded at run time with the one
controller the attached peripheral needs, and the host processor drives it directly over its
memory-mapped bus. Software changes a slot in three steps: isolate it from the static logic,
write the slot's partial bitstream, and reconnect it.

This repository holds synthesizable SystemVerilog for the static side of that system: the bus
interconnect, the per-slot decouplers, the decouple-control GPIO and the interrupt controller. It
also holds the five controllers a slot can be loaded with, GPIO, Timer/PWM, UART, SPI and I2C, and a
model of the slot itself.

## System map

```
              host processor (AXI4-Lite master, one interrupt input)
                     |  s_axil_req / s_axil_rsp                ^ irq
               +-----+----------------------------------+      |
               |            axil_xbar                   |      |
               +--+------+------+------+-- ... --+------+      |
                  |      |      |      |         |             |
   decouple  axil_gpio  pr_intc |      |         |             |
   GPIO (6 outputs)  ^(6 in)    |      |         |             |
        |            |     pr_region rp0 ... pr_region rp5     |
        +--decouple--|------>[pr_decoupler] -> loaded module   |
                     +-------------- irq[k] -------------------+
                                    |  8 tristate pins per region
           PmodA  PmodB  Arduino inner header (16)  Arduino shield (14)
```

| Slave | Base address | Window | Interrupt input |
|---|---|---|---|
| decouple GPIO | 0x4120_0000 | 64 KiB | - |
| interrupt controller | 0x4180_0000 | 64 KiB | - |
| region rp*k* (k = 0..5) | 0x41A1_0000 + k·0x1_0000 | 64 KiB | k |

| Region | Pins on the top |
|---|---|
| rp0 | `pmod_a_*[7:0]` |
| rp1 | `pmod_b_*[7:0]` |
| rp2, rp3 | `ar_gpio_*[7:0]`, `ar_gpio_*[15:8]` (inner 16-pin header) |
| rp4, rp5 | `ar_shield_*[6:0]`, `ar_shield_*[13:7]` (outer 14 pins, 7 per region, pin 7 unused) |

Each pin is brought out as `_i` (from the pad), `_o` (to the pad) and `_t` (tristate enable,
1 = released). This matches the signals of a vendor IO buffer placed outside this RTL.

The region addresses, the 64 KiB windows, the interrupt numbering, the six regions and the
pin-group sizes (8, 8, 16, 14) come from the reference system. The GPIO and interrupt-controller
addresses are this design's choice. So is the assignment of the inner header to rp2/rp3 and of
the shield pins to rp4/rp5.

## The region template and what "reconfiguration" means here

Every region has the same boundary:

* an AXI4-Lite slave at a fixed 64 KiB window,
* eight tristate pins (`pin_i`, `pin_o`, `pin_t`),
* one interrupt output.

Any controller that fits this boundary can be loaded into any region.

On the FPGA, a region's contents are replaced by writing configuration memory. That is not
logic, so the RTL models it with **`rp_config[k]`**, a top-level input that names the module
region *k* currently holds (`RM_GPIO`, `RM_TIMER_PWM`, `RM_UARTLITE`, `RM_SPI` or `RM_IIC`). `pr_region` elaborates
all library modules. Only the selected one is connected to the region's bus, pins and interrupt;
the others are held in reset. When `rp_config[k]` changes, the new module is held in reset for one cycle and
then starts from its reset state, as freshly configured logic does. Synthesizing this model
gives a region that holds every module at once, which is **not** the area story of the real
system. On the device, each module is implemented separately into the region.

The rule that makes reconfiguration safe is checked, not assumed: `rp_config[k]` may change
only while `rp_decoupled[k]` is high. An assertion in `pr_region` enforces this. The software
sequence is:

1. Set bit *k* of the decouple GPIO (offset 0x0 of 0x4120_0000).
2. Wait until the region is isolated. `rp_decoupled[k]` shows it; in hardware it takes at most
   one cycle after any transfer in flight.
3. Load the partial bitstream. In RTL this is the change of `rp_config[k]`.
4. Clear bit *k*. The region is live again, with its new module in its reset state.

All regions start **decoupled** after reset (the decouple GPIO resets to all ones), so no
undefined logic can drive the bus or the pins before software has loaded the regions.

### What the decoupler does (`pr_decoupler`)

While a region is isolated:

* No `valid` reaches the region. The decoupler answers any transfer itself with **SLVERR**
  (read data 0), so a stray access completes instead of hanging the processor.
* The region's interrupt is forced low.
* All its pins are released (`pin_t` = all ones, `pin_o` = 0).

The `decouple` request is applied only in a cycle with no transfer in progress and none starting.
`decoupled` then follows one cycle later, so a transfer is never split between the region and
the local responder. The reference system states the decoupler's purpose and the software
sequence. The SLVERR answer, the pin release and the switch-between-transfers rule are this
design's choices.

## Library modules

### GPIO (`axil_gpio`)

| Offset | Register | Meaning |
|---|---|---|
| 0x000 | DATA | write: outputs; read: pin value where TRI=1, output register where TRI=0 |
| 0x004 | TRI | 1 = input (released), 0 = output; resets to all ones |
| 0x11C | GIER | bit 31 global interrupt enable |
| 0x120 | ISR | bit 0 set on any input change; write 1 to clear |
| 0x128 | IER | bit 0 enables the change interrupt |

Inputs pass through a two-flop synchroniser. An input edge sets ISR on the third rising clock
edge. The same core, at width 6, outputs only and reset value all ones, is the decouple-control
GPIO. The layout follows the usual vendor GPIO core; the write-1-to-clear ISR is a simplification.

### Timer/PWM (`rm_timer_pwm` around `axil_timer`)

The region module places a two-counter timer, plus two constants and a bit concatenation, onto
the eight pins:

* `gpio_o[0]` = `generateout0`, a one-cycle pulse at each timer-0 event,
* `gpio_o[1]` = `pwm0`,
* `gpio_o[7:2]` = `OUT_CONST` (0),
* `gpio_t` = `TRI_CONST` (0, all pins driven).

The capture inputs, `freeze` and the pin inputs are not connected.

Timer registers: timer 0 at 0x00/0x04/0x08 and timer 1 at 0x10/0x14/0x18 (TCSR, TLR, TCR).

| TCSR bit | Name | Meaning |
|---|---|---|
| 0 | MDT | 1 = capture mode |
| 1 | UDT | 1 = count down |
| 2 | GENT | drive the generate output |
| 3 | CAPT | enable the capture trigger |
| 4 | ARHT | auto-reload |
| 5 | LOAD | hold the counter at TLR |
| 6 | ENIT | interrupt enable |
| 7 | ENT | run |
| 8 | TINT | event flag, write 1 to clear |
| 9 | PWMA | PWM enable |
| 10 | ENALL | start both timers |

* **Generate mode:** counting down from TLR with auto-reload gives an event every TLR+1 cycles.
  Without auto-reload the timer stops (ENT clears) at the first terminal count.
* **PWM mode:** set PWMA, GENT and generate mode in both TCSRs. Each timer-0 event raises `pwm0`
  and restarts timer 1. The timer-1 event lowers `pwm0`. The period is TLR0+1 cycles and the
  high time TLR1+1 cycles (counting down).
* **Capture mode:** a rising trigger edge copies the counter into TLR and sets TINT.

The register set follows the usual vendor timer. The cycle-exact behaviour above is this
design's own.

### UART (`rm_uartlite`)

An 8N1 UART: 8 data bits, no parity, one stop bit, LSB first. It has 16-word transmit and receive
FIFOs. Pin 0 is TX (the only driven pin) and pin 1 is RX. The baud rate is a build-time
parameter, as in the reference system, where changing the rate means building a new module.
Each bit lasts `CLK_HZ / BAUD` cycles; the defaults are 100 MHz and 9600 baud, so 10416 cycles.

| Offset | Register | Meaning |
|---|---|---|
| 0x0 | RX FIFO | read pops the oldest byte; reads 0 when empty |
| 0x4 | TX FIFO | write queues a byte; ignored when full |
| 0x8 | STAT | 0 rx valid, 1 rx full, 2 tx empty, 3 tx full, 4 interrupt enabled, 5 overrun, 6 frame error |
| 0xC | CTRL | write: 0 reset TX FIFO, 1 reset RX FIFO, 4 interrupt enable |

Reading STAT clears the overrun and frame-error bits and the interrupt flag. The flag is set
when a byte enters the receive FIFO or when the transmit FIFO drains.

The transmitter starts a frame the cycle after a byte is queued. It moves the byte straight into
its shifter, so 17 bytes can be waiting when the TX FIFO reports full.

The receiver uses a two-flop synchroniser. It confirms the start bit at its middle and samples
each later bit one bit period apart. A zero stop bit drops the byte and sets the frame error. A
byte that arrives to a full RX FIFO sets overrun.

The register layout follows the usual vendor "UART Lite" core.

### SPI master (`rm_spi`)

A single-lane SPI master with 8-bit transfers, one slave select and 16-word transmit and receive
FIFOs. Pins: 0 = SS (active low), 1 = MOSI, 2 = MISO (input), 3 = SCK; pins 4–7 are released.
SCK runs at the clock divided by 16. All four clock modes (CPOL, CPHA) are supported, MSB or LSB
first. A transfer starts whenever the core is enabled as master, not inhibited, and the TX FIFO
holds a byte. Back-to-back bytes keep SS low. SS rises one cycle after the last SCK edge.

| Offset | Register | Use |
|---|---|---|
| 0x1C | DGIER | bit 31 global interrupt enable |
| 0x20 | IPISR | bit 2 TX FIFO drained; write 1 to clear |
| 0x28 | IPIER | bit 2 enables it |
| 0x40 | SRR | write 0xA to reset the core |
| 0x60 | SPICR | 0 loopback, 1 enable, 2 master, 3 CPOL, 4 CPHA, 5/6 reset TX/RX FIFO, 7 manual SS, 8 inhibit, 9 LSB first |
| 0x64 | SPISR | 0 RX empty, 1 RX full, 2 TX empty, 3 TX full |
| 0x68 | DTR | byte to send |
| 0x6C | DRR | oldest received byte (read pops) |
| 0x70 | SSR | bit 0: SS level in manual mode |

The offsets follow the usual vendor Quad SPI core in its standard mode. Only a subset of its
registers is provided. Dual and quad lanes, slave mode and execute-in-place are not built.

### I2C master (`rm_iic`)

A single-master I2C controller for devices such as a real-time clock or a display driver.
Pin 0 is SCL and pin 1 is SDA. Both are open drain: the module only pulls a line low through
its tristate enable, and the board provides the pull-ups. Both lines are read back through
two-flop synchronisers. A slave that holds SCL low (clock stretching) pauses the master.
SCL runs at 100 kHz from a 100 MHz clock. Each SCL period has four phases of 250 cycles: low,
high, high, low. SDA changes only while SCL is low and is sampled in the middle of the high time.

Software queues commands in the TX FIFO. Each command moves one byte:

| Bit | Meaning |
|---|---|
| 7:0 | byte to send (ignored for a read) |
| 8 | START (or repeated START) before the byte |
| 9 | STOP after the byte; on a read, answer NACK |
| 10 | read a byte into the RX FIFO instead of sending one |

After a byte without STOP the master holds SCL low until the next command arrives. A NACK to a
sent byte sets ISR bit 1, empties the TX FIFO and ends the transfer with a STOP.

| Offset | Register | Use |
|---|---|---|
| 0x1C | GIE | bit 31 global interrupt enable |
| 0x20 | ISR | bit 1 NACK, bit 2 command queue drained; write 1 to clear |
| 0x28 | IER | enables for the same bits |
| 0x40 | SOFTR | write 0xA to reset the core |
| 0x100 | CR | bit 0 enable, bit 1 reset TX FIFO |
| 0x104 | SR | 2 bus busy, 4 TX full, 5 RX full, 6 RX empty, 7 TX empty |
| 0x108 | TX FIFO | command |
| 0x10C | RX FIFO | oldest received byte (read pops) |

The offsets follow the usual vendor AXI IIC core. The command format is this design's own.
Multi-master arbitration, slave mode and 10-bit addresses are not built.

## Interconnect and interrupts

`axil_xbar` decodes by `(addr & MASK[k]) == BASE[k]`. It has independent write and read paths,
each carrying one transfer at a time, and a decode cycle. A single access takes **3 cycles**
from address valid to the end of the response handshake when the slave answers at once
(`axil_reg_port`). Unmapped addresses get **DECERR**. Assertions check that the master holds
`valid` and the payload stable until accepted.

`pr_intc` has level-sensitive inputs, one per region.

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | ISR | status (read only) |
| 0x04 | IPR | ISR & IER |
| 0x08 | IER | enable |
| 0x0C | IAR | write 1 to acknowledge; a bit whose input is still high sets again |
| 0x10 | SIE | write 1 to set enable bits |
| 0x14 | CIE | write 1 to clear enable bits |
| 0x18 | IVR | lowest pending enabled input, all ones if none |
| 0x1C | MER | bit 0 gates `irq` |

A GPIO-region input toggle reaches the processor's `irq` **4 cycles** after the pin changes:
two synchroniser flops, the GPIO ISR, then the controller ISR.

## Where this RTL departs from the reference system

* **The slot controllers are new RTL, not the vendor cores.** The reference system loads the
  vendor's GPIO, UART, SPI, I2C and timer cores unchanged and only names them. Here each is the
  simplest controller that does the job. Register offsets follow the vendor cores where they are
  generally known, but only a subset of registers exists. The I2C command format and the UART
  interrupt rule are this design's own.
* **Reconfiguration is a select input.** Every region elaborates all five controllers and
  `rp_config[k]` picks one. A synthesized region is therefore far larger than the 200-slice
  region of the reference system. Only the behaviour seen at the region boundary is modelled.
* **Fixed build-time settings.** UART 9600 baud, SPI clock/16 and I2C 100 kHz, all from a
  100 MHz clock, are assumptions. In the reference system such settings are chosen when a module
  is built, and changing one means building another module.
* **Addresses of the decouple GPIO and the interrupt controller** are assumptions. Only the
  region addresses and interrupt numbers come from the reference system.
* **Interrupt latency** is given here in clock cycles of hardware only. The reference system
  measured 3.41–32.11 µs from pin to handler, a figure dominated by software.

## Not included

* **The fixed Arduino I2C, SPI and XADC cores**, which sit outside the reconfigurable part.
* **The processor, the device configuration port and the IO buffers.** Each appears as top-level
  ports.
* **Protocol conversion from the processor's AXI port.** The whole system uses a 32-bit
  AXI4-Lite bus without protection signals.
* **Area and load time.** Region size (200 slices) and partial-bitstream load time (about
  10–12 ms) are properties of the FPGA implementation and are not modelled.

## Files

| File | Contents |
|---|---|
| `rtl/pr_pkg.sv` | bus structs, response codes, module kinds, address map |
| `rtl/axil_reg_port.sv` | AXI4-Lite slave to single-cycle register strobes (used by all slaves) |
| `rtl/axil_xbar.sv` | interconnect |
| `rtl/pr_decoupler.sv`, `rtl/pr_region.sv` | region isolation and the region model |
| `rtl/axil_gpio.sv`, `rtl/pr_intc.sv` | GPIO (slot module and decouple control), interrupt controller |
| `rtl/axil_timer.sv`, `rtl/rm_timer_pwm.sv` | timer core and Timer/PWM slot module |
| `rtl/rm_uartlite.sv`, `rtl/sync_fifo.sv` | UART slot module and its FIFO |
| `rtl/rm_spi.sv` | SPI master slot module |
| `rtl/rm_iic.sv` | I2C master slot module |
| `rtl/pynq_pr_io_top.sv` | top level |
| `tb/axil_bfm.sv` | AXI4-Lite master with `write`/`read` tasks that return response and cycle count |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The package must be
compiled first, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pynq_pr_io_top \
  -Irtl -Itb -y rtl -y tb rtl/pr_pkg.sv tb/tb_pynq_pr_io_top.sv -o sim
obj_dir/sim
```

`tb_pynq_pr_io_top` runs the whole system at its only size. It checks, in order:

1. Decoupled-region and unmapped accesses.
2. GPIO loaded into all six regions, driving every pin group.
3. An output pin wired back to an input pin: each toggle must interrupt the processor with
   vector 2 and 4-cycle latency.
4. rp0 reconfigured to Timer/PWM: the PWM on PmodA pin 1 must have period 16 and high time 4,
   and the timer interrupt must reach the processor.
5. rp0 decoupled while running, then reconfigured back to GPIO, while rp1 keeps its state.
6. The reference system's example program: rp0 loaded with the UART, which sends DE AD BE EF at
   9600 baud. The bytes are decoded on the PmodA TX pin and looped back into RX. Then rp2 is set
   up as GPIO outputs with LED0 on.
7. rp1 reconfigured to the SPI master, with PmodB MOSI wired back to MISO. Three bytes are sent;
   24 SCK edges must appear under SS, and the same bytes must come back.
8. rp5 reconfigured to the I2C master on shield pins 7 and 8, with pull-ups and no device on the
   bus. A START must appear on the pins, and the unanswered address must raise the NACK
   interrupt at the processor with vector 5. The run takes about 0.5 million clock cycles.

It counts each mechanism (SLVERR isolation, DECERR, reconfiguration, interrupt delivery, PWM,
pin groups, UART frames, SPI transfers, I2C transfers) and fails if any of them never happened. The module testbenches check register
behaviour against reference models over random traffic, plus the exact cycle timing listed
above.
