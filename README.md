# SPC System FPGA

The SPC board has a Pentium embedded module (CPU, cache, 430HX-class north bridge and DRAM) and a PCI bus. It has no south bridge and none of the chips a PC normally uses for legacy I/O. A PC operating system still expects those devices at their usual I/O ports: an 8259 interrupt controller, an 8254 timer, the CMOS clock registers, port 0CF9h reset control and a boot ROM at the reset vector. NetBSD is the system this design targets.

The System FPGA provides them. It is a single PCI target clocked by the 33 MHz PCI clock. It implements only as much of each legacy device as NetBSD uses during start-up and normal running. It also:

- runs the bus of an external dual UART (COM1/COM2);
- generates the board's resets from PWROK;
- loads the bitstream of a second, experimental FPGA in slave-serial mode.

```
            PCI bus (AD, C/BE#, FRAME#, IRDY#, TRDY#, DEVSEL#, STOP#, PAR, PERR#, IDSEL)
                 |
            +----------+   request / response (one access at a time)
            | pci_slave|<---------------------------+
            +----------+                            |
                 |                          +------------------+      UART bus
                 +------------------------->| register_manager |----> uart_if ----> dual UART
                                            +------------------+
               sel / dir / addr / wdata, rdata |  |  |  |  |  |
        +-------------------+  +--------------+  |  |  |  +-----------+
        | interrupt_control |  | timer_control |  |  |  | config_ctl | --> experimental FPGA
        |  2 x pic, NMI     |  |  clk_divider  |  |  |  +-----------+
        +-------------------+  +--------------+  |  |
           INTR, NMI   ^ IRQ0 (timer)            |  +-----------+
                       |                 +-------------------+ +----------+
           COM1, COM2, APIC, SERR#       | real_time_control | | bios_ctl |
                                         +-------------------+ +----------+
        reset_ctl: PWROK, 0CF9h  -> CPURST, PCIRST#, INIT, internal reset of all blocks
```

The top module is `spc_system_fpga`. Everything runs on one clock, the PCI clock. The internal synchronous reset comes from `reset_ctl`. Bidirectional pins are split into `_i`, `_o` and `_oe` signals, and the tristate pads belong outside the module.

## How an access travels

1. **PCI target (`pci_slave`).** The target claims:
   - configuration cycles (when IDSEL is high);
   - I/O cycles to the ports in the map below;
   - memory cycles in the boot-ROM windows and in the 16-byte window of its memory BAR;
   - interrupt-acknowledge cycles.

   DEVSEL# uses medium timing, on the second clock after the address phase. Configuration space is answered locally. Every other access becomes one request to the register manager, and TRDY# is given once the reply arrives.

   A transaction gets exactly one data phase. If FRAME# is still low when TRDY# is given (a burst), STOP# goes low with TRDY#. The master therefore receives its first word and then retries the rest. The target also:
   - drives PAR on reads, one clock after the data;
   - checks PAR on writes, setting status bit 15 and pulsing PERR# when parity-error response is on.
2. **Register manager (`register_manager`).**
   - **Decode.** It decodes the address to a block and runs a short internal cycle: accept, one *select* clock, respond. In the select clock the chosen block sees `sel`, `dir`, a small block-local address and the write byte, and its `rdata` answers combinationally. A write takes effect on the clock edge that ends the select clock. An internal access therefore adds two clocks to the PCI transaction.
   - **UART accesses.** These go to `uart_if`, which runs an external bus cycle: address setup, read or write strobe, hold. That cycle takes five clocks with the default phase lengths, and the PCI master sees the extra wait states.
   - **I/O width.** Accesses are byte-wide. The lowest enabled byte lane selects the port, and the read byte is returned in that lane.
   - **Interrupt acknowledge.** An acknowledge cycle sends one INTA pulse to the master interrupt controller and returns its vector in byte 0.
3. **Blocks.** Each block is a plain register file with side effects. It has no handshake of its own.

### Address map

| Space | Address | Block |
|---|---|---|
| I/O | 020h, 021h | master interrupt controller |
| I/O | 0A0h, 0A1h | slave interrupt controller (registers only) |
| I/O | 040h, 043h | timer counter 0, control word |
| I/O | 061h | NMI status and control |
| I/O | 04D0h, 04D1h | edge/level control (read/write storage; requests are always level-sensitive) |
| I/O | 070h (write: bit 7 NMI mask, bits 6:0 RTC index), 071h | RTC / NVRAM |
| I/O | 3F8h–3FFh, 2F8h–2FFh | COM1, COM2 on the external UART |
| I/O | 0CF9h | reset control |
| I/O | 0D00h, 0D04h, 0D08h | experimental FPGA configuration: start, data, status |
| Memory | 000E0000h–000FFFFFh and FFFE0000h–FFFFFFFFh | boot ROM (64 KB, read-only) |
| Memory | memory BAR + 0, + 4 | boot mailbox: POST result, boot DONE |
| Config | 00h–0Bh, 10h, 14h, 60h–63h | ID, command/status, class 060100h (PCI-to-ISA bridge), two BARs, PIRQ routing |

The PIRQ route registers are read-only:

- PIRQA reads 05h, which means routed to IRQ5.
- PIRQB, PIRQC and PIRQD read 80h, which means disabled.

The memory BAR (10h) implements 16 bytes, because its bits 31:4 are writable. Once it is non-zero, the target claims that window for the boot mailbox. The I/O BAR (14h) can be written and read back, but the legacy ports above are always decoded at their fixed addresses.

## Interrupts (`interrupt_control`, `pic`)

Two copies of the `pic` module form the familiar master/slave pair. Only the master has request inputs:

| Input | Source |
|---|---|
| IR0 | timer |
| IR2 | cascade from the slave |
| IR3 | COM2 |
| IR4 | COM1 |
| IR5 | PIRQA# from the APIC |

The slave is there because the operating system initialises and reads back both controllers; its request inputs are tied low.

Each `pic` supports the following:

- **Initialisation.** The ICW1–ICW4 sequence. ICW1 clears the mask, the in-service register and any special modes.
- **Requests.** Level-sensitive request inputs, each behind a two-flop synchronizer. A request stays latched in IRR while it is masked; the mask acts on the IRR outputs.
- **Priority.** Fully nested priority, with the lowest level set by OCW2 "set priority". Writing C2h gives the order 3–7, 0–2, which NetBSD uses so that the serial ports outrank the timer.
- **End of interrupt.** Non-specific and specific EOI, plus automatic EOI (ICW4 bit 1).
- **Special mask mode.** OCW3 with ESMM and SMM. In this mode an in-service level blocks only itself, so lower levels can interrupt a handler that has masked its own level.
- **Read-back.** IRR/ISR read select through OCW3.

An interrupt is delivered in four steps:

1. INTR rises when an unmasked request outranks everything in service.
2. The first acknowledge cycle moves the request from IRR to ISR.
3. The second acknowledge returns `vector_base | level`. Vector base 20h with IR0 gives 20h.
4. With automatic EOI, the second acknowledge also clears ISR.

The IRR is frozen between the two acknowledges, so the vector cannot change halfway.

Ports 04D0h and 04D1h hold the edge/level control bytes of the master and slave. Software can write them and read them back, and reset clears them. They do not change behaviour, because the controllers always treat requests as levels.

**NMI.**

- SERR# sets bit 7 of port 061h.
- Writing bit 2 = 1 to 061h clears that bit and disables the source.
- Bit 7 of a write to 070h masks NMI; it is set after reset.
- NMI = status AND NOT mask, registered. The handler's usual sequence of masking and then unmasking produces a fresh rising edge on NMI if the source is still active.

## Timer and the 1.19318 MHz tick (`timer_control`, `clk_divider`)

Only counter 0 is built, and only in mode 2 (rate generator), binary. That is all the operating system needs for its periodic clock interrupt.

- **Loading.** A control word with bits 5:4 ≠ 00 selects the read/write format and stops the counter. Writing the count then loads the counter on the next tick. A count of 0 means 65536.
- **Counting.** Every tick the counter decrements. When it goes from 2 to 1 the interrupt request (IRQ0) pulses for one PCI clock, and the counter reloads the initial count.
- **Latch command.** Control word bits 5:4 = 00 freeze a copy of the count until both of its bytes have been read.

The PC timer clock is 1.193182 MHz, but the board only has 33 MHz. 33 / 1.193182 = 27.657, so the tick has to be an enable that comes every 27 or 28 PCI clocks. `clk_divider` counts in cycles of three ticks: 35 cycles, numbered 0 to 34.

- An ordinary cycle divides by 27, 28, 28, which is 83 clocks.
- Cycle 34 divides by 27, 27, 28, which is 82 clocks.

Over one period that gives 105 ticks in 34 × 83 + 82 = 2904 clocks. 33 MHz × 105 / 2904 = 1.193182 MHz, which is exact to the precision of the PC clock. All six numbers (27, 28, 3, 35, which cycle is short, and which tick in it) are parameters of `clk_divider`.

## RTC and NVRAM (`real_time_control`)

There is no running clock. NetBSD reads the calendar once at start-up and keeps time from timer interrupts, so the block simply holds the registers.

| Index | Contents |
|---|---|
| 00h, 02h, 04h, 06h–09h | seconds, minutes, hours, day of week, date, month, year: read/write |
| 0Ah | register A: bit 7 (update in progress) reads 0 |
| 0Bh | register B: resets to 06h (binary, 24-hour), bit 1 forced to 1 |
| 0Ch | reads 00h |
| 0Dh | reads 80h (battery good) |
| 0Eh | diagnostic status: 08h |
| 0Fh | shutdown status: read/write |
| 10h, 12h, 14h | no floppy, no hard disk, no devices: 00h |
| 15h/16h | base memory: 640 KB |
| 17h/18h | extended memory in KB, from the MEMSIZE pins |
| 32h | century: 19 |

The MEMSIZE pins select 16, 32, 64 or 128 MB. For the first three the extended memory field reads 15360, 31744 or 64512 KB. At 128 MB it saturates at FFFFh, because the field is only 16 bits.

The index register is 7 bits wide. It lives in the register manager, which shares port 070h with the NMI mask.

## Boot ROM (`bios_ctl`)

The ROM is 64 KB, organised as 32-bit words. It answers in both memory windows.

With no contents file (parameter `INIT_FILE`), the ROM holds FFh everywhere except the reset vector at offset FFF0h. There it holds the far jump `EA 00 E0 00 F0` (JMP F000:E000), which is where the real boot code is meant to live. That code is to copy itself into shadow RAM, check memory and jump into the operating system's loader. It is not part of this design: supply it as a hex file through `INIT_FILE`.

## Boot mailbox (`boot_mailbox`)

The board boots over the network:

1. The BIOS tests memory and writes the result to the **POST result** register (mailbox offset 0).
2. It then spins in a loop, polling **boot DONE** (offset 4), which reset clears.
3. Meanwhile a remote control processor works through the APIC, a PCI master. It fetches the POST result, streams the operating-system image into DRAM and finally writes a non-zero value to boot DONE.
4. The BIOS loop sees the non-zero value and jumps to the loaded code.

Both registers are 32-bit read/write registers with byte enables. They sit behind the memory BAR, so both the CPU and the APIC can reach them.

## Resets (`reset_ctl`)

- **Power-on.** While PWROK is low, and for 33000 clocks (1 ms) after it rises, CPURST is high and PCIRST# and the internal reset are low. PWROK passes through a two-flop synchronizer. At power-up the flip-flops start in the reset state.
- **Register 0CF9h.** Bit 1 is SRST and can be read and written. Bit 2 is RCPU and always reads 0, so every write with bit 2 = 1 is a 0→1 transition:
  - **SRST = 1:** hard reset. The same 33000-clock pulse starts 8 clocks after the write, so that the PCI write itself can complete.
  - **SRST = 0:** soft reset. INIT is raised for two clocks and nothing else is reset.

## External UART (`uart_if`)

The block controls the UART bus, shown in the timing list below:

- It drives `uart_cs` (active low) and `uart_chsl` (1 = COM1).
- It puts a 3-bit register address on `uart_addr`.
- It strobes `uart_rd_l` or `uart_wr_l`.
- It ties the chip's master reset `uart_mr` to the internal reset.

Timing with the default parameters:

| Phase | Length | What happens |
|---|---|---|
| Setup | 1 clock | address and chip select |
| Strobe | 2 clocks | read data sampled on the last strobe clock |
| Hold | 1 clock | |

`done` follows, five clocks after `start`.

## Experimental FPGA configuration (`config_ctl`)

| Register | Function |
|---|---|
| 0D00h bit 0 | drives PROGRAM; keep it set for the whole load |
| 0D04h | takes one byte, shifted out MSB first on DIN, with CCLK at a quarter of the PCI clock |
| 0D08h | status: bit 2 is 1 while a byte is shifting (poll until 0 before writing the next byte); bit 1 is 0 after INIT dropped during a shift (write 1 to clear); bit 0 is 0 once DONE is high |

Once DONE is seen, LOCK is raised and further data writes are ignored. Clearing bit 0 of 0D00h releases it.

## Where the design makes its own choices

The specification leaves some points open and contradicts itself on others. This RTL settles them as follows:

- **PCI identity.** Vendor ID, device ID and revision are placeholders (0001h, 0001h, 00h) and are parameters of `pci_slave`.
- **PCI timing.**
  - DEVSEL# timing is medium, matching the status register's default.
  - Bursts are disconnected after the first data phase.
  - Special (shutdown) cycles are not claimed.
  - Command bit 9 (fast back-to-back enable) reads 0, like status bit 7, since the function is not provided.
- **PIRQ routing.** PIRQB–D read 80h, which is consistent with their bit definitions ("disabled").
- **Interrupts.**
  - Special mask mode is supported because the operating system uses it.
  - COM1 is on IR4 and COM2 on IR3, as on PCs.
  - The mask gates IRR outputs instead of stopping IRR from latching.
- **Timer.** The interrupt pulse is one PCI clock wide.
- **RTC.** Hours are at index 04h, as in the PC layout, and register A's update flag always reads 0.
- **Boot ROM.** The reset-vector jump uses the far-jump opcode EAh. The 64 KB ROM appears in both windows.
- **UART bus.**
  - The phase lengths are chosen by this design.
  - The address bus is 3 bits wide, enough for eight registers per channel.
- **Configuration port.** The register bit polarities follow the register tables. The start bit is bit 0, and the data port is one byte wide.
- **Unused pins.** IGNNE#, SMI# and STPCLK# are held inactive. A20M#, LOCK#, FERR#, the experimental FPGA's interrupt and the UART's TXRDY are not connected, because no function uses them.

## Not included

- The boot ROM's program.
- Every other legacy device (DMA, keyboard, floppy and so on).
- Timer counters 1 and 2, and all timer modes other than 2.
- The interrupt controller's rotation, poll and edge-triggered modes.
- A running real-time clock.

The CPU, north bridge, DRAM, APIC, UART chip and experimental FPGA are external parts. Their signals appear as ports of `spc_system_fpga`.

## Simulating

Every file in `rtl/` is one module or package. `spc_pkg.sv` holds the port numbers, the request struct and the decode functions, and it must be compiled first. Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/spc_pkg.sv tb/tb_spc_system_fpga.sv --top-module tb_spc_system_fpga
./obj_dir/Vtb_spc_system_fpga
```

| Testbench | What it checks |
|---|---|
| `tb_clk_divider` | the exact 27/28 tick pattern over several 2904-clock periods |
| `tb_timer_control` | count loading, the interrupt period and pulse, the latch command |
| `tb_interrupt_control` | initialisation, priority, EOI/AEOI, special mask mode, vectors, NMI, edge/level registers |
| `tb_real_time_control` | read/write registers, constants, memory size for every MEMSIZE |
| `tb_bios_ctl` | the reset vector and the blank ROM |
| `tb_boot_mailbox` | reset values, byte-enable merging against a model, ignored unselected writes |
| `tb_reset_ctl` | reset lengths and soft and hard reset from 0CF9h; runs with a 100-clock reset for speed |
| `tb_uart_if` | strobe timing and read sampling |
| `tb_config_ctl` | bit order, CCLK phases, busy/error/done, lock |
| `tb_register_manager` | decode, lanes, RTC index sharing, UART wait |
| `tb_pci_slave` | configuration space, DEVSEL#/TRDY# timing, disconnect, parity and PERR# |
| `tb_spc_system_fpga` | the whole FPGA at its default parameters, through a PCI master model |

`tb_spc_system_fpga` walks through a full bring-up:

1. power-on reset;
2. fetch of the reset vector;
3. the boot-mailbox handshake through the memory BAR;
4. interrupt-controller set-up in NetBSD's order, including the edge/level registers;
5. a 50-count timer giving periodic IRQ0 with its acknowledge cycles;
6. latch reads;
7. RTC and NVRAM accesses;
8. UART accesses with wait states;
9. APIC and COM interrupts with nesting, special mask mode and the 3–7,0–2 priority order;
10. NMI from SERR#;
11. loading a configuration byte;
12. a disconnected burst;
13. soft reset;
14. hard reset.

It counts each of these mechanisms and fails if any of them never happened. It takes about 20 seconds.
