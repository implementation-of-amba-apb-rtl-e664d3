# APB peripheral subsystem: keypad, timer, seven-segment display and UART

A small FPGA subsystem built around the AMBA 2.0 Advanced Peripheral Bus
(APB). One APB master, the *APB controller*, takes a request from a host on
plain pins and runs it as an APB transfer. An *address decoder* routes the
transfer to one of four low-bandwidth slaves:

| select | slave                 | outside connection            |
|--------|-----------------------|-------------------------------|
| psel1  | keypad decoder        | keypad lines C1..C3, R1..R4   |
| psel2  | timer                 | none                          |
| psel3  | seven segment decoder | segment pins `seg[6:0]`       |
| psel4  | UART                  | serial pins `uart_txd/rxd`    |

A *clock divider* sets the pace of the timer and the UART. Everything is
8 bits wide: 8-bit address, 8-bit write data and 8-bit read data.

```
 host pins ──► apb_controller ──psel,penable,bus_req──► apb_addr_decoder ──psel1..4──► slaves
 (pwrite,         ▲   │                                      ▲
  paddr,          │   └──► prdata (pin)                      │ prdata of each slave
  pwdata)         └──────────── prdata_bus (read mux) ◄──────┘
 clock_divider ──tick──► apb_timer, uart_apb (uart_tx + uart_rx)
```

The block set, the four select lines and the pin list (`sys_clk`,
`preset_n`, `pwrite`, `C1..C3`, `R1..R4`, `paddr[7:0]`, `pwdata[7:0]`,
`prdata[7:0]`) follow the published description of this subsystem. That
description names the peripherals but does not describe how they work. The
following are all this implementation's own choices:

- the address map and the register layouts;
- the rule for when the controller starts a transfer;
- the keypad coding;
- the timer's behaviour;
- the UART frame format;
- the three added pins `seg`, `uart_txd` and `uart_rxd`.

There is no AHB-to-APB bridge. The host drives the APB controller directly
through the pins, which makes the controller the only master on the bus. The
divided clock is not used as a clock either: it is a clock enable (see
*Clock divider* below).

## How a host pin request becomes a bus transfer

This is the least obvious part of the design. The pin list has no "go"
strobe: the host only presents `pwrite`, `paddr` and `pwdata`. The
controller (`rtl/apb_controller.sv`) therefore decides for itself when a
transfer is due:

- **Reads repeat continuously.** While `pwrite = 0`, the controller reads
  `paddr` over and over, back to back. So `prdata` always shows the live
  register: the key being pressed, the timer count, the UART flags.
- **A write happens once per change.** A write request is carried out once.
  It is carried out again only after `{pwrite, paddr, pwdata}` has changed,
  which includes going through a read. So a byte written to the UART is
  sent once, however long the pins are held. The host must change the three
  pins together, in one `sys_clk` cycle. If it changes them one at a time,
  each intermediate combination becomes a write of its own.
- **A write must be held for at least two cycles.** If a repeated read is in
  its SETUP cycle when the write request appears, the controller latches the
  request one cycle later. A write request that is gone after one cycle may
  never be carried out.

Each transfer follows the AMBA 2.0 APB sequence. There is no `pready` in
this APB version, so no slave can add wait states.

```
rising edge          e1       e2       e3       e4
host pins   ─< new request >──────────────────────────────
state         IDLE   │ SETUP  │ ACCESS │ SETUP  │ ACCESS   (SETUP again only if a transfer is due)
psel          0      │ 1      │ 1      │ 1      │ 1
penable       0      │ 0      │ 1      │ 0      │ 1
                                       ▲ e3 ends ACCESS: a write lands in the slave,
                                         a read's data is registered on prdata
```

- A write lands in the slave on the third rising edge after the host
  changes the pins, or on the fourth if a read was in its SETUP cycle then.
- A read value reaches `prdata` on the third or fourth rising edge after
  the pins change, depending on where the repeating read loop was.
- `prdata` keeps the value of the last read, including across writes.

Assertions in the controller check three APB rules:

- `penable` only follows a SETUP cycle;
- the bus request stays stable during ACCESS;
- ACCESS lasts exactly one cycle.

## Address map and registers

The slave is chosen by `paddr[7:4]` and the register by `paddr[3:0]`.
Addresses `0x40` to `0xFF` select no slave and read as 0. All constants are
in `rtl/apb_pkg.sv`.

| address | register | access | contents |
|---------|----------|--------|----------|
| 0x00 | KEY     | R   | `[7]` a key is pressed now, `[3:0]` code of the last key pressed |
| 0x01 | COUNT   | R   | number of presses since reset (mod 256) |
| 0x10 | CTRL    | R/W | `[0]` enable, `[1]` auto-reload |
| 0x11 | LOAD    | R/W | reload value; writing it also loads the count |
| 0x12 | COUNT   | R   | current count |
| 0x13 | STATUS  | R/W1C | `[0]` expired |
| 0x20 | DIGIT   | R/W | `[3:0]` hex digit shown |
| 0x21 | SEG     | R   | `[6:0]` segment drive, bit 0 = a … bit 6 = g |
| 0x30 | TXDATA  | R/W | write: send this byte; read: last byte written |
| 0x31 | RXDATA  | R   | last byte received |
| 0x32 | STATUS  | R/W1C | `[0]` tx busy (R), `[1]` rx ready, `[2]` frame error, `[3]` rx overrun, `[4]` tx byte dropped |

Reads have no side effects, because the controller repeats them. Each flag
is cleared by writing 1 to its bit (W1C).

## The peripherals

**Keypad decoder** (`keypad_decoder.sv`):

- It reads a 3-column × 4-row keypad. All seven lines are inputs, so the
  decoder does not scan the matrix; it reads which row and which column are
  active.
- Lines are taken as active high. A key is pressed when exactly one row and
  exactly one column are high; any other state means no key.
- Codes follow a telephone pad: `1 2 3 / 4 5 6 / 7 8 9 / * 0 #`, with
  `*` = 0xA and `#` = 0xB.
- The lines pass a two-flop synchronizer. A press shows in KEY three cycles
  after the lines change.
- Holding a key counts as one press. There is no debouncing: a bouncing
  mechanical key will count several presses.

**Timer** (`apb_timer.sv`):

- An 8-bit down-counter that decrements on each divider tick while enabled.
- When it steps from 1 to 0, the expired flag is set.
- With auto-reload, it reloads from LOAD and expires every LOAD ticks.
  Without auto-reload, it stops at 0.
- Its `irq` output (the expired flag) has no pin at the top level.

**Seven segment decoder** (`seven_seg_decoder.sv`):

- It holds a 4-bit digit and drives segments a..g, active high, for a
  common-cathode display.
- It shows 0–9 and A b C d E F.
- `seg` changes at the clock edge that ends the write's ACCESS cycle.

**UART** (`uart_apb.sv` wrapping `uart_tx.sv` and `uart_rx.sv`):

- Frame format is 8N1: one start bit, 8 data bits sent LSB first, one stop
  bit.
- Each bit lasts 16 divider ticks.
- The receiver synchronises `rxd` and checks the start bit again at its
  middle, so a short glitch does not start a frame. It then samples each bit
  in its middle and reports a low stop bit as a frame error.
- A byte written while the transmitter is busy is dropped and flagged.
- A byte that arrives while rx ready is still set replaces the old one and
  sets rx overrun.

**Clock divider** (`clock_divider.sv`):

- It makes a one-cycle `tick` every `CLK_DIV` cycles of `sys_clk`.
- The tick is used as a clock enable. All flip-flops stay on `sys_clk`, so
  there is a single clock domain; this is a departure from a divided clock.
- The default `CLK_DIV = 326` gives 16 ticks per bit at 9600 baud from a
  50 MHz clock. At that setting:
  - one UART byte takes 10 × 16 × 326 = 52,160 cycles;
  - one timer tick is 6.52 µs.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `apb_system` | `CLK_DIV` | 326 | `sys_clk` cycles per tick |
| `clock_divider` | `DIV` | 326 | same, at the divider |
| `uart_apb`, `uart_tx`, `uart_rx` | `OVS` | 16 | ticks per UART bit |

The source names no clock frequency, divide ratio or baud rate. Change
`CLK_DIV` to suit the board clock:
`CLK_DIV = f_clk / (16 × baud)`.

## Reset

`preset_n` is active low and asynchronous. It clears every register:

- the bus is idle and `prdata` is 0;
- the timer is disabled;
- the digit is 0;
- the UART is idle with `txd` high.

After reset, the controller treats whatever the pins show as a new request.
If `pwrite` is high at that moment, that write is carried out once.

## Files

`rtl/` holds one module or package per file:

- `apb_system.sv` is the top.
- `apb_pkg.sv` holds the shared request struct (`apb_req_t`), the widths,
  the address map and the register offsets.

`tb/` holds the testbenches:

- Each block has a self-checking testbench `tb_<module>.sv`. It prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb_apb_system.sv` drives the whole subsystem end to end at the default
  parameters. It acts as the host, presses keys and loops `uart_txd` back to
  `uart_rxd`. It covers:
  - the two-cycle write and the write-once rule;
  - keypad codes and the press count;
  - the display;
  - the timer expiry, and an auto-reload period of exactly 3 × 326 cycles;
  - a UART byte looped back within 9–10 bit times;
  - an unmapped read.

  It also counts how often each mechanism occurred: writes, reads,
  back-to-back transfers, each select line, unmapped transfers, divider
  ticks, timer expiries, display updates, UART sends and receives. A
  mechanism that never occurred counts as a failure. The counts come from
  monitors (`tb_bus_monitor.sv`, `tb_event_monitor.sv`, with counters in
  `tb_sys_counters.sv`) that are `bind`-ed into the blocks.
- `tb_apb_system_random.sv` sends 3,000 random host requests through the
  whole subsystem. The requests are writes and reads of the display, timer
  and unmapped registers, held for 2 to 6 cycles. A reference model in the
  testbench predicts every read and the segment pins.

## Simulating with Verilator

From the folder that holds `rtl/` and `tb/`:

```sh
# one block, e.g. the UART registers
verilator --binary --timing --assert -y rtl -y tb \
    rtl/apb_pkg.sv tb/tb_uart_apb.sv --top-module tb_uart_apb
./obj_dir/Vtb_uart_apb

# the whole subsystem, end to end (about 60,000 clock cycles)
verilator --binary --timing --assert -y rtl -y tb \
    rtl/apb_pkg.sv tb/tb_sys_counters.sv tb/tb_apb_system.sv --top-module tb_apb_system
./obj_dir/Vtb_apb_system
```

To lint the RTL:

```sh
verilator --lint-only -Wall -Wno-fatal -y rtl rtl/apb_pkg.sv rtl/apb_system.sv
```

Lint reports one warning, and it is harmless. `SYNCASYNCNET` appears
because `preset_n` is used both as the asynchronous reset and in the
assertions' `disable iff`. Linting a single block on its own also reports
the package constants that block does not use.

## How far to trust it

Every block passes its own testbench, and the full subsystem passes the
end-to-end test at its default parameters.

Each testbench was also shown to catch a deliberate bug in its block. The
bugs tried were:

- a double write;
- a wrong address slice in the decoder;
- a divider off by one;
- swapped `*`/`#` codes;
- a timer expiring one tick early;
- a wrong segment;
- UART data sent MSB first;
- no start-glitch rejection;
- a missing dropped-byte flag;
- a miswired select line.

Some things have not been checked:

- real hardware timing;
- behaviour with host pins that change asynchronously to `sys_clk`;
- mechanical keypad bounce.

The published description reports FPGA implementation but gives no device,
resource counts or clock rate, so none of those could be compared.
