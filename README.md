# UART-to-SPI converter

A PC usually has a UART (serial) port but no SPI bus. This design sits between
the two. It receives characters on an asynchronous serial line and acts as the
master of a synchronous SPI bus with several slaves. Every two characters the
host sends become one SPI word exchange, and the word the slave shifted back
goes to the host as one character.

The design follows the structure in the paper *Optimal Implementation design
and Simulation of UART Serial Communication Module Based on VHDL*. It is a
SystemVerilog design of its own, not the authors' code. The paper describes:

- a UART made of a transmitter, a receiver and control/status registers;
- a UART-to-SPI controller;
- an SPI master.

It also shows simulation waveforms of the transmitter, the receiver and the
parity generator. The paper fixes the structure and the behaviour of the
parts. It gives no clock frequency, bit rate, register map or controller
protocol; those are choices of this design and are listed under
[Own choices](#own-choices-and-departures).

```
            rxd ──►┌──────────────────────── uart ───────────────────────┐
 host (PC)         │ baud_gen ─ rx_tick (16x) / tx_tick (1x)               │
            txd ◄──│ uart_rx: sync ─► RSR ─► RBR ─┐   ┌─ TBR ─► TSR :uart_tx │
                   │ parity_gen (RSR / TBR parity) │   │                       │
                   │ uart_regs: DATA / CONTROL / STATUS, irq                │
                   └──────────────────────────┬────────────────────────────┘
                                              │ byte-wide register bus
                                     ┌────────┴────────┐
                                     │ uart_spi_ctrl   │ cfg_* pins
                                     └────────┬────────┘
                                              │ start / sel / byte / done
                                     ┌────────┴────────┐ sclk, mosi ──►
                                     │ spi_master      │ ◄── miso
                                     └─────────────────┘ ss_n[N_SS-1:0] ──► slaves
```

## What the host sends and gets back

The host talks in pairs of characters:

1. **Select byte.** Its low `log2(N_SS)` bits name the slave (0..3 by
   default). The other bits are ignored.
2. **Data byte.** This byte is sent to that slave in one 8-bit SPI exchange.

While the master shifts the data byte out on MOSI, the slave shifts its own
byte in on MISO. That byte is sent back to the host as one character. There
is one reply per pair and no other framing. If the host and the converter
lose step (for example after a reset on only one side), the host must resync
at a pair boundary.

A character that arrives with a parity error, a framing error or a break is
**dropped**: the `dropped` output pulses and the byte does not count as
either half of a pair. The pair simply continues with the next good byte.

Time from the middle of the stop bit of the data byte to the start bit of the
reply, at the defaults:

- a few bus clocks;
- the SPI exchange, 18·SCK_DIV + 1 = 73 clocks;
- a wait for the next bit-time tick, up to 432 clocks.

That is under 1 bit time plus 150 clocks; the end-to-end test measured at
most 430 clocks. Because a pair takes 20 bit times to arrive and the reply
takes 10 to 12, the converter keeps up with a host that sends pairs back to
back.

## The serial line

Frame: a start bit (0), 5 to 8 data bits LSB first, an optional parity bit,
and one or two stop bits (1). The converter itself always uses 8 data bits,
since each character carries one 8-bit SPI word; shorter characters are for
other uses of the `uart` block. The line idles at 1. With no parity and one stop bit a
character takes exactly 10 bit times, so characters per second = bit rate /
10. The transmitter starts the next frame straight after the stop bit when a
byte is waiting.

| control | meaning |
|---|---|
| `parity_en` | append and check a parity bit |
| `odd_even_parity` | 1 = odd parity, 0 = even parity |
| `two_stop` | the transmitter sends two stop bits (the receiver checks only the first) |
| `char_len` | data bits per character minus 5 (0..3 for 5..8 bits) |

### Transmitter (`uart_tx`)

A byte written to the DATA register goes into the **transmit buffer register
(TBR)**. At the next bit-time tick the transmitter is idle or finishing a
stop bit. The byte then moves into the **transmit shift register (TSR)**
with its frame bits: start, data, parity (worked out by `parity_gen` from the
TBR) and stop. Data bits above the character length are cleared as the
byte enters the TBR, so the parity covers only the bits that are sent. Each
tick shifts the TSR one place onto the line and fills it
with zeros from the top, so the TSR is all zeros once the frame has gone.

The state sequence is IDLE → START → DATA (5 to 8 bit times) → PARITY (only when
enabled) → STOP → STOP2 (only with `two_stop`). When the last stop bit ends
and the TBR is empty, the transmitter reports an **underrun**. That is not a
fault: it only means the line goes idle.

### Receiver (`uart_rx`)

The receiver is the subtle part.

- `rxd` is synchronised with two flip-flops. It is then looked at on every
  `rx_tick`, which runs at 16 times the bit rate.
- A low level starts a candidate start bit. If the line stays low for 8
  consecutive ticks (half a bit), the start bit is accepted: the receiver is
  now in the middle of it. If the line goes high earlier, the pulse was a
  glitch and is ignored.
- From the middle of the start bit, every 16th tick lands in the middle of
  the next bit. Each data bit is written into the **receive shift register
  (RSR)** at its own bit position, LSB first. The parity bit and the stop bit
  follow.
- At the middle of the stop bit the character is complete. It is copied to
  the **receive buffer register (RBR)** and `rx_ready` is set.

Sampling in mid-bit tolerates a few percent of rate mismatch. The receiver
test passes with the sender 3 % fast and 3 % slow.

The receiver detects four conditions. Each is a one-clock event that sets a
sticky status bit:

| condition | detected when |
|---|---|
| parity error | the sampled parity bit differs from the parity of the RSR (`parity_gen`) |
| framing error | the stop bit is sampled as 0 |
| break | framing error **and** every data bit (and the parity bit) was 0, i.e. the line was low for a whole character |
| overrun | a character completes while the RBR still holds an unread one; the new character is lost and the unread one kept |

After a framing error the receiver waits for the line to go high again before
it looks for a new start bit, so a long break gives one event, not a stream
of them. A character with a parity or framing error is still placed in the
RBR; its error bits are visible in STATUS in the same clock as `rx_ready`.
A reader that checks STATUS before DATA therefore always sees the errors of
the byte it is about to read.

## UART register interface (`uart_regs`)

The UART has a byte-wide register bus. Reads are combinational: `rdata` is
valid in the cycle `rd` is high. The side effect of a read takes place at the
clock edge.

| addr | name | access |
|---|---|---|
| 0 | DATA | write: byte into the TBR (ignored while the TBR is full); read: RBR, clears `rx_ready` |
| 1 | CONTROL | read/write; reset value `8'h63` |
| 2 | STATUS | read; writing 1 to an error bit clears it |

CONTROL bits, from bit 0 up: `tx_en`, `rx_en`, `parity_en`,
`odd_even_parity`, `two_stop`, then `char_len` in bits 6:5 (data bits
minus 5, so 3 means 8 bits). Bit 7 is unused.

STATUS bits:

| bit | name | kind |
|---|---|---|
| 0 | TBR empty | live |
| 1 | transmitter busy | live |
| 2 | rx_ready (RBR full) | live |
| 3 | overrun | sticky |
| 4 | framing error | sticky |
| 5 | parity error | sticky |
| 6 | break | sticky |
| 7 | underrun | sticky |

`irq` is high while a character waits or a receive error bit (3..6) is set.
Underrun does not raise `irq`.

## The controller (`uart_spi_ctrl`)

The controller is the only master of the UART bus. After reset it writes
CONTROL from the `cfg_*` pins, with the transmitter and receiver enabled. It
writes CONTROL again whenever those pins change while it is waiting for a
byte. Otherwise it loops through these steps:

1. Poll STATUS.
2. When `rx_ready` is set, read DATA in the next cycle.
3. If the status showed a parity, framing or break error, drop the byte and
   clear those sticky bits.
4. If the byte is the first of a pair, keep it as the slave number.
5. If it is the second, start the SPI exchange and wait for `done`.
6. Poll STATUS until the TBR is empty, then write the reply to DATA.

Overrun and underrun bits are left set; the top-level `irq` therefore stays
high after an overrun until something clears it. An overrun cannot happen
while the controller is running normally. It empties the RBR within one
character time, because a reply is written only once the TBR is empty, and
the TBR frees up faster than pairs arrive.

## The SPI master (`spi_master`)

An exchange runs as follows:

1. On `start`, the master latches the word and the slave number.
2. It pulls that slave's `ss_n` low. Only one select is ever low.
3. It waits half an SCK period.
4. It gives 8 SCK cycles, each half-period `SCK_DIV` system clocks long.
5. It waits another half period.
6. It releases the select and pulses `done`.

`start` to `done` takes 18·SCK_DIV + 1 clocks. SCK rests at `cpol`.

The word leaves MSB first from the top of a shift register while MISO bits
enter at the bottom. The master's and the slave's registers form a ring, so
after 8 cycles they have swapped contents. Modes:

| cpha | MOSI changes | MISO sampled |
|---|---|---|
| 0 | before the first edge, then on trailing edges | leading edges |
| 1 | leading edges | trailing edges |

The leading edge is rising for `cpol = 0` and falling for `cpol = 1`. MISO is
sampled into a flip-flop on the capture edge and shifted in on the next
shifting edge. For `cpha = 1` the last bit is shifted in during the
half-period hold after the last edge.

## Clocking and default parameters

Everything runs on one clock, `clk`. The "receive clock" and "transmit
clock" of a classic UART are one-clock enable pulses from `baud_gen`:

- `rx_tick` comes every `DIV` clocks;
- `tx_tick` comes every 16 `rx_tick`s.

`DIV = round(CLK_HZ / (16·BAUD))`.

| parameter | default | where |
|---|---|---|
| `CLK_HZ` | 50 000 000 | top, `uart`, `baud_gen` |
| `BAUD` | 115 200 (DIV = 27, actual 115 741 baud, +0.47 %) | top, `uart`, `baud_gen` |
| `SCK_DIV` | 4 (SCK = 6.25 MHz) | top, `spi_master` |
| `N_SS` | 4 slaves | top, `spi_master`, `uart_spi_ctrl` |
| data bits | 8 (`uart_pkg::DATA_BITS`) | package |
| oversampling | 16 (`uart_pkg::OVERSAMPLE`) | package |

For another clock or bit rate, set `CLK_HZ` and `BAUD` on `uart_spi_top`.
Keep `CLK_HZ/(16·BAUD)` at 1 or more, and far enough from a fraction that
the rounding error stays within about 2 %.

All flip-flops reset asynchronously on `rst_n` low. `rxd` and `miso` may be
asynchronous to `clk`.

## Own choices and departures

These parts come from the paper:

- the block structure (TBR/TSR, RSR/RBR, control and status registers, the
  three-part converter);
- the zero-filled TSR;
- the transmitter states;
- 16x sampling with a half-bit start check;
- the error conditions;
- the parity generator's ports and odd/even encoding;
- MSB-first ring shifting and the CPOL/CPHA rules.

These are this design's own:

- **Single clock with tick enables** instead of separate receive and transmit
  clocks.
- **Clock frequency, bit rate, SCK rate and number of slaves.** The paper
  states none of them.
- **Register map, bit layout, write-1-to-clear sticky bits and `irq`
  condition.** The paper only names the registers.
- **The two-byte select/data protocol and the controller's polling.** The
  paper names the controller and its purpose but not how it works.
- **Overrun keeps the older character**; a write to a full TBR is ignored.
- **5 to 8 data bits, no 9-bit characters.** The paper mentions 9-bit
  characters only for some UARTs; its own waveforms use 8.
- **No receive FIFO.** The paper mentions one only as a feature of some UARTs.
- **One DATA state with a bit counter.** The paper's transmitter and
  receiver have one state per data bit (data0..data7).
- **The RSR holds only the data bits.** The paper sizes it to hold the
  start and stop bits as well; here the start bit is only checked, the
  parity bit has its own flip-flop, and the stop bit is checked as it is
  sampled.

The paper reports a synthesis result (XC3S500E-4, 167.98 MHz). This design
has about 160 flip-flops and no memories; its timing has not been checked on
an FPGA.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. Build and run one with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_uart_spi_top rtl/uart_pkg.sv tb/tb_uart_spi_top.sv
./obj_dir/Vtb_uart_spi_top
```

| testbench | what it covers |
|---|---|
| `tb_uart_spi_top` | The whole converter at default parameters, against a serial host and four SPI slave models. 41 exchanges over all four SPI modes and all slaves, 8 of them sent back to back; 8N1, even parity, odd parity and two stop bits. Injected parity error, framing error, break and glitch, each counted. Checks reply latency, SPI busy time, that only the addressed slave is selected, and that overrun never occurs. |
| `tb_uart` | The UART through its bus at a reduced bit rate: all frame formats including 5 and 7 bit characters, status, `irq`, error bits, overrun, 16-tick bit time. |
| `tb_uart_tx` | Frames bit by bit, parity, two stop bits, 5 to 8 data bits, 10 and 12 bit times per character back to back, zero-filled TSR, underrun, `tx_en`. |
| `tb_uart_rx` | Data, parity, framing, break, overrun, glitch rejection, ±3 % rate error, 5 to 8 data bits, `rx_en`. |
| `tb_uart_regs` | Register map, sticky bits, write-1-to-clear, `irq`. |
| `tb_spi_master` | All modes × four slaves, exchanged words both ways, SCK half period, start-to-done time; a second instance with 16-bit words. |
| `tb_uart_spi_ctrl` | The controller against modelled UART and SPI: pairing, slave number, reply, dropped bytes, TBR wait, reconfiguration. |
| `tb_parity_gen`, `tb_baud_gen` | Exhaustive parity; tick spacing and the default divisor. |

`tb/spi_slave_model.sv` is a behavioural SPI slave (not synthesizable) used
by the SPI and top-level tests. The `rtl/` files are synthesizable
SystemVerilog-2017. Shared types and the register map are in
`rtl/uart_pkg.sv`.
