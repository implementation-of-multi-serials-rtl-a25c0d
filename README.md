# Sixteen serial ports over one Ethernet link

This is the FPGA logic of a serial-to-Ethernet gateway. It was designed for a
ground station that talks to many serial (RS232) units. Without it, every unit
needs its own port on a multi-port serial card, and every character interrupts
the host CPU. The gateway takes 16 asynchronous serial lines and collects what
they receive into Ethernet frames. It spreads the data of frames coming from
Ethernet back over the lines. The host then deals with one network link, and
with a few frames per second instead of thousands of characters.

The FPGA holds 16 UARTs, a frame packer, a frame unpacker, and a driver for an
RTL8019AS Ethernet controller, which sits on an ISA-style bus. The controller
chip, the RS232 level converters (SP208E, four channels each) and the clock PLL
are outside the FPGA and outside this RTL.

```
 rxd[0..15] --> serial_port x16 --(receive buffers)--> frame_packer --(frame buffer)--+
 txd[0..15] <--  uart_rx/uart_tx  <-(transmit buffers)- frame_unpacker <--(payload)-+ |
                 port_ctrl, 2 x io_buffer                                           | |
                                                              nic_driver <----------+-+
                                                              isa_master
                                                                   |
                                          SA[15:0], SD[7:0], IORB, IOWB
                                                                   |
                                                             RTL8019AS -- RJ45
```

Everything runs on one clock, `clk`, which is 19.2 MHz in the intended system
(a PLL makes it from a 40.6 MHz crystal). `rst_n` is an asynchronous,
active-low reset.

## What travels in a frame

Every piece of port data, in both directions, is carried as a **record**:

```
FF  EE  port  n  d0 d1 ... d(n-1)
```

`FF EE` are the sync heads that mark the start of each record. `port` is the
port number (0..15), and `n` is the number of data bytes (1..255). A frame the
gateway sends looks like this:

```
dst MAC (6) | src MAC (6) | type 0x0800 (2) | record | record | ... | zero padding to 60 bytes
```

There is one record for each port that holds data, in port order. A received
frame must have type 0x0800 (IP) and hold records in the same layout right after
the 14-byte Ethernet header. Parsing stops at the first byte that is not a sync
head where one is due, so the padding and the CRC are skipped. Records for
ports 16 and above are read and dropped.

The sync heads follow the original design. It never gave the layout around
them, so the `port` and `n` bytes, the type value and the MAC addresses are this
design's choices:

- the source MAC is `MAC` (default 02:00:00:00:00:01);
- the destination is `HOST_MAC` (default broadcast).

Note that type 0x0800 is used although the payload has no IP header. This was
done so that the receive filter, which accepts only ARP and IP frames, also
accepts the gateway's own format.

On the serial side, the unpacker writes `FF EE` into the port's transmit buffer
ahead of the data. A device therefore receives the sync heads followed by the
data bytes.

## When data is sent: blocks of 10 and the 100 ms tick

Sending every character in its own frame would defeat the purpose, so data is
sent in batches. Two things start a frame:

- **A full block.** Each port's control module counts correctly received
  characters. When the count reaches the block size (register, default 10),
  `block_ready` rises, and the packer starts a frame at once.
- **The period timer.** Every `PACK_PERIOD` cycles (1,920,000 = 100 ms at
  19.2 MHz), a free-running timer fires. If any port holds data, a frame starts.
  This bounds the delay of a port that receives only a few characters.

Either way, the frame takes **all** ports' data, not just that of the port that
triggered it. For each port, the packer takes the buffer's fill level when it
reaches that port. It writes one byte per cycle into a 1536-byte frame buffer,
clears that port's block counter, pads the frame to 60 bytes and offers it to
the driver. The frame buffer keeps the frame until the driver is done. This lets
a failed send be repeated from the start.

The events `pack_block` and `pack_timer` show which cause started each frame.

## Driving the RTL8019AS

The controller is register-compatible with the NE2000. It has 16 KB of buffer
RAM in 256-byte pages 0x40..0x7f. The driver reaches it only through single
8-bit I/O accesses: `isa_master` drives `SA = IO_BASE + offset` (`IO_BASE`
default 0x300). It then holds `IORB` or `IOWB` low for 4 cycles (208 ns),
between one cycle of set-up and one cycle of hold. Each access takes about 7
clock cycles.

### Initialisation

After reset, the driver writes these values in this order:

| offset | value | meaning |
|---|---|---|
| CR 00 | 0x21 | page 0, stopped |
| 01 PSTART | 0x4c | receive ring starts at page 0x4c |
| 02 PSTOP | 0x80 | ... and ends before page 0x80 |
| 03 BNRY | 0x4c | read boundary |
| 04 TPSR | 0x45 | transmit page |
| 0c RCR | 0xcc | receive configuration |
| 0d TCR | 0xe0 | transmit configuration |
| 0e DCR | 0xc8 | data configuration |
| 0f IMR | 0x00 | all interrupts masked; the driver polls |
| CR 00 | 0x61 | page 1, stopped |
| 01..06 PAR | `MAC` | station address |
| 07 CURR | 0x4d | write pointer |
| CR 00 | 0x22 | page 0, started |

`init_done` rises after the last write. The page-1 switch and the station
address are this design's additions. CURR and PAR live on page 1, which must be
selected before they can be written.

### The command register

The bits of CR are `PS1 PS0 RD2 RD1 RD0 TXP STA STP` (type `cr_t` in
`gateway_pkg`). PS selects the register page. RD selects the remote DMA command:
001 read, 010 write, 100 complete/abort. TXP starts a transmission and reads 1
until the transmission ends.

### Main loop

When the packer offers a frame, the driver sends it. Otherwise it polls for
received packets, one poll after another.

**Receive (polling).** The driver goes through these steps:

1. Read BNRY (page 0) and CURR (page 1). If the page after BNRY, wrapping from
   0x7f to 0x4c, equals CURR, the ring is empty ("BNRY = CURR − 1").
2. Otherwise, remote-DMA-read 18 bytes from that page. The first 4 are the
   controller's header: receive status RSR, next-packet page, and byte count
   (low, high). The remaining 14 are the Ethernet header.
3. Check the header:
   - RSR ≠ 0x01 is a receive error (`rx_error`).
   - Type 0x0800 goes on. Remote-DMA-read the payload, which is the byte count
     minus 18 (14 header bytes and the 4 CRC bytes the count includes). Stream
     it byte by byte to the unpacker, with back-pressure (`rx_frame`).
   - Type 0x0806 (ARP) and everything else is released unread (`rx_other`).
     There is no ARP reply.
4. Write BNRY = next-packet page − 1 (wrapping), which hands the space back to
   the controller. This is also done after a receive error, so that a bad packet
   cannot block the ring.

**Send.** The driver goes through these steps:

1. Remote-DMA-write the frame from the frame buffer into one of two transmit
   buffers in the controller: page 0x45 or page 0x40. `txd_buffer_select`
   chooses the buffer and flips after every good send.
2. Write TPSR and TBCR, then CR = 0x26 (transmit). The controller's local DMA
   puts the frame on the wire.
3. Poll CR until TXP clears, then read TSR.
   - TSR = 0x01 is success (`tx_ok`).
   - Anything else is a failure (`tx_retry`). The whole send, remote DMA
     included, is repeated, up to 6 times. After the sixth repeat fails, the
     frame is dropped (`tx_fail`) and its data is lost.

The original flow draws the TSR check before the "local DMA send" box. Here, the
transmit command comes first and TSR is read after it, because TSR only
describes a transmission that has finished.

## A serial port

Each `serial_port` contains these parts:

- a control module, `port_ctrl`;
- a receiver, `uart_rx`;
- a transmitter, `uart_tx`, with its baud divider `baud_gen`;
- a 64-byte receive FIFO and a 64-byte transmit FIFO, both `io_buffer`.

The line format is 8 data bits, LSB first, no parity and one stop bit.

**Baud rate.** The baud register holds clock cycles per bit: 1000 gives 19200
bit/s at 19.2 MHz. `baud_gen` counts to the register value and restarts. Its
`baud_clk` output is high for the first half of the count and low for the
second, which gives a 50 % duty cycle. Its `tick` output marks the end of each
period. The receiver uses the same register with its own counter, because it
must line up with the start edge of each character.

**Receiver.** The states are IDLE → START_CHK → SAMPLE → STOP_CHK → DATA_OK:

- IDLE waits for the line to go low.
- START_CHK waits half a bit time. If the line is back high, the start bit was
  invalid (`err_start`) and the receiver returns to IDLE.
- SAMPLE samples eight bits, one bit time apart.
- STOP_CHK samples the stop bit. If it is low, the stop bit is invalid
  (`err_stop`) and the character is dropped.
- DATA_OK passes the byte on for one cycle.

`valid` comes 9.5 bit times after the start edge, plus 2 cycles of
synchronisation. After an invalid stop bit the line is usually still low, so
the receiver briefly sees a start bit that then proves invalid.

**Transmitter.** The states are IDLE → SHIFT → STOP:

- When the send hold register is full, the byte moves into the shift register.
- SHIFT sends the start bit and the 8 data bits, one per tick.
- STOP sends the stop bit.

If another byte is waiting when the stop bit ends, its start bit follows
directly. A character therefore takes exactly 10 bit times, and back-to-back
characters run at the full rate.

**Control registers.** `cfg_port` selects the port and `cfg_addr` the register.
Reads are combinational through `cfg_rdata`.

| addr | register | access | reset |
|---|---|---|---|
| 0 | send baud rate control (cycles per bit) | RW | `BAUD_DIV` (1000) |
| 1 | receive block size | RW | `BLOCK_SIZE` (10) |
| 2 | receive enable (bit 0) | RW | 1 |
| 3 | send control/state: {rx overflow, hold full, busy, done} | R | 0 |
| 4 | send counter | R | 0 |
| 5 | receive counter | R | 0 |
| 6 | receive buffer register (last byte) | R | 0 |
| 7 | send hold register | R | 0 |

Each record addressed to a port issues a send command of length n + 2, which is
added to the send counter. While the counter is non-zero, bytes move from the
transmit FIFO through the hold register to the line. When the counter is zero
and the line is idle, the done flag (`send_done`) is set.

A byte received while the receive FIFO is full is lost, and the sticky
`rx_overflow` flag is set.

## Top-level interface (`gateway_top`)

| parameter | default | |
|---|---|---|
| `N_PORTS` | 16 | serial ports |
| `BAUD_DIV` | 1000 | reset value of every baud register |
| `BLOCK_SIZE` | 10 | reset value of every block size register |
| `BUF_DEPTH` | 64 | bytes per port FIFO (power of two) |
| `PACK_PERIOD` | 1,920,000 | cycles between timer flushes (100 ms) |
| `IO_BASE` | 0x0300 | controller I/O base |
| `MAC`, `HOST_MAC` | 02:00:00:00:00:01, broadcast | source and destination MAC |

| port | dir | |
|---|---|---|
| `clk`, `rst_n` | in | 19.2 MHz clock, asynchronous active-low reset |
| `rxd`, `txd` [N_PORTS] | in/out | serial lines at logic level (idle high) |
| `sa[15:0]`, `sd_o[7:0]`, `sd_oe`, `sd_i[7:0]`, `iorb`, `iowb` | | ISA bus; join `sd_o`/`sd_i` with a tri-state pad enabled by `sd_oe` |
| `cfg_we`, `cfg_port`, `cfg_addr`, `cfg_wdata`, `cfg_rdata` | | port register access |
| `init_done`, `txd_buffer_select` | out | driver status |
| `send_done`, `rx_overflow`, `rx_err` [N_PORTS] | out | per-port status |
| `events` (`gw_events_t`) | out | one-cycle flags: pack_block, pack_timer, tx_ok, tx_retry, tx_fail, rx_frame, rx_error, rx_other, rec_done, bad_port |

The gateway function itself needs only the serial lines and the ISA bus: 60
pins at 16 ports. The register bus and the status outputs can stay inside the
FPGA.

## Capacity

At 19200 bit/s, 16 ports deliver at most about 30 KB/s. The driver moves about
2.7 MB/s over the ISA bus, and 10 Mbit/s Ethernet carries about 1.2 MB/s, so
both have large margins.

The largest possible frame is 14 + 16 × (4 + 64) = 1102 bytes. This fits the
frame buffer (1536 bytes) and both controller transmit buffers:

- pages 0x40–0x44, 1280 bytes;
- pages 0x45–0x4b, 1792 bytes.

Sending such a frame takes about 7,700 cycles, which is less than one character
time (10,000 cycles). A port therefore cannot fill its 64-byte FIFO while
blocks of 10 are being drained. It can overflow only if its block size is set
above the FIFO depth.

The design uses about 3,000 flip-flops and 29 kbit of memory: 32 FIFOs of 64
bytes and the frame buffer.

## Simulating

Everything is plain SystemVerilog. `rtl/gateway_pkg.sv` must be compiled first;
other files are found by module name. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/gateway_pkg.sv tb/gateway_top_tb.sv --top-module gateway_top_tb
./obj_dir/Vgateway_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs.

| testbench | what it covers |
|---|---|
| `baud_gen_tb`, `uart_rx_tb`, `uart_tx_tb`, `io_buffer_tb` | divider period and duty, receiver sampling/latency/error states, transmitter framing and 10-bit timing, FIFO against a queue model |
| `port_ctrl_tb`, `serial_port_tb` | registers, block counting, send counter and done flag; a full port with line-level models |
| `frame_packer_tb`, `frame_unpacker_tb` | frame layout, block and timer triggers; record parsing, sync heads, back-pressure, bad port |
| `isa_master_tb`, `nic_driver_tb` | bus timing; initialisation values, send with retries and drop, alternating transmit pages, receive with ring wrap, error and ARP frames |
| `gateway_top_tb` | whole gateway at 16 cycles per bit and a 30,000-cycle period; makes every mechanism above happen and checks all data end to end |
| `gateway_full_tb` | whole gateway at the default parameters (19200 bit/s, 100 ms): one block, one timer flush, one Ethernet-to-serial record; about 2 million cycles |

`tb/rtl8019_model.sv` is a behavioural model of the controller's bus side. It
models the registers, the 16 KB RAM, remote DMA with ring wrap, and
transmission with injectable TSR failures, and it injects received frames into
the ring. It does not model the Ethernet side of the chip.

## What follows the original design, and what does not

These parts follow the original design:

- the port count, the clock and the baud divider (1000 for 19200 bit/s, 50 %
  duty);
- the makeup of a port (control, receiver and transfer modules, I/O buffer, and
  the per-port register set);
- the receiver and transmitter state sequences;
- the 10-character and 100 ms packaging rules;
- the FF EE sync heads in both directions;
- all controller register values;
- the empty-ring test, the 18-byte header read, the RSR = 01 and TSR = 01
  checks, the ARP/IP filter, the 6 send repeats and the two transmit buffers.

These are this design's own choices:

- the record layout (port and length bytes), the frame type and MAC addresses;
- FIFO and frame-buffer sizes;
- the register addresses and the register bus;
- the I/O base and bus timing;
- the page-1 switch during initialisation, and the second transmit page (0x40);
- releasing the ring after a receive error;
- ordering the TSR check after the transmit command.

Not implemented:

- **The clock PLL and the RS232 level converters.** These are analog or vendor
  parts.
- **Filtering by device protocol.** The original gateway was meant to forward
  only the useful part of each device's serial frames, but that protocol is not
  specified, so every correctly received character is forwarded.
- **ARP replies and IP/UDP headers.** The host must accept raw records after the
  Ethernet header.
- **A data-format (parity, stop bits) register.** The format is fixed at 8N1.
