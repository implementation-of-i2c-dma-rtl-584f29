# DMA-fed I2C and SPI masters

This is a small system-on-chip peripheral that lets a DMA engine send bytes
over I2C or SPI without the CPU in the loop. The DMA engine drops bytes into a
transmit FIFO. A transmit interface hands them one at a time to the serial
master that is currently selected, either an I2C master or an SPI master.
Bytes coming back go the other way. The SPI master is full duplex, so every byte
it sends also brings one back on MISO. The I2C master brings bytes back in read
frames that the DMA side requests. A receive interface stores received bytes in
a receive FIFO, and the DMA engine collects them from there.

Both masters read the same transmit FIFO. Only one of them is attached to it at
a time. Everything is 8-bit data on one clock, `h_clk`.

```
                      +-------------+   +---------------------+      +------------+  SCL, SDA
 tx_wr_pulse -------->| dma_tx_fifo |-->| dma_tx_ip_interface |--+-->| i2c_master |<-------->
 tx_data_in  -------->|  16 x 8     |<--| (1-byte holding reg)|  |   +------------+
 tx_fifoAlmostFull <--|             |pop+---------------------+  |   +------------+  SCLK, SS_n, MOSI
                      +-------------+          ^ ack             +-->| spi_master |---------->
                                               +-- proto_sel --------|            |<--------- MISO
                      +-------------+   +---------------------+      |  RX reg    |
 rx_rd_pulse -------->| dma_rx_fifo |<--| dma_rx_ip_interface |<-----+------------+
 rx_data_out <--------|  16 x 8     |   | (write, overflow)   |<------ i2c_master RX reg
 rx_dma_req  <--------+-------------+   +---------------------+
```

The DMA engine itself is not part of the RTL. It has no memory-side bus,
descriptors or interrupt here. Its FIFO-side signals are top-level ports of
`dma_serial_top`, and the testbench plays its part.

## The byte handshake between the DMA path and a master

Every master sees the same three signals from `dma_tx_ip_interface`:

* `tx_data_valid`: a byte is waiting.
* `tx_dat`: the byte itself.
* `tx_data_ack`: the master pulses this for one clock when it takes the byte
  into its transmit register.

The interface has a one-byte holding register. The FIFO is show-ahead: its
output always shows the oldest byte. The interface pops the FIFO when the FIFO
is not empty and either the holding register is empty or the master is
acknowledging in that same clock:

```
tx_rd_pulse = !tx_fifoEmpty && (!tx_data_valid || tx_data_ack)
```

So the next byte is ready one clock after an acknowledge. Neither master needs
it for at least another bit time. This is what lets both masters send several
bytes in one frame. A byte written into an empty FIFO reaches `tx_data_valid`
one clock after the edge that writes it into the FIFO.

An assertion checks that `tx_data_ack` never comes without `tx_data_valid`.

The DMA side should stop writing while `tx_fifoAlmostFull` is set. That flag
means `fifo_cnt >= tx_wmk_size`. A write into a full FIFO is dropped. A read and
a write in the same clock both happen, even when the FIFO is full.

## I2C master: SCL is the inverted clock

This part is the least conventional. `i2c_master` has no SCL divider. Its clock
*is* the bit clock:

```
scl = (i2c_sclen == 0) ? 1 : ~clk
```

* The state machine runs on the rising edge of `clk` and sets SDA there. That
  is the moment SCL falls, so SDA always changes while SCL is low.
* `i2c_sclen` is a flop on the falling edge of `clk`, so SCL never glitches.
* SCL rises on the falling edge of `clk`. The slave samples there, and the
  master samples the slave's ACK on that same edge.

Each bus slot (one bit, one ACK, one half of STOP) is one `clk` period. Within a
slot, whether SCL is low for the first half depends on `i2c_sclen` as it was set
in the previous slot. The FSM uses this to shape START and STOP.
A write frame uses DATA and ACK2, and a read frame uses RDATA and MACK:

| slot       | SDA set at the rising edge | SCL in the slot     | `i2c_sclen` set in the slot |
|------------|----------------------------|---------------------|-----------------------------|
| IDLE       | 1                          | high                | 0                           |
| START      | 0 (START: SDA falls)       | high                | 1                           |
| ADDR x8    | address bits 6..0, R/W     | low, then high      | 1                           |
| ACK1       | released                   | low, then high      | 1                           |
| DATA x8    | data bits 7..0             | low, then high      | 1                           |
| ACK2       | released                   | low, then high      | 1                           |
| RDATA x8   | released (slave drives)    | low, then high      | 1                           |
| MACK       | 0 = ACK, 1 = NACK (last)   | low, then high      | 1                           |
| STOP1      | 0                          | low, then high      | 0                           |
| STOP2      | 1 (STOP: SDA rises)        | high                | 0                           |

At the end of ACK2 the master checks for another waiting byte. If one is there,
it takes that byte and goes straight back to DATA, so the frame continues.
Otherwise it ends the frame with STOP.

A read frame is the same up to ACK1, with R/W = 1. After that, `RDATA x8`
slots follow, in which SDA is released and the slave drives it. The master
shifts SDA into its RX register on each rising SCL. Each byte ends with an `MACK`
slot, where the master drives 0 (ACK) if more bytes are wanted and 1 (NACK)
after the last one. The frame then ends with STOP1 and STOP2 as a write frame
does.

A read is requested with a one-cycle `rd_start`, and `rd_len` gives the number
of bytes (0 counts as 1). The request waits in `rd_pending` until the master is
idle. A byte already waiting to be written goes first. A second `rd_start` while
a read is pending is ignored. Each received byte appears on `rx_data` with a
one-cycle `rx_valid`.

A frame that carries `n` bytes, written or read, therefore takes `12 + 9n`
clocks from START to the end of STOP2. It has `10 + 9n` SCL pulses. Both
testbenches check these counts.

A NACK, meaning SDA is still high when sampled in an ACK slot, makes the master
do three things:

* It ends the frame with STOP.
* It pulses `nack_err`.
* It drops the byte that was refused. There is no retry.

An address NACK loses the first byte of a write frame, or the whole request of
a read frame.

SDA is open-drain. `sda_o = 0` pulls the line low and `sda_o = 1` releases it,
while `sda_i` reads the line back. Outside the chip, SDA needs a pull-up. SCL is
driven push-pull, and there is no clock stretching and no multi-master
arbitration.

In `dma_serial_top` the I2C master runs on `h_clk`, so the I2C bit rate equals
`h_clk`. To get a standard 100 kHz or 400 kHz bus you have two options:

* Run the subsystem from that clock.
* Give `i2c_master` its own slow clock and add a clock-domain crossing on the
  handshake. This design does not include one.

## SPI master

`spi_master` runs in mode 0 (SCLK idles low, data sampled on the rising edge),
MSB first, with one slave select.

* **Divisor:** SCLK is `clk / baud_div`. A counter toggles SCLK every
  `baud_div/2` clocks. `baud_div` is latched when a frame starts. Odd values
  are rounded down and values below 2 act as 2. The reference setting is 4.
* **Edges:** On the rising SCLK edge the master shifts MISO into its RX
  register. On the falling edge it moves the next TX bit onto MOSI.
* **End of a byte:** After the 8th falling edge, `rx_data`, `rx_valid` and
  `done` are presented for one clock.
* **Back-to-back bytes:** If another byte is waiting at that moment, it is
  taken at once and `ss_n` stays low.
* **End of a frame:** If no byte is waiting, `ss_n` goes high and the master
  waits half an SCLK period before it can start again.

A byte costs exactly `8 * baud_div` clocks while `ss_n` is low. That is 32
clocks at the reference setting.

## Receive path

`dma_rx_ip_interface` registers each received byte and writes it into
`dma_rx_fifo` one clock later. If the FIFO is full at that moment:

* the byte is lost;
* `rx_overflow` is set and stays set until `rx_clr_ovf`;
* `rx_drop_cnt` counts the lost byte. It saturates at 255.

`dma_rx_fifo` raises `rx_dma_req` while it is not empty and holds at least
`rx_wmk_size` bytes. This tells the DMA engine to come and read.

The selected master feeds this path: the SPI master with every byte it
exchanges, the I2C master with the bytes of its read frames. A read request
made while SPI is selected is ignored. A pending I2C read holds the protocol
selection, just as a frame in progress does.

## Protocol select

`proto_sel` (0 = I2C, 1 = SPI) is copied into an internal register only while
neither master has a frame in progress. `proto_active` shows that register.

* A change requested during a frame takes effect after that frame.
* The unselected master sees `tx_data_valid = 0`, and its acknowledge is
  ignored.
* The bus of the unselected master stays idle. SCL and SDA are released high,
  and SS is high.

## Files

| file | contents |
|------|----------|
| `rtl/dma_serial_pkg.sv` | byte type, default widths and depth, protocol enum |
| `rtl/dma_tx_fifo.sv` | transmit FIFO, show-ahead, watermark |
| `rtl/dma_tx_ip_interface.sv` | FIFO-to-master handshake |
| `rtl/i2c_master.sv` | I2C master, write and read frames |
| `rtl/spi_master.sv` | SPI master with TX/RX registers |
| `rtl/dma_rx_ip_interface.sv` | master-to-receive-FIFO writer, overflow |
| `rtl/dma_rx_fifo.sv` | receive FIFO, DMA request |
| `rtl/dma_serial_top.sv` | the subsystem |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/i2c_slave_model.sv`, `tb/spi_slave_model.sv` | behavioural bus slaves, for simulation only |

### Parameters and ports of `dma_serial_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `TX_DEPTH` | 16 | transmit FIFO entries (power of two) |
| `RX_DEPTH` | 16 | receive FIFO entries (power of two) |

The port groups are:

* clock and reset: `h_clk`, `h_reset_b` (active low, asynchronous);
* `proto_sel`;
* DMA transmit side: `tx_wr_pulse`, `tx_data_in`, `tx_wmk_size`, and the flags
  `tx_fifoEmpty/Full/AlmostFull`, `tx_fifo_cnt`;
* DMA receive side: `rx_rd_pulse`, `rx_data_out`, `rx_wmk_size`, `rx_dma_req`,
  the flags, `rx_fifo_cnt`, `rx_overflow`, `rx_drop_cnt`, `rx_clr_ovf`;
* handshake observation: `tx_data_valid`, `tx_dat`, `tx_data_ack`,
  `tx_ip_wr_frm_prgs`, `i2c_nack_err`, `spi_done`;
* I2C: `i2c_slave_addr`, `i2c_rd_start`, `i2c_rd_len`, `i2c_rd_pending`,
  `i2c_scl`, `i2c_sda_o`, `i2c_sda_i`;
* SPI pins: `spi_baud_div`, `spi_sclk`, `spi_ss_n`, `spi_mosi`, `spi_miso`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs.

To run the whole subsystem at its default parameters:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl --top-module tb_dma_serial_top \
  rtl/dma_serial_pkg.sv rtl/dma_tx_fifo.sv rtl/dma_tx_ip_interface.sv rtl/i2c_master.sv \
  rtl/spi_master.sv rtl/dma_rx_ip_interface.sv rtl/dma_rx_fifo.sv rtl/dma_serial_top.sv \
  tb/i2c_slave_model.sv tb/spi_slave_model.sv tb/tb_dma_serial_top.sv
./obj_dir/Vtb_dma_serial_top
```

For a single block, give the package, the block, any slave model it needs, and
its testbench. For example, `tb_i2c_master` needs `rtl/dma_serial_pkg.sv`,
`rtl/i2c_master.sv` and `tb/i2c_slave_model.sv`.

What the testbenches cover:

* **FIFOs:** against a queue model under random traffic, through empty,
  watermark, full, write-on-full and read-plus-write-on-full.
* **Transmit interface:** byte order, no pop from an empty FIFO, a stable
  offered byte, one-cycle latency and pop-on-acknowledge.
* **Receive interface:** write timing, overflow flag and drop count.
* **I2C master:**
  * one byte, `8'b00110011`: 19 SCL pulses, 21 clocks;
  * a 4-byte burst in one frame: 48 clocks;
  * an address NACK: 12 clocks;
  * a data NACK that splits a burst into two frames;
  * a 3-byte read: 39 clocks, with ACK, ACK, NACK from the master;
  * a read from a wrong address, a read of length 0, and a read queued behind
    a write.
* **SPI master:**
  * a single byte;
  * a 5-byte back-to-back burst;
  * a new frame after idle;
  * divisors 4, 8 and 2, with the SCLK period and `ss_n`-low time checked
    against `8 * baud_div` clocks per byte.
* **Subsystem:**
  * 24 bytes over I2C, with one data NACK and almost-full back-pressure;
  * a 6-byte I2C read through the receive FIFO;
  * a protocol switch requested mid-frame, which must wait for the frame to
    end;
  * 24 bytes over SPI, with the replies drained through the receive FIFO on
    the watermark request;
  * a receive overflow: 4 of 20 replies dropped, and the 16 kept ones read
    back in order.

  It counts each of these mechanisms and fails if any did not occur. It also
  checks the I2C and SPI frame times.

## What follows the reference architecture and what is this design's choice

The following come from the reference architecture:

* The block structure: transmit FIFO, transmit interface, a master with TX and
  RX registers, receive interface, receive FIFO.
* The port names of the transmit FIFO, the transmit interface and the masters
  (`tx_wr_pulse`, `tx_rd_pulse`, `tx_wmk_size`, `tx_fifoEmpty`,
  `tx_fifoAlmostFull`, `fifo_cnt`, `tx_data_valid`, `tx_dat`, `tx_data_ack`,
  `tx_ip_wr_frm_prgs`, `h_clk`, `h_reset_b`).
* The 8-bit data.
* The I2C frame: START, 7-bit address with R/W, ACK, data, STOP.
* The I2C clock scheme: SCL is the gated inverted clock, with separate
  rising-edge and falling-edge processes.
* The SPI pins and an SCLK obtained from the system clock by a baud-rate
  divisor, 4 in the reference transfer.

The following are this design's own choices:

* FIFO depth 16, show-ahead reads, and the meaning of the watermark.
* The one-byte holding register in the transmit interface, which pops the FIFO
  itself. The reference block diagram shows the FIFO read pulse as an external
  input.
* The transmit interface has no `tx_ip_wr_frm_prgs` or FIFO-count input. The
  reference block diagram draws both on it without saying what they do, and
  the valid/ack handshake needs neither. Both are still top-level ports.
* Open-drain SDA with ACK checking, the NACK handling, and multi-byte I2C
  frames.
* How an I2C read is requested (`rd_start`, `rd_len`) and the master's
  ACK/NACK policy. The reference gives the I2C master an RX register but
  shows only write transfers.
* SPI mode 0, held SS across back-to-back bytes, and the divisor encoding.
* The receive interface and receive FIFO in detail: overflow flag, drop
  counter, DMA request.
* One subsystem holding both masters behind a protocol select. The reference
  design attaches one master at a time and reports the I2C and SPI variants
  separately.
* Reset behaviour: everything is cleared by the asynchronous `h_reset_b`.

The following is left out:

* the DMA engine's memory side;
* several SPI slave selects;
* clock stretching and multi-master arbitration on I2C.

The reference implementation ran at 100 MHz on a small FPGA. None of its area,
power or timing figures are checked here.
