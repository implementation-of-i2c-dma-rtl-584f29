// DMA to I2C/SPI master subsystem.
//
// A DMA engine (outside this module) writes bytes into the DMA transmit
// FIFO; the transmit IP interface hands them one at a time to the serial
// master selected by proto_sel, which sends them on its bus. Bytes that
// the selected master receives go through the receive IP interface into
// the DMA receive FIFO, from which the DMA engine reads them back: the SPI
// master is full duplex, so every byte it clocks out also clocks one in on
// MISO; the I2C master receives in read frames, started with i2c_rd_start
// for i2c_rd_len bytes.
//
//   tx_wr_pulse/tx_data_in -> dma_tx_fifo -> dma_tx_ip_interface -+-> i2c_master -> SCL/SDA
//                                                                  +-> spi_master -> SCLK/SS/MOSI
//   rx_rd_pulse/rx_data_out <- dma_rx_fifo <- dma_rx_ip_interface <-+- spi_master <- MISO
//                                                                  +- i2c_master <- SDA
//
// Protocol select: only one master is attached to the DMA path at a time.
// proto_sel (0 = I2C, 1 = SPI) is taken into an internal register only
// while both masters are idle, so a change during a frame takes effect
// after that frame. The unselected master sees tx_data_valid = 0.
//
// Everything runs on h_clk with the active-low asynchronous reset
// h_reset_b. The I2C master's SCL is the inverted h_clk while a frame is in
// progress, so the I2C bit rate equals the h_clk frequency; the SPI SCLK is
// h_clk / spi_baud_div (4 in the reference setup). Open-drain SDA: i2c_sda_o = 0 pulls the line low,
// i2c_sda_i reads it back.
//
// The block structure (transmit FIFO, transmit interface, master with TX
// and RX registers, receive interface, receive FIFO) follows the proposed
// architecture. Sharing one DMA path between both masters through a
// protocol select, the receive-side status flags and all sizes except the
// 8-bit data are this design's own choices.
module dma_serial_top
  import dma_serial_pkg::*;
#(
  parameter int unsigned TX_DEPTH    = FIFO_DEPTH,
  parameter int unsigned RX_DEPTH    = FIFO_DEPTH
) (
  input  logic                        h_clk,
  input  logic                        h_reset_b,
  input  logic                        proto_sel,        // 0: I2C, 1: SPI
  // DMA side, transmit
  input  logic                        tx_wr_pulse,
  input  byte_t                       tx_data_in,
  input  logic [WMK_W-1:0]            tx_wmk_size,
  output logic                        tx_fifoEmpty,
  output logic                        tx_fifoFull,
  output logic                        tx_fifoAlmostFull,
  output logic [$clog2(TX_DEPTH):0]   tx_fifo_cnt,
  // DMA side, receive
  input  logic                        rx_rd_pulse,
  input  logic [WMK_W-1:0]            rx_wmk_size,
  output byte_t                       rx_data_out,
  output logic                        rx_fifoEmpty,
  output logic                        rx_fifoFull,
  output logic                        rx_dma_req,
  output logic [$clog2(RX_DEPTH):0]   rx_fifo_cnt,
  input  logic                        rx_clr_ovf,
  output logic                        rx_overflow,
  output logic [7:0]                  rx_drop_cnt,
  // status
  output logic                        proto_active,     // protocol in use
  output logic                        tx_data_valid,
  output byte_t                       tx_dat,           // byte offered to the master
  output logic                        tx_data_ack,
  output logic                        tx_ip_wr_frm_prgs,
  output logic                        i2c_nack_err,
  output logic                        spi_done,
  // I2C bus
  input  logic [6:0]                  i2c_slave_addr,
  input  logic                        i2c_rd_start,     // request a read frame
  input  logic [7:0]                  i2c_rd_len,       // bytes to read (0 = 1)
  output logic                        i2c_rd_pending,   // read request waiting
  output logic                        i2c_scl,
  output logic                        i2c_sda_o,
  input  logic                        i2c_sda_i,
  // SPI bus
  input  logic [7:0]                  spi_baud_div,     // SCLK = h_clk / spi_baud_div
  output logic                        spi_sclk,
  output logic                        spi_ss_n,
  output logic                        spi_mosi,
  input  logic                        spi_miso
);

  byte_t fifo_tx_data, spi_rx_data, i2c_rx_data, rx_data, rx_fifo_data;
  logic  i2c_rx_valid, rx_valid;
  logic  tx_rd_pulse;
  logic  i2c_ack, spi_ack, i2c_prgs, spi_prgs, spi_rx_valid;
  logic  rx_wr_pulse;
  logic  sel_q;

  // ---------------------------------------------------------------- transmit
  dma_tx_fifo #(.DEPTH(TX_DEPTH)) u_tx_fifo (
    .h_clk, .h_reset_b,
    .tx_wr_pulse, .tx_data_in,
    .tx_rd_pulse,
    .tx_wmk_size,
    .tx_data_out       (fifo_tx_data),
    .tx_fifoEmpty, .tx_fifoFull, .tx_fifoAlmostFull,
    .fifo_cnt          (tx_fifo_cnt)
  );

  dma_tx_ip_interface u_tx_ip_inf (
    .h_clk, .h_reset_b,
    .tx_fifoEmpty,
    .tx_fifo_data_in   (fifo_tx_data),
    .tx_rd_pulse,
    .tx_data_valid,
    .tx_dat,
    .tx_data_ack
  );

  // ---------------------------------------------------------- protocol select
  // A pending I2C read also holds the selection.
  always_ff @(posedge h_clk or negedge h_reset_b) begin
    if (!h_reset_b)                                      sel_q <= PROTO_I2C;
    else if (!i2c_prgs && !spi_prgs && !i2c_rd_pending) sel_q <= proto_sel;
  end

  assign proto_active      = sel_q;
  assign tx_data_ack       = (sel_q == PROTO_SPI) ? spi_ack : i2c_ack;
  assign tx_ip_wr_frm_prgs = i2c_prgs || spi_prgs;

  // ------------------------------------------------------------------ masters
  i2c_master u_i2c (
    .clk               (h_clk),
    .rst_n             (h_reset_b),
    .slave_addr        (i2c_slave_addr),
    .tx_data_valid     (tx_data_valid && (sel_q == PROTO_I2C)),
    .tx_dat,
    .tx_data_ack       (i2c_ack),
    .tx_ip_wr_frm_prgs (i2c_prgs),
    .nack_err          (i2c_nack_err),
    .scl               (i2c_scl),
    .sda_o             (i2c_sda_o),
    .sda_i             (i2c_sda_i),
    .rd_start          (i2c_rd_start && (sel_q == PROTO_I2C)),
    .rd_len            (i2c_rd_len),
    .rd_pending        (i2c_rd_pending),
    .rx_data           (i2c_rx_data),
    .rx_valid          (i2c_rx_valid)
  );

  spi_master u_spi (
    .clk               (h_clk),
    .rst_n             (h_reset_b),
    .baud_div          (spi_baud_div),
    .tx_data_valid     (tx_data_valid && (sel_q == PROTO_SPI)),
    .tx_dat,
    .tx_data_ack       (spi_ack),
    .tx_ip_wr_frm_prgs (spi_prgs),
    .sclk              (spi_sclk),
    .ss_n              (spi_ss_n),
    .mosi              (spi_mosi),
    .miso              (spi_miso),
    .rx_data           (spi_rx_data),
    .rx_valid          (spi_rx_valid),
    .done              (spi_done)
  );

  // ------------------------------------------------------------------ receive
  // A master's last rx_valid comes before its frame ends, so sel_q is
  // still the protocol that produced it.
  assign rx_valid = (sel_q == PROTO_SPI) ? spi_rx_valid : i2c_rx_valid;
  assign rx_data  = (sel_q == PROTO_SPI) ? spi_rx_data  : i2c_rx_data;

  dma_rx_ip_interface u_rx_ip_inf (
    .h_clk, .h_reset_b,
    .rx_valid,
    .rx_data,
    .rx_fifoFull,
    .rx_wr_pulse,
    .rx_fifo_data,
    .rx_clr_ovf,
    .rx_overflow,
    .rx_drop_cnt
  );

  dma_rx_fifo #(.DEPTH(RX_DEPTH)) u_rx_fifo (
    .h_clk, .h_reset_b,
    .rx_wr_pulse,
    .rx_data_in        (rx_fifo_data),
    .rx_rd_pulse,
    .rx_wmk_size,
    .rx_data_out,
    .rx_fifoEmpty, .rx_fifoFull,
    .rx_dma_req,
    .rx_cnt            (rx_fifo_cnt)
  );

endmodule
