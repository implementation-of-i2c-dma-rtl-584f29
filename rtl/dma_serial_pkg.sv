// Shared types and constants of the DMA-to-serial-master subsystem.
//
// Every path in this design (DMA FIFOs, transmit/receive interfaces, the
// I2C and SPI masters) moves 8-bit bytes, as in the transmit register of
// the masters. The FIFO depth is this design's own choice (16 entries);
// the byte width follows the 8-bit transmit data of the masters.
package dma_serial_pkg;

  localparam int unsigned DATA_W     = 8;   // byte width of every data path
  localparam int unsigned FIFO_DEPTH = 16;  // default depth of both DMA FIFOs
  localparam int unsigned WMK_W      = 4;   // width of the watermark inputs

  typedef logic [DATA_W-1:0] byte_t;

  // Which serial master the DMA path is attached to.
  typedef enum logic {
    PROTO_I2C = 1'b0,
    PROTO_SPI = 1'b1
  } proto_e;

endpackage
