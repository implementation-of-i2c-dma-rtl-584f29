// DMA transmit FIFO.
//
// Holds bytes that the DMA side has fetched from memory until the transmit
// interface hands them to the serial master. It is a circular buffer of
// DEPTH entries with a read and a write pointer one bit wider than the
// address, so that full and empty can be told apart. The read port is
// show-ahead: tx_data_out always shows the oldest entry, and a one-cycle
// tx_rd_pulse removes it. A one-cycle tx_wr_pulse stores tx_data_in.
// A write while full and a read while empty are ignored; a read and a
// write in the same cycle are both done, also when the FIFO is full.
//
// fifo_cnt is the number of stored bytes. tx_fifoAlmostFull is set while
// fifo_cnt >= tx_wmk_size, so the DMA side can stop fetching before the
// FIFO is full; tx_fifoFull is set at DEPTH entries.
//
// The port names follow the dma_tx_fifo block of the I2C-DMA and SPI-DMA
// transmit interfaces. The depth, the show-ahead read and the meaning given
// to the watermark are this design's own choices.
//
// Timing: one clock domain (h_clk), active-low asynchronous reset
// h_reset_b. All outputs are registered state or decoded from it.
module dma_tx_fifo
  import dma_serial_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  parameter int unsigned W     = DATA_W,
  parameter int unsigned WMKW  = WMK_W
) (
  input  logic                     h_clk,
  input  logic                     h_reset_b,
  input  logic                     tx_wr_pulse,
  input  logic [W-1:0]             tx_data_in,
  input  logic                     tx_rd_pulse,
  input  logic [WMKW-1:0]          tx_wmk_size,
  output logic [W-1:0]             tx_data_out,
  output logic                     tx_fifoEmpty,
  output logic                     tx_fifoFull,
  output logic                     tx_fifoAlmostFull,
  output logic [$clog2(DEPTH):0]   fifo_cnt
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;
  logic         do_wr, do_rd;

  assign tx_fifoEmpty      = (wr_ptr == rd_ptr);
  assign tx_fifoFull       = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign fifo_cnt          = wr_ptr - rd_ptr;
  assign tx_fifoAlmostFull = (fifo_cnt >= (AW+1)'(tx_wmk_size));

  assign do_rd = tx_rd_pulse && !tx_fifoEmpty;
  assign do_wr = tx_wr_pulse && (!tx_fifoFull || do_rd);

  assign tx_data_out = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge h_clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= tx_data_in;
  end

  always_ff @(posedge h_clk or negedge h_reset_b) begin
    if (!h_reset_b) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("dma_tx_fifo: DEPTH must be a power of two");
  end

endmodule
