// DMA receive FIFO.
//
// Collects the bytes that the receive interface takes from the serial
// master until the DMA side reads them out to memory. Same structure as
// the transmit FIFO: a circular buffer of DEPTH entries, pointers one bit
// wider than the address, show-ahead read port (rx_data_out is the oldest
// byte, rx_rd_pulse removes it), rx_wr_pulse stores rx_data_in.
// A write while full is dropped and counted by the receive interface,
// which sees rx_fifoFull; a read while empty is ignored.
//
// rx_dma_req is set while rx_cnt >= rx_wmk_size (and the FIFO is not
// empty): it asks the DMA side to come and empty the FIFO. Only the block's
// place in the system (DMA receive FIFO between the receive interface and
// the DMA) comes from the architecture; depth, show-ahead read and the
// watermark request are this design's own choices.
//
// Timing: one clock domain (h_clk), active-low asynchronous reset.
module dma_rx_fifo
  import dma_serial_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  parameter int unsigned W     = DATA_W,
  parameter int unsigned WMKW  = WMK_W
) (
  input  logic                     h_clk,
  input  logic                     h_reset_b,
  input  logic                     rx_wr_pulse,
  input  logic [W-1:0]             rx_data_in,
  input  logic                     rx_rd_pulse,
  input  logic [WMKW-1:0]          rx_wmk_size,
  output logic [W-1:0]             rx_data_out,
  output logic                     rx_fifoEmpty,
  output logic                     rx_fifoFull,
  output logic                     rx_dma_req,
  output logic [$clog2(DEPTH):0]   rx_cnt
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;
  logic         do_wr, do_rd;

  assign rx_fifoEmpty = (wr_ptr == rd_ptr);
  assign rx_fifoFull  = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign rx_cnt       = wr_ptr - rd_ptr;
  assign rx_dma_req   = !rx_fifoEmpty && (rx_cnt >= (AW+1)'(rx_wmk_size));

  assign do_rd = rx_rd_pulse && !rx_fifoEmpty;
  assign do_wr = rx_wr_pulse && (!rx_fifoFull || do_rd);

  assign rx_data_out = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge h_clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= rx_data_in;
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
      else $error("dma_rx_fifo: DEPTH must be a power of two");
  end

endmodule
