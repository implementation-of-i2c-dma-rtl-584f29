// Transmit IP interface: DMA transmit FIFO -> serial master.
//
// Holds one byte for the serial master (I2C or SPI) in the register
// tx_dat, with tx_data_valid set while that byte waits. The master takes
// the byte by pulsing tx_data_ack for one cycle; in the same cycle the
// interface pops the next byte from the FIFO if there is one, so a master
// that sends several bytes in one frame finds the next byte already
// waiting. When the holding register is empty and the FIFO is not, it is
// refilled. tx_rd_pulse is the FIFO pop; it is combinational from
// registered state and from the (registered) acknowledge of the master.
//
//   pop  = !tx_fifoEmpty && (!tx_data_valid || tx_data_ack)
//
// Handshake rule, checked by an assertion: tx_data_ack only while
// tx_data_valid. The byte and the valid flag do not change while
// tx_data_valid is set and no acknowledge comes.
//
// The names tx_data_valid, tx_dat and tx_data_ack follow the
// dma_tx_ip_interface block of the transmit interfaces; the one-byte
// holding register and the pop rule are this design's own choices.
//
// Timing: h_clk domain, active-low asynchronous reset; a byte written
// into an empty FIFO is valid at the master one clock after the edge that
// writes it into the FIFO.
module dma_tx_ip_interface
  import dma_serial_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         h_clk,
  input  logic         h_reset_b,
  // FIFO side
  input  logic         tx_fifoEmpty,
  input  logic [W-1:0] tx_fifo_data_in,
  output logic         tx_rd_pulse,
  // master side
  output logic         tx_data_valid,
  output logic [W-1:0] tx_dat,
  input  logic         tx_data_ack
);

  assign tx_rd_pulse = !tx_fifoEmpty && (!tx_data_valid || tx_data_ack);

  always_ff @(posedge h_clk or negedge h_reset_b) begin
    if (!h_reset_b) begin
      tx_data_valid <= 1'b0;
      tx_dat        <= '0;
    end else if (tx_rd_pulse) begin
      tx_data_valid <= 1'b1;
      tx_dat        <= tx_fifo_data_in;
    end else if (tx_data_ack) begin
      tx_data_valid <= 1'b0;
    end
  end

  a_ack_needs_valid: assert property (@(posedge h_clk) disable iff (!h_reset_b)
    tx_data_ack |-> tx_data_valid)
    else $error("dma_tx_ip_interface: acknowledge without a valid byte");

endmodule
