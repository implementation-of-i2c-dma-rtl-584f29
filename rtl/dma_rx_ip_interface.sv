// Receive IP interface: serial master receive register -> DMA receive FIFO.
//
// Each time the master signals a complete received byte (rx_valid, one
// cycle, with the byte on rx_data), the interface registers the byte and
// issues a one-cycle rx_wr_pulse to the receive FIFO in the next cycle.
// If the FIFO is full at that moment the byte is lost: rx_overflow is set
// and stays set until rx_clr_ovf, and rx_drop_cnt counts lost bytes
// (saturating).
//
// Only the block's place between the master's receive register and the
// DMA receive FIFO is given by the architecture; the one-cycle write
// register and the overflow flag are this design's own choices.
//
// Timing: h_clk domain, active-low asynchronous reset, one cycle from
// rx_valid to rx_wr_pulse.
module dma_rx_ip_interface
  import dma_serial_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         h_clk,
  input  logic         h_reset_b,
  // master side
  input  logic         rx_valid,
  input  logic [W-1:0] rx_data,
  // FIFO side
  input  logic         rx_fifoFull,
  output logic         rx_wr_pulse,
  output logic [W-1:0] rx_fifo_data,
  // status
  input  logic         rx_clr_ovf,
  output logic         rx_overflow,
  output logic [7:0]   rx_drop_cnt
);

  logic pend;

  assign rx_wr_pulse = pend && !rx_fifoFull;

  always_ff @(posedge h_clk or negedge h_reset_b) begin
    if (!h_reset_b) begin
      pend         <= 1'b0;
      rx_fifo_data <= '0;
      rx_overflow  <= 1'b0;
      rx_drop_cnt  <= '0;
    end else begin
      pend <= rx_valid;
      if (rx_valid) rx_fifo_data <= rx_data;
      if (pend && rx_fifoFull) begin
        rx_overflow <= 1'b1;
        if (rx_drop_cnt != 8'hFF) rx_drop_cnt <= rx_drop_cnt + 8'd1;
      end else if (rx_clr_ovf) begin
        rx_overflow <= 1'b0;
      end
    end
  end

endmodule
