// SPI master (mode 0, MSB first) with transmit and receive registers.
//
// SCLK is the system clock divided by the baud-rate divisor baud_div
// (baud_div = 4 gives SCLK = proclk / 4, the setting of the reference
// transfer); a counter toggles SCLK every baud_div/2 clocks. baud_div is
// read at the start of a frame and held in a register for the whole frame;
// odd values are rounded down and values below 2 act as 2. A frame
// starts when the transmit interface offers a byte (tx_data_valid): the
// byte is taken into the TX register (one-cycle tx_data_ack), ss_n goes
// low and MOSI shows bit 7. SCLK idles low; on each rising SCLK edge the
// master samples MISO into the RX register, on each falling edge it shifts
// the next bit onto MOSI. After the 8th falling edge the received byte is
// put on rx_data with a one-cycle rx_valid and done. If the next byte is
// already waiting at that moment, it is taken at once and ss_n stays low
// (back-to-back bytes in one frame); otherwise ss_n returns high and the
// master waits one half SCLK period before it may start again.
//
// Transfer time: 8 * baud_div clocks per byte while ss_n is low, plus
// baud_div/2 + 1 clocks from the last SCLK edge of a frame to the next
// start.
//
// The pins (SCLK, SS active low, MOSI, MISO), the 8-bit data and the
// SCLK derived from the system clock by a baud-rate divisor (4 in the
// reference setup) follow the description of this master; the divisor
// encoding, mode 0 and the back-to-back frames are this design's own
// choices. tx_ip_wr_frm_prgs
// is high while ss_n is low.
//
// Timing: clk domain, active-low asynchronous reset, all outputs
// registered.
module spi_master
  import dma_serial_pkg::*;
#(
  parameter int unsigned DIV_W = 8,           // width of baud_div
  parameter int unsigned W     = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [DIV_W-1:0] baud_div,        // SCLK = clk / baud_div
  input  logic         tx_data_valid,
  input  logic [W-1:0] tx_dat,
  output logic         tx_data_ack,
  output logic         tx_ip_wr_frm_prgs,
  output logic         sclk,
  output logic         ss_n,
  output logic         mosi,
  input  logic         miso,
  output logic [W-1:0] rx_data,
  output logic         rx_valid,
  output logic         done
);

  localparam int unsigned BW = $clog2(W);

  typedef enum logic [1:0] { S_IDLE, S_XFER, S_GAP } spi_state_e;

  spi_state_e     state;
  logic [DIV_W-2:0] div_cnt;
  logic [DIV_W-2:0] half_q;  // baud_div / 2, held for the frame
  logic [BW-1:0]  bit_cnt;
  logic [W-1:0]   tx_sr;     // TX register
  logic [W-1:0]   rx_sr;     // RX register
  logic           half_tick;

  assign half_tick         = (div_cnt == half_q - 1'b1);
  assign mosi              = tx_sr[W-1];
  assign tx_ip_wr_frm_prgs = !ss_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      div_cnt     <= '0;
      half_q      <= (DIV_W-1)'(1);
      bit_cnt     <= '0;
      tx_sr       <= '0;
      rx_sr       <= '0;
      sclk        <= 1'b0;
      ss_n        <= 1'b1;
      rx_data     <= '0;
      rx_valid    <= 1'b0;
      done        <= 1'b0;
      tx_data_ack <= 1'b0;
    end else begin
      tx_data_ack <= 1'b0;
      rx_valid    <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: begin
          div_cnt <= '0;
          half_q  <= (baud_div[DIV_W-1:1] == '0) ? (DIV_W-1)'(1) : baud_div[DIV_W-1:1];
          if (tx_data_valid) begin
            tx_sr       <= tx_dat;
            tx_data_ack <= 1'b1;
            ss_n        <= 1'b0;
            bit_cnt     <= '0;
            state       <= S_XFER;
          end
        end
        S_XFER: begin
          div_cnt <= half_tick ? '0 : div_cnt + 1'b1;
          if (half_tick) begin
            if (!sclk) begin                      // rising edge: sample MISO
              sclk  <= 1'b1;
              rx_sr <= {rx_sr[W-2:0], miso};
            end else begin                        // falling edge: shift
              sclk <= 1'b0;
              if (bit_cnt == BW'(W - 1)) begin
                rx_data  <= rx_sr;
                rx_valid <= 1'b1;
                done     <= 1'b1;
                bit_cnt  <= '0;
                if (tx_data_valid) begin
                  tx_sr       <= tx_dat;
                  tx_data_ack <= 1'b1;
                end else begin
                  ss_n  <= 1'b1;
                  state <= S_GAP;
                end
              end else begin
                bit_cnt <= bit_cnt + 1'b1;
                tx_sr   <= {tx_sr[W-2:0], 1'b0};
              end
            end
          end
        end
        S_GAP: begin                              // SS high for half an SCLK period
          div_cnt <= half_tick ? '0 : div_cnt + 1'b1;
          if (half_tick) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
