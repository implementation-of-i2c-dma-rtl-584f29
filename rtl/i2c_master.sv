// I2C master with TX and RX registers.
//
// Write frames send the bytes offered by the transmit interface to a
// 7-bit-addressed slave: START, address + W (0), slave ACK, data byte,
// slave ACK, further data bytes for as long as the next byte is already
// waiting when a data ACK ends, then STOP. A NACK from the slave (SDA high
// in an ACK slot) ends the frame with STOP and sets nack_err for one
// cycle; the byte that was not acknowledged is not retried.
//
// Read frames are requested with a one-cycle rd_start; rd_len (sampled
// with rd_start, 0 read as 1) gives the number of bytes. The request waits
// until the master is idle; a waiting transmit byte goes first. The frame
// is START, address + R (1), slave ACK, then rd_len bytes clocked in from
// the slave into the RX register, each followed by a master ACK (SDA low)
// except the last, which gets a NACK (SDA high), then STOP. Every received
// byte appears on rx_data with a one-cycle rx_valid at the end of its 8th
// bit. An address NACK ends a read frame like a write frame.
//
// Clocking follows the serial-clock scheme of this master: the state
// machine runs on the rising edge of clk and sets SDA there, the SCL
// enable i2c_sclen is a flop on the falling edge of clk, and
//     scl = (i2c_sclen == 0) ? 1 : ~clk
// so each bit occupies one clk period: SCL falls with the rising edge of
// clk (SDA changes while SCL is low) and rises with its falling edge,
// where the slave samples SDA (and the master samples the ACK). The SCL
// frequency is therefore the frequency of clk. START is SDA falling while
// i2c_sclen is 0 (SCL high); STOP is SDA rising while i2c_sclen is 0.
//
// Bus pins are open-drain: sda_o = 0 pulls SDA low, sda_o = 1 releases it
// to the pull-up; sda_i is the line as seen on the pin. scl is driven
// actively as in the original scheme (no clock stretching).
//
// Transmit handshake: tx_data_valid/tx_dat from the transmit interface;
// tx_data_ack pulses for one clk when a byte is taken into the transmit
// register. tx_ip_wr_frm_prgs is set from START to STOP.
//
// The frame, the SCL expression, the posedge/negedge split and the TX and
// RX registers follow the description of this master; open-drain SDA with
// ACK check, NACK abort, multi-byte frames and the read request (rd_start,
// rd_len, ACK all bytes but the last) are this design's own choices.
module i2c_master
  import dma_serial_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [6:0]   slave_addr,
  input  logic         tx_data_valid,
  input  byte_t        tx_dat,
  output logic         tx_data_ack,
  output logic         tx_ip_wr_frm_prgs,
  output logic         nack_err,
  output logic         scl,
  output logic         sda_o,
  input  logic         sda_i,
  // read requests and received data
  input  logic         rd_start,
  input  logic [7:0]   rd_len,
  output logic         rd_pending,
  output byte_t        rx_data,
  output logic         rx_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_ADDR, S_ACK1, S_DATA, S_ACK2, S_RDATA, S_MACK,
    S_STOP1, S_STOP2
  } i2c_state_e;

  i2c_state_e   state;
  logic [2:0]   bit_cnt;
  byte_t        tx_reg;     // TX register
  byte_t        addr_byte;
  logic         i2c_sclen;
  logic         ack_n;      // SDA sampled in the last ACK slot (1 = NACK)
  byte_t        rx_sr;      // RX register, shifted on rising SCL
  logic [7:0]   rd_len_q;   // bytes of the pending or running read
  logic [7:0]   rd_left;    // bytes still to read in this frame
  logic         reading;    // the current frame is a read

  assign scl               = (i2c_sclen == 1'b0) ? 1'b1 : ~clk;
  assign tx_ip_wr_frm_prgs = (state != S_IDLE);

  // SCL enable: changes on the falling edge of clk, so SCL never glitches.
  // It is 0 in IDLE and in both STOP slots, 1 otherwise.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i2c_sclen <= 1'b0;
      ack_n     <= 1'b1;
      rx_sr     <= '0;
    end else begin
      i2c_sclen <= !(state == S_IDLE || state == S_STOP1 || state == S_STOP2);
      if (state == S_ACK1 || state == S_ACK2) ack_n <= sda_i;
      if (state == S_RDATA) rx_sr <= {rx_sr[6:0], sda_i};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      sda_o       <= 1'b1;
      bit_cnt     <= '0;
      tx_reg      <= '0;
      addr_byte   <= '0;
      tx_data_ack <= 1'b0;
      nack_err    <= 1'b0;
      rd_pending  <= 1'b0;
      rd_len_q    <= '0;
      rd_left     <= '0;
      reading     <= 1'b0;
      rx_data     <= '0;
      rx_valid    <= 1'b0;
    end else begin
      tx_data_ack <= 1'b0;
      nack_err    <= 1'b0;
      rx_valid    <= 1'b0;
      if (rd_start && !rd_pending) begin
        rd_pending <= 1'b1;
        rd_len_q   <= (rd_len == 8'd0) ? 8'd1 : rd_len;
      end
      unique case (state)
        S_IDLE: begin
          sda_o <= 1'b1;
          if (tx_data_valid) begin
            tx_reg      <= tx_dat;
            tx_data_ack <= 1'b1;
            addr_byte   <= {slave_addr, 1'b0};
            reading     <= 1'b0;
            sda_o       <= 1'b0;                  // START: SDA falls, SCL high
            state       <= S_START;
          end else if (rd_pending) begin
            rd_pending  <= 1'b0;
            rd_left     <= rd_len_q;
            addr_byte   <= {slave_addr, 1'b1};
            reading     <= 1'b1;
            sda_o       <= 1'b0;
            state       <= S_START;
          end
        end
        S_START: begin
          sda_o   <= addr_byte[7];
          bit_cnt <= 3'd7;
          state   <= S_ADDR;
        end
        S_ADDR: begin
          if (bit_cnt == 3'd0) begin
            sda_o <= 1'b1;                        // release for ACK
            state <= S_ACK1;
          end else begin
            sda_o   <= addr_byte[bit_cnt - 3'd1];
            bit_cnt <= bit_cnt - 3'd1;
          end
        end
        S_ACK1: begin
          if (ack_n) begin
            nack_err <= 1'b1;
            sda_o    <= 1'b0;
            state    <= S_STOP1;
          end else if (reading) begin
            sda_o   <= 1'b1;                      // slave drives the data
            bit_cnt <= 3'd7;
            state   <= S_RDATA;
          end else begin
            sda_o   <= tx_reg[7];
            bit_cnt <= 3'd7;
            state   <= S_DATA;
          end
        end
        S_RDATA: begin
          if (bit_cnt == 3'd0) begin              // 8th bit sampled
            rx_data  <= rx_sr;
            rx_valid <= 1'b1;
            sda_o    <= (rd_left == 8'd1);        // NACK the last byte
            state    <= S_MACK;
          end else begin
            bit_cnt <= bit_cnt - 3'd1;
          end
        end
        S_MACK: begin
          if (rd_left == 8'd1) begin
            sda_o <= 1'b0;
            state <= S_STOP1;
          end else begin
            rd_left <= rd_left - 8'd1;
            sda_o   <= 1'b1;
            bit_cnt <= 3'd7;
            state   <= S_RDATA;
          end
        end
        S_DATA: begin
          if (bit_cnt == 3'd0) begin              // all 8 bits sent
            sda_o <= 1'b1;                        // release for ACK
            state <= S_ACK2;
          end else begin
            sda_o   <= tx_reg[bit_cnt - 3'd1];
            bit_cnt <= bit_cnt - 3'd1;
          end
        end
        S_ACK2: begin
          if (ack_n) begin
            nack_err <= 1'b1;
            sda_o    <= 1'b0;
            state    <= S_STOP1;
          end else if (tx_data_valid) begin       // next byte of the same frame
            tx_reg      <= tx_dat;
            tx_data_ack <= 1'b1;
            sda_o       <= tx_dat[7];
            bit_cnt     <= 3'd7;
            state       <= S_DATA;
          end else begin
            sda_o <= 1'b0;
            state <= S_STOP1;
          end
        end
        S_STOP1: begin
          sda_o <= 1'b1;                          // STOP: SDA rises, SCL high
          state <= S_STOP2;
        end
        S_STOP2: begin
          sda_o <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
