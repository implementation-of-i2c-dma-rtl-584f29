// Behavioural model of an I2C slave, for testbenches only.
//
// Watches SCL and the wired-AND SDA line. SDA is looked at 1 ns late so
// that an SDA change made together with an SCL fall is seen after the
// fall (as the hold time of a real bus would ensure). START is SDA falling
// while SCL is high, STOP is SDA rising while SCL is high.
//
// Write frames: bits are taken on rising SCL, MSB first. After an address
// byte that matches ADDR, and after every data byte, the slave pulls SDA
// low for the ACK slot (from the falling SCL edge after bit 8 to the next
// falling edge). Setting nack_next makes it refuse the next data byte (SDA
// left high), which it still records. Received data bytes go into rx_q.
//
// Read frames (address byte with R = 1): after its address ACK the slave
// sends reply(k) for its k-th byte read (k = 0, 1, ... over the whole
// simulation), changing SDA on falling SCL, and releases SDA for the
// master's ACK slot. A master ACK asks for another byte, a NACK ends the
// transfer. Bytes sent go into tx_log; n_master_ack / n_master_nack count
// the master's answers.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h50
) (
  input  logic scl,
  input  logic sda,
  output logic sda_low
);
  logic [7:0] sr = 0, tsr = 0;
  logic       sda_d = 1;
  int         bitn = 0, tbitn = 0, k_rd = 0;
  bit         in_frame = 0, addressed = 0, ack_slot = 0, first = 0;
  bit         rd_mode = 0, sending = 0, mack_slot = 0;
  bit         nack_next = 0;
  logic [7:0] rx_q[$];
  logic [7:0] tx_log[$];
  int         n_start = 0, n_stop = 0, n_addr_ack = 0, n_addr_nack = 0, n_nack = 0;
  int         n_master_ack = 0, n_master_nack = 0;

  function automatic logic [7:0] reply(input int idx);
    return 8'(idx * 71 + 8'hC4);
  endfunction

  initial sda_low = 0;

  always @(sda) sda_d <= #1 sda;

  always @(negedge sda_d) if (scl) begin
    n_start++;
    in_frame = 1; bitn = 0; first = 1; addressed = 0; ack_slot = 0;
    rd_mode = 0; sending = 0; mack_slot = 0;
    sda_low <= 0;
  end

  always @(posedge sda_d) if (scl) begin
    n_stop++;
    in_frame = 0; sending = 0; mack_slot = 0;
    sda_low <= 0;
  end

  always @(posedge scl) begin
    if (in_frame && mack_slot) begin
      if (sda_d) begin n_master_nack++; sending = 0; end
      else n_master_ack++;
    end else if (in_frame && !ack_slot && !rd_mode) begin
      sr = {sr[6:0], sda_d};
      bitn++;
    end
  end

  task automatic start_byte();
    tsr = reply(k_rd);
    k_rd++;
    tx_log.push_back(tsr);
    tbitn = 0;
    sda_low <= !tsr[7];
  endtask

  always @(negedge scl) begin
    if (ack_slot) begin
      ack_slot = 0;
      bitn = 0;
      if (rd_mode && addressed) begin
        sending = 1;
        start_byte();
      end else sda_low <= 0;
    end else if (mack_slot) begin
      mack_slot = 0;
      if (sending) start_byte();
      else sda_low <= 0;
    end else if (sending) begin
      tbitn++;
      if (tbitn == 8) begin
        sda_low <= 0;          // release for the master's ACK
        mack_slot = 1;
      end else sda_low <= !tsr[7 - tbitn];
    end else if (in_frame && bitn == 8) begin
      ack_slot = 1;
      if (first) begin
        first = 0;
        addressed = (sr[7:1] == ADDR);
        rd_mode = sr[0];
        if (addressed) n_addr_ack++; else n_addr_nack++;
        sda_low <= addressed;
      end else if (addressed) begin
        rx_q.push_back(sr);
        if (nack_next) begin
          nack_next = 0;
          n_nack++;
          sda_low <= 0;
        end else sda_low <= 1;
      end else sda_low <= 0;
    end
  end
endmodule
