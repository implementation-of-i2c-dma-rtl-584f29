// Self-checking testbench for i2c_master.
//
// An I2C slave model (i2c_slave_model, address 0x50) sits on a wired-AND
// SDA line; a byte source plays the transmit interface (valid/ack). Runs:
//   1. one byte 8'b00110011 to address 0x50: slave receives it, one START
//      and one STOP, 19 SCL pulses (9 address+ACK, 9 data+ACK, 1 STOP) and
//      21 clocks with tx_ip_wr_frm_prgs set;
//   2. a 4-byte burst offered back to back: one frame, 48 clocks;
//   3. a wrong address: NACK after the address, nack_err, 12-clock frame,
//      nothing received;
//   4. a data NACK in the middle of a 3-byte burst: the frame ends after
//      the refused byte and the rest follows in a new frame;
//   5. a 3-byte read: the slave's bytes arrive on rx_data in order, the
//      master ACKs two and NACKs the last, 39-clock frame;
//   6. a read from a wrong address: NACK, no data; a read of length 0
//      reads one byte; a read requested together with a write byte waits
//      for the write frame.
// SCL must stay high whenever no frame is in progress. Watchdog: 8000
// cycles.
module tb_i2c_master;
  logic       clk = 0, rst_n = 0;
  logic [6:0] slave_addr = 7'h50;
  logic       tx_data_valid = 0;
  logic [7:0] tx_dat = 0;
  logic       tx_data_ack, tx_ip_wr_frm_prgs, nack_err, scl, sda_o, sda_i;
  logic       sda_low;
  logic       rd_start = 0, rd_pending, rx_valid;
  logic [7:0] rd_len = 0;
  logic [7:0] rx_data;
  logic [7:0] rxd[$];

  int checks = 0, failures = 0;
  int n_scl = 0, n_nack_err = 0, frame_len = 0;
  int frames[$];
  logic [7:0] src[$];

  i2c_master dut (.*);
  i2c_slave_model #(.ADDR(7'h50)) slv (.scl(scl), .sda(sda_i), .sda_low(sda_low));

  assign sda_i = sda_o & ~sda_low;   // open-drain line with pull-up

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // byte source: behaves like the transmit interface
  always @(negedge clk) begin
    if (tx_data_ack) void'(src.pop_front());
    tx_data_valid = (src.size() != 0);
    tx_dat        = (src.size() != 0) ? src[0] : 8'h00;
  end

  always @(posedge scl) n_scl++;
  always @(posedge clk) if (rst_n && rx_valid) rxd.push_back(rx_data);
  always @(posedge clk) if (rst_n) begin
    if (nack_err) n_nack_err++;
    if (tx_ip_wr_frm_prgs) frame_len++;
    else if (frame_len != 0) begin
      frames.push_back(frame_len);
      frame_len = 0;
    end
  end
  // SCL idles high
  always @(negedge clk) if (rst_n && !tx_ip_wr_frm_prgs) begin
    checks++;
    if (!scl) begin failures++; $display("FAIL %0t: SCL low while idle", $time); end
  end

  task automatic read(input int n);
    @(negedge clk);
    rd_start = 1; rd_len = 8'(n);
    @(negedge clk);
    rd_start = 0;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (src.size() != 0 || tx_ip_wr_frm_prgs || rd_pending);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, p0, b0, sc0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(scl && sda_i, "bus idle after reset");

    // 1. single byte
    sc0 = n_scl;
    src.push_back(8'b0011_0011);
    wait_idle();
    check(slv.rx_q.size() == 1 && slv.rx_q[0] == 8'h33, "single byte received");
    check(slv.n_start == 1 && slv.n_stop == 1, "one START and one STOP");
    check(n_scl - sc0 == 19, $sformatf("SCL pulses %0d, expected 19", n_scl - sc0));
    check(frames.size() == 1 && frames[0] == 21, "single-byte frame length 21 clocks");
    check(n_nack_err == 0, "no NACK");

    // 2. burst of four bytes in one frame
    slv.rx_q.delete(); frames.delete(); sc0 = n_scl;
    src.push_back(8'hA1); src.push_back(8'h5C); src.push_back(8'hFF); src.push_back(8'h00);
    wait_idle();
    check(slv.rx_q.size() == 4, "burst: four bytes");
    if (slv.rx_q.size() == 4)
      check(slv.rx_q[0] == 8'hA1 && slv.rx_q[1] == 8'h5C && slv.rx_q[2] == 8'hFF && slv.rx_q[3] == 8'h00,
            "burst data");
    check(slv.n_start == 2 && slv.n_stop == 2, "burst is one frame");
    check(frames.size() == 1 && frames[0] == 48, "burst frame length 48 clocks");
    check(n_scl - sc0 == 46, $sformatf("burst SCL pulses %0d, expected 46", n_scl - sc0));

    // 3. wrong address
    slv.rx_q.delete(); frames.delete();
    slave_addr = 7'h51;
    src.push_back(8'h77);
    wait_idle();
    check(n_nack_err == 1, "address NACK reported");
    check(slv.rx_q.size() == 0, "nothing received on address NACK");
    check(slv.n_addr_nack == 1, "slave saw a foreign address");
    check(frames.size() == 1 && frames[0] == 12, "address-NACK frame length 12 clocks");
    check(slv.n_stop == 3, "STOP after address NACK");
    slave_addr = 7'h50;

    // 4. data NACK inside a burst
    slv.rx_q.delete(); frames.delete();
    slv.nack_next = 1;
    src.push_back(8'h11); src.push_back(8'h22); src.push_back(8'h33);
    wait_idle();
    check(n_nack_err == 2, "data NACK reported");
    check(slv.rx_q.size() == 3 && slv.rx_q[0] == 8'h11 && slv.rx_q[1] == 8'h22 && slv.rx_q[2] == 8'h33,
          "bytes after a data NACK");
    check(frames.size() == 2, "data NACK splits the burst into two frames");
    check(slv.n_start == 5 && slv.n_stop == 5, "START/STOP count");

    // 5. read three bytes
    frames.delete(); rxd.delete();
    read(3);
    wait_idle();
    check(rxd.size() == 3, $sformatf("read: %0d bytes", rxd.size()));
    for (int i = 0; i < 3 && i < rxd.size(); i++)
      check(rxd[i] == slv.reply(i), $sformatf("read byte %0d: %02h", i, rxd[i]));
    check(slv.n_master_ack == 2 && slv.n_master_nack == 1, "master ACKs all but the last byte");
    check(frames.size() == 1 && frames[0] == 39, "3-byte read frame length 39 clocks");
    check(n_nack_err == 2, "no NACK on a good read");

    // 6. read from a wrong address, read of length 0, read behind a write
    frames.delete(); rxd.delete();
    slave_addr = 7'h22;
    read(2);
    wait_idle();
    check(n_nack_err == 3 && rxd.size() == 0, "read from a wrong address");
    slave_addr = 7'h50;
    read(0);
    wait_idle();
    check(rxd.size() == 1 && rxd[0] == slv.reply(3), "read of length 0 reads one byte");
    rxd.delete(); slv.rx_q.delete(); frames.delete();
    @(negedge clk);
    src.push_back(8'h9E);
    rd_start = 1; rd_len = 8'd2;
    @(negedge clk);
    rd_start = 0;
    wait_idle();
    check(slv.rx_q.size() == 1 && slv.rx_q[0] == 8'h9E, "write before the waiting read");
    check(rxd.size() == 2 && rxd[0] == slv.reply(4) && rxd[1] == slv.reply(5), "read after the write");
    check(frames.size() == 2, "write frame, then read frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
