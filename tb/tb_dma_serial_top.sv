// End-to-end testbench for dma_serial_top at its default parameters.
//
// A DMA model writes bytes into the transmit FIFO (holding back while
// tx_fifoAlmostFull is set) and reads the receive FIFO back. An I2C slave
// model (address 0x50, wired-AND SDA) and a mode-0 SPI slave model sit on
// the two buses. Phases:
//   1. I2C: 24 bytes; every byte must arrive in order at the I2C slave.
//      The slave refuses one byte (data NACK), which ends that frame.
//   2. protocol switch requested while an I2C frame is in progress: it
//      must wait for the end of the frame;
//   2b. I2C read of 6 bytes: they arrive through the receive FIFO in order.
//   3. SPI: 24 bytes; all arrive at the SPI slave; the replies go through
//      the receive FIFO, drained by the DMA model on the watermark request.
//   4. SPI with the DMA model not reading: the receive FIFO fills, further
//      bytes are dropped and counted, and the 16 stored bytes are read back.
// Timing checks: the I2C frames take 12 + 9 * (bytes in frame) clocks,
// SS is low for 32 clocks per SPI byte. Each mechanism (almost-full
// back-pressure, I2C multi-byte frame, I2C NACK, deferred
// protocol switch, I2C read frame, SPI back-to-back bytes, RX watermark
// request, RX overflow) is counted and must occur at least once. Watchdog: 40000
// cycles.
module tb_dma_serial_top;
  import dma_serial_pkg::*;

  logic       h_clk = 0, h_reset_b = 0;
  logic       proto_sel = 0;
  logic       tx_wr_pulse = 0;
  byte_t      tx_data_in = 0;
  logic [3:0] tx_wmk_size = 4'd14;
  logic       tx_fifoEmpty, tx_fifoFull, tx_fifoAlmostFull;
  logic [4:0] tx_fifo_cnt;
  logic       rx_rd_pulse = 0;
  logic [3:0] rx_wmk_size = 4'd4;
  byte_t      rx_data_out;
  logic       rx_fifoEmpty, rx_fifoFull, rx_dma_req;
  logic [4:0] rx_fifo_cnt;
  logic       rx_clr_ovf = 0, rx_overflow;
  logic [7:0] rx_drop_cnt;
  logic       proto_active, tx_data_valid, tx_data_ack, tx_ip_wr_frm_prgs;
  logic       i2c_nack_err, spi_done;
  logic [6:0] i2c_slave_addr = 7'h50;
  logic       i2c_rd_start = 0, i2c_rd_pending;
  logic [7:0] i2c_rd_len = 0;
  logic       i2c_scl, i2c_sda_o, i2c_sda_i, sda_low;
  logic       spi_sclk, spi_ss_n, spi_mosi, spi_miso;
  logic [7:0] spi_baud_div = 8'd4;
  byte_t      tx_dat;

  dma_serial_top dut (.*);
  i2c_slave_model #(.ADDR(7'h50)) i2c_slv (.scl(i2c_scl), .sda(i2c_sda_i), .sda_low(sda_low));
  spi_slave_model spi_slv (.sclk(spi_sclk), .ss_n(spi_ss_n), .mosi(spi_mosi), .miso(spi_miso));

  assign i2c_sda_i = i2c_sda_o & ~sda_low;

  always #5 h_clk = ~h_clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_afull = 0, m_i2c_multi = 0, m_nack = 0, m_defer = 0;
  int m_i2c_read = 0, m_spi_b2b = 0, m_rx_req = 0, m_rx_ovf = 0;

  byte_t txq[$];          // bytes the DMA model still has to write
  byte_t rxd[$];          // bytes the DMA model read from the RX FIFO
  bit    rx_enable = 0, rx_drain = 0;
  int    i2c_cycles = 0, i2c_frames = 0, i2c_bytes = 0, frame_bytes = 0;
  int    spi_low = 0, spi_bytes = 0, bytes_in_low = 0;
  bit    i2c_prev = 0, ss_prev = 1;
  logic  i2c_on;

  assign i2c_on = (proto_active == PROTO_I2C);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // DMA model, transmit: write while not almost full
  always @(negedge h_clk) begin
    tx_wr_pulse = 0;
    if (h_reset_b && txq.size() != 0) begin
      if (tx_fifoAlmostFull) m_afull++;
      else begin
        tx_wr_pulse = 1;
        tx_data_in  = txq.pop_front();
      end
    end
  end

  // DMA model, receive: read on the watermark request, or drain
  always @(negedge h_clk) begin
    rx_rd_pulse = 0;
    if (rx_dma_req) m_rx_req++;
    if (h_reset_b && !rx_fifoEmpty && ((rx_enable && rx_dma_req) || rx_drain)) begin
      rx_rd_pulse = 1;
      rxd.push_back(rx_data_out);
    end
  end

  // monitors: I2C frame timing and bytes per frame, SPI SS-low time
  always @(posedge h_clk) if (h_reset_b) begin
    // the protocol select cannot change during a frame, so proto_active
    // tells which master a frame or an acknowledge belongs to
    if (i2c_on && tx_ip_wr_frm_prgs) i2c_cycles++;
    if (i2c_on && tx_data_ack) begin i2c_bytes++; frame_bytes++; end
    if (i2c_prev && !tx_ip_wr_frm_prgs) begin
      i2c_frames++;
      if (frame_bytes > 1) m_i2c_multi++;
      frame_bytes = 0;
    end
    i2c_prev = i2c_on && tx_ip_wr_frm_prgs;
    if (i2c_nack_err) m_nack++;
    if (!spi_ss_n) spi_low++;
    if (spi_done) begin spi_bytes++; bytes_in_low++; end
    if (!ss_prev && spi_ss_n) begin
      if (bytes_in_low > 1) m_spi_b2b++;
      bytes_in_low = 0;
    end
    ss_prev = spi_ss_n;
    if (rx_overflow) m_rx_ovf++;
  end

  task automatic wait_tx_done();
    do @(posedge h_clk);
    while (txq.size() != 0 || !tx_fifoEmpty || tx_data_valid || tx_ip_wr_frm_prgs || i2c_rd_pending);
    repeat (4) @(posedge h_clk);
  endtask

  initial begin
    repeat (40000) @(posedge h_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t sent[$];
    int n;
    repeat (3) @(posedge h_clk);
    h_reset_b = 1;
    repeat (2) @(posedge h_clk);
    check(tx_fifoEmpty && rx_fifoEmpty && proto_active == PROTO_I2C, "state after reset");

    // ---- 1. I2C, 24 bytes, one refused
    for (int i = 0; i < 24; i++) begin
      byte_t b = 8'(i * 29 + 3);
      txq.push_back(b); sent.push_back(b);
    end
    wait (i2c_slv.rx_q.size() == 5);
    i2c_slv.nack_next = 1;
    // ---- 2. request SPI during an I2C frame: must be deferred
    wait (tx_ip_wr_frm_prgs);
    @(negedge h_clk);
    proto_sel = PROTO_SPI;
    while (tx_ip_wr_frm_prgs) begin
      @(posedge h_clk); #1;
      if (tx_ip_wr_frm_prgs) begin
        check(proto_active == PROTO_I2C, "protocol switched during a frame");
        m_defer++;
      end
    end
    proto_sel = PROTO_I2C;   // stay on I2C until phase 1 is complete
    wait_tx_done();
    check(i2c_slv.rx_q.size() == 24, $sformatf("I2C slave got %0d of 24 bytes", i2c_slv.rx_q.size()));
    for (int i = 0; i < 24 && i < i2c_slv.rx_q.size(); i++)
      check(i2c_slv.rx_q[i] == sent[i], $sformatf("I2C byte %0d", i));
    check(i2c_bytes == 24, "24 bytes acknowledged to the interface");
    check(i2c_cycles == 12 * i2c_frames + 9 * i2c_bytes,
          $sformatf("I2C time %0d clocks for %0d frames / %0d bytes", i2c_cycles, i2c_frames, i2c_bytes));
    check(i2c_slv.n_start == i2c_frames && i2c_slv.n_stop == i2c_frames, "START/STOP per frame");
    check(spi_slv.rx_q.size() == 0 && spi_slv.n_sclk_rise == 0, "SPI bus quiet while I2C selected");

    // ---- 2b. I2C read of six bytes into the RX FIFO
    rxd.delete();
    rx_enable = 1;
    @(negedge h_clk);
    i2c_rd_start = 1; i2c_rd_len = 8'd6;
    @(negedge h_clk);
    i2c_rd_start = 0;
    wait (tx_ip_wr_frm_prgs);
    m_i2c_read++;
    wait_tx_done();
    rx_drain = 1;
    repeat (20) @(posedge h_clk);
    rx_drain = 0;
    check(rxd.size() == 6, $sformatf("I2C read gave %0d of 6 bytes", rxd.size()));
    for (int i = 0; i < 6 && i < rxd.size(); i++)
      check(rxd[i] == i2c_slv.reply(i), $sformatf("I2C read byte %0d", i));
    check(i2c_cycles == 12 * i2c_frames + 9 * (i2c_bytes + 6), "I2C read frame time");
    rxd.delete();
    rx_enable = 0;

    // ---- 3. SPI, 24 bytes, RX drained on watermark
    proto_sel = PROTO_SPI;
    repeat (2) @(posedge h_clk);
    check(proto_active == PROTO_SPI, "switched to SPI");
    sent.delete();
    rx_enable = 1;
    for (int i = 0; i < 24; i++) begin
      byte_t b = 8'(i * 53 + 11);
      txq.push_back(b); sent.push_back(b);
    end
    wait_tx_done();
    rx_drain = 1;
    repeat (40) @(posedge h_clk);
    rx_drain = 0;
    check(spi_slv.rx_q.size() == 24, $sformatf("SPI slave got %0d of 24 bytes", spi_slv.rx_q.size()));
    for (int i = 0; i < 24 && i < spi_slv.rx_q.size(); i++)
      check(spi_slv.rx_q[i] == sent[i], $sformatf("SPI byte %0d", i));
    check(rxd.size() == 24, $sformatf("RX FIFO gave %0d of 24 replies", rxd.size()));
    for (int i = 0; i < 24 && i < rxd.size(); i++)
      check(rxd[i] == spi_slv.reply(i), $sformatf("SPI reply %0d", i));
    check(spi_low == 32 * spi_bytes, $sformatf("SS low %0d clocks for %0d bytes", spi_low, spi_bytes));
    check(i2c_slv.rx_q.size() == 24, "I2C bus quiet while SPI selected");
    check(!rx_overflow, "no overflow while draining");

    // ---- 4. RX overflow: 20 bytes, nobody reads
    rx_enable = 0; rxd.delete();
    for (int i = 0; i < 20; i++) txq.push_back(8'(i));
    wait_tx_done();
    check(rx_fifoFull && rx_fifo_cnt == 16, "RX FIFO full");
    check(rx_overflow && rx_drop_cnt == 4, $sformatf("overflow, %0d dropped", rx_drop_cnt));
    rx_drain = 1;
    repeat (40) @(posedge h_clk);
    rx_drain = 0;
    check(rxd.size() == 16, "16 stored replies read back");
    for (int i = 0; i < 16 && i < rxd.size(); i++)
      check(rxd[i] == spi_slv.reply(24 + i), $sformatf("stored reply %0d", i));
    @(negedge h_clk); rx_clr_ovf = 1; @(negedge h_clk); rx_clr_ovf = 0;
    check(!rx_overflow, "overflow cleared");

    // ---- mechanisms
    $display("mechanisms: almost_full=%0d i2c_multi_byte_frames=%0d i2c_nack=%0d deferred_switch=%0d i2c_read=%0d spi_back_to_back=%0d rx_watermark_req=%0d rx_overflow=%0d",
             m_afull, m_i2c_multi, m_nack, m_defer, m_i2c_read, m_spi_b2b, m_rx_req, m_rx_ovf);
    check(m_afull > 0, "almost-full back-pressure never happened");
    check(m_i2c_multi > 0, "no multi-byte I2C frame");
    check(m_nack == 1, "I2C NACK count");
    check(m_defer > 0, "protocol switch never deferred");
    check(m_i2c_read > 0, "no I2C read frame");
    check(m_spi_b2b > 0, "no back-to-back SPI bytes");
    check(m_rx_req > 0, "RX watermark request never raised");
    check(m_rx_ovf > 0, "RX overflow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
