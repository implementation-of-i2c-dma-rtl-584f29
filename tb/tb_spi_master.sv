// Self-checking testbench for spi_master (baud-rate divisor 4, then 8
// and 2).
//
// A mode-0 SPI slave model answers every byte with a known reply; a byte
// source plays the transmit interface (valid/ack). Runs:
//   1. one byte 8'hA5: the slave receives it, the master receives reply(0),
//      8 SCLK pulses, ss_n low for 8 * 4 = 32 clocks, SCLK period 4 clocks;
//   2. five bytes offered back to back: one ss_n-low period of 160 clocks,
//      all bytes and replies in order, one done pulse per byte;
//   3. a byte offered only after the master went idle: a new frame;
//   4. two-byte bursts with divisors 8 and 2: 16 * divisor clocks.
// SCLK must never pulse while ss_n is high. Watchdog: 8000 cycles.
module tb_spi_master;
  localparam int DIV = 4;

  logic       clk = 0, rst_n = 0;
  logic [7:0] baud_div = 8'(DIV);
  logic       tx_data_valid = 0;
  logic [7:0] tx_dat = 0;
  logic       tx_data_ack, tx_ip_wr_frm_prgs, sclk, ss_n, mosi, miso;
  logic [7:0] rx_data;
  logic       rx_valid, done;

  int checks = 0, failures = 0;
  int n_done = 0, low_len = 0, last_rise = -1, bad_period = 0, n_period = 0, cyc = 0;
  int lows[$];
  logic [7:0] src[$];
  logic [7:0] got[$];

  spi_master dut (.*);
  spi_slave_model slv (.sclk, .ss_n, .mosi, .miso);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) begin
    if (tx_data_ack) void'(src.pop_front());
    tx_data_valid = (src.size() != 0);
    tx_dat        = (src.size() != 0) ? src[0] : 8'h00;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (rx_valid) got.push_back(rx_data);
    if (done) n_done++;
    if (!ss_n) low_len++;
    else if (low_len != 0) begin
      lows.push_back(low_len);
      low_len = 0;
    end
  end

  always @(posedge sclk) begin
    if (last_rise >= 0 && !ss_n) begin
      n_period++;
      if ((cyc - last_rise) != int'(baud_div)) bad_period++;
    end
    last_rise = ss_n ? -1 : cyc;
  end
  always @(negedge ss_n) last_rise = -1;

  task automatic wait_idle();
    do @(posedge clk); while (src.size() != 0 || tx_ip_wr_frm_prgs);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dvs[2] = '{8, 2};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(ss_n && !sclk, "idle after reset");

    // 1. one byte
    src.push_back(8'hA5);
    wait_idle();
    check(slv.rx_q.size() == 1 && slv.rx_q[0] == 8'hA5, "slave received A5");
    check(got.size() == 1 && got[0] == slv.reply(0), "master received reply(0)");
    check(slv.n_sclk_rise == 8, $sformatf("SCLK pulses %0d, expected 8", slv.n_sclk_rise));
    check(lows.size() == 1 && lows[0] == 8 * DIV, "ss_n low for 8*DIV clocks");
    check(n_done == 1, "one done pulse");

    // 2. back-to-back burst
    lows.delete(); got.delete(); slv.rx_q.delete();
    for (int i = 0; i < 5; i++) src.push_back(8'(8'h30 + i * 17));
    wait_idle();
    check(slv.rx_q.size() == 5, "burst: slave got five bytes");
    for (int i = 0; i < 5 && i < slv.rx_q.size(); i++)
      check(slv.rx_q[i] == 8'(8'h30 + i * 17), $sformatf("burst byte %0d", i));
    check(got.size() == 5, "burst: master got five bytes");
    for (int i = 0; i < 5 && i < got.size(); i++)
      check(got[i] == slv.reply(i + 1), $sformatf("burst reply %0d", i));
    check(lows.size() == 1 && lows[0] == 5 * 8 * DIV, "burst in one ss_n-low period");
    check(n_done == 6, "one done pulse per byte");

    // 3. a later byte starts a new frame
    lows.delete(); got.delete();
    src.push_back(8'h0F);
    wait_idle();
    check(lows.size() == 1 && got.size() == 1 && got[0] == slv.reply(6), "new frame after idle");

    // 4. other baud-rate divisors: 8 and 2
    foreach (dvs[j]) begin
      baud_div = 8'(dvs[j]);
      lows.delete(); got.delete(); slv.rx_q.delete();
      src.push_back(8'hC3); src.push_back(8'h3C);
      wait_idle();
      check(lows.size() == 1 && lows[0] == 2 * 8 * dvs[j], $sformatf("divisor %0d: ss_n low %0d clocks", dvs[j], lows.size() ? lows[0] : 0));
      check(slv.rx_q.size() == 2 && slv.rx_q[0] == 8'hC3 && slv.rx_q[1] == 8'h3C, $sformatf("divisor %0d: data", dvs[j]));
      check(got.size() == 2 && got[0] == slv.reply(7 + 2 * j) && got[1] == slv.reply(8 + 2 * j), $sformatf("divisor %0d: replies", dvs[j]));
    end

    check(n_period > 40 && bad_period == 0, $sformatf("SCLK period: %0d bad of %0d", bad_period, n_period));
    check(slv.n_sclk_unsel == 0, "SCLK pulse while ss_n high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
