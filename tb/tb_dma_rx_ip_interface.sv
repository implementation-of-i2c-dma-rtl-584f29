// Self-checking testbench for dma_rx_ip_interface.
//
// Sends random received bytes (one-cycle rx_valid) while the FIFO-full
// input is randomly set, and checks against a reference model: a byte is
// written (rx_wr_pulse with that byte) exactly one cycle after its
// rx_valid when the FIFO is not full; otherwise it is dropped, rx_overflow
// becomes set and rx_drop_cnt counts it; rx_clr_ovf clears the flag.
// Watchdog: 20000 cycles.
module tb_dma_rx_ip_interface;
  logic       h_clk = 0, h_reset_b = 0;
  logic       rx_valid = 0;
  logic [7:0] rx_data = 0;
  logic       rx_fifoFull = 0;
  logic       rx_wr_pulse;
  logic [7:0] rx_fifo_data;
  logic       rx_clr_ovf = 0;
  logic       rx_overflow;
  logic [7:0] rx_drop_cnt;

  int checks = 0, failures = 0, n_writes = 0, n_drops = 0;
  bit         pend_m = 0, ovf_m = 0;
  logic [7:0] data_m = 0, drops_m = 0;

  dma_rx_ip_interface dut (.*);

  always #5 h_clk = ~h_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge h_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge h_clk);
    h_reset_b = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge h_clk);
      rx_valid    = ($urandom_range(99) < 40);
      rx_data     = 8'($urandom);
      rx_fifoFull = ($urandom_range(99) < 20);
      rx_clr_ovf  = ($urandom_range(99) < 3);
      #1;
      check(rx_wr_pulse == (pend_m && !rx_fifoFull), "write pulse");
      if (rx_wr_pulse) begin
        check(rx_fifo_data == data_m, $sformatf("written %02h, expected %02h", rx_fifo_data, data_m));
        n_writes++;
      end
      check(rx_overflow == ovf_m, "overflow flag");
      check(rx_drop_cnt == drops_m, "drop count");
      // model update for the coming rising edge
      if (pend_m && rx_fifoFull) begin
        ovf_m = 1; n_drops++;
        if (drops_m != 8'hFF) drops_m++;
      end else if (rx_clr_ovf) ovf_m = 0;
      pend_m = rx_valid;
      if (rx_valid) data_m = rx_data;
    end
    check(n_writes > 100 && n_drops > 10, "too few writes or drops");
    $display("writes=%0d drops=%0d", n_writes, n_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
