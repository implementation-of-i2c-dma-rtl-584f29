// Self-checking testbench for dma_tx_ip_interface.
//
// A queue stands in for the show-ahead transmit FIFO; random bytes are
// pushed into it and a random "master" acknowledges the offered byte when
// tx_data_valid is set. Checks: every acknowledged byte is the next one in
// push order; no pop while the FIFO is empty; the offered byte is stable
// until acknowledged; a byte reaches tx_data_valid one cycle after it can
// be popped (holding register empty); back-to-back acknowledges (a pop in
// the same cycle as an acknowledge) happen. Watchdog: 20000 cycles.
module tb_dma_tx_ip_interface;
  logic       h_clk = 0, h_reset_b = 0;
  logic       tx_fifoEmpty;
  logic [7:0] tx_fifo_data_in;
  logic       tx_rd_pulse;
  logic       tx_data_valid;
  logic [7:0] tx_dat;
  logic       tx_data_ack = 0;

  int checks = 0, failures = 0;
  int n_b2b = 0, n_delivered = 0;
  logic [7:0] fifo[$];
  logic [7:0] sent[$];
  logic [7:0] held;
  bit         was_valid = 0;

  dma_tx_ip_interface dut (.*);

  // FIFO outputs, refreshed after every change of the queue
  task automatic upd();
    tx_fifoEmpty    = (fifo.size() == 0);
    tx_fifo_data_in = (fifo.size() != 0) ? fifo[0] : 8'h00;
  endtask

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
    upd();
    repeat (3) @(posedge h_clk);
    h_reset_b = 1;
    // latency: a byte put into an empty FIFO is offered one cycle later.
    // The queue is only changed at falling edges, so the interface samples
    // stable FIFO outputs at every rising edge.
    @(negedge h_clk);
    check(!tx_data_valid, "valid after reset");
    fifo.push_back(8'hA5); sent.push_back(8'hA5);
    upd();
    #1;
    check(tx_rd_pulse, "pop of the first byte");
    @(negedge h_clk);
    void'(fifo.pop_front());
    upd();
    check(tx_data_valid && tx_dat == 8'hA5, "first byte offered one cycle after pop");
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit rd;
      tx_data_ack = tx_data_valid && ($urandom_range(99) < 60);
      #1;
      rd = tx_rd_pulse;
      check(!(rd && tx_fifoEmpty), "pop while empty");
      if (was_valid && tx_data_valid) check(tx_dat == held, "offered byte changed before acknowledge");
      if (tx_data_ack) begin
        logic [7:0] exp;
        exp = sent.pop_front();
        check(tx_dat == exp, $sformatf("delivered %02h, expected %02h", tx_dat, exp));
        n_delivered++;
        if (rd) n_b2b++;
      end
      was_valid = tx_data_valid && !tx_data_ack;
      held = tx_dat;
      @(negedge h_clk);
      if (rd) void'(fifo.pop_front());
      if ($urandom_range(99) < ((cyc / 1000) % 2 == 0 ? 45 : 10) && fifo.size() < 16) begin
        automatic logic [7:0] d = 8'($urandom);
        fifo.push_back(d); sent.push_back(d);
      end
      upd();
    end
    check(n_delivered > 1000, "too few bytes delivered");
    check(n_b2b > 0, "no pop in the same cycle as an acknowledge");
    $display("delivered=%0d back_to_back=%0d", n_delivered, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
