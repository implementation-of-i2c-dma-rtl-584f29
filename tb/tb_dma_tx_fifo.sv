// Self-checking testbench for dma_tx_fifo.
//
// Drives random write and read pulses (biased so the FIFO passes through
// empty, almost full and full) and compares every output each cycle with
// a queue-based reference model: show-ahead data, empty, full, count and
// the watermark flag (count >= tx_wmk_size). Also checks that a write into
// a full FIFO is dropped and that a read and write together on a full FIFO
// both happen. Watchdog: 20000 cycles.
module tb_dma_tx_fifo;
  localparam int DEPTH = 16;

  logic       h_clk = 0, h_reset_b = 0;
  logic       tx_wr_pulse = 0, tx_rd_pulse = 0;
  logic [7:0] tx_data_in = 0;
  logic [3:0] tx_wmk_size = 4'd12;
  logic [7:0] tx_data_out;
  logic       tx_fifoEmpty, tx_fifoFull, tx_fifoAlmostFull;
  logic [4:0] fifo_cnt;

  int checks = 0, failures = 0;
  int seen_full = 0, seen_afull = 0, seen_wr_full = 0, seen_rw_full = 0;
  logic [7:0] model[$];

  dma_tx_fifo dut (.*);

  always #5 h_clk = ~h_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic compare();
    check(tx_fifoEmpty == (model.size() == 0), "empty");
    check(tx_fifoFull == (model.size() == DEPTH), "full");
    check(fifo_cnt == model.size(), $sformatf("count %0d vs %0d", fifo_cnt, model.size()));
    check(tx_fifoAlmostFull == (model.size() >= tx_wmk_size), "almost full");
    if (model.size() != 0)
      check(tx_data_out == model[0], $sformatf("data %02h vs %02h", tx_data_out, model[0]));
  endtask

  initial begin
    repeat (20000) @(posedge h_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr_bias;
    repeat (3) @(posedge h_clk);
    h_reset_b = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge h_clk);
      compare();
      wr_bias = ((cyc / 500) % 2 == 0) ? 80 : 25;
      tx_wr_pulse = ($urandom_range(99) < wr_bias);
      tx_rd_pulse = ($urandom_range(99) < 50);
      tx_data_in  = 8'($urandom);
      if (cyc % 700 == 0) tx_wmk_size = 4'($urandom);
      if (model.size() == DEPTH) seen_full++;
      if (model.size() >= tx_wmk_size) seen_afull++;
      if (model.size() == DEPTH && tx_wr_pulse && !tx_rd_pulse) seen_wr_full++;
      if (model.size() == DEPTH && tx_wr_pulse && tx_rd_pulse) seen_rw_full++;
      @(posedge h_clk);
      // reference model update (same rules as the specification)
      begin
        automatic bit rd = tx_rd_pulse && model.size() != 0;
        automatic bit wr = tx_wr_pulse && (model.size() != DEPTH || rd);
        automatic logic [7:0] d = tx_data_in;
        if (rd) void'(model.pop_front());
        if (wr) model.push_back(d);
      end
    end
    check(seen_full > 0, "FIFO never full");
    check(seen_afull > 0, "watermark never reached");
    check(seen_wr_full > 0, "no write into full FIFO");
    check(seen_rw_full > 0, "no read+write on full FIFO");
    $display("full=%0d afull=%0d wr_on_full=%0d rw_on_full=%0d", seen_full, seen_afull, seen_wr_full, seen_rw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
