// Behavioural model of an SPI slave (mode 0, MSB first), for testbenches
// only.
//
// While ss_n is low it samples MOSI on rising SCLK and shifts its reply
// out on MISO, changing MISO on falling SCLK. The reply to the k-th byte
// of the simulation (k = 0, 1, ...) is reply(k) = 8'(k * 37 + 8'h5A), so a
// testbench can predict what the master must receive. Every byte received
// goes into rx_q; n_sclk_rise counts rising SCLK edges while selected and
// n_sclk_unsel those while not selected.
module spi_slave_model (
  input  logic sclk,
  input  logic ss_n,
  input  logic mosi,
  output logic miso
);
  logic [7:0] sr_in = 0, sr_out = 0;
  int         bitn = 0, k = 0;
  logic [7:0] rx_q[$];
  int         n_sclk_rise = 0, n_sclk_unsel = 0;

  function automatic logic [7:0] reply(input int idx);
    return 8'(idx * 37 + 8'h5A);
  endfunction

  initial begin
    sr_out = reply(0);
    miso   = sr_out[7];
  end

  always @(negedge ss_n) begin
    bitn = 0;
    miso = sr_out[7];
  end

  // A byte is complete at its 8th rising edge; the next falling edge
  // (which comes together with ss_n rising at the end of a frame) loads
  // the next reply.
  always @(posedge sclk) begin
    if (!ss_n) begin
      n_sclk_rise++;
      sr_in = {sr_in[6:0], mosi};
      bitn++;
      if (bitn == 8) begin
        rx_q.push_back(sr_in);
        bitn = 0;
        k++;
      end
    end else n_sclk_unsel++;
  end

  always @(negedge sclk) begin
    if (bitn == 0) sr_out = reply(k);
    else           sr_out = {sr_out[6:0], 1'b0};
    miso = sr_out[7];
  end
endmodule
