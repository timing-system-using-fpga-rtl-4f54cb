// uart_transceiver_tb: serial bytes go in on rxd and come out of the
// receive buffer; bytes written to the transmit buffer come out on txd.
// The baud divider is set to 4 (64 clocks per bit) to keep the run short.
// Checks: received bytes in order, a byte with a low stop bit is dropped
// and flagged, seventeen bytes without reading overflow the 16-entry
// receive buffer (one strobe, first sixteen kept), and a burst of
// transmit bytes comes out back to back and intact.
`timescale 1ns/1ps
module uart_transceiver_tb;
  import timing_pkg::*;
  localparam int DIV = 4;
  localparam int BIT = 16 * DIV;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1, txd;
  logic [7:0] rx_data, tx_data = '0;
  logic rx_empty, rx_rd = 0, tx_wr = 0, tx_full;
  uart_err_t err;
  int checks = 0, failures = 0;
  int n_fe = 0, n_ovf = 0;
  always #10 clk = ~clk;

  uart_transceiver #(.BAUD_DIV(DIV)) dut (.clk, .rst_n, .rxd, .txd, .rx_data, .rx_empty,
    .rx_rd, .tx_data, .tx_wr, .tx_full, .err);

  always @(posedge clk) if (rst_n) begin
    if (err.frame_err) n_fe++;
    if (err.rx_overflow) n_ovf++;
    if (err.parity_err) begin failures++; $display("FAIL: parity error without parity"); end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] d, input bit stop_val = 1'b1);
    logic [9:0] f;
    f = {stop_val, d, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd <= f[i]; repeat (BIT) @(posedge clk); end
    rxd <= 1'b1;
    repeat (BIT / 2) @(posedge clk);
  endtask

  task automatic pop(output logic [7:0] d);
    while (rx_empty) @(posedge clk);
    #1 d = rx_data;
    @(negedge clk); rx_rd <= 1'b1; @(posedge clk); #1 rx_rd <= 1'b0;
  endtask

  // independent decoder of txd
  logic [7:0] txq[$];
  initial begin
    forever begin
      logic [7:0] d;
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      if (txd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); d[i] = txd; end
        repeat (BIT) @(posedge clk);
        if (txd == 1'b1) txq.push_back(d);
        else begin failures++; $display("FAIL: tx stop bit"); end
      end
    end
  end

  initial begin
    logic [7:0] d, sent[$];
    int t0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    check(rx_empty && !tx_full && txd, "idle after reset");
    // plain reception
    for (int k = 0; k < 5; k++) begin
      sent.push_back(8'($urandom));
      send(sent[k]);
    end
    send(8'hEE, 1'b0);                // framing error: dropped
    repeat (2 * BIT) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      pop(d);
      check(d == sent[k], $sformatf("rx byte %0d: %h exp %h", k, d, sent[k]));
    end
    check(rx_empty, "bad byte not buffered");
    check(n_fe == 1, $sformatf("framing error strobes %0d", n_fe));
    // overflow of the receive buffer
    sent.delete();
    for (int k = 0; k < 17; k++) begin
      sent.push_back(8'(k * 13 + 1));
      send(sent[k]);
    end
    check(n_ovf == 1, $sformatf("overflow strobes %0d", n_ovf));
    for (int k = 0; k < 16; k++) begin
      pop(d);
      check(d == sent[k], $sformatf("kept byte %0d: %h exp %h", k, d, sent[k]));
    end
    check(rx_empty, "17th byte dropped");
    // transmit burst
    sent.delete();
    @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      sent.push_back(8'($urandom));
      tx_data <= sent[k]; tx_wr <= 1'b1; @(negedge clk);
    end
    tx_wr <= 1'b0;
    t0 = 0;
    while (txq.size() < 10 && t0 < 12 * 10 * BIT) begin @(posedge clk); t0++; end
    check(txq.size() == 10, $sformatf("tx bytes out %0d", txq.size()));
    check(t0 <= 10 * 10 * BIT + 2 * DIV * 16, $sformatf("tx burst took %0d clocks", t0));
    for (int k = 0; k < 10 && k < txq.size(); k++)
      check(txq[k] == sent[k], $sformatf("tx byte %0d: %h exp %h", k, txq[k], sent[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
