// data_splitter_tb: feeds command frames through a queue that behaves like
// the receive buffer (show-ahead head, pop on rx_rd) with random gaps, and
// checks the channel settings, the master clock period, the acknowledgement
// bytes, that invalid header bytes are dropped and counted, and that an
// acknowledgement is skipped, not blocked, when the transmit side is full.
`timescale 1ns/1ps
module data_splitter_tb;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] rx_data, tx_data;
  logic rx_empty, rx_rd, tx_wr, tx_full = 1'b0;
  chan_cfg_t cfg [DEF_NUM_CH];
  tval_t period;
  logic cmd_done, bad_header;
  int checks = 0, failures = 0;
  logic [7:0] inq[$], acks[$];
  bit gate = 1'b0;        // random gaps in the byte stream
  int n_done = 0, n_bad = 0;
  always #10 clk = ~clk;

  assign rx_empty = (inq.size() == 0) || gate;
  assign rx_data  = (inq.size() == 0) ? 8'h00 : inq[0];

  data_splitter dut (.clk, .rst_n, .rx_data, .rx_empty, .rx_rd, .tx_data, .tx_wr, .tx_full,
                     .cfg, .period, .cmd_done, .bad_header);

  always @(posedge clk) if (rst_n) begin
    if (rx_rd && !rx_empty) void'(inq.pop_front());
    if (tx_wr) acks.push_back(tx_data);
    if (cmd_done) n_done++;
    if (bad_header) n_bad++;
    gate <= ($urandom % 3) == 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame(input logic [3:0] addr, input int unsigned a, input int unsigned b);
    inq.push_back({4'hA, addr});
    for (int i = 2; i >= 0; i--) inq.push_back(8'(a >> (8 * i)));
    for (int i = 2; i >= 0; i--) inq.push_back(8'(b >> (8 * i)));
  endtask

  task automatic drain;
    while (inq.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int unsigned w [DEF_NUM_CH], d [DEF_NUM_CH];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk); #1;
    check(period == tval_t'(MASTER_PERIOD), "reset period 250000");
    for (int i = 0; i < DEF_NUM_CH; i++) check(cfg[i] == '0, "reset settings zero");
    // Table 1 in 20 ns steps, then random settings
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < DEF_NUM_CH; i++) begin
        w[i] = (r == 0) ? 5 * (i + 1) : $urandom % (1 << 24);
        d[i] = (r == 0) ? (5 * i + 1) / 2 : $urandom % (1 << 24);
        frame(4'(i), w[i], d[i]);
      end
      drain();
      for (int i = 0; i < DEF_NUM_CH; i++) begin
        check(cfg[i].width == tval_t'(w[i]), $sformatf("ch%0d width %0d exp %0d", i, cfg[i].width, w[i]));
        check(cfg[i].delay == tval_t'(d[i]), $sformatf("ch%0d delay %0d exp %0d", i, cfg[i].delay, d[i]));
      end
    end
    check(acks.size() == 24, $sformatf("acks %0d", acks.size()));
    for (int k = 0; k < acks.size(); k++)
      check(acks[k] == {4'hA, 4'(k % 4)}, $sformatf("ack %0d = %h", k, acks[k]));
    // master clock period
    frame(4'd4, 1000, 12345);
    drain();
    check(period == 1000, $sformatf("period %0d", period));
    for (int i = 0; i < DEF_NUM_CH; i++) check(cfg[i].width == tval_t'(w[i]), "period frame leaves channels");
    // junk bytes between frames: bad tag, bad address
    inq.push_back(8'h55); inq.push_back(8'hA7); inq.push_back(8'h00);
    frame(4'd2, 77, 88);
    drain();
    check(n_bad == 3, $sformatf("bad header bytes %0d", n_bad));
    check(cfg[2].width == 77 && cfg[2].delay == 88, "frame after junk applied");
    // acknowledgement skipped while tx side is full
    acks.delete();
    tx_full = 1'b1;
    frame(4'd1, 5, 6);
    drain();
    tx_full = 1'b0;
    check(acks.size() == 0 && cfg[1].width == 5 && cfg[1].delay == 6, "full tx: applied, no ack");
    check(n_done == 27, $sformatf("commands done %0d", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
