// byte_fifo_tb: random pushes and pops against a queue model of the
// 16-entry buffer; checks the head on rd_data, empty, full and the overflow
// strobe for writes into a full buffer, including fill-to-full and
// simultaneous read and write.
`timescale 1ns/1ps
module byte_fifo_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  bit exp_ovf;
  int ovf_seen = 0, full_seen = 0;
  always #10 clk = ~clk;

  byte_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .overflow);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    exp_ovf = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 3000; k++) begin
      bit w, r;
      int bias;
      bias = (k / 300) % 2 ? 75 : 25;   // phases that fill and that drain
      w = ($urandom % 100) < bias + 10;
      r = ($urandom % 100) < 100 - bias;
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 16), "full flag");
      check(overflow == exp_ovf, "overflow strobe");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("head %h exp %h", rd_data, q[0]));
      if (full) full_seen++;
      if (overflow) ovf_seen++;
      wr_en <= w; rd_en <= r; wr_data <= 8'($urandom);
      @(posedge clk);
      exp_ovf = w && q.size() == 16;
      if (r && q.size() > 0) void'(q.pop_front());
      if (w && !exp_ovf) q.push_back(wr_data);
    end
    check(full_seen > 0 && ovf_seen > 0, "buffer filled and overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
