// baud_gen_tb: checks the oversampling tick of baud_gen at its default
// divider (163): the first tick 163 clocks after reset, then exactly one
// tick every 163 clocks, each one clock long.
`timescale 1ns/1ps
module baud_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0, tick;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  baud_gen dut (.clk, .rst_n, .tick);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int last, cyc, n;
    last = 0; cyc = 0; n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (n < 20) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        if (n == 0) check(cyc == 163, $sformatf("first tick after %0d clocks", cyc));
        else        check(cyc - last == 163, $sformatf("tick spacing %0d", cyc - last));
        last = cyc; n++;
      end
    end
    // 16 ticks per bit at 50 MHz: 16*163 clocks = 52.16 us, 19,172 baud
    check(16 * 163 * 19200 < 50_100_000 && 16 * 163 * 19200 > 49_900_000, "baud error");
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
