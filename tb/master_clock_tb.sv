// master_clock_tb: checks the reference clock at the default 200 Hz period
// (250,000 clocks of 20 ns: tick spacing and a 125,000-clock high phase of
// ref_out), then at short periods of 10 and 7 clocks, a change of period
// that takes effect at once, and the clamp of period 0 to 2.
`timescale 1ns/1ps
module master_clock_tb;
  import timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, tick, ref_out;
  tval_t period = tval_t'(MASTER_PERIOD);
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  master_clock dut (.clk, .rst_n, .period, .tick, .ref_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // measure n periods: tick spacing and high time of ref_out
  task automatic measure(input int p, input int n);
    int cyc, last, hi, nt;
    cyc = 0; last = -1; hi = 0; nt = 0;
    while (nt <= n) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        check(ref_out, "ref_out high in tick cycle");
        if (last >= 0) begin
          check(cyc - last == p, $sformatf("period %0d exp %0d", cyc - last, p));
          check(hi == p / 2 + p % 2, $sformatf("high time %0d for period %0d", hi, p));
        end
        last = cyc; hi = 0; nt++;
      end
      if (ref_out) hi++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    measure(250_000, 2);
    period <= 10;  measure(10, 5);
    period <= 7;   measure(7, 5);
    period <= 0;   measure(2, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
