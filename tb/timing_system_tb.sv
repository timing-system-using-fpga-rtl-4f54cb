// timing_system_tb: end-to-end test of the timing system at its default
// parameters (50 MHz clock, divider 163, 200 Hz reference, four channels).
// A behavioural PC sends command frames on rxd at 16 x 163 clocks per bit
// and decodes the acknowledgements on txd. The test:
//   - sends a stray byte (dropped as a bad header) and a byte with a low
//     stop bit (framing error);
//   - programs the Table 1 settings (widths 100/200/300/400 ns, delays
//     0/50/100/150 ns, rounded to 20 ns steps: 5/10/15/20 and 0/3/5/8);
//   - checks that a setting that arrives mid-period waits for the next
//     reference tick;
//   - measures the 200 Hz reference (250,000 clocks) and, on every
//     channel, the rising edge (delay+1 clocks after the reference edge)
//     and the width, over two periods;
//   - switches the master clock to 1,000 clocks and measures it again.
// Each mechanism is counted and a failure is counted for one that never
// happened.
`timescale 1ns/1ps
module timing_system_tb;
  import timing_pkg::*;
  localparam int BIT = 16 * DEF_BAUD_DIV;
  localparam int NCH = DEF_NUM_CH;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1, txd, ref_out;
  logic [NCH-1:0] pulse_out;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  timing_system dut (.clk, .rst_n, .rxd, .txd, .pulse_out, .ref_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- behavioural PC -------------------------------------------------
  task automatic send_byte(input logic [7:0] d, input bit stop_val = 1'b1);
    logic [9:0] f;
    f = {stop_val, d, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd <= f[i]; repeat (BIT) @(posedge clk); end
    rxd <= 1'b1;
    repeat (BIT) @(posedge clk);
  endtask

  task automatic send_frame(input logic [3:0] addr, input int unsigned a, input int unsigned b);
    send_byte({4'hA, addr});
    for (int i = 2; i >= 0; i--) send_byte(8'(a >> (8 * i)));
    for (int i = 2; i >= 0; i--) send_byte(8'(b >> (8 * i)));
  endtask

  logic [7:0] acks[$];
  initial begin
    forever begin
      logic [7:0] d;
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      if (txd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); d[i] = txd; end
        repeat (BIT) @(posedge clk);
        if (txd == 1'b1) acks.push_back(d);
      end
    end
  end

  // ---- mechanism counters (internal strobes) -------------------------
  int n_bad_hdr = 0, n_frame_err = 0, n_cmd = 0, n_ticks = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_split.bad_header) n_bad_hdr++;
    if (dut.err.frame_err) n_frame_err++;
    if (dut.cmd_done) n_cmd++;
    if (dut.tick) n_ticks++;
  end

  // ---- waveform measurement -----------------------------------------
  // Over n reference periods, record for each channel the offset of its
  // rising edge from the reference's rising edge and its high time.
  int rise_off [NCH], high_len [NCH], ref_per;
  task automatic measure(input int n, input int wexp [NCH], input int dexp [NCH], input int pexp);
    int cyc, ref_rise, prev_rise, periods;
    logic pr;
    logic [NCH-1:0] pp;
    int start [NCH];
    // align to a reference rising edge
    @(posedge clk); #1; pr = ref_out;
    while (!(ref_out && !pr)) begin pr = ref_out; @(posedge clk); #1; end
    cyc = 0; ref_rise = 0; prev_rise = 0; periods = 0; pp = pulse_out;
    for (int i = 0; i < NCH; i++) start[i] = -1;
    while (periods < n) begin
      pr = ref_out; pp = pulse_out;
      @(posedge clk); #1; cyc++;
      if (ref_out && !pr) begin
        check(cyc - ref_rise == pexp, $sformatf("reference period %0d exp %0d", cyc - ref_rise, pexp));
        ref_rise = cyc; periods++;
      end
      for (int i = 0; i < NCH; i++) begin
        if (pulse_out[i] && !pp[i]) begin
          start[i] = cyc;
          check(cyc - ref_rise == dexp[i] + 1,
                $sformatf("ch%0d rises %0d clocks after reference, exp %0d", i, cyc - ref_rise, dexp[i] + 1));
        end
        if (!pulse_out[i] && pp[i] && start[i] >= 0)
          check(cyc - start[i] == wexp[i],
                $sformatf("ch%0d width %0d clocks, exp %0d", i, cyc - start[i], wexp[i]));
      end
    end
  endtask

  int n_deferred = 0, n_table1 = 0, n_period_change = 0;

  initial begin
    int w [NCH], d [NCH];
    int t_done;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    check(pulse_out == '0, "outputs off after reset");
    // stray byte and a framing error
    send_byte(8'h3C);
    send_byte(8'hA1, 1'b0);
    // Table 1
    for (int i = 0; i < NCH; i++) begin w[i] = 5 * (i + 1); d[i] = (5 * i + 1) / 2; end
    for (int i = 0; i < NCH - 1; i++) send_frame(4'(i), w[i], d[i]);
    // last frame: the setting must not show before the next tick
    fork
      send_frame(4'(NCH - 1), w[NCH-1], d[NCH-1]);
      begin
        int ticks0;
        @(posedge dut.cmd_done); ticks0 = n_ticks;  // last command applied
        while (n_ticks == ticks0) begin
          @(posedge clk); #1;
          check(!pulse_out[NCH-1], "new setting held until next tick");
        end
        n_deferred++;
      end
    join
    repeat (4 * BIT) @(posedge clk);
    check(acks.size() == NCH, $sformatf("acknowledgements %0d", acks.size()));
    for (int k = 0; k < acks.size(); k++)
      check(acks[k] == {4'hA, 4'(k)}, $sformatf("ack %0d = %h", k, acks[k]));
    measure(2, w, d, MASTER_PERIOD);
    n_table1++;
    // master clock to 1,000 clocks (50 kHz)
    send_frame(4'(ADDR_MASTER), 1000, 0);
    measure(3, w, d, 1000);
    n_period_change++;
    repeat (12 * BIT) @(posedge clk);
    check(acks.size() == NCH + 1 && acks[NCH] == {4'hA, ADDR_MASTER}, "period command acknowledged");
    // every mechanism happened at least once
    check(n_bad_hdr == 1, $sformatf("bad header drops %0d", n_bad_hdr));
    check(n_frame_err == 1, $sformatf("framing errors %0d", n_frame_err));
    check(n_cmd == NCH + 1, $sformatf("commands %0d", n_cmd));
    check(n_deferred == 1 && n_table1 == 1 && n_period_change == 1, "deferred update, Table 1, period change");
    $display("mechanisms: bad_header=%0d frame_err=%0d commands=%0d deferred=%0d table1=%0d period_change=%0d ticks=%0d",
             n_bad_hdr, n_frame_err, n_cmd, n_deferred, n_table1, n_period_change, n_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
