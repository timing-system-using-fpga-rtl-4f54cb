// pulse_delay_gen_tb: ticks every 60 clocks and random width/delay settings
// on four channels. A cycle-by-cycle reference model (settings taken over at
// the tick, output high in cycles tick+1+delay .. tick+delay+width, cut at
// the next tick) is compared with every output in every cycle. Settings are
// changed in the middle of periods, to check that a change waits for the
// next tick. The Table 1 pattern (in 20 ns steps) is run as well.
`timescale 1ns/1ps
module pulse_delay_gen_tb;
  import timing_pkg::*;
  localparam int P = 60;
  logic clk = 1'b0, rst_n = 1'b0, sync_tick = 1'b0;
  chan_cfg_t cfg [DEF_NUM_CH];
  logic [DEF_NUM_CH-1:0] pulse_out;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  pulse_delay_gen dut (.clk, .rst_n, .sync_tick, .cfg, .pulse_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model state
  int since = -1;          // cycles since the tick, -1 before the first
  int wm [DEF_NUM_CH], dm [DEF_NUM_CH];
  int mid_changes = 0, pulses = 0;
  logic [DEF_NUM_CH-1:0] prev = '0;

  initial begin
    for (int i = 0; i < DEF_NUM_CH; i++) begin cfg[i] = '0; wm[i] = 0; dm[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 40 * P; c++) begin
      @(negedge clk);
      sync_tick = (c % P) == 0;
      if ((c % P) == P / 2 && c / P >= 2) begin
        // new settings in mid-period; Table 1 for periods 2..4
        for (int i = 0; i < DEF_NUM_CH; i++) begin
          if (c / P < 5) begin
            cfg[i].width = tval_t'(5 * (i + 1));            // 100..400 ns
            cfg[i].delay = tval_t'((5 * i + 1) / 2);        // 0, 50, 100, 150 ns rounded
          end else begin
            cfg[i].width = tval_t'($urandom % 40);
            cfg[i].delay = tval_t'($urandom % 50);
          end
        end
        mid_changes++;
      end
      @(posedge clk);
      // model: what the registered output must show after this edge
      if (sync_tick) begin
        since = 0;
        for (int i = 0; i < DEF_NUM_CH; i++) begin wm[i] = int'(cfg[i].width); dm[i] = int'(cfg[i].delay); end
      end else if (since >= 0) since++;
      #1;
      for (int i = 0; i < DEF_NUM_CH; i++) begin
        bit e;
        e = since >= 0 && since >= dm[i] && since < dm[i] + wm[i];
        check(pulse_out[i] == e, $sformatf("cycle %0d ch %0d out %0b exp %0b", c, i, pulse_out[i], e));
        if (pulse_out[i] && !prev[i]) pulses++;
      end
      prev = pulse_out;
    end
    check(mid_changes > 30 && pulses > 100, "settings changed and pulses produced");
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
