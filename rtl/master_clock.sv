// master_clock: the 200 Hz reference of the timing system.
//
// A counter runs from 0 to period-1 on the 50 MHz clock and wraps. In the
// cycle in which it holds 0, `tick` is high for one clock: this is the
// reference instant from which every channel's delay is counted. `ref_out`
// is a registered square wave, high for the first period/2 cycles, brought
// out so the reference can be observed. With period = 250,000 (the reset
// value the data splitter supplies) the frequency is 200 Hz, as in the
// design description; the period is programmable. A new period takes
// effect at once: if the counter is already past it, the counter wraps at
// the next clock. Periods below 2 are treated as 2. The duty cycle of
// ref_out is a choice of this design.
module master_clock
  import timing_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  tval_t            period,
  output logic             tick,
  output logic             ref_out
);
  tval_t cnt, cnt_next, last;

  always_comb begin
    last     = (period < VAL_W'(2)) ? VAL_W'(1) : period - 1'b1;
    cnt_next = (cnt >= last) ? '0 : cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '1;   // first tick one clock after reset
      tick    <= 1'b0;
      ref_out <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      tick    <= (cnt_next == '0);
      ref_out <= (cnt_next < ((last >> 1) + 1'b1));
    end
  end

endmodule
