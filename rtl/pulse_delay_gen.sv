// pulse_delay_gen: the pulse width and delay generator.
//
// One pulse per master clock period is made on each of NUM_CH outputs
// (SYN, electron gun, RF trigger, magnetron trigger). A shared counter is
// cleared by the master clock tick and then counts 20 ns clock cycles;
// output i is high while  delay_i <= count < delay_i + width_i.  The
// outputs are registered, so with the tick in cycle t the pulse of channel
// i is high in cycles t+1+delay_i .. t+delay_i+width_i: a fixed one-clock
// (20 ns) offset from the reference, then delay_i steps of delay and
// width_i steps of width. A width of 0 keeps the output low.
// The settings from the data splitter are copied into working registers at
// the tick, so a change never cuts or stretches a pulse in progress; the
// counter saturates, and a pulse still running at the next tick is cut.
// The counting principle is from the design description; the update at the
// tick and the one-clock offset are choices of this design.
module pulse_delay_gen
  import timing_pkg::*;
#(
  parameter int unsigned NUM_CH = timing_pkg::DEF_NUM_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync_tick,
  input  chan_cfg_t         cfg [NUM_CH],
  output logic [NUM_CH-1:0] pulse_out
);
  tval_t     cnt, cnt_next;
  chan_cfg_t act [NUM_CH];
  chan_cfg_t act_next [NUM_CH];
  logic [VAL_W:0] rel [NUM_CH];   // count - delay, borrow in the top bit

  // Values of the next cycle; the output register looks at them so that a
  // pulse with delay 0 starts in the cycle right after the tick.
  always_comb begin
    if (sync_tick)      cnt_next = '0;
    else if (cnt != '1) cnt_next = cnt + 1'b1;
    else                cnt_next = cnt;
    for (int i = 0; i < int'(NUM_CH); i++) begin
      act_next[i] = sync_tick ? cfg[i] : act[i];
      rel[i]      = {1'b0, cnt_next} - {1'b0, act_next[i].delay};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '1;
      pulse_out <= '0;
      for (int i = 0; i < int'(NUM_CH); i++) act[i] <= '0;
    end else begin
      cnt <= cnt_next;
      for (int i = 0; i < int'(NUM_CH); i++) begin
        act[i]       <= act_next[i];
        pulse_out[i] <= !rel[i][VAL_W] && (rel[i][VAL_W-1:0] < act_next[i].width);
      end
    end
  end

endmodule
