// timing_system: FPGA timing system for a medical linear accelerator.
//
// Four trigger outputs (SYN, electron gun, RF trigger, magnetron trigger)
// each give one pulse per period of a 200 Hz master reference. Width and
// delay of every pulse are set independently, in 20 ns steps of the 50 MHz
// clock, by commands that a PC sends over RS-232 at 19,200 baud.
//
// Data flow, as in the block diagram of the design description:
//   rxd -> uart_transceiver -> data_splitter -> settings registers
//   master_clock tick + settings -> pulse_delay_gen -> pulse_out
//   data_splitter acknowledgements -> uart_transceiver -> txd
// ref_out is the 200 Hz reference square wave; a channel with delay 0
// rises one clock (20 ns) after ref_out rises. pulse_out is meant to drive
// the external opto-isolator stage, which sets the output voltage.
module timing_system
  import timing_pkg::*;
#(
  parameter int unsigned BAUD_DIV = timing_pkg::DEF_BAUD_DIV,
  parameter int unsigned NUM_CH   = timing_pkg::DEF_NUM_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rxd,
  output logic              txd,
  output logic [NUM_CH-1:0] pulse_out,
  output logic              ref_out
);
  logic [7:0] rx_data, tx_data;
  logic       rx_empty, rx_rd, tx_wr, tx_full;
  uart_err_t  err;
  chan_cfg_t  cfg [NUM_CH];
  tval_t      period;
  logic       cmd_done, bad_header, tick;

  uart_transceiver #(.BAUD_DIV(BAUD_DIV)) u_uart (
    .clk, .rst_n, .rxd, .txd,
    .rx_data, .rx_empty, .rx_rd,
    .tx_data, .tx_wr, .tx_full,
    .err
  );

  data_splitter #(.NUM_CH(NUM_CH)) u_split (
    .clk, .rst_n,
    .rx_data, .rx_empty, .rx_rd,
    .tx_data, .tx_wr, .tx_full,
    .cfg, .period, .cmd_done, .bad_header
  );

  master_clock u_master (
    .clk, .rst_n, .period, .tick, .ref_out
  );

  pulse_delay_gen #(.NUM_CH(NUM_CH)) u_pulse (
    .clk, .rst_n, .sync_tick(tick), .cfg, .pulse_out
  );

endmodule
