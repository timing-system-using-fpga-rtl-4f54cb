// uart_transceiver: RS-232 link between the PC and the timing logic.
//
// The four parts named in the design description are connected here: the
// baud generator (divide-by-BAUD_DIV, 16 ticks per bit), the receiver, the
// transmitter and the buffer. A buffer sits on each side. Received bytes
// without a framing or parity error are pushed into the receive buffer,
// whose head is offered on rx_data / rx_empty and popped with rx_rd. Bytes
// pushed with tx_wr go into the transmit buffer, and the transmitter takes
// the next one whenever it is idle. `err` carries one-cycle strobes for a
// framing error, a parity error and a byte lost to a full receive buffer.
// Dropping bad bytes and buffering both directions are choices of this
// design; the description does not say how the parts connect.
module uart_transceiver
  import timing_pkg::*;
#(
  parameter int unsigned BAUD_DIV   = timing_pkg::DEF_BAUD_DIV,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned STOP_BITS  = 1,
  parameter bit          PARITY_EN  = 1'b0,
  parameter bit          PARITY_ODD = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       txd,
  output logic [7:0] rx_data,
  output logic       rx_empty,
  input  logic       rx_rd,
  input  logic [7:0] tx_data,
  input  logic       tx_wr,
  output logic       tx_full,
  output uart_err_t  err
);
  logic       s_tick;
  logic [7:0] rx_byte;
  logic       rx_valid, frame_err, parity_err, rx_ovf, rx_full;
  logic [7:0] tx_head;
  logic       tx_empty, tx_ready, tx_pop, tx_ovf;

  baud_gen #(.DIV(BAUD_DIV)) u_baud (
    .clk, .rst_n, .tick(s_tick)
  );

  uart_rx #(.DATA_BITS(8), .STOP_BITS(STOP_BITS), .PARITY_EN(PARITY_EN),
            .PARITY_ODD(PARITY_ODD)) u_rx (
    .clk, .rst_n, .s_tick, .rxd,
    .rx_data(rx_byte), .rx_valid, .frame_err, .parity_err
  );

  byte_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .wr_en(rx_valid && !frame_err && !parity_err), .wr_data(rx_byte),
    .rd_en(rx_rd), .rd_data(rx_data),
    .empty(rx_empty), .full(rx_full), .overflow(rx_ovf)
  );

  assign tx_pop = tx_ready && !tx_empty;

  byte_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .wr_en(tx_wr), .wr_data(tx_data),
    .rd_en(tx_pop), .rd_data(tx_head),
    .empty(tx_empty), .full(tx_full), .overflow(tx_ovf)
  );

  uart_tx #(.DATA_BITS(8), .STOP_BITS(STOP_BITS), .PARITY_EN(PARITY_EN),
            .PARITY_ODD(PARITY_ODD)) u_tx (
    .clk, .rst_n, .s_tick,
    .tx_start(tx_pop), .tx_data(tx_head), .tx_ready, .txd
  );

  always_comb begin
    err             = '0;
    err.frame_err   = rx_valid && frame_err;
    err.parity_err  = rx_valid && parity_err;
    err.rx_overflow = rx_ovf;
  end

  // The user of the transmit side must respect tx_full.
  a_no_tx_overflow: assert property (@(posedge clk) disable iff (!rst_n) !tx_ovf)
    else $error("uart_transceiver: write into a full transmit buffer");

endmodule
