// uart_rx: UART receiver with 16x oversampling.
//
// The receive procedure follows the design description. The receiver waits
// for the line to go low (start bit) and counts oversampling ticks. At count
// 7, the middle of the start bit, the counter is cleared; from then on every
// 16th tick lands in the middle of the next bit. DATA_BITS data bits (least
// significant first), an optional parity bit and STOP_BITS stop bits are
// sampled that way. The byte is delivered with a one-clock `rx_valid`
// strobe in the clock after the middle of the last stop bit, together with
// `frame_err` (a stop bit was low) and `parity_err`.
//
// Choices of this design: a two-flop synchronizer on rxd; a start bit that
// is high again at its middle is taken as a glitch and ignored; after a low
// stop bit the receiver waits for the line to return high before looking
// for the next start bit, so a held-low line gives one error, not a
// stream of zero bytes; parity and
// the number of stop bits are parameters (default 8 data bits, no parity,
// one stop bit).
module uart_rx #(
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned STOP_BITS  = 1,
  parameter bit          PARITY_EN  = 1'b0,
  parameter bit          PARITY_ODD = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_tick,
  input  logic                 rxd,
  output logic [DATA_BITS-1:0] rx_data,
  output logic                 rx_valid,
  output logic                 frame_err,
  output logic                 parity_err
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP, S_WAIT_HIGH} state_t;

  localparam int unsigned BW = (DATA_BITS > STOP_BITS) ? $clog2(DATA_BITS + 1)
                                                       : $clog2(STOP_BITS + 1);

  state_t               state;
  logic [3:0]           tcnt;     // oversampling tick counter
  logic [BW-1:0]        bcnt;     // bit counter
  logic [DATA_BITS-1:0] shreg;
  logic                 par_bad;
  logic                 stop_bad;
  logic [1:0]           sync;
  logic                 rx_s;

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end
  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      tcnt       <= '0;
      bcnt       <= '0;
      shreg      <= '0;
      par_bad    <= 1'b0;
      stop_bad   <= 1'b0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      frame_err  <= 1'b0;
      parity_err <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!rx_s) begin
            state <= S_START;
            tcnt  <= '0;
          end
        end
        S_START: if (s_tick) begin
          if (tcnt == 4'd7) begin
            tcnt <= '0;
            bcnt <= '0;
            state <= rx_s ? S_IDLE : S_DATA;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_DATA: if (s_tick) begin
          if (tcnt == 4'd15) begin
            tcnt  <= '0;
            shreg <= {rx_s, shreg[DATA_BITS-1:1]};
            if (bcnt == BW'(DATA_BITS - 1)) begin
              bcnt     <= '0;
              stop_bad <= 1'b0;
              par_bad  <= 1'b0;
              state    <= PARITY_EN ? S_PARITY : S_STOP;
            end else begin
              bcnt <= bcnt + 1'b1;
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_PARITY: if (s_tick) begin
          if (tcnt == 4'd15) begin
            tcnt    <= '0;
            // even parity: data ^ parity bit must be 0; odd: must be 1
            par_bad <= ((^shreg) ^ rx_s) != PARITY_ODD;
            state   <= S_STOP;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_STOP: if (s_tick) begin
          if (tcnt == 4'd15) begin
            tcnt <= '0;
            if (bcnt == BW'(STOP_BITS - 1)) begin
              // after a low stop bit, wait for the idle level first
              state      <= (stop_bad | !rx_s) ? S_WAIT_HIGH : S_IDLE;
              rx_data    <= shreg;
              rx_valid   <= 1'b1;
              frame_err  <= stop_bad | !rx_s;
              parity_err <= par_bad;
            end else begin
              bcnt     <= bcnt + 1'b1;
              stop_bad <= stop_bad | !rx_s;
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_WAIT_HIGH: if (rx_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (DATA_BITS >= 5 && DATA_BITS <= 9 && STOP_BITS >= 1 && STOP_BITS <= 2)
    else $error("uart_rx: unsupported frame format");

endmodule
