// uart_tx: UART transmitter, timed by the 16x oversampling tick.
//
// When idle (`tx_ready` high) a `tx_start` pulse loads `tx_data`. The
// transmitter then drives a start bit (low), DATA_BITS data bits least
// significant first, an optional parity bit and STOP_BITS stop bits (high),
// each held for 16 oversampling ticks, which gives the standard one-byte
// frame of the design description. txd is registered and idles high.
// The start bit begins in the clock after tx_start, not on a tick, so it
// lasts between 15 and 16 ticks; every later bit is exactly 16 ticks.
// The description only names the transmitter; this is the mirror image of
// the receiver, with the same frame parameters.
module uart_tx #(
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned STOP_BITS  = 1,
  parameter bit          PARITY_EN  = 1'b0,
  parameter bit          PARITY_ODD = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_tick,
  input  logic                 tx_start,
  input  logic [DATA_BITS-1:0] tx_data,
  output logic                 tx_ready,
  output logic                 txd
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_t;

  localparam int unsigned BW = (DATA_BITS > STOP_BITS) ? $clog2(DATA_BITS + 1)
                                                       : $clog2(STOP_BITS + 1);

  state_t               state;
  logic [3:0]           tcnt;
  logic [BW-1:0]        bcnt;
  logic [DATA_BITS-1:0] shreg;
  logic                 par;

  assign tx_ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tcnt  <= '0;
      bcnt  <= '0;
      shreg <= '0;
      par   <= 1'b0;
      txd   <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          txd <= 1'b1;
          if (tx_start) begin
            state <= S_START;
            shreg <= tx_data;
            par   <= (^tx_data) ^ PARITY_ODD;
            tcnt  <= '0;
            txd   <= 1'b0;
          end
        end
        S_START: if (s_tick) begin
          if (tcnt == 4'd15) begin
            tcnt  <= '0;
            bcnt  <= '0;
            state <= S_DATA;
            txd   <= shreg[0];
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_DATA: if (s_tick) begin
          if (tcnt == 4'd15) begin
            tcnt  <= '0;
            shreg <= shreg >> 1;
            if (bcnt == BW'(DATA_BITS - 1)) begin
              bcnt  <= '0;
              state <= PARITY_EN ? S_PARITY : S_STOP;
              txd   <= PARITY_EN ? par : 1'b1;
            end else begin
              bcnt <= bcnt + 1'b1;
              txd  <= shreg[1];
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_PARITY: if (s_tick) begin
          if (tcnt == 4'd15) begin
            tcnt  <= '0;
            state <= S_STOP;
            txd   <= 1'b1;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_STOP: if (s_tick) begin
          if (tcnt == 4'd15) begin
            tcnt <= '0;
            if (bcnt == BW'(STOP_BITS - 1)) begin
              state <= S_IDLE;
            end else begin
              bcnt <= bcnt + 1'b1;
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (DATA_BITS >= 5 && DATA_BITS <= 9 && STOP_BITS >= 1 && STOP_BITS <= 2)
    else $error("uart_tx: unsupported frame format");

endmodule
