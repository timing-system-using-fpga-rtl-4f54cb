// baud_gen: oversampling tick generator for the UART.
//
// A modulo-DIV counter runs on the system clock and asserts `tick` for one
// clock every DIV cycles. With the default DIV = 163 and a 50 MHz clock the
// tick rate is 306.7 kHz, i.e. 16 ticks per bit at 19,200 baud, which is the
// divider given in the design description. The tick is registered: it is
// high in the cycle after the counter reaches DIV-1, and the first tick
// after reset comes DIV cycles after reset is released.
module baud_gen #(
  parameter int unsigned DIV = 163
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("baud_gen: DIV must be at least 2");

endmodule
