// timing_pkg: constants and types shared by the linac timing system.
//
// The system runs from a 50 MHz clock, so every time value is a count of
// 20 ns steps. The UART runs at 19,200 baud with 16x oversampling; the
// oversampling tick comes from a divide-by-163 counter (50 MHz / 163 is
// 306.7 kHz, 0.14 % from 16 x 19,200). The master reference clock is
// 200 Hz, i.e. 250,000 steps. These numbers follow the design description.
//
// The command format (header byte 0xA0 | address, two 24-bit values, most
// significant byte first) and the 24-bit value width are choices of this
// design.
package timing_pkg;

  localparam int unsigned CLK_HZ        = 50_000_000;
  localparam int unsigned BAUD          = 19_200;
  localparam int unsigned OVERSAMPLE    = 16;
  localparam int unsigned DEF_BAUD_DIV  = 163;
  localparam int unsigned DEF_NUM_CH    = 4;
  localparam int unsigned VAL_W         = 24;
  localparam int unsigned MASTER_HZ     = 200;
  localparam int unsigned MASTER_PERIOD = CLK_HZ / MASTER_HZ;  // 250,000 steps

  // Channel order of the timing outputs.
  localparam int unsigned CH_SYN = 0;
  localparam int unsigned CH_GUN = 1;  // electron gun
  localparam int unsigned CH_RF  = 2;  // RF trigger
  localparam int unsigned CH_MAG = 3;  // magnetron trigger

  // Command frame: header, then FRAME_PAYLOAD value bytes.
  localparam logic [3:0] HDR_TAG       = 4'hA;
  localparam logic [3:0] ADDR_MASTER   = 4'd4;  // addresses 0..NUM_CH-1 are channels
  localparam int unsigned VAL_BYTES    = VAL_W / 8;
  localparam int unsigned FRAME_PAYLOAD = 2 * VAL_BYTES;

  typedef logic [VAL_W-1:0] tval_t;

  // Setting of one output channel, both in 20 ns steps.
  typedef struct packed {
    tval_t width;
    tval_t delay;
  } chan_cfg_t;

  // One-cycle error strobes of the serial link.
  typedef struct packed {
    logic frame_err;
    logic parity_err;
    logic rx_overflow;
  } uart_err_t;

endpackage
