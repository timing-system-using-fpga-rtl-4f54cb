// data_splitter: turns the received byte stream into timing settings.
//
// The splitter pops bytes from the UART receive buffer and separates them
// into command frames. A frame is a header byte {4'hA, address} followed by
// two VAL_W-bit values, most significant byte first:
//   address 0..NUM_CH-1  first value = pulse width, second = delay of that
//                        channel, both in 20 ns clock steps;
//   address 4            first value = master clock period in clock steps,
//                        second value ignored.
// Bytes that are not a valid header while the splitter waits for one are
// dropped (one-cycle `bad_header` strobe), which lets the stream realign.
// When the last byte of a frame arrives the setting is written into its
// register in the next cycle, `cmd_done` pulses and the header byte is
// pushed into the transmit buffer as an acknowledgement (skipped if that
// buffer is full). The registers feed the pulse width and delay generator,
// which takes them over at the next master clock tick.
// The design description gives only the splitter's job; the frame format,
// acknowledgement and reset values (all channels off, 200 Hz period) are
// choices of this design.
module data_splitter
  import timing_pkg::*;
#(
  parameter int unsigned NUM_CH = timing_pkg::DEF_NUM_CH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [7:0] rx_data,
  input  logic      rx_empty,
  output logic      rx_rd,
  output logic [7:0] tx_data,
  output logic      tx_wr,
  input  logic      tx_full,
  output chan_cfg_t cfg [NUM_CH],
  output tval_t     period,
  output logic      cmd_done,
  output logic      bad_header
);
  localparam int unsigned PW = $clog2(FRAME_PAYLOAD + 1);

  logic                  in_frame;
  logic [3:0]            addr;
  logic [PW-1:0]         nbytes;   // payload bytes received so far
  logic [2*VAL_W-1:0]    payload;
  logic                  hdr_ok;
  logic                  last_byte;

  assign rx_rd     = !rx_empty;
  assign hdr_ok    = (rx_data[7:4] == HDR_TAG) &&
                     ((rx_data[3:0] < 4'(NUM_CH)) || (rx_data[3:0] == ADDR_MASTER));
  assign last_byte = in_frame && (nbytes == PW'(FRAME_PAYLOAD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_frame   <= 1'b0;
      addr       <= '0;
      nbytes     <= '0;
      payload    <= '0;
      cmd_done   <= 1'b0;
      bad_header <= 1'b0;
      tx_wr      <= 1'b0;
      tx_data    <= '0;
      period     <= tval_t'(MASTER_PERIOD);
      for (int i = 0; i < int'(NUM_CH); i++) cfg[i] <= '0;
    end else begin
      cmd_done   <= 1'b0;
      bad_header <= 1'b0;
      tx_wr      <= 1'b0;
      if (cmd_done) begin
        // apply the frame completed in the previous cycle
        if (addr == ADDR_MASTER) begin
          period <= payload[2*VAL_W-1:VAL_W];
        end else begin
          for (int i = 0; i < int'(NUM_CH); i++)
            if (addr == 4'(i)) cfg[i] <= chan_cfg_t'(payload);
        end
      end
      if (!rx_empty) begin
        if (!in_frame) begin
          if (hdr_ok) begin
            in_frame <= 1'b1;
            addr     <= rx_data[3:0];
            nbytes   <= '0;
          end else begin
            bad_header <= 1'b1;
          end
        end else begin
          payload <= {payload[2*VAL_W-9:0], rx_data};
          nbytes  <= nbytes + 1'b1;
          if (last_byte) begin
            in_frame <= 1'b0;
            cmd_done <= 1'b1;
            tx_data  <= {HDR_TAG, addr};
            tx_wr    <= !tx_full;
          end
        end
      end
    end
  end

endmodule
