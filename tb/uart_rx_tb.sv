// uart_rx_tb: drives serial frames into two receivers, one 8N1 (the
// default) and one 8 data bits, even parity, two stop bits, with a 16x tick
// every 4 clocks (64 clocks per bit). Checks the received bytes, the
// framing and parity error flags, rejection of a short start glitch, and
// the latency from the start edge to rx_valid (between 9.5 and 10 bit times
// for 8N1, plus the synchronizer).
`timescale 1ns/1ps
module uart_rx_tb;
  localparam int DIV = 4;
  localparam int BIT = 16 * DIV;
  logic clk = 1'b0, rst_n = 1'b0, s_tick, line_a = 1'b1, line_b = 1'b1;
  logic [7:0] da, db;
  logic va, vb, fea, feb, pea, peb;
  int checks = 0, failures = 0;
  int tcnt = 0;
  always #10 clk = ~clk;
  always_ff @(posedge clk) tcnt <= (tcnt == DIV - 1) ? 0 : tcnt + 1;
  assign s_tick = (tcnt == DIV - 1);

  uart_rx dut_a (.clk, .rst_n, .s_tick, .rxd(line_a), .rx_data(da), .rx_valid(va),
                 .frame_err(fea), .parity_err(pea));
  uart_rx #(.STOP_BITS(2), .PARITY_EN(1'b1), .PARITY_ODD(1'b0)) dut_b (
                 .clk, .rst_n, .s_tick, .rxd(line_b), .rx_data(db), .rx_valid(vb),
                 .frame_err(feb), .parity_err(peb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // build a frame LSB first: start, 8 data, [parity], stops
  task automatic send_a(input logic [7:0] d, input bit stop_val);
    logic [9:0] f;
    f = {stop_val, d, 1'b0};
    for (int i = 0; i < 10; i++) begin line_a <= f[i]; repeat (BIT) @(posedge clk); end
    line_a <= 1'b1;
  endtask
  task automatic send_b(input logic [7:0] d, input bit par_flip, input bit stop2);
    logic [11:0] f;
    f = {stop2, 1'b1, (^d) ^ par_flip, d, 1'b0};
    for (int i = 0; i < 12; i++) begin line_b <= f[i]; repeat (BIT) @(posedge clk); end
    line_b <= 1'b1;
  endtask

  // monitors
  logic [7:0] exp_a, exp_b;
  bit exp_fea, exp_feb, exp_peb;
  int got_a = 0, got_b = 0;
  int t_start, lat;
  always @(posedge clk) if (rst_n && va) begin
    got_a++;
    check(da == exp_a, $sformatf("A data %h exp %h", da, exp_a));
    check(fea == exp_fea, "A framing flag");
    check(!pea, "A parity flag without parity");
  end
  always @(posedge clk) if (rst_n && vb) begin
    got_b++;
    check(db == exp_b, $sformatf("B data %h exp %h", db, exp_b));
    check(feb == exp_feb, "B framing flag");
    check(peb == exp_peb, "B parity flag");
  end

  initial begin
    int n;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    // latency of one byte
    exp_a = 8'h5A; exp_fea = 0;
    fork
      send_a(8'h5A, 1'b1);
      begin
        t_start = 0;
        while (!va) begin @(posedge clk); t_start++; end
        lat = t_start;
      end
    join
    check(lat >= 9 * BIT + BIT / 2 && lat <= 10 * BIT + 4, $sformatf("latency %0d clocks", lat));
    // random bytes, some with a bad stop bit
    for (int k = 0; k < 30; k++) begin
      logic [7:0] d; bit s;
      d = 8'($urandom); s = ($urandom % 5) != 0;
      exp_a = d; exp_fea = !s;
      n = got_a;
      send_a(d, s);
      repeat (BIT) @(posedge clk);
      check(got_a == n + 1, "A one byte per frame");
    end
    // a start glitch of 3 ticks must be ignored
    n = got_a;
    line_a <= 1'b0; repeat (3 * DIV) @(posedge clk); line_a <= 1'b1;
    repeat (12 * BIT) @(posedge clk);
    check(got_a == n, "A glitch rejected");
    // parity / two-stop receiver
    for (int k = 0; k < 20; k++) begin
      logic [7:0] d; bit pf, s2;
      d = 8'($urandom); pf = ($urandom % 4) == 0; s2 = ($urandom % 4) != 0;
      exp_b = d; exp_peb = pf; exp_feb = !s2;
      n = got_b;
      send_b(d, pf, s2);
      repeat (BIT) @(posedge clk);
      check(got_b == n + 1, "B one byte per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
