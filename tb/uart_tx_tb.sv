// uart_tx_tb: sends bytes through two transmitters, 8N1 (default) and
// 8 data bits, odd parity, two stop bits, with a 16x tick every 4 clocks.
// An independent decoder samples txd in the middle of each bit and checks
// start bit, data, parity and stop bits, the bit length (16 ticks = 64
// clocks, measured from the first to the last data-bit edge) and tx_ready.
`timescale 1ns/1ps
module uart_tx_tb;
  localparam int DIV = 4;
  localparam int BIT = 16 * DIV;
  logic clk = 1'b0, rst_n = 1'b0, s_tick;
  logic start_a = 0, start_b = 0;
  logic [7:0] d_a = '0, d_b = '0;
  logic rdy_a, rdy_b, txd_a, txd_b;
  int checks = 0, failures = 0;
  int tcnt = 0;
  always #10 clk = ~clk;
  always_ff @(posedge clk) tcnt <= (tcnt == DIV - 1) ? 0 : tcnt + 1;
  assign s_tick = (tcnt == DIV - 1);

  uart_tx dut_a (.clk, .rst_n, .s_tick, .tx_start(start_a), .tx_data(d_a),
                 .tx_ready(rdy_a), .txd(txd_a));
  uart_tx #(.STOP_BITS(2), .PARITY_EN(1'b1), .PARITY_ODD(1'b1)) dut_b (
                 .clk, .rst_n, .s_tick, .tx_start(start_b), .tx_data(d_b),
                 .tx_ready(rdy_b), .txd(txd_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // decode one frame from txd_a / txd_b (sel) and compare
  task automatic decode(input bit sel, input logic [7:0] exp);
    logic [7:0] d;
    int t0, t1;
    bit bitv;
    // wait for start edge
    while ((sel ? txd_b : txd_a) == 1'b1) @(posedge clk);
    repeat (BIT / 2) @(posedge clk);
    check((sel ? txd_b : txd_a) == 1'b0, "start bit low in its middle");
    for (int i = 0; i < 8; i++) begin
      repeat (BIT) @(posedge clk);
      d[i] = sel ? txd_b : txd_a;
    end
    check(d == exp, $sformatf("data %h exp %h", d, exp));
    if (sel) begin
      repeat (BIT) @(posedge clk);
      bitv = txd_b;
      check(bitv == ~(^exp), "odd parity bit");
      repeat (BIT) @(posedge clk); check(txd_b == 1'b1, "stop bit 1");
      repeat (BIT) @(posedge clk); check(txd_b == 1'b1, "stop bit 2");
    end else begin
      repeat (BIT) @(posedge clk); check(txd_a == 1'b1, "stop bit");
    end
  endtask

  // edge timing of dut_a: alternating pattern 0x55 gives an edge every bit
  task automatic measure_bit;
    int t, edges, first, last;
    logic prev;
    t = 0; edges = 0; first = 0; last = 0; prev = txd_a;
    while (t < 11 * BIT) begin
      @(posedge clk); t++;
      if (txd_a != prev) begin
        if (edges == 0) first = t;   // start -> d0 edge
        last = t; edges++;
      end
      prev = txd_a;
    end
    // 0x55 after the start edge: start->d0, seven inside the data, d7->stop
    check(edges == 9, $sformatf("edges %0d", edges));
    check(last - first == 8 * BIT, $sformatf("8 bit times = %0d clocks", last - first));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    check(rdy_a && rdy_b && txd_a && txd_b, "idle after reset");
    // bit timing
    d_a <= 8'h55; start_a <= 1'b1; @(posedge clk); start_a <= 1'b0;
    @(posedge clk); check(!rdy_a, "busy while sending");
    measure_bit();
    wait (rdy_a); @(posedge clk);
    for (int k = 0; k < 20; k++) begin
      logic [7:0] va, vb;
      va = 8'($urandom); vb = 8'($urandom);
      d_a <= va; d_b <= vb; start_a <= 1'b1; start_b <= 1'b1;
      @(posedge clk); start_a <= 1'b0; start_b <= 1'b0;
      d_a <= 8'hFF; d_b <= 8'hFF;   // data must have been captured
      fork
        decode(1'b0, va);
        decode(1'b1, vb);
      join
      wait (rdy_a && rdy_b); @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
