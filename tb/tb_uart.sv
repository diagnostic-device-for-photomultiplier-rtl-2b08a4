// tb_uart: serial frames are sent to the receiver and the transmitter's
// frames are decoded by the testbench. Checks received bytes, rejection of a
// frame with a low stop bit and of a short glitch, the transmitted bytes and
// the frame length of ten bit times, and a second byte held during a frame.
module tb_uart;
  localparam int CPB = 16;
  logic       clk = 0, rst_n = 0;
  logic       soft_rst = 0;
  logic       rx_line = 1;
  logic       rx_valid, tx_busy, tx_o;
  logic [7:0] rx_data;
  logic       tx_start = 0;
  logic [7:0] tx_data = '0;
  logic [7:0] got [$];
  int checks = 0, failures = 0;

  uart #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .soft_rst, .rx_i(rx_line), .rx_valid, .rx_data,
                                  .tx_start, .tx_data, .tx_busy, .tx_o);

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n && rx_valid) got.push_back(rx_data);

  task automatic check(input string what, input int got_v, input int exp);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  task automatic send(input logic [7:0] b, input logic stop_bit);
    @(negedge clk);
    rx_line = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx_line = b[i]; repeat (CPB) @(negedge clk); end
    rx_line = stop_bit; repeat (CPB) @(negedge clk);
    rx_line = 1; repeat (CPB) @(negedge clk);
  endtask

  // Starts a transmission and decodes the frame on tx_o.
  task automatic xmit(input logic [7:0] b, output logic [7:0] r, output int len);
    @(negedge clk); tx_start = 1; tx_data = b;
    @(negedge clk); tx_start = 0;
    len = 1;
    repeat (CPB / 2 - 1) @(negedge clk);
    check("start bit", tx_o, 0);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); r[i] = tx_o; end
    repeat (CPB) @(negedge clk);
    check("stop bit", tx_o, 1);
    while (tx_busy) @(negedge clk);
    len = 0;
  endtask

  // Decodes the next frame on tx_o.
  task automatic decode(output logic [7:0] r);
    @(negedge clk iff !tx_o);
    repeat (CPB / 2) @(negedge clk);
    check("start bit (decode)", tx_o, 0);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); r[i] = tx_o; end
    repeat (CPB) @(negedge clk);
    check("stop bit (decode)", tx_o, 1);
  endtask

  logic [7:0] r;
  int len, t0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    send(8'hA7, 1);
    send(8'h00, 1);
    send(8'hFF, 1);
    check("3 bytes", got.size(), 3);
    if (got.size() == 3) begin
      check("A7", got[0], 8'hA7);
      check("00", got[1], 8'h00);
      check("FF", got[2], 8'hFF);
    end
    got.delete();
    send(8'h3C, 0);                 // framing error: dropped
    check("bad stop dropped", got.size(), 0);
    @(negedge clk); rx_line = 0; repeat (CPB / 4) @(negedge clk); rx_line = 1;
    repeat (3 * CPB) @(negedge clk);
    check("glitch ignored", got.size(), 0);
    send(8'h5E, 1);
    check("after errors", got.size() > 0 ? int'(got[0]) : -1, 8'h5E);

    xmit(8'hC3, r, len);
    check("tx C3", r, 8'hC3);
    // Frame length: busy from the start strobe for exactly 10 bit times.
    @(negedge clk); tx_start = 1; tx_data = 8'h01; t0 = $time;
    @(negedge clk); tx_start = 0;
    while (tx_busy) @(negedge clk);
    check("frame length", int'(($time - t0) / 2), 10 * CPB + 1);
    xmit(8'h5A, r, len);
    check("tx 5A", r, 8'h5A);
    // Two bytes offered back to back: the second is held and follows.
    @(negedge clk); tx_start = 1; tx_data = 8'h96;
    @(negedge clk); tx_data = 8'h3B;
    @(negedge clk); tx_start = 0;
    decode(r);  check("first of two", r, 8'h96);
    decode(r);  check("second of two", r, 8'h3B);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
