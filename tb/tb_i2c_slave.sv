// tb_i2c_slave: a bus-master model writes and reads through the I2C slave.
// Checks the bytes handed on, the frame-start pulses, acknowledge and
// not-acknowledge of the address, read data (including a repeated START and
// a multi-byte read) and the soft reset.
module tb_i2c_slave;
  logic       clk = 0, rst_n = 0;
  logic       soft_rst = 0;
  logic       h_scl_oe, h_sda_oe, s_sda_oe;
  logic       scl, sda;
  logic       rx_valid, frame_start;
  logic [7:0] rx_data;
  logic       tx_load = 0;
  logic [7:0] tx_data = '0;
  int checks = 0, failures = 0;
  logic [7:0] got [$];
  int         frames = 0;

  assign scl = ~h_scl_oe;
  assign sda = ~(h_sda_oe | s_sda_oe);

  i2c_slave #(.SLAVE_ADDR(7'h50)) dut (
    .clk, .rst_n, .soft_rst, .scl_i(scl), .sda_i(sda), .sda_oe(s_sda_oe),
    .rx_valid, .rx_data, .frame_start, .tx_load, .tx_data
  );
  i2c_host_bfm #(.HALF(20)) host (.clk, .scl_oe(h_scl_oe), .sda_oe(h_sda_oe), .sda_i(sda));

  always #1 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && rx_valid) got.push_back(rx_data);
    if (rst_n && frame_start) frames++;
  end

  task automatic check(input string what, input int got_v, input int exp);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  logic ack;
  logic [7:0] b;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    host.idle(50);

    // Write transfer: address, two bytes.
    host.start();
    host.write_byte({7'h50, 1'b0}, ack);  check("addr ack", ack, 1);
    host.write_byte(8'h03, ack);          check("byte1 ack", ack, 1);
    host.write_byte(8'hC5, ack);          check("byte2 ack", ack, 1);
    host.stop();
    host.idle(20);
    check("two bytes", got.size(), 2);
    if (got.size() == 2) begin
      check("byte1", got[0], 8'h03);
      check("byte2", got[1], 8'hC5);
    end
    check("one frame", frames, 1);

    // Other address: no acknowledge, nothing handed on.
    got.delete();
    host.start();
    host.write_byte({7'h51, 1'b0}, ack);  check("foreign addr nack", ack, 0);
    host.write_byte(8'h77, ack);          check("no data ack", ack, 0);
    host.stop();
    host.idle(20);
    check("nothing received", got.size(), 0);

    // Read: command byte written, repeated START, two bytes read.
    @(negedge clk); tx_load = 1; tx_data = 8'h96;
    @(negedge clk); tx_load = 0;
    host.start();
    host.write_byte({7'h50, 1'b0}, ack);  check("addr ack 2", ack, 1);
    host.write_byte(8'h85, ack);
    host.start();
    host.write_byte({7'h50, 1'b1}, ack);  check("read addr ack", ack, 1);
    host.read_byte(1'b1, b);              check("read byte 1", b, 8'h96);
    host.read_byte(1'b0, b);              check("read byte 2", b, 8'h96);
    host.stop();
    host.idle(20);
    check("frames 2", frames, 2);
    check("cmd byte", got.size() > 0 ? int'(got[0]) : -1, 8'h85);

    // Soft reset in the middle of a byte: the byte is dropped, the slave
    // releases SDA and answers the next transfer.
    got.delete();
    host.start();
    host.write_byte({7'h50, 1'b0}, ack);
    @(negedge clk); soft_rst = 1;
    @(negedge clk); soft_rst = 0;
    host.write_byte(8'h12, ack);          check("no ack after soft reset", ack, 0);
    host.stop();
    host.idle(20);
    check("dropped after soft reset", got.size(), 0);
    host.start();
    host.write_byte({7'h50, 1'b0}, ack);  check("ack after reset", ack, 1);
    host.write_byte(8'h5A, ack);
    host.stop();
    host.idle(20);
    check("received after reset", got.size() > 0 ? int'(got[0]) : -1, 8'h5A);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
