// tb_comm_switch: bytes from both links are merged toward the handler, the
// active link follows the last link that delivered a byte, a change of link
// raises frame_start, and answers go back only to the active link.
module tb_comm_switch;
  import pdd_pkg::*;
  logic       clk = 0, rst_n = 0;
  byte_beat_t i2c_rx = '0, uart_rx = '0, resp = '0;
  logic       i2c_frame_start = 0;
  byte_beat_t rx, i2c_tx, uart_tx;
  logic       frame_start;
  src_e       mode;
  int checks = 0, failures = 0;

  comm_switch dut (.clk, .rst_n, .i2c_rx, .i2c_frame_start, .uart_rx, .rx, .frame_start, .resp,
                   .i2c_tx, .uart_tx, .mode_o(mode));

  always #1 clk = ~clk;

  task automatic check(input string what, input int got_v, input int exp);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  // Applies one cycle of inputs and checks the combinational outputs.
  task automatic beat(input logic iv, input logic ifs, input logic uv, input logic [7:0] d,
                      input logic exp_fs);
    @(negedge clk);
    i2c_rx = '{valid: iv, data: d};
    uart_rx = '{valid: uv, data: ~d};
    i2c_frame_start = ifs;
    #0.5;
    check("rx valid", rx.valid, int'(iv | uv));
    if (iv | uv) check("rx data", rx.data, uv ? int'(uart_rx.data) : int'(d));
    check("frame_start", frame_start, exp_fs);
    @(negedge clk);
    i2c_rx = '0; uart_rx = '0; i2c_frame_start = 0;
  endtask

  task automatic answer(input logic [7:0] d, input src_e expect_link);
    @(negedge clk);
    resp = '{valid: 1'b1, data: d};
    #0.5;
    check("to i2c", i2c_tx.valid, int'(expect_link == SRC_I2C));
    check("to uart", uart_tx.valid, int'(expect_link == SRC_UART));
    check("answer data", expect_link == SRC_I2C ? int'(i2c_tx.data) : int'(uart_tx.data), d);
    @(negedge clk);
    resp = '0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset mode i2c", mode, SRC_I2C);
    beat(0, 1, 0, 8'h00, 1);            // I2C write transfer begins
    beat(1, 0, 0, 8'h83, 0);
    answer(8'h42, SRC_I2C);
    beat(0, 0, 1, 8'h12, 1);            // UART speaks: switch and frame start
    check("mode uart", mode, SRC_UART);
    answer(8'h99, SRC_UART);
    beat(0, 0, 1, 8'h34, 0);            // further UART bytes: no frame start
    check("still uart", mode, SRC_UART);
    beat(0, 1, 0, 8'h00, 1);            // back to I2C
    check("mode i2c again", mode, SRC_I2C);
    answer(8'h17, SRC_I2C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
