// tb_i2c_master: the I2C master writes bytes to a DAC model. Checks the value
// the DAC received, the write count, the acknowledge error for a DAC that
// does not answer, and the transfer time (START + 18 bits + STOP, four
// quarters each, plus the done cycle).
module tb_i2c_master;
  localparam int Q = 8;
  logic       clk = 0, rst_n = 0;
  logic       start = 0;
  logic [6:0] addr = 7'h4C;
  logic [7:0] data = '0;
  logic       busy, done, ack_err, scl_oe, sda_oe, dac_sda_oe, nack = 0;
  logic       scl, sda;
  logic [7:0] dac_value;
  int         dac_writes;
  int checks = 0, failures = 0;

  i2c_master #(.QUARTER(Q)) dut (.clk, .rst_n, .start, .addr, .data, .busy, .done, .ack_err,
                                 .scl_oe, .sda_oe, .sda_i(sda));
  dac_model #(.ADDR(7'h4C)) dac (.clk, .scl, .sda, .nack, .sda_oe(dac_sda_oe),
                                 .value(dac_value), .writes(dac_writes));

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | dac_sda_oe);

  always #1 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic xfer(input logic [6:0] a, input logic [7:0] d, output int cycles, output logic err);
    @(negedge clk); start = 1; addr = a; data = d;
    @(negedge clk); start = 0;
    cycles = 1;
    check("busy after start", busy, 1);
    while (!done) begin @(negedge clk); cycles++; end
    err = ack_err;
    check("idle with done", busy, 0);
  endtask

  int cyc;
  logic err;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    xfer(7'h4C, 8'hA5, cyc, err);
    check("ack ok", err, 0);
    check("dac value A5", dac_value, 8'hA5);
    check("dac writes 1", dac_writes, 1);
    check("transfer cycles", cyc, 80 * Q + 2);
    repeat (10) @(posedge clk);
    xfer(7'h4C, 8'h3C, cyc, err);
    check("dac value 3C", dac_value, 8'h3C);
    check("dac writes 2", dac_writes, 2);
    // DAC not answering.
    nack = 1;
    xfer(7'h4C, 8'h11, cyc, err);
    check("nack flagged", err, 1);
    check("value kept", dac_value, 8'h3C);
    nack = 0;
    // Wrong address.
    xfer(7'h20, 8'h22, cyc, err);
    check("wrong address flagged", err, 1);
    check("writes still 2", dac_writes, 2);
    xfer(7'h4C, 8'hFF, cyc, err);
    check("recovers", err, 0);
    check("dac value FF", dac_value, 8'hFF);
    check("lines released", {scl, sda}, 2'b11);
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
