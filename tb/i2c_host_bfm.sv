// i2c_host_bfm: simulation-only I2C bus master used by the testbenches to play
// the TDC. It drives SCL and SDA as pull-low enables and reads the bus level
// on sda_i. Each SCL half period lasts HALF clock cycles. Tasks: start,
// stop, write_byte (returns the slave's acknowledge), read_byte (sends the
// given acknowledge), idle (waits with SCL high).
module i2c_host_bfm #(
  parameter int HALF = 20
) (
  input  logic clk,
  output logic scl_oe,
  output logic sda_oe,
  input  logic sda_i
);
  initial begin
    scl_oe = 1'b0;
    sda_oe = 1'b0;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // START or repeated START: leaves SCL low.
  task automatic start();
    sda_oe = 1'b0;  wait_cycles(HALF / 2);
    scl_oe = 1'b0;  wait_cycles(HALF);
    sda_oe = 1'b1;  wait_cycles(HALF);
    scl_oe = 1'b1;  wait_cycles(HALF / 2);
  endtask

  task automatic stop();
    sda_oe = 1'b1;  wait_cycles(HALF / 2);
    scl_oe = 1'b0;  wait_cycles(HALF);
    sda_oe = 1'b0;  wait_cycles(HALF);
  endtask

  task automatic clock_bit(input logic b, output logic sampled);
    sda_oe = ~b;    wait_cycles(HALF / 2);
    scl_oe = 1'b0;  wait_cycles(HALF / 2);
    sampled = sda_i;
    wait_cycles(HALF / 2);
    scl_oe = 1'b1;  wait_cycles(HALF / 2);
  endtask

  task automatic write_byte(input logic [7:0] b, output logic ack);
    logic s;
    for (int i = 7; i >= 0; i--) clock_bit(b[i], s);
    clock_bit(1'b1, s);
    ack = ~s;
  endtask

  task automatic read_byte(input logic ack, output logic [7:0] b);
    logic s;
    for (int i = 7; i >= 0; i--) begin
      clock_bit(1'b1, s);
      b[i] = s;
    end
    clock_bit(~ack, s);
  endtask

  task automatic idle(input int n);
    sda_oe = 1'b0;
    scl_oe = 1'b0;
    wait_cycles(n);
  endtask
endmodule
