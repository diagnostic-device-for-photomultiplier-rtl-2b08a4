// comm_switch: chooses which link, I2C or UART, commands the device.
//
// The device listens to its I2C slave unless the UART delivers a byte; the
// two masters are never connected at the same time, so no arbitration is
// needed. The switch remembers which link spoke last: received bytes of
// either link are merged into one stream for the command handler, and the
// handler's answers are sent back over the link that is active (loaded into
// the I2C slave's read buffer, or started on the UART transmitter). When the
// active link changes, a frame start is signalled so that the handler takes
// the next byte as a new command.
//
// Interface: i2c_rx / uart_rx are one-cycle byte beats from the links,
// i2c_frame_start marks a new I2C write transfer; rx / frame_start go to the
// handler in the same cycle (combinational path). resp from the handler
// is routed to i2c_tx or uart_tx in the same cycle. mode_o shows the
// active link.
//
// From the device paper: I2C by default, UART when the user gives input, and no
// priority logic. This design's own choices: switching on each received byte
// and routing answers to the last link that spoke.
module comm_switch
  import pdd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  byte_beat_t i2c_rx,
  input  logic       i2c_frame_start,
  input  byte_beat_t uart_rx,
  output byte_beat_t rx,
  output logic       frame_start,
  input  byte_beat_t resp,
  output byte_beat_t i2c_tx,
  output byte_beat_t uart_tx,
  output src_e       mode_o
);

  src_e mode, mode_nx;

  always_comb begin
    mode_nx = mode;
    if (uart_rx.valid)                        mode_nx = SRC_UART;
    else if (i2c_rx.valid || i2c_frame_start) mode_nx = SRC_I2C;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode <= SRC_I2C;
    else        mode <= mode_nx;
  end

  always_comb begin
    rx          = uart_rx.valid ? uart_rx : i2c_rx;
    frame_start = i2c_frame_start || (mode_nx != mode);
    i2c_tx      = '{valid: resp.valid && (mode == SRC_I2C),  data: resp.data};
    uart_tx     = '{valid: resp.valid && (mode == SRC_UART), data: resp.data};
  end

  assign mode_o = mode;

  // The two masters are never active at once.
  a_one_link : assert property (@(posedge clk) disable iff (!rst_n) !(uart_rx.valid && i2c_rx.valid));

endmodule
