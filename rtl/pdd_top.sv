// pdd_top: FPGA firmware of the photomultiplier diagnostic device.
//
// The device drives four UV LEDs through fast transistor drivers to send
// calibrated light pulses into a photomultiplier. The firmware sets the
// pulse timing and, through four DACs, the supply voltage of each LED driver
// (and so the LED current and pulse energy). A TDC module (over I2C) or a PC
// (over UART) writes eight registers; the command handler turns register
// writes into PWM settings and DAC transfers, and answers reads.
//
//   I2C slave --+                          +--> PWM generator --> 4 LED drivers
//               +--> comm switch --> comm  |
//   UART -------+                  handler +--> I2C master --> I2C mux --> 4 DACs
//
// Everything runs from one clock, CLK_HZ (400 MHz by default, the PWM
// resolution of 2.5 ns). The four LED drivers share one control signal.
// The command timeout resets the I2C slave and the UART receiver.
//
// Interface: I2C lines are open drain, modelled as a pull-low enable (_oe)
// and a sampled level (_i); the slave never stretches SCL and the DAC buses
// are driven by the master alone, so they need no SCL inputs.
//
// From the device paper: the seven firmware blocks and their connections, the
// 400 MHz PWM clock, the 100 kHz rate limit, four DAC buses. This design's
// own choices: a single clock for the whole firmware, the bus rates and
// addresses, and the timeout length.
module pdd_top
  import pdd_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 400_000_000,
  parameter int unsigned BAUD           = 115_200,
  parameter int unsigned I2C_HZ         = 100_000,
  parameter logic [6:0]  SLAVE_ADDR     = 7'h50,
  parameter logic [6:0]  DAC_ADDR       = 7'h4C,
  parameter int unsigned TIMEOUT_CYCLES = 400_000,
  parameter int unsigned MAX_RATE_HZ    = 100_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tdc_scl_i,
  input  logic       tdc_sda_i,
  output logic       tdc_sda_oe,
  input  logic       uart_rx_i,
  output logic       uart_tx_o,
  output logic [3:0] led_ctrl_o,
  output logic [3:0] dac_scl_oe,
  output logic [3:0] dac_sda_oe,
  input  logic [3:0] dac_sda_i,
  output logic       uart_mode_o
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned I2C_QUARTER  = CLK_HZ / (4 * I2C_HZ);
  localparam logic [15:0] RELOAD_MIN   = 16'(CLK_HZ / MAX_RATE_HZ - 1);
  localparam logic [15:0] RELOAD_RESET = 16'hFFFF;

  byte_beat_t i2c_rx, uart_rx, rx, resp, i2c_tx, uart_tx;
  logic       i2c_frame_start, frame_start, timeout;
  src_e       mode;

  logic        pwm_reload_wr, pwm_compare_wr;
  logic [15:0] pwm_reload;
  logic [7:0]  pwm_compare;
  logic        pwm;

  logic        dac_start, dac_done, dac_ack_err;
  logic [1:0]  dac_ch;
  logic [7:0]  dac_value;
  logic        m_scl_oe, m_sda_oe, m_sda_i;

  i2c_slave #(.SLAVE_ADDR(SLAVE_ADDR)) u_i2c_slave (
    .clk, .rst_n, .soft_rst(timeout),
    .scl_i(tdc_scl_i), .sda_i(tdc_sda_i), .sda_oe(tdc_sda_oe),
    .rx_valid(i2c_rx.valid), .rx_data(i2c_rx.data), .frame_start(i2c_frame_start),
    .tx_load(i2c_tx.valid), .tx_data(i2c_tx.data)
  );

  uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .soft_rst(timeout),
    .rx_i(uart_rx_i), .rx_valid(uart_rx.valid), .rx_data(uart_rx.data),
    .tx_start(uart_tx.valid), .tx_data(uart_tx.data), .tx_busy(), .tx_o(uart_tx_o)
  );

  comm_switch u_comm_switch (
    .clk, .rst_n,
    .i2c_rx, .i2c_frame_start, .uart_rx,
    .rx, .frame_start, .resp, .i2c_tx, .uart_tx, .mode_o(mode)
  );

  comm_handler #(
    .TIMEOUT_CYCLES(TIMEOUT_CYCLES), .RELOAD_MIN(RELOAD_MIN), .RELOAD_RESET(RELOAD_RESET)
  ) u_comm_handler (
    .clk, .rst_n, .rx, .frame_start, .resp, .timeout_o(timeout),
    .pwm_reload_wr, .pwm_reload, .pwm_compare_wr, .pwm_compare,
    .dac_start, .dac_ch, .dac_value, .dac_done, .dac_ack_err,
    .status_o()
  );

  pwm_generator #(
    .RELOAD_W(16), .COMPARE_W(8), .RELOAD_MIN(RELOAD_MIN), .RELOAD_RESET(RELOAD_RESET)
  ) u_pwm (
    .clk, .rst_n,
    .reload_wr(pwm_reload_wr), .reload_in(pwm_reload),
    .compare_wr(pwm_compare_wr), .compare_in(pwm_compare),
    .pwm_o(pwm), .cycle_start_o(), .cnt_o(), .reload_act_o(), .compare_act_o()
  );

  assign led_ctrl_o  = {4{pwm}};
  assign uart_mode_o = (mode == SRC_UART);

  i2c_master #(.QUARTER(I2C_QUARTER)) u_i2c_master (
    .clk, .rst_n, .start(dac_start), .addr(DAC_ADDR), .data(dac_value),
    .busy(), .done(dac_done), .ack_err(dac_ack_err),
    .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .sda_i(m_sda_i)
  );

  i2c_mux #(.N(4)) u_i2c_mux (
    .sel(dac_ch), .m_scl_oe, .m_sda_oe, .m_sda_i,
    .ch_scl_oe(dac_scl_oe), .ch_sda_oe(dac_sda_oe), .ch_sda_i(dac_sda_i)
  );

endmodule
