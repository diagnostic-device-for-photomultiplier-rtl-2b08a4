// tb_pdd_top: end-to-end test of the diagnostic device firmware with every
// parameter at its default (400 MHz clock, 100 kHz I2C, 115200 baud, 1 ms
// command timeout). A TDC model talks I2C, a PC model talks UART, and four
// DAC models sit on the four DAC buses. The test sets a 10 ns pulse at the
// 100 kHz maximum rate and measures it on the LED outputs, refuses a faster
// rate, writes all four DACs and checks what each received, provokes a DAC
// error, switches to the UART link and back, and lets a half-sent command
// time out. Each of these mechanisms is counted and must occur.
module tb_pdd_top;
  import pdd_pkg::*;
  localparam int CPB  = 400_000_000 / 115_200;     // UART clocks per bit
  localparam int HALF = 400_000_000 / 100_000 / 2; // TDC I2C half period

  logic       clk = 0, rst_n = 0;
  logic       h_scl_oe, h_sda_oe, tdc_sda_oe;
  logic       tdc_scl, tdc_sda;
  logic       uart_rx = 1, uart_tx;
  logic [3:0] led, dac_scl_oe, dac_sda_oe, model_sda_oe, dac_scl, dac_sda;
  logic       uart_mode;
  logic [3:0] dac_nack = '0;
  logic [7:0] dac_val [4];
  int         dac_writes [4];
  int checks = 0, failures = 0;

  pdd_top dut (
    .clk, .rst_n, .tdc_scl_i(tdc_scl), .tdc_sda_i(tdc_sda), .tdc_sda_oe,
    .uart_rx_i(uart_rx), .uart_tx_o(uart_tx), .led_ctrl_o(led),
    .dac_scl_oe, .dac_sda_oe, .dac_sda_i(dac_sda), .uart_mode_o(uart_mode)
  );

  i2c_host_bfm #(.HALF(HALF)) tdc (.clk, .scl_oe(h_scl_oe), .sda_oe(h_sda_oe), .sda_i(tdc_sda));
  assign tdc_scl = ~h_scl_oe;
  assign tdc_sda = ~(h_sda_oe | tdc_sda_oe);

  for (genvar i = 0; i < 4; i++) begin : g_dac
    assign dac_scl[i] = ~dac_scl_oe[i];
    assign dac_sda[i] = ~(dac_sda_oe[i] | model_sda_oe[i]);
    dac_model #(.ADDR(7'h4C)) u_dac (
      .clk, .scl(dac_scl[i]), .sda(dac_sda[i]), .nack(dac_nack[i]),
      .sda_oe(model_sda_oe[i]), .value(dac_val[i]), .writes(dac_writes[i])
    );
  end

  always #1 clk = ~clk;   // one clock = 2 time units = 2.5 ns

  // ---------------- mechanism counters ----------------
  int n_shadow = 0, n_rate_refused = 0, n_dac_queue = 0, n_dac_error = 0;
  int n_link_switch = 0, n_timeout = 0, n_readback = 0, n_dac_queue_cycles = 0;
  logic mode_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (uart_mode != mode_q) n_link_switch++;
    mode_q <= uart_mode;
    if (dut.u_comm_handler.timeout_o) n_timeout++;
  end

  // ---------------- LED pulse monitor ----------------
  int   pulses = 0, last_width = 0, last_period = 0, width = 0, since_rise = 0;
  logic led_q = 0;
  always @(negedge clk) if (rst_n) begin
    since_rise++;
    if (led[0]) width++;
    if (led[0] && !led_q) begin
      pulses++;
      last_period = since_rise;
      since_rise = 0;
      width = 1;
    end
    if (!led[0] && led_q) last_width = width;
    led_q = led[0];
    if (led != {4{led[0]}}) begin failures++; $display("FAIL LED outputs differ"); end
  end

  task automatic check(input string what, input int got_v, input int exp);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  // ---------------- TDC (I2C) transactions ----------------
  task automatic i2c_wr(input reg_addr_e a, input logic [7:0] d);
    logic ack;
    tdc.start();
    tdc.write_byte({7'h50, 1'b0}, ack);  check("i2c addr ack", ack, 1);
    tdc.write_byte({5'b0, a}, ack);      check("i2c cmd ack", ack, 1);
    tdc.write_byte(d, ack);              check("i2c data ack", ack, 1);
    tdc.stop();
    tdc.idle(HALF);
  endtask

  task automatic i2c_rd(input reg_addr_e a, output logic [7:0] d);
    logic ack;
    tdc.start();
    tdc.write_byte({7'h50, 1'b0}, ack);  check("i2c addr ack", ack, 1);
    tdc.write_byte({5'b10000, a}, ack);  check("i2c cmd ack", ack, 1);
    tdc.start();
    tdc.write_byte({7'h50, 1'b1}, ack);  check("i2c read addr ack", ack, 1);
    tdc.read_byte(1'b0, d);
    tdc.stop();
    tdc.idle(HALF);
  endtask

  // ---------------- PC (UART) transactions ----------------
  task automatic uart_send(input logic [7:0] b);
    uart_rx = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; repeat (CPB) @(negedge clk); end
    uart_rx = 1; repeat (CPB) @(negedge clk);
  endtask

  task automatic uart_recv(output logic [7:0] b, output logic ok);
    int n = 0;
    ok = 0;
    b = '0;
    while (uart_tx && n < 30 * CPB) begin @(negedge clk); n++; end
    if (!uart_tx) begin
      repeat (CPB / 2) @(negedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = uart_tx; end
      repeat (CPB) @(negedge clk);
      ok = uart_tx;
    end
  endtask

  task automatic uart_rd(input reg_addr_e a, output logic [7:0] d, output logic ok);
    fork
      uart_send({5'b10000, a});
      uart_recv(d, ok);
    join
  endtask

  task automatic uart_wr(input reg_addr_e a, input logic [7:0] d);
    uart_send({5'b0, a});
    uart_send(d);
  endtask

  logic [7:0] v;
  logic       ok;

  // Pulse count when the PWM buffer takes a new reload.
  int p_commit = 1 << 30;
  int p_old;
  always @(posedge clk) if (rst_n && dut.pwm_reload_wr) p_commit = pulses;

  // A DAC write waiting while another DAC transfer runs.
  always @(posedge clk)
    if (rst_n && dut.u_comm_handler.in_flight && |dut.u_comm_handler.pending) n_dac_queue_cycles++;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    tdc.idle(HALF);

    // 1. Compare 3: pulse of 4 clocks (10 ns) at the maximum rate (reload 3999, 100 kHz).
    i2c_wr(REG_COMPARE, 8'd3);
    i2c_wr(REG_RELOAD_HI, 8'h0F);
    i2c_wr(REG_RELOAD_LO, 8'h9F);
    // The new reload waits for the end of the 65536-clock cycle in progress.
    wait (pulses >= p_commit + 1);
    @(negedge clk);
    check("cycle in progress completes", last_period, 65536);
    p_old = last_period;
    wait (pulses >= p_commit + 2);
    @(negedge clk);
    check("new period after cycle end", last_period, 4000);
    if (p_old == 65536 && last_period == 4000) n_shadow++;
    @(negedge clk iff (pulses == p_commit + 3 && !led[0]));
    check("pulse width 10 ns", last_width, 4);
    check("pulse period 10 us", last_period, 4000);
    i2c_rd(REG_RELOAD_LO, v);  check("reload lo readback", v, 8'h9F);
    i2c_rd(REG_COMPARE, v);    check("compare readback", v, 3);
    n_readback++;

    // 2. A faster rate is refused; the period stays at 4000 clocks.
    i2c_wr(REG_RELOAD_HI, 8'h01);
    i2c_wr(REG_RELOAD_LO, 8'h00);
    i2c_rd(REG_STATUS, v);     check("rate refused flag", v[ST_RELOAD_REJ], 1);
    if (v[ST_RELOAD_REJ]) n_rate_refused++;
    @(negedge clk iff (!led[0])); @(negedge clk iff led[0]); @(negedge clk iff !led[0]);
    check("period kept", last_period, 4000);
    i2c_wr(REG_STATUS, 8'h20);

    // 2b. DAC 3 does not answer: error flag, cleared by writing 1.
    dac_nack[3] = 1;
    i2c_wr(REG_DAC3, 8'h10);
    repeat (150_000) @(negedge clk);
    i2c_rd(REG_STATUS, v);     check("dac3 error", v, 8'h08);
    if (v[3]) n_dac_error++;
    dac_nack[3] = 0;
    i2c_wr(REG_STATUS, 8'h08);
    i2c_rd(REG_STATUS, v);     check("dac3 error cleared", v, 0);

    // 5. The PC takes over over UART: read-back and a new pulse width.
    uart_rd(REG_COMPARE, v, ok);
    check("uart answer framed", ok, 1);
    check("uart readback", v, 3);
    check("uart mode", uart_mode, 1);
    uart_wr(REG_COMPARE, 8'd19);
    uart_rd(REG_COMPARE, v, ok);
    check("uart write readback", v, 19);
    if (v == 19) n_readback++;
    @(negedge clk iff (!led[0])); @(negedge clk iff led[0]); @(negedge clk iff !led[0]);
    check("pulse width 50 ns", last_width, 20);

    // 3. All four DACs, written back to back over the faster UART link, are
    //    queued behind the running transfer; each receives its own value on
    //    its own bus.
    uart_wr(REG_DAC0, 8'h40);
    uart_wr(REG_DAC1, 8'h81);
    uart_wr(REG_DAC2, 8'hC2);
    uart_wr(REG_DAC3, 8'hF3);
    uart_rd(REG_STATUS, v, ok);
    check("busy while DAC writes wait", v[ST_BUSY], 1);
    if (v[ST_BUSY] && n_dac_queue_cycles > 0) n_dac_queue++;
    repeat (400_000) @(negedge clk);
    check("dac0 value", dac_val[0], 8'h40);
    check("dac1 value", dac_val[1], 8'h81);
    check("dac2 value", dac_val[2], 8'hC2);
    check("dac3 value", dac_val[3], 8'hF3);
    for (int i = 0; i < 3; i++) check("dac writes", dac_writes[i], 1);
    check("dac3 writes", dac_writes[3], 1);   // the refused write is not counted
    uart_rd(REG_STATUS, v, ok);  check("status clean", v, 0);

    // 6. A write command whose data byte never arrives times out after 1 ms;
    //    the next byte is then a command again.
    uart_send({5'b0, REG_COMPARE});
    repeat (400_100) @(negedge clk);
    uart_rd(REG_COMPARE, v, ok);
    check("answer after timeout", ok, 1);
    check("compare unchanged", v, 19);

    // 7. The TDC takes the device back.
    i2c_rd(REG_COMPARE, v);    check("i2c after uart", v, 19);
    check("i2c mode", uart_mode, 0);

    check("shadow update seen", n_shadow > 0, 1);
    check("rate limit seen", n_rate_refused > 0, 1);
    check("dac queue seen", n_dac_queue > 0, 1);
    check("dac error seen", n_dac_error > 0, 1);
    check("link switched both ways", n_link_switch >= 2, 1);
    check("timeout seen", n_timeout, 1);
    check("read-back seen", n_readback, 2);
    $display("mechanisms: shadow=%0d rate_refused=%0d dac_queue=%0d dac_error=%0d link_switch=%0d timeout=%0d readback=%0d",
             n_shadow, n_rate_refused, n_dac_queue, n_dac_error, n_link_switch, n_timeout, n_readback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
