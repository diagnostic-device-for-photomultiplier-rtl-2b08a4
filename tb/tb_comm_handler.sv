// tb_comm_handler: commands are fed to the handler as bytes; a simple model
// of the I2C master completes DAC writes after a fixed time and can refuse a
// chosen DAC. Checks register read-back, PWM strobes, the minimum-reload
// refusal, the DAC write queue and its order, the status bits (busy, DAC
// errors, write-1-to-clear), the command timeout and abandonment on a new
// frame.
module tb_comm_handler;
  import pdd_pkg::*;
  localparam int TO = 100;
  logic        clk = 0, rst_n = 0;
  byte_beat_t  rx = '0, resp;
  logic        frame_start = 0, timeout;
  logic        pwm_reload_wr, pwm_compare_wr;
  logic [15:0] pwm_reload;
  logic [7:0]  pwm_compare;
  logic        dac_start, dac_done = 0, dac_ack_err = 0;
  logic [1:0]  dac_ch;
  logic [7:0]  dac_value, status;
  logic [3:0]  refuse = '0;
  int checks = 0, failures = 0;

  comm_handler #(.TIMEOUT_CYCLES(TO), .RELOAD_MIN(16'd3999)) dut (
    .clk, .rst_n, .rx, .frame_start, .resp, .timeout_o(timeout),
    .pwm_reload_wr, .pwm_reload, .pwm_compare_wr, .pwm_compare,
    .dac_start, .dac_ch, .dac_value, .dac_done, .dac_ack_err, .status_o(status)
  );

  always #1 clk = ~clk;

  // Recorders.
  logic [7:0]  last_resp;
  int          n_resp = 0, n_reload = 0, n_compare = 0, n_timeout = 0;
  logic [15:0] last_reload;
  logic [7:0]  last_compare;
  int          dac_order [$];
  logic [7:0]  dac_vals [$];
  always @(posedge clk) if (rst_n) begin
    if (resp.valid)     begin n_resp++; last_resp = resp.data; end
    if (pwm_reload_wr)  begin n_reload++; last_reload = pwm_reload; end
    if (pwm_compare_wr) begin n_compare++; last_compare = pwm_compare; end
    if (timeout)        n_timeout++;
  end

  // I2C master model: 30 cycles per transfer.
  initial begin
    forever begin
      @(posedge clk iff (rst_n && dac_start));
      dac_order.push_back(int'(dac_ch));
      dac_vals.push_back(dac_value);
      repeat (30) @(posedge clk);
      @(negedge clk); dac_done = 1; dac_ack_err = refuse[dac_ch];
      @(negedge clk); dac_done = 0; dac_ack_err = 0;
    end
  end

  task automatic check(input string what, input int got_v, input int exp);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  task automatic send(input logic [7:0] b);
    @(negedge clk); rx = '{valid: 1'b1, data: b};
    @(negedge clk); rx = '0;
    repeat (3) @(negedge clk);
  endtask
  task automatic wr(input reg_addr_e a, input logic [7:0] d);
    send({5'b0, a});
    send(d);
  endtask
  task automatic rd(input reg_addr_e a, output logic [7:0] d);
    int n0 = n_resp;
    send({1'b1, 4'b0, a});
    check("one answer", n_resp - n0, 1);
    d = last_resp;
  endtask

  logic [7:0] v;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    rd(REG_STATUS, v);     check("status after reset", v, 0);
    rd(REG_RELOAD_HI, v);  check("reload hi reset", v, 8'hFF);
    rd(REG_COMPARE, v);    check("compare reset", v, 0);

    wr(REG_COMPARE, 8'd10);
    check("compare strobe", n_compare, 1);
    check("compare value", last_compare, 10);
    rd(REG_COMPARE, v);    check("compare readback", v, 10);

    wr(REG_RELOAD_HI, 8'h10);
    check("no reload strobe on high byte", n_reload, 0);
    wr(REG_RELOAD_LO, 8'h00);
    check("reload strobe", n_reload, 1);
    check("reload value", last_reload, 16'h1000);

    // 0x0F9F = 3999 is the smallest accepted reload; 0x0F9E is refused.
    wr(REG_RELOAD_HI, 8'h0F);
    wr(REG_RELOAD_LO, 8'h9E);
    check("refused", n_reload, 1);
    rd(REG_STATUS, v);     check("reload refused bit", v[ST_RELOAD_REJ], 1);
    rd(REG_RELOAD_LO, v);  check("low byte reads back", v, 8'h9E);
    wr(REG_RELOAD_LO, 8'h9F);
    check("minimum accepted", n_reload, 2);
    check("minimum value", last_reload, 16'd3999);
    wr(REG_STATUS, 8'h20);
    rd(REG_STATUS, v);     check("refused bit cleared", v, 0);

    // Four DAC writes back to back: queued and sent in order.
    wr(REG_DAC0, 8'h11);
    wr(REG_DAC1, 8'h22);
    rd(REG_STATUS, v);     check("busy while writing", v[ST_BUSY], 1);
    wr(REG_DAC2, 8'h33);
    wr(REG_DAC3, 8'h44);
    repeat (200) @(negedge clk);
    check("four transfers", dac_order.size(), 4);
    for (int i = 0; i < 4 && i < dac_order.size(); i++) begin
      check("dac order", dac_order[i], i);
      check("dac value", dac_vals[i], 8'h11 * (i + 1));
    end
    rd(REG_STATUS, v);     check("idle", v, 0);
    rd(REG_DAC2, v);       check("dac2 readback", v, 8'h33);

    // DAC 2 does not acknowledge.
    refuse = 4'b0100;
    wr(REG_DAC2, 8'h55);
    repeat (60) @(negedge clk);
    rd(REG_STATUS, v);     check("dac2 error", v, 8'h04);
    refuse = '0;
    wr(REG_STATUS, 8'h04);
    rd(REG_STATUS, v);     check("dac error cleared", v, 0);

    // Timeout: the data byte never comes.
    send({5'b0, REG_COMPARE});
    repeat (TO + 5) @(negedge clk);
    check("timeout fired", n_timeout, 1);
    rd(REG_COMPARE, v);    check("next byte is a command", v, 10);
    // Data byte just in time: accepted, no timeout.
    send({5'b0, REG_COMPARE});
    repeat (TO - 10) @(negedge clk);
    send(8'd7);
    check("no second timeout", n_timeout, 1);
    rd(REG_COMPARE, v);    check("late data accepted", v, 7);

    // A new frame abandons a half-received write.
    send({5'b0, REG_COMPARE});
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    rd(REG_COMPARE, v);    check("abandoned write", v, 7);

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
