// pwm_generator: LED driver control pulse generator.
//
// A free-running counter counts 0, 1, ..., reload and then restarts at 0, so
// one PWM cycle lasts reload+1 clock cycles. The output goes high when a
// cycle starts and toggles back low at the end of the clock in which the
// counter equals the compare value, so the pulse lasts compare+1 clock
// cycles. With the 400 MHz clock one count is 2.5 ns: the 8-bit compare
// gives pulses of 2.5 ns to 640 ns, exactly the required range, and the
// 16-bit reload gives rates from 100 kHz down to about 6.1 kHz.
//
// New values are written into buffer (shadow) registers of the same width and
// are copied into the working registers only when a new cycle starts, so a
// cycle is never cut short or stretched by a write. As one of the places that
// enforce the 100 kHz maximum pulse rate, a reload below RELOAD_MIN is raised
// to RELOAD_MIN on its way into the buffer.
//
// Interface: reload_wr/compare_wr are single-cycle write strobes with their
// values. pwm_o is registered and aligned with cnt_o; cycle_start_o is high
// in the first clock of every cycle (counter = 0).
//
// From the device paper: the 16-bit reload and 8-bit compare registers, the
// counter reset on reload equality, the toggle at compare, the shadow
// registers, the minimum reload and the 2.5 ns to 640 ns width range. This
// design's own choices: the output polarity (high first), the reset values
// (slowest rate, shortest pulse) and clamping rather than ignoring a
// too-small reload. There is no off setting: the shortest pulse is one clock.
module pwm_generator #(
  parameter int unsigned             RELOAD_W     = 16,
  parameter int unsigned             COMPARE_W    = 8,
  parameter logic [RELOAD_W-1:0]     RELOAD_MIN   = RELOAD_W'(3999),
  parameter logic [RELOAD_W-1:0]     RELOAD_RESET = '1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 reload_wr,
  input  logic [RELOAD_W-1:0]  reload_in,
  input  logic                 compare_wr,
  input  logic [COMPARE_W-1:0] compare_in,
  output logic                 pwm_o,
  output logic                 cycle_start_o,
  output logic [RELOAD_W-1:0]  cnt_o,
  output logic [RELOAD_W-1:0]  reload_act_o,
  output logic [COMPARE_W-1:0] compare_act_o
);

  logic [RELOAD_W-1:0]  reload_buf, reload_act, cnt, cnt_nx, reload_nx;
  logic [COMPARE_W-1:0] compare_buf, compare_act, compare_nx;
  logic                 wrap;

  // Buffer registers, written at any time.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reload_buf  <= RELOAD_RESET;
      compare_buf <= '0;
    end else begin
      if (reload_wr)  reload_buf  <= (reload_in < RELOAD_MIN) ? RELOAD_MIN : reload_in;
      if (compare_wr) compare_buf <= compare_in;
    end
  end

  assign wrap = (cnt == reload_act);

  always_comb begin
    cnt_nx     = wrap ? '0 : cnt + 1'b1;
    reload_nx  = wrap ? reload_buf  : reload_act;
    compare_nx = wrap ? compare_buf : compare_act;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      reload_act  <= RELOAD_RESET;
      compare_act <= '0;
      pwm_o       <= 1'b0;
    end else begin
      cnt         <= cnt_nx;
      reload_act  <= reload_nx;
      compare_act <= compare_nx;
      // High from the cycle start through the clock where the counter equals compare.
      pwm_o       <= (cnt_nx <= RELOAD_W'(compare_nx));
    end
  end

  assign cycle_start_o = (cnt == '0);
  assign cnt_o         = cnt;
  assign reload_act_o  = reload_act;
  assign compare_act_o = compare_act;

  // The working reload never drops below the minimum.
  a_reload_min : assert property (@(posedge clk) disable iff (!rst_n) reload_act >= RELOAD_MIN);

endmodule
