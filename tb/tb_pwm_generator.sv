// tb_pwm_generator: checks pulse width and period of the PWM generator, the
// deferred (shadow) update of both registers, the minimum-reload clamp and
// the shortest and longest widths. Widths and periods are measured on pwm_o
// in clock cycles and compared with compare+1 and reload+1.
module tb_pwm_generator;
  localparam logic [15:0] RMIN = 16'd10;

  logic        clk = 0, rst_n = 0;
  logic        reload_wr = 0, compare_wr = 0;
  logic [15:0] reload_in = '0;
  logic [7:0]  compare_in = '0;
  logic        pwm, cstart;
  logic [15:0] cnt, ract;
  logic [7:0]  cact;
  int checks = 0, failures = 0;

  pwm_generator #(.RELOAD_MIN(RMIN), .RELOAD_RESET(16'd40)) dut (
    .clk, .rst_n, .reload_wr, .reload_in, .compare_wr, .compare_in,
    .pwm_o(pwm), .cycle_start_o(cstart), .cnt_o(cnt), .reload_act_o(ract), .compare_act_o(cact)
  );

  always #1 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr_reload(input int v);
    @(negedge clk); reload_wr = 1; reload_in = 16'(v);
    @(negedge clk); reload_wr = 0;
  endtask
  task automatic wr_compare(input int v);
    @(negedge clk); compare_wr = 1; compare_in = 8'(v);
    @(negedge clk); compare_wr = 0;
  endtask

  // Measures one pulse: width, then cycles from its rise to the next rise.
  task automatic measure(output int width, output int period);
    @(negedge clk iff !pwm);
    @(negedge clk iff pwm);
    width = 1; period = 1;
    forever begin
      @(negedge clk);
      if (!pwm) break;
      width++; period++;
    end
    forever begin
      @(negedge clk);
      period++;
      if (pwm || period > 70000) break;
    end
  endtask

  // Counts pulses seen in n cycles.
  task automatic count_pulses(input int n, output int pulses);
    logic prev = pwm;
    pulses = 0;
    repeat (n) begin
      @(negedge clk);
      if (pwm && !prev) pulses++;
      prev = pwm;
    end
  endtask

  int w, p, n;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // After reset compare is 0: one-clock pulses every 41 clocks.
    measure(w, p);
    check("reset width 1", w, 1);
    check("reset period 41", p, 41);

    wr_compare(4);
    wr_reload(20);
    measure(w, p);   // first pulse may start in the old cycle length
    measure(w, p);
    check("width 5", w, 5);
    check("period 21", p, 21);

    // Shadow: a compare written while the pulse is high does not change it.
    @(negedge clk iff (pwm && cnt == 16'd1)); compare_wr = 1; compare_in = 8'd11;
    @(negedge clk); compare_wr = 0;
    w = 1;
    forever begin @(negedge clk); if (!pwm) break; w++; end
    check("width unchanged in current cycle", w, 3);   // counted from cnt=2
    measure(w, p);
    check("new width next cycle", w, 12);
    check("period still 21", p, 21);

    // Shadow: a reload written mid-cycle takes effect only at the cycle end.
    @(negedge clk iff (cnt == 16'd3)); reload_wr = 1; reload_in = 16'd50;
    @(negedge clk); reload_wr = 0;
    check("reload not yet active", int'(ract), 20);
    measure(w, p);
    check("reload 50 -> period 51", p, 51);

    // Clamp: a reload below the minimum gives the minimum period.
    wr_compare(4);
    wr_reload(3);
    measure(w, p);
    measure(w, p);
    check("clamped period", p, int'(RMIN) + 1);
    check("clamped reload", int'(ract), int'(RMIN));

    // Width 1 (2.5 ns at 400 MHz) and the full 8-bit width.
    wr_reload(300);
    wr_compare(0);
    measure(w, p); measure(w, p);
    check("width 1 (2.5 ns)", w, 1);
    wr_compare(255);
    measure(w, p); measure(w, p);
    check("width 256 (640 ns)", w, 256);
    check("period 301", p, 301);
    count_pulses(3010, n);
    check("ten pulses in ten periods", n, 10);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
