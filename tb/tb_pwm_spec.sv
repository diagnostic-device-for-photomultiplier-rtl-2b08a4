// tb_pwm_spec: runs the PWM generator with its default parameters (400 MHz
// clock, 16-bit reload, 8-bit compare, 100 kHz limit) through the timing
// range the pulser must cover: pulse widths of 2.5 ns, 10 ns and 640 ns, and
// rates of 100 kHz (4000 clocks) and 7 kHz (57142 clocks). A request for
// 400 kHz must come out at 100 kHz. Times are counted in 2.5 ns clocks.
module tb_pwm_spec;
  logic        clk = 0, rst_n = 0;
  logic        reload_wr = 0, compare_wr = 0;
  logic [15:0] reload_in = '0;
  logic [7:0]  compare_in = '0;
  logic        pwm;
  int checks = 0, failures = 0;

  pwm_generator dut (
    .clk, .rst_n, .reload_wr, .reload_in, .compare_wr, .compare_in,
    .pwm_o(pwm), .cycle_start_o(), .cnt_o(), .reload_act_o(), .compare_act_o()
  );

  always #1 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic set(input int reload, input int compare);
    @(negedge clk); reload_wr = 1; reload_in = 16'(reload); compare_wr = 1; compare_in = 8'(compare);
    @(negedge clk); reload_wr = 0; compare_wr = 0;
  endtask

  task automatic measure(output int width, output int period);
    @(negedge clk iff !pwm);
    @(negedge clk iff pwm);
    width = 1; period = 1;
    forever begin @(negedge clk); if (!pwm) break; width++; period++; end
    forever begin @(negedge clk); period++; if (pwm || period > 70000) break; end
  endtask

  // Settles on the new setting (the running cycle completes first), then measures.
  task automatic run(input string name, input int reload, input int compare,
                     input int exp_width, input int exp_period);
    int w, p;
    set(reload, compare);
    measure(w, p);
    measure(w, p);
    check({name, " width"}, w, exp_width);
    check({name, " period"}, p, exp_period);
    $display("%s: %.1f ns wide, every %.1f ns (%0d Hz)", name, real'(w) * 2.5, real'(p) * 2.5,
             400_000_000 / p);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run("2.5 ns at 100 kHz", 3999, 0, 1, 4000);
    run("10 ns at 100 kHz", 3999, 3, 4, 4000);
    run("640 ns at 100 kHz", 3999, 255, 256, 4000);
    run("10 ns at 7 kHz", 57141, 3, 4, 57142);
    run("640 ns at 7 kHz", 57141, 255, 256, 57142);
    run("400 kHz request limited", 999, 3, 4, 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
