// Self-checking testbench for pwm_gen (PWMPRD reduced to 20 for speed).
// Checks: period_start every 2*PWMPRD clocks; each phase on for exactly
// 2*(PWMPRD - CMP) clocks per period, centred on the counter peak; compare
// values loaded mid-period take effect only from the next period start;
// disable holds all outputs off.
module tb_pwm_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int P = 20;
  logic        enable, cmp_load, period_start, pwm_a, pwm_b, pwm_c, down;
  logic [15:0] pwmprd, cmpa, cmpb, cmpc, cnt;

  pwm_gen dut (.clk, .rst_n, .enable, .pwmprd, .cmp_load, .cmpa, .cmpb, .cmpc,
               .period_start, .pwm_a, .pwm_b, .pwm_c, .cnt, .down);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Measure one full period from a period_start: on-counts and the first /
  // last on-clock of phase A relative to the period start.
  task automatic measure(output int na, output int nb, output int nc, output int first_a, output int last_a, output int len);
    na = 0; nb = 0; nc = 0; first_a = -1; last_a = -1; len = 0;
    while (!period_start) @(negedge clk);
    do begin
      if (pwm_a) begin na++; if (first_a < 0) first_a = len; last_a = len; end
      if (pwm_b) nb++;
      if (pwm_c) nc++;
      len++;
      @(negedge clk);
    end while (!period_start && len < 1000);
  endtask

  initial begin
    int na, nb, nc, fa, la, len;
    enable = 0; cmp_load = 0; pwmprd = 16'(P); cmpa = 0; cmpb = 0; cmpc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pwm_a && !pwm_b && !pwm_c, "off while disabled");
    // load 5, 10, 20 before enabling
    cmpa = 5; cmpb = 10; cmpc = 20; cmp_load = 1;
    @(negedge clk); cmp_load = 0;
    enable = 1;
    measure(na, nb, nc, fa, la, len);
    check(len == 2 * P, $sformatf("period length %0d", len));
    check(na == 2 * (P - 5) && nb == 2 * (P - 10) && nc == 0, $sformatf("on counts %0d %0d %0d", na, nb, nc));
    check(fa == 5 && fa + la == 2 * P - 1, $sformatf("A centred: first %0d last %0d", fa, la));
    // load mid-period: must not change the current period
    repeat (7) @(negedge clk);
    cmpa = 0; cmpb = 19; cmpc = 1; cmp_load = 1;
    @(negedge clk); cmp_load = 0;
    while (!period_start) @(negedge clk);
    measure(na, nb, nc, fa, la, len);
    check(na == 2 * P && nb == 2 && nc == 2 * (P - 1), $sformatf("new values next period: %0d %0d %0d", na, nb, nc));
    enable = 0;
    @(negedge clk);
    check(!pwm_a && !pwm_b && !pwm_c && cnt == 0, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
