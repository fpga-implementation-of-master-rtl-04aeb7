// Self-checking testbench for vc_fsm: the state sequence 0..7, one issue and
// one latch per state, the 3-cycle step budget (25 cycles from start to done
// without stalls), a stall of state 7 through step_ready, and a start pulse
// ignored while busy.
module tb_vc_fsm;
  import servo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      start, step_ready;
  vc_state_e state;
  logic      enter, issue, latch, busy, done;

  vc_fsm dut (.clk, .rst_n, .start, .step_ready, .state, .enter, .issue, .latch, .busy, .done);

  int checks = 0, failures = 0;
  int n_latch, n_issue, n_enter, cyc;
  int order [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    cyc++;
    if (latch) begin n_latch++; order.push_back(int'(state)); end
    if (issue) n_issue++;
    if (enter) n_enter++;
  end

  task automatic run(input int stall7, input bit extra_start, output int cycles);
    n_latch = 0; n_issue = 0; n_enter = 0; order.delete();
    @(negedge clk); start = 1; cyc = 0;
    @(negedge clk); start = 0;
    while (!done) begin
      if (extra_start && cyc == 6) start = 1; else start = 0;
      step_ready = !(state == S_SAT && stall7 > 0);
      if (state == S_SAT && stall7 > 0 && !latch) stall7--;
      @(negedge clk);
      if (cyc > 200) break;
    end
    cycles = cyc;
    start = 0; step_ready = 1;
  endtask

  initial begin
    int c0, c1;
    start = 0; step_ready = 1; cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!busy && state == S_ANGLE, "idle after reset");

    run(0, 0, c0);
    check(n_latch == 8 && n_issue == 8 && n_enter == 8, $sformatf("8 issues/latches/enters got %0d/%0d/%0d", n_issue, n_latch, n_enter));
    for (int k = 0; k < 8; k++) check(order.size() == 8 && order[k] == k, $sformatf("state order at %0d", k));
    check(c0 == 25, $sformatf("cycles start->done %0d, expected 25", c0));
    @(negedge clk);
    check(!busy, "idle after done");

    run(10, 1, c1);
    check(c1 == c0 + 10, $sformatf("stall of 10 cycles in state 7: %0d vs %0d", c1, c0));
    check(n_latch == 8, "extra start while busy ignored (8 latches)");
    repeat (3) @(negedge clk);
    check(!busy, "idle after stalled run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
