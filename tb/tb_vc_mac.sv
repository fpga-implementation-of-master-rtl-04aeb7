// Self-checking testbench for vc_mac: random operand sets, including
// extreme values that saturate, are compared with a reference computed in
// wide integer arithmetic; the two-cycle latency is checked on every result.
module tb_vc_mac;
  import servo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid;
  mac_op_t op;
  logic    out_valid;
  sdata_t  y1, y2;

  vc_mac dut (.clk, .rst_n, .in_valid, .op, .out_valid, .y1, .y2);

  int checks = 0, failures = 0;

  function automatic longint ref_y(sdata_t c1, sdata_t x1, sdata_t c2, sdata_t x2);
    longint s;
    s = (longint'(c1) * longint'(x1) + longint'(c2) * longint'(x2) + 8192) >>> 14;
    if (s > 131071) s = 131071;
    if (s < -131072) s = -131072;
    return s;
  endfunction

  function automatic sdata_t rnd(input bit big);
    int r;
    r = int'($urandom_range(0, 262143)) - 131072;
    if (!big) r = r / 8;
    return sdata_t'(r);
  endfunction

  longint exp1 [$], exp2 [$];
  int     issue_cyc [$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Scoreboard, sampled between edges: each result must appear exactly two
  // clock edges after its operands were presented.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp1.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        longint e1, e2; int ic;
        e1 = exp1.pop_front(); e2 = exp2.pop_front(); ic = issue_cyc.pop_front();
        if (longint'(y1) != e1 || longint'(y2) != e2 || cyc - ic != 2) begin
          failures++;
          $display("MISMATCH y1=%0d/%0d y2=%0d/%0d lat=%0d", y1, e1, y2, e2, cyc - ic);
        end
      end
    end
  end

  initial begin
    in_valid = 0; op = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op.c1 = rnd(n % 5 == 0); op.c2 = rnd(n % 7 == 0);
      op.c3 = rnd(n % 5 == 0); op.c4 = rnd(n % 3 == 0);
      op.x1 = rnd(1); op.x2 = rnd(1); op.x3 = rnd(1); op.x4 = rnd(1);
      if (n == 1) begin op.c1 = K_ONE; op.x1 = 18'sd12345; op.c2 = '0; op.c3 = K_SQRT3; op.x3 = 18'sd1000; op.c4 = -K_ONE; op.x4 = 18'sd500; end
      if (in_valid) begin
        exp1.push_back(ref_y(op.c1, op.x1, op.c2, op.x2));
        exp2.push_back(ref_y(op.c3, op.x3, op.c4, op.x4));
        issue_cyc.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp1.size() != 0) begin failures++; $display("missing outputs: %0d", exp1.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
