// Self-checking testbench for svpwm_timing. For random t1s, t2s with
// t1s + t2s <= PWMPRD and every sector, the three compare values must equal
// the entries of the phase assignment table (U, V, W each get one of
// taon, tbon, tcon), computed here independently from their definitions.
// The resulting on-times are also checked to differ by exactly t1s and t2s.
module tb_svpwm_timing;
  import servo_pkg::*;

  logic [15:0] pwmprd, cmpa, cmpb, cmpc;
  logic [2:0]  sect_no;
  sdata_t      t1s, t2s;

  svpwm_timing dut (.pwmprd, .sect_no, .t1s, .t2s, .cmpa, .cmpb, .cmpc);

  int checks = 0, failures = 0;
  // Which of (taon, tbon, tcon) = (0, 1, 2) each phase takes, per sector 1..6.
  int tab_a [7] = '{1, 1, 0, 0, 2, 2, 1};
  int tab_b [7] = '{0, 0, 2, 1, 1, 0, 2};
  int tab_c [7] = '{2, 2, 1, 2, 0, 1, 0};

  initial begin
    for (int n = 0; n < 700; n++) begin
      int p, a, b, t [3];
      p = int'($urandom_range(100, 5000));
      a = int'($urandom_range(0, p));
      b = int'($urandom_range(0, p - a));
      pwmprd = 16'(p); t1s = sdata_t'(a); t2s = sdata_t'(b);
      sect_no = 3'(n % 7);
      #1;
      t[0] = (p - a - b) / 2; t[1] = t[0] + a; t[2] = t[1] + b;
      checks++;
      if (int'(cmpa) != t[tab_a[sect_no]] || int'(cmpb) != t[tab_b[sect_no]] || int'(cmpc) != t[tab_c[sect_no]]) begin
        failures++;
        if (failures < 10) $display("sect %0d p=%0d t1=%0d t2=%0d -> %0d %0d %0d", sect_no, p, a, b, cmpa, cmpb, cmpc);
      end
      // the earliest-on phase leads the middle one by t1s, the middle the last by t2s
      begin
        int lo, mid, hi;
        lo = int'(cmpa); mid = int'(cmpb); hi = int'(cmpc);
        if (lo > mid) begin automatic int tt = lo; lo = mid; mid = tt; end
        if (mid > hi) begin automatic int tt = mid; mid = hi; hi = tt; end
        if (lo > mid) begin automatic int tt = lo; lo = mid; mid = tt; end
        checks++;
        if (mid - lo != a || hi - mid != b) begin failures++; $display("spacing"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
