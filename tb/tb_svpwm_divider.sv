// Self-checking testbench for svpwm_divider: random num < den pairs are
// compared with floor(num*2^14/den) computed in wide integers, done must
// come exactly 15 cycles after start, and num >= den must give 1.0 (16384)
// on the next cycle.
module tb_svpwm_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, busy, done;
  logic [15:0] num;
  logic [18:0] den;
  logic [14:0] q;

  svpwm_divider dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .q);

  int checks = 0, failures = 0;

  task automatic one(input int n, input int d);
    int lat; longint e;
    @(negedge clk);
    num = 16'(n); den = 19'(d); start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    e = (n >= d) ? 16384 : (longint'(n) * 16384) / d;
    checks++;
    if (longint'(q) != e || lat != ((n >= d) ? 1 : 15)) begin
      failures++;
      $display("num=%0d den=%0d q=%0d exp=%0d lat=%0d", n, d, q, e, lat);
    end
  endtask

  initial begin
    start = 0; num = 0; den = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(2500, 2501);
    one(2500, 5000);
    one(1, 400000);
    one(2500, 2500);
    one(3000, 10);
    for (int k = 0; k < 300; k++) begin
      int n, d;
      n = int'($urandom_range(1, 65535));
      d = n + int'($urandom_range(1, 300000));
      if (d > 524287) d = 524287;
      one(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
