// Self-checking testbench for sincos_rom: every table address is read and
// the sine and cosine outputs are compared with real-valued sin/cos scaled
// by 16384 (tolerance 1 LSB); the one-clock read latency is checked by
// comparing each output with the address presented one clock earlier.
module tb_sincos_rom;
  import servo_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [11:0] theta;
  sdata_t      sin_o, cos_o;

  sincos_rom dut (.clk, .theta, .sin_o, .cos_o);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    theta = 0;
    @(negedge clk);
    for (int k = 0; k < 4096 + 1; k++) begin
      if (k > 0) begin
        real es, ec;
        es = 16384.0 * $sin(2.0 * PI * real'(k - 1) / 4096.0);
        ec = 16384.0 * $cos(2.0 * PI * real'(k - 1) / 4096.0);
        checks++;
        if (absr(real'(sin_o) - es) > 1.0 || absr(real'(cos_o) - ec) > 1.0) begin
          failures++;
          if (failures < 10) $display("addr %0d sin %0d/%f cos %0d/%f", k - 1, sin_o, es, cos_o, ec);
        end
      end
      theta = 12'(k);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
