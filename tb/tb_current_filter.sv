// Self-checking testbench for current_filter: random 12-bit samples on both
// channels, with random gaps, are compared with a moving average of the
// last four offset-corrected samples computed in the testbench (arithmetic
// shift of the four-sample sum, missing samples at start counted as zero).
module tb_current_filter;
  import servo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sample_valid, out_valid;
  logic [11:0] adc_a, adc_b, ofs_a, ofs_b;
  sdata_t      ia, ib;

  current_filter dut (.clk, .rst_n, .sample_valid, .adc_a, .adc_b, .ofs_a, .ofs_b, .ia, .ib, .out_valid);

  int checks = 0, failures = 0;
  int ha [4], hb [4];

  initial begin
    sample_valid = 0; adc_a = 0; adc_b = 0; ofs_a = 12'd2048; ofs_b = 12'd2000;
    ha = '{0, 0, 0, 0}; hb = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int sa, sb, ea, eb;
      @(negedge clk);
      adc_a = 12'($urandom_range(0, 4095));
      adc_b = 12'($urandom_range(0, 4095));
      if (n > 250) begin adc_a = 12'(3000 + $urandom_range(0, 8)); end
      sample_valid = 1;
      for (int k = 3; k > 0; k--) begin ha[k] = ha[k-1]; hb[k] = hb[k-1]; end
      ha[0] = int'(adc_a) - int'(ofs_a);
      hb[0] = int'(adc_b) - int'(ofs_b);
      sa = ha[0] + ha[1] + ha[2] + ha[3];
      sb = hb[0] + hb[1] + hb[2] + hb[3];
      ea = sa >>> 2; eb = sb >>> 2;
      @(negedge clk);
      sample_valid = 0;
      checks++;
      if (!out_valid || int'(ia) != ea || int'(ib) != eb) begin
        failures++;
        if (failures < 10) $display("n=%0d ia=%0d/%0d ib=%0d/%0d v=%0d", n, ia, ea, ib, eb, out_valid);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
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
