// End-to-end testbench of servo_soc_top at its default parameters
// (PWMPRD = 2500, i.e. a 5000-clock PWM period, 2500-line encoder,
// 50000-clock speed window).
//
// A master model plays the processor: over the Avalon port it writes the PI
// gains and the q-axis current reference (the value an outer speed / ADRC
// loop would produce), enables the drive, and on every interrupt reads the
// measured currents and acknowledges. A motor model closes the loop: it
// measures each phase's PWM on-time over a period, removes the common mode,
// and integrates a per-phase R-L winding (R*Ts/L = 0.0315, the document's
// 3.4 ohm / 10.8 mH motor at a 100 us period). Four noisy ADC conversions
// follow every conversion trigger. An encoder model turns the shaft at a
// constant rate.
// Checks: the plant current settles on the reference (magnitude and d/q
// split) after start-up and after a reference step; the PWM on-time of
// every period equals 2*(PWMPRD - CMPA) read back from the registers; the
// loop finishes within 100 clocks (2 us at 50 MHz) of the period trigger;
// the speed register matches the encoder rate; a large reference with a
// large gain drives the modulator into over-modulation, which must be
// flagged. Each mechanism (control period, divider stall in
// over-modulation, shadow compare load, speed window, interrupt) is counted
// and must occur.
module tb_servo_soc_top;
  import servo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]  avs_address;
  logic        avs_write, avs_read, avs_readdatavalid, irq;
  logic [31:0] avs_writedata, avs_readdata;
  logic        adc_convst, adc_valid, enc_a, enc_b, pwm_u, pwm_v, pwm_w;
  logic [11:0] adc_a, adc_b;

  servo_soc_top dut (.clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .avs_readdatavalid, .irq, .adc_convst, .adc_valid, .adc_a, .adc_b,
    .enc_a, .enc_b, .pwm_u, .pwm_v, .pwm_w);

  localparam int  P = 2500;
  localparam real SQ3 = 1.7320508075688772;
  localparam real A_RL = 0.0315;   // R*Ts/L per PWM period
  localparam real G_V  = 0.175;    // current LSB per voltage LSB per period

  int checks = 0, failures = 0;
  int n_periods = 0, n_stall = 0, n_irq = 0, n_speed = 0, n_pwm_ok = 0, n_over = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ motor model
  real cur_a = 0.0, cur_b = 0.0, cur_c = 0.0;
  int  on_u, on_v, on_w, last_on_u, clk_in_period;
  always @(negedge clk) begin
    if (!rst_n) begin
      on_u <= 0; on_v <= 0; on_w <= 0; clk_in_period <= 0;
    end else if (adc_convst) begin
      real du, dv, dw, cm;
      if (clk_in_period == 2 * P) begin
        du = real'(on_u) / real'(2 * P);
        dv = real'(on_v) / real'(2 * P);
        dw = real'(on_w) / real'(2 * P);
        cm = (du + dv + dw) / 3.0;
        cur_a = cur_a * (1.0 - A_RL) + G_V * 16384.0 * (du - cm);
        cur_b = cur_b * (1.0 - A_RL) + G_V * 16384.0 * (dv - cm);
        cur_c = cur_c * (1.0 - A_RL) + G_V * 16384.0 * (dw - cm);
        n_periods++;
      end
      last_on_u = on_u;
      on_u <= int'(pwm_u); on_v <= int'(pwm_v); on_w <= int'(pwm_w);
      clk_in_period <= 1;
    end else begin
      on_u <= on_u + int'(pwm_u); on_v <= on_v + int'(pwm_v); on_w <= on_w + int'(pwm_w);
      clk_in_period <= clk_in_period + 1;
    end
  end

  function automatic logic [11:0] adc_code(input real i);
    int v;
    v = 2048 + $rtoi(i + ((i >= 0.0) ? 0.5 : -0.5)) + int'($urandom_range(0, 6)) - 3;
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return 12'(v);
  endfunction

  // converter: four conversions, 10 clocks apart, after every trigger
  initial begin
    adc_valid = 0; adc_a = 12'd2048; adc_b = 12'd2048;
    forever begin
      @(negedge clk);
      if (adc_convst) begin
        repeat (40) @(negedge clk);
        for (int k = 0; k < 4; k++) begin
          adc_a = adc_code(cur_a); adc_b = adc_code(cur_b); adc_valid = 1;
          @(negedge clk); adc_valid = 0;
          repeat (9) @(negedge clk);
        end
      end
    end
  end

  // encoder: one count every 700 clocks, forward
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  initial begin
    int ph = 0;
    {enc_a, enc_b} = 2'b00;
    forever begin
      repeat (700) @(negedge clk);
      ph = (ph + 1) % 4;
      {enc_a, enc_b} = seq[ph];
    end
  end

  // mechanism counters
  always @(negedge clk) begin
    if (dut.u_vc.div_wait) n_stall++;
    if (dut.u_enc.speed_valid) n_speed++;
  end

  // loop latency: trigger to interrupt flag
  int lat_max = 0, lat_cnt = -1;
  always @(negedge clk) begin
    if (adc_convst) lat_cnt = 0;
    else if (lat_cnt >= 0) begin
      lat_cnt++;
      if (dut.u_vc.done) begin
        if (lat_cnt > lat_max) lat_max = lat_cnt;
        lat_cnt = -1;
      end
    end
  end

  // --------------------------------------------------------- master model
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_address = 5'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); avs_address = 5'(a); avs_read = 1;
    @(negedge clk); avs_read = 0;
    d = avs_readdata;
  endtask

  // Serve one interrupt: read currents and compare value, check the PWM
  // on-time of the period that used the previous compare value.
  logic [31:0] prev_cmpa = 32'hFFFF_FFFF, prev2_cmpa = 32'hFFFF_FFFF;
  task automatic serve(output int id, output int iq);
    logic [31:0] d;
    while (!irq) @(negedge clk);
    n_irq++;
    rd(16, d); id = int'(signed'(d));
    rd(17, d); iq = int'(signed'(d));
    rd(15, d); if (d[1]) n_over++;
    wr(15, 32'h3);
    // The period that just ended ran on the compare value computed two
    // interrupts ago (computed in period k, shadow-loaded, active in k+1).
    if (prev2_cmpa != 32'hFFFF_FFFF && n_periods > 2) begin
      checks++;
      if (last_on_u == 2 * (P - int'(prev2_cmpa))) n_pwm_ok++;
      else begin failures++; $display("FAIL: on-time %0d for CMPA %0d", last_on_u, prev2_cmpa); end
    end
    prev2_cmpa = prev_cmpa;
    rd(26, prev_cmpa);
  endtask

  task automatic settle_and_check(input int periods, input int iq_ref, input string what);
    int id, iq;
    real mag;
    for (int k = 0; k < periods; k++) serve(id, iq);
    mag = $sqrt((cur_a * cur_a + cur_b * cur_b + cur_c * cur_c) * 2.0 / 3.0);
    $display("%s: i_d %0d i_q %0d (ref %0d), plant current amplitude %f", what, id, iq, iq_ref, mag);
    check(iq > iq_ref - 40 && iq < iq_ref + 40, $sformatf("%s: i_q %0d vs ref %0d", what, iq, iq_ref));
    check(id > -40 && id < 40, $sformatf("%s: i_d %0d", what, id));
    check(mag > 0.93 * real'((iq_ref < 0) ? -iq_ref : iq_ref) && mag < 1.07 * real'((iq_ref < 0) ? -iq_ref : iq_ref),
          $sformatf("%s: plant amplitude %f", what, mag));
  endtask

  initial begin
    logic [31:0] d;
    int id, iq;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // PI: Kp = 1.7, Ki*Ts = Kp*R*Ts/L -> K_new = Kp + Ki*Ts, K_old = -Kp
    wr(6, 32'(28549)); wr(7, -32'sd27853);
    wr(8, 32'(28549)); wr(9, -32'sd27853);
    wr(4, 0);
    wr(5, 32'(800));
    wr(0, 32'h5);      // enable, interrupt on
    settle_and_check(40, 800, "start-up");
    wr(5, -32'sd600);  // new q-axis reference from the outer loop
    settle_and_check(40, -600, "reference step");
    rd(23, d);
    check(int'(signed'(d)) >= 70 && int'(signed'(d)) <= 73, $sformatf("speed %0d counts per window, expected 71..72", int'(signed'(d))));
    // drive into over-modulation
    wr(12, 32'(16000));
    wr(8, 32'(120000)); wr(9, 0);
    wr(5, 32'(1900));
    for (int k = 0; k < 4; k++) serve(id, iq);
    wr(0, 32'h0);
    $display("periods %0d, irqs %0d, divider stall cycles %0d, over-modulated irqs %0d, speed windows %0d, pwm checks %0d, max latency %0d",
             n_periods, n_irq, n_stall, n_over, n_speed, n_pwm_ok, lat_max);
    check(lat_max > 0 && lat_max <= 100, $sformatf("loop latency %0d clocks", lat_max));
    check(n_stall > 0, "divider stall happened");
    check(n_over > 0, "over-modulation flagged");
    check(n_speed > 0, "speed window happened");
    check(n_pwm_ok > 50, "shadow compare load verified");
    check(n_irq >= 84, "interrupts served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
