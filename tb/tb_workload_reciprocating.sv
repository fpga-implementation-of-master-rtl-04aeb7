// Workload testbench: reciprocating motion at rated speed, full-size design.
//
// The servo is moved from count 0 to 145, then forward to 6000 and back to
// 145, with the 2500-line encoder turning at the rated 3000 rpm
// (10000 counts/turn * 50 turn/s = one count every 100 clocks at 50 MHz),
// while the current loop runs with a constant q-axis reference against an
// R-L winding model. Checked:
//   - the speed register reads +500 / -500 counts per 1 ms window during
//     the constant-speed parts of the stroke
//   - the multi-turn position reaches 6000 and returns to 145 exactly
//   - in every control period the electrical angle computed in state 0
//     equals count * 4 pole pairs * 4096 / 10000 (mod 4096) within 1 LSB
//   - the current loop still delivers the commanded q-axis current on
//     average while the rotor turns at 200 Hz electrical
module tb_workload_reciprocating;
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
  localparam real A_RL = 0.0315;
  localparam real G_V  = 0.175;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ motor model
  real cur_a = 0.0, cur_b = 0.0, cur_c = 0.0;
  int  on_u, on_v, on_w, clk_in_period;
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
      end
      on_u <= int'(pwm_u); on_v <= int'(pwm_v); on_w <= int'(pwm_w);
      clk_in_period <= 1;
    end else begin
      on_u <= on_u + int'(pwm_u); on_v <= on_v + int'(pwm_v); on_w <= on_w + int'(pwm_w);
      clk_in_period <= clk_in_period + 1;
    end
  end

  function automatic logic [11:0] adc_code(input real i);
    int v;
    v = 2048 + $rtoi(i + ((i >= 0.0) ? 0.5 : -0.5));
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return 12'(v);
  endfunction

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

  // ---------------------------------------------------------- encoder model
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  int enc_pos = 0, ph = 0;
  task automatic move_to(input int target, input int clocks_per_count);
    while (enc_pos != target) begin
      int dir;
      dir = (target > enc_pos) ? 1 : -1;
      repeat (clocks_per_count) @(negedge clk);
      ph = (ph + dir + 4) % 4;
      enc_pos += dir;
      {enc_a, enc_b} = seq[ph];
    end
  endtask

  // ------------------------------------------- per-period angle check
  int n_angle = 0, n_angle_bad = 0;
  always @(negedge clk) begin
    if (dut.u_vc.done) begin
      int cnt, th;
      real e;
      cnt = int'(dut.u_vc.pos_r);
      e = real'(cnt) * 4.0 * 4096.0 / 10000.0;
      e = e - 4096.0 * $floor(e / 4096.0);
      th = int'(dut.u_vc.stat.theta_e);
      n_angle++;
      if (!((real'(th) - e) <= 1.0 && (real'(th) - e) >= -1.0) &&
          !((real'(th) + 4096.0 - e) <= 1.0) && !((e + 4096.0 - real'(th)) <= 1.0))
        n_angle_bad++;
    end
  end

  // speed samples taken in the middle of each stroke
  int spd_fwd [$], spd_rev [$];
  bit fwd_mid = 0, rev_mid = 0;
  always @(negedge clk) begin
    if (dut.u_enc.speed_valid) begin
      if (fwd_mid) spd_fwd.push_back(int'(dut.u_enc.speed));
      if (rev_mid) spd_rev.push_back(int'(dut.u_enc.speed));
    end
  end

  // q-axis current averaged over control periods while moving
  real iq_sum = 0.0;
  int  iq_n = 0;
  bit  iq_on = 0;
  always @(negedge clk) begin
    if (dut.u_vc.done && iq_on) begin
      iq_sum += real'(dut.u_vc.stat.i_q);
      iq_n++;
    end
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_address = 5'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); avs_address = 5'(a); avs_read = 1;
    @(negedge clk); avs_read = 0;
    d = avs_readdata;
  endtask

  initial begin
    logic [31:0] d;
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    {enc_a, enc_b} = 2'b00;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    wr(6, 32'(28549)); wr(7, -32'sd27853);
    wr(8, 32'(28549)); wr(9, -32'sd27853);
    wr(5, 32'(500));
    wr(0, 32'h1);
    move_to(145, 400);
    repeat (60000) @(negedge clk);
    rd(22, d);
    check(int'(signed'(d)) == 145, $sformatf("start position %0d", int'(signed'(d))));
    // forward stroke at rated speed
    iq_on = 1;
    fork
      move_to(6000, 100);
      begin
        repeat (120000) @(negedge clk);
        fwd_mid = 1;
        repeat (300000) @(negedge clk);
        fwd_mid = 0;
      end
    join
    repeat (60000) @(negedge clk);
    rd(22, d);
    check(int'(signed'(d)) == 6000, $sformatf("end position %0d", int'(signed'(d))));
    // reverse stroke
    fork
      move_to(145, 100);
      begin
        repeat (120000) @(negedge clk);
        rev_mid = 1;
        repeat (300000) @(negedge clk);
        rev_mid = 0;
      end
    join
    iq_on = 0;
    repeat (60000) @(negedge clk);
    rd(22, d);
    check(int'(signed'(d)) == 145, $sformatf("return position %0d", int'(signed'(d))));
    rd(21, d);
    check(int'(d) == 145, $sformatf("position within the turn %0d", int'(d)));

    check(spd_fwd.size() >= 4 && spd_rev.size() >= 4, $sformatf("speed windows %0d %0d", spd_fwd.size(), spd_rev.size()));
    foreach (spd_fwd[k]) check(spd_fwd[k] == 500, $sformatf("forward speed %0d", spd_fwd[k]));
    foreach (spd_rev[k]) check(spd_rev[k] == -500, $sformatf("reverse speed %0d", spd_rev[k]));
    check(n_angle > 200 && n_angle_bad == 0, $sformatf("electrical angle: %0d periods, %0d off", n_angle, n_angle_bad));
    check(iq_n > 100 && iq_sum / real'(iq_n) > 450.0 && iq_sum / real'(iq_n) < 550.0,
          $sformatf("mean i_q while moving %f over %0d periods", iq_sum / real'(iq_n), iq_n));
    $display("periods %0d, mean i_q while moving %f, speed windows %0d/%0d",
             n_angle, iq_sum / real'(iq_n), spd_fwd.size(), spd_rev.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
