// Slave side of the master-slave servo system-on-chip.
//
// The servo drive is split between a master soft processor and this
// hardware. The master runs the slow position and speed loops, the active
// disturbance rejection controller (whose output is the q-axis current
// reference), monitoring and host communication; it reaches this block over
// its Avalon-MM port. This block is the fast part: every PWM period it
// samples the filtered phase currents and the encoder position and runs the
// complete current-loop vector control (Clarke, Park, PI, inverse Park,
// SVPWM) on one time-multiplexed multiply-accumulate unit, then drives the
// three inverter phases with centre-aligned PWM.
//
//   pwm_gen.period_start --> vc_core.start (when enabled)
//   current_filter (adc_*) --> vc_core.ia/ib
//   quad_encoder (enc_a/b) --> vc_core.pos, speed to the master
//   vc_core.cmpa..c + done --> pwm_gen shadow registers (used next period)
//   avalon_regs <--> master processor
//
// adc_convst pulses with every period start to trigger the external
// converter of the phase currents, whose results come back on adc_valid /
// adc_a / adc_b. The processor, converter and power stage are outside this
// block. The composition follows the document's system figure; the signal
// level connections are this design's choices.
module servo_soc_top
  import servo_pkg::*;
#(
  parameter int PWMPRD     = 2500,
  parameter int POLE_PAIRS = 4,
  parameter int ENC_LINES  = 2500,
  parameter int SPEED_WIN  = 50000,
  parameter int ADC_W      = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave port to the master processor
  input  logic [4:0]        avs_address,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  input  logic              avs_read,
  output logic [31:0]       avs_readdata,
  output logic              avs_readdatavalid,
  output logic              irq,
  // phase current converter
  output logic              adc_convst,
  input  logic              adc_valid,
  input  logic [ADC_W-1:0]  adc_a,
  input  logic [ADC_W-1:0]  adc_b,
  // incremental encoder
  input  logic              enc_a,
  input  logic              enc_b,
  // inverter gate commands (upper switches of phases U, V, W)
  output logic              pwm_u,
  output logic              pwm_v,
  output logic              pwm_w
);

  vc_cfg_t            cfg;
  vc_stat_t           stat;
  logic               enable, pi_clear, period_start, loop_done;
  logic [ADC_W-1:0]   ofs_a, ofs_b;
  sdata_t             ia, ib, speed;
  logic [17:0]        pos_mech;
  logic signed [31:0] pos_multi;
  logic [15:0]        cmpa, cmpb, cmpc;
  logic               speed_valid, enc_err, filt_valid;
  logic               vc_busy, vc_div_wait;
  vc_state_e          vc_state;
  logic [15:0]        pwm_cnt;
  logic               pwm_down;

  avalon_regs #(
    .PWMPRD(PWMPRD), .POLE_PAIRS(POLE_PAIRS), .ENC_LINES(ENC_LINES), .ADC_W(ADC_W)
  ) u_regs (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata, .avs_readdatavalid, .irq,
    .cfg, .enable, .pi_clear, .adc_ofs_a(ofs_a), .adc_ofs_b(ofs_b),
    .stat, .loop_done, .pos_mech, .pos_multi, .speed, .ia, .ib, .cmpa, .cmpb, .cmpc
  );

  current_filter #(.ADC_W(ADC_W)) u_filt (
    .clk, .rst_n, .sample_valid(adc_valid), .adc_a, .adc_b, .ofs_a, .ofs_b,
    .ia, .ib, .out_valid(filt_valid)
  );

  quad_encoder #(.ENC_LINES(ENC_LINES), .SPEED_WIN(SPEED_WIN), .POS_W(18)) u_enc (
    .clk, .rst_n, .enc_a, .enc_b,
    .pos_mech, .pos_multi, .speed(speed), .speed_valid, .err(enc_err)
  );

  vc_core #(.POS_W(18)) u_vc (
    .clk, .rst_n, .start(period_start), .pi_clear, .cfg, .ia, .ib, .pos(pos_mech),
    .cmpa, .cmpb, .cmpc, .stat, .state(vc_state), .busy(vc_busy), .div_wait(vc_div_wait),
    .done(loop_done)
  );

  pwm_gen #(.CNT_W(16)) u_pwm (
    .clk, .rst_n, .enable, .pwmprd(cfg.pwmprd),
    .cmp_load(loop_done), .cmpa, .cmpb, .cmpc,
    .period_start, .pwm_a(pwm_u), .pwm_b(pwm_v), .pwm_c(pwm_w),
    .cnt(pwm_cnt), .down(pwm_down)
  );

  assign adc_convst = period_start;

endmodule
