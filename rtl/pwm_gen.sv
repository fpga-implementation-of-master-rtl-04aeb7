// Centre-aligned three-phase PWM generator for the SVPWM compare values.
//
// A triangle counter runs 0, 1, ..., PWMPRD-1 upwards and PWMPRD, ..., 1
// downwards, so one PWM period is 2*PWMPRD clocks. Phase x is on while the
// counter is at or above CMPx on the way up and above CMPx on the way down;
// that gives exactly 2*(PWMPRD - CMPx) on-clocks per period, centred on the
// counter peak, so CMPx = 0 is fully on and CMPx = PWMPRD fully off.
// New compare values are written into shadow registers with cmp_load and
// become active at the start of the next period, so a period never mixes old
// and new values. period_start pulses in the first clock of every period
// (counter 0, the middle of the off-time of every phase); it is the control-period
// trigger for current sampling and the vector-control computation.
// While enable is low the counter is held at 0 and all outputs are off.
// The document specifies the compare values (taon, tbon, tcon and their
// phase assignment); the counter, the shadow registers and the trigger
// point are this design's choices. Dead time is left to the gate driver.
module pwm_gen #(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] pwmprd,
  input  logic             cmp_load,
  input  logic [CNT_W-1:0] cmpa,
  input  logic [CNT_W-1:0] cmpb,
  input  logic [CNT_W-1:0] cmpc,
  output logic             period_start,
  output logic             pwm_a,
  output logic             pwm_b,
  output logic             pwm_c,
  output logic [CNT_W-1:0] cnt,
  output logic             down
);

  logic [CNT_W-1:0] sh_a, sh_b, sh_c;   // shadow
  logic [CNT_W-1:0] ac_a, ac_b, ac_c;   // active

  assign period_start = enable && !down && cnt == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      down <= 1'b0;
      sh_a <= '0; sh_b <= '0; sh_c <= '0;
      ac_a <= '0; ac_b <= '0; ac_c <= '0;
    end else begin
      if (cmp_load) begin
        sh_a <= cmpa; sh_b <= cmpb; sh_c <= cmpc;
      end
      if (!enable) begin
        cnt  <= '0;
        down <= 1'b0;
      end else begin
        if (!down) begin
          if (cnt == pwmprd - 1'b1) down <= 1'b1;
          cnt <= cnt + 1'b1;
        end else begin
          if (cnt == CNT_W'(1)) down <= 1'b0;
          cnt <= cnt - 1'b1;
        end
      end
      if (period_start || !enable) begin
        ac_a <= cmp_load ? cmpa : sh_a;
        ac_b <= cmp_load ? cmpb : sh_b;
        ac_c <= cmp_load ? cmpc : sh_c;
      end
    end
  end

  // The active values are loaded in the period's first clock, so the
  // comparison in that clock uses the values being loaded.
  logic [CNT_W-1:0] ua, ub, uc;
  assign ua = period_start ? (cmp_load ? cmpa : sh_a) : ac_a;
  assign ub = period_start ? (cmp_load ? cmpb : sh_b) : ac_b;
  assign uc = period_start ? (cmp_load ? cmpc : sh_c) : ac_c;

  always_comb begin
    if (!enable) begin
      pwm_a = 1'b0; pwm_b = 1'b0; pwm_c = 1'b0;
    end else if (!down) begin
      pwm_a = cnt >= ua; pwm_b = cnt >= ub; pwm_c = cnt >= uc;
    end else begin
      pwm_a = cnt > ua;  pwm_b = cnt > ub;  pwm_c = cnt > uc;
    end
  end

endmodule
