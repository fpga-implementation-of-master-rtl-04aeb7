// Self-checking testbench for vc_core, the complete current-loop step.
//
// A floating-point reference computes each control period independently of
// the fixed-point datapath: electrical angle from the encoder count (4 pole
// pairs, 10000 counts per turn), Clarke and Park transformations, the
// incremental PI regulators, the inverse Park transformation, and the PWM
// compare values through the min-max (zero-sequence) form of space-vector
// modulation, which is equivalent to the sector/X-Y-Z method of the design:
//   duty_x = 1/2 + (v_x - (max + min)/2) / Vdc,  CMP_x = PWMPRD * (1 - duty_x)
// with the voltage vector scaled down to max - min = Vdc when it lies
// outside the hexagon (over-modulation). Vdc = 16384 voltage LSBs,
// PWMPRD = 2500.
// Two kinds of periods are mixed: incremental PI with random gains (the
// reference's integrator is re-synchronised to the design after every check
// so rounding does not accumulate), and periods with the integrators cleared
// and unit gain, where the references set the output voltage directly and
// drive the modulator deep into over-modulation. The start-to-done cycle
// count is checked: 26 cycles normally, 42 when the divider runs, and in
// any case at most 100 cycles (2 us at 50 MHz).
module tb_vc_core;
  import servo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, pi_clear, busy, div_wait, done;
  vc_cfg_t     cfg;
  sdata_t      ia, ib;
  logic [17:0] pos;
  logic [15:0] cmpa, cmpb, cmpc;
  vc_stat_t    stat;
  vc_state_e   state;

  vc_core dut (.clk, .rst_n, .start, .pi_clear, .cfg, .ia, .ib, .pos,
               .cmpa, .cmpb, .cmpc, .stat, .state, .busy, .div_wait, .done);

  localparam real PI = 3.14159265358979323846;
  localparam real SQ3 = 1.7320508075688772;
  localparam real VDC = 16384.0;
  localparam int  P = 2500;

  int checks = 0, failures = 0;
  int n_over = 0, n_lin = 0, n_stall = 0;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic real clampr(input real v, input real l);
    return (v > l) ? l : ((v < -l) ? -l : v);
  endfunction

  task automatic near(input real got, input real exp, input real tol, input string what);
    checks++;
    if (absr(got - exp) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  // reference state
  real m_ed_prev = 0.0, m_eq_prev = 0.0, m_vd = 0.0, m_vq = 0.0;

  always @(negedge clk) if (div_wait) n_stall++;

  task automatic period(input bit clear);
    real th, ial, ibe, id, iq, ed, eq, vd, vq, val, vbe, pa, pb, pc, mx, mn, s, cyc_lim;
    real ea, eb, ec;
    int  cyc;
    // reference
    th  = 2.0 * PI * (real'(pos) * 4.0 / 10000.0 + real'(cfg.angle_ofs) / 4096.0);
    ial = real'(ia);
    ibe = (real'(ia) + 2.0 * real'(ib)) / SQ3;
    id  = $cos(th) * ial + $sin(th) * ibe;
    iq  = -$sin(th) * ial + $cos(th) * ibe;
    if (clear) begin m_vd = 0.0; m_vq = 0.0; m_ed_prev = 0.0; m_eq_prev = 0.0; end
    ed  = real'(cfg.id_ref) - id;
    eq  = real'(cfg.iq_ref) - iq;
    vd  = clampr(m_vd + (real'(cfg.kd_new) * ed + real'(cfg.kd_old) * m_ed_prev) / 16384.0, real'(cfg.v_lim));
    vq  = clampr(m_vq + (real'(cfg.kq_new) * eq + real'(cfg.kq_old) * m_eq_prev) / 16384.0, real'(cfg.v_lim));
    val = $cos(th) * vd - $sin(th) * vq;
    vbe = $sin(th) * vd + $cos(th) * vq;
    pa = val; pb = -val / 2.0 + SQ3 / 2.0 * vbe; pc = -val / 2.0 - SQ3 / 2.0 * vbe;
    mx = (pa > pb) ? pa : pb; mx = (mx > pc) ? mx : pc;
    mn = (pa < pb) ? pa : pb; mn = (mn < pc) ? mn : pc;
    s = (mx - mn > VDC) ? VDC / (mx - mn) : 1.0;
    if (s < 1.0) n_over++; else n_lin++;
    ea = real'(P) * (0.5 - s * (pa - (mx + mn) / 2.0) / VDC);
    eb = real'(P) * (0.5 - s * (pb - (mx + mn) / 2.0) / VDC);
    ec = real'(P) * (0.5 - s * (pc - (mx + mn) / 2.0) / VDC);

    // run the design
    if (clear) begin
      @(negedge clk); pi_clear = 1;
      @(negedge clk); pi_clear = 0;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 300) begin @(negedge clk); cyc++; end

    near(real'(stat.i_d), id, 8.0, "i_d");
    near(real'(stat.i_q), iq, 8.0, "i_q");
    near(real'(stat.v_d), vd, 16.0, "v_d");
    near(real'(stat.v_q), vq, 16.0, "v_q");
    near(real'(stat.v_alpha), val, 20.0, "v_alpha");
    near(real'(stat.v_beta), vbe, 20.0, "v_beta");
    near(real'(cmpa), ea, 6.0, "CMPA");
    near(real'(cmpb), eb, 6.0, "CMPB");
    near(real'(cmpc), ec, 6.0, "CMPC");
    checks++;
    if (stat.oversat != (s < 0.999) && s < 0.99) begin failures++; $display("FAIL oversat flag"); end
    checks++;
    if (cyc != (stat.oversat ? 42 : 26) || cyc > 100) begin
      failures++; $display("FAIL cycles %0d (oversat %0d)", cyc, stat.oversat);
    end
    // re-synchronise the reference integrators
    m_vd = real'(stat.v_d); m_vq = real'(stat.v_q); m_ed_prev = ed; m_eq_prev = eq;
  endtask

  function automatic sdata_t rs(input int lo, input int hi);
    return sdata_t'(int'($urandom_range(0, hi - lo)) + lo);
  endfunction

  initial begin
    start = 0; pi_clear = 0; ia = 0; ib = 0; pos = 0;
    cfg = '0;
    cfg.pwmprd = 16'(P); cfg.elec_gain = 18'sd26844; cfg.angle_ofs = 12'd0;
    cfg.kx = 18'sd2165; cfg.ky = 18'sd3750; cfg.v_lim = 18'sd9459;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      ia  = rs(-3000, 3000);
      ib  = rs(-3000, 3000);
      pos = 18'($urandom_range(0, 9999));
      cfg.angle_ofs = 12'($urandom_range(0, 4095));
      if (n % 2 == 0) begin
        // incremental PI with random gains
        cfg.v_lim  = 18'sd9459;
        cfg.kd_new = rs(0, 12000);  cfg.kd_old = -rs(0, 10000);
        cfg.kq_new = rs(0, 12000);  cfg.kq_old = -rs(0, 10000);
        cfg.id_ref = rs(-500, 500); cfg.iq_ref = rs(-2000, 2000);
        period(0);
      end else begin
        // direct voltage command, up to ~1.6x the linear limit
        cfg.v_lim  = 18'sd15000;
        cfg.kd_new = K_ONE; cfg.kd_old = '0;
        cfg.kq_new = K_ONE; cfg.kq_old = '0;
        cfg.id_ref = rs(-11000, 11000); cfg.iq_ref = rs(-11000, 11000);
        period(1);
      end
    end
    checks++;
    if (n_over < 10 || n_lin < 10 || n_stall == 0) begin
      failures++; $display("FAIL coverage: over %0d linear %0d stall cycles %0d", n_over, n_lin, n_stall);
    end
    $display("periods: linear %0d, over-modulated %0d, divider stall cycles %0d", n_lin, n_over, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
