// Current-loop vector-control unit (the slave processor of the servo SoC).
//
// One control period computes, from the sampled phase currents ia, ib and the
// rotor position, the three PWM compare values of the inverter:
//   state 0  electrical angle  theta_e = elec_gain*pos + angle_ofs (mod 1 turn)
//   state 1  Clarke            i_alpha = ia, i_beta = (ia + 2 ib)/sqrt(3)
//   state 2  Park              i_d = cos*i_alpha + sin*i_beta,
//                              i_q = -sin*i_alpha + cos*i_beta
//   state 3  incremental PI    V_d += Kd_new*e_d(k) + Kd_old*e_d(k-1), same for q
//   state 4  inverse Park      V_alpha = cos*V_d - sin*V_q,
//                              V_beta  = sin*V_d + cos*V_q
//   state 5  SVPWM sector      Vb = sqrt3*V_alpha - V_beta, Vc = -sqrt3*V_alpha - V_beta
//   state 6  SVPWM X, Y, Z     Y = kx*V_beta + ky*V_alpha, Z = kx*V_beta - ky*V_alpha,
//                              X = Y + Z
//   state 7  over-modulation   t1s = t1*r, t2s = t2*r, r = PWMPRD/(t1+t2) if
//                              t1+t2 > PWMPRD, else r = 1
// Every state is one pass through a single four-multiplier, two-adder unit
// (vc_mac). The state machine (vc_fsm) steps S[2..0]; the C selector and the
// X selector below choose the unit's coefficients and operands for the
// current state, and the latch signal stores y1/y2 into the registers the
// state owns. Side logic outside the unit: the sin/cos table, the sector
// code and t1/t2 selection (svpwm_sector), the divider for r
// (svpwm_divider) and the compare-value assignment (svpwm_timing).
//
// Interface: start (one cycle) samples ia, ib and pos and begins a period;
// cfg holds the run-time settings written by the master processor. When the
// period finishes, cmpa/cmpb/cmpc and stat are updated and done pulses.
// Timing: 3 cycles per state, plus FRAC+2 cycles in state 7 when the divider
// is needed, plus 2 cycles of output registering: 26 cycles without and 42
// with over-modulation (0.52 us / 0.84 us at a 50 MHz clock).
// pi_clear resets the PI integrators and stored errors.
// The step sequence, the normalised coefficients and the use of one shared
// multiply-accumulate unit follow the document. The id_ref input, the PI
// output limit v_lim, the number formats and the cycle budget are this
// design's choices.
module vc_core
  import servo_pkg::*;
#(
  parameter int POS_W = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              pi_clear,
  input  vc_cfg_t           cfg,
  input  sdata_t            ia,
  input  sdata_t            ib,
  input  logic [POS_W-1:0]  pos,
  output logic [15:0]       cmpa,
  output logic [15:0]       cmpb,
  output logic [15:0]       cmpc,
  output vc_stat_t          stat,
  output vc_state_e         state,
  output logic              busy,
  output logic              div_wait,
  output logic              done
);

  // ---------------------------------------------------------------- control
  vc_state_e st;
  logic      enter, issue, latch, fsm_done, step_ready;

  vc_fsm #(.MAC_LAT(2)) u_fsm (
    .clk, .rst_n, .start,
    .step_ready,
    .state(st), .enter, .issue, .latch, .busy, .done(fsm_done)
  );
  assign state = st;

  // ------------------------------------------------------ intermediate regs
  sdata_t      ia_r, ib_r, pos_r;
  logic [11:0] theta_r;
  sdata_t      ialpha_r, ibeta_r, id_r, iq_r;
  sdata_t      ed_prev, eq_prev, vd_r, vq_r;
  sdata_t      valpha_r, vbeta_r;
  logic [2:0]  sect_r;
  sdata_t      x_r, y_r, z_r;
  sdata_t      t1s_r, t2s_r;
  logic        oversat_r;

  // --------------------------------------------------------------- sin/cos
  sdata_t sin_v, cos_v, nsin_v;
  sincos_rom #(.ADDR_W(12)) u_rom (.clk, .theta(theta_r), .sin_o(sin_v), .cos_o(cos_v));
  assign nsin_v = -sin_v;

  // ------------------------------------------------------------ PI errors
  sdata_t ed, eq;
  assign ed = sat_w(48'(cfg.id_ref) - 48'(id_r));
  assign eq = sat_w(48'(cfg.iq_ref) - 48'(iq_r));

  // --------------------------------------------------- sector and t1 / t2
  logic [2:0] sect_no;
  sdata_t     t1, t2;
  sdata_t     mac_y1, mac_y2;
  svpwm_sector u_sector (
    .va(vbeta_r), .vb(mac_y1), .vc(mac_y2), .sect_no,
    .sect_sel(sect_r), .x(x_r), .y(y_r), .z(z_r), .t1, .t2
  );

  // ------------------------------------------------------ divider for r
  logic [18:0] t_sum;
  logic        need_div, div_busy, div_done, div_seen;
  logic [14:0] div_q;
  assign t_sum    = 19'(t1) + 19'(t2);
  assign need_div = t_sum > 19'(cfg.pwmprd);

  svpwm_divider #(.NUM_W(16), .DEN_W(19), .FRAC_BITS(FRAC)) u_div (
    .clk, .rst_n,
    .start(enter && st == S_SAT && need_div),
    .num(cfg.pwmprd), .den(t_sum),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   div_seen <= 1'b0;
    else if (enter)               div_seen <= 1'b0;
    else if (div_done)            div_seen <= 1'b1;
  end

  assign step_ready = (st != S_SAT) || !need_div || div_seen;
  assign div_wait   = (st == S_SAT) && busy && !step_ready;

  sdata_t ratio;
  assign ratio = need_div ? sdata_t'({3'b000, div_q}) : K_ONE;

  // ------------------------------------------- C selector and X selector
  mac_op_t op;
  always_comb begin
    op = '0;
    unique case (st)
      S_ANGLE: begin
        op.c1 = cfg.elec_gain; op.x1 = pos_r;
        op.c2 = K_ONE;         op.x2 = sdata_t'({6'd0, cfg.angle_ofs});
      end
      S_CLARKE: begin
        op.c1 = K_ONE;         op.x1 = ia_r;
        op.c3 = K_INV_SQRT3;   op.x3 = ia_r;
        op.c4 = K_2_SQRT3;     op.x4 = ib_r;
      end
      S_PARK: begin
        op.c1 = cos_v;  op.x1 = ialpha_r;  op.c2 = sin_v; op.x2 = ibeta_r;
        op.c3 = nsin_v; op.x3 = ialpha_r;  op.c4 = cos_v; op.x4 = ibeta_r;
      end
      S_PI: begin
        op.c1 = cfg.kd_new; op.x1 = ed;  op.c2 = cfg.kd_old; op.x2 = ed_prev;
        op.c3 = cfg.kq_new; op.x3 = eq;  op.c4 = cfg.kq_old; op.x4 = eq_prev;
      end
      S_IPARK: begin
        op.c1 = cos_v; op.x1 = vd_r;  op.c2 = nsin_v; op.x2 = vq_r;
        op.c3 = sin_v; op.x3 = vd_r;  op.c4 = cos_v;  op.x4 = vq_r;
      end
      S_SECTOR: begin
        op.c1 = K_SQRT3;  op.x1 = valpha_r;  op.c2 = -K_ONE; op.x2 = vbeta_r;
        op.c3 = -K_SQRT3; op.x3 = valpha_r;  op.c4 = -K_ONE; op.x4 = vbeta_r;
      end
      S_XYZ: begin
        op.c1 = cfg.kx; op.x1 = vbeta_r;  op.c2 = cfg.ky;          op.x2 = valpha_r;
        op.c3 = cfg.kx; op.x3 = vbeta_r;  op.c4 = sat_w(-48'(cfg.ky)); op.x4 = valpha_r;
      end
      S_SAT: begin
        op.c1 = ratio; op.x1 = t1;
        op.c3 = ratio; op.x3 = t2;
      end
      default: op = '0;
    endcase
  end

  // ------------------------------------------- multiply-accumulate unit
  logic mac_valid;
  vc_mac u_mac (.clk, .rst_n, .in_valid(issue), .op, .out_valid(mac_valid), .y1(mac_y1), .y2(mac_y2));

  // ----------------------------------------------- PI integrator update
  function automatic sdata_t limit(input sdata_t acc, input sdata_t inc, input sdata_t lim);
    logic signed [47:0] s;
    s = 48'(acc) + 48'(inc);
    if (s > 48'(lim))       return lim;
    else if (s < -48'(lim)) return sat_w(-48'(lim));
    else                    return s[W-1:0];
  endfunction

  // ------------------------------------------------------ result latches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ia_r <= '0; ib_r <= '0; pos_r <= '0; theta_r <= '0;
      ialpha_r <= '0; ibeta_r <= '0; id_r <= '0; iq_r <= '0;
      ed_prev <= '0; eq_prev <= '0; vd_r <= '0; vq_r <= '0;
      valpha_r <= '0; vbeta_r <= '0; sect_r <= '0;
      x_r <= '0; y_r <= '0; z_r <= '0; t1s_r <= '0; t2s_r <= '0;
      oversat_r <= 1'b0;
    end else begin
      if (start && !busy) begin
        ia_r  <= ia;
        ib_r  <= ib;
        pos_r <= sdata_t'(pos);
      end
      if (pi_clear) begin
        ed_prev <= '0; eq_prev <= '0; vd_r <= '0; vq_r <= '0;
      end
      if (latch) begin
        unique case (st)
          S_ANGLE:  theta_r <= mac_y1[11:0];
          S_CLARKE: begin ialpha_r <= mac_y1; ibeta_r <= mac_y2; end
          S_PARK:   begin id_r <= mac_y1; iq_r <= mac_y2; end
          S_PI: if (!pi_clear) begin
            vd_r    <= limit(vd_r, mac_y1, cfg.v_lim);
            vq_r    <= limit(vq_r, mac_y2, cfg.v_lim);
            ed_prev <= ed;
            eq_prev <= eq;
          end
          S_IPARK:  begin valpha_r <= mac_y1; vbeta_r <= mac_y2; end
          S_SECTOR: sect_r <= sect_no;
          S_XYZ:    begin y_r <= mac_y1; z_r <= mac_y2; x_r <= sat_w(48'(mac_y1) + 48'(mac_y2)); end
          S_SAT:    begin t1s_r <= mac_y1; t2s_r <= mac_y2; oversat_r <= need_div; end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------ compare values
  logic [15:0] cmpa_c, cmpb_c, cmpc_c;
  svpwm_timing u_timing (
    .pwmprd(cfg.pwmprd), .sect_no(sect_r), .t1s(t1s_r), .t2s(t2s_r),
    .cmpa(cmpa_c), .cmpb(cmpb_c), .cmpc(cmpc_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmpa <= '0; cmpb <= '0; cmpc <= '0;
      done <= 1'b0;
    end else begin
      done <= fsm_done;
      if (fsm_done) begin
        cmpa <= cmpa_c; cmpb <= cmpb_c; cmpc <= cmpc_c;
      end
    end
  end

  always_comb begin
    stat.i_alpha = ialpha_r;  stat.i_beta = ibeta_r;
    stat.i_d     = id_r;      stat.i_q    = iq_r;
    stat.v_d     = vd_r;      stat.v_q    = vq_r;
    stat.v_alpha = valpha_r;  stat.v_beta = vbeta_r;
    stat.theta_e = theta_r;   stat.sect_no = sect_r;
    stat.oversat = oversat_r;
  end

  // The multiply-accumulate result must be ready when a step is latched.
  a_mac_ready: assert property (@(posedge clk) disable iff (!rst_n) latch |-> mac_valid);

endmodule
