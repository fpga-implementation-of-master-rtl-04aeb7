// Shared types and constants of the servo current-loop unit.
//
// All datapath quantities (currents, voltages, switching times, angles) are
// 18-bit two's-complement words, matching the 18x18 hardware multipliers the
// design targets. Coefficients fed to the multiply-accumulate unit use the
// same width with 14 fraction bits (Q3.14), so 1.0 = 16384 and the largest
// representable coefficient is just below 8. The fraction width is this
// design's choice; the document fixes only the 18x18 multiplier size.
package servo_pkg;

  localparam int W    = 18;   // data and coefficient width
  localparam int FRAC = 14;   // coefficient fraction bits

  typedef logic signed [W-1:0] sdata_t;

  // Normalised constants of the transform steps, Q3.14.
  localparam sdata_t K_ONE       = 18'sd16384;  // 1
  localparam sdata_t K_SQRT3     = 18'sd28378;  // sqrt(3)
  localparam sdata_t K_INV_SQRT3 = 18'sd9459;   // 1/sqrt(3)
  localparam sdata_t K_2_SQRT3   = 18'sd18918;  // 2/sqrt(3)

  // Steps of the vector-control state machine, S[2..0].
  typedef enum logic [2:0] {
    S_ANGLE  = 3'd0,  // rotor angle -> electrical angle, pole offset
    S_CLARKE = 3'd1,  // Clarke transformation
    S_PARK   = 3'd2,  // Park transformation
    S_PI     = 3'd3,  // incremental PI regulators
    S_IPARK  = 3'd4,  // inverse Park transformation
    S_SECTOR = 3'd5,  // SVPWM sector signals Vb, Vc
    S_XYZ    = 3'd6,  // SVPWM theoretical switching times X, Y, Z
    S_SAT    = 3'd7   // SVPWM over-modulation scaling t1s, t2s
  } vc_state_e;

  // Operand set of one multiply-accumulate step:
  //   y1 = c1*x1 + c2*x2,  y2 = c3*x3 + c4*x4
  typedef struct packed {
    sdata_t c1, c2, c3, c4;
    sdata_t x1, x2, x3, x4;
  } mac_op_t;

  // Run-time settings written by the master processor.
  typedef struct packed {
    logic [15:0] pwmprd;      // PWM half period in clock cycles
    sdata_t      elec_gain;   // Q3.14, electrical angle (1/4096 turn) per encoder count
    logic [11:0] angle_ofs;   // magnetic pole offset, 1/4096 electrical turn
    sdata_t      id_ref;      // d-axis current reference
    sdata_t      iq_ref;      // q-axis current reference (ADRC output)
    sdata_t      kd_new;      // Q3.14, d-axis PI gain on e(k)
    sdata_t      kd_old;      // Q3.14, d-axis PI gain on e(k-1)
    sdata_t      kq_new;      // Q3.14, q-axis PI gain on e(k)
    sdata_t      kq_old;      // Q3.14, q-axis PI gain on e(k-1)
    sdata_t      kx;          // Q3.14, sqrt(3)/2 * PWMPRD / Vdc
    sdata_t      ky;          // Q3.14, 3/2 * PWMPRD / Vdc
    sdata_t      v_lim;       // PI output limit (positive)
  } vc_cfg_t;

  // Results of one control period.
  typedef struct packed {
    sdata_t      i_alpha, i_beta;
    sdata_t      i_d, i_q;
    sdata_t      v_d, v_q;
    sdata_t      v_alpha, v_beta;
    logic [11:0] theta_e;
    logic [2:0]  sect_no;
    logic        oversat;     // t1 + t2 exceeded PWMPRD
  } vc_stat_t;

  // Saturate a wide signed value to an 18-bit word.
  function automatic sdata_t sat_w(input logic signed [47:0] v);
    if (v > 48'sd131071)       return 18'sd131071;
    else if (v < -48'sd131072) return -18'sd131072;
    else                       return v[W-1:0];
  endfunction

endpackage
