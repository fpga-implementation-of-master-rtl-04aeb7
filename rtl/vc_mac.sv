// Parallel multiply-accumulate unit of the vector-control core.
//
// Every step of the current-loop algorithm (Clarke, Park, PI, inverse Park
// and the three SVPWM steps) has been normalised to the same form:
//   y1 = c1*x1 + c2*x2
//   y2 = c3*x3 + c4*x4
// so one unit of four multipliers and two adders serves all of them in turn.
// The coefficients c are Q3.14; each sum is rounded to nearest, shifted right
// by FRAC bits and saturated to the 18-bit data range.
//
// Timing: two pipeline stages. The operands are sampled on the clock edge
// where in_valid is high, the four products are registered, and y1/y2 appear
// with out_valid one clock edge later (results visible two cycles after the
// issue cycle). The unit accepts a new operand set every cycle.
// The four-multiplier, two-adder structure is the document's; the pipeline
// depth, rounding and saturation are this design's choices.
module vc_mac
  import servo_pkg::*;
#(
  parameter int FRAC_BITS = FRAC
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  mac_op_t op,
  output logic    out_valid,
  output sdata_t  y1,
  output sdata_t  y2
);

  logic signed [2*W-1:0] p1, p2, p3, p4;
  logic                  p_valid;

  // Stage 1: four 18x18 products.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0; p2 <= '0; p3 <= '0; p4 <= '0;
      p_valid <= 1'b0;
    end else begin
      p_valid <= in_valid;
      if (in_valid) begin
        p1 <= op.c1 * op.x1;
        p2 <= op.c2 * op.x2;
        p3 <= op.c3 * op.x3;
        p4 <= op.c4 * op.x4;
      end
    end
  end

  // Stage 2: two adders, rounding, rescale, saturation.
  logic signed [47:0] s1, s2;
  always_comb begin
    s1 = (48'(p1) + 48'(p2) + (48'sd1 <<< (FRAC_BITS - 1))) >>> FRAC_BITS;
    s2 = (48'(p3) + 48'(p4) + (48'sd1 <<< (FRAC_BITS - 1))) >>> FRAC_BITS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= '0; y2 <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= p_valid;
      if (p_valid) begin
        y1 <= sat_w(s1);
        y2 <= sat_w(s2);
      end
    end
  end

endmodule
