// SVPWM sector identification and selection of the switching times t1, t2.
//
// Sector part: from the three sector signals
//   Va = Vbeta,  Vb = sqrt(3)*Valpha - Vbeta,  Vc = -sqrt(3)*Valpha - Vbeta
// (Vb and Vc come from the multiply-accumulate unit) the sign bits
// A = Va>0, B = Vb>0, C = Vc>0 give Sect_No = A + 2B + 4C (1..6). When all
// three are zero or negative (zero voltage vector), Sect_No is 0.
//
// Selection part: from the registered Sect_No and the theoretical switching
// times X, Y, Z it picks
//   Sect_No  1   2   3   4   5   6
//   t1       Z   Y  -Z  -X   X  -Y
//   t2       Y  -X   X   Z  -Y  -Z
// Negative results (rounding near a sector border) are clamped to zero and
// Sect_No 0 gives t1 = t2 = 0. Both parts are purely combinational.
// The sector code and the t1 column follow the document; the t2 column is
// taken from the standard space-vector table that the t1 column belongs to,
// and the clamping is this design's choice.
module svpwm_sector
  import servo_pkg::*;
(
  input  sdata_t     va,
  input  sdata_t     vb,
  input  sdata_t     vc,
  output logic [2:0] sect_no,
  input  logic [2:0] sect_sel,
  input  sdata_t     x,
  input  sdata_t     y,
  input  sdata_t     z,
  output sdata_t     t1,
  output sdata_t     t2
);

  assign sect_no = {vc > 0, vb > 0, va > 0};

  function automatic sdata_t neg(input sdata_t v);
    return sat_w(-48'(v));
  endfunction

  function automatic sdata_t clamp0(input sdata_t v);
    return (v < 0) ? '0 : v;
  endfunction

  sdata_t t1_raw, t2_raw;
  always_comb begin
    unique case (sect_sel)
      3'd1:    begin t1_raw = z;      t2_raw = y;      end
      3'd2:    begin t1_raw = y;      t2_raw = neg(x); end
      3'd3:    begin t1_raw = neg(z); t2_raw = x;      end
      3'd4:    begin t1_raw = neg(x); t2_raw = z;      end
      3'd5:    begin t1_raw = x;      t2_raw = neg(y); end
      3'd6:    begin t1_raw = neg(y); t2_raw = neg(z); end
      default: begin t1_raw = '0;     t2_raw = '0;     end
    endcase
    t1 = clamp0(t1_raw);
    t2 = clamp0(t2_raw);
  end

endmodule
