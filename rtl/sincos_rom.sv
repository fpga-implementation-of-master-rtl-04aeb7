// Sine/cosine table for the Park and inverse Park transformations.
//
// The electrical angle is a 12-bit fraction of a turn (4096 steps per
// electrical revolution). One table of 2^ADDR_W sine values in Q1.14
// (1.0 = 16384) is read through two synchronous ports: the sine at the angle
// and the sine a quarter turn later, which is the cosine. Outputs are
// sign-extended to the 18-bit data width and are valid one clock after the
// angle is presented.
// The table is a constant computed at elaboration time from the formula
//   table[k] = round(16384 * sin(2*pi*k / 2^ADDR_W))
// using integer arithmetic only: the angle is folded into the first quadrant
// and the sine is summed as a Taylor series in Q2.30 fixed point (terms up
// to x^15, error far below one output LSB).
// The document uses sin/cos of the electrical angle but does not say how
// they are produced; the table, its depth and format are this design's
// choice (a block-RAM table suits the memory the document reports for the
// current-loop unit).
module sincos_rom
  import servo_pkg::*;
#(
  parameter int ADDR_W = 12
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] theta,
  output sdata_t            sin_o,
  output sdata_t            cos_o
);

  localparam int DEPTH = 1 << ADDR_W;
  localparam int QUART = DEPTH / 4;
  localparam longint PI_Q30 = 64'sd3373259426;   // pi * 2^30

  typedef logic signed [15:0] table_t [DEPTH];

  function automatic logic signed [15:0] sin_entry(input int k);
    longint x, x2, term, acc;
    int     kk;
    bit     neg;
    kk  = k % QUART;
    unique case (k / QUART)
      0:       begin neg = 1'b0;                   end
      1:       begin neg = 1'b0; kk = QUART - kk;  end
      2:       begin neg = 1'b1;                   end
      default: begin neg = 1'b1; kk = QUART - kk;  end
    endcase
    x    = (PI_Q30 * 2 * longint'(kk)) / longint'(DEPTH);
    x2   = (x * x) >>> 30;
    term = x;
    acc  = x;
    for (int n = 1; n <= 7; n++) begin
      term = -(((term * x2) >>> 30) / longint'((2 * n) * (2 * n + 1)));
      acc  = acc + term;
    end
    acc = (acc * 16384 + (64'sd1 <<< 29)) >>> 30;
    return neg ? -16'(acc) : 16'(acc);
  endfunction

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < DEPTH; k++) t[k] = sin_entry(k);
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  logic [ADDR_W-1:0] cos_addr;
  assign cos_addr = theta + ADDR_W'(DEPTH / 4);

  always_ff @(posedge clk) begin
    sin_o <= W'(TABLE[theta]);
    cos_o <= W'(TABLE[cos_addr]);
  end

endmodule
