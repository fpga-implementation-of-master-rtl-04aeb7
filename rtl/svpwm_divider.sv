// Dedicated divider for the SVPWM over-modulation scale PWMPRD/(t1+t2).
//
// The scale is only needed when t1 + t2 > PWMPRD, so the quotient is a
// fraction below one. The divider computes q = floor(num * 2^FRAC / den)
// for num < den by restoring long division, one quotient bit per clock:
// the remainder starts at num and is doubled FRAC_BITS times, subtracting
// den whenever it fits. The result is a Q.14 coefficient ready for the
// multiply-accumulate unit.
//
// Interface: a start pulse samples num and den; busy is high while the
// division runs; done pulses for one cycle when q is valid, FRAC_BITS + 1
// cycles after start. q holds its value until the next start. If num >= den
// the result is 1.0 (2^FRAC_BITS), i.e. no scaling.
// The document names a dedicated divider for this quotient; its algorithm
// and timing are this design's choice.
module svpwm_divider #(
  parameter int NUM_W     = 16,
  parameter int DEN_W     = 19,
  parameter int FRAC_BITS = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NUM_W-1:0]     num,
  input  logic [DEN_W-1:0]     den,
  output logic                 busy,
  output logic                 done,
  output logic [FRAC_BITS:0]   q
);

  localparam int RW = DEN_W + 1;

  logic [RW-1:0]        rem;
  logic [DEN_W-1:0]     den_r;
  logic [4:0]           cnt;
  logic [RW-1:0]        rem2;

  assign rem2 = rem << 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      den_r <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (RW'(num) >= RW'(den)) begin
          q    <= (FRAC_BITS+1)'(1) << FRAC_BITS;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          rem   <= RW'(num);
          den_r <= den;
          q     <= '0;
          cnt   <= 5'(FRAC_BITS);
          busy  <= 1'b1;
        end
      end else if (busy) begin
        if (rem2 >= RW'(den_r)) begin
          rem <= rem2 - RW'(den_r);
          q   <= {q[FRAC_BITS-1:0], 1'b1};
        end else begin
          rem <= rem2;
          q   <= {q[FRAC_BITS-1:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
