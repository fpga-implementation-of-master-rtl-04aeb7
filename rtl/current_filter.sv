// Phase-current sampling filter for the U and V phase currents.
//
// Each new pair of ADC samples (sample_valid) has the per-channel zero-
// current offset subtracted and enters a moving average over the last
// 2^LOG2_TAPS samples, kept as a running sum (add newest, subtract oldest),
// so every output is the mean of the most recent samples. ia/ib are signed
// in ADC LSBs and update with out_valid one clock after each sample_valid.
// Before the first 2^LOG2_TAPS samples the missing samples count as zero.
// The document states that the sampled currents are digitally filtered; the
// moving average, its length and the offset removal are this design's
// choices.
module current_filter
  import servo_pkg::*;
#(
  parameter int ADC_W     = 12,
  parameter int LOG2_TAPS = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_valid,
  input  logic [ADC_W-1:0] adc_a,
  input  logic [ADC_W-1:0] adc_b,
  input  logic [ADC_W-1:0] ofs_a,
  input  logic [ADC_W-1:0] ofs_b,
  output sdata_t           ia,
  output sdata_t           ib,
  output logic             out_valid
);

  localparam int TAPS = 1 << LOG2_TAPS;
  localparam int SUM_W = ADC_W + 1 + LOG2_TAPS;

  typedef logic signed [ADC_W:0] samp_t;

  samp_t                  hist_a [TAPS];
  samp_t                  hist_b [TAPS];
  logic signed [SUM_W-1:0] sum_a, sum_b;
  samp_t                  new_a, new_b;

  assign new_a = samp_t'({1'b0, adc_a}) - samp_t'({1'b0, ofs_a});
  assign new_b = samp_t'({1'b0, adc_b}) - samp_t'({1'b0, ofs_b});

  logic signed [SUM_W-1:0] next_a, next_b;
  assign next_a = sum_a + SUM_W'(new_a) - SUM_W'(hist_a[TAPS-1]);
  assign next_b = sum_b + SUM_W'(new_b) - SUM_W'(hist_b[TAPS-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) begin
        hist_a[k] <= '0;
        hist_b[k] <= '0;
      end
      sum_a <= '0; sum_b <= '0;
      ia <= '0; ib <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= sample_valid;
      if (sample_valid) begin
        hist_a[0] <= new_a;
        hist_b[0] <= new_b;
        for (int k = 1; k < TAPS; k++) begin
          hist_a[k] <= hist_a[k-1];
          hist_b[k] <= hist_b[k-1];
        end
        sum_a <= next_a;
        sum_b <= next_b;
        ia <= W'(next_a >>> LOG2_TAPS);
        ib <= W'(next_b >>> LOG2_TAPS);
      end
    end
  end

endmodule
