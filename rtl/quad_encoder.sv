// Incremental (quadrature) encoder decoder: rotor position and speed.
//
// The A/B channels are synchronised with two flip-flops and de-glitched: a
// new level is accepted only after it has been stable for FILT_LEN clocks.
// Every accepted edge of either channel counts one step (x4 decoding), up
// when A leads B and down when B leads A, so a 2500-line encoder gives
// 4*ENC_LINES = 10000 counts per mechanical turn. An illegal jump (both
// channels changing at once) is not counted and raises err for one clock.
//   pos_mech   position within one turn, 0 .. 4*ENC_LINES-1 (wraps)
//   pos_multi  signed multi-turn position in counts
//   speed      counts moved in the last SPEED_WIN clocks, updated with a
//              one-clock speed_valid pulse at the end of every window
// The encoder resolution follows the document; filtering, the counting
// direction and the fixed-window speed measurement are this design's
// choices (the document only states that position and speed are analysed).
module quad_encoder #(
  parameter int ENC_LINES = 2500,
  parameter int FILT_LEN  = 4,
  parameter int SPEED_WIN = 50000,   // 1 ms at 50 MHz
  parameter int POS_W     = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enc_a,
  input  logic                    enc_b,
  output logic [POS_W-1:0]        pos_mech,
  output logic signed [31:0]      pos_multi,
  output logic signed [17:0]      speed,
  output logic                    speed_valid,
  output logic                    err
);

  localparam int COUNTS = 4 * ENC_LINES;
  localparam int FW = $clog2(FILT_LEN + 1);
  localparam int SW = $clog2(SPEED_WIN + 1);

  logic [1:0] sync1, sync2, cand, ab, ab_prev;
  logic [FW-1:0] stab;

  // Two-flop synchroniser and stability filter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0; sync2 <= '0; cand <= '0; ab <= '0; stab <= '0;
    end else begin
      sync1 <= {enc_a, enc_b};
      sync2 <= sync1;
      if (sync2 != cand) begin
        cand <= sync2;
        stab <= '0;
      end else if (stab < FW'(FILT_LEN - 1)) begin
        stab <= stab + 1'b1;
      end else begin
        ab <= cand;
      end
    end
  end

  // x4 decoding. Gray sequence 00 -> 10 -> 11 -> 01 -> 00 ({A,B}) counts up.
  logic up, dn;
  always_comb begin
    up = 1'b0; dn = 1'b0;
    unique case ({ab_prev, ab})
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: up = 1'b1;
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: dn = 1'b1;
      default: ;
    endcase
  end

  logic signed [31:0] pos_last;
  logic [SW-1:0]      win;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ab_prev     <= '0;
      pos_mech    <= '0;
      pos_multi   <= '0;
      pos_last    <= '0;
      win         <= '0;
      speed       <= '0;
      speed_valid <= 1'b0;
      err         <= 1'b0;
    end else begin
      ab_prev <= ab;
      err     <= (ab_prev ^ ab) == 2'b11;
      if (up) begin
        pos_multi <= pos_multi + 1;
        pos_mech  <= (pos_mech == POS_W'(COUNTS - 1)) ? '0 : pos_mech + 1'b1;
      end else if (dn) begin
        pos_multi <= pos_multi - 1;
        pos_mech  <= (pos_mech == '0) ? POS_W'(COUNTS - 1) : pos_mech - 1'b1;
      end
      speed_valid <= 1'b0;
      if (win == SW'(SPEED_WIN - 1)) begin
        win         <= '0;
        speed       <= 18'(pos_multi - pos_last);
        pos_last    <= pos_multi;
        speed_valid <= 1'b1;
      end else begin
        win <= win + 1'b1;
      end
    end
  end

endmodule
