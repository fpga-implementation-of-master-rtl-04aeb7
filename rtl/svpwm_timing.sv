// SVPWM practical switching instants and their assignment to the phases.
//
// From the (possibly scaled) times t1s, t2s and the PWM half period PWMPRD:
//   taon = (PWMPRD - t1s - t2s) / 2
//   tbon = taon + t1s
//   tcon = tbon + t2s
// and, by sector, the compare values of phases U, V, W:
//   Sect_No  1     2     3     4     5     6
//   CMPA     tbon  taon  taon  tcon  tcon  tbon
//   CMPB     taon  tcon  tbon  tbon  taon  tcon
//   CMPC     tcon  tbon  tcon  taon  tbon  taon
// A phase's upper switch is on while the PWM counter is at or above its
// compare value, so a smaller value means a longer on-time. Sect_No 0 (zero
// vector) uses the sector 1 column, which with t1s = t2s = 0 gives 50 % on
// all phases. Purely combinational; inputs are expected with
// t1s, t2s >= 0 and t1s + t2s <= PWMPRD. The halving truncates.
// Equations and table follow the document.
module svpwm_timing
  import servo_pkg::*;
(
  input  logic [15:0] pwmprd,
  input  logic [2:0]  sect_no,
  input  sdata_t      t1s,
  input  sdata_t      t2s,
  output logic [15:0] cmpa,
  output logic [15:0] cmpb,
  output logic [15:0] cmpc
);

  logic signed [19:0] taon, tbon, tcon;

  always_comb begin
    taon = (20'(signed'({1'b0, pwmprd})) - 20'(t1s) - 20'(t2s)) >>> 1;
    if (taon < 0) taon = '0;
    tbon = taon + 20'(t1s);
    tcon = tbon + 20'(t2s);
    unique case (sect_no)
      3'd2:    begin cmpa = 16'(taon); cmpb = 16'(tcon); cmpc = 16'(tbon); end
      3'd3:    begin cmpa = 16'(taon); cmpb = 16'(tbon); cmpc = 16'(tcon); end
      3'd4:    begin cmpa = 16'(tcon); cmpb = 16'(tbon); cmpc = 16'(taon); end
      3'd5:    begin cmpa = 16'(tcon); cmpb = 16'(taon); cmpc = 16'(tbon); end
      3'd6:    begin cmpa = 16'(tbon); cmpb = 16'(tcon); cmpc = 16'(taon); end
      default: begin cmpa = 16'(tbon); cmpb = 16'(taon); cmpc = 16'(tcon); end
    endcase
  end

endmodule
