// Sequencing state machine of the vector-control core.
//
// A start pulse (the control-period trigger) walks the state variable
// S[2..0] through 0..7: state 0 converts the rotor angle to the electrical
// angle, states 1..7 are the seven vector-control steps. In every state the
// machine spends one cycle issuing the selected operands to the
// multiply-accumulate unit (issue), waits MAC_LAT-1 cycles for its pipeline,
// and then gives one latch pulse on which the core stores the step's results
// in the registers chosen by the state. After the latch of state 7 one done
// pulse follows and the machine returns to idle.
//
// step_ready lets the core hold a state before its issue cycle (the core
// uses it in state 7 to wait for the divider); enter pulses in the first
// cycle of each state so the core can launch such work. A start that arrives
// while busy is ignored.
// States, their order and the latch signal follow the document; the exact
// cycle budget per state (1 + MAC_LAT cycles) is this design's choice.
// The document latches on the falling edge of the latch signal; here the
// latch is a one-cycle enable sampled on the rising clock edge.
module vc_fsm
  import servo_pkg::*;
#(
  parameter int MAC_LAT = 2   // latency of the multiply-accumulate unit, at least 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      step_ready,
  output vc_state_e state,
  output logic      enter,
  output logic      issue,
  output logic      latch,
  output logic      busy,
  output logic      done
);

  typedef enum logic [1:0] {P_IDLE, P_ISSUE, P_WAIT, P_LATCH} phase_e;

  phase_e     phase;
  logic       fresh;
  logic [3:0] wcnt;

  assign busy  = (phase != P_IDLE);
  assign enter = (phase == P_ISSUE) && fresh;
  assign issue = (phase == P_ISSUE) && step_ready;
  assign latch = (phase == P_LATCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE;
      state <= S_ANGLE;
      fresh <= 1'b0;
      wcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        P_IDLE: if (start) begin
          phase <= P_ISSUE;
          state <= S_ANGLE;
          fresh <= 1'b1;
        end
        P_ISSUE: begin
          fresh <= 1'b0;
          if (step_ready) begin
            phase <= P_WAIT;
            wcnt  <= 4'(MAC_LAT - 2);
          end
        end
        P_WAIT: begin
          if (wcnt == 0) phase <= P_LATCH;
          else           wcnt <= wcnt - 1'b1;
        end
        P_LATCH: begin
          if (state == S_SAT) begin
            phase <= P_IDLE;
            state <= S_ANGLE;
            done  <= 1'b1;
          end else begin
            phase <= P_ISSUE;
            state <= vc_state_e'(state + 3'd1);
            fresh <= 1'b1;
          end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // Exactly one of the step signals at a time, and the latch never in idle.
  a_latch_busy: assert property (@(posedge clk) disable iff (!rst_n) latch |-> busy);
  a_issue_latch: assert property (@(posedge clk) disable iff (!rst_n) !(issue && latch));

endmodule
