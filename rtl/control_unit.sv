// Control_unit: Moore FSM that sequences one timing period of the timer.
//
// A single timing operation runs through these states:
//   S_IDLE     CLR_C high: the counter is held at zero. TRG high -> S_LOAD.
//   S_LOAD     LD_R high: PC is captured into the PC register. CNT_E high:
//              the counter steps from 0 to 1. -> S_COUNT.
//   S_COUNT    Timer_out and CNT_E high. The counter steps 1, 2, ... and the
//              comparator raises TOF when it equals the stored count; then
//              -> S_ETP. Timer_out is therefore high for exactly PC cycles
//              (PC = 0 runs the full 2^24 cycles before the count wraps).
//   S_ETP      ETP high for one clock, CLR_C high. -> S_WAIT_TRG if TRG is
//              still high, else S_IDLE.
//   S_WAIT_TRG CLR_C high; back to S_IDLE once TRG is low.
// TRG is only looked at in S_IDLE, so triggers during a period are ignored
// (non-retriggerable), and a trigger still high when the period ends does
// not start a second one.
//
// Interface: the port names are those of the timer architecture. CD is an
// asynchronous active-high reset to S_IDLE. All outputs are decoded from the
// state register only, so they are glitch-free and change on the rising CLK
// edge. A trigger sampled at edge k gives Timer_out high from edge k+2.
//
// The specification fixes only what the outputs must do (period length,
// one-clock ETP, non-retriggering); the states, their outputs and the
// transitions above are this design's own.
module control_unit
  import prog_timer_pkg::*;
(
  input  logic CLK,
  input  logic CD,
  input  logic TRG,
  input  logic TOF,
  output logic Timer_out,
  output logic ETP,
  output logic CNT_E,
  output logic CLR_C,
  output logic LD_R
);

  state_t state, state_next;

  always_ff @(posedge CLK or posedge CD) begin
    if (CD) state <= S_IDLE;
    else    state <= state_next;
  end

  always_comb begin
    state_next = state;
    unique case (state)
      S_IDLE:     if (TRG) state_next = S_LOAD;
      S_LOAD:     state_next = S_COUNT;
      S_COUNT:    if (TOF) state_next = S_ETP;
      S_ETP:      state_next = TRG ? S_WAIT_TRG : S_IDLE;
      S_WAIT_TRG: if (!TRG) state_next = S_IDLE;
      default:    state_next = S_IDLE;
    endcase
  end

  always_comb begin
    Timer_out = (state == S_COUNT);
    ETP       = (state == S_ETP);
    CNT_E     = (state == S_LOAD) || (state == S_COUNT);
    LD_R      = (state == S_LOAD);
    CLR_C     = (state == S_IDLE) || (state == S_ETP) || (state == S_WAIT_TRG);
  end

  // The counter is never cleared and enabled at once, and Timer_out and ETP
  // are never high together.
  a_outputs_exclusive: assert property (@(posedge CLK) disable iff (CD)
    !(CLR_C && CNT_E) && !(Timer_out && ETP));

endmodule
