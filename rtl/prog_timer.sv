// Prog_timer: non-retriggerable programmable timer, the top of the design.
//
// A trigger pulse on TRG starts a timing period of PC clock cycles
// (PC * 62.5 ns at the 16 MHz reference) during which Timer_out is high.
// When the period ends, ETP pulses high for one clock to show that the timer
// is idle again. Triggers during a period are ignored.
//
// Structure (dedicated-processor style: a control unit and a datapath):
//   u_ctrl  control_unit    FSM, sequences the datapath from the TOF flag
//   u_cnt   counter_mod16m  counts clock cycles; up-counting, cleared by
//                           loading Din = 0 (the synchronous reset RST)
//   u_reg   data_reg_24bit  PC_R, the pulse count captured at the trigger
//   u_cmp   comp_24bit      TOF = (CNT_Q == PC_R), cascade inputs 0/1/0
// The counter's TC16M and the comparator's GT and LT are not used.
//
// Interface: CLK is the 16 MHz time base, CD the asynchronous active-high
// clear. TRG is sampled on rising CLK edges, so any pulse longer than one
// clock period (the specification asks for more than 70 ns) is seen.
// Timer_out rises two clocks after the edge that samples TRG and stays high
// exactly PC clocks; ETP follows in the next clock. PC = 0 gives the longest
// period, 2^24 clocks (1.048576 s).
//
// The block partition, the port and signal names and the tie-offs follow
// the timer's top-level architecture; the control sequence is this design's.
module prog_timer
  import prog_timer_pkg::*;
(
  input  logic            CLK,
  input  logic            CD,
  input  logic            TRG,
  input  logic [PC_W-1:0] PC,
  output logic            Timer_out,
  output logic            ETP
);

  logic            CNT_E, RST, LD_PC, TOF;
  logic [PC_W-1:0] CNT_Q, PC_R;

  control_unit u_ctrl (
    .CLK       (CLK),
    .CD        (CD),
    .TRG       (TRG),
    .TOF       (TOF),
    .Timer_out (Timer_out),
    .ETP       (ETP),
    .CNT_E     (CNT_E),
    .CLR_C     (RST),
    .LD_R      (LD_PC)
  );

  counter_mod16m #(.W(PC_W)) u_cnt (
    .CLK   (CLK),
    .CD    (CD),
    .CE    (CNT_E),
    .LD    (RST),
    .UD_L  (1'b1),
    .Din   ('0),
    .Q     (CNT_Q),
    .TC16M ()
  );

  data_reg_24bit #(.W(PC_W)) u_reg (
    .CLK (CLK),
    .CD  (CD),
    .LD  (LD_PC),
    .Din (PC),
    .Q   (PC_R)
  );

  comp_24bit #(.W(PC_W)) u_cmp (
    .A  (CNT_Q),
    .B  (PC_R),
    .Gi (1'b0),
    .Ei (1'b1),
    .Li (1'b0),
    .GT (),
    .EQ (TOF),
    .LT ()
  );

  // ETP is exactly one clock wide.
  a_etp_one_clock: assert property (@(posedge CLK) disable iff (CD)
    ETP |=> !ETP);

endmodule
