// Shared constants and types of the programmable timer.
//
// PC_W is the width of the pulse count, the counter and the comparator
// (24 bits, so a period of up to 2^24 clock cycles, 1.048576 s at 16 MHz).
// state_t is the state encoding of the control unit; the binary encoding is
// this design's choice.
package prog_timer_pkg;

  localparam int unsigned PC_W = 24;

  // Control unit states, in the order one timing operation visits them.
  typedef enum logic [2:0] {
    S_IDLE     = 3'd0,  // waiting for a trigger, counter held at zero
    S_LOAD     = 3'd1,  // capture PC into the register, counter 0 -> 1
    S_COUNT    = 3'd2,  // Timer_out high, counter running until TOF
    S_ETP      = 3'd3,  // one-clock end-of-timing-period pulse
    S_WAIT_TRG = 3'd4   // trigger still high after the period: wait for it to fall
  } state_t;

endpackage
