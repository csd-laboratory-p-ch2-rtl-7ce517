// Counter_mod16M: W-bit (default 24) modulo-2^W binary up/down counter.
//
// The counter of the timer datapath. It has an asynchronous active-high clear
// (CD), a synchronous load of Din (LD), which the timer uses as its
// synchronous reset by tying Din to zero, and a count enable (CE). UD_L
// selects the direction: 1 counts up, 0 counts down; the timer ties it to 1.
// Priority is CD, then LD, then CE. The count wraps modulo 2^W.
// TC16M is the terminal count: high while CE is high and the next count wraps
// (Q all ones when counting up, Q zero when counting down).
//
// The port list follows the counter symbol of the timer architecture. The
// priority order, the direction encoding of UD_L and the definition of TC16M
// are this design's choices.
//
// Timing: Q changes on the rising CLK edge, TC16M is combinational from
// Q, CE and UD_L.
module counter_mod16m #(
  parameter int unsigned W = 24
) (
  input  logic         CLK,
  input  logic         CD,
  input  logic         CE,
  input  logic         LD,
  input  logic         UD_L,
  input  logic [W-1:0] Din,
  output logic [W-1:0] Q,
  output logic         TC16M
);

  always_ff @(posedge CLK or posedge CD) begin
    if (CD)        Q <= '0;
    else if (LD)   Q <= Din;
    else if (CE) begin
      if (UD_L)    Q <= Q + 1'b1;
      else         Q <= Q - 1'b1;
    end
  end

  always_comb TC16M = CE && (UD_L ? (Q == '1) : (Q == '0));

endmodule
