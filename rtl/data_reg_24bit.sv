// Data_reg_24bit: W-bit (default 24) data register with load enable.
//
// Holds the programmed pulse count (PC_R) for the whole timing period, so that
// PC may change while the timer is running. On a rising CLK edge with LD high
// it stores Din; otherwise it keeps its value. CD is an asynchronous
// active-high clear. Ports follow the register symbol of the timer
// architecture; the clear value of zero is this design's choice.
module data_reg_24bit #(
  parameter int unsigned W = 24
) (
  input  logic         CLK,
  input  logic         CD,
  input  logic         LD,
  input  logic [W-1:0] Din,
  output logic [W-1:0] Q
);

  always_ff @(posedge CLK or posedge CD) begin
    if (CD)      Q <= '0;
    else if (LD) Q <= Din;
  end

endmodule
