// Comp_24bit: W-bit (default 24) cascadable magnitude comparator.
//
// Compares the unsigned operands A and B. When they differ, exactly one of
// GT (A > B) or LT (A < B) is high. When they are equal the cascade inputs
// decide: GT, EQ and LT copy Gi, Ei and Li, so comparators can be chained
// from the least significant slice upwards, in the style of the classic
// 4-bit comparator chips. The timer ties Gi = 0, Ei = 1, Li = 0 and uses EQ
// as its time-out flag (counter value equals the programmed count).
//
// Ports and the tie-off values follow the timer architecture; the cascade
// rule (equal operands pass the cascade inputs through) is this design's
// reading of the Gi/Ei/Li inputs. Purely combinational.
module comp_24bit #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] A,
  input  logic [W-1:0] B,
  input  logic         Gi,
  input  logic         Ei,
  input  logic         Li,
  output logic         GT,
  output logic         EQ,
  output logic         LT
);

  always_comb begin
    if (A > B) begin
      GT = 1'b1; EQ = 1'b0; LT = 1'b0;
    end else if (A < B) begin
      GT = 1'b0; EQ = 1'b0; LT = 1'b1;
    end else begin
      GT = Gi;   EQ = Ei;   LT = Li;
    end
  end

endmodule
