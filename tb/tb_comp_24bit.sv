// Self-checking testbench of comp_24bit.
//
// Checks the default 24-bit comparator and a 9-bit instance against the
// arithmetic comparison of the operands: directed corner cases, random
// operands with random cascade inputs, and equal operands, where the outputs
// must copy the cascade inputs.
`timescale 1ns/1ps
module tb_comp_24bit;
  logic [23:0] A, B;
  logic        Gi, Ei, Li, GT, EQ, LT;
  logic [8:0]  A9, B9;
  logic        GT9, EQ9, LT9;
  int          checks = 0, failures = 0, n_gt = 0, n_lt = 0, n_eq = 0;

  comp_24bit dut (.*);
  comp_24bit #(.W(9)) dut9 (.A(A9), .B(B9), .Gi(Gi), .Ei(Ei), .Li(Li),
                            .GT(GT9), .EQ(EQ9), .LT(LT9));

  task automatic apply(logic [23:0] a, logic [23:0] b, logic g, logic e, logic l);
    logic [2:0] exp24, exp9;
    A = a; B = b; Gi = g; Ei = e; Li = l;
    A9 = a[8:0]; B9 = b[8:0];
    #1;
    if (a > b)      begin exp24 = 3'b100; n_gt++; end
    else if (a < b) begin exp24 = 3'b001; n_lt++; end
    else            begin exp24 = {g, e, l}; n_eq++; end
    if (a[8:0] > b[8:0])      exp9 = 3'b100;
    else if (a[8:0] < b[8:0]) exp9 = 3'b001;
    else                      exp9 = {g, e, l};
    checks += 2;
    if ({GT, EQ, LT} !== exp24) begin
      failures++;
      $display("FAIL 24-bit A=%h B=%h cascade=%b%b%b: got %b exp %b", a, b, g, e, l,
               {GT, EQ, LT}, exp24);
    end
    if ({GT9, EQ9, LT9} !== exp9) begin
      failures++;
      $display("FAIL 9-bit A=%h B=%h: got %b exp %b", a[8:0], b[8:0], {GT9, EQ9, LT9}, exp9);
    end
  endtask

  initial begin
    // corner cases with the tie-off used in the timer (0/1/0)
    apply(24'h000000, 24'h000000, 0, 1, 0);
    apply(24'hFFFFFF, 24'hFFFFFF, 0, 1, 0);
    apply(24'hFFFFFF, 24'h000000, 0, 1, 0);
    apply(24'h000000, 24'hFFFFFF, 0, 1, 0);
    apply(24'h800000, 24'h7FFFFF, 0, 1, 0);
    apply(24'h000001, 24'h000000, 0, 1, 0);
    apply(24'h000000, 24'h000001, 0, 1, 0);
    // every single-bit difference
    for (int i = 0; i < 24; i++) begin
      apply(24'h5A5A5A ^ (24'd1 << i), 24'h5A5A5A, 0, 1, 0);
      apply(24'h5A5A5A, 24'h5A5A5A ^ (24'd1 << i), 0, 1, 0);
    end
    // random operands and cascade inputs, with many equal pairs
    repeat (3000) begin
      logic [23:0] a, b;
      a = 24'($urandom);
      b = ($urandom_range(0, 3) == 0) ? a : 24'($urandom);
      if ($urandom_range(0, 3) == 0) b = a ^ (24'd1 << $urandom_range(0, 23));
      apply(a, b, 1'($urandom), 1'($urandom), 1'($urandom));
    end
    checks++;
    if (n_gt == 0 || n_lt == 0 || n_eq == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
