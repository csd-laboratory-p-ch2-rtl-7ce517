// Self-checking testbench of data_reg_24bit at its default width (24 bits).
//
// Random Din and LD are applied on falling edges and the register output is
// compared with a reference model after every edge, including an
// asynchronous clear applied between clock edges.
`timescale 1ns/1ps
module tb_data_reg_24bit;
  localparam int unsigned W = 24;

  logic         CLK = 1'b0, CD = 1'b0, LD = 1'b0;
  logic [W-1:0] Din = '0, Q, ref_q;
  int           checks = 0, failures = 0, loads = 0, holds = 0;

  data_reg_24bit dut (.*);

  always #31.25 CLK = ~CLK;

  always @(posedge CLK or posedge CD) begin
    if (CD)      ref_q <= '0;
    else if (LD) begin ref_q <= Din; loads++; end
    else         holds++;
  end

  task automatic check(string what);
    checks++;
    if (Q !== ref_q) begin
      failures++;
      $display("FAIL %s: Q=%h exp %h", what, Q, ref_q);
    end
  endtask

  initial begin
    ref_q = '0;
    #2 CD = 1'b1;
    #8 CD = 1'b0;
    repeat (1000) begin
      @(negedge CLK);
      check("cycle");
      LD  = ($urandom_range(0, 2) == 0);
      Din = W'($urandom);
    end
    @(negedge CLK) LD = 1'b1; Din = 24'hFFFFFF;
    @(negedge CLK) LD = 1'b0; check("all ones");
    #3 CD = 1'b1;
    #1 check("async clear");
    @(negedge CLK) CD = 1'b0;
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
