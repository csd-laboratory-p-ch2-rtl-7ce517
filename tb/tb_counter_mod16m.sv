// Self-checking testbench of counter_mod16m at its default width (24 bits).
//
// Random CE, LD, UD_L and Din are applied on falling edges; a reference
// model of the count is updated on each rising edge and compared with Q and
// TC16M. Directed phases cover the wrap-around in both directions, the
// priority of LD over CE and an asynchronous clear in mid-cycle.
`timescale 1ns/1ps
module tb_counter_mod16m;
  localparam int unsigned W = 24;

  logic         CLK = 1'b0, CD = 1'b0, CE = 1'b0, LD = 1'b0, UD_L = 1'b1;
  logic [W-1:0] Din = '0, Q;
  logic         TC16M;
  logic [W-1:0] ref_q;
  int           checks = 0, failures = 0;
  int           wraps_up = 0, wraps_dn = 0;

  counter_mod16m dut (.*);

  always #31.25 CLK = ~CLK;

  task automatic check(string what);
    logic exp_tc;
    exp_tc = CE && (UD_L ? (ref_q == {W{1'b1}}) : (ref_q == '0));
    checks++;
    if (Q !== ref_q || TC16M !== exp_tc) begin
      failures++;
      $display("FAIL %s: Q=%h exp %h TC16M=%b exp %b", what, Q, ref_q, TC16M, exp_tc);
    end
  endtask

  // Reference model
  always @(posedge CLK or posedge CD) begin
    if (CD)       ref_q <= '0;
    else if (LD)  ref_q <= Din;
    else if (CE) begin
      if (UD_L) begin
        if (ref_q == {W{1'b1}}) wraps_up++;
        ref_q <= ref_q + 1;
      end else begin
        if (ref_q == '0) wraps_dn++;
        ref_q <= ref_q - 1;
      end
    end
  end

  task automatic step(logic ce, logic ld, logic ud, logic [W-1:0] d);
    @(negedge CLK);
    check("before edge");
    CE = ce; LD = ld; UD_L = ud; Din = d;
    #1 check("after input change");
  endtask

  initial begin
    ref_q = '0;
    #2 CD = 1'b1;
    #8 CD = 1'b0;
    // count up from zero
    repeat (20) step(1, 0, 1, '0);
    // load near the top and wrap up
    step(0, 1, 1, {W{1'b1}} - 3);
    repeat (8) step(1, 0, 1, '0);
    // hold with CE low
    repeat (5) step(0, 0, 1, '0);
    // count down through zero
    step(0, 1, 0, 24'd2);
    repeat (6) step(1, 0, 0, '0);
    // LD has priority over CE
    step(1, 1, 1, 24'h123456);
    step(1, 1, 0, 24'hABCDEF);
    // random traffic
    repeat (2000) step($urandom_range(0, 3) != 0, $urandom_range(0, 15) == 0,
                       1'($urandom), W'($urandom));
    // asynchronous clear in the middle of a clock period
    step(1, 0, 1, '0);
    #5 CD = 1'b1;
    #1 begin
      checks++;
      if (Q !== '0) begin failures++; $display("FAIL async clear: Q=%h", Q); end
    end
    @(negedge CLK) CD = 1'b0;
    repeat (4) step(1, 0, 1, '0);
    checks++;
    if (wraps_up == 0 || wraps_dn == 0) begin
      failures++;
      $display("FAIL wraps not exercised: up=%0d down=%0d", wraps_up, wraps_dn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
