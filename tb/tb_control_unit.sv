// Self-checking testbench of control_unit.
//
// The testbench closes the loop with its own model of the datapath: a count
// that is cleared by CLR_C and advanced by CNT_E, a register loaded with the
// programmed count by LD_R, and TOF = (count == register). A separate
// timeline model, written from the required behaviour (trigger sampled, one
// load cycle, Timer_out high for PC cycles, one ETP cycle, then a wait for
// TRG to fall if it is still high), predicts all five control outputs for
// every cycle; they are compared on each falling clock edge.
//
// Random trigger pulses, some shorter and some longer than the period, and
// random counts 1..40 exercise retriggering during a period and a trigger
// held past the end of a period. An asynchronous clear in mid-period is also
// applied. Each of these events is counted and must occur.
`timescale 1ns/1ps
module tb_control_unit;
  logic CLK = 1'b0, CD = 1'b0, TRG = 1'b0, TOF;
  logic Timer_out, ETP, CNT_E, CLR_C, LD_R;
  int   checks = 0, failures = 0;
  int   n_periods = 0, n_ignored = 0, n_held = 0, n_async = 0;

  control_unit dut (.*);

  always #31.25 CLK = ~CLK;

  // Datapath model
  logic [23:0] m_cnt, m_reg, pc_in;
  always @(posedge CLK or posedge CD) begin
    if (CD) begin m_cnt <= '0; m_reg <= '0; end
    else begin
      if (CLR_C)      m_cnt <= '0;
      else if (CNT_E) m_cnt <= m_cnt + 1;
      if (LD_R)       m_reg <= pc_in;
    end
  end
  always_comb TOF = (m_cnt == m_reg);

  // Timeline model of the expected behaviour
  bit          m_active, m_wait, trg_q;
  int unsigned m_k, m_p;
  always @(posedge CLK or posedge CD) begin
    if (CD) begin
      m_active <= 0; m_wait <= 0; m_k <= 0;
    end else if (!m_active) begin
      if (m_wait) begin
        if (!TRG) m_wait <= 0;
      end else if (TRG) begin
        m_active <= 1; m_k <= 1; m_p <= pc_in;
      end
    end else if (m_k == m_p + 2) begin
      m_active <= 0;
      m_wait   <= TRG;
      n_periods++;
      if (TRG) n_held++;
    end else begin
      m_k <= m_k + 1;
      if (TRG && !trg_q) n_ignored++;
    end
    trg_q <= TRG;
  end

  task automatic check(string what);
    logic [4:0] exp, got;
    // {Timer_out, ETP, CNT_E, CLR_C, LD_R}
    if (!m_active)                 exp = 5'b00010;
    else if (m_k == 1)             exp = 5'b00101;
    else if (m_k <= m_p + 1)       exp = 5'b10100;
    else                           exp = 5'b01010;
    got = {Timer_out, ETP, CNT_E, CLR_C, LD_R};
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s at %0t: outputs %b expected %b (k=%0d p=%0d)", what, $time, got, exp, m_k, m_p);
    end
  endtask

  int trg_left = 0, gap_left = 3;
  initial begin
    pc_in = 24'd5;
    #2 CD = 1'b1;
    #8 CD = 1'b0;
    repeat (20000) begin
      @(negedge CLK);
      check("cycle");
      // trigger pulse generator
      if (trg_left > 0) begin
        trg_left--;
        if (trg_left == 0) TRG = 1'b0;
      end else if (gap_left > 0) begin
        gap_left--;
      end else begin
        TRG = 1'b1;
        trg_left = ($urandom_range(0, 3) == 0) ? $urandom_range(20, 60) : $urandom_range(1, 3);
        gap_left = $urandom_range(0, 30);
      end
      // new count only while the timer is idle
      if (!m_active && !TRG) pc_in = 24'($urandom_range(1, 40));
    end
    // asynchronous clear in the middle of a period
    @(negedge CLK); TRG = 1'b0; pc_in = 24'd30;
    repeat (3) @(negedge CLK);
    TRG = 1'b1;
    @(negedge CLK); TRG = 1'b0;
    repeat (10) @(negedge CLK);
    checks++;
    if (!Timer_out) begin failures++; $display("FAIL no period before async clear"); end
    #5 CD = 1'b1;
    #1 begin
      check("async clear");
      n_async++;
    end
    @(negedge CLK) CD = 1'b0;
    repeat (5) begin @(negedge CLK); check("after clear"); end
    checks++;
    if (n_periods == 0 || n_ignored == 0 || n_held == 0 || n_async == 0) begin
      failures++;
      $display("FAIL coverage periods=%0d ignored=%0d held=%0d async=%0d",
               n_periods, n_ignored, n_held, n_async);
    end
    $display("periods=%0d ignored_triggers=%0d held_triggers=%0d async_clears=%0d",
             n_periods, n_ignored, n_held, n_async);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
