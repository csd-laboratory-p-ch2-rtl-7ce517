// End-to-end testbench of prog_timer at its default size (24-bit count,
// 16 MHz clock, T_CLK = 62.5 ns).
//
// A timeline model written from the timer's specification predicts Timer_out
// and ETP on every clock: Timer_out rises two clocks after the clock edge that
// samples TRG, stays high PC clocks (2^24 for PC = 0) and ETP is high for the
// single clock after it; a trigger during a period is ignored and a trigger
// still high at the end of a period must fall before the next one counts.
// Outputs are compared with the model on every falling clock edge, and the
// length of each Timer_out pulse and ETP pulse is also measured in ns.
//
// Stimulus: the four periods of the specification's example waveform
// (PC = 102, 150000, 2556 and 8, giving 6.375 us, 9.375 ms, 159.75 us and
// 500 ns), with an ignored retrigger and a trigger held past the end of a
// period; a 75 ns trigger not aligned to the clock; PC changed during a
// period; PC = 1; random short periods; an asynchronous clear in mid-period;
// and PC = 0, the longest period of 2^24 clocks (1.048576 s). Each of these
// mechanisms is counted and must occur at least once.
`timescale 1ns/1ps
module tb_prog_timer;
  localparam realtime TCLK = 62.5;

  logic        CLK = 1'b0, CD = 1'b0, TRG = 1'b0;
  logic [23:0] PC = 24'd0;
  logic        Timer_out, ETP;
  int          checks = 0, failures = 0;
  int          n_periods = 0, n_ignored = 0, n_held = 0, n_async = 0, n_pc_change = 0;
  int          n_max_period = 0, n_short_trg = 0;

  prog_timer dut (.*);

  always #(TCLK / 2) CLK = ~CLK;

  // Timeline model
  bit          m_active, m_wait, trg_q;
  int unsigned m_k, m_p;
  always @(posedge CLK or posedge CD) begin
    if (CD) begin
      m_active <= 0; m_wait <= 0; m_k <= 0;
    end else if (!m_active) begin
      if (m_wait) begin
        if (!TRG) m_wait <= 0;
      end else if (TRG) begin
        m_active <= 1; m_k <= 1;
      end
    end else if (m_k == 1) begin
      m_p <= (PC == 0) ? (1 << 24) : int'(PC);   // count captured in the load cycle
      m_k <= 2;
    end else if (m_k == m_p + 2) begin
      m_active <= 0;
      m_wait   <= TRG;
      n_periods++;
      if (TRG) n_held++;
      if (m_p == (1 << 24)) n_max_period++;
    end else begin
      m_k <= m_k + 1;
      if (TRG && !trg_q) n_ignored++;
    end
    trg_q <= TRG;
  end

  task automatic check();
    logic [1:0] exp;
    if (!m_active || m_k == 1)   exp = 2'b00;
    else if (m_k <= m_p + 1)     exp = 2'b10;
    else                         exp = 2'b01;
    checks++;
    if ({Timer_out, ETP} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL at %0t: Timer_out,ETP=%b expected %b (k=%0d p=%0d)",
                 $time, {Timer_out, ETP}, exp, m_k, m_p);
    end
  endtask

  always @(negedge CLK) check();

  // Pulse width measurement
  realtime t_rise, t_fall, t_etp, last_tp, last_etp_w;
  always @(posedge Timer_out) t_rise = $realtime;
  always @(negedge Timer_out) if (!CD) begin
    t_fall  = $realtime;
    last_tp = t_fall - t_rise;
  end
  always @(posedge ETP) begin
    t_etp = $realtime;
    #1;  // let the Timer_out edge of the same instant be recorded
    checks++;
    if (t_etp != t_fall) begin
      failures++;
      $display("FAIL ETP does not start where Timer_out ends (%0t)", $time);
    end
  end
  always @(negedge ETP) if (!CD) last_etp_w = $realtime - t_etp;

  task automatic wait_idle();
    do @(negedge CLK); while (m_active || m_wait);
  endtask

  // Trigger of one clock at a falling edge, hold PC for the period
  task automatic run_period(logic [23:0] pc, realtime exp_tp);
    @(negedge CLK);
    PC  = pc;
    TRG = 1'b1;
    @(negedge CLK) TRG = 1'b0;
    wait_idle();
    checks += 2;
    if (last_tp != exp_tp) begin
      failures++;
      $display("FAIL PC=%0d: timing period %0t ns expected %0t ns", pc, last_tp, exp_tp);
    end
    if (last_etp_w != TCLK) begin
      failures++;
      $display("FAIL PC=%0d: ETP width %0t ns", pc, last_etp_w);
    end
  endtask

  initial begin
    #2 CD = 1'b1;
    #8 CD = 1'b0;
    repeat (3) @(negedge CLK);

    // The example waveform: 102, 150000 (with an ignored retrigger),
    // 2556 (trigger held past the end), 8.
    run_period(24'd102, 6375.0);
    @(negedge CLK); PC = 24'd150000; TRG = 1'b1;
    @(negedge CLK); TRG = 1'b0;
    repeat (1000) @(negedge CLK);
    TRG = 1'b1;                         // retrigger while on duty: ignored
    repeat (2) @(negedge CLK);
    TRG = 1'b0;
    wait_idle();
    checks++;
    if (last_tp != 9375000.0) begin failures++; $display("FAIL 150000: %0t", last_tp); end
    @(negedge CLK); PC = 24'd2556; TRG = 1'b1;
    repeat (2556 + 40) @(negedge CLK);  // held past the end of the period
    checks++;
    if (Timer_out || !m_wait) begin failures++; $display("FAIL held trigger restarted the timer"); end
    TRG = 1'b0;
    wait_idle();
    checks++;
    if (last_tp != 159750.0) begin failures++; $display("FAIL 2556: %0t", last_tp); end
    run_period(24'd8, 500.0);

    // A 75 ns trigger that straddles one rising edge
    @(negedge CLK); PC = 24'd20;
    #20 TRG = 1'b1;
    #75 TRG = 1'b0;
    n_short_trg++;
    wait_idle();
    checks++;
    if (last_tp != 20 * TCLK) begin failures++; $display("FAIL short trigger period %0t", last_tp); end

    // PC changed during the period has no effect on it
    @(negedge CLK); PC = 24'd50; TRG = 1'b1;
    @(negedge CLK); TRG = 1'b0;
    repeat (4) @(negedge CLK);
    PC = 24'd7; n_pc_change++;
    wait_idle();
    checks++;
    if (last_tp != 50 * TCLK) begin failures++; $display("FAIL PC change period %0t", last_tp); end

    run_period(24'd1, TCLK);

    // Random short periods with random trigger widths
    repeat (200) begin
      int unsigned p;
      p = $urandom_range(1, 300);
      @(negedge CLK); PC = 24'(p); TRG = 1'b1;
      repeat ($urandom_range(1, 400)) @(negedge CLK);
      TRG = 1'b0;
      wait_idle();
      repeat ($urandom_range(0, 3)) @(negedge CLK);
    end

    // Asynchronous clear in mid-period
    @(negedge CLK); PC = 24'd1000; TRG = 1'b1;
    @(negedge CLK); TRG = 1'b0;
    repeat (100) @(negedge CLK);
    #7 CD = 1'b1;
    #1 begin
      checks++;
      if (Timer_out || ETP) begin failures++; $display("FAIL async clear"); end
      n_async++;
    end
    @(negedge CLK) CD = 1'b0;
    run_period(24'd3, 3 * TCLK);

    // PC = 0: the longest period, 2^24 clocks = 1.048576 s
    run_period(24'd0, 1048576000.0);

    checks++;
    if (n_periods == 0 || n_ignored == 0 || n_held == 0 || n_async == 0 ||
        n_pc_change == 0 || n_max_period == 0 || n_short_trg == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("periods=%0d ignored_retriggers=%0d held_triggers=%0d async_clears=%0d pc_changes=%0d max_periods=%0d short_triggers=%0d",
             n_periods, n_ignored, n_held, n_async, n_pc_change, n_max_period, n_short_trg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (18_000_000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
