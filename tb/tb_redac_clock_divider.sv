// Self-checking testbench of redac_clock_divider.
// Uses the example of the divider's timing diagram (m = 10, m_del = 3) and
// checks, from the outside only: the ReDAC clock period 2m and duty cycle,
// the delayed clock lagging by exactly M_DEL system clocks, the tick strobes
// one cycle ahead of each rising edge, and the m register (reset to M0,
// +1/-1 steps, lower limit M_DEL+1), with the period following each new m.
module tb_redac_clock_divider;
  localparam int unsigned M_W = 12, M0 = 10, M_DEL = 3;

  logic clk = 0, rst_n = 0;
  logic m_rst = 0, m_en = 0, m_up_dn_n = 0;
  logic [M_W-1:0] m;
  logic clk_redac, clk_redac_del, tick, tick_del;
  int checks = 0, failures = 0;

  redac_clock_divider #(.M_W(M_W), .M0(M0), .M_DEL(M_DEL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // edge bookkeeping, sampled on the system clock
  int cyc = 0;
  int last_rise = -1, last_fall = -1, last_del_rise = -1;
  int period = 0, high = 0, lag = 0, rises = 0;
  logic prev_c = 0, prev_d = 1, prev_tick = 0, prev_tick_del = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (clk_redac && !prev_c) begin
        check(prev_tick, "tick not high the cycle before clk_redac rises");
        if (last_rise >= 0) period = cyc - last_rise;
        last_rise = cyc;
        rises++;
      end
      if (!clk_redac && prev_c) begin
        high = cyc - last_rise;
        last_fall = cyc;
      end
      if (clk_redac_del && !prev_d) begin
        check(prev_tick_del, "tick_del not high the cycle before the delayed clock rises");
        lag = cyc - last_rise;
        last_del_rise = cyc;
      end
      if (tick) check(!clk_redac, "tick while clk_redac already high");
    end
    prev_c = clk_redac; prev_d = clk_redac_del;
    prev_tick = tick; prev_tick_del = tick_del;
  end

  task automatic measure(input int exp_m);
    int r0;
    r0 = rises;
    wait (rises >= r0 + 3);
    @(posedge clk);
    check(period == 2*exp_m, $sformatf("period %0d, expected %0d", period, 2*exp_m));
    check(high == exp_m,     $sformatf("high time %0d, expected %0d", high, exp_m));
    check(lag == M_DEL,      $sformatf("delayed clock lag %0d, expected %0d", lag, M_DEL));
  endtask

  task automatic step_m(input bit up);
    @(negedge clk); m_en = 1; m_up_dn_n = up;
    @(negedge clk); m_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(m == M0, "m not M0 after reset");
    measure(10);
    step_m(1); check(m == 11, "m+1");
    measure(11);
    step_m(0); step_m(0); step_m(0); check(m == 8, "m-3");
    measure(8);
    // lower limit: m never goes below M_DEL+1
    repeat (10) step_m(0);
    check(m == M_DEL + 1, $sformatf("m lower limit, got %0d", m));
    measure(M_DEL + 1);
    @(negedge clk); m_rst = 1; @(negedge clk); m_rst = 0;
    check(m == M0, "m_rst reloads M0");
    measure(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
