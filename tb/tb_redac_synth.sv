// Self-checking testbench of redac_synth.
// A simple responder stands in for the control block (Ready falls on the
// ReDAC edge after Convert and rises again N edges later). Checks: requests
// come exactly N+HOLD ReDAC periods apart; constant mode repeats its code;
// ramp mode steps through consecutive codes with wrap-around; sine mode
// matches round(2^(N-1) + A*sin(2*pi*k*inc/2^PH_W)) within 1 LSB, computed
// here with real arithmetic, and saturates at full scale; off mode requests
// nothing.
module tb_redac_synth;
  import redac_pkg::*;
  localparam int unsigned N = 10, HOLD = 2, PH_W = 16, TP = 4;

  logic clk = 0, rst_n = 0, tick, ready = 1, convert;
  syn_mode_e mode = SYN_OFF;
  logic [N-1:0] const_code = '0, amplitude = '0, data;
  logic [PH_W-1:0] phase_inc = '0;
  int checks = 0, failures = 0;

  redac_synth #(.N(N), .HOLD(HOLD), .PH_W(PH_W)) dut (.*);

  always #5 clk = ~clk;
  int tc = 0, nticks = 0;
  always @(posedge clk) tc <= (tc == TP-1) ? 0 : tc + 1;
  assign tick = rst_n && (tc == TP-1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responder: conversion starts on the tick after convert, lasts N ticks
  int busy = 0;
  logic [N-1:0] got[$];
  int start_tick[$];
  always @(posedge clk) if (rst_n && tick) begin
    nticks <= nticks + 1;
    if (ready && convert) begin
      ready <= 0; busy <= N; got.push_back(data); start_tick.push_back(nticks);
    end else if (!ready) begin
      if (busy == 1) ready <= 1;
      busy <= busy - 1;
    end
  end

  task automatic collect(input int n);
    got.delete(); start_tick.delete();
    wait (got.size() >= n);
  endtask

  task automatic check_spacing();
    for (int k = 1; k < start_tick.size(); k++)
      check(start_tick[k] - start_tick[k-1] == N + HOLD,
            $sformatf("requests %0d ticks apart", start_tick[k] - start_tick[k-1]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    check(got.size() == 0, "requests in off mode");
    // constant
    @(negedge clk); const_code = 10'd613; mode = SYN_CONST;
    collect(4);
    foreach (got[k]) check(got[k] == 10'd613, "constant code");
    check_spacing();
    // ramp
    @(negedge clk); mode = SYN_RAMP;
    collect(3); collect(1030);
    for (int k = 1; k < got.size(); k++)
      check(got[k] == N'(got[k-1] + 1), $sformatf("ramp %0d -> %0d", got[k-1], got[k]));
    check_spacing();
    // sine, 90 % swing
    @(negedge clk); mode = SYN_SINE; amplitude = 10'd460; phase_inc = 16'd1111;
    collect(2); collect(150);
    begin
      // phase of got[k] is p0 + k*inc, p0 unknown: find it from the first
      // sample by checking consistency of all samples for each candidate
      // the phase only advances in sine mode, by phase_inc per request, so
      // sample k of this run has phase c*inc + k*inc for a small unknown c
      // (the requests already issued); take the c that fits best
      int best_err, best_p0;
      best_err = 1 << 30; best_p0 = 0;
      for (int c = 0; c < 8; c++) begin
        int err_sum; err_sum = 0;
        for (int k = 0; k < got.size(); k++) begin
          real ph, ref_v; int e;
          ph = real'((c * 1111 + k * 1111) & 16'hFFFF) / 65536.0;
          ref_v = 512.0 + 460.0 * $sin(2.0 * 3.14159265358979 * ph);
          e = int'(got[k]) - int'(ref_v + 0.5);
          err_sum += (e < 0) ? -e : e;
        end
        if (err_sum < best_err) begin best_err = err_sum; best_p0 = c * 1111; end
      end
      for (int k = 0; k < got.size(); k++) begin
        real ph, ref_v; int e;
        ph = real'((best_p0 + k * 1111) & 16'hFFFF) / 65536.0;
        ref_v = 512.0 + 460.0 * $sin(2.0 * 3.14159265358979 * ph);
        e = int'(got[k]) - int'(ref_v + 0.5);
        check(e >= -1 && e <= 1, $sformatf("sine sample %0d = %0d, expected %0.2f", k, got[k], ref_v));
      end
    end
    check_spacing();
    // full-scale amplitude saturates instead of wrapping
    @(negedge clk); amplitude = 10'd1000; phase_inc = 16'd4096;
    collect(40);
    begin
      int hi, lo; hi = 0; lo = 1023;
      foreach (got[k]) begin if (got[k] > hi) hi = got[k]; if (got[k] < lo) lo = got[k]; end
      check(hi == 1023 && lo == 0, $sformatf("saturation: range %0d..%0d", lo, hi));
    end
    @(negedge clk); mode = SYN_OFF;
    repeat (5 * TP * (N + HOLD)) @(posedge clk);
    got.delete();
    repeat (5 * TP * (N + HOLD)) @(posedge clk);
    check(got.size() == 0, "requests after switching off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
