// Self-checking testbench of redac_updown_counter.
// First runs the two measurement phases of a calibration step (count up
// for 37 cycles until the comparator stops it, then count down for 40) and
// checks q = -3 with its sign bit; then applies random enable, direction,
// stop and clear inputs and compares q, sign and zero every cycle against a
// saturating reference count, with a narrow counter so the limits are hit.
module tb_redac_updown_counter;
  localparam int unsigned Q_W = 6;

  logic clk = 0, rst_n = 0;
  logic rst = 0, en = 0, up_dn_n = 0, stop_n = 1;
  logic signed [Q_W-1:0] q;
  logic sign, zero;
  int checks = 0, failures = 0;
  int ref_q = 0;
  int sat_hi = 0, sat_lo = 0;

  redac_updown_counter #(.Q_W(Q_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit up, input int n);
    @(negedge clk); en = 1; up_dn_n = up; stop_n = 1;
    repeat (n) @(negedge clk);
    stop_n = 0;                      // comparator trips
    repeat (5) @(negedge clk);       // en still high: must not count
    en = 0; stop_n = 1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == 0 && zero, "q not zero after reset");
    run(1, 27);
    check(q == 27 && !sign, $sformatf("up phase: q=%0d", q));
    run(0, 30);
    check(q == -3 && sign && !zero, $sformatf("down phase: q=%0d", q));
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    check(q == 0 && zero, "clear");
    // random stimulus against a reference
    ref_q = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rst     = ($urandom_range(0, 99) < 2);
      en      = ($urandom_range(0, 99) < 80);
      stop_n  = ($urandom_range(0, 99) < 85);
      if ($urandom_range(0, 99) < 5) up_dn_n = ~up_dn_n;
      @(posedge clk);
      if (rst) ref_q = 0;
      else if (en && stop_n) begin
        if (up_dn_n) begin
          if (ref_q < 31) ref_q++; else sat_hi++;
        end else begin
          if (ref_q > -32) ref_q--; else sat_lo++;
        end
      end
      #1;
      check(int'(q) == ref_q, $sformatf("q=%0d expected %0d", q, ref_q));
      check(sign == (ref_q < 0), "sign");
      check(zero == (ref_q == 0), "zero");
    end
    check(sat_hi > 0 && sat_lo > 0, "saturation at both limits not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
