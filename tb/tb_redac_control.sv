// Self-checking testbench of redac_control.
// Drives the ReDAC clock enables directly (ReDAC period 2m = 8 system
// clocks, delayed clock 2 system clocks later) and converts random 5-bit
// words, as in the 5-bit example of the ReDAC architecture. For each word it
// records the buffer level in every system clock cycle while the buffer is
// enabled and checks: the conversion starts on the first ReDAC edge after
// Convert, bit i is driven for the whole ReDAC period i (LSB first), the
// buffer is then driven low for exactly T_del before going to high
// impedance, and Ready is low exactly while the buffer is enabled.
module tb_redac_control;
  localparam int unsigned N = 5, TP = 8, TDEL = 2;

  logic clk = 0, rst_n = 0;
  logic tick, tick_del, convert = 0, ready, buf_data, enable_n;
  logic [N-1:0] data = '0;
  int checks = 0, failures = 0;

  redac_control #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int tc = 0;
  always @(posedge clk) tc <= (tc == TP-1) ? 0 : tc + 1;
  assign tick     = rst_n && (tc == TP-1);
  assign tick_del = rst_n && (tc == TDEL-1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic samples[$];
  int   cyc = 0, tick_cyc = -1, start_cyc = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick) tick_cyc <= cyc;
  end
  always @(negedge clk) begin
    if (!enable_n) samples.push_back(buf_data);
    checks++;
    if (ready != enable_n) begin failures++; $display("FAIL: ready differs from enable_n"); end
  end

  task automatic convert_word(input logic [N-1:0] w, input int wait_cycles);
    int first_tick;
    samples.delete();
    repeat (wait_cycles) @(negedge clk);
    data = w; convert = 1;
    // the conversion must start on the first ReDAC edge
    first_tick = -1;
    while (ready) begin
      @(posedge clk);
      if (first_tick < 0 && tick_cyc == cyc - 1) first_tick = cyc;
      #1;
      if (first_tick < 0 && !ready) first_tick = cyc;
    end
    @(negedge clk); convert = 0; data = $urandom;
    wait (ready);
    @(negedge clk);
    check(samples.size() == N*TP + TDEL,
          $sformatf("enabled for %0d cycles, expected %0d", samples.size(), N*TP + TDEL));
    for (int k = 0; k < samples.size(); k++) begin
      logic exp_b;
      exp_b = (k < N*TP) ? w[k / TP] : 1'b0;
      check(samples[k] == exp_b, $sformatf("word %b cycle %0d: buffer %0b expected %0b",
                                           w, k, samples[k], exp_b));
    end
  endtask

  // check that no conversion starts without Convert
  int idle_starts = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3*TP) @(negedge clk);
    check(ready && enable_n, "not idle without Convert");
    convert_word(5'b01101, 1);   // 13, the architecture example
    convert_word(5'b01111, 3);   // 2^(N-1)-1
    convert_word(5'b10000, 0);   // 2^(N-1)
    for (int i = 0; i < 20; i++) convert_word(N'($urandom), $urandom_range(0, 2*TP));
    // Convert raised in the same cycle as the ReDAC edge is too late for it:
    // the start is then one ReDAC period later
    begin
      int t0;
      wait (tc == TP-1); @(negedge clk);  // just after an edge
      t0 = cyc;
      data = 5'b00001; convert = 1;
      wait (!ready);
      check(cyc - t0 <= TP, "start later than one ReDAC period after Convert");
      @(negedge clk); convert = 0;
      wait (ready);
    end
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
