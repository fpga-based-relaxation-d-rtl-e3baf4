// Static-characterization workload: full-ramp INL/DNL of the 11-bit
// configuration (N = 11, m0 = 179, 50 MHz, R = 4.7 kOhm, C = 2.2 nF,
// R_disch = 820 kOhm, V_T = VDD/4) with and without the parasitic error
// suppression.
//
// Two converters run side by side, each with its own behavioural RC network
// containing a fast parasitic pole (tau1 = 0.1 us, residue about 1 % of the
// main one):
//   u_sup  : T_del = 30 system clocks (0.6 us), the normal configuration;
//   u_nosup: T_del = 1 system clock (20 ns), i.e. the buffer released almost
//            at once after the MSB.
// Both are calibrated, then convert every code 0 .. 2^N-1 from the ramp
// pattern. The voltage held after each conversion gives the endpoint INL
// and DNL. Checks:
//   * every code 0 .. 2^N-1 is converted exactly once, in order;
//   * with suppression, max |INL| and max |DNL| stay within
//     1 LSB + the bound set by the residual error of the integer m
//     (2^(N-1)*ln2*|m-m*|/m* for INL, twice that for DNL);
//   * without suppression the worst INL and the worst DNL are each at least
//     three times larger.
module tb_redac2_static;
  import redac_pkg::*;
  localparam int unsigned N = REDAC2_N, M0 = REDAC2_M0, M_W = REDAC_M_W, Q_W = REDAC_Q_W;
  localparam int unsigned NC = 1 << N;
  localparam real TCLK = 20.0e-9, C = 2.2e-9, RD = 820.0e3, VDD = 3.3, VT = VDD / 4.0;
  localparam real TAU1 = 0.1e-6, R_NOM = 4.7e3;

  logic clk = 0, rst_n = 0, cal = 0, sel = 1;
  syn_mode_e syn_mode = SYN_OFF;
  int checks = 0, failures = 0;
  real r_ohm = R_NOM;

  logic             end_cal[2], buf_data[2], buf_enable_n[2], discharge[2], comp_stop_n[2];
  logic             ready[2], clk_redac[2], clk_redac_del[2], cal_reversed[2];
  logic [M_W-1:0]   m[2];
  logic signed [Q_W-1:0] q[2];
  cal_state_e       cal_state[2];
  real              vc[2];

  redac_top #(.N(N), .M0(M0), .M_DEL(REDAC2_M_DEL)) u_sup (
    .clk, .rst_n, .cal, .end_cal(end_cal[0]), .sel, .syn_mode,
    .syn_const_code('0), .syn_amplitude('0), .syn_phase_inc('0),
    .buf_data(buf_data[0]), .buf_enable_n(buf_enable_n[0]), .discharge(discharge[0]),
    .comp_stop_n(comp_stop_n[0]), .ready(ready[0]), .clk_redac(clk_redac[0]),
    .clk_redac_del(clk_redac_del[0]), .m(m[0]), .q(q[0]), .cal_state(cal_state[0]),
    .cal_reversed(cal_reversed[0]));
  redac_top #(.N(N), .M0(M0), .M_DEL(1)) u_nosup (
    .clk, .rst_n, .cal, .end_cal(end_cal[1]), .sel, .syn_mode,
    .syn_const_code('0), .syn_amplitude('0), .syn_phase_inc('0),
    .buf_data(buf_data[1]), .buf_enable_n(buf_enable_n[1]), .discharge(discharge[1]),
    .comp_stop_n(comp_stop_n[1]), .ready(ready[1]), .clk_redac(clk_redac[1]),
    .clk_redac_del(clk_redac_del[1]), .m(m[1]), .q(q[1]), .cal_state(cal_state[1]),
    .cal_reversed(cal_reversed[1]));

  for (genvar i = 0; i < 2; i++) begin : g_analog
    redac_rc_model #(.C_F(C), .R_DISCH(RD), .VDD(VDD), .TCLK_S(TCLK), .TAU1_S(TAU1)) u_rc (
      .clk, .buf_data(buf_data[i]), .enable_n(buf_enable_n[i]), .discharge(discharge[i]),
      .r_ohm, .vc(vc[i]));
    redac_comparator_model #(.VT(VT)) u_cmp (.v(vc[i]), .stop_n(comp_stop_n[i]));
  end

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pin decoding and held-voltage capture
  real  vhold[2][NC];
  int   count[2];
  int   next_code[2];
  logic rec = 0;
  int   en_fall[2], cyc = 0;
  logic prev_en[2] = '{1'b1, 1'b1};
  logic [N-1:0] word[2];
  logic [M_W-1:0] m_fall[2];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 2; i++) begin
      if (!buf_enable_n[i] && prev_en[i]) begin
        en_fall[i] = cyc; word[i] = '0; m_fall[i] = m[i];
      end
      if (!buf_enable_n[i]) begin
        int t; t = cyc - en_fall[i];
        if (t % (2 * int'(m_fall[i])) == int'(m_fall[i]) && t / (2 * int'(m_fall[i])) < N)
          word[i][t / (2 * int'(m_fall[i]))] = buf_data[i];
      end
      if (buf_enable_n[i] && !prev_en[i] && rec && count[i] < NC) begin
        if (count[i] == 0) next_code[i] = int'(word[i]);
        check(int'(word[i]) == next_code[i],
              $sformatf("dac %0d: code %0d converted, expected %0d", i, word[i], next_code[i]));
        vhold[i][word[i]] = vc[i];
        next_code[i] = (next_code[i] + 1) % NC;
        count[i]++;
      end
      prev_en[i] = buf_enable_n[i];
    end
  end

  real inl_max[2], dnl_max[2];
  task automatic analyse(input int i);
    real lsb_eff, inl, dnl;
    inl_max[i] = 0.0; dnl_max[i] = 0.0;
    lsb_eff = (vhold[i][NC-1] - vhold[i][0]) / real'(NC - 1);
    for (int n = 0; n < NC; n++) begin
      inl = (vhold[i][n] - vhold[i][0]) / lsb_eff - real'(n);
      if (inl < 0.0) inl = -inl;
      if (inl > inl_max[i]) inl_max[i] = inl;
      if (n > 0) begin
        dnl = (vhold[i][n] - vhold[i][n-1]) / lsb_eff - 1.0;
        if (dnl < 0.0) dnl = -dnl;
        if (dnl > dnl_max[i]) dnl_max[i] = dnl;
      end
    end
  endtask

  initial begin
    real m_star, dm, b_inl, b_dnl;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cal = 1;
    wait (end_cal[0] && end_cal[1]);
    @(negedge clk); cal = 0; sel = 0;
    m_star = r_ohm * C * $ln(2.0) / (2.0 * TCLK);
    $display("calibrated: m = %0d (T_del 0.6 us), %0d (T_del 20 ns), m* = %0.2f", m[0], m[1], m_star);
    // start the ramp and record one full pass of codes
    count[0] = 0; count[1] = 0;
    syn_mode = SYN_RAMP;
    rec = 1;
    wait (count[0] == NC && count[1] == NC);
    syn_mode = SYN_OFF;
    analyse(0); analyse(1);
    dm = real'(m[0]) - m_star; if (dm < 0.0) dm = -dm;
    b_inl = 1.0 + real'(1 << (N - 1)) * $ln(2.0) * dm / m_star;
    b_dnl = 1.0 + real'(1 << N) * $ln(2.0) * dm / m_star;
    $display("with suppression   : max |INL| %0.2f LSB, max |DNL| %0.2f LSB (bounds %0.2f / %0.2f)",
             inl_max[0], dnl_max[0], b_inl, b_dnl);
    $display("without suppression: max |INL| %0.2f LSB, max |DNL| %0.2f LSB", inl_max[1], dnl_max[1]);
    check(inl_max[0] <= b_inl, "INL with suppression above bound");
    check(dnl_max[0] <= b_dnl, "DNL with suppression above bound");
    check(dnl_max[1] >= 3.0 * dnl_max[0], "suppression made no clear difference to DNL");
    check(inl_max[1] >= 3.0 * inl_max[0], "suppression made no clear difference to INL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
