// End-to-end testbench of redac_top at its default (13-bit prototype)
// parameters, with behavioural models of the RC network (C = 1 nF,
// R_disch = 820 kOhm, a fast parasitic mode of 0.5 us) and of the V_T = VDD/4
// comparator, on a 50 MHz system clock.
//
// 1. Calibration with the resistor 0.1 % high (m* above m0 = 3119): m must
//    step up and end within 1 of m* = f_clk*RC*ln2/2.
// 2. Calibration with the resistor 0.2 % low (a drift): m must step down,
//    starting from the previously calibrated value, not from m0.
// 3. Normal operation from the synthesizer (sel = 0): constant, ramp and
//    sine patterns. Every conversion is decoded from the buffer pins (one bit
//    per ReDAC period, LSB first) and the held capacitor voltage, read when
//    the buffer goes to high impedance, is compared with the ideal
//    a0*n/2^N*VDD*exp(-T_del/RC) (a0 = tau0/(tau0-tau1) is the gain of the
//    dominant mode of the two-pole network) within 1.5 LSB plus the INL
//    that the residual error of the integer m can cause,
//    2^(N-1)*ln2*|m-m*|/m* LSB. Conversions must start
//    (N+2)*2m system clocks apart.
// 4. Parasitic error suppression: at the end of the MSB period the parasitic
//    mode of the model holds a large error; when the buffer is released
//    T_del later it must have decayed below 0.5 LSB.
// Each mechanism (calibration iteration, m up, m down, end of calibration,
// discharge up/down count, T_del low phase, both mux inputs, each
// synthesizer pattern) is counted and must occur at least once.
module tb_redac_top;
  import redac_pkg::*;
  localparam int unsigned N = REDAC1_N, M0 = REDAC1_M0, M_DEL = REDAC1_M_DEL;
  localparam int unsigned M_W = REDAC_M_W, Q_W = REDAC_Q_W, PH_W = 16;
  localparam real TCLK = 20.0e-9, C = 1.0e-9, RD = 820.0e3, VDD = 3.3, VT = VDD / 4.0;
  localparam real TAU1 = 0.5e-6;
  localparam real R_NOM = 180.0e3;
  localparam real LSB = VDD / real'(1 << N);

  logic clk = 0, rst_n = 0, cal = 0, end_cal, sel = 1;
  syn_mode_e syn_mode = SYN_OFF;
  logic [N-1:0] syn_const_code = '0, syn_amplitude = '0;
  logic [PH_W-1:0] syn_phase_inc = '0;
  logic buf_data, buf_enable_n, discharge, comp_stop_n, ready;
  logic clk_redac, clk_redac_del, cal_reversed;
  logic [M_W-1:0] m;
  logic signed [Q_W-1:0] q;
  cal_state_e cal_state;
  real vc, r_ohm = R_NOM;
  int checks = 0, failures = 0;

  redac_top dut (.*);
  redac_rc_model #(.C_F(C), .R_DISCH(RD), .VDD(VDD), .TCLK_S(TCLK), .TAU1_S(TAU1)) u_rc (
    .clk, .buf_data, .enable_n(buf_enable_n), .discharge, .r_ohm, .vc);
  redac_comparator_model #(.VT(VT)) u_cmp (.v(vc), .stop_n(comp_stop_n));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ------------------------------------------------
  int n_iter = 0, n_m_up = 0, n_m_dn = 0, n_end = 0, n_dis_up = 0, n_dis_dn = 0;
  int n_tdel = 0, n_conv_syn = 0, n_conv_cal = 0, n_const = 0, n_ramp = 0, n_sine = 0;
  int n_supp = 0;

  // ---- pin-level decoding of every conversion ------------------------------
  int cyc = 0, en_fall = -1, prev_fall = -1, conv_idx = 0;
  logic prev_en = 1, prev_dis = 0, prev_del = 1, prev_end = 0;
  logic [M_W-1:0] prev_m;
  logic [N-1:0] word;
  real v_msb_err;   // parasitic-mode voltage when the MSB period ends
  logic [N-1:0] words[$];
  logic check_volt = 0;
  logic spacing_armed = 0;
  logic [M_W-1:0] m_at_fall;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // conversion start: buffer enabled
      if (!buf_enable_n && prev_en) begin
        prev_fall = en_fall; en_fall = cyc; word = '0; m_at_fall = m;
        if (sel) n_conv_cal++; else n_conv_syn++;
        if (!sel && spacing_armed)
          check(en_fall - prev_fall == (N + 2) * 2 * int'(m),
                $sformatf("conversions %0d cycles apart, expected %0d",
                          en_fall - prev_fall, (N + 2) * 2 * int'(m)));
        conv_idx++;
        spacing_armed = !sel;
      end
      // bit i is on the pin in the middle of ReDAC period i
      if (!buf_enable_n && en_fall >= 0) begin
        int t; t = cyc - en_fall;
        if (t % (2 * int'(m_at_fall)) == int'(m_at_fall) && t / (2 * int'(m_at_fall)) < N)
          word[t / (2 * int'(m_at_fall))] = buf_data;
        if (t == N * 2 * int'(m_at_fall)) begin
          v_msb_err = u_rc.y1;
          check(!buf_data, "buffer not driven low after the MSB");
        end
      end
      // buffer released: must coincide with a rising edge of the delayed clock
      if (buf_enable_n && !prev_en) begin
        check(clk_redac_del && !prev_del, "buffer released off the delayed clock edge");
        check(cyc - en_fall == N * 2 * int'(m_at_fall) + int'(M_DEL),
              $sformatf("buffer enabled %0d cycles, expected N*2m+M_DEL", cyc - en_fall));
        n_tdel++;
        // parasitic suppression: the fast-mode error decays over T_del
        if (v_msb_err < 0.0 ? -v_msb_err > 2.0 * LSB : v_msb_err > 2.0 * LSB) begin
          check((u_rc.y1 < 0.0 ? -u_rc.y1 : u_rc.y1) < 0.5 * LSB,
                $sformatf("parasitic error %0.3f LSB after T_del", u_rc.y1 / LSB));
          n_supp++;
        end
        if (!sel) begin
          real ideal, err, m_star, tol;
          // residue of the dominant pole, a0 = tau0/(tau0-tau1): a gain
          // error only, left in by the converter
          ideal = real'(word) * LSB * $exp(-real'(M_DEL) * TCLK / (r_ohm * C))
                  * (r_ohm * C) / (r_ohm * C - TAU1);
          err = (vc - ideal) / LSB;
          // allowance for the residual period error of the calibrated m,
          // at most 2^(N-1)*ln2*|dT|/T* LSB (mid-scale worst case)
          m_star = r_ohm * C * $ln(2.0) / (2.0 * TCLK);
          tol = 1.5 + real'(1 << (N - 1)) * $ln(2.0) *
                ((real'(m) > m_star) ? real'(m) - m_star : m_star - real'(m)) / m_star;
          if (check_volt)
            check(err < tol && err > -tol,
                  $sformatf("code %0d held %0.4f V, ideal %0.4f V (%0.2f LSB)", word, vc, ideal, err));
          words.push_back(word);
        end
      end
      if (discharge && !prev_dis) begin
        if (cal_state == CAL_S2_DISCH) n_dis_up++; else n_dis_dn++;
      end
      if (cal_state == CAL_DECIDE) n_iter++;
      if (m != prev_m && cal_state != CAL_RESET && cal_state != CAL_S1_REQ) begin
        if (m > prev_m) n_m_up++; else n_m_dn++;
      end
      if (end_cal && !prev_end) n_end++;
    end
    prev_en = buf_enable_n; prev_dis = discharge; prev_del = clk_redac_del;
    prev_m = m; prev_end = end_cal;
  end

  task automatic calibrate(input real r_rel);
    real m_star, err;
    int up0, dn0, m_from;
    r_ohm = R_NOM * r_rel;
    // the first calibration starts from M0, later ones from the current m
    m_from = (n_end == 0) ? int'(M0) : int'(m);
    m_star = r_ohm * C * $ln(2.0) / (2.0 * TCLK);
    up0 = n_m_up; dn0 = n_m_dn;
    @(negedge clk); sel = 1; cal = 1;
    wait (end_cal);
    @(negedge clk);
    err = real'(m) - m_star;
    $display("calibration: m* = %0.2f, m = %0d after %0d up / %0d down steps (%s)",
             m_star, m, n_m_up - up0, n_m_dn - dn0, cal_reversed ? "sign reversal" : "q = 0");
    check(err <= 1.0 && err >= -1.0, $sformatf("calibrated m %0d, m* %0.2f", m, m_star));
    check(int'(m) - m_from == (n_m_up - up0) - (n_m_dn - dn0),
          $sformatf("m went from %0d to %0d in %0d up / %0d down steps",
                    m_from, m, n_m_up - up0, n_m_dn - dn0));
    // one step back is allowed when the previous m gave the smaller |q|
    if (m_star > real'(m_from)) check(n_m_up > up0 && n_m_dn - dn0 <= 1, "m should have gone up");
    else                        check(n_m_dn > dn0 && n_m_up - up0 <= 1, "m should have gone down");
    cal = 0;
    @(negedge clk);
  endtask

  task automatic run_pattern(input syn_mode_e md, input int n);
    @(negedge clk); sel = 0; syn_mode = md;
    spacing_armed = 0;
    words.delete();
    wait (words.size() >= n);
    @(negedge clk); syn_mode = SYN_OFF;
    wait (ready && buf_enable_n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    calibrate(1.001);
    calibrate(0.998);
    // normal operation
    check_volt = 1;
    syn_const_code = N'(1 << (N - 1));
    run_pattern(SYN_CONST, 3);
    foreach (words[k]) begin check(words[k] == syn_const_code, "constant word"); n_const++; end
    run_pattern(SYN_RAMP, 4);
    for (int k = 1; k < words.size(); k++) begin
      check(words[k] == N'(words[k-1] + 1), "ramp words not consecutive"); n_ramp++;
    end
    syn_amplitude = N'(int'(0.9 * real'(1 << (N - 1))));
    syn_phase_inc = 16'd6000;
    run_pattern(SYN_SINE, 6);
    foreach (words[k]) begin
      check(words[k] >= N'((1 << (N - 1)) - int'(syn_amplitude)) &&
            words[k] <= N'((1 << (N - 1)) + int'(syn_amplitude)), "sine word out of swing");
      n_sine++;
    end
    // every mechanism must have occurred
    check(n_iter > 0,     "no calibration iteration");
    check(n_m_up > 0,     "m never stepped up");
    check(n_m_dn > 0,     "m never stepped down");
    check(n_end == 2,     "calibration did not end twice");
    check(n_dis_up > 0 && n_dis_dn > 0, "discharge measurements missing");
    check(n_tdel > 0,     "no T_del low phase");
    check(n_supp > 0,     "parasitic suppression never exercised");
    check(n_conv_cal > 0 && n_conv_syn > 0, "a mux input never used");
    check(n_const > 0 && n_ramp > 0 && n_sine > 0, "a synthesizer pattern never ran");
    $display("iterations %0d, m up %0d, m down %0d, conversions cal %0d / synth %0d, T_del phases %0d, suppressed %0d",
             n_iter, n_m_up, n_m_dn, n_conv_cal, n_conv_syn, n_tdel, n_supp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
