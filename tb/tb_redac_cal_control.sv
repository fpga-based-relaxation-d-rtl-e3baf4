// Self-checking testbench of redac_cal_control.
// Closes the calibration loop around the FSM with the clock divider, the
// ReDAC control block, the up/down counter and behavioural models of the RC
// network and comparator (8-bit converter, f_clk = 50 MHz, C = 1 nF,
// R_disch = 20 kOhm, initial m0 = 60). The resistor is set so that the ideal
// division factor m* = f_clk*RC*ln2/2 lies a few steps above m0, then a few
// steps below it. Checks:
//  * each iteration converts 2^(N-1)-1 then 2^(N-1), in that order;
//  * discharge only while the buffer is in high impedance;
//  * the step-2 count equals the discharge time predicted from the
//    capacitor voltage, tau_disch*ln(V/V_T)*f_clk, within 2 counts;
//  * m moves by +1 when q > 0 and by -1 when q < 0, and only then;
//  * the calibration ends (end_cal) with |m - m*| <= 1, both when m had to
//    go up and when it had to go down (the second run starting from the
//    first run's m).
module tb_redac_cal_control;
  import redac_pkg::*;
  localparam int unsigned N = 8, M_W = 12, M0 = 60, M_DEL = 3, QW = 18;
  localparam real TCLK = 20.0e-9, C = 1.0e-9, RD = 20.0e3, VDD = 3.3, VT = VDD / 4.0;

  logic clk = 0, rst_n = 0, cal = 0;
  logic end_cal, convert, ready, discharge, stop_n;
  logic [N-1:0] data;
  logic cnt_rst, cnt_en, cnt_up_dn_n, q_sign, q_zero, m_rst, m_en, m_up_dn_n;
  logic [M_W-1:0] m;
  logic clk_redac, clk_redac_del, tick, tick_del, buf_data, enable_n, reversed;
  logic signed [QW-1:0] q;
  cal_state_e state;
  real vc, r_ohm;
  int checks = 0, failures = 0;

  redac_cal_control #(.N(N), .Q_W(QW)) dut (.*);
  redac_clock_divider #(.M_W(M_W), .M0(M0), .M_DEL(M_DEL)) u_div (.*);
  redac_control #(.N(N)) u_ctl (.*);
  redac_updown_counter #(.Q_W(QW)) u_cnt (.clk, .rst_n, .rst(cnt_rst), .en(cnt_en),
    .up_dn_n(cnt_up_dn_n), .stop_n, .q, .sign(q_sign), .zero(q_zero));
  redac_rc_model #(.C_F(C), .R_DISCH(RD), .VDD(VDD), .TCLK_S(TCLK)) u_rc (.*);
  redac_comparator_model #(.VT(VT)) u_cmp (.v(vc), .stop_n);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- monitors ---------------------------------------------------------
  int n_conv = 0, n_up = 0, n_dn = 0;
  logic prev_conv = 0, prev_dis = 0;
  logic [N-1:0] expect_code;
  int dis_cycles = 0; real v_start = 0.0;
  always @(posedge clk) if (rst_n) begin
    if (convert && !prev_conv) begin
      expect_code = (n_conv % 2 == 0) ? N'((1 << (N-1)) - 1) : N'(1 << (N-1));
      check(data == expect_code, $sformatf("conversion %0d of code %0d, expected %0d",
                                           n_conv, data, expect_code));
      n_conv++;
    end
    if (discharge) check(enable_n, "discharge while the buffer drives");
    if (discharge && !prev_dis) begin v_start = vc; dis_cycles = 0; end
    if (!discharge && prev_dis && cnt_up_dn_n == 1'b0 && n_conv % 2 == 1) begin
      // end of the step-2 (count up) phase
      int exp_q;
      exp_q = int'($ln(v_start / VT) * RD * C / TCLK);
      check(q >= exp_q - 2 && q <= exp_q + 2,
            $sformatf("step-2 count %0d, expected %0d", q, exp_q));
    end
    if (m_en) begin
      check(q != 0, "m moved with q = 0");
      check(m_up_dn_n == (q > 0), $sformatf("m direction wrong for q=%0d", q));
      if (m_up_dn_n) n_up++; else n_dn++;
    end
    prev_conv = convert; prev_dis = discharge;
  end

  task automatic calibrate(input real m_star);
    int up0, dn0, m_from;
    real err;
    up0 = n_up; dn0 = n_dn; n_conv = 0;
    m_from = int'(m);   // first calibration: M0; later ones go on from here
    r_ohm = 2.0 * m_star * TCLK / ($ln(2.0) * C);
    @(negedge clk); cal = 1;
    wait (end_cal);
    @(negedge clk);
    err = real'(m) - m_star;
    $display("m* = %0.2f  final m = %0d  (+%0d / -%0d steps, %s)", m_star, m,
             n_up - up0, n_dn - dn0, reversed ? "sign reversal" : "q = 0");
    check(err <= 1.0 && err >= -1.0, $sformatf("final m %0d, m* %0.2f", m, m_star));
    // one step back is allowed when the previous m gave the smaller |q|
    if (m_star > real'(m_from)) check(n_up - up0 >= 2 && n_dn - dn0 <= 1, "expected increments");
    else                        check(n_dn - dn0 >= 2 && n_up - up0 <= 1, "expected decrements");
    check(int'(m) - m_from == (n_up - up0) - (n_dn - dn0), "m moved other than by its counted steps");
    check(n_conv >= 2 && n_conv % 2 == 0, "conversions not in pairs");
    cal = 0;
    @(negedge clk);
    check(!end_cal, "end_cal not released with cal");
  endtask

  initial begin
    r_ohm = 2.0 * M0 * TCLK / ($ln(2.0) * C);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    check(!end_cal && !discharge && !convert, "active without cal");
    calibrate(64.3);
    calibrate(55.6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
