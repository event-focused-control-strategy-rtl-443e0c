// Self-checking testbench for frequency_selector.
// The testbench plays the DPWM: it runs a period counter with chosen period
// and S1 on-time and raises zcd_evt at chosen counter values. It checks:
//   CCM-HS: the period is T_CCM whatever the events;
//   QSW-ZVS: an event at counter value c after S1 turned off gives
//     c + T_QSW one clock later (the published 45, 54 and 69 kHz points among
//     others), limited to [T_MIN, T_MAX];
//   events during the S1 on-time and second events in a period are ignored;
//   a QSW period with no event keeps the last value and pulses no_event;
//   evt_valid is set from the accepted event to the next period start.
module frequency_selector_tb;
  import boost_ctrl_pkg::*;

  localparam period_t T_CCM = 16'd1667, T_QSW = 16'd50, T_MIN = 16'd500, T_MAX = 16'd5000;

  logic clk = 0, rst_n = 0, period_start = 0, off_phase = 0, zcd_evt = 0;
  cmode_e mode = MODE_CCM_HS;
  period_t cnt = '0;
  period_t t_selec, t_evt;
  logic evt_taken, no_event, evt_valid;
  int checks = 0, failures = 0;
  int n_taken = 0, n_noevt = 0, n_clamp = 0;

  frequency_selector #(.T_CCM(T_CCM), .T_QSW(T_QSW), .T_MIN(T_MIN), .T_MAX(T_MAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One period of length t with S1 on-time ton; events at e1 and e2 (-1: none).
  // exp: expected t_selec at the end of the period; exp_evt: accepted event.
  task automatic run_period(input int t, input int ton, input int e1, input int e2,
                            input int exp, input int exp_evt);
    int taken;
    taken = 0;
    for (int c = 0; c < t; c++) begin
      @(negedge clk);
      cnt = period_t'(c);
      period_start = (c == 0);
      off_phase = (c >= ton);
      zcd_evt = (c == e1) || (c == e2);
      @(posedge clk); #1;
      if (exp_evt >= 0 && c >= exp_evt)
        check(evt_valid, "evt_valid held after the event");
      else
        check(!evt_valid, "evt_valid low before the event");
      if (evt_taken) begin
        taken++;
        check(c == exp_evt, $sformatf("event taken at %0d expected %0d", c, exp_evt));
        check(int'(t_selec) == exp, $sformatf("t_selec %0d expected %0d", t_selec, exp));
        check(int'(t_evt) == exp_evt, "time stamp");
      end
    end
    period_start = 0; zcd_evt = 0;
    check(taken == (exp_evt >= 0 ? 1 : 0), $sformatf("%0d events taken", taken));
    check(int'(t_selec) == exp, $sformatf("end of period: t_selec %0d expected %0d", t_selec, exp));
    n_taken += taken;
  endtask

  function automatic int clampq(input int v);
    if (v < int'(T_MIN)) begin n_clamp++; return int'(T_MIN); end
    if (v > int'(T_MAX)) begin n_clamp++; return int'(T_MAX); end
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, ton, e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(t_selec == T_CCM, "reset: CCM period");
    // CCM-HS: events do not matter.
    mode = MODE_CCM_HS;
    run_period(1667, 833, 1200, -1, 1667, -1);
    run_period(1667, 833, -1, -1, 1667, -1);
    // QSW-ZVS: a period without an event keeps the CCM value.
    mode = MODE_QSW_ZVS;
    run_period(1667, 833, -1, -1, int'(T_CCM), -1);
    @(negedge clk); period_start = 1; cnt = '0;
    @(posedge clk); #1;
    check(no_event && t_selec == T_CCM, "no event in a QSW period: value kept, no_event");
    check(!evt_valid, "evt_valid clear without an event");
    n_noevt++;
    @(negedge clk); period_start = 0;
    // The frequencies of the step-load tests: 45, 54 and 69 kHz.
    t = int'(period_cycles(45000)); e = t - int'(T_QSW);
    run_period(5000, 1000, e, -1, t, e);
    t = int'(period_cycles(54000)); e = t - int'(T_QSW);
    run_period(2222, 1111, e, -1, t, e);
    t = int'(period_cycles(69000)); e = t - int'(T_QSW);
    run_period(1852, 926, e, -1, t, e);
    // Event during the S1 on-time is ignored; the later one counts.
    run_period(1449, 700, 300, 1100, 1150, 1100);
    // Only the first event of a period counts.
    run_period(2000, 900, 1000, 1500, 1050, 1000);
    // Limits.
    run_period(1000, 100, 200, -1, clampq(250), 200);
    run_period(5000, 2000, 4990, -1, clampq(5040), 4990);
    // Random periods.
    for (int k = 0; k < 20; k++) begin
      t = int'($urandom_range(5000, 300));
      ton = int'($urandom_range(t - 20, 10));
      e = ton + int'($urandom_range(t - ton - 1, 0));
      run_period(t, ton, e, -1, clampq(e + int'(T_QSW)), e);
    end
    // Back to CCM-HS.
    mode = MODE_CCM_HS;
    @(negedge clk); @(negedge clk);
    check(t_selec == T_CCM, "back to the CCM period");
    check(n_taken > 0 && n_noevt > 0 && n_clamp >= 2, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
