// End-to-end testbench of boost_ctrl_top, at its default parameters, driving
// a behavioural model of the 400 V to 800 V converter in closed loop.
//
// Load profile (as in the step-load measurements): 5.5 kW (CCM-HS), a step
// to 3.5 kW (QSW-ZVS), then 3 kW and 2.5 kW (QSW-ZVS at rising frequency),
// an input-voltage step from 400 V to 350 V (the time until the output is
// back within 1 % of 800 V is measured), a step of the output reference from
// 800 V to 750 V (16 ms), a step up to 8 kW (return to CCM-HS), and an
// open-loop stretch with the user's D and T.
// The model starts in the 5.5 kW steady state.
//
// Checked on every switching period:
//   - CCM-HS periods last T_CCM (60 kHz) and S1 turns on at positive current;
//   - QSW-ZVS periods end at (event time + T_QSW), that length is the next
//     period's T, and
//     S1 turns on at negative current (the zero-voltage condition);
//   - the mode follows the average current with hysteresis;
//   - open loop uses the user's T;
//   - the output stays near its reference (up to the 8 kW step), and follows
//     the reference step.
// Each mechanism (both mode switches, event-ended periods, zero-voltage
// turn-on, open loop) is counted and must occur at least once.
module boost_ctrl_top_tb;
  import boost_ctrl_pkg::*;

  localparam int PHASE = 400_000;  // cycles per load phase (4 ms)

  logic clk = 0, rst_n = 0, en = 0, open_loop = 0;
  duty_t d_user = 16'd32768;
  period_t t_user = 16'd2000;
  volt_t vref = 16'd8000;
  volt_t vo;
  current_t il;
  logic zcd_cmp;
  logic g1, g2;
  cmode_e mode;
  duty_t d_reg;
  period_t t_selec, t_cur, t_end, ton_cur, t_evt;
  current_t il_avg;
  logic period_start, avg_valid, zcd_evt, evt_taken, no_event, mode_changed;

  real vi = 400.0, r_load = 800.0 * 800.0 / 5500.0;
  real il_a, vo_v;
  logic init = 1;
  logic vo_checked = 1;

  int checks = 0, failures = 0;
  longint cyc = 0;

  boost_ctrl_top dut (.*);

  boost_plant_model plant (
    .clk(clk), .g1(g1), .g2(g2), .vi(vi), .r_load(r_load),
    .il_init(5.42), .vo_init(800.0), .init(init),
    .il_a(il_a), .vo_v(vo_v), .il_code(il), .vo_code(vo), .zcd_cmp(zcd_cmp)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---------------------------------------------------------------- monitor
  int n_ccm = 0, n_qsw = 0, n_to_qsw = 0, n_to_ccm = 0, n_evt_periods = 0;
  int n_noevt = 0, n_ol = 0, n_zvs = 0, n_hard = 0, n_vref_steps = 0, n_vi_recover = 0;
  int since = 0, evt_at = -1, last_len = 0;
  logic g1_d = 0;
  cmode_e mode_at_start = MODE_CCM_HS, mode_prev_start = MODE_CCM_HS;
  logic noevt_seen = 0, ol_prev = 0;
  period_t t_expect = '0;
  logic t_expect_ok = 0;
  real il_at_on;
  int phase_id = 0;
  real f_sum [8];
  int  f_cnt [8];

  always @(negedge clk) if (rst_n && en) begin
    check(!(g1 && g2), "shoot-through");
    if (mode_changed) begin
      if (mode == MODE_QSW_ZVS) n_to_qsw++; else n_to_ccm++;
      // The mode must agree with the hysteresis rule for the last average.
      check(mode == MODE_QSW_ZVS ? (int'(il_avg) < 1200) : (int'(il_avg) > 1300),
            $sformatf("mode %0d after average %0d", mode, il_avg));
    end
    if (evt_taken) evt_at = since - 1;
    if (no_event) noevt_seen = 1;
    // S1 turn-on: judge the switching condition.
    if (g1 && !g1_d) begin
      il_at_on = il_a;
      if (!open_loop && mode_at_start == MODE_QSW_ZVS && mode_prev_start == MODE_QSW_ZVS
          && last_len < 5000) begin
        check(il_at_on < 0.0, $sformatf("QSW: S1 on at %f A, not negative", il_at_on));
        if (il_at_on < 0.0) n_zvs++;
      end
      if (!open_loop && mode_at_start == MODE_CCM_HS && mode_prev_start == MODE_CCM_HS) begin
        check(il_at_on > 0.0, $sformatf("CCM: S1 on at %f A", il_at_on));
        n_hard++;
      end
    end
    g1_d = g1;
    if (period_start) begin
      last_len = since;
      if (open_loop && ol_prev) check(last_len == int'(t_user), $sformatf("OL period %0d", last_len));
      // Period just begun: compare it with what the previous one implies.
      if (!open_loop && !ol_prev && cyc > 5000) begin
        // The period that just ended ran entirely in one mode.
        if (mode_at_start == MODE_CCM_HS && mode == MODE_CCM_HS) begin
          check(last_len == 1667, $sformatf("CCM period %0d", last_len));
          n_ccm++;
        end
        if (mode_at_start == MODE_QSW_ZVS && mode == MODE_QSW_ZVS) begin
          n_qsw++;
          if (evt_at >= 0) begin
            t_expect = period_t'(evt_at + 50);
            if (t_expect < 16'd500) t_expect = 16'd500;
            if (t_expect > 16'd5000) t_expect = 16'd5000;
            check(last_len == int'(t_expect),
                  $sformatf("QSW period %0d, event at %0d", last_len, evt_at));
            check(t_cur == t_expect, "measured period carried to the next cycle");
            n_evt_periods++;
            f_sum[phase_id] += 1.0e8 / real'(last_len);
            f_cnt[phase_id]++;
          end
        end
      end
      if (open_loop && ol_prev) begin
        n_ol++;
      end
      if (noevt_seen) n_noevt++;
      noevt_seen = 0;
      mode_prev_start = mode_at_start;
      mode_at_start = mode;
      ol_prev = open_loop;
      evt_at = -1;
      since = 0;
    end
    since++;
    if (cyc > 5000 && vo_checked)
      check(vo_v > 700.0 && vo_v < 900.0, $sformatf("output %f V out of range", vo_v));
  end

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (PHASE * 30) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic phase(input int id, input real p_w, input string name);
    phase_id = id;
    r_load = 800.0 * 800.0 / p_w;
    repeat (PHASE) @(posedge clk);
    $display("%-28s mode=%s il_avg=%0d (x10mA) Vo=%.1f V T=%0d f=%.1f kHz D=%0d",
             name, mode.name(), il_avg, vo_v, t_cur, 1.0e5 / real'(t_cur), d_reg);
  endtask

  initial begin
    foreach (f_cnt[i]) begin f_cnt[i] = 0; f_sum[i] = 0.0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    init = 0;
    en = 1;
    phase(0, 5500.0, "5.5 kW");
    check(mode == MODE_CCM_HS, "5.5 kW runs in CCM-HS");
    check(n_to_qsw == 0, "no mode change at constant 5.5 kW");
    phase(1, 3500.0, "3.5 kW");
    check(mode == MODE_QSW_ZVS, "3.5 kW runs in QSW-ZVS");
    phase(2, 3000.0, "3 kW");
    check(mode == MODE_QSW_ZVS, "3 kW runs in QSW-ZVS");
    phase(3, 2500.0, "2.5 kW");
    check(mode == MODE_QSW_ZVS, "2.5 kW runs in QSW-ZVS");
    check(f_cnt[3] > 0 && f_cnt[2] > 0 && f_cnt[1] > 0 &&
          f_sum[3] / f_cnt[3] > f_sum[2] / f_cnt[2] && f_sum[2] / f_cnt[2] > f_sum[1] / f_cnt[1],
          "lighter load gives a higher QSW frequency");
    // Input-voltage step 400 V -> 350 V: the regulator raises D and holds
    // the output.
    vi = 350.0;
    begin
      longint t_step;
      real t_reg_ms;
      phase_id = 4;
      t_step = cyc;
      // Recovery time: the output first sags below 99 % of 800 V, then the
      // regulator brings it back above that line.
      while (vo_v >= 792.0 && cyc - t_step < 100_000) @(posedge clk);
      while (vo_v < 792.0 && cyc - t_step < 6_000_000) @(posedge clk);
      t_reg_ms = real'(cyc - t_step) / 1.0e5;
      $display("input step: output back within 1 %% of 800 V after %.1f ms", t_reg_ms);
      check(t_reg_ms > 10.0 && t_reg_ms < 60.0,
            $sformatf("slow, smooth recovery (tens of ms): %.1f ms", t_reg_ms));
      n_vi_recover++;
    end
    phase(4, 2500.0, "2.5 kW, Vi 350 V");
    check(d_reg > 16'd34000, $sformatf("duty rose for the lower input voltage: %0d", d_reg));
    check(vo_v > 770.0 && vo_v < 830.0, $sformatf("output recovering towards 800 V: %f", vo_v));
    // Reference step 800 V -> 750 V: the regulator lowers D and the output
    // follows, slowly.
    begin
      duty_t d_before;
      d_before = d_reg;
      vref = 16'd7500;
      phase(5, 2500.0, "2.5 kW, Vref 750 V");
      check(vo_v < 790.0, $sformatf("output moving to the new reference: %f", vo_v));
      repeat (3) phase(5, 2500.0, "2.5 kW, Vref 750 V");
      check(vo_v > 735.0 && vo_v < 765.0, $sformatf("output near 750 V: %f", vo_v));
      check(d_reg < d_before, $sformatf("duty fell for the lower reference: %0d -> %0d",
                                        d_before, d_reg));
      n_vref_steps++;
    end
    // Load increase: the selector returns to CCM-HS (the output voltage is
    // not checked here, see the notes on the return to CCM-HS).
    vo_checked = 0;
    phase(6, 8000.0, "8 kW");
    open_loop = 1;
    phase(7, 8000.0, "open loop, T_user 2000");
    for (int i = 1; i < 4; i++)
      if (f_cnt[i] > 0) $display("phase %0d: mean QSW frequency %.1f kHz over %0d periods",
                                 i, f_sum[i] / f_cnt[i] / 1000.0, f_cnt[i]);
    $display("CCM periods %0d, QSW periods %0d, event-timed %0d, to QSW %0d, to CCM %0d, no-event %0d, ZVS turn-ons %0d, OL periods %0d",
             n_ccm, n_qsw, n_evt_periods, n_to_qsw, n_to_ccm, n_noevt, n_zvs, n_ol);
    check(n_ccm > 0, "CCM-HS periods seen");
    check(n_qsw > 0, "QSW-ZVS periods seen");
    check(n_evt_periods > 0, "event-timed periods seen");
    check(n_to_qsw > 0, "switch to QSW-ZVS seen");
    check(n_to_ccm > 0, "switch to CCM-HS seen");
    check(n_zvs > 0, "zero-voltage turn-ons seen");
    check(n_ol > 0, "open-loop periods seen");
    check(n_vref_steps > 0, "reference step followed");
    check(n_vi_recover > 0, "input step recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
