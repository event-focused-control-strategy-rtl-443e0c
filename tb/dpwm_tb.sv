// Self-checking testbench for dpwm.
// For a series of (D, T) settings, lets the DPWM settle for two periods and
// then measures one whole period from its outputs: length between
// period_start pulses, number of G1 and G2 cycles, the dead-times before G2
// and after it, and the positions of the T/4 and 3T/4 sampling strobes.
// Expected values are computed here from D, T and the dead-times. In event
// mode the testbench plays the frequency selector: at a chosen counter value
// it raises evt_valid and puts the period end on the period input, and the
// period must end exactly there, with the S1 on-time still scaled from the T
// loaded at the period start; without an event the period must end at the
// time-out. G1 and G2 are also checked never to be high together, and to
// stay low while en is low.
module dpwm_tb;
  import boost_ctrl_pkg::*;

  localparam int TD1 = 20, TD2 = 20, T_LOW = TD1 + TD2 + 8;

  logic clk = 0, rst_n = 0, en = 0;
  duty_t duty = '0;
  period_t period = 16'd1000;
  logic g1, g2, period_start, sample_q1, sample_q3, off_phase;
  period_t cnt, t_cur, ton_cur, t_end;
  logic evt_mode = 0, evt_valid = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dpwm #(.TD1(TD1), .TD2(TD2), .T_EVT_MAX(5000)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Shoot-through monitor.
  always @(negedge clk) if (rst_n && g1 && g2) begin
    failures++;
    $display("FAIL g1 and g2 high together at cycle %0d", cyc);
  end

  task automatic wait_start();
    do @(negedge clk); while (!period_start);
  endtask

  task automatic measure(input int d, input int t);
    int tl, ton, n_g1, n_g2, first_g2, last_g2, q1_at, q3_at, len;
    tl  = (t < T_LOW) ? T_LOW : t;
    ton = int'((longint'(d) * longint'(tl)) >> 16);
    duty = duty_t'(d); period = period_t'(t);
    wait_start(); wait_start(); wait_start();
    n_g1 = 0; n_g2 = 0; first_g2 = -1; last_g2 = -1; q1_at = -1; q3_at = -1;
    len = 0;
    if (sample_q1) q1_at = 0;
    do begin
      @(negedge clk);
      len++;
      if (g1) n_g1++;
      if (g2) begin n_g2++; if (first_g2 < 0) first_g2 = len; last_g2 = len; end
      if (sample_q1 && !period_start) q1_at = len;
      if (sample_q3 && !period_start) q3_at = len;
    end while (!period_start && len < 70000);
    check(len == tl, $sformatf("period %0d expected %0d", len, tl));
    check(n_g1 == ton, $sformatf("G1 width %0d expected %0d", n_g1, ton));
    if (tl - ton - TD1 - TD2 > 0) begin
      check(n_g2 == tl - ton - TD1 - TD2, $sformatf("G2 width %0d expected %0d", n_g2, tl - ton - TD1 - TD2));
      check(first_g2 == ton + TD1 + 1, $sformatf("td1: G2 starts %0d expected %0d", first_g2, ton + TD1 + 1));
      check(tl - last_g2 == TD2 - 1 + 1, $sformatf("td2: G2 ends %0d before period end", tl - last_g2));
    end else begin
      check(n_g2 == 0, "G2 must stay off when no room");
    end
    check(q1_at == tl / 4, $sformatf("T/4 strobe at %0d expected %0d", q1_at, tl / 4));
    check(q3_at == (3 * tl) / 4, $sformatf("3T/4 strobe at %0d expected %0d", q3_at, (3 * tl) / 4));
  endtask

  // Event mode: T loaded at the start is t0; the event arrives at counter
  // value e (-1: never) and moves the period end to e + 50.
  task automatic measure_evt(input int d, input int t0, input int e);
    int ton, len, n_g1, last_g2, exp_len;
    ton = int'((longint'(d) * longint'(t0)) >> 16);
    exp_len = (e < 0) ? 5000 : ((e + 50 < T_LOW) ? T_LOW : e + 50);
    duty = duty_t'(d); period = period_t'(t0); evt_valid = 0;
    wait_start();
    len = 0; n_g1 = 0; last_g2 = -1;
    do begin
      if (len == e) begin evt_valid = 1; period = period_t'(e + 50); end
      @(negedge clk);
      len++;
      if (g1) n_g1++;
      if (g2) last_g2 = len;
      if (period_start) begin evt_valid = 0; period = period_t'(t0); end
    end while (!period_start && len < 70000);
    check(len == exp_len, $sformatf("event period %0d expected %0d", len, exp_len));
    check(n_g1 == ton, $sformatf("event mode G1 width %0d expected %0d", n_g1, ton));
    check(last_g2 == exp_len - TD2, $sformatf("event mode G2 ends at %0d expected %0d", last_g2, exp_len - TD2));
    check(int'(t_cur) == ((e < 0) ? t0 : exp_len), "next period loads the measured T");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Disabled: no gate activity.
    repeat (50) begin
      @(negedge clk);
      check(!g1 && !g2 && !period_start, "gates off while disabled");
    end
    en = 1;
    measure(32768, 1667);   // 60 kHz, D = 0.5
    measure(19661, 500);    // 200 kHz, D = 0.3
    measure(45875, 5000);   // 20 kHz, D = 0.7
    measure(16384, 10);     // below the shortest period: clamped
    measure(0, 1000);       // D = 0: S1 never on
    measure(65535, 800);    // D ~ 1: no room for S2
    for (int i = 0; i < 8; i++)
      measure(int'($urandom_range(60000, 2000)), int'($urandom_range(5000, 100)));
    // Event-driven periods.
    evt_mode = 1;
    measure_evt(32768, 2000, 1500);
    measure_evt(32768, 2000, 1500);
    measure_evt(32768, 1800, 1200);
    measure_evt(19661, 1000, 600);
    measure_evt(32768, 2000, -1);     // no event: time-out
    measure_evt(32768, 2000, 1900);
    evt_mode = 0;
    measure(32768, 1667);
    en = 0;
    repeat (2) @(negedge clk);
    repeat (20) begin
      @(negedge clk);
      check(!g1 && !g2, "gates off after disable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
