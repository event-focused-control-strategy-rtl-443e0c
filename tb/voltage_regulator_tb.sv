// Self-checking testbench for voltage_regulator.
// Part 1 compares the duty output after every sample with a reference PI
// computed here (same gains and limits, 64-bit integers), for random and
// saturating errors, and checks the start value and the one-clock latency.
// Part 2 closes the loop around an averaged boost model,
// Vo[n+1] = Vo[n] + (Vi / (1 - D) - Vo[n]) / 64, steps the input voltage from
// 400 V to 350 V (as in the regulator's step test) and checks that the output
// returns to the 800 V reference.
module voltage_regulator_tb;
  import boost_ctrl_pkg::*;

  localparam int KP = 166, KP_SHIFT = 8, KI = 450, KI_SHIFT = 16;
  localparam int D_MIN = 3277, D_MAX = 58982, D_INIT = 32768;

  logic clk = 0, rst_n = 0, vo_valid = 0;
  volt_t vo = '0, vref = 16'd8000;
  duty_t duty;
  logic duty_valid;
  int checks = 0, failures = 0;
  longint r_int;
  int n_sat_hi = 0, n_sat_lo = 0;

  voltage_regulator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint clampl(input longint v, input longint lo, input longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Applies one sample; returns the regulator's new duty.
  task automatic sample(input int v, output int d_out);
    longint e, p, d;
    @(negedge clk);
    vo = volt_t'(v);
    vo_valid = 1;
    e = longint'(vref) - longint'(v);
    r_int = clampl(r_int + KI * e, longint'(D_MIN) << KI_SHIFT, longint'(D_MAX) << KI_SHIFT);
    p = (KP * e) >>> KP_SHIFT;
    d = clampl((r_int >>> KI_SHIFT) + p, D_MIN, D_MAX);
    @(posedge clk); #1;
    vo_valid = 0;
    check(duty_valid, "duty_valid one clock after vo_valid");
    check(int'(duty) == int'(d), $sformatf("vo=%0d duty %0d expected %0d", v, duty, d));
    if (d == D_MAX) n_sat_hi++;
    if (d == D_MIN) n_sat_lo++;
    d_out = int'(duty);
    @(posedge clk); #1;
    check(!duty_valid, "duty_valid is a pulse");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    real vi, vof;
    r_int = longint'(D_INIT) << KI_SHIFT;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(int'(duty) == D_INIT, "start duty 0.5");
    // Part 1: reference comparison.
    for (int k = 0; k < 200; k++) sample(int'($urandom_range(8400, 7600)), d);
    for (int k = 0; k < 3000; k++) sample(0, d);       // large positive error
    check(int'(duty) == D_MAX, "saturates at D_MAX");
    sample(8100, d);                                    // no wind-up: drops at once
    check(d < D_MAX, "integrator clamped, output leaves D_MAX at once");
    for (int k = 0; k < 3000; k++) sample(40000, d);   // large negative error
    check(int'(duty) == D_MIN, "saturates at D_MIN");
    for (int k = 0; k < 100; k++) sample(int'($urandom_range(65535, 0)), d);
    check(n_sat_hi > 0 && n_sat_lo > 0, "both limits reached");

    // Part 2: closed loop with an averaged plant.
    rst_n = 0;
    r_int = longint'(D_INIT) << KI_SHIFT;
    @(negedge clk);
    rst_n = 1;
    vi = 400.0; vof = 780.0;
    for (int k = 0; k < 20000; k++) begin
      if (k == 8000) vi = 350.0;
      sample(int'(vof * 10.0), d);
      vof = vof + (vi / (1.0 - real'(d) / 65536.0) - vof) / 64.0;
    end
    check(vof > 795.0 && vof < 805.0, $sformatf("closed loop settles at 800 V, got %f", vof));
    check(d > 36000 && d < 37400, $sformatf("duty near 0.5625 for 350 V in, got %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
