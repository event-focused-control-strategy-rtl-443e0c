// Self-checking testbench for il_avg_meas.
// Generates triangular inductor-current waveforms (rising then falling ramp,
// equal halves) over synthetic periods, strobes T/4 and 3T/4, and checks
// that the average equals the mean of the two samples and, for the
// symmetric triangle, the true average. Includes negative currents (QSW
// valley) and a check that avg_valid follows sample_q3 by one clock.
module il_avg_meas_tb;
  import boost_ctrl_pkg::*;

  logic clk = 0, rst_n = 0, sample_q1 = 0, sample_q3 = 0;
  current_t il = '0;
  current_t il_avg;
  logic avg_valid;
  int checks = 0, failures = 0;

  il_avg_meas dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One period of T cycles: valley iv, peak ip, peak at T/2.
  task automatic period_run(input int t, input int iv, input int ip);
    int a, b, v, exp_avg;
    a = 0; b = 0;
    for (int c = 0; c < t; c++) begin
      @(negedge clk);
      if (c < t / 2) v = iv + ((ip - iv) * c) / (t / 2);
      else           v = ip - ((ip - iv) * (c - t / 2)) / (t - t / 2);
      il = current_t'(v);
      sample_q1 = (c == t / 4);
      sample_q3 = (c == (3 * t) / 4);
      if (sample_q1) a = v;
      if (sample_q3) b = v;
      @(posedge clk); #1;
      if (c == (3 * t) / 4) begin
        exp_avg = (a + b) >>> 1;
        check(avg_valid, "avg_valid one clock after 3T/4");
        check(int'(il_avg) == exp_avg, $sformatf("avg %0d expected %0d", il_avg, exp_avg));
        check((int'(il_avg) - (iv + ip) / 2) <= 2 && ((iv + ip) / 2 - int'(il_avg)) <= 2,
              $sformatf("avg %0d far from triangle mean %0d", il_avg, (iv + ip) / 2));
      end else begin
        check(!avg_valid, "no avg_valid outside 3T/4");
      end
    end
    sample_q1 = 0; sample_q3 = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    period_run(1667, 1100, 1650);   // CCM: 11 A .. 16.5 A
    period_run(2222, -170, 2000);   // QSW: valley below zero
    period_run(500, -300, 300);     // average around zero
    period_run(1000, -3000, -1000); // all negative
    for (int k = 0; k < 10; k++) begin
      int lo;
      lo = int'($urandom_range(2000, 0)) - 1000;
      period_run(int'($urandom_range(3000, 400)), lo, lo + int'($urandom_range(3000, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
