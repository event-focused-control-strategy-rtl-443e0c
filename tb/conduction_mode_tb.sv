// Self-checking testbench for conduction_mode.
// Feeds a sequence of average currents and checks the mode after each one
// against the hysteresis rule: above I_L,1 -> CCM-HS, below I_L,1 - h ->
// QSW-ZVS, inside the band -> unchanged. Covers the start in CCM-HS, the
// band edges exactly, a load falling and rising through the band (as in a
// load step from 5.5 kW to 3.5 kW and back), samples without avg_valid, and
// a random walk. Also checks the mode_changed pulse.
module conduction_mode_tb;
  import boost_ctrl_pkg::*;

  localparam current_t IL1 = 16'sd1300, HYST = 16'sd100;

  logic clk = 0, rst_n = 0, avg_valid = 0;
  current_t il_avg = '0;
  cmode_e mode;
  logic mode_changed;
  cmode_e exp_mode;
  int checks = 0, failures = 0;
  int n_to_qsw = 0, n_to_ccm = 0;

  conduction_mode #(.IL1(IL1), .HYST(HYST)) dut (.*);

  always #5 clk = ~clk;

  task automatic apply(input int i_code, input bit valid = 1'b1);
    cmode_e prev;
    prev = exp_mode;
    @(negedge clk);
    il_avg = current_t'(i_code);
    avg_valid = valid;
    if (valid) begin
      if (i_code > int'(IL1))             exp_mode = MODE_CCM_HS;
      else if (i_code < int'(IL1 - HYST)) exp_mode = MODE_QSW_ZVS;
    end
    @(negedge clk);
    avg_valid = 1'b0;
    checks++;
    if (mode != exp_mode || mode_changed != (prev != exp_mode)) begin
      failures++;
      $display("FAIL i=%0d valid=%0b mode=%0d exp=%0d changed=%0b", i_code, valid, mode, exp_mode, mode_changed);
    end
    if (prev != exp_mode) begin
      if (exp_mode == MODE_QSW_ZVS) n_to_qsw++; else n_to_ccm++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_mode = MODE_CCM_HS;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (mode != MODE_CCM_HS) begin failures++; $display("FAIL reset mode"); end
    apply(1375);          // 5.5 kW at 400 V: CCM-HS
    apply(1300);          // exactly I_L,1: stays
    apply(1250);          // inside band: stays CCM
    apply(1200);          // exactly I_L,1 - h: stays
    apply(1199);          // below band: QSW
    apply(875);           // 3.5 kW: QSW
    apply(1250);          // inside band: stays QSW
    apply(1300);          // boundary: stays QSW
    apply(1301);          // above: CCM
    apply(100, 1'b0);     // no valid strobe: no change
    apply(-50);           // negative average: QSW
    apply(2000, 1'b0);    // no valid strobe
    apply(3300);          // full load: CCM
    for (int k = 0; k < 300; k++)
      apply(int'($urandom_range(1500, 1000)), 1'($urandom_range(3, 0) != 0));
    checks++;
    if (n_to_qsw == 0 || n_to_ccm == 0) begin failures++; $display("FAIL no mode switch seen"); end
    $display("mode switches: to QSW %0d, to CCM %0d", n_to_qsw, n_to_ccm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
