// Conduction-mode selector: CCM hard switching or quasi-square-wave ZVS.
//
// Each new average inductor current (avg_valid) is compared with the
// boundary current I_L,1 and a hysteresis band h below it:
//   il_avg >  IL1        -> CCM-HS  (high load: low ripple, fixed frequency)
//   il_avg <  IL1 - HYST -> QSW-ZVS (light and medium load: soft switching)
//   otherwise            -> keep the present mode
// The band keeps the mode from toggling when the load sits at the boundary.
// The selector starts in CCM-HS after reset.
//
// Timing: mode and mode_changed are registered and change one clock after
// avg_valid; the frequency selector and DPWM apply a new mode from the next
// period boundary.
//
// The two comparisons and the start in CCM-HS follow the control strategy;
// IL1 = 13 A is the boundary used in its measurements. The width of the band
// (1 A) is this design's choice.
module conduction_mode
  import boost_ctrl_pkg::*;
#(
  parameter current_t IL1  = 16'sd1300,  // I_L,1 = 13 A at 10 mA/LSB
  parameter current_t HYST = 16'sd100    // h = 1 A
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     avg_valid,
  input  current_t il_avg,
  output cmode_e   mode,
  output logic     mode_changed
);

  logic signed [CUR_W:0] low_th;
  cmode_e mode_nxt;

  always_comb begin
    low_th   = (CUR_W+1)'(IL1) - (CUR_W+1)'(HYST);
    mode_nxt = mode;
    if (avg_valid) begin
      if (il_avg > IL1)                         mode_nxt = MODE_CCM_HS;
      else if ((CUR_W+1)'(il_avg) < low_th)     mode_nxt = MODE_QSW_ZVS;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode         <= MODE_CCM_HS;
      mode_changed <= 1'b0;
    end else begin
      mode         <= mode_nxt;
      mode_changed <= (mode_nxt != mode);
    end
  end

endmodule
