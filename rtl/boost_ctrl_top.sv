// Event-driven, mode-switching control of a SiC synchronous boost converter.
//
// The converter (400 V to 800 V, 10 kW) is run in one of two conduction
// modes chosen from the load:
//   CCM-HS  at high load: fixed 60 kHz, low current ripple, hard switching;
//   QSW-ZVS at light and medium load: variable frequency, the inductor
//           current is allowed to go slightly negative each period so that
//           S1 turns on at zero voltage.
// The control chain, all in one clock domain:
//   il_avg_meas        averages the inductor current sampled at T/4, 3T/4
//   conduction_mode    picks the mode from that average with hysteresis
//   zcd_event_sync     synchronizes the zero-current comparator output
//   frequency_selector fixed period in CCM-HS; in QSW-ZVS the period
//                      ends at the current event plus T_QSW
//   voltage_regulator  PI loop on the output voltage, gives the duty cycle
//   ol_cl_mux (x2)     closed loop uses the computed D and T, open loop the
//                      user's D_user and T_user
//   dpwm               gate signals with dead-times, sampling strobes
// The output-voltage word is sampled by the regulator once per switching
// period (at its start); the current word is sampled by il_avg_meas at T/4
// and 3T/4. Both words are assumed to come from free-running converters
// outside this block, and the comparator output arrives asynchronously.
//
// Interface: en starts switching; open_loop selects the user's D and T.
// g1/g2 are the gate commands for S1/S2. The remaining outputs expose the
// control state for monitoring.
//
// The block structure and data flow follow the control strategy's block
// diagram; the clock rate, number formats and the parameter defaults not
// stated there (dead-times, T_QSW, hysteresis, PI gains) are this design's
// choice.
module boost_ctrl_top
  import boost_ctrl_pkg::*;
#(
  parameter int unsigned TD1   = 20,         // dead-time td1, cycles
  parameter int unsigned TD2   = 20,         // dead-time td2, cycles
  parameter period_t     T_CCM = 16'd1667,   // 60 kHz
  parameter period_t     T_QSW = 16'd50,     // event to next S1 turn-on
  parameter period_t     T_MIN = 16'd500,    // 200 kHz
  parameter period_t     T_MAX = 16'd5000,   // 20 kHz
  parameter current_t    IL1   = 16'sd1300,  // 13 A
  parameter current_t    HYST  = 16'sd100,   // 1 A
  parameter int          KP    = 166,
  parameter int          KI    = 450
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     open_loop,   // 1: use d_user / t_user (OL), 0: closed loop
  input  duty_t    d_user,
  input  period_t  t_user,
  input  volt_t    vref,        // output-voltage reference
  input  volt_t    vo,          // output-voltage sensor word
  input  current_t il,          // inductor-current sensor word
  input  logic     zcd_cmp,     // zero-current comparator output, async
  output logic     g1,
  output logic     g2,
  output cmode_e   mode,
  output duty_t    d_reg,
  output period_t  t_selec,
  output period_t  t_cur,       // period loaded at the period start
  output period_t  t_end,       // end of the running period
  output period_t  ton_cur,     // S1 on-time in force in the DPWM
  output period_t  t_evt,       // time stamp of the last accepted event
  output current_t il_avg,
  output logic     period_start,
  output logic     avg_valid,
  output logic     zcd_evt,     // synchronized current event
  output logic     evt_taken,   // event used to end the period
  output logic     no_event,    // QSW period ended without an event
  output logic     mode_changed
);

  duty_t   d_mux;
  period_t t_mux;
  logic    sample_q1, sample_q3, off_phase;
  period_t cnt;
  logic    evt_mode, evt_valid;

  // Event-driven periods only in QSW-ZVS under closed-loop control.
  assign evt_mode = (mode == MODE_QSW_ZVS) && !open_loop;

  voltage_regulator #(
    .KP (KP),
    .KI (KI)
  ) u_vreg (
    .clk        (clk),
    .rst_n      (rst_n),
    .vo_valid   (period_start),
    .vo         (vo),
    .vref       (vref),
    .duty       (d_reg),
    .duty_valid ()
  );

  il_avg_meas u_iavg (
    .clk       (clk),
    .rst_n     (rst_n),
    .il        (il),
    .sample_q1 (sample_q1),
    .sample_q3 (sample_q3),
    .il_avg    (il_avg),
    .avg_valid (avg_valid)
  );

  conduction_mode #(
    .IL1  (IL1),
    .HYST (HYST)
  ) u_mode (
    .clk          (clk),
    .rst_n        (rst_n),
    .avg_valid    (avg_valid),
    .il_avg       (il_avg),
    .mode         (mode),
    .mode_changed (mode_changed)
  );

  zcd_event_sync u_zcd (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmp_async (zcd_cmp),
    .cmp_sync  (),
    .evt       (zcd_evt)
  );

  frequency_selector #(
    .T_CCM (T_CCM),
    .T_QSW (T_QSW),
    .T_MIN (T_MIN),
    .T_MAX (T_MAX)
  ) u_fsel (
    .clk          (clk),
    .rst_n        (rst_n),
    .mode         (mode),
    .period_start (period_start),
    .off_phase    (off_phase),
    .cnt          (cnt),
    .zcd_evt      (zcd_evt),
    .t_selec      (t_selec),
    .t_evt        (t_evt),
    .evt_valid    (evt_valid),
    .evt_taken    (evt_taken),
    .no_event     (no_event)
  );

  ol_cl_mux #(.W(DUTY_W)) u_mux_d (
    .open_loop  (open_loop),
    .closed_val (d_reg),
    .user_val   (d_user),
    .out        (d_mux)
  );

  ol_cl_mux #(.W(PER_W)) u_mux_t (
    .open_loop  (open_loop),
    .closed_val (t_selec),
    .user_val   (t_user),
    .out        (t_mux)
  );

  dpwm #(
    .TD1       (TD1),
    .TD2       (TD2),
    .T_EVT_MAX (int'(T_MAX))
  ) u_dpwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (en),
    .duty         (d_mux),
    .period       (t_mux),
    .evt_mode     (evt_mode),
    .evt_valid    (evt_valid),
    .g1           (g1),
    .g2           (g2),
    .period_start (period_start),
    .sample_q1    (sample_q1),
    .sample_q3    (sample_q3),
    .off_phase    (off_phase),
    .cnt          (cnt),
    .t_cur        (t_cur),
    .t_end        (t_end),
    .ton_cur      (ton_cur)
  );

endmodule
