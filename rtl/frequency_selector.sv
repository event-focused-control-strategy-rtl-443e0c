// Switching-period selector for the two conduction modes.
//
// CCM-HS: the period is the fixed T_CCM (60 kHz).
// QSW-ZVS: the period follows the inductor current. The first zero-current
// event seen after S1 has turned off (off_phase) is time-stamped with the
// DPWM counter, i.e. the time since the start of the switching period. The
// period is that time plus T_QSW: the interval left after detection for the
// current to go negative and discharge the switch capacitance (resonance),
// including the dead-time td2. The result is limited to [T_MIN, T_MAX], the
// 200 kHz to 20 kHz range of the variable-frequency modes. It is handed to
// the DPWM at once (evt_valid), which ends the running period there, and it
// stays as the period T of the following cycle, from which the DPWM scales
// the next S1 on-time. A QSW period that reaches the DPWM time-out without an
// event keeps the last measured value and is flagged by no_event.
//
// Timing: t_selec and evt_valid are registered; an event at counter value c
// sets t_selec = c + T_QSW (limited) and evt_valid one clock later.
// evt_valid clears at the next period start. evt_taken and no_event are
// one-cycle pulses for monitoring.
//
// Time-stamping the event and deriving the period from it follows the
// control strategy, as do the 60 kHz CCM frequency and the 20-200 kHz range.
// The value of T_QSW, the event window and the no-event handling are this
// design's choice.
module frequency_selector
  import boost_ctrl_pkg::*;
#(
  parameter period_t T_CCM = 16'd1667,  // 60 kHz at 100 MHz
  parameter period_t T_QSW = 16'd50,    // detection to next S1 turn-on, cycles
  parameter period_t T_MIN = 16'd500,   // 200 kHz
  parameter period_t T_MAX = 16'd5000   // 20 kHz
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cmode_e  mode,
  input  logic    period_start,  // from the DPWM
  input  logic    off_phase,     // S1 on-time is over
  input  period_t cnt,           // cycles since the period start
  input  logic    zcd_evt,       // synchronized current event
  output period_t t_selec,
  output period_t t_evt,         // time stamp of the last accepted event
  output logic    evt_valid,     // an event was taken in this period
  output logic    evt_taken,
  output logic    no_event
);

  logic captured;

  assign evt_valid = captured;
  logic take;
  logic [PER_W:0] t_sum;
  period_t t_new;

  always_comb begin
    take  = (mode == MODE_QSW_ZVS) && zcd_evt && off_phase && !captured &&
            !period_start;
    t_sum = {1'b0, cnt} + {1'b0, T_QSW};
    if (t_sum < {1'b0, T_MIN})      t_new = T_MIN;
    else if (t_sum > {1'b0, T_MAX}) t_new = T_MAX;
    else                            t_new = period_t'(t_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      captured  <= 1'b0;
      t_selec   <= T_CCM;
      t_evt     <= '0;
      evt_taken <= 1'b0;
      no_event  <= 1'b0;
    end else begin
      evt_taken <= take;
      no_event  <= 1'b0;
      if (period_start) captured <= 1'b0;
      else if (take)    captured <= 1'b1;
      if (take) t_evt <= cnt;

      if (mode == MODE_CCM_HS) begin
        t_selec <= T_CCM;
      end else if (take) begin
        t_selec <= t_new;
      end else if (period_start && !captured) begin
        no_event <= 1'b1;
      end
    end
  end

endmodule
