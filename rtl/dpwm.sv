// Digital PWM for the synchronous boost converter.
//
// Produces the gate commands G1 (low-side switch S1) and G2 (high-side,
// synchronous switch S2) one switching period at a time. A period counter
// counts up from 0. At the first cycle of each period the requested period
// T and duty cycle D are loaded, and the S1 on-time is computed once as
// ton = floor(D * T / 2^16). Inside the period, with E the period end:
//   S1 on     for cnt in [0, ton)
//   dead-time td1 (TD1 cycles)
//   S2 on     for cnt in [ton + TD1, E - TD2)
//   dead-time td2 (TD2 cycles), then S1 turns on as the next period starts.
// Fixed frequency (evt_mode = 0): E is the T loaded at the period start.
// Event-driven (evt_mode = 1, QSW-ZVS): the S2 conduction ends on the current
// event. E is T_EVT_MAX until the frequency selector reports the event
// (evt_valid); from then on E follows the live period input, which then holds
// the event time plus t_QSW. So S2 turns off TD2 cycles before that point
// and S1 turns on at it. The loaded T (the period measured in the previous
// cycle) still scales the S1 on-time.
//
// The block also flags the first cycle of each period (period_start) and the
// cycles at T/4 and 3T/4 of the loaded T (sample_q1, sample_q3), at which
// the inductor current is sampled for its average.
//
// Timing: g1 and g2 are registered, so they follow the counter decode by one
// clock; period_start and the sample strobes are decodes of the registered
// counter. While en is low the gates are off and the counter is held at 0
// with T and D loaded every cycle; the first period starts on the cycle after
// en goes high, so it never runs on the reset values.
//
// From the control strategy: D and T inputs, fixed dead-times, S2 conduction
// ended by the zero-current event, T/4 and 3T/4 sampling. This design's
// choices: the counter structure, D as a Q0.16 fraction of T, the dead-time
// defaults (200 ns each), the shortest period and the event time-out.
module dpwm
  import boost_ctrl_pkg::*;
#(
  parameter int unsigned TD1   = 20,   // dead-time S1 off -> S2 on, cycles
  parameter int unsigned TD2   = 20,   // dead-time S2 off -> S1 on, cycles
  parameter int unsigned T_LOW = TD1 + TD2 + 8, // shortest accepted period
  parameter int unsigned T_EVT_MAX = 5000      // event-mode time-out (20 kHz)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  duty_t   duty,          // D, Q0.16
  input  period_t period,        // T, clock cycles
  input  logic    evt_mode,      // 1: period ended by the current event
  input  logic    evt_valid,     // event seen; period input holds the end
  output logic    g1,            // S1 gate command
  output logic    g2,            // S2 gate command
  output logic    period_start,  // first cycle of a period
  output logic    sample_q1,     // cycle at T/4
  output logic    sample_q3,     // cycle at 3T/4
  output logic    off_phase,     // S1 on-time of this period is over
  output period_t cnt,           // cycles since the period start
  output period_t t_cur,         // period loaded at the period start
  output period_t t_end,         // end of the running period
  output period_t ton_cur        // S1 on-time in force
);

  period_t t_load;
  period_t ton_load;
  logic [PER_W+DUTY_W-1:0] prod;
  logic last;
  logic armed;  // a period has been loaded since reset
  logic g1_dec, g2_dec;
  logic [PER_W+1:0] t3;

  always_comb begin
    t_load   = (period < period_t'(T_LOW)) ? period_t'(T_LOW) : period;
    prod     = (PER_W+DUTY_W)'(duty) * (PER_W+DUTY_W)'(t_load);
    ton_load = period_t'(prod >> DUTY_W);
  end

  always_comb begin
    if (!evt_mode)      t_end = t_cur;
    else if (evt_valid) t_end = t_load;
    else                t_end = period_t'(T_EVT_MAX);
  end

  assign last = (cnt >= t_end - period_t'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      t_cur   <= period_t'(T_LOW);
      ton_cur <= '0;
      armed   <= 1'b0;
    end else if (!en || !armed || last) begin
      armed   <= en;
      cnt     <= '0;
      t_cur   <= t_load;
      ton_cur <= ton_load;
    end else begin
      cnt     <= cnt + period_t'(1);
    end
  end

  always_comb begin
    g1_dec = (cnt < ton_cur);
    g2_dec = ({1'b0, cnt} >= {1'b0, ton_cur} + (PER_W+1)'(TD1)) &&
             ({1'b0, cnt} + (PER_W+1)'(TD2) < {1'b0, t_end});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= 1'b0;
      g2 <= 1'b0;
    end else begin
      g1 <= en && armed && g1_dec;
      g2 <= en && armed && g2_dec;
      // S1 and S2 must never be commanded on together.
      a_no_shoot_through: assert (!(g1 && g2));
    end
  end

  assign t3           = ({2'b00, t_cur} + {1'b0, t_cur, 1'b0}) >> 2;
  assign period_start = en && armed && (cnt == '0);
  assign sample_q1    = en && armed && (cnt == (t_cur >> 2));
  assign sample_q3    = en && armed && ({2'b00, cnt} == t3);
  assign off_phase    = (cnt >= ton_cur);

endmodule
