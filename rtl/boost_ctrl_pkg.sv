// Shared types and constants of the boost-converter control.
//
// The controller runs from one clock (100 MHz by default, the oscillator of
// the FPGA board the converter was prototyped with). All times are counted
// in clock cycles. Fixed-point formats used across the blocks:
//   period_t  : unsigned switching period / time in clock cycles
//   duty_t    : unsigned duty cycle, Q0.16 (65536 would be 1.0)
//   current_t : signed inductor current, 1 LSB = 10 mA
//   volt_t    : unsigned output voltage, 1 LSB = 0.1 V
// The conduction modes (CCM hard switching and quasi-square-wave ZVS) come
// from the control strategy; the number formats are this design's own choice.
package boost_ctrl_pkg;

  localparam int unsigned CLK_HZ = 100_000_000;

  localparam int unsigned PER_W  = 16;
  localparam int unsigned DUTY_W = 16;
  localparam int unsigned CUR_W  = 16;
  localparam int unsigned VOLT_W = 16;

  typedef logic [PER_W-1:0]         period_t;
  typedef logic [DUTY_W-1:0]        duty_t;
  typedef logic signed [CUR_W-1:0]  current_t;
  typedef logic [VOLT_W-1:0]        volt_t;

  // Conduction mode chosen by the mode selector.
  typedef enum logic {
    MODE_CCM_HS  = 1'b0,  // fixed frequency, hard switching, low ripple
    MODE_QSW_ZVS = 1'b1   // variable frequency, event driven, soft switching
  } cmode_e;

  // Period in clock cycles of a switching frequency given in Hz (rounded).
  function automatic int unsigned period_cycles(input int unsigned f_hz);
    return (CLK_HZ + f_hz / 2) / f_hz;
  endfunction

endpackage
