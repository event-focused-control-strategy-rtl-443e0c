// Output-voltage PI regulator producing the duty cycle D_reg.
//
// On every sample strobe (vo_valid) it takes the error e = vref - vo (volt_t
// units, 0.1 V) and updates
//   integ <= clamp(integ + KI * e)                 (held with KI_SHIFT extra
//                                                   fraction bits)
//   duty  <= clamp((integ >> KI_SHIFT) + (KP * e >> KP_SHIFT))
// Both the integrator and the output are limited to [D_MIN, D_MAX], which
// also stops integrator wind-up. A boost converter's output rises with D, so
// a positive error raises the duty cycle. The integrator starts at D_INIT
// (0.5, the nominal duty for 400 V to 800 V).
//
// Timing: duty and duty_valid are registered and change one clock after
// vo_valid. In the controller the strobe comes once per switching period.
//
// A PI controller with a slow, smooth response (tens of ms) is what the
// control strategy calls for; its gains, number formats, limits and start
// value are this design's choice, set for a loop crossover well below the
// switching frequency.
module voltage_regulator
  import boost_ctrl_pkg::*;
#(
  parameter int    KP       = 166,    // proportional gain, duty LSB per volt LSB * 2^-KP_SHIFT
  parameter int    KP_SHIFT = 8,
  parameter int    KI       = 450,    // integral gain, duty LSB per volt LSB * 2^-KI_SHIFT
  parameter int    KI_SHIFT = 16,
  parameter duty_t D_MIN    = 16'd3277,   // 0.05
  parameter duty_t D_MAX    = 16'd58982,  // 0.90
  parameter duty_t D_INIT   = 16'd32768   // 0.50
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  vo_valid,
  input  volt_t vo,
  input  volt_t vref,
  output duty_t duty,
  output logic  duty_valid
);

  localparam int AW = 48;  // accumulator width

  typedef logic signed [AW-1:0] acc_t;

  localparam acc_t I_MIN = acc_t'(D_MIN) <<< KI_SHIFT;
  localparam acc_t I_MAX = acc_t'(D_MAX) <<< KI_SHIFT;

  acc_t integ, integ_sum, integ_nxt, p_term, d_sum;
  logic signed [VOLT_W:0] err;

  always_comb begin
    err       = $signed({1'b0, vref}) - $signed({1'b0, vo});
    integ_sum = integ + acc_t'(KI) * acc_t'(err);
    if (integ_sum < I_MIN)      integ_nxt = I_MIN;
    else if (integ_sum > I_MAX) integ_nxt = I_MAX;
    else                        integ_nxt = integ_sum;
    p_term    = (acc_t'(KP) * acc_t'(err)) >>> KP_SHIFT;
    d_sum     = (integ_nxt >>> KI_SHIFT) + p_term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ      <= acc_t'(D_INIT) <<< KI_SHIFT;
      duty       <= D_INIT;
      duty_valid <= 1'b0;
    end else begin
      duty_valid <= vo_valid;
      if (vo_valid) begin
        integ <= integ_nxt;
        if (d_sum < acc_t'(D_MIN))      duty <= D_MIN;
        else if (d_sum > acc_t'(D_MAX)) duty <= D_MAX;
        else                            duty <= duty_t'(d_sum);
      end
    end
  end

endmodule
