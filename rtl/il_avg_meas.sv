// Average inductor current from two samples per switching period.
//
// The inductor current of a boost converter is a triangle; its samples at a
// quarter and at three quarters of the period lie on the two ramps, and
// their mean is the period's average current (exact when the on- and
// off-ramps are equally long, i.e. D = 0.5 as at 400 V to 800 V). The block
// latches the current word at sample_q1 and, at sample_q3, outputs
// il_avg = (sample1 + sample2) / 2 (arithmetic shift, rounds toward minus
// infinity) with a one-cycle avg_valid pulse.
//
// Timing: il_avg and avg_valid are registered, one clock after sample_q3.
// The sampling instants follow the control strategy; the current word is
// assumed to come from a free-running converter and to be valid whenever a
// strobe occurs.
module il_avg_meas
  import boost_ctrl_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  current_t il,         // present inductor-current word
  input  logic     sample_q1,  // T/4 strobe
  input  logic     sample_q3,  // 3T/4 strobe
  output current_t il_avg,
  output logic     avg_valid
);

  current_t s1;
  logic signed [CUR_W:0] sum;

  assign sum = (CUR_W+1)'(s1) + (CUR_W+1)'(il);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      il_avg    <= '0;
      avg_valid <= 1'b0;
    end else begin
      avg_valid <= sample_q3;
      if (sample_q1) s1 <= il;
      if (sample_q3) il_avg <= current_t'(sum >>> 1);
    end
  end

endmodule
