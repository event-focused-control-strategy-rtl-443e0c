// Open-loop / closed-loop selector in front of the DPWM.
//
// In closed loop (open_loop = 0) it passes the value computed by the control
// (the regulator's duty cycle or the frequency selector's period); in open
// loop (open_loop = 1) it passes the value set by the user, so that the
// converter can be run at any chosen operating point for test. Two instances
// are used, one for D and one for T. Purely combinational; the DPWM samples
// the result only at the start of each period, so switching between loop
// modes takes effect at a period boundary.
//
// The selection follows the control strategy; the select polarity and the
// width parameter are this design's choice.
module ol_cl_mux #(
  parameter int unsigned W = 16
) (
  input  logic         open_loop,
  input  logic [W-1:0] closed_val,
  input  logic [W-1:0] user_val,
  output logic [W-1:0] out
);

  always_comb out = open_loop ? user_val : closed_val;

endmodule
