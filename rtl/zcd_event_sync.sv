// Input stage for the current event from the zero-current comparator.
//
// The analog comparator that watches the inductor current changes its output
// when the current crosses zero; that edge is the event that times the
// variable-frequency mode. The comparator output is asynchronous to the
// controller clock, so it passes a SYNC_STAGES flip-flop synchronizer, and
// the selected edge (falling by default: the current has gone below zero)
// is turned into a one-cycle pulse, evt.
//
// Timing: evt is high SYNC_STAGES + 1 clocks after the edge reaches
// cmp_async (plus up to one clock of sampling uncertainty). This delay is
// constant, so it only adds to the fixed detection delay t_det, which the
// event-driven control tolerates as long as it is shorter than t_QSW.
// The synchronizer depth and edge polarity parameter are this design's
// choice.
module zcd_event_sync #(
  parameter int unsigned SYNC_STAGES = 2,
  parameter bit          FALLING     = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmp_async,  // comparator output, asynchronous
  output logic cmp_sync,   // synchronized level
  output logic evt         // one-cycle pulse on the selected edge
);

  logic [SYNC_STAGES-1:0] sync;
  logic prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= {SYNC_STAGES{FALLING}};
      prev <= FALLING;
      evt  <= 1'b0;
    end else begin
      sync <= {sync[SYNC_STAGES-2:0], cmp_async};
      prev <= sync[SYNC_STAGES-1];
      evt  <= FALLING ? (prev && !sync[SYNC_STAGES-1])
                      : (!prev && sync[SYNC_STAGES-1]);
    end
  end

  assign cmp_sync = sync[SYNC_STAGES-1];

endmodule
