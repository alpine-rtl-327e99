// new_event_detector: turns changes on the FLAGS pins into events.
//
// The f pins come from sensors in the environment and are not tied to the
// processor clock, so they pass through a SYNC_STAGES-flop synchronizer
// first. The synchronized vector is compared with the last vector that was
// reported. When they differ, `event_o` is high for one cycle with the new
// vector on `flags_o`, and the vector becomes the new reference. A change that
// reverts before it reaches the end of the synchronizer produces no event.
//
// The document says that every new event or change on FLAGS is registered
// and queued, and that the New Event Detector signals a new event. The
// synchronizer, the reference register and the reset value of 0 are this
// design's own choices. With reset value 0, flags that are not all 0 at reset
// count as one first event.
//
// Timing: an edge on f_i reaches event_o SYNC_STAGES+1 clock edges later.
module new_event_detector
  import alpine_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  flags_t f_i,       // asynchronous flag pins
  output logic   event_o,   // one-cycle pulse: a new flag vector
  output flags_t flags_o    // the new flag vector (valid with event_o)
);

  flags_t sync_q [SYNC_STAGES];
  flags_t last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) sync_q[i] <= '0;
      last_q  <= '0;
      event_o <= 1'b0;
      flags_o <= '0;
    end else begin
      sync_q[0] <= f_i;
      for (int i = 1; i < SYNC_STAGES; i++) sync_q[i] <= sync_q[i-1];
      event_o <= (sync_q[SYNC_STAGES-1] != last_q);
      flags_o <= sync_q[SYNC_STAGES-1];
      last_q  <= sync_q[SYNC_STAGES-1];
    end
  end

endmodule
