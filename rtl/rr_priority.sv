// rr_priority: priority state and pointer update of a round-robin arbiter.
//
// The state is the priority vector P, one bit per input, in thermometer
// form: P[i] = 1 marks the high-priority segment, the positions from the
// current pointer upwards. With pointer k the search order is
// k, k+1, ..., N-1, 0, ..., k-1.
//
// After a grant at position g the next search must start at g+1, so the new
// vector has ones exactly above g. The merged arbiter-multiplexer already
// produces a thermometer grant vector with ones at positions <= g, so the
// update is only its bitwise inverse: no index decoding is needed. After a
// grant at N-1 the new vector is all zeros; every request is then in the
// low-priority segment and the search starts at 0, as round-robin requires.
//
// The register loads only when en (the arbiter's AG output) is high, as in
// the generic arbiter's priority-state register. Reset (active low,
// synchronous) sets P to all ones, pointer at position 0; the reset value is
// this design's choice.
//
// Timing: the new P is visible the cycle after the grant.
module rr_priority #(
  parameter int unsigned N = 8  // number of inputs
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         en,         // AG: a grant was made this cycle
  input  logic [N-1:0] gnt_therm,  // thermometer grant, ones at positions <= g
  output logic [N-1:0] prio        // priority vector P (1 = high-priority segment)
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prio <= '1;
    end else if (en) begin
      prio <= ~gnt_therm;
    end
  end

endmodule
