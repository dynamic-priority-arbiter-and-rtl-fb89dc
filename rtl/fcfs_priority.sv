// fcfs_priority: priority state and weight update of a first-come-first-served
// arbiter.
//
// Every input i has a weight, kept in thermometer code (PW bits, value = the
// number of ones, 0..PW) so that the reduce step can take the maximum of all
// weights with plain OR gates. After each grant:
//   - the granted input falls to the lowest weight, 0;
//   - every other input that is requesting (waiting, not yet granted) gains
//     one: its thermometer code shifts up by one with a 1 shifted in, and it
//     saturates at PW;
//   - inputs that do not request keep their weight.
// The weight therefore tracks how long a request has been waiting, and the
// arbiter serves the oldest waiting request first. PW defaults to N, the
// number of inputs, which is enough for the weight range.
//
// The register loads only when en (the arbiter's AG output) is high. Reset
// (active low, synchronous) clears every weight; the reset value is this
// design's choice.
//
// Timing: new weights are visible the cycle after the grant.
module fcfs_priority #(
  parameter int unsigned N  = 8,  // number of inputs
  parameter int unsigned PW = N   // thermometer width of a weight
) (
  input  logic                 clk,
  input  logic                 rst_n,       // synchronous, active low
  input  logic                 en,          // AG: a grant was made this cycle
  input  logic [N-1:0]         req,         // requests of this cycle
  input  logic [N-1:0]         gnt_onehot,  // onehot grant of this cycle
  output logic [N-1:0][PW-1:0] prio         // thermometer weight per input
);

  logic [N-1:0][PW-1:0] prio_nxt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (gnt_onehot[i]) begin
        prio_nxt[i] = '0;
      end else if (req[i]) begin
        prio_nxt[i] = (prio[i] << 1) | PW'(1);
      end else begin
        prio_nxt[i] = prio[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prio <= '0;
    end else if (en) begin
      prio <= prio_nxt;
    end
  end

endmodule
