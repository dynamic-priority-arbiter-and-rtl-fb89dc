// dpa_reduce: the "reduce" step of the two-step dynamic-priority arbiter.
//
// Each input i has a request req[i] and a thermometer-coded priority
// prio[i] of PW bits. The pair forms an arithmetic symbol whose thermometer
// code is {prio[i] & req[i], req[i]}: the request is the least significant
// thermometer bit, and an inactive input maps to symbol 0 whatever its
// priority. For round-robin (PW = 1) this is exactly the 2-bit code of the
// symbols 0/2/3 (2*R + P, with 1 folded to 0); for weight-based policies it
// extends the same code to weights 0..PW.
//
// Because all symbols are thermometer codes, the largest symbol is the bitwise
// OR of all of them: one N-input OR gate per thermometer bit. Each position
// then compares its own symbol with that maximum (an equality comparator
// per position), giving a reduced request vector that holds only the
// requests of maximum priority. A fixed-priority arbiter on that vector then
// finishes the arbitration.
//
// One detail is this design's own: the equality result is ANDed with the
// request, so that an idle cycle (all symbols 0, maximum 0) yields an empty
// reduced vector rather than all ones.
//
// Purely combinational. prio must hold valid thermometer codes (ones packed
// at the low end).
module dpa_reduce #(
  parameter int unsigned N  = 8,  // number of inputs
  parameter int unsigned PW = 1   // thermometer width of the priority state
) (
  input  logic [N-1:0]         req,      // request per input
  input  logic [N-1:0][PW-1:0] prio,     // thermometer priority per input
  output logic [PW:0]          max_sym,  // thermometer code of the largest symbol
  output logic [N-1:0]         reduced   // requests that carry the largest symbol
);

  logic [N-1:0][PW:0] sym;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      sym[i] = {prio[i] & {PW{req[i]}}, req[i]};
    end
    max_sym = '0;
    for (int i = 0; i < N; i++) begin
      max_sym = max_sym | sym[i];
    end
    for (int i = 0; i < N; i++) begin
      reduced[i] = req[i] & (sym[i] == max_sym);
    end
  end

endmodule
