// dpa_pkg: types and helpers shared by the dynamic-priority arbiter and
// multiplexer macros.
//
// The macros follow one architecture for every priority selection policy:
// requests plus a per-input priority state are reduced to a vector of
// equal-priority requests, which a merged fixed-priority arbiter and
// multiplexer tree resolves. Policies differ only in how the priority state is
// updated after each grant. policy_e selects that update rule at elaboration
// time. The two policies are round-robin (one priority bit per input, a
// thermometer pointer) and first-come-first-served (a thermometer-coded weight
// per input that ages while the input waits).
package dpa_pkg;

  typedef enum logic [0:0] {
    POLICY_RR   = 1'b0,  // round-robin: 1-bit thermometer pointer per input
    POLICY_FCFS = 1'b1   // first-come-first-served: N-bit thermometer weight
  } policy_e;

  // Width of an index into N positions; at least one bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Thermometer width of the per-input priority state for a policy.
  // Round-robin needs one bit (the pointer vector P); FCFS weights count from
  // 0 to N, which takes N thermometer bits.
  function automatic int unsigned prio_w(input policy_e p, input int unsigned n);
    return (p == POLICY_RR) ? 1 : n;
  endfunction

endpackage
