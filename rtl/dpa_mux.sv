// dpa_mux: dynamic-priority arbiter merged with one output multiplexer.
//
// This is the generic arbiter of the switch: it resolves the requests of N
// inputs for one resource, forwards the winner's data word and updates a
// per-input priority state so that the resource is shared fairly.
//
//   req, prio --> dpa_reduce --reduced--> fpa_mux_tree --> data_out, ag, grants
//                     ^                                        |
//                     +---- priority state <-- update <--------+ (enable = ag)
//
// Arbitration is two steps. dpa_reduce keeps only the requests with the
// largest (request, priority) symbol. fpa_mux_tree grants the rightmost of
// them and steers its data word to the output in the same tree. The priority
// state register loads only on a grant (ag). The policy only changes the
// state and its update rule, chosen by POLICY:
//   POLICY_RR    1 bit per input, rr_priority (pointer after the grant,
//                taken from the thermometer grant vector);
//   POLICY_FCFS  N-bit thermometer weight per input, fcfs_priority (granted
//                input to 0, waiting requesters +1).
//
// The structure (reduce, merged tree, AG-enabled state register, update
// logic beside the multiplexing) is the published generic arbiter. Exposing
// the priority state as a port and fixing the policy at elaboration are this
// design's choices.
//
// Timing: req/data_in to data_out/ag/gnt_* is combinational. The priority
// state changes at the clock edge that ends a cycle with ag = 1 and affects
// the next cycle's arbitration. Reset is synchronous, active low.
module dpa_mux
  import dpa_pkg::*;
#(
  parameter int unsigned N      = 8,                  // number of inputs
  parameter int unsigned DW     = 32,                 // data word width
  parameter policy_e     POLICY = POLICY_RR,          // priority selection policy
  parameter int unsigned IW     = idx_w(N),           // grant index width
  parameter int unsigned PW     = prio_w(POLICY, N)   // priority state width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,         // request per input
  input  logic [N-1:0][DW-1:0] data_in,     // data word per input
  output logic [DW-1:0]        data_out,    // data word of the granted input
  output logic                 ag,          // a request was granted
  output logic [IW-1:0]        gnt_idx,     // binary index of the grant
  output logic [N-1:0]         gnt_onehot,  // onehot grant
  output logic [N-1:0]         gnt_therm,   // thermometer grant (ones <= index)
  output logic [N-1:0][PW-1:0] prio         // current priority state
);

  logic [N-1:0] reduced;
  logic [PW:0]  max_sym;

  dpa_reduce #(.N(N), .PW(PW)) u_reduce (
    .req     (req),
    .prio    (prio),
    .max_sym (max_sym),
    .reduced (reduced)
  );

  fpa_mux_tree #(.N(N), .DW(DW), .IW(IW)) u_tree (
    .req        (reduced),
    .data_in    (data_in),
    .data_out   (data_out),
    .ag         (ag),
    .gnt_idx    (gnt_idx),
    .gnt_onehot (gnt_onehot),
    .gnt_therm  (gnt_therm)
  );

  if (POLICY == POLICY_RR) begin : g_rr
    logic [N-1:0] p;
    rr_priority #(.N(N)) u_prio (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (ag),
      .gnt_therm (gnt_therm),
      .prio      (p)
    );
    assign prio = p;
  end else begin : g_fcfs
    fcfs_priority #(.N(N), .PW(PW)) u_prio (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (ag),
      .req        (req),
      .gnt_onehot (gnt_onehot),
      .prio       (prio)
    );
  end

  // A grant always goes to a requesting input, and only one.
  a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n)
    ag |-> ($onehot(gnt_onehot) && ((gnt_onehot & req) == gnt_onehot)));
  a_no_lost_request: assert property (@(posedge clk) disable iff (!rst_n)
    (req != '0) |-> ag);

endmodule
