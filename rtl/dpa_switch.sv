// dpa_switch: N x N switch built from merged dynamic-priority arbiters and
// multiplexers.
//
// Each input offers one data word at a time with the output it wants
// (in_dest). Each output has its own dpa_mux, which arbitrates among the
// inputs that want it and multiplexes the winner's word onto the output: the
// switch allocator and the crossbar are the same circuit. All outputs
// arbitrate independently in the same cycle; an input wants only one output
// at a time, so it can win at most one grant.
//
// Registers, as in the evaluated switch: input data and requests are
// registered, and so are the output data, so crossing the switch and driving
// the output link happen in different cycles.
//   - Input stage: one register per input holding valid, destination and
//     data. It accepts a new word (in_ready = 1) when it is empty or its
//     word is granted in the current cycle. in_ready depends only on
//     registers, never combinationally on in_valid.
//   - Arbitration and multiplexing: combinational, one cycle.
//   - Output stage: out_valid/out_data/out_src register each output's AG,
//     data word and grant index.
// A word accepted at clock edge t is therefore on the output after edge t+1
// if it wins at once (two-cycle latency); a losing word waits in its input
// register and in_ready stays low meanwhile.
//
// The handshake (valid/ready), the output stage having no back-pressure (the
// link always accepts a word), the synchronous active-low reset and the
// default data width are this design's own choices; the document gives the
// register placement and the per-output arbiter. POLICY selects round-robin
// or first-come-first-served arbitration for every output.
module dpa_switch
  import dpa_pkg::*;
#(
  parameter int unsigned N      = 8,          // inputs = outputs
  parameter int unsigned DW     = 32,         // data word width
  parameter policy_e     POLICY = POLICY_RR,  // arbitration policy
  parameter int unsigned IW     = idx_w(N)    // port index width
) (
  input  logic                 clk,
  input  logic                 rst_n,      // synchronous, active low
  // inputs
  input  logic [N-1:0]         in_valid,   // word offered on input i
  output logic [N-1:0]         in_ready,   // input i accepts a word this cycle
  input  logic [N-1:0][IW-1:0] in_dest,    // requested output, must be < N
  input  logic [N-1:0][DW-1:0] in_data,
  // outputs
  output logic [N-1:0]         out_valid,  // a word leaves output o
  output logic [N-1:0][DW-1:0] out_data,
  output logic [N-1:0][IW-1:0] out_src     // input the word came from
);

  localparam int unsigned PW = prio_w(POLICY, N);

  // Input registers
  logic [N-1:0]         hv;
  logic [N-1:0][IW-1:0] hdest;
  logic [N-1:0][DW-1:0] hdata;
  logic [N-1:0]         granted;

  // Per-output arbitration results
  logic [N-1:0][N-1:0]  req;      // req[o][i]: input i wants output o
  logic [N-1:0]         ag;
  logic [N-1:0][DW-1:0] mux_data;
  logic [N-1:0][IW-1:0] gidx;
  logic [N-1:0][N-1:0]  gonehot;

  assign in_ready = ~hv | granted;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hv <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (in_ready[i]) begin
          hv[i] <= in_valid[i];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (in_ready[i] && in_valid[i]) begin
        hdest[i] <= in_dest[i];
        hdata[i] <= in_data[i];
      end
    end
  end

  always_comb begin
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        req[o][i] = hv[i] && (hdest[i] == IW'(o));
      end
    end
    granted = '0;
    for (int o = 0; o < N; o++) begin
      granted = granted | (gonehot[o] & {N{ag[o]}});
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    logic [N-1:0]         gtherm;
    logic [N-1:0][PW-1:0] prio;
    dpa_mux #(.N(N), .DW(DW), .POLICY(POLICY), .IW(IW), .PW(PW)) u_dpa (
      .clk        (clk),
      .rst_n      (rst_n),
      .req        (req[o]),
      .data_in    (hdata),
      .data_out   (mux_data[o]),
      .ag         (ag[o]),
      .gnt_idx    (gidx[o]),
      .gnt_onehot (gonehot[o]),
      .gnt_therm  (gtherm),
      .prio       (prio)
    );
  end

  // Output registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
    end else begin
      out_valid <= ag;
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < N; o++) begin
      if (ag[o]) begin
        out_data[o] <= mux_data[o];
        out_src[o]  <= gidx[o];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_chk
    a_dest_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid[i] && in_ready[i]) |-> (32'(in_dest[i]) < N));
  end

endmodule
