// tb_dpa_mux: checks the complete arbiter-multiplexer for both policies.
// Two 8-input instances, round-robin and first-come-first-served, see the
// same random requests and data. Each cycle the outputs (ag, data word,
// binary and onehot grant) are compared with a cycle-level model:
//   round-robin: scan from pointer k upwards, wrapping; then k = g + 1;
//   FCFS: largest waiting weight wins, ties to the lowest position; the winner
//         drops to 0 and the other requesters gain one (up to N).
// Phases with every input requesting check that round-robin serves each
// input once in N consecutive grants, and counts how often the FCFS winner
// was not the lowest-numbered requester (the policy at work).
module tb_dpa_mux;
  import dpa_pkg::*;
  localparam int N = 8;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0]         req;
  logic [N-1:0][DW-1:0] din;
  logic [DW-1:0]        rr_dout, fc_dout;
  logic                 rr_ag, fc_ag;
  logic [2:0]           rr_idx, fc_idx;
  logic [N-1:0]         rr_oh, fc_oh, rr_th, fc_th;
  logic [N-1:0][0:0]    rr_prio;
  logic [N-1:0][N-1:0]  fc_prio;
  int checks = 0, failures = 0;
  int rr_k;
  int fw[N];
  int fcfs_reordered = 0, rr_wraps = 0, rr_full_rounds = 0, phase_rounds = 0;

  dpa_mux #(.N(N), .DW(DW), .POLICY(POLICY_RR)) dut_rr (
    .clk(clk), .rst_n(rst_n), .req(req), .data_in(din), .data_out(rr_dout), .ag(rr_ag),
    .gnt_idx(rr_idx), .gnt_onehot(rr_oh), .gnt_therm(rr_th), .prio(rr_prio));
  dpa_mux #(.N(N), .DW(DW), .POLICY(POLICY_FCFS)) dut_fc (
    .clk(clk), .rst_n(rst_n), .req(req), .data_in(din), .data_out(fc_dout), .ag(fc_ag),
    .gnt_idx(fc_idx), .gnt_onehot(fc_oh), .gnt_therm(fc_th), .prio(fc_prio));

  always #5 clk = ~clk;

  function automatic int rr_pick(input logic [N-1:0] r, input int k);
    for (int s = 0; s < N; s++) if (r[(k + s) % N]) return (k + s) % N;
    return -1;
  endfunction

  function automatic int fc_pick(input logic [N-1:0] r, input int w[N]);
    int best = -1;
    for (int i = 0; i < N; i++) if (r[i] && (best < 0 || w[i] > w[best])) best = i;
    return best;
  endfunction

  task automatic cmp(input string tag, input int g, input logic ag, input int idx,
                     input logic [N-1:0] oh, input logic [DW-1:0] dout);
    checks++;
    if (ag !== (g >= 0)) begin failures++; $display("FAIL %s ag=%0b exp grant %0d", tag, ag, g); end
    if (g >= 0) begin
      checks++;
      if (idx != g || oh !== N'(1 << g) || dout !== din[g]) begin
        failures++;
        $display("FAIL %s req=%b got idx=%0d oh=%b data=%h exp %0d", tag, req, idx, oh, dout, g);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int grr, gfc, lowest;
    logic [N-1:0] served;
    req = '0; din = '0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1;
    rr_k = 0;
    foreach (fw[i]) fw[i] = 0;
    served = '0;
    for (int t = 0; t < 6000; t++) begin
      case ((t / 500) % 3)
        0: req = N'($urandom);
        1: req = '1;                                  // saturated
        default: req = N'($urandom) & N'($urandom) & N'($urandom);
      endcase
      for (int i = 0; i < N; i++) din[i] = DW'($urandom);
      #1;
      grr = rr_pick(req, rr_k);
      gfc = fc_pick(req, fw);
      cmp("rr", grr, rr_ag, int'(rr_idx), rr_oh, rr_dout);
      cmp("fcfs", gfc, fc_ag, int'(fc_idx), fc_oh, fc_dout);
      lowest = -1;
      for (int i = N - 1; i >= 0; i--) if (req[i]) lowest = i;
      if (gfc != lowest) fcfs_reordered++;
      // round-robin fairness under saturation: N consecutive grants cover all
      if (req == '1) begin
        served[grr] = 1'b1;
        if (grr == N - 1) begin
          checks++;
          if (served != '1 && phase_rounds > 0) begin
            failures++; $display("FAIL rr round did not serve all: %b", served);
          end
          rr_full_rounds++;
          phase_rounds++;
          served = '0;
        end
      end else begin
        served = '0;
        phase_rounds = 0;
      end
      @(posedge clk);
      if (grr >= 0) begin
        if (grr < rr_k) rr_wraps++;
        rr_k = (grr + 1) % N;
      end
      if (gfc >= 0) begin
        for (int i = 0; i < N; i++) begin
          if (i == gfc) fw[i] = 0;
          else if (req[i]) fw[i] = (fw[i] < N) ? fw[i] + 1 : N;
        end
      end
      #1;
    end
    checks++;
    if (fcfs_reordered == 0 || rr_wraps == 0 || rr_full_rounds < 2) begin
      failures++;
      $display("FAIL coverage: fcfs_reordered=%0d rr_wraps=%0d rounds=%0d", fcfs_reordered, rr_wraps, rr_full_rounds);
    end
    $display("coverage: fcfs_reordered=%0d rr_wraps=%0d rr_full_rounds=%0d", fcfs_reordered, rr_wraps, rr_full_rounds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
