// switch_checker: traffic source and cycle-accurate reference model for one
// dpa_switch instance.
//
// It drives reset and the input ports of the switch and checks every output
// port each cycle against its own model of the switch: one holding register
// per input, and per output a round-robin pointer (search from k upwards,
// wrapping, k = g + 1 after a grant) or FCFS weights (largest weight wins,
// ties to the lowest input; winner to 0, other requesters +1 up to N). The
// model predicts in_ready before each clock edge and out_valid, out_data and
// out_src after it.
//
// Beyond the cycle-level match it checks end to end that every accepted word
// leaves exactly once, at the output it asked for, and that its latency from
// acceptance to output register is between 2 and N+1 cycles. It counts how
// often the mechanisms of the design occurred and fails if one never did:
// output contention, input stall (in_ready low while valid), an output idle
// with AG low (priority state held), a round-robin pointer wrap or an FCFS
// grant that is not the lowest-numbered requester, and a word that went
// through with the minimum two-cycle latency.
//
// Traffic runs in phases: uniform random, a hotspot on output 0, all inputs
// saturated, sparse; then the sources stop and the switch drains.
module switch_checker
  import dpa_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned DW     = 32,
  parameter policy_e     POLICY = POLICY_RR,
  parameter int unsigned IW     = idx_w(N),
  parameter int          CYCLES = 2000
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic [N-1:0]         in_valid,
  input  logic [N-1:0]         in_ready,
  output logic [N-1:0][IW-1:0] in_dest,
  output logic [N-1:0][DW-1:0] in_data,
  input  logic [N-1:0]         out_valid,
  input  logic [N-1:0][DW-1:0] out_data,
  input  logic [N-1:0][IW-1:0] out_src,
  output logic                 done,
  output int                   checks,
  output int                   failures
);

  // model state
  logic            m_hv   [N];
  int              m_dest [N];
  logic [DW-1:0]   m_data [N];
  int              m_tacc [N];   // cycle the held word was accepted
  int              m_k    [N];   // round-robin pointer per output
  int              m_w    [N][N];// FCFS weight [output][input]
  logic            m_ov   [N];
  logic [DW-1:0]   m_od   [N];
  int              m_os   [N];
  int              seq    [N];
  int              cycle;
  int              accepted, delivered;
  int              n_contention, n_stall, n_idle, n_policy, n_min_latency;
  int              max_latency;

  // returns the grant of output o from the model's held registers, -1 if none
  function automatic int pick(input int o);
    int best = -1;
    if (POLICY == POLICY_RR) begin
      for (int s = 0; s < int'(N); s++) begin
        int i = (m_k[o] + s) % int'(N);
        if (m_hv[i] && m_dest[i] == o) return i;
      end
      return -1;
    end
    for (int i = 0; i < int'(N); i++)
      if (m_hv[i] && m_dest[i] == o && (best < 0 || m_w[o][i] > m_w[o][best])) best = i;
    return best;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL [N=%0d %s] cycle %0d: %s", N, POLICY.name(), cycle, msg);
  endtask

  initial begin
    int g [N];
    logic gr [N];
    int phase, nreq;
    logic drain;
    checks = 0; failures = 0; done = 0;
    rst_n = 0; in_valid = '0; in_dest = '0; in_data = '0;
    cycle = 0; accepted = 0; delivered = 0;
    n_contention = 0; n_stall = 0; n_idle = 0; n_policy = 0; n_min_latency = 0;
    max_latency = 0;
    for (int i = 0; i < int'(N); i++) begin
      m_hv[i] = 0; m_k[i] = 0; m_ov[i] = 0; seq[i] = 0;
      for (int j = 0; j < int'(N); j++) m_w[i][j] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (cycle = 0; cycle < CYCLES + 4 * int'(N) + 10; cycle++) begin
      drain = (cycle >= CYCLES);
      phase = (cycle / 200) % 4;
      // drive sources: a source keeps its word until it is accepted
      for (int i = 0; i < int'(N); i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          logic v;
          int d;
          case (phase)
            0: v = ($urandom_range(0, 1) == 1);
            1: v = ($urandom_range(0, 3) != 0);
            2: v = 1'b1;
            default: v = ($urandom_range(0, 5) == 0);
          endcase
          d = (phase == 1 && $urandom_range(0, 1) == 1) ? 0 : int'($urandom_range(0, N - 1));
          in_valid[i] = v && !drain;
          in_dest[i]  = IW'(d);
          in_data[i]  = DW'({8'(i), 24'(seq[i])}) ^ (DW'($urandom) << 32);
          if (v && !drain) seq[i]++;
        end
      end
      #1;
      // model: arbitration on the held registers
      for (int i = 0; i < int'(N); i++) gr[i] = 0;
      for (int o = 0; o < int'(N); o++) begin
        int lowest;
        lowest = -1;
        nreq = 0;
        for (int i = int'(N) - 1; i >= 0; i--) if (m_hv[i] && m_dest[i] == o) begin nreq++; lowest = i; end
        g[o] = pick(o);
        if (g[o] >= 0) gr[g[o]] = 1;
        if (nreq > 1) n_contention++;
        if (g[o] < 0) n_idle++;
        if (POLICY == POLICY_RR && g[o] >= 0 && g[o] < m_k[o]) n_policy++;
        if (POLICY == POLICY_FCFS && g[o] != lowest) n_policy++;
      end
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (in_ready[i] !== (!m_hv[i] || gr[i])) fail($sformatf("in_ready[%0d]=%0b", i, in_ready[i]));
        if (in_valid[i] && !in_ready[i]) n_stall++;
      end
      @(posedge clk);
      // model: clock edge
      for (int o = 0; o < int'(N); o++) begin
        m_ov[o] = (g[o] >= 0);
        if (g[o] >= 0) begin
          int lat;
          m_od[o] = m_data[g[o]];
          m_os[o] = g[o];
          lat = cycle + 1 - m_tacc[g[o]];
          if (lat > max_latency) max_latency = lat;
          if (lat == 2) n_min_latency++;
          checks++;
          if (lat < 2 || lat > int'(N) + 1) fail($sformatf("latency %0d from input %0d", lat, g[o]));
          if (POLICY == POLICY_RR) m_k[o] = (g[o] + 1) % int'(N);
          else
            for (int i = 0; i < int'(N); i++)
              if (i == g[o]) m_w[o][i] = 0;
              else if (m_hv[i] && m_dest[i] == o) m_w[o][i] = (m_w[o][i] < int'(N)) ? m_w[o][i] + 1 : int'(N);
        end
      end
      for (int i = 0; i < int'(N); i++) begin
        if (!m_hv[i] || gr[i]) begin
          m_hv[i] = in_valid[i];
          if (in_valid[i]) begin
            m_dest[i] = int'(in_dest[i]);
            m_data[i] = in_data[i];
            m_tacc[i] = cycle;
            accepted++;
          end
        end
      end
      #1;
      for (int o = 0; o < int'(N); o++) begin
        checks++;
        if (out_valid[o] !== m_ov[o]) fail($sformatf("out_valid[%0d]=%0b exp %0b", o, out_valid[o], m_ov[o]));
        if (m_ov[o]) begin
          delivered++;
          checks++;
          if (out_data[o] !== m_od[o] || int'(out_src[o]) != m_os[o])
            fail($sformatf("out[%0d] data=%h src=%0d exp %h from %0d", o, out_data[o], out_src[o], m_od[o], m_os[o]));
        end
      end
    end
    // end to end: everything accepted has left
    checks++;
    if (accepted != delivered) fail($sformatf("accepted %0d delivered %0d", accepted, delivered));
    checks++;
    if (n_contention == 0 || n_stall == 0 || n_idle == 0 || n_policy == 0 || n_min_latency == 0)
      fail("a mechanism never occurred");
    $display("switch N=%0d %s: words=%0d contention=%0d stalls=%0d idle_outputs=%0d %s=%0d min_latency_words=%0d max_latency=%0d",
             N, POLICY.name(), delivered, n_contention, n_stall, n_idle,
             (POLICY == POLICY_RR) ? "pointer_wraps" : "fcfs_reorders", n_policy, n_min_latency, max_latency);
    done = 1;
  end

endmodule
