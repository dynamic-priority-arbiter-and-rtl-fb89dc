// tb_dpa_reduce: checks the reduce step against an integer model.
// The model turns each (request, weight) pair into an integer symbol
// (0 when idle, weight+1 otherwise), takes the maximum and marks the active
// requests that carry it. Two configurations are checked: the round-robin
// case (1-bit priority), including the worked 8-input example with
// requests 11010110 and pointer 11111000 that must reduce to 11010000, and a
// weighted case with 8-bit thermometer weights.
module tb_dpa_reduce;
  localparam int N = 8;
  localparam int PW = 8;
  int checks = 0, failures = 0;

  logic [N-1:0]         rr_req, rr_red;
  logic [N-1:0][0:0]    rr_prio;
  logic [1:0]           rr_max;
  logic [N-1:0]         w_req, w_red;
  logic [N-1:0][PW-1:0] w_prio;
  logic [PW:0]          w_max;

  dpa_reduce #(.N(N), .PW(1))  dut_rr (.req(rr_req), .prio(rr_prio), .max_sym(rr_max), .reduced(rr_red));
  dpa_reduce #(.N(N), .PW(PW)) dut_w  (.req(w_req),  .prio(w_prio),  .max_sym(w_max),  .reduced(w_red));

  function automatic logic [PW-1:0] therm(input int v);
    return PW'((1 << v) - 1);
  endfunction

  function automatic logic [N-1:0] model(input logic [N-1:0] r, input int w[N]);
    int m = 0;
    logic [N-1:0] res = '0;
    for (int i = 0; i < N; i++) if (r[i] && w[i] + 1 > m) m = w[i] + 1;
    for (int i = 0; i < N; i++) res[i] = r[i] && (w[i] + 1 == m);
    return res;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w[N];
    logic [N-1:0] exp;
    // worked example
    rr_req = 8'b1101_0110;
    rr_prio = 8'b1111_1000;
    w_req = '0; w_prio = '0;
    #1;
    checks++;
    if (rr_red !== 8'b1101_0000) begin
      failures++; $display("FAIL example: reduced=%b", rr_red);
    end
    checks++;
    if (rr_max !== 2'b11) begin
      failures++; $display("FAIL example: max=%b", rr_max);
    end
    // idle: nothing reduced
    rr_req = '0; #1;
    checks++;
    if (rr_red !== '0) begin failures++; $display("FAIL idle: reduced=%b", rr_red); end
    // random round-robin
    for (int t = 0; t < 2000; t++) begin
      rr_req = N'($urandom);
      rr_prio = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) w[i] = int'(rr_prio[i]);
      exp = model(rr_req, w);
      checks++;
      if (rr_red !== exp) begin
        failures++;
        $display("FAIL rr: req=%b prio=%b red=%b exp=%b", rr_req, rr_prio, rr_red, exp);
      end
    end
    // random weighted
    for (int t = 0; t < 2000; t++) begin
      w_req = N'($urandom);
      for (int i = 0; i < N; i++) begin
        w[i] = (t % 3 == 0) ? int'($urandom_range(0, 2)) : int'($urandom_range(0, PW));
        w_prio[i] = therm(w[i]);
      end
      #1;
      exp = model(w_req, w);
      checks++;
      if (w_red !== exp) begin
        failures++;
        $display("FAIL w: req=%b red=%b exp=%b", w_req, w_red, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
