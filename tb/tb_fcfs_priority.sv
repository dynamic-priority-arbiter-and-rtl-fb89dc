// tb_fcfs_priority: checks the first-come-first-served weight register.
// An integer model keeps one weight per input: a granted input drops to 0,
// every other requesting input gains one (saturating at N), idle inputs keep
// theirs, and nothing changes without the enable. The register must hold the
// thermometer code of each model weight after every cycle.
module tb_fcfs_priority;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, en;
  logic [N-1:0] req, gnt;
  logic [N-1:0][N-1:0] prio;
  int w[N];
  int checks = 0, failures = 0;
  int saturated = 0;

  fcfs_priority #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .req(req),
                              .gnt_onehot(gnt), .prio(prio));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    en = 0; req = '0; gnt = '0;
    @(posedge clk); @(posedge clk);
    rst_n = 1;
    #1;
    foreach (w[i]) w[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      // input 7 requests almost always and is rarely granted, so it saturates
      req = N'($urandom) | 8'h80;
      g = $urandom_range(0, N - 1);
      if (!req[g] || (g == 7 && $urandom_range(0, 15) != 0)) g = -1;
      gnt = (g >= 0) ? N'(1 << g) : '0;
      en = (g >= 0) || ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (en) begin
        for (int i = 0; i < N; i++) begin
          if (i == g) w[i] = 0;
          else if (req[i]) w[i] = (w[i] < N) ? w[i] + 1 : N;
        end
      end
      if (w[7] == N) saturated++;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (prio[i] !== N'((33'd1 << w[i]) - 1)) begin
          failures++;
          $display("FAIL t=%0d input %0d prio=%b weight=%0d", t, i, prio[i], w[i]);
        end
      end
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
