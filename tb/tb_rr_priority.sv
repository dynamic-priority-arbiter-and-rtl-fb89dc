// tb_rr_priority: checks the round-robin pointer register.
// After reset P must be all ones. Then random grants g (given as the
// thermometer vector with ones at positions <= g) are applied with a random
// enable; the model expects P to become "ones above g" one cycle later when
// enabled, and to hold otherwise.
module tb_rr_priority;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, en;
  logic [N-1:0] gnt_therm, prio, exp;
  int checks = 0, failures = 0;

  rr_priority #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .gnt_therm(gnt_therm), .prio(prio));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    en = 0; gnt_therm = '0;
    @(posedge clk); @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (prio !== '1) begin failures++; $display("FAIL reset: prio=%b", prio); end
    exp = '1;
    for (int t = 0; t < 1000; t++) begin
      g = $urandom_range(0, N - 1);
      gnt_therm = N'((32'd2 << g) - 1);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) exp = N'(~((32'd2 << g) - 1));
      #1;
      checks++;
      if (prio !== exp) begin
        failures++;
        $display("FAIL t=%0d g=%0d en=%0b prio=%b exp=%b", t, g, en, prio, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
