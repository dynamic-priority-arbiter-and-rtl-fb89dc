// tb_dpa_switch_full: the switch with every parameter at its default
// (8 x 8 ports, 32-bit words, round-robin), driven through all traffic phases
// and drained, with the cycle-accurate checks of switch_checker.
module tb_dpa_switch_full;
  import dpa_pkg::*;
  localparam int N = 8;
  localparam int DW = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                 rst_n, done;
  logic [N-1:0]         in_valid, in_ready, out_valid;
  logic [N-1:0][2:0]    in_dest, out_src;
  logic [N-1:0][DW-1:0] in_data, out_data;
  int checks, failures;

  dpa_switch dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_dest(in_dest),
    .in_data(in_data), .out_valid(out_valid), .out_data(out_data), .out_src(out_src));

  switch_checker #(.N(N), .DW(DW), .POLICY(POLICY_RR), .CYCLES(4000)) chk (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_dest(in_dest),
    .in_data(in_data), .out_valid(out_valid), .out_data(out_data), .out_src(out_src),
    .done(done), .checks(checks), .failures(failures));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
