// tb_dpa_switch: end-to-end test of the switch at the three sizes evaluated
// for it (4x4, 8x8, 16x16), each with round-robin and with first-come-first-
// served arbitration. Each instance is driven and checked by its own
// switch_checker (cycle-accurate model, delivery and latency checks,
// mechanism coverage); the testbench sums their results.
module tb_dpa_switch;
  import dpa_pkg::*;
  localparam int CYC = 2000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0] done;
  int ck [6];
  int fl [6];

  `define SW_INST(K, NN, POL) \
    logic                   rst_n_``K; \
    logic [NN-1:0]          iv_``K, ir_``K, ov_``K; \
    logic [NN-1:0][$clog2(NN)-1:0] id_``K, os_``K; \
    logic [NN-1:0][31:0]    idat_``K, od_``K; \
    dpa_switch #(.N(NN), .DW(32), .POLICY(POL)) dut_``K ( \
      .clk(clk), .rst_n(rst_n_``K), .in_valid(iv_``K), .in_ready(ir_``K), .in_dest(id_``K), \
      .in_data(idat_``K), .out_valid(ov_``K), .out_data(od_``K), .out_src(os_``K)); \
    switch_checker #(.N(NN), .DW(32), .POLICY(POL), .CYCLES(CYC)) chk_``K ( \
      .clk(clk), .rst_n(rst_n_``K), .in_valid(iv_``K), .in_ready(ir_``K), .in_dest(id_``K), \
      .in_data(idat_``K), .out_valid(ov_``K), .out_data(od_``K), .out_src(os_``K), \
      .done(done[K]), .checks(ck[K]), .failures(fl[K]));

  `SW_INST(0, 4,  POLICY_RR)
  `SW_INST(1, 4,  POLICY_FCFS)
  `SW_INST(2, 8,  POLICY_RR)
  `SW_INST(3, 8,  POLICY_FCFS)
  `SW_INST(4, 16, POLICY_RR)
  `SW_INST(5, 16, POLICY_FCFS)

  initial begin
    repeat (20 * CYC) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ck.sum(), fl.sum() + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done == 6'b111111);
    $display("TB_RESULT checks=%0d failures=%0d", ck.sum(), fl.sum());
    $finish;
  end
endmodule
