// tb_fpa_mux_tree: checks the merged fixed-priority arbiter and multiplexer.
// Three trees are driven with random requests and data: 8 inputs (the
// document's size), 5 inputs (padded tree) and 16 inputs. For each, the
// model finds the lowest-numbered request and the test compares data_out,
// ag, the binary index, the onehot vector and the thermometer vector (ones up
// to and including the winner). The worked example, reduced requests
// 11010000, must select position 4.
module tb_fpa_mux_tree;
  int checks = 0, failures = 0;

  logic [7:0]        r8;  logic [7:0][15:0]  d8;  logic [15:0] o8;
  logic              a8;  logic [2:0]        i8;  logic [7:0]  h8, t8;
  logic [4:0]        r5;  logic [4:0][7:0]   d5;  logic [7:0]  o5;
  logic              a5;  logic [2:0]        i5;  logic [4:0]  h5, t5;
  logic [15:0]       r16; logic [15:0][11:0] d16; logic [11:0] o16;
  logic              a16; logic [3:0]        i16; logic [15:0] h16, t16;

  fpa_mux_tree #(.N(8),  .DW(16)) dut8  (.req(r8),  .data_in(d8),  .data_out(o8),  .ag(a8),
                                         .gnt_idx(i8),  .gnt_onehot(h8),  .gnt_therm(t8));
  fpa_mux_tree #(.N(5),  .DW(8))  dut5  (.req(r5),  .data_in(d5),  .data_out(o5),  .ag(a5),
                                         .gnt_idx(i5),  .gnt_onehot(h5),  .gnt_therm(t5));
  fpa_mux_tree #(.N(16), .DW(12)) dut16 (.req(r16), .data_in(d16), .data_out(o16), .ag(a16),
                                         .gnt_idx(i16), .gnt_onehot(h16), .gnt_therm(t16));

  // lowest set bit of r among n positions, -1 if none
  function automatic int first(input logic [15:0] r, input int n);
    for (int i = 0; i < n; i++) if (r[i]) return i;
    return -1;
  endfunction

  task automatic check(input string tag, input int n, input logic [15:0] r,
                       input logic [15:0] dout, input logic [15:0] dexp_word,
                       input logic ag, input int idx,
                       input logic [15:0] oh, input logic [15:0] th);
    int g = first(r, n);
    logic [15:0] mask = 16'((32'd1 << n) - 1);
    checks++;
    if (ag !== (g >= 0)) begin failures++; $display("FAIL %s ag r=%h ag=%0b", tag, r, ag); end
    if (g >= 0) begin
      checks += 4;
      if (dout !== dexp_word) begin failures++; $display("FAIL %s data r=%h got=%h exp=%h", tag, r, dout, dexp_word); end
      if (idx != g) begin failures++; $display("FAIL %s idx r=%h got=%0d exp=%0d", tag, r, idx, g); end
      if ((oh & mask) !== (16'd1 << g)) begin failures++; $display("FAIL %s onehot r=%h got=%h", tag, r, oh); end
      if ((th & mask) !== 16'((32'd2 << g) - 1)) begin failures++; $display("FAIL %s therm r=%h got=%h", tag, r, th); end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    // worked example: reduced requests 11010000 select position 4
    for (int i = 0; i < 8; i++) d8[i] = 16'(16'hd000 + i);
    r8 = 8'b1101_0000; r5 = '0; r16 = '0; d5 = '0; d16 = '0;
    #1;
    checks++;
    if (!(a8 && i8 == 3'd4 && o8 == 16'hd004 && h8 == 8'b0001_0000 && t8 == 8'b0001_1111)) begin
      failures++;
      $display("FAIL example: ag=%0b idx=%0d data=%h oh=%b th=%b", a8, i8, o8, h8, t8);
    end
    for (int t = 0; t < 3000; t++) begin
      // sparse request vectors are more interesting than uniform ones
      r8  = 8'($urandom)  & 8'($urandom)  & ((t % 4 == 0) ? 8'($urandom) : 8'hff);
      r5  = 5'($urandom)  & 5'($urandom);
      r16 = 16'($urandom) & 16'($urandom) & ((t % 2 == 0) ? 16'($urandom) : 16'hffff);
      if (t % 50 == 0) begin r8 = '0; r5 = '0; r16 = '0; end
      for (int i = 0; i < 8; i++)  d8[i]  = 16'($urandom);
      for (int i = 0; i < 5; i++)  d5[i]  = 8'($urandom);
      for (int i = 0; i < 16; i++) d16[i] = 12'($urandom);
      #1;
      g = first(16'(r8), 8);
      check("n8", 8, 16'(r8), o8, (g >= 0) ? d8[g] : 16'h0, a8, int'(i8), 16'(h8), 16'(t8));
      g = first(16'(r5), 5);
      check("n5", 5, 16'(r5), 16'(o5), (g >= 0) ? 16'(d5[g]) : 16'h0, a5, int'(i5), 16'(h5), 16'(t5));
      g = first(r16, 16);
      check("n16", 16, r16, 16'(o16), (g >= 0) ? 16'(d16[g]) : 16'h0, a16, int'(i16), h16, t16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
