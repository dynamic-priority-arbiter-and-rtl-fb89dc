// tb_cmp_node: exhaustive check of the comparison node.
// All four input pairs are applied; the expected maximum is the larger of the
// two bits and the expected flag points left only when the right bit is 0.
module tb_cmp_node;
  logic s_l, s_r, max, f;
  int checks = 0, failures = 0;

  cmp_node dut (.s_l(s_l), .s_r(s_r), .max(max), .f(f));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {s_l, s_r} = 2'(v);
      #1;
      checks++;
      if (max !== ((s_l > s_r) ? s_l : s_r)) begin
        failures++;
        $display("FAIL max: s_l=%0b s_r=%0b max=%0b", s_l, s_r, max);
      end
      checks++;
      // tie of ones goes right; left only when left is strictly larger
      // or when both are zero (don't-care resolved to left)
      if (f !== ((s_l == 1'b1 && s_r == 1'b0) || (s_l == 1'b0 && s_r == 1'b0))) begin
        failures++;
        $display("FAIL f: s_l=%0b s_r=%0b f=%0b", s_l, s_r, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
