// tb_csa_tree: checks the end-around-carry carry-save tree.
//
// Random operand rows are applied to trees of 5 rows (N = 8, the default
// multiplier's tree), 7 rows (N = 12) and 2 rows (no compressor level). The
// sum and carry outputs must add up, modulo 2^N-1, to the sum of the rows.
module tb_csa_tree;

  int checks = 0, failures = 0;

  logic [7:0]  o5 [5], s5, c5;
  logic [11:0] o7 [7], s7, c7;
  logic [7:0]  o2 [2], s2, c2;

  csa_tree #(.N(8),  .NOPS(5)) dut5 (.ops(o5), .sum(s5), .carry(c5));
  csa_tree #(.N(12), .NOPS(7)) dut7 (.ops(o7), .sum(s7), .carry(c7));
  csa_tree #(.N(8),  .NOPS(2)) dut2 (.ops(o2), .sum(s2), .carry(c2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : stim
    longint t5, t7, t2;
    for (int t = 0; t < 20000; t++) begin
      t5 = 0; t7 = 0; t2 = 0;
      foreach (o5[i]) begin o5[i] = 8'($urandom);  t5 += o5[i]; end
      foreach (o7[i]) begin o7[i] = 12'($urandom); t7 += o7[i]; end
      foreach (o2[i]) begin o2[i] = 8'($urandom);  t2 += o2[i]; end
      if (t == 0) foreach (o5[i]) begin t5 += 255 - o5[i]; o5[i] = 8'hff; end  // all ones
      #1;
      check((longint'(s5) + c5) % 255,  t5 % 255,  "5 rows");
      check((longint'(s7) + c7) % 4095, t7 % 4095, "7 rows");
      check((longint'(s2) + c2) % 255,  t2 % 255,  "2 rows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
