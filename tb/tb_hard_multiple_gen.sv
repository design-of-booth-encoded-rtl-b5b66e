// tb_hard_multiple_gen: checks the partially redundant hard multiple 3X.
//
// For every 8-bit X (N = 8, K = 4) and for random X at N = 16, K = 4 the two
// pairs are turned back into numbers, sum word plus the sparse carry bits at
// weights 2^(jK), and compared modulo 2^N-1 with 3X (carry-in-0 pair) and
// 3X + B (carry-in-1 pair), B = sum_j 2^(jK), both computed here.
module tb_hard_multiple_gen;

  int checks = 0, failures = 0;

  logic [7:0]  x8,  sp8,  sn8;
  logic [1:0]  cp8, cn8;
  logic [15:0] x16, sp16, sn16;
  logic [3:0]  cp16, cn16;

  hard_multiple_gen #(.N(8),  .K(4)) dut8  (.x(x8),  .s_pos(sp8),  .c_pos(cp8),  .s_neg(sn8),  .c_neg(cn8));
  hard_multiple_gen #(.N(16), .K(4)) dut16 (.x(x16), .s_pos(sp16), .c_pos(cp16), .s_neg(sn16), .c_neg(cn16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint value(input longint s, input longint c, input int n, input int k);
    longint v = s;
    for (int j = 0; j < n / k; j++) if ((c >> j) & 1) v += longint'(1) << (j * k);
    return v % ((longint'(1) << n) - 1);
  endfunction

  function automatic longint bias(input int n, input int k);
    longint b = 0;
    for (int j = 0; j < n / k; j++) b += longint'(1) << (j * k);
    return b;
  endfunction

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : stim
    longint m8 = 255, m16 = 65535;
    for (int a = 0; a < 256; a++) begin
      x8 = 8'(a);
      #1;
      check(value(sn8, cn8, 8, 4), (3 * longint'(a)) % m8, "N=8 3X");
      check(value(sp8, cp8, 8, 4), (3 * longint'(a) + bias(8, 4)) % m8, "N=8 3X+B");
    end
    for (int t = 0; t < 2000; t++) begin
      x16 = 16'($urandom);
      #1;
      check(value(sn16, cn16, 16, 4), (3 * longint'(x16)) % m16, "N=16 3X");
      check(value(sp16, cp16, 16, 4), (3 * longint'(x16) + bias(16, 4)) % m16, "N=16 3X+B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
