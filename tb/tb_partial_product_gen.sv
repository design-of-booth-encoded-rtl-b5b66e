// tb_partial_product_gen: checks the radix-8 Booth partial product matrix.
//
// The sum of all partial product words and sparse rows must equal
// X*Y + sum_i 2^(3i) B modulo 2^N-1 (B = sum_j 2^(jK)); the reference is
// integer arithmetic done here. Three configurations are covered:
//   N = 8,  K = 4: every X, Y pair (one sparse row);
//   N = 8,  K = 2: every pair (sparse bits collide, two sparse rows);
//   N = 12, K = 4: random pairs (3 divides N, multiplier bit wraps around).
// It also checks that no two sparse bits share a position in the K = 4
// configurations, where they must fit into one row.
module tb_partial_product_gen;
  import mod_mul_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  xa, ya, ppa [3], spa [num_sparse_rows(8, 4)];
  logic [7:0]  xb, yb, ppb [3], spb [num_sparse_rows(8, 2)];
  logic [11:0] xc, yc, ppc [4], spc [num_sparse_rows(12, 4)];

  partial_product_gen #(.N(8),  .K(4)) dut_a (.x(xa), .y(ya), .pp(ppa), .sp(spa));
  partial_product_gen #(.N(8),  .K(2)) dut_b (.x(xb), .y(yb), .pp(ppb), .sp(spb));
  partial_product_gen #(.N(12), .K(4)) dut_c (.x(xc), .y(yc), .pp(ppc), .sp(spc));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint total_bias(input int n, input int k, input int npp);
    longint m = (longint'(1) << n) - 1, t = 0;
    for (int i = 0; i < npp; i++)
      for (int j = 0; j < n / k; j++) t += longint'(1) << ((j * k + 3 * i) % n);
    return t % m;
  endfunction

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : stim
    longint s;
    check(longint'(num_sparse_rows(8, 4)), 1, "rows N=8 K=4");
    check(longint'(num_sparse_rows(8, 2)), 2, "rows N=8 K=2");
    check(longint'(num_sparse_rows(12, 4)), 1, "rows N=12 K=4");
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        xa = 8'(a); ya = 8'(b); xb = 8'(a); yb = 8'(b);
        #1;
        s = 0;
        foreach (ppa[i]) s += ppa[i];
        foreach (spa[i]) s += spa[i];
        check(s % 255, (longint'(a) * b + total_bias(8, 4, 3)) % 255, "N=8 K=4");
        s = 0;
        foreach (ppb[i]) s += ppb[i];
        foreach (spb[i]) s += spb[i];
        check(s % 255, (longint'(a) * b + total_bias(8, 2, 3)) % 255, "N=8 K=2");
      end
    end
    for (int t = 0; t < 20000; t++) begin
      xc = 12'($urandom); yc = 12'($urandom);
      #1;
      s = 0;
      foreach (ppc[i]) s += ppc[i];
      foreach (spc[i]) s += spc[i];
      check(s % 4095, (longint'(xc) * yc + total_bias(12, 4, 4)) % 4095, "N=12 K=4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
