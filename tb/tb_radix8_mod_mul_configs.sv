// tb_radix8_mod_mul_configs: the multiplier at other word lengths and chunk
// widths.
//
// The chunk width K trades the length of the hard multiple's carry chain
// against the number of sparse carry bits; the compensation constant and
// the sparse row packing change with it. Configurations tested:
//   N = 8,  K = 8 and K = 2  (every operand pair; K = 2 needs two sparse rows)
//   N = 12, K = 4            (3 divides N: N/3 digits, wrapped low bit)
//   N = 16, K = 4 and K = 16 (N not a multiple of 3, K = N/4 and K = N)
//   N = 24, K = 8            (3 divides N, K = N/3)
//   N = 32, K = 8            (K = N/4)
// The reference is a shift-and-add modular multiplication done here, with
// the least-positive-remainder output convention (0 only for a zero
// operand, 2^N-1 for other multiples of 2^N-1).
module tb_radix8_mod_mul_configs;

  int checks = 0, failures = 0;

  logic [7:0]  xa, ya, pa, xb, yb, pb;
  logic [11:0] xc, yc, pc;
  logic [15:0] xd, yd, pd, xe, ye, pe;
  logic [23:0] xf, yf, pf;
  logic [31:0] xg, yg, pg;

  radix8_mod_mul #(.N(8),  .K(8))  dut_a (.x(xa), .y(ya), .p(pa));
  radix8_mod_mul #(.N(8),  .K(2))  dut_b (.x(xb), .y(yb), .p(pb));
  radix8_mod_mul #(.N(12), .K(4))  dut_c (.x(xc), .y(yc), .p(pc));
  radix8_mod_mul #(.N(16), .K(4))  dut_d (.x(xd), .y(yd), .p(pd));
  radix8_mod_mul #(.N(16), .K(16)) dut_e (.x(xe), .y(ye), .p(pe));
  radix8_mod_mul #(.N(24), .K(8))  dut_f (.x(xf), .y(yf), .p(pf));
  radix8_mod_mul #(.N(32), .K(8))  dut_g (.x(xg), .y(yg), .p(pg));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // least positive remainder of a*b modulo 2^n-1
  function automatic longint expected(input longint a, input longint b, input int n);
    longint m = (longint'(1) << n) - 1;
    longint r = 0, aa = a % m;
    if (a == 0 || b == 0) return 0;
    for (int i = n - 1; i >= 0; i--) begin
      r = (r * 2) % m;
      if ((b >> i) & 1) r = (r + aa) % m;
    end
    return (r == 0) ? m : r;
  endfunction

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : stim
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        xa = 8'(a); ya = 8'(b); xb = 8'(a); yb = 8'(b);
        #1;
        check(pa, expected(a, b, 8), "N=8 K=8");
        check(pb, expected(a, b, 8), "N=8 K=2");
      end
    for (int t = 0; t < 20000; t++) begin
      xc = 12'($urandom); yc = 12'($urandom);
      xd = 16'($urandom); yd = 16'($urandom);
      xe = 16'($urandom); ye = 16'($urandom);
      xf = 24'($urandom); yf = 24'($urandom);
      xg = $urandom;      yg = $urandom;
      if (t < 4) begin   // all-ones operands (another form of zero) and 1s
        xc = (t & 1) ? '1 : 12'd1; yc = (t & 2) ? '1 : 12'd1;
        xg = (t & 1) ? '1 : 32'd1; yg = (t & 2) ? '1 : 32'd1;
      end
      #1;
      check(pc, expected(xc, yc, 12), "N=12 K=4");
      check(pd, expected(xd, yd, 16), "N=16 K=4");
      check(pe, expected(xe, ye, 16), "N=16 K=16");
      check(pf, expected(xf, yf, 24), "N=24 K=8");
      check(pg, expected(xg, yg, 32), "N=32 K=8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
