// tb_booth_selector: checks every Booth multiple the selector can produce.
//
// For all 8-bit X and every decoded digit (-4..+4 and the negative zero),
// the selector's word plus its sparse bits (weights 2^(jK)) must equal
// d*X + B modulo 255, B = 2^0 + 2^4. The hard multiple inputs come from a
// hard_multiple_gen; the reference is plain integer arithmetic.
module tb_booth_selector;
  import mod_mul_pkg::*;

  localparam int N = 8, K = 4, M = 2, MOD = 255, B = 17;

  logic [N-1:0] x, sp, sn, w;
  logic [M-1:0] cp, cn, q;
  booth_sel_t   sel;
  int checks = 0, failures = 0;

  hard_multiple_gen #(.N(N), .K(K)) u_hm (.x(x), .s_pos(sp), .c_pos(cp), .s_neg(sn), .c_neg(cn));
  booth_selector #(.N(N), .K(K)) dut (
    .sel(sel), .x(x), .s_pos(sp), .c_pos(cp), .s_neg(sn), .c_neg(cn), .w(w), .q(q)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int a = 0; a < 256; a++) begin
      for (int d = -5; d <= 4; d++) begin   // -5 stands for the negative zero
        automatic int mag = (d == -5) ? 0 : (d < 0 ? -d : d);
        automatic int dd  = (d == -5) ? 0 : d;
        automatic int got, exp;
        x = N'(a);
        sel = '0;
        sel.neg   = (d < 0);
        sel.one   = (mag == 1);
        sel.two   = (mag == 2);
        sel.three = (mag == 3);
        sel.four  = (mag == 4);
        #1;
        got = (int'(w) + (q[0] ? 1 : 0) + (q[1] ? 16 : 0)) % MOD;
        exp = ((dd * a + B) % MOD + MOD) % MOD;
        checks++;
        if (got != exp) begin
          failures++;
          if (failures < 10) $display("X=%0d d=%0d: got %0d expected %0d", a, d, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
