// tb_booth_encoder: exhaustive test of the radix-8 Booth recoder.
//
// All 16 groups are applied. The expected digit is worked out arithmetically
// as -4*g[3] + 2*g[2] + g[1] + g[0]; the recoder must report its sign as
// g[3] and exactly one magnitude flag matching |digit| (none for 0).
module tb_booth_encoder;
  import mod_mul_pkg::*;

  logic [3:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int g = 0; g < 16; g++) begin
      automatic int d = -4 * ((g >> 3) & 1) + 2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
      automatic int mag = (d < 0) ? -d : d;
      automatic int got;
      grp = 4'(g);
      #1;
      got = sel.one ? 1 : sel.two ? 2 : sel.three ? 3 : sel.four ? 4 : 0;
      checks++;
      if (got != mag || (int'(sel.one) + int'(sel.two) + int'(sel.three) + int'(sel.four)) > 1 ||
          sel.neg != grp[3]) begin
        failures++;
        $display("group %b: got neg=%0d mag=%0d, expected digit %0d", grp, sel.neg, got, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
