// tb_mod_adder: checks the end-around-carry parallel-prefix adder.
//
// Every pair of 8-bit operands is added; the result must be congruent to
// a + b modulo 255, and it may be 0 only when both operands are 0 (a zero
// sum otherwise comes out as 255). Random 13-bit operands (a width that is
// not a power of two) check the prefix network at another size.
module tb_mod_adder;

  int checks = 0, failures = 0;
  int eac = 0;

  logic [7:0]  a8, b8, s8;
  logic [12:0] a13, b13, s13;

  mod_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .s(s8));
  mod_adder #(.N(13)) dut13 (.a(a13), .b(b13), .s(s13));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        automatic int exp = (a + b) % 255;
        a8 = 8'(a); b8 = 8'(b);
        #1;
        checks++;
        if (a + b > 255) eac++;
        if (int'(s8) % 255 != exp || (s8 == 0 && (a != 0 || b != 0))) begin
          failures++;
          if (failures < 10) $display("%0d + %0d -> %0d", a, b, s8);
        end
      end
    end
    for (int t = 0; t < 20000; t++) begin
      a13 = 13'($urandom); b13 = 13'($urandom);
      if (t == 0) begin a13 = 13'h1fff; b13 = 13'h1fff; end
      #1;
      checks++;
      if (int'(s13) % 8191 != (int'(a13) + int'(b13)) % 8191) begin
        failures++;
        if (failures < 10) $display("%0d + %0d -> %0d", a13, b13, s13);
      end
    end
    if (eac == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
