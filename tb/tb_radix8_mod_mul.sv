// tb_radix8_mod_mul: end-to-end test of the modulo 2^N-1 multiplier at its
// default size (N = 8, K = 4: the modulo 255 multiplier).
//
// Every one of the 65536 operand pairs is applied, one per clock cycle, and
// the product is compared with a reference computed here with plain integer
// arithmetic: x*y itself when it is below 255, 255 when it is a nonzero
// multiple of 255, and x*y mod 255 otherwise. The test also counts how often
// each mechanism of the datapath was exercised (every Booth digit -4..+4 and
// the negative zero group, the hard multiple in both signs, the end-around
// carry of the final adder, both output special cases) and counts a failure
// for any that never happened. A watchdog ends the run if it stalls.
module tb_radix8_mod_mul;
  import mod_mul_pkg::*;

  localparam int N = 8;
  localparam int MOD = (1 << N) - 1;
  localparam int P = 3;

  logic clk = 1'b0;
  logic [N-1:0] x, y, p;
  int checks = 0, failures = 0;
  int digit_seen [9];          // digit value + 4
  int negzero_seen = 0, hard_pos = 0, hard_neg = 0, eac_seen = 0;
  int allones_out = 0, zero_out = 0;

  radix8_mod_mul dut (.x(x), .y(y), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int a, input int b);
    int prod = a * b;
    if (prod == 0) return 0;
    if (prod % MOD == 0) return MOD;
    return prod % MOD;
  endfunction

  initial begin : stim
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x = N'(a);
        y = N'(b);
        @(posedge clk);
        #1;
        checks++;
        if (int'(p) != expected(a, b)) begin
          failures++;
          if (failures < 10) $display("mismatch: %0d * %0d -> %0d, expected %0d", a, b, p, expected(a, b));
        end
        // mechanism coverage from the operand bits, worked out here
        for (int i = 0; i < P; i++) begin
          automatic int y3 = (3*i+2 < N) ? ((b >> (3*i+2)) & 1) : 0;
          automatic int y2 = (3*i+1 < N) ? ((b >> (3*i+1)) & 1) : 0;
          automatic int y1 = (b >> (3*i)) & 1;
          automatic int y0 = (i == 0) ? 0 : ((b >> (3*i-1)) & 1);
          automatic int d = -4*y3 + 2*y2 + y1 + y0;
          digit_seen[d+4]++;
          if (y3 + y2 + y1 + y0 == 4) negzero_seen++;
          if (d == 3) hard_pos++;
          if (d == -3) hard_neg++;
        end
        if (dut.u_add.cout) eac_seen++;
        if (p == '1) allones_out++;
        if (p == '0) zero_out++;
      end
    end
    for (int d = 0; d < 9; d++) begin
      $display("digit %0d used %0d times", d - 4, digit_seen[d]);
      if (digit_seen[d] == 0) failures++;
    end
    $display("negative-zero groups %0d, +3X %0d, -3X %0d, end-around carries %0d, all-ones results %0d, zero results %0d",
             negzero_seen, hard_pos, hard_neg, eac_seen, allones_out, zero_out);
    if (negzero_seen == 0 || hard_pos == 0 || hard_neg == 0 || eac_seen == 0 ||
        allones_out == 0 || zero_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
