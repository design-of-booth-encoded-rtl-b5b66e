// radix8_mod_mul: radix-8 Booth encoded modulo 2^N-1 multiplier.
//
// Computes p = x*y modulo 2^N-1, the multiplier of the 2^N-1 channel of a
// residue number system. Structure:
//   1. partial_product_gen: radix-8 Booth recoding of y into P = ceil(N/3)
//      digits (N/3 when 3 divides N); 3X is built once by K-bit ripple-carry
//      adders working in parallel, whose chunk carries stay separate as
//      sparse bits. Each partial product is its selected multiple rotated
//      by 3i and carries a bias B = sum_j 2^(jK).
//   2. A hardwired compensation constant CC = -(sum_i 2^(3i) B) mod 2^N-1,
//      computed at elaboration from N and K only, is added as one more row.
//   3. csa_tree reduces the P words, the sparse rows and CC to two rows with
//      end-around-carry 3:2 compressors; mod_adder adds them.
// The chunk width K sets the carry chain of the hard multiple (K bits
// instead of 2N for two N-bit additions in series) and therefore the delay.
// K must divide N, be above 1 and not be a multiple of 3.
//
// Output convention: the least positive remainder, as in the multiplier's
// published simulation results. A product below 2^N-1 comes out unchanged
// (a zero product, from a zero operand, gives 0); a nonzero product that is
// a multiple of 2^N-1 gives 2^N-1 (all ones) rather than 0. N = 8 (the
// modulo 255 multiplier of those results) is the default; K = 4 is this
// design's choice. Purely combinational: one product per evaluation, no
// clock and no reset.
module radix8_mod_mul
  import mod_mul_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 4,
  localparam int P    = num_pp(N),
  localparam int R    = num_sparse_rows(N, K),
  localparam int NOPS = P + R + 1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  localparam wide_t CC_WIDE = comp_const(N, K);
  localparam logic [N-1:0] CC = CC_WIDE[N-1:0];

  logic [N-1:0] pp [P];
  logic [N-1:0] sp [R];
  logic [N-1:0] ops [NOPS];
  logic [N-1:0] sum, carry, raw;
  logic         zero_operand;

  partial_product_gen #(.N(N), .K(K)) u_ppg (.x(x), .y(y), .pp(pp), .sp(sp));

  for (genvar i = 0; i < P; i++) begin : g_pp
    assign ops[i] = pp[i];
  end
  for (genvar r = 0; r < R; r++) begin : g_sp
    assign ops[P+r] = sp[r];
  end
  assign ops[NOPS-1] = CC;

  csa_tree #(.N(N), .NOPS(NOPS)) u_csa (.ops(ops), .sum(sum), .carry(carry));

  mod_adder #(.N(N)) u_add (.a(sum), .b(carry), .s(raw));

  // least positive remainder: zero residue is reported as all ones unless an
  // operand is the integer 0
  assign zero_operand = (x == '0) || (y == '0);
  always_comb begin
    if (zero_operand)    p = '0;
    else if (raw == '0)  p = '1;
    else                 p = raw;
  end

endmodule
