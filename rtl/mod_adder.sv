// mod_adder: two-operand adder modulo 2^N-1 with end-around carry.
//
// Generate/propagate signals are combined in a Kogge-Stone parallel-prefix
// network. The carry out of the whole word, G[N-1:0], has weight 2^N = 1
// modulo 2^N-1 and is fed back in at bit 0 without a second carry chain:
// the carry into bit i is G[i-1:0] | P[i-1:0] & G[N-1:0]. The result is
// a + b modulo 2^N-1 in the range 0..2^N-1. A zero result normally comes out
// as all ones (the second representation of zero); it comes out as 0 only
// when both operands are 0. A parallel-prefix final adder is what the
// published scheme assumes; the Kogge-Stone network and the way the
// end-around carry is folded in are this design's choices. Purely
// combinational.
module mod_adder #(
  parameter int N = 8,
  localparam int LG = $clog2(N)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  // prefix (G, P) of bits [i : max(0, i-2^l+1)] after level l
  logic [N-1:0] g [LG+1];
  logic [N-1:0] p [LG+1];
  logic [N-1:0] hp;       // half-sum a ^ b
  logic         cout;
  logic [N-1:0] c;        // carry into each bit

  assign hp   = a ^ b;
  assign g[0] = a & b;
  assign p[0] = hp;

  for (genvar l = 0; l < LG; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_comb
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
        assign p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
      end else begin : g_keep
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign cout = g[LG][N-1];
  assign c[0] = cout;
  for (genvar i = 1; i < N; i++) begin : g_carry
    assign c[i] = g[LG][i-1] | (p[LG][i-1] & cout);
  end

  assign s = hp ^ c;

endmodule
