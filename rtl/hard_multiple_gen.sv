// hard_multiple_gen: partially redundant hard multiple 3X modulo 2^N-1.
//
// 3X = X + 2X, and 2X modulo 2^N-1 is X rotated left by one bit. Instead of
// one N-bit carry-propagate addition followed by an end-around-carry
// increment, the word is cut into M = N/K chunks of K bits, each added by its
// own K-bit ripple-carry adder; all chunks work in parallel. The carry out of
// chunk j is not propagated: it is kept as a separate bit of weight 2^((j+1)K)
// (the carry out of the top chunk wraps to bit 0, since 2^N = 1 modulo
// 2^N-1). The hard multiple is then the pair (sum word, M sparse carry bits),
// and the longest carry chain is K bits.
//
// Sparse bit j has weight 2^(j*K). Two pairs are produced:
//   s_neg/c_neg: chunk carry-ins 0,  s_neg + sum_j c_neg[j] 2^(jK) = 3X
//   s_pos/c_pos: chunk carry-ins 1,  s_pos + sum_j c_pos[j] 2^(jK) = 3X + B
// (all modulo 2^N-1, B = sum_j 2^(jK)). The booth selector uses s_pos/c_pos
// for digit +3 and the bitwise complement of s_neg/c_neg for digit -3, which
// gives -3X + B: every partial product then carries the same bias B, which a
// single constant cancels. The chunking and the carry bits as extra partial
// product bits follow the multiplier's published scheme; building the
// carry-in-1 copy to make the bias sign-independent is this design's choice.
// Purely combinational.
module hard_multiple_gen #(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] s_pos,
  output logic [M-1:0] c_pos,
  output logic [N-1:0] s_neg,
  output logic [M-1:0] c_neg
);

  logic [N-1:0] x2;
  logic [M-1:0] co_pos, co_neg;

  assign x2 = {x[N-2:0], x[N-1]};

  for (genvar j = 0; j < M; j++) begin : g_chunk
    rca #(.W(K)) u_pos (
      .a(x[j*K +: K]), .b(x2[j*K +: K]), .cin(1'b1),
      .s(s_pos[j*K +: K]), .cout(co_pos[j])
    );
    rca #(.W(K)) u_neg (
      .a(x[j*K +: K]), .b(x2[j*K +: K]), .cin(1'b0),
      .s(s_neg[j*K +: K]), .cout(co_neg[j])
    );
    // carry out of chunk j has the weight of the bottom bit of chunk j+1
    assign c_pos[(j + 1) % M] = co_pos[j];
    assign c_neg[(j + 1) % M] = co_neg[j];
  end

endmodule
