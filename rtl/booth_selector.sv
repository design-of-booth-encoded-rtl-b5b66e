// booth_selector: selects one radix-8 Booth multiple modulo 2^N-1.
//
// Given the decoded digit d (sign and one-hot magnitude), it returns a word w
// and M sparse bits q (bit j of weight 2^(j*K)) with
//     w + sum_j q[j] 2^(jK) = d*X + B   (mod 2^N-1),  B = sum_j 2^(jK).
// The easy multiples are wiring: 2X and 4X are X rotated left by one and two
// bits, and a negative multiple is the bitwise complement (the complement of
// a word is its negative modulo 2^N-1). For these, every q bit is 1, which
// supplies the bias B. For +3X the biased hard-multiple pair is passed on;
// for -3X the unbiased pair is complemented, sparse bits included: the zeros
// of the sparse row outside the positions j*K would complement to ones worth
// -B, so leaving them out adds exactly +B. The rotation by 3i that places the
// multiple of digit i is done by the caller. The easy multiples follow the
// published Booth table; the way +-3X are given the same bias is this
// design's choice. Purely combinational.
module booth_selector
  import mod_mul_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K
) (
  input  booth_sel_t   sel,
  input  logic [N-1:0] x,
  input  logic [N-1:0] s_pos,   // 3X + B, sum part
  input  logic [M-1:0] c_pos,   // 3X + B, sparse carry bits
  input  logic [N-1:0] s_neg,   // 3X, sum part
  input  logic [M-1:0] c_neg,   // 3X, sparse carry bits
  output logic [N-1:0] w,
  output logic [M-1:0] q
);

  logic [N-1:0] mag;

  always_comb begin
    mag = '0;
    if (sel.one)  mag = x;
    if (sel.two)  mag = {x[N-2:0], x[N-1]};
    if (sel.four) mag = {x[N-3:0], x[N-1:N-2]};
    if (sel.three) begin
      w = sel.neg ? ~s_neg : s_pos;
      q = sel.neg ? ~c_neg : c_pos;
    end else begin
      w = sel.neg ? ~mag : mag;
      q = '1;
    end
  end

endmodule
