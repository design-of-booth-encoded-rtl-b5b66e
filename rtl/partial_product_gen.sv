// partial_product_gen: radix-8 Booth partial products modulo 2^N-1.
//
// The multiplier y is cut into P = num_pp(N) overlapping 4-bit groups. When 3
// divides N, the bit below y[0] is taken as y[N-1] (a wrap-around that is
// exact modulo 2^N-1) and N/3 digits suffice; otherwise y is zero-extended
// and floor(N/3)+1 digits are used. Each group is recoded by a
// booth_encoder and a booth_selector picks the multiple d_i*X (+B) from X,
// its rotations and the hard multiple 3X produced once by
// hard_multiple_gen. Partial product i is then rotated left by 3i, which is
// multiplication by 8^i modulo 2^N-1.
//
// Outputs: pp[i], the rotated word of digit i, and sp[r], rows that hold the
// rotated sparse carry bits of all digits. Digit i's sparse bits land on
// positions (j*K + 3i) mod N; with K not a multiple of 3 they interleave
// and, for the usual choices of K, all fit in one row (R = 1). The packing
// is computed at elaboration (see mod_mul_pkg). Altogether
//   sum(pp) + sum(sp) = X*Y + sum_i 2^(3i) B   (mod 2^N-1).
// Recoding, rotation and the interleaving rule for the sparse bits follow
// the published scheme; using N/3 digits with a wrapped low bit when 3
// divides N, and extra sparse rows for colliding positions, are this
// design's choices. Purely combinational.
module partial_product_gen
  import mod_mul_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K,
  localparam int P = num_pp(N),
  localparam int R = num_sparse_rows(N, K)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] pp [P],
  output logic [N-1:0] sp [R]
);

  logic [3*P:0]   y_ext;     // y_ext[t+1] = y[t]; y_ext[0] = bit below y[0]
  logic [N-1:0]   s_pos, s_neg;
  logic [M-1:0]   c_pos, c_neg;
  logic [P*M-1:0] q_flat;

  always_comb begin
    y_ext = '0;
    y_ext[N:1] = y;
    y_ext[0] = (N % 3 == 0) ? y[N-1] : 1'b0;
  end

  hard_multiple_gen #(.N(N), .K(K)) u_hm (
    .x(x), .s_pos(s_pos), .c_pos(c_pos), .s_neg(s_neg), .c_neg(c_neg)
  );

  for (genvar i = 0; i < P; i++) begin : g_pp
    booth_sel_t   sel;
    logic [N-1:0] w;
    logic [M-1:0] q;

    booth_encoder u_enc (.grp(y_ext[3*i +: 4]), .sel(sel));

    booth_selector #(.N(N), .K(K)) u_sel (
      .sel(sel), .x(x), .s_pos(s_pos), .c_pos(c_pos), .s_neg(s_neg), .c_neg(c_neg),
      .w(w), .q(q)
    );

    // rotate left by 3i: weight 8^i modulo 2^N-1
    if ((3 * i) % N == 0) begin : g_norot
      assign pp[i] = w;
    end else begin : g_rot
      localparam int SH = (3 * i) % N;
      assign pp[i] = {w[N-1-SH:0], w[N-1:N-SH]};
    end
    assign q_flat[i*M +: M] = q;
  end

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar b = 0; b < N; b++) begin : g_bit
      localparam int OWNER = sparse_owner(N, K, r, b);
      if (OWNER >= 0) begin : g_used
        assign sp[r][b] = q_flat[OWNER];
      end else begin : g_free
        assign sp[r][b] = 1'b0;
      end
    end
  end

  initial begin
    assert (k_is_valid(N, K))
      else $error("K=%0d is not a valid chunk width for N=%0d: K must divide N, exceed 1 and not be a multiple of 3", K, N);
  end

endmodule
