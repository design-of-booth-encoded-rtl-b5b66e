// mod_mul_pkg: types and elaboration-time helpers shared by the radix-8
// Booth encoded modulo 2^n-1 multiplier.
//
// The multiplier splits the operand width n into M = n/k chunks of k bits.
// Each k-bit ripple-carry adder of the hard-multiple generator leaves its
// carry-out as a separate "sparse" bit at the bottom of the next chunk, i.e.
// at bit positions j*k (j = 0..M-1). After partial product i is rotated by
// 3i, its sparse bits sit at (j*k + 3i) mod n. When those positions do not
// collide, all sparse bits fit into one row; otherwise the functions below
// spread them over as few rows as needed. Every partial product carries the
// bias B = sum_j 2^(j*k); the compensation constant CC = -(sum_i 2^(3i) B)
// mod 2^n-1 cancels the total and is hardwired as one more row.
// Nothing here is hardware by itself: these functions are only evaluated
// when the modules are elaborated. MAXN bounds the operand width they handle.
package mod_mul_pkg;

  localparam int MAXN = 1024;
  typedef logic [MAXN-1:0] wide_t;

  // Decoded radix-8 Booth digit: sign and one-hot magnitude. A digit of
  // magnitude 0 has none of the magnitude flags set.
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
    logic three;
    logic four;
  } booth_sel_t;

  // Number of radix-8 digits of an n-bit modulo 2^n-1 multiplier. When 3
  // divides n, the digit below bit 0 wraps around to bit n-1 and n/3 digits
  // suffice; otherwise the multiplier is zero-extended to 3*ceil(n/3) bits.
  function automatic int num_pp(input int n);
    return (n % 3 == 0) ? n / 3 : n / 3 + 1;
  endfunction

  // Bit position of sparse bit j of partial product i after rotation.
  function automatic int sparse_pos(input int n, input int k, input int i, input int j);
    return (j * k + 3 * i) % n;
  endfunction

  // Row that sparse bit j of partial product i is packed into: the number
  // of earlier sparse bits that land on the same position.
  function automatic int sparse_row(input int n, input int k, input int i, input int j);
    int row = 0;
    for (int ii = 0; ii <= i; ii++)
      for (int jj = 0; jj < n / k; jj++)
        if ((ii < i || jj < j) && sparse_pos(n, k, ii, jj) == sparse_pos(n, k, i, j))
          row++;
    return row;
  endfunction

  // Number of sparse rows needed to hold all partial products' sparse bits.
  function automatic int num_sparse_rows(input int n, input int k);
    int rows = 1;
    for (int i = 0; i < num_pp(n); i++)
      for (int j = 0; j < n / k; j++)
        if (sparse_row(n, k, i, j) + 1 > rows) rows = sparse_row(n, k, i, j) + 1;
    return rows;
  endfunction

  function automatic wide_t mask_of(input int n);
    return (wide_t'(1) << n) - wide_t'(1);
  endfunction

  // Rotate an n-bit value left by r positions (multiplication by 2^r mod 2^n-1).
  function automatic wide_t rotl(input wide_t v, input int r, input int n);
    int rr = r % n;
    if (rr == 0) return v & mask_of(n);
    return ((v << rr) | (v >> (n - rr))) & mask_of(n);
  endfunction

  // Addition modulo 2^n-1, result reduced to 0..2^n-2.
  function automatic wide_t add_mod(input wide_t a, input wide_t b, input int n);
    wide_t s = a + b;
    s = (s & mask_of(n)) + (s >> n);
    s = (s & mask_of(n)) + (s >> n);
    if (s == mask_of(n)) s = '0;
    return s;
  endfunction

  // Bias word B: ones at bit positions j*k, j = 0..n/k-1.
  function automatic wide_t bias_word(input int n, input int k);
    wide_t b = '0;
    for (int j = 0; j < n / k; j++) b[j*k] = 1'b1;
    return b;
  endfunction

  // Compensation constant CC = -(sum_i 2^(3i) B) mod 2^n-1. Negation modulo
  // 2^n-1 is the bitwise complement.
  function automatic wide_t comp_const(input int n, input int k);
    wide_t acc = '0;
    for (int i = 0; i < num_pp(n); i++) acc = add_mod(acc, rotl(bias_word(n, k), 3 * i, n), n);
    return ~acc & mask_of(n);
  endfunction

  // Design-time legality of (n, k): k divides n, k > 1, 3 does not divide k.
  function automatic bit k_is_valid(input int n, input int k);
    return (k > 1) && (n % k == 0) && (k % 3 != 0);
  endfunction

  // Which sparse bit (index i*(n/k)+j, partial product i, chunk j) lands in
  // row r at bit b; -1 if none does.
  function automatic int sparse_owner(input int n, input int k, input int r, input int b);
    for (int i = 0; i < num_pp(n); i++)
      for (int j = 0; j < n / k; j++)
        if (sparse_pos(n, k, i, j) == b && sparse_row(n, k, i, j) == r) return i * (n / k) + j;
    return -1;
  endfunction

  // Number of operands left after level l of a 3:2 carry-save reduction
  // that starts from nops operands.
  function automatic int csa_count(input int nops, input int l);
    int c = nops;
    for (int i = 0; i < l; i++) if (c > 2) c = c - c / 3;
    return c;
  endfunction

  // Number of 3:2 levels needed to reduce nops operands to two.
  function automatic int csa_levels(input int nops);
    int l = 0;
    while (csa_count(nops, l) > 2) l++;
    return l;
  endfunction

endpackage
