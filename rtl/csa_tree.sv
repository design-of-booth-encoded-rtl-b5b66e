// csa_tree: modulo 2^N-1 carry-save adder tree.
//
// Reduces NOPS operand rows to a sum and a carry row with levels of csa32
// compressors (Wallace style): at each level the rows are taken three at a
// time, each triple becomes two rows, and the one or two rows left over pass
// on unchanged. All carries wrap around end to end, so no carry leaves the
// N-bit rows and
//     sum + carry = sum of ops   (mod 2^N-1).
// The level count is ceil(log_1.5(NOPS/2)); it is computed at elaboration.
// Accumulating the partial products and the compensation constant in a
// carry-save tree follows the multiplier's published scheme; the Wallace
// grouping of the rows is this design's choice. Purely combinational.
module csa_tree
  import mod_mul_pkg::*;
#(
  parameter int N    = 8,
  parameter int NOPS = 5,
  localparam int L   = csa_levels(NOPS)
) (
  input  logic [N-1:0] ops [NOPS],
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);

  // g_lvl[l].rows holds the csa_count(NOPS, l+1) rows left after level l
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int CNT = csa_count(NOPS, l);
    localparam int G   = CNT / 3;
    logic [N-1:0] in_rows [CNT];
    logic [N-1:0] rows [csa_count(NOPS, l + 1)];

    for (genvar t = 0; t < CNT; t++) begin : g_in
      if (l == 0) begin : g_first
        assign in_rows[t] = ops[t];
      end else begin : g_next
        assign in_rows[t] = g_lvl[l-1].rows[t];
      end
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa32 #(.N(N)) u_csa (
        .a(in_rows[3*g]), .b(in_rows[3*g+1]), .c(in_rows[3*g+2]),
        .s(rows[2*g]), .cy(rows[2*g+1])
      );
    end
    for (genvar t = 3 * G; t < CNT; t++) begin : g_pass
      assign rows[2*G + t - 3*G] = in_rows[t];
    end
  end

  if (L == 0) begin : g_short
    assign sum   = ops[0];
    if (NOPS >= 2) begin : g_two
      assign carry = ops[1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum   = g_lvl[L-1].rows[0];
    assign carry = g_lvl[L-1].rows[1];
  end

endmodule
