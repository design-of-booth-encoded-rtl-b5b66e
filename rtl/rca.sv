// rca: W-bit ripple-carry adder built from a chain of full adders.
//
// s + 2^W * cout = a + b + cin. The carry ripples bit by bit, so the delay
// grows with W; the hard-multiple generator keeps W (the chunk width k)
// small on purpose. Ripple-carry chunks are what the published scheme
// uses for the hard multiple. Purely combinational.
module rca #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];

endmodule
