// csa32: N-bit 3:2 carry-save adder modulo 2^N-1.
//
// A row of full adders: s = a ^ b ^ c and the majority carries, which are
// worth twice their column. Modulo 2^N-1 the carry out of the top column has
// weight 2^N = 1, so the carry word is the majority word rotated left by one
// bit (end-around carry without any propagation):
//     s + cy = a + b + c   (mod 2^N-1).
// End-around-carry carry-save addition is the standard modulo 2^N-1
// technique the multiplier relies on. Purely combinational.
module csa32 #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);

  logic [N-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign cy  = {maj[N-2:0], maj[N-1]};

endmodule
