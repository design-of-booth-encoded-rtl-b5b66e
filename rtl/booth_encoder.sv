// booth_encoder: radix-8 Booth recoder for one digit of the multiplier.
//
// The multiplier is scanned in overlapping 4-bit groups
// grp = {y[3i+2], y[3i+1], y[3i], y[3i-1]}; the lowest bit of each group is
// the top bit of the group below it. The group is worth
// -4*grp[3] + 2*grp[2] + grp[1] + grp[0], a digit in -4..+4. The recoding
// follows the radix-8 Booth table: the digit is returned as a sign and a
// one-hot magnitude (one, two, three, four; all clear for 0).
// The sign is simply the top bit of the group, so group 1111 comes out as a
// negative zero; the selector turns that into the all-ones word, which is
// zero modulo 2^n-1 as well. The sign/one-hot output encoding is this
// design's choice. Purely combinational.
module booth_encoder
  import mod_mul_pkg::*;
(
  input  logic [3:0]  grp,
  output booth_sel_t  sel
);

  always_comb begin
    sel = '0;
    sel.neg = grp[3];
    unique case (grp)
      4'b0000, 4'b1111: ;                      // 0
      4'b0001, 4'b0010,
      4'b1101, 4'b1110: sel.one   = 1'b1;      // +-1 X
      4'b0011, 4'b0100,
      4'b1011, 4'b1100: sel.two   = 1'b1;      // +-2 X
      4'b0101, 4'b0110,
      4'b1001, 4'b1010: sel.three = 1'b1;      // +-3 X
      4'b0111, 4'b1000: sel.four  = 1'b1;      // +-4 X
      default: ;
    endcase
  end

endmodule
