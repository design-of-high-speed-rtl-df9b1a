// csa_3to2: word-wide 3:2 compressor (carry-save adder).
//
// Each bit position is a full adder with no carry chain: s = x ^ y ^ z and
// the majority carry goes to the next position, so x + y + z == s + c
// (mod 2**W). Three addends become two in one full-adder delay whatever W
// is; the radix-4 multiplier reduces its partial products with these, as the
// document proposes. The carry out of the top bit is dropped, which is
// harmless because the multiplier works modulo 2**W. Bit 0 of c is always 0;
// it is kept so that s and c have the same weight and width.
//
// Purely combinational.
module csa_3to2 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-2:0] maj;   // majority of the low W-1 positions

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    c   = {maj, 1'b0};
  end

endmodule
