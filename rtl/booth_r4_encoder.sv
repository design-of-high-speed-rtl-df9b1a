// booth_r4_encoder: radix-4 (modified) Booth recoder for one digit.
//
// The multiplier is scanned in overlapping groups of three bits
// grp = {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0) and each group is recoded into
// one digit d = -2*b[2i+1] + b[2i] + b[2i-1], so that a k-bit multiplier
// becomes k/2 radix-4 digits and only half as many partial products are
// needed as with radix-2. The digit leaves as neg/one/two selects
// (booth_pkg::booth_sel_t). Group 111 is recoded as +0 (neg = 0) so that a
// zero row never needs a correction bit.
//
// Purely combinational. The recoding rule is the standard radix-4 Booth one
// that the document names; the select encoding is this design's choice.
module booth_r4_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  grp,
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp == 3'b011) || (grp == 3'b100);
    sel.neg = grp[2] && !(grp[1] && grp[0]);
  end

endmodule
