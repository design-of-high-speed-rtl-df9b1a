// booth_r4_ppgen: one radix-4 Booth partial-product row.
//
// From the XW-bit signed (already sign or zero extended) multiplicand x and
// the digit selects, the row is 0, x or 2x, sign-extended to PW bits; for a
// negative digit the row is inverted and 'neg' is raised, the +1 that
// completes the two's complement being added later as a separate correction
// bit at the row's weight. The row is not yet shifted to its weight.
//
// When 'en' is low the multiplicand is gated to zero before the selector, so
// the row's logic does not switch and it contributes nothing. The multiplier
// uses this for rows beyond the multiplier operand's effective range, the
// switching-disable idea the document states; how the gate is built is this
// design's choice.
//
// Purely combinational.
module booth_r4_ppgen
  import booth_pkg::*;
#(
  parameter int unsigned XW = 33,   // extended multiplicand width
  parameter int unsigned PW = 64    // row (product) width, PW >= XW + 1
) (
  input  logic [XW-1:0] x,
  input  booth_sel_t    sel,
  input  logic          en,
  output logic [PW-1:0] row,
  output logic          neg
);

  logic [XW-1:0] xg;      // gated multiplicand
  logic [PW-1:0] x1, x2;  // x and 2x, sign-extended to PW bits
  logic [PW-1:0] mag;

  always_comb begin
    xg  = en ? x : '0;
    x1  = PW'($signed(xg));
    x2  = x1 << 1;
    mag = sel.two ? x2 : (sel.one ? x1 : '0);
    neg = en && sel.neg;
    row = neg ? ~mag : mag;
  end

endmodule
