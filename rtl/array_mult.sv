// array_mult: combinational unsigned N x N array multiplier.
//
// How it works. Partial product j is a & {N{b[j]}} (one AND gate per bit).
// Row 0 needs no adder: its bit 0 is p[0] and its upper bits, with a 0 on
// top, form the running sum. Each further row j = 1..N-1 is a ripple-carry
// row of N full adders (full_adder) that adds partial product j to the
// running sum, with carry-in 0 at its right end; the row's bit 0 is p[j] and
// its upper sum bits plus the row's carry out are passed down. The last
// row's outputs are p[2N-1:N]. The delay grows with N through the rows and
// the ripple inside each.
//
// Interface: a, b in, p = a * b out, no clock.
//
// From the document: partial products that are 0 or the multiplicand
// according to the multiplier bit, each shifted one place left of the one
// before, summed by three rows of four adder cells with 0 inputs at the top
// and at the right end of each row; inputs a0..a3, b0..b3, outputs p0..p7.
// That the cells are full adders and that each row's carry ripples to the
// left is this design's reading of the drawing.
module array_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // g_row[j].sum_out holds the N running-sum bits passed to row j+1
  for (genvar j = 0; j < N; j++) begin : g_row
    logic [N-1:0] sum_out;
    logic         p_bit;
    if (j == 0) begin : g_first
      logic [N-1:0] pp;
      assign pp      = a & {N{b[0]}};
      assign p_bit   = pp[0];
      assign sum_out = {1'b0, pp[N-1:1]};
    end else begin : g_add
      logic [N-1:0] pp, s;
      assign pp = a & {N{b[j]}};
      for (genvar i = 0; i < N; i++) begin : g_cell
        logic ci;   // carry from the cell to the right, 0 at the row's end
        logic co;   // carry to the cell to the left
        if (i == 0) begin : g_lsb
          assign ci = 1'b0;
        end else begin : g_mid
          assign ci = g_cell[i-1].co;
        end
        full_adder u_fa (.a(pp[i]), .b(g_row[j-1].sum_out[i]), .ci(ci),
                         .s(s[i]), .co(co));
      end
      assign p_bit   = s[0];
      assign sum_out = {g_cell[N-1].co, s[N-1:1]};
    end
    assign p[j] = p_bit;
  end

  assign p[2*N-1:N] = g_row[N-1].sum_out;

endmodule
