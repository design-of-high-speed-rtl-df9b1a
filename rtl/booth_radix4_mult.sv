// booth_radix4_mult: pipelined, configurable signed/unsigned radix-4 Booth
// multiplier with a 3:2 compressor (Wallace) tree.
//
// How it works. The WIDTH-bit multiplier b is extended by its sign bit
// (is_signed = 1) or by a zero (is_signed = 0) to an even number of bits and
// recoded into NDIG = (WIDTH+2)/2 radix-4 Booth digits in {-2..+2}
// (booth_r4_encoder). The multiplicand a, extended the same way to
// WIDTH+1 bits, gives one partial-product row per digit (booth_r4_ppgen),
// shifted left by two places per digit. Negative digits are formed as
// one's complements; their +1 bits are gathered into one correction row.
// The NDIG+1 rows are reduced to a sum and a carry word by a tree of word-wide
// 3:2 compressors (csa_3to2): each tree level replaces every group of three
// words by two. A final carry-propagate adder forms the product. All
// arithmetic is modulo 2**(2*WIDTH), which holds the full product of two
// WIDTH-bit operands both signed and unsigned.
//
// Range gating. A row whose multiplier bits, and all bits above them, are
// nothing but sign extension (all zeros or all ones) can only carry a zero
// digit. Such rows are disabled: their multiplicand input is forced to zero,
// so they do not switch. rows_active reports which rows were enabled.
//
// Timing. Three register stages: operands are captured on the clock edge
// where in_valid is high (stage 1); encoding, row generation and the
// compressor tree follow and the sum/carry pair is registered (stage 2); the
// final adder output is registered (stage 3). out_valid and product appear
// three clock edges after the edge that captured in_valid, and a new operand
// pair may enter every cycle. Reset (asynchronous, active low) clears the
// valid bits and the pipeline registers.
//
// From the document: radix-4 Booth encoding, 3:2 compressors, pipeline
// registers in the data path, signed/unsigned operation, 32-bit default
// width, and disabling switching in inactive ranges. This design's choices:
// the pipeline cut points, the Wallace tree arrangement, one is_signed input
// for both operands, the correction-row handling of negative digits and the
// sign-extension test used for range gating.
module booth_radix4_mult
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned NDIG = (WIDTH + 2) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 is_signed,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic                 out_valid,
  output logic [2*WIDTH-1:0]   product,
  output logic [NDIG-1:0]      rows_active
);

  localparam int unsigned MW   = 2 * NDIG;      // extended multiplier width
  localparam int unsigned XW   = WIDTH + 1;     // extended multiplicand width
  localparam int unsigned PW   = 2 * WIDTH;     // product width
  localparam int unsigned NROW = NDIG + 1;      // digit rows + correction row

  // Addends left after 'lvl' levels of 3:2 compression.
  function automatic int unsigned rows_at(input int unsigned lvl);
    int unsigned n;
    n = NROW;
    for (int unsigned i = 0; i < lvl; i++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  // Tree depth: levels until two addends remain.
  function automatic int unsigned tree_levels();
    int unsigned l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned NLEV = tree_levels();

  // ---------------------------------------------------------------- stage 1
  logic             v1, sgn1;
  logic [WIDTH-1:0] a1, b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      sgn1 <= 1'b0;
      a1   <= '0;
      b1   <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        sgn1 <= is_signed;
        a1   <= a;
        b1   <= b;
      end
    end
  end

  // ------------------------------------------- encoding and row generation
  logic [XW-1:0]   xe;        // extended multiplicand
  logic [MW:0]     bxl;       // extended multiplier with b[-1] = 0 appended
  logic [NDIG-1:0] row_en;

  always_comb begin
    logic uniform;
    xe  = {sgn1 & a1[WIDTH-1], a1};
    bxl = {{(MW - WIDTH){sgn1 & b1[WIDTH-1]}}, b1, 1'b0};
    // Row i is enabled unless bxl[MW:2i] is all equal (pure sign extension).
    uniform = 1'b1;
    for (int k = MW; k >= 0; k--) begin
      uniform = uniform && (bxl[k] == bxl[MW]);
      if (k % 2 == 0 && k / 2 < NDIG) row_en[k / 2] = !uniform;
    end
  end

  booth_sel_t      sel [NDIG];
  logic [PW-1:0]   pp  [NDIG];
  logic [NDIG-1:0] negs;
  logic [PW-1:0]   corr;

  for (genvar i = 0; i < NDIG; i++) begin : g_row
    booth_r4_encoder u_enc (
      .grp (bxl[2*i+2 : 2*i]),
      .sel (sel[i])
    );
    booth_r4_ppgen #(.XW(XW), .PW(PW)) u_pp (
      .x   (xe),
      .sel (sel[i]),
      .en  (row_en[i]),
      .row (pp[i]),
      .neg (negs[i])
    );
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < NDIG; i++)
      if (2 * i < PW) corr[2*i] = negs[i];
  end

  // -------------------------------------------------- 3:2 compressor tree
  // g_lvl[l].w holds the addends after l levels of compression.
  for (genvar l = 0; l <= NLEV; l++) begin : g_lvl
    logic [PW-1:0] w [NROW];
    if (l == 0) begin : g_init
      for (genvar r = 0; r < NROW; r++) begin : g_in
        if (r < NDIG) begin : g_pp
          assign w[r] = pp[r] << (2 * r);
        end else begin : g_corr
          assign w[r] = corr;
        end
      end
    end else begin : g_red
      localparam int unsigned N  = rows_at(l - 1);
      localparam int unsigned NG = N / 3;
      localparam int unsigned NO = 2 * NG + (N % 3);
      for (genvar g = 0; g < NG; g++) begin : g_csa
        csa_3to2 #(.W(PW)) u_csa (
          .x (g_lvl[l-1].w[3*g]),
          .y (g_lvl[l-1].w[3*g+1]),
          .z (g_lvl[l-1].w[3*g+2]),
          .s (w[2*g]),
          .c (w[2*g+1])
        );
      end
      for (genvar r = 0; r < N % 3; r++) begin : g_pass
        assign w[2*NG+r] = g_lvl[l-1].w[3*NG+r];
      end
      for (genvar r = NO; r < NROW; r++) begin : g_unused
        assign w[r] = '0;
      end
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic            v2;
  logic [PW-1:0]   s2, c2;
  logic [NDIG-1:0] en2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2  <= 1'b0;
      s2  <= '0;
      c2  <= '0;
      en2 <= '0;
    end else begin
      v2 <= v1;
      if (v1) begin
        s2  <= g_lvl[NLEV].w[0];
        c2  <= g_lvl[NLEV].w[1];
        en2 <= row_en;
      end
    end
  end

  // ---------------------------------------------------------------- stage 3
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      product     <= '0;
      rows_active <= '0;
    end else begin
      out_valid <= v2;
      if (v2) begin
        product     <= s2 + c2;
        rows_active <= en2;
      end
    end
  end

endmodule
