// booth_multiplier_top: the multipliers of this design side by side.
//
// The design compares ways of multiplying in hardware and proposes the
// radix-4 Booth multiplier. The top holds one of each, sharing only the
// clock and reset, each with its own operand and result ports:
//   * r4_*  booth_radix4_mult: pipelined radix-4 Booth multiplier with a
//           3:2 compressor tree, signed or unsigned, R4_WIDTH bits
//           (32 by default), product three clocks after r4_in_valid;
//   * r2_*  booth_radix2_mult: sequential radix-2 Booth signed multiplier,
//           R2_WIDTH bits (8 by default), R2_WIDTH clocks per product;
//   * sa_*  shift_add_mult: sequential unsigned add-and-shift multiplier,
//           SA_WIDTH bits, SA_WIDTH clocks per product;
//   * arr_* array_mult: combinational ARR_N x ARR_N array multiplier (4x4).
// No logic is shared; see each module for its timing. Which blocks exist and
// their default sizes follow the document; putting them side by side in one
// top is this design's choice.
module booth_multiplier_top #(
  parameter int unsigned R4_WIDTH = 32,
  parameter int unsigned R2_WIDTH = 8,
  parameter int unsigned SA_WIDTH = 8,
  parameter int unsigned ARR_N    = 4,
  localparam int unsigned R4_NDIG = (R4_WIDTH + 2) / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // radix-4 Booth, pipelined
  input  logic                    r4_in_valid,
  input  logic                    r4_is_signed,
  input  logic [R4_WIDTH-1:0]     r4_a,
  input  logic [R4_WIDTH-1:0]     r4_b,
  output logic                    r4_out_valid,
  output logic [2*R4_WIDTH-1:0]   r4_product,
  output logic [R4_NDIG-1:0]      r4_rows_active,
  // radix-2 Booth, sequential
  input  logic                    r2_start,
  input  logic [R2_WIDTH-1:0]     r2_a,
  input  logic [R2_WIDTH-1:0]     r2_b,
  output logic                    r2_busy,
  output logic                    r2_done,
  output logic [2*R2_WIDTH-1:0]   r2_product,
  // add-and-shift, sequential
  input  logic                    sa_start,
  input  logic [SA_WIDTH-1:0]     sa_a,
  input  logic [SA_WIDTH-1:0]     sa_b,
  output logic                    sa_busy,
  output logic                    sa_done,
  output logic [2*SA_WIDTH-1:0]   sa_product,
  // array, combinational
  input  logic [ARR_N-1:0]        arr_a,
  input  logic [ARR_N-1:0]        arr_b,
  output logic [2*ARR_N-1:0]      arr_p
);

  booth_radix4_mult #(.WIDTH(R4_WIDTH)) u_r4 (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (r4_in_valid),
    .is_signed   (r4_is_signed),
    .a           (r4_a),
    .b           (r4_b),
    .out_valid   (r4_out_valid),
    .product     (r4_product),
    .rows_active (r4_rows_active)
  );

  booth_radix2_mult #(.WIDTH(R2_WIDTH)) u_r2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (r2_start),
    .a       (r2_a),
    .b       (r2_b),
    .busy    (r2_busy),
    .done    (r2_done),
    .product (r2_product)
  );

  shift_add_mult #(.WIDTH(SA_WIDTH)) u_sa (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (sa_start),
    .a       (sa_a),
    .b       (sa_b),
    .busy    (sa_busy),
    .done    (sa_done),
    .product (sa_product)
  );

  array_mult #(.N(ARR_N)) u_arr (
    .a (arr_a),
    .b (arr_b),
    .p (arr_p)
  );

endmodule
