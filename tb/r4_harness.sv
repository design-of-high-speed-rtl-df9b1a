// r4_harness: drives one booth_radix4_mult of a given WIDTH and checks it.
//
// After 'go' it first applies directed operand pairs (zero, the extremes of
// both number systems, and the small values 10*16, 20*17, 50*20 used as a
// sample run of the multiplier), then NVEC random pairs, with in_valid held
// high most cycles so that products follow each other back to back. Random
// operands are drawn at random magnitudes so that the range gating of the
// partial-product rows is exercised. Every product is compared with a
// 64-bit reference multiplication, rows_active with the number of rows the
// multiplier operand's range needs, and the arrival cycle with the
// three-clock latency. 'finished' rises once every product has come out.
module r4_harness #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NVEC  = 2000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   gated_cnt,     // products with at least one row disabled
  output int   signed_cnt,
  output int   unsigned_cnt,
  output int   b2b_cnt        // products issued in the cycle after another
);

  localparam int unsigned NDIG    = (WIDTH + 2) / 2;
  localparam int unsigned LATENCY = 3;
  localparam int unsigned NDIR    = 12;

  logic                 in_valid, is_signed, out_valid;
  logic [WIDTH-1:0]     a, b;
  logic [2*WIDTH-1:0]   product;
  logic [NDIG-1:0]      rows_active;

  booth_radix4_mult #(.WIDTH(WIDTH)) dut (
    .clk, .rst_n, .in_valid, .is_signed, .a, .b, .out_valid, .product, .rows_active
  );

  typedef struct {
    logic [2*WIDTH-1:0] prod;
    logic [NDIG-1:0]    rows;
    int                 cyc;
  } exp_t;

  exp_t exp_q[$];
  int   cyc = 0;
  int   issued;
  logic last_valid;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [2*WIDTH-1:0] ref_product(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic sgn);
    longint xs, ys;
    logic [63:0] p;
    xs = sgn ? longint'($signed(x)) : longint'({1'b0, x});
    ys = sgn ? longint'($signed(y)) : longint'({1'b0, y});
    p  = 64'(xs * ys);
    return p[2*WIDTH-1:0];
  endfunction

  // Rows needed: the least k such that the extended multiplier value v lies
  // in [-2**(2k-1), 2**(2k-1)), with k = 0 only for v = 0.
  function automatic logic [NDIG-1:0] ref_rows(logic [WIDTH-1:0] y, logic sgn);
    longint v, lim;
    int k;
    v = sgn ? longint'($signed(y)) : longint'({1'b0, y});
    k = NDIG;
    if (v == 0) k = 0;
    else
      for (int i = NDIG; i >= 1; i--) begin
        lim = longint'(1) <<< (2 * i - 1);
        if (v >= -lim && v < lim) k = i;
      end
    return NDIG'((longint'(1) <<< k) - 1);
  endfunction

  function automatic logic [WIDTH-1:0] rand_operand();
    int unsigned mag;
    logic [63:0] r;
    r   = {$urandom(), $urandom()};
    mag = $urandom_range(WIDTH, 1);
    // keep 'mag' low bits and sign- or zero-fill above
    if ($urandom_range(1, 0) == 1) r = r | ~((64'd1 << mag) - 1);
    else                           r = r &  ((64'd1 << mag) - 1);
    return r[WIDTH-1:0];
  endfunction

  function automatic void dir_operands(int n, output logic [WIDTH-1:0] x, output logic [WIDTH-1:0] y,
                                       output logic sgn);
    logic [WIDTH-1:0] mn, mx, ones;
    mn   = {1'b1, {(WIDTH-1){1'b0}}};
    mx   = {1'b0, {(WIDTH-1){1'b1}}};
    ones = '1;
    case (n)
      0:  begin x = WIDTH'(10); y = WIDTH'(16); sgn = 1'b1; end
      1:  begin x = WIDTH'(20); y = WIDTH'(17); sgn = 1'b1; end
      2:  begin x = WIDTH'(50); y = WIDTH'(20); sgn = 1'b1; end
      3:  begin x = WIDTH'(10); y = WIDTH'(16); sgn = 1'b0; end
      4:  begin x = '0;   y = ones; sgn = 1'b1; end
      5:  begin x = mn;   y = mn;   sgn = 1'b1; end
      6:  begin x = mn;   y = mx;   sgn = 1'b1; end
      7:  begin x = mx;   y = mx;   sgn = 1'b1; end
      8:  begin x = ones; y = ones; sgn = 1'b0; end
      9:  begin x = ones; y = ones; sgn = 1'b1; end
      10: begin x = mn;   y = ones; sgn = 1'b0; end
      default: begin x = ones; y = mn; sgn = 1'b1; end
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; gated_cnt = 0; signed_cnt = 0; unsigned_cnt = 0; b2b_cnt = 0;
    finished = 1'b0; in_valid = 1'b0; is_signed = 1'b0; a = '0; b = '0;
    issued = 0; last_valid = 1'b0;
  end

  // Monitor first, then drive, both at the falling edge.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        failures++;
        if (failures < 20) $display("r4 W=%0d: unexpected output", WIDTH);
      end else begin
        e = exp_q.pop_front();
        checks++;
        if (product !== e.prod) begin
          failures++;
          if (failures < 20) $display("r4 W=%0d: product %h expected %h", WIDTH, product, e.prod);
        end
        checks++;
        if (rows_active !== e.rows) begin
          failures++;
          if (failures < 20) $display("r4 W=%0d: rows_active %b expected %b", WIDTH, rows_active, e.rows);
        end
        checks++;
        if (cyc != e.cyc + LATENCY) begin
          failures++;
          if (failures < 20) $display("r4 W=%0d: latency %0d expected %0d", WIDTH, cyc - e.cyc, LATENCY);
        end
      end
    end
    if (rst_n && go && issued < NDIR + NVEC) begin
      logic [WIDTH-1:0] x, y;
      logic sgn;
      if (issued < NDIR || $urandom_range(7, 0) != 0) begin
        if (issued < NDIR) dir_operands(issued, x, y, sgn);
        else begin
          x = rand_operand(); y = rand_operand(); sgn = 1'($urandom_range(1, 0));
        end
        in_valid  = 1'b1;
        is_signed = sgn;
        a = x; b = y;
        exp_q.push_back('{prod: ref_product(x, y, sgn), rows: ref_rows(y, sgn), cyc: cyc});
        if (sgn) signed_cnt++; else unsigned_cnt++;
        if (ref_rows(y, sgn) != '1) gated_cnt++;
        if (last_valid) b2b_cnt++;
        issued++;
      end else begin
        in_valid = 1'b0;
        a = WIDTH'($urandom());   // idle operands must not matter
      end
      last_valid = in_valid;
    end else begin
      in_valid   = 1'b0;
      last_valid = 1'b0;
      if (issued == NDIR + NVEC && exp_q.size() == 0) finished = 1'b1;
    end
  end

endmodule
