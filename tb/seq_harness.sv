// seq_harness: drives one sequential multiplier and checks it.
//
// BOOTH = 1 selects booth_radix2_mult (signed operands), BOOTH = 0 selects
// shift_add_mult (unsigned operands). After 'go' it runs directed operand
// pairs (the sample run 10*16, 20*17, 50*20, 10*16, then the extremes) and
// NVEC random pairs, one multiplication at a time. For each it checks that
// busy is high while the multiplier works, that done is a one-cycle pulse
// arriving WIDTH clock edges after the edge that accepted start, and that
// the product equals a 64-bit reference product and stays put after done.
// add_steps / sub_steps count the add and subtract steps the operands call
// for (for BOOTH, bit pairs 01 and 10 of {b, 0}; otherwise the 1 bits of b).
module seq_harness #(
  parameter int unsigned WIDTH = 8,
  parameter bit          BOOTH = 1'b1,
  parameter int unsigned NVEC  = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   add_steps,
  output int   sub_steps,
  output int   neg_results
);

  logic                 start, busy, done;
  logic [WIDTH-1:0]     a, b;
  logic [2*WIDTH-1:0]   product;

  if (BOOTH) begin : g_booth
    booth_radix2_mult #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .product);
  end else begin : g_sa
    shift_add_mult #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .product);
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [2*WIDTH-1:0] ref_product(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y);
    longint xs, ys;
    logic [63:0] p;
    xs = BOOTH ? longint'($signed(x)) : longint'({1'b0, x});
    ys = BOOTH ? longint'($signed(y)) : longint'({1'b0, y});
    p  = 64'(xs * ys);
    return p[2*WIDTH-1:0];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("seq W=%0d BOOTH=%0d: %s", WIDTH, BOOTH, what);
    end
  endtask

  task automatic run_one(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y);
    int c0, waited;
    logic [2*WIDTH-1:0] e;
    logic [WIDTH:0] yl;
    e = ref_product(x, y);
    yl = {y, 1'b0};
    for (int i = 0; i < WIDTH; i++) begin
      if (BOOTH) begin
        if (yl[i+:2] == 2'b01) add_steps++;      // {Q0, Q-1} = 01 at step i
        if (yl[i+:2] == 2'b10) sub_steps++;      // {Q0, Q-1} = 10
      end else if (y[i]) add_steps++;
    end
    if (BOOTH && e[2*WIDTH-1]) neg_results++;
    @(negedge clk);
    start = 1'b1; a = x; b = y;
    c0 = cyc;
    @(negedge clk);
    start = 1'b0;
    a = WIDTH'($urandom()); b = WIDTH'($urandom());   // operands must be captured
    waited = 0;
    while (!done && waited < 4 * WIDTH + 8) begin
      check(busy, "busy low while working");
      @(negedge clk);
      waited++;
    end
    check(done, "done never rose");
    check(cyc == c0 + WIDTH + 1, $sformatf("done after %0d edges, expected %0d", cyc - c0 - 1, WIDTH));
    check(product == e, $sformatf("%h * %h = %h expected %h", x, y, product, e));
    @(negedge clk);
    check(!done, "done longer than one cycle");
    check(!busy, "busy after done");
    check(product == e, "product not held after done");
  endtask

  initial begin
    logic [WIDTH-1:0] mn, mx;
    checks = 0; failures = 0; add_steps = 0; sub_steps = 0; neg_results = 0;
    finished = 1'b0; start = 1'b0; a = '0; b = '0;
    mn = {1'b1, {(WIDTH-1){1'b0}}};
    mx = {1'b0, {(WIDTH-1){1'b1}}};
    wait (rst_n && go);
    run_one(WIDTH'(10), WIDTH'(16));
    run_one(WIDTH'(20), WIDTH'(17));
    run_one(WIDTH'(50), WIDTH'(20));
    run_one(WIDTH'(10), WIDTH'(16));
    run_one(mn, mn);
    run_one(mn, mx);
    run_one(mx, mn);
    run_one('1, '1);
    run_one('0, '1);
    run_one('1, '0);
    for (int n = 0; n < NVEC; n++) run_one(WIDTH'($urandom()), WIDTH'($urandom()));
    finished = 1'b1;
  end

endmodule
