// tb_booth_multiplier_top: end-to-end test of the whole design at its
// default sizes (32-bit radix-4, 8-bit radix-2 Booth, 8-bit add-and-shift,
// 4x4 array). All four multipliers run at the same time on their own
// operands. The radix-4 path gets a stream of signed and unsigned pairs,
// mostly back to back, and is checked for product, active rows and the
// three-clock latency; the two sequential multipliers get one pair after
// another and are checked for product and the eight-clock run; the array is
// swept over all 256 operand pairs. Each mechanism must occur at least once:
// signed and unsigned radix-4 products, range-gated rows, back-to-back
// issue, Booth add and subtract steps, negative Booth products, add and skip
// steps of the add-and-shift multiplier.
module tb_booth_multiplier_top;

  localparam int R4W = 32, R2W = 8, SAW = 8, AN = 4;
  localparam int NDIG = (R4W + 2) / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               r4_in_valid = 1'b0, r4_is_signed = 1'b0;
  logic [R4W-1:0]     r4_a = '0, r4_b = '0;
  logic               r4_out_valid;
  logic [2*R4W-1:0]   r4_product;
  logic [NDIG-1:0]    r4_rows_active;
  logic               r2_start = 1'b0, r2_busy, r2_done;
  logic [R2W-1:0]     r2_a = '0, r2_b = '0;
  logic [2*R2W-1:0]   r2_product;
  logic               sa_start = 1'b0, sa_busy, sa_done;
  logic [SAW-1:0]     sa_a = '0, sa_b = '0;
  logic [2*SAW-1:0]   sa_product;
  logic [AN-1:0]      arr_a = '0, arr_b = '0;
  logic [2*AN-1:0]    arr_p;

  booth_multiplier_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_signed = 0, n_unsigned = 0, n_gated = 0, n_b2b = 0;
  int n_add = 0, n_sub = 0, n_neg = 0, n_sa_add = 0, n_sa_skip = 0, n_arr = 0;
  bit r4_done = 0, r2_fin = 0, sa_fin = 0, arr_fin = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] mul64(longint x, longint y);
    return 64'(x * y);
  endfunction

  // ------------------------------------------------------------- radix-4
  typedef struct { logic [2*R4W-1:0] prod; int cyc; bit gated; } r4_exp_t;
  r4_exp_t r4_q[$];
  localparam int R4_N = 400;

  initial begin
    automatic int issued = 0;
    automatic bit last = 0;
    wait (rst_n);
    while (issued < R4_N) begin
      @(negedge clk);
      if (issued < 4 || $urandom_range(3, 0) != 0) begin
        logic [R4W-1:0] x, y;
        logic sgn;
        longint xs, ys, lim;
        int k;
        x = $urandom(); y = $urandom();
        if (issued % 3 == 1) y = R4W'($urandom_range(255, 0));       // short multiplier
        if (issued % 3 == 2) y = R4W'(-$urandom_range(1000, 1));     // short negative one
        sgn = 1'($urandom_range(1, 0));
        if (issued == 0) begin x = 50; y = 20; sgn = 1; end
        if (issued == 1) begin x = '1; y = '1; sgn = 0; end
        xs = sgn ? longint'($signed(x)) : longint'({1'b0, x});
        ys = sgn ? longint'($signed(y)) : longint'({1'b0, y});
        // the multiplier needs fewer than NDIG rows when it lies in
        // [-2**(2*NDIG-3), 2**(2*NDIG-3))
        lim = longint'(1) <<< (2 * NDIG - 3);
        r4_q.push_back('{prod: mul64(xs, ys), cyc: cyc, gated: (ys >= -lim && ys < lim)});
        r4_in_valid = 1; r4_is_signed = sgn; r4_a = x; r4_b = y;
        if (sgn) n_signed++; else n_unsigned++;
        if (last) n_b2b++;
        last = 1;
        issued++;
      end else begin
        r4_in_valid = 0;
        last = 0;
      end
    end
    @(negedge clk);
    r4_in_valid = 0;
    wait (r4_q.size() == 0);
    r4_done = 1;
  end

  always @(negedge clk) begin
    if (rst_n && r4_out_valid) begin
      r4_exp_t e;
      check(r4_q.size() != 0, "radix-4 output without input");
      if (r4_q.size() != 0) begin
        e = r4_q.pop_front();
        check(r4_product == e.prod, $sformatf("radix-4 product %h expected %h", r4_product, e.prod));
        check(cyc == e.cyc + 3, $sformatf("radix-4 latency %0d", cyc - e.cyc));
        check(r4_rows_active[NDIG-1] == !e.gated, "radix-4 top row enable");
        if (e.gated) n_gated++;
      end
    end
  end

  // ------------------------------------------------ sequential multipliers
  task automatic seq_run(bit booth, logic [7:0] x, logic [7:0] y);
    int c0;
    logic [15:0] e;
    logic [8:0] yl;
    yl = {y, 1'b0};
    if (booth) begin
      e = 16'(int'($signed(x)) * int'($signed(y)));
      for (int i = 0; i < 8; i++) begin
        if (yl[i+:2] == 2'b01) n_add++;
        if (yl[i+:2] == 2'b10) n_sub++;
      end
      if (e[15]) n_neg++;
    end else begin
      e = 16'(int'(x) * int'(y));
      for (int i = 0; i < 8; i++) if (y[i]) n_sa_add++; else n_sa_skip++;
    end
    @(negedge clk);
    if (booth) begin r2_start = 1; r2_a = x; r2_b = y; end
    else       begin sa_start = 1; sa_a = x; sa_b = y; end
    c0 = cyc;
    @(negedge clk);
    r2_start = 0; sa_start = 0;
    while (!(booth ? r2_done : sa_done) && cyc < c0 + 40) begin
      check(booth ? r2_busy : sa_busy, "busy low while running");
      @(negedge clk);
    end
    check(cyc == c0 + 9, $sformatf("%s run took %0d edges", booth ? "radix-2" : "shift-add", cyc - c0 - 1));
    check((booth ? r2_product : sa_product) == e,
          $sformatf("%s %h*%h = %h expected %h", booth ? "radix-2" : "shift-add", x, y,
                    booth ? r2_product : sa_product, e));
  endtask

  initial begin
    wait (rst_n);
    seq_run(1, 8'd10, 8'd16);
    seq_run(1, 8'd20, 8'd17);
    seq_run(1, 8'd50, 8'd20);
    seq_run(1, 8'h80, 8'h80);
    for (int n = 0; n < 300; n++) seq_run(1, 8'($urandom()), 8'($urandom()));
    r2_fin = 1;
  end

  initial begin
    wait (rst_n);
    seq_run(0, 8'd10, 8'd16);
    seq_run(0, 8'hff, 8'hff);
    for (int n = 0; n < 300; n++) seq_run(0, 8'($urandom()), 8'($urandom()));
    sa_fin = 1;
  end

  // ----------------------------------------------------------------- array
  initial begin
    wait (rst_n);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        arr_a = 4'(i); arr_b = 4'(j);
        #1;
        check(int'(arr_p) == i * j, $sformatf("array %0d*%0d = %0d", i, j, arr_p));
        n_arr++;
      end
    arr_fin = 1;
  end

  // ---------------------------------------------------------------- finish
  task automatic report(bit timed_out);
    string names [10] = '{"radix-4 signed", "radix-4 unsigned", "radix-4 range gating",
                          "radix-4 back-to-back", "Booth add step", "Booth subtract step",
                          "negative Booth product", "shift-add add step", "shift-add skip step",
                          "array product"};
    int counts [10];
    counts = '{n_signed, n_unsigned, n_gated, n_b2b, n_add, n_sub, n_neg, n_sa_add, n_sa_skip, n_arr};
    for (int i = 0; i < 10; i++) begin
      $display("%-24s %0d", names[i], counts[i]);
      check(counts[i] > 0, {names[i], " never happened"});
    end
    if (timed_out) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (r4_done && r2_fin && sa_fin && arr_fin);
    report(0);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    report(1);
    $finish;
  end

endmodule
