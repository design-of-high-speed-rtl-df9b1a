// tb_sample_run: the sample operand sequence 0*0, 10*16, 20*17, 50*20,
// 10*16 (products 0, 160, 340, 1000, 160), applied in turn to the radix-2
// Booth multiplier at 8 and 16 bits, to the radix-4 Booth multiplier at 8,
// 16 and 32 bits in both signed and unsigned mode, and to the add-and-shift
// multiplier at 8 bits: the evaluated configurations of this design. The
// operands change every 10 time units as in a plain stimulus waveform; each
// multiplier is given the clocks it needs, and its products are checked in
// order along with the radix-4 latency of three clocks.
module tb_sample_run;

  localparam int NS = 5;
  localparam int SA [NS] = '{0, 10, 20, 50, 10};
  localparam int SB [NS] = '{0, 16, 17, 20, 16};
  localparam int SP [NS] = '{0, 160, 340, 1000, 160};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ radix-4
  logic        v, sg;
  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;
  logic        ov8, ov16, ov32;
  logic [15:0] p8;
  logic [31:0] p16;
  logic [63:0] p32;
  logic [4:0]  r8;
  logic [8:0]  r16;
  logic [16:0] r32;

  booth_radix4_mult #(.WIDTH(8))  u_r4_8  (.clk, .rst_n, .in_valid(v), .is_signed(sg), .a(a8),  .b(b8),
                                           .out_valid(ov8),  .product(p8),  .rows_active(r8));
  booth_radix4_mult #(.WIDTH(16)) u_r4_16 (.clk, .rst_n, .in_valid(v), .is_signed(sg), .a(a16), .b(b16),
                                           .out_valid(ov16), .product(p16), .rows_active(r16));
  booth_radix4_mult               u_r4_32 (.clk, .rst_n, .in_valid(v), .is_signed(sg), .a(a32), .b(b32),
                                           .out_valid(ov32), .product(p32), .rows_active(r32));

  // --------------------------------------------------------- sequential
  logic        st;
  logic [7:0]  sa8, sb8;
  logic [15:0] sa16, sb16;
  logic        bz2_8, dn2_8, bz2_16, dn2_16, bzs, dns;
  logic [15:0] q2_8, qs;
  logic [31:0] q2_16;

  booth_radix2_mult               u_r2_8  (.clk, .rst_n, .start(st), .a(sa8),  .b(sb8),
                                           .busy(bz2_8),  .done(dn2_8),  .product(q2_8));
  booth_radix2_mult #(.WIDTH(16)) u_r2_16 (.clk, .rst_n, .start(st), .a(sa16), .b(sb16),
                                           .busy(bz2_16), .done(dn2_16), .product(q2_16));
  shift_add_mult                  u_sa_8  (.clk, .rst_n, .start(st), .a(sa8),  .b(sb8),
                                           .busy(bzs),    .done(dns),    .product(qs));

  initial begin
    v = 0; sg = 0; st = 0;
    {a8, b8, a16, b16, a32, b32, sa8, sb8, sa16, sb16} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // radix-4: one operand pair per clock, signed then unsigned
    for (int m = 0; m < 2; m++) begin
      fork
        begin
          for (int i = 0; i < NS; i++) begin
            @(negedge clk);
            v = 1; sg = (m == 0);
            a8 = 8'(SA[i]);   b8 = 8'(SB[i]);
            a16 = 16'(SA[i]); b16 = 16'(SB[i]);
            a32 = 32'(SA[i]); b32 = 32'(SB[i]);
          end
          @(negedge clk);
          v = 0;
        end
        begin
          @(negedge clk);   // first pair driven here
          repeat (3) @(negedge clk);
          for (int i = 0; i < NS; i++) begin
            check(ov8 && ov16 && ov32, $sformatf("radix-4 product %0d not out after 3 clocks", i));
            check(int'(p8) == SP[i],  $sformatf("radix-4/8: %0d", p8));
            check(int'(p16) == SP[i], $sformatf("radix-4/16: %0d", p16));
            check(p32 == 64'(SP[i]),  $sformatf("radix-4/32: %0d", p32));
            @(negedge clk);
          end
        end
      join
    end

    // sequential: one multiplication per operand pair
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      st = 1;
      sa8 = 8'(SA[i]);   sb8 = 8'(SB[i]);
      sa16 = 16'(SA[i]); sb16 = 16'(SB[i]);
      @(negedge clk);
      st = 0;
      repeat (8) @(negedge clk);
      check(dn2_8 && dns, $sformatf("8-bit sequential product %0d not ready after 8 clocks", i));
      check(int'(q2_8) == SP[i], $sformatf("radix-2/8: %0d", q2_8));
      check(int'(qs) == SP[i],   $sformatf("shift-add/8: %0d", qs));
      repeat (8) @(negedge clk);
      check(dn2_16, $sformatf("16-bit radix-2 product %0d not ready after 16 clocks", i));
      check(int'(q2_16) == SP[i], $sformatf("radix-2/16: %0d", q2_16));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
