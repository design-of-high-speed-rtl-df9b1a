// tb_array_mult: test of the array multiplier: exhaustive at 4x4 (its
// default) and random at 8x8. Every product must equal a * b.
module tb_array_mult;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  array_mult            dut4 (.a(a4), .b(b4), .p(p4));
  array_mult #(.N(8))   dut8 (.a(a8), .b(b8), .p(p8));

  initial begin : watchdog
    #1000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (int'(p4) != i * j) begin
          failures++;
          if (failures < 20) $display("4x4: %0d*%0d = %0d", i, j, p4);
        end
      end
    for (int n = 0; n < 3000; n++) begin
      a8 = 8'($urandom()); b8 = 8'($urandom());
      if (n == 0) begin a8 = '1; b8 = '1; end
      #1;
      checks++;
      if (int'(p8) != int'(a8) * int'(b8)) begin
        failures++;
        if (failures < 20) $display("8x8: %0d*%0d = %0d", a8, b8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
