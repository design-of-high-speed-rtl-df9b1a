// tb_csa_3to2: random test of the 3:2 compressor at 16 bits: s must be the
// bitwise parity of the inputs and s + c must equal x + y + z modulo 2**16.
module tb_csa_3to2;
  localparam int W = 16;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_3to2 #(.W(W)) dut (.x, .y, .z, .s, .c);

  initial begin : watchdog
    #1000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      x = W'($urandom()); y = W'($urandom()); z = W'($urandom());
      if (n == 0) begin x = '1; y = '1; z = '1; end
      #1;
      checks++;
      if (W'(s + c) !== W'(x + y + z)) begin
        failures++;
        if (failures < 20) $display("%h+%h+%h: s+c=%h", x, y, z, W'(s + c));
      end
      checks++;
      if (s !== (x ^ y ^ z)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
