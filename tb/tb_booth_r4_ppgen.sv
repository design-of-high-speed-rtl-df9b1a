// tb_booth_r4_ppgen: test of one Booth partial-product row with a 9-bit
// multiplicand and a 16-bit row. For every digit -2..+2, the enable on and
// off, and random multiplicands, row + neg must equal digit * x (x signed)
// modulo 2**16, and a disabled row must be all zero with neg low.
module tb_booth_r4_ppgen;
  import booth_pkg::*;

  localparam int XW = 9;
  localparam int PW = 16;

  logic [XW-1:0] x;
  booth_sel_t    sel;
  logic          en;
  logic [PW-1:0] row;
  logic          neg;
  int checks = 0, failures = 0;

  booth_r4_ppgen #(.XW(XW), .PW(PW)) dut (.x, .sel, .en, .row, .neg);

  initial begin : watchdog
    #1000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int d;
      logic [PW-1:0] want, got;
      d   = $urandom_range(4, 0) - 2;
      x   = XW'($urandom());
      if (n < 8) x = (n % 2 == 1) ? {1'b1, {(XW-1){1'b0}}} : '1;
      en  = ($urandom_range(3, 0) != 0);
      sel.neg = (d < 0);
      sel.one = (d == 1 || d == -1);
      sel.two = (d == 2 || d == -2);
      #1;
      want = en ? PW'(d * int'($signed(x))) : '0;
      got  = row + PW'(neg);
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 20) $display("x=%h d=%0d en=%b: row+neg=%h expected %h", x, d, en, got, want);
      end
      if (!en) begin
        checks++;
        if (row !== '0 || neg) begin failures++; $display("disabled row not zero"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
