// tb_booth_r4_encoder: exhaustive test of the radix-4 Booth recoder. For all
// eight groups {b[2i+1], b[2i], b[2i-1]} the selects must encode the digit
// -2*b[2i+1] + b[2i] + b[2i-1], never select 1 and 2 at once, and never mark
// a zero digit negative.
module tb_booth_r4_encoder;
  import booth_pkg::*;

  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_r4_encoder dut (.grp, .sel);

  initial begin : watchdog
    #10000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int want, got;
      grp = 3'(g);
      #1;
      want = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got  = sel.two ? 2 : (sel.one ? 1 : 0);
      if (sel.neg) got = -got;
      checks++;
      if (got != want) begin failures++; $display("group %b: digit %0d expected %0d", grp, got, want); end
      checks++;
      if (sel.one && sel.two) begin failures++; $display("group %b: one and two both set", grp); end
      checks++;
      if (want == 0 && sel.neg) begin failures++; $display("group %b: zero digit marked negative", grp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
