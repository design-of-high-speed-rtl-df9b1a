// tb_booth_radix4_mult: self-checking test of the radix-4 Booth multiplier
// at 32 bits (the default), 16 bits and 8 bits. Each width runs in its own
// r4_harness: directed extremes, then random signed and unsigned operand
// pairs issued back to back, checking product, rows_active and the
// three-clock latency. Fails also if signed, unsigned, range-gated or
// back-to-back products never occurred.
module tb_booth_radix4_mult;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic go = 1'b0;
  always #5 clk = ~clk;

  logic fin [3];
  int   ch [3], fl [3], gt [3], sg [3], us [3], bb [3];

  r4_harness #(.WIDTH(32), .NVEC(3000)) h32 (.clk, .rst_n, .go, .finished(fin[0]), .checks(ch[0]),
    .failures(fl[0]), .gated_cnt(gt[0]), .signed_cnt(sg[0]), .unsigned_cnt(us[0]), .b2b_cnt(bb[0]));
  r4_harness #(.WIDTH(16), .NVEC(3000)) h16 (.clk, .rst_n, .go, .finished(fin[1]), .checks(ch[1]),
    .failures(fl[1]), .gated_cnt(gt[1]), .signed_cnt(sg[1]), .unsigned_cnt(us[1]), .b2b_cnt(bb[1]));
  r4_harness #(.WIDTH(8), .NVEC(3000)) h8 (.clk, .rst_n, .go, .finished(fin[2]), .checks(ch[2]),
    .failures(fl[2]), .gated_cnt(gt[2]), .signed_cnt(sg[2]), .unsigned_cnt(us[2]), .b2b_cnt(bb[2]));

  int checks, failures;
  int timeouts = 0;

  task automatic report();
    checks = 0; failures = timeouts;
    for (int i = 0; i < 3; i++) begin
      checks += ch[i] + 4; failures += fl[i];
      if (sg[i] == 0) begin failures++; $display("harness %0d: no signed product", i); end
      if (us[i] == 0) begin failures++; $display("harness %0d: no unsigned product", i); end
      if (gt[i] == 0) begin failures++; $display("harness %0d: range gating never used", i); end
      if (bb[i] == 0) begin failures++; $display("harness %0d: no back-to-back issue", i); end
      $display("harness %0d: signed %0d unsigned %0d gated %0d back-to-back %0d", i, sg[i], us[i], gt[i], bb[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    go = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    repeat (2) @(posedge clk);
    report();
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    timeouts = 1;
    report();
    $finish;
  end

endmodule
