// tb_shift_add_mult: self-checking test of shift_add_mult at 8 bits (its default)
// and at 16 bits, one seq_harness each: directed and random operands,
// product, busy/done handshake and the WIDTH-clock latency. Fails also if
// the operands never called for the add step.
module tb_shift_add_mult;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic go = 1'b0;
  always #5 clk = ~clk;

  logic fin [2];
  int   ch [2], fl [2], ad [2], sb [2], ng [2];
  int   checks, failures;
  int   timeouts = 0;

  seq_harness #(.WIDTH(8), .BOOTH(1'b0), .NVEC(3000)) h8 (.clk, .rst_n, .go, .finished(fin[0]),
    .checks(ch[0]), .failures(fl[0]), .add_steps(ad[0]), .sub_steps(sb[0]), .neg_results(ng[0]));
  seq_harness #(.WIDTH(16), .BOOTH(1'b0), .NVEC(2000)) h16 (.clk, .rst_n, .go, .finished(fin[1]),
    .checks(ch[1]), .failures(fl[1]), .add_steps(ad[1]), .sub_steps(sb[1]), .neg_results(ng[1]));

  task automatic report();
    checks = 0; failures = timeouts;
    for (int i = 0; i < 2; i++) begin
      checks += ch[i] + 1; failures += fl[i];
      if (ad[i] == 0) begin failures++; $display("harness %0d: no add step", i); end
      $display("harness %0d: add steps %0d subtract steps %0d negative products %0d", i, ad[i], sb[i], ng[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    go = 1'b1;
    wait (fin[0] && fin[1]);
    report();
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    timeouts = 1;
    report();
    $finish;
  end

endmodule
