// tb_debounce: a bouncing input must not reach `clean`; a level held for
// DELAY+1 clocks must, after exactly that long.
module tb_debounce;
  localparam int DELAY = 20;
  logic clk = 0, rst = 1, noisy = 0, clean;
  int checks = 0, failures = 0;

  debounce #(.DELAY(DELAY)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    check(clean == 0, "reset value");
    for (int round = 0; round < 4; round++) begin
      logic target;
      int   n;
      target = (round % 2 == 0);
      // bounce: toggles faster than DELAY
      for (int b = 0; b < 6; b++) begin
        noisy = !noisy;
        repeat ($urandom_range(1, DELAY - 2)) @(posedge clk);
        #1 check(clean == !target, "bounce filtered");
      end
      noisy = target;
      n = 0;
      while (clean != target && n < 5 * DELAY) begin @(posedge clk); #1 n++; end
      check(clean == target, "settles");
      check(n == DELAY + 2, $sformatf("settle time %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
