// tb_background: red must count 0,1,...,255,254,...,0,1,... one step per
// frame tick with green 164 and blue 255, and hold between ticks.
module tb_background;
  logic clk = 0, rst = 1, tick = 0;
  logic [23:0] pixel;
  int checks = 0, failures = 0;

  background dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1200; n++) begin
      want = n % 510;
      if (want > 255) want = 510 - want;
      check(pixel == {8'(want), 8'd164, 8'd255}, $sformatf("tick %0d red %0d want %0d", n, pixel[23:16], want));
      @(posedge clk); #1 tick = 1;
      @(posedge clk); #1 tick = 0;
      check(pixel[23:16] == 8'(((n + 1) % 510 > 255) ? 510 - (n + 1) % 510 : (n + 1) % 510), "one step per tick");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
