// tb_slower: checks the three-register latency of flag and value.
module tb_slower;
  logic clk = 0, r_in = 0, r;
  logic [15:0] c_in = 0, c;
  logic        rh [4];
  logic [15:0] ch [4];
  int checks = 0, failures = 0;

  slower dut (.*);

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
    for (int i = 0; i < 200; i++) begin
      r_in = 1'($urandom); c_in = 16'($urandom);
      @(posedge clk); #1;
      for (int k = 3; k > 0; k--) begin rh[k] = rh[k-1]; ch[k] = ch[k-1]; end
      rh[0] = r_in; ch[0] = c_in;
      // after this edge the output shows the input sampled 3 edges ago
      if (i >= 3) check(r == rh[2] && c == ch[2], $sformatf("latency at %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
