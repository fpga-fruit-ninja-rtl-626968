// tb_slice_dealer: a fruit is sliced exactly when a cursor pixel and its own
// non-zero pixel coincide while it is active; the level holds until a new
// active fruit of that kind is launched.
module tb_slice_dealer;
  logic clk = 0, rst = 1;
  logic [2:0] active = 3'b111, fruit_new = 0, sliced;
  logic [23:0] cursorpix = 0, applepix = 0, orangepix = 0, peachpix = 0;
  logic [2:0] model = 0;
  int checks = 0, failures = 0;

  slice_dealer dut (.*);

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
    logic [2:0] hit;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      cursorpix = ($urandom_range(0, 3) == 0) ? 24'hFFFF00 : 24'h0;
      applepix  = ($urandom_range(0, 2) == 0) ? 24'($urandom) : 24'h0;
      orangepix = ($urandom_range(0, 2) == 0) ? 24'($urandom) : 24'h0;
      peachpix  = ($urandom_range(0, 2) == 0) ? 24'($urandom) : 24'h0;
      active    = 3'($urandom);
      fruit_new = ($urandom_range(0, 20) == 0) ? 3'($urandom) : 3'b000;
      hit = {peachpix != 0, orangepix != 0, applepix != 0} & {3{cursorpix != 0}};
      for (int f = 0; f < 3; f++)
        if (!model[f]) model[f] = hit[f] && active[f];
        else if (fruit_new[f] && active[f]) model[f] = 0;
      @(posedge clk); #1;
      check(sliced == model, $sformatf("cycle %0d sliced %b want %b", i, sliced, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
