// tb_blob: a solid rectangle appears exactly inside [x,x+W) x [y,y+H), two
// clocks after its hcount/vcount, only while `display` is high.
module tb_blob;
  logic clk = 0, display = 1;
  logic [23:0] color = 24'h12AB34;
  logic [10:0] hcount = 0, x = 100;
  logic [9:0]  vcount = 0, y = 50;
  logic [23:0] pixel;
  int checks = 0, failures = 0;

  blob #(.WIDTH(44), .HEIGHT(10)) dut (.*);

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

  logic [23:0] want [$];

  initial begin
    int h, v;
    for (int i = 0; i < 5000; i++) begin
      if (i % 1000 == 0) begin x = 11'($urandom_range(0, 1000)); y = 10'($urandom_range(0, 700)); end
      display = ($urandom_range(0, 7) != 0);
      h = int'(x) + $urandom_range(0, 60) - 8;
      v = int'(y) + $urandom_range(0, 20) - 5;
      if (h < 0) h = 0;
      if (v < 0) v = 0;
      hcount = 11'(h); vcount = 10'(v);
      want.push_back((display && h >= int'(x) && h < int'(x) + 44 && v >= int'(y) && v < int'(y) + 10) ? color : 24'h0);
      @(posedge clk); #1;
      if (want.size() > 1) begin
        logic [23:0] w;
        w = want.pop_front();
        check(pixel == w, $sformatf("step %0d got %h want %h", i, pixel, w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
