// tb_score_display: for values 0..120, probes the centre of each of the 14
// segments and checks lit/unlit against the usual seven-segment shapes of
// the two decimal digits (values over 99 show 99).
module tb_score_display;
  logic clk = 0;
  logic [7:0]  value = 0;
  logic [23:0] color = 24'hFFFFFF, pixel;
  logic [10:0] hcount = 0, x = 512;
  logic [9:0]  vcount = 0, y = 325;
  int checks = 0, failures = 0;

  score_display dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segment names a..g: a top, b upper right, c lower right, d bottom,
  // e lower left, f upper left, g middle; probe points are segment centres
  // that no other segment covers.
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  int px [7] = '{22, 39, 39, 22, 5, 5, 22};
  int py [7] = '{5, 22, 60, 83, 60, 22, 39};

  function automatic bit on(int d, int s);
    for (int i = 0; i < lit[d].len(); i++) if (lit[d][i] == byte'("a" + s)) return 1;
    return 0;
  endfunction

  initial begin
    int shown, t, o;
    for (int val = 0; val <= 120; val++) begin
      value = 8'(val);
      shown = (val > 99) ? 99 : val;
      t = shown / 10; o = shown % 10;
      repeat (2) @(posedge clk);
      for (int d = 0; d < 2; d++)
        for (int s = 0; s < 7; s++) begin
          hcount = x + 11'(50 * d + px[s]);
          vcount = y + 10'(py[s]);
          repeat (3) @(posedge clk);
          #1 check((pixel == color) == on(d == 0 ? t : o, s),
                   $sformatf("value %0d digit %0d segment %0d", val, d, s));
        end
      hcount = x + 11'(47); vcount = y + 10'(20);   // gap between digits
      repeat (3) @(posedge clk);
      #1 check(pixel == 0, "gap between digits is empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
