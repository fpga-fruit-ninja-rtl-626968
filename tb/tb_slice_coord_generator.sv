// tb_slice_coord_generator: the bottom half must follow the given start
// point while waiting, then fall from rest (y_n = y0 + sum of 2*floor(k/9)
// for k < n, clamped at 768) while drifting 4 pixels per frame, and return to
// following on `new_fruit`.
module tb_slice_coord_generator;
  localparam int VP = 9;
  logic clk = 0, rst = 1, tick = 0, begincalc = 0, new_fruit = 0, backwards = 0;
  logic [4:0] yvel = 0;
  logic [9:0] xcostart = 0, ycostart = 0, x_coord, y_coord;
  int checks = 0, failures = 0;

  slice_coord_generator #(.VEL_PERIOD(VP)) dut (.*);

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

  task automatic frame();
    @(posedge clk); #1 tick = 1;
    @(posedge clk); #1 tick = 0;
  endtask

  initial begin
    int y0, x0, y, x;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int round = 0; round < 2; round++) begin
      backwards = round[0];
      // follow
      for (int i = 0; i < 5; i++) begin
        xcostart = 10'(200 + 7 * i); ycostart = 10'(300 - 11 * i);
        frame();
        check(x_coord == xcostart && y_coord == ycostart, "follows while waiting");
      end
      x0 = xcostart; y0 = ycostart;
      begincalc = 1;
      frame();                                    // latch, enter CALC
      check(x_coord == 10'(x0) && y_coord == 10'(y0), "start point");
      xcostart = 0; ycostart = 0;                 // must be ignored now
      y = y0; x = x0;
      for (int n = 0; n < 120; n++) begin
        frame();
        y = y + 2 * (n / VP);
        if (y > 768) y = 768;
        x = backwards ? x - 4 : x + 4;
        check(int'(y_coord) == y, $sformatf("n=%0d y=%0d want %0d", n, y_coord, y));
        check(x_coord == 10'(x), "x drift");
      end
      check(y_coord == 768, "clamped at the bottom");
      begincalc = 0;
      new_fruit = 1;
      frame();
      new_fruit = 0;
      xcostart = 10'd50; ycostart = 10'd60;
      frame();
      check(x_coord == 10'd50 && y_coord == 10'd60, "back to following");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
