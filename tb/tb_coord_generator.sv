// tb_coord_generator: flies fruit through whole arcs and checks them against
// a frame-by-frame reference model of the projectile rules (rise by the
// speed, speed -2 every VEL_PERIOD frames until zero, then fall with speed +2,
// relaunch once below row 768), plus closed-form checks of the peak height
// and flight length, the `new_fruit` pulse, slice scoring, `fell` counting and
// the effect of the `rdy` edges.
module tb_coord_generator;
  localparam int VP = 9;
  logic clk = 0, rst = 1, tick = 0, rdy = 0, slice = 0, active = 1, backwards = 0;
  logic [4:0] yvel = 16;
  logic [9:0] xcostart = 300;
  logic [9:0] x_coord, y_coord;
  logic [2:0] fell;
  logic activeconst, new_fruit, left;
  logic [7:0] score;
  logic [4:0] yvelocity;
  int checks = 0, failures = 0;

  coord_generator #(.VEL_PERIOD(VP)) dut (.*);

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

  task automatic frame();
    @(posedge clk); #1 tick = 1;
    @(posedge clk); #1 tick = 0;
  endtask

  // Fly one arc; returns frames in CALC, the minimum y seen.
  task automatic fly(input int v0, input int x0, input bit back, input bit act,
                     input int slice_at, output int frames, output int ymin);
    int y, x, v, cnt, n;
    bit up;
    yvel = 5'(v0); xcostart = 10'(x0); backwards = back; active = act;
    frame();                                      // START
    check(new_fruit == 1 && y_coord == 700 && x_coord == 10'(x0), "launch");
    check(activeconst == act && left == back, "latched parameters");
    y = 700; x = x0; v = v0; cnt = 0; up = (v0 != 0); n = 0; ymin = 700;
    forever begin
      if (n == slice_at) slice = 1;
      frame();
      n++;
      check(new_fruit == 0, "new is a one-frame pulse");
      x = back ? x - 5 : x + 5;
      // reference model of one frame
      if (up) y = y - v;
      else if (y + v > 768) begin y = 768; end
      else y = y + v;
      if (cnt == VP - 1) begin
        cnt = 0;
        if (up) begin v = v - 2; if (v == 0) up = 0; end
        else if (v < 30) v = v + 2;
      end else cnt++;
      check(int'(y_coord) == y, $sformatf("frame %0d y=%0d want %0d", n, y_coord, y));
      check(x_coord == 10'(x), $sformatf("frame %0d x", n));
      if (y < ymin) ymin = y;
      if (y == 768 && !up) break;
      if (n > 1000) break;
    end
    frames = n;
    slice = 0;
  endtask

  initial begin
    int frames, ymin, f0, s0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    rdy = 1;
    // arc 1: unsliced active fruit, speed 16 -> peak 700 - 9*(16+14+...+2) = 52
    fly(16, 300, 0, 1, -1, frames, ymin);
    check(ymin == 700 - VP * 72, $sformatf("peak %0d", ymin));
    check(fell == 1 && score == 0, "unsliced fruit fell");
    // arc 2: sliced early -> score, no fell; leftwards
    fly(12, 600, 1, 1, 5, frames, ymin);
    check(fell == 1 && score == 1, $sformatf("sliced fruit scored (fell %0d score %0d)", fell, score));
    check(ymin == 700 - VP * 42, "peak for speed 12");
    // arc 3: inactive fruit never scores or falls
    fly(10, 100, 0, 0, 3, frames, ymin);
    check(fell == 1 && score == 1, "inactive fruit ignored");
    // arc 4: another miss
    fly(14, 200, 0, 1, -1, frames, ymin);
    check(fell == 2, "second miss");
    // rdy low: frozen
    f0 = y_coord; s0 = score;
    #1 rdy = 0;
    frame();                                      // falling edge seen
    check(fell == 0 && y_coord == 768, "rdy fall clears fell, parks fruit");
    check(score == 8'(s0), "score kept for the game-over screen");
    repeat (3) frame();
    check(y_coord == 768 && new_fruit == 0, "frozen while rdy low");
    rdy = 1;
    frame();
    check(score == 0, "rdy rise clears score");
    check(new_fruit == 1 && y_coord == 700, "relaunch after rdy rise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
