// tb_game_fsm: plays the game through its serial cursor input on a real
// 1344x806 raster (xvga), with one gravity step per 2 frames and a fast
// serial link to keep the run short.  The testbench reads the fruit
// positions from the design, steers the cursor onto fruit to slice them,
// keeps it off the bomb, then lets fruit fall, and finally steers onto the
// bomb.  It checks state changes, score, lives, the split halves, the screen
// layers, and counts each mechanism, failing any that never happened:
// ignored click, start click, launch, inactive launch, slice, score step,
// half separation, life lost, game over by falls, game over by bomb,
// replay, return to start, score cleared on a new game.
module tb_game_fsm;
  import fn_pkg::*;
  localparam int CLK_HZ = 16 * 9600 * 4;   // 64 clocks per serial bit
  localparam int BIT    = 64;
  logic clk = 0, rst = 1, serial_data = 1, resetbutton = 0;
  logic [7:0] highscore = 8'd42;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  pixel_t pixel;
  logic [7:0] ultimate_score;
  logic game_state, apple_slice, orange_slice, peach_slice, bomb_slice;
  logic [1:0] fell_out, state_out;
  int checks = 0, failures = 0;

  xvga raster (.clk(clk), .rst(rst), .hcount(hcount), .vcount(vcount),
               .hsync(hsync), .vsync(vsync), .blank(blank));

  game_fsm #(.VEL_PERIOD(2), .CLK_HZ(CLK_HZ), .HIGH_CYCLES(20)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (700_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  typedef enum int {M_IGNORED_CLICK, M_START, M_LAUNCH, M_INACTIVE, M_SLICE, M_SCORE,
                    M_HALVES, M_LIFE, M_OVER_FALLS, M_OVER_BOMB, M_REPLAY, M_TO_START,
                    M_SCORE_CLEAR, M_COUNT} mech_e;
  int seen [M_COUNT];
  string mech_name [M_COUNT] = '{"ignored click", "start click", "launch", "inactive launch",
    "slice", "score step", "halves separate", "life lost", "game over by falls",
    "game over by bomb", "replay", "return to start", "score cleared"};

  logic [7:0] prev_score = 0;
  logic [1:0] prev_fell = 0;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 3; i++) ;
    if (ultimate_score == prev_score + 1) seen[M_SCORE]++;
    if (fell_out == prev_fell + 1) seen[M_LIFE]++;
    prev_score <= ultimate_score;
    prev_fell  <= fell_out;
  end

  // ------------------------------------------------------------ stimulus
  task automatic send_byte(logic [7:0] b);
    serial_data = 0;
    repeat (BIT) @(posedge clk);
    for (int i = 7; i >= 0; i--) begin serial_data = b[i]; repeat (BIT) @(posedge clk); end
    serial_data = 1;
    repeat (BIT) @(posedge clk);
  endtask

  task automatic cursor(int x, int y, bit b);
    send_byte(8'(x)); send_byte(8'(x >> 8));
    send_byte(8'(y)); send_byte(8'(y >> 8));
    send_byte({7'd0, b});
    repeat (4 * BIT) @(posedge clk);
    check(dut.cursor_x == 16'(x) && dut.cursor_y == 16'(y), "cursor position received");
  endtask

  task automatic click(int x, int y);
    cursor(x, y, 1);
    cursor(x, y, 0);
  endtask

  task automatic next_frame();
    @(posedge vsync);
    repeat (4) @(posedge clk);
  endtask

  // Pixel on screen at (h, v): drawn two clocks after the raster reaches it.
  task automatic sample(int h, int v, output pixel_t p);
    while (!(hcount == 11'(h) && vcount == 10'(v))) @(posedge clk);
    repeat (2) @(posedge clk);
    #1 p = pixel;
  endtask

  function automatic bit bomb_near(int x, int y);
    int bx = int'(dut.g_obj[3].coords.x_coord), by = int'(dut.g_obj[3].coords.y_coord);
    if (!dut.g_obj[3].coords.activeconst) return 0;
    return x > bx - 40 && x < bx + 190 && y > by - 40 && y < by + 190;
  endfunction

  // A spot on an active, unsliced fruit that is away from the bomb.
  function automatic bit fruit_target(output int tx, output int ty);
    for (int i = 0; i < 3; i++) begin
      int fx = int'(dut.ox[i]), fy = int'(dut.oy[i]);
      if (dut.active[i] && !dut.sliced[i] && fy < 690 && fx < 900) begin
        tx = fx + 60; ty = fy + 40;
        if (!bomb_near(tx, ty)) return 1;
      end
    end
    return 0;
  endfunction

  // launches and separation of halves
  logic [3:0] new_q = 0;
  always @(posedge clk) if (!rst && dut.tick) begin
    for (int i = 0; i < 4; i++) if (dut.is_new[i] && !new_q[i]) begin
      seen[M_LAUNCH]++;
      if (!dut.active[i]) seen[M_INACTIVE]++;
    end
    new_q <= {dut.is_new[3], dut.is_new[2], dut.is_new[1], dut.is_new[0]};
    for (int i = 0; i < 3; i++)
      if (dut.sliced[i] && dut.active[i] && int'(dut.sy[i]) > int'(dut.oy[i]) + 120 &&
          dut.sx[i] != dut.ox[i]) seen[M_HALVES]++;
  end

  initial begin
    pixel_t p;
    int tx, ty, frames, slices;
    logic [2:0] sl_before;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (100) @(posedge clk);
    check(state_out == GS_START, "starts on the start screen");
    // background where nothing is drawn; logo/play images on the start screen
    sample(20, 700, p);
    check(p[15:0] == 16'hA4FF, $sformatf("background pixel %h", p));
    sample(424 + 80, 400 + 2, p);
    check(p == 24'hFFFFFF, $sformatf("play button frame %h", p));
    // a click away from the play button is ignored
    click(100, 100);
    check(state_out == GS_START, "click off the button ignored");
    if (state_out == GS_START) seen[M_IGNORED_CLICK]++;
    click(500, 420);
    check(state_out == GS_PLAY, "play button starts the game");
    if (state_out == GS_PLAY) seen[M_START]++;
    cursor(1010, 5, 0);

    // ---- slice fruit until three have been cut
    slices = 0;
    for (frames = 0; frames < 400 && slices < 3 && state_out == GS_PLAY; frames++) begin
      next_frame();
      if (fruit_target(tx, ty)) begin
        sl_before = dut.sliced;
        cursor(tx, ty, 0);
        next_frame();
        if ((dut.sliced & ~sl_before) != 0) begin
          slices += $countones(dut.sliced & ~sl_before);
          seen[M_SLICE]++;
        end
        cursor(1010, 5, 0);
      end
    end
    check(slices >= 3, $sformatf("sliced %0d fruit", slices));
    check(ultimate_score == 8'(slices) || state_out != GS_PLAY, $sformatf("score %0d", ultimate_score));
    // score digits drawn at (850,100): tens digit 0 has its top segment lit
    if (state_out == GS_PLAY) begin
      sample(850 + 22, 100 + 5, p);
      check(p == 24'hFFFFFF, "score tens digit drawn");
    end
    // lives markers: all three present before any loss
    if (state_out == GS_PLAY && fell_out == 0) begin
      sample(240 + 30, 130, p);
      check(p == 24'hFFFFFF, "third life marker drawn");
    end

    // ---- let fruit fall until the game is over
    for (frames = 0; frames < 2000 && state_out == GS_PLAY; frames++) begin
      next_frame();
      if (bomb_near(1010, 5)) cursor(5, 5, 0);
    end
    check(state_out == GS_GAME_OVER && game_state, "three lost fruit end the game");
    if (state_out == GS_GAME_OVER && !dut.bomb_hit) seen[M_OVER_FALLS]++;
    check(dut.fell_total >= 3, "three fell");
    check(ultimate_score >= 8'd3, "score kept on game over");
    sample(512 + 22, 325 + 5, p);
    check(p == 24'hFFFFFF, "game-over score drawn");
    // high score digits: 42 -> tens digit 4 has no top segment
    sample(637 + 22, 403 + 5, p);
    check(p != 24'hFFFFFF, "high score tens digit 4 has no top bar");
    sample(637 + 5, 403 + 22, p);
    check(p == 24'hFFFFFF, "high score tens digit 4 has upper-left bar");

    // ---- replay (after the lost-fruit counters clear on the next frames), then hit the bomb
    next_frame(); next_frame();
    cursor(500, 280, 1);
    cursor(500, 280, 0);
    check(state_out == GS_PLAY, "replay button restarts");
    if (state_out == GS_PLAY) seen[M_REPLAY]++;
    next_frame(); next_frame();
    check(ultimate_score == 0 && fell_out == 0, "new game clears score and lives");
    if (ultimate_score == 0) seen[M_SCORE_CLEAR]++;
    for (frames = 0; frames < 3000 && state_out == GS_PLAY; frames++) begin
      next_frame();
      if (dut.g_obj[3].coords.activeconst && dut.g_obj[3].coords.y_coord < 690 &&
          dut.g_obj[3].coords.x_coord < 900) begin
        cursor(int'(dut.g_obj[3].coords.x_coord) + 75, int'(dut.g_obj[3].coords.y_coord) + 75, 0);
        next_frame();
      end
    end
    check(state_out == GS_GAME_OVER, "bomb ends the game");
    if (state_out == GS_GAME_OVER && dut.fell_total < 3) seen[M_OVER_BOMB]++;

    // ---- Enter returns to the start screen
    resetbutton = 1;
    repeat (10) @(posedge clk);
    resetbutton = 0;
    repeat (10) @(posedge clk);
    check(state_out == GS_START, "reset button returns to start");
    if (state_out == GS_START) seen[M_TO_START]++;

    for (int m = 0; m < M_COUNT; m++) begin
      check(seen[m] > 0, $sformatf("mechanism '%s' happened", mech_name[m]));
      $display("mechanism %-20s : %0d", mech_name[m], seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
