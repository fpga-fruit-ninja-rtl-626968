// tb_fruit_ninja: end-to-end test of the whole game (fruit_ninja) with a
// behavioural flash (flash_model) on the 27 MHz side.  Timing parameters are
// shortened: one gravity step per 2 frames, a fast serial link (64 clocks per
// bit), a 20-clock debounce, a 10-clock flash read hold and all sounds 1000x
// shorter.  The flash starts holding a high score of 1.
//
// The testbench drives the remote's serial line and the two buttons, reads
// fruit positions from inside the design to aim the cursor, and watches the
// VGA, buzzer, LED and flash pins.  Sequence: power-up read of the stored high
// score, start click, slicing three fruit, letting fruit fall until the game
// ends, high score erase and rewrite with the jingle, replay, hitting the
// bomb, Enter back to the start screen, and Up clearing the stored score.
// Each mechanism is counted and any that never happened is a failure.
module tb_fruit_ninja;
  import fn_pkg::*;
  localparam int BAUD_CLK = 16 * 9600 * 4;   // 64 clocks per serial bit
  localparam int BIT      = 64;

  logic clk65 = 0, clk27 = 0;
  logic button_enter = 1, button_up = 1, serial_in = 1;
  logic flash_busy, flash_reading, flash_writing, flash_reset, flash_up_reset;
  logic [15:0] flash_rdata, flash_wdata;
  logic [7:0] vga_red, vga_green, vga_blue, led;
  logic vga_hsync, vga_vsync, vga_blank_b, sound;
  int checks = 0, failures = 0;
  int reads, erases, writes, half_resets;
  logic model_rst = 1;

  fruit_ninja #(.VEL_PERIOD(2), .BAUD_CLK_HZ(BAUD_CLK), .DEBOUNCE_DELAY(20),
                .READ_HOLD(10), .SFX_DIV(1000)) dut (
    .clk_65mhz(clk65), .clk_27mhz(clk27), .*);

  flash_model #(.INIT(16'd1)) flash (
    .clk(clk27), .rst(model_rst), .reading(flash_reading), .writing(flash_writing),
    .flash_reset(flash_reset), .up_reset(flash_up_reset), .wdata(flash_wdata),
    .rdata(flash_rdata), .busy(flash_busy), .reads(reads), .erases(erases),
    .writes(writes), .half_resets(half_resets));

  always #5 clk65 = !clk65;
  always #12 clk27 = !clk27;
  initial begin repeat (3) @(posedge clk27); model_rst = 0; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (900_000_000) @(posedge clk65);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  typedef enum int {M_BOOT_READ, M_START, M_SLICE, M_FRUIT_SOUND, M_LIFE_SOUND,
                    M_OVER_FALLS, M_HS_WRITE, M_JINGLE, M_REPLAY, M_BOMB_SOUND,
                    M_OVER_BOMB, M_TO_START, M_HS_CLEAR, M_VIDEO, M_COUNT} mech_e;
  int seen [M_COUNT];
  string mech_name [M_COUNT] = '{"power-up flash read", "start click", "slice",
    "fruit sound", "life-lost sound", "game over by falls", "high score written",
    "high score jingle", "replay", "bomb sound", "game over by bomb",
    "enter to start", "high score cleared", "video sync"};

  // Buzzer half periods, measured as clocks between toggles, and sorted by
  // the sound being played (sfx state: 1 fruit, 2 bomb, 3 life, 5/6 jingle).
  int since_toggle = 0;
  logic sound_q = 0;
  int last_half = 0;
  int tones [8];
  function automatic bit near(int a, int b);
    return a >= b - 2 && a <= b + 2;
  endfunction
  always @(posedge clk65) begin
    sound_q <= sound;
    if (sound != sound_q) begin
      last_half = since_toggle;
      since_toggle = 0;
      case (int'(dut.sounds.state))
        1: if (near(last_half, 30))  tones[1]++;
        2: if (near(last_half, 150)) tones[2]++;
        3: if (near(last_half, 150)) tones[3]++;
        5: if (near(last_half, 110)) tones[5]++;
        6: if (near(last_half, 82))  tones[6]++;
        default: ;
      endcase
    end else since_toggle++;
  end

  int vs_count = 0;
  logic vs_q = 1;
  always @(posedge clk65) begin
    vs_q <= vga_vsync;
    if (vs_q && !vga_vsync) vs_count++;
  end

  // ------------------------------------------------------------ stimulus
  task automatic send_byte(logic [7:0] b);
    serial_in = 0;
    repeat (BIT) @(posedge clk65);
    for (int i = 7; i >= 0; i--) begin serial_in = b[i]; repeat (BIT) @(posedge clk65); end
    serial_in = 1;
    repeat (BIT) @(posedge clk65);
  endtask

  // The receiver wants 1300 idle clocks before a packet.
  task automatic cursor(int x, int y, bit b);
    repeat (1400) @(posedge clk65);
    send_byte(8'(x)); send_byte(8'(x >> 8));
    send_byte(8'(y)); send_byte(8'(y >> 8));
    send_byte({7'd0, b});
    repeat (4 * BIT) @(posedge clk65);
    check(dut.game.cursor_x == 16'(x) && dut.game.cursor_y == 16'(y), "cursor position received");
  endtask

  task automatic click(int x, int y);
    cursor(x, y, 1);
    cursor(x, y, 0);
  endtask

  task automatic next_frame();
    @(negedge vga_vsync);
    repeat (4) @(posedge clk65);
  endtask

  function automatic bit bomb_near(int x, int y);
    int bx = int'(dut.game.ox[3]), by = int'(dut.game.oy[3]);
    if (!dut.game.active[3]) return 0;
    return x > bx - 40 && x < bx + 190 && y > by - 40 && y < by + 190;
  endfunction

  function automatic bit fruit_target(output int tx, output int ty);
    for (int i = 0; i < 3; i++) begin
      int fx = int'(dut.game.ox[i]), fy = int'(dut.game.oy[i]);
      if (dut.game.active[i] && !dut.game.sliced[i] && fy < 690 && fx < 900) begin
        tx = fx + 60; ty = fy + 40;
        if (!bomb_near(tx, ty)) return 1;
      end
    end
    return 0;
  endfunction

  initial begin
    int tx, ty, frames, slices;
    bit ok;
    logic [2:0] sl_before;

    // ---- power-up: the stored score (1) is read and shown
    repeat (2000) @(posedge clk65);
    check(reads == 1, $sformatf("one power-up read, got %0d", reads));
    check(dut.highscore65 == 8'd1, $sformatf("high score from flash %0d", dut.highscore65));
    if (reads == 1 && dut.highscore65 == 8'd1) seen[M_BOOT_READ]++;
    check(led[6] && led[5] && led[7], "LEDs idle");
    next_frame();
    next_frame();
    check(vs_count >= 2, "vertical sync pulses");
    if (vs_count >= 2) seen[M_VIDEO]++;

    // ---- start
    click(500, 420);
    check(dut.game.state_out == GS_PLAY, "play button starts the game");
    if (dut.game.state_out == GS_PLAY) seen[M_START]++;
    cursor(1010, 5, 0);

    // ---- slice three fruit; each slice beeps
    slices = 0;
    for (frames = 0; frames < 400 && slices < 3 && dut.game.state_out == GS_PLAY; frames++) begin
      next_frame();
      if (fruit_target(tx, ty)) begin
        sl_before = dut.game.sliced;
        cursor(tx, ty, 0);
        next_frame();
        if ((dut.game.sliced & ~sl_before) != 0) begin
          slices += $countones(dut.game.sliced & ~sl_before);
          seen[M_SLICE]++;
        end
        cursor(1010, 5, 0);
      end
    end
    check(slices >= 3, $sformatf("sliced %0d fruit", slices));
    seen[M_FRUIT_SOUND] = tones[1];
    check(tones[1] > 0, "slice sound heard");

    // ---- let fruit fall; each lost life sounds; game over writes the high score
    for (frames = 0; frames < 2000 && dut.game.state_out == GS_PLAY; frames++) begin
      next_frame();
      if (bomb_near(1010, 5)) cursor(5, 5, 0);
    end
    check(dut.game.state_out == GS_GAME_OVER, "three lost fruit end the game");
    repeat (20000) @(posedge clk65);
    seen[M_LIFE_SOUND] = tones[3];
    check(!led[5], "game-over LED lit");
    if (dut.game.state_out == GS_GAME_OVER && !dut.game.bomb_hit) seen[M_OVER_FALLS]++;
    // the new high score is erased-then-written into the flash
    for (int i = 0; i < 20000 && writes == 0; i++) @(posedge clk27);
    repeat (200) @(posedge clk27);
    check(erases == 1 && writes == 1, $sformatf("erase %0d write %0d", erases, writes));
    check(flash.stored == 16'(dut.ultimate_score), $sformatf("stored %0d score %0d",
          flash.stored, dut.ultimate_score));
    check(half_resets == 0, "flash reset lines pulse together");
    if (writes == 1 && flash.stored == 16'(dut.ultimate_score)) seen[M_HS_WRITE]++;
    check(dut.highscore65 == dut.ultimate_score, "new high score reaches the display");
    // jingle: two tones after the pause
    for (int i = 0; i < 200000 && tones[6] == 0; i++) @(posedge clk65);
    ok = tones[5] > 0 && tones[6] > 0;
    if (ok) seen[M_JINGLE]++;
    check(ok, "high score jingle");

    // ---- replay, then hit the bomb
    next_frame(); next_frame();
    click(500, 280);
    check(dut.game.state_out == GS_PLAY, "replay restarts");
    if (dut.game.state_out == GS_PLAY) seen[M_REPLAY]++;
    for (frames = 0; frames < 3000 && dut.game.state_out == GS_PLAY; frames++) begin
      next_frame();
      if (dut.game.active[3] && dut.game.oy[3] < 690 && dut.game.ox[3] < 900) begin
        cursor(int'(dut.game.ox[3]) + 75, int'(dut.game.oy[3]) + 75, 0);
        next_frame();
      end
    end
    check(dut.game.state_out == GS_GAME_OVER, "bomb ends the game");
    if (dut.game.state_out == GS_GAME_OVER && dut.game.fell_total < 3) seen[M_OVER_BOMB]++;
    repeat (40000) @(posedge clk65);
    seen[M_BOMB_SOUND] = tones[2];
    repeat (2000) @(posedge clk27);
    check(writes == 1, "lower score not written");

    // ---- Enter returns to the start screen
    button_enter = 0;
    repeat (100) @(posedge clk65);
    button_enter = 1;
    repeat (100) @(posedge clk65);
    check(dut.game.state_out == GS_START, "Enter returns to start");
    if (dut.game.state_out == GS_START) seen[M_TO_START]++;

    // ---- Up clears the stored high score
    button_up = 0;
    repeat (100) @(posedge clk27);
    button_up = 1;
    for (int i = 0; i < 20000 && writes < 2; i++) @(posedge clk27);
    repeat (200) @(posedge clk27);
    check(erases == 2 && writes == 2 && flash.stored == 16'd0,
          $sformatf("clear: erases %0d writes %0d stored %0d", erases, writes, flash.stored));
    check(dut.highscore65 == 8'd0, "cleared high score shown");
    if (flash.stored == 16'd0 && dut.highscore65 == 8'd0) seen[M_HS_CLEAR]++;

    for (int m = 0; m < M_COUNT; m++) begin
      check(seen[m] > 0, $sformatf("mechanism '%s' happened", mech_name[m]));
      $display("mechanism %-20s : %0d", mech_name[m], seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
