// tb_fruit_ninja_full: one complete game on fruit_ninja with every parameter
// at its default: 65 MHz pixel clock, 1024x768 frames, a gravity step every
// 9 frames, 9600-baud remote link, full debounce and full-length sounds.
// The behavioural flash (flash_model) starts with a stored high score of 0.
//
// Sequence: power-up read of the flash, click on the play button, slice one
// active fruit (its halves must separate and the slice tone of ~1.1 kHz must
// sound), then swipe the bomb, which ends the game.  The score of at least 1
// beats the stored 0, so the high score is erased and rewritten in flash and
// reaches the display domain, and the high-score jingle plays.
module tb_fruit_ninja_full;
  import fn_pkg::*;
  localparam int BIT = 6771;   // 65 MHz / 9600 baud

  logic clk65 = 0, clk27 = 0;
  logic button_enter = 1, button_up = 1, serial_in = 1;
  logic flash_busy, flash_reading, flash_writing, flash_reset, flash_up_reset;
  logic [15:0] flash_rdata, flash_wdata;
  logic [7:0] vga_red, vga_green, vga_blue, led;
  logic vga_hsync, vga_vsync, vga_blank_b, sound;
  int checks = 0, failures = 0;
  int reads, erases, writes, half_resets;
  logic model_rst = 1;

  fruit_ninja dut (.clk_65mhz(clk65), .clk_27mhz(clk27), .*);

  flash_model #(.INIT(16'd0)) flash (
    .clk(clk27), .rst(model_rst), .reading(flash_reading), .writing(flash_writing),
    .flash_reset(flash_reset), .up_reset(flash_up_reset), .wdata(flash_wdata),
    .rdata(flash_rdata), .busy(flash_busy), .reads(reads), .erases(erases),
    .writes(writes), .half_resets(half_resets));

  // 65 MHz and 27 MHz, approximated by periods of 154 and 370 time units
  always #77 clk65 = !clk65;
  always #185 clk27 = !clk27;
  initial begin repeat (3) @(posedge clk27); model_rst = 0; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (700_000_000) @(posedge clk65);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Buzzer half periods by sound (sfx state 1 fruit, 2 bomb, 5/6 jingle).
  int since_toggle = 0, last_half = 0;
  logic sound_q = 0;
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
        1: if (near(last_half, 30_000))  tones[1]++;
        2: if (near(last_half, 150_000)) tones[2]++;
        5: if (near(last_half, 110_670)) tones[5]++;
        6: if (near(last_half, 82_909))  tones[6]++;
        default: ;
      endcase
    end else since_toggle++;
  end

  task automatic send_byte(logic [7:0] b);
    serial_in = 0;
    repeat (BIT) @(posedge clk65);
    for (int i = 7; i >= 0; i--) begin serial_in = b[i]; repeat (BIT) @(posedge clk65); end
    serial_in = 1;
    repeat (BIT) @(posedge clk65);
  endtask

  task automatic cursor(int x, int y, bit b);
    repeat (1400) @(posedge clk65);
    send_byte(8'(x)); send_byte(8'(x >> 8));
    send_byte(8'(y)); send_byte(8'(y >> 8));
    send_byte({7'd0, b});
    repeat (4 * BIT) @(posedge clk65);
    check(dut.game.cursor_x == 16'(x) && dut.game.cursor_y == 16'(y), "cursor position received");
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
      if (dut.game.active[i] && !dut.game.sliced[i] && fy < 650 && fx < 900) begin
        tx = fx + 60; ty = fy + 40;
        if (!bomb_near(tx, ty)) return 1;
      end
    end
    return 0;
  endfunction

  initial begin
    int tx, ty, frames, cut;
    logic [2:0] sl_before;

    repeat (1_000_000) @(posedge clk65);
    check(reads == 1 && dut.highscore65 == 8'd0, "power-up read of the stored high score");

    cursor(500, 420, 1);
    cursor(500, 420, 0);
    check(dut.game.state_out == GS_PLAY, "play button starts the game");
    cursor(1010, 5, 0);

    // slice one fruit
    cut = -1;
    for (frames = 0; frames < 250 && cut < 0 && dut.game.state_out == GS_PLAY; frames++) begin
      next_frame();
      if (fruit_target(tx, ty)) begin
        sl_before = dut.game.sliced;
        cursor(tx, ty, 0);
        next_frame();
        for (int i = 0; i < 3; i++) if (dut.game.sliced[i] && !sl_before[i]) cut = i;
        cursor(1010, 5, 0);
      end
    end
    check(cut >= 0, "a fruit was sliced");
    check(dut.ultimate_score >= 8'd1, $sformatf("score %0d", dut.ultimate_score));
    repeat (20) next_frame();
    if (cut >= 0)
      check(dut.game.sy[cut] > dut.game.oy[cut] && dut.game.sx[cut] != dut.game.ox[cut],
            "the two halves separate");
    check(tones[1] > 10, $sformatf("slice tone toggles %0d", tones[1]));

    // swipe the bomb
    for (frames = 0; frames < 400 && dut.game.state_out == GS_PLAY; frames++) begin
      next_frame();
      if (dut.game.active[3] && dut.game.oy[3] < 650 && dut.game.ox[3] < 900) begin
        cursor(int'(dut.game.ox[3]) + 75, int'(dut.game.oy[3]) + 75, 0);
        next_frame();
      end else if (bomb_near(1010, 5)) cursor(5, 5, 0);
    end
    check(dut.game.state_out == GS_GAME_OVER, "game over");
    check(dut.game.fell_total < 3, "ended by the bomb");

    // high score stored and jingle played
    for (int i = 0; i < 100_000_000 && tones[6] == 0; i++) @(posedge clk65);
    check(erases == 1 && writes == 1, $sformatf("erase %0d write %0d", erases, writes));
    check(flash.stored == 16'(dut.ultimate_score), "new high score in flash");
    check(dut.highscore65 == dut.ultimate_score, "new high score displayed");
    check(tones[2] > 10, "bomb tone");
    check(tones[5] > 10 && tones[6] > 0, "high-score jingle");
    $display("frames %0d, score %0d, tones fruit %0d bomb %0d jingle %0d/%0d", frames,
             dut.ultimate_score, tones[1], tones[2], tones[5], tones[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
