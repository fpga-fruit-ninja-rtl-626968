// tb_sfx: triggers each sound with shortened durations and checks the tone
// period (intervals between edges of `sound`), the tone length, silence
// afterwards, the suppressed cases (fruit slice during a game-state change,
// lives counter 3 -> 0) and the high-score jingle after a bomb or the last
// life while the flash is busy: bomb tone, pause, two tones.
module tb_sfx;
  localparam int FC = 200, FH = 10, BC = 400, BH = 20, LC = 300, LH = 25;
  localparam int H0 = 100, H1C = 150, H1H = 15, H2C = 120, H2H = 12;
  logic clk = 0, rst = 1;
  logic apple_slice = 0, orange_slice = 0, peach_slice = 0, bomb_slice = 0, busy = 0;
  logic [1:0] lost_life = 0, state_in = 1;
  logic sound, r;
  int checks = 0, failures = 0;

  sfx #(.FRUIT_CYCLES(FC), .FRUIT_HALF(FH), .BOMB_CYCLES(BC), .BOMB_HALF(BH),
        .LIFE_CYCLES(LC), .LIFE_HALF(LH), .HS0_CYCLES(H0), .HS1_CYCLES(H1C),
        .HS1_HALF(H1H), .HS2_CYCLES(H2C), .HS2_HALF(H2H)) dut (.*);

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

  int cyc = 0;
  int edges [$];
  logic prev = 0;
  always @(posedge clk) begin
    cyc++;
    if (sound != prev) edges.push_back(cyc);
    prev = sound;
  end

  // edges in [t0+from, t0+to): all intervals equal `half`, count about len/half
  task automatic tone(int t0, int from, int to, int half, string name);
    int n = 0, last = -1, bad = 0;
    foreach (edges[i]) if (edges[i] >= t0 + from && edges[i] < t0 + to) begin
      if (last >= 0 && edges[i] - last != half) bad++;
      last = edges[i]; n++;
    end
    check(bad == 0, $sformatf("%s: %0d irregular intervals", name, bad));
    check(n >= (to - from) / half - 2 && n <= (to - from) / half + 1,
          $sformatf("%s: %0d edges for %0d clocks of half period %0d", name, n, to - from, half));
  endtask

  task automatic silent(int t0, int from, int to, string name);
    int n = 0;
    foreach (edges[i]) if (edges[i] >= t0 + from && edges[i] < t0 + to) n++;
    check(n == 0, $sformatf("%s: %0d edges while it should be silent", name, n));
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    // fruit
    edges.delete(); t0 = cyc;
    apple_slice = 1;
    repeat (FC + 50) @(posedge clk);
    tone(t0, 0, FC, FH, "fruit");
    silent(t0, FC + 4, FC + 50, "after fruit");
    check(sound == 0, "quiet after fruit");
    apple_slice = 0;
    // fruit slice while the game state changes: no sound
    repeat (5) @(posedge clk);
    edges.delete(); t0 = cyc;
    orange_slice = 1; state_in = 2;
    repeat (100) @(posedge clk);
    silent(t0, 0, 100, "slice during state change");
    orange_slice = 0; state_in = 1;
    // life lost
    repeat (5) @(posedge clk);
    edges.delete(); t0 = cyc;
    lost_life = 1;
    repeat (LC + 50) @(posedge clk);
    tone(t0, 0, LC, LH, "life");
    silent(t0, LC + 4, LC + 50, "after life");
    // lives counter cleared 3 -> 0: no sound
    lost_life = 3;
    repeat (LC + 20) @(posedge clk);
    edges.delete(); t0 = cyc;
    lost_life = 0;
    repeat (100) @(posedge clk);
    silent(t0, 0, 100, "counter clear");
    // bomb with a high score being written
    edges.delete(); t0 = cyc;
    bomb_slice = 1; busy = 1;
    repeat (20) @(posedge clk);
    check(r == 1, "jingle pending while flash busy");
    bomb_slice = 0;
    repeat (BC + H0 + H1C + H2C + 60) @(posedge clk);
    busy = 0;
    tone(t0, 0, BC, BH, "bomb");
    silent(t0, BC + 4, BC + H0, "jingle pause");
    tone(t0, BC + H0 + 3, BC + H0 + H1C, H1H, "jingle tone 1");
    tone(t0, BC + H0 + H1C + 3, BC + H0 + H1C + H2C, H2H, "jingle tone 2");
    silent(t0, BC + H0 + H1C + H2C + 5, BC + H0 + H1C + H2C + 60, "after jingle");
    check(r == 0, "jingle flag cleared");
    // last life lost with high score
    lost_life = 2;
    repeat (LC + 20) @(posedge clk);
    edges.delete(); t0 = cyc;
    lost_life = 3; busy = 1;
    repeat (LC + H0 + 40) @(posedge clk);
    busy = 0;
    tone(t0, 0, LC, LH, "last life");
    tone(t0, LC + H0 + 3, LC + H0 + 40, H1H, "jingle after last life");
    repeat (H1C + H2C + 20) @(posedge clk);
    // life lost while busy but lives remain: no jingle
    lost_life = 0;
    repeat (20) @(posedge clk);
    edges.delete(); t0 = cyc;
    lost_life = 1; busy = 1;
    repeat (LC + H0 + 60) @(posedge clk);
    busy = 0;
    tone(t0, 0, LC, LH, "life with lives left");
    silent(t0, LC + 4, LC + H0 + 60, "no jingle with lives left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
