// tb_max_score: with a behavioural flash, checks that the high score is
// read at start-up, that a lower game score changes nothing, that a higher
// one is erased-then-written (both resets together for one clock, writing
// only after the erase finished) and that the clear button stores 0.
module tb_max_score;
  logic clk = 0, rst = 1, ready = 0, reset_score = 0;
  logic [15:0] current_score = 0, score_from_flash, score, score_to_store;
  logic busy, flash_reset, writing, reading, up_reset;
  logic [2:0] state_out;
  logic [15:0] stored_seen;
  int reads, erases, writes, half_resets;
  int checks = 0, failures = 0;

  max_score #(.READ_HOLD(10)) dut (.*);

  flash_model #(.INIT(16'd37)) flash (
    .clk(clk), .rst(rst), .reading(reading), .writing(writing), .flash_reset(flash_reset),
    .up_reset(up_reset), .wdata(score_to_store), .rdata(score_from_flash), .busy(busy),
    .reads(reads), .erases(erases), .writes(writes), .half_resets(half_resets));

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

  // the reset strobes are one clock wide
  int reset_width = 0, max_reset_width = 0;
  always @(posedge clk) begin
    if (flash_reset) reset_width++; else reset_width = 0;
    if (reset_width > max_reset_width) max_reset_width = reset_width;
  end

  task automatic game_over(int s);
    current_score = 16'(s);
    ready = 1;
    repeat (400) @(posedge clk);
    ready = 0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (200) @(posedge clk);
    check(reads == 1, "one read at start-up");
    check(score == 16'd37, $sformatf("start-up high score %0d", score));
    game_over(20);
    check(erases == 0 && writes == 0 && score == 16'd37, "lower score ignored");
    game_over(55);
    check(erases == 1 && writes == 1, $sformatf("erase+write (%0d,%0d)", erases, writes));
    check(score == 16'd55 && flash.stored == 16'd55, "new high score stored");
    check(max_reset_width == 1 && half_resets == 0, "both resets, one clock");
    game_over(55);
    check(erases == 1 && writes == 1, "equal score not stored again");
    reset_score = 1;
    repeat (400) @(posedge clk);
    reset_score = 0;
    repeat (20) @(posedge clk);
    check(erases == 2 && writes == 2 && score == 0 && flash.stored == 0, "clear button stores 0");
    game_over(3);
    check(score == 16'd3 && flash.stored == 16'd3, "any score beats 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writing must only rise while the flash is idle
  always @(posedge clk) if (writing && !$past(writing)) assert (!$past(busy));
endmodule
