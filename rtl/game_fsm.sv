// game_fsm: the game itself -- state machine, objects, collision and screen.
//
// States (state_out): START shows the logo and a play button; clicking the
// remote's select button with the cursor on the play button starts PLAY.
// PLAY launches an apple, an orange, a peach and a bomb over and over; it ends
// in GAME_OVER when three fruit have fallen off the bottom unsliced or the
// cursor touches the bomb.  GAME_OVER shows this game's score and the high
// score; clicking replay starts a new PLAY.  A rising edge on `resetbutton`
// returns PLAY or GAME_OVER to START.
//
// Once per frame (rising edge of the active-low `vsync`) the CRC-16 random
// source steps, each object's lookup table picks launch parameters from its
// own 3 random bits, and the coordinate generators move the objects.  A
// random bit per object decides, at each launch, whether it is active (drawn,
// sliceable, counted).  Slicing is pixel-exact: a fruit is sliced when a
// non-zero cursor pixel and a non-zero fruit pixel coincide; the bottom half
// then falls on its own path away from the top half.  The score is the sum of
// the per-fruit slice counts; lives are three white squares; scores are drawn
// as seven-segment digits.
//
// Layering, bottom to top: background, orange, peach, apple, bomb, score and
// lives, cursor.  Any non-zero layer pixel hides the layers below.  `pixel`
// belongs to the hcount/vcount presented two clocks earlier.  Positions and
// sizes of screen items are the game's; the random source's data input (the
// remote's serial line sampled once per frame), the text-image sizes not
// given by the game, and the saturation of `fell_out` at 3 are this design's.
module game_fsm #(
  parameter int VEL_PERIOD  = 9,
  parameter int CLK_HZ      = 65_000_000,
  parameter int BAUD        = 9600,
  parameter int HIGH_CYCLES = 1300
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           vsync,
  input  logic [10:0]    hcount,
  input  logic [9:0]     vcount,
  input  logic           serial_data,
  input  logic [7:0]     highscore,
  input  logic           resetbutton,
  output fn_pkg::pixel_t pixel,
  output logic [7:0]     ultimate_score,
  output logic           game_state,
  output logic           apple_slice,
  output logic           orange_slice,
  output logic           peach_slice,
  output logic           bomb_slice,
  output logic [1:0]     fell_out,
  output logic [1:0]     state_out
);
  import fn_pkg::*;

  localparam int FRUIT_H = 150;
  localparam int HALF_H  = FRUIT_H / 2;

  game_state_e state;
  logic        ready;
  logic        old_vsync, tick;

  always_ff @(posedge clk) old_vsync <= vsync;
  assign tick = vsync && !old_vsync;

  // ---------------------------------------------------------------- random
  logic [15:0] rnd;
  random_bits_generator rng (.clk(clk), .rst(rst), .en(tick), .data(serial_data),
                             .random_number(rnd));

  // objects: 0 apple, 1 orange, 2 peach, 3 bomb
  logic [4:0] lut_yvel [4];
  logic       lut_back [4];
  logic [9:0] lut_x    [4];
  logic [2:0] lut_sel  [4];
  logic       act_bit  [4];

  assign lut_sel[0] = rnd[14:12];
  assign lut_sel[1] = rnd[2:0];
  assign lut_sel[2] = rnd[3:1];
  assign lut_sel[3] = rnd[8:6];
  assign act_bit[0] = rnd[0];
  assign act_bit[1] = rnd[1];
  assign act_bit[2] = rnd[5];
  assign act_bit[3] = rnd[2];

  logic [9:0] ox [4], oy [4], sx [3], sy [3];
  logic [2:0] fell [4];
  logic [7:0] score [4];
  logic [4:0] yvelocity [4];
  logic       active [4], is_new [4], left [4];
  logic [2:0] sliced;
  logic       obj_slice [4];

  assign obj_slice[0] = sliced[0];
  assign obj_slice[1] = sliced[1];
  assign obj_slice[2] = sliced[2];
  assign obj_slice[3] = 1'b0;           // the bomb is never cut

  for (genvar i = 0; i < 4; i++) begin : g_obj
    lookup_table #(.BOMB(i == 3)) lut (
      .clk(clk), .en(tick), .random_number(lut_sel[i]),
      .yvel(lut_yvel[i]), .backwards(lut_back[i]), .xcostart(lut_x[i]));

    coord_generator #(.VEL_PERIOD(VEL_PERIOD)) coords (
      .clk(clk), .rst(rst), .tick(tick), .rdy(ready), .slice(obj_slice[i]),
      .active(act_bit[i]), .yvel(lut_yvel[i]), .backwards(lut_back[i]),
      .xcostart(lut_x[i]), .x_coord(ox[i]), .y_coord(oy[i]), .fell(fell[i]),
      .activeconst(active[i]), .score(score[i]), .yvelocity(yvelocity[i]),
      .new_fruit(is_new[i]), .left(left[i]));
  end

  for (genvar i = 0; i < 3; i++) begin : g_half
    slice_coord_generator #(.VEL_PERIOD(VEL_PERIOD)) half (
      .clk(clk), .rst(rst), .tick(tick), .begincalc(sliced[i]), .yvel(5'd0),
      .new_fruit(is_new[i]), .backwards(!left[i]), .xcostart(ox[i]),
      .ycostart(oy[i] + 10'(HALF_H)), .x_coord(sx[i]), .y_coord(sy[i]));
  end

  // ---------------------------------------------------------------- drawing
  pixel_t apple_pix, orange_pix, peach_pix, bomb_pix;

  fruit_sprite #(.IMG(IMG_APPLE), .WIDTH(150), .HEIGHT(FRUIT_H)) apple_img (
    .clk(clk), .active(active[0]), .slice(sliced[0]), .hcount(hcount), .vcount(vcount),
    .x(ox[0]), .y(oy[0]), .xslice(sx[0]), .yslice(sy[0]), .pixel(apple_pix));
  fruit_sprite #(.IMG(IMG_ORANGE), .WIDTH(150), .HEIGHT(FRUIT_H)) orange_img (
    .clk(clk), .active(active[1]), .slice(sliced[1]), .hcount(hcount), .vcount(vcount),
    .x(ox[1]), .y(oy[1]), .xslice(sx[1]), .yslice(sy[1]), .pixel(orange_pix));
  fruit_sprite #(.IMG(IMG_PEACH), .WIDTH(132), .HEIGHT(FRUIT_H)) peach_img (
    .clk(clk), .active(active[2]), .slice(sliced[2]), .hcount(hcount), .vcount(vcount),
    .x(ox[2]), .y(oy[2]), .xslice(sx[2]), .yslice(sy[2]), .pixel(peach_pix));
  picture_blob #(.IMG(IMG_BOMB), .WIDTH(150), .HEIGHT(150)) bomb_img (
    .clk(clk), .active(active[3]), .hcount(hcount), .vcount(vcount),
    .x({1'b0, ox[3]}), .y(oy[3]), .pixel(bomb_pix));

  // cursor
  logic [15:0] cursor_x, cursor_y;
  logic [7:0]  button;
  logic        packet_valid;
  pixel_t      cursor_pix;

  cursor_receiver #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .HIGH_CYCLES(HIGH_CYCLES)) receiver (
    .clk(clk), .rst(rst), .serial_data(serial_data), .x_coord(cursor_x),
    .y_coord(cursor_y), .button(button), .valid(packet_valid));

  blob #(.WIDTH(10), .HEIGHT(10)) cursor (
    .clk(clk), .display(1'b1), .color(24'hFFFF00), .hcount(hcount), .vcount(vcount),
    .x(cursor_x[10:0]), .y(cursor_y[9:0]), .pixel(cursor_pix));

  slice_dealer dealer (
    .clk(clk), .rst(rst), .active({active[2], active[1], active[0]}),
    .fruit_new({is_new[2], is_new[1], is_new[0]}), .cursorpix(cursor_pix),
    .applepix(apple_pix), .orangepix(orange_pix), .peachpix(peach_pix),
    .sliced(sliced));

  // lives
  logic [4:0] fell_total;
  logic [1:0] lives;
  pixel_t     life_pix [3];

  assign fell_total = 5'(fell[0]) + 5'(fell[1]) + 5'(fell[2]);
  assign lives      = (fell_total >= 5'd3) ? 2'd0 : 2'd3 - fell_total[1:0];
  assign fell_out   = (fell_total >= 5'd3) ? 2'd3 : fell_total[1:0];

  for (genvar i = 0; i < 3; i++) begin : g_life
    blob #(.WIDTH(64), .HEIGHT(64)) life (
      .clk(clk), .display(state == GS_PLAY && lives > 2'(i)), .color(24'hFFFFFF),
      .hcount(hcount), .vcount(vcount), .x(11'(100 + 70 * i)), .y(10'd100),
      .pixel(life_pix[i]));
  end

  // scores
  logic [7:0]  hiscore;
  logic [10:0] score_x;
  logic [9:0]  score_y;
  pixel_t      score_pix, hiscore_pix;

  assign ultimate_score = score[0] + score[1] + score[2];

  always_ff @(posedge clk) begin
    hiscore <= highscore;
    // the score moves with the game state
    if (state == GS_GAME_OVER) begin
      score_x <= 11'd512;
      score_y <= 10'd325;
    end else begin
      score_x <= 11'd850;
      score_y <= 10'd100;
    end
  end

  score_display score_digits (
    .clk(clk), .value(ultimate_score), .color(24'hFFFFFF), .hcount(hcount),
    .vcount(vcount), .x(score_x), .y(score_y), .pixel(score_pix));
  score_display hiscore_digits (
    .clk(clk), .value(hiscore), .color(24'hFFFFFF), .hcount(hcount),
    .vcount(vcount), .x(score_x + 11'd125), .y(score_y + 10'd78), .pixel(hiscore_pix));

  // start and game-over screen images
  pixel_t logo_pix, play_pix, replay_pix, score_txt_pix, hi_txt_pix;

  picture_blob #(.IMG(IMG_LOGO), .WIDTH(300), .HEIGHT(150)) logo_img (
    .clk(clk), .active(1'b1), .hcount(hcount), .vcount(vcount),
    .x(11'd362), .y(10'd200), .pixel(logo_pix));
  picture_blob #(.IMG(IMG_PLAY), .WIDTH(165), .HEIGHT(42)) play_img (
    .clk(clk), .active(1'b1), .hcount(hcount), .vcount(vcount),
    .x(11'd424), .y(10'd400), .pixel(play_pix));
  picture_blob #(.IMG(IMG_REPLAY), .WIDTH(421), .HEIGHT(70)) replay_img (
    .clk(clk), .active(1'b1), .hcount(hcount), .vcount(vcount),
    .x(11'd297), .y(10'd244), .pixel(replay_pix));
  picture_blob #(.IMG(IMG_SCORE), .WIDTH(200), .HEIGHT(60)) score_img (
    .clk(clk), .active(1'b1), .hcount(hcount), .vcount(vcount),
    .x(11'd297), .y(10'd350), .pixel(score_txt_pix));
  picture_blob #(.IMG(IMG_HISCORE), .WIDTH(200), .HEIGHT(60)) hi_img (
    .clk(clk), .active(1'b1), .hcount(hcount), .vcount(vcount),
    .x(11'd297), .y(10'd425), .pixel(hi_txt_pix));

  pixel_t bg_pix;
  background bg (.clk(clk), .rst(rst), .tick(tick), .pixel(bg_pix));

  // ---------------------------------------------------------------- state machine
  logic old_button, old_resetbutton, click, play_overlap, replay_overlap, bomb_hit;

  assign click = button[0] && !old_button;
  assign play_overlap   = cursor_x > 16'd424 && cursor_x < 16'd589 &&
                          cursor_y > 16'd400 && cursor_y < 16'd442;
  assign replay_overlap = cursor_x > 16'd297 && cursor_x < 16'd718 &&
                          cursor_y > 16'd244 && cursor_y < 16'd314;
  assign bomb_hit = (|cursor_pix) && (|bomb_pix) && active[3];

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= GS_START;
      ready           <= 1'b0;
      old_button      <= 1'b0;
      old_resetbutton <= 1'b0;
    end else begin
      old_button      <= button[0];
      old_resetbutton <= resetbutton;
      case (state)
        GS_START: begin
          ready <= 1'b0;
          if (click && play_overlap) state <= GS_PLAY;
        end
        GS_PLAY: begin
          if (fell_total >= 5'd3 || bomb_hit) begin
            ready <= 1'b0;
            state <= GS_GAME_OVER;
          end else if (resetbutton && !old_resetbutton) begin
            ready <= 1'b0;
            state <= GS_START;
          end else begin
            ready <= 1'b1;
          end
        end
        GS_GAME_OVER: begin
          ready <= 1'b0;
          if (click && replay_overlap)                   state <= GS_PLAY;
          else if (resetbutton && !old_resetbutton)      state <= GS_START;
        end
        default: state <= GS_START;
      endcase
    end
  end

  // ---------------------------------------------------------------- compositing
  pixel_t game_pix;
  always_comb begin
    game_pix = '0;
    case (state)
      GS_PLAY: begin
        if (|orange_pix) game_pix = orange_pix;
        if (|peach_pix)  game_pix = peach_pix;
        if (|apple_pix)  game_pix = apple_pix;
        if (|bomb_pix)   game_pix = bomb_pix;
        if (|(score_pix | life_pix[0] | life_pix[1] | life_pix[2]))
          game_pix = score_pix | life_pix[0] | life_pix[1] | life_pix[2];
      end
      GS_START:
        game_pix = logo_pix | play_pix;
      default:
        game_pix = score_txt_pix | score_pix | replay_pix | hi_txt_pix | hiscore_pix;
    endcase
    if (|cursor_pix) game_pix = cursor_pix;
  end

  assign pixel = (|game_pix) ? game_pix : bg_pix;

  assign state_out    = state;
  assign game_state   = (state == GS_GAME_OVER);
  assign apple_slice  = sliced[0] && state == GS_PLAY;
  assign orange_slice = sliced[1] && state == GS_PLAY;
  assign peach_slice  = sliced[2] && state == GS_PLAY;
  assign bomb_slice   = bomb_hit && state == GS_PLAY;

  // packet_valid and the remaining per-object outputs are only observed
  // by testbenches.
  logic unused;
  assign unused = ^{packet_valid, button[7:1], cursor_x[15:11], cursor_y[15:10],
                    fell[3], score[3], is_new[3], left[3], yvelocity[0], yvelocity[1],
                    yvelocity[2], yvelocity[3]};
endmodule
